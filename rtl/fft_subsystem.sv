// fft_subsystem: N-point radix-2 decimation-in-frequency FFT with AXI-stream
// input and separate real / imaginary AXI-stream outputs.
//
// Operation, one frame at a time:
//   LOAD    accepts N real samples (Q16.16) from s_axis and writes them, with a
//           zero imaginary part, to data_ram at addresses 0..N-1.
//   COMPUTE runs log2(N) iterations of N/2 butterflies, one butterfly per clock,
//           in place in data_ram. In iteration s (0-based) the butterfly pairs
//           are i0 = g*2h + j and i1 = i0 + h with h = N/2^(s+1), and the
//           lower output is multiplied by W_N^(j*2^s). This is the DIF flow
//           graph of the reference design (for N = 16: W^0..W^7, then
//           W^0,2,4,6, then W^0,4, then W^0).
//   OUTPUT  streams X(0) .. X(N-1) in natural order by reading address
//           bitrev(k); the real part leaves on m_re, the imaginary part on m_im,
//           each with its own TVALID/TREADY, TUSER = k and TLAST on k = N-1.
//           The next bin is presented once both parts of the current one have
//           been taken.
// Timing: N load cycles (at full input rate), N/2*log2(N) compute cycles, then
// at best one bin per two clocks. s_axis_tready is low outside LOAD.
// The transform is X(k) = sum x(n) e^{-j2*pi*nk/N}, unscaled: |X(k)| must stay
// below 2^15. The flow graph and bit-reversed output follow the original design; the
// one-butterfly-per-clock schedule and the stream details are this design's.
module fft_subsystem
  import sa_pkg::*;
#(
  parameter int N = 16,
  localparam int AW   = $clog2(N),
  localparam int LOGN = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  // time-domain samples
  input  sample_t          s_axis_tdata,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic             s_axis_tlast,
  // real part of X(k)
  output sample_t          m_re_tdata,
  output logic [IDX_W-1:0] m_re_tuser,
  output logic             m_re_tlast,
  output logic             m_re_tvalid,
  input  logic             m_re_tready,
  // imaginary part of X(k)
  output sample_t          m_im_tdata,
  output logic [IDX_W-1:0] m_im_tuser,
  output logic             m_im_tlast,
  output logic             m_im_tvalid,
  input  logic             m_im_tready
);
  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_OUTPUT} state_t;

  state_t          state;
  logic [AW-1:0]   cnt;        // load address / output bin
  logic [AW-2:0]   bfly;       // butterfly number within an iteration
  logic [$clog2(LOGN+1)-1:0] stage;
  logic            out_busy;   // a bin is being presented on the outputs

  // ---- butterfly addressing -------------------------------------------------
  logic [AW-1:0]   half, j, i0, i1;
  logic [AW-2:0]   tw_k;

  always_comb begin
    half = AW'(N >> (stage + 1));
    j    = AW'(bfly) & (half - AW'(1));
    // group base = (bfly / half) * 2 * half = (bfly - j) * 2
    i0   = ((AW'(bfly) - j) << 1) | j;
    i1   = i0 + half;
    tw_k = (AW-1)'(j << stage);
  end

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] v);
    for (int b = 0; b < AW; b++) bitrev[b] = v[AW-1-b];
  endfunction

  // ---- datapath -------------------------------------------------------------
  cplx_t    rd0, rd1, wd0, wd1, bf_sum, bf_diff;
  tw_cplx_t w;
  logic     we0, we1;
  logic [AW-1:0] ra0, wa0;

  twiddle_rom #(.N(N)) u_tw (.k(tw_k), .w(w));

  dif_butterfly u_bf (.a(rd0), .b(rd1), .w(w), .sum(bf_sum), .diff_w(bf_diff));

  data_ram #(.DEPTH(N)) u_ram (
    .clk   (clk),
    .raddr0(ra0), .rdata0(rd0),
    .raddr1(i1),  .rdata1(rd1),
    .we0   (we0), .waddr0(wa0), .wdata0(wd0),
    .we1   (we1), .waddr1(i1),  .wdata1(wd1)
  );

  logic load_fire;
  assign s_axis_tready = (state == S_LOAD);
  assign load_fire     = s_axis_tvalid && s_axis_tready;

  always_comb begin
    ra0 = (state == S_OUTPUT) ? bitrev(cnt) : i0;
    we0 = load_fire || (state == S_COMPUTE);
    wa0 = (state == S_LOAD) ? cnt : i0;
    wd0 = (state == S_LOAD) ? '{re: s_axis_tdata, im: '0} : bf_sum;
    we1 = (state == S_COMPUTE);
    wd1 = bf_diff;
  end

  // ---- control --------------------------------------------------------------
  logic re_take, im_take, re_pend, im_pend;
  assign re_take = m_re_tvalid && m_re_tready;
  assign im_take = m_im_tvalid && m_im_tready;
  assign re_pend = m_re_tvalid && !m_re_tready;
  assign im_pend = m_im_tvalid && !m_im_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      cnt         <= '0;
      bfly        <= '0;
      stage       <= '0;
      out_busy    <= 1'b0;
      m_re_tvalid <= 1'b0;
      m_im_tvalid <= 1'b0;
      m_re_tdata  <= '0;
      m_im_tdata  <= '0;
      m_re_tuser  <= '0;
      m_im_tuser  <= '0;
      m_re_tlast  <= 1'b0;
      m_im_tlast  <= 1'b0;
    end else begin
      if (re_take) m_re_tvalid <= 1'b0;
      if (im_take) m_im_tvalid <= 1'b0;
      unique case (state)
        S_LOAD: if (load_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N-1)) begin
            state <= S_COMPUTE;
            bfly  <= '0;
            stage <= '0;
          end
        end
        S_COMPUTE: begin
          bfly <= bfly + 1'b1;
          if (bfly == (AW-1)'(N/2-1)) begin
            if (stage == $bits(stage)'(LOGN - 1)) begin
              state    <= S_OUTPUT;
              cnt      <= '0;
              out_busy <= 1'b0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUTPUT: begin
          if (!out_busy) begin
            // present bin cnt on both streams
            m_re_tdata  <= rd0.re;
            m_im_tdata  <= rd0.im;
            m_re_tuser  <= IDX_W'(cnt);
            m_im_tuser  <= IDX_W'(cnt);
            m_re_tlast  <= (cnt == AW'(N-1));
            m_im_tlast  <= (cnt == AW'(N-1));
            m_re_tvalid <= 1'b1;
            m_im_tvalid <= 1'b1;
            out_busy    <= 1'b1;
          end else if (!re_pend && !im_pend) begin
            // both parts of bin cnt have been taken (this cycle or earlier)
            out_busy <= 1'b0;
            cnt      <= cnt + 1'b1;
            if (cnt == AW'(N-1)) state <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // AXI-stream rule on both outputs: a stalled word stays unchanged
  a_re_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_re_tvalid && !m_re_tready |=> m_re_tvalid && $stable({m_re_tdata, m_re_tuser, m_re_tlast}));
  a_im_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_im_tvalid && !m_im_tready |=> m_im_tvalid && $stable({m_im_tdata, m_im_tuser, m_im_tlast}));

  // s_axis_tlast is not needed: a frame is always N samples long.
  logic unused_tlast;
  assign unused_tlast = s_axis_tlast;
endmodule
