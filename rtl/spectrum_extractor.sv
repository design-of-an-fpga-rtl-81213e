// spectrum_extractor: the four spectrum features of each FFT bin.
//
// For every bin k taken from the real (s_re) and imaginary (s_im) streams it
// computes, with N = n_samples and Fs = fs:
//   frequency  f_k = k * Fs / N
//   amplitude  A_k = sqrt(re^2 + im^2) / N
//   phase      phi_k = atan(im / re)          (radians, in [-pi/2, pi/2])
//   power      P_k = (re^2 + im^2) / N^2
// and sends each on its own AXI stream, TUSER carrying the index k and TLAST
// marking k = N-1. These are the operations, inputs and outputs of the
// reference design's extractor; the units that carry them out are this
// design's: k comes from a counter of accepted bins that wraps at N, the
// divisions are sequential restoring dividers (udiv), the root a sequential
// integer square root (isqrt) and the division-plus-arctangent of the phase a
// CORDIC unit (cordic_atan). All results are truncated to Q16.16 except the
// phase, which is rounded.
// Timing: a bin is accepted (s_re_tready = s_im_tready = 1 for one clock) when
// both inputs are valid and all four results of the previous bin have left.
// The four units then run in parallel; the frequency is ready after about
// 40 clocks, the phase after ITER+2, the amplitude after about 70 and the power
// after about 68, and each result waits in its own output register until taken.
module spectrum_extractor
  import sa_pkg::*;
#(
  parameter int PHASE_ITER = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  // FFT output: real part
  input  sample_t          s_re_tdata,
  input  logic             s_re_tvalid,
  output logic             s_re_tready,
  // FFT output: imaginary part
  input  sample_t          s_im_tdata,
  input  logic             s_im_tvalid,
  output logic             s_im_tready,
  // parameters of the analysis
  input  sample_t          fs,          // sampling frequency, Q16.16, >= 0
  input  logic [IDX_W:0]   n_samples,   // number of samples N, 1 .. 2^IDX_W
  // frequency stream
  output sample_t          m_freq_tdata,
  output logic [IDX_W-1:0] m_freq_tuser,
  output logic             m_freq_tlast,
  output logic             m_freq_tvalid,
  input  logic             m_freq_tready,
  // amplitude stream
  output sample_t          m_amp_tdata,
  output logic [IDX_W-1:0] m_amp_tuser,
  output logic             m_amp_tlast,
  output logic             m_amp_tvalid,
  input  logic             m_amp_tready,
  // phase stream
  output sample_t          m_phase_tdata,
  output logic [IDX_W-1:0] m_phase_tuser,
  output logic             m_phase_tlast,
  output logic             m_phase_tvalid,
  input  logic             m_phase_tready,
  // power stream
  output sample_t          m_power_tdata,
  output logic [IDX_W-1:0] m_power_tuser,
  output logic             m_power_tlast,
  output logic             m_power_tvalid,
  input  logic             m_power_tready
);
  localparam int NW    = IDX_W + 1;           // width of N
  localparam int MAG_W = 2 * DATA_W + 2;      // re^2 + im^2, Q32.32, even width
  localparam int F_W   = IDX_W + DATA_W;      // k * Fs
  localparam int R_W   = MAG_W / 2;           // square root, Q16.16

  // ---- input join and sample-number counter ---------------------------------
  logic [3:0]       pending;     // freq, amp, phase, power not yet sent
  logic             accept;
  logic             go;          // start the units, one clock after accept
  logic [IDX_W-1:0] kcnt, k_q;
  logic             last_q;
  sample_t          re_q, im_q;

  assign accept      = (pending == 4'b0) && s_re_tvalid && s_im_tvalid;
  assign s_re_tready = accept;
  assign s_im_tready = accept;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kcnt   <= '0;
      k_q    <= '0;
      last_q <= 1'b0;
      re_q   <= '0;
      im_q   <= '0;
      go     <= 1'b0;
    end else begin
      go <= accept;
      if (accept) begin
        re_q   <= s_re_tdata;
        im_q   <= s_im_tdata;
        k_q    <= kcnt;
        last_q <= (NW'(kcnt) == n_samples - NW'(1));
        kcnt   <= (NW'(kcnt) >= n_samples - NW'(1)) ? '0 : kcnt + 1'b1;
      end
    end
  end

  // ---- squares and sums --------------------------------------------------------
  logic signed [2*DATA_W-1:0] re_sq, im_sq;
  logic [MAG_W-1:0]           mag2;         // Q32.32
  logic [F_W-1:0]             k_fs;
  logic [2*NW-1:0]            n_sq;

  always_comb begin
    re_sq = re_q * re_q;
    im_sq = im_q * im_q;
    mag2  = MAG_W'(unsigned'(re_sq)) + MAG_W'(unsigned'(im_sq));
    k_fs  = F_W'(k_q) * F_W'(unsigned'(fs));
    n_sq  = (2*NW)'(n_samples) * (2*NW)'(n_samples);
  end

  // ---- arithmetic units -----------------------------------------------------------
  logic           f_done, r_done, a_done, ph_done, p_done;
  logic           f_busy, r_busy, a_busy, ph_busy, p_busy;
  logic [F_W-1:0] f_quot;
  logic [R_W-1:0] root, a_quot;
  logic [MAG_W-1:0] p_quot;
  sample_t        ph_angle;

  udiv #(.NUM_W(F_W), .DEN_W(NW)) u_freq_div (
    .clk, .rst_n, .start(go), .num(k_fs), .den(n_samples),
    .busy(f_busy), .done(f_done), .quot(f_quot));

  isqrt #(.IN_W(MAG_W)) u_amp_sqrt (
    .clk, .rst_n, .start(go), .radicand(mag2),
    .busy(r_busy), .done(r_done), .root(root));

  udiv #(.NUM_W(R_W), .DEN_W(NW)) u_amp_div (
    .clk, .rst_n, .start(r_done), .num(root), .den(n_samples),
    .busy(a_busy), .done(a_done), .quot(a_quot));

  cordic_atan #(.ITER(PHASE_ITER)) u_phase (
    .clk, .rst_n, .start(go), .x(re_q), .y(im_q),
    .busy(ph_busy), .done(ph_done), .angle(ph_angle));

  udiv #(.NUM_W(MAG_W), .DEN_W(2*NW)) u_power_div (
    .clk, .rst_n, .start(go), .num(mag2), .den(n_sq),
    .busy(p_busy), .done(p_done), .quot(p_quot));

  // ---- output registers -----------------------------------------------------------
  logic [3:0] take;
  assign take = {m_power_tvalid && m_power_tready, m_phase_tvalid && m_phase_tready,
                 m_amp_tvalid && m_amp_tready,     m_freq_tvalid && m_freq_tready};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending        <= '0;
      m_freq_tvalid  <= 1'b0;
      m_amp_tvalid   <= 1'b0;
      m_phase_tvalid <= 1'b0;
      m_power_tvalid <= 1'b0;
      m_freq_tdata   <= '0;
      m_amp_tdata    <= '0;
      m_phase_tdata  <= '0;
      m_power_tdata  <= '0;
    end else begin
      if (accept) pending <= 4'b1111;
      else        pending <= pending & ~take;
      if (take[0]) m_freq_tvalid  <= 1'b0;
      if (take[1]) m_amp_tvalid   <= 1'b0;
      if (take[2]) m_phase_tvalid <= 1'b0;
      if (take[3]) m_power_tvalid <= 1'b0;
      if (f_done) begin
        m_freq_tdata  <= sample_t'(f_quot);
        m_freq_tvalid <= 1'b1;
      end
      if (a_done) begin
        m_amp_tdata  <= sample_t'(a_quot);
        m_amp_tvalid <= 1'b1;
      end
      if (ph_done) begin
        m_phase_tdata  <= ph_angle;
        m_phase_tvalid <= 1'b1;
      end
      if (p_done) begin
        m_power_tdata  <= sample_t'(p_quot >> FRAC_W);
        m_power_tvalid <= 1'b1;
      end
    end
  end

  // AXI-stream rule on the results: a stalled word stays unchanged
  a_freq_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_freq_tvalid && !m_freq_tready |=> m_freq_tvalid && $stable({m_freq_tdata, m_freq_tuser}));
  a_amp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_amp_tvalid && !m_amp_tready |=> m_amp_tvalid && $stable({m_amp_tdata, m_amp_tuser}));
  a_phase_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_phase_tvalid && !m_phase_tready |=> m_phase_tvalid && $stable({m_phase_tdata, m_phase_tuser}));
  a_power_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_power_tvalid && !m_power_tready |=> m_power_tvalid && $stable({m_power_tdata, m_power_tuser}));

  // index and end-of-frame are those of the bin in progress
  assign m_freq_tuser  = k_q;
  assign m_amp_tuser   = k_q;
  assign m_phase_tuser = k_q;
  assign m_power_tuser = k_q;
  assign m_freq_tlast  = last_q;
  assign m_amp_tlast   = last_q;
  assign m_phase_tlast = last_q;
  assign m_power_tlast = last_q;

  logic unused;
  assign unused = ^{f_busy, r_busy, a_busy, ph_busy, p_busy,
                    f_quot[F_W-1:DATA_W], a_quot[R_W-1]};
endmodule
