// spectrum_analyzer: multi-feature FFT spectrum analyzer (top level).
//
// A frame of N real samples enters on s_axis, passes the input register, and
// is transformed by the radix-2 DIF FFT subsystem. Its real and imaginary
// output streams feed the spectrum extractor, which computes for every bin k
// the frequency k*Fs/N, the amplitude |X(k)|/N, the phase atan(Im/Re) and the
// power |X(k)|^2/N^2. Each of the four features leaves through its own output
// register as an AXI stream whose TUSER is the bin index k and whose TLAST
// marks the last bin of a frame. This chain and the four output registers are
// the reference design's; the number formats (Q16.16 everywhere, phase in
// radians), the register slices and the single synchronous active-low reset
// are this design's choices. N is a build-time parameter and is also the
// "number of samples" seen by the extractor; fs is a run-time input.
// Throughput: one frame takes N load clocks, N/2*log2(N) FFT clocks and about
// 75 clocks per bin in the extractor (its sequential units set the pace).
module spectrum_analyzer
  import sa_pkg::*;
#(
  parameter int N = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // time-domain samples, Q16.16
  input  sample_t          s_axis_tdata,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic             s_axis_tlast,
  // sampling frequency, Q16.16
  input  sample_t          fs,
  // frequency spectrum
  output sample_t          m_freq_tdata,
  output logic [IDX_W-1:0] m_freq_tuser,
  output logic             m_freq_tlast,
  output logic             m_freq_tvalid,
  input  logic             m_freq_tready,
  // amplitude spectrum
  output sample_t          m_amp_tdata,
  output logic [IDX_W-1:0] m_amp_tuser,
  output logic             m_amp_tlast,
  output logic             m_amp_tvalid,
  input  logic             m_amp_tready,
  // phase spectrum, radians
  output sample_t          m_phase_tdata,
  output logic [IDX_W-1:0] m_phase_tuser,
  output logic             m_phase_tlast,
  output logic             m_phase_tvalid,
  input  logic             m_phase_tready,
  // power spectrum
  output sample_t          m_power_tdata,
  output logic [IDX_W-1:0] m_power_tuser,
  output logic             m_power_tlast,
  output logic             m_power_tvalid,
  input  logic             m_power_tready
);
  localparam int RW = $bits(result_t);

  // ---- input register ---------------------------------------------------------
  logic [DATA_W:0] in_q;
  logic            in_valid, in_ready;

  axis_reg #(.W(DATA_W + 1)) u_in_reg (
    .clk, .rst_n,
    .s_tdata({s_axis_tdata, s_axis_tlast}), .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .m_tdata(in_q), .m_tvalid(in_valid), .m_tready(in_ready));

  // ---- FFT subsystem ------------------------------------------------------------
  sample_t          re_d, im_d;
  logic             re_v, im_v, re_r, im_r;
  logic [IDX_W-1:0] re_k, im_k;
  logic             re_l, im_l;

  fft_subsystem #(.N(N)) u_fft (
    .clk, .rst_n,
    .s_axis_tdata(sample_t'(in_q[DATA_W:1])), .s_axis_tvalid(in_valid),
    .s_axis_tready(in_ready), .s_axis_tlast(in_q[0]),
    .m_re_tdata(re_d), .m_re_tuser(re_k), .m_re_tlast(re_l), .m_re_tvalid(re_v), .m_re_tready(re_r),
    .m_im_tdata(im_d), .m_im_tuser(im_k), .m_im_tlast(im_l), .m_im_tvalid(im_v), .m_im_tready(im_r));

  // ---- spectrum extractor subsystem ---------------------------------------------
  result_t    res [4];
  logic [3:0] res_v, res_r;

  spectrum_extractor u_ext (
    .clk, .rst_n,
    .s_re_tdata(re_d), .s_re_tvalid(re_v), .s_re_tready(re_r),
    .s_im_tdata(im_d), .s_im_tvalid(im_v), .s_im_tready(im_r),
    .fs(fs), .n_samples((IDX_W+1)'(N)),
    .m_freq_tdata (res[0].data), .m_freq_tuser (res[0].idx), .m_freq_tlast (res[0].last),
    .m_freq_tvalid(res_v[0]),    .m_freq_tready(res_r[0]),
    .m_amp_tdata  (res[1].data), .m_amp_tuser  (res[1].idx), .m_amp_tlast  (res[1].last),
    .m_amp_tvalid (res_v[1]),    .m_amp_tready (res_r[1]),
    .m_phase_tdata(res[2].data), .m_phase_tuser(res[2].idx), .m_phase_tlast(res[2].last),
    .m_phase_tvalid(res_v[2]),   .m_phase_tready(res_r[2]),
    .m_power_tdata(res[3].data), .m_power_tuser(res[3].idx), .m_power_tlast(res[3].last),
    .m_power_tvalid(res_v[3]),   .m_power_tready(res_r[3]));

  // ---- output registers: Freq. Index, Amplitude, Phase, Power --------------------
  result_t    out [4];
  logic [3:0] out_v, out_r;

  for (genvar g = 0; g < 4; g++) begin : g_out
    axis_reg #(.W(RW)) u_out_reg (
      .clk, .rst_n,
      .s_tdata(res[g]), .s_tvalid(res_v[g]), .s_tready(res_r[g]),
      .m_tdata(out[g]), .m_tvalid(out_v[g]), .m_tready(out_r[g]));
  end

  assign {m_freq_tdata,  m_freq_tuser,  m_freq_tlast}  = out[0];
  assign {m_amp_tdata,   m_amp_tuser,   m_amp_tlast}   = out[1];
  assign {m_phase_tdata, m_phase_tuser, m_phase_tlast} = out[2];
  assign {m_power_tdata, m_power_tuser, m_power_tlast} = out[3];
  assign {m_power_tvalid, m_phase_tvalid, m_amp_tvalid, m_freq_tvalid} = out_v;
  assign out_r = {m_power_tready, m_phase_tready, m_amp_tready, m_freq_tready};

  // the FFT's per-stream index and end-of-frame duplicate the extractor's counter
  logic unused;
  assign unused = ^{re_k, im_k, re_l, im_l};
endmodule
