// tb_spectrum_extractor: feeds FFT bins to the extractor and checks the four
// result streams.
//  Part 1: the 16 published MATLAB FFT bins of the reference frame, Fs = 100,
//          N = 16; results are compared with the published frequency,
//          amplitude, phase and power columns.
//  Part 2: random bins (including bins with a zero real or imaginary part),
//          Fs = 1000, N = 8, compared with f = k*Fs/N, A = |X|/N,
//          phi = atan(im/re), P = |X|^2/N^2 evaluated here in real arithmetic.
// Each output stream gets its own random back-pressure; index (TUSER) and
// TLAST are checked on every result.
module tb_spectrum_extractor;
  import sa_pkg::*;
  localparam int NB1 = 16, NB2 = 40, NB = NB1 + NB2;
  logic clk = 0, rst_n = 0;
  sample_t s_re_tdata = '0, s_im_tdata = '0, fs;
  logic s_re_tvalid = 0, s_im_tvalid = 0, s_re_tready, s_im_tready;
  logic [IDX_W:0] n_samples;
  sample_t m_freq_tdata, m_amp_tdata, m_phase_tdata, m_power_tdata;
  logic [IDX_W-1:0] m_freq_tuser, m_amp_tuser, m_phase_tuser, m_power_tuser;
  logic m_freq_tlast, m_amp_tlast, m_phase_tlast, m_power_tlast;
  logic m_freq_tvalid, m_amp_tvalid, m_phase_tvalid, m_power_tvalid;
  logic m_freq_tready = 0, m_amp_tready = 0, m_phase_tready = 0, m_power_tready = 0;
  int checks = 0, failures = 0;

  real mat_re [16] = '{-4.046660, -5.523869, -1.290118, -1.689136, -1.980310, -1.399323, 3.908658, -0.653912,
                       -5.324520, -0.653912, 3.908658, -1.399323, -1.980310, -1.689136, -1.290118, -5.523869};
  real mat_im [16] = '{0.0, 2.331754, -4.158689, -0.443549, -0.292510, -0.708836, 1.764751, -2.010693,
                       0.0, 2.010693, -1.764751, 0.708836, 0.292510, 0.443549, 4.158689, -2.331754};
  // published frequency index, amplitude, phase and power (MATLAB columns)
  real pub_amp [16] = '{0.25290969, 0.37474888, 0.27213071, 0.10915611, 0.12510490, 0.09804007, 0.26804171, 0.13214903,
                        0.33278531, 0.13214903, 0.26804171, 0.09804007, 0.12510490, 0.10915611, 0.27213071, 0.37474888};
  real pub_ph [16]  = '{0.0, -0.39943375, 1.26999514, 0.25678422, 0.14666611, 0.46892541, 0.42409191, 1.25632355,
                        0.0, -1.25632355, -0.42409191, -0.46892541, -0.14666611, -0.25678422, -1.26999514, 0.39943375};
  real pub_pw [16]  = '{0.06396331, 0.14043672, 0.07405512, 0.01191506, 0.01565124, 0.00961186, 0.07184636, 0.01746337,
                        0.11074606, 0.01746337, 0.07184636, 0.00961186, 0.01565124, 0.01191506, 0.07405512, 0.14043672};

  sample_t bre [NB], bim [NB];
  real e_f [4][NB];   // expected value per stream: 0 freq, 1 amp, 2 phase, 3 power
  real tol [4] = '{1.0e-9, 5.0e-5, 1.0e-4, 5.0e-5};
  int  e_k [NB], e_n [NB];

  spectrum_extractor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    m_freq_tready  <= ($urandom % 100) < 50;
    m_amp_tready   <= ($urandom % 100) < 50;
    m_phase_tready <= ($urandom % 100) < 50;
    m_power_tready <= ($urandom % 100) < 50;
  end

  int cnt [4] = '{0, 0, 0, 0};
  task automatic got(int s, sample_t d, logic [IDX_W-1:0] idx, logic last);
    int b = cnt[s];
    string nm [4] = '{"freq", "amp", "phase", "power"};
    checks++;
    if ((from_q(d) - e_f[s][b]) ** 2 > tol[s] ** 2 || int'(idx) != e_k[b] ||
        last != (e_k[b] == e_n[b] - 1)) begin
      failures++;
      $display("FAIL %s bin %0d (k=%0d): got %f idx %0d last %0d, expected %f", nm[s], b, e_k[b],
               from_q(d), idx, last, e_f[s][b]);
    end
    cnt[s]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (m_freq_tvalid && m_freq_tready)   got(0, m_freq_tdata, m_freq_tuser, m_freq_tlast);
    if (m_amp_tvalid && m_amp_tready)     got(1, m_amp_tdata, m_amp_tuser, m_amp_tlast);
    if (m_phase_tvalid && m_phase_tready) got(2, m_phase_tdata, m_phase_tuser, m_phase_tlast);
    if (m_power_tvalid && m_power_tready) got(3, m_power_tdata, m_power_tuser, m_power_tlast);
  end

  initial begin
    real re, im, nn, fsr;
    for (int b = 0; b < NB; b++) begin
      if (b < NB1) begin
        bre[b] = to_q(mat_re[b]); bim[b] = to_q(mat_im[b]);
        e_k[b] = b; e_n[b] = 16;
        e_f[0][b] = 6.25 * b;          // published frequency index steps by 6.25
        e_f[1][b] = pub_amp[b];
        e_f[2][b] = pub_ph[b];
        e_f[3][b] = pub_pw[b];
      end else begin
        bre[b] = to_q((real'($urandom % 200001) - 100000.0) / 10000.0);
        bim[b] = to_q((real'($urandom % 200001) - 100000.0) / 10000.0);
        if (b == NB1 + 3) bre[b] = 0;
        if (b == NB1 + 5) bim[b] = 0;
        if (b == NB1 + 9) begin bre[b] = 0; bim[b] = 0; end
        e_k[b] = (b - NB1) % 8; e_n[b] = 8;
        re = from_q(bre[b]); im = from_q(bim[b]); nn = 8.0; fsr = 1000.0;
        e_f[0][b] = e_k[b] * fsr / nn;
        e_f[1][b] = $sqrt(re * re + im * im) / nn;
        e_f[2][b] = (re == 0.0) ? ((im > 0.0) ? 1.5707963267948966 : (im < 0.0) ? -1.5707963267948966 : 0.0)
                                : $atan(im / re);
        e_f[3][b] = (re * re + im * im) / (nn * nn);
      end
    end
    fs = to_q(100.0); n_samples = 16;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (b == NB1) begin
        // let the first part drain, then change the analysis parameters
        while (cnt[0] < NB1 || cnt[1] < NB1 || cnt[2] < NB1 || cnt[3] < NB1) @(negedge clk);
        @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
        fs = to_q(1000.0); n_samples = 8;
      end
      @(negedge clk);
      s_re_tdata = bre[b]; s_im_tdata = bim[b];
      // the two streams may become valid in different clocks
      s_re_tvalid = 1;
      if ($urandom % 2) @(negedge clk);
      s_im_tvalid = 1;
      @(posedge clk);
      while (!(s_re_tready && s_im_tready)) @(posedge clk);
      @(negedge clk); s_re_tvalid = 0; s_im_tvalid = 0;
    end
    while (cnt[0] < NB || cnt[1] < NB || cnt[2] < NB || cnt[3] < NB) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
