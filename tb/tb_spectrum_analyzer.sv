// tb_spectrum_analyzer: end-to-end test of the whole analyzer at its default
// size (N = 16, no parameter overrides).
// Frame 0 is the 16-sample reference frame with Fs = 100; its frequency,
// amplitude, phase and power spectra are compared with the published MATLAB
// values. Frames 1..3 are random; their spectra are compared with a direct DFT
// followed by f = k*Fs/N, A = |X|/N, phi = atan(Im/Re), P = |X|^2/N^2, all
// evaluated here in real arithmetic. The source sends with random gaps and
// each of the four outputs gets its own random back-pressure.
// Mechanisms that must occur at least once (counted, a failure if never):
// input back-pressure while the FFT or extractor is busy, back-pressure on
// each output stream, the skid register of each output register catching a
// word, end-of-frame on each stream, and bins with a negative real part
// (the phase fold of atan(Im/Re)).
module tb_spectrum_analyzer;
  import sa_pkg::*;
  localparam int N = 16;
  localparam int FRAMES = 4;
  logic clk = 0, rst_n = 0;
  sample_t s_axis_tdata = '0, fs;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  sample_t m_freq_tdata, m_amp_tdata, m_phase_tdata, m_power_tdata;
  logic [IDX_W-1:0] m_freq_tuser, m_amp_tuser, m_phase_tuser, m_power_tuser;
  logic m_freq_tlast, m_amp_tlast, m_phase_tlast, m_power_tlast;
  logic m_freq_tvalid, m_amp_tvalid, m_phase_tvalid, m_power_tvalid;
  logic m_freq_tready = 0, m_amp_tready = 0, m_phase_tready = 0, m_power_tready = 0;
  int checks = 0, failures = 0;

  real x_ref [16] = '{-1.6642, -0.5900, -0.2781, 0.4227, -1.6702, 0.4716, -1.2128, 0.0662,
                      0.6524, 0.3271, 1.0826, 1.0061, -0.6509, 0.2571, -0.9444, -1.3218};
  real pub_amp [16] = '{0.25290969, 0.37474888, 0.27213071, 0.10915611, 0.12510490, 0.09804007, 0.26804171, 0.13214903,
                        0.33278531, 0.13214903, 0.26804171, 0.09804007, 0.12510490, 0.10915611, 0.27213071, 0.37474888};
  real pub_ph [16]  = '{0.0, -0.39943375, 1.26999514, 0.25678422, 0.14666611, 0.46892541, 0.42409191, 1.25632355,
                        0.0, -1.25632355, -0.42409191, -0.46892541, -0.14666611, -0.25678422, -1.26999514, 0.39943375};
  real pub_pw [16]  = '{0.06396331, 0.14043672, 0.07405512, 0.01191506, 0.01565124, 0.00961186, 0.07184636, 0.01746337,
                        0.11074606, 0.01746337, 0.07184636, 0.00961186, 0.01565124, 0.01191506, 0.07405512, 0.14043672};

  sample_t frame [FRAMES][N];
  real exp_v [4][FRAMES][N];        // 0 freq, 1 amp, 2 phase, 3 power
  real tol [4] = '{1.0e-9, 1.0e-4, 2.0e-4, 1.0e-4};
  int  neg_re = 0;

  spectrum_analyzer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random back-pressure, plus a long stall of one stream at a time so that
  // results pile up behind it
  int cyc = 0;
  function automatic logic rdy(int s);
    if ((cyc / 400) % 5 == s && (cyc % 400) < 250) return 1'b0;
    return ($urandom % 100) < 40;
  endfunction
  always @(negedge clk) begin
    cyc++;
    m_freq_tready  <= rdy(0);
    m_amp_tready   <= rdy(1);
    m_phase_tready <= rdy(2);
    m_power_tready <= rdy(3);
  end

  // ---- mechanism counters ----
  int in_stall = 0, out_stall [4] = '{0, 0, 0, 0}, skid [4] = '{0, 0, 0, 0}, eof [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && !s_axis_tready) in_stall++;
    if (m_freq_tvalid && !m_freq_tready)   out_stall[0]++;
    if (m_amp_tvalid && !m_amp_tready)     out_stall[1]++;
    if (m_phase_tvalid && !m_phase_tready) out_stall[2]++;
    if (m_power_tvalid && !m_power_tready) out_stall[3]++;
    if (dut.g_out[0].u_out_reg.skid_valid) skid[0]++;
    if (dut.g_out[1].u_out_reg.skid_valid) skid[1]++;
    if (dut.g_out[2].u_out_reg.skid_valid) skid[2]++;
    if (dut.g_out[3].u_out_reg.skid_valid) skid[3]++;
  end

  // ---- scoreboards ----
  int cnt [4] = '{0, 0, 0, 0};
  real sq_err [4] = '{0.0, 0.0, 0.0, 0.0};   // frame 0 against the published values
  // RMSE limits for frame 0: frequency exact, the rest limited by the
  // four-decimal published input samples
  real rmse_max [4] = '{0.0, 2.0e-5, 5.0e-5, 2.0e-5};
  task automatic got(int s, sample_t d, logic [IDX_W-1:0] idx, logic last);
    int f = cnt[s] / N, k = cnt[s] % N;
    string nm [4] = '{"freq", "amp", "phase", "power"};
    checks++;
    if ((from_q(d) - exp_v[s][f][k]) ** 2 > tol[s] ** 2 || int'(idx) != k || last != (k == N-1)) begin
      failures++;
      $display("FAIL %s frame %0d bin %0d: got %f idx %0d last %0d, expected %f", nm[s], f, k,
               from_q(d), idx, last, exp_v[s][f][k]);
    end
    if (last) eof[s]++;
    if (f == 0) sq_err[s] += (from_q(d) - exp_v[s][f][k]) ** 2;
    cnt[s]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (m_freq_tvalid && m_freq_tready)   got(0, m_freq_tdata, m_freq_tuser, m_freq_tlast);
    if (m_amp_tvalid && m_amp_tready)     got(1, m_amp_tdata, m_amp_tuser, m_amp_tlast);
    if (m_phase_tvalid && m_phase_tready) got(2, m_phase_tdata, m_phase_tuser, m_phase_tlast);
    if (m_power_tvalid && m_power_tready) got(3, m_power_tdata, m_power_tuser, m_power_tlast);
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    real ang, re, im, xr;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++)
        frame[f][n] = (f == 0) ? to_q(x_ref[n])
                               : to_q((real'($urandom % 40001) - 20000.0) / 10000.0);
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < N; k++) begin
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = -2.0 * 3.141592653589793 * n * k / N;
          xr  = from_q(frame[f][n]);
          re += xr * $cos(ang);
          im += xr * $sin(ang);
        end
        if (re < 0.0) neg_re++;
        exp_v[0][f][k] = 100.0 * k / N;
        if (f == 0) begin
          exp_v[1][f][k] = pub_amp[k];
          exp_v[2][f][k] = pub_ph[k];
          exp_v[3][f][k] = pub_pw[k];
        end else begin
          exp_v[1][f][k] = $sqrt(re * re + im * im) / N;
          // bins 0 and N/2 of a real frame have no imaginary part: phase 0
          exp_v[2][f][k] = (k == 0 || k == N/2 || re == 0.0) ? 0.0 : $atan(im / re);
          exp_v[3][f][k] = (re * re + im * im) / (N * N);
        end
      end
    fs = to_q(100.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        while (($urandom % 4) == 0) begin s_axis_tvalid = 0; @(negedge clk); end
        s_axis_tdata = frame[f][n]; s_axis_tvalid = 1; s_axis_tlast = (n == N-1);
        @(posedge clk);
        while (!s_axis_tready) @(posedge clk);
        @(negedge clk) s_axis_tvalid = 0;
      end
    while (cnt[0] < FRAMES*N || cnt[1] < FRAMES*N || cnt[2] < FRAMES*N || cnt[3] < FRAMES*N)
      @(negedge clk);
    need("input back-pressure", in_stall);
    need("frequency output back-pressure", out_stall[0]);
    need("amplitude output back-pressure", out_stall[1]);
    need("phase output back-pressure", out_stall[2]);
    need("power output back-pressure", out_stall[3]);
    need("frequency register skid", skid[0]);
    need("amplitude register skid", skid[1]);
    need("phase register skid", skid[2]);
    need("power register skid", skid[3]);
    need("frequency end of frame", eof[0]);
    need("amplitude end of frame", eof[1]);
    need("phase end of frame", eof[2]);
    need("power end of frame", eof[3]);
    need("bins with negative real part", neg_re);
    for (int i = 0; i < 4; i++) begin
      real rmse;
      string nm [4] = '{"frequency", "amplitude", "phase", "power"};
      rmse = $sqrt(sq_err[i] / N);
      $display("RMSE of the %s spectrum against the published reference: %e", nm[i], rmse);
      checks++;
      if (rmse > rmse_max[i]) begin
        failures++;
        $display("FAIL %s RMSE above %e", nm[i], rmse_max[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
