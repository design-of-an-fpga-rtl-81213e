// tb_fft_subsystem: runs the 16-point FFT on the reference frame of 16 samples
// and on random frames. Every X(k) is compared with a direct DFT computed here
// in real arithmetic (tolerance 2e-4), and the reference frame also with the
// published MATLAB spectrum (tolerance 5e-4, the published samples being
// rounded to four decimals). The two output streams get independent random
// back-pressure; the test checks index and TLAST, natural output order, and
// that the first bin appears N/2*log2(N)+1 clocks after the last sample is
// taken.
module tb_fft_subsystem;
  import sa_pkg::*;
  localparam int N = 16;
  localparam int FRAMES = 4;
  logic clk = 0, rst_n = 0;
  sample_t s_axis_tdata = '0;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  sample_t m_re_tdata, m_im_tdata;
  logic [IDX_W-1:0] m_re_tuser, m_im_tuser;
  logic m_re_tlast, m_im_tlast, m_re_tvalid, m_im_tvalid;
  logic m_re_tready = 0, m_im_tready = 0;
  int checks = 0, failures = 0;

  real x_ref [16] = '{-1.6642, -0.5900, -0.2781, 0.4227, -1.6702, 0.4716, -1.2128, 0.0662,
                      0.6524, 0.3271, 1.0826, 1.0061, -0.6509, 0.2571, -0.9444, -1.3218};
  real mat_re [16] = '{-4.046660, -5.523869, -1.290118, -1.689136, -1.980310, -1.399323, 3.908658, -0.653912,
                       -5.324520, -0.653912, 3.908658, -1.399323, -1.980310, -1.689136, -1.290118, -5.523869};
  real mat_im [16] = '{0.0, 2.331754, -4.158689, -0.443549, -0.292510, -0.708836, 1.764751, -2.010693,
                       0.0, 2.010693, -1.764751, 0.708836, 0.292510, 0.443549, 4.158689, -2.331754};

  sample_t frame [FRAMES][N];
  real exp_re [FRAMES][N], exp_im [FRAMES][N];

  fft_subsystem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI-stream rule on the outputs: a stalled word stays put
  sample_t re_hold, im_hold;
  logic re_stall = 0, im_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (re_stall) begin
      checks++;
      if (!m_re_tvalid || m_re_tdata !== re_hold) begin failures++; $display("FAIL re stream dropped a stalled word"); end
    end
    if (im_stall) begin
      checks++;
      if (!m_im_tvalid || m_im_tdata !== im_hold) begin failures++; $display("FAIL im stream dropped a stalled word"); end
    end
    re_stall <= m_re_tvalid && !m_re_tready;  re_hold <= m_re_tdata;
    im_stall <= m_im_tvalid && !m_im_tready;  im_hold <= m_im_tdata;
  end else begin
    re_stall <= 1'b0;
    im_stall <= 1'b0;
  end

  always @(negedge clk) begin
    m_re_tready <= ($urandom % 100) < 60;
    m_im_tready <= ($urandom % 100) < 60;
  end

  // receive side: one bin needs both parts
  int re_k = 0, im_k = 0, re_f = 0, im_f = 0;
  real se_re = 0.0, se_im = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (m_re_tvalid && m_re_tready) begin
      checks++;
      if (int'(m_re_tuser) != re_k || m_re_tlast != (re_k == N-1) ||
          (from_q(m_re_tdata) - exp_re[re_f][re_k]) ** 2 > 4.0e-8) begin
        failures++;
        $display("FAIL frame %0d re X(%0d) idx %0d: got %f expected %f", re_f, re_k, m_re_tuser,
                 from_q(m_re_tdata), exp_re[re_f][re_k]);
      end
      if (re_f == 0) begin
        checks++;
        se_re += (from_q(m_re_tdata) - mat_re[re_k]) ** 2;
        if ((from_q(m_re_tdata) - mat_re[re_k]) ** 2 > 2.5e-7) begin
          failures++; $display("FAIL re X(%0d) vs published value", re_k);
        end
      end
      if (re_k == N-1) begin re_k = 0; re_f++; end else re_k++;
    end
    if (m_im_tvalid && m_im_tready) begin
      checks++;
      if (int'(m_im_tuser) != im_k || m_im_tlast != (im_k == N-1) ||
          (from_q(m_im_tdata) - exp_im[im_f][im_k]) ** 2 > 4.0e-8) begin
        failures++;
        $display("FAIL frame %0d im X(%0d): got %f expected %f", im_f, im_k,
                 from_q(m_im_tdata), exp_im[im_f][im_k]);
      end
      if (im_f == 0) begin
        checks++;
        se_im += (from_q(m_im_tdata) - mat_im[im_k]) ** 2;
        if ((from_q(m_im_tdata) - mat_im[im_k]) ** 2 > 2.5e-7) begin
          failures++; $display("FAIL im X(%0d) vs published value", im_k);
        end
      end
      if (im_k == N-1) begin im_k = 0; im_f++; end else im_k++;
    end
  end

  initial begin
    real ang, xr;
    int t_last, t_first;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++)
        frame[f][n] = (f == 0) ? to_q(x_ref[n])
                               : to_q((real'($urandom % 20001) - 10000.0) / 5000.0);
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < N; k++) begin
        exp_re[f][k] = 0.0; exp_im[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = -2.0 * 3.141592653589793 * n * k / N;
          xr  = from_q(frame[f][n]);
          exp_re[f][k] += xr * $cos(ang);
          exp_im[f][k] += xr * $sin(ang);
        end
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        // source gaps on later frames
        while (f > 1 && ($urandom % 3) == 0) begin s_axis_tvalid = 0; @(negedge clk); end
        s_axis_tdata = frame[f][n]; s_axis_tvalid = 1; s_axis_tlast = (n == N-1);
        @(posedge clk);
        while (!s_axis_tready) @(posedge clk);
        t_last = int'($time / 10);
      end
      @(negedge clk) s_axis_tvalid = 0;
      if (f == 0) begin
        while (!(m_re_tvalid || m_im_tvalid)) @(posedge clk);
        t_first = int'($time / 10);
        checks++;
        // valid rises N/2*log2(N)+1 clocks after the last sample is taken and is
        // first seen by this loop at the clock after that
        if (t_first - t_last != N/2 * $clog2(N) + 2) begin
          failures++;
          $display("FAIL first bin %0d clocks after last sample, expected %0d", t_first - t_last, N/2*$clog2(N)+2);
        end
      end
    end
    while (re_f < FRAMES || im_f < FRAMES) @(posedge clk);
    checks++;
    if (re_f != FRAMES || im_f != FRAMES) failures++;
    $display("RMSE against the published spectrum: real %e, imaginary %e",
             $sqrt(se_re / N), $sqrt(se_im / N));
    checks++;
    if ($sqrt(se_re / N) > 2.0e-4 || $sqrt(se_im / N) > 2.0e-4) begin
      failures++;
      $display("FAIL RMSE above 2e-4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
