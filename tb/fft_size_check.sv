// fft_size_check: testbench helper. Drives one fft_subsystem of size N with
// FRAMES random real frames and compares every output bin with a direct DFT
// evaluated in real arithmetic (tolerance 1e-4 per part, scaled by N/16).
// Reports its counts and raises done when all frames have been checked.
module fft_size_check #(
  parameter int N = 64,
  parameter int FRAMES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import sa_pkg::*;
  sample_t s_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast;
  sample_t m_re_tdata, m_im_tdata;
  logic [IDX_W-1:0] m_re_tuser, m_im_tuser;
  logic m_re_tlast, m_im_tlast, m_re_tvalid, m_im_tvalid;
  logic m_re_tready, m_im_tready;
  sample_t frame [FRAMES][N];
  real exp_re [FRAMES][N], exp_im [FRAMES][N];
  real tol;
  int re_n = 0, im_n = 0;

  fft_subsystem #(.N(N)) dut (.*);

  initial begin
    checks = 0; failures = 0; done = 0;
    s_axis_tvalid = 0; s_axis_tdata = '0; s_axis_tlast = 0;
    tol = 1.0e-4 * N / 16.0;
  end

  always @(negedge clk) begin
    m_re_tready <= ($urandom % 100) < 70;
    m_im_tready <= ($urandom % 100) < 70;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_re_tvalid && m_re_tready) begin
      checks++;
      if ((from_q(m_re_tdata) - exp_re[re_n / N][re_n % N]) ** 2 > tol * tol ||
          int'(m_re_tuser) != re_n % N || m_re_tlast != (re_n % N == N - 1)) begin
        failures++;
        $display("FAIL N=%0d re bin %0d", N, re_n % N);
      end
      re_n++;
    end
    if (m_im_tvalid && m_im_tready) begin
      checks++;
      if ((from_q(m_im_tdata) - exp_im[im_n / N][im_n % N]) ** 2 > tol * tol ||
          int'(m_im_tuser) != im_n % N) begin
        failures++;
        $display("FAIL N=%0d im bin %0d", N, im_n % N);
      end
      im_n++;
    end
  end

  initial begin
    real ang, xr;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++)
        frame[f][n] = to_q((real'($urandom % 40001) - 20000.0) / 10000.0);
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
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        s_axis_tdata = frame[f][n]; s_axis_tvalid = 1; s_axis_tlast = (n == N - 1);
        @(posedge clk);
        while (!s_axis_tready) @(posedge clk);
        @(negedge clk) s_axis_tvalid = 0;
      end
    while (re_n < FRAMES * N || im_n < FRAMES * N) @(posedge clk);
    done = 1;
  end
endmodule
