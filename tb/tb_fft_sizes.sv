// tb_fft_sizes: runs the FFT subsystem at the smallest and largest supported
// sizes, N = 4 and N = 64, on random frames checked against a direct DFT.
module tb_fft_sizes;
  logic clk = 0, rst_n = 0;
  logic done4, done64;
  int c4, f4, c64, f64;

  always #5 clk = ~clk;

  fft_size_check #(.N(4))  u_n4  (.clk, .rst_n, .done(done4),  .checks(c4),  .failures(f4));
  fft_size_check #(.N(64)) u_n64 (.clk, .rst_n, .done(done64), .checks(c64), .failures(f64));

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c64, f4 + f64 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done4 && done64);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c64, f4 + f64);
    $finish;
  end
endmodule
