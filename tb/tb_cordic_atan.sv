// tb_cordic_atan: self-checking test of the phase unit.
// Compares atan(y/x) from the unit with the simulator's $atan within 3 LSB of
// Q16.16, over random operands of all signs and magnitudes and the axis
// cases, and checks the start-to-done latency of ITER+1 clocks.
module tb_cordic_atan;
  import sa_pkg::*;
  localparam int ITER = 24;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t x, y, angle;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_atan #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real xr, real yr);
    real exp, got;
    int cyc = 0;
    @(negedge clk); x = to_q(xr); y = to_q(yr); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    if (x == 0) exp = (y > 0) ? 1.5707963267948966 : (y < 0) ? -1.5707963267948966 : 0.0;
    else        exp = $atan(from_q(y) / from_q(x));
    got = from_q(angle);
    checks++;
    if (got - exp > 3.0 / 65536.0 || exp - got > 3.0 / 65536.0) begin
      failures++;
      $display("FAIL atan(%f/%f): got %f expected %f", from_q(y), from_q(x), got, exp);
    end
    checks++;
    if (cyc != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    x = 0; y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1.0, 0.0); run(-5.3246, 0.0); run(0.0, 2.0); run(0.0, -2.0); run(0.0, 0.0);
    run(-5.523951, 2.331861);   // bin 1 of the reference frame: -0.39944
    run(-1.290025, -4.15869);   // bin 2: 1.27001
    run(3.0, 3.0); run(-3.0, 3.0); run(1000.0, -0.001); run(0.0002, 900.0);
    for (int i = 0; i < 300; i++)
      run((real'($urandom % 2000001) - 1000000.0) / 10000.0 * (2.0 ** -($urandom % 8)),
          (real'($urandom % 2000001) - 1000000.0) / 10000.0 * (2.0 ** -($urandom % 8)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
