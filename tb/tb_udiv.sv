// tb_udiv: self-checking test of the sequential divider.
// Random and corner-case operands; each quotient is compared with the
// simulator's own division and the start-to-done latency with NUM_W clocks.
module tb_udiv;
  localparam int NUM_W = 48;
  localparam int DEN_W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NUM_W-1:0] num, quot;
  logic [DEN_W-1:0] den;
  logic busy, done;
  int checks = 0, failures = 0;

  udiv #(.NUM_W(NUM_W), .DEN_W(DEN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [NUM_W-1:0] n, logic [DEN_W-1:0] d);
    logic [NUM_W-1:0] exp;
    int cyc = 0;
    exp = (d == 0) ? '1 : n / NUM_W'(d);
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (quot !== exp) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d expected %0d", n, d, quot, exp);
    end
    checks++;
    if (cyc != NUM_W) begin
      failures++;
      $display("FAIL latency %0d clocks after the load clock, expected %0d", cyc, NUM_W);
    end
  endtask

  initial begin
    num = 0; den = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(100, 7); run(0, 5); run('1, 1); run('1, '1); run(12345, 0);
    run(48'd6_553_600 * 5, 16);  // 5 * 100.0 (Q16.16) / 16 = 31.25
    for (int i = 0; i < 300; i++)
      run({$urandom, $urandom} >> ($urandom % 40), DEN_W'($urandom % 70000 + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
