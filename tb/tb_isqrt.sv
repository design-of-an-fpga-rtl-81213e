// tb_isqrt: self-checking test of the sequential integer square root.
// For random and corner-case radicands it checks root^2 <= r < (root+1)^2 and
// that done comes IN_W/2 clocks after start.
module tb_isqrt;
  localparam int IN_W = 66;
  localparam int OUT_W = IN_W / 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [IN_W-1:0] radicand;
  logic [OUT_W-1:0] root;
  logic busy, done;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [IN_W-1:0] r);
    logic [IN_W+3:0] lo, hi;
    int cyc = 0;
    @(negedge clk); radicand = r; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    lo = (IN_W+4)'(root) * (IN_W+4)'(root);
    hi = (IN_W+4)'(root + 1) * (IN_W+4)'(root + 1);
    checks++;
    if (!(lo <= (IN_W+4)'(r) && (IN_W+4)'(r) < hi)) begin
      failures++;
      $display("FAIL sqrt(%0d) gave %0d", r, root);
    end
    checks++;
    if (cyc != OUT_W) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    radicand = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(15); run(16); run('1);
    run(66'(64'd4294967296) * 4);  // 4.0 in Q32.32 -> 2.0 in Q16.16
    for (int i = 0; i < 300; i++)
      run({2'($urandom), $urandom, $urandom} >> ($urandom % 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
