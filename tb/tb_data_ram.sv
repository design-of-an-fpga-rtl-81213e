// tb_data_ram: writes random words through both write ports (also both in the
// same clock) and reads every word back through both read ports, against a
// model array.
module tb_data_ram;
  import sa_pkg::*;
  localparam int DEPTH = 16;
  localparam int AW = 4;
  logic clk = 0;
  logic [AW-1:0] raddr0, raddr1, waddr0, waddr1;
  cplx_t rdata0, rdata1, wdata0, wdata1;
  logic we0 = 0, we1 = 0;
  cplx_t model [DEPTH];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readback();
    for (int i = 0; i < DEPTH; i++) begin
      raddr0 = AW'(i); raddr1 = AW'(DEPTH - 1 - i);
      #1;
      checks++;
      if (rdata0 !== model[i] || rdata1 !== model[DEPTH-1-i]) begin
        failures++;
        $display("FAIL read %0d", i);
      end
    end
  endtask

  initial begin
    raddr0 = 0; raddr1 = 0; waddr0 = 0; waddr1 = 0; wdata0 = '0; wdata1 = '0;
    // fill through port 0
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we0 = 1; waddr0 = AW'(i); wdata0 = {$urandom, $urandom};
      model[i] = wdata0;
    end
    @(negedge clk); we0 = 0;
    readback();
    // paired writes, as a butterfly does
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      we0 = 1; we1 = 1;
      waddr0 = AW'($urandom); waddr1 = waddr0 ^ AW'(1 << ($urandom % AW));
      wdata0 = {$urandom, $urandom}; wdata1 = {$urandom, $urandom};
      model[waddr0] = wdata0; model[waddr1] = wdata1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    // a disabled write must change nothing
    waddr0 = 3; wdata0 = '1; waddr1 = 4; wdata1 = '1;
    @(negedge clk);
    readback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
