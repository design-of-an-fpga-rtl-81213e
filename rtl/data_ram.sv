// data_ram: complex sample memory of the FFT subsystem.
//
// Holds one frame of DEPTH complex words (real and imaginary part, Q16.16).
// The input stage writes the frame into it, every FFT iteration reads two
// words and writes the two butterfly results back in place, and the output
// stage reads the final spectrum from it. The original design names it "data RAM";
// its organisation is this design's choice: two combinational read ports and
// two write ports that write on the rising clock edge, so one butterfly can be
// read and written back in a single clock. The two write ports must not
// address the same word in the same cycle (port 1 would win). Contents are not
// reset; each word is written before it is read.
module data_ram
  import sa_pkg::*;
#(
  parameter int DEPTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr0,
  output cplx_t         rdata0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata1,
  input  logic          we0,
  input  logic [AW-1:0] waddr0,
  input  cplx_t         wdata0,
  input  logic          we1,
  input  logic [AW-1:0] waddr1,
  input  cplx_t         wdata1
);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];
endmodule
