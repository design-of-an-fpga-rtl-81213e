// isqrt: unsigned sequential integer square root.
//
// root = floor(sqrt(radicand)), computed by the binary digit-by-digit method:
// each clock brings down two radicand bits and decides one root bit, MSB
// first. A one-cycle start pulse loads the radicand; done pulses for one cycle
// IN_W/2 clocks later, when root is valid (it stays valid until the next
// start). busy is high while it runs. IN_W must be even. Used for the square
// root of the amplitude path; the algorithm is this design's choice.
module isqrt #(
  parameter int IN_W = 66,
  localparam int OUT_W = IN_W / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IN_W-1:0]  radicand,
  output logic             busy,
  output logic             done,
  output logic [OUT_W-1:0] root
);
  logic [IN_W-1:0]   val;   // radicand bits not yet used, MSB-aligned
  logic [OUT_W-1:0]  rem;   // partial remainder, at most 2*root
  logic [OUT_W+1:0]  trial, test;
  logic [$clog2(OUT_W+1)-1:0] cnt;

  always_comb begin
    trial = {rem, val[IN_W-1 -: 2]};
    test  = {root, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      val  <= '0;
      rem  <= '0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        val  <= radicand;
        rem  <= '0;
        root <= '0;
      end else if (busy) begin
        val <= val << 2;
        if (trial >= test) begin
          rem  <= OUT_W'(trial - test);
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= OUT_W'(trial);
          root <= {root[OUT_W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(OUT_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
