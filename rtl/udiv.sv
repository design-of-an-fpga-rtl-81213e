// udiv: unsigned sequential restoring divider.
//
// quot = floor(num / den). A one-cycle start pulse loads the operands; the
// divider then produces one quotient bit per clock, MSB first, and raises done
// for one cycle after NUM_W clocks, when quot is valid (it stays valid until the
// next start). busy is high while it runs; a start while busy is ignored.
// Division by zero gives an all-ones quotient. Used for the three divisions of
// the spectrum extractor (k*Fs/N, sqrt(.)/N and (.)/N^2); the algorithm is this
// design's choice.
module udiv #(
  parameter int NUM_W = 48,
  parameter int DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot
);
  logic [DEN_W-1:0]         rem;   // always below the divisor
  logic [DEN_W-1:0]         dsr;
  logic [NUM_W-1:0]         dvd;
  logic [$clog2(NUM_W+1)-1:0] cnt;
  logic [DEN_W:0]           trial;

  // remainder shifted left by one with the next dividend bit
  assign trial = {rem, dvd[NUM_W-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      rem  <= '0;
      dsr  <= '0;
      dvd  <= '0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        rem  <= '0;
        dsr  <= den;
        dvd  <= num;
        quot <= '0;
      end else if (busy) begin
        dvd <= dvd << 1;
        if (trial >= {1'b0, dsr}) begin
          rem  <= DEN_W'(trial - {1'b0, dsr});
          quot <= {quot[NUM_W-2:0], 1'b1};
        end else begin
          rem  <= DEN_W'(trial);
          quot <= {quot[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(NUM_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
