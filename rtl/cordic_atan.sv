// cordic_atan: phase unit, angle = atan(y / x) in radians.
//
// The phase of a bin is the arctangent of the ratio of its imaginary to its
// real part (not the four-quadrant atan2), so the result lies in [-pi/2, pi/2].
// The division and the arctangent are merged into one CORDIC unit working in
// vectoring mode on (|x|, y*sign(x)), whose angle equals atan(y/x) without ever
// forming the ratio, which is unbounded near x = 0. x = 0 gives +-pi/2, y = 0
// gives 0.
// x and y are Q16.16 and get GUARD extra fraction bits inside; the angle is
// accumulated in Q3.28 from an elaboration-time table of atan(2^-i) and
// rounded to Q16.16 at the end. Timing: start loads x and y, ITER clocks of
// micro-rotations follow, and done pulses for one cycle with angle valid
// (held until the next start). The CORDIC method is this design's choice.
module cordic_atan
  import sa_pkg::*;
#(
  parameter int ITER  = 24,
  parameter int GUARD = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t x,
  input  sample_t y,
  output logic    busy,
  output logic    done,
  output sample_t angle
);
  localparam int XW    = DATA_W + GUARD + 3;  // sign, |min| and CORDIC gain
  localparam int ZFRAC = 28;
  localparam int ZW    = 32;

  typedef logic signed [ZW-1:0] z_t;
  typedef z_t atan_tab_t [ITER];

  function automatic atan_tab_t make_atan_tab();
    atan_tab_t tab;
    for (int i = 0; i < ITER; i++)
      tab[i] = z_t'($rtoi($atan(2.0 ** (-i)) * (2.0 ** ZFRAC) + 0.5));
    return tab;
  endfunction

  localparam atan_tab_t ATAN_TAB = make_atan_tab();

  logic signed [XW-1:0] xr, yr;
  z_t                   z;
  logic [$clog2(ITER+1)-1:0] i;
  logic signed [XW-1:0] x_in, y_in;
  z_t                   z_rnd;

  always_comb begin
    x_in  = XW'(x) <<< GUARD;
    y_in  = XW'(y) <<< GUARD;
    z_rnd = z + z_t'(1 <<< (ZFRAC - FRAC_W - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      i     <= '0;
      xr    <= '0;
      yr    <= '0;
      z     <= '0;
      angle <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        i    <= '0;
        z    <= '0;
        // fold into the right half plane: atan(y/x) = atan((-y)/(-x))
        xr   <= (x < 0) ? -x_in : x_in;
        yr   <= (x < 0) ? -y_in : y_in;
      end else if (busy) begin
        if (yr == 0) begin
          // exactly on the axis: the angle is reached
        end else if (yr > 0) begin
          xr <= xr + (yr >>> i);
          yr <= yr - (xr >>> i);
          z  <= z + ATAN_TAB[i];
        end else begin
          xr <= xr - (yr >>> i);
          yr <= yr + (xr >>> i);
          z  <= z - ATAN_TAB[i];
        end
        i <= i + 1'b1;
        if (i == $bits(i)'(ITER - 1)) begin
          busy <= 1'b0;
        end
      end
      // present the rounded angle the clock after the last micro-rotation
      if (!busy && !done && i == $bits(i)'(ITER)) begin
        angle <= sample_t'(z_rnd >>> (ZFRAC - FRAC_W));
        done  <= 1'b1;
        i     <= '0;
      end
    end
  end
endmodule
