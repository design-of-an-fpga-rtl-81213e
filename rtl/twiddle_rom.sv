// twiddle_rom: twiddle factors of an N-point radix-2 FFT.
//
// w = W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for k = 0 .. N/2-1, as defined
// for the DIF flow graph of the reference design. The table is computed at
// elaboration from $cos/$sin and rounded to the nearest Q2.30 value (the
// coefficient format is this design's choice). The read is combinational.
module twiddle_rom
  import sa_pkg::*;
#(
  parameter int N = 16,
  localparam int KW = $clog2(N) - 1
) (
  input  logic [KW-1:0] k,
  output tw_cplx_t      w
);
  localparam real PI = 3.14159265358979323846;
  typedef tw_t table_t [N/2];

  // sel = 0: cos(2*pi*i/N), sel = 1: -sin(2*pi*i/N), rounded to Q2.30
  function automatic table_t make_table(bit sel);
    table_t tab;
    real r;
    for (int i = 0; i < N/2; i++) begin
      r = sel ? -$sin(2.0 * PI * i / N) : $cos(2.0 * PI * i / N);
      tab[i] = tw_t'($rtoi(r * (2.0 ** TW_FRAC) + ((r >= 0.0) ? 0.5 : -0.5)));
    end
    return tab;
  endfunction

  localparam table_t COS_TAB  = make_table(1'b0);
  localparam table_t NSIN_TAB = make_table(1'b1);

  assign w.re = COS_TAB[k];
  assign w.im = NSIN_TAB[k];
endmodule
