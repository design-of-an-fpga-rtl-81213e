// dif_butterfly: radix-2 decimation-in-frequency butterfly.
//
// sum    = a + b
// diff_w = (a - b) * w
// a, b and the results are complex Q16.16, w is a complex Q2.30 twiddle. The
// complex product uses four real multiplications; each product sum is rounded
// to nearest and brought back to Q16.16. There is no scaling and no
// saturation: the caller keeps the values in range. The butterfly is the one of
// the reference design's DIF flow graph; the arithmetic details are this
// design's choice. Purely combinational.
module dif_butterfly
  import sa_pkg::*;
(
  input  cplx_t    a,
  input  cplx_t    b,
  input  tw_cplx_t w,
  output cplx_t    sum,
  output cplx_t    diff_w
);
  localparam int PW = DATA_W + 1 + TW_W + 1;  // width of a product sum

  logic signed [DATA_W:0] dre, dim;
  logic signed [PW-1:0]   pre, pim;
  logic signed [PW-1:0]   half;

  always_comb begin
    dre  = (DATA_W+1)'(a.re) - (DATA_W+1)'(b.re);
    dim  = (DATA_W+1)'(a.im) - (DATA_W+1)'(b.im);
    half = PW'(1) <<< (TW_FRAC - 1);
    pre  = PW'(dre) * PW'(w.re) - PW'(dim) * PW'(w.im) + half;
    pim  = PW'(dre) * PW'(w.im) + PW'(dim) * PW'(w.re) + half;
    sum.re    = a.re + b.re;
    sum.im    = a.im + b.im;
    diff_w.re = sample_t'(pre >>> TW_FRAC);
    diff_w.im = sample_t'(pim >>> TW_FRAC);
  end
endmodule
