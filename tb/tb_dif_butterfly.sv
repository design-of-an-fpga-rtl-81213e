// tb_dif_butterfly: random complex operands and twiddles; compares a+b exactly
// and (a-b)*w within 1 LSB with a real-number model.
module tb_dif_butterfly;
  import sa_pkg::*;
  cplx_t    a, b, sum, diff_w;
  tw_cplx_t w;
  int checks = 0, failures = 0;

  dif_butterfly dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(real range);
    return (real'($urandom % 2000001) - 1000000.0) / 1000000.0 * range;
  endfunction

  initial begin
    real ang, dre, dim, ere, eim, tol;
    tol = 1.01 / 65536.0;
    for (int i = 0; i < 500; i++) begin
      a.re = to_q(rnd(100.0)); a.im = to_q(rnd(100.0));
      b.re = to_q(rnd(100.0)); b.im = to_q(rnd(100.0));
      ang  = rnd(3.141592653589793);
      if (i < 4) ang = -1.5707963267948966 * i;  // W = 1, -j, -1, j
      w.re = tw_t'($rtoi($cos(ang) * (2.0 ** TW_FRAC)));
      w.im = tw_t'($rtoi($sin(ang) * (2.0 ** TW_FRAC)));
      #1;
      checks++;
      if (sum.re !== a.re + b.re || sum.im !== a.im + b.im) begin
        failures++;
        $display("FAIL sum");
      end
      dre = from_q(a.re) - from_q(b.re);
      dim = from_q(a.im) - from_q(b.im);
      ere = dre * real'(w.re) / (2.0 ** TW_FRAC) - dim * real'(w.im) / (2.0 ** TW_FRAC);
      eim = dre * real'(w.im) / (2.0 ** TW_FRAC) + dim * real'(w.re) / (2.0 ** TW_FRAC);
      checks++;
      if ((from_q(diff_w.re) - ere) ** 2 > tol * tol || (from_q(diff_w.im) - eim) ** 2 > tol * tol) begin
        failures++;
        $display("FAIL (a-b)w: got %f %f expected %f %f", from_q(diff_w.re), from_q(diff_w.im), ere, eim);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
