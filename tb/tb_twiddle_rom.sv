// tb_twiddle_rom: checks the 16-point twiddle table against the eight values
// W16^0 .. W16^7 printed (to four decimals, so within 1e-4) with the DIF flow graph, and
// against cos/-sin to within one Q2.30 LSB.
module tb_twiddle_rom;
  import sa_pkg::*;
  localparam int N = 16;
  logic [2:0] k;
  tw_cplx_t   w;
  int checks = 0, failures = 0;
  // printed values: {cos, -sin}
  real printed_re [8] = '{1.0, 0.9238, 0.7071, 0.3826, 0.0, -0.3826, -0.7071, -0.9238};
  real printed_im [8] = '{0.0, -0.3826, -0.7071, -0.9238, -1.0, -0.9238, -0.7071, -0.3826};

  twiddle_rom #(.N(N)) dut (.k(k), .w(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real re, im, lsb;
    lsb = 2.0 ** (-TW_FRAC);
    for (int i = 0; i < N/2; i++) begin
      k = 3'(i);
      #1;
      re = real'(w.re) * lsb;
      im = real'(w.im) * lsb;
      checks++;
      if ((re - printed_re[i]) ** 2 > 1.0e-8 || (im - printed_im[i]) ** 2 > 1.0e-8) begin
        failures++;
        $display("FAIL W16^%0d = %f %fj, printed %f %fj", i, re, im, printed_re[i], printed_im[i]);
      end
      checks++;
      if ((re - $cos(2.0 * 3.141592653589793 * i / N)) ** 2 > lsb * lsb ||
          (im + $sin(2.0 * 3.141592653589793 * i / N)) ** 2 > lsb * lsb) begin
        failures++;
        $display("FAIL W16^%0d not within one LSB of cos/-sin", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
