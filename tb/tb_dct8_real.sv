// tb_dct8_real: checks the real 8-point DCT against
// c[b] = sum_n v[n] cos(pi(4n+1)b/16) on random words; tolerance 0.5 LSB plus the
// worst-case effect of the 12-bit coefficients (sum|input| * 2^-12)
module tb_dct8_real;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t v [8];
  word_t c [8];

  dct8_real dut (.v(v), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    real want, tol;
    for (int rep = 0; rep < 1000; rep++) begin
      for (int n = 0; n < 8; n++) v[n] = word_t'(rand_range(-2048, 2047));
      #1;
      tol = 0.51;
      for (int i = 0; i < 8; i++) tol += real'(v[i] < 0 ? -v[i] : v[i]) / 4096.0;
      for (int b = 0; b < 8; b++) begin
        want = 0.0;
        for (int n = 0; n < 8; n++) want += real'(v[n]) * cosr(real'((4 * n + 1) * b));
        chk(near(real'(c[b]), want, tol), $sformatf("c[%0d]=%0d want %f", b, c[b], want));
      end
    end
    report();
    $finish;
  end

endmodule
