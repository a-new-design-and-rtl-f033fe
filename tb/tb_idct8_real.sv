// tb_idct8_real: checks the real 8-point IDCT against
// o[n] = sum_b r[b] cos(pi(4n+1)b/16) on random words; tolerance 0.5 LSB plus the
// worst-case effect of the 12-bit coefficients (sum|input| * 2^-12).
module tb_idct8_real;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t r [8];
  word_t o [8];

  idct8_real dut (.r(r), .o(o));

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
      for (int b = 0; b < 8; b++) r[b] = word_t'(rand_range(-2048, 2047));
      #1;
      tol = 0.51;
      for (int i = 0; i < 8; i++) tol += real'(r[i] < 0 ? -r[i] : r[i]) / 4096.0;
      for (int n = 0; n < 8; n++) begin
        want = 0.0;
        for (int b = 0; b < 8; b++) want += real'(r[b]) * cosr(real'((4 * n + 1) * b));
        chk(near(real'(o[n]), want, tol), $sformatf("o[%0d]=%0d want %f", n, o[n], want));
      end
    end
    report();
    $finish;
  end

endmodule
