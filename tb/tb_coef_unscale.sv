// tb_coef_unscale: checks the IDCT input scaling Z = X / (2 c(k1) c(k2)),
// as a word with FRAC_I fraction bits, for every column k2 and random
// 12-bit X; tolerance 0.5 LSB plus the effect of the 12-bit 1/sqrt2.
module tb_coef_unscale;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic [2:0] k2;
  coef_t      x [8];
  word_t      z [8];

  coef_unscale dut (.k2(k2), .x(x), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    real want;
    for (int rep = 0; rep < 300; rep++) begin
      for (int k = 0; k < 8; k++) begin
        k2 = 3'(k);
        for (int i = 0; i < 8; i++) x[i] = coef_t'(rand_range(-2048, 2047));
        #1;
        for (int k1 = 0; k1 < 8; k1++) begin
          want = real'(x[k1]) / (2.0 * ck(k1) * ck(k)) * real'(1 << FRAC_I);
          chk(near(real'(z[k1]), want, 0.51 + (want < 0.0 ? -want : want) / 4096.0), $sformatf("Z(%0d,%0d)=%0d want %f", k1, k, z[k1], want));
        end
      end
    end
    report();
    $finish;
  end

endmodule
