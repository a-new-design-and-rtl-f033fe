// tb_coef_scale: checks the output scaling X = (2/N) c(k1) c(k2) Y for every
// column k2, with Y words carrying FRAC_F fraction bits: result within 1 of
// the exactly scaled value, and saturation at the 12-bit limits.
module tb_coef_scale;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic [2:0] k2;
  word_t      y [8];
  coef_t      x [8];

  coef_scale dut (.k2(k2), .y(y), .x(x));

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
        for (int i = 0; i < 8; i++) y[i] = word_t'(rand_range(-(1 << (INT_W - 1)), (1 << (INT_W - 1)) - 1));
        #1;
        for (int k1 = 0; k1 < 8; k1++) begin
          want = 0.25 * ck(k1) * ck(k) * real'(y[k1]) / real'(1 << FRAC_F);
          if (want > 2047.0) want = 2047.0;
          if (want < -2048.0) want = -2048.0;
          chk(near(real'(x[k1]), want, 1.0), $sformatf("X(%0d,%0d)=%0d want %f", k1, k, x[k1], want));
        end
      end
    end
    report();
    $finish;
  end

endmodule
