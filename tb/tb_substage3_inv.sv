// tb_substage3_inv: checks the reversed third substage and its bypass.
// With first = 1: for random blocks, the k2 = 4 column Y(k1,4) of the
// unscaled 2-D DCT (by definition, rounded) goes in, and the 1-D DCT
// Q[k] = sum_n1 u(n1,4) cos(pi(4n1+1)k/16) of the rows' u(n1,4) must come
// out, within 2 LSB. With first = 0 the input must pass unchanged.
module tb_substage3_inv;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic  first;
  word_t c [8];
  word_t q [8];

  substage3_inv dut (.first(first), .c(c), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    iblk_t x;
    real   u4 [8];
    real   acc, dummy;
    int    row [8];
    for (int rep = 0; rep < 200; rep++) begin
      foreach (x[i, j]) x[i][j] = rand_range(-256, 255);
      for (int n1 = 0; n1 < 8; n1++) begin
        for (int t = 0; t < 8; t++) row[t] = x[pmap_ref(n1)][pmap_ref(tmap_ref(n1, t))];
        uset(row, n1, 4, u4[n1], dummy);
      end
      first = 1'b1;
      for (int k1 = 0; k1 < 8; k1++) c[k1] = word_t'(rnd(ydef(x, k1, 4)));
      #1;
      for (int k = 0; k < 8; k++) begin
        acc = 0.0;
        for (int n1 = 0; n1 < 8; n1++) acc += u4[n1] * cosr(real'((4 * n1 + 1) * k));
        chk(near(real'(q[k]), acc, 2.01), $sformatf("Q[%0d]=%0d want %f", k, q[k], acc));
      end
      first = 1'b0;
      #1;
      for (int k = 0; k < 8; k++) chk(q[k] == c[k], "bypass");
    end
    report();
    $finish;
  end

endmodule
