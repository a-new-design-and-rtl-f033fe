// tb_substage3: checks the third substage. For random 8x8 blocks the rows'
// u(n1,4) = sum_t (-1)^t y(n1,t) are formed, their 1-D DCT
// Q[k] = sum_n1 u(n1,4) cos(pi(4n1+1)k/16) is fed in (rounded), and the
// output must be the k2 = 4 column Y(k1,4) of the unscaled 2-D DCT of the
// block, within 1 LSB.
module tb_substage3;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t q    [8];
  word_t col4 [8];

  substage3 dut (.q(q), .col4(col4));

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
      for (int k = 0; k < 8; k++) begin
        acc = 0.0;
        for (int n1 = 0; n1 < 8; n1++) acc += u4[n1] * cosr(real'((4 * n1 + 1) * k));
        q[k] = word_t'(rnd(acc));
      end
      #1;
      for (int k1 = 0; k1 < 8; k1++)
        chk(near(real'(col4[k1]), ydef(x, k1, 4), 1.01),
            $sformatf("Y(%0d,4) got %0d want %f", k1, col4[k1], ydef(x, k1, 4)));
    end
    report();
    $finish;
  end

endmodule
