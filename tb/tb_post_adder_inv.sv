// tb_post_adder_inv: checks the reversed post-adder on real data. For
// random 8x8 blocks the unscaled 2-D DCT columns Y(.,k2) and Y(.,8-k2)
// (by definition, rounded) go in for k2 = 1, 2, 5, and
// U(k1,k2) = sum y(n1,n2) W32^((4n1+1)k1+(4n2+1)k2) of the permuted block
// must come out, within 2 LSB.
module tb_post_adder_inv;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t  p  [8];
  word_t  q  [8];
  cword_t uk [8];

  post_adder_inv dut (.p(p), .q(q), .uk(uk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  localparam int K2S [3] = '{1, 2, 5};

  initial begin
    iblk_t x;
    real   re, im;
    for (int rep = 0; rep < 40; rep++) begin
      foreach (x[i, j]) x[i][j] = rand_range(-256, 255);
      for (int s = 0; s < 3; s++) begin
        for (int k1 = 0; k1 < 8; k1++) begin
          p[k1] = word_t'(rnd(ydef(x, k1, K2S[s])));
          q[k1] = word_t'(rnd(ydef(x, k1, 8 - K2S[s])));
        end
        #1;
        for (int k1 = 0; k1 < 8; k1++) begin
          udef(x, k1, K2S[s], re, im);
          chk(near(real'(uk[k1].re), re, 2.01) && near(real'(uk[k1].im), im, 2.01),
              $sformatf("U(%0d,%0d) want %f %fj", k1, K2S[s], re, im));
        end
      end
    end
    report();
    $finish;
  end

endmodule
