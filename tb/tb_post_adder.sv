// tb_post_adder: checks the post-adder on real data. For random 8x8 blocks
// the values U(k1,k2) = sum y(n1,n2) W32^((4n1+1)k1+(4n2+1)k2) of the
// permuted block are computed by definition for k2 = 1, 2, 5 and fed in;
// the outputs must equal the unscaled 2-D DCT Y(k1,k2) and Y(k1,8-k2) of
// the block (eq. (2a)), within 1 LSB. For the k2 = 0 set the input is built
// from u(n1,0) - j u(n1,4); its first output must be Y(k1,0).
module tb_post_adder;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  cword_t uk [8];
  word_t  p  [8];
  word_t  q  [8];

  post_adder dut (.uk(uk), .p(p), .q(q));

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
          udef(x, k1, K2S[s], re, im);
          uk[k1].re = word_t'(rnd(re));
          uk[k1].im = word_t'(rnd(im));
        end
        #1;
        for (int k1 = 0; k1 < 8; k1++) begin
          chk(near(real'(p[k1]), ydef(x, k1, K2S[s]), 1.01),
              $sformatf("P k1=%0d k2=%0d got %0d want %f", k1, K2S[s], p[k1], ydef(x, k1, K2S[s])));
          chk(near(real'(q[k1]), ydef(x, k1, 8 - K2S[s]), 1.01),
              $sformatf("Q k1=%0d k2=%0d got %0d want %f", k1, 8 - K2S[s], q[k1], ydef(x, k1, 8 - K2S[s])));
        end
      end
      // k2 = 0 set: V(k1) = sum (u0 - j u4) W32^((4n1+1)k1) = U(k1,0) - j*U4'(k1)
      // where the second term uses u4 without the W32^(4(4n1+1)) factor.
      for (int k1 = 0; k1 < 8; k1++) begin
        automatic real vr = 0.0, vi = 0.0;
        for (int n1 = 0; n1 < 8; n1++) begin
          int  row [8];
          real u0r, u0i, u4r, u4i;
          for (int t = 0; t < 8; t++) row[t] = x[pmap_ref(n1)][pmap_ref(tmap_ref(n1, t))];
          uset(row, n1, 0, u0r, u0i);
          uset(row, n1, 4, u4r, u4i);
          // (u0 - j u4) * W
          vr += u0r * wre((4 * n1 + 1) * k1) + u4r * wim((4 * n1 + 1) * k1);
          vi += u0r * wim((4 * n1 + 1) * k1) - u4r * wre((4 * n1 + 1) * k1);
        end
        uk[k1].re = word_t'(rnd(vr));
        uk[k1].im = word_t'(rnd(vi));
      end
      #1;
      for (int k1 = 0; k1 < 8; k1++)
        chk(near(real'(p[k1]), ydef(x, k1, 0), 1.01), $sformatf("P k1=%0d k2=0", k1));
    end
    report();
    $finish;
  end

endmodule
