// tb_pre_adder_inv: checks the reversed Stage 1 for an even and an odd row.
// A random mapped row y(n1,t) gives u(n1,k2) = sum_t y(n1,t)
// W32^((4n1+1)*4t*k2) for k2 = 0, 4, 1, 2, 5 by definition; these go in as
// words with FRAC_I fraction bits, and the row must come back at eight
// times its value (FRAC_I + 3 fraction bits), within 3 LSB of that scale
// plus the effect of the 12-bit 1/sqrt2 on u1 - u5.
module tb_pre_adder_inv;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t  u0 [2];
  word_t  u4 [2];
  cword_t u1 [2];
  cword_t u2 [2];
  cword_t u5 [2];
  word_t  y  [2][8];

  pre_adder_inv #(.ODD(1'b0)) u_even (.u0(u0[0]), .u4(u4[0]), .u1(u1[0]), .u2(u2[0]), .u5(u5[0]), .y(y[0]));
  pre_adder_inv #(.ODD(1'b1)) u_odd  (.u0(u0[1]), .u4(u4[1]), .u1(u1[1]), .u2(u2[1]), .u5(u5[1]), .y(y[1]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  function automatic word_t fx(real v);
    return word_t'(rnd(v * real'(1 << FRAC_I)));
  endfunction

  initial begin
    int  row [8];
    real re, im, sc, tol;
    int  dr, di;
    sc = real'(1 << (FRAC_I + 3));
    for (int rep = 0; rep < 500; rep++) begin
      for (int t = 0; t < 8; t++) row[t] = rand_range(-300, 300);
      for (int p = 0; p < 2; p++) begin
        uset(row, p, 0, re, im);  u0[p] = fx(re);
        uset(row, p, 4, re, im);  u4[p] = fx(re);
        uset(row, p, 1, re, im);  u1[p].re = fx(re); u1[p].im = fx(im);
        uset(row, p, 2, re, im);  u2[p].re = fx(re); u2[p].im = fx(im);
        uset(row, p, 5, re, im);  u5[p].re = fx(re); u5[p].im = fx(im);
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        // rounding, plus the 12-bit 1/sqrt2 acting on u1 - u5 (doubled)
        dr  = int'(u1[p].re) - int'(u5[p].re);
        di  = int'(u1[p].im) - int'(u5[p].im);
        tol = 3.01 + real'((dr < 0 ? -dr : dr) + (di < 0 ? -di : di)) / 4096.0;
        for (int t = 0; t < 8; t++)
          chk(near(real'(y[p][t]), real'(row[t]) * sc, tol),
              $sformatf("odd=%0d y[%0d]=%0d want %f", p, t, y[p][t], real'(row[t]) * sc));
      end
    end
    report();
    $finish;
  end

endmodule
