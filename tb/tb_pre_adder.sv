// tb_pre_adder: checks Stage 1 for an even and an odd mapped row against the
// definition u(n1,k2) = sum_t y(n1,t) W32^((4n1+1)*4t*k2) for k2 = 0, 4, 1,
// 2, 5, with random rows (integer words, no fraction bits). The outputs that go
// through the 1/sqrt2 multipliers may differ by 0.5 LSB plus the effect of
// the 12-bit coefficient; the others must be exact.
module tb_pre_adder;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  word_t  y [8];
  word_t  u0 [2];
  word_t  u4 [2];
  cword_t u1 [2];
  cword_t u2 [2];
  cword_t u5 [2];

  pre_adder #(.ODD(1'b0)) u_even (.y(y), .u0(u0[0]), .u4(u4[0]), .u1(u1[0]), .u2(u2[0]), .u5(u5[0]));
  pre_adder #(.ODD(1'b1)) u_odd  (.y(y), .u0(u0[1]), .u4(u4[1]), .u1(u1[1]), .u2(u2[1]), .u5(u5[1]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    int  row [8];
    real re, im, tol;
    word_t gre, gim;
    for (int rep = 0; rep < 500; rep++) begin
      for (int t = 0; t < 8; t++) begin
        row[t] = rand_range(-4096, 4095);
        y[t]   = word_t'(row[t]);
      end
      #1;
      tol = 0.51;
      for (int t = 0; t < 8; t++) tol += real'(row[t] < 0 ? -row[t] : row[t]) / 4096.0;
      for (int p = 0; p < 2; p++) begin
        uset(row, p, 0, re, im);
        chk(near(real'(u0[p]), re, 1.0e-6), "u0");
        uset(row, p, 4, re, im);
        chk(near(real'(u4[p]), re, 1.0e-6), "u4");
        uset(row, p, 2, re, im);
        chk(near(real'(u2[p].re), re, 1.0e-6) && near(real'(u2[p].im), im, 1.0e-6), "u2");
        uset(row, p, 1, re, im);
        gre = u1[p].re;
        gim = u1[p].im;
        chk(near(real'(gre), re, tol) && near(real'(gim), im, tol),
            $sformatf("u1 odd=%0d got %0d %0dj want %f %fj", p, gre, gim, re, im));
        uset(row, p, 5, re, im);
        chk(near(real'(u5[p].re), re, tol) && near(real'(u5[p].im), im, tol), "u5");
      end
    end
    report();
    $finish;
  end

endmodule
