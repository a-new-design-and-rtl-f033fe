// tb_cidct8: checks the complex 8-point IDCT (without 1/8) against
// u[n] = sum_b U[b] W32^(-(4n+1)b) on random complex words; tolerance 1 LSB
// plus the worst-case effect of the 12-bit coefficients.
module tb_cidct8;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  cword_t uf [8];
  cword_t u  [8];

  cidct8 dut (.uf(uf), .u(u));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    real re, im, cr, ci, tol;
    for (int rep = 0; rep < 1000; rep++) begin
      for (int b = 0; b < 8; b++) begin
        uf[b].re = word_t'(rand_range(-2048, 2047));
        uf[b].im = word_t'(rand_range(-2048, 2047));
      end
      #1;
      tol = 1.01;
      for (int i = 0; i < 8; i++)
        tol += (real'(uf[i].re < 0 ? -uf[i].re : uf[i].re) + real'(uf[i].im < 0 ? -uf[i].im : uf[i].im)) / 2048.0;
      for (int n = 0; n < 8; n++) begin
        re = 0.0;
        im = 0.0;
        for (int b = 0; b < 8; b++) begin
          cr = wre((4 * n + 1) * b);
          ci = -wim((4 * n + 1) * b);      // conjugate
          re += real'(uf[b].re) * cr - real'(uf[b].im) * ci;
          im += real'(uf[b].re) * ci + real'(uf[b].im) * cr;
        end
        chk(near(real'(u[n].re), re, tol) && near(real'(u[n].im), im, tol),
            $sformatf("u[%0d]=%0d %0dj want %f %fj", n, u[n].re, u[n].im, re, im));
      end
    end
    report();
    $finish;
  end

endmodule
