// tb_cdct8: checks the complex 8-point DCT against
// U[b] = sum_n u[n] W32^((4n+1)b) on random complex words; tolerance 1 LSB
// per component plus the worst-case effect of the 12-bit coefficients.
module tb_cdct8;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  cword_t u  [8];
  cword_t uf [8];

  cdct8 dut (.u(u), .uf(uf));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    real re, im, tol;
    for (int rep = 0; rep < 1000; rep++) begin
      for (int n = 0; n < 8; n++) begin
        u[n].re = word_t'(rand_range(-2048, 2047));
        u[n].im = word_t'(rand_range(-2048, 2047));
      end
      #1;
      tol = 1.01;
      for (int i = 0; i < 8; i++)
        tol += (real'(u[i].re < 0 ? -u[i].re : u[i].re) + real'(u[i].im < 0 ? -u[i].im : u[i].im)) / 2048.0;
      for (int b = 0; b < 8; b++) begin
        re = 0.0;
        im = 0.0;
        for (int n = 0; n < 8; n++) begin
          re += real'(u[n].re) * wre((4 * n + 1) * b) - real'(u[n].im) * wim((4 * n + 1) * b);
          im += real'(u[n].re) * wim((4 * n + 1) * b) + real'(u[n].im) * wre((4 * n + 1) * b);
        end
        chk(near(real'(uf[b].re), re, tol) && near(real'(uf[b].im), im, tol),
            $sformatf("U[%0d]=%0d %0dj want %f %fj", b, uf[b].re, uf[b].im, re, im));
      end
    end
    report();
    $finish;
  end

endmodule
