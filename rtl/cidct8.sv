// cidct8: complex 8-point inverse of cdct8, without its 1/8 factor.
//
// u[n] = sum_b U[b] * W32^(-(4n+1)b). Writing U = p + jq and moving the sine
// terms onto reversed inputs gives two real 1-D IDCTs:
//   r[b] = p[b] - q[8-b],  s[b] = q[b] + p[8-b]  (r[0] = p[0], s[0] = q[0])
//   u[n] = IC_n(r) + j IC_n(s)
// The 1/8 of the exact inverse is applied at the IDCT input (coef_unscale),
// which keeps the words in this unit at the magnitude of the forward
// transform's. Combinational.
module cidct8
  import dct_pkg::*;
(
  input  cword_t uf [8],
  output cword_t u  [8]
);

  word_t r [8];
  word_t s [8];
  word_t ir [8];
  word_t is [8];

  always_comb begin
    r[0] = uf[0].re;
    s[0] = uf[0].im;
    for (int b = 1; b < 8; b++) begin
      r[b] = uf[b].re - uf[8-b].im;
      s[b] = uf[b].im + uf[8-b].re;
    end
  end

  idct8_real u_idct_re (.r(r), .o(ir));
  idct8_real u_idct_im (.r(s), .o(is));

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      u[n].re = ir[n];
      u[n].im = is[n];
    end
  end

endmodule
