// cdct8: complex 8-point DCT U[b] = sum_n u[n] * W32^((4n+1)b), b = 0..7.
//
// With u = p + jq and the real transform C of dct8_real, the sine terms are
// C read backwards (sin(pi(4n+1)b/16) = cos(pi(4n+1)(8-b)/16)), so
//   Re U[b] = C_b(p) + C_{8-b}(q),   Im U[b] = C_b(q) - C_{8-b}(p),
// and b = 0 has no sine term. Two real 1-D DCTs and 14 adders, as in the
// algorithm's observation that each complex sum is a 1-D DCT. Combinational.
module cdct8
  import dct_pkg::*;
(
  input  cword_t u  [8],
  output cword_t uf [8]
);

  word_t p [8];
  word_t q [8];
  word_t cp [8];
  word_t cq [8];

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      p[n] = u[n].re;
      q[n] = u[n].im;
    end
  end

  dct8_real u_dct_re (.v(p), .c(cp));
  dct8_real u_dct_im (.v(q), .c(cq));

  always_comb begin
    uf[0].re = cp[0];
    uf[0].im = cq[0];
    for (int b = 1; b < 8; b++) begin
      uf[b].re = cp[b] + cq[8-b];
      uf[b].im = cq[b] - cp[8-b];
    end
  end

endmodule
