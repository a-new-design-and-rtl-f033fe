// post_adder: second substage of the DCT, turning U into two output columns.
//
// For one set (column index k2) and k1 = 1..7:
//   P[k1] = Y(k1, k2)   = (Re U(k1,k2) - Im U(8-k1,k2)) / 2
//   Q[k1] = Y(k1, 8-k2) = (-Im U(k1,k2) - Re U(8-k1,k2)) / 2
// and for k1 = 0, where the partner index 8 is not computed, the equivalent
// P[0] = Re U(0,k2), Q[0] = -Im U(0,k2). For the k2 = 0 set, Q holds the
// 1-D DCT of u(n1,4), which substage3 turns into the k2 = 4 column.
// Combinational; halving rounds half up.
module post_adder
  import dct_pkg::*;
(
  input  cword_t uk [8],
  output word_t  p  [8],
  output word_t  q  [8]
);

  always_comb begin
    p[0] = uk[0].re;
    q[0] = -uk[0].im;
    for (int k = 1; k < 8; k++) begin
      p[k] = half(uk[k].re - uk[8-k].im);
      q[k] = half(-uk[k].im - uk[8-k].re);
    end
  end

endmodule
