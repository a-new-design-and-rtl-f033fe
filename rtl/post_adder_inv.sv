// post_adder_inv: reversed second substage of the folded IDCT.
//
// Inverts post_adder: from the column pair P = Y(.,k2), Q = Y(.,8-k2) it
// recovers the rotated complex-DCT outputs
//   U(0)  = P0 - j Q0
//   U(k1) = (P[k1] - Q[8-k1]) - j (Q[k1] + P[8-k1]),  k1 = 1..7
// Each U pair (k1, 8-k1) is a butterfly of four column entries; no scaling
// is needed because the forward halving is absorbed by the input scaling.
// Combinational.
module post_adder_inv
  import dct_pkg::*;
(
  input  word_t  p  [8],
  input  word_t  q  [8],
  output cword_t uk [8]
);

  always_comb begin
    uk[0].re = p[0];
    uk[0].im = -q[0];
    for (int k = 1; k < 8; k++) begin
      uk[k].re = p[k] - q[8-k];
      uk[k].im = -q[k] - p[8-k];
    end
  end

endmodule
