// substage3_inv: reversed third substage of the folded IDCT, with its bypass.
//
// In the folded IDCT the four coefficient sets pass one per cycle; only the
// first (columns k2 = 0 and 4) uses this butterfly stage, the others are
// routed around it by the output multiplexers, as the folded architecture
// describes. For the first set the k2 = 4 column c is turned back into the
// 1-D DCT Q of u(n1,4), inverting substage3:
//   Q4 = c0, Q0 = 2*c4, Q3 = c1+c7, Q5 = c1-c7,
//   Q2 = c2+c6, Q6 = c2-c6, Q1 = c3+c5, Q7 = c3-c5.
// For other sets q = c. Combinational.
module substage3_inv
  import dct_pkg::*;
(
  input  logic  first,
  input  word_t c [8],
  output word_t q [8]
);

  word_t bf [8];

  always_comb begin
    bf[4] = c[0];
    bf[0] = c[4] <<< 1;
    bf[3] = c[1] + c[7];
    bf[5] = c[1] - c[7];
    bf[2] = c[2] + c[6];
    bf[6] = c[2] - c[6];
    bf[1] = c[3] + c[5];
    bf[7] = c[3] - c[5];
    for (int i = 0; i < 8; i++) q[i] = first ? bf[i] : c[i];
  end

endmodule
