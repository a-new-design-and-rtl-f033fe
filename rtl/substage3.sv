// substage3: third substage of the DCT, for the set that carries k2 = 0 and 4.
//
// That set's input is u(n1,0) - j*u(n1,4); after the post-adder its second
// output is Q[k] = C_k(u4), the 1-D DCT of u(n1,4). The k2 = 4 column is a
// butterfly stage on Q:
//   Y(0,4) = Q4          Y(4,4) = Q0/2
//   Y(1,4) = (Q5+Q3)/2   Y(7,4) = (Q3-Q5)/2
//   Y(2,4) = (Q6+Q2)/2   Y(6,4) = (Q2-Q6)/2
//   Y(3,4) = (Q7+Q1)/2   Y(5,4) = (Q1-Q7)/2
// The document shows this stage only as a figure; the equations are derived
// from the transform definition. Combinational.
module substage3
  import dct_pkg::*;
(
  input  word_t q    [8],
  output word_t col4 [8]
);

  always_comb begin
    col4[0] = q[4];
    col4[4] = half(q[0]);
    col4[1] = half(q[5] + q[3]);
    col4[7] = half(q[3] - q[5]);
    col4[2] = half(q[6] + q[2]);
    col4[6] = half(q[2] - q[6]);
    col4[3] = half(q[7] + q[1]);
    col4[5] = half(q[1] - q[7]);
  end

endmodule
