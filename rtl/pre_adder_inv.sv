// pre_adder_inv: reversed Stage 1 (pre-addition) of the folded IDCT, one row.
//
// Inverts pre_adder for mapped row n1: from u0, u4 (real) and u1, u2, u5
// (complex) it recovers y[t] = y(n1,t):
//   4*s0 = u0+u4+2Re(u2)   4*s2 = u0+u4-2Re(u2)   (s_i = y_i + y_{i+4})
//   4*s1 = u0-u4-2Im(u2)   4*s3 = u0-u4+2Im(u2)
//   2*e  = Re(u1+u5)       2*f  = -Im(u1+u5)      (e = y0-y4, f = y2-y6)
//   2*g  = s*(Re d - Im d)/sqrt2, 2*h = -s*(Re d + Im d)/sqrt2, d = u1-u5
//   y0 = (s0+e)/2, y4 = (s0-e)/2, ... for the pairs (0,4),(2,6),(1,5),(3,7)
// with s = (-1)^n1 set by ODD. The sums are formed at eight times their
// value and y is returned that way, i.e. with FRAC_I + 3 fraction bits: the
// division by 8 costs nothing and loses no precision (y is small enough that
// the three extra bits fit in INT_W). The two 1/sqrt2 products are the only
// rounding. Combinational.
module pre_adder_inv
  import dct_pkg::*;
#(
  parameter bit ODD = 1'b0
) (
  input  word_t  u0,
  input  word_t  u4,
  input  cword_t u1,
  input  cword_t u2,
  input  cword_t u5,
  output word_t  y [8]
);

  localparam cosq_t R2 = cosq(4);

  word_t a, b, s0, s1, s2, s3, e2, f2, g2, h2, dr, di;

  always_comb begin
    a  = u0 + u4;
    b  = u0 - u4;
    s0 = a + (u2.re <<< 1);
    s2 = a - (u2.re <<< 1);
    s1 = b - (u2.im <<< 1);
    s3 = b + (u2.im <<< 1);
    e2 = u1.re + u5.re;
    f2 = -(u1.im + u5.im);
    dr = u1.re - u5.re;
    di = u1.im - u5.im;
    g2 = cmul(dr - di, R2);
    h2 = -cmul(dr + di, R2);
    if (ODD) begin
      g2 = -g2;
      h2 = -h2;
    end
    y[0] = s0 + (e2 <<< 1);
    y[4] = s0 - (e2 <<< 1);
    y[2] = s2 + (f2 <<< 1);
    y[6] = s2 - (f2 <<< 1);
    y[1] = s1 + (g2 <<< 1);
    y[5] = s1 - (g2 <<< 1);
    y[3] = s3 + (h2 <<< 1);
    y[7] = s3 - (h2 <<< 1);
  end

endmodule
