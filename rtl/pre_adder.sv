// pre_adder: Stage 1 (pre-addition) of the direct 2-D DCT for one mapped row.
//
// From the mapped row y[t] = y(n1,t) it forms the five inputs of the complex
// DCT sets:
//   u0 = sum y[t]                      u4 = sum (-1)^t y[t]
//   u2 = (y0+y4-y2-y6) - j(y1+y5-y3-y7)
//   u1 = (y0-y4) - j(y2-y6) + s*W8*[(y1-y5) - j(y3-y7)]
//   u5 = (y0-y4) - j(y2-y6) - s*W8*[(y1-y5) - j(y3-y7)]
// with W8 = (1-j)/sqrt2 and s = (-1)^n1, as the algorithm gives them. W8 costs
// two constant multiplications by 1/sqrt2 per row. Even and odd rows differ
// only in s, fixed here by the ODD parameter. Combinational; all words share
// one fixed-point scale, the only rounding is in the two multiplications.
module pre_adder
  import dct_pkg::*;
#(
  parameter bit ODD = 1'b0
) (
  input  word_t  y [8],
  output word_t  u0,
  output word_t  u4,
  output cword_t u1,
  output cword_t u2,
  output cword_t u5
);

  localparam cosq_t R2 = cosq(4);  // 1/sqrt2

  word_t s0, s1, s2, s3, e, f, g, h, wr, wi;

  always_comb begin
    s0 = y[0] + y[4];
    s1 = y[1] + y[5];
    s2 = y[2] + y[6];
    s3 = y[3] + y[7];
    e  = y[0] - y[4];
    f  = y[2] - y[6];
    g  = y[1] - y[5];
    h  = y[3] - y[7];
    u0 = s0 + s1 + s2 + s3;
    u4 = s0 - s1 + s2 - s3;
    u2.re = s0 - s2;
    u2.im = s3 - s1;
    // W8*(g - jh) = ((g-h) - j(g+h)) / sqrt2
    wr = cmul(g - h, R2);
    wi = -cmul(g + h, R2);
    if (ODD) begin
      wr = -wr;
      wi = -wi;
    end
    u1.re = e + wr;
    u1.im = -f + wi;
    u5.re = e - wr;
    u5.im = -f - wi;
  end

endmodule
