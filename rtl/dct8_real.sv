// dct8_real: real 8-point 1-D DCT on data in the transform's permuted order.
//
// c[b] = sum_n v[n] * cos(pi*(4n+1)*b/16), b = 0..7. Because positions n and
// n+4 hold mirror samples, the usual even/odd split applies: a[n] = v[n] +
// v[n+4] feeds the even outputs and d[n] = v[n] - v[n+4] the odd ones, so 28
// constant multiplications remain (b = 0 needs none). Products are summed at
// full precision and rounded once per output. The algorithm only states that
// this is an ordinary N-point 1-D DCT; the even/odd split is this design's
// choice. Combinational, no scaling (c[0] is the plain sum).
module dct8_real
  import dct_pkg::*;
(
  input  word_t v [8],
  output word_t c [8]
);

  localparam int unsigned ACC_W = INT_W + COEF_W + 2;
  typedef logic signed [ACC_W-1:0] acc_t;

  word_t a [4];
  word_t d [4];
  acc_t  acc;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      a[n] = v[n] + v[n+4];
      d[n] = v[n] - v[n+4];
    end
    c[0] = a[0] + a[1] + a[2] + a[3];
    for (int b = 1; b < 8; b++) begin
      acc = '0;
      for (int n = 0; n < 4; n++) begin
        if (b % 2 == 0) acc = acc + acc_t'(a[n]) * acc_t'(cosq((4 * n + 1) * b));
        else            acc = acc + acc_t'(d[n]) * acc_t'(cosq((4 * n + 1) * b));
      end
      acc  = acc + acc_t'(longint'(1) << (COEF_W - 2));
      c[b] = word_t'(acc >>> (COEF_W - 1));
    end
  end

endmodule
