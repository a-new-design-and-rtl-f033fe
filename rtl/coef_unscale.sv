// coef_unscale: input scaling of the folded 2-D IDCT for one coefficient column.
//
// Forms Z(k1,k2) = Y(k1,k2)/8 = X(k1,k2) / (2 c(k1) c(k2)), i.e. X unchanged
// when k1 = k2 = 0, X/sqrt2 when exactly one is zero and X/2 otherwise, as
// an INT_W-bit word with FRAC_I fraction bits. This inverts the kernel factor
// of the DCT definition and also absorbs the 1/8 of the complex IDCT, so the
// rest of the inverse path needs no further scaling until the reversed
// pre-adder. k2 is the column index; combinational.
module coef_unscale
  import dct_pkg::*;
(
  input  logic [2:0] k2,
  input  coef_t      x [8],
  output word_t      z [8]
);

  localparam cosq_t R2 = cosq(4);

  word_t w;
  int    zeros;

  always_comb begin
    for (int k1 = 0; k1 < 8; k1++) begin
      zeros = ((k1 == 0) ? 1 : 0) + ((k2 == 3'd0) ? 1 : 0);
      w     = word_t'(x[k1]) <<< FRAC_I;
      case (zeros)
        2:       z[k1] = w;
        1:       z[k1] = cmul(w, R2);
        default: z[k1] = w >>> 1;
      endcase
    end
  end

endmodule
