// coef_scale: output scaling of the forward 2-D DCT for one coefficient column.
//
// X(k1,k2) = (2/N) c(k1) c(k2) Y(k1,k2) with N = 8 and c(0) = 1/sqrt2, c(k) = 1
// otherwise: Y is multiplied by 1/sqrt2 when exactly one of k1, k2 is zero,
// and shifted right by 2 (3 when both are zero). The result is rounded to
// an integer and saturated to DCT_W bits. k2 is the column index;
// combinational.
module coef_scale
  import dct_pkg::*;
(
  input  logic [2:0] k2,
  input  word_t      y [8],
  output coef_t      x [8]
);

  localparam cosq_t R2 = cosq(4);
  localparam int    SH = 2 + FRAC_F;

  typedef logic signed [INT_W:0] wide_t;

  localparam wide_t XMAX = wide_t'((1 << (DCT_W - 1)) - 1);
  localparam wide_t XMIN = -wide_t'(1 << (DCT_W - 1));

  // Arithmetic right shift by SH (or SH + 1) with round-half-up.
  function automatic wide_t rsh(word_t a, bit extra);
    wide_t w;
    w = wide_t'(a);
    if (extra) return (w + wide_t'(1 << SH)) >>> (SH + 1);
    return (w + wide_t'(1 << (SH - 1))) >>> SH;
  endfunction

  logic  dc_row, dc_col;
  word_t t;
  wide_t v;

  always_comb begin
    dc_col = (k2 == 3'd0);
    for (int k1 = 0; k1 < 8; k1++) begin
      dc_row = (k1 == 0);
      t = (dc_row ^ dc_col) ? cmul(y[k1], R2) : y[k1];
      v = rsh(t, dc_row & dc_col);
      if (v > XMAX)      x[k1] = coef_t'(XMAX);
      else if (v < XMIN) x[k1] = coef_t'(XMIN);
      else               x[k1] = coef_t'(v);
    end
  end

endmodule
