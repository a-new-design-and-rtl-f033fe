// idct8_real: real 8-point 1-D inverse DCT matching dct8_real's data order.
//
// o[n] = sum_b r[b] * cos(pi*(4n+1)*b/16), n = 0..7 (no 1/N factor). Output
// n+4 differs from output n only in the sign of the odd-b terms, so the even
// part E[n] and the odd part O[n] are formed once for n = 0..3 and combined
// as o[n] = E[n] + O[n], o[n+4] = E[n] - O[n]: 28 constant multiplications.
// The algorithm names two 1-D IDCTs; this even/odd split is this design's
// choice. Combinational, one rounding per output.
module idct8_real
  import dct_pkg::*;
(
  input  word_t r [8],
  output word_t o [8]
);

  localparam int unsigned ACC_W = INT_W + COEF_W + 3;
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t ev, od, rnd;

  always_comb begin
    rnd = acc_t'(longint'(1) << (COEF_W - 2));
    for (int n = 0; n < 4; n++) begin
      ev = acc_t'(r[0]) <<< (COEF_W - 1);
      od = '0;
      for (int b = 1; b < 8; b++) begin
        if (b % 2 == 0) ev = ev + acc_t'(r[b]) * acc_t'(cosq((4 * n + 1) * b));
        else            od = od + acc_t'(r[b]) * acc_t'(cosq((4 * n + 1) * b));
      end
      o[n]   = word_t'((ev + od + rnd) >>> (COEF_W - 1));
      o[n+4] = word_t'((ev - od + rnd) >>> (COEF_W - 1));
    end
  end

endmodule
