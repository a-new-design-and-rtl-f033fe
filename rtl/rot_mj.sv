// rot_mj: the -j multiplexers and barrel shifter after the complex DCT.
//
// Forward (INVERSE = 0): with k1 + k2 = 8a + b, U(k1,k2) = (-j)^a * U_b, so
// dout[k1] = din[(k1+k2) mod 8], multiplied by -j when k1 + k2 >= 8. This
// rotates the complex-DCT outputs into increasing k1 order.
// Inverse (INVERSE = 1): dout[b] = din[(b-k2) mod 8], multiplied by +j when
// the index wrapped (b < k2), undoing the forward step.
// Multiplying by -j or +j is a swap of real and imaginary parts with one
// negation, so the block is only multiplexers and negators. k2 is the set's
// column index (0, 1, 2 or 5); combinational.
module rot_mj
  import dct_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [2:0] k2,
  input  cword_t     din  [8],
  output cword_t     dout [8]
);

  logic [3:0] sum  [8];   // k1 + k2 (forward) or b - k2 + 8 (inverse)
  cword_t     sel  [8];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      if (!INVERSE) begin
        sum[i] = 4'(i) + {1'b0, k2};
        sel[i] = din[sum[i][2:0]];
        // wrapped (k1 + k2 >= 8): times -j, (x + jy)(-j) = y - jx
        dout[i].re = sum[i][3] ? sel[i].im  : sel[i].re;
        dout[i].im = sum[i][3] ? -sel[i].re : sel[i].im;
      end else begin
        sum[i] = 4'(i + 8) - {1'b0, k2};
        sel[i] = din[sum[i][2:0]];
        // wrapped (b < k2): times +j, (x + jy)(j) = -y + jx
        dout[i].re = sum[i][3] ? sel[i].re : -sel[i].im;
        dout[i].im = sum[i][3] ? sel[i].im : sel[i].re;
      end
    end
  end

endmodule
