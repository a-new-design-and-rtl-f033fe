// dct_idct_top: 8x8 2-D DCT/IDCT built on the direct 2-D method.
//
// Holds the two halves of the design side by side, each with its own ports:
//   - dct2d_parallel: parallel forward transform, a whole 8x8 pixel block in
//     and a whole coefficient block out per clock, latency 2 clocks.
//   - idct2d_folded: the inverse, folded by four: one set of two
//     coefficient columns per clock in, two pixel rows per clock out, one
//     block per four clocks, first rows 7 clocks after the first beat.
// The two share no state; one reset and clock drive both. Connecting
// dct_coef to the IDCT's column inputs (columns 0/4, 1/7, 2/6, 5/3 in that
// order) reconstructs the block.
module dct_idct_top
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // forward 2-D DCT
  input  logic       dct_in_valid,
  input  pix_t       dct_pix  [8][8],
  output logic       dct_out_valid,
  output coef_t      dct_coef [8][8],
  // inverse 2-D DCT
  input  logic       idct_in_valid,
  input  coef_t      idct_col_a [8],
  input  coef_t      idct_col_b [8],
  output logic       idct_out_valid,
  output logic [2:0] idct_row_a_idx,
  output pix_t       idct_row_a [8],
  output logic [2:0] idct_row_b_idx,
  output pix_t       idct_row_b [8]
);

  dct2d_parallel u_dct (
    .clk(clk), .rst_n(rst_n),
    .in_valid(dct_in_valid), .pix(dct_pix),
    .out_valid(dct_out_valid), .coef(dct_coef)
  );

  idct2d_folded u_idct (
    .clk(clk), .rst_n(rst_n),
    .in_valid(idct_in_valid), .in_col_a(idct_col_a), .in_col_b(idct_col_b),
    .out_valid(idct_out_valid),
    .out_row_a_idx(idct_row_a_idx), .out_row_a(idct_row_a),
    .out_row_b_idx(idct_row_b_idx), .out_row_b(idct_row_b)
  );

endmodule
