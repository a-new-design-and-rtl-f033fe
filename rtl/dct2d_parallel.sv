// dct2d_parallel: fully parallel 8x8 2-D DCT computed by the direct method.
//
// The 2-D transform is done with four complex 8-point DCTs instead of the
// sixteen real 1-D DCTs of the row-column method:
//   1. row_map + pre_adder (Stage 1), one per mapped row n1 = 0..7: the
//      block is permuted and each row pre-added into u(n1,0) - j u(n1,4),
//      u(n1,1), u(n1,2) and u(n1,5), the four input sets.
//   2. per set (k2 = 0, 1, 2, 5): cdct8 -> rot_mj (-j and rotation by k2)
//      -> post_adder, giving the columns k2 and 8-k2 of the unscaled
//      transform Y; the k2 = 0 set goes through substage3 for column 4.
//   3. coef_scale applies (2/N) c(k1) c(k2) and rounds to DCT_W bits.
// Interface: pix[r][c] is the block in natural order, coef[k1][k2] the
// orthonormal 2-D DCT (k1 on the row index). One block per clock when
// in_valid is held. Latency 2 clocks: a register after Stage 1 and one on
// the output. The document presents this parallel form and folds only the
// inverse; the pipeline register placement is this design's choice.
module dct2d_parallel
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  pix  [8][8],
  output logic  out_valid,
  output coef_t coef [8][8]
);

  localparam logic [2:0] K2 [4] = '{3'd0, 3'd1, 3'd2, 3'd5};

  // ---- Stage 1: mapping and pre-addition ----
  cword_t set_d [4][8];
  cword_t set_q [4][8];

  for (genvar n1 = 0; n1 < 8; n1++) begin : g_row
    word_t  xrow [8];
    word_t  yrow [8];
    word_t  u0, u4;
    cword_t u1, u2, u5;

    always_comb begin
      for (int c = 0; c < 8; c++) xrow[c] = word_t'(pix[pmap(n1)][c]) <<< FRAC_F;
    end

    row_map #(.INVERSE(1'b0)) u_map (.n1(3'(n1)), .din(xrow), .dout(yrow));

    pre_adder #(.ODD(n1 % 2 == 1)) u_pre (
      .y(yrow), .u0(u0), .u4(u4), .u1(u1), .u2(u2), .u5(u5)
    );

    always_comb begin
      set_d[0][n1].re = u0;
      set_d[0][n1].im = -u4;
      set_d[1][n1]    = u1;
      set_d[2][n1]    = u2;
      set_d[3][n1]    = u5;
    end
  end

  logic v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) set_q <= set_d;
  end

  // ---- Stage 2: complex DCT, rotation, post-addition, substage 3 ----
  word_t col  [8][8];   // col[k2][k1] = Y(k1,k2)
  word_t pset [4][8];   // first post-adder output of each set
  word_t qset [4][8];   // second post-adder output of each set
  word_t col4 [8];

  for (genvar s = 0; s < 4; s++) begin : g_set
    cword_t uf [8];
    cword_t uk [8];

    cdct8 u_cdct (.u(set_q[s]), .uf(uf));
    rot_mj #(.INVERSE(1'b0)) u_rot (.k2(K2[s]), .din(uf), .dout(uk));
    post_adder u_post (.uk(uk), .p(pset[s]), .q(qset[s]));
  end

  substage3 u_sub3 (.q(qset[0]), .col4(col4));

  always_comb begin
    col[0] = pset[0];
    col[4] = col4;
    col[1] = pset[1];
    col[7] = qset[1];
    col[2] = pset[2];
    col[6] = qset[2];
    col[5] = pset[3];
    col[3] = qset[3];
  end

  // ---- Scaling and output register ----
  coef_t xcol [8][8];   // xcol[k2][k1]

  for (genvar k2 = 0; k2 < 8; k2++) begin : g_scale
    coef_scale u_scale (.k2(3'(k2)), .y(col[k2]), .x(xcol[k2]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int k1 = 0; k1 < 8; k1++)
        for (int k2 = 0; k2 < 8; k2++) coef[k1][k2] <= xcol[k2][k1];
    end
  end

endmodule
