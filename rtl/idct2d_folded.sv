// idct2d_folded: folded 8x8 2-D IDCT, the parallel DCT reversed and folded
// by four.
//
// A block enters as four sets, one per accepted beat, in the order
//   set 0: columns k2 = 0 and 4,  set 1: 1 and 7,
//   set 2: columns k2 = 2 and 6,  set 3: 5 and 3
// (in_col_a = column k2, in_col_b = column 8-k2, both indexed by k1). Each
// set passes one shared datapath:
//   coef_unscale x2 -> substage3_inv (used by set 0, bypassed otherwise)
//   -> post_adder_inv -> rot_mj (inverse: rotate back by k2, +j where the
//   index wrapped) -> cidct8 (two real 1-D IDCTs)
// producing u(n1) for the eight mapped rows of that set. Four 4x4
// transpose memories regroup these 64 words so that each read delivers all
// four sets of two mapped rows n1 = 2g, 2g+1. Memory 0/1 hold Re/Im of the
// even row, memory 2/3 those of the odd row. Two reversed pre-adders (even
// and odd row) and two inverse row maps then rebuild two pixel rows per
// clock, rounded and clipped to PIX_W bits.
// Output order of pixel rows: (0,2), (4,6), (7,5), (3,1), one pair per
// clock; out_row_a_idx / out_row_b_idx give the row numbers.
// Timing: the set register, one register after the rotation, the transpose
// write and the output register make the first row pair appear 7 clocks
// after the block's first beat when the four beats are consecutive; blocks
// stream back to back at four clocks per block. Beats may have gaps.
// Following the document: the order of the substages, the bypass of
// substage 3 for sets 1-3, the -j multiplexers and barrel shifter, the
// complex IDCT from two 1-D IDCTs, four 4-by-4 transpose memories and the
// reversed pre-addition. This design's choices: the set order and port
// layout, the placement of all scaling at the input, the pipeline
// registers and the fixed-point format (FRAC_I fraction bits of INT_W).
module idct2d_folded
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  coef_t      in_col_a [8],
  input  coef_t      in_col_b [8],
  output logic       out_valid,
  output logic [2:0] out_row_a_idx,
  output pix_t       out_row_a [8],
  output logic [2:0] out_row_b_idx,
  output pix_t       out_row_b [8]
);

  localparam logic [2:0] K2A [4] = '{3'd0, 3'd1, 3'd2, 3'd5};
  localparam logic [2:0] K2B [4] = '{3'd4, 3'd7, 3'd6, 3'd3};

  // ---- Set counter and input register ----
  logic [1:0] set_in;      // set index of the next accepted beat
  logic       v0;
  logic [1:0] set0;
  coef_t      ca [8];
  coef_t      cb [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_in <= '0;
      v0     <= 1'b0;
      set0   <= '0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        set_in <= set_in + 2'd1;
        set0   <= set_in;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      ca <= in_col_a;
      cb <= in_col_b;
    end
  end

  // ---- Substages 3 and 2, rotation ----
  word_t  za [8];
  word_t  zb [8];
  word_t  qb [8];
  cword_t uk [8];
  cword_t ub_d [8];

  coef_unscale  u_scale_a (.k2(K2A[set0]), .x(ca), .z(za));
  coef_unscale  u_scale_b (.k2(K2B[set0]), .x(cb), .z(zb));
  substage3_inv u_sub3    (.first(set0 == 2'd0), .c(zb), .q(qb));
  post_adder_inv u_post   (.p(za), .q(qb), .uk(uk));
  rot_mj #(.INVERSE(1'b1)) u_rot (.k2(K2A[set0]), .din(uk), .dout(ub_d));

  logic   v1;
  cword_t ub_q [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= v0;
  end

  always_ff @(posedge clk) begin
    if (v0) ub_q <= ub_d;
  end

  // ---- Substage 1: complex IDCT, then transpose memories ----
  cword_t u_set [8];

  cidct8 u_cidct (.uf(ub_q), .u(u_set));

  logic [INT_W-1:0] tw [4][4];   // tw[memory][element]
  logic [INT_W-1:0] tr [4][4];
  logic             t_valid [4];
  logic [1:0]       t_idx [4];

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      tw[0][g] = u_set[2*g].re;
      tw[1][g] = u_set[2*g].im;
      tw[2][g] = u_set[2*g+1].re;
      tw[3][g] = u_set[2*g+1].im;
    end
  end

  for (genvar m = 0; m < 4; m++) begin : g_tm
    transpose4x4 #(.W(INT_W)) u_tm (
      .clk(clk), .rst_n(rst_n), .wr_en(v1), .wdata(tw[m]),
      .rd_valid(t_valid[m]), .rd_idx(t_idx[m]), .rdata(tr[m])
    );
  end

  // ---- Stage 1 reversed: two mapped rows per clock ----
  logic [2:0] n1_even, n1_odd;
  word_t      y_even [8];
  word_t      y_odd  [8];
  word_t      x_even [8];
  word_t      x_odd  [8];

  assign n1_even = {t_idx[0], 1'b0};
  assign n1_odd  = {t_idx[0], 1'b1};

  // tr[m][s]: set s of memory m. Set 0 carries u0 - j u4.
  pre_adder_inv #(.ODD(1'b0)) u_pre_e (
    .u0(word_t'(tr[0][0])), .u4(-word_t'(tr[1][0])),
    .u1('{re: word_t'(tr[0][1]), im: word_t'(tr[1][1])}),
    .u2('{re: word_t'(tr[0][2]), im: word_t'(tr[1][2])}),
    .u5('{re: word_t'(tr[0][3]), im: word_t'(tr[1][3])}),
    .y(y_even)
  );

  pre_adder_inv #(.ODD(1'b1)) u_pre_o (
    .u0(word_t'(tr[2][0])), .u4(-word_t'(tr[3][0])),
    .u1('{re: word_t'(tr[2][1]), im: word_t'(tr[3][1])}),
    .u2('{re: word_t'(tr[2][2]), im: word_t'(tr[3][2])}),
    .u5('{re: word_t'(tr[2][3]), im: word_t'(tr[3][3])}),
    .y(y_odd)
  );

  row_map #(.INVERSE(1'b1)) u_map_e (.n1(n1_even), .din(y_even), .dout(x_even));
  row_map #(.INVERSE(1'b1)) u_map_o (.n1(n1_odd),  .din(y_odd),  .dout(x_odd));

  // Round to integer (ties to even, so that rounding adds no mean error)
  // and clip to the pixel range. The reversed pre-adder delivers FRAC_I + 3
  // fraction bits.
  localparam int unsigned FO = FRAC_I + 3;

  function automatic pix_t to_pix(word_t v);
    word_t r;
    logic  tie;
    r   = v >>> FO;
    tie = (v[FO-1:0] == (FO)'(1 << (FO - 1)));
    if (v[FO-1] && (!tie || r[0])) r = r + word_t'(1);
    if (r > word_t'((1 << (PIX_W - 1)) - 1)) return pix_t'((1 << (PIX_W - 1)) - 1);
    if (r < -word_t'(1 << (PIX_W - 1)))      return pix_t'(-(1 << (PIX_W - 1)));
    return pix_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= t_valid[0];
  end

  always_ff @(posedge clk) begin
    if (t_valid[0]) begin
      out_row_a_idx <= 3'(pmap(n1_even));
      out_row_b_idx <= 3'(pmap(n1_odd));
      for (int c = 0; c < 8; c++) begin
        out_row_a[c] <= to_pix(x_even[c]);
        out_row_b[c] <= to_pix(x_odd[c]);
      end
    end
  end

endmodule
