// tb_ieee1180: IDCT accuracy run of the full design at its default sizes,
// following the IEEE 1180 / CCITT procedure the accuracy study uses.
// For each of the three input ranges [-256,255], [-5,5] and [-300,300],
// 10,000 blocks of random pixels are transformed in double precision,
// rounded and clipped to [-2048,2047], and streamed back to back into the
// folded IDCT of dct_idct_top. Its output is compared with the
// double-precision IDCT rounded and clipped to [-256,255]; the five error
// measures are printed and checked against their limits:
//   peak pixel error <= 1, overall mean square error <= 0.02,
//   peak (per position) mean square error <= 0.06,
//   overall mean error <= 0.0015, peak mean error <= 0.015.
module tb_ieee1180;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NBLK = 10000;

  localparam int K2A [4] = '{0, 1, 2, 5};
  localparam int K2B [4] = '{4, 7, 6, 3};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       dct_in_valid = 1'b0;
  pix_t       dct_pix [8][8];
  logic       dct_out_valid;
  coef_t      dct_coef [8][8];
  logic       idct_in_valid = 1'b0;
  coef_t      idct_col_a [8];
  coef_t      idct_col_b [8];
  logic       idct_out_valid;
  logic [2:0] idct_row_a_idx, idct_row_b_idx;
  pix_t       idct_row_a [8];
  pix_t       idct_row_b [8];

  dct_idct_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * NBLK * 4 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  iblk_t got;
  iblk_t q_ref [$];
  int    rows = 0;
  int    cur_range = 0;
  int    nblk_done = 0;
  real   esum [8][8];
  real   e2sum [8][8];
  int    peak = 0;

  always @(posedge clk) if (rst_n && idct_out_valid) begin
    iblk_t w;
    int    e;
    for (int c = 0; c < 8; c++) begin
      got[idct_row_a_idx][c] = int'(idct_row_a[c]);
      got[idct_row_b_idx][c] = int'(idct_row_b[c]);
    end
    rows += 2;
    if (rows == 8) begin
      rows = 0;
      w = q_ref[0];
      void'(q_ref.pop_front());
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          e = got[a][b] - w[a][b];
          esum[a][b]  += real'(e);
          e2sum[a][b] += real'(e * e);
          if (e > peak || -e > peak) peak = (e < 0) ? -e : e;
        end
      nblk_done++;
    end
  end

  initial begin
    iblk_t b, cx, w;
    rblk_t X, x;
    int    lo [3];
    int    hi [3];
    real   ome, omse, pme, pmse, me, mse;
    lo = '{-256, -5, -300};
    hi = '{255, 5, 300};
    foreach (dct_pix[i, j]) dct_pix[i][j] = '0;
    foreach (idct_col_a[i]) begin idct_col_a[i] = '0; idct_col_b[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    $display("range        peak  overall MSE  peak MSE  overall ME  peak ME");
    for (int rg = 0; rg < 3; rg++) begin
      foreach (esum[i, j]) begin esum[i][j] = 0.0; e2sum[i][j] = 0.0; end
      peak = 0;
      nblk_done = 0;
      for (int n = 0; n < NBLK; n++) begin
        foreach (b[i, j]) b[i][j] = rand_range(lo[rg], hi[rg]);
        X = ref_dct(b);
        foreach (cx[i, j]) cx[i][j] = clip(rnd(X[i][j]), -2048, 2047);
        x = ref_idct(cx);
        foreach (w[i, j]) w[i][j] = clip(rnd(x[i][j]), -256, 255);
        q_ref.push_back(w);
        for (int s = 0; s < 4; s++) begin
          for (int k1 = 0; k1 < 8; k1++) begin
            idct_col_a[k1] = coef_t'(cx[k1][K2A[s]]);
            idct_col_b[k1] = coef_t'(cx[k1][K2B[s]]);
          end
          idct_in_valid = 1'b1;
          @(negedge clk);
        end
      end
      idct_in_valid = 1'b0;
      repeat (12) @(negedge clk);
      chk(nblk_done == NBLK, "all blocks returned");
      ome = 0.0; omse = 0.0; pme = 0.0; pmse = 0.0;
      for (int a = 0; a < 8; a++)
        for (int c = 0; c < 8; c++) begin
          me   = esum[a][c] / real'(NBLK);
          mse  = e2sum[a][c] / real'(NBLK);
          ome  += esum[a][c];
          omse += e2sum[a][c];
          if ((me < 0.0 ? -me : me) > pme) pme = (me < 0.0) ? -me : me;
          if (mse > pmse) pmse = mse;
        end
      ome  = ome / (64.0 * real'(NBLK));
      omse = omse / (64.0 * real'(NBLK));
      $display("[%0d,%0d]  %4d  %11.4f  %8.4f  %10.4f  %7.4f", lo[rg], hi[rg], peak, omse, pmse, ome, pme);
      chk(peak <= 1, "peak pixel error");
      chk(omse <= 0.02, "overall mean square error");
      chk(pmse <= 0.06, "peak mean square error");
      chk((ome < 0.0 ? -ome : ome) <= 0.0015, "overall mean error");
      chk(pme <= 0.015, "peak mean error");
    end
    report();
    $finish;
  end

endmodule
