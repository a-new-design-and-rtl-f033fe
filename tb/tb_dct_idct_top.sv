// tb_dct_idct_top: end-to-end test of the 2-D DCT/IDCT top at its defaults.
//
// Forward part: random 8x8 pixel blocks stream through the parallel DCT,
// first back to back and then with idle cycles; every coefficient is
// compared with a double-precision orthonormal DCT (within 1) and the
// 2-clock latency is checked for every block.
// Inverse part, after the IEEE 1180 procedure: random pixel blocks in the
// ranges [-256,255], [-5,5] and [-300,300] are transformed in double
// precision, rounded and clipped to 12 bits, and sent to the folded IDCT as
// four column-pair beats, sometimes back to back and sometimes with random
// gaps. Each output pixel is compared with the double-precision IDCT
// (rounded, clipped to 9 bits): peak error 1, and the per-range overall
// and per-position mean and mean-square errors against the limits of that
// procedure. Also checked: first rows 7 clocks after the first beat, four
// clocks per block when streaming, and that the DCT output fed back into
// the IDCT reproduces the pixels within 1.
// Mechanisms counted and required: transpose read and write in the same
// cycle (back-to-back streaming), gapped beats, output clipping, the
// substage-3 path (set 0) and its bypass (sets 1-3), and both transpose
// write directions.
module tb_dct_idct_top;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NB_DCT  = 200;   // forward blocks
  localparam int NB_IDCT = 400;   // inverse blocks per input range
  localparam int NB_LOOP = 50;    // DCT -> IDCT round trips

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

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_overlap = 0, n_gap = 0, n_clip = 0, n_sub3 = 0, n_bypass = 0;
  int n_dir_row = 0, n_dir_col = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_idct.v1 && dut.u_idct.g_tm[0].u_tm.rd_valid) n_overlap++;
    if (dut.u_idct.v1 && dut.u_idct.g_tm[0].u_tm.wdir) n_dir_col++;
    if (dut.u_idct.v1 && !dut.u_idct.g_tm[0].u_tm.wdir) n_dir_row++;
    if (dut.u_idct.v0 && dut.u_idct.set0 == 2'd0) n_sub3++;
    if (dut.u_idct.v0 && dut.u_idct.set0 != 2'd0) n_bypass++;
  end

  // ---------------- forward DCT ----------------
  iblk_t  dq_pix [$];
  longint dq_cyc [$];

  task automatic dct_send(iblk_t b);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) dct_pix[r][c] = pix_t'(b[r][c]);
    dct_in_valid = 1'b1;
    dq_pix.push_back(b);
    dq_cyc.push_back(cycle);
    @(negedge clk);
    dct_in_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n && dct_out_valid) begin
    iblk_t  b;
    rblk_t  X;
    longint c0;
    bit     ok;
    ok = 1'b1;
    if (dq_pix.size() == 0) check(1'b0, "DCT output without input");
    else begin
      b  = dq_pix[0];
      void'(dq_pix.pop_front());
      c0 = dq_cyc.pop_front();
      X  = ref_dct(b);
      for (int k1 = 0; k1 < 8; k1++)
        for (int k2 = 0; k2 < 8; k2++) begin
          automatic int d = int'(dct_coef[k1][k2]) - rnd(X[k1][k2]);
          if (d > 1 || d < -1) begin
            ok = 1'b0;
            if (failures < 5) $display("DCT X[%0d][%0d]=%0d ref %f", k1, k2, dct_coef[k1][k2], X[k1][k2]);
          end
        end
      check(ok, "DCT block");
      check(cycle - c0 == 2, $sformatf("DCT latency %0d", cycle - c0));
    end
  end

  // ---------------- inverse DCT ----------------
  iblk_t  iq_ref [$];
  bit     iq_cmp [$];     // 1: compare against statistics
  longint first_beat [$];
  int     range_id [$];

  real    esum [3][8][8];
  real    e2sum [3][8][8];
  int     ecount [3];
  int     peak [3];

  task automatic idct_send(iblk_t cx, bit gaps);
    for (int s = 0; s < 4; s++) begin
      if (gaps && ($urandom % 2 == 1)) begin
        automatic int g = 1 + int'($urandom % 3);
        n_gap++;
        repeat (g) @(negedge clk);
      end
      for (int k1 = 0; k1 < 8; k1++) begin
        idct_col_a[k1] = coef_t'(cx[k1][K2A[s]]);
        idct_col_b[k1] = coef_t'(cx[k1][K2B[s]]);
      end
      idct_in_valid = 1'b1;
      if (s == 0) first_beat.push_back(cycle);
      @(negedge clk);
      idct_in_valid = 1'b0;
    end
  endtask

  iblk_t  got;
  int     rows_got = 0;
  longint first_out;
  int     lat_checked = 0;

  always @(posedge clk) if (rst_n && idct_out_valid) begin
    if (rows_got == 0) first_out = cycle;
    for (int c = 0; c < 8; c++) begin
      got[idct_row_a_idx][c] = int'(idct_row_a[c]);
      got[idct_row_b_idx][c] = int'(idct_row_b[c]);
    end
    rows_got += 2;
    if (rows_got == 8) begin
      iblk_t  want;
      longint fb;
      int     rid;
      bit     ok;
      ok = 1'b1;
      rows_got = 0;
      if (iq_ref.size() == 0) check(1'b0, "IDCT output without input");
      else begin
        want = iq_ref[0];
        void'(iq_ref.pop_front());
        fb   = first_beat.pop_front();
        rid  = range_id.pop_front();
        if (lat_checked == 0) begin
          check(first_out - fb == 7, $sformatf("IDCT latency %0d", first_out - fb));
          lat_checked = 1;
        end
        for (int a = 0; a < 8; a++)
          for (int b = 0; b < 8; b++) begin
            automatic int e = got[a][b] - want[a][b];
            if (e > 1 || e < -1) begin
              ok = 1'b0;
              if (failures < 5) $display("IDCT x[%0d][%0d]=%0d ref %0d", a, b, got[a][b], want[a][b]);
            end
            if (rid >= 0) begin
              esum[rid][a][b]  += real'(e);
              e2sum[rid][a][b] += real'(e * e);
              if (e > peak[rid] || -e > peak[rid]) peak[rid] = (e < 0) ? -e : e;
            end
            if (got[a][b] == 255 || got[a][b] == -256) n_clip++;
          end
        if (rid >= 0) ecount[rid]++;
        check(ok, "IDCT block");
      end
    end
  end

  // Streaming: count output cycles of a burst of back-to-back blocks.
  int burst_out = 0;

  initial begin
    iblk_t b, cx, w;
    rblk_t X, x;
    automatic int lo [3] = '{-256, -5, -300};
    automatic int hi [3] = '{255, 5, 300};

    foreach (esum[i, j, k]) begin esum[i][j][k] = 0.0; e2sum[i][j][k] = 0.0; end
    foreach (ecount[i]) begin ecount[i] = 0; peak[i] = 0; end
    foreach (dct_pix[i, j]) dct_pix[i][j] = '0;
    foreach (idct_col_a[i]) begin idct_col_a[i] = '0; idct_col_b[i] = '0; end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // forward: back to back, then with gaps
    for (int n = 0; n < NB_DCT; n++) begin
      foreach (b[i, j]) b[i][j] = rand_range(-256, 255);
      if (n == 0) foreach (b[i, j]) b[i][j] = 255;
      if (n == 1) foreach (b[i, j]) b[i][j] = -256;
      dct_send(b);
      if (n >= NB_DCT / 2) repeat ($urandom % 3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(dq_pix.size() == 0, "all DCT blocks returned");

    // inverse, IEEE 1180 style, three ranges
    for (int rg = 0; rg < 3; rg++) begin
      for (int n = 0; n < NB_IDCT; n++) begin
        foreach (b[i, j]) b[i][j] = rand_range(lo[rg], hi[rg]);
        X = ref_dct(b);
        foreach (cx[i, j]) cx[i][j] = clip(rnd(X[i][j]), -2048, 2047);
        x = ref_idct(cx);
        foreach (w[i, j]) w[i][j] = clip(rnd(x[i][j]), -256, 255);
        iq_ref.push_back(w);
        range_id.push_back(rg);
        idct_send(cx, (n % 4) == 3);
      end
    end
    repeat (12) @(negedge clk);

    // streaming rate: 8 blocks back to back must give 32 consecutive output cycles
    fork
      begin
        for (int n = 0; n < 8; n++) begin
          foreach (b[i, j]) b[i][j] = rand_range(-256, 255);
          X = ref_dct(b);
          foreach (cx[i, j]) cx[i][j] = clip(rnd(X[i][j]), -2048, 2047);
          x = ref_idct(cx);
          foreach (w[i, j]) w[i][j] = clip(rnd(x[i][j]), -256, 255);
          iq_ref.push_back(w);
          range_id.push_back(-1);
          idct_send(cx, 1'b0);
        end
      end
      begin
        @(posedge clk iff idct_out_valid);
        while (idct_out_valid) begin
          burst_out++;
          @(posedge clk);
        end
      end
    join
    check(burst_out == 32, $sformatf("streaming output cycles %0d", burst_out));

    // round trip: DCT output straight into the IDCT
    for (int n = 0; n < NB_LOOP; n++) begin
      foreach (b[i, j]) b[i][j] = rand_range(-256, 255);
      dct_send(b);
      @(posedge clk iff dct_out_valid);
      foreach (cx[i, j]) cx[i][j] = int'(dct_coef[i][j]);
      @(negedge clk);
      iq_ref.push_back(b);
      range_id.push_back(-1);
      idct_send(cx, 1'b0);
      repeat (10) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    check(iq_ref.size() == 0, "all IDCT blocks returned");

    // accuracy statistics per range
    for (int rg = 0; rg < 3; rg++) begin
      automatic real ome = 0.0, omse = 0.0, pme = 0.0, pmse = 0.0;
      for (int a = 0; a < 8; a++)
        for (int c = 0; c < 8; c++) begin
          automatic real me  = esum[rg][a][c] / real'(ecount[rg]);
          automatic real mse = e2sum[rg][a][c] / real'(ecount[rg]);
          ome  += esum[rg][a][c];
          omse += e2sum[rg][a][c];
          if ((me < 0 ? -me : me) > pme) pme = (me < 0) ? -me : me;
          if (mse > pmse) pmse = mse;
        end
      ome  = ome / (64.0 * real'(ecount[rg]));
      omse = omse / (64.0 * real'(ecount[rg]));
      $display("range %0d..%0d: peak %0d  overall MSE %f  peak MSE %f  overall ME %f  peak ME %f",
               lo[rg], hi[rg], peak[rg], omse, pmse, ome, pme);
      check(peak[rg] <= 1, "peak pixel error");
      check(omse <= 0.02, "overall mean square error");
      check(pmse <= 0.06, "peak mean square error");
      // the mean-error limits are statistical; allow the sampling spread of a short run
      check((ome < 0 ? -ome : ome) <= 0.0015 + 0.02 / $sqrt(real'(ecount[rg])), "overall mean error");
      check(pme <= 0.015 + 0.3 / $sqrt(real'(ecount[rg])), "peak mean error");
    end

    $display("mechanisms: overlap=%0d gaps=%0d clip=%0d sub3=%0d bypass=%0d rowdir=%0d coldir=%0d",
             n_overlap, n_gap, n_clip, n_sub3, n_bypass, n_dir_row, n_dir_col);
    check(n_overlap > 0, "transpose read/write overlap happened");
    check(n_gap > 0, "gapped beats happened");
    check(n_clip > 0, "output clipping happened");
    check(n_sub3 > 0, "substage 3 used");
    check(n_bypass > 0, "substage 3 bypassed");
    check(n_dir_row > 0 && n_dir_col > 0, "both transpose directions used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
