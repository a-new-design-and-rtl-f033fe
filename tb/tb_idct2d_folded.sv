// tb_idct2d_folded: the folded 2-D IDCT against a double-precision IDCT.
// Coefficient blocks are made as in the IEEE 1180 procedure: random pixels
// in [-256,255], double-precision DCT, rounded and clipped to 12 bits.
// They enter as four column-pair beats (0/4, 1/7, 2/6, 5/3), half of them
// back to back and half with random gaps. Every output pixel must be
// within 1 of the rounded, clipped reference; the row indices must cover
// all eight rows; the first row pair must appear 7 clocks after the first
// beat; eight back-to-back blocks must give 32 consecutive output clocks.
module tb_idct2d_folded;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int K2A [4] = '{0, 1, 2, 5};
  localparam int K2B [4] = '{4, 7, 6, 3};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  coef_t      in_col_a [8];
  coef_t      in_col_b [8];
  logic       out_valid;
  logic [2:0] out_row_a_idx, out_row_b_idx;
  pix_t       out_row_a [8];
  pix_t       out_row_b [8];

  idct2d_folded dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  iblk_t  q_ref [$];
  longint q_first [$];
  iblk_t  got;
  logic [7:0] seen;
  int     rows = 0;
  longint first_out;
  bit     lat_done = 1'b0;

  always @(posedge clk) if (rst_n && out_valid) begin
    iblk_t w;
    bit    ok;
    if (rows == 0) begin
      first_out = cycle;
      seen = '0;
    end
    for (int c = 0; c < 8; c++) begin
      got[out_row_a_idx][c] = int'(out_row_a[c]);
      got[out_row_b_idx][c] = int'(out_row_b[c]);
    end
    seen[out_row_a_idx] = 1'b1;
    seen[out_row_b_idx] = 1'b1;
    rows += 2;
    if (rows == 8) begin
      rows = 0;
      ok = 1'b1;
      chk(seen == 8'hff, "all rows delivered");
      if (q_ref.size() == 0) chk(1'b0, "output without input");
      else begin
        w = q_ref[0];
        void'(q_ref.pop_front());
        if (!lat_done) begin
          chk(first_out - q_first[0] == 7, $sformatf("latency %0d", first_out - q_first[0]));
          lat_done = 1'b1;
        end
        void'(q_first.pop_front());
        for (int a = 0; a < 8; a++)
          for (int b = 0; b < 8; b++)
            if (got[a][b] - w[a][b] > 1 || w[a][b] - got[a][b] > 1) begin
              ok = 1'b0;
              if (failures < 3) $display("x[%0d][%0d]=%0d ref %0d", a, b, got[a][b], w[a][b]);
            end
        chk(ok, "block");
      end
    end
  end

  task automatic send(bit gaps);
    iblk_t b, cx, w;
    rblk_t X, x;
    foreach (b[i, j]) b[i][j] = rand_range(-256, 255);
    X = ref_dct(b);
    foreach (cx[i, j]) cx[i][j] = clip(rnd(X[i][j]), -2048, 2047);
    x = ref_idct(cx);
    foreach (w[i, j]) w[i][j] = clip(rnd(x[i][j]), -256, 255);
    q_ref.push_back(w);
    for (int s = 0; s < 4; s++) begin
      if (gaps) repeat ($urandom % 3) @(negedge clk);
      for (int k1 = 0; k1 < 8; k1++) begin
        in_col_a[k1] = coef_t'(cx[k1][K2A[s]]);
        in_col_b[k1] = coef_t'(cx[k1][K2B[s]]);
      end
      if (s == 0) q_first.push_back(cycle);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  int burst = 0;

  initial begin
    foreach (in_col_a[i]) begin in_col_a[i] = '0; in_col_b[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) send(n >= 150);
    repeat (12) @(negedge clk);
    fork
      for (int n = 0; n < 8; n++) send(1'b0);
      begin
        @(posedge clk iff out_valid);
        while (out_valid) begin
          burst++;
          @(posedge clk);
        end
      end
    join
    chk(burst == 32, $sformatf("streaming output clocks %0d", burst));
    repeat (12) @(negedge clk);
    chk(q_ref.size() == 0, "all blocks returned");
    report();
    $finish;
  end

endmodule
