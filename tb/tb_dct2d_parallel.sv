// tb_dct2d_parallel: random 8x8 pixel blocks in [-256,255] (plus the two
// extreme flat blocks) stream through the parallel 2-D DCT, back to back
// and with idle cycles. Every coefficient must be within 1 of the rounded
// double-precision orthonormal DCT, and each block must come out exactly
// 2 clocks after it went in.
module tb_dct2d_parallel;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  pix_t  pix [8][8];
  logic  out_valid;
  coef_t coef [8][8];

  dct2d_parallel dut (.*);

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

  iblk_t  q_blk [$];
  longint q_cyc [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    iblk_t  b;
    rblk_t  X;
    bit     ok;
    ok = 1'b1;
    if (q_blk.size() == 0) chk(1'b0, "output without input");
    else begin
      b = q_blk[0];
      void'(q_blk.pop_front());
      chk(cycle - q_cyc.pop_front() == 2, "latency");
      X = ref_dct(b);
      for (int k1 = 0; k1 < 8; k1++)
        for (int k2 = 0; k2 < 8; k2++)
          if (!near(real'(coef[k1][k2]), X[k1][k2], 1.0)) begin
            ok = 1'b0;
            if (failures < 3) $display("X[%0d][%0d]=%0d ref %f", k1, k2, coef[k1][k2], X[k1][k2]);
          end
      chk(ok, "block");
    end
  end

  initial begin
    iblk_t b;
    foreach (pix[i, j]) pix[i][j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      foreach (b[i, j]) b[i][j] = rand_range(-256, 255);
      if (n == 0) foreach (b[i, j]) b[i][j] = 255;
      if (n == 1) foreach (b[i, j]) b[i][j] = -256;
      foreach (pix[i, j]) pix[i][j] = pix_t'(b[i][j]);
      q_blk.push_back(b);
      q_cyc.push_back(cycle);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      if (n >= 150) repeat ($urandom % 3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(q_blk.size() == 0, "all blocks returned");
    report();
    $finish;
  end

endmodule
