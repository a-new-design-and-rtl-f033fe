// tb_transpose4x4: streams 4x4 frames through the transpose memory, some
// back to back and some with random idle cycles between writes. Each read
// vector r must hold element r of the four written vectors, reads must
// come on the four clocks right after a frame's last write, and frames
// written in both directions must occur.
module tb_transpose4x4;
  import dct_ref_pkg::*;

  localparam int W = 18;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         wr_en = 1'b0;
  logic [W-1:0] wdata [4];
  logic         rd_valid;
  logic [1:0]   rd_idx;
  logic [W-1:0] rdata [4];

  transpose4x4 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  typedef logic [W-1:0] frame_t [4][4];
  frame_t fq [$];
  longint done_q [$];   // cycle of each frame's last write
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  frame_t cur;
  int     nread = 0;
  int     nframes_read = 0;

  always @(posedge clk) if (rst_n && rd_valid) begin
    if (fq.size() == 0) chk(1'b0, "read without a frame");
    else begin
      cur = fq[0];
      chk(rd_idx == 2'(nread), "read index");
      chk(cycle == done_q[0] + 1 + nread, $sformatf("read timing %0d", cycle - done_q[0]));
      for (int i = 0; i < 4; i++)
        chk(rdata[i] == cur[i][nread], $sformatf("frame %0d vec %0d elem %0d", nframes_read, nread, i));
      nread++;
      if (nread == 4) begin
        nread = 0;
        nframes_read++;
        void'(fq.pop_front());
        void'(done_q.pop_front());
      end
    end
  end

  initial begin
    frame_t f;
    foreach (wdata[i]) wdata[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      foreach (f[i, j]) f[i][j] = W'($urandom);
      fq.push_back(f);
      for (int v = 0; v < 4; v++) begin
        if (n >= 100) repeat ($urandom % 3) @(negedge clk);
        wdata = f[v];
        wr_en = 1'b1;
        if (v == 3) done_q.push_back(cycle);
        @(negedge clk);
        wr_en = 1'b0;
      end
    end
    repeat (8) @(negedge clk);
    chk(nframes_read == 200, $sformatf("frames read %0d", nframes_read));
    report();
    $finish;
  end

endmodule
