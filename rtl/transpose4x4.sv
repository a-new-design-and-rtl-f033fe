// transpose4x4: 4-by-4 transpose memory for the folded IDCT.
//
// A frame is four vectors of four W-bit words written one per cycle
// (wr_en). The frame written in cycles w = 0..3 is read out in the four
// cycles after its last write, vector r holding element r of each written
// vector (rd_valid, rd_idx = r, rdata). To stream frames back to back with
// a single array, the write direction alternates: one frame is written in
// rows and read in columns, the next is written in columns, exactly into
// the cells being read that cycle, and read in rows. Reads are
// combinational from the array, so a cell is read before the same clock
// edge overwrites it. A new frame may start any time after the previous
// frame's last write; gaps between writes are allowed.
// The document gives the transpose memories' count and size; the
// alternating-direction organisation is this design's choice.
module transpose4x4 #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata [4],
  output logic         rd_valid,
  output logic [1:0]   rd_idx,
  output logic [W-1:0] rdata [4]
);

  logic [W-1:0] mem [4][4];
  logic [1:0]   wcnt;
  logic         wdir;    // 0: frame written in rows, 1: in columns
  logic         rdir;    // direction the frame being read was written in

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      wdir     <= 1'b0;
      rdir     <= 1'b0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
    end else begin
      if (wr_en && wcnt == 2'd3) begin
        rd_valid <= 1'b1;
        rd_idx   <= '0;
        rdir     <= wdir;
        wdir     <= ~wdir;
      end else if (rd_valid) begin
        rd_idx <= rd_idx + 2'd1;
        if (rd_idx == 2'd3) rd_valid <= 1'b0;
      end
      if (wr_en) wcnt <= wcnt + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < 4; i++) begin
        if (!wdir) mem[wcnt][i] <= wdata[i];
        else       mem[i][wcnt] <= wdata[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = (!rdir) ? mem[i][rd_idx] : mem[rd_idx][i];
  end

  // A frame's reads must stay ahead of the next frame's writes.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_en && rd_valid) |-> (wcnt <= rd_idx))
    else $error("transpose4x4: write overtook read");

endmodule
