// merge_phy_frame: rebuilds the single Ethernet block stream from the two
// PHY receive channels and hands only traffic blocks to the TX FIFO. Blocks
// that match the padding idle block are dropped on arrival; the match
// tolerates up to PAD_HAM bit errors, so a padding block hit by a channel
// error is still removed. The 64b/66b block type codes differ from the idle
// type 0x1E in at least four bits, and a terminate block with no data bytes
// (type 0x87) is otherwise all zeros like the idle block, so PAD_HAM must stay
// below 2 for such a block never to be taken for padding. Each channel has its own small FIFO that
// absorbs the difference in latency between the two receivers. When both
// channels are enabled, blocks are taken alternately from channel 0 and
// channel 1, the order in which split_phy_frame dealt them; with one channel
// enabled only that channel is read. A filler block (sent on channel 1 when a
// flushed frame held an odd number of blocks) takes its turn in the
// alternation but is not passed on. One output block per clock at most,
// registered. The tolerance rule and FIFO depth are this design's choices.
module merge_phy_frame
  import modem_pkg::*;
#(
  parameter int AW      = 9,
  parameter int PAD_HAM = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  ch_en,
  input  logic [1:0]  in_valid,
  input  blk66_t      in_blk [2],
  output logic        out_valid,
  output blk66_t      out_blk,
  output logic [31:0] pad_dropped [2],
  output logic [31:0] overflow
);
  logic [1:0]  is_pad, wr, full, empty, rd;
  blk66_t      head [2];
  logic        turn;

  function automatic int hdist(blk66_t a, blk66_t b);
    int n = 0;
    logic [65:0] d = a ^ b;
    for (int i = 0; i < 66; i++) n += int'(d[i]);
    return n;
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic [AW:0] wl, rl;
    assign is_pad[c] = hdist(in_blk[c], IDLE_BLK) <= PAD_HAM;
    assign wr[c]     = in_valid[c] && ch_en[c] && !is_pad[c];
    async_fifo #(.W(66), .AW(AW)) u_fifo (
      .wclk(clk), .wrst(rst), .wr(wr[c]), .wdata(in_blk[c]), .wfull(full[c]), .wlevel(wl),
      .rclk(clk), .rrst(rst), .rd(rd[c]), .rdata(head[c]), .rempty(empty[c]), .rlevel(rl)
    );
  end

  // channel to read this cycle
  logic sel;
  always_comb begin
    rd  = 2'b00;
    sel = 1'b0;
    if (ch_en == 2'b11) sel = turn;
    else                sel = ch_en[1];
    if (ch_en != 2'b00 && !empty[sel]) rd[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      turn <= 1'b0; out_valid <= 1'b0; out_blk <= IDLE_BLK;
      pad_dropped[0] <= '0; pad_dropped[1] <= '0; overflow <= '0;
    end else begin
      out_valid <= |rd && head[sel] != FILL_BLK;
      if (|rd) begin
        out_blk <= head[sel];
        if (ch_en == 2'b11) turn <= ~turn;
      end
      for (int c = 0; c < 2; c++) begin
        if (in_valid[c] && ch_en[c] && is_pad[c]) pad_dropped[c] <= pad_dropped[c] + 1;
        if (wr[c] && full[c]) overflow <= overflow + 1;
      end
    end
  end
endmodule
