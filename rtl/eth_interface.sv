// eth_interface: the Ethernet side of one baseband platform, a "66B bridge"
// between a 10GbE fibre port and two radio PHY channels. Native 64b/66b
// blocks from the GTX receiver are block-locked and descrambled; idle blocks
// are deleted as they enter the RX FIFO, which crosses into the PHY transmit
// clock. The frame splitter reads the FIFO at the PHY's constant pace and
// deals fixed-length PHY frames to the two channels (padding frames when
// traffic is short). On the way back, the merger drops padding blocks from
// the two PHY receivers, interleaves their traffic, and the TX FIFO carries
// it into the GTX transmit clock, inserting idle blocks whenever it runs
// dry; the stream is scrambled again for the GTX. Two traffic monitors count
// frames, FCS errors and framing errors at the RX FIFO output (Eth_rx) and at
// the TX FIFO output (Eth_tx).
// Four clock domains, each with its own synchronous active-high reset:
// gtx_rx (156 MHz), gtx_tx (156 MHz), phy_tx (312 MHz, D/A clock) and
// phy_rx (312 MHz, A/D clock). The block structure follows the design's
// Ethernet interface; FIFO depths and the status outputs are this design's.
module eth_interface
  import modem_pkg::*;
#(
  parameter int FIFO_AW  = 10,
  parameter int MERGE_AW = 9,
  parameter int NBLK     = FRAME_BLKS
) (
  // GTX receive side (from the fibre)
  input  logic        gtx_rx_clk,
  input  logic        gtx_rx_rst,
  input  logic        gtx_rx_valid,
  input  blk66_t      gtx_rx_blk,
  output logic        gtx_rx_slip,
  output logic        rx_locked,
  // GTX transmit side (to the fibre)
  input  logic        gtx_tx_clk,
  input  logic        gtx_tx_rst,
  output blk66_t      gtx_tx_blk,
  // PHY transmit side: frames for the two channels
  input  logic        phy_tx_clk,
  input  logic        phy_tx_rst,
  input  logic [1:0]  ch_en,
  input  logic        frame_start,
  output logic        ch_tx_valid,
  output logic        ch_tx_sof,
  output logic        ch_tx_pad,
  output blk66_t      ch_tx_blk [2],
  // PHY receive side: blocks recovered by the two channels
  input  logic        phy_rx_clk,
  input  logic        phy_rx_rst,
  input  logic [1:0]  ch_rx_valid,
  input  blk66_t      ch_rx_blk [2],
  // status
  output logic [31:0] idle_deleted,
  output logic [31:0] rx_fifo_overflow,
  output logic [31:0] tx_fifo_overflow,
  output logic [31:0] data_frames,
  output logic [31:0] pad_frames,
  output logic [31:0] pad_dropped [2],
  output logic [31:0] eth_rx_frames,
  output logic [31:0] eth_rx_fcs_err,
  output logic [31:0] eth_rx_framing_err,
  output logic [31:0] eth_tx_frames,
  output logic [31:0] eth_tx_fcs_err,
  output logic [31:0] eth_tx_framing_err
);
  // ---------------- fibre -> radio ----------------
  logic   dsc_valid;
  blk66_t dsc_blk;

  block_sync u_bsync (
    .clk(gtx_rx_clk), .rst(gtx_rx_rst), .in_valid(gtx_rx_valid), .in_blk(gtx_rx_blk),
    .slip(gtx_rx_slip), .locked(rx_locked)
  );

  eth_descrambler u_dsc (
    .clk(gtx_rx_clk), .rst(gtx_rx_rst), .in_valid(gtx_rx_valid), .in_blk(gtx_rx_blk),
    .out_valid(dsc_valid), .out_blk(dsc_blk)
  );

  logic              fifo_rd;
  blk66_t            fifo_rdata;
  logic [FIFO_AW:0]  fifo_level;

  rx_fifo #(.AW(FIFO_AW)) u_rx_fifo (
    .wclk(gtx_rx_clk), .wrst(gtx_rx_rst), .locked(rx_locked),
    .in_valid(dsc_valid), .in_blk(dsc_blk),
    .idle_deleted, .overflow(rx_fifo_overflow),
    .rclk(phy_tx_clk), .rrst(phy_tx_rst), .rd(fifo_rd), .rdata(fifo_rdata), .level(fifo_level)
  );

  split_phy_frame #(.AW(FIFO_AW), .NBLK(NBLK)) u_split (
    .clk(phy_tx_clk), .rst(phy_tx_rst), .frame_start, .ch_en,
    .fifo_level, .fifo_rdata, .fifo_rd,
    .out_valid(ch_tx_valid), .out_sof(ch_tx_sof), .out_pad(ch_tx_pad), .out_blk(ch_tx_blk),
    .data_frames, .pad_frames
  );

  traffic_monitor u_mon_rx (
    .clk(phy_tx_clk), .rst(phy_tx_rst), .in_valid(fifo_rd), .in_blk(fifo_rdata),
    .frames(eth_rx_frames), .fcs_errors(eth_rx_fcs_err), .framing_errors(eth_rx_framing_err)
  );

  // ---------------- radio -> fibre ----------------
  logic   mrg_valid;
  blk66_t mrg_blk;

  merge_phy_frame #(.AW(MERGE_AW)) u_merge (
    .clk(phy_rx_clk), .rst(phy_rx_rst), .ch_en, .in_valid(ch_rx_valid), .in_blk(ch_rx_blk),
    .out_valid(mrg_valid), .out_blk(mrg_blk), .pad_dropped, .overflow()
  );

  blk66_t tx_plain;
  logic   tx_fill;

  tx_fifo #(.AW(FIFO_AW)) u_tx_fifo (
    .wclk(phy_rx_clk), .wrst(phy_rx_rst), .in_valid(mrg_valid), .in_blk(mrg_blk),
    .overflow(tx_fifo_overflow),
    .rclk(gtx_tx_clk), .rrst(gtx_tx_rst), .out_blk(tx_plain), .out_is_fill(tx_fill)
  );

  traffic_monitor u_mon_tx (
    .clk(gtx_tx_clk), .rst(gtx_tx_rst), .in_valid(1'b1), .in_blk(tx_plain),
    .frames(eth_tx_frames), .fcs_errors(eth_tx_fcs_err), .framing_errors(eth_tx_framing_err)
  );

  logic scr_valid;
  eth_scrambler u_scr (
    .clk(gtx_tx_clk), .rst(gtx_tx_rst), .in_valid(1'b1), .in_blk(tx_plain),
    .out_valid(scr_valid), .out_blk(gtx_tx_blk)
  );
endmodule
