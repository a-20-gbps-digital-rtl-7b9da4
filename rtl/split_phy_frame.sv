// split_phy_frame: divides the Ethernet block stream coming out of the RX
// FIFO between the two PHY channels of a baseband platform, in fixed-length
// PHY frames of FRAME_BLKS 66-bit blocks (309 blocks = 20394 of the 20412
// user bits a frame carries). Both channels share one frame clock, so frames
// are sent in pairs: block k of a frame goes to channel 0 and the next FIFO
// block to channel 1 (load balancing). At frame_start the splitter decides
// for the whole pair: if the FIFO already holds a full pair (or a full frame
// when one channel is disabled) it sends a data frame, otherwise a padding
// frame made entirely of idle blocks, so a padding frame is filled as a whole.
// A disabled channel always gets padding. So that the last blocks of a
// burst are not held back indefinitely, traffic that has waited through
// FLUSH_FRAMES padding frames is sent in a data frame anyway; the places the
// FIFO cannot fill carry idle blocks (the RX FIFO answers an empty read with
// one), which the receiver drops like padding. If such a frame ends with a
// block on channel 0 and none for channel 1, channel 1 carries the filler
// block instead, so both channels always carry the same number of traffic
// blocks and the merger's alternation stays in step. Timing: after frame_start, one
// block pair every two clocks (one FIFO read per clock), out_valid marks a
// pair, out_sof the first pair of a frame, out_pad a padding pair.
// The pairing, the fill rule and the flush are this design's choices.
module split_phy_frame
  import modem_pkg::*;
#(
  parameter int AW    = 10,
  parameter int NBLK  = FRAME_BLKS,
  parameter int FLUSH_FRAMES = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        frame_start,
  input  logic [1:0]  ch_en,
  input  logic [AW:0] fifo_level,
  input  blk66_t      fifo_rdata,
  output logic        fifo_rd,
  output logic        out_valid,
  output logic        out_sof,
  output logic        out_pad,
  output blk66_t      out_blk [2],
  output logic [31:0] data_frames,
  output logic [31:0] pad_frames
);
  logic active, data_mode, phase, first;
  logic [$clog2(NBLK+1)-1:0] idx;
  blk66_t b0;
  logic [AW+1:0] need;
  logic [$clog2(FLUSH_FRAMES+1)-1:0] waited;
  logic go;

  assign need    = (ch_en == 2'b11) ? (AW+2)'(2*NBLK) : (AW+2)'(NBLK);
  assign fifo_rd = active && data_mode && ch_en[phase];
  assign go      = (ch_en != 2'b00) &&
                   (({1'b0, fifo_level} >= need) || (fifo_level != '0 && 32'(waited) >= FLUSH_FRAMES));

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; data_mode <= 1'b0; phase <= 1'b0; first <= 1'b0; idx <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_pad <= 1'b0;
      out_blk[0] <= IDLE_BLK; out_blk[1] <= IDLE_BLK; b0 <= IDLE_BLK;
      data_frames <= '0; pad_frames <= '0; waited <= '0;
    end else begin
      out_valid <= 1'b0;
      if (frame_start) begin
        active    <= 1'b1;
        phase     <= 1'b0;
        first     <= 1'b1;
        idx       <= '0;
        data_mode <= go;
        if (go) begin
          data_frames <= data_frames + 1;
          waited      <= '0;
        end else begin
          pad_frames  <= pad_frames + 1;
          if (fifo_level != '0 && 32'(waited) < FLUSH_FRAMES) waited <= waited + 1'b1;
        end
      end else if (active) begin
        phase <= ~phase;
        if (!phase) begin
          b0 <= (data_mode && ch_en[0]) ? fifo_rdata : IDLE_BLK;
        end else begin
          out_valid  <= 1'b1;
          out_sof    <= first;
          out_pad    <= !data_mode;
          out_blk[0] <= b0;
          if (!(data_mode && ch_en[1]))                      out_blk[1] <= IDLE_BLK;
          else if (ch_en[0] && is_idle(fifo_rdata) && !is_idle(b0)) out_blk[1] <= FILL_BLK;
          else                                               out_blk[1] <= fifo_rdata;
          first      <= 1'b0;
          if (idx == NBLK - 1) active <= 1'b0;
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
