// rx_fifo: the FIFO from the 10GbE receiver (GTX rx clock, 156 MHz) to the
// PHY transmitter (D/A clock, 312 MHz). Idle blocks are deleted on the write
// side so that buffer space holds only traffic; only blocks received while
// block lock holds are written. The PHY side reads whenever it needs a block:
// an empty FIFO answers with an idle block (idle insertion), so the PHY can
// read at its own constant rate. rdata is valid in the cycle rd is high
// (first-word-fall-through). level tells the frame splitter how many blocks
// are waiting. Deleted idles and blocks lost to overflow are counted. The
// depth is this design's choice.
module rx_fifo
  import modem_pkg::*;
#(
  parameter int AW = 10
) (
  input  logic        wclk,
  input  logic        wrst,
  input  logic        locked,
  input  logic        in_valid,
  input  blk66_t      in_blk,
  output logic [31:0] idle_deleted,
  output logic [31:0] overflow,
  input  logic        rclk,
  input  logic        rrst,
  input  logic        rd,
  output blk66_t      rdata,
  output logic [AW:0] level
);
  logic wr, wfull, rempty;
  logic [AW:0] wlevel;
  blk66_t head;

  assign wr = in_valid && locked && !is_idle(in_blk);

  async_fifo #(.W(66), .AW(AW)) u_fifo (
    .wclk, .wrst, .wr, .wdata(in_blk), .wfull, .wlevel,
    .rclk, .rrst, .rd, .rdata(head), .rempty, .rlevel(level)
  );

  assign rdata = rempty ? IDLE_BLK : head;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      idle_deleted <= '0; overflow <= '0;
    end else if (in_valid && locked) begin
      if (is_idle(in_blk)) idle_deleted <= idle_deleted + 1;
      else if (wfull)      overflow     <= overflow + 1;
    end
  end
endmodule
