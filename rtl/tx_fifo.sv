// tx_fifo: the FIFO from the PHY receiver (A/D clock, 312 MHz) to the 10GbE
// transmitter (GTX tx clock, 156 MHz). The PHY side writes only valid
// traffic blocks; the GTX side takes one block every clock and gets an idle
// block whenever the FIFO is empty (idle insertion), which turns the bursty
// PHY output into the continuous 66-bit stream the GTX needs. out_blk is
// registered: one clock after the cycle it is taken. Depth is this design's
// choice; writes into a full FIFO are dropped and counted.
module tx_fifo
  import modem_pkg::*;
#(
  parameter int AW = 10
) (
  input  logic        wclk,
  input  logic        wrst,
  input  logic        in_valid,
  input  blk66_t      in_blk,
  output logic [31:0] overflow,
  input  logic        rclk,
  input  logic        rrst,
  output blk66_t      out_blk,
  output logic        out_is_fill   // the block on out_blk is an inserted idle
);
  logic wfull, rempty, rd;
  logic [AW:0] wlevel, rlevel;
  blk66_t head;

  async_fifo #(.W(66), .AW(AW)) u_fifo (
    .wclk, .wrst, .wr(in_valid), .wdata(in_blk), .wfull, .wlevel,
    .rclk, .rrst, .rd, .rdata(head), .rempty, .rlevel
  );

  // complete frames: terminate blocks written (Gray coded) against read
  logic [AW:0] term_w, term_w_gray, term_g1, term_g2, term_r, term_w_r;
  always_ff @(posedge wclk) begin
    if (wrst) begin
      term_w <= '0; term_w_gray <= '0;
    end else if (in_valid && !wfull && is_term(in_blk)) begin
      term_w      <= term_w + 1'b1;
      term_w_gray <= (term_w + 1'b1) ^ ((term_w + 1'b1) >> 1);
    end
  end
  always_comb begin
    term_w_r = '0;
    for (int i = AW; i >= 0; i--) term_w_r[i] = (i == AW) ? term_g2[i] : (term_w_r[i+1] ^ term_g2[i]);
  end

  logic in_frame;
  assign rd = !rempty && (in_frame || !is_start(head) || term_w_r != term_r);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      out_blk <= IDLE_BLK; out_is_fill <= 1'b1;
      term_g1 <= '0; term_g2 <= '0; term_r <= '0; in_frame <= 1'b0;
    end else begin
      term_g1     <= term_w_gray;
      term_g2     <= term_g1;
      out_blk     <= rd ? head : IDLE_BLK;
      out_is_fill <= !rd;
      if (rd && is_start(head)) in_frame <= 1'b1;
      if (rd && is_term(head)) begin
        in_frame <= 1'b0;
        term_r   <= term_r + 1'b1;
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wrst) overflow <= '0;
    else if (in_valid && wfull) overflow <= overflow + 1;
  end
endmodule
