// eth_scrambler: 10GBASE-R self-synchronous scrambler (1 + x^39 + x^58)
// applied to the 64 payload bits of each 66-bit block on its way to the GTX
// transmitter; the sync header passes unscrambled. Bit 0 of the payload is
// scrambled first. One block per clock when in_valid is high; the result is
// registered (one clock of latency). The polynomial is the standard Ethernet
// PCS one: the design only says the Ethernet PCS is standard.
module eth_scrambler
  import modem_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  blk66_t in_blk,
  output logic   out_valid,
  output blk66_t out_blk
);
  logic [57:0] state;       // last 58 scrambled bits, state[0] most recent
  logic [63:0] scr;
  logic [57:0] nstate;

  always_comb begin
    logic [121:0] hist;     // hist[57:0] = old state (bit 57 oldest), then new bits
    for (int i = 0; i < 58; i++) hist[i] = state[57-i];
    for (int i = 0; i < 64; i++) begin
      hist[58+i] = in_blk.data[i] ^ hist[58+i-39] ^ hist[58+i-58];
      scr[i]     = hist[58+i];
    end
    for (int i = 0; i < 58; i++) nstate[i] = hist[121-i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= '1;
      out_valid <= 1'b0;
      out_blk   <= IDLE_BLK;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state   <= nstate;
        out_blk <= '{hdr: in_blk.hdr, data: scr};
      end
    end
  end
endmodule
