// eth_descrambler: 10GBASE-R self-synchronous descrambler (1 + x^39 + x^58)
// for the payload of blocks received from the GTX. Idle blocks can only be
// recognised (and deleted) after descrambling. Because the descrambler feeds
// back the received bits, it locks by itself after 58 bits, whatever its
// start state. One block per clock on in_valid, one clock of latency.
module eth_descrambler
  import modem_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  blk66_t in_blk,
  output logic   out_valid,
  output blk66_t out_blk
);
  logic [57:0] state;       // last 58 received (scrambled) bits, state[0] most recent
  logic [63:0] dsc;
  logic [57:0] nstate;

  always_comb begin
    logic [121:0] hist;
    for (int i = 0; i < 58; i++) hist[i] = state[57-i];
    for (int i = 0; i < 64; i++) begin
      hist[58+i] = in_blk.data[i];
      dsc[i]     = in_blk.data[i] ^ hist[58+i-39] ^ hist[58+i-58];
    end
    for (int i = 0; i < 58; i++) nstate[i] = hist[121-i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_blk   <= IDLE_BLK;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state   <= nstate;
        out_blk <= '{hdr: in_blk.hdr, data: dsc};
      end
    end
  end
endmodule
