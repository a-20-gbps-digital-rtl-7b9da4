// pn_gen: pseudo-noise code generator for the pilot signs. A 7-bit Fibonacci
// LFSR (x^7 + x^4 + 1, period 127) that restarts from its seed at the start
// of every PHY frame, since the sequence is not continued between frames.
// code is the current chip (combinational from the state); step advances to
// the next chip at the clock edge; restart reloads the seed and has priority.
// The design does not give the polynomial or seed: both are this design's
// choice (the polynomial is the one 802.11 uses for pilot polarity).
module pn_gen #(
  parameter logic [6:0] SEED = 7'h7F
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  input  logic step,
  output logic code
);
  logic [6:0] lfsr;
  assign code = lfsr[6] ^ lfsr[3];
  always_ff @(posedge clk) begin
    if (rst || restart) lfsr <= SEED;
    else if (step)      lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[3]};
  end
endmodule
