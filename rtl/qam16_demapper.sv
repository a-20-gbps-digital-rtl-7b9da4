// qam16_demapper: soft demapping of 16QAM symbols for the LDPC decoder, six
// symbols per clock. Per axis, with A the +/-1 level and the Gray mapping
// 00:-3, 01:-1, 11:+1, 10:+3 (first bit, second bit):
//   first bit  LLR ~ y           (positive: the level is positive)
//   second bit LLR ~ 2A - |y|    (positive: an inner level)
// which is the max-log LLR up to a common scale. Values are scaled so that
// one level unit A maps to 2^(LW-3) and saturated to LW bits; a positive
// value favours bit 1. Pilot lanes are flagged through so the decoder buffer
// can skip them. Registered, one clock of latency. The design only names
// this block; the approximation and widths are this design's choices.
module qam16_demapper
  import modem_pkg::*;
#(
  parameter int LW = 6
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic [SYM_PER_CLK-1:0] in_pilot,
  input  cplx_t in_sym [SYM_PER_CLK],
  output logic  out_valid,
  output logic [SYM_PER_CLK-1:0] out_pilot,
  output logic signed [LW-1:0] out_llr [SYM_PER_CLK][4]   // [0] first bit .. [3] last
);
  localparam int SH   = RX_UNIT_LOG2 - (LW - 3);
  localparam int LMAX = 2 ** (LW - 1) - 1;

  function automatic logic signed [LW-1:0] sat(logic signed [SW+1:0] v);
    logic signed [SW+1:0] s = v >>> SH;
    if (s >  LMAX) return LW'(LMAX);
    if (s < -LMAX) return LW'(-LMAX);
    return LW'(s);
  endfunction

  function automatic logic signed [SW+1:0] inner(logic signed [SW-1:0] y);
    logic signed [SW+1:0] a = (y < 0) ? -(SW+2)'(y) : (SW+2)'(y);
    return (SW+2)'(2 ** (RX_UNIT_LOG2 + 1)) - a;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_pilot <= '0;
      for (int l = 0; l < SYM_PER_CLK; l++)
        for (int b = 0; b < 4; b++) out_llr[l][b] <= '0;
    end else begin
      out_valid <= in_valid;
      out_pilot <= in_pilot;
      for (int l = 0; l < SYM_PER_CLK; l++) begin
        out_llr[l][0] <= sat((SW+2)'(in_sym[l].re));
        out_llr[l][1] <= sat(inner(in_sym[l].re));
        out_llr[l][2] <= sat((SW+2)'(in_sym[l].im));
        out_llr[l][3] <= sat(inner(in_sym[l].im));
      end
    end
  end
endmodule
