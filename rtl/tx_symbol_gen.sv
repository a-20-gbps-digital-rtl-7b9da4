// tx_symbol_gen: 16QAM modulation and pilot insertion for one band, six
// symbols per 312 MHz clock (1.875 GBd). The data symbols of a frame come in
// data blocks of one pilot followed by 27 data symbols (252 pilots for the
// 6804 symbols of 14 LDPC code blocks). A pilot is (1+j)s, where s = +1/-1 is
// the next chip of the PN sequence, restarted at each frame so the first
// pilot of a frame uses the first chip. Data symbols take four coded bits
// each, Gray mapped two bits per axis.
// Interface: while data_en is high, lane l of the output carries symbol
// 6*c+l of the frame's data part (c = clock count since the first data
// clock). nib_in[0..5] must hold the next six unused 4-bit groups of coded
// bits; take tells how many of them this clock consumed (5 or 6). start
// (one clock before the first data clock of a frame) resets the pilot
// position and the PN sequence. Output registered: one clock of latency.
// The pilot position at the head of each data block follows the frame
// figure; the bit-to-level mapping is this design's choice.
module tx_symbol_gen
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       data_en,
  input  logic [3:0] nib_in [SYM_PER_CLK],
  output logic [2:0] take,
  output logic       out_valid,
  output logic [SYM_PER_CLK-1:0] out_pilot,
  output sym_t       out_sym [SYM_PER_CLK]
);
  logic [4:0] pos;                     // index in the 28-symbol data block of lane 0
  logic       pn_code, pn_step;
  logic [SYM_PER_CLK-1:0] is_pil;
  sym_t       sym [SYM_PER_CLK];

  pn_gen u_pn (.clk, .rst, .restart(start), .step(pn_step), .code(pn_code));

  always_comb begin
    int n;
    n = 0;
    pn_step = 1'b0;
    for (int l = 0; l < SYM_PER_CLK; l++) begin
      is_pil[l] = ((int'(pos) + l) % SYM_PER_DBLK) == 0;
      if (is_pil[l]) begin
        // (1+j)s: level +1 (code 2) for s=+1, -1 (code 1) for s=-1
        sym[l].i = pn_code ? 2'd1 : 2'd2;
        sym[l].q = pn_code ? 2'd1 : 2'd2;
        pn_step  = data_en;
      end else begin
        sym[l] = qam16_map(nib_in[n]);
        n++;
      end
    end
    take = data_en ? 3'(n) : 3'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0; out_valid <= 1'b0; out_pilot <= '0;
      for (int l = 0; l < SYM_PER_CLK; l++) out_sym[l] <= '0;
    end else begin
      out_valid <= data_en;
      if (start) pos <= '0;
      else if (data_en) pos <= 5'((int'(pos) + SYM_PER_CLK) % SYM_PER_DBLK);
      if (data_en) begin
        out_pilot <= is_pil;
        out_sym   <= sym;
      end
    end
  end
endmodule
