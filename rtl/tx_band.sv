// tx_band: the transmitter of one band (one 2.5 GHz baseband channel). A
// frame counter runs over the 1192 clocks of a PHY frame: 16 clocks of
// preamble (two identical 64-sample blocks, 8 samples per clock) followed by
// 1176 data clocks of six symbols each. During the data clocks the symbol
// generator maps coded bits to 16QAM and inserts the PN-coded pilots; the
// symbols go through the SRC / RRC pulse-shaping filter; the preamble is
// added at the filter output, at sample rate, and the result is the 8-sample
// per clock stream for the D/A converter.
// frame_start pulses at clock 0 of every frame, so the Ethernet splitter can
// begin gathering the next frame's blocks. The coded bit interface
// (nib_in/take) is that of tx_symbol_gen. dac_sof marks the clock carrying
// the first preamble samples; the output is six clocks behind the frame
// counter (one for symbol generation, four for the filter, one for the
// output register), so dac_sof comes six clocks after frame_start.
// The frame layout follows the design; the preamble content is this design's.
module tx_band
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output logic       frame_start,
  input  logic [3:0] nib_in [SYM_PER_CLK],
  output logic [2:0] take,
  output logic       dac_sof,
  output cplx_t      dac_smp [SMP_PER_CLK]
);
  localparam int LAT = 5;
  logic [$clog2(FRAME_CLKS)-1:0] cnt, ocnt;
  logic        data_en, start;
  logic        sym_valid;
  sym_t        sym [SYM_PER_CLK];
  cplx_t       filt [SMP_PER_CLK];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      ocnt <= ($clog2(FRAME_CLKS))'(FRAME_CLKS - LAT);
    end else begin
      cnt  <= (32'(cnt)  == FRAME_CLKS - 1) ? '0 : cnt + 1'b1;
      ocnt <= (32'(ocnt) == FRAME_CLKS - 1) ? '0 : ocnt + 1'b1;
    end
  end

  assign frame_start = !rst && cnt == '0;
  assign start       = 32'(cnt) == PRE_CLKS - 1;
  assign data_en     = 32'(cnt) >= PRE_CLKS;

  tx_symbol_gen u_sym (
    .clk, .rst, .start, .data_en, .nib_in, .take,
    .out_valid(sym_valid), .out_pilot(), .out_sym(sym)
  );

  tx_filter u_filt (
    .clk, .rst, .in_valid(sym_valid), .in_sym(sym), .out_valid(), .out_smp(filt)
  );

  // preamble table: samples of output clock k (k = 0..15), computed at elaboration
  cplx_t pre_rom [PRE_CLKS][SMP_PER_CLK];
  for (genvar k = 0; k < PRE_CLKS; k++) begin : g_pre_k
    for (genvar j = 0; j < SMP_PER_CLK; j++) begin : g_pre_j
      localparam cplx_t P = preamble_sample(k * SMP_PER_CLK + j);
      assign pre_rom[k][j] = P;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_sof <= 1'b0;
      for (int j = 0; j < SMP_PER_CLK; j++) dac_smp[j] <= '0;
    end else begin
      dac_sof <= ocnt == 0;
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        if (32'(ocnt) < PRE_CLKS) dac_smp[j] <= pre_rom[ocnt[3:0]][j];
        else                 dac_smp[j] <= filt[j];
      end
    end
  end
endmodule
