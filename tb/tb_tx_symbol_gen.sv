// tb_tx_symbol_gen: runs two whole frames (1176 data clocks each). The coded
// bit source is a numbered nibble stream: nibble k = (7k + 3) mod 16, and the
// testbench advances it by take after each clock. Each output lane is checked
// against the frame layout worked out here: symbol s of the frame is a pilot
// when s mod 28 = 0, carrying (1+j)s with s = +1 for PN chip 0 and -1 for
// chip 1 (chip n of the reference x^7+x^4+1 sequence for pilot n), otherwise
// data nibble s - s/28 - 1 Gray mapped per axis (00:-3 01:-1 11:+1 10:+3).
// Also checks 6804 nibbles and 252 pilots per frame, one clock of latency.
module tb_tx_symbol_gen;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, data_en, out_valid;
  logic [3:0] nib_in [SYM_PER_CLK];
  logic [2:0] take;
  logic [SYM_PER_CLK-1:0] out_pilot;
  sym_t out_sym [SYM_PER_CLK];
  tx_symbol_gen dut (.*);

  bit chip [300];
  int k = 0;
  function automatic int amp_of(logic b0, logic b1);
    case ({b0, b1}) 2'b00: return -3; 2'b01: return -1; 2'b11: return 1; default: return 3; endcase
  endfunction

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit r [7];
    int frame_nib, pilots, base;
    foreach (r[i]) r[i] = 1;
    for (int n = 0; n < 300; n++) begin
      chip[n] = r[6] ^ r[3];
      for (int i = 6; i > 0; i--) r[i] = r[i-1];
      r[0] = chip[n];
    end
    start = 0; data_en = 0;
    foreach (nib_in[l]) nib_in[l] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
      @(posedge clk); start <= 1; data_en <= 0;
      @(posedge clk); start <= 0;
      frame_nib = 0; pilots = 0; base = k;
      for (int c = 0; c < DATA_CLKS; c++) begin
        data_en <= 1;
        for (int l = 0; l < SYM_PER_CLK; l++) nib_in[l] <= 4'((7 * (k + l) + 3) % 16);
        @(negedge clk);
        k += take; frame_nib += take;
        @(posedge clk); #1;
        // outputs of this clock's symbols
        checks++;
        if (!out_valid) failures++;
        for (int l = 0; l < SYM_PER_CLK; l++) begin
          automatic int s = SYM_PER_CLK * c + l;
          int ei, eq;
          if (s % 28 == 0) begin
            ei = chip[s / 28] ? -1 : 1; eq = ei;
            pilots++;
          end else begin
            automatic int d = s - s / 28 - 1;
            automatic logic [3:0] nb = 4'((7 * (base + d) + 3) % 16);
            ei = amp_of(nb[3], nb[2]); eq = amp_of(nb[1], nb[0]);
          end
          checks++;
          if (lvl2amp(out_sym[l].i) != ei || lvl2amp(out_sym[l].q) != eq || out_pilot[l] != (s % 28 == 0)) begin
            failures++;
            if (failures < 5) $display("frame %0d symbol %0d: got %0d,%0d exp %0d,%0d", f, s, lvl2amp(out_sym[l].i), lvl2amp(out_sym[l].q), ei, eq);
          end
        end
      end
      data_en <= 0;
      checks++; if (frame_nib != 6804) begin failures++; $display("nibbles per frame %0d", frame_nib); end
      checks++; if (pilots != 252) begin failures++; $display("pilots per frame %0d", pilots); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
