// tb_phase_track: builds symbol frames as the transmitter lays them out
// (pilot (1+j)s at every 28th symbol with the PN chips of the reference
// sequence, random 16QAM data in between, level unit 512), turns every data
// block (pilot plus its 27 symbols) by its own random phase of up to
// +/-0.3 rad (so that the turned outer points stay within 12 bits), and feeds six symbols per clock with sof on the first clock of
// each frame. The output must give back the untouched levels within 12 LSB,
// with pilot lanes flagged, one clock later. Two frames of 200 clocks are run.
module tb_phase_track;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_sof, out_valid;
  cplx_t in_sym [SYM_PER_CLK], out_sym [SYM_PER_CLK];
  logic [SYM_PER_CLK-1:0] out_pilot;
  phase_track dut (.*);

  bit chip [300];
  int er [SYM_PER_CLK], ei [SYM_PER_CLK];
  bit ep [SYM_PER_CLK];

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit r [7];
    real ph;
    foreach (r[i]) r[i] = 1;
    for (int n = 0; n < 300; n++) begin
      chip[n] = r[6] ^ r[3];
      for (int i = 6; i > 0; i--) r[i] = r[i-1];
      r[0] = chip[n];
    end
    in_valid = 0; in_sof = 0;
    foreach (in_sym[l]) in_sym[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
      for (int c = 0; c < 200; c++) begin
        @(posedge clk);
        in_valid <= 1;
        in_sof   <= c == 0;
        for (int l = 0; l < SYM_PER_CLK; l++) begin
          automatic int s = SYM_PER_CLK * c + l;
          int xr, xi;
          if (s % 28 == 0) begin
            ph = 0.6 * (real'($urandom % 1000) / 1000.0 - 0.5);
            xr = chip[s / 28] ? -512 : 512; xi = xr;
          end else begin
            xr = 512 * (2 * int'($urandom % 4) - 3);
            xi = 512 * (2 * int'($urandom % 4) - 3);
          end
          er[l] = xr; ei[l] = xi; ep[l] = (s % 28 == 0);
          in_sym[l].re <= SW'(int'(real'(xr) * $cos(ph) - real'(xi) * $sin(ph)));
          in_sym[l].im <= SW'(int'(real'(xr) * $sin(ph) + real'(xi) * $cos(ph)));
        end
        @(negedge clk);   // inputs settle; check at the following clock
        fork begin
          automatic int cr [SYM_PER_CLK] = er, ci [SYM_PER_CLK] = ei;
          automatic bit cp [SYM_PER_CLK] = ep;
          @(posedge clk); #1;
          checks++;
          if (!out_valid) failures++;
          for (int l = 0; l < SYM_PER_CLK; l++) begin
            checks++;
            if (out_sym[l].re - cr[l] > 12 || cr[l] - out_sym[l].re > 12 ||
                out_sym[l].im - ci[l] > 12 || ci[l] - out_sym[l].im > 12 || out_pilot[l] != cp[l]) begin
              failures++;
              if (failures < 6) $display("lane %0d got %0d,%0d exp %0d,%0d", l, out_sym[l].re, out_sym[l].im, cr[l], ci[l]);
            end
          end
        end join_none
      end
    end
    @(posedge clk); in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
