// tb_tx_band: runs one band's transmitter for three frames with random coded
// bits. Checks the frame timing (frame_start every 1192 clocks, dac_sof six
// clocks after it), the preamble (16 clocks of 8 samples: two equal 64-sample
// blocks of QPSK points +/-724 whose signs are successive bits of the
// x^7 + x^4 + 1 sequence from 7'h5A, generated here), 6804 coded nibbles
// taken per frame, and that the data part carries a live filtered signal.
module tb_tx_band;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start, dac_sof;
  logic [3:0] nib_in [SYM_PER_CLK];
  logic [2:0] take;
  cplx_t dac_smp [SMP_PER_CLK];
  tx_band dut (.*);

  int pre_re [128], pre_im [128];
  int t = 0, last_fs = -1, last_sof = -1, nfs = 0, nsof = 0, took = 0, pre_pos = -1, live = 0;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (!rst) begin
    foreach (nib_in[l]) nib_in[l] = 4'($urandom);
    if (frame_start) begin
      if (last_fs >= 0) begin
        checks++; if (t - last_fs != FRAME_CLKS) begin failures++; $display("frame period %0d", t - last_fs); end
        checks++; if (took != 6804) begin failures++; $display("took %0d nibbles", took); end
      end
      last_fs = t; nfs++; took = 0;
    end
    took += take;
    if (dac_sof) begin
      checks++; if (last_fs < 0 || t - last_fs != 6) begin failures++; $display("sof offset %0d", t - last_fs); end
      nsof++; pre_pos = 0;
    end
    if (pre_pos >= 0 && pre_pos < 16) begin
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        automatic int k = pre_pos * SMP_PER_CLK + j;
        checks++;
        if (dac_smp[j].re != pre_re[k % 64] || dac_smp[j].im != pre_im[k % 64]) begin
          failures++; if (failures < 5) $display("preamble sample %0d", k);
        end
      end
      pre_pos++;
    end else if (pre_pos >= 16 && dac_smp[0].re != dac_smp[1].re) live++;
    t++;
  end

  initial begin
    bit r [7];
    foreach (r[i]) r[i] = 1'((7'h5A >> (6 - i)) & 1);   // r[0] = bit 6 ... r[6] = bit 0
    // LFSR {r6..r0} = state[6:0]; chip = state[6] ^ state[3]; shift left
    for (int n = 0; n < 64; n++) begin
      bit b0, b1;
      b0 = r[0] ^ r[3]; for (int i = 0; i < 6; i++) r[i] = r[i+1]; r[6] = b0;
      b1 = r[0] ^ r[3]; for (int i = 0; i < 6; i++) r[i] = r[i+1]; r[6] = b1;
      pre_re[n] = b0 ? -724 : 724;
      pre_im[n] = b1 ? -724 : 724;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3 * FRAME_CLKS + 30) @(posedge clk);
    checks++; if (nfs != 4 || nsof != 4) begin failures++; $display("frames %0d sofs %0d", nfs, nsof); end
    checks++; if (live < 1000) begin failures++; $display("data part not live %0d", live); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
