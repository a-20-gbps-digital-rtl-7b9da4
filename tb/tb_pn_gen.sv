// tb_pn_gen: checks the pilot PN generator against the recurrence
// c(n) = c(n-7) xor c(n-4) ... written here as the sequence of an independent
// 7-stage register, its period (127), the restart to the first chip, and
// that step low holds the chip.
module tb_pn_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic restart, step, code;
  pn_gen dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit seq [300];
    bit r [7];
    // reference: r[0] newest .. r[6] oldest; chip = oldest xor 4th oldest
    foreach (r[k]) r[k] = 1;
    for (int n = 0; n < 300; n++) begin
      seq[n] = r[6] ^ r[3];
      for (int k = 6; k > 0; k--) r[k] = r[k-1];
      r[0] = seq[n];
    end
    restart = 0; step = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    begin
      int idx = 0;
      for (int n = 0; n < 300 && idx < 250; n++) begin
        step <= ($urandom % 4) != 0;
        #1; checks++;
        if (code != seq[idx]) begin failures++; if (failures < 5) $display("chip %0d wrong", idx); end
        @(posedge clk);
        if (step) idx++;
      end
    end
    // period
    checks++; for (int n = 0; n < 127; n++) if (seq[n] != seq[n + 127]) begin failures++; break; end
    // restart
    @(posedge clk); restart <= 1; @(posedge clk); restart <= 0; step <= 0; #1;
    checks++; if (code != seq[0]) begin failures++; $display("restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
