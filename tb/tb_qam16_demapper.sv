// tb_qam16_demapper: random received values per axis over the whole range
// (and exact 16QAM points) are demapped; each soft value is compared with the
// formula evaluated here (first bit y/64, second bit (1024 - |y|)/64, floored,
// saturated to +/-31), and for exact constellation points the signs must give
// back the Gray-coded bits. Checks one clock of latency and the pilot flags.
module tb_qam16_demapper;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  logic [SYM_PER_CLK-1:0] in_pilot, out_pilot;
  cplx_t in_sym [SYM_PER_CLK];
  logic signed [5:0] out_llr [SYM_PER_CLK][4];
  qam16_demapper dut (.*);

  function automatic int fl(int v);   // floor division by 64, saturate
    int q = (v >= 0) ? v / 64 : -((-v + 63) / 64);
    if (q > 31) q = 31;
    if (q < -31) q = -31;
    return q;
  endfunction

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int yr [SYM_PER_CLK], yi [SYM_PER_CLK];
    bit exact;
    logic [SYM_PER_CLK-1:0] pil;
    in_valid = 0; in_pilot = 0;
    foreach (in_sym[l]) in_sym[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      exact = n % 2;
      pil = SYM_PER_CLK'($urandom);
      for (int l = 0; l < SYM_PER_CLK; l++) begin
        if (exact) begin
          yr[l] = 512 * (2 * int'($urandom % 4) - 3);
          yi[l] = 512 * (2 * int'($urandom % 4) - 3);
        end else begin
          yr[l] = int'($urandom % 4095) - 2047;
          yi[l] = int'($urandom % 4095) - 2047;
        end
      end
      @(posedge clk);
      in_valid <= 1; in_pilot <= pil;
      for (int l = 0; l < SYM_PER_CLK; l++) begin in_sym[l].re <= SW'(yr[l]); in_sym[l].im <= SW'(yi[l]); end
      @(posedge clk); #1;
      in_valid <= 0;
      checks++;
      if (!out_valid || out_pilot != pil) failures++;
      for (int l = 0; l < SYM_PER_CLK; l++) begin
        int e [4];
        e[0] = fl(yr[l]); e[1] = fl(1024 - (yr[l] < 0 ? -yr[l] : yr[l]));
        e[2] = fl(yi[l]); e[3] = fl(1024 - (yi[l] < 0 ? -yi[l] : yi[l]));
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (int'(out_llr[l][b]) != e[b]) begin failures++; if (failures < 5) $display("y=%0d,%0d bit %0d got %0d exp %0d", yr[l], yi[l], b, out_llr[l][b], e[b]); end
        end
        if (exact) begin
          // Gray bits of the level: -3:00 -1:01 +1:11 +3:10
          int a;
          a = yr[l] / 512;
          checks++;
          if ((out_llr[l][0] > 0) != (a > 0) || (out_llr[l][1] > 0) != (a == 1 || a == -1)) begin failures++; if (failures < 5) $display("hard bits wrong y=%0d a=%0d l0=%0d l1=%0d", yr[l], a, out_llr[l][0], out_llr[l][1]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
