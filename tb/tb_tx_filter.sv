// tb_tx_filter: random 16QAM symbols, six per clock, are fed for 60 clocks
// with valid gaps. The reference works on the sample grid: output sample m
// lies at t = 3m/4 symbol periods and equals
//   sum_{i=0..7} a(floor(t) - i) * round(256 * h(t - floor(t) + i - 4))
// with h the root-raised-cosine pulse (roll-off 0.25) evaluated here, and
// a(n) = +1 for symbols before the first (the reset history). Checks every
// sample exactly, that out_valid follows in_valid by four clocks, and the
// rate of 8 samples per 6 symbols.
module tb_tx_filter;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  sym_t in_sym [SYM_PER_CLK];
  cplx_t out_smp [SMP_PER_CLK];
  tx_filter dut (.*);

  localparam real PI = 3.14159265358979;
  function automatic real h(real t);
    real a = 0.25, den;
    if (t == 0.0) return 1.0 - a + 4.0 * a / PI;
    if (t == 1.0 || t == -1.0)   // t = +/- 1/(4a)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    den = PI * t * (1.0 - 16.0 * a * a * t * t);
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) / den;
  endfunction
  function automatic int c_of(int p, int i);
    real v = 256.0 * h(real'(p) / 4.0 + real'(i) - 4.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  int ai [$], aq [$];     // symbols in order
  int vin [$];            // in_valid history per clock
  function automatic int amp(int q [$], int n);
    return (n < 0) ? 1 : q[n];
  endfunction

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nout = 0;
  always @(negedge clk) if (!rst) begin
    vin.push_back(int'(in_valid));
    if (vin.size() > 4) begin
      checks++;
      if (out_valid != vin[vin.size() - 5]) begin failures++; $display("valid latency"); end
    end
    if (out_valid) begin
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        automatic int m = SMP_PER_CLK * nout + j;
        automatic int base = (3 * m) / 4, p = (3 * m) % 4;
        automatic int ei = 0, eq = 0;
        for (int i = 0; i < 8; i++) begin
          ei += amp(ai, base - i) * c_of(p, i);
          eq += amp(aq, base - i) * c_of(p, i);
        end
        if (ei > 2047) ei = 2047; if (ei < -2047) ei = -2047;
        if (eq > 2047) eq = 2047; if (eq < -2047) eq = -2047;
        checks++;
        if (int'(out_smp[j].re) != ei || int'(out_smp[j].im) != eq) begin
          failures++;
          if (failures < 5) $display("sample %0d got %0d,%0d exp %0d,%0d", m, out_smp[j].re, out_smp[j].im, ei, eq);
        end
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0;
    foreach (in_sym[l]) in_sym[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 60; c++) begin
      @(posedge clk);
      in_valid <= (c % 7) != 5;
      for (int l = 0; l < SYM_PER_CLK; l++) begin
        in_sym[l].i <= 2'($urandom);
        in_sym[l].q <= 2'($urandom);
      end
      #1;
      if (in_valid)
        for (int l = 0; l < SYM_PER_CLK; l++) begin
          ai.push_back(lvl2amp(in_sym[l].i));
          aq.push_back(lvl2amp(in_sym[l].q));
        end
    end
    @(posedge clk); in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++; if (nout * SMP_PER_CLK * 6 != ai.size() * 8) begin failures++; $display("rate %0d outputs for %0d symbols", nout, ai.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
