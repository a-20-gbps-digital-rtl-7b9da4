// tb_cfo_comp: samples of a constant phasor (700, 300) turned by a carrier
// offset of f cycles per sample are fed eight per clock after loading
// phase_inc = -f * 2^24. The output must be the untouched phasor within a few
// LSB (table quantisation). A second run with phase_inc = 0 must pass samples
// unchanged within 1 LSB. Also checks two clocks of latency.
module tb_cfo_comp;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, in_valid, out_valid;
  logic signed [23:0] phase_inc;
  cplx_t in_smp [SMP_PER_CLK], out_smp [SMP_PER_CLK];
  cfo_comp dut (.*);

  localparam real PI = 3.14159265358979;
  int vq [$];

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(real f, int tol);
    int n = 0;
    @(posedge clk);
    load <= 1; phase_inc <= 24'(int'(-f * 16777216.0)); in_valid <= 0;
    @(posedge clk); load <= 0;
    for (int c = 0; c < 300; c++) begin
      @(posedge clk);
      in_valid <= 1;
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        real a = 2.0 * PI * f * real'(n + j);
        in_smp[j].re <= SW'(int'(700.0 * $cos(a) - 300.0 * $sin(a)));
        in_smp[j].im <= SW'(int'(700.0 * $sin(a) + 300.0 * $cos(a)));
      end
      n += SMP_PER_CLK;
      if (c >= 2) begin
        #1;
        checks++;
        if (!out_valid) begin failures++; $display("latency"); end
        for (int j = 0; j < SMP_PER_CLK; j++) begin
          checks++;
          if (out_smp[j].re - 700 > tol || 700 - out_smp[j].re > tol || out_smp[j].im - 300 > tol || 300 - out_smp[j].im > tol) begin
            failures++; if (failures < 5) $display("f=%f clk %0d lane %0d: %0d,%0d", f, c, j, out_smp[j].re, out_smp[j].im);
          end
        end
      end
    end
    @(posedge clk); in_valid <= 0;
  endtask

  initial begin
    load = 0; in_valid = 0; phase_inc = 0;
    foreach (in_smp[j]) in_smp[j] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    run(0.0, 1);
    run(0.004, 6);
    run(-0.0071, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
