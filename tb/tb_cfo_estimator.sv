// tb_cfo_estimator: feeds correlation values P of random magnitude and
// angle (all four quadrants) and compares the CORDIC angle with $atan2
// computed here (tolerance 2^-16 turn), phase_inc with -angle/64, and the
// latency of AW + 2 = 26 clocks from start to done.
module tb_cfo_estimator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  logic signed [31:0] p_re, p_im;
  logic signed [23:0] angle, phase_inc;
  cfo_estimator dut (.*);

  localparam real PI = 3.14159265358979;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; p_re = 0; p_im = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 100; n++) begin
      real a, mag, got, err;
      int lat;
      a   = (real'($urandom % 100000) / 100000.0 - 0.5) * 2.0 * PI * 0.999;
      mag = 1000.0 + real'($urandom % 100000000);
      @(posedge clk);
      p_re  <= int'(mag * $cos(a));
      p_im  <= int'(mag * $sin(a));
      start <= 1;
      @(posedge clk); start <= 0;
      lat = 1;
      while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 26) begin failures++; $display("latency %0d", lat); end
      got = real'(angle) / 16777216.0 * 2.0 * PI;
      err = got - $atan2(real'(p_im), real'(p_re));
      if (err > PI) err -= 2.0 * PI;
      if (err < -PI) err += 2.0 * PI;
      checks++;
      if (err > 2.0 * PI / 65536.0 || err < -2.0 * PI / 65536.0) begin failures++; $display("angle error %f at %f", err, a); end
      checks++;
      if (phase_inc != -(angle >>> 6)) begin failures++; $display("phase_inc"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
