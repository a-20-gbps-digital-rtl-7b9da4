// tb_fine_timing: a sample stream of random 16QAM-like data carries
// preambles (the 64-sample training block twice) at sample offsets that are
// not multiples of 8, turned by a small carrier offset (0.0008 cycles per
// sample) with noise. For each preamble the testbench gives a coarse timing
// point off by a chosen error e from the preamble's last sample (e from -20
// to +20) and pulses start a few clocks later, as the coarse detector would.
// Checks: done comes within 700 clocks, offset equals -e and t_fine points
// at the preamble's last sample exactly.
module tb_fine_timing;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, start, done;
  cplx_t in_smp [SMP_PER_CLK];
  logic [31:0] t_coarse, t_fine;
  logic signed [6:0] offset;
  fine_timing dut (.*);

  localparam real PI = 3.14159265358979;
  localparam int NPRE = 16, GAP = 900;
  int pstart [NPRE], err [NPRE];

  function automatic cplx_t smp(int n);
    real xr, xi, a;
    cplx_t o;
    int k = -1;
    for (int p = 0; p < NPRE; p++) if (n >= pstart[p] && n < pstart[p] + 128) k = (n - pstart[p]) % 64;
    if (k >= 0) begin
      cplx_t q = preamble_sample(k);
      xr = real'(q.re); xi = real'(q.im);
    end else begin
      xr = 240.0 * real'(2 * int'($urandom % 4) - 3);
      xi = 240.0 * real'(2 * int'($urandom % 4) - 3);
    end
    a = 2.0 * PI * 0.0008 * real'(n);
    o.re = SW'(int'(xr * $cos(a) - xi * $sin(a)) + int'($urandom % 21) - 10);
    o.im = SW'(int'(xr * $sin(a) + xi * $cos(a)) + int'($urandom % 21) - 10);
    return o;
  endfunction

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int c = 0;
  // done is a one-clock pulse: latch it with its results
  int ndone = 0;
  logic [31:0] got_t;
  int got_off;
  always @(negedge clk) if (done) begin ndone++; got_t = t_fine; got_off = int'(offset); end
  initial begin
    int e [NPRE];
    int n0;
    e = '{0, 1, -1, 5, -7, 13, -20, 20, 3, -3, 2, -2, 9, -12, 17, -16};
    for (int p = 0; p < NPRE; p++) begin pstart[p] = 8 * (40 + GAP * p) + 3 * p; err[p] = e[p]; end
    in_valid = 0; start = 0; t_coarse = 0;
    foreach (in_smp[j]) in_smp[j] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    fork
      for (c = 0; c < NPRE * GAP + 200; c++) begin
        @(posedge clk);
        in_valid <= 1;
        for (int j = 0; j < SMP_PER_CLK; j++) in_smp[j] <= smp(SMP_PER_CLK * c + j);
      end
      for (int p = 0; p < NPRE; p++) begin
        int last, waited;
        last = pstart[p] + 127;
        wait (SMP_PER_CLK * c > last + 8 * 10);
        @(posedge clk);
        start <= 1; t_coarse <= 32'(last + err[p]); n0 = ndone;
        @(posedge clk);
        start <= 0;
        waited = 0;
        while (ndone == n0 && waited < 700) begin @(posedge clk); waited++; end
        #1;
        checks++;
        if (ndone == n0) begin failures++; $display("preamble %0d: no result", p); end
        else if (got_t != 32'(last) || got_off != -err[p]) begin
          failures++; $display("preamble %0d (error %0d): t_fine %0d expected %0d, offset %0d", p, err[p], got_t, last, got_off);
        end
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
