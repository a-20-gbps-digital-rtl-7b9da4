// tb_coarse_sync: a sample stream of random 16QAM-like data carries two
// preambles (the two-block, 64-sample training sequence) at sample offsets
// that are not multiples of 8, all turned by a carrier offset of 0.002
// cycles per sample (5 MHz at 2.5 GS/s) plus small noise. Checks that each
// preamble is found exactly once, that the timing points at the preamble's
// last sample (within one sample), and that the angle of the reported
// correlation is 2*pi*0.002*64 within 0.02 rad. No detection may occur on
// data alone.
module tb_coarse_sync;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, found;
  cplx_t in_smp [SMP_PER_CLK];
  logic [31:0] timing, detections;
  logic signed [31:0] peak_re, peak_im;
  coarse_sync dut (.*);

  localparam real PI = 3.14159265358979;
  localparam real CFO = 0.002;
  localparam int NCLK = 2600;
  int P1 = 8 * 300 + 3, P2 = 8 * 1700 + 5;
  int pre_re [64], pre_im [64];
  int nfound = 0;

  function automatic int noise();
    return int'($urandom % 21) - 10;
  endfunction

  function automatic cplx_t smp(int n);
    real xr, xi, c, s, a;
    cplx_t o;
    int k = -1;
    if (n >= P1 && n < P1 + 128) k = (n - P1) % 64;
    if (n >= P2 && n < P2 + 128) k = (n - P2) % 64;
    if (k >= 0) begin xr = pre_re[k]; xi = pre_im[k]; end
    else begin
      xr = 240.0 * real'(2 * int'($urandom % 4) - 3);
      xi = 240.0 * real'(2 * int'($urandom % 4) - 3);
    end
    a = 2.0 * PI * CFO * real'(n);
    c = $cos(a); s = $sin(a);
    o.re = SW'(int'(xr * c - xi * s) + noise());
    o.im = SW'(int'(xr * s + xi * c) + noise());
    return o;
  endfunction

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (found) begin
    real ang, want;
    int exp_t;
    nfound++;
    exp_t = (nfound == 1) ? P1 + 127 : P2 + 127;
    checks++;
    if (int'(timing) < exp_t - 1 || int'(timing) > exp_t + 1) begin failures++; $display("timing %0d expected %0d", timing, exp_t); end
    ang  = $atan2(real'(peak_im), real'(peak_re));
    want = 2.0 * PI * CFO * 64.0;
    checks++;
    if (ang - want > 0.02 || want - ang > 0.02) begin failures++; $display("angle %f expected %f", ang, want); end
  end

  initial begin
    bit r [7];
    foreach (r[i]) r[i] = 1'((7'h5A >> (6 - i)) & 1);
    for (int n = 0; n < 64; n++) begin
      bit b0, b1;
      b0 = r[0] ^ r[3]; for (int i = 0; i < 6; i++) r[i] = r[i+1]; r[6] = b0;
      b1 = r[0] ^ r[3]; for (int i = 0; i < 6; i++) r[i] = r[i+1]; r[6] = b1;
      pre_re[n] = b0 ? -724 : 724;
      pre_im[n] = b1 ? -724 : 724;
    end
    in_valid = 0;
    foreach (in_smp[j]) in_smp[j] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < NCLK; c++) begin
      @(posedge clk);
      in_valid <= 1;
      for (int j = 0; j < SMP_PER_CLK; j++) in_smp[j] <= smp(SMP_PER_CLK * c + j);
    end
    @(posedge clk); in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++; if (nfound != 2 || detections != 2) begin failures++; $display("found %0d preambles", nfound); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
