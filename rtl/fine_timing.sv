// fine_timing: fine timing of one band by cross-correlating the received
// preamble with the known training block in the frequency domain.
// While idle, the last HIST_CLKS clocks of A/D samples are kept in a history
// buffer. start (the coarse detection) freezes it; the N = 64 samples ending
// at the coarse timing point t_coarse (the second training block, if the
// coarse point is right) are loaded in bit-reversed order and transformed by
// a radix-2 decimation-in-time FFT, one butterfly per clock (each stage
// halves the values, so nothing overflows). Each bin is multiplied by the
// conjugate spectrum of the training block (a constant table computed at
// elaboration from the preamble definition), and the same butterfly engine
// with conjugate twiddles transforms the product back: that is the circular
// cross-correlation c[d]. Its largest |re| + |im| at lag d says the
// training block ends d samples after t_coarse (d < N/2) or N - d samples
// before it, so t_fine = t_coarse + d (or + d - N). Sample indices count
// in_valid samples since reset, as in coarse_sync.
// Timing: 64 load clocks, 192 FFT clocks, 64 multiply clocks, 192 inverse
// FFT clocks and 64 peak-search clocks: done pulses about 580 clocks after
// start, well within a frame. A start while busy is ignored.
// Taking a segment backwards from the coarse point, correlating it with the
// training sequence in the frequency domain and reading the distance to the
// end of the training sequence from the peak follow the design; the segment
// length, the sequential FFT and all widths are this design's choices.
module fine_timing
  import modem_pkg::*;
#(
  parameter int HIST_CLKS = 32,
  parameter int DW        = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_smp [SMP_PER_CLK],
  input  logic        start,
  input  logic [31:0] t_coarse,
  output logic        done,
  output logic [31:0] t_fine,
  output logic signed [6:0] offset
);
  localparam int N    = PRE_LEN;
  localparam int LOGN = $clog2(N);
  localparam int HB   = $clog2(HIST_CLKS);
  localparam int TWB  = 14;                 // twiddle scale 2^14
  localparam real PI  = 3.14159265358979;

  // ---------------- constant tables ----------------
  function automatic int twid(int k, bit im);
    real a = -2.0 * PI * real'(k) / real'(N);
    return im ? int'($sin(a) * real'(1 << TWB)) : int'($cos(a) * real'(1 << TWB));
  endfunction
  // spectrum of the training block, samples taken as +/-1 per axis, times 64
  function automatic int pspec(int k, bit im);
    real sr = 0.0, si = 0.0, a;
    cplx_t p;
    for (int n = 0; n < N; n++) begin
      p  = preamble_sample(n);
      a  = -2.0 * PI * real'(k * n) / real'(N);
      sr += real'(p.re > 0 ? 1 : -1) * $cos(a) - real'(p.im > 0 ? 1 : -1) * $sin(a);
      si += real'(p.re > 0 ? 1 : -1) * $sin(a) + real'(p.im > 0 ? 1 : -1) * $cos(a);
    end
    return int'((im ? si : sr) * 64.0);
  endfunction
  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] x);
    for (int i = 0; i < LOGN; i++) bitrev[i] = x[LOGN-1-i];
  endfunction

  logic signed [TWB+1:0] tw_re [N/2], tw_im [N/2];
  logic signed [15:0]    ps_re [N],   ps_im [N];
  for (genvar k = 0; k < N / 2; k++) begin : g_tw
    localparam int WR = twid(k, 1'b0);
    localparam int WI = twid(k, 1'b1);
    assign tw_re[k] = (TWB+2)'(WR);
    assign tw_im[k] = (TWB+2)'(WI);
  end
  for (genvar k = 0; k < N; k++) begin : g_ps
    localparam int PR = pspec(k, 1'b0);
    localparam int PI_ = pspec(k, 1'b1);
    assign ps_re[k] = 16'(PR);
    assign ps_im[k] = 16'(PI_);
  end

  // ---------------- history of input samples ----------------
  cplx_t       hist [HIST_CLKS][SMP_PER_CLK];
  logic [31:0] clk_cnt;
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_FFT, S_MUL, S_IFFT, S_PEAK} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst)           clk_cnt <= '0;
    else if (in_valid) clk_cnt <= clk_cnt + 1;
  end
  always_ff @(posedge clk) begin
    if (in_valid && state == S_IDLE) hist[clk_cnt[HB-1:0]] <= in_smp;
  end

  // ---------------- transform engine ----------------
  logic signed [DW-1:0] xr [N], xi [N];
  logic [31:0]          t0;
  logic [LOGN:0]        n;          // load / multiply / peak index
  logic [LOGN-1:0]      stage;
  logic [LOGN-2:0]      bfly;
  logic [LOGN-1:0]      best;
  logic [DW:0]          best_mag;

  // one butterfly, combinational
  logic [LOGN-1:0]      bi, bj;
  logic [LOGN-2:0]      twk;
  logic signed [DW-1:0] t_re, t_im;
  always_comb begin
    logic [LOGN-1:0] h, grp, pos;
    logic signed [TWB+1:0] wr, wi;
    logic signed [DW+TWB+1:0] mr, mi;
    h   = LOGN'(1) << stage;
    pos = LOGN'(bfly) & (h - 1'b1);
    grp = LOGN'(bfly) >> stage;
    bi  = LOGN'((grp << (stage + 1)) | pos);
    bj  = bi + h;
    twk = (LOGN-1)'(pos << (LOGN'(LOGN - 1) - stage));
    wr  = tw_re[twk];
    wi  = (state == S_IFFT) ? -tw_im[twk] : tw_im[twk];
    mr  = (DW+TWB+2)'(xr[bj] * wr - xi[bj] * wi);
    mi  = (DW+TWB+2)'(xr[bj] * wi + xi[bj] * wr);
    t_re = DW'(mr >>> TWB);
    t_im = DW'(mi >>> TWB);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; done <= 1'b0; t_fine <= '0; offset <= '0; t0 <= '0;
      n <= '0; stage <= '0; bfly <= '0; best <= '0; best_mag <= '0;
      for (int k = 0; k < N; k++) begin xr[k] <= '0; xi[k] <= '0; end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          t0    <= t_coarse - 32'(N - 1);
          n     <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          logic [HB+2:0] s;             // sample index modulo the history
          s = (HB+3)'(t0 + 32'(n));
          xr[bitrev(n[LOGN-1:0])] <= DW'(hist[s[HB+2:3]][s[2:0]].re);
          xi[bitrev(n[LOGN-1:0])] <= DW'(hist[s[HB+2:3]][s[2:0]].im);
          n <= n + 1'b1;
          if (32'(n) == N - 1) begin stage <= '0; bfly <= '0; state <= S_FFT; end
        end
        S_FFT, S_IFFT: begin
          xr[bi] <= (xr[bi] + t_re) >>> 1;
          xi[bi] <= (xi[bi] + t_im) >>> 1;
          xr[bj] <= (xr[bi] - t_re) >>> 1;
          xi[bj] <= (xi[bi] - t_im) >>> 1;
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            stage <= stage + 1'b1;
            if (32'(stage) == LOGN - 1) begin
              n <= '0;
              best <= '0; best_mag <= '0;
              state <= (state == S_FFT) ? S_MUL : S_PEAK;
            end
          end
        end
        S_MUL: begin
          // in place, bin k to position bitrev(k): swap pairs once
          logic [LOGN-1:0] k, r;
          logic signed [2*DW-1:0] pr, pi, qr, qi;
          k  = n[LOGN-1:0];
          r  = bitrev(k);
          pr = (2*DW)'(xr[k] * ps_re[k] + xi[k] * ps_im[k]);
          pi = (2*DW)'(xi[k] * ps_re[k] - xr[k] * ps_im[k]);
          qr = (2*DW)'(xr[r] * ps_re[r] + xi[r] * ps_im[r]);
          qi = (2*DW)'(xi[r] * ps_re[r] - xr[r] * ps_im[r]);
          if (r > k) begin
            xr[r] <= DW'(pr >>> 6); xi[r] <= DW'(pi >>> 6);
            xr[k] <= DW'(qr >>> 6); xi[k] <= DW'(qi >>> 6);
          end else if (r == k) begin
            xr[k] <= DW'(pr >>> 6); xi[k] <= DW'(pi >>> 6);
          end
          n <= n + 1'b1;
          if (32'(n) == N - 1) begin stage <= '0; bfly <= '0; state <= S_IFFT; end
        end
        S_PEAK: begin
          logic [DW:0] mag;
          logic [LOGN-1:0] k;
          k   = n[LOGN-1:0];
          mag = (DW+1)'(xr[k] < 0 ? -xr[k] : xr[k]) + (DW+1)'(xi[k] < 0 ? -xi[k] : xi[k]);
          if (mag > best_mag) begin best_mag <= mag; best <= k; end
          n <= n + 1'b1;
          if (32'(n) == N) begin
            offset <= (32'(best) < N / 2) ? 7'(best) : 7'(int'(best) - N);
            t_fine <= t0 + 32'(N - 1) + ((32'(best) < N / 2) ? 32'(best) : 32'(best) - 32'(N));
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
