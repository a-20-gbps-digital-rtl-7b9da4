// tx_filter: sample rate conversion and root-raised-cosine pulse shaping for
// one band. Six 16QAM symbols enter per clock (1.875 GBd) and eight samples
// leave per clock (2.5 GS/s): output sample m sits at 3m/4 symbol periods, so
// the filter is a polyphase RRC with four time offsets (0, 1/4, 1/2, 3/4 of a
// symbol), each with NTAP taps. Symbols are only +/-1 or +/-3 per axis, so no
// multipliers are used: every tap has a small table holding coefficient x
// level for the four levels, and each output sums NTAP table entries per axis.
// The sum is pipelined so that at most three adders are chained in one clock:
// groups of four terms (three adders) are added and registered, then the
// group sums are added. Coefficients are computed at elaboration from the RRC
// formula (roll-off ALPHA, scaled by SCALE and rounded).
// Timing: in_valid/in_sym are registered into the symbol history, then three
// pipeline stages: out_valid follows in_valid by four clocks. Between frames
// (in_valid low) the history holds, so the symbol stream continues across
// the preamble. The four-phase structure, table-based multiplier-free taps and
// three-adder stages follow the design description; ALPHA, NTAP and SCALE are
// this design's choices.
module tx_filter
  import modem_pkg::*;
#(
  parameter int  NTAP  = 8,
  parameter real ALPHA = 0.25,
  parameter real SCALE = 256.0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  sym_t   in_sym  [SYM_PER_CLK],
  output logic   out_valid,
  output cplx_t  out_smp [SMP_PER_CLK]
);
  localparam real PI   = 3.14159265358979;
  localparam int  NGRP = (NTAP + 3) / 4;          // groups of four terms
  localparam int  HW   = 3 * SYM_PER_CLK;         // symbols of history kept
  localparam int  TW   = 16;                      // term / sum width

  // RRC impulse response at t symbol periods, unit peak-energy form
  function automatic real rrc(real t);
    real a = ALPHA;
    if (t > -1e-9 && t < 1e-9) return 1.0 - a + 4.0 * a / PI;
    if ((4.0 * a * t - 1.0) ** 2 < 1e-12 || (4.0 * a * t + 1.0) ** 2 < 1e-12)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) +
                               (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) /
           (PI * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  // coefficient of tap i for output phase p (offset p/4 of a symbol)
  function automatic int coef(int p, int i);
    real v = SCALE * rrc(real'(p) / 4.0 + real'(i) - real'(NTAP / 2));
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // symbol history: hist[k] for k = 0..HW-1, oldest first; newest six at the top
  sym_t hist [HW];
  logic v0, v1, v2;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < HW; k++) hist[k] <= '{i: 2'd2, q: 2'd2};
      v0 <= 1'b0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < HW - SYM_PER_CLK; k++) hist[k] <= hist[k + SYM_PER_CLK];
        for (int l = 0; l < SYM_PER_CLK; l++) hist[HW - SYM_PER_CLK + l] <= in_sym[l];
      end
    end
  end

  // stage 1: table look-ups; stage 2: 4-term group sums; stage 3: final sum
  logic signed [TW-1:0] term_i [SMP_PER_CLK][NGRP*4];
  logic signed [TW-1:0] term_q [SMP_PER_CLK][NGRP*4];
  logic signed [TW-1:0] grp_i  [SMP_PER_CLK][NGRP];
  logic signed [TW-1:0] grp_q  [SMP_PER_CLK][NGRP];

  function automatic logic signed [TW-1:0] lut(logic [1:0] lvl, int c);
    case (lvl)
      2'd0:    return TW'(-3 * c);
      2'd1:    return TW'(-c);
      2'd2:    return TW'(c);
      default: return TW'(3 * c);
    endcase
  endfunction

  function automatic logic signed [SW-1:0] sat(logic signed [TW-1:0] x);
    localparam logic signed [TW-1:0] MAXV = TW'(2 ** (SW - 1) - 1);
    if (x > MAXV)  return SW'(MAXV);
    if (x < -MAXV) return SW'(-MAXV);
    return SW'(x);
  endfunction

  for (genvar j = 0; j < SMP_PER_CLK; j++) begin : g_out
    localparam int P    = (3 * j) % 4;            // phase of output j
    localparam int BASE = 2 * SYM_PER_CLK + (3 * j) / 4;  // newest symbol used
    for (genvar t = 0; t < NGRP * 4; t++) begin : g_tap
      localparam int C = (t < NTAP) ? coef(P, t) : 0;
      always_ff @(posedge clk) begin
        term_i[j][t] <= lut(hist[BASE - t].i, C);
        term_q[j][t] <= lut(hist[BASE - t].q, C);
      end
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      always_ff @(posedge clk) begin
        grp_i[j][g] <= term_i[j][4*g] + term_i[j][4*g+1] + term_i[j][4*g+2] + term_i[j][4*g+3];
        grp_q[j][g] <= term_q[j][4*g] + term_q[j][4*g+1] + term_q[j][4*g+2] + term_q[j][4*g+3];
      end
    end
    always_ff @(posedge clk) begin
      logic signed [TW-1:0] si, sq;
      si = '0; sq = '0;
      for (int g = 0; g < NGRP; g++) begin
        si = si + grp_i[j][g];
        sq = sq + grp_q[j][g];
      end
      out_smp[j].re <= sat(si);
      out_smp[j].im <= sat(sq);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= v0; v2 <= v1; out_valid <= v2;
    end
  end
endmodule
