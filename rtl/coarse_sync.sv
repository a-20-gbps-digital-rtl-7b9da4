// coarse_sync: packet acquisition (coarse timing) for one band. The preamble
// is two identical 64-sample blocks, so the lag-64 autocorrelation
//   P(n) = sum_{k=0..63} r(n-k) * conj(r(n-k-64)),  E(n) = sum_{k=0..63} |r(n-k)|^2
// reaches |P| = E exactly when the window covers the second block, at the
// last sample of the preamble. Eight samples arrive per clock, so eight P and
// E values are updated per clock from running sums (new product in, product
// from 64 samples ago out). When |P|^2 >= (THR_NUM/THR_DEN)^2 * E^2 for any
// lane, a search of SEARCH_CLKS clocks records the sample with the largest
// |P|^2: that sample index is the coarse timing point, and P there carries the
// initial CFO (its angle is 2*pi*CFO*64 samples). found pulses with timing
// and peak_re/peak_im; detection then rests for HOLD_CLKS clocks.
// Timing: P/E are registered one clock after the samples, the decision two
// clocks after the search window closes. Sample indices count from reset.
// The autocorrelation method follows the design; threshold, search window,
// hold-off and widths are this design's choices.
module coarse_sync
  import modem_pkg::*;
#(
  parameter int THR_NUM     = 3,
  parameter int THR_DEN     = 4,
  parameter int SEARCH_CLKS = 8,
  parameter int HOLD_CLKS   = 1100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_smp [SMP_PER_CLK],
  output logic        found,
  output logic [31:0] timing,
  output logic signed [31:0] peak_re,
  output logic signed [31:0] peak_im,
  output logic [31:0] detections
);
  localparam int L   = PRE_LEN / SMP_PER_CLK;   // clocks of lag
  localparam int PW  = 32;                      // accumulator width

  cplx_t dl [L][SMP_PER_CLK];                   // sample delay line, dl[L-1] oldest
  logic signed [PW-1:0] pdl_re [L][SMP_PER_CLK];
  logic signed [PW-1:0] pdl_im [L][SMP_PER_CLK];
  logic signed [PW-1:0] edl    [L][SMP_PER_CLK];
  logic signed [PW-1:0] acc_re, acc_im, acc_e;
  logic signed [PW-1:0] p_re [SMP_PER_CLK], p_im [SMP_PER_CLK], e [SMP_PER_CLK];
  logic signed [PW-1:0] P_re [SMP_PER_CLK], P_im [SMP_PER_CLK], E [SMP_PER_CLK];
  logic signed [PW-1:0] P_re_q [SMP_PER_CLK], P_im_q [SMP_PER_CLK], E_q [SMP_PER_CLK];
  logic        q_valid;
  logic [31:0] clk_cnt, clk_cnt_q;

  always_comb begin
    logic signed [PW-1:0] sr, si, se;
    sr = acc_re; si = acc_im; se = acc_e;
    for (int j = 0; j < SMP_PER_CLK; j++) begin
      p_re[j] = PW'(in_smp[j].re * dl[L-1][j].re + in_smp[j].im * dl[L-1][j].im);
      p_im[j] = PW'(in_smp[j].im * dl[L-1][j].re - in_smp[j].re * dl[L-1][j].im);
      e[j]    = PW'(in_smp[j].re * in_smp[j].re + in_smp[j].im * in_smp[j].im);
      sr = sr + p_re[j] - pdl_re[L-1][j];
      si = si + p_im[j] - pdl_im[L-1][j];
      se = se + e[j]    - edl[L-1][j];
      P_re[j] = sr; P_im[j] = si; E[j] = se;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_re <= '0; acc_im <= '0; acc_e <= '0; q_valid <= 1'b0; clk_cnt <= '0; clk_cnt_q <= '0;
      for (int k = 0; k < L; k++)
        for (int j = 0; j < SMP_PER_CLK; j++) begin
          dl[k][j] <= '0; pdl_re[k][j] <= '0; pdl_im[k][j] <= '0; edl[k][j] <= '0;
        end
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        P_re_q[j] <= '0; P_im_q[j] <= '0; E_q[j] <= '0;
      end
    end else begin
      q_valid <= in_valid;
      if (in_valid) begin
        clk_cnt   <= clk_cnt + 1;
        clk_cnt_q <= clk_cnt;
        acc_re <= P_re[SMP_PER_CLK-1];
        acc_im <= P_im[SMP_PER_CLK-1];
        acc_e  <= E[SMP_PER_CLK-1];
        for (int k = L - 1; k > 0; k--) begin
          dl[k] <= dl[k-1]; pdl_re[k] <= pdl_re[k-1]; pdl_im[k] <= pdl_im[k-1]; edl[k] <= edl[k-1];
        end
        dl[0] <= in_smp; pdl_re[0] <= p_re; pdl_im[0] <= p_im; edl[0] <= e;
        P_re_q <= P_re; P_im_q <= P_im; E_q <= E;
      end
    end
  end

  // ---------------- detection and peak search ----------------
  typedef enum logic [1:0] {S_ARMED, S_SEARCH, S_HOLD} state_e;
  state_e state;
  logic [63:0] mag2 [SMP_PER_CLK];
  logic [SMP_PER_CLK-1:0] over;
  logic [63:0] best;
  logic [31:0] best_idx;
  logic signed [PW-1:0] best_re, best_im;
  logic [$clog2(HOLD_CLKS+SEARCH_CLKS+1)-1:0] tmr;

  always_comb begin
    for (int j = 0; j < SMP_PER_CLK; j++) begin
      logic signed [63:0] xr, xi, xe;
      xr = 64'(P_re_q[j]); xi = 64'(P_im_q[j]); xe = 64'(E_q[j]);
      mag2[j] = 64'(xr * xr + xi * xi);
      over[j] = (THR_DEN * THR_DEN) * mag2[j] >= 64'(THR_NUM * THR_NUM) * 64'(xe * xe) && xe > 0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_ARMED; found <= 1'b0; timing <= '0; peak_re <= '0; peak_im <= '0;
      best <= '0; best_idx <= '0; best_re <= '0; best_im <= '0; tmr <= '0; detections <= '0;
    end else begin
      found <= 1'b0;
      if (q_valid) begin
        unique case (state)
          S_ARMED: if (|over) begin
            state <= S_SEARCH;
            tmr   <= '0;
            best  <= '0;
          end
          S_SEARCH: ;
          S_HOLD: begin
            if (32'(tmr) == HOLD_CLKS - 1) state <= S_ARMED;
            tmr <= tmr + 1'b1;
          end
          default: state <= S_ARMED;
        endcase
        if (state == S_SEARCH || (state == S_ARMED && |over)) begin
          logic [63:0] b;
          b = (state == S_ARMED) ? '0 : best;
          for (int j = 0; j < SMP_PER_CLK; j++) begin
            if (mag2[j] > b) begin
              b = mag2[j];
              best_idx <= clk_cnt_q * SMP_PER_CLK + 32'(j);
              best_re  <= P_re_q[j];
              best_im  <= P_im_q[j];
            end
          end
          best <= b;
          if (state == S_SEARCH) begin
            tmr <= tmr + 1'b1;
            if (32'(tmr) == SEARCH_CLKS - 1) begin
              state <= S_HOLD;
              tmr   <= '0;
            end
          end
        end
      end
      if (state == S_HOLD && tmr == '0 && q_valid) begin
        found      <= 1'b1;
        timing     <= best_idx;
        peak_re    <= best_re;
        peak_im    <= best_im;
        detections <= detections + 1;
      end
    end
  end
endmodule
