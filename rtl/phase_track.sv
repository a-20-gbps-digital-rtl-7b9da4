// phase_track: phase noise compensation with the PN-coded pilots, six
// symbols per clock, after the receive filter. Every data block starts with a
// pilot (1+j)s, s = +/-1 from the same PN sequence as the transmitter,
// restarted at each frame. For a received pilot r, c = r*(1-j)*s is the
// pilot's phasor times 2A (A = 2^RX_UNIT_LOG2, the +/-1 level); each symbol
// up to the next pilot is turned back by multiplying with conj(c)/(2A), which
// removes the common phase of that data block. Until the first pilot of a
// frame, c = 2A (no rotation). The same-clock pilot is used by the lanes after
// it. sof marks the clock whose lane 0 is the first pilot of a frame.
// Registered output, one clock of latency; out_pilot flags pilot lanes.
// Using the pilots for phase noise follows the design; the per-block
// derotation rule is this design's choice. The rotation also carries the
// small gain error |c|/(2A), which the demapper tolerates.
module phase_track
  import modem_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cplx_t in_sym [SYM_PER_CLK],
  output logic  out_valid,
  output logic [SYM_PER_CLK-1:0] out_pilot,
  output cplx_t out_sym [SYM_PER_CLK]
);
  localparam int CW = SW + 3;
  localparam int A2 = 2 ** (RX_UNIT_LOG2 + 1);

  logic [4:0] pos, pos_eff;
  logic signed [CW-1:0] c_re, c_im, c_re_n, c_im_n;
  logic [6:0] lfsr, lfsr_cur;
  logic pn_code, pn_step;
  logic [SYM_PER_CLK-1:0] is_pil;
  cplx_t rot [SYM_PER_CLK];

  // pilot PN chips: the x^7 + x^4 + 1 LFSR of pn_gen, restarted from 7'h7F at
  // every frame so that the pilot of the sof clock uses the first chip
  assign lfsr_cur = in_sof ? 7'h7F : lfsr;
  assign pn_code  = lfsr_cur[6] ^ lfsr_cur[3];
  assign pos_eff  = in_sof ? 5'd0 : pos;

  always_comb begin
    logic signed [CW-1:0] cr, ci;
    logic s;
    s = 1'b0;
    cr = in_sof ? CW'(A2) : c_re;
    ci = in_sof ? '0      : c_im;
    pn_step = 1'b0;
    for (int l = 0; l < SYM_PER_CLK; l++) begin
      logic signed [2*CW:0] pr, pi;
      is_pil[l] = in_valid && ((int'(pos_eff) + l) % SYM_PER_DBLK) == 0;
      if (is_pil[l]) begin
        s  = pn_code;                          // 0 means s = +1
        cr = s ? -CW'(in_sym[l].re + in_sym[l].im) : CW'(in_sym[l].re + in_sym[l].im);
        ci = s ? -CW'(in_sym[l].im - in_sym[l].re) : CW'(in_sym[l].im - in_sym[l].re);
        pn_step = 1'b1;
      end
      pr = (2*CW+1)'(in_sym[l].re * cr + in_sym[l].im * ci);
      pi = (2*CW+1)'(in_sym[l].im * cr - in_sym[l].re * ci);
      rot[l].re = SW'(pr >>> (RX_UNIT_LOG2 + 1));
      rot[l].im = SW'(pi >>> (RX_UNIT_LOG2 + 1));
    end
    c_re_n = cr;
    c_im_n = ci;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0; lfsr <= 7'h7F; c_re <= CW'(A2); c_im <= '0; out_valid <= 1'b0; out_pilot <= '0;
      for (int l = 0; l < SYM_PER_CLK; l++) out_sym[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        lfsr      <= pn_step ? {lfsr_cur[5:0], pn_code} : lfsr_cur;
        pos       <= 5'((int'(pos_eff) + SYM_PER_CLK) % SYM_PER_DBLK);
        c_re      <= c_re_n;
        c_im      <= c_im_n;
        out_pilot <= is_pil;
        out_sym   <= rot;
      end
    end
  end
endmodule
