// cfo_comp: carrier frequency offset compensation for one band, eight
// samples per clock. A phase accumulator (one turn = 2^AW) advances by
// 8*phase_inc per clock; sample j of a clock is multiplied by
// exp(j*2*pi*(phase + j*phase_inc)/2^AW), taken from a cosine/sine table of
// 2^TW entries (amplitude 2^(SW-1)-1, computed at elaboration) and scaled
// back by 2^(SW-1). load sets phase_inc and clears the phase.
// Timing: table look-up registered, product registered: out follows in by
// two clocks. The design only names this block; the NCO-and-rotator
// structure and table size are this design's choices.
module cfo_comp
  import modem_pkg::*;
#(
  parameter int AW = 24,
  parameter int TW = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic signed [AW-1:0] phase_inc,
  input  logic                 in_valid,
  input  cplx_t                in_smp [SMP_PER_CLK],
  output logic                 out_valid,
  output cplx_t                out_smp [SMP_PER_CLK]
);
  localparam real PI = 3.14159265358979;
  localparam int  AMP = 2 ** (SW - 1) - 1;

  function automatic logic signed [SW-1:0] trig(int k, bit s);
    real a = 2.0 * PI * real'(k) / real'(2 ** TW);
    real v = real'(AMP) * (s ? $sin(a) : $cos(a));
    return SW'(int'($floor(v + 0.5)));
  endfunction

  logic signed [SW-1:0] cos_tab [2**TW];
  logic signed [SW-1:0] sin_tab [2**TW];
  for (genvar k = 0; k < 2 ** TW; k++) begin : g_tab
    localparam logic signed [SW-1:0] C = trig(k, 1'b0);
    localparam logic signed [SW-1:0] S = trig(k, 1'b1);
    assign cos_tab[k] = C;
    assign sin_tab[k] = S;
  end

  logic signed [AW-1:0] inc, phase;
  logic signed [SW-1:0] c_q [SMP_PER_CLK], s_q [SMP_PER_CLK];
  cplx_t x_q [SMP_PER_CLK];
  logic  v_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      inc <= '0; phase <= '0; v_q <= 1'b0; out_valid <= 1'b0;
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        c_q[j] <= '0; s_q[j] <= '0; x_q[j] <= '0; out_smp[j] <= '0;
      end
    end else begin
      v_q       <= in_valid && !load;
      out_valid <= v_q;
      if (load) begin
        inc   <= phase_inc;
        phase <= '0;
      end else if (in_valid) begin
        phase <= phase + (inc <<< 3);
        for (int j = 0; j < SMP_PER_CLK; j++) begin
          logic [AW-1:0] ph;
          ph     = AW'(phase + AW'(j) * inc);
          c_q[j] <= cos_tab[ph[AW-1 -: TW]];
          s_q[j] <= sin_tab[ph[AW-1 -: TW]];
        end
        x_q <= in_smp;
      end
      for (int j = 0; j < SMP_PER_CLK; j++) begin
        logic signed [2*SW:0] re, im;
        re = (2*SW+1)'(x_q[j].re * c_q[j] - x_q[j].im * s_q[j]);
        im = (2*SW+1)'(x_q[j].re * s_q[j] + x_q[j].im * c_q[j]);
        out_smp[j].re <= SW'(re >>> (SW - 1));
        out_smp[j].im <= SW'(im >>> (SW - 1));
      end
    end
  end
endmodule
