// cfo_estimator: initial carrier frequency offset estimate from the preamble
// autocorrelation. The angle of P (lag 64) is 2*pi*CFO*64 samples, so a
// CORDIC in vectoring mode measures angle(P) and the per-sample correction
// for the NCO is phase_inc = -angle/64, both in turns scaled by 2^AW. One
// CORDIC iteration per clock: start loads P (left half-plane inputs are first
// turned by half a turn), AW iterations follow, then done pulses with angle
// and phase_inc (latency AW+2 clocks). The arctangent table is computed at
// elaboration. The range is |CFO| < 2.5 GS/s / 128 = 19.5 MHz.
// Using the autocorrelation outputs follows the design; the CORDIC is this
// design's choice.
module cfo_estimator #(
  parameter int IW = 32,     // input width of P
  parameter int AW = 24      // angle width (one turn = 2^AW)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [IW-1:0] p_re,
  input  logic signed [IW-1:0] p_im,
  output logic                 done,
  output logic signed [AW-1:0] angle,
  output logic signed [AW-1:0] phase_inc
);
  localparam int XW = IW + 2;
  localparam real PI = 3.14159265358979;

  function automatic logic [AW-1:0] atan_turns(int i);
    real v = $atan(1.0 / (2.0 ** i)) / (2.0 * PI) * (2.0 ** AW);
    return AW'(longint'($floor(v + 0.5)));
  endfunction

  logic [AW-1:0] atan_tab [AW];
  for (genvar i = 0; i < AW; i++) begin : g_tab
    localparam logic [AW-1:0] A = atan_turns(i);
    assign atan_tab[i] = A;
  end

  logic signed [XW-1:0] x, y;
  logic signed [AW-1:0] z;
  logic [$clog2(AW+1)-1:0] it;
  logic busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; z <= '0; it <= '0; busy <= 1'b0; done <= 1'b0;
      angle <= '0; phase_inc <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        if (p_re < 0) begin
          x <= -XW'(p_re); y <= -XW'(p_im); z <= AW'(1) <<< (AW - 1);
        end else begin
          x <= XW'(p_re);  y <= XW'(p_im);  z <= '0;
        end
      end else if (busy) begin
        if (32'(it) == AW) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          angle     <= z;
          phase_inc <= -(z >>> 6);
        end else begin
          if (y >= 0) begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_tab[it];
          end else begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_tab[it];
          end
          it <= it + 1'b1;
        end
      end
    end
  end
endmodule
