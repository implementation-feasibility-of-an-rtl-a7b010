// phy_pi: behavioural model of the phase interpolator.
//
// This is a behavioural model, not synthesizable logic: the real cell mixes
// currents steered by four quadrature clocks onto integrating capacitors,
// followed by a CML-to-CMOS stage and duty-cycle correction.
//
// Each of the four quadrature inputs (clk0, clk90, clk180, clk270) has a
// 16-bit thermometer weight (sel0 ... sel270, with complements selXb). The
// number of set bits is the current given to that phase. The model sums the
// four weighted unit phasors and takes the angle of the result as the output
// phase: equal weights on clk0 and clk90 give 45 degrees, weight only on
// clk90 gives 90 degrees. outp is clk0 delayed by phase/360 of its period
// (measured between rising edges of clk0); the quadrature inputs are 50 %
// duty-cycle clocks, so outp is too. outn is its complement. For phases of
// 180 degrees and more the delayed clock is clk180 instead, delayed by
// (phase - 180)/360 of a period.
// Port names follow the cell's symbol. The complement buses and the xcpl
// coupling trim are accepted but not modelled (the selXb buses are assumed to
// be the inverse of selX). The phasor-sum phase law is this model's
// simplification of the current mixing. Outputs stay low until two rising
// edges of clk0 have been seen; after clk0 stops for more than 1.5 periods the
// first edge back is used only to restart the period measurement.
`timescale 1ps / 1ps
module phy_pi #(
  parameter int unsigned N = 16
) (
  input  logic         clk0,
  input  logic         clk90,
  input  logic         clk180,
  input  logic         clk270,
  input  logic [N-1:0] sel0,
  input  logic [N-1:0] sel0b,
  input  logic [N-1:0] sel90,
  input  logic [N-1:0] sel90b,
  input  logic [N-1:0] sel180,
  input  logic [N-1:0] sel180b,
  input  logic [N-1:0] sel270,
  input  logic [N-1:0] sel270b,
  input  logic [3:0]   xcpl,
  input  logic [3:0]   xcplb,
  output logic         outp,
  output logic         outn
);

  localparam real PI_C = 3.14159265358979;

  realtime t_last;
  realtime period;
  bit      have_last;
  bit      have_period;
  real     phase_deg;
  realtime dly;
  realtime d_full;
  logic    use180;

  // Phase selected by the current weights, in degrees [0, 360).
  function automatic real phase_of(int w0, int w90, int w180, int w270);
    real x, y, a;
    x = real'(w0 - w180);
    y = real'(w90 - w270);
    if (x == 0.0 && y == 0.0) return 0.0;
    a = $atan2(y, x) * 180.0 / PI_C;
    if (a < 0.0) a = a + 360.0;
    return a;
  endfunction

  assign phase_deg = phase_of($countones(sel0), $countones(sel90),
                              $countones(sel180), $countones(sel270));

  initial begin
    outp        = 1'b0;
    have_last   = 1'b0;
    have_period = 1'b0;
    t_last      = 0;
    period      = 0;
  end

  // A gap longer than 1.5 periods means clk0 stopped (e.g. the PLL was
  // disabled): that edge only restarts the measurement.
  always @(posedge clk0) begin
    realtime gap;
    gap = $realtime - t_last;
    if (have_last && !(have_period && gap > 1.5 * period)) begin
      period      = gap;
      have_period = 1'b1;
    end else begin
      have_period = 1'b0;
    end
    t_last    = $realtime;
    have_last = 1'b1;
  end

  // Output: clk0 delayed by phase/360 of the measured period. A transport
  // delay of more than half a period is taken from clk180 (the inverse of
  // clk0) instead, so the delay in use is always below half a period.
  assign d_full = have_period ? phase_deg / 360.0 * period : 0.0;
  assign use180 = have_period && (d_full >= period / 2.0);
  assign dly    = use180 ? d_full - period / 2.0 : d_full;

  always begin
    outp <= #(dly) (use180 ? clk180 : clk0) & have_period;
    @(clk0 or clk180 or have_period or use180);
  end

  assign outn = ~outp;

  // Inputs that the model does not use (see the header).
  logic unused;
  assign unused = clk90 ^ clk270 ^ ^sel0b ^ ^sel90b ^ ^sel180b ^ ^sel270b
                  ^ ^xcpl ^ ^xcplb;

endmodule
