`timescale 1ps / 1fs
// Behavioural model (not synthesizable) of the reference slope and the LVDS
// comparator.
//
// An output buffer driven by the launching clock clk600_cal charges and
// discharges its pad capacitance through its output resistance: the IB input
// of an LVDS receiver sees V = VU - (VU - V0) * exp(-t/RC) while the clock is
// high and V = V0 * exp(-t/RC) while it is low (RC = 300 ps, VU = 1.8 V). The
// analog input drives the I input, so cmp_out = analog_in > slope. In every
// clock period the comparator therefore falls once, when the rising slope
// passes the input (later for a higher input), and rises once, when the
// falling slope drops below it (earlier for a higher input).
// The model works out each crossing time in closed form at every clock edge,
// from the slope voltage reached so far and the length of the previous half
// period, and schedules the output change with a delay. The input is taken
// as constant over a half period, and it is clamped to the 0.3-1.5 V range
// outside which the receiver does not work.
// The RC values, the voltage range and the connection follow the document;
// the closed-form evaluation is this model's own. Lint notes that the crossing
// delay #(tc) could be zero; it cannot, since a crossing is only scheduled
// when the input lies strictly beyond the slope voltage, which makes tc > 0.
module slope_comparator #(
  parameter real RC_PS     = 300.0,
  parameter real VU        = 1.8,
  parameter real V_DEAD_LO = 0.3,
  parameter real V_DEAD_HI = 1.5
) (
  input  logic clk600_cal,
  input  real  analog_in,
  output logic cmp_out
);

  real         v_edge;     // slope voltage at the last clock edge
  real         t_edge;     // time of the last clock edge
  real         t_half;     // length of the last half period
  logic        charging;   // phase since the last edge
  int unsigned gen;        // invalidates stale scheduled crossings
  logic        cmp_r;

  initial begin
    v_edge   = 0.0;
    t_edge   = 0.0;
    t_half   = 833.3;
    charging = 1'b0;
    gen      = 0;
    cmp_r    = 1'b1;
  end

  assign cmp_out = cmp_r;

  always @(clk600_cal) begin
    real el, a, v_now, tc;
    int unsigned my_gen;
    el = $realtime - t_edge;
    if (charging) v_now = VU - (VU - v_edge) * $exp(-el / RC_PS);
    else          v_now = v_edge * $exp(-el / RC_PS);
    if (el > 10.0) t_half = el;
    v_edge   = v_now;
    t_edge   = $realtime;
    charging = clk600_cal;
    a = analog_in;
    if (a < V_DEAD_LO) a = V_DEAD_LO;
    if (a > V_DEAD_HI) a = V_DEAD_HI;
    gen++;
    my_gen = gen;
    cmp_r  = (a > v_now);
    tc     = -1.0;
    if (charging && a > v_now && a < VU)
      tc = RC_PS * $ln((VU - v_now) / (VU - a));
    else if (!charging && a < v_now)
      tc = RC_PS * $ln(v_now / a);
    if (tc >= 0.0 && tc < t_half) begin
      fork
        begin
          #(tc);
          if (gen == my_gen) cmp_r = charging ? 1'b0 : 1'b1;
        end
      join_none
    end
  end

endmodule
