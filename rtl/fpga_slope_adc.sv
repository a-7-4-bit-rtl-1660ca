`timescale 1ps / 1fs
// FPGA slope ADC with online calibration: top level.
//
// An output buffer driven by the 600 MHz launching clock charges and
// discharges its own pad capacitance; this RC slope is compared with the
// analog input by an LVDS input buffer. The comparator therefore switches
// twice per clock period, at instants set by the input voltage, and a
// four-chain tapped-delay-line TDC measures both instants every cycle. The
// rest is calibration:
//   - bin-by-bin: at start-up the TDC input MUX (sel_ro) selects a ring
//     oscillator, whose edges land at random phases; the code density of
//     1,024,000 hits per edge direction gives the true width of every bin;
//   - clock edge alignment: the launching clock's output delay is set so that
//     the comparator pulse is centred in the delay lines;
//   - voltage: with a triangular input applied, a second code density test
//     maps the calibrated edge times to voltage, one table per edge;
//   - online: the ring oscillator keeps running; its frequency, compared with
//     the value at start-up, rescales the times (and the input delay) as the
//     temperature drifts.
// The output adc_out is the mean of the two voltage codes, one sample per
// clock cycle (600 MS/s) once phase = PH_MEASURE.
// Vendor primitives stay outside: clk600 comes from the clock manager,
// clk600_cal is the launching clock after the output delay (set by
// odelay_tap), cmp_out goes to the input delay (set by idelay_tap) and comes
// back as cmp_dly. The slope/comparator, the ring oscillator and the delay
// lines are behavioural models of physical structures; the rest is
// synthesizable.
// Status outputs: f_online is the latest oscillator count (one per GATE
// cycles), f_reference/f_reference_ok the count stored at the start of
// calibration, online_ratio = f_reference/f_online with 14 fraction bits,
// cal_busy is high while a calibration table is collected or built,
// align_failed reports an alignment that found no pulse, phase is the
// start-up sequencer's phase. N_CAL_TDC and N_CAL_VOLT are the hits per
// bin-by-bin table and the edges per voltage table.
// The architecture follows the document; the choices this design makes are
// described in each block.
module fpga_slope_adc
  import slope_adc_pkg::*;
#(
  parameter int unsigned N_CAL_TDC  = N_CAL,
  parameter int unsigned N_CAL_VOLT = N_CAL,
  parameter int unsigned GATE       = GATE_CYCLES
) (
  input  logic                clk600,
  input  logic                rst_n,
  input  real                 analog_in,
  input  logic                clk600_cal,
  output logic                cmp_out,
  input  logic                cmp_dly,
  output logic [TAP_W-1:0]    odelay_tap,
  output logic [TAP_W-1:0]    idelay_tap,
  output logic                adc_valid,
  output logic [VCODE_W-1:0]  adc_out,
  output logic [FCNT_W-1:0]   f_online,
  output logic [RATIO_W-1:0]  online_ratio,
  output logic [FCNT_W-1:0]   f_reference,
  output logic                f_reference_ok,
  output logic                cal_busy,
  output logic                align_failed,
  output phase_e              phase
);

  // ring oscillator, always enabled (its Enable input is tied to 1)
  logic ro_clk;
  ring_oscillator u_ro (.enable(1'b1), .clk_o(ro_clk));

  // slope and comparator
  slope_comparator u_cmp (.clk600_cal, .analog_in, .cmp_out);

  // TDC input MUX
  logic sel_ro, hit;
  assign hit = sel_ro ? ro_clk : cmp_dly;

  // TDC core
  logic              t_rv, t_fv;
  logic [CODE_W-1:0] t_rc, t_fc;
  tdc_core #(.N_CHAINS(N_CHAINS), .N_CARRY8(N_CARRY8), .CODE_W(CODE_W)) u_tdc (
    .clk(clk600), .rst_n, .hit,
    .rise_valid(t_rv), .rise_code(t_rc), .fall_valid(t_fv), .fall_code(t_fc)
  );

  // sequencer
  logic bbb_start, bbb_done, bbb_busy, capture_ref, align_start, align_done, align_fail;
  logic vcal_start, vcal_done, vcal_busy, online_en, measure;
  cal_sequencer u_seq (
    .clk(clk600), .rst_n,
    .bbb_done, .align_done, .align_fail, .vcal_done,
    .sel_ro, .bbb_start, .capture_ref, .align_start, .vcal_start,
    .online_en, .measure, .align_failed, .phase
  );

  // bin-by-bin calibration
  logic              b_rv, b_fv;
  logic [CODE_W-1:0] b_rt, b_ft;
  bin_by_bin_cal #(.CODE_W(CODE_W), .N_HITS(N_CAL_TDC)) u_bbb (
    .clk(clk600), .rst_n, .start(bbb_start),
    .rise_valid(t_rv), .rise_code(t_rc), .fall_valid(t_fv), .fall_code(t_fc),
    .busy(bbb_busy), .done(bbb_done),
    .rise_t_valid(b_rv), .rise_t(b_rt), .fall_t_valid(b_fv), .fall_t(b_ft)
  );

  // frequency counter and online calibration
  logic                f_valid;
  logic [RATIO_W-1:0]  r_off_on, r_on_off;
  logic              o_rv, o_fv;
  logic [CODE_W-1:0] o_rt, o_ft;

  freq_counter #(.GATE_CYCLES(GATE), .COUNT_W(FCNT_W)) u_fc (
    .clk(clk600), .rst_n, .ro(ro_clk), .count(f_online), .count_valid(f_valid)
  );

  online_cal #(.CNT_W(FCNT_W), .FRAC_W(FRAC_W), .T_W(CODE_W)) u_online (
    .clk(clk600), .rst_n, .capture_ref, .count(f_online), .count_valid(f_valid),
    .enable(online_en), .ratio_off_on(r_off_on), .ratio_on_off(r_on_off),
    .f_off(f_reference), .ref_ok(f_reference_ok),
    .rise_valid(b_rv), .rise_t(b_rt), .fall_valid(b_fv), .fall_t(b_ft),
    .rise_c_valid(o_rv), .rise_c(o_rt), .fall_c_valid(o_fv), .fall_c(o_ft)
  );

  // clock edge alignment (works on the raw TDC positions)
  align_cal #(.CODE_W(CODE_W), .TAP_W(TAP_W), .FRAC_W(FRAC_W), .TARGET(N_TAPS / 2)) u_align (
    .clk(clk600), .rst_n, .start(align_start),
    .rise_valid(t_rv), .rise_code(t_rc), .fall_valid(t_fv), .fall_code(t_fc),
    .ratio_on_off(r_on_off), .track(measure),
    .odelay_tap, .idelay_tap, .done(align_done), .fail(align_fail)
  );

  // voltage calibration and output
  voltage_cal #(.T_W(CODE_W), .V_W(VCODE_W), .N_CYCLES(N_CAL_VOLT)) u_vcal (
    .clk(clk600), .rst_n, .start(vcal_start),
    .rise_valid(o_rv & bbb_done), .rise_t(o_rt), .fall_valid(o_fv & bbb_done), .fall_t(o_ft),
    .busy(vcal_busy), .done(vcal_done), .adc_valid, .adc_out
  );

  assign online_ratio = r_off_on;
  assign cal_busy     = bbb_busy | vcal_busy;

endmodule
