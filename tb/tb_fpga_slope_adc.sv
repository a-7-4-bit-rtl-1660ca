`timescale 1ps / 1fs
// End-to-end testbench of the converter at reduced calibration sizes
// (16000 hits per TDC table, 32000 edges per voltage table, 4096-cycle
// frequency windows). The clock manager and the two delay primitives are
// modelled here. The test runs the whole start-up sequence: bin-by-bin
// calibration with the ring oscillator, alignment (search and servo),
// voltage calibration with a 0.35-1.45 V triangular input, then
// measurement of DC inputs, whose output must be within 10 LSB of
// (V - 0.35) / 1.1 * 1024. Then all delays (delay lines, ring oscillator,
// delay primitives) are made 3% slower: the online ratio must rise by 3%, the
// input delay must shrink accordingly, and the DC readings must stay within
// tolerance. Each mechanism is counted and must have happened.
module tb_fpga_slope_adc;
  import slope_adc_pkg::*;
  localparam int unsigned GATE_TB = 4096;
  localparam real HALF = 833.333;
  localparam real VLO = 0.35, VHI = 1.45;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.9;
  logic clk_cal, cmp_out, cmp_dly;
  logic [TAP_W-1:0] odelay_tap, idelay_tap;
  logic adc_valid, align_failed, cal_busy;
  logic [VCODE_W-1:0] adc_out;
  logic [FCNT_W-1:0] f_online;
  logic [RATIO_W-1:0] ratio;
  logic [FCNT_W-1:0] f_ref;
  logic f_ref_ok;
  phase_e phase;
  int checks = 0, failures = 0;
  int n_ro_hits = 0, n_search = 0, n_servo = 0, n_tri = 0, n_online = 0, n_track = 0, n_meas = 0;

  fpga_slope_adc #(.N_CAL_TDC(16000), .N_CAL_VOLT(32000), .GATE(GATE_TB)) dut (
    .clk600(clk), .rst_n, .analog_in(vin), .clk600_cal(clk_cal), .cmp_out, .cmp_dly,
    .odelay_tap, .idelay_tap, .adc_valid, .adc_out, .f_online, .online_ratio(ratio), .f_reference(f_ref), .f_reference_ok(f_ref_ok),
    .cal_busy, .align_failed, .phase);

  tap_delay_model u_odelay (.din(clk), .tap(odelay_tap), .dout(clk_cal));
  tap_delay_model u_idelay (.din(cmp_out), .tap(idelay_tap), .dout(cmp_dly));

  always #(HALF) clk = ~clk;

  // mechanism counters
  logic [TAP_W-1:0] od_prev;
  logic [TAP_W-1:0] id_prev;
  always @(negedge clk) begin
    if (phase == PH_TDC_CAL && dut.t_rv) n_ro_hits++;
    if (phase == PH_ALIGN && odelay_tap != od_prev) begin
      if (odelay_tap == od_prev + TAP_W'(8)) n_search++;
      else n_servo++;
    end
    if (phase == PH_MEASURE && idelay_tap != id_prev) n_track++;
    if (phase == PH_MEASURE && ratio != RATIO_W'(1 << FRAC_W)) n_online++;
    if (adc_valid && phase == PH_MEASURE) n_meas++;
    od_prev = odelay_tap;
    id_prev = idelay_tap;
  end

  // triangular wave during the voltage calibration
  int tri_pos = 0;
  localparam int TRI_PERIOD = 7919;
  always @(posedge clk) begin
    if (phase == PH_VCAL) begin
      int p;
      tri_pos = (tri_pos + 1) % TRI_PERIOD;
      p = (tri_pos < TRI_PERIOD / 2) ? tri_pos : TRI_PERIOD - tri_pos;
      vin = VLO + (VHI - VLO) * real'(p) / real'(TRI_PERIOD / 2);
      n_tri++;
    end
  end

  initial begin
    #4000000000;
    failures++;
    $display("watchdog: phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_scale(input real s);
    dut.u_ro.delay_scale = s;
    dut.u_tdc.g_chain[0].u_tdl.delay_scale = s;
    dut.u_tdc.g_chain[1].u_tdl.delay_scale = s;
    dut.u_tdc.g_chain[2].u_tdl.delay_scale = s;
    dut.u_tdc.g_chain[3].u_tdl.delay_scale = s;
    u_odelay.delay_scale = s;
    u_idelay.delay_scale = s;
  endtask

  task automatic measure_dc(input real v, input int tol);
    int sum, n;
    real e, got;
    vin = v;
    repeat (40) @(negedge clk);
    sum = 0; n = 0;
    while (n < 32) begin
      @(negedge clk);
      if (adc_valid) begin sum += int'(adc_out); n++; end
    end
    got = real'(sum) / 32.0;
    e = (v - VLO) / (VHI - VLO) * 1024.0;
    checks++;
    if (got < e - tol || got > e + tol) begin
      failures++;
      $display("V=%f: output %f expected %f", v, got, e);
    end else
      $display("V=%f: output %f expected %f", v, got, e);
  endtask

  initial begin
    int t0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (phase == PH_SWITCH);
    $display("TDC calibration done at %0t", $realtime);
    wait (phase == PH_VCAL);
    $display("alignment done at %0t: odelay %0d, failed %0b", $realtime, odelay_tap, align_failed);
    checks++;
    if (align_failed) failures++;
    wait (phase == PH_MEASURE);
    $display("voltage calibration done at %0t", $realtime);
    for (int k = 0; k <= 10; k++) measure_dc(0.4 + 0.1 * k, 10);
    // warm up: everything 3% slower
    set_scale(1.03);
    repeat (3 * GATE_TB + 200) @(negedge clk);
    checks += 2;
    if (real'(ratio) < 1.025 * 16384.0 || real'(ratio) > 1.035 * 16384.0) begin
      failures++; $display("online ratio %0d", ratio);
    end
    if (idelay_tap > 9'd63) begin failures++; $display("idelay %0d not reduced", idelay_tap); end
    $display("after warm-up: ratio %0d, f_online %0d, f_reference %0d, idelay %0d", ratio, f_online, f_ref, idelay_tap);
    checks++;
    if (!f_ref_ok || f_online >= f_ref) begin failures++; $display("reference count missing or not above the warm count"); end
    for (int k = 0; k <= 10; k++) measure_dc(0.4 + 0.1 * k, 12);
    // every mechanism must have happened
    $display("ro hits %0d, search steps %0d, servo steps %0d, triangle cycles %0d, online %0d, tracking %0d, samples %0d",
             n_ro_hits, n_search, n_servo, n_tri, n_online, n_track, n_meas);
    checks += 7;
    if (n_ro_hits == 0) failures++;
    if (n_search == 0) failures++;
    if (n_servo == 0) failures++;
    if (n_tri == 0) failures++;
    if (n_online == 0) failures++;
    if (n_track == 0) failures++;
    if (n_meas == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
