`timescale 1ps / 1fs
// Dynamic and single-shot tests of the converter, at the reduced calibration
// sizes of tb_fpga_slope_adc (16000 TDC hits, 32000 voltage edges, 4096-cycle
// window). After the start-up calibration with a 0.35-1.45 V triangular
// input, three measurements are made, like the evaluation of the published
// converter:
//   - 4096 single-shot samples of a 1.2 V DC input: the mean must be within
//     10 codes of (V - 0.35) / 1.1 * 1024, the standard deviation at most
//     3.4 codes and the peak-to-peak spread at most 29 codes (1.4 and 12
//     steps of 2.6 mV);
//   - a 1 Vpp sine around 0.9 V at 75/4096 * 600 MHz (about 11 MHz) and at
//     1303/4096 * 600 MHz (about 191 MHz), 4096 cycles each: a three-term
//     least-squares sine fit at the known frequency gives the residual, the
//     signal-to-noise-and-distortion ratio and ENOB = (SINAD - 1.76) / 6.02.
//     The limits (6.3 bits at 11 MHz, 5.0 bits at 191 MHz) hold for this
//     model, which has no noise but reduced calibration tables and an input
//     held over each half clock period. The fitted amplitude must be within
//     5% of 0.5 V / 1.1 V * 1024 * cos(pi * f * T/2): the output averages
//     the two edges, which sample the input about half a period apart.
// Every measurement must deliver samples; the count of each is checked.
module tb_fpga_slope_adc_dynamic;
  import slope_adc_pkg::*;
  localparam real HALF = 833.333;
  localparam real VLO = 0.35, VHI = 1.45;
  localparam real PI = 3.14159265358979;
  localparam int  NREC = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.9;
  logic clk_cal, cmp_out, cmp_dly;
  logic [TAP_W-1:0] odelay_tap, idelay_tap;
  logic adc_valid, align_failed, cal_busy, f_ref_ok;
  logic [VCODE_W-1:0] adc_out;
  logic [FCNT_W-1:0] f_online, f_ref;
  logic [RATIO_W-1:0] ratio;
  phase_e phase;
  int checks = 0, failures = 0;

  fpga_slope_adc #(.N_CAL_TDC(16000), .N_CAL_VOLT(32000), .GATE(4096)) dut (
    .clk600(clk), .rst_n, .analog_in(vin), .clk600_cal(clk_cal), .cmp_out, .cmp_dly,
    .odelay_tap, .idelay_tap, .adc_valid, .adc_out, .f_online, .online_ratio(ratio),
    .f_reference(f_ref), .f_reference_ok(f_ref_ok), .cal_busy, .align_failed, .phase);

  tap_delay_model u_odelay (.din(clk), .tap(odelay_tap), .dout(clk_cal));
  tap_delay_model u_idelay (.din(cmp_out), .tap(idelay_tap), .dout(cmp_dly));

  always #(HALF) clk = ~clk;

  // input generator: triangle during the voltage calibration, then a sine
  // (sine_on) updated every 50 ps, or a DC level
  int  tri_pos = 0;
  localparam int TRI_PERIOD = 7919;
  bit  sine_on = 1'b0;
  real sine_f = 0.0;      // Hz
  always @(posedge clk) begin
    if (phase == PH_VCAL) begin
      int p;
      tri_pos = (tri_pos + 1) % TRI_PERIOD;
      p = (tri_pos < TRI_PERIOD / 2) ? tri_pos : TRI_PERIOD - tri_pos;
      vin = VLO + (VHI - VLO) * real'(p) / real'(TRI_PERIOD / 2);
    end
  end
  always begin
    #50;
    if (sine_on) vin = 0.9 + 0.5 * $sin(2.0 * PI * sine_f * $realtime * 1.0e-12);
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog: phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record NREC cycles: code and cycle index of every valid sample
  real xs [NREC];
  int  ns [NREC];
  int  nrec;
  task automatic record();
    nrec = 0;
    for (int n = 0; n < NREC; n++) begin
      @(negedge clk);
      if (adc_valid) begin xs[nrec] = real'(adc_out); ns[nrec] = n; nrec++; end
    end
    checks++;
    if (nrec < NREC * 9 / 10) begin failures++; $display("only %0d samples in %0d cycles", nrec, NREC); end
  endtask

  function automatic real det3(real a11, real a12, real a13, real a21, real a22, real a23,
                               real a31, real a32, real a33);
    return a11 * (a22 * a33 - a23 * a32) - a12 * (a21 * a33 - a23 * a31) + a13 * (a21 * a32 - a22 * a31);
  endfunction

  // least-squares fit x = a sin(wn) + b cos(wn) + c; returns ENOB
  task automatic sine_test(input int cycles, input real min_enob);
    real exp_amp, w, sss, scc, ssc, ss1, sc1, s11, sxs, sxc, sx1, d, a, b, c, r, rr, amp, sinad, enob;
    sine_f  = real'(cycles) / real'(NREC) * 600.0e6;
    sine_on = 1'b1;
    repeat (200) @(negedge clk);
    record();
    sine_on = 1'b0;
    w = 2.0 * PI * real'(cycles) / real'(NREC);
    sss = 0; scc = 0; ssc = 0; ss1 = 0; sc1 = 0; s11 = 0; sxs = 0; sxc = 0; sx1 = 0;
    for (int k = 0; k < nrec; k++) begin
      real s, co;
      s = $sin(w * ns[k]); co = $cos(w * ns[k]);
      sss += s * s; scc += co * co; ssc += s * co; ss1 += s; sc1 += co; s11 += 1.0;
      sxs += xs[k] * s; sxc += xs[k] * co; sx1 += xs[k];
    end
    d = det3(sss, ssc, ss1, ssc, scc, sc1, ss1, sc1, s11);
    a = det3(sxs, ssc, ss1, sxc, scc, sc1, sx1, sc1, s11) / d;
    b = det3(sss, sxs, ss1, ssc, sxc, sc1, ss1, sx1, s11) / d;
    c = det3(sss, ssc, sxs, ssc, scc, sxc, ss1, sc1, sx1) / d;
    rr = 0;
    for (int k = 0; k < nrec; k++) begin
      r = xs[k] - (a * $sin(w * ns[k]) + b * $cos(w * ns[k]) + c);
      rr += r * r;
    end
    rr = rr / real'(nrec);
    amp = $sqrt(a * a + b * b);
    exp_amp = 0.5 / (VHI - VLO) * 1024.0 * $cos(PI * sine_f * 2.0 * HALF * 1.0e-12 / 2.0);
    sinad = 10.0 * $log10(amp * amp / 2.0 / rr);
    enob = (sinad - 1.76) / 6.02;
    $display("sine %.2f MHz: amplitude %.1f codes (expected %.1f), offset %.1f, rms error %.2f, SINAD %.2f dB, ENOB %.2f",
             sine_f / 1.0e6, amp, exp_amp, c, $sqrt(rr), sinad, enob);
    checks += 2;
    if (enob < min_enob) begin failures++; $display("ENOB below %.1f", min_enob); end
    if (amp < 0.95 * exp_amp || amp > 1.05 * exp_amp) begin
      failures++; $display("amplitude off");
    end
  endtask

  initial begin
    real m, v, e;
    real lo, hi;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (phase == PH_MEASURE);
    // single-shot DC measurement at 1.2 V
    vin = 1.2;
    repeat (100) @(negedge clk);
    record();
    m = 0; lo = 1.0e9; hi = -1.0e9;
    for (int k = 0; k < nrec; k++) begin
      m += xs[k];
      if (xs[k] < lo) lo = xs[k];
      if (xs[k] > hi) hi = xs[k];
    end
    m = m / real'(nrec);
    v = 0;
    for (int k = 0; k < nrec; k++) v += (xs[k] - m) * (xs[k] - m);
    v = $sqrt(v / real'(nrec));
    e = (1.2 - VLO) / (VHI - VLO) * 1024.0;
    $display("DC 1.2 V: mean %.2f (expected %.2f), std %.2f, peak-to-peak %.0f codes", m, e, v, hi - lo);
    checks += 3;
    if (m < e - 10 || m > e + 10) failures++;
    if (v > 3.4) failures++;
    if (hi - lo > 29) failures++;
    // sine inputs
    sine_test(75, 6.3);
    sine_test(1303, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
