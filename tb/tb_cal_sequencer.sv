`timescale 1ps / 1fs
// Testbench of cal_sequencer: the phases must come in the order reset, TDC
// calibration (ring oscillator selected, bbb_start and capture_ref pulsed),
// switch (comparator selected, 32 cycles), alignment, voltage calibration,
// measurement, each start pulse lasting one cycle and each phase waiting for
// its done; an alignment failure must be remembered.
module tb_cal_sequencer;
  import slope_adc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bbb_done = 1'b0, align_done = 1'b0, align_fail = 1'b0, vcal_done = 1'b0;
  logic sel_ro, bbb_start, capture_ref, align_start, vcal_start, online_en, measure, align_failed;
  phase_e phase;
  int checks = 0, failures = 0;
  int n_bbb = 0, n_cap = 0, n_al = 0, n_vc = 0;

  cal_sequencer dut (.clk, .rst_n, .bbb_done, .align_done, .align_fail, .vcal_done,
    .sel_ro, .bbb_start, .capture_ref, .align_start, .vcal_start, .online_en, .measure,
    .align_failed, .phase);

  always #833.333 clk = ~clk;
  always @(negedge clk) begin
    n_bbb += int'(bbb_start); n_cap += int'(capture_ref);
    n_al  += int'(align_start); n_vc += int'(vcal_start);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(input phase_e p, input logic ro, input logic m);
    checks += 3;
    if (phase != p) begin failures++; $display("phase %0d expected %0d", phase, p); end
    if (sel_ro != ro) begin failures++; $display("sel_ro wrong in %0d", p); end
    if (measure != m) begin failures++; $display("measure wrong in %0d", p); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_phase(PH_RESET, 1'b1, 1'b0);
    repeat (20) @(negedge clk);
    expect_phase(PH_TDC_CAL, 1'b1, 1'b0);
    checks += 2;
    if (n_bbb != 1 || n_cap != 1) begin failures++; $display("start pulses %0d %0d", n_bbb, n_cap); end
    if (online_en) begin failures++; $display("online_en early"); end
    repeat (100) @(negedge clk);
    expect_phase(PH_TDC_CAL, 1'b1, 1'b0);   // waits for done
    bbb_done = 1'b1;
    @(negedge clk); @(negedge clk);
    expect_phase(PH_SWITCH, 1'b0, 1'b0);
    cyc = 0;
    while (phase == PH_SWITCH) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 30 || cyc > 32) begin failures++; $display("switch %0d cycles", cyc); end
    expect_phase(PH_ALIGN, 1'b0, 1'b0);
    #1;
    checks += 2;
    if (n_al != 1 || !online_en) begin failures++; $display("align start %0d", n_al); end
    repeat (50) @(negedge clk);
    expect_phase(PH_ALIGN, 1'b0, 1'b0);
    align_fail = 1'b1;
    @(negedge clk); @(negedge clk);
    expect_phase(PH_VCAL, 1'b0, 1'b0);
    #1;
    checks += 2;
    if (!align_failed) begin failures++; $display("failure not kept"); end
    if (n_vc != 1) begin failures++; $display("vcal start %0d", n_vc); end
    repeat (50) @(negedge clk);
    expect_phase(PH_VCAL, 1'b0, 1'b0);
    vcal_done = 1'b1;
    @(negedge clk); @(negedge clk);
    expect_phase(PH_MEASURE, 1'b0, 1'b1);
    repeat (50) @(negedge clk);
    expect_phase(PH_MEASURE, 1'b0, 1'b1);
    checks++;
    if (n_bbb != 1 || n_cap != 1 || n_al != 1 || n_vc != 1) begin
      failures++; $display("pulses %0d %0d %0d %0d", n_bbb, n_cap, n_al, n_vc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
