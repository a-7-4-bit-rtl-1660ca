`timescale 1ps / 1fs
// Testbench of align_cal with a stand-in TDC: the pulse centre moves by 3
// samples per output-delay tap (200 + 3*tap), the pulse is 300 samples wide
// and is only visible from tap 24 on, and results come 7 cycles late, like
// the real TDC core. The aligner must search past the invisible taps, servo
// the centre into 480 +- 8 and report done; with the pulse never visible it
// must report fail. Tracking must set the input delay to
// round((odelay + 64) * f_on/f_off) - odelay.
module tb_align_cal;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, track = 1'b0;
  logic rv, fv;
  logic [9:0] rc, fc;
  logic [15:0] ratio = 16'd16384;
  logic [8:0] odelay, idelay;
  logic done, fail;
  bit visible_ever = 1'b1;
  int checks = 0, failures = 0;
  logic [6:0]      pv_q;
  logic [6:0][9:0] pr_q, pf_q;

  align_cal #(.TARGET(480), .TOL(8)) dut (
    .clk, .rst_n, .start, .rise_valid(rv), .rise_code(rc), .fall_valid(fv), .fall_code(fc),
    .ratio_on_off(ratio), .track, .odelay_tap(odelay), .idelay_tap(idelay), .done, .fail);

  always #833.333 clk = ~clk;

  function automatic int exp_id(input logic [8:0] od, input logic [15:0] r);
    int v;
    v = ((int'(od) + 64) * int'(r) + 8192) / 16384 - int'(od);
    return v < 0 ? 0 : (v > 511 ? 511 : v);
  endfunction

  // stand-in TDC with a 7-cycle pipeline
  always_ff @(posedge clk) begin
    int c;
    c = 200 + 3 * int'(odelay);
    pv_q <= {pv_q[5:0], visible_ever && odelay >= 24 && c - 150 >= 10 && c + 150 <= 950};
    pr_q <= {pr_q[5:0], 10'(c - 150 + $urandom_range(0, 2))};
    pf_q <= {pf_q[5:0], 10'(c + 150 - $urandom_range(0, 2))};
  end
  assign rv = pv_q[6];
  assign fv = pv_q[6];
  assign rc = pr_q[6];
  assign fc = pf_q[6];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    pv_q = '0; pr_q = '0; pf_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (idelay != 9'd64) failures++;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done && !fail) @(negedge clk);
    c = 200 + 3 * int'(odelay);
    checks += 2;
    if (!done) begin failures++; $display("alignment failed"); end
    if (c < 480 - 8 - 3 || c > 480 + 8 + 3) begin failures++; $display("centre %0d", c); end
    // tracking
    track = 1'b1;
    ratio = 16'(int'(0.9 * 16384));
    repeat (3) @(negedge clk);
    checks++;
    if (int'(idelay) != exp_id(odelay, ratio)) begin failures++; $display("idelay %0d", idelay); end
    ratio = 16'(int'(1.1 * 16384));
    repeat (3) @(negedge clk);
    checks++;
    if (int'(idelay) != exp_id(odelay, ratio)) begin failures++; $display("idelay %0d", idelay); end
    track = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (idelay != 9'd64) failures++;
    // no pulse anywhere: must fail
    visible_ever = 1'b0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done && !fail) @(negedge clk);
    checks++;
    if (!fail) begin failures++; $display("no failure without a pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
