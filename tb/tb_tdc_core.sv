`timescale 1ps / 1fs
// Testbench of tdc_core with its four behavioural delay lines. A hit pulse is
// placed so that it rises dr ps and falls df ps before one sampling edge. The
// core must report both edges exactly 6 clock edges later and nowhere else,
// at positions close to (L - d)/1.8 samples, where L = 480 * 3.6 ps is the
// nominal line length and 1.8 ps the nominal sample spacing (within 40
// samples, the spread of the modelled element delays), and a later edge must
// never get a smaller code.
module tb_tdc_core;
  localparam real HALF = 833.333;
  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0;
  logic rv, fv;
  logic [9:0] rc, fc;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_rv = 0, n_fv = 0, last_r_cyc = -1, last_rc, last_fc;

  tdc_core dut (.clk, .rst_n, .hit, .rise_valid(rv), .rise_code(rc), .fall_valid(fv), .fall_code(fc));

  always #(HALF) clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rv) begin n_rv++; last_r_cyc = cyc; last_rc = int'(rc); end
    if (fv) begin n_fv++; last_fc = int'(fc); end
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse before the sampling edge that follows; returns the codes
  task automatic shot(input real dr, input real df, output int r, output int f);
    int cap;
    @(posedge clk);                       // t0
    repeat (2) @(posedge clk);
    n_rv = 0; n_fv = 0;
    // next rising edge is at now + 2*HALF
    #(2.0 * HALF - dr);
    hit = 1'b1;
    #(dr - df);
    hit = 1'b0;
    @(posedge clk);
    #1;
    cap = cyc;
    repeat (12) @(posedge clk);
    #1;
    checks += 3;
    if (n_rv != 1 || n_fv != 1) begin
      failures++;
      $display("dr=%f df=%f: %0d rising, %0d falling results", dr, df, n_rv, n_fv);
    end
    if (last_r_cyc - cap != 6) begin failures++; $display("latency %0d", last_r_cyc - cap); end
    r = last_rc; f = last_fc;
    if (r >= f) begin failures++; $display("order %0d %0d", r, f); end
  endtask

  initial begin
    int r, f, pr, pf;
    real el, er, ef;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    el = 480.0 * 3.6;
    pr = -1000; pf = -1000;
    for (int n = 0; n < 24; n++) begin
      real dr, df;
      dr = 1500.0 - 50.0 * n;
      df = dr - 300.0;
      if (df < 150.0) df = 150.0;
      shot(dr, df, r, f);
      er = (el - dr) / 1.8;
      ef = (el - df) / 1.8;
      checks += 3;
      if (real'(r) < er - 40.0 || real'(r) > er + 40.0) begin failures++; $display("rise %0d expected about %f", r, er); end
      if (real'(f) < ef - 40.0 || real'(f) > ef + 40.0) begin failures++; $display("fall %0d expected about %f", f, ef); end
      if (r < pr) begin failures++; $display("rise code went back %0d -> %0d", pr, r); end
      pr = r;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
