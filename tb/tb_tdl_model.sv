`timescale 1ps / 1fs
// Testbench of the delay-line model. A hit edge placed D ps before a clock
// edge must have reached about D/3.6 elements: the number of ones among the
// captured C samples must be within 10% (+-8) of D/3.6. Holding the hit at 0
// or 1 must give all-0 or all-1 C samples (O inverted), and delay_scale must
// shrink the count accordingly.
module tb_tdl_model;
  localparam real HALF = 833.333;
  logic clk = 1'b0, hit = 1'b0;
  logic [479:0] o_q, c_q;
  int checks = 0, failures = 0;

  tdl_model #(.N_CARRY8(60), .TAP_PS(3.6), .SEED(3)) dut (.clk, .hit, .o_q, .c_q);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real d, input real scale);
    int n, e;
    // hit low for two clock periods, longer than the whole line
    hit = 1'b0;
    repeat (3) begin
      #(HALF);
      clk = 1'b1;
      #(HALF);
      clk = 1'b0;
    end
    #(HALF - d);
    hit = 1'b1;
    #(d);
    clk = 1'b1;
    #1;
    n = $countones(c_q);
    e = int'(d / (3.6 * scale));
    checks++;
    if (n < e - 8 - e / 10 || n > e + 8 + e / 10) begin
      failures++;
      $display("D=%f: %0d elements, expected about %0d", d, n, e);
    end
    #(HALF - 1);
    clk = 1'b0;
  endtask

  initial begin
    // steady levels
    hit = 1'b0;
    repeat (4) begin #(HALF); clk = ~clk; end
    checks += 2;
    if (c_q !== '0 || o_q !== '1) begin failures++; $display("level 0 wrong"); end
    hit = 1'b1;
    repeat (4) begin #(HALF); clk = ~clk; end
    if (c_q !== '1 || o_q !== '0) begin failures++; $display("level 1 wrong"); end
    hit = 1'b0;
    repeat (4) begin #(HALF); clk = ~clk; end
    for (int i = 1; i < 16; i++) one(50.0 * i, 1.0);
    dut.delay_scale = 1.1;
    for (int i = 1; i < 16; i++) one(50.0 * i, 1.1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
