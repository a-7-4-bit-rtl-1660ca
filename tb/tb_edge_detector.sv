`timescale 1ps / 1fs
// Testbench of edge_detector. The group sums are built by the testbench from
// explicit thermometer codes: pulses 0..1..0 (rising then falling), gaps
// 1..0..1 (falling then rising), codes with a bubble next to an edge, and the
// group sums of the document's example (1, 7, 8, 8, 0), for which the
// positions must be 1x8+8 and 4x8+8. Latency must be 2 cycles.
module tb_edge_detector;
  localparam int NG = 120;
  localparam int NB = NG * 8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [NG-1:0][3:0] sums;
  logic out_valid, rise_valid, fall_valid;
  logic [9:0] rise_pos, fall_pos;
  int checks = 0, failures = 0;

  edge_detector #(.N_GROUPS(NG), .POS_W(10)) dut (
    .clk, .rst_n, .in_valid, .sums, .out_valid,
    .rise_valid, .rise_pos, .fall_valid, .fall_pos);

  always #833.333 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NG-1:0][3:0] group_sums(logic [NB-1:0] t);
    logic [NG-1:0][3:0] s;
    for (int g = 0; g < NG; g++) s[g] = 4'($countones(t[g*8 +: 8]));
    return s;
  endfunction

  // apply one code, wait for the result (2 cycles), return it
  task automatic run(input logic [NG-1:0][3:0] s,
                     output logic rv, output int rp, output logic fv, output int fp);
    @(negedge clk);
    sums = s;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (out_valid !== 1'b0) failures++;      // not yet after one cycle
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b1) begin
      failures++;
      $display("latency wrong");
    end
    rv = rise_valid; rp = int'(rise_pos);
    fv = fall_valid; fp = int'(fall_pos);
  endtask

  task automatic expect_edges(input logic [NB-1:0] t, input int er, input int ef, input int tol);
    logic rv, fv;
    int rp, fp;
    run(group_sums(t), rv, rp, fv, fp);
    checks++;
    if (!rv || rp < er - tol || rp > er + tol) begin
      failures++;
      $display("rise: expected %0d got valid=%0b pos=%0d", er, rv, rp);
    end
    checks++;
    if (!fv || fp < ef - tol || fp > ef + tol) begin
      failures++;
      $display("fall: expected %0d got valid=%0b pos=%0d", ef, fv, fp);
    end
  endtask

  initial begin
    logic [NB-1:0] t;
    logic [NG-1:0][3:0] s;
    logic rv, fv;
    int rp, fp;
    sums = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // the document's example: stage n-1 = 1, 7, 8, 8, 0 from group 1 on
    s = '0;
    s[1] = 4'd1; s[2] = 4'd7; s[3] = 4'd8; s[4] = 4'd8;
    run(s, rv, rp, fv, fp);
    checks += 2;
    if (!rv || rp != 1*8+8) begin failures++; $display("example rise %0d", rp); end
    if (!fv || fp != 4*8+8) begin failures++; $display("example fall %0d", fp); end

    // clean pulses: rising at a, falling at b (first zero after the ones)
    for (int n = 0; n < 300; n++) begin
      int a, b;
      a = $urandom_range(9, NB - 200);
      b = $urandom_range(a + 20, NB - 9);
      for (int i = 0; i < NB; i++) t[i] = (i >= a && i < b);
      expect_edges(t, a, b, 0);
    end
    // clean gaps: falling at a, rising at b
    for (int n = 0; n < 200; n++) begin
      int a, b;
      a = $urandom_range(9, NB - 200);
      b = $urandom_range(a + 20, NB - 9);
      for (int i = 0; i < NB; i++) t[i] = !(i >= a && i < b);
      expect_edges(t, b, a, 0);
    end
    // pulses with a bubble right after each edge
    for (int n = 0; n < 200; n++) begin
      int a, b;
      a = $urandom_range(9, NB - 200);
      b = $urandom_range(a + 20, NB - 12);
      for (int i = 0; i < NB; i++) t[i] = (i >= a && i < b);
      t[a+1] = 1'b0;
      t[b+1] = 1'b1;
      expect_edges(t, a, b, 2);
    end
    // no transition at all
    run('0, rv, rp, fv, fp);
    checks++;
    if (rv || fv) begin failures++; $display("edge found in a flat code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
