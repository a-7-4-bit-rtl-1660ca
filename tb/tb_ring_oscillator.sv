`timescale 1ps / 1fs
// Testbench of the ring oscillator model: stopped with Enable = 0 (output 0),
// period 2*(N_LUT1+1)*STAGE_PS with Enable = 1, back to 0 when disabled, and
// the period follows delay_scale.
module tb_ring_oscillator;
  logic en = 1'b0, clk_o;
  int checks = 0, failures = 0;
  real t_last, period;
  int  n_edges;

  ring_oscillator #(.N_LUT1(24), .STAGE_PS(142.0)) dut (.enable(en), .clk_o);

  always @(posedge clk_o) begin
    period = $realtime - t_last;
    t_last = $realtime;
    n_edges++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_period(input real expected);
    n_edges = 0;
    #100000;
    checks += 2;
    if (n_edges < 5) begin failures++; $display("not oscillating"); end
    if (period < expected - 0.01 || period > expected + 0.01) begin
      failures++;
      $display("period %f expected %f", period, expected);
    end
  endtask

  initial begin
    t_last = 0.0; n_edges = 0;
    #20000;
    checks++;
    if (clk_o !== 1'b0 || n_edges != 0) begin failures++; $display("runs while disabled"); end
    en = 1'b1;
    check_period(2.0 * 25.0 * 142.0);
    dut.delay_scale = 1.05;
    #20000;
    check_period(2.0 * 25.0 * 142.0 * 1.05);
    en = 1'b0;
    #20000;
    n_edges = 0;
    #50000;
    checks++;
    if (clk_o !== 1'b0 || n_edges != 0) begin failures++; $display("does not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
