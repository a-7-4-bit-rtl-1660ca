`timescale 1ps / 1fs
// Testbench of freq_counter (window 1024 cycles of 1666.7 ps): an oscillator
// of known period must be counted as window/period within one count, a new
// result must arrive every 1024 cycles, and a slower oscillator must give a
// proportionally lower count.
module tb_freq_counter;
  localparam int GATE = 1024;
  logic clk = 1'b0, rst_n = 1'b0, ro = 1'b0, cv;
  logic [15:0] count;
  real ro_half = 3550.0;
  int checks = 0, failures = 0;

  freq_counter #(.GATE_CYCLES(GATE), .COUNT_W(16)) dut (.clk, .rst_n, .ro, .count, .count_valid(cv));

  always #833.333 clk = ~clk;
  always #(ro_half) ro = ~ro;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_windows(input int n);
    real e;
    int last, cyc;
    e = GATE * 1666.667 / (2.0 * ro_half);
    @(posedge clk iff cv);              // discard a window that straddles a change
    for (int k = 0; k < n; k++) begin
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!cv);
      checks += 2;
      if (cyc != GATE) begin failures++; $display("window %0d cycles", cyc); end
      #1;
      if (real'(count) < e - 1.0 || real'(count) > e + 1.0) begin
        failures++;
        $display("count %0d expected %f", count, e);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_windows(4);
    ro_half = 3550.0 * 1.07;
    check_windows(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
