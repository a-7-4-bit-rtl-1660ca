`timescale 1ps / 1fs
// Testbench of therm_adder_tree: random and thermometer-like codes are pushed
// every cycle; each group sum is compared with a popcount of the group, and
// the result must appear exactly 3 cycles after the input.
module tb_therm_adder_tree;
  localparam int NB = 960;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [NB-1:0] therm;
  logic [NB/8-1:0][3:0] sums;
  int checks = 0, failures = 0;
  logic [NB-1:0] hist [$];
  logic          vhist [$];

  therm_adder_tree #(.N_BITS(NB)) dut (.clk, .rst_n, .in_valid, .therm, .out_valid, .sums);

  always #833.333 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    therm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = (n % 7 != 3);
      if (n % 2 == 0) begin
        for (int b = 0; b < NB; b++) therm[b] = 1'($urandom);
      end else begin
        int a, z;
        a = $urandom_range(0, NB-1);
        z = $urandom_range(a, NB-1);
        for (int b = 0; b < NB; b++) therm[b] = (b >= a && b <= z);
      end
      hist.push_back(therm);
      vhist.push_back(in_valid);
      // compare the output of the input given 3 cycles ago
      if (hist.size() > 3) begin
        logic [NB-1:0] old;
        logic          oldv;
        old  = hist.pop_front();
        oldv = vhist.pop_front();
        checks++;
        if (out_valid !== oldv) failures++;
        for (int g = 0; g < NB/8; g++) begin
          checks++;
          if (int'(sums[g]) != $countones(old[g*8 +: 8])) begin
            failures++;
            if (failures < 5) $display("group %0d: %0d", g, sums[g]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
