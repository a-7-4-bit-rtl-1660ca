`timescale 1ps / 1fs
// Testbench of tap_reorder: random O/C sample vectors; every thermometer bit
// is checked against the sampling point it must come from (index 0 = longest
// delay; even sampling points are the inverted O samples, odd ones C).
module tb_tap_reorder;
  localparam int NE = 480;
  logic [NE-1:0]   o_q, c_q;
  logic [2*NE-1:0] therm;
  int checks = 0, failures = 0;

  tap_reorder #(.N_ELEM(NE)) dut (.o_q, .c_q, .therm);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < NE; k++) begin
        o_q[k] = 1'($urandom);
        c_q[k] = 1'($urandom);
      end
      #1;
      for (int b = 0; b < 2*NE; b++) begin
        int sp;
        logic exp_bit;
        sp = 2*NE - 1 - b;                   // sampling point along the line
        exp_bit = (sp % 2 == 0) ? ~o_q[sp/2] : c_q[sp/2];
        checks++;
        if (therm[b] !== exp_bit) begin
          failures++;
          if (failures < 5) $display("mismatch bit %0d", b);
        end
      end
    end
    // a hit that reached the first k elements gives ones at the top end
    for (int k = 0; k < NE; k++) begin
      o_q[k] = (k >= 100) ? 1'b1 : 1'b0;     // O = ~CI
      c_q[k] = (k < 100) ? 1'b1 : 1'b0;
    end
    #1;
    checks++;
    if (therm !== {{200{1'b1}}, {(2*NE-200){1'b0}}}) begin
      failures++;
      $display("thermometer order wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
