`timescale 1ps / 1fs
// Testbench of the slope/comparator model. For several DC inputs the clock
// runs until the slope is periodic; then the comparator must fall at
// RC*ln((VU-Vlo)/(VU-A)) after each rising clock edge and rise at
// RC*ln(Vhi/A) after each falling edge, where Vhi = VU/(1+k), Vlo = Vhi*k and
// k = exp(-T/(2RC)) are the periodic extremes of the slope (worked out here,
// independently of the model's step-by-step evaluation). Inputs outside
// 0.3-1.5 V are clamped.
module tb_slope_comparator;
  localparam real HALF = 833.333;
  localparam real RC = 300.0, VU = 1.8;
  logic clk = 1'b0, cmp;
  real  a;
  int checks = 0, failures = 0;
  real t_rise_clk, t_fall_clk, t_cmp_fall, t_cmp_rise;

  slope_comparator dut (.clk600_cal(clk), .analog_in(a), .cmp_out(cmp));

  always #(HALF) clk = ~clk;
  always @(posedge clk) t_rise_clk = $realtime;
  always @(negedge clk) t_fall_clk = $realtime;
  always @(negedge cmp) t_cmp_fall = $realtime - t_rise_clk;
  always @(posedge cmp) t_cmp_rise = $realtime - t_fall_clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, vhi, vlo, ef, er, ac;
    real vin [6];
    vin = '{0.35, 0.6, 0.9, 1.2, 1.45, 1.7};
    k   = $exp(-HALF / RC);
    vhi = VU / (1.0 + k);
    vlo = vhi * k;
    foreach (vin[n]) begin
      a = vin[n];
      repeat (20) @(posedge clk);
      t_cmp_fall = -1.0;
      t_cmp_rise = -1.0;
      repeat (2) @(posedge clk);
      ac = (a > 1.5) ? 1.5 : a;
      ef = RC * $ln((VU - vlo) / (VU - ac));
      er = RC * $ln(vhi / ac);
      checks += 2;
      if (t_cmp_fall < ef - 1.0 || t_cmp_fall > ef + 1.0) begin
        failures++;
        $display("A=%f fall at %f expected %f", a, t_cmp_fall, ef);
      end
      if (t_cmp_rise < er - 1.0 || t_cmp_rise > er + 1.0) begin
        failures++;
        $display("A=%f rise at %f expected %f", a, t_cmp_rise, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
