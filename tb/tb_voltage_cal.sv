`timescale 1ps / 1fs
// Testbench of voltage_cal (20000 calibration edges per table). A stand-in
// converter maps a voltage v in [0,1) to a falling-edge time that grows with
// v and a rising-edge time that shrinks with v, both non-linear. During
// calibration v is uniformly distributed, as for a triangular wave. Afterwards
// the output for a known v must be within 12 LSB of v*1024, must match the
// value computed from the codes actually taken within one LSB, and must come
// two cycles after the times.
module tb_voltage_cal;
  localparam int NC = 20000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rv = 1'b0, fv = 1'b0;
  logic [9:0] rt = '0, ft = '0;
  logic busy, done, av;
  logic [9:0] adc;
  int checks = 0, failures = 0;
  int h_r [1024], h_f [1024];

  voltage_cal #(.T_W(10), .V_W(10), .N_CYCLES(NC)) dut (
    .clk, .rst_n, .start, .rise_valid(rv), .rise_t(rt), .fall_valid(fv), .fall_t(ft),
    .busy, .done, .adc_valid(av), .adc_out(adc));

  always #833.333 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int t_fall(real v);
    return 100 + int'(700.0 * (1.0 - $exp(-2.2 * v)) / (1.0 - $exp(-2.2)));
  endfunction
  function automatic int t_rise(real v);
    return 900 - int'(600.0 * $sqrt(v));
  endfunction

  initial begin
    foreach (h_r[i]) begin h_r[i] = 0; h_f[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      real v;
      @(negedge clk);
      v = real'($urandom_range(0, 99999)) / 100000.0;
      rt = 10'(t_rise(v)); ft = 10'(t_fall(v));
      rv = 1'b1; fv = 1'b1;
      #1;
      if (dut.u_rise.take) h_r[rt]++;
      if (dut.u_fall.take) h_f[ft]++;
    end
    @(negedge clk); rv = 1'b0; fv = 1'b0;
    for (int n = 0; n < 200; n++) begin
      real v, cr, cf, er, ef;
      int exact;
      v = (n + 0.5) / 200.0;
      @(negedge clk);
      rt = 10'(t_rise(v)); ft = 10'(t_fall(v)); rv = 1'b1; fv = 1'b1;
      @(negedge clk);
      rv = 1'b0; fv = 1'b0;
      checks++;
      if (av) begin failures++; $display("output one cycle early"); end
      @(negedge clk);
      cr = 0.0; cf = 0.0;
      for (int j = 0; j < int'(rt); j++) cr += h_r[j];
      for (int j = 0; j < int'(ft); j++) cf += h_f[j];
      er = 1023.0 - $floor((cr + h_r[rt] / 2.0) * 1024.0 / NC);
      ef = $floor((cf + h_f[ft] / 2.0) * 1024.0 / NC);
      exact = (int'(er) + int'(ef) + 1) / 2;
      checks += 3;
      if (!av) begin failures++; $display("no output"); end
      if (int'(adc) < exact - 1 || int'(adc) > exact + 1) begin
        failures++; $display("v=%f: %0d exact %0d", v, adc, exact);
      end
      if (real'(adc) < v * 1024.0 - 12.0 || real'(adc) > v * 1024.0 + 12.0) begin
        failures++; $display("v=%f: %0d expected about %f", v, adc, v * 1024.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
