`timescale 1ps / 1fs
// Testbench of bin_by_bin_cal (20000 hits per edge direction). A model delay
// line with uneven bins is hit at uniformly random times: the bin boundaries
// are fixed here, every random time is turned into its code, and after the
// calibration each code must read back the time of its bin centre (units of
// T/1024) within 14 LSB (about 3 sigma for 20000 hits). Rising and
// falling codes use different lines, so the two tables must differ. The
// codes actually taken are also histogrammed here, and every entry must match
// the exact value from that histogram within one LSB.
module tb_bin_by_bin_cal;
  localparam int NH = 20000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic rv = 1'b0, fv = 1'b0;
  logic [9:0] rc, fc;
  logic busy, done, rtv, ftv;
  logic [9:0] rt, ft;
  int checks = 0, failures = 0;
  real edge_r [0:64];   // bin boundaries in units of T/1024: 64 codes
  real edge_f [0:64];
  int  h_r [64], h_f [64];

  bin_by_bin_cal #(.CODE_W(10), .N_HITS(NH)) dut (
    .clk, .rst_n, .start, .rise_valid(rv), .rise_code(rc), .fall_valid(fv), .fall_code(fc),
    .busy, .done, .rise_t_valid(rtv), .rise_t(rt), .fall_t_valid(ftv), .fall_t(ft));

  always #833.333 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code_of(input real t, input bit fall);
    for (int i = 0; i < 64; i++)
      if (t < (fall ? edge_f[i+1] : edge_r[i+1])) return 100 + 3 * i;   // sparse codes
    return 100 + 3 * 63;
  endfunction

  initial begin
    real w;
    // uneven bins covering 0..1024
    edge_r[0] = 0.0; edge_f[0] = 0.0;
    for (int i = 1; i <= 64; i++) begin
      edge_r[i] = edge_r[i-1] + ((i % 5 == 0) ? 28.0 : 12.0);
      edge_f[i] = edge_f[i-1] + ((i % 3 == 0) ? 6.0 : 20.0);
    end
    w = edge_r[64]; for (int i = 0; i <= 64; i++) edge_r[i] = edge_r[i] * 1024.0 / w;
    w = edge_f[64]; for (int i = 0; i <= 64; i++) edge_f[i] = edge_f[i] * 1024.0 / w;
    rc = '0; fc = '0;
    foreach (h_r[i]) begin h_r[i] = 0; h_f[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      @(negedge clk);
      rv = ($urandom_range(0, 1) == 1);
      fv = ($urandom_range(0, 2) != 0);
      rc = 10'(code_of(real'($urandom_range(0, 1023999)) / 1000.0, 1'b0));
      fc = 10'(code_of(real'($urandom_range(0, 1023999)) / 1000.0, 1'b1));
      #1;
      if (dut.u_rise.take) h_r[(int'(rc) - 100) / 3]++;
      if (dut.u_fall.take) h_f[(int'(fc) - 100) / 3]++;
    end
    checks++;
    if (busy) failures++;
    for (int i = 0; i < 64; i++) begin
      real er, ef, xr, xf, cr, cf;
      @(negedge clk);
      rv = 1'b1; fv = 1'b1;
      rc = 10'(100 + 3 * i); fc = 10'(100 + 3 * i);
      @(negedge clk);
      rv = 1'b0; fv = 1'b0;
      er = (edge_r[i] + edge_r[i+1]) / 2.0;
      ef = (edge_f[i] + edge_f[i+1]) / 2.0;
      cr = 0.0; cf = 0.0;
      for (int j = 0; j < i; j++) begin cr += h_r[j]; cf += h_f[j]; end
      xr = (cr + h_r[i] / 2.0) * 1024.0 / NH;
      xf = (cf + h_f[i] / 2.0) * 1024.0 / NH;
      checks += 5;
      if (real'(rt) < xr - 1.0 || real'(rt) > xr + 1.0) begin
        failures++; $display("rise code %0d: %0d exact %f", i, rt, xr);
      end
      if (real'(ft) < xf - 1.0 || real'(ft) > xf + 1.0) begin
        failures++; $display("fall code %0d: %0d exact %f", i, ft, xf);
      end
      if (!rtv || !ftv) failures++;
      if (real'(rt) < er - 14.0 || real'(rt) > er + 14.0) begin
        failures++; $display("rise code %0d: %0d expected %f", i, rt, er);
      end
      if (real'(ft) < ef - 14.0 || real'(ft) > ef + 14.0) begin
        failures++; $display("fall code %0d: %0d expected %f", i, ft, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
