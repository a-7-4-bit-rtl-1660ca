`timescale 1ps / 1fs
// Testbench of online_cal. Ratios stay 1.0 before a reference exists; the
// count after capture_ref becomes f_off; later counts must give
// floor(f_off*2^14/f_on) and floor(f_on*2^14/f_off) within the divider's
// 2*(16+14)+2 cycles; with enable the times must be
// 1024 - ((1024 - t)*ratio >> 14), clamped to 0..1023, one cycle later,
// without enable unchanged.
module tb_online_cal;
  logic clk = 1'b0, rst_n = 1'b0, cap = 1'b0, cv = 1'b0, en = 1'b0;
  logic [15:0] count = '0, f_off;
  logic [15:0] r_off_on, r_on_off;
  logic ref_ok, rv = 1'b0, fv = 1'b0, rcv, fcv;
  logic [9:0] rt = '0, ft = '0, rc, fc;
  int checks = 0, failures = 0;

  online_cal #(.CNT_W(16), .FRAC_W(14), .T_W(10)) dut (
    .clk, .rst_n, .capture_ref(cap), .count, .count_valid(cv), .enable(en),
    .ratio_off_on(r_off_on), .ratio_on_off(r_on_off), .f_off, .ref_ok,
    .rise_valid(rv), .rise_t(rt), .fall_valid(fv), .fall_t(ft),
    .rise_c_valid(rcv), .rise_c(rc), .fall_c_valid(fcv), .fall_c(fc));

  always #833.333 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_count(input int c);
    @(negedge clk); count = 16'(c); cv = 1'b1;
    @(negedge clk); cv = 1'b0;
  endtask

  task automatic check_times(input int ratio, input bit on);
    for (int n = 0; n < 50; n++) begin
      int a, b, ea, eb;
      a = $urandom_range(0, 1023);
      b = (n == 0) ? 0 : (n == 1) ? 1023 : $urandom_range(0, 1023);
      @(negedge clk); rt = 10'(a); ft = 10'(b); rv = 1'b1; fv = (n % 2 == 0); en = on;
      @(negedge clk); rv = 1'b0; fv = 1'b0;
      ea = on ? 1024 - (((1024 - a) * ratio) >> 14) : a;
      eb = on ? 1024 - (((1024 - b) * ratio) >> 14) : b;
      if (ea > 1023) ea = 1023;
      if (eb > 1023) eb = 1023;
      if (ea < 0) ea = 0;
      if (eb < 0) eb = 0;
      checks += 4;
      if (!rcv) failures++;
      if (fcv != (n % 2 == 0)) failures++;
      if (int'(rc) != ea) begin failures++; $display("rise %0d -> %0d expected %0d", a, rc, ea); end
      if (int'(fc) != eb) begin failures++; $display("fall %0d -> %0d expected %0d", b, fc, eb); end
    end
  endtask

  initial begin
    int fo, fn;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pulse_count(3900);                       // no reference requested yet
    repeat (80) @(posedge clk);
    checks += 2;
    if (ref_ok || r_off_on != 16'd16384) failures++;
    if (r_on_off != 16'd16384) failures++;
    check_times(16384, 1'b1);
    @(negedge clk); cap = 1'b1;
    @(negedge clk); cap = 1'b0;
    fo = 3840;
    pulse_count(fo);
    checks += 2;
    @(negedge clk);
    if (!ref_ok || f_off != 16'(fo)) failures++;
    // temperature goes up, count goes down, and back
    foreach (int_list[k]) begin
      fn = int_list[k];
      pulse_count(fn);
      repeat (62) @(posedge clk);
      @(negedge clk);
      checks += 2;
      if (int'(r_off_on) != (fo * 16384) / fn) begin
        failures++; $display("f_off/f_on %0d expected %0d", r_off_on, (fo * 16384) / fn);
      end
      if (int'(r_on_off) != (fn * 16384) / fo) begin
        failures++; $display("f_on/f_off %0d expected %0d", r_on_off, (fn * 16384) / fo);
      end
      check_times((fo * 16384) / fn, 1'b1);
      check_times((fo * 16384) / fn, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int int_list [4] = '{3600, 3700, 3840, 3999};
endmodule
