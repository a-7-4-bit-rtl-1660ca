`timescale 1ps / 1fs
// Testbench of code_density_table (64 entries, 5000 samples). Codes with a
// skewed distribution, including runs of the same code in consecutive
// cycles, are histogrammed here as well; after the build every Table B entry
// must equal (F(i-1) + h(i)/2) * 1024 / N within one LSB, the mirrored
// instance must give 1023 minus it, lookups must come one cycle after the
// code, and the build must take 2^ADDR_W + 2 to + 4 cycles after the last
// sample. A second start must clear the histogram.
module tb_code_density_table;
  localparam int AW = 6, OW = 10, NS = 5000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sv = 1'b0;
  logic [AW-1:0] code;
  logic busy, ready, ov, busy_i, ready_i, ov_i;
  logic [OW-1:0] val, val_i;
  int checks = 0, failures = 0;
  int hist [1 << AW];

  code_density_table #(.ADDR_W(AW), .COUNT_W(16), .OUT_W(OW), .N_SAMPLES(NS), .INVERT(1'b0)) dut (
    .clk, .rst_n, .start, .sample_valid(sv), .sample_code(code),
    .busy, .ready, .out_valid(ov), .out_value(val));
  code_density_table #(.ADDR_W(AW), .COUNT_W(16), .OUT_W(OW), .N_SAMPLES(NS), .INVERT(1'b1)) dut_i (
    .clk, .rst_n, .start, .sample_valid(sv), .sample_code(code),
    .busy(busy_i), .ready(ready_i), .out_valid(ov_i), .out_value(val_i));

  always #833.333 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input int seed_shift);
    int sent, run_len, c, cyc;
    foreach (hist[i]) hist[i] = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    sent = 0; run_len = 0; c = 0;
    // keep offering codes until the table stops taking them
    while (sent < NS) begin
      @(negedge clk);
      if (!busy) break;
      sv = ($urandom_range(0, 3) != 0);
      if (run_len == 0) begin
        // skewed: low codes more likely, codes 40..47 never
        c = $urandom_range(0, 63) & $urandom_range(0, 63);
        if (c >= 40 && c < 48) c = c - 8;
        c = (c + seed_shift) % 64;
        run_len = $urandom_range(1, 4);
      end
      code = AW'(c);
      run_len--;
      // the table takes codes only while collecting: after CLEAR
      #1;
      if (dut.take) begin
        hist[c]++;
        sent++;
      end
    end
    @(negedge clk); sv = 1'b0;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < (1 << AW) + 1 || cyc > (1 << AW) + 5) begin
      failures++;
      $display("build took %0d cycles", cyc);
    end
  endtask

  task automatic check_table();
    real f, e;
    f = 0.0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      sv = 1'b1; code = AW'(i);
      @(negedge clk);
      sv = 1'b0;
      e = (f + hist[i] / 2.0) * 1024.0 / NS;
      if (e > 1023.0) e = 1023.0;
      f += hist[i];
      checks += 3;
      if (!ov || !ov_i) begin failures++; $display("no out_valid"); end
      if (real'(val) < e - 1.0 || real'(val) > e + 1.0) begin
        failures++;
        $display("entry %0d: %0d expected %f", i, val, e);
      end
      if (int'(val_i) != 1023 - int'(val)) begin failures++; $display("mirror %0d", i); end
    end
  endtask

  initial begin
    code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (ready || busy) failures++;
    fill(0);
    check_table();
    fill(17);
    check_table();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
