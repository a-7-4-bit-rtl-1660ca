`timescale 1ps / 1fs
// TDC bin-by-bin calibration.
//
// The widths of the delay-line bins differ a lot in an FPGA, so the TDC code
// is not proportional to time. With the ring oscillator as the TDC input the
// edges arrive at random phases of the clock, every instant of the period is
// equally likely, and the number of hits a code collects is proportional to
// the width of its bin (code density test). This block runs that test
// separately for rising and falling edge codes (the delay line propagates the
// two directions at different speeds), N_HITS codes each, and then converts
// every later code into the calibrated time of its bin centre, in units of
// T/2^CODE_W (T = clock period). Both tables come from code_density_table.
// Interface: start pulse; done when both tables are built; the calibrated
// times follow the codes by one cycle and are valid only once done.
// The method and N_HITS = 1,024,000 follow the document; one table pair per
// edge direction is this design's reading of its separate histograms.
module bin_by_bin_cal #(
  parameter int unsigned CODE_W = 10,
  parameter int unsigned N_HITS = 1024000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              rise_valid,
  input  logic [CODE_W-1:0] rise_code,
  input  logic              fall_valid,
  input  logic [CODE_W-1:0] fall_code,
  output logic              busy,
  output logic              done,
  output logic              rise_t_valid,
  output logic [CODE_W-1:0] rise_t,
  output logic              fall_t_valid,
  output logic [CODE_W-1:0] fall_t
);

  logic r_ready, f_ready, r_busy, f_busy;

  code_density_table #(
    .ADDR_W(CODE_W), .COUNT_W(21), .OUT_W(CODE_W), .N_SAMPLES(N_HITS), .INVERT(1'b0)
  ) u_rise (
    .clk, .rst_n, .start,
    .sample_valid(rise_valid), .sample_code(rise_code),
    .busy(r_busy), .ready(r_ready),
    .out_valid(rise_t_valid), .out_value(rise_t)
  );

  code_density_table #(
    .ADDR_W(CODE_W), .COUNT_W(21), .OUT_W(CODE_W), .N_SAMPLES(N_HITS), .INVERT(1'b0)
  ) u_fall (
    .clk, .rst_n, .start,
    .sample_valid(fall_valid), .sample_code(fall_code),
    .busy(f_busy), .ready(f_ready),
    .out_valid(fall_t_valid), .out_value(fall_t)
  );

  assign busy = r_busy | f_busy;
  assign done = r_ready & f_ready;

endmodule
