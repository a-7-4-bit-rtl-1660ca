`timescale 1ps / 1fs
// Voltage calibration and output averaging.
//
// The edge times still depend non-linearly on the input voltage (RC slope,
// comparator, residual TDC errors). During calibration a triangular wave, which
// spends the same time at every voltage, is applied; the code density of the
// rising-edge times and of the falling-edge times then gives, for every time
// code, the fraction of the triangle's span below it, i.e. its voltage. One
// code_density_table per edge builds that lookup table from N_CYCLES edges.
// The rising edge comes earlier for a higher input, so its table is mirrored.
// Afterwards every pair of edges is turned into two voltage codes, and the
// converter output is their mean, rounded: adc_out follows the times by two
// cycles (lookup, average). 0 is the bottom and 2^V_W-1 the top of the
// triangle used for calibration.
// Lookup tables per edge, built from a triangular input after 1,024,000
// cycles, and the mean of the two edges follow the document; building them by
// code density and the output scale are this design's choices.
module voltage_cal #(
  parameter int unsigned T_W      = 10,
  parameter int unsigned V_W      = 10,
  parameter int unsigned N_CYCLES = 1024000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           rise_valid,
  input  logic [T_W-1:0] rise_t,
  input  logic           fall_valid,
  input  logic [T_W-1:0] fall_t,
  output logic           busy,
  output logic           done,
  output logic           adc_valid,
  output logic [V_W-1:0] adc_out
);

  logic           r_ready, f_ready, r_busy, f_busy;
  logic           vr_valid, vf_valid;
  logic [V_W-1:0] vr, vf;

  code_density_table #(
    .ADDR_W(T_W), .COUNT_W(21), .OUT_W(V_W), .N_SAMPLES(N_CYCLES), .INVERT(1'b1)
  ) u_rise (
    .clk, .rst_n, .start,
    .sample_valid(rise_valid), .sample_code(rise_t),
    .busy(r_busy), .ready(r_ready),
    .out_valid(vr_valid), .out_value(vr)
  );

  code_density_table #(
    .ADDR_W(T_W), .COUNT_W(21), .OUT_W(V_W), .N_SAMPLES(N_CYCLES), .INVERT(1'b0)
  ) u_fall (
    .clk, .rst_n, .start,
    .sample_valid(fall_valid), .sample_code(fall_t),
    .busy(f_busy), .ready(f_ready),
    .out_valid(vf_valid), .out_value(vf)
  );

  assign busy = r_busy | f_busy;
  assign done = r_ready & f_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_valid <= 1'b0;
      adc_out   <= '0;
    end else begin
      adc_valid <= done & vr_valid & vf_valid;
      adc_out   <= V_W'(({1'b0, vr} + {1'b0, vf} + 1'b1) >> 1);
    end
  end

endmodule
