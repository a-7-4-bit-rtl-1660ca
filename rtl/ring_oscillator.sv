`timescale 1ps / 1fs
// Behavioural model (not synthesizable) of the LUT ring oscillator.
//
// One LUT2 and an even number N_LUT1 of LUT1 primitives form a ring. The LUT2
// has Enable on I1 and the ring output on I0 and computes O = I1 & ~I0
// (INIT = 4'b0100): with Enable = 1 it inverts, with Enable = 0 it forces 0.
// Each LUT1 is an inverter (INIT = 2'b01). With Enable = 1 the ring has an odd
// number of inversions and oscillates with period 2 * (N_LUT1+1) * STAGE_PS;
// with Enable = 0 every LUT2 output is 0 and, after the even chain, so is clk_o.
// The ring is the random hit source of the TDC code density test and, through
// its frequency, the temperature probe of the online calibration.
// In the FPGA the ring is built from placed LUT primitives; here every LUT is a
// transport delay. The truth tables follow the document; the stage count and
// delay are this design's choice (about 140 MHz). The real variable
// delay_scale (1.0 by default) scales every stage delay, so that a testbench
// can emulate a temperature change.
module ring_oscillator #(
  parameter int unsigned N_LUT1   = 24,     // even
  parameter real         STAGE_PS = 142.0
) (
  input  logic enable,
  output logic clk_o
);

  real delay_scale = 1.0;

  // node[0] = LUT2 output, node[k] = output of LUT1 number k
  logic [N_LUT1:0] node;

  // start in the settled state of a stopped ring: 0 after the LUT2,
  // alternating along the inverters, 0 at the output
  initial begin
    for (int k = 0; k <= int'(N_LUT1); k++) node[k] = k[0];
  end

  always begin
    node[0] <= #(STAGE_PS * delay_scale) (enable & ~node[N_LUT1]);
    @(enable or node[N_LUT1]);
  end

  for (genvar k = 0; k < int'(N_LUT1); k++) begin : g_lut1
    always begin
      node[k+1] <= #(STAGE_PS * delay_scale) ~node[k];
      @(node[k]);
    end
  end

  assign clk_o = node[N_LUT1];

endmodule
