`timescale 1ps / 1fs
// Simulation stand-in for a programmable input or output delay primitive:
// the output follows the input after tap * TAP_PS * delay_scale picoseconds
// (transport delay). delay_scale (1.0 by default) emulates temperature.
module tap_delay_model #(
  parameter real         TAP_PS = 5.0,
  parameter int unsigned TAP_W  = 9
) (
  input  logic             din,
  input  logic [TAP_W-1:0] tap,
  output logic             dout
);
  real delay_scale = 1.0;
  initial dout = 1'b0;
  always @(din) dout <= #(real'(tap) * TAP_PS * delay_scale + 1.0) din;
endmodule
