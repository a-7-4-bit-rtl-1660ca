`timescale 1ps / 1fs
// Behavioural model (not synthesizable) of one tapped delay line with its
// DFF bank.
//
// In the FPGA the line is a chain of N_CARRY8 CARRY8 primitives (8 multiplexer
// elements each, DI = 0, S = 1, carry out of one feeding CI of the next) with
// the hit on CI of the first. A flip-flop captures every carry output C and
// every XOR output O on each rising clock edge. O of an element equals the
// inverted carry entering it, so each element gives two sampling points.
// The model gives every element a fixed pseudo-random delay between 0.4 and
// 1.6 times TAP_PS (mean TAP_PS = 3.6 ps) and samples O between 0.2 and 1.3
// element delays after the element input, so that O sometimes lands after C:
// these out-of-order samples are the bubbles the encoder must tolerate.
// The hit's recent edges are kept in a short history; at every clock edge
// sample j holds the hit level at (now - delay_j), or the oldest kept level
// if that time is older than the whole history. Outputs change only at the
// clock edge, like the DFF bank. 60 CARRY8 and the mean delay follow the
// document; the spread of the delays is this model's own, and SEED selects
// one line of a set. The real variable delay_scale (1.0 by default) scales
// every delay to emulate temperature.
module tdl_model #(
  parameter int unsigned N_CARRY8 = 60,
  parameter real         TAP_PS   = 3.6,
  parameter int unsigned SEED     = 1
) (
  input  logic                  clk,
  input  logic                  hit,
  output logic [8*N_CARRY8-1:0] o_q,
  output logic [8*N_CARRY8-1:0] c_q
);

  localparam int unsigned NE = 8 * N_CARRY8;
  localparam int unsigned NH = 16;             // edge history depth

  real delay_scale = 1.0;

  real d_o [NE];    // delay from the line input to the O sampling point
  real d_c [NE];    // delay from the line input to the C sampling point

  real  h_time [NH];
  logic h_val  [NH];
  int unsigned h_wr;

  initial begin
    int unsigned lfsr;
    real cum, de;
    lfsr = 32'h1234_5678 ^ (SEED * 32'h9E37_79B9);
    cum  = 0.0;
    for (int k = 0; k < int'(NE); k++) begin
      lfsr = lfsr * 32'd1664525 + 32'd1013904223;
      de   = TAP_PS * (0.4 + 1.2 * real'(lfsr >> 8) / 16777216.0);
      lfsr = lfsr * 32'd1664525 + 32'd1013904223;
      d_o[k] = cum + de * (0.2 + 1.1 * real'(lfsr >> 8) / 16777216.0);
      cum    = cum + de;
      d_c[k] = cum;
    end
    for (int i = 0; i < int'(NH); i++) begin
      h_time[i] = -1.0e9;
      h_val[i]  = 1'b0;
    end
    h_wr = 0;
  end

  always @(hit) begin
    h_wr = (h_wr + 1) % NH;
    h_time[h_wr] = $realtime;
    h_val[h_wr]  = hit;
  end

  // At every clock edge the sample times are visited in line order; a cursor
  // into the edge history walks to the newest edge not after each sample time.
  always @(posedge clk) begin
    real now, t;
    int unsigned idx, nx;
    logic [NE-1:0] o_v, c_v;
    now = $realtime;
    idx = h_wr;
    for (int k = 0; k < int'(NE); k++) begin
      t = now - d_o[k] * delay_scale;
      for (int n = 0; n < int'(NH) - 1 && h_time[idx] > t; n++) idx = (idx + NH - 1) % NH;
      nx = (idx + 1) % NH;
      while (idx != h_wr && h_time[nx] <= t) begin idx = nx; nx = (idx + 1) % NH; end
      o_v[k] = ~h_val[idx];
      t = now - d_c[k] * delay_scale;
      for (int n = 0; n < int'(NH) - 1 && h_time[idx] > t; n++) idx = (idx + NH - 1) % NH;
      nx = (idx + 1) % NH;
      while (idx != h_wr && h_time[nx] <= t) begin idx = nx; nx = (idx + 1) % NH; end
      c_v[k] = h_val[idx];
    end
    o_q <= o_v;
    c_q <= c_v;
  end

endmodule
