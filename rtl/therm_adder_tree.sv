`timescale 1ps / 1fs
// Pipelined ones-counter of the thermometer code (encoder stages 0 to n-1).
//
// The thermometer code of a delay line is split into groups of 8 samples and
// the ones of every group are counted by a tree of adders, one register stage
// per level: stage 0 adds neighbouring bits (0..2), stage n-2 adds pairs of
// those (0..4), stage n-1 adds pairs again (0..8). The result S(n-1,i) of
// group i feeds the edge detector. Counting instead of searching makes the
// code tolerant of bubbles, single samples out of order.
// Interface: clk, rst_n (clears only the valid pipeline), therm/in_valid in, sums/out_valid out, latency 3 cycles, one code
// per cycle. Structure and group size follow the document; the register after
// every level is this design's choice.
module therm_adder_tree #(
  parameter int unsigned N_BITS = 960
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [N_BITS-1:0]          therm,
  output logic                       out_valid,
  output logic [N_BITS/8-1:0][3:0]   sums
);

  localparam int unsigned N2 = N_BITS / 2;
  localparam int unsigned N4 = N_BITS / 4;
  localparam int unsigned N8 = N_BITS / 8;

  logic [N2-1:0][1:0] s2;
  logic [N4-1:0][2:0] s4;
  logic [2:0]         vld;

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N2); i++)
      s2[i] <= {1'b0, therm[2*i]} + {1'b0, therm[2*i+1]};
    for (int i = 0; i < int'(N4); i++)
      s4[i] <= {1'b0, s2[2*i]} + {1'b0, s2[2*i+1]};
    for (int i = 0; i < int'(N8); i++)
      sums[i] <= {1'b0, s4[2*i]} + {1'b0, s4[2*i+1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end

  assign out_valid = vld[2];

endmodule
