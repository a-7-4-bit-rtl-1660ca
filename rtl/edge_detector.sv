`timescale 1ps / 1fs
// Edge detector and bubble filter of one delay line (encoder stage n).
//
// Input: the ones count S(n-1,i) of every 8-sample group i of the thermometer
// code. Stage n forms the overlapping sums S(n,i) = S(n-1,i) + S(n-1,i+1),
// the ones among the 16 samples starting at group i. A transition is then
// found by comparing the sums on both sides of i with half of 16:
//   rising  (0s then 1s):  S(n,i+1) > 8 and S(n,i-1) < 8
//   falling (1s then 0s):  S(n,i+1) < 8 and S(n,i-1) > 8
// The lowest i that meets a condition wins. Because a transition is judged
// from counts over 16 samples, a bubble (a lone sample out of order) moves the
// result by at most its own size instead of creating a false edge.
// Position of the edge in samples from the start of the window:
//   falling: Pos = i*8 + S(n,i)        (ones before the step)
//   rising:  Pos = i*8 + 16 - S(n,i)   (zeros before the step)
// Groups beyond either end are copies of the end group, so a step inside the
// first or last 8 samples may be missed.
// The comparisons and the sum follow the document; the document labels the
// two directions the other way round in its pseudo-code and as here in its
// timing diagram, which is followed. Counting zeros for the rising edge is
// this design's choice and gives the same numbers in the document's example.
// Timing: two register stages, latency 2 cycles, one code per cycle.
module edge_detector #(
  parameter int unsigned N_GROUPS = 120,
  parameter int unsigned POS_W    = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N_GROUPS-1:0][3:0]  sums,
  output logic                      out_valid,
  output logic                      rise_valid,
  output logic [POS_W-1:0]          rise_pos,
  output logic                      fall_valid,
  output logic [POS_W-1:0]          fall_pos
);

  // stage n: overlapping sums, 0..16
  logic [N_GROUPS-1:0][4:0] s_n;
  logic [4:0]               s_lo, s_hi;   // S(n,-1) and S(n,N_GROUPS)
  logic                     v_n;

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N_GROUPS) - 1; i++)
      s_n[i] <= {1'b0, sums[i]} + {1'b0, sums[i+1]};
    s_n[N_GROUPS-1] <= {sums[N_GROUPS-1], 1'b0};
    s_lo            <= {sums[0], 1'b0};
    s_hi            <= {sums[N_GROUPS-1], 1'b0};
  end

  // detection: first index meeting each condition
  logic              r_found, f_found;
  logic [POS_W-1:0]  r_pos, f_pos;

  always_comb begin
    logic [4:0] prev, next;
    r_found = 1'b0;
    f_found = 1'b0;
    r_pos   = '0;
    f_pos   = '0;
    for (int i = N_GROUPS - 1; i >= 0; i--) begin
      prev = (i == 0) ? s_lo : s_n[i-1];
      next = (i == int'(N_GROUPS) - 1) ? s_hi : s_n[i+1];
      if (next > 5'd8 && prev < 5'd8) begin
        r_found = 1'b1;
        r_pos   = POS_W'(i * 8 + 16 - int'(s_n[i]));
      end
      if (next < 5'd8 && prev > 5'd8) begin
        f_found = 1'b1;
        f_pos   = POS_W'(i * 8 + int'(s_n[i]));
      end
    end
  end

  always_ff @(posedge clk) begin
    rise_pos <= r_pos;
    fall_pos <= f_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_n        <= 1'b0;
      out_valid  <= 1'b0;
      rise_valid <= 1'b0;
      fall_valid <= 1'b0;
    end else begin
      v_n        <= in_valid;
      out_valid  <= v_n;
      rise_valid <= v_n & r_found;
      fall_valid <= v_n & f_found;
    end
  end

endmodule
