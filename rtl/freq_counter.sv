`timescale 1ps / 1fs
// Ring oscillator frequency counter.
//
// Counts the rising edges of the (asynchronous) ring oscillator output during
// a window of GATE_CYCLES reference clock cycles and presents the result as
// count, with a one-cycle count_valid pulse, at the end of every window. The
// count is proportional to the oscillator frequency and falls linearly as the
// chip warms up. The oscillator is brought into the clock domain by two
// flip-flops and its edges are found there, which requires it to run below
// half the clock frequency (about 140 MHz against 600 MHz here).
// The counter itself follows the document; the window length and the
// synchroniser are this design's choices.
module freq_counter #(
  parameter int unsigned GATE_CYCLES = 16384,
  parameter int unsigned COUNT_W     = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ro,
  output logic [COUNT_W-1:0] count,
  output logic               count_valid
);

  logic [2:0]               sync;
  logic [$clog2(GATE_CYCLES)-1:0] gate;
  logic [COUNT_W-1:0]       acc;
  logic                     edge_seen;

  assign edge_seen = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      gate        <= '0;
      acc         <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      sync        <= {sync[1:0], ro};
      count_valid <= 1'b0;
      if (gate == $bits(gate)'(GATE_CYCLES - 1)) begin
        gate        <= '0;
        count       <= acc + COUNT_W'(edge_seen);
        count_valid <= 1'b1;
        acc         <= '0;
      end else begin
        gate <= gate + 1'b1;
        if (edge_seen && acc != '1) acc <= acc + 1'b1;
      end
    end
  end

endmodule
