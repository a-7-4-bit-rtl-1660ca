`timescale 1ps / 1fs
// Tap reordering of one tapped delay line.
//
// The DFF bank of a chain captures, for every multiplexer element k, the XOR
// output O[k] and the carry output C[k]. With the carry chain configured as
// DI = 0 and S = 1 the XOR output is the inverted carry input of the element,
// so ~O[k] is the hit level at the element's input and C[k] the level at its
// output: two sampling points per element ("double sampling").
// This block interleaves them as ~O[0], C[0], ~O[1], C[1], ... (increasing
// delay) and then reverses the vector, so that therm[0] is the sample with the
// longest delay, i.e. the earliest instant of the window, and therm[2*N_ELEM-1]
// the latest. A comparator rising edge then appears as a 0-to-1 step with
// increasing index, as in the encoder's timing diagram.
// The need to reorder follows the document; the exact order is this design's
// own choice, since the document does not give one. Purely combinational.
module tap_reorder #(
  parameter int unsigned N_ELEM = 480
) (
  input  logic [N_ELEM-1:0]   o_q,
  input  logic [N_ELEM-1:0]   c_q,
  output logic [2*N_ELEM-1:0] therm
);

  always_comb begin
    for (int k = 0; k < int'(N_ELEM); k++) begin
      // sampling point 2k (element input) and 2k+1 (element output)
      therm[2*N_ELEM-1-2*k]   = ~o_q[k];
      therm[2*N_ELEM-1-2*k-1] =  c_q[k];
    end
  end

endmodule
