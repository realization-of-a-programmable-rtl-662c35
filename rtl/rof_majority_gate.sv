// Programmable majority (rank) decision gate of the rank-order filter.
//
// y = 1 when at least `threshold` of the enabled inputs are 1, else 0. With
// the m inputs of a window enabled and threshold = m - r + 1 this is the
// bit of the r-th smallest word at the current bit plane (the algorithm's
// rule: 0 when the sum of ones is <= m - r, else 1).
//
// On silicon this gate is a 31-input capacitive threshold logic (CTL) cell,
// an analog circuit whose internals are not part of this design. This module
// is its digital equivalent, the simplest logic with the same function: a
// population count of the enabled inputs and a compare. The enable mask is
// this design's way of programming the window size into the gate.
// Combinational.
module rof_majority_gate #(
  parameter int unsigned NIN = rof_pkg::MAX_WIN,
  localparam int unsigned CW = $clog2(NIN + 1)
) (
  input  logic [NIN-1:0] bits,       // one bit plane of the modified words
  input  logic [NIN-1:0] enable,     // inputs inside the window
  input  logic [CW-1:0]  threshold,  // ones needed for y = 1
  output logic           y
);
  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned j = 0; j < NIN; j++) begin
      ones = ones + CW'(bits[j] & enable[j]);
    end
    y = (ones >= threshold);
  end
endmodule
