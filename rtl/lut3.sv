// lut3: N_IN-input look-up table (3 inputs in the MPSLM, LUTs M1..M4).
//
// The control word is the truth table: the output is bit x of cw, so bit i
// (printed last-to-first in an 8-bit word written MSB first) holds the value
// of the function for the input combination whose binary index is i, with
// x[N_IN-1] the first variable. This ordering reproduces the document's
// examples: control word 01001001 gives ABC' + A'BC + A'B'C'.
//
// Purely combinational; the output follows cw and x with no clock.
module lut3 #(
  parameter int unsigned N_IN = 3
) (
  input  logic [2**N_IN-1:0] cw,
  input  logic [N_IN-1:0]    x,
  output logic               y
);

  always_comb y = cw[x];

endmodule
