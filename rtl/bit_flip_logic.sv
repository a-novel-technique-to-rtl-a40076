// bit_flip_logic: the Bit Flipping Logic (BFL) between a control word
// register and its LUT.
//
// Each bit of the stored control word is inverted where the corresponding bit
// of the System Identification Number (SIN) is 1, i.e. cw_out = cw_in ^ flip.
// With the register cleared the LUT therefore sees the SIN itself (the default
// function); to obtain a wanted truth table T, the user must store T ^ SIN.
// The document names the block and states the XOR with the SIN; the bit-wise
// pairing of register bit i with SIN bit i is this design's choice.
//
// Purely combinational.
module bit_flip_logic #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] cw_in,
  input  logic [W-1:0] flip,
  output logic [W-1:0] cw_out
);

  always_comb cw_out = cw_in ^ flip;

endmodule
