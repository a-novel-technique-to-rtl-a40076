// mux2: 2-channel multiplexer (M5, M6, M7 of the MPSLM).
//
// M5 and M6 merge two 3-input LUT outputs into a 4-variable function selected
// by input B; M7 merges M5 and M6 into a 5-variable function selected by
// input A. sel = 0 passes in0 (the lower-numbered LUT): this polarity is this
// design's choice. Purely combinational.
module mux2 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);

  always_comb y = sel ? in1 : in0;

endmodule
