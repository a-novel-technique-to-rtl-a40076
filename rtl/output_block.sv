// output_block: output enable stage of the MPSLM.
//
// Passes each of the N_F function outputs (F1..F7: four 3-variable, two
// 4-variable and one 5-variable function) or forces it to '0', under control
// of the output control word register OCwR. The document says only that the
// block enables some outputs and disables the others from the bits latched in
// its output enable latch; the encoding here is this design's choice:
// oe_cfg[i] = 1 disables f_in[i]. Bits of oe_cfg above N_F-1 are unused.
// With OCwR cleared at reset, every output is enabled, so the default
// function set by the SIN is visible. Purely combinational.
module output_block #(
  parameter int unsigned N_F = 7,
  parameter int unsigned W   = 8
) (
  input  logic [N_F-1:0] f_in,
  input  logic [W-1:0]   oe_cfg,
  output logic [N_F-1:0] f_out
);

  always_comb f_out = f_in & ~oe_cfg[N_F-1:0];

endmodule
