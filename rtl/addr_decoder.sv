// addr_decoder: address decoder of the MPSLM register array.
//
// Turns the register address into one-hot write strobes sel[0..N_OUT-1].
// Strobes are only produced while en (the program-mode input Pm) is 1; in
// function mode, and for addresses at or above N_OUT, all strobes are 0.
// The document shows a decoder with Pm and a 3-bit address as inputs and
// outputs 0..6; the gating by Pm is read from that drawing and from the
// statement that control words are loaded in program mode.
//
// Purely combinational. An immediate assertion checks that at most one
// strobe is active.
module addr_decoder #(
  parameter int unsigned AW    = 3,
  parameter int unsigned N_OUT = 7
) (
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [N_OUT-1:0] sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N_OUT; i++)
      if (en && addr == AW'(i)) sel[i] = 1'b1;
  end

  // At most one register may be written at a time.
  always_comb assert ($onehot0(sel)) else $error("more than one write strobe");

endmodule
