// cw_reg: one 8-bit control word register of the MPSLM register array.
//
// Cleared to all '0' by the active-low asynchronous reset, as the document
// requires at power-on (the secure default: nothing the user loaded survives
// a power cycle). On a rising clock edge with we = 1 it stores d; otherwise
// it holds. q is valid from the clock edge after the write. The clock, the
// reset style and single-cycle write timing are this design's choices; the
// document only says control words are entered on the data bus 8 bits at a
// time, to the address placed on the address bus.
module cw_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end

endmodule
