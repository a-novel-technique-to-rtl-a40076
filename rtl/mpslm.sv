// mpslm: Modified Programmable Secured Logic Module, 5 inputs, 7 outputs.
//
// A small run-time programmable logic cell whose configuration is scrambled
// by a per-manufacturer constant. Four 3-input LUTs M1..M4 read C, D, E.
// Each LUT gets its truth table from its own 8-bit control word register
// (CWR) through a Bit Flipping Logic block that XORs it with the 8-bit
// System Identification Number SIN, held in an on-chip ROM (here the
// parameter SIN). M5 = B ? M2 : M1 and M6 = B ? M4 : M3 are 4-variable
// functions; M7 = A ? M6 : M5 is a 5-variable function. Outputs
// F1..F4 = M1..M4, F5 = M5, F6 = M6, F7 = M7 leave through the output block,
// which can disable each of them from the output control word register OCwR.
//
// After reset every register is '0', so each LUT implements the function
// whose truth table is the SIN: the module has a working default function.
// To implement a 32-bit truth table T, indexed by {A,B,C,D,E} with A the
// most significant, write T[8k+7:8k] ^ SIN to the CWR of LUT M(k+1). A
// module with a different SIN turns the same words into a different function.
//
// Interface and timing:
//   pm = 1 (program mode): data is written on the rising clk edge into the
//     register at addr (0..3 = CWR of M1..M4, 6 = OCwR, others ignored).
//     While pm = 1 the LUTs see the SIN alone, as the source description states that in
//     this mode the module implements the function given by the SIN.
//   pm = 0 (function mode): writes are ignored and the LUTs see CWR ^ SIN.
//   f is combinational in a, b, cde, pm and the registers; a written word is
//   visible from the edge that stores it (once pm returns to 0 for CWRs).
// Decoder strobes 4 and 5 are left unconnected: no register sits at those
// addresses, so writes there do nothing.
// The block structure follows the source description's drawing; the clock, reset,
// register map, mux select polarity and OCwR encoding are this design's.
module mpslm
  import mpslm_pkg::*;
#(
  parameter cw_t SIN = 8'b0100_1001
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           pm,
  input  addr_t          addr,
  input  cw_t            data,
  input  logic           a,
  input  logic           b,
  input  logic [2:0]     cde,
  output logic [N_F-1:0] f
);

  logic [N_SEL-1:0] wsel;
  cw_t              cwr    [N_LUT];
  cw_t              bfl_in [N_LUT];
  cw_t              lut_cw [N_LUT];
  logic [N_LUT-1:0] lut_y;
  cw_t              ocwr;
  logic             m5_y, m6_y, m7_y;

  addr_decoder #(.AW(ADDR_W), .N_OUT(N_SEL)) u_dec (
    .en(pm), .addr(addr), .sel(wsel)
  );

  for (genvar k = 0; k < N_LUT; k++) begin : g_lut
    cw_reg #(.W(CW_W)) u_cwr (
      .clk(clk), .rst_n(rst_n), .we(wsel[ADDR_CWR_M1 + k]), .d(data),
      .q(cwr[k])
    );

    // In program mode the stored word is held back from the LUT, which
    // then shows the SIN-defined function.
    always_comb bfl_in[k] = pm ? '0 : cwr[k];

    bit_flip_logic #(.W(CW_W)) u_bfl (
      .cw_in(bfl_in[k]), .flip(SIN), .cw_out(lut_cw[k])
    );

    lut3 #(.N_IN(LUT_IN)) u_lut (
      .cw(lut_cw[k]), .x(cde), .y(lut_y[k])
    );
  end

  mux2 u_m5 (.in0(lut_y[0]), .in1(lut_y[1]), .sel(b), .y(m5_y));
  mux2 u_m6 (.in0(lut_y[2]), .in1(lut_y[3]), .sel(b), .y(m6_y));
  mux2 u_m7 (.in0(m5_y),     .in1(m6_y),     .sel(a), .y(m7_y));

  cw_reg #(.W(CW_W)) u_ocwr (
    .clk(clk), .rst_n(rst_n), .we(wsel[ADDR_OCWR]), .d(data), .q(ocwr)
  );

  output_block #(.N_F(N_F), .W(CW_W)) u_out (
    .f_in({m7_y, m6_y, m5_y, lut_y}), .oe_cfg(ocwr), .f_out(f)
  );

endmodule
