// mpslm_pkg: shared sizes, types and the register map of the Modified
// Programmable Secured Logic Module (MPSLM).
//
// The module is a 5-variable programmable logic cell built from four 3-input
// LUTs. Each LUT is configured by an 8-bit control word, so the whole cell is
// configured by 32 bits. The register map (which address loads which
// register) is this design's choice; the drawing of the module only shows a
// 3-bit address into a decoder with outputs 0..6, output 6 reaching the
// output block.
package mpslm_pkg;

  localparam int unsigned CW_W   = 8;  // width of one control word / SIN
  localparam int unsigned LUT_IN = 3;  // inputs of each LUT
  localparam int unsigned N_LUT  = 4;  // LUTs M1..M4
  localparam int unsigned N_F    = 7;  // outputs F1..F7
  localparam int unsigned ADDR_W = 3;  // register address width
  localparam int unsigned N_SEL  = 7;  // decoder outputs 0..6

  typedef logic [CW_W-1:0]   cw_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Register map.
  typedef enum logic [ADDR_W-1:0] {
    ADDR_CWR_M1 = 3'd0,
    ADDR_CWR_M2 = 3'd1,
    ADDR_CWR_M3 = 3'd2,
    ADDR_CWR_M4 = 3'd3,
    ADDR_OCWR   = 3'd6
  } reg_addr_e;

endpackage
