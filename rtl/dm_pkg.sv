// dm_pkg: shared types and constants of the delay-measurement scan design.
//
// The measurement scan flip-flop has two mode lines, se[0] (se0) and se[1] (se1).
// se0 = 0 selects the functional input D (normal/capture mode).  With se0 = 1,
// se1 = 1 selects the scan input (scan mode) and se1 = 0 selects the bit held in
// the flip-flop's extra latch (test-vector reload).  The mux input numbering
// follows the scan flip-flop drawing; the enum names are this design's own.
`timescale 1ns/1fs
package dm_pkg;

  typedef enum logic [1:0] {
    SE_NORMAL = 2'b00,   // se1 = 0, se0 = 0 : capture D
    SE_LATCH  = 2'b01,   // se1 = 0, se0 = 1 : load from extra latch
    SE_NORM1  = 2'b10,   // se1 = 1, se0 = 0 : capture D (se1 ignored)
    SE_SCAN   = 2'b11    // se1 = 1, se0 = 1 : shift scan chain
  } se_mode_e;

  // Galois feedback mask of an 8-bit signature register: bit i set means the
  // input of stage i XORs the last stage.  x^8 + x^4 + x^3 + x^2 + 1.
  localparam logic [7:0] SIG8_FB_MASK = 8'b0001_1101;

endpackage
