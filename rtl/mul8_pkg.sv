// mul8_pkg - constants shared by the 8x8 shift-and-add multiplier and its
// testbenches.
//
// OPW is the operand width (multiplier a and multiplicand b), PRODW the
// product / accumulator width and RUN_CYCLES the number of clocks the control
// block keeps DONE high: one load clock and one shift clock per multiplier
// bit. All three are the values of the 8-bit design.
package mul8_pkg;
  localparam int unsigned OPW        = 8;
  localparam int unsigned PRODW      = 2 * OPW;
  localparam int unsigned RUN_CYCLES = 2 * OPW;
endpackage
