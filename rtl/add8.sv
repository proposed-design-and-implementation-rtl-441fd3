// add8 - 8-bit ripple-carry adder of two add4 blocks.
//
// The low add4 adds bits 3..0 with the carry in ci; its carry out is the carry
// in of the high add4 (bits 7..4), whose carry out is co. Combinational, eight
// carry stages deep. In the multiplier x is the multiplicand, y the upper half
// of the accumulator and ci is tied to 0. Structure as in the original design
// (there called "8add").
module add8 (
  input  logic       ci,
  input  logic [7:0] x,
  input  logic [7:0] y,
  output logic [7:0] s,
  output logic       co
);
  logic c4;

  add4 u_lo (.ci(ci), .x(x[3:0]), .y(y[3:0]), .s(s[3:0]), .co(c4));
  add4 u_hi (.ci(c4), .x(x[7:4]), .y(y[7:4]), .s(s[7:4]), .co(co));
endmodule
