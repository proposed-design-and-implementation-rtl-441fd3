// fadd - one-bit full adder, the cell the ripple adders are built from.
//
// The sum is the two-level XOR of the three inputs; the carry is the OR of
// the three pairwise ANDs (majority). Purely combinational.
// The XOR/XOR sum and AND2/AND2/AND2 -> OR3 carry structure is the one of the
// original gate drawing; which input pair feeds each AND gate is this design's
// reading (the usual majority form).
module fadd (
  input  logic ci,
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  logic xy;

  always_comb begin
    xy = x ^ y;
    s  = xy ^ ci;
    co = (x & y) | (x & ci) | (y & ci);
  end
endmodule
