// add4 - 4-bit ripple-carry adder.
//
// Four fadd cells; the carry out of bit i feeds the carry in of bit i+1 and
// the carry out of bit 3 is co. Combinational: s and co settle after four
// carry stages. The structure is the original one; only the name differs
// (the drawing calls the block "4add", which is not a legal identifier).
module add4 (
  input  logic       ci,
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [3:0] s,
  output logic       co
);
  logic [4:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    fadd u_fadd (.ci(c[i]), .x(x[i]), .y(y[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[4];
endmodule
