// mul8 - 8 x 8 bit unsigned shift-and-add multiplier.
//
// c = a * b, computed the pencil-and-paper way: for each multiplier bit, least
// significant first, the multiplicand b is added into the upper half of a
// 16-bit accumulator if the bit is 1, then the accumulator (with the adder's
// carry above it) is shifted one place right. After eight add/shift pairs the
// accumulator holds the product.
//
// Blocks: clkkey turns the start key into a one-clock pulse; mul8sta runs
// for 16 clocks and issues LD on even and SH on odd counts; mplr_shreg holds
// a and gates LD with the current bit; add8 adds b to c[15:8]; mul8acc holds
// the product.
//
// Use: pulse nclr low to clear the accumulator (it is not cleared by start),
// set a and b, raise start. The first clock edge that sees start high makes
// the start pulse, the next one raises done; done stays high for 16 clocks
// and c holds a * b from the edge that lowers done until the next nclr.
// a is sampled on the clock edge that raises done; b must be held steady
// while done is high. start must return low before it can start another run.
//
// The structure and connections are the original schematic's. The done output
// is an addition of this design: it brings out the control block's busy
// signal, which the original uses only internally.
module mul8
  import mul8_pkg::*;
(
  input  logic             clk,
  input  logic             nclr,
  input  logic             start,
  input  logic [OPW-1:0]   a,
  input  logic [OPW-1:0]   b,
  output logic [PRODW-1:0] c,
  output logic             done
);
  logic       pulse;
  logic       sh;
  logic       ld;
  logic       busy;
  logic       ld_acc;
  logic       mbit;
  logic [7:0] sum;
  logic       carry;

  clkkey u_clkkey (.c(clk), .nclr(nclr), .key(start), .pulse(pulse));

  mul8sta u_ctrl (.clk(clk), .nclr(nclr), .start(pulse), .sh(sh), .ld(ld), .ndone(busy));

  mplr_shreg u_mplr (
    .clk   (clk),
    .nclr  (nclr),
    .load  (~busy),
    .sh    (sh),
    .ld_ctl(ld),
    .a     (a),
    .ld_acc(ld_acc),
    .mbit  (mbit)
  );

  add8 u_add (.ci(1'b0), .x(b), .y(c[15:8]), .s(sum), .co(carry));

  mul8acc u_acc (
    .clk  (clk),
    .nclr (nclr),
    .sh   (sh),
    .ld   (ld_acc),
    .carry(carry),
    .d_hi (sum),
    .q    (c)
  );

  assign done = busy;
endmodule
