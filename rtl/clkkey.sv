// clkkey - start pulse generator.
//
// Turns the rising of the level input key (a push button, already
// synchronous to c) into a pulse exactly one clock long. Flip-flop 1 samples
// key; flip-flop 2 samples key & ~q1, i.e. "key is high now but was low at the
// previous edge". pulse is flip-flop 2's output: it rises on the first clock
// edge that sees key high and falls on the next one. Holding key high gives no
// further pulse; key must return low before a new pulse can be made.
// nclr clears both flip-flops asynchronously (active low).
// Structure and timing are the original design's.
module clkkey (
  input  logic c,
  input  logic nclr,
  input  logic key,
  output logic pulse
);
  logic q1;
  logic d2;

  assign d2 = key & ~q1;

  always_ff @(posedge c or negedge nclr)
    if (!nclr) begin
      q1    <= 1'b0;
      pulse <= 1'b0;
    end else begin
      q1    <= key;
      pulse <= d2;
    end
endmodule
