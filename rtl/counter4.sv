// counter4 - synchronous binary up counter (divide by 2**WIDTH).
//
// Counts up by one on every rising clock edge while en is high and wraps from
// all ones to zero. clear_n low clears the count to zero on the next clock
// edge (synchronous, it takes priority over en). co is high while the count is all ones and en is high,
// i.e. on the clock whose edge wraps the counter.
// The original design gives only the counter's function and pins (CLK, CLEAR,
// EN, Q0-Q3, CO); the synchronous active-low clear and the meaning of co are
// this design's choices. WIDTH defaults to the original 4 bits.
module counter4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clear_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             co
);
  always_ff @(posedge clk)
    if (!clear_n) q <= '0;
    else if (en)  q <= q + 1'b1;

  assign co = en & (&q);
endmodule
