// pipo4 - 4-bit parallel-in / parallel-out shift register.
//
// Every bit is a D flip-flop whose next value is
//   sh & (previous bit)  |  ld & d[i]  |  ~sh & ~ld & q[i]
// where the previous bit of q[0] is the serial input si. So on a rising clock
// edge SH shifts one place from q[0] towards q[WIDTH-1] (q[WIDTH-1] is the
// serial output), LD loads d, and with neither the register holds. nclr clears
// it asynchronously (active low). SH and LD are not meant to be high together;
// if they are, each bit takes the OR of the shifted and the loaded value, as
// the gate structure does.
// The gate equation, the shift direction and the clear are the original
// design's; the WIDTH parameter (default 4) is added for reuse.
module pipo4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             nclr,
  input  logic             sh,
  input  logic             ld,
  input  logic             si,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] prev;
  logic [WIDTH-1:0] nxt;

  always_comb begin
    prev = {q[WIDTH-2:0], si};
    for (int i = 0; i < WIDTH; i++)
      nxt[i] = (sh & prev[i]) | (ld & d[i]) | (~sh & ~ld & q[i]);
  end

  always_ff @(posedge clk or negedge nclr)
    if (!nclr) q <= '0;
    else       q <= nxt;
endmodule
