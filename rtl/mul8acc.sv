// mul8acc - 16-bit product accumulator of the multiplier.
//
// Four pipo4 registers hold the product q[15:0], chained into one 16-bit
// right-shift register, plus a carry flip-flop above q[15]:
//   ld : q[15:8] <= d_hi (the adder sum), carry flip-flop <= carry
//        (the adder carry out); q[7:0] hold.
//   sh : the 17 bits {carry flip-flop, q} shift one place towards q[0]; the
//        carry flip-flop takes 0 and the old q[0] is dropped.
//   neither : everything holds.
// The lower two registers never load (their LD pin is tied low). nclr clears
// all 17 flip-flops asynchronously; it is the only way to empty the
// accumulator, so it must be pulsed before every multiplication.
// All of this, including the carry flip-flop's gate equation
//   D = ld & carry | ~sh & ~ld & Q,
// is the original design's. Pin i of the top register is product bit 15-i in
// the original drawing; the port vectors here use product bit numbering.
module mul8acc (
  input  logic        clk,
  input  logic        nclr,
  input  logic        sh,
  input  logic        ld,
  input  logic        carry,
  input  logic [7:0]  d_hi,
  output logic [15:0] q
);
  logic cy_q;
  logic cy_d;

  // register pin vectors: element i is pin Di / Qi of that pipo4
  logic [3:0] r1_d, r1_q, r2_d, r2_q, r3_q, r4_q;

  always_comb begin
    cy_d = (ld & carry) | (~sh & ~ld & cy_q);
    for (int i = 0; i < 4; i++) begin
      r1_d[i] = d_hi[7-i];   // D15..D12
      r2_d[i] = d_hi[3-i];   // D11..D8
    end
  end

  always_ff @(posedge clk or negedge nclr)
    if (!nclr) cy_q <= 1'b0;
    else       cy_q <= cy_d;

  pipo4 #(.WIDTH(4)) u_r1 (.clk(clk), .nclr(nclr), .sh(sh), .ld(ld),   .si(cy_q),    .d(r1_d), .q(r1_q));
  pipo4 #(.WIDTH(4)) u_r2 (.clk(clk), .nclr(nclr), .sh(sh), .ld(ld),   .si(r1_q[3]), .d(r2_d), .q(r2_q));
  pipo4 #(.WIDTH(4)) u_r3 (.clk(clk), .nclr(nclr), .sh(sh), .ld(1'b0), .si(r2_q[3]), .d(4'h0), .q(r3_q));
  pipo4 #(.WIDTH(4)) u_r4 (.clk(clk), .nclr(nclr), .sh(sh), .ld(1'b0), .si(r3_q[3]), .d(4'h0), .q(r4_q));

  always_comb
    for (int i = 0; i < 4; i++) begin
      q[15-i] = r1_q[i];
      q[11-i] = r2_q[i];
      q[7-i]  = r3_q[i];
      q[3-i]  = r4_q[i];
    end
endmodule
