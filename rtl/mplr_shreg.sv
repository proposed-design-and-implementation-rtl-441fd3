// mplr_shreg - multiplier shift register with the accumulator load gate.
//
// Two pipo4 registers form an 8-bit register that presents the multiplier a
// one bit at a time, least significant bit first, on mbit. While load is high
// it parallel-loads a; each sh moves the next bit into place (zeros enter at
// the top). ld_acc = mbit & ld_ctl: the control block's LD pulse reaches the
// accumulator only when the current multiplier bit is 1, so the multiplicand
// is added for 1 bits and skipped for 0 bits.
// Register pins as in the original design: upper pipo4 D0..D3 = a7..a4 with
// serial input 0, lower pipo4 D0..D3 = a3..a0 with serial input from the upper
// Q3; mbit is the lower Q3. nclr clears both asynchronously.
module mplr_shreg (
  input  logic       clk,
  input  logic       nclr,
  input  logic       load,
  input  logic       sh,
  input  logic       ld_ctl,
  input  logic [7:0] a,
  output logic       ld_acc,
  output logic       mbit
);
  logic [3:0] up_d, up_q, lo_d, lo_q;

  always_comb
    for (int i = 0; i < 4; i++) begin
      up_d[i] = a[7-i];
      lo_d[i] = a[3-i];
    end

  pipo4 #(.WIDTH(4)) u_up (.clk(clk), .nclr(nclr), .sh(sh), .ld(load), .si(1'b0),    .d(up_d), .q(up_q));
  pipo4 #(.WIDTH(4)) u_lo (.clk(clk), .nclr(nclr), .sh(sh), .ld(load), .si(up_q[3]), .d(lo_d), .q(lo_q));

  assign mbit   = lo_q[3];
  assign ld_acc = mbit & ld_ctl;
endmodule
