// tb_mul8acc - self-checking test of the 16-bit product accumulator.
// Part 1 drives random ld / sh / carry / d_hi and compares q with a 17-bit
// reference model {carry flip-flop, q}: ld replaces bits 16..8 by
// {carry, d_hi}, sh shifts the 17 bits right with 0 entering at the top.
// Part 2 runs the multiplication algorithm by hand through the ports
// (add b when the bit is 1, then shift) and checks the product.
module tb_mul8acc;
  logic        clk = 1'b0, nclr, sh, ld, carry;
  logic [7:0]  d_hi;
  logic [15:0] q;
  logic [16:0] model;
  int checks = 0, failures = 0, carries_in = 0;

  mul8acc dut (.clk(clk), .nclr(nclr), .sh(sh), .ld(ld), .carry(carry), .d_hi(d_hi), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic l, input logic cy, input logic [7:0] dd);
    @(negedge clk);
    sh = s; ld = l; carry = cy; d_hi = dd;
    @(posedge clk);
    #1;
  endtask

  initial begin
    nclr = 1'b0; sh = 1'b0; ld = 1'b0; carry = 1'b0; d_hi = '0; model = '0;
    @(posedge clk);
    #2 nclr = 1'b1;
    // part 1: random operations
    for (int n = 0; n < 2000; n++) begin
      int op;
      logic cy;
      logic [7:0] dd;
      op = $urandom_range(2);
      cy = 1'($urandom);
      dd = 8'($urandom);
      step(op == 1, op == 0, cy, dd);
      if (op == 0)      model = {cy, dd, model[7:0]};
      else if (op == 1) begin
        if (model[16]) carries_in++;
        model = {1'b0, model[16:1]};
      end
      checks++;
      if (q !== model[15:0]) begin
        failures++;
        $display("FAIL n=%0d op=%0d q=%h expected %h", n, op, q, model[15:0]);
      end
    end
    // part 2: multiplications performed through the ports
    for (int n = 0; n < 200; n++) begin
      logic [7:0] a, b;
      logic [8:0] s9;
      a = 8'($urandom); b = 8'($urandom);
      if (n == 0) begin a = 8'hff; b = 8'hff; end
      @(negedge clk) nclr = 1'b0;
      #1 nclr = 1'b1;
      for (int i = 0; i < 8; i++) begin
        s9 = {1'b0, b} + {1'b0, q[15:8]};
        step(1'b0, a[i], s9[8], s9[7:0]);
        step(1'b1, 1'b0, 1'b0, 8'h00);
      end
      checks++;
      if (q !== 16'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d: q=%0d", a, b, q);
      end
    end
    checks++;
    if (carries_in == 0) begin failures++; $display("FAIL carry never shifted in"); end
    $display("carry_shifted_in=%0d", carries_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
