// tb_counter4 - self-checking test of the 4-bit counter.
// Random enable and clear; compares q and co every clock with a reference
// count, and checks that the count wraps from 15 to 0.
module tb_counter4;
  logic       clk = 1'b0, clear_n, en, co;
  logic [3:0] q;
  int model = 0;
  int checks = 0, failures = 0, wraps = 0;

  counter4 #(.WIDTH(4)) dut (.clk(clk), .clear_n(clear_n), .en(en), .q(q), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_n = 1'b0; en = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL clear: q=%0d", q); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clear_n = ($urandom_range(63) != 0);
      en      = ($urandom_range(7) != 0);
      #1;
      checks++;
      if (co !== (en && model == 15)) begin failures++; $display("FAIL co=%0d q=%0d en=%0d", co, q, en); end
      @(posedge clk);
      if (!clear_n)  model = 0;
      else if (en) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      #1;
      checks++;
      if (q !== 4'(model)) begin failures++; $display("FAIL n=%0d q=%0d expected %0d", n, q, model); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
