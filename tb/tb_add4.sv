// tb_add4 - exhaustive self-checking test of the 4-bit ripple adder.
// All 512 combinations of x, y and ci; {co, s} must equal x + y + ci.
module tb_add4;
  logic       ci, co;
  logic [3:0] x, y, s;
  int checks = 0, failures = 0;

  add4 dut (.ci(ci), .x(x), .y(y), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci, x, y} = 9'(v);
      #1;
      checks++;
      if ({co, s} !== 5'(int'(x) + int'(y) + int'(ci))) begin
        failures++;
        $display("FAIL x=%0d y=%0d ci=%0d -> co=%0d s=%0d", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
