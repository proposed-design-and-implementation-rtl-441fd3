// tb_fadd - exhaustive self-checking test of the one-bit full adder.
// Applies all eight input combinations and compares {co, s} with the
// arithmetic sum x + y + ci.
module tb_fadd;
  logic ci, x, y, s, co;
  int checks = 0, failures = 0;

  fadd dut (.ci(ci), .x(x), .y(y), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ci, x, y} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(x) + int'(y) + int'(ci))) begin
        failures++;
        $display("FAIL x=%0d y=%0d ci=%0d -> co=%0d s=%0d", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
