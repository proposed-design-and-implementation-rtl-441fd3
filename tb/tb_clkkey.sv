// tb_clkkey - self-checking test of the start pulse generator.
// Drives key with random hold times (some one clock, some long) and checks
// that pulse is high for exactly the one clock after each edge that first
// sees key high, and never while key stays high. Also replays the timing of
// the reference diagram: key rises before edge 1, pulse is high from edge 1
// to edge 2.
module tb_clkkey;
  logic clk = 1'b0, nclr, key, pulse;
  logic key_d;   // key as sampled at the previous edge
  logic exp_pulse;
  int checks = 0, failures = 0, pulses = 0;

  clkkey dut (.c(clk), .nclr(nclr), .key(key), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nclr = 1'b0; key = 1'b0; key_d = 1'b0; exp_pulse = 1'b0;
    #12 nclr = 1'b1;
    // diagram replay: edge 0 sees key low, edge 1 high, 2..3 high, then low
    @(negedge clk); key = 1'b0;
    @(negedge clk); key = 1'b1;                 // before edge 1
    @(posedge clk); #1;
    checks++; if (pulse !== 1'b1) begin failures++; $display("FAIL edge1 pulse=%0d", pulse); end
    @(posedge clk); #1;
    checks++; if (pulse !== 1'b0) begin failures++; $display("FAIL edge2 pulse=%0d", pulse); end
    @(posedge clk); #1;
    checks++; if (pulse !== 1'b0) begin failures++; $display("FAIL edge3 pulse=%0d", pulse); end
    @(negedge clk); key = 1'b0;
    @(negedge clk); key = 1'b0;
    key_d = 1'b0;
    // random key patterns
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) key = ~key;
      @(posedge clk);
      exp_pulse = key & ~key_d;
      key_d = key;
      #1;
      checks++;
      if (pulse !== exp_pulse) begin
        failures++;
        $display("FAIL n=%0d key=%0d pulse=%0d expected %0d", n, key, pulse, exp_pulse);
      end
      if (pulse) pulses++;
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL no pulse"); end
    $display("pulses=%0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
