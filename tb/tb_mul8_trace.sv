// tb_mul8_trace - clock-by-clock trace of the worked example through the
// complete multiplier.
//
// Multiplier a = 1101 (13), multiplicand b = 1010 (10). After every clock of
// the 16-clock run the product register c is compared with the partial
// product of the pencil-and-paper method, computed here independently:
// on an even clock b is added into the upper byte when the current multiplier
// bit is 1, on an odd clock the 17-bit {carry, partial product} moves one
// place right. The run ends with c = 130. A second trace uses 255 x 255 so
// that the adder carry is exercised on the way.
module tb_mul8_trace;
  import mul8_pkg::*;
  logic             clk = 1'b0, nclr, start, done;
  logic [OPW-1:0]   a, b;
  logic [PRODW-1:0] c;
  int checks = 0, failures = 0, carries = 0;

  mul8 dut (.clk(clk), .nclr(nclr), .start(start), .a(a), .b(b), .c(c), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trace(input logic [7:0] ta, input logic [7:0] tb_);
    logic [16:0] p;   // {carry, partial product}
    logic [8:0]  s9;
    p = '0;
    @(negedge clk);
    nclr = 1'b0;
    #1 nclr = 1'b1;
    a = ta; b = tb_; start = 1'b1;
    @(posedge clk);           // start pulse
    @(posedge clk);           // done rises
    #1;
    checks++;
    if (!done) begin failures++; $display("FAIL done did not rise"); end
    for (int k = 0; k < 2 * OPW; k++) begin
      @(posedge clk);
      #1;
      if (k % 2 == 0) begin
        if (ta[k / 2]) begin
          s9 = {1'b0, p[15:8]} + {1'b0, tb_};
          if (s9[8]) carries++;
          p = {s9, p[7:0]};
        end
      end else begin
        p = {1'b0, p[16:1]};
      end
      checks++;
      if (c !== p[15:0]) begin
        failures++;
        $display("FAIL %0d x %0d clock %0d: c=%h expected %h", ta, tb_, k, c, p[15:0]);
      end
      if (k % 2 == 1) $display("%0d x %0d after step %0d: %b", ta, tb_, k / 2, c);
    end
    checks++;
    if (done || c !== 16'(int'(ta) * int'(tb_))) begin
      failures++;
      $display("FAIL %0d x %0d: done=%0d c=%0d", ta, tb_, done, c);
    end
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    nclr = 1'b0; start = 1'b0; a = '0; b = '0;
    #12 nclr = 1'b1;
    trace(8'b0000_1101, 8'b0000_1010);
    trace(8'hff, 8'hff);
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no adder carry in the traces"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
