// tb_mplr_shreg - self-checking test of the multiplier shift register.
// Loads a random multiplier a, then alternates ld_ctl and sh pulses as the
// control block does. Before shift k, mbit must be a[k] and ld_acc must equal
// a[k] during the ld_ctl pulse (and be 0 otherwise); after eight shifts the
// register holds zeros. The load input must reload a at any time it is high.
module tb_mplr_shreg;
  logic       clk = 1'b0, nclr, load, sh, ld_ctl, ld_acc, mbit;
  logic [7:0] a, a_loaded;
  int checks = 0, failures = 0, passed = 0, blocked = 0;

  mplr_shreg dut (.clk(clk), .nclr(nclr), .load(load), .sh(sh), .ld_ctl(ld_ctl),
                  .a(a), .ld_acc(ld_acc), .mbit(mbit));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nclr = 1'b0; load = 1'b0; sh = 1'b0; ld_ctl = 1'b0; a = '0;
    @(posedge clk);
    #2 nclr = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = 8'($urandom); load = 1'b1; sh = 1'b0; ld_ctl = 1'b0;
      a_loaded = a;
      @(negedge clk);
      load = 1'b0;
      a = ~a;             // a may change once loaded
      for (int k = 0; k < 8; k++) begin
        ld_ctl = 1'b1;
        #1;
        checks++;
        if (mbit !== a_loaded[k] || ld_acc !== a_loaded[k]) begin
          failures++;
          $display("FAIL a=%h bit %0d mbit=%0d ld_acc=%0d", a_loaded, k, mbit, ld_acc);
        end
        if (ld_acc) passed++; else blocked++;
        @(negedge clk);
        ld_ctl = 1'b0; sh = 1'b1;
        #1;
        checks++;
        if (ld_acc !== 1'b0) begin failures++; $display("FAIL ld_acc without ld_ctl"); end
        @(negedge clk);
        sh = 1'b0;
      end
    end
    // explicit sequence check on a known pattern
    @(negedge clk); a = 8'b1011_0010; load = 1'b1;
    @(negedge clk); load = 1'b0;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (mbit !== a[k]) begin failures++; $display("FAIL bit %0d mbit=%0d expected %0d", k, mbit, a[k]); end
      sh = 1'b1;
      @(negedge clk);
      sh = 1'b0;
    end
    checks++;
    if (mbit !== 1'b0) begin failures++; $display("FAIL zeros not shifted in"); end
    checks++;
    if (passed == 0 || blocked == 0) begin failures++; $display("FAIL coverage"); end
    $display("ld passed=%0d blocked=%0d", passed, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
