// tb_pipo4 - self-checking test of the 4-bit shift register.
// Drives random sh / ld / si / d (sh and ld never together, as in the
// multiplier) and compares q every clock with a reference model: shift moves
// si into q[0] and q[i-1] into q[i], load copies d, otherwise hold. Also
// checks the asynchronous clear and covers each operation.
module tb_pipo4;
  logic       clk = 1'b0, nclr, sh, ld, si;
  logic [3:0] d, q, model;
  int checks = 0, failures = 0;
  int n_sh = 0, n_ld = 0, n_hold = 0;

  pipo4 #(.WIDTH(4)) dut (.clk(clk), .nclr(nclr), .sh(sh), .ld(ld), .si(si), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nclr = 1'b0; sh = 1'b0; ld = 1'b0; si = 1'b0; d = '0; model = '0;
    #12;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL clear: q=%h", q); end
    nclr = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case ($urandom_range(2))
        0: begin sh = 1'b1; ld = 1'b0; end
        1: begin sh = 1'b0; ld = 1'b1; end
        default: begin sh = 1'b0; ld = 1'b0; end
      endcase
      si = 1'($urandom);
      d  = 4'($urandom);
      @(posedge clk);
      if (sh)      begin model = {model[2:0], si}; n_sh++;   end
      else if (ld) begin model = d;                n_ld++;   end
      else         begin                           n_hold++; end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d sh=%0d ld=%0d si=%0d d=%h: q=%h expected %h", n, sh, ld, si, d, q, model);
      end
    end
    // asynchronous clear in the middle of a clock period
    @(negedge clk);
    sh = 1'b0; ld = 1'b1; d = 4'hf;
    @(posedge clk);
    #2 nclr = 1'b0;
    #1;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL async clear: q=%h", q); end
    checks++;
    if (n_sh == 0 || n_ld == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    $display("shifts=%0d loads=%0d holds=%0d", n_sh, n_ld, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
