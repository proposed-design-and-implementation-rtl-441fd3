// tb_mul8 - end-to-end self-checking test of the 8 x 8 multiplier, at the
// design's default size.
//
// Runs all 65536 operand pairs (the first one is the worked example 10 x 13 =
// 130). For each: nclr pulse, operands set, start key pressed for a random
// number of clocks (sometimes released and pressed again while the multiplier
// is busy). Checks, independently of the design:
//   - c == a * b once done has fallen, and c stays there for a few clocks;
//   - done rises on the second clock edge that sees the key and stays high
//     for exactly RUN_CYCLES (16) clocks;
//   - a key held down, or pressed again while busy, does not start a second
//     run.
// It also counts how often each mechanism of the datapath happened and counts
// a failure for any that never did: start pulse, add (multiplier bit 1), add
// skipped (bit 0), adder carry captured, carry shifted into c[15], multiplier
// register reload while idle, key press ignored while busy.
module tb_mul8;
  import mul8_pkg::*;
  logic             clk = 1'b0, nclr, start, done;
  logic [OPW-1:0]   a, b;
  logic [PRODW-1:0] c;
  int checks = 0, failures = 0;
  int n_pulse = 0, n_add = 0, n_skip = 0, n_carry = 0, n_carry_in = 0;
  int n_reload = 0, n_ignored = 0, n_runs = 0;

  mul8 dut (.clk(clk), .nclr(nclr), .start(start), .a(a), .b(b), .c(c), .done(done));

  always #5 clk = ~clk;

  // mechanism counters, sampled just before each active edge
  always @(negedge clk) if (nclr) begin
    if (dut.pulse)                      n_pulse++;
    if (dut.pulse && done)              n_ignored++;
    if (dut.ld && dut.mbit)             n_add++;
    if (dut.ld && !dut.mbit)            n_skip++;
    if (dut.ld_acc && dut.carry)        n_carry++;
    if (dut.sh && dut.u_acc.cy_q)       n_carry_in++;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic multiply(input logic [7:0] ta, input logic [7:0] tb_, input int hold, input bit repress);
    int edges, done_len, rise_at, guard;
    logic [15:0] expect_c;
    expect_c = 16'(int'(ta) * int'(tb_));
    @(negedge clk);
    nclr = 1'b0;
    #1 nclr = 1'b1;
    // idle: change a once while the multiplier register keeps reloading
    a = ~ta; b = tb_;
    @(negedge clk);
    a = ta;
    @(negedge clk);
    if (dut.u_mplr.u_lo.q[3] == ta[0] && dut.u_mplr.u_up.q[0] == ta[7]) n_reload++;
    start = 1'b1;
    edges = 0; done_len = 0; rise_at = -1; guard = 0;
    // run until done has risen and fallen
    while (guard < 100) begin
      @(posedge clk);
      #1;
      edges++;
      guard++;
      if (done) begin
        done_len++;
        if (rise_at < 0) rise_at = edges;
      end
      @(negedge clk);
      if (edges >= hold) start = 1'b0;
      if (repress && edges == 6) start = 1'b0;
      if (repress && edges == 8) start = 1'b1;
      if (rise_at >= 0 && !done) break;
    end
    n_runs++;
    checks++;
    if (rise_at != 2) begin failures++; $display("FAIL %0d*%0d done rose at edge %0d", ta, tb_, rise_at); end
    checks++;
    if (done_len != int'(RUN_CYCLES)) begin failures++; $display("FAIL %0d*%0d done high %0d clocks", ta, tb_, done_len); end
    checks++;
    if (c !== expect_c) begin failures++; $display("FAIL %0d * %0d = %0d, got %0d", ta, tb_, expect_c, c); end
    // key may still be down: no second run, product stays
    repeat (3) begin
      @(posedge clk);
      #1;
      checks++;
      if (done || c !== expect_c) begin failures++; $display("FAIL %0d*%0d restarted or product changed", ta, tb_); end
    end
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    nclr = 1'b0; start = 1'b0; a = '0; b = '0;
    #12 nclr = 1'b1;
    // worked example: multiplicand 1010, multiplier 1101
    multiply(8'd13, 8'd10, 1, 1'b0);
    for (int i = 0; i < 65536; i++) begin
      int hold;
      hold = ($urandom_range(3) == 0) ? $urandom_range(40, 2) : 1;
      multiply(8'(i >> 8), 8'(i), hold, ($urandom_range(15) == 0));
    end
    $display("runs=%0d start_pulses=%0d adds=%0d skipped=%0d carries=%0d carry_into_c15=%0d reloads=%0d ignored_presses=%0d",
             n_runs, n_pulse, n_add, n_skip, n_carry, n_carry_in, n_reload, n_ignored);
    checks++;
    if (n_pulse == 0)    begin failures++; $display("FAIL no start pulse"); end
    checks++;
    if (n_add == 0)      begin failures++; $display("FAIL no add"); end
    checks++;
    if (n_skip == 0)     begin failures++; $display("FAIL no skipped add"); end
    checks++;
    if (n_carry == 0)    begin failures++; $display("FAIL no adder carry captured"); end
    checks++;
    if (n_carry_in == 0) begin failures++; $display("FAIL no carry shifted in"); end
    checks++;
    if (n_reload == 0)   begin failures++; $display("FAIL no idle reload"); end
    checks++;
    if (n_ignored == 0)  begin failures++; $display("FAIL no press while busy"); end
    checks++;
    if (n_pulse != n_runs + n_ignored) begin failures++; $display("FAIL pulses %0d != runs + ignored", n_pulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
