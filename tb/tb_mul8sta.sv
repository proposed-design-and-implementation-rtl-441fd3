// tb_mul8sta - self-checking test of the control pulse generator.
// Sends one-clock start pulses at random gaps, some of them while a run is in
// progress. A reference model of the run flag and the 4-bit count predicts
// ndone, ld and sh every clock. Each run must keep ndone high for exactly
// RUN_CYCLES (16) clocks and give 8 ld and 8 sh pulses, alternating, ld
// first; sh and ld must never be high together; a start during a run must
// not change it.
module tb_mul8sta;
  import mul8_pkg::*;
  logic clk = 1'b0, nclr, start, sh, ld, ndone;
  logic run;
  int   cnt;
  int   run_len, n_ld, n_sh;
  int   checks = 0, failures = 0, runs = 0, ignored_starts = 0;

  mul8sta dut (.clk(clk), .nclr(nclr), .start(start), .sh(sh), .ld(ld), .ndone(ndone));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nclr = 1'b0; start = 1'b0; run = 1'b0; cnt = 0;
    run_len = 0; n_ld = 0; n_sh = 0;
    @(posedge clk);
    #2 nclr = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      start = ($urandom_range(11) == 0);
      if (start && run) ignored_starts++;
      #1;
      // outputs of the current clock period
      checks++;
      if (ndone !== run || ld !== (run && cnt % 2 == 0) || sh !== (run && cnt % 2 == 1)) begin
        failures++;
        $display("FAIL n=%0d ndone=%0d ld=%0d sh=%0d expected run=%0d cnt=%0d", n, ndone, ld, sh, run, cnt);
      end
      checks++;
      if (sh && ld) begin failures++; $display("FAIL sh and ld together"); end
      if (ndone) begin run_len++; n_ld += int'(ld); n_sh += int'(sh); end
      @(posedge clk);
      // model update
      if (!run) begin
        cnt = 0;
        if (start) run = 1'b1;
      end else begin
        if (cnt == 15) run = 1'b0;
        cnt = (cnt + 1) % 16;
      end
      #1;
      if (!ndone && run_len != 0) begin
        runs++;
        checks++;
        if (run_len != int'(RUN_CYCLES) || n_ld != 8 || n_sh != 8) begin
          failures++;
          $display("FAIL run length %0d ld %0d sh %0d", run_len, n_ld, n_sh);
        end
        run_len = 0; n_ld = 0; n_sh = 0;
      end
    end
    checks++;
    if (runs == 0 || ignored_starts == 0) begin failures++; $display("FAIL coverage runs=%0d ignored=%0d", runs, ignored_starts); end
    $display("runs=%0d starts_during_run=%0d", runs, ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
