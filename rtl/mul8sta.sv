// mul8sta - control pulse generator of the multiplier.
//
// A run flip-flop Q (the DONE signal, brought out on pin ndone) is set by the
// start pulse and held while the 4-bit counter has not reached 1111:
//   D = start & ~Q  |  Q & ~(cnt0 & cnt1 & cnt2 & cnt3)
// Q drives both the enable and the active-low (synchronous) clear of the
// counter, so the counter sits at 0 while idle and counts 0..15 while Q is
// high. Q therefore stays high for exactly 16 clocks after the edge that
// captures start; it falls on the edge that wraps the counter from 15 to 0.
// During the run
//   ld = Q & ~cnt0   (counts 0, 2, ..., 14: add)
//   sh = Q &  cnt0   (counts 1, 3, ..., 15: shift)
// so the multiplier gets eight load/shift pairs, load first. The counter's
// carry out is not used. start is ignored while a run is in progress. nclr
// clears the flip-flop asynchronously. An assertion checks that sh and ld are
// never high together.
//
// The equations and the connections are the original design's. Making the
// counter clear synchronous is this design's choice (it behaves the same at
// every clock edge). The pin keeps its original name ndone, but it carries Q
// itself, which is high while the multiplier is busy (the original timing
// diagram calls this waveform DONE).
module mul8sta (
  input  logic clk,
  input  logic nclr,
  input  logic start,
  output logic sh,
  output logic ld,
  output logic ndone
);
  logic       q;
  logic       d;
  logic       y;
  logic [3:0] cnt;

  counter4 #(.WIDTH(4)) u_counter (
    .clk    (clk),
    .clear_n(q),
    .en     (q),
    .q      (cnt),
    .co     ()
  );

  always_comb begin
    y  = ~(&cnt);
    d  = (start & ~q) | (q & y);
    sh = q & cnt[0];
    ld = q & ~cnt[0];
  end

  always_ff @(posedge clk or negedge nclr)
    if (!nclr) q <= 1'b0;
    else       q <= d;

  assign ndone = q;

  // load and shift pulses are mutually exclusive by construction
  a_sh_ld_exclusive: assert property (@(posedge clk) !(sh && ld))
    else $error("mul8sta: sh and ld high together");
endmodule
