// xseuff1: XSEUFF 1, a scan flip-flop that tolerates one single-event upset
// (a flipped latch) or one single-event transient (a glitch on D from the
// logic in front of it) anywhere in its window of vulnerability.
//
// Four latches sample D at three instants. The scan latches are reused as
// shadows in functional mode: LA is transparent while CLK is low and closes
// on the CLK rise; LB is transparent while CLK is high and closes on the CLK
// fall. The system latches run on SYS_CLK, which is CLK delayed by Delta1:
// PH2 closes on the SYS_CLK rise and PH1 then passes PH2 while SYS_CLK is
// high. A glitch narrower than Delta1 can therefore corrupt LA or PH2 but
// not both, and LB (still open) recovers after it. A majority voter over
// (mux, LB, PH1) drives the output; the mux passes LA while CLK is high and
// the output keeper's value while CLK is low, so during the hold phase a
// flip of LA, LB, PH1 or the output node is outvoted (see vote_keeper).
//
// Test mode (testbar = 0): the functional enables of LA and LB are switched
// off, SCA loads LA from si and SCB loads LB from LA (so = LB), UPDATE copies
// LB into PH1. With capture = 1 LA's functional input is PH1, which holds
// the flip-flop's response, captured while CLK is low.
//
// Following the source design: the latch arrangement, the two clocks, the
// keeper/multiplexer/voter and the scan controls. This design's choices:
// PH1's update input is LB, the capture multiplexer's other input is PH1,
// testbar gates the functional enables of LA and LB, no inversion at the
// output, no reset. The functional clock is expected to be stopped
// (low) in test mode. Data must be stable while CLK is high.
//
// Interface: clk, sys_clk, testbar, sca, scb, update, capture, si, d in;
// q (output), so (scan out) out. Timing: q takes the new D at the CLK rise
// and is final by the SYS_CLK rise.
//
// Latches are the intended storage element of this cell. Lint reports a
// loop LA -> LB -> PH1 -> LA: it is the scan path (SCB), the update path
// (UPDATE) and the capture path (CAPTURE with CLK low), whose latches are
// never transparent together in use. The voter keeper loop is explained in
// vote_keeper.
//
// Assertions state the usage rules assumed above: the scan clocks and
// UPDATE pulse only in test mode, and CLK rises only in functional mode.
`timescale 1ps/1ps
module xseuff1 (
  input  logic clk,
  input  logic sys_clk,
  input  logic testbar,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic si,
  input  logic d,
  output logic q,
  output logic so
);

  logic la_q, lb_q, ph2_q, ph1_q;
  logic la_func_d;

  assign la_func_d = capture ? ph1_q : d;

  // LA: master scan latch, shadow sample at the CLK rise.
  latch2 u_la (
    .c1(sca), .d1(si),
    .c2(testbar & ~clk), .d2(la_func_d),
    .q(la_q)
  );

  // LB: slave scan latch, shadow sample at the CLK fall.
  latch2 u_lb (
    .c1(scb), .d1(la_q),
    .c2(testbar & clk), .d2(d),
    .q(lb_q)
  );

  // PH2: master system latch, transparent while SYS_CLK is low.
  always_latch begin
    if (!sys_clk) ph2_q = d;
  end

  // PH1: slave system latch, loaded from PH2 or, on UPDATE, from LB.
  latch2 u_ph1 (
    .c1(update), .d1(lb_q),
    .c2(sys_clk), .d2(ph2_q),
    .q(ph1_q)
  );

  // Majority voter with output keeper; CLK selects LA or the kept output.
  vote_keeper u_vote (
    .sel(clk), .a(la_q), .b(lb_q), .c(ph1_q),
    .q(q)
  );

  assign so = lb_q;

  // Usage rules (checked in simulation).
  a_sca_in_test_mode: assert property (@(posedge sca) !testbar)
    else $error("xseuff1: sca pulsed functional mode");
  a_scb_in_test_mode: assert property (@(posedge scb) !testbar)
    else $error("xseuff1: scb pulsed functional mode");
  a_update_in_test_mode: assert property (@(posedge update) !testbar)
    else $error("xseuff1: update pulsed functional mode");
  a_clk_in_func_mode: assert property (@(posedge clk) testbar)
    else $error("xseuff1: CLK rose in test mode");

endmodule
