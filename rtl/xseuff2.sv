// xseuff2: XSEUFF 2, a scan flip-flop that tolerates one single-event upset,
// one single-event transient on its data input, and a data signal that
// arrives late (a crosstalk-induced delay) by up to about the Sync pulse width.
//
// The system latch PH2 samples the data line at the rising Clock edge (T0).
// The scan latches LA and LB are reused for temporal sampling: gated by the
// active-low pulses Sync(LA) and Sync(LB) from sync_gen, they re-sample the
// same data line at T1 and T2 just after the edge. The slave latch PH1 is a
// majority voter with a keeper: while Clock is high multiplexer M1 passes PH2
// and the voter sees (PH2, LA, LB); while Clock is low M1 passes PH1's own
// output, so a flip of LA, LB or the output node is outvoted. A glitch at T0
// corrupts only PH2; late data corrupts PH2 but is caught by LA and LB.
//
// Test mode (scan_mode = 1): LA and LB lose their Sync gating, ScA loads LA
// from si and ScB loads LB from LA (so = LB). The AND of ScanMode and
// not-Update drives multiplexer M2, which replaces LA at the voter by the
// PH1 feedback, so PH1 holds while the chain shifts; pulsing Update returns
// LA to the voter and, since LA = LB after a shift, loads the vector into
// PH1. With capture = 1 LA samples the flip-flop output in its Sync window.
// With Sync held high (generator disabled) and LA != LB the output follows
// PH2, which exposes stuck-at faults on the voter inputs.
//
// Following the source design: PH2/LA/LB/PH1 arrangement, active-low
// gating, the voter inside PH1 with M1/M2 and keeper, the scan controls.
// This design's choices: M1 selected by Clock, the AND gate driving M2, the
// capture multiplexer at LA's input, no output inversion, no reset. The
// functional Clock is expected to be stopped (low) in test mode.
//
// Interface: clock, sync_la, sync_lb, scan_mode, sca, scb, update, capture,
// si, d in; q (System-Out), so (Scan-Out) out. Timing: q is final after T2.
//
// Latches are the intended storage. Lint reports loops through q: the
// M2 input is q during scan shifting (PH1 holding itself) and LA's input is
// q during capture; both are PH1's keeper and capture paths, through latches
// that are not transparent together in use.
//
// Assertions state the usage rules assumed above: the scan clocks and
// Update pulse only in scan mode, and Clock rises only in functional mode.
`timescale 1ps/1ps
module xseuff2 (
  input  logic clock,
  input  logic sync_la,
  input  logic sync_lb,
  input  logic scan_mode,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic si,
  input  logic d,
  output logic q,
  output logic so
);

  logic la_q, lb_q, ph2_q;
  logic la_func_d;
  logic scan_hold;   // ScanMode AND not-Update
  logic m2;

  assign la_func_d = capture ? q : d;
  assign scan_hold = scan_mode & ~update;
  assign m2        = scan_hold ? q : la_q;

  // LA: first temporal sample (closes at T1), or master scan latch.
  latch2 u_la (
    .c1(sca), .d1(si),
    .c2(~scan_mode & ~sync_la), .d2(la_func_d),
    .q(la_q)
  );

  // LB: second temporal sample (closes at T2), or slave scan latch.
  latch2 u_lb (
    .c1(scb), .d1(la_q),
    .c2(~scan_mode & ~sync_lb), .d2(d),
    .q(lb_q)
  );

  // PH2: master system latch, transparent while Clock is low.
  always_latch begin
    if (!clock) ph2_q = d;
  end

  // PH1: voter over (M1, LB, M2) with keeper; M1 = Clock ? PH2 : feedback.
  vote_keeper u_ph1 (
    .sel(clock), .a(ph2_q), .b(lb_q), .c(m2),
    .q(q)
  );

  assign so = lb_q;

  // Usage rules (checked in simulation).
  a_sca_in_test_mode: assert property (@(posedge sca) scan_mode)
    else $error("xseuff2: sca pulsed outside scan mode");
  a_scb_in_test_mode: assert property (@(posedge scb) scan_mode)
    else $error("xseuff2: scb pulsed outside scan mode");
  a_update_in_test_mode: assert property (@(posedge update) scan_mode)
    else $error("xseuff2: update pulsed outside scan mode");
  a_clock_in_func_mode: assert property (@(posedge clock) !scan_mode)
    else $error("xseuff2: Clock rose in scan mode");

endmodule
