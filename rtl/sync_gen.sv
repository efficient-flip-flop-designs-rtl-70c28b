// sync_gen: behavioural model (not synthesizable) of the synchronous signal
// generator that clocks the shadow latches LA and LB of XSEUFF 2.
//
// After every rising Clock edge (T0) the generator drives Sync(LA) low for
// delta1 (until T1); Sync(LB) is Sync(LA) passed through an output buffer of
// delay delta0, so it is low from T0+delta0 until T2 = T1+delta0. The two
// latches are transparent while their Sync input is low, so LA re-samples the
// data line at T1 and LB at T2, after the system latch PH2 has sampled it at
// T0. Both outputs idle high.
//
// In silicon this is two transmission gates switched by delayed clocks, a
// keeper, an OR gate and a buffer; here only the resulting waveform is
// modelled. One generator can drive any number of XSEUFF 2 cells.
// The enable input is this design's addition: with en low both outputs stay
// high, which freezes LA and LB for the voter stuck-at test.
// Default widths (delta1 = 120 ps, delta0 = 100 ps) are this design's choice.
//
// Interface: clk, en in; sync_la, sync_lb out (active low).
`timescale 1ps/1ps
module sync_gen #(
  parameter int unsigned DELTA1_PS = xseuff_pkg::DEF_SYNC_WIDTH_PS,
  parameter int unsigned DELTA0_PS = xseuff_pkg::DEF_SYNC_SKEW_PS
) (
  input  logic clk,
  input  logic en,
  output logic sync_la,
  output logic sync_lb
);

  logic pulse_n;    // low for DELTA1_PS after each rising clock edge
  logic pulse_n_d;  // pulse_n through the output buffer

  initial begin
    pulse_n   = 1'b1;
    pulse_n_d = 1'b1;
  end

  always @(posedge clk) begin
    if (en) begin
      pulse_n <= 1'b0;
      pulse_n <= #(DELTA1_PS) 1'b1;
    end
  end

  always @(pulse_n) pulse_n_d <= #(DELTA0_PS) pulse_n;

  assign sync_la = pulse_n   | ~en;
  assign sync_lb = pulse_n_d | ~en;

endmodule
