// xseuff_pkg: shared helpers and default timing of the radiation-hardened
// scan flip-flops XSEUFF 1 and XSEUFF 2.
//
// maj3() is the three-input majority function used by both cells' voters.
// The timing constants are the default delays, in picoseconds, of the two
// behavioural timing elements (the Delta1 clock delay of XSEUFF 1 and the
// Sync pulse generator of XSEUFF 2). The design formulas are this design's
// source; the numbers are this design's own choice for a 1 GHz clock, since
// only the formulas are given:
//   Delta1     = t_hold(LA) + W_MTT + t_setup(PH2)
//   pulse width = delta1 (Sync(LA) low time), skew = delta0 (Sync(LB) lag)
`timescale 1ps/1ps
package xseuff_pkg;

  // XSEUFF 1: SYS_CLK lags CLK by Delta1.
  localparam int unsigned DEF_DELTA1_PS    = 200;
  // XSEUFF 2: Sync(LA) low width (delta1) and Sync(LB) skew (delta0).
  localparam int unsigned DEF_SYNC_WIDTH_PS = 120;
  localparam int unsigned DEF_SYNC_SKEW_PS  = 100;

  // Majority of three bits.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
