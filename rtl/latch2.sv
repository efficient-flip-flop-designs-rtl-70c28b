// latch2: level-sensitive D latch with two data/enable port pairs, the latch
// symbol (1D/C1, 2D/C2) used for the scan latches LA and LB and the slave
// latch PH1 of the XSEUFF 1 flip-flop, and for LA/LB of XSEUFF 2.
//
// The latch is transparent to d1 while c1 is high and to d2 while c2 is high;
// with both enables low it holds its value. If both enables are high, port 1
// wins; that priority is this design's choice (in the cells the two ports are
// never enabled together in normal operation). There is no reset.
//
// Interface: c1/d1, c2/d2 in; q out. Timing: q follows the selected input
// with zero delay while enabled and freezes on the falling enable.
//
// The latch inferred here is the intended storage element, not a coding slip:
// the flip-flops this library builds are made of latches.
`timescale 1ps/1ps
module latch2 (
  input  logic c1,
  input  logic d1,
  input  logic c2,
  input  logic d2,
  output logic q
);

  always_latch begin
    if (c1)      q = d1;
    else if (c2) q = d2;
  end

endmodule
