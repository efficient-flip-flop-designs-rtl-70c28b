// vote_keeper: three-input majority voter whose output node is held by a
// keeper, with a multiplexer that swaps one voter input for the kept value.
//
// Both hardened flip-flops end in this structure. While sel is high the
// voter sees (a, b, c) and q = maj(a, b, c): the latch is transparent. While
// sel is low the multiplexer feeds the keeper's own value back in place of a,
// so q = maj(q, b, c): q moves only when b and c agree, and a single upset on
// b or c (or a flipped q while b == c) cannot change the output for good.
//
// The feedback is written as it is in silicon: the kept output is a voter
// input while sel is low, so the node is re-voted whenever it changes, and
// a flipped output node is restored as long as b and c agree. This loop is
// the storage element (the latch) of the cell and is intentional: tools
// report it as a combinational loop.
// The voter, the keeper on its output and the clock-selected multiplexer
// follow the source design of both cells.
// The inverter drawn after the voter is not modelled: the cell output follows
// its data input, so the net path is taken as non-inverting.
//
// Interface: sel, a, b, c in; q out. Timing: zero delay.
`timescale 1ps/1ps
module vote_keeper
  import xseuff_pkg::*;
(
  input  logic sel,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic q
);

  // Voter output node; while sel is low its keeper value is the a-input.
  assign q = sel ? maj3(a, b, c) : maj3(q, b, c);

endmodule
