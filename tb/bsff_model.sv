// bsff_model: behavioural model of the functional path of a plain (basic)
// scan flip-flop, used only as the unhardened reference in a testbench.
// A master latch is transparent while clk is low and a slave latch while clk
// is high, so q takes d at the rising clk edge with nothing to outvote a bad
// sample. The scan latches of the real cell are idle in functional mode and
// are left out.
`timescale 1ps/1ps
module bsff_model (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic master;
  always_latch if (!clk) master = d;
  always_latch if (clk)  q = master;
endmodule
