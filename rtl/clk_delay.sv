// clk_delay: behavioural model (not synthesizable) of the delay element that
// derives SYS_CLK from CLK in the XSEUFF 1 clocking scheme.
//
// SYS_CLK is CLK delayed by Delta1 = t_hold(LA) + W_MTT + t_setup(PH2), where
// W_MTT is the widest data transient the flip-flop must tolerate. Delta1
// keeps the scan latch LA (closing on the CLK rise) and the system latch PH2
// (closing on the SYS_CLK rise) from both capturing one transient. In a real
// chip this is a buffer chain sized to Delta1; here it is a transport delay.
// The default of 200 ps is this design's choice for a 1 GHz clock.
//
// Interface: clk in, sys_clk out. Timing: sys_clk(t) = clk(t - DELTA1_PS).
`timescale 1ps/1ps
module clk_delay #(
  parameter int unsigned DELTA1_PS = xseuff_pkg::DEF_DELTA1_PS
) (
  input  logic clk,
  output logic sys_clk
);

  initial sys_clk = 1'b0;
  always @(clk) sys_clk <= #(DELTA1_PS) clk;

endmodule
