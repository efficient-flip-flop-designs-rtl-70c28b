// xseuff_top: two hardened registers side by side, one built from XSEUFF 1
// cells and one from XSEUFF 2 cells, each with its own controls, data and
// scan chain. They are alternatives (XSEUFF 1: no clock-to-Q penalty, data
// must be stable for half a period; XSEUFF 2: fewer transistors, also rides
// through late data, about 25 % slower clock-to-Q) shown together so either
// can be taken on its own.
//
// XSEUFF 1 register: N_FF cells share CLK and one clk_delay that derives
// SYS_CLK = CLK + Delta1. XSEUFF 2 register: N_FF cells share Clock and one
// sync_gen producing Sync(LA)/Sync(LB). In both, cell i's scan input is
// cell i-1's scan output; cell 0 takes x?_si and the last cell drives x?_so.
// Scan shifting moves one bit per SCA/SCB pulse pair, from cell 0 towards
// cell N_FF-1.
//
// The register width (8) and the delays are this design's choices; the
// shared delay element and shared generator follow the source design's note
// that one generator can serve many cells.
//
// Timing: x1_q follows x1_d at the x1_clk rise, settled by CLK + Delta1;
// x2_q is settled SYNC_WIDTH_PS + SYNC_SKEW_PS after the x2_clock rise.
`timescale 1ps/1ps
module xseuff_top #(
  parameter int unsigned N_FF          = 8,
  parameter int unsigned DELTA1_PS     = xseuff_pkg::DEF_DELTA1_PS,
  parameter int unsigned SYNC_WIDTH_PS = xseuff_pkg::DEF_SYNC_WIDTH_PS,
  parameter int unsigned SYNC_SKEW_PS  = xseuff_pkg::DEF_SYNC_SKEW_PS
) (
  // XSEUFF 1 register
  input  logic            x1_clk,
  input  logic            x1_testbar,
  input  logic            x1_sca,
  input  logic            x1_scb,
  input  logic            x1_update,
  input  logic            x1_capture,
  input  logic            x1_si,
  input  logic [N_FF-1:0] x1_d,
  output logic [N_FF-1:0] x1_q,
  output logic            x1_so,
  // XSEUFF 2 register
  input  logic            x2_clock,
  input  logic            x2_scan_mode,
  input  logic            x2_sca,
  input  logic            x2_scb,
  input  logic            x2_update,
  input  logic            x2_capture,
  input  logic            x2_sync_en,
  input  logic            x2_si,
  input  logic [N_FF-1:0] x2_d,
  output logic [N_FF-1:0] x2_q,
  output logic            x2_so
);

  // ---------------- XSEUFF 1 register ----------------
  logic            x1_sys_clk;
  logic [N_FF:0]   x1_chain;

  clk_delay #(.DELTA1_PS(DELTA1_PS)) u_delay (
    .clk(x1_clk), .sys_clk(x1_sys_clk)
  );

  assign x1_chain[0] = x1_si;

  for (genvar i = 0; i < N_FF; i++) begin : g_x1
    xseuff1 u_ff (
      .clk    (x1_clk),
      .sys_clk(x1_sys_clk),
      .testbar(x1_testbar),
      .sca    (x1_sca),
      .scb    (x1_scb),
      .update (x1_update),
      .capture(x1_capture),
      .si     (x1_chain[i]),
      .d      (x1_d[i]),
      .q      (x1_q[i]),
      .so     (x1_chain[i+1])
    );
  end

  assign x1_so = x1_chain[N_FF];

  // ---------------- XSEUFF 2 register ----------------
  logic            x2_sync_la, x2_sync_lb;
  logic [N_FF:0]   x2_chain;

  sync_gen #(.DELTA1_PS(SYNC_WIDTH_PS), .DELTA0_PS(SYNC_SKEW_PS)) u_sync (
    .clk(x2_clock), .en(x2_sync_en),
    .sync_la(x2_sync_la), .sync_lb(x2_sync_lb)
  );

  assign x2_chain[0] = x2_si;

  for (genvar i = 0; i < N_FF; i++) begin : g_x2
    xseuff2 u_ff (
      .clock    (x2_clock),
      .sync_la  (x2_sync_la),
      .sync_lb  (x2_sync_lb),
      .scan_mode(x2_scan_mode),
      .sca      (x2_sca),
      .scb      (x2_scb),
      .update   (x2_update),
      .capture  (x2_capture),
      .si       (x2_chain[i]),
      .d        (x2_d[i]),
      .q        (x2_q[i]),
      .so       (x2_chain[i+1])
    );
  end

  assign x2_so = x2_chain[N_FF];

endmodule
