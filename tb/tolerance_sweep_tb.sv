// tolerance_sweep_tb: measures how wide a data transient and how late a data
// edge each hardened register tolerates, on the default top, and compares
// them with the design equations evaluated for this zero-delay model
// (setup, hold and multiplexer delays all zero):
//   XSEUFF 1: widest tolerated transient W_MTT = Delta1                 (1)
//   XSEUFF 2: latest tolerated data edge  Delta_max = T1 - T0 = delta1  (3)
//   XSEUFF 2: widest transient tolerated at every position
//             = min(T1 - T0, T2 - T1) = min(delta1, delta0)
// A transient of width w starts at every 10 ps step across the cycle (5 ps
// off the clock edges, so no edge coincides with a clock edge); a
// width is tolerated if the output is right at the end of the cycle for all
// start positions. Latest edge: data changes L ps after the clock edge,
// L = 5, 15, 25, ...
// The measured limits must fall within one 10 ps step below the bound, and
// the next step above the bound must fail somewhere.
`timescale 1ps/1ps
module tolerance_sweep_tb;
  import xseuff_pkg::*;
  localparam int N    = 8;
  localparam int P    = 1000;
  localparam int SU   = 300;
  localparam int STEP = 10;
  localparam int W1   = DEF_DELTA1_PS;
  localparam int DMAX = DEF_SYNC_WIDTH_PS;
  localparam int W2   = (DEF_SYNC_WIDTH_PS < DEF_SYNC_SKEW_PS) ? DEF_SYNC_WIDTH_PS : DEF_SYNC_SKEW_PS;

  logic clk;
  logic [N-1:0] x1_d, x2_d, x1_q, x2_q;
  logic x1_so, x2_so;
  int checks = 0, failures = 0;

  xseuff_top dut (
    .x1_clk(clk), .x1_testbar(1'b1), .x1_sca(1'b0), .x1_scb(1'b0), .x1_update(1'b0),
    .x1_capture(1'b0), .x1_si(1'b0), .x1_d, .x1_q, .x1_so,
    .x2_clock(clk), .x2_scan_mode(1'b0), .x2_sca(1'b0), .x2_scb(1'b0), .x2_update(1'b0),
    .x2_capture(1'b0), .x2_sync_en(1'b1), .x2_si(1'b0), .x2_d, .x2_q, .x2_so
  );

  // One cycle with data v on all bits. Bit 0 of both registers: inverted
  // from T0+g_at for g_w ps (g_w = 0: none), or (late >= 0) old value until
  // T0+late. Returns whether bit 0 of each register ended the cycle right.
  task automatic cycle(logic v, int g_at, int g_w, int late,
                       output logic ok1, output logic ok2);
    x1_d = {N{v}};
    x2_d = {N{v}};
    if (late >= 0) begin x1_d[0] = ~v; x2_d[0] = ~v; end
    fork
      begin
        #SU clk = 1'b1;
        #(P / 2) clk = 1'b0;
        #(P / 2 - SU - 1);
        ok1 = (x1_q[0] == v);
        ok2 = (x2_q[0] == v);
        #1;
      end
      if (g_w > 0) begin
        #(SU + g_at) x1_d[0] = ~v; x2_d[0] = ~v;
        #(g_w) x1_d[0] = v; x2_d[0] = v;
      end
      if (late >= 0) begin
        #(SU + late) x1_d[0] = v; x2_d[0] = v;
      end
    join
  endtask

  task automatic expect_limit(string what, int measured, int bound);
    checks++;
    $display("%s: tolerated up to %0d ps, bound %0d ps", what, measured, bound);
    if (measured < bound - STEP || measured >= bound + STEP) begin
      failures++;
      $display("FAIL %s: measured %0d ps against bound %0d ps", what, measured, bound);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok1, ok2, dummy1, dummy2;
    int max_w1, max_w2, max_late;
    bit all1, all2;
    clk = 1'b0; x1_d = '0; x2_d = '0;
    max_w1 = 0; max_w2 = 0; max_late = 5 - STEP;
    repeat (3) cycle(1'b0, 0, 0, -1, dummy1, dummy2);

    // transient width sweep
    for (int w = STEP; w <= 400; w += STEP) begin
      all1 = 1; all2 = 1;
      for (int at = -SU + STEP + 5; at + w <= P - SU - STEP; at += STEP) begin
        for (int v = 0; v < 2; v++) begin
          cycle(1'(v), 0, 0, -1, dummy1, dummy2);   // clean cycle first
          cycle(1'(v), at, w, -1, ok1, ok2);
          all1 &= ok1;
          all2 &= ok2;
        end
      end
      if (all1 && max_w1 == w - STEP) max_w1 = w;
      if (all2 && max_w2 == w - STEP) max_w2 = w;
    end

    // late data sweep (XSEUFF 2)
    for (int late = 5; late <= 300; late += STEP) begin
      all2 = 1;
      for (int v = 0; v < 2; v++) begin
        cycle(~1'(v), 0, 0, -1, dummy1, dummy2);
        cycle(1'(v), 0, 0, late, ok1, ok2);
        all2 &= ok2;
      end
      if (all2 && max_late == late - STEP) max_late = late;
    end

    expect_limit("XSEUFF 1 transient width (W_MTT = Delta1)", max_w1, W1);
    expect_limit("XSEUFF 2 transient width (min(delta1, delta0))", max_w2, W2);
    expect_limit("XSEUFF 2 late data (Delta_max = T1 - T0)", max_late, DMAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
