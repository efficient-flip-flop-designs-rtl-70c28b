// fig_scenarios_tb: replays the three disturbance scenarios used to
// characterise the hardened flip-flops, on the default top, next to an
// unhardened scan flip-flop (bsff_model) fed the same clock and data:
//   A. XSEUFF 1 with a transient on D as the system latch PH2 closes
//      (SYS_CLK rise), and one as LA closes (CLK rise)
//   B. XSEUFF 2 with a noise pulse on Data over the active clock edge
//   C. XSEUFF 2 with Data arriving after the active clock edge
// In each case the hardened output must be right for the whole cycle, while
// the reference flip-flop (sampling at the same edge) is expected to be
// wrong, which shows the disturbance really hit a sampling instant.
`timescale 1ps/1ps
module fig_scenarios_tb;
  localparam int N  = 8;
  localparam int P  = 1000;
  localparam int SU = 300;
  localparam int D1 = 200;

  logic clk;
  logic [N-1:0] x1_d, x2_d, x1_q, x2_q;
  logic x1_so, x2_so;
  logic ref1_d, ref2_d, ref1_q, ref2_q;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_c = 0;

  xseuff_top dut (
    .x1_clk(clk), .x1_testbar(1'b1), .x1_sca(1'b0), .x1_scb(1'b0), .x1_update(1'b0),
    .x1_capture(1'b0), .x1_si(1'b0), .x1_d, .x1_q, .x1_so,
    .x2_clock(clk), .x2_scan_mode(1'b0), .x2_sca(1'b0), .x2_scb(1'b0), .x2_update(1'b0),
    .x2_capture(1'b0), .x2_sync_en(1'b1), .x2_si(1'b0), .x2_d, .x2_q, .x2_so
  );

  // reference for XSEUFF 1 samples where the disturbance is (CLK or SYS_CLK)
  logic ref1_clk;
  bsff_model u_ref1 (.clk(ref1_clk), .d(ref1_d), .q(ref1_q));
  bsff_model u_ref2 (.clk(clk),      .d(ref2_d), .q(ref2_q));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  // One cycle: all data bits = v; ref1 clocked at T0 + ref1_off.
  // x1 bit 0 glitched from g1_at for g1_w (g1_w = 0: none);
  // x2 bit 0 glitched over T0 for 100 ps (g2) or late by 60 ps (late2).
  task automatic cycle(logic v, int ref1_off = 0, int g1_at = 0, int g1_w = 0,
                       logic g2 = 1'b0, logic late2 = 1'b0,
                       logic ref1_bad = 1'b0, logic ref2_bad = 1'b0);
    x1_d = {N{v}}; ref1_d = v;
    x2_d = {N{v}}; ref2_d = v;
    if (late2) begin x2_d[0] = ~v; ref2_d = ~v; end
    fork
      begin
        #SU clk = 1'b1;
        #400;
        check("x1 bit 0 mid-cycle", x1_q[0], v);
        check("x2 bit 0 mid-cycle", x2_q[0], v);
        check("reference 2 sample", ref2_q, ref2_bad ? ~v : v);
        #(P / 2 - 400) clk = 1'b0;
        #(P / 2 - SU - 1);
        check("x1 end of cycle", x1_q, {N{v}});
        check("x2 end of cycle", x2_q, {N{v}});
        check("reference 1 sample", ref1_q, ref1_bad ? ~v : v);
        #1;
      end
      begin
        #(SU + ref1_off) ref1_clk = 1'b1;
        #(P / 2) ref1_clk = 1'b0;
      end
      if (g1_w > 0) begin
        #(SU + g1_at) x1_d[0] = ~v; ref1_d = ~v;
        #(g1_w) x1_d[0] = v; ref1_d = v;
      end
      if (g2) begin
        #(SU - 50) x2_d[0] = ~v; ref2_d = ~v;
        #100 x2_d[0] = v; ref2_d = v;
      end
      if (late2) begin
        #(SU + 60) x2_d[0] = v; ref2_d = v;
      end
    join
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; ref1_clk = 1'b0;
    x1_d = '0; x2_d = '0; ref1_d = 1'b0; ref2_d = 1'b0;
    repeat (3) cycle(1'b0);
    for (int i = 0; i < 8; i++) begin
      logic v;
      int f0;
      v = i[0];
      cycle(~v);
      f0 = failures;
      // A1: glitch as PH2 closes; reference sampling at SYS_CLK
      cycle(v, D1, D1 - 50, 100, 1'b0, 1'b0, 1'b1, 1'b0);
      cycle(v, D1);
      // A2: glitch as LA closes; reference sampling at CLK
      cycle(v, 0, -50, 100, 1'b0, 1'b0, 1'b1, 1'b0);
      if (failures == f0) n_a++;
      cycle(~v);
      f0 = failures;
      // B: noise pulse over the active edge
      cycle(v, 0, 0, 0, 1'b1, 1'b0, 1'b0, 1'b1);
      if (failures == f0) n_b++;
      cycle(~v);
      f0 = failures;
      // C: data 60 ps late
      cycle(v, 0, 0, 0, 1'b0, 1'b1, 1'b0, 1'b1);
      if (failures == f0) n_c++;
    end
    checks += 3;
    if (n_a == 0) begin failures++; $display("FAIL scenario A never passed"); end
    if (n_b == 0) begin failures++; $display("FAIL scenario B never passed"); end
    if (n_c == 0) begin failures++; $display("FAIL scenario C never passed"); end
    $display("scenario A (XSEUFF 1 transient) passed %0d times", n_a);
    $display("scenario B (XSEUFF 2 noise pulse) passed %0d times", n_b);
    $display("scenario C (XSEUFF 2 late data) passed %0d times", n_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
