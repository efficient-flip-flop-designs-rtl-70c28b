// xseuff_top_tb: end-to-end test of both hardened registers at their
// default size (8 cells each, default delays; the top has no overrides).
//
// Both registers run from one 1 ns clock (x1_clk and x2_clock rise
// together, T0); the XSEUFF 2 register gets its Sync pulses from the shared
// generator inside the top. Every functional cycle loads a random 8-bit word
// into each register and checks both outputs against it. On top of that the
// test makes each hardening and test mechanism happen and counts it:
//   x1: D glitch at LA/PH2/LB closing, latch upsets; x2: D glitch at T0,
//   late data, latch upsets; both: scan shift of a full word through the
//   chain, update (applying the word), capture and shift-out of a response;
//   x2 only: PH1 held during shifting, generator disabled (stuck-at mode).
// A mechanism that never happened is a failure.
`timescale 1ps/1ps
module xseuff_top_tb;
  localparam int N  = 8;
  localparam int P  = 1000;
  localparam int SU = 300;
  localparam int D1 = 200;              // top default Delta1
  localparam int T2 = 220;              // top default width + skew

  logic clk, testbar, x1_sca, x1_scb, x1_update, x1_capture, x1_si;
  logic scan_mode, x2_sca, x2_scb, x2_update, x2_capture, sync_en, x2_si;
  logic [N-1:0] x1_d, x1_q, x2_d, x2_q;
  logic x1_so, x2_so;
  int checks = 0, failures = 0;

  typedef enum int {
    M_X1_SET, M_X1_SEU, M_X1_SHIFT, M_X1_UPDATE, M_X1_CAPTURE,
    M_X2_SET, M_X2_LATE, M_X2_SEU, M_X2_SHIFT, M_X2_HOLD, M_X2_UPDATE,
    M_X2_CAPTURE, M_X2_GEN_OFF, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"x1 SET masked", "x1 SEU masked", "x1 scan shift",
    "x1 update", "x1 capture", "x2 SET masked", "x2 late data corrected",
    "x2 SEU masked", "x2 scan shift", "x2 PH1 hold in shift", "x2 update",
    "x2 capture", "x2 generator disabled"};

  xseuff_top dut (
    .x1_clk(clk), .x1_testbar(testbar), .x1_sca, .x1_scb, .x1_update,
    .x1_capture, .x1_si, .x1_d, .x1_q, .x1_so,
    .x2_clock(clk), .x2_scan_mode(scan_mode), .x2_sca, .x2_scb, .x2_update,
    .x2_capture, .x2_sync_en(sync_en), .x2_si, .x2_d, .x2_q, .x2_so
  );

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h exp %h", what, $time, got, exp);
    end
  endtask

  // Upsets in fixed cells: XSEUFF 1 cell 2, XSEUFF 2 cell 5.
  task automatic upset_x1(int node);
    logic v;
    case (node)
      0: begin v = dut.g_x1[2].u_ff.u_la.q;  force dut.g_x1[2].u_ff.u_la.q  = ~v; #1 release dut.g_x1[2].u_ff.u_la.q;  end
      1: begin v = dut.g_x1[2].u_ff.u_lb.q;  force dut.g_x1[2].u_ff.u_lb.q  = ~v; #1 release dut.g_x1[2].u_ff.u_lb.q;  end
      2: begin v = dut.g_x1[2].u_ff.ph2_q;   force dut.g_x1[2].u_ff.ph2_q   = ~v; #1 release dut.g_x1[2].u_ff.ph2_q;   end
      default: begin v = dut.g_x1[2].u_ff.u_ph1.q; force dut.g_x1[2].u_ff.u_ph1.q = ~v; #1 release dut.g_x1[2].u_ff.u_ph1.q; end
    endcase
  endtask

  task automatic upset_x2(int node);
    logic v;
    case (node)
      0: begin v = dut.g_x2[5].u_ff.u_la.q; force dut.g_x2[5].u_ff.u_la.q = ~v; #1 release dut.g_x2[5].u_ff.u_la.q; end
      1: begin v = dut.g_x2[5].u_ff.u_lb.q; force dut.g_x2[5].u_ff.u_lb.q = ~v; #1 release dut.g_x2[5].u_ff.u_lb.q; end
      default: begin v = dut.g_x2[5].u_ff.ph2_q; force dut.g_x2[5].u_ff.ph2_q = ~v; #1 release dut.g_x2[5].u_ff.ph2_q; end
    endcase
  endtask

  // Internal latch values of every cell, for confirming that a disturbance
  // really corrupted the latch it aimed at.
  logic [N-1:0] x1_la, x1_lb, x1_ph1, x2_la, x2_lb, x2_ph2;
  for (genvar k = 0; k < N; k++) begin : g_probe
    assign x1_la[k]  = dut.g_x1[k].u_ff.la_q;
    assign x1_lb[k]  = dut.g_x1[k].u_ff.lb_q;
    assign x1_ph1[k] = dut.g_x1[k].u_ff.ph1_q;
    assign x2_la[k]  = dut.g_x2[k].u_ff.la_q;
    assign x2_lb[k]  = dut.g_x2[k].u_ff.lb_q;
    assign x2_ph2[k] = dut.g_x2[k].u_ff.ph2_q;
  end

  // wrong-latch bits seen during the last cycle
  logic [N-1:0] x1_bad, x2_bad;

  // One functional cycle of both registers; T0 (both clocks rise) is SU
  // after the call, the cycle lasts P. Disturbances, offsets from T0:
  //   g1_at/g1_mask: x1 data bits in g1_mask inverted for 100 ps from g1_at
  //   g2_mask: x2 data bits in g2_mask inverted from -50 to +50 ps (over T0)
  //   late_mask: x2 data bits in late_mask arrive 60 ps after T0
  //   s1_node/s2_node: latch upset in one cell of each register (-1: none)
  task automatic cycle(logic [N-1:0] v1, logic [N-1:0] v2,
                       int g1_at = 0, logic [N-1:0] g1_mask = '0,
                       logic [N-1:0] g2_mask = '0, logic [N-1:0] late_mask = '0,
                       int s1_node = -1, int s2_node = -1);
    x1_d = v1;
    x2_d = v2 ^ late_mask;
    x1_bad = '0;
    x2_bad = '0;
    fork
      begin
        #SU clk = 1'b1;
        #(T2 + 1) check("x2 output final after T2", x2_q, v2);
        #(400 - T2 - 1) check("x1 output after SYS_CLK", x1_q, v1);
        #(P / 2 - 400) clk = 1'b0;
        #(P / 2 - SU - 1);
        check("x1 end of cycle", x1_q, v1);
        check("x2 end of cycle", x2_q, v2);
        #1;
      end
      begin  // record latches that hold a wrong value
        #(SU + 300) x2_bad = (x2_ph2 ^ v2) | (x2_la ^ v2) | (x2_lb ^ v2);
        #100 x1_bad = (x1_la ^ v1) | (x1_ph1 ^ v1);
        #250 x1_bad |= x1_lb ^ v1;
      end
      if (g1_mask != '0) begin
        #(SU + g1_at) x1_d = v1 ^ g1_mask;
        #100 x1_d = v1;
      end
      if (g2_mask != '0) begin
        #(SU - 50) x2_d = v2 ^ g2_mask;
        #100 x2_d = v2;
      end
      if (late_mask != '0) begin
        #(SU + 60) x2_d = v2;
      end
      if (s1_node >= 0) begin
        #(SU + (s1_node == 1 ? 650 : 300)) upset_x1(s1_node);
      end
      if (s2_node >= 0) begin
        #(SU + (s2_node == 2 ? 300 : 600)) upset_x2(s2_node);
      end
    join
  endtask

  task automatic pulse1(ref logic s);
    #50 s = 1'b1;
    #100 s = 1'b0;
    #50;
  endtask

  // one shift step of both chains: SCA then SCB
  task automatic shift_step(logic b1, logic b2);
    x1_si = b1;
    x2_si = b2;
    #50 x1_sca = 1'b1; x2_sca = 1'b1;
    #100 x1_sca = 1'b0; x2_sca = 1'b0;
    #100 x1_scb = 1'b1; x2_scb = 1'b1;
    #100 x1_scb = 1'b0; x2_scb = 1'b0;
    #50;
  endtask

  // shift words into both chains; cell k ends up holding w[k]
  task automatic scan_in(logic [N-1:0] w1, logic [N-1:0] w2);
    for (int k = N - 1; k >= 0; k--) shift_step(w1[k], w2[k]);
  endtask

  // shift both chains out, SCB first; returns cell k's LA in r[k]
  task automatic scan_out(output logic [N-1:0] r1, output logic [N-1:0] r2);
    for (int k = N - 1; k >= 0; k--) begin
      #50 x1_scb = 1'b1; x2_scb = 1'b1;
      #100 x1_scb = 1'b0; x2_scb = 1'b0;
      #50 r1[k] = x1_so; r2[k] = x2_so;
      #50 x1_sca = 1'b1; x2_sca = 1'b1;
      #100 x1_sca = 1'b0; x2_sca = 1'b0;
      #50;
    end
  endtask

  int fails_before;
  function automatic logic cycle_clean();
    return failures == fails_before;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v1, v2, w1, w2, r1, r2, m;
    clk = 0; testbar = 1; x1_sca = 0; x1_scb = 0; x1_update = 0; x1_capture = 0; x1_si = 0;
    scan_mode = 0; x2_sca = 0; x2_scb = 0; x2_update = 0; x2_capture = 0; sync_en = 1; x2_si = 0;
    x1_d = '0; x2_d = '0;
    foreach (mech[i]) mech[i] = 0;
    v1 = '0; v2 = '0;
    repeat (3) cycle('0, '0);

    // plain random operation
    repeat (50) begin
      v1 = N'($urandom); v2 = N'($urandom);
      cycle(v1, v2);
    end

    // transients and late data on random bit sets
    for (int i = 0; i < 30; i++) begin
      int at;
      v1 = N'($urandom); v2 = N'($urandom);
      m = N'($urandom) | N'(1);
      at = (i % 3 == 0) ? -50 : (i % 3 == 1) ? D1 - 50 : P / 2 - 50;
      fails_before = failures;
      cycle(v1, v2, at, m, (i % 2) ? m : '0, (i % 2) ? '0 : ~m);
      if (cycle_clean() && (x1_bad & m) != '0) mech[M_X1_SET]++;
      if (cycle_clean() && (i % 2) && (x2_bad & m) != '0) mech[M_X2_SET]++;
      if (cycle_clean() && !(i % 2) && (x2_bad & ~m) != '0) mech[M_X2_LATE]++;
      // the disturbed latch bits are overwritten by the next clean cycle
      cycle(v1, v2);
    end

    // single latch upsets in one cell of each register
    for (int i = 0; i < 24; i++) begin
      v1 = N'($urandom); v2 = N'($urandom);
      fails_before = failures;
      cycle(v1, v2, 0, '0, '0, '0, i % 4, i % 3);
      if (cycle_clean()) begin
        mech[M_X1_SEU]++;
        mech[M_X2_SEU]++;
      end
    end

    // scan: shift a word in, hold, update, capture a response, shift it out
    for (int i = 0; i < 3; i++) begin
      v1 = N'($urandom); v2 = N'($urandom);
      cycle(v1, v2);
      w1 = N'($urandom); w2 = N'($urandom);
      testbar = 1'b0; scan_mode = 1'b1;
      fails_before = failures;
      scan_in(w1, w2);
      check("x2 outputs held while shifting", x2_q, v2);
      if (cycle_clean()) mech[M_X2_HOLD]++;
      #50 x1_update = 1'b1; x2_update = 1'b1;
      #100 x1_update = 1'b0; x2_update = 1'b0;
      #50;
      check("x1 outputs after UPDATE", x1_q, w1);
      check("x2 outputs after Update", x2_q, w2);
      if (cycle_clean()) begin
        mech[M_X1_SHIFT]++; mech[M_X2_SHIFT]++;
        mech[M_X1_UPDATE]++; mech[M_X2_UPDATE]++;
      end
      // one functional cycle with a response word, captured into LA
      testbar = 1'b1; scan_mode = 1'b0;
      x1_capture = 1'b1; x2_capture = 1'b1;
      v1 = N'($urandom); v2 = N'($urandom);
      cycle(v1, v2);
      x1_capture = 1'b0; x2_capture = 1'b0;
      testbar = 1'b0; scan_mode = 1'b1;
      fails_before = failures;
      scan_out(r1, r2);
      check("x1 captured response", r1, v1);
      check("x2 captured response", r2, v2);
      if (cycle_clean()) begin
        mech[M_X1_CAPTURE]++; mech[M_X2_CAPTURE]++;
      end
      testbar = 1'b1; scan_mode = 1'b0;
    end

    // XSEUFF 2 stuck-at mode: LA != LB in every cell, generator disabled
    scan_mode = 1'b1; testbar = 1'b0;
    w2 = {N/2{2'b01}};
    scan_in('0, w2);
    x2_si = ~w2[0];
    #50 x2_sca = 1'b1;
    #100 x2_sca = 1'b0;
    #50;
    scan_mode = 1'b0; testbar = 1'b1;
    checks++;
    if ((x2_la ^ x2_lb) != '1) begin
      failures++;
      $display("FAIL stuck-at set-up: LA=%h LB=%h", x2_la, x2_lb);
    end
    sync_en = 1'b0;
    for (int i = 0; i < 6; i++) begin
      v1 = N'($urandom); v2 = N'($urandom);
      fails_before = failures;
      cycle(v1, v2);
      if (cycle_clean()) mech[M_X2_GEN_OFF]++;
    end
    sync_en = 1'b1;
    repeat (4) begin
      v1 = N'($urandom); v2 = N'($urandom);
      cycle(v1, v2);
    end

    for (int i = 0; i < M_COUNT; i++) begin
      checks++;
      $display("mechanism %-24s happened %0d times", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
