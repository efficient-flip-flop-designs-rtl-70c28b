// xseuff2_tb: self-checking test of one XSEUFF 2 cell.
//
// The testbench drives Clock (1 ns period) and makes the two Sync pulses
// itself: Sync(LA) low from T0 to T1 = T0+120 ps, Sync(LB) low from
// T0+100 ps to T2 = T0+220 ps, T0 being the rising Clock edge. Data is set
// 300 ps before T0. The output is checked 1 ps after T2 (it must be final
// there), 400 ps after T0 and at the end of the cycle.
// Covered: random data; a glitch over T0 (PH2 wrong), over T1 (LA wrong) and
// over T2 (LB wrong), all masked; late data arriving 60 ps after T0
// (corrected) and 160 ps after T0 (beyond T1: the known limit); a glitch
// over both T1 and T2 (the limit); latch flips on PH2, LA, LB and the PH1
// node (masked); scan shift with PH1 held, update, capture; the stuck-at
// mode (Sync held high, LA != LB, output follows PH2).
`timescale 1ps/1ps
module xseuff2_tb;
  localparam int P  = 1000;
  localparam int SU = 300;
  localparam int W  = 120;   // Sync(LA) width: T1 = T0 + W
  localparam int S  = 100;   // Sync(LB) skew:  T2 = T1 + S

  logic clock, sync_la, sync_lb, scan_mode, sca, scb, update, capture, si, d;
  logic q, so;
  logic gen_en;
  int checks = 0, failures = 0;

  xseuff2 dut (.clock, .sync_la, .sync_lb, .scan_mode, .sca, .scb, .update, .capture, .si, .d, .q, .so);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  // flip one storage node: 0 LA, 1 LB, 2 PH2, 3 PH1 output node
  task automatic upset(int node);
    logic v;
    case (node)
      0: begin v = dut.u_la.q; force dut.u_la.q = ~v; #1 release dut.u_la.q; end
      1: begin v = dut.u_lb.q; force dut.u_lb.q = ~v; #1 release dut.u_lb.q; end
      2: begin v = dut.ph2_q;  force dut.ph2_q  = ~v; #1 release dut.ph2_q;  end
      default: begin v = dut.u_ph1.q; force dut.u_ph1.q = ~v; #1 release dut.u_ph1.q; end
    endcase
  endtask

  // One functional cycle; D = dv is applied SU before T0 unless late >= 0,
  // in which case D keeps its old value until late ps after T0.
  task automatic cycle(logic dv, int seu_at = -1, int seu_node = 0,
                       logic expect_ok = 1'b1, int late = -1);
    if (late < 0) d = dv;
    #SU;
    fork
      begin   // clock and synchronous pulses
        clock = 1'b1;
        if (gen_en) sync_la = 1'b0;
        #S if (gen_en) sync_lb = 1'b0;
        #(W - S) sync_la = 1'b1;
        #S sync_lb = 1'b1;
        #1 check("output final after T2", q, expect_ok ? dv : ~dv);
        #(P / 2 - W - S - 1) clock = 1'b0;
        #(P / 2 - SU - 1) check("end of cycle", q, expect_ok ? dv : ~dv);
        #1;
      end
      begin
        #400 check("clock high", q, expect_ok ? dv : ~dv);
      end
      if (late >= 0) begin
        #(late) d = dv;
      end
      if (seu_at >= 0) begin
        #(seu_at) upset(seu_node);
      end
    join
  endtask

  task automatic glitch_cycle(logic dv, int glitch_at, int glitch_w, logic expect_ok);
    fork
      cycle(dv, -1, 0, expect_ok);
      begin
        #(SU + glitch_at) d = ~dv;
        #(glitch_w) d = dv;
      end
    join
  endtask

  task automatic pulse(ref logic s);
    #50 s = 1'b1;
    #100 s = 1'b0;
    #50;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic dv;
    clock = 0; sync_la = 1; sync_lb = 1; scan_mode = 0; sca = 0; scb = 0;
    update = 0; capture = 0; si = 0; d = 0; gen_en = 1;
    repeat (3) cycle(1'b0);
    for (int i = 0; i < 40; i++) begin
      dv = 1'($urandom);
      cycle(dv);
    end
    // SETs at the three sampling instants
    for (int i = 0; i < 8; i++) begin
      dv = i[1];
      glitch_cycle(dv, -50, 100, 1'b1);        // PH2 closes at T0
      glitch_cycle(dv, W - 40, 80, 1'b1);      // LA closes at T1
      glitch_cycle(dv, W + S - 40, 80, 1'b1);  // LB closes at T2
    end
    // limit: a transient over both T1 and T2
    cycle(1'b1);
    glitch_cycle(1'b1, W - 20, S + 40, 1'b0);
    // crosstalk delay: data late by 60 ps (tolerated) and by 160 ps (beyond T1)
    for (int i = 0; i < 6; i++) begin
      dv = i[0];
      cycle(~dv);
      cycle(dv, -1, 0, 1'b1, 60);
    end
    cycle(1'b0);
    cycle(1'b1, -1, 0, 1'b0, W + 40);
    cycle(1'b0);
    // SEUs in the clock-high phase (after T2) and the clock-low phase
    for (int i = 0; i < 10; i++) begin
      dv = 1'($urandom);
      cycle(dv, 300, 2);   // PH2
      cycle(dv, 300, 0);   // LA
      cycle(dv, 300, 1);   // LB
      cycle(dv, 600, 0);   // LA, Clock low
      cycle(dv, 600, 1);   // LB, Clock low
      cycle(dv, 600, 3);   // PH1 output node, Clock low
    end
    // scan shift (PH1 must hold), update, capture
    for (int i = 0; i < 4; i++) begin
      dv = i[0];
      cycle(~dv);
      scan_mode = 1'b1;
      si = dv;
      pulse(sca);
      check("PH1 held while shifting (ScA)", q, ~dv);
      pulse(scb);
      check("PH1 held while shifting (ScB)", q, ~dv);
      check("scan out after shift", so, dv);
      pulse(update);
      check("output after Update", q, dv);
      scan_mode = 1'b0;
      capture = 1'b1;
      cycle(~dv);
      capture = 1'b0;
      scan_mode = 1'b1;
      pulse(scb);
      check("captured response at scan out", so, ~dv);
      scan_mode = 1'b0;
    end
    // stuck-at mode: LA = a, LB = ~a, generator disabled, output follows PH2
    for (int i = 0; i < 4; i++) begin
      logic a;
      a = i[0];
      scan_mode = 1'b1;
      si = ~a; pulse(sca); pulse(scb);
      si = a;  pulse(sca);
      scan_mode = 1'b0;
      gen_en = 1'b0;
      cycle(1'b0);
      cycle(1'b1);
      cycle(1'b0);
      gen_en = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
