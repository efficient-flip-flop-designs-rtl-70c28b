// xseuff1_tb: self-checking test of one XSEUFF 1 cell.
//
// The testbench makes CLK and SYS_CLK itself (SYS_CLK = CLK + 200 ps, 1 ns
// period). Each functional cycle sets D 300 ps before the CLK rise and
// checks the output one picosecond after the CLK rise (no clock-to-Q
// penalty), 400 ps after it (after SYS_CLK) and at the end of the cycle.
// Covered: random data; 100 ps glitches on D at the closing instants of LA,
// PH2 and LB (masked); a glitch wider than Delta1 over LA and PH2 (the known
// limit: output wrong); single latch flips (LA, LB, PH2, PH1, output keeper)
// forced in either clock phase (masked); scan shift, update and capture.
`timescale 1ps/1ps
module xseuff1_tb;
  localparam int P  = 1000;
  localparam int D1 = 200;
  localparam int SU = 300;   // data set-up before the CLK rise

  logic clk, sys_clk, testbar, sca, scb, update, capture, si, d;
  logic q, so;
  int checks = 0, failures = 0;

  xseuff1 dut (.clk, .sys_clk, .testbar, .sca, .scb, .update, .capture, .si, .d, .q, .so);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  // flip one storage node: 0 LA, 1 LB, 2 PH2, 3 PH1, 4 output keeper
  task automatic upset(int node);
    logic v;
    case (node)
      0: begin v = dut.u_la.q;   force dut.u_la.q   = ~v; #1 release dut.u_la.q;   end
      1: begin v = dut.u_lb.q;   force dut.u_lb.q   = ~v; #1 release dut.u_lb.q;   end
      2: begin v = dut.ph2_q;    force dut.ph2_q    = ~v; #1 release dut.ph2_q;    end
      3: begin v = dut.u_ph1.q;  force dut.u_ph1.q  = ~v; #1 release dut.u_ph1.q;  end
      default: begin v = dut.u_vote.q; force dut.u_vote.q = ~v; #1 release dut.u_vote.q; end
    endcase
  endtask

  // One functional cycle with data dv. seu_at >= 0 flips node seu_node that
  // many ps after the CLK rise. expect_ok: the output is expected correct.
  // ctoq: check the output 1 ps after the CLK rise.
  task automatic cycle(logic dv, int seu_at = -1, int seu_node = 0,
                       logic expect_ok = 1'b1, logic ctoq = 1'b1);
    d = dv;
    #SU;
    fork
      begin
        clk = 1'b1;
        #1 if (ctoq) check("clock-to-Q", q, dv);
        #(D1 - 1) sys_clk = 1'b1;
        #(P / 2 - D1) clk = 1'b0;
        #(D1 - 1) check("end of cycle", q, expect_ok ? dv : ~dv);
        #1 sys_clk = 1'b0;   // P - SU after the start: next cycle begins
      end
      begin
        #400 check("after SYS_CLK rise", q, expect_ok ? dv : ~dv);
      end
      if (seu_at >= 0) begin
        #(seu_at) upset(seu_node);
      end
    join
  endtask

  // Cycle with a glitch: D is inverted for glitch_w ps starting glitch_at
  // after the CLK rise.
  task automatic glitch_cycle(logic dv, int glitch_at, int glitch_w, logic expect_ok);
    fork
      cycle(dv, -1, 0, expect_ok, 1'b0);
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
    logic dv, prev;
    clk = 0; sys_clk = 0; testbar = 1; sca = 0; scb = 0; update = 0; capture = 0; si = 0; d = 0;
    // settle the random initial state
    repeat (3) cycle(1'b0);
    prev = 1'b0;
    // random data, no disturbance
    for (int i = 0; i < 40; i++) begin
      dv = 1'($urandom);
      cycle(dv);
    end
    // SETs on D at the closing instants (each on a data change and on a hold)
    for (int i = 0; i < 8; i++) begin
      dv = i[1];
      glitch_cycle(dv, -50, 100, 1'b1);          // LA closes at T0
      glitch_cycle(dv, D1 - 50, 100, 1'b1);      // PH2 closes at T0+Delta1
      glitch_cycle(dv, P / 2 - 50, 100, 1'b1);   // LB closes at T0+P/2
    end
    // limit: a transient wider than Delta1 reaches both LA and PH2
    cycle(1'b0);
    glitch_cycle(1'b0, -50, D1 + 100, 1'b0);
    cycle(1'b1);
    glitch_cycle(1'b1, -50, D1 + 100, 1'b0);
    // SEUs: clock-high phase (after SYS_CLK rise) on LA and PH2/PH1,
    // clock-low phase on LB, PH1 and the keeper
    for (int i = 0; i < 10; i++) begin
      dv = 1'($urandom);
      cycle(dv, 300, 0);           // LA, CLK high
      cycle(dv, 300, 2);           // PH2 (PH1 follows), CLK high
      cycle(dv, 250, 3);           // PH1, CLK high
      cycle(dv, 650, 1);           // LB, CLK low
      cycle(dv, 800, 3);           // PH1, CLK low
      cycle(dv, 650, 4);           // keeper, CLK low
    end
    // scan: shift a bit in, apply it with UPDATE
    for (int i = 0; i < 4; i++) begin
      dv = i[0];
      cycle(~dv);
      testbar = 1'b0;
      si = dv;
      pulse(sca);
      pulse(scb);
      check("scan out after shift", so, dv);
      pulse(update);
      check("output after UPDATE", q, dv);
      // functional cycle with CAPTURE: response (~dv) captured into LA
      testbar = 1'b1;
      capture = 1'b1;
      // LA holds the capture path, not a D sample: no clock-to-Q check
      cycle(~dv, -1, 0, 1'b1, 1'b0);
      capture = 1'b0;
      testbar = 1'b0;
      pulse(scb);
      check("captured response at scan out", so, ~dv);
      testbar = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
