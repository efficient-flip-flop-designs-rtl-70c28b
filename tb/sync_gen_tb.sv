// sync_gen_tb: checks the Sync(LA)/Sync(LB) waveform around each rising
// clock edge T0: Sync(LA) low in [T0, T0+W), Sync(LB) low in
// [T0+S, T0+W+S), both high elsewhere, and both high when disabled.
`timescale 1ps/1ps
module sync_gen_tb;
  localparam int unsigned W = 120;   // pulse width delta1
  localparam int unsigned S = 100;   // skew delta0
  localparam int unsigned P = 1000;
  logic clk, en, sync_la, sync_lb;
  int checks = 0, failures = 0;

  sync_gen #(.DELTA1_PS(W), .DELTA0_PS(S)) dut (.clk, .en, .sync_la, .sync_lb);

  task automatic expect2(string what, logic la, logic lb);
    checks++;
    if (sync_la !== la || sync_lb !== lb) begin
      failures++;
      $display("FAIL %s at %0t: la=%b lb=%b exp %b %b", what, $time, sync_la, sync_lb, la, lb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; en = 1'b1;
    #(P);
    for (int cyc = 0; cyc < 20; cyc++) begin
      en = (cyc % 5) != 3;
      #5;
      if (en) expect2("before edge", 1'b1, 1'b1);
      clk = 1'b1;           // T0
      #5;
      if (en) expect2("T0+5", 1'b0, 1'b1);
      else    expect2("disabled T0+5", 1'b1, 1'b1);
      #(S - 10);            // T0+S-5
      if (en) expect2("T0+S-5", 1'b0, 1'b1);
      #10;                  // T0+S+5
      if (en) expect2("T0+S+5", 1'b0, 1'b0);
      else    expect2("disabled T0+S+5", 1'b1, 1'b1);
      #(W - S - 10);        // T0+W-5
      if (en) expect2("T0+W-5", 1'b0, 1'b0);
      #10;                  // T0+W+5
      if (en) expect2("T0+W+5", 1'b1, 1'b0);
      #(S - 10);            // T0+W+S-5
      if (en) expect2("T0+W+S-5", 1'b1, 1'b0);
      #10;                  // T0+W+S+5
      expect2("T0+W+S+5", 1'b1, 1'b1);
      #(P / 2 - W - S - 5);
      clk = 1'b0;           // falling edge: no pulse
      #20;
      expect2("after fall", 1'b1, 1'b1);
      #(P / 2 - 25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
