// vote_keeper_tb: random stimulus on the voter with keeper. The reference
// keeps the output in the testbench: with sel high it is the majority of
// (a, b, c), with sel low it changes only when b and c agree.
`timescale 1ps/1ps
module vote_keeper_tb;
  logic sel, a, b, c, q;
  logic ref_q;
  int checks = 0, failures = 0;
  int holds = 0;

  vote_keeper dut (.sel, .a, .b, .c, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 1'b1; a = 1'b0; b = 1'b0; c = 1'b0;
    ref_q = 1'b0;
    #10;
    for (int i = 0; i < 2000; i++) begin
      {sel, a, b, c} = 4'($urandom);
      if (sel) begin
        ref_q = (a + b + c) >= 2;
      end else if (b == c) begin
        ref_q = b;
      end else begin
        holds++;
      end
      #10;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d sel=%b a=%b b=%b c=%b q=%b exp=%b", i, sel, a, b, c, q, ref_q);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
