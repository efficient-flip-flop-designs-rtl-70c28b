// latch2_tb: random stimulus on both ports of the two-port latch, compared
// after every step with a reference state kept in the testbench (port 1 has
// priority, hold when both enables are low).
`timescale 1ps/1ps
module latch2_tb;
  logic c1, d1, c2, d2, q;
  logic ref_q;
  int checks = 0, failures = 0;

  latch2 dut (.c1, .d1, .c2, .d2, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c1 = 1'b1; d1 = 1'b0; c2 = 1'b0; d2 = 1'b0;
    ref_q = 1'b0;
    #10;
    for (int i = 0; i < 2000; i++) begin
      {c1, d1, c2, d2} = 4'($urandom);
      if (c1)      ref_q = d1;
      else if (c2) ref_q = d2;
      #10;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d c1=%b d1=%b c2=%b d2=%b q=%b exp=%b", i, c1, d1, c2, d2, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
