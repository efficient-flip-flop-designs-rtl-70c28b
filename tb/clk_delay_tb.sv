// clk_delay_tb: drives an irregular clock into the delay element and checks
// that sys_clk at every sample equals clk DELTA1 earlier.
`timescale 1ps/1ps
module clk_delay_tb;
  localparam int unsigned DELTA1 = 200;
  logic clk, sys_clk;
  logic hist [0:4095];
  int checks = 0, failures = 0;

  clk_delay #(.DELTA1_PS(DELTA1)) dut (.clk, .sys_clk);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clk changes only on multiples of 50 ps, held at least 250 ps
  initial begin
    clk = 1'b0;
    forever begin
      #(250 + 50 * ($urandom % 10));
      clk = ~clk;
    end
  end

  // record clk every 10 ps (offset 5 ps from any edge)
  initial begin
    #5;
    for (int t = 0; t < 4096; t++) begin
      hist[t] = clk;
      if (t >= DELTA1 / 10) begin
        checks++;
        if (sys_clk !== hist[t - DELTA1 / 10]) begin
          failures++;
          $display("FAIL at %0t: sys_clk=%b, clk %0d ps earlier=%b", $time, sys_clk, DELTA1, hist[t - DELTA1 / 10]);
        end
      end
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
