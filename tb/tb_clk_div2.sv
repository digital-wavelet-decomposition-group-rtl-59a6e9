// Self-checking testbench for clk_div2: q must invert at every rising edge
// of clk, hold at every falling edge, and so have half the clock rate
// (one full period of q per two clock periods).
module tb_clk_div2;
  logic clk, q, prev;
  int   checks = 0;
  int   failures = 0;
  int   rises = 0;

  clk_div2 dut (.clk(clk), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    #5;
    for (int i = 0; i < 400; i++) begin
      prev = q;
      clk = 1'b1;
      #1;
      checks++;
      if (q !== ~prev) begin
        failures++;
        $display("FAIL edge %0d: q did not toggle", i);
      end
      if (q && !prev) rises++;
      #4;
      prev = q;
      clk = 1'b0;
      #1;
      checks++;
      if (q !== prev) begin
        failures++;
        $display("FAIL edge %0d: q moved at falling edge", i);
      end
      #4;
    end
    checks++;
    if (rises != 200) begin
      failures++;
      $display("FAIL divided clock rose %0d times in 400 clocks", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
