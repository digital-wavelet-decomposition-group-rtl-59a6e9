// Self-checking testbench for d_latch: while clk=1/clkbar=0 the output must
// follow every change of d; while clk=0/clkbar=1 it must keep the value d
// had when the latch closed, whatever d does.
module tb_d_latch;
  logic d, clk, clkbar, q;
  logic held;
  int   checks = 0;
  int   failures = 0;

  d_latch dut (.d(d), .clk(clk), .clkbar(clkbar), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, exp);
    end
  endtask

  initial begin
    d = 1'b0; clk = 1'b1; clkbar = 1'b0;
    #1;
    for (int i = 0; i < 200; i++) begin
      // transparent phase: q follows d
      clk = 1'b1; clkbar = 1'b0;
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom);
        #1;
        check(d, "transparent");
      end
      // closing: hold the last value
      held = d;
      clk = 1'b0; clkbar = 1'b1;
      #1;
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom);
        #1;
        check(held, "hold");
      end
      d = ~held;
      #1;
      check(held, "hold against opposite d");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
