// Self-checking testbench for d_flip_flop. A 10-unit clock runs; din is
// changed at random times both in the low and in the high phase. qout must
// change only at a rising edge, to the value din had just before it.
module tb_d_flip_flop;
  logic din, clk, clkbar, qout;
  logic sampled;
  int   checks = 0;
  int   failures = 0;

  d_flip_flop dut (.din(din), .clk(clk), .clkbar(clkbar), .qout(qout));

  assign clkbar = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    din = 1'b0;
    #5;
    for (int i = 0; i < 500; i++) begin
      // low phase: two changes of din
      din = 1'($urandom);
      #2;
      din = 1'($urandom);
      sampled = din;
      #3;
      clk = 1'b1;  // rising edge
      #1;
      checks++;
      if (qout !== sampled) begin
        failures++;
        $display("FAIL edge %0d: qout=%0d expected %0d", i, qout, sampled);
      end
      // high phase: din moves, qout must not
      din = ~sampled;
      #2;
      checks++;
      if (qout !== sampled) begin
        failures++;
        $display("FAIL edge %0d: qout moved in high phase", i);
      end
      #2;
      clk = 1'b0;  // falling edge: no change either
      #1;
      checks++;
      if (qout !== sampled) begin
        failures++;
        $display("FAIL edge %0d: qout moved at falling edge", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
