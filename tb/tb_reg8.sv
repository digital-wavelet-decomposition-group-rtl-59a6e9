// Self-checking testbench for reg8. Random bytes are applied in the low
// clock phase; others are applied in the high phase and must not get
// through. out_data must equal the byte present just before each rising
// edge and stay put until the next one. The first cases drive all eight
// inputs with the same value, as in the register's original bench test.
module tb_reg8;
  logic [7:0] in_data, out_data, sampled;
  logic       clk;
  int         checks = 0;
  int         failures = 0;

  reg8 dut (.in_data(in_data), .clk(clk), .out_data(out_data));

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    in_data = '0;
    #5;
    for (int i = 0; i < 1000; i++) begin
      if (i < 8) in_data = {8{i[0]}};
      else       in_data = 8'($urandom);
      sampled = in_data;
      #5;
      clk = 1'b1;
      #1;
      checks++;
      if (out_data !== sampled) begin
        failures++;
        $display("FAIL edge %0d: out=%h expected %h", i, out_data, sampled);
      end
      in_data = ~sampled;
      #3;
      checks++;
      if (out_data !== sampled) begin
        failures++;
        $display("FAIL edge %0d: out moved during high phase", i);
      end
      #1;
      clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
