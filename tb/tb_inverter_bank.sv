// Self-checking testbench for inverter_bank: all 256 inputs. Each output
// must be 255 minus the input, and adding 1 to it must give the negation
// modulo 256.
module tb_inverter_bank;
  logic [7:0] in_data, out_data;
  int         checks = 0;
  int         failures = 0;

  inverter_bank dut (.in_data(in_data), .out_data(out_data));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      int neg;
      in_data = 8'(x);
      #1;
      neg = (256 - x) % 256;
      checks++;
      if (int'(out_data) !== 255 - x) begin
        failures++;
        $display("FAIL in=%0d out=%0d", x, out_data);
      end
      checks++;
      if (8'(out_data + 8'd1) !== 8'(neg)) begin
        failures++;
        $display("FAIL negation of %0d", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
