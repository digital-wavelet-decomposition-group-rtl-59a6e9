// Self-checking testbench for ripple_adder8: every pair of 8-bit operands
// with both carry-in values, compared with the integer sum a + b + cin.
module tb_ripple_adder8;
  logic [7:0] a, b, s;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;

  ripple_adder8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          int total;
          a   = 8'(x);
          b   = 8'(y);
          cin = c[0];
          #1;
          total = x + y + c;
          checks++;
          if (s !== total[7:0] || cout !== total[8]) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d+%0d+%0d: s=%0d cout=%0d", x, y, c, s, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
