// Self-checking testbench for full_adder: all eight input combinations,
// compared with the integer sum a + b + cin split into its two bits.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (s !== total[0] || cout !== total[1]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: s=%0d cout=%0d", a, b, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
