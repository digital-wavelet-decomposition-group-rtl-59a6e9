// Bank of WIDTH inverters (8 by default): the "2's complement inverter".
//
// Each output bit is the complement of its input bit, giving the one's
// complement of the operand. The +1 that completes the two's-complement
// negation is not made here: the adder that receives this output has its
// carry-in tied to 1, so that adder computes a + ~b + 1 = a - b.
//
// Interface: in_data (WIDTH bits) in; out_data (WIDTH bits) out.
// Purely combinational.
module inverter_bank #(
  parameter int unsigned WIDTH = haar_pkg::SAMPLE_W
) (
  input  logic [WIDTH-1:0] in_data,
  output logic [WIDTH-1:0] out_data
);
  assign out_data = ~in_data;
endmodule
