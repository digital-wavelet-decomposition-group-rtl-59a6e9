// One-bit full adder in transmission-gate (multiplexer) form.
//
// The cell first forms the propagate signal p = a XOR b. The sum is then a
// 2:1 selection between cin and its complement under control of p, and the
// carry-out is a 2:1 selection that passes cin when p is 1 and passes a
// (equal to b in that case) when p is 0. This is the structure of a
// pass-gate adder cell: one XOR stage followed by two pass-gate
// multiplexers, with no separate majority gate. The mapping of the two
// multiplexers onto logic is this design's reading of the cell; the
// arithmetic (S and Cout of A + B + Cin) is the cell's specification.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;  // propagate: a and b differ

  always_comb begin
    p    = a ^ b;
    s    = p ? ~cin : cin;
    cout = p ? cin : a;
  end
endmodule
