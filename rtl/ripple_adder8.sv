// WIDTH-bit ripple-carry adder (8 bits by default).
//
// A chain of one-bit full_adder cells: cell i adds a[i], b[i] and the carry
// out of cell i-1; cell 0 takes the external carry-in. The carry-out of the
// last cell is brought out. The design uses two of these adders: one with
// cin tied to 0 for the low band, and one with cin tied to 1 that, together
// with an inverter bank on one operand, subtracts for the high band.
//
// Interface: a, b (WIDTH bits), cin in; s (WIDTH bits), cout out. Purely
// combinational; the worst-case path runs through all WIDTH carry stages.
module ripple_adder8 #(
  parameter int unsigned WIDTH = haar_pkg::SAMPLE_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
