// WIDTH-bit register (8 bits by default) of parallel d_flip_flop cells.
//
// Every bit is a master-slave flip-flop that captures its input on the
// rising edge of clk. The complementary clock each flip-flop needs is made
// locally: one inverter per pair of bits (four inverters for eight bits),
// which spreads the clkbar fan-out over several drivers, as in the layout
// this register follows. There is no reset and no enable.
//
// Interface: in_data (WIDTH bits), clk in; out_data (WIDTH bits) out.
// Timing: out_data takes in_data at each rising edge of clk.
module reg8 #(
  parameter int unsigned WIDTH = haar_pkg::SAMPLE_W
) (
  input  logic [WIDTH-1:0] in_data,
  input  logic             clk,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned NINV = (WIDTH + 1) / 2;  // clkbar inverters

  logic [NINV-1:0] clkbar;

  for (genvar j = 0; j < NINV; j++) begin : g_inv
    assign clkbar[j] = ~clk;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    d_flip_flop u_ff (
      .din   (in_data[i]),
      .clk   (clk),
      .clkbar(clkbar[i/2]),
      .qout  (out_data[i])
    );
  end
endmodule
