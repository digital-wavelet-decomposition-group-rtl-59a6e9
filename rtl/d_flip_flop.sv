// Rising-edge master-slave D flip-flop made of two d_latch cells.
//
// The master latch has its clock rails swapped, so it is transparent while
// clk is low and follows din. The slave latch is transparent while clk is
// high and passes the master's value to qout. When clk rises the master
// closes and holds the value din had just before the edge, and the slave
// shows it; when clk falls the slave closes and the master opens again.
// The net effect is a flip-flop that captures din on the rising edge of clk.
//
// Interface: din, clk, clkbar in; qout out. clkbar must be the complement of
// clk. din must be stable around the rising edge of clk. There is no reset,
// as in the original cell.
module d_flip_flop (
  input  logic din,
  input  logic clk,
  input  logic clkbar,
  output logic qout
);
  logic m;  // master latch output

  d_latch u_master (
    .d     (din),
    .clk   (clkbar),
    .clkbar(clk),
    .q     (m)
  );

  d_latch u_slave (
    .d     (m),
    .clk   (clk),
    .clkbar(clkbar),
    .q     (qout)
  );
endmodule
