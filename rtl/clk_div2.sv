// Divide-by-2 of the input clock from one d_flip_flop.
//
// The flip-flop's inverted output is fed back to its data input, so q
// toggles on every rising edge of clk and is a square wave at half the
// clock rate. There is no reset: q starts in either state, which only
// decides which of two clock edges the divided clock rises on.
//
// Interface: clk in; q (the divided clock) out. q changes on the rising
// edge of clk.
//
// Because the flip-flop is built from two latches, q -> inverter -> master
// latch -> slave latch -> q is a static loop of level-sensitive logic, and
// lint tools report it as circular combinational logic. It is never
// transparent all the way round: the master and the slave are open in
// opposite clock phases, so the loop is broken in either phase.
module clk_div2 (
  input  logic clk,
  output logic q
);
  logic clkbar;
  logic d;

  assign clkbar = ~clk;
  assign d      = ~q;

  d_flip_flop u_ff (
    .din   (d),
    .clk   (clk),
    .clkbar(clkbar),
    .qout  (q)
  );
endmodule
