// Level-sensitive D latch driven by a complementary clock pair.
//
// The latch is transparent (q follows d) while clk is high and clkbar is
// low, and holds its value otherwise. In the transistor cell this is an
// input transmission gate that conducts in one clock phase and a feedback
// transmission gate around two inverters that conducts in the other; here
// the hold path is the latch's stored state. Two of these in series, on
// opposite phases, make the design's rising-edge flip-flop.
// The cell structure follows the original latch; which clock level opens it
// is this design's choice, made so that the pair triggers on the rising edge.
//
// Interface: d, clk, clkbar in; q out. Both clock rails are used, as in the
// cell; they are expected to be complements of each other.
//
// This module is a latch on purpose; tools report it as one.
module d_latch (
  input  logic d,
  input  logic clk,
  input  logic clkbar,
  output logic q
);
  always_latch begin
    if (clk && !clkbar) q <= d;
  end
endmodule
