// One-level, one-dimensional Haar discrete wavelet transform of an 8-bit
// signed sample stream.
//
// A new sample d is clocked in on every rising edge of clk. Two cascaded
// registers hold the newest sample (r_new) and the one before it (r_old).
// Both are halved by an arithmetic shift right by one, which is only wiring:
// bit 0 is dropped, every other bit moves down one place and the sign bit
// is repeated in bit 7. Two 8-bit ripple-carry adders then form
//   low  = r_new/2 + r_old/2             (adder carry-in 0)
//   high = r_new/2 + ~(r_old/2) + 1      (inverter bank, carry-in 1)
//        = r_new/2 - r_old/2
// and two output registers take these every other clock edge, so each pair
// of input samples yields one low-band and one high-band coefficient. Both
// results always fit in 8 bits: low lies in -128..126 and high in
// -127..127.
//
// Output timing. A divide-by-2 flip-flop marks every second clock edge. At
// an edge where the divided clock rises, the output registers take the
// adder results computed from the register contents of the cycle before
// that edge. In the layout these output registers are clocked by the
// divided clock; here they run on clk and reload only at those edges
// (otherwise they reload their own value), which gives the same capture
// instants without a second clock in a zero-delay model. This hold path
// is this design's choice.
//
// Latency: if samples x0 and x1 are clocked in at edges k and k+1, and the
// divided clock rises at edge k+2, then yl/yh show the pair (x1 new, x0 old)
// from edge k+2 until edge k+4.
//
// Reset: there is none. Clocking in two zero samples clears both tap
// registers; the next output load then clears yl and yh. The phase of the
// divided clock at power-up is arbitrary and decides which samples pair up.
//
// Debug pins: dbg_regs shows the older tap register, dbg_addr the four low
// bits of the low-band adder's sum (combinational, before the output
// register).
//
// Interface: clk, d[7:0] in; yl[7:0], yh[7:0], dbg_regs[7:0], dbg_addr[3:0]
// out. Supply and spare package pins have no logic and are not modelled.
//
// The adders' carry-outs are not used, as in the original schematic.
//
// All registers are master-slave latch pairs, so the divider's feedback and
// the output registers' hold path (yl -> multiplexer -> register -> yl) are
// static loops through latches, which lint tools report as circular
// combinational logic. Each loop passes a master and a slave latch that are
// open in opposite clock phases, so none is ever transparent end to end.
module haar_dwt_top (
  input  logic                            clk,
  input  logic [haar_pkg::SAMPLE_W-1:0]   d,
  output logic [haar_pkg::SAMPLE_W-1:0]   yl,
  output logic [haar_pkg::SAMPLE_W-1:0]   yh,
  output logic [haar_pkg::SAMPLE_W-1:0]   dbg_regs,
  output logic [haar_pkg::DBG_ADDR_W-1:0] dbg_addr
);
  import haar_pkg::*;

  localparam int unsigned W = SAMPLE_W;

  logic [W-1:0] r_new;      // first tap register: newest sample
  logic [W-1:0] r_old;      // second tap register: previous sample
  logic [W-1:0] half_new;   // r_new shifted right arithmetically by one
  logic [W-1:0] half_old;   // r_old shifted right arithmetically by one
  logic [W-1:0] half_old_n; // one's complement of half_old
  logic [W-1:0] sum_lo;     // low-band adder result
  logic [W-1:0] sum_hi;     // high-band adder result
  logic         cout_lo;    // unused carry-outs
  logic         cout_hi;
  logic         div_q;      // divided clock
  logic         out_load;   // output registers load at this edge
  logic [W-1:0] yl_next;
  logic [W-1:0] yh_next;

  // ---- tap registers ----
  reg8 #(.WIDTH(W)) u_reg_new (.in_data(d),     .clk(clk), .out_data(r_new));
  reg8 #(.WIDTH(W)) u_reg_old (.in_data(r_new), .clk(clk), .out_data(r_old));

  // ---- shift right by one: wiring with sign repeat ----
  assign half_new = {r_new[W-1], r_new[W-1:1]};
  assign half_old = {r_old[W-1], r_old[W-1:1]};

  // ---- two's-complement inverter and the two adders ----
  inverter_bank #(.WIDTH(W)) u_neg (.in_data(half_old), .out_data(half_old_n));

  ripple_adder8 #(.WIDTH(W)) u_add_lo (
    .a(half_new), .b(half_old),   .cin(1'b0), .s(sum_lo), .cout(cout_lo)
  );
  ripple_adder8 #(.WIDTH(W)) u_add_hi (
    .a(half_new), .b(half_old_n), .cin(1'b1), .s(sum_hi), .cout(cout_hi)
  );

  // ---- clock divide-by-2 and output registers ----
  clk_div2 u_div (.clk(clk), .q(div_q));

  // The divided clock rises at the edges where it is low beforehand.
  assign out_load = ~div_q;

  assign yl_next = out_load ? sum_lo : yl;
  assign yh_next = out_load ? sum_hi : yh;

  reg8 #(.WIDTH(W)) u_reg_yl (.in_data(yl_next), .clk(clk), .out_data(yl));
  reg8 #(.WIDTH(W)) u_reg_yh (.in_data(yh_next), .clk(clk), .out_data(yh));

  // ---- debug pins ----
  assign dbg_regs = r_old;
  assign dbg_addr = sum_lo[DBG_ADDR_W-1:0];
endmodule
