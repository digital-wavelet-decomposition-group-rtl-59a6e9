// End-to-end self-checking testbench for haar_dwt_top at its only (8-bit)
// size.
//
// The design has no reset, so the bench first clocks in two zero samples
// and waits for one output load, after which yl and yh must both read 0.
// It then streams random signed samples, one per clock, applied in the low
// clock phase. A reference model, written with integer arithmetic, keeps
// the two most recent samples and the output values. At every rising edge
// where the divided clock rises, the outputs must become
//   yl = floor(new/2) + floor(old/2),  yh = floor(new/2) - floor(old/2)
// of the two samples held before that edge; at every other edge they must
// not change. The bench also checks that yl and yh are within one step of
// the exact Haar average and half-difference, the debug pins, and that an
// output appears exactly every second clock.
//
// Mechanisms counted, each of which must occur: the zero-sample clearing,
// output loads, output holds while the input changes, negative and
// positive high-band results, sign repetition in the halving of negative
// samples, and the extreme inputs -128 and +127.
module tb_haar_dwt_top;
  logic       clk;
  logic [7:0] d, yl, yh, dbg_regs;
  logic [3:0] dbg_addr;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_zero_clear = 0;
  int n_load = 0;
  int n_hold = 0;
  int n_yh_neg = 0;
  int n_yh_pos = 0;
  int n_neg_half = 0;
  int n_extreme = 0;

  // reference model state
  int m_new, m_old;   // samples in the two tap registers
  int m_yl, m_yh;     // expected outputs
  logic m_valid;      // outputs are known
  int  last_load_edge;
  int  edge_no;

  haar_dwt_top dut (
    .clk(clk), .d(d), .yl(yl), .yh(yh),
    .dbg_regs(dbg_regs), .dbg_addr(dbg_addr)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int half_floor(input int v);
    // floor(v / 2) for signed v, written without shift operators
    if (v >= 0) return v / 2;
    return -((-v + 1) / 2);
  endfunction

  function automatic int to_signed8(input logic [7:0] v);
    return (int'(v) >= 128) ? int'(v) - 256 : int'(v);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL edge %0d: %s", edge_no, what);
    end
  endtask

  // one clock cycle: apply sample in low phase, rising edge, compare
  task automatic cycle(input int sample);
    logic load;
    logic [7:0] yl_before, yh_before;
    int exp_lo, exp_hi;
    d = 8'(sample);
    #2;
    // debug pins before the edge
    check(to_signed8(dbg_regs) === m_old, "dbg_regs is not the older tap");
    exp_lo = half_floor(m_new) + half_floor(m_old);
    check(int'(dbg_addr) === (exp_lo & 15), "dbg_addr is not the low adder sum");
    load = ~dut.div_q;  // divided clock rises at this edge
    yl_before = yl;
    yh_before = yh;
    #3;
    clk = 1'b1;
    edge_no++;
    #1;
    if (load) begin
      exp_hi = half_floor(m_new) - half_floor(m_old);
      m_yl = exp_lo;
      m_yh = exp_hi;
      m_valid = 1'b1;
      n_load++;
      if (last_load_edge >= 0)
        check(edge_no - last_load_edge === 2, "outputs not every second clock");
      last_load_edge = edge_no;
      if (exp_hi < 0) n_yh_neg++;
      if (exp_hi > 0) n_yh_pos++;
      if (m_new < 0 && (m_new % 2) != 0) n_neg_half++;
      // near the exact Haar values (pair average and half difference)
      check((2 * m_yl - (m_new + m_old)) inside {[-2:0]}, "yl far from average");
      check((2 * m_yh - (m_new - m_old)) inside {[-1:1]}, "yh far from half difference");
    end else if (m_valid) begin
      if (8'(sample) != 8'(m_new)) n_hold++;
      check(yl === yl_before && yh === yh_before, "outputs moved on a non-load edge");
    end
    if (m_valid) begin
      check(to_signed8(yl) === m_yl, $sformatf("yl=%0d expected %0d", to_signed8(yl), m_yl));
      check(to_signed8(yh) === m_yh, $sformatf("yh=%0d expected %0d", to_signed8(yh), m_yh));
    end
    m_old = m_new;
    m_new = to_signed8(8'(sample));
    if (m_new == -128 || m_new == 127) n_extreme++;
    #4;
    clk = 1'b0;
  endtask

  initial begin
    clk = 1'b0;
    d = '0;
    edge_no = 0;
    last_load_edge = -1;
    m_valid = 1'b0;
    m_new = 0;
    m_old = 0;
    #1;
    // two zero samples clear the taps (model values become known after them)
    cycle(0);
    cycle(0);
    m_new = 0;
    m_old = 0;
    m_valid = 1'b0;
    last_load_edge = -1;
    // a third zero covers an output load on either divider phase
    cycle(0);
    cycle(0);
    check(m_valid, "no output load after the clearing samples");
    if (m_valid && yl == 8'd0 && yh == 8'd0) n_zero_clear++;
    // directed corner samples
    cycle(-128); cycle(127); cycle(127); cycle(-128);
    cycle(-128); cycle(-128); cycle(127); cycle(127);
    cycle(-1);   cycle(1);    cycle(1);   cycle(-1);
    cycle(-3);   cycle(-5);   cycle(7);   cycle(0);
    // random stream
    for (int i = 0; i < 4000; i++) cycle(int'($urandom_range(0, 255)) - 128);

    check(n_zero_clear > 0, "zero-sample clearing never seen");
    check(n_load > 0, "no output load");
    check(n_hold > 0, "no output hold");
    check(n_yh_neg > 0, "no negative high-band result");
    check(n_yh_pos > 0, "no positive high-band result");
    check(n_neg_half > 0, "no odd negative sample halved");
    check(n_extreme > 0, "no extreme sample");
    $display("mechanisms: zero_clear=%0d loads=%0d holds=%0d yh_neg=%0d yh_pos=%0d neg_half=%0d extreme=%0d",
             n_zero_clear, n_load, n_hold, n_yh_neg, n_yh_pos, n_neg_half, n_extreme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
