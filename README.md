# 8-bit Haar wavelet decomposition (one level, one dimension)

This design splits a stream of 8-bit signed samples into two half-rate
streams, using one level of the Haar wavelet transform. For every pair of
consecutive samples (older `x0`, newer `x1`) it produces

    low  (yl) = floor(x1/2) + floor(x0/2)     ~ average of the pair
    high (yh) = floor(x1/2) - floor(x0/2)     ~ half the difference of the pair

A sample enters on every rising clock edge. A new `yl`/`yh` pair appears on
every second edge. The hardware is small: two tap registers, two
ripple-carry adders, a bank of inverters, a divide-by-2 flip-flop and two
output registers. It is written at the level of the original full-custom
cells: a transmission-gate full adder, a D latch, and a master-slave
flip-flop built from two latches.

## Data path

```
 d[7:0] ──► reg8 (r_new) ──► reg8 (r_old) ──► dbg_regs[7:0]
               │                  │
          >>>1 (wiring)      >>>1 (wiring)
               │                  │
           half_new            half_old ──► inverter_bank ──► half_old_n
               │                  │                               │
               ├──► ripple_adder8 (cin=0) ◄──┘                    │
               │          │ sum_lo ──► dbg_addr[3:0]              │
               └──► ripple_adder8 (cin=1) ◄────────────────────────┘
                          │ sum_hi
   clk ──► clk_div2 ──► load on every 2nd edge
                          │
                 reg8 (yl)   reg8 (yh)
```

**Halving is wiring.** `>>>1` drops bit 0 and moves bits 7..1 down one
place. The freed bit 7 repeats the sign bit, so negative samples round
toward minus infinity (for example, -3 becomes -2). No gates are involved.

**Subtraction without a subtractor.** The high-band adder gets the one's
complement of `half_old` and has its carry-in tied to 1:
`half_new + ~half_old + 1 = half_new - half_old`. The low-band adder has
its carry-in tied to 0.

**No overflow.** Each half lies in -64..63. So `yl` lies in -128..126 and
`yh` lies in -127..127. Both fit in 8 bits, so the adders' carry-outs are
not used.

Because both halves are rounded down before the add, `yl` can be one step
below the exact average: `2*yl - (x0+x1)` is 0, -1 or -2. Likewise
`2*yh - (x1-x0)` is -1, 0 or +1.

## Output timing and sample pairing

This is the part that needs the most care.

- The two tap registers load on every rising edge.
- `clk_div2` toggles on every rising edge.
- The output registers reload only at the edges where the divided clock
  rises, which is every second edge.
- At such an edge, the output registers take the adder results formed from
  the tap contents held *before* that edge.

Example: `x0` is clocked in at edge k and `x1` at edge k+1, and the divided
clock rises at edge k+2. Then `yl`/`yh` show the pair (`x1` newer, `x0`
older) from edge k+2 until edge k+4:

| edge | r_new after | r_old after | divided clock | yl/yh after |
|------|-------------|-------------|---------------|-------------|
| k    | x0          | x-1         | rises         | (x-1, x-2)  |
| k+1  | x1          | x0          | falls         | held        |
| k+2  | x2          | x1          | rises         | (x1, x0)    |
| k+3  | x3          | x2          | falls         | held        |
| k+4  | x4          | x3          | rises         | (x3, x2)    |

**No reset.** Nothing has a reset: not the taps, the divider or the output
registers. To clear the taps, clock in two zero samples. The next output
load then sets `yl = yh = 0`. The divider powers up in either state, and
that state decides whether samples pair as (even, odd) or as (odd, even).
If the system needs a fixed pairing, it has to line its sample stream up
with the outputs: an output change marks a load edge.

**The output-register clock differs from the layout.** In the original
layout, the divided clock drives the clock pins of the output registers.
In this RTL, the output registers run on `clk`. A multiplexer in front of
them feeds back their own value except at load edges. The capture instants
and values are the same. This avoids a race in zero-delay simulation: a
register clocked by a derived clock would see the adder outputs change in
the same instant as its own clock edge.

## Cells

| module | what it is |
|---|---|
| `full_adder` | Pass-gate style one-bit adder: `p = a^b`, `s = p ? ~cin : cin`, `cout = p ? cin : a`. |
| `ripple_adder8` | `WIDTH` (8) full adders with the carry chained from bit 0 upward. |
| `inverter_bank` | `WIDTH` inverters: the one's complement of the input. |
| `d_latch` | Transparent while `clk=1`/`clkbar=0`; holds otherwise. |
| `d_flip_flop` | Two `d_latch` cells. The master, with its clock rails swapped, is open while `clk` is low. The slave is open while `clk` is high. Together they capture on the rising edge. |
| `reg8` | `WIDTH` (8) flip-flops. Each pair of bits gets `clkbar` from its own local inverter, which spreads the clock fan-out. No enable, no reset. |
| `clk_div2` | A `d_flip_flop` whose data input is its inverted output. |
| `haar_dwt_top` | The system described above. |
| `haar_pkg` | `SAMPLE_W = 8`, `DBG_ADDR_W = 4`, `sample_t`. |

All storage is built from latches, as in the full-custom cells. Synthesis
therefore reports latches, not flip-flops. Lint reports the divider
feedback and the output hold path as combinational loops. Each of these
loops passes through a master latch and a slave latch that are open in
opposite clock phases, so no loop is ever transparent end to end. If you
retarget the design to a standard-cell flow, you may replace
`d_flip_flop` with an `always_ff` flip-flop. The behaviour stays the same.

## Ports of `haar_dwt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on its rising edge |
| `d` | in | 8 | signed input sample, one per clock |
| `yl` | out | 8 | signed low-band coefficient, updated every second edge |
| `yh` | out | 8 | signed high-band coefficient, updated every second edge |
| `dbg_regs` | out | 8 | contents of the second (older) tap register |
| `dbg_addr` | out | 4 | bits 3..0 of the low-band adder sum, before the output register |

Hold `d` stable around the rising edge of `clk`. Each flip-flop's master
latch is open while `clk` is low, so drive inputs in the low phase.

## What is not modelled

- Delays: about 0.35 ns per adder bit, about 2.4 ns for the whole
  ripple-carry adder, and about 0.73 ns clock-to-output for the register.
  Together these give a clock limit of roughly 300 MHz in a 0.5 µm process.
- The clock-tree buffers.
- The pad frame, and the supply and spare pins.
- The transistor-level details of the full adder. Only its logic function
  is modelled. Its multiplexer form is a reading of a pass-gate cell, and
  only its arithmetic is verified.
- Which level opens the D latch. The text does not state it. It was chosen
  so that the master-slave pair triggers on the rising edge, as the
  system requires.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if something hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/haar_pkg.sv tb/tb_haar_dwt_top.sv --top-module tb_haar_dwt_top
./obj_dir/Vtb_haar_dwt_top +verilator+rand+reset+2
```

What the testbenches cover:

- **`tb_haar_dwt_top`** runs the whole design at its only size. It does the
  following:
  - clears the design with zero samples;
  - runs the extreme inputs -128 and +127;
  - streams 4000 random samples;
  - checks every output against an integer reference model, cycle by
    cycle;
  - checks that outputs change only every second edge and hold in
    between;
  - checks both debug buses.

  It also counts the mechanisms it exercised (zero clearing, loads, holds,
  negative and positive high-band results, rounding of odd negative
  samples, extreme inputs) and fails if any of them never occurred. The
  divider's power-up phase is random from run to run. The bench reads it
  from the design, so it works with either phase.
- The cell benches exercise each cell on its own:
  - the adders over all input combinations;
  - the latch in both phases;
  - the flip-flop and the register with inputs that change in both clock
    phases;
  - the divider for its half rate.
