# Multibit flip-flop with adaptive (data-driven) clock gating

Flip-flops in most digital designs change state rarely: a typical flip-flop
toggles in only 1 % to 10 % of the clock cycles, yet its clock pin switches in
every one of them. This design attacks that waste in two ways at once:

* **Merging.** `k` flip-flops are packed into one multibit flip-flop (a
  *k-MBFF*) that has a single clock input and a single internal clock driver,
  instead of `k` separate drivers.
* **Data-driven gating.** Each flip-flop compares its data input `D` with its
  output `Q`. If no bit of the group would change at the next clock edge, the
  group's clock pulse is suppressed altogether.

The group thus behaves exactly like an ordinary `k`-bit register (`q` follows
`d` one clock later). Its internal clock, however, only toggles in cycles where
the stored value actually changes. The design is given at two group sizes, a
2-bit and a 4-bit MBFF; the top level `mbff_acg_top` instantiates one of
each.

## Structure of one group

```
            d[k-1:0] ─────────────┬────────────────────────────┐
                                  │                            │
                     ┌────────────▼────────────┐               │
   q[k-1:0] ────────►│ state_change_detector   │               │
      ▲              │  k x ptl_xor2 (d ^ q)   │               │
      │              │  (k-1) x ptl_or2 chain  │               │
      │              └────────────┬────────────┘               │
      │                      change                            │
      │              ┌────────────▼────────────┐               │
      │     clk ────►│ icg                     │               │
      │              │  latch, open while clk=0├──► clk_en     │
      │              │  ptl_and2 (clk & latch) │               │
      │              └────────────┬────────────┘               │
      │                         gclk                           │
      │              ┌────────────▼────────────┐               │
      └──────────────┤ mbff  (k D flip-flops,  │◄──────────────┘
                     │  one shared clock)      │
                     └─────────────────────────┘
```

`ddcg_mbff` is this whole group. Its parameter is `K`, the number of bits, with a
default of 4.

### The state-change detector

`state_change_detector` has one XOR per bit (`d[i] ^ q[i]`). The XOR is 1 when
bit `i` would change at the next edge. The `K` results are ORed into a single
request, `change`. The OR is built as a chain of two-input cells, which is
this implementation's choice. For 2 and 4 bits it is at most one gate level
deeper than a balanced tree.

### The clock gate, and why it has a latch

Gating a clock with a bare AND gate is unsafe. The request `change` depends on
`q`, and `q` itself changes right after the rising edge. With a bare AND, the
falling request would cut the clock pulse short. Worse, a late change of `d`
while the clock is high would create an extra pulse.

`icg` avoids this with a level-sensitive latch in front of the AND gate. The
latch is transparent while `clk` is low and holds while `clk` is high:

```
clk        ___/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\____
change     ====X=========X=========X=============   (may move at any time)
latch      open| hold    |open| hold    |open| hold
gclk       ___/‾‾‾‾‾\___________________/‾‾‾‾‾\____
               ^ passed       ^ suppressed  ^ passed
```

The value of `change` at the end of a low phase decides whether the following
high phase of `clk` reaches the flip-flops. Anything that happens while `clk` is
high is ignored. The rising edge of `gclk` is therefore always a whole clock
pulse or none.

The latch output is brought out as `clk_en`. During the high phase it tells
whether this cycle's pulse was passed. An assertion in `ddcg_mbff` checks
that the gate passes the edge exactly when `d != q` at that edge.

### Timing consequences

* The detector (XORs and OR chain) must settle within the low phase of the
  clock, before the latch closes. `d` must therefore be stable before the
  rising edge, plus the detector delay plus the latch setup time. That is the
  price paid against a plain register.
* The flip-flops see the clock through the latch-and-AND path. This adds an
  insertion delay that clock-tree timing must account for.
* Seen from the ports, the group has a latency of one cycle, like any register.

### The merged flip-flops

`mbff` is `K` positive-edge D flip-flops on one clock net. In silicon, merging
means one clock driver for the whole group. In RTL that appears only as the
single `clk` input. An asynchronous active-low reset clears the group. It is an
addition of this implementation, chosen asynchronous because a synchronous
reset would need the gated clock to run.

## How large should a group be?

Grouping is a trade-off. One clock gate (a latch and an AND) is shared by
more flip-flops as `k` grows, so its cost per bit falls. But the chance that
*none* of the `k` bits toggles, which is the only case in which the pulse is
saved, falls too. With independent bits, each toggling with probability `p`,
that chance is `(1-p)^k`. Writing `C_FF` for the clock input load of a
flip-flop and `C_latch` for that of the gate latch, the `k` that maximises the
expected saving solves

```
(1-p)^k · ln(1-p) · C_FF + C_latch / k² = 0
```

This equation ignores the extra benefit of sharing one clock driver. Group
size is therefore a design-time decision per activity level, and `K` is a
parameter. `tb_ddcg_mbff_activity` measures the fraction of suppressed pulses
for `k` = 2, 4 and 8 at `p` = 0.01, 0.05 and 0.1 and checks it against
`(1-p)^k`. For example, at `p` = 0.1 a 2-bit group skips about 81 % of its
pulses, a 4-bit group 66 % and an 8-bit group 43 %.

Gating pays off most when the grouped flip-flops toggle together. When only
average activities are known, flip-flops should be sorted by toggling
probability and grouped in that order, so that rarely toggling flip-flops share
a gate with each other.

## Pass-transistor gate cells

The gating logic is meant to be built from pass-transistor cells, which need
fewer transistors than complementary CMOS:

| cell       | function | transistors | used in                 |
|------------|----------|-------------|-------------------------|
| `ptl_xor2` | a ^ b    | 2           | per-bit change detector |
| `ptl_or2`  | a \| b   | 3           | OR of the change flags  |
| `ptl_and2` | a & b    | 3           | clock gate              |

Pass transistors pass one logic level weakly: NMOS passes a strong 0 but a
degraded 1, PMOS a strong 1 but a degraded 0. This is the cost of the smaller
transistor count, and it shows up in the cells' noise margins and delays.

**These modules hold only the logic function.** The transistor topology, the
degraded levels and the resulting area and delay are properties of the cell
netlist. RTL cannot express them. The modules keep the cell boundaries, so a
netlist flow can map each one onto its custom cell. The reference numbers for
the custom-cell implementations are:

| design                        | area (transistors) | delay    |
|-------------------------------|--------------------|----------|
| 2-bit, conventional           | 123                | 24.4 ns  |
| 2-bit, pass-transistor gating | 89                 | 14.83 ns |
| 4-bit, conventional           | 261                | 95.12 ns |
| 4-bit, pass-transistor gating | 189                | 85.93 ns |

They cannot be reproduced from this RTL.

## Files

| file (rtl/)                  | module                                         |
|------------------------------|------------------------------------------------|
| `ptl_xor2.sv`, `ptl_or2.sv`, `ptl_and2.sv` | gate cells                       |
| `state_change_detector.sv`   | XOR per bit, OR chain → `change`               |
| `icg.sv`                     | latch + AND integrated clock gate              |
| `mbff.sv`                    | `K` flip-flops on one clock, async reset       |
| `ddcg_mbff.sv`               | one gated multibit flip-flop group             |
| `mbff_acg_top.sv`            | 2-bit and 4-bit groups side by side            |

Top-level ports of `mbff_acg_top` (parameters `K_A = 2`, `K_B = 4`):

| port                 | dir | width | meaning                                   |
|----------------------|-----|-------|-------------------------------------------|
| `clk`                | in  | 1     | free-running clock, shared by both groups |
| `rst_n`              | in  | 1     | asynchronous reset, active low            |
| `d_a`, `q_a`         | in/out | `K_A` | data of the 2-bit group                |
| `a_clk_en`           | out | 1     | 2-bit group clocked in this cycle         |
| `d_b`, `q_b`         | in/out | `K_B` | data of the 4-bit group                |
| `b_clk_en`           | out | 1     | 4-bit group clocked in this cycle         |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_ptl_xor2`, `tb_ptl_or2`, `tb_ptl_and2`: truth tables.
* `tb_state_change_detector`: all 256 combinations of `d` and `q` for `K` = 4.
* `tb_icg`: the enable is toggled at random points, including in the middle of
  the high phase. `gclk` must be a whole pulse or none, and its rising edges
  are counted.
* `tb_mbff`: asynchronous reset, loading, and holding between edges.
* `tb_ddcg_mbff`: compares the group with an ungated reference register at
  activities of 5 %, 30 % and 100 %. It checks `clk_en` in every cycle and
  counts the clock edges that reach the flip-flops.
* `tb_mbff_acg_top`: end-to-end test at default parameters. It drives the two
  groups with different activities and checks every cycle. It requires each
  mechanism to occur at least once: a suppressed pulse and a passed pulse in
  each group, a pulse passed for a partial change, one group gated while the
  other is clocked, a data change during the high phase, and a reset.
* `tb_ddcg_mbff_activity` (with the helper `tb/ddcg_activity_run.sv`): the
  group-size and activity sweep described above.

The edge-counting checks reach the internal clock of the flip-flops by
hierarchical name (`dut.u_ff.clk`). Because the gate is transparent at the
ports, counting edges is the only way to see whether gating happens.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mbff_acg_top \
          -y rtl -y tb +libext+.sv tb/tb_mbff_acg_top.sv
./obj_dir/Vtb_mbff_acg_top
```

To lint a module: `verilator --lint-only -Wall -y rtl rtl/mbff_acg_top.sv`.

## Departures and limits

* The asynchronous reset, the `clk_en` observation output, the OR chain
  order and the latch phase (transparent while the clock is low, for
  positive-edge flip-flops) are choices of this implementation.
* No scan or test-enable input is provided on the clock gate.
* Groups of 2 and 4 bits are built at the top level. Other sizes, including
  8, are available through the `K` parameter of `ddcg_mbff`.
* The design contains one latch per group, the clock-gate latch, and a derived
  clock, `gclk`, both intentional. Synthesis and timing flows must treat `icg`
  as a clock-gating cell.
* No area, delay or power figures can be derived from the RTL. The benefit of
  the scheme shows up in a gate-level or transistor-level power analysis, as
  reduced switching on the flip-flops' clock net.
