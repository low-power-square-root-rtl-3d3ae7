# 16-bit square-root carry select adder with one adder per group

A carry select adder (CSLA) speeds up addition by splitting the operands into
groups. Each upper group computes its sum twice in advance, once assuming the
carry from below is 0 and once assuming it is 1. When the real carry arrives,
a multiplexer picks the right result. That removes the long ripple, but every
upper group needs two adders.

This design keeps the carry-select structure and drops the second adder. Each
upper group has one ripple carry adder (RCA), and the clock time-shares it:

* **Clock high:** the RCA's carry in is 1. A D latch enabled by the clock is
  transparent and follows the RCA's carry-in-1 result.
* **Clock low:** the latch closes and keeps the carry-in-1 result. The RCA's
  carry in drops to 0, so its live output is now the carry-in-0 result.

In the low phase both candidate results exist at once, one stored and one
live. The carry from the group below then selects between them, as in an
ordinary CSLA. One addition takes one clock cycle.

## Group partition

The 16 bits are split into five groups, least significant first:

| group | bits  | width | built from              | mux select | mux word (sum + carry) |
|-------|-------|-------|-------------------------|------------|------------------------|
| 0     | 1:0   | 2     | plain RCA, carry in `cin` | –        | –                      |
| 1     | 3:2   | 2     | RCA + latch + mux       | c1         | 3 bits                 |
| 2     | 6:4   | 3     | RCA + latch + mux       | c3         | 4 bits                 |
| 3     | 10:7  | 4     | RCA + latch + mux       | c6         | 5 bits                 |
| 4     | 15:11 | 5     | RCA + latch + mux       | c10        | 6 bits                 |

`cN` is the selected carry out of bit N. The carry out of group 4 is `cout`.
Each group is one bit wider than the one below it (the "square root" sizing).
The group's own ripple delay therefore grows at the same rate as the delay of
the carry arriving from below. The widths are constants in `csla_pkg`
(`GROUP_W = '{2,2,3,4,5}`), and the top generates the groups from that list.

## Timing: when the result is valid

This is the part that differs most from an ordinary combinational adder.

```
clk      ____/‾‾‾‾‾‾‾‾\________/‾‾‾‾
a,b,cin  ==X=============================X==   held for a full cycle
RCA cin        1 (latch follows)   0
latch          transparent   | holds carry-in-1 result
sum,cout       not valid     | VALID (whole low phase)
```

* Apply `a`, `b` and `cin` before a rising edge of `clk`. Hold them until the
  end of the following low phase.
* `sum` and `cout` are valid throughout that low phase, once the select carry
  chain has settled.
* While `clk` is high the outputs mean nothing. Both multiplexer inputs then
  carry the carry-in-1 result, whatever the select says.
* There are no flip-flops and no reset. Every latch is rewritten in every high
  phase.

A downstream register should capture `sum`/`cout` at the rising edge that ends
the low phase. That is one result per clock cycle.

In silicon, the design also needs a hold constraint inside each group. The
latch must close at the falling clock edge before the RCA output, which then
switches to the carry-in-0 result, reaches the latch input. The RCA path is at
least one full-adder delay long, so this normally holds, but a timing flow has
to check it. The RTL models the latch as ideal.

## Modules

All files are in `rtl/`, one module or package per file.

| module               | role |
|----------------------|------|
| `csla_pkg`           | `N_BITS = 16`, `NUM_GROUPS = 5`, `GROUP_W`, and `group_lsb(g)`, the lowest bit position of group g |
| `full_adder`         | 1-bit full adder: `s = a^b^ci`, `co = majority(a,b,ci)` |
| `rca`                | `WIDTH`-bit ripple carry adder made of `full_adder` cells |
| `d_latch`            | `WIDTH`-bit level-sensitive D latch: `q` follows `d` while `en` is high and holds while it is low; `q_n = ~q` |
| `carry_mux`          | `WIDTH`-bit 2:1 select: `in1` (carry-in-1 result) when `sel` = 1, else `in0` |
| `latch_select_group` | one upper group: `rca` with `ci = clk`, `d_latch` with `en = clk` storing `{co, s}`, `carry_mux` selected by the carry from below |
| `csla_dlatch16`      | top: 2-bit `rca` for bits 1:0, then four `latch_select_group`s chained through their selected carries |

Top-level ports of `csla_dlatch16`: `clk`, `a[15:0]`, `b[15:0]`, `cin`
(inputs); `sum[15:0]`, `cout` (outputs).

The latches are deliberate. Synthesis reports 18 latch bits for the top: 3 + 4
+ 5 + 6, the sum plus carry of each upper group. The clock is also used as
data: it drives the RCA carry in of each upper group.

## How far to trust it, and where it departs from the source

These points follow the source description directly:

* the 2/2/3/4/5 partition;
* the carries c1, c3, c6, c10 as selects;
* one RCA and one clock-enabled D latch per upper group;
* multiplexers sized 6:3, 8:4, 10:5 and 12:6, that is, sum plus carry of each
  group;
* the latch selected when the incoming carry is 1, the live adder when it is 0;
* one addition per clock cycle.

The following are this design's own reading or choices:

* **Carry in of the upper RCAs.** The source's block diagram shows a constant
  0 at these inputs. But the source also states that the latch supplies
  the result for an incoming carry of 1, and that the adder supplies the
  result for 0. With a single adder, that only works if the adder's carry in
  follows the clock. That is what is built here. If the carry in were tied to
  0, the latch would store the carry-in-0 result and every selection of the
  latch would be off by one.
* **Latch phase.** The latch is transparent while `clk` is high, so the result
  is read in the low phase.
* **Latch implementation.** The source draws a gate-level D latch. Here it is
  an `always_latch`, so synthesis maps it to a latch cell. Its behaviour is
  the same: transparent while enabled, holding while not, with a complement
  output.
* **No reset, no input or output registers.** The source mentions none.

Not included: the binary-to-excess-1-converter (BEC) CSLA that the source
compares against. That design replaces the carry-in-1 RCA of each group with
a "+1" converter. It is a reference point, not part of this design.

The source's measured figures cannot be reproduced from RTL: delay, power,
and LUT/slice/IOB counts on an FPGA. One remark on them: the source reports 50
I/O pins for this adder. The RTL has 51 port bits: 34 inputs (`a`, `b`, `cin`,
`clk`) and 17 outputs.

Every block has a self-checking testbench. The 16-bit adder is tested
end to end at full size against integer addition.

## Simulating

Testbenches are in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and calls `$finish`. A watchdog ends any
run that hangs, and counts that as a failure.

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
  --top-module csla_dlatch16_tb -y rtl -y tb +libext+.sv \
  rtl/csla_pkg.sv tb/csla_dlatch16_tb.sv -o sim
./obj_dir/sim
```

Replace the top module to run another testbench: `full_adder_tb`, `rca_tb`,
`d_latch_tb`, `carry_mux_tb` or `latch_select_group_tb`.

* `csla_dlatch16_tb` tests the adder at full size. It runs corner cases (zero,
  all ones, a carry rippling through all 16 bits, a carry generated at the top
  of each group) and then 20,000 random operations. Each result is checked
  early and late in the low phase, and the one-cycle latency is checked too.
  The testbench counts, per group, how often the latched result and how often
  the live adder result was selected. It also counts `cin = 1`, `cout = 1` and
  full-length carry ripples. Each of these must occur at least once.
* `latch_select_group_tb` runs 2- and 5-bit groups through all operand pairs.
  It switches the select inside the low phase, as a late carry would.
* `d_latch_tb` checks transparency, hold and the complement output.
* `rca_tb` and `full_adder_tb` are exhaustive. `carry_mux_tb` uses random
  words.

## Changing it

* **Other widths or partitions:** edit `N_BITS` and `GROUP_W` in `csla_pkg`.
  The widths must add up to `N_BITS`. The top generates one
  `latch_select_group` per group after the first, and group 0 stays a plain
  RCA.
* **A different latch phase** (result valid while `clk` is high): invert the
  clock both at the RCA carry in and at the latch enable inside
  `latch_select_group`. Both must change together.
