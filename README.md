# Clock-gated synchronous binary counters (SBC-1T, SBC-2T, SBC-4T)

In an ordinary synchronous binary counter every flip-flop receives every
clock edge, although bit *i* changes only once every 2^*i* cycles. Most of
the clock power of such a counter is spent on edges that change nothing.
These counters remove those edges. Each bit is a T flip-flop whose toggle
input is tied to 1. Only the least significant bit is clocked directly. Every
higher bit gets its clock through a very small gating network, and that
network passes the master clock only while all lower bits are 1. That is
exactly when the bit has to toggle. The count logic therefore sits in the
clock path, not in front of the D inputs. Bit *i* sees one clock edge every
2^*i* cycles.

Three gating networks are given, and each one makes its own counter:

| counter | gating network per upper stage | flip-flop edges | count advances on |
|---|---|---|---|
| SBC-1T | one NMOS pass transistor (`cgn_1t`) | all rising | rising edge of `clk` |
| SBC-2T | PMOS/NMOS pair acting as an AND gate (`cgn_2t`) | all falling | falling edge of `clk` |
| SBC-4T | four-transistor clocked inverter (`cgn_4t`) | LSB rising, others falling on the inverted clock | rising edge of `clk` |

The default size is 4 bits, and the counters are specified at that size.
The same RTL builds 8-bit and 16-bit versions through the `WIDTH`
parameter.

## Module hierarchy

```
sbc_top                 three counters side by side, shared clk / rst_n
├── sbc_1t  ── cgn_1t (WIDTH-1 of them), t_ff (WIDTH)
├── sbc_2t  ── cgn_2t (WIDTH-1),         t_ff (WIDTH)
└── sbc_4t  ── cgn_4t (WIDTH-1),         t_ff (WIDTH)
sbc_pkg                 SBC_WIDTH = 4, edge_e {EDGE_RISE, EDGE_FALL}
```

All files are in `rtl/`, one module or package per file.

## How a stage is enabled

For stage *i* ≥ 1, the enable is `en[i] = en[i-1] & q[i-1]`, with
`en[0] = 1`. This is a ripple AND chain, so `en[i]` is 1 exactly when bits
0 … *i*-1 are all 1. The gating network of stage *i* is controlled by
`en[i]`, and its clock input is always the master clock. The stages are not
chained through each other's gated clocks. `t_ff` is a D flip-flop with
`d = q ^ t`. Since `t = 1`, every clock edge that reaches it toggles it.

## Why the edges and the held values matter

This is the subtle part of the design. A gated clock is only correct if
opening or closing the gate never creates an edge of its own. In all three
counters the enable changes just after the edge on which the flip-flops
switch. Each network is arranged so that this moment is harmless:

* **SBC-2T (AND gate).** `clk_out = en ? clk : 0`, driven in both states.
  If the flip-flops switched on the rising edge, the enable could go high
  while the clock is still high. The gate would then give a second rising
  edge in the same cycle, and the bit would toggle twice. For this reason
  every SBC-2T flip-flop, the LSB included, switches on the **falling**
  edge. The enable then changes while the clock is low and the gate output
  is 0, and the next high phase is passed or blocked as a whole.

* **SBC-1T (pass transistor).** When the transistor is off, the flip-flop's
  clock node is undriven and keeps its charge. The model is a latch that is
  transparent while `en` is 1. The enable only changes just after a rising
  edge, while the clock is high, so a node that is switched off keeps a 1.
  When it is switched on again, also while the clock is high, it is already
  1 and sees no new edge. Rising-edge flip-flops are therefore safe here.
  Reset sets the node to this resting value of 1.

* **SBC-4T (clocked inverter).** The outer transistors are switched by the
  enable and the inner ones by the master clock. When enabled, the output
  is `~clk`. When not enabled, the output floats, and it is modelled as a
  latch in the same way. The upper flip-flops switch on the falling edge of
  `~clk`, which is the rising edge of `clk`, the same edge as the LSB. A
  node that is switched off rests at 0, and reset sets it to 0.

The latches that synthesis reports in `cgn_1t` and `cgn_4t`, and in the
counters that use them, are therefore intended. They model the charge kept
on a floating transistor node. Their reset values are part of the design:
with the wrong value, the first enable after reset would produce an extra
edge.

## Interfaces and timing

`sbc_1t`, `sbc_2t` and `sbc_4t` all have the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock |
| `rst_n` | in | 1 | asynchronous, active low: clears the count and sets floating nodes to their resting value |
| `q` | out | `WIDTH` | count |
| `stage_clk` | out | `WIDTH` | the clock that reaches each flip-flop (bit 0 is `clk`). It is there for observing the gating, and it is inverted for the upper stages of SBC-4T. |

`sbc_top` has `clk` and `rst_n`, plus `q_1t`, `q_2t`, `q_4t` and
`stage_clk_1t`, `stage_clk_2t`, `stage_clk_4t`. After reset, `q` counts up
by one per master-clock cycle and wraps from 2^`WIDTH`-1 to 0. Latency is
zero cycles: the new count appears right after the counting edge. Release
`rst_n` while `clk` is low. The testbenches do this, so the first counting
edge after reset is a whole one.

## Verification

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`.

* `tb_t_ff` tests both edge options with a random T input and random
  asynchronous resets.
* `tb_cgn_1t`, `tb_cgn_2t` and `tb_cgn_4t` drive random clock, enable and
  reset values. They compare the output with a reference model that
  includes the held node.
* `tb_sbc_1t`, `tb_sbc_2t` and `tb_sbc_4t` check the count after every
  counting edge over three wraps. They also check that stage *i* receives
  exactly ⌊C/2^*i*⌋ active clock edges in C cycles, which is the clock
  activity the gating should leave.
* `tb_sbc_top` runs the top at its default size through two wraps, a reset
  in the middle of a count, and two more wraps. For each counter it checks
  the count and the exact clock edges of every flip-flop against a
  reference. It counts how often a gated clock was passed, how often one was
  blocked, how often the count wrapped and how often reset cleared it, and
  it fails if any of these never happened.
* `tb_sbc_widths` runs 8-bit and 16-bit instances of all three counters
  through a full 16-bit wrap (65 543 cycles), checking every count and the
  per-stage edge totals.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/sbc_pkg.sv tb/tb_sbc_top.sv --top tb_sbc_top
./obj_dir/Vtb_sbc_top
```

Replace `tb_sbc_top` with any other testbench name. Every testbench
finishes in well under a second.

## Departures and limits

* **Transistor networks are reduced to logic.** Each gating network is
  written as its logic function, with a floating node modelled as a latch.
  Drive strength, charge leakage, threshold loss through the single NMOS
  of SBC-1T, and clock skew through the gates are not modelled. A real
  SBC-1T node left off for a long time (up to 2^*i* cycles for stage *i*)
  may leak. Whether it holds long enough is a circuit question that this RTL
  cannot answer.
* **Choices made here, not given by the specification:**
  * the enable is the AND of all lower bits, formed as a ripple chain;
  * SBC-2T uses falling edges;
  * SBC-1T uses rising edges throughout;
  * there is an asynchronous reset, and the resting values given to the
    floating nodes are the ones listed above.
  
  The SBC-4T edge assignment follows the specification.
* **The clock buffer tree is not built.** The repeaters that distribute the
  master clock have no logic function, so `clk` is wired straight to the
  gates. The idea of also placing gating networks inside the levels of that
  buffer tree, for wider counters, is not implemented either.
* **Timing is not modelled.** The comparisons at a 100 MHz constraint,
  covering maximum frequency, slack, area, power and power-delay product,
  depend on the cell library and layout. Nothing in this RTL reproduces or
  checks those figures.
* **Not for FPGA clock networks.** An ASIC or FPGA flow will treat the
  gated clocks as derived clocks. Putting them on an FPGA clock network
  needs the vendor's clock-enable or clock-buffer primitives, which are not
  used here.
