# Reversible-logic 4-bit counter with parallel load and concurrent clear

This is a 4-bit synchronous binary up-counter. It has a parallel load, a
clear, an asynchronous preset and a carry out for chaining stages. Its
storage elements are flip-flops built the way reversible-logic designers build
them. A reversible gate has as many outputs as inputs, and its input vector
can always be recovered from its output vector. The two workhorse gates are:

* the **Feynman gate** (controlled-NOT), which copies a bit when one input is
  tied to 0;
* the **Fredkin gate** (controlled swap), which acts as a 2-to-1 multiplexer
  that keeps its unused input as a "garbage" output.

A reversible circuit may not fan a wire out. Every signal that is used twice,
such as a flip-flop output fed back to its own next-state logic, goes through
a Feynman copy.

The counter comes in two variants that count and load the same way and differ
only in how **clear** reaches the flip-flops:

| variant | module | clear path | clear timing |
|---|---|---|---|
| first approach | `rev_counter_a1` | through the J/K inputs (J=0, K=1) | at the next rising clock edge |
| second approach | `rev_counter_a2` | straight to the flip-flops' CLR pins | at once, no clock needed |

The second variant takes clear out of the J/K logic. Its reversible gate
netlist therefore needs fewer gates. The published figures for the two
reversible netlists are:

* first approach: 15 gates, 9 unused outputs, quantum cost 40, 7 constant inputs;
* second approach: 11 gates, 7 unused outputs, quantum cost 31, 5 constant inputs.

These figures describe the gate netlist. This RTL does not reproduce that
netlist (see "Where this RTL departs from the reversible circuit").

## Counter behaviour

One operation happens per rising edge of `clk`. It is chosen by priority:

| `clr` | `load` | `inc` | at the rising edge |
|---|---|---|---|
| 1 | x | x | all bits 0 (second approach: already 0 while `clr` is 1) |
| 0 | 1 | x | `q <= d` (load wins over increment) |
| 0 | 0 | 1 | `q <= q + 1`, wrapping from all ones to 0 |
| 0 | 0 | 0 | no change, whatever `d` is |

* **`preset_n`** is asynchronous and active low. While it is 0, every bit is 1.
  If `clr` is also active on the second approach's CLR pins, `clr` wins.
* **`cout`** is combinational: `cout = (selected operation is increment) & (q == all ones)`.
  It is high during the cycle that ends in the wrap to zero. To build a wider
  counter, feed `cout` of one stage to `inc` of the next and share `clk`,
  `clr`, `load` and `preset_n` among all stages. Load and clear then act on
  every stage in the same cycle.
* **Width.** `WIDTH` defaults to 4 and may be 2 to 16. Any other value stops
  elaboration with an error. A 16-bit counter can also be built from four
  default stages; `tb_rev_counter_cascade` does this.

The operation is decoded once, by `rev_counter_pkg::decode_op`, into the
enum `counter_op_e` (`OP_CLEAR`, `OP_LOAD`, `OP_INC`, `OP_HOLD`). Each bit's
J/K pair is then:

| operation | J | K |
|---|---|---|
| clear (first approach only) | 0 | 1 |
| load | `d[i]` | `~d[i]` |
| increment | `t[i]` | `t[i]` |
| hold | 0 | 0 |

Here `t[0] = 1` and `t[i] = t[i-1] & q[i-1]`: bit i toggles when every lower
bit is 1. In the second approach the J/K decode ignores `clr`, because the
CLR pins already force zero.

## The reversible flip-flops

### JK flip-flop (`jk_ff`)

The next state is Q+ = J·Q' + K'·Q. It comes from one Fredkin gate:

* the control input is the fed-back state Q;
* the data inputs are J and ~K;
* the middle output is `Q ? ~K : J`, which is exactly the JK table.

A Feynman gate with a constant 0 copies the stored bit. One copy goes out as
`q`; the other goes back to the Fredkin gate's control input.

In the purely reversible circuit, a second Fredkin gate controlled by the
clock closes the storage loop as a level-sensitive element. Here that loop is
an edge-triggered register, because the flip-flop is specified to act on the
positive edge.

The register also has the asynchronous `set` and `clr` pins that the counter
uses. Both are active high, and `clr` wins.

Cost of the reversible version: 2 Fredkin gates + 1 Feynman gate, quantum
cost 2·5 + 1 = 11.

### D flip-flop (`d_ff`, `d_latch`)

A reversible D latch is one Fredkin gate, controlled by the enable, that
chooses between D and the fed-back output: `cp ? d : q`. A Feynman gate then
copies the result, one copy going to the output and one back to the loop. In
`d_latch` this loop is written as a level-sensitive latch.

`d_ff` chains two latches as master and slave:

* the master is transparent while `clk` is 0;
* the slave is transparent while `clk` is 1.

`q` is therefore the value `d` had at the rising edge. Each latch has a
quantum cost of 5 + 1 = 6. The latches that synthesis reports in these two
modules are intended.

The D flip-flop is not used by the counters. It appears in the top level as a
separate part of the same family.

## Top level (`rev_counter_top`)

Both counters sit side by side on the same inputs:

* inputs: `clk`, `preset_n`, `clr`, `load`, `inc`, `d[WIDTH-1:0]`;
* first approach outputs: `q_a1`, `cout_a1`;
* second approach outputs: `q_a2`, `cout_a2`.

After every clock edge the two counters hold the same value. They differ only
between edges while `clr` is 1: `q_a2` is already zero and `q_a1` waits for
the edge.

The D flip-flop has its own ports, `dff_d` and `dff_q`, and uses the same
`clk`.

## Files

| file | contents |
|---|---|
| `rtl/rev_counter_pkg.sv` | `counter_op_e` and `decode_op` (clear > load > increment) |
| `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv` | the two reversible gates (combinational) |
| `rtl/jk_ff.sv` | reversible JK flip-flop, rising edge, async set/clr |
| `rtl/d_latch.sv`, `rtl/d_ff.sv` | reversible D latch and master-slave D flip-flop |
| `rtl/rev_counter_a1.sv` | counter, clear through J/K (synchronous) |
| `rtl/rev_counter_a2.sv` | counter, clear on CLR pins (asynchronous) |
| `rtl/rev_counter_top.sv` | both counters and the D flip-flop |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the cascade test |

## Simulating

Every testbench checks its results and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rev_counter_pkg.sv tb/tb_rev_counter_top.sv --top-module tb_rev_counter_top
./obj_dir/Vtb_rev_counter_top
```

Replace the testbench name to run any of the others:

* `tb_feynman_gate`, `tb_fredkin_gate`: every input combination. They also
  check that the outputs are one-to-one and that a second gate undoes the
  first.
* `tb_jk_ff`: random J/K values, plus async set and clear pulses between
  edges.
* `tb_d_ff`: data changes while the clock is high and while it is low. None of
  them may pass through before the next rising edge.
* `tb_rev_counter_a1`, `tb_rev_counter_a2`: 3000 random cycles at widths 4
  and 8 against a reference model. They check the carry out, the preset, and
  the clear's timing for that approach.
* `tb_rev_counter_top`: the top at its default parameters. It first runs one
  full 16-state counting cycle with the carry, then random operation. It
  counts each mechanism (hold, increment, load, load over increment, clear at
  the edge, clear between edges, clear over load, wrap with carry, preset, D
  flip-flop capture of 0 and 1) and fails if any of them never occurs.
* `tb_rev_counter_cascade`: four 4-bit stages of each approach chained into a
  16-bit counter and compared with a 16-bit model.

All of them finish in well under a second.

## Where this RTL departs from the reversible circuit

* **The counters' J/K logic is ordinary logic, not the reversible gate
  netlist.** The reversible counters route load, increment, data and the
  flip-flop outputs through gates called NH, F2G and HNFG. No equations are
  available for these gates, so the J/K drive is written from the counter's
  behaviour. The flip-flops themselves keep their Fredkin/Feynman structure.
  Gate counts, garbage outputs and quantum cost can therefore not be measured
  on this RTL.
* **Edge-triggered storage instead of clock-gated reversible loops** in
  `jk_ff`. The D latches are real latches.
* **The JK Fredkin gate takes ~K.** The characteristic equation needs the
  complement of K at that input.
* **Clear polarity.** For the second approach, clear is described in one
  place as active when 1 and in another as forcing zero when 0. Both variants
  here use an active-high `clr`.
* **Carry out is gated by the increment operation.** The described behaviour
  only says that it pulses when the count reaches all ones. Gating it with the
  increment makes stage chaining correct.
* **Preset.** An active-low asynchronous preset is described for the counter,
  but the circuit drawings show no preset input. It is wired here to the
  flip-flops' SET pins.

## Synthesis notes

* `jk_ff` has two asynchronous controls (set and clear) on one register. Some
  synthesis front ends, including yosys through slang, reject that form.
  Verilator and slang elaboration accept it.
* Each counter's logic is a handful of gates plus `WIDTH` flip-flops. The
  longest path is the toggle chain `t[i]`, plus `cout` when stages are chained.
