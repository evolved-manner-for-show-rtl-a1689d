# Look-ahead clock gating

Most clock pulses that reach a flip-flop are wasted: in typical control
logic a flip-flop's data changes in only a few percent of the cycles in which
it is clocked. Look-ahead clock gating (LACG) removes most of those pulses
without the tight timing of gating schemes that compare a flip-flop's own D
and Q in the same cycle.

The idea is a simple causality argument. A flip-flop (the *target*) is fed
by a logic cone whose inputs are the outputs of *k* other flip-flops (its
*sources*). If none of the sources changed at clock edge n, the target's D
input during the next cycle is the same as during the last one, so clocking
the target at edge n+1 cannot change it. The clock enable of every target is
therefore the OR of "my source toggled at the previous edge", which is known
a full cycle before the edge it gates. The OR tree and its wires get a whole
clock period instead of the setup window of the target.

This repository holds synthesizable SystemVerilog for the gating cells, for a
register-to-register example path built with them, and for the power model
that decides which flip-flops are worth gating.

## How a target is gated

```
 source FF s_i                                     target FF
 +---------+ q_i ---------> logic cone ----------> d   q
 |  d ^ q  | x_i --+                               |
 +---------+       |   +-----+   +--------+   +----+-----+
        ...        +-->| OR  |-->| enable |-->| gater    |--> gated clk
 source FF s_k x_k --->| tree|   | FF     |en | latch+AND|
                       +-----+   +--------+   +----------+
                                     ^  clk        ^ clk
```

Timing for a target whose sources toggle at edge n:

| time               | what happens                                                                  |
|--------------------|-------------------------------------------------------------------------------|
| cycle before n     | source has d != q, so its toggle indicator x = d ^ q is 1; the OR tree settles |
| edge n             | sources load their new values; the enable flip-flop loads OR(x) = 1           |
| cycle n .. n+1     | target's d settles to its new value; the gater latch (open while clk is low) takes en = 1 |
| edge n+1           | the gated clock pulses and the target loads d                                 |

If no source toggled at edge n, en is 0 during that cycle and the target
sees no pulse at edge n+1. Its d is unchanged since the edge at which it was
last clocked, so it loses nothing. By induction the gated target always
holds exactly what a plain register would hold, provided every input of its
logic cone is one of the sources it watches. This is the one rule a user of
the cells has to respect: a target must not depend on a primary input or on
a flip-flop that is missing from its OR tree. Register primary inputs first.

Three gating mechanisms work together:

* **Auto-gated flip-flops** (`agff`). A flip-flop is clocked only when its
  own d differs from its q. The XOR that decides this is the toggle
  indicator x that the sources export. Suppressing such a pulse never changes
  anything, because the pulse would only reload the value already held.
* **Look-ahead enable** (`lacg_enable`). This is the OR of the sources' x,
  registered one cycle ahead. The enable flip-flop is itself auto-gated, so
  it is clocked only when the enable changes.
* **Clock gate** (`clock_gater`). A latch that is transparent while clk is
  low holds the enable, and an AND passes the clock. The enable is frozen
  before the rising edge, so the gated clock carries whole pulses only.

The enable flip-flop samples on the rising edge. The gater latch then shows
its value from the falling edge on, and that value stays steady until the
next falling edge. The method describes this stage as an oppositely clocked
flip-flop whose output is valid from half a cycle after the sources' edge
until the gated edge. The positive-edge flip-flop plus the gater latch gives
that same window. It also lets the OR tree use the whole cycle, not half of
it.

## When gating pays: the break-even rule

Gating costs something. Each flip-flop needs an XOR. Each target needs a
k-input OR tree, an enable flip-flop and a latch. A target with many sources
is enabled often. Treat each source as toggling independently with
probability p. The net saving in switched capacitance per target is then

```
dC = (1-p)^k (C_FF+CLK + C_FF + C_o) - p (C_X + k C_o) - (C_FF+CLK/3 - C_Aint + C_FF + C_o)
```

Here `C_FF` is a flip-flop's clock input and `C_FF+CLK` adds its share of the
clock driver and wire. `C_X` is the XOR and `C_Aint` the internal AND. `C_o`
is one OR-tree input together with its wire. The figures of a 22 nm library
are used:

| C_FF | C_CLK | C_FF+CLK | C_X | C_o | C_Aint |
|------|-------|----------|-----|-----|--------|
| 25.7 | 33.5  | 36.9     | 2.9 | 3.1 | 1.7    |

(all in fF). A target is worth gating only where dC > 0, i.e. below a
break-even curve in the (k, p) plane. The curve falls from p ≈ 0.37 at k = 1
to p ≈ 0.02 at k = 20. At the typical data toggling rate p = 0.03 the
break-even fan-in is **k = 15**: gating saves 0.72 fF at k = 15 and loses
0.63 fF at k = 16. Targets past break-even are left as plain ungated
flip-flops.

`lacg_pkg` evaluates this model at elaboration in integer fixed point.
Capacitances are in 0.1 fF, p is in per-mille, and (1-p)^k is scaled by 10^6.
Its functions are `worth_gating(p, k)` and `breakeven_k(p)`. Nothing of the
model becomes hardware: it only selects which gating structure a `generate`
builds. The model has two simplifications. It applies no safety margin for
leakage. It also charges each target a full OR tree, although synthesis may
share sub-trees between targets.

## Joint gating

Two targets can share one OR tree (over the union of their sources), one
enable flip-flop and one gater. That halves the gating overhead. In return,
each of the two is enabled whenever either one's sources toggle. `lacg_reg`
covers both cases. `WIDTH = 1` gates a single target. `WIDTH = 2` is a
jointly gated pair. Inside, each target bit is still an auto-gated
flip-flop, so a pulse that reaches a bit whose value does not change is
dropped there.

## The example path (`lacg_top`)

`lacg_top` applies the method to a concrete path. The method is defined for
any logic. The adder, its width and the pairing below are this design's
example choices.

* Source registers `a_q`, `b_q`: 2 × WIDTH auto-gated flip-flops loading the
  inputs `a`, `b` every cycle.
* Logic cone: `a_q + b_q`. Sum bit j depends on source bits 0..j of both
  operands, so its fan-in is k = 2(j+1), and the carry-out sees all 2·WIDTH.
* Targets `sum[WIDTH:0]`, grouped as neighbouring pairs (2m, 2m+1):
  * If `JOINT` is set and the merged fan-in (that of bit 2m+1) is below
    break-even, the pair is one jointly gated `lacg_reg`.
  * Otherwise each bit of the pair is judged on its own fan-in. It is either
    a single gated `lacg_reg` or a plain ungated flip-flop.

Defaults: `WIDTH = 16`, `P_TOGGLE_PERMILLE = 30`, `JOINT = 1`. With these,
bits 0–5 form three jointly gated pairs (merged fan-ins 4, 8 and 12). Bit 6
is gated alone (k = 14), and bits 7–16 (k ≥ 16) are ungated. The
`sum_en` output shows, per bit, the enable that gates its next edge (1 for
ungated bits). Use it to measure how many pulses the gating removes.

Ports: `clk`; `rst_n` (asynchronous, active low; clears all data registers
and sets all enables, so the first edge after reset clocks every target);
`a`, `b`; `sum` (equals `a + b` two edges after they are applied); `sum_en`.

## Files

| file                | contents                                                         |
|---------------------|------------------------------------------------------------------|
| `rtl/lacg_pkg.sv`   | library capacitances, power model, break-even functions          |
| `rtl/clock_gater.sv`| latch + AND clock gate                                           |
| `rtl/agff.sv`       | auto-gated flip-flop with toggle-indicator output                |
| `rtl/lacg_enable.sv`| K-input OR tree and self-gated enable flip-flop                  |
| `rtl/lacg_reg.sv`   | WIDTH targets on one look-ahead gated clock (1 = single, 2 = joint) |
| `rtl/lacg_top.sv`   | example path: source registers, adder, gated target register     |
| `tb/tb_*.sv`        | one self-checking testbench per module, plus `tb_lacg_breakeven` |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert rtl/lacg_pkg.sv -y rtl \
          tb/tb_lacg_top.sv --top-module tb_lacg_top
./obj_dir/Vtb_lacg_top +verilator+rand+reset+2
```

* `tb_clock_gater`: the gated clock follows the enable sampled before
  each rising edge. It stays low in every low phase. An enable change while
  the clock is high does not disturb the pulse.
* `tb_agff`: the flip-flop matches a plain register. Its internal clock
  pulses exactly at the edges where d ≠ q. The reset values are checked.
* `tb_lacg_enable`: en equals the OR of the indicators at the previous edge.
  The enable flip-flop is clocked only when en changes.
* `tb_lacg_reg`: a jointly gated pair fed by testbench source registers
  matches plain registers. Its enable and its gated-clock pulse count are
  checked against an independent model.
* `tb_lacg_top`: the default-size design for 6000 cycles, in stretches of
  quiet, sparse and dense input activity, with a reset in mid-run. It works
  out the break-even fan-in and each bit's gating style itself, in real
  arithmetic. It checks `sum` and every bit's enable on every cycle. It also
  requires that joint and single gating each both suppress and pass edges,
  and that ungated bits, source self-gating and enable-flip-flop self-gating
  all occur.
* `tb_lacg_breakeven`: sweeps the whole (k, p) plane, k = 1..20 and
  p = 0.005..0.4. It compares the package's fixed-point decision with the
  real-valued model. Then it builds an 8-bit path for p = 0.10
  (break-even k = 4) and checks that only bits 0 and 1 are gated, jointly.

Verilator is a two-state simulator. The asynchronous reset acts on its
falling edge, so the testbenches start with `rst_n` high and pull it low.

## Departures and limits

* Every module works at the register-transfer level. Two flip-flops are
  modelled at a higher level than transistor latches, with the same function
  and the same clocking rate:
  * the auto-gated flip-flop, which in a custom cell gates its master and
    slave latches separately;
  * the LACG target cell, which adds one latch to such a flip-flop.
  Real power savings depend on the cell library and on clock-tree placement.
  Neither is modelled here.
* The enable flip-flop is positive-edge clocked and followed by the gater's
  low-transparent latch, rather than being an oppositely clocked flip-flop
  (see the timing table above).
* No safety margin around the break-even curve is applied. The method
  suggests one to cover leakage of the gating logic, but gives no value.
* Joint gating is limited to pairs of targets. Groups of more than two can
  be built with `lacg_reg` (`WIDTH > 2`), but no rule is given for choosing
  them. The pairing in `lacg_top` (neighbouring sum bits) is a simple
  heuristic, not an optimised clustering.
* The reset style (asynchronous, active low, enables set on reset) is this
  design's choice.
* Gated clocks are generated in RTL (latch + AND). For synthesis, map
  `clock_gater` to the library's integrated clock-gating cell. Declare the
  gated clocks as generated clocks in the timing constraints. Synthesis
  reports one latch per clock gate; that latch is the gate's purpose.
* Clock enables that synthesis derives from the RTL's own load conditions
  can coexist with this scheme, but no such combination is built here: the
  example path loads every register on every cycle.
