# A full adder made of threshold neurons

This is a 1-bit binary full adder where every gate is an artificial neuron. Each neuron
multiplies its binary inputs by fixed integer weights, adds them, and outputs 1 when the sum is
above a threshold. The right weights and threshold make one neuron into an AND, OR, NAND or NOT
gate. XOR and the 2:1 multiplexer are not linearly separable, so each takes a small two-layer
network. The adder is built from those networks:

```
  p  = a XOR b            two-layer perceptron (NAND + OR hidden neurons, AND output neuron)
  s  = p XOR cin          the same two-layer perceptron
  co = p ? cin : a        neural 2:1 multiplexer, p on the select
```

The design follows a published "multi-layer perceptron hybrid adder" (MLPHA). That design was
meant as a low-power FPGA adder. It replaces the usual five-gate XOR with a three-gate form,
`(~a | ~b) & (a | b)`, and uses one multiplexer for the carry. Everything here is combinational:
there is no clock, no reset and no state.

## The neuron and its firing rule

`threshold_neuron` is the only primitive. It has `N` binary inputs `x[i]`, signed weights
`WEIGHTS[i]` and a signed `THRESHOLD`:

```
  z = 1  if  sum_i WEIGHTS[i] * x[i]  >  THRESHOLD,   else 0
```

A neuron written with a bias `b` (`y = sum + b`, fire when `y > 0`) is the same neuron with
`THRESHOLD = -b`. All gates use this one rule. A gate that should fire when its sum is *below*
a level is written with negative weights and a negative threshold. The numbers are in `ann_pkg`:

| gate | weights | threshold | fires when | as usually written |
|------|---------|-----------|------------|--------------------|
| AND  | 2, 2    | 3         | 2X + 2Y > 3   | 2X + 2Y > 3 |
| OR   | 2, 2    | 1         | 2X + 2Y > 1   | 2X + 2Y > 1 |
| NAND | -2, -2  | -3        | -2X - 2Y > -3 | 2X + 2Y < 3 |
| NOT  | -2      | -1        | -2X > -1      | 0 if 2X > 1, else 1 |

The weighted sums are always even and the thresholds odd. So `>` and `>=` give the same truth
tables, and a sum can never sit exactly on a threshold. Weights and thresholds are 8-bit signed
values (`ann_pkg::weight_t`). The neuron widens its sum by `clog2(N)+1` bits, so it cannot
overflow.

Because the inputs are single bits, each neuron synthesises to a small adder over constants and
a comparator. Synthesis folds it down to the gate it implements. The neuron is still written as
a weighted sum, so you can change the weights and get a different gate.

## Why XOR and the multiplexer take two layers

A single threshold neuron can only split the input space with one straight line.

- **XOR (`mlp_xor`).** `a XOR b` needs two lines. The hidden layer has a NAND neuron (false
  only at 11) and an OR neuron (false only at 00). An AND output neuron is true where both are
  true, which is 01 and 10. There are three neurons in two layers and each input fans out to
  both hidden neurons.
- **Multiplexer (`nn_mux_unit`).** `y = ~s & i0 | s & i1` is not monotone in `s`, so no single
  neuron can compute it. Here it is built as its sum of products: a NOT neuron, two AND neurons
  and an OR neuron. Counted from `s`, that is three neuron levels deep. The published design
  gives only the Boolean equation for this unit. The construction from neurons is this design's
  own.

## The adder

`mlpha` wires two `mlp_xor` networks and one `nn_mux_unit`:

```
  a, b ───► mlp_xor ───► p
  p, cin ─► mlp_xor ───► s
  p ──────► nn_mux_unit.s  ┐
  a ──────► nn_mux_unit.i0 ├─► co
  cin ────► nn_mux_unit.i1 ┘
```

The carry uses the propagate/generate view of a full adder:

- when `a != b` (`p = 1`), the carry in passes through: `co = cin`;
- when `a == b` (`p = 0`), the carry out equals both inputs: `co = a`.

This is the same function as `co = p & cin | a & b`. That is the equation form of the carry.
The multiplexer form is the one used in the hardware. The published design does not say which
multiplexer data pin gets `a` and which gets `cin`. The full-adder function allows only one
choice, so `a` is on select 0 and `cin` on select 1.

The adder has seven units: two hidden neurons and one output neuron for `p`, the same three for
`s`, and the carry multiplexer. With the multiplexer's four neurons counted, it has ten neurons.
The logic depth in neuron levels is:

| path | levels |
|------|--------|
| a/b → p | 2 |
| a/b → s | 4 |
| cin → s | 2 |
| a/b → co (through p on the select) | 2 + 3 = 5 |
| cin → co | 2 |

## Board wrapper

`mlpha_board_top` is the top level. It puts the adder between three slide switches and two
LEDs. A switch that is on reads as 1, and a lit LED means 1. On a Zybo Z7-20 (XC7Z020-CLG400-1)
the pins are:

| signal | pin | adder port |
|--------|-----|------------|
| `sw_cin`   | G15 | `ci` |
| `sw_b`     | P15 | `b`  |
| `sw_a`     | W13 | `a`  |
| `led_sum`  | M14 | `s`  |
| `led_cout` | M15 | `co` |

The pins go in your constraint file. The RTL gives them only in a comment. With the switches
(cin, b, a) at 0,1,0, only the sum LED lights. At 0,1,1, only the carry LED lights. The switches
are used directly, without synchronisers or debouncing. That is fine because nothing is clocked.

## Where this RTL interprets or departs from the published design

The published description is inconsistent in places. Here is what was done:

- **OR threshold.** One passage gives the OR neuron a threshold of −1. Its equation, its truth
  table and its diagram all use `2X + 2Y > 1`. Threshold 1 is used.
- **NAND signs.** The NAND neuron is given both as weights −2, −2 with threshold 3 and as
  `2X + 2Y < 3`. Both describe the same gate. It is written here as weights −2, −2 with
  threshold −3. That matches the −3 shown at the NAND hidden neurons of the multi-layer adder.
- **NOT neuron.** The NOT diagram shows weight 2 and `> 1`, which alone would be a buffer. The
  NOT equation ("0 if 2X > 1, otherwise 1") is followed.
- **`>` versus `>=`.** The general neuron equation uses `>=`. The gate equations use `>`. The
  gate equations are followed. Either gives the same results here, as explained above.
- **Weights w1–w6** of the multi-layer network are not given as numbers. The gate weights above
  are used.
- **Multiplexer internals and data-pin order** are this design's own, as described above.
- **Single-layer and conventional variants.** The source also evaluates a single-layer
  perceptron version of the adder, a conventional AND/OR/NOT version and a plain gate-level
  version. It uses them only for comparison. They are not included. The gate units in `rtl/` are
  enough to assemble them.
- **Power and delay.** Power and delay figures come from FPGA place-and-route and cannot be
  checked in RTL simulation. The published adder drew about 156 mW in total on the XC7Z020
  (about 36 mW dynamic) with a 7.05 ns delay.

## Files

| file | contents |
|------|----------|
| `rtl/ann_pkg.sv` | weight type and the weights and thresholds of each gate |
| `rtl/threshold_neuron.sv` | generic N-input threshold neuron |
| `rtl/nn_and_unit.sv`, `nn_or_unit.sv`, `nn_nand_unit.sv`, `nn_not_unit.sv` | one-neuron gates |
| `rtl/nn_mux_unit.sv` | 2:1 multiplexer from four neurons |
| `rtl/mlp_xor.sv` | two-layer XOR network |
| `rtl/mlpha.sv` | the full adder |
| `rtl/mlpha_board_top.sv` | switch/LED top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each ends by printing `TB_RESULT checks=N failures=M` and has
a watchdog that fails the run if it hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/ann_pkg.sv tb/tb_mlpha_board_top.sv --top-module tb_mlpha_board_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run any other one. Here is what the testbenches cover:

- The gate testbenches and `tb_mlp_xor` apply every input combination.
- `tb_threshold_neuron` also checks a three-input neuron with mixed-sign weights and a negative
  threshold. Its expected values are computed with plain integer arithmetic.
- `tb_mlpha` applies all eight input vectors and compares `{co, s}` with `a + b + cin`. It also
  checks the internal `p`.
- `tb_mlpha_board_top` is the end-to-end test at default parameters. It replays the two board
  demonstrations, then all eight switch settings, then 200 random settings. It counts the four
  ways the carry can form and fails if any never occurs: generate (a = b = 1), kill (a = b = 0),
  propagate (a ≠ b with carry in) and absorb (a ≠ b without carry in).

All testbenches pass. Each one was also run against a copy of its module with one deliberate
bug, such as a wrong threshold, swapped multiplexer inputs or a weight sign error, and each
reported failures.

## Changing it

- **Other gates.** Instantiate `threshold_neuron` with new `WEIGHTS` and `THRESHOLD`. The
  concatenation lists the weight of the highest-numbered input first: `{w1, w0}`.
- **Wider weights.** Change `WEIGHT_BITS` in `ann_pkg`.
- **Multi-bit adder.** `mlpha` is a plain combinational full adder, so it can be chained into a
  ripple-carry adder by connecting each `co` to the next `ci`. No multi-bit version is included.
