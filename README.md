# Four-bit absolute value comparator

A threshold detector for signed samples: given a 4-bit two's-complement
sample `a` and a 3-bit unsigned threshold `thr`, the output `y` is 1 when the
sample's magnitude is strictly greater than the threshold and 0 otherwise.
It is the digital form of an all-or-nothing decision, the way a neuron fires
only when its membrane potential crosses a threshold, regardless of the
sign of the excursion.

The circuit is purely combinational: no clock, no reset, no state. `y`
follows the inputs after the propagation delay of two small gate stages.

```
            +--------------------+  mag[2:0]  +----------------------+
 a[3:0] --->| complement_circuit |----------->| magnitude_comparator |---> y
            |  (sign -> magnitude)|            |  (mag > thr ?)       |
            +--------------------+  thr[2:0] -->+----------------------+
```

## Stage 1: from two's complement to magnitude without an adder

For a positive sample (`a[3] = 0`) the magnitude is simply `a[2:0]`. For a
negative one it is `~a[2:0] + 1`. Instead of an incrementer, each bit of the
negation is written out from the carry rule: the "+1" carry reaches bit *i*
of the inverted value only when all lower inverted bits are 1, i.e. when all
lower original bits are 0. That gives

| bit | negative sample (`a[3] = 1`) | positive sample |
|-----|------------------------------|-----------------|
| 0   | `a0`                         | `a0`            |
| 1   | `a1 ^ a0`                    | `a1`            |
| 2   | `a2 ^ (a1 \| a0)`            | `a2`            |

Bit 0 is the same for both signs, so it is a plain wire. For bits 1 and 2
both candidates are computed in parallel and a pair of CMOS transmission
gates, controlled by the sign bit and its complement, connects one of them
to the output node. At the logic level each pair is a 2:1 selector; the RTL
models it as such (`tgate_select`), since bidirectional switches are not
something synthesis or a two-state simulator handles. On silicon the pair
is cheaper and faster than a gate-level multiplexer, which is the reason for
the choice.

In the original schematic the four gated nodes are named Y1..Y4: Y3 and Y1
carry the negated bits 2 and 1 and are enabled when the sign is 1; Y4 and Y2
carry the raw bits 2 and 1 and are enabled when the sign is 0.

**The most negative sample.** -8 (`1000`) has magnitude 8, which does not fit
in three bits. The add-one rule wraps it to `000`, so -8 is treated as
magnitude 0 and never exceeds any threshold. If that matters for an
application, it can be detected separately as `a == 4'b1000`.

## Stage 2: "greater than" in NAND-NAND form

`magnitude_comparator` decides `mag > thr` from the most significant bit
down:

    Y = A2·B2' + (A2≡B2)·A1·B1' + (A2≡B2)(A1≡B1)·A0·B0'

The equality factors would need XNOR gates. They can be weakened: in the
second product, the only case in which `A2≡B2` is false and the product
could still matter is `A2=1, B2=0`, and that case is already covered by the
first product. So `A2≡B2` may be replaced by `k2 = NAND(A2', B2)` ("bit 2
does not favour B"), and the same for bit 1. Every term is then a NAND, and
the OR of the terms is a NAND of NANDs:

    k2 = NAND(A2', B2)           k1 = NAND(A1', B1)
    Y  = NAND( NAND(A2, B2'),
               NAND(k2, A1, B1'),
               NAND(k2, k1, A0, B0') )

The RTL writes the same structure as a loop over bits, so it also holds for
other widths.

## Modules

| file | contents |
|------|----------|
| `rtl/absval_pkg.sv` | `MAG_W = 3`, `IN_W = MAG_W + 1`, the types `mag_t`, `sample_t` |
| `rtl/tgate_select.sv` | one transmission-gate pair, modelled as a 2:1 selector |
| `rtl/complement_circuit.sv` | stage 1: `a[MAG_W:0]` -> `mag[MAG_W-1:0]` |
| `rtl/magnitude_comparator.sv` | stage 2: `gt = a > b` on `MAG_W`-bit unsigned inputs |
| `rtl/abs_value_comparator.sv` | top: `a[MAG_W:0]`, `thr[MAG_W-1:0]` -> `y` |

Each module has one parameter, `MAG_W` (default 3). The specified design is
`MAG_W = 3`; other widths follow the same per-bit rules and are an extension
(the testbenches cover the default only).

## Physical design notes (not in the RTL)

The gate-level circuit was also sized for delay and energy. Those results
concern transistor sizes and supply voltage, which RTL does not express, so
they are summarised here only as guidance for a custom or standard-cell
implementation:

- The critical path runs from the low input bits through the carry logic
  of stage 1's bit 2, a transmission gate and the NAND levels of the
  comparator: 7 stages, path effort about 295, logical-effort delay about
  31.75 (in units of an inverter's delay). A 6-stage path through the XOR of
  bit 1 is slightly faster (about 30.4).
- Input capacitances of the 7 stages sized for minimum delay, load 32:
  2.667, 1.46, 2.466, 5.549, 12.486, 21.070, 23.704.
- With the delay allowed to grow to 1.5×, energy on the critical path can
  be cut to about 61 % by lowering the supply from 1 V to 0.78 V, to about
  61 % by resizing gates alone, and to about 51 % by combining a supply of
  0.844 V with resizing.

## Simulation

Each testbench is self-checking, exhaustive and ends with a
`TB_RESULT checks=N failures=M` line.

```
verilator --binary --timing rtl/absval_pkg.sv rtl/tgate_select.sv \
  rtl/complement_circuit.sv rtl/magnitude_comparator.sv \
  rtl/abs_value_comparator.sv tb/abs_value_comparator_tb.sv \
  --top-module abs_value_comparator_tb -o sim && ./obj_dir/sim
```

- `tb/complement_circuit_tb.sv`: all 16 samples against `|value| mod 8`
  computed with integer arithmetic; both sign paths used.
- `tb/magnitude_comparator_tb.sv`: all 64 pairs against integer `>`; counts
  pairs decided at each bit and equal pairs.
- `tb/abs_value_comparator_tb.sv`: all 128 (sample, threshold) pairs at the
  default size, end to end. It also counts, and requires at least once:
  the positive and negative paths, the -8 wrap-around, outputs of 1 and 0,
  equal magnitude and threshold, and a decision at each comparator bit.

The outputs are sampled 1 ns after each input change; the clock in the
testbenches only drives a watchdog.

## Where this RTL departs from, or adds to, the specification

- The expression for magnitude bit 2 (`a2 ^ (a1 | a0)`) is derived from the
  invert-and-add-one rule; only bits 0 and 1 were given explicitly.
- The treatment of -8 (magnitude wraps to 0) follows from that rule; the
  specification does not discuss it.
- Transmission gates are modelled as selectors.
- The rewrite of the comparator's equality terms as `NAND(Aj', Bj)` is this
  design's reading of the NAND-only form described for it.
- The threshold is a plain input. Where it is stored is left to the system
  around the comparator.
- The `MAG_W` parameter and the loop form of both stages are additions; the
  specified circuit is the 3-bit case.
