# Return-to-one DIMS gates for 4-phase dual-rail logic

Quasi-delay-insensitive (QDI) asynchronous circuits carry each bit on two
wires. A 4-phase handshake separates every data word from the next with an
idle word, the *spacer*. The usual convention is return-to-zero (RTZ): the
spacer is all wires low, and a data word raises one wire per bit. This RTL
implements the opposite convention, **return-to-one (RTO)**. The spacer is all
wires high, and a data word pulls one wire per bit low.

The gates are built in the Delay-Insensitive Minterm Synthesis (DIMS) style.
Every minterm of the inputs is formed by a C-element, and the minterms are then
merged into the output rails. Moving from RTZ to RTO changes one thing: the
OR gates that merge the minterms become AND gates. The C-elements and the wiring
stay the same. The motivation is power. The AND gates put their series
transistors in the NMOS network rather than the PMOS network. C-elements that
hold a spacer of ones also leak less than ones that hold a spacer of zeros. The
trade-off is that holding a data word costs slightly more static power. In
transistor-level simulation of 65 nm cells, the RTO gates drew roughly 7-48 %
less current per data or spacer wave than their RTZ counterparts. The size of
the saving depends on the C-element circuit used. Those figures belong to the
cells. This RTL cannot reproduce them, since it only captures the logic.

The design contains three two-input gates (OR, XOR and AND) and the C-element
they are made of. A top level places all three on shared operands.

## The RTO dual-rail code

Each bit is a pair `{t, f}` (`dr_rto_pkg::dr_t`):

| word     | t | f |
|----------|---|---|
| spacer   | 1 | 1 |
| logic 0  | 1 | 0 |
| logic 1  | 0 | 1 |
| not used | 0 | 0 |

This is the bitwise complement of the RTZ code. A bit is valid when `t != f`
and idle when both rails are high. The package provides `dr_encode`,
`dr_decode`, `dr_is_valid`, `dr_is_spacer` and the four words as constants. Treating
`t0 f0` as an illegal word is this design's reading. It mirrors the illegal
`t1 f1` word of the RTZ code.

## The C-element (`c_element`)

A two-input Muller C-element sets its output to the common value of its inputs
when they agree, and holds its output when they disagree:

| a | b | q        |
|---|---|----------|
| 0 | 0 | 0        |
| 0 | 1 | previous |
| 1 | 0 | previous |
| 1 | 1 | 1        |

In the RTL it is a latch that is transparent while `a == b` and loads `a`. So
synthesis reports one latch bit per C-element, and this is intentional. The
C-element has no reset. It reaches a known state the first time its inputs
agree, and a 4-phase channel guarantees that by starting at the spacer. Any
environment must therefore drive both operands to the spacer before the first
data word. Silicon implementations use dedicated static cells (the Martin,
Sutherland and van Berkel circuits). Those are transistor-level and are not part
of this RTL.

## Minterms and the three gates

`dims_minterms` forms the four minterms from the rails of `a` and `b`:

```
n11 = C(a.t, b.t)   n10 = C(a.t, b.f)   n01 = C(a.f, b.t)   n00 = C(a.f, b.f)
```

Under RTO the active level is low. So `n<x><y>` falls exactly when `a = x` and
`b = y`. It rises again only after both operands have returned to the spacer.
At most one minterm is low at any time.

The output's `t` rail falls to signal a 1, so it is the AND of the minterms
where the function is 1. The `f` rail is the AND of the minterms where the
function is 0:

| gate          | y.t                 | y.f                 |
|---------------|---------------------|---------------------|
| `dims_rto_or`  | n11 & n10 & n01     | n00                 |
| `dims_rto_xor` | n10 & n01           | n11 & n00           |
| `dims_rto_and` | n11                 | n10 & n01 & n00     |

The complete behaviour, operands and results written as `t f`:

| a    | b    | OR  | XOR | AND |
|------|------|-----|-----|-----|
| 1 1  | 1 1  | 1 1 | 1 1 | 1 1 |
| 1 0  | 1 0  | 1 0 | 1 0 | 1 0 |
| 1 0  | 0 1  | 0 1 | 0 1 | 1 0 |
| 0 1  | 1 0  | 0 1 | 0 1 | 1 0 |
| 0 1  | 0 1  | 0 1 | 1 0 | 0 1 |

Every gate has its own four C-elements, as in the original DIMS gates. A
synthesis tool may merge identical C-elements across gates that share
operands. `dims_rto_gates` shows this: it has 4 latch bits after synthesis, not 12. An
asynchronous flow that must keep each gate's own completion should preserve the
instances.

Each gate carries a deferred immediate assertion. Whenever both operands are
code words, the output must never be `t0 f0`.

## How the 4-phase handshake uses them

The gates are untimed and have no clock. A transfer through `dims_rto_gates`
goes like this:

1. All wires idle high. The sender puts data on `a` and `b`, in any order and
   with any skew between them.
2. While only one operand is present, every result stays at the spacer. The
   C-elements wait for the second operand.
3. Once both operands are present, each result shows its data word. A receiver
   detects completion from the data itself (`t != f` on every result bit) and
   raises its acknowledge.
4. The sender returns the operands to the spacer, again in any order. Each
   result holds its data word until both operands have left.
5. Every result is back at the spacer. The receiver lowers its acknowledge, and
   the next transfer can begin.

In steps 2 and 4 the gate itself takes part in the delay-insensitive protocol.
Its output never moves on partial input, so completion detection at the
receiver covers the inputs too. The sender and the receiver (with its
completion detector and acknowledge) are not part of this RTL. They exist only
in the end-to-end testbench.

## Files

| file | contents |
|------|----------|
| `rtl/dr_rto_pkg.sv` | `dr_t` type, RTO code words and helper functions |
| `rtl/c_element.sv` | two-input C-element |
| `rtl/dims_minterms.sv` | four minterm C-elements of a two-input gate |
| `rtl/dims_rto_or.sv`, `rtl/dims_rto_xor.sv`, `rtl/dims_rto_and.sv` | the three RTO DIMS gates |
| `rtl/dims_rto_gates.sv` | top: the three gates on shared operands |
| `tb/*_tb.sv` | one self-checking testbench per module |

No module has parameters. The blocks are single-bit two-input gates. A wider
datapath is built by instantiating them per bit.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `c_element_tb` walks every state of the C-element (in `a b q` order:
  000, 100, 010, 110, 111, 011, 101, 001). It also checks inputs that change
  and change back without moving `q`. It then applies 2000 random input pairs
  against a truth-table reference.
* `dims_minterms_tb` and the three gate testbenches send every operand pair in
  all four orders of arrival and release. They check the output in each of the
  four phases: spacer with one operand, result with both, result held with one
  released, spacer with none. The gate testbenches compare against two
  independent references: the RTO truth table above, held as constants, and
  the single-rail function re-encoded in the RTO code.
* `dims_rto_gates_tb` runs 400 handshaked transfers through the top level with
  random operand values, orderings and skews. It counts data waves, spacer
  waves, results held at the spacer while one operand was missing, results held
  at data while one operand had left, and each of the four operand pairs. A
  failure is counted if any of these never occurs. It runs the top at its
  defaults.
* `dims_rto_activity_tb` replays the four phases of a power characterisation
  on all three gates: compute data, store data, compute the spacer, store the
  spacer. It counts transitions on every minterm and output rail. A data wave
  must switch exactly one minterm and one output rail per gate, both falling.
  A spacer wave must switch them back, once each. Nothing may switch while a
  word is stored, or when only one operand arrives or leaves. So the switching
  activity of each gate is the same for every operand pair, and no output
  glitches.

Simulating with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dr_rto_pkg.sv tb/dims_rto_gates_tb.sv --top-module dims_rto_gates_tb
./obj_dir/Vdims_rto_gates_tb
```

The same pattern works for the other testbenches (`c_element_tb`,
`dims_minterms_tb`, `dims_rto_or_tb`, `dims_rto_xor_tb`, `dims_rto_and_tb`,
`dims_rto_activity_tb`).
Verilator has only two signal states. Every C-element therefore starts at an
arbitrary value until the first spacer, and the testbenches drive the spacer
before anything else.

## Limits and departures

* **Untimed.** The RTL is zero-delay. Propagation delay, slopes and loads are
  properties of the cell implementation and are not modelled. The same goes for
  the power and leakage behaviour that motivates RTO.
* **C-element as a latch.** This is a functional description. It is not one of
  the static transistor C-element circuits. Timing-driven asynchronous flows
  usually map C-elements to library cells and keep them from being optimised.
* **No RTZ versions.** The RTZ gates, which RTO is compared against, are not
  included. They would use the same C-element row with OR gates in place of the
  AND gates and an all-zero spacer.
* **Dual-rail only.** The gates use the 1-of-2 code. The RTO idea carries over
  to other m-of-n codes, but none is implemented here.
* **XOR grouping.** The assignment of `n10, n01` to `y.t` and `n11, n00` to
  `y.f` follows from the XOR function. It is the only grouping that gives the
  tabulated behaviour.
