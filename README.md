# Clock-gated Fibonacci LFSR with shared-XOR feedback

A linear feedback shift register is a row of flip-flops that shifts by one
place on every clock edge, with the bit entering at one end computed as the XOR
of a few tapped bits. In a conventional LFSR every flip-flop receives every
clock edge, and the clock pins are where most of the register's power goes.
Yet a flip-flop only needs an edge when the bit it is about to load differs
from the bit it holds, and in a maximal-length sequence that is true for only
half of the cycles.

This design gives each flip-flop its own clock gate that lets the clock
through only in those cycles. Two details keep the gating cheap:

* **The gate is a pass-transistor XOR driving a transmission gate.** A
  complementary pass-transistor (CPL) XOR/XNOR compares the flip-flop's D and Q,
  using both rails that the flip-flops already provide (Q and QN). Its two
  complementary outputs drive a single transmission gate between the clock and
  the flip-flop's clock pin. There is no static NAND in the clock path.
* **The gate's XOR is reused in the feedback.** The comparison of stage k gives
  `x^(k+1) xor x^k`. When the polynomial has two adjacent taps, that one signal
  replaces two tapped bits and the XOR gate that would have combined them.

The register's output is bit-for-bit the same as an ungated LFSR's: a stage that
is not clocked would only have reloaded the value it already holds.

## The register

Stage k holds the bit called `x^k`, for k = 0 … N-1. At every step stage k takes
`x^(k+1)` from its neighbour, and stage N-1 takes the feedback `x^N`, the XOR
of the taps of the characteristic polynomial

    p(x) = x^N + c_(N-1) x^(N-1) + ... + c_1 x + 1

The serial output is `x^0`.

```
           +--------------- lfsr_feedback (XOR chain) <-------------+
           |                 ^ taps: x^k from Q, b_k from gates     |
           v                 |                                      |
   load ? seed : fb     load ? seed : x^(N-1)          load ? seed : x^1
           |                 |                             |
       +---D---+         +---D---+                     +---D---+
       | stage |  x^(N-1)| stage |  x^(N-2)    ...     | stage |--> x^0 = out
       |  N-1  |-------->|  N-2  |-------->            |   0   |
       +-------+         +-------+                     +-------+
   each stage: CLK --[transmission gate, on when D != Q or load]--> flip-flop
```

`gc_stage` is one stage: a flip-flop (`dff_qn`) and its clock gate
(`xornand_pa` = `cpl_xor_xnor` + `tg_clock_gate`). Inner stages get their
second rail from the neighbour's QN; the last stage's D comes from the single
rail feedback, so an inverter makes its complement.

## How the clock gate stays glitch-free

This is the part of the design that needs the most care, in silicon and in
simulation.

When the transmission gate is off, nothing drives the flip-flop's clock pin:
the node floats and keeps the level it had. The RTL writes this as a
level-sensitive latch (`tg_clock_gate`, `always_latch`): transparent while the
gate conducts, holding while it does not. The latch is intended; it is the
model of that floating node.

The gate control `D xor Q` changes only just after a rising clock edge, when
the flip-flops (and hence every D and Q) update, while CLK is still high.
So:

* a gate that closes, closes while CLK is high and leaves its node **high**;
* a gate that opens, opens while CLK is high and finds its node already high,
  so no edge appears; the next rising edge of CLK is the first one the
  flip-flop sees.

Both rely on one invariant: a closed gate's node holds a high level. After
power-up a node may float low, and the first opening of such a gate would be
a rising edge in the middle of the cycle, after the neighbours have already
shifted. That corrupts the sequence. The design therefore **opens every
gate while `load` is high**: during seeding every clock node follows CLK, and
when `load` falls (while CLK is high) every closed gate is left high. The
register must be loaded once after power-up before its output is used.

Two timing rules follow, and the testbenches respect them:

* `load` and `seed` must change only while CLK is high, i.e. shortly after a
  rising edge, exactly as the register's own outputs do.
* Anything that reuses the gate in another circuit must keep its inputs stable
  while CLK is low.

For synthesis, the gated clocks are derived clocks: each stage's clock is a
latch output. A standard-cell flow would build the gate from a custom
transmission-gate cell or replace it with an integrated clock-gating cell; the
latch written here will be mapped as a real latch by a generic synthesizer,
which is functionally the same but not the low-power cell the scheme relies on.

## The shared-XOR feedback network

`lfsr_feedback` builds `x^N` from two kinds of terms: flip-flop outputs `x^k`,
and binomials `b_k = x^(k+1) xor x^k` (k = 0 … N-2) that the clock gates
compute anyway. The binomial of the last stage, `x^N xor x^(N-1)`, contains the
feedback itself and is not used.

The taps, including the constant term `1 = x^0`, are grouped into couples of
adjacent exponents, each tap in at most one couple. A couple costs one
binomial, a lone tap one flip-flop output, and the terms are XORed in a chain
from the lowest exponent up. With `n_t` inner taps (all terms but `x^N` and
`1`) and `m_c` couples, the network needs

    n''_t = n_t - m_c   two-input XOR gates

instead of `n_t`. Example: for `x^10 + x^4 + x^3 + x + 1` the couples are
`(x^4, x^3)` and `(x, 1)`, so `x^10 = b_3 xor b_0`, one XOR instead of three.
Couples are taken greedily from `x^0` upwards, which finds the most couples in
every run of adjacent taps.

Parameter `FB_STYLE` selects the network:

| `FB_STYLE`    | terms                                                                   | XOR gates |
|---------------|-------------------------------------------------------------------------|-----------|
| `FB_PAIRED`   | couples as binomials, lone taps from flip-flops (default)               | `n''_t`   |
| `FB_BINOMIAL` | only binomials: `1` with the lowest tap, then consecutive taps, each pair as a run of binomials whose XOR telescopes to the pair's sum | `n'_t` |
| `FB_DIRECT`   | every tap from its flip-flop (conventional)                             | `n_t`     |

`FB_BINOMIAL` is an intermediate form of the method and can need more gates
than the conventional network (any polynomial without an `x` term pays for the
gap). It is kept for comparison. The feedback XORs are ordinary static CMOS
gates (`xor2_cell`): a pass-transistor XOR would give a weak '1' at the
flip-flop input.

XOR counts for the thirteen polynomials the scheme was evaluated with; all
thirteen are maximal-length, and the counts are checked by the testbenches:

| polynomial                                               | n | `n_t` | `n'_t` | `n''_t` |
|----------------------------------------------------------|---|------|-------|--------|
| x^5 + x^2 + 1                                            | 5 | 1 | 1 | 1 |
| x^5 + x^3 + x^2 + x + 1                                  | 5 | 3 | 1 | 1 |
| x^7 + x^3 + 1                                            | 7 | 1 | 2 | 1 |
| x^7 + x^3 + x^2 + x + 1                                  | 7 | 3 | 1 | 1 |
| x^7 + x^5 + x^4 + x^3 + x^2 + x + 1                      | 7 | 5 | 2 | 2 |
| x^10 + x^3 + 1                                           | 10 | 1 | 2 | 1 |
| x^10 + x^4 + x^3 + x + 1                                 | 10 | 3 | 1 | 1 |
| x^10 + x^6 + x^5 + x^3 + x^2 + x + 1                     | 10 | 5 | 2 | 2 |
| x^10 + x^7 + x^6 + x^5 + x^4 + x^3 + x^2 + x + 1         | 10 | 7 | 3 | 3 |
| x^16 + x^5 + x^3 + x^2 + 1 (default)                     | 16 | 3 | 3 | 2 |
| x^16 + x^5 + x^4 + x^3 + x^2 + x + 1                     | 16 | 5 | 2 | 2 |
| x^16 + x^8 + x^7 + x^5 + x^4 + x^3 + x^2 + x + 1         | 16 | 7 | 3 | 3 |
| x^16 + x^15 + x^11 + x^9 + x^8 + x^7 + x^5 + x^4 + x^2 + x + 1 (CRC-16 T10-DIF) | 16 | 9 | 9 | 6 |

## Interface of `gc_lfsr`

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1 | free-running clock; flip-flops are positive-edge |
| `load`   | in  | 1 | load `seed` at the next rising edge; opens every clock gate |
| `seed`   | in  | N | seed, bit k goes to stage `x^k` |
| `out`    | out | 1 | serial output `x^0` |
| `state`  | out | N | register contents, bit k = `x^k` |
| `clk_en` | out | N | 1 where the stage will be clocked at the next edge (`D != Q`, or `load`) |

| parameter  | default | meaning |
|------------|---------|---------|
| `N`        | 16 | register length, 2 … 64 |
| `POLY`     | `17'h1002D` = x^16 + x^5 + x^3 + x^2 + 1 | characteristic polynomial, bit k = coefficient of `x^k`; bits N and 0 must be 1 |
| `FB_STYLE` | `FB_PAIRED` | feedback network, see above |

Timing: `load` takes one cycle; with `load` low the register advances one step
per rising edge, `state[k] <= state[k+1]`, `state[N-1] <= xor of the taps`.
There is no reset. An all-zero seed locks the register (and closes every gate).

## What follows the published scheme and what is this design's own

Follows it: the Fibonacci register, one clock gate per flip-flop controlled by
`D xor Q`, the gate built as a CPL XOR/XNOR driving a transmission gate, the
flip-flops' complementary outputs feeding the CPL rails, the reuse of the
gates' binomials in the feedback and the counting rule `n''_t = n_t - m_c`,
static CMOS XORs in the feedback, the thirteen evaluated polynomials.

This design's own: the seed path (a load multiplexer in front of every D and
the `load`/`seed` ports), forcing the gates open during load, the inverter for
the last stage's second rail, modelling the floating clock node as a latch,
the greedy choice of couples, the XOR chain order, the handling of an unpaired
tap in `FB_BINOMIAL`, the choice of x^16 + x^5 + x^3 + x^2 + 1 as default, and
the `clk_en` observation port.

Not reproduced: the scheme's value lies in transistor-level power (clock-pin
and gate energy), which RTL cannot show. The RTL shows the activity that
drives it: each stage is clocked in exactly half of the cycles of a period
(2^(N-1) edges in 2^N - 1 cycles), and the number of feedback XOR cells.
The transistor schematics of the flip-flop and the XOR cell are modelled by
their logic function. The earlier XOR-plus-NAND gating and the Galois form of
the LFSR are not built.

## Files

| file | contents |
|------|----------|
| `rtl/lfsr_pkg.sv` | feedback-style enum; elaboration-time functions that pick the feedback terms |
| `rtl/gc_lfsr.sv` | top: N stages, seed multiplexers, feedback network |
| `rtl/gc_stage.sv` | one stage: flip-flop + clock gate |
| `rtl/xornand_pa.sv` | clock gate: CPL XOR/XNOR + transmission gate (+ `open`) |
| `rtl/cpl_xor_xnor.sv` | dual-rail pass-transistor XOR/XNOR |
| `rtl/tg_clock_gate.sv` | transmission gate with floating (held) output |
| `rtl/dff_qn.sv` | positive-edge flip-flop with Q and QN |
| `rtl/xor2_cell.sv` | two-input XOR cell |
| `rtl/lfsr_feedback.sv` | shared-XOR feedback network |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

* `gc_lfsr_tb` — the default 16-bit register through a whole period of 65535
  steps against a plain shift-register model; period, return to the seed,
  seed load latency of one edge, a reload mid-run; per stage, that the gated
  clock rose exactly once for every enabled cycle and 2^15 times per period;
  the feedback has 2 XOR cells.
* `gc_lfsr_table_tb` — all thirteen polynomials above, each with each of the
  three feedback styles (39 registers), through a full period, with the same
  sequence, period, clock-edge and XOR-count checks. Every register is clocked
  in exactly 2^(N-1) of its 2^N - 1 cycles per stage (a fraction of 0.516 for
  N = 5, 0.500 for N = 16).
* `lfsr_feedback_tb` — the three network styles for all thirteen polynomials:
  random register contents, and the XOR counts of the table.
* `gc_stage_tb`, `xornand_pa_tb`, `tg_clock_gate_tb`, `cpl_xor_xnor_tb`,
  `dff_qn_tb`, `xor2_cell_tb` — the stage, the gate and its parts, the cells.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lfsr_pkg.sv tb/gc_lfsr_tb.sv \
          --top-module gc_lfsr_tb
./obj_dir/Vgc_lfsr_tb
```

The other modules are found through `-Irtl` (file name = module name). The
full-period runs take a few seconds at most.

To use another polynomial, set `N` and `POLY`, e.g.
`gc_lfsr #(.N(10), .POLY(11'h41B))` for x^10 + x^4 + x^3 + x + 1.
