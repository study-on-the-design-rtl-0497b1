# Majority-logic adders for adiabatic quantum-flux-parametron (AQFP) circuits

AQFP is a superconducting logic family. Its gates are powered by an AC
excitation current rather than a DC supply. The excitation is itself the clock:
each gate latches its value when its phase of the excitation arrives, hands it
on to the next gate in the next phase, and releases it afterwards. Every gate
is therefore a pipeline stage. A signal that skips a level of logic is lost
unless buffers carry it across that level. The basic gate is the 3-input
majority gate, not AND/OR; AND and OR are majority gates with one input held
at a constant.

This RTL models four AQFP arithmetic circuits at the level of their gates and
phases:

| Circuit | Module | Latency (phase ticks) |
|---|---|---|
| 16-bit Kogge-Stone adder built from 3-input majority gates | `ksa_maj3` | 12 |
| 8-bit Kogge-Stone adder whose carry merge is one 5-input majority gate | `ksa_maj5` | 6 |
| bfloat16 floating-point adder, nine pipelined blocks | `bf16_adder` | 149 |
| 1-bit "type-A" full adder, the textbook example of buffer insertion | `full_adder_type_a` | 4 |

The four circuits are independent test circuits. `aqfp_adders_top` places them
side by side, each with its own ports, and they share only the clock. All of
them accept a new operation on every phase tick.

## The phase-tick timing model

AQFP is normally driven by a four-phase excitation. The gates at logic levels
*i*, *i*+4, *i*+8, … are excited together, and one excitation cycle moves data
four levels. The RTL maps this onto ordinary synchronous logic:

- `clk` is the **phase tick**. One rising edge stands for one excitation
  phase, and four ticks make one excitation cycle
  (`aqfp_pkg::PHASES_PER_CYCLE`).
- **Every gate output is a register.** A gate at logic level *k* is written as
  `always_ff` logic that reads level *k*−1 registers. The number of registers
  on a path is therefore exactly its depth in AQFP phases.
- **Path balancing is explicit.** Every input of a gate must come from the
  level just before it. A signal that has to wait passes through
  `aqfp_delay`, a chain of registers that stands for a chain of AQFP buffers.
  When a block diagram shows a buffer, the RTL has a register there too. The
  latency of each block is fixed, and outputs never change depending on data.
- **Splitters are buffers with fan-out.** An AQFP gate drives one load. To use
  a value twice it goes through a splitter, which takes a phase. The full
  adder models splitters explicitly as their own register stage. The larger
  blocks model splitter depth only where the block diagram shows it.
- **Reset and valid.** AQFP has no reset, because the excitation clears every
  gate. The datapath registers here have no reset either, and they contain X
  until data has flowed through them. Each block carries a one-bit valid
  marker (`aqfp_valid_delay`) alongside the data. The marker is cleared by
  `rst_n`, and `out_valid` says which output ticks hold a real result. The
  valid marker is a convenience for simulation, not a part of AQFP
  hardware.

To get a latency in excitation cycles, divide the tick count by four. For
example, the 149-tick bfloat16 adder takes 37.25 cycles.

Interconnect is not modelled. On chip, long wires in the prefix tree need
repeater buffers, and those add phases that depend on the layout; see
*Departures* below.

## Kogge-Stone adders from majority gates

Both adders are parallel-prefix (Kogge-Stone) adders with WIDTH = 2^L bits.
Bit *i* starts from a generate/propagate pair. Level *k* of the tree merges
the pair at column *i* with the pair at column *i* − 2^(k−1), using a carry
merge (CM):

    G' = Gv + Pv·Gh        P' = Pv·Ph

Here *v* is the pair's own column and *h* the partner column. After L levels,
G at column *i* is the carry out of bits *i*..0, which is the carry into
bit *i*+1. Columns without a partner pass their pair on through buffers. Both
modules take a `cin` input and give a WIDTH+1-bit `sum` whose top bit is the
carry out.

### `ksa_maj3` — three-input majority gates only

- **GP block** (2 phases). Input buffers, then g = a·b (a majority gate with
  constant 0) and t = a + b (constant 1). The OR is used as the propagate
  signal ("transmit") instead of XOR, because XOR is expensive in AQFP.
- **First CM level** (1 phase). Because t = a + b, at this level g implies t,
  and in that case Gv + Pv·Gh equals Maj(Gv, Gh, Pv). The whole merge is one
  majority gate, which saves a phase and a gate.
- **Later CM levels** (2 phases each). The implication no longer holds after
  the first merge, so these levels use the standard AND-then-OR form. Buffers
  keep Gv in step with the AND.
- **SUM block** (3 phases). Without an XOR, the sum bit comes from the
  majority form of a full adder:

      s = Maj(NOT Maj(a, b, c), Maj(a, b, NOT c), c)

  with c = G of the column below. Maj(g, t, x) = Maj(a, b, x) for any x,
  because g = a·b and t = a + b. The block therefore keeps g and t of its own
  column in a buffer chain and computes M1 = Maj(g, t, c), M2 = Maj(g, t, NOT c)
  and s = Maj(NOT M1, c, M2). The carry out of the top bit is G of the top
  column.

The latency is 2 + 1 + 2(L−1) + 3 = 4 + 2L phases: 12 at 16 bits.

### `ksa_maj5` — five-input majority carry merge

A 5-input majority gate with one duplicated input and one constant-1 input
computes

    Maj(Pv, Gh, Gv, Gv, 1) = Gv + Pv·Gh

for any values of G and P. Every CM level is then a single gate, one phase
deep, with P' = Pv·Ph alongside. This version uses the usual generate and
propagate (g = a·b, p = a XOR b), so the sum bit is just p XOR carry. The
latency is 2 (GP) + L (CM) + 1 (XOR) = 3 + L phases: 6 at 8 bits. This variant
is faster than `ksa_maj3` at every width; `tb_ksa_widths` checks 4, 8 and 16
bits.

`aqfp_pkg` holds the behavioural `maj3` and `maj5` functions that the gate
equations use.

## The bfloat16 adder pipeline

`bf16_adder` adds two bfloat16 numbers (1 sign, 8 exponent, 7 fraction bits;
bias 127). It runs them through nine blocks in a fixed order. Each block is
padded with buffers to a fixed phase count. Everything a later block needs
(signs, the other exponent, flags) travels beside the datapath in `aqfp_delay`
chains of matching depth.

| # | Block | Does | Phases |
|---|---|---|---|
| 1 | `exp_comparator` | eq = (ea == eb), gt = (ea > eb) | 12 |
| 2 | `operand_swap` | x = operand with the larger exponent, y = the other | 6 |
| 3 | `exp_subtractor` | d = ex − ey | 13 |
| 4 | `barrel_shifter` (right) | align y's significand by d, with sticky bit | 26 |
| 5 | `mantissa_adder` | x + y, or x − y when the signs differ | 20 |
| 6 | `mantissa_twos_complement` | take the magnitude; flag a sign flip | 17 |
| 7 | `priority_encoder12` | position p of the leading 1 | 15 |
| 8 | `exp_adder` | e = ex + p − 10, left shift = 11 − p | 19 |
| 9 | `barrel_shifter` (left) | shift the leading 1 to the top | 21 |

The total is 149 phases. A new pair can enter on every tick, so about 149
operations are in flight at once.

### The 12-bit significand word

Blocks 4 to 9 work on a 12-bit word:

    bit 11      headroom for the carry out of an addition
    bit 10      hidden (leading) 1, or 0 when the exponent field is 0
    bits 9..3   the 7 fraction bits
    bits 2..0   guard, round and sticky bits

The right shifter ORs every bit it pushes out below bit 0 into bit 0 (the
sticky bit). After a subtraction, bits 2..0 therefore still record whether the
true difference had anything below the fraction. This keeps the truncated
result exact: the output equals the exact sum rounded toward zero.

### Worked through the stages

- **Compare and swap (1–2).** The operands swap when ey > ex, that is when
  neither gt nor eq is set. After the swap, d = ex − ey ≥ 0.
- **Align (3–4).** If d ≥ 12, the smaller operand shifts out entirely and
  leaves only a sticky 1, or 0 if the operand was 0.
- **Add (5).** When the signs differ, the adder computes x + NOT y + 1 with
  the same `ksa_maj5` adder. It outputs 13 bits; bit 12 is the carry out.
- **Magnitude (6).** With subtraction and no carry out, y was larger (this is
  possible when the exponents are equal). The block negates the word, and the
  result takes y's sign.
- **Normalise (7–9).** The priority encoder finds the highest set bit *p* of
  the 12-bit magnitude. The exponent becomes ex + p − 10:
  - p = 11 after a carry, so the exponent rises by 1;
  - p = 10 when the result is already normal;
  - p < 10 after cancellation.

  The left shifter moves bit *p* to bit 11. The result fraction is bits
  10..4 of the shifted word; everything below is dropped.
- **Pack.** The block packs the result in the same tick as the left shifter
  output:
  - no bit set (exact cancellation, or both operands zero) gives +0;
  - result exponent ≤ 0 gives a signed zero;
  - result exponent ≥ 255 gives a signed infinity.

### The blocks

- **`exp_comparator`** (8 bits) is a binary tree of 1-bit comparators.
  - Each leaf gives eq = XNOR(a, b) and large = a·NOT b.
  - Each merge node gives eq = eqL·eqR and large = largeL + eqL·largeR, where
    L is the upper half.
  - The tree has log2(8) = 3 merge levels instead of a chain of 8. Its core
    is 11 phases deep, padded to 12.
- **`priority_encoder4`** is the latency-minimised 4-to-2 encoder:
  - v = (a3 + a2) + (a1 + a0)
  - i1 = a3 + a2
  - i0 = a3 + a1·NOT a2

  It is 3 phases deep.
- **`priority_encoder12`** is three `priority_encoder4` instances on the
  nibbles, then a fourth on the nibble-valid flags to pick the highest
  nonzero nibble. A 3-to-1 AND-OR multiplexer selects that nibble's low
  index bits. The output is idx = {group, low}, with v = 0 for an all-zero
  input. The core is 9 phases, padded to 15.
- **`barrel_shifter`** has log2 stages. Each stage is a row of 2-to-1
  multiplexers, O = a·s + b·NOT s, 3 phases deep. A stage whose shift is at
  least WIDTH clears the word. Parameters:
  - `LEFT` sets the direction;
  - `STICKY` turns on the sticky bit;
  - `PHASES` pads the depth.
- **`exp_subtractor`**, **`mantissa_adder`** and **`exp_adder`** are built on
  the `ksa_maj5` adder at 8, 12 and 10 bits respectively; `exp_adder` uses 10-bit signed
  exponent arithmetic. **`mantissa_twos_complement`** negates with a
  `ksa_maj5` increment. **`operand_swap`** is a row of multiplexers.

## The type-A full adder

`full_adder_type_a` is a 1-bit full adder:

    Cout = Maj(a, b, c)
    S    = Maj(NOT Maj(a,b,c), Maj(a,b,NOT c), c)

It shows why buffer insertion matters. Each input feeds two gates, so each
needs a splitter (phase 1). Maj1 and Maj2 follow in phase 2, with c buffered
beside them. Maj1 is needed again in phase 4, so it is split in phase 3 while
Maj2 and c are buffered. Phase 4 produces both outputs together. The result is
four phases deep, and a new input triple is accepted on every tick.

The full adder is written as a netlist of cells. `aqfp_majority_gate` is one
clocked majority gate with N = 3 or 5 inputs. Each input can be inverted
through the `INV` mask, which stands for an inverter cell taking the place of
the input buffer. Tying one input of a 3-input gate to a constant gives the
other gates:

- constant 0: AND;
- constant 1: OR;
- constant 0 with both other inputs inverted: NOR.

One-phase `aqfp_delay` cells serve as buffers and splitters. The larger
blocks use the same majority functions (`aqfp_pkg::maj3`, `maj5`) directly
inside their per-phase registers, instead of instantiating gate cells.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and has a watchdog that fails the run if it
hangs.

- **`tb_aqfp_adders_top`** is the end-to-end test at default parameters.
  - 16-bit adder: it runs 5 critical vectors and 110 random additions, first
    checking each printed result against a + b. The critical vectors are
    chosen for propagate pass-through, generation from every bit, and a carry
    rippling from bit 0 to the carry out.
  - 8-bit adder: critical vectors and random operands.
  - bfloat16 adder: 1500 mixed-class operations.
  - Full adder: every input combination.
  - It checks each latency. It also counts that every mechanism actually
    happened: carry out, full-length ripple, swap, subtraction, sign flip,
    carry normalisation, cancellation, sticky alignment, overflow, underflow
    and exact zero.
- **`tb_bf16_adder`** compares 4000 operations against `bf16_ref_pkg`, an
  exact model. The model aligns the operands in a 128-bit integer, adds them
  exactly and truncates, so it shares no structure with the RTL.
- **`tb_ksa_maj3`**, **`tb_ksa_maj5`** and **`tb_ksa_widths`** test the
  adders at their default widths and at 4, 8 and 16 bits, including the
  latency formulas.
- **`tb_aqfp_majority_gate`** applies every input pattern to 3- and 5-input
  gates and to the AND, OR and NOR forms.
- **`tb_barrel_shifter`** runs both bfloat16 shifter configurations and the
  plain 4-bit, two-row shifter.
- Each remaining block has its own testbench, with random operands plus
  exhaustive or corner-case inputs.

## Simulating with Verilator

The package files must come first. For example, to run the end-to-end test:

    verilator --binary --timing -Wno-fatal \
        rtl/aqfp_pkg.sv tb/bf16_ref_pkg.sv rtl/*.sv tb/tb_aqfp_adders_top.sv \
        --top-module tb_aqfp_adders_top -Mdir obj_top
    ./obj_top/Vtb_aqfp_adders_top

Replace the testbench file and `--top-module` to run any other test. Useful
parameters:

- `ksa_maj3`/`ksa_maj5` `WIDTH` (≥ 2; the prefix tree has ceil(log2 WIDTH)
  levels; widths that are not powers of two are used for `ksa_maj5` inside
  the floating-point adder, at 10 and 12 bits);
- `aqfp_adders_top` `KSA3_WIDTH`/`KSA5_WIDTH`;
- the `P_*` phase counts of `bf16_adder`. Each must be at least the block's
  core depth (an assertion checks this at the start of simulation), and the padding only adds buffers.

The datapath has no reset, so outputs are X until `out_valid` rises. Compare
results only when `out_valid` is set.

## Departures from the published design, and what to trust

- **Latency of the integer adders.** The published chips include repeater
  buffers for long wires. With them:
  - the 16-bit majority-3 adder is quoted at 8.5 excitation cycles;
  - the 8-bit majority-5 adder at 4.25 cycles;
  - redesigned 4/8/16-bit versions at 12/16/21 phases (majority-3) and
    12/15/19 phases (majority-5).

  This RTL counts logic depth only: 8/10/12 and 5/6/7 phases. The published
  ordering is the same (majority-5 is faster, and the gap grows with width),
  but the absolute phase counts are lower.
- **Majority-3 CM placement.** The single-majority merge is used only at the
  first prefix level. There it is exact. At later levels it would compute the
  wrong carry, so those levels use the AND-OR merge.
- **Majority-5 constant.** The carry merge uses the constant input 1. With a
  constant 0, the gate would compute Gv·(Gh + Pv) instead of Gv + Pv·Gh.
- **Comparator leaf.** The 1-bit equality is XNOR(a, b), which is what
  equality requires. The merge ORs the upper half's "large" into the result.
- **Generate/propagate naming.** Generate is a·b, and propagate is a + b
  (majority-3) or a XOR b (majority-5), throughout.
- **NOR from a majority gate.** The published NOR cell inverts both inputs
  and ties the third to constant 1. That computes NOT a + NOT c, which is
  NAND. A NOR needs constant 0, and `tb_aqfp_majority_gate` checks that form.
- **Carry-in.** Both KSA modules take `cin`, folded into bit 0 as
  g0 = Maj(a0, b0, cin). The published adders have no carry-in; the top ties
  it to 0. The floating-point subtraction uses it.
- **bfloat16 adder choices.** The block order and per-block phase counts are
  the published ones. The following are this design's own choices:
  - the 12-bit significand word and the sticky bit;
  - truncation (round toward zero) instead of round-to-nearest-even;
  - flush-to-zero for exponent-0 inputs and underflow;
  - saturation to infinity on overflow;
  - exponent-255 inputs are not treated as infinity or NaN.

  The internal structure of the blocks is only partly published; where it
  is not, the blocks use the simplest AQFP-style structure that meets the
  phase count.
- **Not modelled.** The following are outside a logic model:
  - the AC excitation itself;
  - the DC-SQUID readout used on chip;
  - energy, bias current, area and Josephson-junction counts.
