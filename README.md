# Mersenne-modulo shadow datapaths: a self-checking multiply-accumulate unit

A datapath can check its own arithmetic cheaply if it repeats the arithmetic on
compressed copies of its operands. Here the compression is the residue modulo a
Mersenne number M = 2^N − 1 (3, 7, 15, …). Residues add and multiply like the
full values: (x + y) mod M and (x · y) mod M can be computed from x mod M and
y mod M alone. So next to a 32-bit multiply-accumulate (MAC) unit sits an
N-bit *shadow* MAC working on residues. After each operation, the residue of
the real result is compared with the shadow's prediction. A mismatch raises
`err`.

The shadow costs a few N-bit adders and multipliers, plus *reducers* that turn
wide vectors into residues. The interesting hardware is in those reducers and
in the checker.

This RTL contains:

- the residue functional units: reducer, adder, subtractor, multiplier and zero
  comparator;
- a single-cycle self-checking MAC built from them;
- a pipelined variant whose checker runs behind the main datapath;
- a top level, `msd_top`, that holds both MACs side by side.

Everything is synthesizable SystemVerilog-2017 with parameterized widths.

## Why Mersenne moduli

Since 2^N = M + 1, we have 2^N ≡ 1 (mod M). The weight of bit *i* of any
vector is therefore 2^(i mod N) modulo M. Every wide vector folds onto just N
*columns*. A carry out of column N−1 has weight 2^N ≡ 1, so it wraps around into
column 0. Every unit below is an ordinary binary structure with this single
change: carries out of the top column wrap around. No unit ever computes a
division or a correction step.

Two consequences hold everywhere in this design:

- **Residues are not normalized.** An N-bit value of all ones equals M, which is
  0 mod M. So zero has two encodings, `0…0` and `1…1`. Units accept either, and
  may return either.
- **Negation is bitwise NOT.** For an N-bit x, ~x = M − x ≡ −x. Subtraction is
  therefore addition of the complement, and the checker subtracts at no cost.

## The reducer (`mod_reduce`)

`mod_reduce #(N, WIN)` maps a WIN-bit input to its residue. It works like a
Wallace tree, except that every column folds onto one of N columns:

1. Input bit *i* goes into column *i mod N*. At the defaults (WIN = 32, N = 3)
   the three columns hold 11, 11 and 10 bits.
2. Each stage takes every column that holds three or more bits. It feeds each
   group of three bits into a `full_adder`:
   - the sum bit stays in the column;
   - the carry bit moves to the next column, and the top column's carry goes
     to column 0.
   Leftover bits (one or two) pass through unchanged.
3. Stages repeat until no column holds more than two bits. The remaining 2N
   bits are the carry-save result `cs_a + cs_b ≡ in (mod M)`.
4. One end-around-carry adder (`mod_add`) combines them into the N-bit residue
   `res`.

Every full adder removes exactly one bit. The adder count is therefore about
WIN − 2N, fixed by the input width and almost independent of N. This is why
wider moduli stay cheap.

The stage count and the bit layout of every stage are computed at elaboration
by constant functions in the module:

- `cnt_at(s, c)` is the number of bits in column c at stage s.
- `off_at(s, c)` is the bit offset of column c at stage s.
- `num_stages()` is the number of stages.

Within a column at stage s+1 the bits are laid out in this order: the sums of
the column's own adders, the bits passed through, then the carries that arrive
from the previous column. The generate loop `g_st[s]` holds one vector `v` per
stage, and `g_st[0].v` is the input sorted into columns. When you change the
tree, keep these three functions in step with the instance wiring.

The reducer serves three roles:

- it turns operands into residues;
- it sums partial products inside `mod_mul`;
- it works as the checker's summation block (see below).

## Adder, subtractor, multiplier

- **`mod_add`** adds two N-bit values with an end-around carry. Drawn at gate
  level, this is a ring of full adders: the carry-out feeds the carry-in. That
  ring is a combinational loop, so the RTL adds the carry-out in a second
  addition instead. `a + b ≤ 2^(N+1) − 2`, so the second addition never
  carries. The result is the same function with no loop.
- **`mod_sub`** computes `a + ~b` with the adder.
- **`mod_mul`** is an array multiplier with wraparound. Partial product row j,
  `a & {N{b[j]}}`, is shifted left by j. The bits that leave the top re-enter at
  the bottom, so the row is *rotated* by j. The N×N partial-product bits are
  already in their residue columns, and one `mod_reduce` sums them.

## The checker: summation and zero test

The MAC must check that `acc_new ≡ acc_old + a·b (mod M)`. A plain design
would:

1. reduce `acc_new` to N bits;
2. subtract the shadow prediction;
3. normalize the difference;
4. compare it with zero.

This design merges these steps:

- **The reducer doubles as the summation block.** Its input is the new
  accumulator bits, the main adder's carry-out, and the *complement* of the
  shadow prediction, placed at a bit position that is a multiple of N. Their
  sum is `acc_new − prediction (mod M)`, computed by the same full-adder tree.
  The complement is the negation, so no subtractor is needed.
- **Reduction stops at 2N bits.** The final `mod_add` is not used. The
  carry-save pair (u, v) goes straight to `mod_zero_cmp`.
- **The zero test handles non-normalized input.** u and v each lie in
  [0, M], so u + v lies in [0, 2M]. The sum is ≡ 0 exactly when it equals 0,
  M or 2M. That is true when u and v are both zero, both all ones, or bitwise
  complements of each other (`&(u ^ v)`). There is no carry chain.

**What is detected.** Any error that changes the accumulator by an amount that
is not a multiple of M raises `err`, whether it comes from the main or the
shadow side. In particular, any single flipped bit anywhere in a vector is
detected, because 2^k is never ≡ 0 mod M. An error that happens to be a
multiple of M escapes. Larger N makes such errors rarer and costs more shadow
area.

## Self-checking MAC (`mac_sc`)

```
main:     a, b ──► [ a×b ] ──► [ acc + ] ──► sum ──► acc register
                                   └──► carry-out c

shadow:   a ─► mod_reduce ─► a' ┐
          b ─► mod_reduce ─► b' ┴► mod_mul ─► mod_add(shadow_res, ·) ─► pred
          pred (minus 2^ACC_W mod M when c) ─► shadow_res register

check:    { ~pred, c, sum } ─► mod_reduce (stops at 2N bits) ─► (u, v)
          (u, v) ─► mod_zero_cmp ─► not zero ─► err register
```

- **Main datapath:** 32×32-bit unsigned multiply into a 64-bit accumulator,
  one operation per cycle.
- **Shadow datapath:** `shadow_res ← shadow_res + a'·b' (mod M)`, where
  a' and b' are the operand residues.
- **Overflow.** The accumulator wraps when its sum exceeds 2^ACC_W. The
  carry-out c enters the checker reducer at bit ACC_W, so the check compares
  the *unwrapped* sum. When c is set, the shadow accumulator subtracts the
  residue of 2^ACC_W (a constant one-hot N-bit value). This keeps the shadow
  in step with the wrapped register. If c is itself wrong, the two sides
  disagree and the error is caught.
- **Shadow state.** The shadow keeps its own residue register instead of
  reducing the main accumulator each cycle. A flip in the main accumulator's
  flip-flops therefore shows up at the next operation.

**Ports and timing.** `mac_sc` has these ports: `clk`, `rst_n` (asynchronous,
active low), `en`, `clr`, `a[W]`, `b[W]`, `acc[ACC_W]`, `shadow_res[N]`, `err`.

- When `en` is high at a rising edge, `acc` takes the new value at that edge.
- `err` is registered at the same edge and is high for one cycle when that
  operation failed its check.
- `clr` has priority over `en`. It zeroes both accumulators and `err`.

## Pipelined MAC (`mac_sc_pipe`)

In the single-cycle MAC the checker adds delay after the main adder. The
pipelined variant leaves the main MAC untouched, so it runs at the clock period
of an unchecked MAC. The shadow datapath and checker are spread over registers
instead:

| edge | main datapath                 | shadow / checker                                                                                   |
|------|-------------------------------|----------------------------------------------------------------------------------------------------|
| e0   | `acc` ← acc + a·b, carry kept | a', b' reduced and registered                                                                      |
| e1   | (next operation)              | shadow accumulator updated; reducer sums the registered `acc`, carry and ~prediction; (u, v) registered |
| e2   | (next operation)              | `err` ← not zero(u, v)                                                                             |

`err` reports the operation issued two edges earlier. Operations can be issued
back to back, one per cycle. Stage 2 reads `acc` from its register, so the
check also covers the accumulator flip-flops for one cycle.

The shadow accumulator is stored complemented (`nshadow_q`). This folds an
inversion into the register, in the way a flip-flop with an inverted output
would. `shadow_res` is its complement.

`clr` clears `acc` at once and the shadow accumulator one edge later, in step
with the pipeline. After an error is flagged, recovery is up to the
surrounding system: restart, flush or roll back, then `clr`.

## Top level (`msd_top`)

`msd_top` instantiates `mac_sc` (ports prefixed `s_`) and `mac_sc_pipe` (ports
prefixed `p_`). The two share `clk` and `rst_n` and are otherwise independent.
Its parameters are passed down to both MACs.

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 32      | operand width of the main datapath |
| `ACC_W`   | 64      | accumulator width; must be at least 2·W |
| `N`       | 3       | residue width; checks are modulo 2^N − 1 (3 → mod 7) |

N may range over the 2- to 8-bit checksums the scheme targets. N = 2 (mod 3),
N = 4 (mod 15) and N = 8 (mod 255) are tested besides the default. The
defaults live in `msd_pkg` (`MSD_W`, `MSD_ACC_W`, `MSD_N`).

## Where this RTL departs from, or goes beyond, the original scheme

- **Residue width.** Mod 3, mod 7 and mod 15 are all evaluated as equals in
  the scheme. The default of mod 7 is this design's choice.
- **Accumulator width, signedness and overflow.** Unsigned operands, a
  full-width 64-bit accumulator, and the carry-out correction of the shadow
  accumulator are this design's own choices.
- **Clear and reset.** The `clr` input and the asynchronous reset are this
  design's own.
- **End-around adder without a loop.** `mod_add` is written without the
  combinational loop of a ripple ring, as described above.
- **Pipeline stages.** The exact split into pipeline stages, and the reading of
  "inverters baked into flip-flops" as a complemented shadow register, are
  this design's interpretation. The 2-cycle error latency and the untouched
  main MAC are as specified.
- **Not built: linear algebra.** Self-checking linear-algebra primitives built
  on these MACs are part of the scheme, but they are not specified in enough
  detail to build.
- **Not in RTL: gate-level measures.** Gate sizing ("1×" gates in the shadow),
  retiming, and the gate-level single-event-transient reliability study are
  not expressible in RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and stops on a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder` | all 8 input combinations |
| `tb_mod_add`, `tb_mod_sub`, `tb_mod_mul`, `tb_mod_zero_cmp` | exhaustive, for several N, against integer arithmetic mod 2^N − 1; `tb_mod_add` also requires the all-ones encoding of zero to occur |
| `tb_mod_reduce` | random and corner inputs, for 32 bits with N = 2, 3, 4, for 64 bits with N = 3, and for 71 bits with N = 5, against `%` |
| `tb_mac_sc`, `tb_mac_sc_pipe` | see below |
| `tb_msd_top` | both MACs at default parameters, cycle by cycle |
| `tb_mac_bases` | both MACs with N = 2, 4, 8, using the helper `mac_lane_check` |

The MAC testbenches (`tb_mac_sc`, `tb_mac_sc_pipe`) run thousands of random
operations against a reference accumulator. For each one they check:

- `acc`;
- `shadow_res mod M`;
- `err`, at its exact latency.

They also `force` a one-cycle bit flip onto the main adder output or the
shadow multiplier output, and require `err` at the right edge.

They count every mechanism and fail if one never occurs:

- accumulator wraparound;
- clear;
- shadow zero encoded as all ones;
- back-to-back issue;
- detection on each side.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/msd_pkg.sv tb/tb_msd_top.sv \
          --top-module tb_msd_top -Mdir obj -o sim && obj/sim
```

Replace `tb_msd_top` with any other testbench name. `tb/` is needed on the
include path only for `tb_mac_bases`. The top-level test runs at full default
size in a few seconds.
