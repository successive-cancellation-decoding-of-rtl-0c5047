# Polar SC decoder with a hybrid (single-adder) processing element

This is synthesizable SystemVerilog for a successive-cancellation (SC) decoder
for polar codes. It decodes a code word of N = 1024 bits from 5-bit LLRs in
N-1 = 1023 clock cycles.

The design centres on its processing element, the *new hybrid processing
element* (NHPE). A conventional merged SC processing element computes both
`c + d` and `c - d` in its g kernel and then picks one with a multiplexer. The
NHPE does not. It XORs the partial-sum bit into the sign of one operand and
uses a single adder. Because LLRs travel in sign-magnitude form, flipping one
bit negates the operand, so the subtractor and the selection multiplexer are
no longer needed. The decoder is a tree of these elements. It decides two bits
per cycle at the leaf, and it chains every g operation into the following
step, which gives the N-1 cycle latency.

## SC decoding in brief

A polar code of length N = 2^n carries a vector `u` of N bits. Some positions
are *frozen* (always 0). The others carry information (half of them at rate
1/2). The transmitted word is

    x = u · F^(⊗n) · B_N,      F = [1 0; 1 1],  B_N = bit-reversal permutation

The decoder recovers `u` one bit at a time in index order. It walks a binary
tree whose root holds the N channel LLRs. A node holding 2m LLRs
`a[0..m-1], b[0..m-1]` (upper and lower halves) works as follows:

* It computes its left child with **f**: `f(a_i, b_i) = sign(a_i)·sign(b_i)·min(|a_i|, |b_i|)`.
* After the whole left subtree is decided, it computes its right child with
  **g**: `g(a_i, b_i, v_i) = b_i + (-1)^(v_i) · a_i`. Here `v` is the *partial
  sum*, the polar encoding of the bits the left subtree decided.
* At a leaf, a bit is 0 if it is frozen or if its LLR is ≥ 0. Otherwise it
  is 1.

## The NHPE (`rtl/nhpe.sv`)

Inputs are two LLRs `c`, `d` in sign-magnitude form (sign bit, 1 = negative,
plus a 4-bit magnitude), a partial-sum bit `usum` and a mode.

* **f mode**: the sign is `sign(c) XOR sign(d)` and the magnitude is
  `min(|c|, |d|)`. Sign and magnitude are handled separately. No adder is
  used.
* **g mode**: the element computes `c + (-1)^usum · d`:

  | sign of d | usum | operation | sign given to d |
  |-----------|------|-----------|-----------------|
  | 0 (+)     | 0    | add       | 0               |
  | 1 (−)     | 0    | add       | 1               |
  | 0 (+)     | 1    | subtract  | 1               |
  | 1 (−)     | 1    | subtract  | 0               |

  Both operands are then converted to two's complement and added in one
  6-bit adder. The sum is converted back to sign-magnitude. For example, with
  `c = +3`, `d = −5`, `usum = 0` the result is −2. With `usum = 1` the sign of
  d becomes +, and the result is +8.

Two details are this design's own choices:

* A sum beyond ±15 saturates to ±15.
* A zero result always carries a + sign, so that it decides 0.

The element is combinational. The decoder pairs the operands so that the
upper-half LLR `a_i`, the one whose sign depends on the partial sum, goes to
`d`.

## The decoding tree (`rtl/polar_sc_decoder.sv`)

    channel LLRs ──B_N wiring──► llr_mem[N]
                                   │
          stage 1:  sc_stage, N/2 NHPEs ──► llr_mem[N/2]
          stage 2:  sc_stage, N/4 NHPEs ──► llr_mem[N/4]
              ...
          stage n-1: sc_stage, 2 NHPEs  ──► llr_mem[2]
          stage n:   leaf_decoder (2 bits per cycle) ──► u_hat, psg

* **Stage s** (`rtl/sc_stage.sv`) holds N/2^s NHPEs, all in the same mode in a
  given cycle. It reads the node LLRs of size 2·N/2^s and produces one child.
  The child is stored in that stage's LLR memory (`rtl/llr_mem.sv`, one
  register bank per level, read and written in parallel). The g of a stage
  rereads the same parent LLRs that the f used, which is why every level has
  its own memory.
* **The leaf** (`rtl/leaf_decoder.sv`) takes the two LLRs of a length-2 node
  and, in one cycle, runs f, makes a hard decision, feeds that bit as `usum`
  into g, and makes a second hard decision. It is built from one f-mode and
  one g-mode NHPE. After synthesis this is one f kernel and one g kernel.
* **Input permutation.** The channel LLR of code bit i belongs to position
  bitrev(i) of `u · F^(⊗n)`. The channel memory is therefore loaded through
  fixed bit-reversal wiring, and the tree works in natural order from there.
* In total there are N−2 NHPEs in the stages (1022 at N = 1024) plus the
  leaf's two.

## The N−1 cycle schedule (`rtl/sc_controller.sv`)

Two changes reduce the schedule from the 2N−2 cycles of a plain one-bit-per-cycle
SC tree:

1. **Two bits per leaf cycle.** Length-2 nodes are decided in one cycle, which
   gives 1.5N−2 cycles.
2. **Chained g.** Every g (right-child) operation runs in the same cycle as
   the step that follows it. That step is the f of the right child, or the
   leaf if the right child has length 2. The g result goes straight into the
   next stage through a forwarding multiplexer, and it is also stored in the
   stage's memory for later use. This removes one cycle per internal node of
   size ≥ 4, which gives N−1 cycles.

Each cycle is therefore one of two kinds:

* an **f step** at stage `cur` < n;
* a **leaf step** (`cur` = n) that decides bits 2j and 2j+1.

In either case, when `g_en` is set, stage `cur−1` also runs g in the same
cycle. After leaf j, the next leaf j+1 begins with a g at stage n−1−p, where p
is the number of trailing zeros of j+1. Then come f steps at stages n−p …
n−1, then the leaf. For N = 8:

| cycle | stage 1 | stage 2 | leaf (stage 3) | bits decided |
|-------|---------|---------|----------------|--------------|
| 1     | f       |         |                |              |
| 2     |         | f       |                |              |
| 3     |         |         | f→g            | u1, u2       |
| 4     |         | g ──────► | f→g          | u3, u4       |
| 5     | g ──────► | f     |                |              |
| 6     |         |         | f→g            | u5, u6       |
| 7     |         | g ──────► | f→g          | u7, u8       |

Over a frame there are N/2−1 f steps, N/2−1 chained g operations and N/2 leaf
steps, for N−1 cycles in all.

A published schedule for this architecture places the stage-1 g in cycle 4,
alongside the leaf that decides u3 and u4. That g needs u3 and u4 as partial
sums, so this design moves it to cycle 5, chained with the stage-2 f. The
cycle count is unchanged.

**Critical path.** The longest combinational path is a chained g, then the
leaf's f, hard decision and g, then the partial-sum XOR chain into its
registers. That is three kernel delays plus up to n−1 XOR levels in one
cycle. The
clock rate has not been evaluated. A faster but longer schedule would
register the g result instead of forwarding it, which gives 1.5N−2 cycles.

## Partial sums (`rtl/psg.sv`)

Each stage s keeps a register of 2^(n−s) partial-sum bits: the encoding of
the most recently completed left child at that stage.

When leaf j decides `(u0, u1)`, the unit rebuilds the encodings of the
sub-codes that just finished:

    e0 = {u1, u0^u1};   e(i+1) = {e(i), ps(stage n-1-i) ^ e(i)}

It stores `e(q)` into stage n−1−q, where q is the number of trailing ones of
j. The stored bits are used by the g at that stage in the very next cycle.
This is an XOR chain up to n−1 levels deep. It sits behind the leaf's
decisions in the same cycle, and its result is registered for the next cycle.

## Interface and timing

`polar_sc_decoder #(N = 1024)`:

| port     | dir | width     | meaning |
|----------|-----|-----------|---------|
| clk      | in  | 1         | clock |
| rst_n    | in  | 1         | synchronous active-low reset |
| start    | in  | 1         | while not busy: capture `llr_in` and `frozen`, begin a frame |
| llr_in   | in  | N × llr_t | channel LLRs, index = code bit. `llr_t` is `{sign, mag[3:0]}` from `polar_pkg` |
| frozen   | in  | N         | 1 = frozen position of u (index = bit of u) |
| busy     | out | 1         | high for exactly N−1 decoding cycles |
| done     | out | 1         | one-cycle pulse after the last decision; `u_hat` is valid |
| u_hat    | out | N         | decoded u. Held until the next start, which clears it |

Timing per frame:

* Cycle 0 is the `start` cycle, in which the LLRs are loaded.
* Cycles 1 … N−1 decode (`busy`).
* `done` is high in the next cycle. A new `start` may be given in that same
  cycle, so frames can follow every N cycles.

At N = 1024 one frame therefore takes 1024 cycles. It yields 1024 code bits,
of which 512 are information bits at rate 1/2.

The frozen set is an input because the construction used to choose it is not
part of this design. Any set works. The testbenches use a Bhattacharyya-bound
construction.

## Parameters and size

* `N` (a power of two, ≥ 4) is the code length. Each N needs its own build;
  the decoder does not switch lengths at run time.
* `polar_pkg::Q` (5) is the LLR width, sign included.

At N = 1024, coarse synthesis gives about 23.8k word-level cells and 13.3k
flip-flop bits:

* channel memory: 5120 bits
* stage memories: 5110 bits
* partial sums: 1022 bits
* frozen mask and u_hat: 2048 bits
* controller: a few bits

## Where this design departs from, or adds to, the architecture it implements

* **Schedule.** The stage-1 g runs one cycle later than in the published N = 8
  table (see above). The cycle count matches (N−1).
* **Operand orientation of g.** One form of the g equation puts the sign change
  on `c`. The NHPE truth table puts it on `d`. This design follows the truth
  table and wires operands to match. The arithmetic is the same.
* **Own choices.** The following are this design's own:
  * saturation of the g sum;
  * positive zero;
  * parallel loading of all LLRs in one cycle;
  * the start/busy/done handshake;
  * synchronous reset;
  * the frozen set as an input;
  * the register-per-level memory and the partial-sum register organisation.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_nhpe` | all 4096 combinations of inputs, usum and mode against integer f/g; the two worked examples |
| `tb_leaf_decoder` | all LLR pairs × frozen patterns against integer arithmetic |
| `tb_sc_stage` | random nodes in both modes, P = 8 |
| `tb_llr_mem` | reset, write, hold |
| `tb_psg` | after each leaf, the finished stage holds the butterfly encoding of its bits (N = 16) |
| `tb_sc_controller` | the exact 7-cycle N = 8 schedule; for N = 1024, 1023 busy cycles, 511 f, 511 chained g and 512 leaf steps in order, a one-cycle `done`, and `start` ignored while busy |
| `tb_polar_sc_decoder` | N = 64, 40 frames (see below) |
| `tb_polar_sc_decoder_full` | the same test at the default N = 1024, with 16 frames |
| `tb_polar_workloads` | the same test for N = 8, 64, 128, 256 and 512, one decoder per length, side by side |

The end-to-end testbenches share a frame generator and checker,
`tb/polar_frame_checker.sv`. It builds each frame as follows:

* choose random information bits;
* encode them with eq. x = u·F^(⊗n)·B_N (butterflies);
* map to BPSK and add Gaussian noise (none for the first quarter of the
  frames);
* quantize to saturated 5-bit LLRs.

It then checks that:

* noise-free frames decode to exactly `u`;
* every frame matches, bit for bit, a separate behavioural SC decoder in the
  testbench with the same quantized arithmetic;
* `busy` lasts N−1 cycles.

It also counts how often each mechanism occurs, and fails if one never does.
The events are tapped from inside the decoder:

* plain f steps;
* g chained into f;
* g chained into the leaf;
* g with a partial sum of 1;
* a frozen bit forced to 0 against a negative LLR;
* decoded ones.

What is not verified: error-rate performance beyond the agreement with the
behavioural model, the clock rate, and area or power.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module tb_polar_sc_decoder \
        -y rtl -y tb +libext+.sv -Irtl rtl/polar_pkg.sv tb/tb_polar_sc_decoder.sv -o sim
    ./obj_dir/sim

Replace the top module and file to run any other testbench. The full-size
test (`tb_polar_sc_decoder_full`) takes about ten seconds to build and well
under a second to run. To try another code length, change `N` in
`tb_polar_sc_decoder.sv`. The testbench derives everything else from it.

## Files

* `rtl/polar_pkg.sv`: LLR type, PE mode, hard decision, bit reversal
* `rtl/nhpe.sv`: hybrid processing element
* `rtl/sc_stage.sv`: one stage of NHPEs
* `rtl/llr_mem.sv`: per-level LLR register bank
* `rtl/leaf_decoder.sv`: two-bit last stage
* `rtl/psg.sv`: partial sum generator
* `rtl/sc_controller.sv`: N−1 cycle schedule
* `rtl/polar_sc_decoder.sv`: top level
* `tb/*.sv`: testbenches as listed above
