# Cube-connected-cycles processor array

A k-dimensional binary cube is the natural machine for a large family of parallel
algorithms. Bitonic merge and sort, the radix-2 FFT and many data permutations all combine
operands whose addresses differ in one bit, one bit position after another. A cube of 2^k
processors needs k links per processor, which does not scale on silicon. The
cube-connected-cycles (CCC) array keeps three links per processor and still runs such an
algorithm in O(log n) steps. Each corner of a (k−r)-cube is replaced by a ring ("cycle") of
2^r processors, and each processor of a ring looks after one cube dimension. Operands
circulate around the rings, and each one visits, in turn, the processor that can reach
across the dimension it needs next.

This repository holds synthesizable SystemVerilog for such an array. It is built from
identical processing modules, each with a small program that reproduces the cube
algorithm, and includes testbenches that run bitonic merge, bitonic sort and a
number-theoretic FFT on it.

## The network

There are n = 2^K modules. The address of a module is m = l·2^R + p: l is the cycle number
(K−R bits) and p the position in the cycle (R bits). The default is K = 6, R = 2: 16 cycles
of 4 modules, 64 modules in all. The sizes are chosen so that K = R + 2^R, which gives every
position exactly one cube dimension. Each module has three ports:

| port | linked to | used for |
|---|---|---|
| F (forward)  | B of (l, p+1 mod 2^R) | backward shift of the cycle, exchanges inside the cycle |
| B (backward) | F of (l, p−1 mod 2^R) | exchanges inside the cycle |
| L (lateral)  | L of (l xor 2^p, p)   | the cube dimension R+p ("sheaf p") |

```
K = 3, R = 1: four cycles of two modules
  cycle l : (l,0) = (l,1)                  F/B ring of two
  sheaf 0 : (0,0)-(1,0)   (2,0)-(3,0)      l xor 1, position 0
  sheaf 1 : (0,1)-(2,1)   (1,1)-(3,1)      l xor 2, position 1
```

With K = R + 2^R there are 3·2^(K−1) links. A link is two one-operand buses, one in each
direction, so a neighbour pair swaps operands in a single clock. When K < R + 2^R, positions
p ≥ K−R have no lateral link: their L input is tied to zero and they sit out the lateral
steps. Any R ≤ K ≤ R + 2^R is accepted. With K = R the array is a single cycle.

## What one pass computes

A pass is one DESCEND algorithm over all N = 2^(K+Q) operands:

```
for j = K+Q-1 down to 0:
    for every address a with bit j of a = 0:
        (T[a], T[a + 2^j]) <- OPER(a, j; T[a], T[a + 2^j])
```

With `cfg.ascend = 1` the pass is an ASCEND algorithm instead: the same loop with j
running from 0 up to K+Q−1. It takes the same number of clocks.

Operand a lives in module a / 2^Q, word a mod 2^Q, before and after the pass. Q is the
private-RAM size described below; with Q = 0 each module holds one operand. OPER is chosen
by `cfg` (`ccc_pkg::cfg_t`):

* `op = OP_CMPX`: oriented compare-exchange. The pair is put in ascending order when bit
  `obit` of a is 0 (or `obit` ≥ K+Q), and in descending order otherwise.
* `op = OP_BFLY`: radix-2 butterfly (U, V) ← (U + αV, U − αV), computed modulo 65537.
  The root power α depends on `ascend` (see FFT below). With `inv = 1` it is replaced by
  α^−1, for the inverse transform.
* `op = OP_SHFT`: the exchange of a cyclic shift by 2^`obit` (see below).
* `op = OP_NOP`: operands are only moved. The data ends where it started.
* `jmax`: OPER acts only on dimensions j ≤ jmax. Higher dimensions are passed through.

Algorithms built from these:

* **Bitonic merge**: one pass with `OP_CMPX`, `jmax = K+Q−1`, `obit = K+Q`. A bitonic
  input comes out sorted.
* **Bitonic sort**: K+Q passes. Stage s = 0 … K+Q−1 uses `jmax = s` and `obit = s+1`, so
  the blocks of 2^(s+1) are merged up and down alternately, and the last stage merges
  everything upwards.
* **FFT**: one pass with `OP_BFLY`, in either of two forms. Here ω is a primitive
  2^(K+Q)-th root of unity and the transform is A_x = Σ a_i ω^(ix).
  * ASCEND (`ascend = 1`): load a_i at word rev(i), the bit-reversed order. Step j uses
    α = ω^((a mod 2^j)·2^(K+Q−1−j)). A_x comes out at word x, in natural order.
  * Dual DESCEND (`ascend = 0`): load the input in natural order. Step j uses
    α = ω^((rev(a) mod 2^j')·2^j) with j' = K+Q−1−j. A_x comes out at word rev(x).

  The array does not perform the bit reversal itself. The two forms combine well in a
  cyclic convolution: forward DESCEND transforms of both sequences leave them in
  bit-reversed order, which is exactly the input order of an inverse (`inv = 1`) ASCEND
  transform. So no reordering is needed. The pointwise products between the passes and
  the final scaling by 1/2^(K+Q) are done outside the array. The inverse roots come from
  a second constant table, of powers of ω^−1.

  The arithmetic is modulo the prime 65537, which gives exact results and roots of unity
  for up to 2^16 points. Both root tables are constants computed at elaboration. Inputs
  must be below 65537.
* **Cyclic shift**: one pass with `OP_SHFT` moves operand x to x + 2^`obit`, modulo the
  block size 2^(`jmax`+1) (the whole array when `jmax` = K+Q−1). Adding 2^obit to x flips
  address bit j exactly when the carry reaches it, that is when bits obit … j−1 of x are
  all 1. Both operands of a pair carry together, so the OPER swaps them under that
  condition. In a DESCEND pass the low bits are still the original ones, so the test is
  "all 1". In an ASCEND pass they have already been incremented, so the test is "all 0".

## The schedule: how a ring emulates the cube

This is the part of the design worth reading carefully. Every module runs the same kind of
program. It counts time steps after `start` and, from its own (l, p) and the step number,
decides whether to idle, take a neighbour's operand, or swap with a neighbour and apply
OPER. No global controller tells a module what to do. `ccc_pkg::decode_step` is the single
definition of that program. Each `ccc_ctrl` tabulates it for its own address at elaboration,
so in hardware it is a 20-entry constant table indexed by a step counter.

**High dimensions (the cube part), 4·2^R steps.** The loop index i runs from 2^R−1 down to
−2^R. Each value of i takes two steps:

1. An OPER step. Every position p with max(i,0) ≤ p < min(2^R, 2^R+i) and p < K−R swaps
   operands with its lateral partner and applies OPER on dimension R+p. Both ends compute
   the same OPER, and each keeps the half that belongs to its own side (bit p of l).
2. A backward cyclic shift (BSHIFT): every module takes the operand arriving on F.

After s shifts, position p holds the operand whose low R address bits are (p+s) mod 2^R.
At index i that is (p−i−1) mod 2^R. The window on p makes each operand pass the
positions 2^R−1, …, 0 in that order while it is inside the window. So it meets the cube
dimensions from the highest down, as DESCEND requires, and different operands are served
in an overlapped (pipelined) way. After 2^(R+1) shifts every operand is back at its home
position.

**Low dimensions (inside the cycle), 2^(R+1)−R−2 steps.** Dimensions 0 … R−1 have no links
of their own. They are emulated on the ring with exchanges between neighbours (LOOPOPER):

* UNSHUFFLE(i) applies the perfect unshuffle to each block of 2^(i+1) positions, using
  2^i − 1 exchange steps. At step b = 2^i … 2, the pairs (m−1, m) with
  m = (2s+1)·2^i + d, |d| < b and d ≡ b (mod 2) swap over their F/B link.
* The bit-reversal permutation of the cycle is UNSHUFFLE(R−1), …, UNSHUFFLE(1).
* Then, for j = R−1 down to 0: one OPER step between positions 2t and 2t+1, followed by
  UNSHUFFLE(j). Before UNSHUFFLE(j), position q holds the operand whose address is q with
  its low j+1 bits reversed. The pair (2t, 2t+1) therefore differs exactly in address bit
  j, and after UNSHUFFLE(0) the order is natural again.

For R = 3 the cycle goes through 0 4 2 6 1 5 3 7 after the bit reversal, then
0 2 1 3 4 6 5 7 after UNSHUFFLE(2), then back to 0 … 7. The cycle testbench checks these
arrangements.

**Private RAM (Q > 0).** If there are more operands than modules, each module holds
2^Q of them. Every step above is then repeated for words 0 … 2^Q−1, one word per clock, and
cube dimension d becomes address bit d+Q. The pass ends with a LOCAL phase: for
j = Q−1 … 0 and i = 0 … 2^Q−1, OPER on words i and i+2^j when bit j of i is 0. This phase
needs no links. It takes Q·2^Q clocks, including the clocks with nothing to do.

**Pass length** (`busy` high), one time unit per clock:

| K, R, Q | operands | steps (high + low) | clocks |
|---|---|---|---|
| 6, 2, 0 (default) | 64 | 16 + 4 | 20 |
| 3, 1, 0 | 8 | 8 + 1 | 9 |
| 3, 3, 0 (one cycle) | 8 | 32 + 11 | 43 |
| 5, 2, 1 | 64 | 16 + 4 | 20·2 + 1·2 = 42 |

In general: clocks = (4·2^R + 2^(R+1) − R − 2)·2^Q + Q·2^Q.

**ASCEND.** An ASCEND pass plays the same program backwards in time. The LOCAL phase runs
first, with j going up. Then comes LOOPOPER in reverse; every unshuffle exchange is a swap,
so it undoes itself. The cube part runs last, with forward shifts (take the operand
arriving on B) in place of the backward shifts. Each operand then meets dimensions
0 … K+Q−1 in that order.

## Modules

* `ccc_pkg`: types (`cfg_t`, `op_e`, `act_e`, `step_t`), the modulus, and the schedule
  functions `decode_step`, `swap_role`, `revlow` and `ccc_steps`.
* `ccc_oper`: the combinational OPER unit. The modular product is reduced using
  2^16 ≡ −1 (mod 65537), so no divider is needed.
* `ccc_ctrl`: the program of one module. It holds the step counter, the per-module action
  table and the LOCAL sequencer. It outputs the action, the dimension j and the address of
  the operand in hand.
* `ccc_module`: a register file of 2^Q words, ports F/B/L, a `ccc_ctrl` and a `ccc_oper`.
  Whether the module holds U or V of the pair is bit j of its operand's address. This bit
  also selects the partner inside the cycle: F for U, B for V.
* `ccc_cycle`: 2^R modules in a ring.
* `ccc_top`: 2^(K−R) cycles joined across the lateral sheaves.

## Interface of `ccc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the step counters |
| `load_en` | in | 1 | while idle, writes `data_in` into every module in one clock |
| `data_in` | in | W × 2^(K+Q) | operand a at index a |
| `start` | in | 1 | one-clock pulse while idle: begin a pass |
| `cfg` | in | `cfg_t` | pass order (`ascend`) and OPER selection (`op`, `jmax`, `obit`, `inv`); hold it stable during the pass |
| `busy` | out | 1 | high during the pass |
| `done` | out | 1 | one-clock pulse after the last step |
| `data_out` | out | W × 2^(K+Q) | operands, valid while idle |

Parameters: `K` = 6, `R` = 2, `Q` = 0, `W` = 17. The operand storage is not reset. Load it
before the first pass.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with plain Verilator, for
example (the testbenches have width warnings, hence `-Wno-fatal`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ccc_pkg.sv \
          tb/tb_ccc_ref_pkg.sv tb/tb_ccc_top_full.sv --top-module tb_ccc_top_full
./obj_dir/Vtb_ccc_top_full
```

* `tb_ccc_ref_pkg`: a reference model independent of the RTL schedule. It has a flat
  DESCEND and ASCEND, the three OPERs, a direct rotation, a direct O(N²) DFT modulo 65537 and bit reversal.
* `tb_ccc_oper`: worked cases plus 3000 random OPERs against the reference, in both
  butterfly forms.
* `tb_ccc_ctrl`: all 32 controllers of a K=5, R=2, Q=1 array. The testbench moves address
  tags as the actions dictate and checks, clock by clock, that:
  * each module reports the operand it really holds,
  * each partner acts on the operand that differs only in bit j,
  * every operand meets each dimension once and returns home. A DESCEND pass must go from
    the highest dimension down, and an ASCEND pass from dimension 0 up.
* `tb_ccc_module`: two modules with 4-word RAMs (K=R=1, Q=2). It covers random DESCEND and
  ASCEND passes, an FFT against the DFT and a bitonic sort.
* `tb_ccc_cycle`: one cycle of 8. It checks the intermediate arrangements above, an FFT,
  a sort and random passes in both orders.
* `tb_ccc_fig5`: the K=3, R=1 array. It compares the operand pairs combined at every step
  with a hand-worked trace: {1-5, 3-7}, then {1-3, 5-7, 0-4, 2-6}, then {0-2, 4-6}, then
  the pairs inside the cycles.
* `tb_ccc_top`: the end-to-end test at K=5, R=2, Q=1, which has a position without a sheaf
  and runs the LOCAL phase. It covers merge, a 6-stage sort, the FFT in both
  forms, a cyclic convolution (two forward FFTs and one inverse) checked against a direct
  convolution, cyclic shifts checked against a direct rotation, and random passes in both
  orders. It
  checks the pass length and that every mechanism occurred at least once: lateral OPER,
  backward shift, forward shift, unshuffle exchange, cycle OPER, LOCAL, idle position without a sheaf, masked
  dimensions, and both sort directions.
* `tb_ccc_top_full`: the same workloads on the default 64-module array, with no parameter
  overrides.

## Departures and limits

* The array is synchronous, with one time unit per clock. An exchange and an OPER fit in
  the same clock. Links that synchronise themselves asynchronously are an equally valid
  reading of the architecture, but are not built.
* Operand addresses inside the schedule come from the shift count and the unshuffle
  structure above, and the lateral partner of (l, p) is (l xor 2^p, p). For the FFT, the
  root power of ASCEND step j is ω^((m mod 2^j)·2^(k−1−j)), matching A_j = U_j + ω^j V_j.
* The compare-exchange direction bit `obit` and the dimension limit `jmax` are this
  design's additions. They let one pass be one stage of a bitonic sort.
* The cyclic-shift OPER and the ASCEND schedule (the DESCEND program played backwards)
  are this design's own. The architecture supports both, but the exact OPER and the
  ASCEND program had to be worked out.
* Root powers come from constant tables rather than being computed at run time by
  repeated squaring. The FFT works in the integers modulo 65537 rather than over complex
  numbers.
* Operands are loaded and read in parallel through the top-level ports. This I/O scheme is
  this design's own.
* Not built:
  * data-rearrangement OPERs other than the cyclic shift: shuffle, permutations routed like a Benes
    network, matrix transpose;
  * convolution inside the array: the forward and inverse transforms run on it, but
    the pointwise products and the 1/N scaling do not, and symmetric functions
    (recursive convolutions) are not provided;
  * matrix products;
  * the generalised array with cycles of h > s modules, only s of which have lateral
    links;
  * the physical two-layer layout.
