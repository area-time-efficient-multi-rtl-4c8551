# Multi-moduli adders for RNS channels: 2^n, 2^n − 1 and diminished-1 2^n + 1

A residue number system (RNS) processor often uses the moduli set
{2^n − 1, 2^n, 2^n + 1}. Reconfigurable or fault-tolerant RNS hardware wants one
adder that serves any of the three channels. A simple way to get one is to build an
integer adder and add one more prefix level that folds a selected carry back in. The
carry would come through a 3:1 multiplexer choosing 0, the carry out, or the inverted
carry out. That costs an extra prefix level, and the multiplexer's output has a fan-out
of n on the critical path.

The two adders here avoid both. They start from a **modulo 2^n − 1 parallel-prefix
adder**, which recirculates the end-around carry inside its log2 n prefix levels. Two
changes are made to it:

1. **Modulo 2^n.** Only the prefix nodes whose lower input wraps round from the top of
   the word see a fed-back carry. Each such node gets one extra AND input, the control
   bit `nm`. With `nm = 0` the fed-back generate is dropped, and the same tree then
   yields plain modulo 2^n carries.
2. **Diminished-1 modulo 2^n + 1.** Call the modulo 2^n + 1 carry of bit i `c+_i`
   and the modulo 2^n − 1 carry `c−_i`. For the diminished-1 form the two are related
   by `c+_i = c−_i XOR D_{i:0}`, where `D_{i:0} = h_i · h_{i−1} · … · h_0` is the AND
   of the half-sum bits (`D_{−1:0} = 1`). A small AND prefix tree computes the D bits.
   It settles well before the carries. The correction is therefore applied to the
   half-sum, not to the carry:

       s_i = (h_i XOR (dim · D_{i−1:0})) XOR c_{i−1}

   The late carry meets only the last XOR.

Two architectures use this idea:

* **FPP** (`mm_adder_fpp`) is a full parallel-prefix adder, a cyclic Kogge-Stone
  tree. It is the fastest.
* **SPP** (`mm_adder_spp`) is a sparse-4 tree that only computes every fourth carry. It
  finishes with carry-select blocks and is the smallest.

Both are purely combinational.

## Modes

| `nm` | `dim` | operation                                  | operands and sum        |
|------|-------|--------------------------------------------|-------------------------|
| 0    | 0     | (a + b) mod 2^n                            | plain binary            |
| 1    | 0     | (a + b) mod (2^n − 1), end-around carry    | plain binary            |
| 1    | 1     | (A + B) mod (2^n + 1)                      | diminished-1: value − 1 |
| 0    | 1     | not defined                                | —                       |

Exact bit-level behaviour, checked against integer arithmetic in the testbenches:

* **mod 2^n:** `s = (a + b) mod 2^n`.
* **mod 2^n − 1:** `s = (a + b + cout) mod 2^n`.
  * `cout` is the carry out of the plain n-bit sum.
  * If `a + b = 2^n − 1`, the result is all ones, the second code for zero. It is not
    folded to all zeros.
  * All-ones operands are accepted as zero.
* **diminished-1:** `s = (a + b + NOT cout) mod 2^n`.
  * This is the standard diminished-1 sum of two non-zero operands.
  * Zero has no n-bit diminished-1 code. Detecting a zero operand and bypassing the
    adder is left to the surrounding logic, as usual for this representation.
  * If the true sum is zero (A + B = 2^n + 1), the output is all zeros, the same as
    the reference formula gives.

The undefined combination `nm = 0, dim = 1` gives the modulo 2^n carries with the
diminished-1 half-sum correction. That is meaningless, so do not use it.

## The prefix trees

Signals: `g_i = a_i · b_i` and `h_i = a_i XOR b_i`. The half-sum `h` is also the
propagate bit (an exclusive-OR adder). This saves an OR gate per bit. It also lets the
ANDs of the D tree be the same functions as the tree's group propagates. Prefix nodes
compute `(g, p) ∘ (g', p') = (g + p·g', p·p')`, where `(g, p)` is the more
significant group.

### FPP: cyclic Kogge-Stone

For n = 2^L there are L levels. At level l, bit i combines with bit
`(i − 2^(l−1)) mod n`. After level L, the generate at bit i covers n bits cyclically,
ending at i. That is the modulo 2^n − 1 carry `c_i`.

The nodes with `i < 2^(l−1)` take their lower input from the top of the word. These
are the modified nodes (`mm_prefix_op_fpp`):

    gn = g + p · g' · nm        pn = p · p'

For n = 16 the modified nodes are:

| level | modified bits |
|-------|---------------|
| 1     | 0             |
| 2     | 1–0           |
| 3     | 3–0           |
| 4     | 7–0           |

That is 15 of the 64 nodes.

The propagate output is left unmodified. With `nm = 0` a wrapped propagate only ever
feeds nodes whose generate is gated in turn, so it never reaches a carry.

The carry into bit 0 is `nm · c_{n−1}`, one AND gate. It is zero in modulo 2^n mode.

### SPP: sparse-4 with carry-select blocks

1. The first two levels build each 4-bit block's group pair with a small binary tree:
   bits 1, 3, 5, … first, then bits 3, 7, 11, ….
2. The remaining `log2(n/4)` levels are a cyclic Kogge-Stone over the block pairs. At
   level m, block j combines with block `(j − 2^(m−1)) mod (n/4)`. Blocks with
   `j < 2^(m−1)` use the SPP modified node (`mm_prefix_op_spp`).

For n = 16 the modified nodes are block 0 (bit 3) at level 3, and blocks 1 and 0
(bits 7 and 3) at level 4.

The SPP modified node also gates the propagate:

    gn = g + p · g' · nm        pn = p · (p' + NOT nm)

With `nm = 0` the node passes `(g, p)` through unchanged. The extra OR adds area but
no logic level.

After the last level, block j's generate is the carry out of its top bit:

* Block j > 0 receives the carry of block j − 1.
* Block 0 receives `nm ·` (carry of the top block).

The total is log2 n prefix levels, as in FPP, but with far fewer nodes.

**Modified carry-select block** (`mm_csb`, W = 4 bits). Each block works in this order:

1. It complements every half-sum bit, when `dim` is set, with the D bit of the position
   below: `hd_k = h_k XOR (dim · D_{i+k−1:0})`.
2. It ripples the in-block group pairs `(G_k, P_k)`.
3. For each bit it forms two candidate sums:
   * `hd_{k+1} XOR G_k`, used when the block's carry-in is 0;
   * `hd_{k+1} XOR (G_k + P_k)`, used when the carry-in is 1.
4. The block carry then drives only a 2:1 multiplexer per bit. The lowest bit is
   `hd_0 XOR cin`.

### D tree

`mm_dprefix` is a Ladner-Fischer (Sklansky) prefix tree of two-input ANDs with
⌈log2 N⌉ levels. At level k, every position whose bit k is set ANDs in the value at
the top of the lower neighbouring 2^k group. The adders only need `D_{i:0}` for
`i ≤ n − 2`, so they instantiate it with `N = n − 1`. Sharing its ANDs with the carry
tree's propagates is left to synthesis.

## Modules

| module             | role                                                      |
|--------------------|-----------------------------------------------------------|
| `mm_pkg`           | `gp_t` (g, p) struct, `gp_combine()`, `mm_mode_e` names   |
| `mm_preproc`       | per-bit g and h                                           |
| `mm_prefix_op`     | plain prefix node                                         |
| `mm_prefix_op_fpp` | FPP modified node (generate gated by `nm`)                |
| `mm_prefix_op_spp` | SPP modified node (generate and propagate gated by `nm`)  |
| `mm_dprefix`       | D_{i:0} AND prefix tree                                   |
| `mm_csb`           | modified carry-select block                               |
| `mm_adder_fpp`     | FPP adder, parameter `N` (power of two, default 16)       |
| `mm_adder_spp`     | SPP adder, parameters `N` (default 16) and `W` (default 4) |
| `mm_adder_top`     | both adders side by side, each with its own ports         |

`mm_adder_top` has two sets of ports:

* `fpp_a`, `fpp_b`, `fpp_nm`, `fpp_dim` → `fpp_s`
* `spp_a`, `spp_b`, `spp_nm`, `spp_dim` → `spp_s`

The two units are alternatives, not a pipeline. Use one, or tie off the other and let
synthesis remove it.

Timing:

* **FPP:** one gate level of pre-processing, log2 n AND-OR levels, then two XOR levels.
  The second XOR is the only one on the carry path.
* **SPP:** the same pre-processing and prefix depth, then one multiplexer.

There is no clock, reset or handshake. Register the inputs and the output as your
pipeline needs.

## Where this RTL makes its own choices

The following are taken from the published FPP and SPP architectures:

* the tree shapes and positions of the modified nodes at n = 16;
* the gate equations of the two modified nodes;
* the carry-in AND gate;
* the D-correction sum equation;
* the structure of the carry-select block.

The following are choices of this implementation:

* **Other widths.** Only 16-bit adders are drawn. Other widths follow the same rule:
  FPP is cyclic Kogge-Stone, and SPP is a cyclic Kogge-Stone over 4-bit blocks. For
  n = 4, SPP is a single block, whose carry-in is `nm` times its own group generate.
  Widths 4, 8, 16, 32 and 64 are verified.
* **SPP propagate gating polarity.** `pn = p · (p' + NOT nm)` was chosen so that
  `nm = 0` ignores the fed-back pair, as the generate path does. This output never
  reaches a sum bit in either mode, so the choice does not change results.
* **D tree node placement.** The Sklansky placement was chosen.
* **Carry-select block.** The in-block group terms ripple through W − 1 nodes. For
  W = 4 this is the drawn structure.
* **Zero diminished-1 operands and the undefined mode.** Both are outside the adder's
  job (see Modes).

The reported 90 nm delay and area figures are not reproduced here. Compare with your
own synthesis.

The earlier multi-moduli adder used as a comparison point is not included: an extra
prefix level fed through a 3:1 carry multiplexer.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come from
integer arithmetic (`tb/mm_ref_pkg.sv`) or from truth tables, never from the prefix
equations.

| testbench              | what it checks                                                     |
|------------------------|--------------------------------------------------------------------|
| `tb_mm_adder_top`      | default size (n = 16, W = 4); both adders on the same inputs against the reference, ~240k checks; counts each mechanism (each mode, end-around carry taken, wrapped generate dropped, all-ones zero, inverted carry, D correction, carry into an upper block) and fails if any never occurs |
| `tb_mm_adder_fpp`/`spp`| n = 4 and 8 exhaustively in all three modes; n = 16, 32, 64 on random and corner operands |
| `tb_mm_csb`            | all 2^14 input combinations of a 4-bit block                      |
| `tb_mm_dprefix`        | N = 16 and N = 15 against a trailing-ones count                    |
| `tb_mm_prefix_op*`     | every input combination of each node                               |
| `tb_mm_preproc`        | bitwise half-adder truth table                                     |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. To run
one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/mm_pkg.sv tb/mm_ref_pkg.sv tb/tb_mm_adder_top.sv \
        --top-module tb_mm_adder_top -o sim
    ./obj_dir/sim

Swap in another `tb_*.sv` for the other blocks. The node, CSB, D-tree and pre-processing
benches do not need `tb/mm_ref_pkg.sv`. Every testbench finishes in under a second.

Lint:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/mm_pkg.sv rtl/mm_adder_top.sv
