# Diminished-1 modulo 2^n+1 adders: a sparse gray-operator carry tree and the modulo 2^n-1 route

Adders modulo 2^n+1 show up in residue number systems and in cryptographic
datapaths (IDEA-style ciphers, for example). The awkward part is the modulus: 2^n+1 values
need n+1 bits, so most fast designs use the **diminished-1** form and reduce
the problem to an n-bit adder whose carry out is inverted and fed back into
its carry input. This is called an inverted end-around carry (IEAC). Done
literally, that feedback is a combinational loop. This repository holds two
loop-free parallel-prefix implementations of the same adder, written as
parameterized, synthesizable SystemVerilog:

1. **Sparse adder** (`dim1_sparse_adder`). A sparse parallel-prefix carry
   tree computes only one IEAC carry per block of 4 bits. It uses a *gray
   operator* so that the inverted end-around part does not need a second,
   inverted copy of the prefix tree. Carry-select blocks fill in the other
   sum bits.
2. **Unified adder** (`dim1_unified_adder`). An ordinary modulo 2^n-1 adder
   plus one XOR gate per output bit. This works because the two kinds of
   carries differ exactly by a running AND of the half-sum bits.

`modadd_top` places both adders side by side on the same operands. The
default size is n = 8, i.e. arithmetic modulo 257. Both adders are purely
combinational.

## Number format

A value X in [0, 2^n] is carried as a zero bit `x_z` and an n-bit number
part `X*`:

| X        | x_z | X*      |
|----------|-----|---------|
| 0        | 1   | 0...0   |
| 1 .. 2^n | 0   | X - 1   |

Adding A and B falls into one of three cases:

* **Both non-zero.** The result's number part is the IEAC sum
  `S* = (A* + B* + 1) mod 2^n` if `A* + B* < 2^n`, otherwise
  `S* = (A* + B*) mod 2^n`. The result is zero exactly when
  `A* + B* = 2^n - 1`. The IEAC sum is then all zeros, and `s_z` must be set.
* **One operand zero.** The result is the other operand.
* **Both operands zero.** The result is zero.

The adders require a well-formed zero operand: if `x_z = 1`, then `X*` must be
0. The number part is not masked. Under that rule, the "one operand zero" case
is just `0 + B*` with every carry forced to 0.

## Carries of the IEAC adder

Write `G_i = A_i B_i` and `P_i = A_i + B_i`. Write `o` for the usual prefix
operator `(G,P) o (G',P') = (G + P G', P P')`, and `G_{k:j}` and `P_{k:j}` for
group terms. The carry out of bit i of the IEAC adder is

    C_i^+ = G_{i:0} + P_{i:0} · ~G_{n-1:i+1}          (i < n-1)
    C_{n-1}^+ = ~G_{n-1:0}                            (this is the carry into bit 0)

Here the low part is associated with the *inverted* generate of the high
part. The sum bits are `S_i = H_i xor C_{i-1}^+`, with `H_i` the half-sum.

Each carry depends on all n bit positions, as in a modulo 2^n-1 adder. The
modulo 2^n-1 case is easy, because its high part enters non-inverted and a cyclic
prefix tree does the job. Here the high part is inverted. Known log-depth
solutions double part of the tree, with one copy on normal signals and one on
complemented signals. The sparse adder below avoids that.

## Architecture 1: sparse carry tree with gray operators

### The gray operator (`gray_op`)

The gray operator has a vertical bus `(G_V, P_V, T_V)` and a lateral bus
`(G_L, P_L)`. The lateral bus enters inverted:

    G_V' = G_V + T_V
    P_V' = P_V · ~G_L
    T_V' = P_V' · ~P_L
    c    = G_V' + P_V'          (lateral output)

Feed it `v = (G_{k:0}, P_{k:0}, 0)` and `lat = (G_{n-1:r}, P_{n-1:r})`. Its
lateral output is then `G_{k:0} + P_{k:0} ~G_{n-1:r}`. The vertical outputs
hold just enough information for a second gray operator below it to take in
the next lower high group `(G_{r-1:m}, P_{r-1:m})`. The second operator then
outputs `G_{k:0} + P_{k:0} ~G_{n-1:m}`. The reason is that

    ~G_{n-1:m} = ~G_{n-1:r}·~P_{n-1:r} + ~G_{n-1:r}·~G_{r-1:m}

The first term is what T carries down the column, and the second term is the
new `P_V'`. A chain of gray operators down one column therefore builds
`C_k^+` with only one extra gate per operator, and no extra logic level. A
simple induction shows that the chain stays correct for any number of
contiguous high groups. `tb_gray_op` checks a two-operator chain
exhaustively.

### The tree (`sparse_ccu`)

The tree is described for sparsity `SPARSITY = 2^k` and `M = N/SPARSITY`
blocks, with M a power of two. Other block counts are padded; see the last
section.

* **Levels 1..k.** Plain operators reduce every block to one group pair.
  These levels hold no gray operators, because they only combine adjacent bits.
* **Levels k+1..k+log2 M.** A cyclic Kogge-Stone tree over the blocks. At
  block level l, column m takes its lateral input from column
  `(m - 2^l) mod M`.
  * If the column's span is still inside the word, it uses a plain operator.
  * If the lateral input comes from around the top of the word (the feedback
    edge), it uses a gray operator with `T_V = 0`. This is the top gray
    operator of that column.
  * Every later operator in that column is a gray operator too. Its lateral
    input is the next high group further down.
  * A plain column whose lateral neighbour has already wrapped uses a plain
    operator on (G,P) and forms `T = P·T_neighbour`. This case first appears
    with M >= 8.
* **Outputs.** The carry of column m < M-1 is `G + P` of its final state.
  Column M-1 holds the plain `G_{n-1:0}`, and its inverse is
  `C_{n-1}^+`.

Worked example: n = 16, sparse-4, M = 4. Block level 1 holds a gray
operator in column 0, `(G_{3:0},P_{3:0}) o ~(G_{15:12},P_{15:12})`. The same
level also forms `G_{7:0}`, `G_{11:4}` and `G_{15:8}` with plain operators. At
block level 2:

* column 0 becomes a gray successor with lateral input `G_{11:4}`, which
  gives `C_3^+`;
* column 1 gets a top gray operator with lateral input `G_{15:8}`, which
  gives `C_7^+`;
* column 2 applies a plain operator to the wrapped column 0, which gives
  `C_11^+`;
* column 3 forms `G_{15:0}`, which gives `C_15^+`.

At the default n = 8 (M = 2), the block-level tree is a single level: one gray
operator, which gives `C_3^+`, and one plain operator, which gives `G_{7:0}`.

Sometimes a tail of a group is associated twice. This happens at the top of
the tree, and in the modulo 2^n-1 tree for widths that are not powers of two.
The duplication does no harm: repeating low-order pairs after an inverted
high group leaves the carry unchanged (inverted circular idempotency).

When `a_z | b_z` is set, all block carries are forced to 0.

### Carry-select blocks (`csb`)

Each block of SPARSITY bits computes its internal carries twice with two
short ripple chains, once for block carry-in 0 and once for block carry-in
1. It forms both candidate sums and selects one with a 2:1 multiplexer per
bit. Block m takes the carry out of block m-1. Block 0 takes
`C_{n-1}^+ = ~G_{n-1:0}`, which is the inverted end-around carry.

### Zero bit

`s_z = a_z·b_z + ~(a_z + b_z)·P_{n-1:0}·~G_{n-1:0}`. The product
`P_{n-1:0}·~G_{n-1:0}` equals the AND of all half-sums, which is 1 exactly
when `A* + B* = 2^n - 1`.

## Architecture 2: modulo 2^n+1 through a modulo 2^n-1 adder

### Modulo 2^n-1 adder (`mod2nm1_adder`)

The carries are computed in cyclic form,

    C_i^- = (G_i,P_i) o ... o (G_0,P_0) o (G_{n-1},P_{n-1}) o ... o (G_{i+1},P_{i+1})

by a cyclic Kogge-Stone tree with ceil(log2 n) levels. At level l, column i
combines with column (i - 2^l) mod n. Then `S_i^- = H_i xor C_{i-1}^-`, and
`C_{n-1}^-` enters bit 0. Zero has two forms: complementary operands give all
ones. The half-sum vector and `cout` are brought out.

With `STYLE = M1_INCREMENT`, the adder uses a different carry structure. It
computes the integer prefixes `G_{i:0}`, `P_{i:0}` with a non-cyclic
Kogge-Stone tree, then adds one extra level of prefix operators driven by
the carry out:

    C_i^- = G_{i:0} + P_{i:0}·G_{n-1:0}

This is the conditional-increment form. It needs one more logic level but
fewer operators. `dim1_unified_adder` passes `STYLE` through.

### The XOR stage (`unified_post`)

Two identities connect the two adders:

* `C_i^+ = C_i^- xor (~G_{i:0}·P_{i:0})` for i < n-1, and
  `C_{n-1}^+ = ~C_{n-1}^-`.
* `~G_{i:0}·P_{i:0} = H_i·H_{i-1}···H_0`, written `H_{i:0}`. If all bits up to
  i propagate but none generates, every half-sum bit is 1.

Together they give

    S_0^+ = S_0^- xor ~(a_z + b_z)
    S_i^+ = S_i^- xor (H_{i-1:0} · ~(a_z + b_z))      i > 0
    s_z   = a_z·b_z + ~(a_z + b_z)·H_{n-1:0}

With a zero operand the correction is dropped, because the modulo 2^n-1 sum
of `0 + B*` is already `B*`. The `H_{i:0}` terms come from a plain AND chain.
Any faster modulo 2^n-1 structure can replace `mod2nm1_adder` without
touching this stage.

Example, computing (5 + 6) mod 17 with n = 4:

* The number parts are `A* = 0100` and `B* = 0101`.
* The modulo 15 sum is `1001`, and `H = 0001`.
* Bit 0 is inverted, and bit 1 is XORed with `H_{0:0} = 1`.
* The result is `1010` = 10, which is the diminished-1 form of 11.

## Pre-processing (`preproc`) and post-processing (`postproc`)

Both adders use the same modified pre-processing stage, with four gates per
bit: `G = A·B`, `P = A + B`, `H = P·~G`. The half-sum reuses G and P instead of
a separate XOR. `postproc` is the XOR stage `S_i = H_i xor C_{i-1}`, used by
the modulo 2^n-1 adder.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/modadd_pkg.sv` | `gp_t` (G,P) and `gpt_t` (G,P,T) structs; `m1_style_e`; `N_DEFAULT = 8`, `SPARSITY_DEFAULT = 4` |
| `rtl/modadd_top.sv` | both adders on shared operands |
| `rtl/dim1_sparse_adder.sv` | architecture 1 |
| `rtl/sparse_ccu.sv` | sparse IEAC carry tree |
| `rtl/gray_op.sv`, `rtl/prefix_op.sv` | prefix cells |
| `rtl/csb.sv` | carry-select block |
| `rtl/dim1_unified_adder.sv` | architecture 2 |
| `rtl/mod2nm1_adder.sv` | cyclic parallel-prefix modulo 2^n-1 adder |
| `rtl/unified_post.sv` | modulo 2^n-1 to diminished-1 conversion |
| `rtl/preproc.sv`, `rtl/postproc.sv` | pre- and post-processing stages |
| `tb/modadd_ref_pkg.sv` | arithmetic reference functions for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters:

* `N` is the number-part width, default 8.
* `SPARSITY` is the carry spacing of the sparse adder, default 4.
* The sparse adder needs SPARSITY to be a power of two. This is checked at
  elaboration. N can be any width: the top block is narrower when N is not a
  multiple of SPARSITY (4 + 4 + 2 bits for n = 10).
* The unified adder accepts any N >= 2.
* `STYLE` (`M1_CYCLIC` or `M1_INCREMENT`, default `M1_CYCLIC`) selects the
  carry structure of the modulo 2^n-1 adder.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/modadd_pkg.sv tb/modadd_ref_pkg.sv tb/tb_modadd_top.sv \
        --top-module tb_modadd_top -Mdir obj_top
    ./obj_top/Vtb_modadd_top

Swap in the testbench name for the other blocks. Each testbench has a
watchdog that counts a failure and stops the run if it hangs.

## What has been verified

* `tb_modadd_top` runs both adders at the default size (modulo 257) on all
  257 × 257 operand pairs. It checks both adders against an arithmetic reference and
  counts each case: end-around carry 1, end-around carry 0, zero result, one
  zero operand, and both operands zero.
* The sparse adder is also exercised at n = 4, 8, 10, 12, 16 and 32 with
  sparsity 4, and at n = 8 and 16 with sparsity 2. Sizes n = 10 and below are
  exhaustive (modulo 2^10+1 covers all 1025 × 1025 operand pairs). The larger
  sizes are random, with extra operand pairs near `A* + B* = 2^n - 1`.
* The sparse carry unit alone is also run at n = 20 with sparsity 4 and at
  n = 10 with sparsity 2. Both have 5 blocks.
* The unified adder is exercised at n = 4, 8, 10 and 16, and with the
  increment-level modulo 2^n-1 adder at n = 8 and 10.
* The modulo 2^n-1 adder is exercised at n = 5, 6, 7, 8 and 16, and in the
  increment style at n = 7 and 8.
* Each cell (`prefix_op`, `gray_op`, `csb`, `preproc`, `postproc`) is tested
  exhaustively or against integer arithmetic.

## Where this RTL departs from or goes beyond the method

* **Prefix-tree shape.** The method fixes the operators (plain, gray, which
  column gets a gray top operator) but not the exact prefix graph. This design uses
  cyclic Kogge-Stone trees for both the sparse block-level tree and the
  modulo 2^n-1 adder. For n = 16, sparse-4, the result matches the operator
  list in the worked example above.
* **M >= 8 blocks.** The method does not cover a plain operator that
  consumes an already wrapped column. This design adds one AND there
  (`T = P·T_neighbour`). It has been verified at n = 20 and n = 32.
* **Block counts that are not powers of two.** The word is cut into blocks
  of SPARSITY bits starting at bit 0, so the top block may be narrower. For
  n = 10 that gives blocks of 4, 4 and 2 bits. `sparse_ccu` then pads its
  block tree to a power-of-two number of columns. The padding bits use the
  identity pair (G,P) = (0,1), which changes no carry and synthesizes away.
  The carry out of the real top block is taken from the leftmost column as
  `~G_{n-1:0}`.
* **Carry-select block internals.** Two ripple chains and a multiplexer are
  the simplest block that does the job. Other block designs (for example a
  shared chain with an incrementer) would fit the same interface.
* **Timing.** There are no registers anywhere. Speed, power and LUT counts
  depend on the target and are not modelled here.
* **Representation.** Only the diminished-1 form is implemented. The
  normal-weighted (n+1-bit) form and the single-zero modulo 2^n-1 variants
  are not included.
