# Hybrid wide-operand three-operand adder

This design adds three N-bit numbers and a carry-in in one combinational pass:
`{cout, s} = a + b + c + cin`. Three-operand addition is the core operation
of Montgomery modular multiplication and of LCG-based pseudo-random bit
generators, so it pays to make it both fast and small.

The classic carry-save three-operand adder is small but slow. It first
reduces the three operands to two with a row of full adders. It then adds
those two in a ripple-carry adder, so its delay grows linearly with N. A full
parallel-prefix adder in the second stage is fast, but it costs
O(N log N) area and much power at large widths. This design sits between the
two:

* a prefix tree computes the carries only at the boundaries of 4-bit blocks;
* the 4-bit blocks then form their sums with short ripple chains.

The low-order blocks get their carries from the tree early, so each uses a
single ripple chain. The high-order blocks get their carries late. Each of
them works out its sum twice in advance, once for carry 0 and once for
carry 1. The late carry then only drives a multiplexer.

The default width is N = 16. The design is parameterised for wider operands
and is tested at 32, 64 and 128 bits.

## Data flow

```
 a b c ──► csa_array ──► sv (sum vector), cv (carry vector)
                           │
       x = sv, y = {cv[N-2:0],0}, cin
                           ▼
                     hybrid_adder ──► s[N-1:0], hcout
                           │
       half_adder(cv[N-1], hcout) ──► s[N], cout
```

1. **Bit-addition logic** (`csa_array`) is N independent full adders.
   `a + b + c == sv + 2*cv`. No carry crosses between the cells.
2. **Two-operand addition** (`hybrid_adder`) adds `sv` to the carry vector
   shifted left by one. The shift frees bit 0, where `cin` enters, just as
   in a classic carry-save adder.
3. **MSB closing.** The carry vector's top bit `cv[N-1]` has weight 2^N.
   A half adder combines it with the hybrid adder's carry-out to give `s[N]`
   and `cout`. The result is N+2 bits wide, which is enough for the largest
   possible sum, 3·(2^N−1)+1.

## Inside the hybrid adder

### Preparation: generate, alive, propagate

`gap_prep` forms three signals for every bit:

* `g = x & y` (generate);
* `a = x | y` (alive: the bit lets a carry through or makes one);
* `p = x ^ y` (propagate, used only to form the sum).

The carry network uses the alive signal instead of `p`. Both give the same
carries, and OR is cheaper than XOR.

### Prefix operators

* `black_cell` merges a higher group and the adjacent lower group:
  `g = g_hi | a_hi & g_lo` and `a = a_hi & a_lo`.
* `grey_cell` computes only the `g` half. It is used when the lower group
  already reaches the carry-in, so its output is a finished carry.

### Block groups and the carry tree

Each 4-bit block first folds its four (g, a) pairs into one block pair, using
a chain of three black cells. `ppf_tree` then runs a parallel-prefix network
over the NB = N/4 block pairs and the carry-in.

The carry-in counts as an extra column below bit 0, with generate = `cin` and
alive = 0. Level l has span s = 2^(l−1) and treats each column j as follows:

| column          | cell at level l      |
|-----------------|----------------------|
| j < s           | pass-through         |
| s ≤ j < 2s      | grey cell            |
| j ≥ 2s          | black cell           |

Column j is finished after ceil(log2(j+1)) levels. The tree has
ceil(log2(NB+1)) levels in all. Its output `c[k]` is the carry into block k,
and `c[NB]` is the carry-out of the adder.

The tree's default width is 8. At that width it has the shape of the 8-bit
example it comes from: three levels of cells, then a single grey cell on the
carry-out. For the default 16-bit adder (NB = 4) the tree is three levels
deep.

### Sum producers

Both producers take the block's `g`, `a` and `p` bits and its block carry:

* `sum_producer_rca` (first type) is one 4-bit ripple chain that starts from
  the block carry: `k[i+1] = g[i] | a[i] & k[i]` and `s[i] = p[i] ^ k[i]`.
  It is used for the `N_RCA` lowest blocks, whose carries come out of the
  tree early.
* `sum_producer_csl` (second type, carry-select) holds two copies of the
  ripple chain, with carry-in fixed at 0 and at 1. Both run in parallel with
  the tree, and the block carry selects one of the two sums. It is used for
  all the higher blocks.

With the default `N_RCA = NB/2`, a 16-bit adder has two ripple blocks (bits
0–7) and two carry-select blocks (bits 8–15).

## Parameters

| module                | parameter | default   | meaning                                  |
|-----------------------|-----------|-----------|------------------------------------------|
| `three_operand_adder` | `N`       | 16        | operand width (multiple of 4)            |
| `hybrid_adder`        | `W`       | 16        | operand width (multiple of `BW`)         |
|                       | `BW`      | 4         | sum-block width                          |
|                       | `N_RCA`   | (W/BW)/2  | number of low blocks with ripple producer |
| `ppf_tree`            | `W`       | 8         | number of columns (not counting carry-in) |
| `csa_array`, `gap_prep` | `N`     | 16        | width                                    |
| `sum_producer_*`      | `BW`      | 4         | block width                              |

`adder_pkg` holds the shared constants: the block width, the default width,
and the function that counts prefix levels. A width that is not a multiple of
the block size stops elaboration with an error.

## Timing

Every module is combinational: there are no clocks, registers or reset. For
timing in a system, register the inputs and outputs around
`three_operand_adder`.

The critical path runs through one full adder, the preparation stage, the
block fold (three black cells), the prefix tree, and the carry-select
multiplexer of the top block. The ripple chains of the carry-select blocks
run in parallel with the tree.

## Where this design makes its own choices

The source description fixes the structure:

* a carry-save front end;
* preparation with g, a and p;
* a black- and grey-cell prefix network with the carry-in as a column;
* 4-bit sum blocks;
* two kinds of sum producer, simple ones for the low blocks and carry-select
  ones for the high blocks.

The following points are this design's own choices:

* **Prefix topology at block level.** The tree over the block groups uses the
  Kogge-Stone arrangement of the 8-bit example. The source names several
  topologies but does not say which one the wide adder uses.
* **The split between the two producer types.** Half of the blocks use each
  type (`N_RCA = NB/2`). Change `N_RCA` to move the boundary.
* **The first-type producer** is built as the simplest circuit that does the
  job, one ripple chain. The source says only that it is cheaper and that its
  carry arrives early.
* **Complemented carries.** The source mentions transmitting carries in
  complemented form as a speed measure. That is a choice of gates that does
  not change the logic function. The RTL uses true-polarity carries and
  leaves inversion to synthesis.
* **Carry-in and MSB handling** of the three-operand wrapper follow the
  classic carry-save adder: `cin` enters at bit 0 of the shifted carry
  vector, and a half adder closes the top bit.
* **Only combinational logic is built.** No registering scheme is described.

Not included:

* the pseudo-random bit generator (modified dual-CLCG) that the adder is meant
  for, because its structure is not specified;
* FPGA prototyping and debug infrastructure;
* the reference adders the design is compared against.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench                | what it does                                                    |
|--------------------------|-----------------------------------------------------------------|
| `tb_full_adder`, `tb_half_adder`, `tb_black_cell`, `tb_grey_cell` | exhaustive truth tables |
| `tb_gap_prep`            | random and corner operands, bit by bit                          |
| `tb_csa_array`           | checks `a+b+c == s + 2*cy` and the parity of `s`                |
| `tb_ppf_tree`            | exhaustive at 8 columns (all x, y, cin); random at 5 columns    |
| `tb_sum_producer_rca/csl`| exhaustive over all 4-bit x, y and carry                        |
| `tb_hybrid_adder`        | 16-bit default and 32-bit with `N_RCA=3`: random, long propagate runs, corners |
| `tb_three_operand_adder` | end to end at default parameters; see below                     |
| `tb_adder_widths`        | three-operand adder at N = 32, 64 and 128                       |

The end-to-end test applies 20 000 random operand sets plus corner cases and
compares `{cout, s}` with `a+b+c+cin`. It also works out the internal
carries independently and counts how often each mechanism occurs:

* carry-in used;
* carry-save carries present;
* a ripple block receiving a carry;
* a carry-select block selecting its carry-1 chain, and its carry-0 chain;
* a carry from `cin` travelling through all blocks;
* the MSB half adder producing `cout = 1`.

A mechanism that never occurs counts as a failure.

Each testbench was also run against a copy of its module with one deliberate
error, for example an inverted select or a wrong prefix index. Every one of
these errors was caught.

## Simulating

Example runs with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adder_pkg.sv \
    tb/tb_three_operand_adder.sv --top-module tb_three_operand_adder -Mdir obj
./obj/Vtb_three_operand_adder
```

Substitute any other testbench name to run it. For lint:
`verilator --lint-only -Wall -Irtl rtl/adder_pkg.sv rtl/three_operand_adder.sv`.
The remaining lint warnings are about unused signals: the alive outputs of
the last tree level, the block carry-outs of the sum producers (which only
the tests use), and package constants.
