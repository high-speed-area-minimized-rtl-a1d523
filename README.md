# Area-minimized hybrid Ling adder, fixed-width and reconfigurable

This design is a fast binary adder that needs fewer gates than a Kogge-Stone adder. It
combines three ideas:

* **Ling pseudo-carries.** The carries come from a parallel-prefix tree that computes
  Ling's pseudo-carry `H_n = C_n | C_{n-1}` rather than the carry `C_n`. This saves one
  gate level.
* **A reduced tree.** The tree only computes carries at the top of each 4-bit block.
  Simple 4-bit carry-select blocks then produce the sum bits in parallel with the tree.
* **Normal carries at no cost in depth.** Small AND cells (`&1`, `&2`) turn the
  pseudo-carries back into normal carries without adding a tree level. As a result the
  carry-select blocks can be ordinary ones, not the larger Ling-specific kind.

The carry-in is folded into bit 0 by one gate.

The same structure also gives a **reconfigurable (SIMD) adder**. For example, a 32-bit word
can be one 32-bit add, two 16-bit adds, four 8-bit adds, or any mix cut at 8-bit
boundaries. The cut logic sits in the gate stage just before the tree, in parallel with
the carry-in cell. It adds no gate to the tree and so no gate to the longest path.

Everything is combinational: there is no clock, and the outputs settle one propagation
delay after the inputs change.

## Signals and notation

For operands `a`, `b` and bit `n`:

| signal | meaning |
|---|---|
| `g_n = a_n & b_n` | bit generate |
| `p_n = a_n \| b_n` | bit propagate. It is the OR, not the XOR, because Ling's identities need `g_n & p_n = g_n`. |
| `d_n = a_n ^ b_n` | half sum |

The carry operator combines a higher span with a lower one:

    (gh, ph) o (gl, pl) = (gh | ph & gl,  ph & pl)        -- prefix_cell, "black node"

The Ling pseudo-carry and the carry are related as follows:

    H_n = C_n | C_{n-1},        C_n = p_n & H_n

`H_n` only depends on pairs at every second bit:

    G*_n = g_n | g_{n-1},   P*_n = p_{n-1} & p_{n-2}      -- ling_gp_cell
    H_n  = (G*_n, P*_n) o (G*_{n-2}, P*_{n-2}) o ...       (odd n: down to bit 1)

For the carries at block tops (bits `4k-1`), only odd bits are needed. The first gate
level builds `(G*, P*)` at each odd bit. In exchange, the tree has one operator level
fewer than a tree for `C_n`.

## The prefix tree (`ling_ks_tree`)

With `M = N/4` blocks, the tree has three stages:

1. **Pair stage.** `N/2` Ling pair cells, one per odd bit. At bit 1 the pair is
   `(g_1 | g_0, 0)`: nothing lies below bit 0, because the carry-in is already inside `g_0`.
2. **Block stage.** `M` black nodes. Each one merges the pairs at bits `4b+3` and `4b+1`
   into one term for block `b`.
3. **Kogge-Stone stage.** A Kogge-Stone prefix over the `M` block terms, `log2(M)`
   levels. Node `(l, b)` combines block `b` with block `b - 2^l`.

The tree's output for block `b` is `H_{4b+3}`.

For `N = 32` the tree has 16 pair cells and 8 + 17 = 25 black nodes. In general it has
`N/2` pair cells and `N/4·log2 N − N/2 + 1` black nodes. A full Kogge-Stone tree over all
32 bits needs 129 black nodes. Counting a black node as 3 two-input gates and a pair cell
as 2, the tree costs:

| N | this tree (gates) | full Kogge-Stone (gates) |
|---|---|---|
| 16 | 43 | 147 |
| 32 | 107 | 387 |
| 64 | 259 | 963 |

## Turning pseudo-carries into carries: the `&1` and `&2` cells

This is the least obvious part of the design.

A carry-select block needs its true carry-in `C_{4k-1}`, but the tree delivers
`H_{4k-1}`. Adding `C = p & H` after the tree would add a gate level. The design avoids
this in two ways, depending on where the block sits in the tree.

### Lower half (blocks `k = 1 .. N/8`): the `&1` cell

In a Kogge-Stone tree, the prefixes of the lower half of the blocks are complete one level
before the end. On the last level they only pass through buffers. Each such buffer is
replaced by an `&1` cell, `C = p_{4k-1} & H_{4k-1}` (an AND gate instead of a buffer),
so the depth does not change.

### Upper half (blocks `k = N/8+1 .. N/4-1`): the `&2` cell

These prefixes are completed on the last level, so no buffer is free. Instead, the
correction is applied *before* the tree. An `&2` cell on the bit pair `n = 4k-2` ANDs both
`g_n` and `p_n` with `p_{n+1}`. The Ling pair at `4k-1` then becomes

    (g_{4k-1} | p_{4k-1} g_{4k-2},  p_{4k-1} p_{4k-2} p_{4k-3})  =  p_{4k-1} & (G*, P*)

Carried through the tree, this gives `p_{4k-1} & H_{4k-1} = C_{4k-1}` directly. The cell
sits in the same gate stage as the carry-in cell, so it adds no depth.

### Why the modified pairs do not disturb higher blocks

The modified term of block `k` is also used inside the prefixes of every block above it.
There it is always ANDed with the propagate term of the span above it. That term already
contains `p_{4k-1}`, because `P*_{4k+1} = p_{4k} & p_{4k-1}`. So the extra factor
`p_{4k-1}` changes nothing there.

### The top block and the carry-out

The top block keeps its pseudo-carry. The carry-out is `cout = p_{N-1} & H_{N-1}`, one
`&1` cell after the tree.

### Testing

`tb_ling_ks_tree` checks the tree with arbitrary `(g, p)` words against a serial Ling
recursion. `tb_hpcl_adder` checks the whole adder. Leaving out the `&2` cells makes it
fail on about a third of its vectors.

## Carry-in

The carry-in is treated as a pair `(g_{-1}, p_{-1}) = (cin, 1)` and merged into bit 0:

    g0_m = g0 | p0 & cin,   p0_m = p0        -- cin_cell

After this, the adder is the same as one without a carry-in. `cin` drives only this gate
and the select of the lowest carry-select block. The alternatives cost more:

* An extra operator row after the tree costs `N` black nodes and a large fan-out on `cin`.
* Replacing buffers in the tree with black nodes costs about `log2 N + 1` nodes.

## Carry-select blocks (`scsa4`, `scsa4_r`)

Each 4-bit block runs two ripple chains from the shared `g/p/d` signals:

* one assumes a block carry-in of 0: `c0[0] = g0`;
* one assumes a block carry-in of 1: `c1[0] = g0 | p0 = p0`.

The XOR of `d` with each chain gives two candidate sums, and a 2:1 multiplexer picks one
using the block's carry from the tree.

Counting an AND or OR gate as 1 and an AND-OR stage or XOR as 2, the slowest candidate sum
of a K-bit block takes `1 + 2(K−2) + 2 = 2K−1` units. For `K = 4` this is 7. That is no
more than a Ling tree of `log2 N` levels takes, so the blocks stay off the critical path.

The block size is fixed at 4. This is the near-optimal size for 16 to 128 bits, and every
placement rule of the design is written for bits `4k-1` and `4k-2`.

`scsa4_r` also gives the block's carry-out: its generate `G`, or `G | P` when the select
is 1.

Block 0 is selected by `cin`. Block `k` is selected by `C_{4k-1}`.

## Reconfigurable adder (`hpcl_adder_r`)

`PART` (default 8) is the smallest piece. There is a boundary at every `m = PART·(i+1)`
below `N`. Each boundary has two controls:

* `brk[i]`: cut the word at bit `m`;
* `cin_b[i]`: the carry-in of the piece starting at bit `m`.

**`cin_b[i]` must be 1 whenever `brk[i]` is 0.** The break cell is built to need this
value; with 0 the result is wrong.

For `N = 32, PART = 8`:

| `brk[2:0]` | pieces, high to low | `cin_b` bits in use |
|---|---|---|
| 000 | 32 | none (all must be 1) |
| 001 | 24, 8 | `cin_b[0]` |
| 010 | 16, 16 | `cin_b[1]` |
| 011 | 16, 8, 8 | `cin_b[1:0]` |
| 100 | 8, 24 | `cin_b[2]` |
| 101 | 8, 16, 8 | `cin_b[2]`, `cin_b[0]` |
| 110 | 8, 8, 16 | `cin_b[2:1]` |
| 111 | 8, 8, 8, 8 | all |

### How a cut works

A cut at `m` must make the tree return `C_{m-1} = cin_b` to the block starting at `m`,
and must hide everything below `m` from the bits above. Two pairs are rewritten in the
stage before the tree:

* **Pair `m-2`: break cell (`brk_cell`).** It outputs `(g & ~brk, p & ~brk)`. With the
  break set, `P*_{m-1} = 0`, so `H_{m-1}` no longer looks below. Where `m-2` is also an
  `&2` position (boundaries in the upper half of the word), `brk_and2_cell` merges the two
  functions.
* **Pair `m-1`: break-with-carry-in cell (`brk_cin_cell`).** It outputs
  `((g | brk) & cin_b, p | brk)`. With the break set the pair is `(cin_b, 1)`, so
  `H_{m-1} = cin_b` and `C_{m-1} = 1 & cin_b`. `P*_{m+1} = p_m & 1` then passes `cin_b`
  upward exactly as a carry-in would. With the break clear the pair is `(g & cin_b, p)`,
  which is why `cin_b` must be 1.

Each cell is two gate levels, the same depth as the carry-in cell beside it, so the tree
and the sum path are unchanged. The tree output at bit `m-1` now carries `cin_b` instead
of the lower piece's carry-out. That carry-out therefore comes from the carry-select
block at the top of each `PART`-bit chunk, which is an `scsa4_r`:

* `cout[j]` is the carry out of bit `PART·(j+1)−1`;
* at a cut it is the lower piece's carry-out;
* `cout[N/PART−1]` is the carry-out of the word.

Because the top block's `scsa4_r` gives the final carry-out, the tree omits the path of
the top block (`GEN_TOP = 0`). That path is one pair-stage node plus one node per level.

## Modules

| module | role | ports |
|---|---|---|
| `hpcl_adder_top` | both adders side by side | `a, b, cin → sum, cout`; `ra, rb, rcin, brk, cin_b → rsum, rcout` |
| `hpcl_adder` | N-bit adder with carry-in | `a, b [N], cin → sum [N], cout` |
| `hpcl_adder_r` | N-bit reconfigurable adder | `a, b [N], cin, brk, cin_b [N/PART−1] → sum [N], cout [N/PART]` |
| `ling_ks_tree` | reduced Ling Kogge-Stone tree | `g, p [N] → c4 [N/4−1]` (`C_{4k−1}`), `h_top` (`H_{N−1}`) |
| `scsa4`, `scsa4_r` | 4-bit carry-select blocks | `g, p, d [4], sel → sum [4] (, cout)` |
| `pg_cell` | `g, p, d` of one bit | |
| `prefix_cell` | carry operator | |
| `ling_gp_cell` | Ling pair `(G*, P*)` | |
| `cin_cell` | carry-in into bit 0 | |
| `and1_cell` | `C = p & H` | |
| `and2_cell` | `&2` pre-tree cell | |
| `brk_cell` | break cell | |
| `brk_cin_cell` | break-with-carry-in cell | |
| `brk_and2_cell` | break cell merged with `&2` | |
| `hpcl_pkg` | `BLK = 4`; `cell_kind()`, which picks the cell for each bit pair; `is_pow2()` | |

### Parameters

* `N` (default 32): must be a power of two, 16 or more. Elaboration stops with an error
  otherwise.
* `PART` (default 8): must be a multiple of 4 that divides `N`, with `N/PART ≥ 2`.

Tested sizes:

* `hpcl_adder`: `N = 16, 32, 64, 128`.
* `hpcl_adder_r`: `N = 16, 32, 64` with `PART = 8`, and `N = 32` with `PART = 4` and 16.

### Lint warnings

Verilator reports some input bits as unused:

* `p_0` and `p_{N−1}` in the tree;
* the top four bits in the reconfigurable tree;
* bit 3 of the scsa4 chains.

These warnings are expected and follow from the structure above.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and stops. It fails on its own
watchdog if it hangs. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/hpcl_pkg.sv \
        tb/tb_hpcl_adder_top.sv --top-module tb_hpcl_adder_top -Mdir obj -o sim
    obj/sim

The testbenches are:

* **`tb_hpcl_adder_top`**: the whole design at its default size, with no parameter
  overrides. It runs all eight partition schemes plus random and corner vectors. It
  counts how often each behaviour occurs and fails if one never does: carry-in running
  through the whole word, carry-out, a block top where the pseudo-carry is 1 but the
  carry is 0 (once for the `&1` half and once for the `&2` half of the word), a cut that
  stops a real carry, a piece started by its own carry-in, a carry passing an uncut
  boundary, and each scheme.
* **`tb_hpcl_adder`**: about 9000 vectors over four widths, compared with `a + b + cin`.
  The corner vectors include all-propagate words, single breaks in a propagate chain and
  single generates at every bit.
* **`tb_hpcl_adder_r`**: every break pattern at each tested size, with sums and chunk
  carry-outs compared against a model that adds each piece separately.
* **`tb_ling_ks_tree`**, **`tb_scsa4`**, **`tb_scsa4_r`**: the tree (see above) and the
  carry-select blocks, exhaustively.
* **One testbench per cell**: exhaustive.

Helpers `adder_chk` and `adder_r_chk` in `tb/` run one adder instance each.

All vectors come from `$urandom` and fixed patterns; no data files are used.

## What is and is not specified here

Taken from the published method:

* the Ling formulation;
* the reduced tree and its node counts;
* the positions of the `&1`, `&2`, carry-in and break cells;
* the 4-bit block size;
* the 8-bit partition size;
* the rule that unused `cin_b` are 1;
* the removal of the top block's tree path in the reconfigurable version.

Choices made in this RTL:

* **Gate forms of the three break cells.** Only their function and two-level depth are
  fixed. The forms used here are the simplest that give a cut segment the carry-in
  `cin_b` and explain the `cin_b = 1` rule.
* **Selecting block 0 by `cin`.**
* **Carry-select blocks with carry-out at every chunk top.** The reconfigurable adder
  uses an `scsa4_r` at every chunk top, not only where a cut can fall, and exposes all
  chunk carry-outs as `cout`.
* **Shared first stage.** The carry-select blocks take `g/p/d` from the shared first stage
  rather than recomputing them from `a` and `b`.
* **Both adders in one top.** Normally only one of the two would be built.

Not covered:

* **Other block sizes.** Only `K = 4` is supported. An 8-bit block, near-optimal around
  256 bits, would need different cell positions.
* **Delay, area and power.** This RTL is technology-independent. Transistor sizing and
  buffering for fan-out (the last tree level drives up to 4 loads) are left to synthesis.
  Gate counts and logic depth follow the structure above, but no timing or area figure
  has been measured from this RTL.
