# CRGE: memory-less permutation generators that compute each element on its own

Many applications need to turn an index into one specific permutation of
`n` items, with every permutation equally likely when the index is uniform.
The usual hardware answer is a Fisher-Yates / Knuth shuffle over a RAM: the
elements are swapped one after the other, so each element depends on all the
earlier ones, and the memory sets the pace.

CRGE (cyclic rotations of group elements) removes that dependency. The index
is written in the factorial number system, digits `d_1 .. d_{n-1}` with
`0 <= d_i <= i` (there are exactly `n!` such indices). Element `i` of the
permutation is then

    sigma(i) = f_{n-1}( ... f_{i+1}( f_i(i, d_i), d_{i+1} ) ..., d_{n-1} )
    f_k(x, d) = (x - d) mod (k + 1)

Each `f_k` is a bijection in `x` for a fixed digit and in the digit for a
fixed `x`, which makes the whole map from the `n!` indices to the `n!`
permutations a bijection: every permutation is produced by exactly one index,
so a uniform index gives an unbiased permutation. No element needs any other
element, so elements can be computed in any order, in parallel, on separate
chips, or only the ones that are wanted.

## Where the formula comes from

Start from the identity arrangement `0, 1, ..., n-1`. For `k = 1 .. n-1`,
rotate the first `k+1` entries of the arrangement left by `d_k` places. The
final arrangement is a permutation; its inverse (the position where value `v`
ended up) is `sigma`. Following one value instead of following the whole
arrangement gives the formula above: a left rotation of the first `k+1`
entries moves the value at position `x` (with `x <= k`) to position
`(x - d_k) mod (k+1)`, and value `i` is first touched by rotation `i`. The
testbenches use this rotate-then-invert procedure as their reference model,
so the RTL is checked against the picture rather than against its own
formula.

Example, `n = 4`, digits `d_1 = 1, d_2 = 2, d_3 = 1`:

| element | start | f_1 (mod 2) | f_2 (mod 3) | f_3 (mod 4) | sigma |
|---|---|---|---|---|---|
| 0 | 0 | 1 | 2 | 1 | 1 |
| 1 | 1 | 0 | 1 | 0 | 0 |
| 2 | 2 | - | 0 | 3 | 3 |
| 3 | 3 | - | - | 2 | 2 |

## The computation block (`crge_fblock`)

One block computes `f_I`. Both operands lie in `[0, I]`, so `x - d` lies in
`[-I, I]`: the block subtracts with one extra sign bit and, if the result is
negative, adds `I + 1` back (subtractor, adder, multiplexer). When `I + 1` is
a power of two the adder and multiplexer are dropped, because keeping the low
`log2(I+1)` bits of the difference is already the modulus.
`crge_mblock` is the same block with the modulus as an input; the partial
generator uses it.

All elements and digits are `W = ceil(log2 n)` bits wide everywhere, and the
index is an unpacked array `digit[1:n-1]` (digit `d_0` is always 0 and has no
port).

## The generators

### Shift register generator (`crge_shiftreg`), the main design

The `n-1` blocks `f_1 .. f_{n-1}` form a chain, each behind an intermediate
register (`crge_segment`). Reset loads the intermediate registers with the
identity, so in the first cycle block `i` starts element `i` with
`f_i(i, d_i)`. Each following cycle every partial value moves one block
further; the register in front of `f_1` gets 0 (that is `f_0(0, d_0)`, the
"f_0 multiplexer"). Element `i` needs blocks `i .. n-1` and enters block
`n-1` in cycle `n - i`, so the last block produces `sigma(n-1)`,
`sigma(n-2)`, ..., `sigma(0)` in cycles 1 to `n`:

| cycle | block f_1 | block f_2 | block f_3 (output) |
|---|---|---|---|
| 1 | f_1(1) | f_2(2) | f_3(3) = sigma(3) |
| 2 | f_1(0) | f_2(f_1(1)) | f_3(f_2(2)) = sigma(2) |
| 3 | - | f_2(f_1(0)) | f_3(f_2(f_1(1))) = sigma(1) |
| 4 | - | - | f_3(f_2(f_1(0))) = sigma(0) |

The finished elements are shifted into an output shift register at `perm[0]`
and move towards `perm[n-1]`; after `n` shifts `perm[i] = sigma(i)`, and all
`n` elements are available in parallel.

The end of the computation is found without a counter. Reset clears the
output register except bit 0 of `perm[0]`, a marker. Only reset zeros travel
ahead of it, so the first time `perm[n-1]` has bit 0 set is exactly when the
marker has arrived, after `n-1` shifts. That makes the next cycle the last one:
it shifts `sigma(0)` in and sets `ready`, and `ready` freezes the output
register until the next reset.

Interface and timing: `rst` is synchronous and is the start command;
`digit` must stay stable until `ready`; `ready` rises exactly `n` cycles after
the last reset cycle. The default is `N = 8192`, the largest size of the
original evaluation. A permutation of any `n <= N` is produced by the same
hardware by setting `d_i = 0` for `i >= n` (every `f_i` with a zero digit is
the identity): `perm[0..n-1]` is then the `n`-element permutation and
`perm[i] = i` above it.

### Partial permutation generator (`crge_partial`)

Only the elements listed in the parameter `ELEMS` are computed, with one block
and one counter per element whatever `n` is. On reset the index is loaded into
a shift register `idx` (`idx[i] = d_i`); every cycle it moves one place down
(`idx[i] <= idx[i+1]`, 0 enters at the top). The block for element `e` always
reads `idx[e]`, so in cycle `t` it sees `d_{e+t}`; its counter starts at
`e + 1`, counts up, and is the block's modulus input, so the block computes
`f_e, f_{e+1}, ..., f_{n-1}` in turn on its own previous output (starting
from `e`). A block stops when its counter passes `n`; `ready` is high when all
have stopped, `n - min(ELEMS)` cycles after reset. The digits are needed only
during reset. Defaults: `N = 8192`, `ELEMS = {0, 1, N/2, N-1}`.

### Distributed generator (`crge_distributed`)

For `n` too large for one device, the block chain is cut into `NSEG`
segments (`crge_segment`), each standing for one device and receiving only
its own digits. A segment passes the output of its last block to the first
intermediate register of the next one, unregistered, so the timing is the same
as one chain. The last segment streams the elements out: `elem_valid` is high
in the `n` cycles after reset, `elem_idx` counts down from `n-1` and
`elem_val = sigma(elem_idx)`; `done` follows. The `n-1` blocks are split into
nearly equal runs by default (`N = 8192`, `NSEG = 4`); the parameter
`SEG_BLOCKS` gives each segment its own block count instead (it must sum to
`n-1`). An unequal split is what the method suggests for real devices: the
early blocks have small moduli and would be narrow in a variable-width
implementation, so the first devices can hold more of them.

### High throughput generator (`crge_throughput`)

A fully unrolled pipeline producing one permutation per cycle. Stage `s`
(`s = 1 .. n-1`) applies `f_s` to every element already started (elements
`0 .. s-1` from the previous stage) and starts element `s` with the value
`s`; element 0 starts in stage 1 as 0. Stage `s` therefore has `s + 1`
blocks, `n(n+1)/2 - 1` in all (527 for the default `N = 32`). The digits
travel with their permutation: stage `s` receives `d_s .. d_{n-1}` and passes
`d_{s+1} .. d_{n-1}` on. Stage 1 works on the inputs and a register follows
every stage, so a result appears on `perm` with `out_valid` `n-1` cycles
after its index was presented with `in_valid`; a new index may be presented
every cycle. `rst` clears only the valid bits.

### Top level (`crge_top`)

The four generators side by side, sharing only `clk`, with their ports
prefixed `sr_`, `pp_`, `ds_` and `ht_`. Parameters: `N = 8192` (`W = 13`) for
the three sequential generators, `PP_K`/`PP_ELEMS` and `NSEG` as above, and
`HT_N = 32` for the pipelined one.

## Departures and choices

* Widths, the synchronous reset used as the start command, holding the index
  at the inputs (no index register) in the shift register and distributed
  generators, the valid bits of the pipeline and its register placement, the
  choice of elements in the partial generator and the default segment split are
  choices of this implementation.
* The chain blocks use `f_k(x, d) = (x - d) mod (k+1)`. Any function that is
  a bijection in each argument works; `(x + d) mod (k+1)` gives the right-
  rotation variant. A "compact" variant that reuses the intermediate
  registers as a rotating output register, and a "precomputed" variant that
  computes `x + d` and `x + d - (k+1)` in parallel, are known alternatives
  that an FPGA evaluation found larger or slower than the shift register
  generator; they are not included.
* The distributed generator is one module; real device boundaries would need
  an I/O link, and a registered link would shift each later segment's timing
  by one cycle per hop.
* Uniform `W`-bit blocks everywhere; blocks `f_k` with small `k` could be
  narrower (`ceil(log2(k+1))` bits), which this RTL does not do.
* No clock-rate or area figures come with this RTL: it has been checked by
  simulation and by lint and elaboration, not taken through place and route.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench | what it shows |
|---|---|
| `tb_crge_fblock` | `f_I` for `I = 1..10`, every `x, d`; the `f_2` truth table |
| `tb_crge_segment` | a whole chain against the model; a middle run fed a random stream |
| `tb_crge_shiftreg` | n = 2 and 7 exhaustively (all `n!` results valid and distinct), n = 10 and 67 random; 10-element permutations from the 67-element generator with zero upper digits; latency exactly `n`; result held after `ready` |
| `tb_crge_partial` | n = 12 and 40 with several element lists; latency `n - min(ELEMS)`; digits changed after reset |
| `tb_crge_distributed` | n = 23 over 4 equal segments, n = 9 over 8, n = 23 over 12 + 6 + 4 blocks; order, index, valid and done of the stream |
| `tb_crge_throughput` | n = 8 and 5 with back-to-back indices, bubbles and a mid-run reset; latency `n-1` |
| `tb_crge_eval_sizes` | generators of exactly n = 2..10, 16, 32, 64..1024: random indices, n cycles each |
| `tb_crge_exhaustive10` | all 3,628,800 indices at n = 10 through the pipeline: every result valid, distinct and equal to the model (about 30 s) |
| `tb_crge_top` | the whole top at reduced sizes (n = 16, pipeline n = 6), all generators at once, and counts of each mechanism: marker completion, result hold, per-element stop, streaming and end of stream, back-to-back results, bubbles |
| `tb_crge_top_full` | the top at its default sizes: one 8192-element permutation from each sequential generator and 40 pipelined 32-element permutations |

`crge_ref_pkg` holds the reference model (rotate, then invert), random and
numbered indices, and a Lehmer-rank function used to prove distinctness;
`tb_crge_partial_run` is a helper instance used by `tb_crge_partial`.

Run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/crge_pkg.sv tb/crge_ref_pkg.sv tb/tb_crge_shiftreg.sv \
        --top-module tb_crge_shiftreg
    ./obj_dir/Vtb_crge_shiftreg

The packages must come first on the command line; every other module,
including the helper `tb_crge_partial_run`, is found by file name through
`-Irtl -Itb`. Sizes are
parameters of each module, so a different `n` only needs a different `#(.N())`.
At the default size (`tb_crge_top_full`, three 8192-element generators) the
C++ build takes a few minutes; the simulation itself takes seconds.

## Files

`rtl/`: `crge_pkg` (width function), `crge_fblock`, `crge_mblock`,
`crge_segment`, `crge_shiftreg`, `crge_partial`, `crge_distributed`,
`crge_throughput`, `crge_top`. `tb/`: the testbenches above,
`crge_ref_pkg` and `tb_crge_partial_run`.
