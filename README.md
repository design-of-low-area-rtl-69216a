# Parallel FIR filters with the fast FIR algorithm (FFA)

An L-parallel FIR filter takes L input samples per clock and delivers L
outputs, so it runs at L times the clock rate. Built the obvious way, by
polyphase decomposition, it needs L² sub-filters of N/L taps each, which
means L·N multipliers for an N-tap filter. The fast FIR algorithm (FFA) trades
multipliers for adders. One 2-parallel FFA step replaces four sub-filters with
three. Applied recursively, an L = 2^r parallel filter needs only 3^r
sub-filters instead of 4^r.

This repository holds synthesizable SystemVerilog for such filters at block
sizes 2, 4, 8 and 16. It is built the way the original article proposes: the
4-parallel filter is two cascaded 2-parallel FFAs, and the 8- and 16-parallel
filters apply the 2-parallel FFA three and four times. In every configuration
the block size equals the filter length (a "4-tap" filter is 4-parallel), so
each sub-filter is a single multiplier.

| filter | lanes L | taps N | multipliers | plain polyphase | sample-path adders |
|-------:|--------:|-------:|------------:|----------------:|-------------------:|
| 2-tap  | 2  | 2  | 3  | 4   | 4   |
| 4-tap  | 4  | 4  | 9  | 16  | 20  |
| 8-tap  | 8  | 8  | 27 | 64  | 76  |
| 16-tap | 16 | 16 | 81 | 256 | 260 |

The coefficient pre-adds (H0+H1 and so on) are extra: 1, 5, 19 and 65
adders. They are built in hardware because the coefficients are input ports.
With constant coefficients a synthesis tool folds them away.

## The 2-parallel FFA step

Split the input, the coefficients and the output into even and odd phases:
`X = X0 + z⁻¹X1`, `H = H0 + z⁻¹H1` and `Y = Y0 + z⁻¹Y1`. Here `z⁻¹` is one
sample at the full rate. Then

    Y0 = H0·X0 + z⁻² H1·X1
    Y1 = (H0+H1)·(X0+X1) − H0·X0 − H1·X1

Only three sub-filters are needed: `H0` on `X0`, `H0+H1` on `X0+X1`, and `H1`
on `X1`, each with half the taps and running at half the sample rate. The
`z⁻²` is one sample of a half-rate stream. The step is split over three
modules:

* `ffa2_pre` forms the phases and their sum. It is used twice per step, once
  for samples and once for coefficients. Each sum is one bit wider than its
  operands.
* The three sub-filters are either smaller FFA filters or, at the bottom of
  the recursion, `block_fir`.
* `ffa2_post` adds and subtracts the three results and interleaves the two
  phases back into one block.

## Lanes, and a one-sample delay on a parallel stream

This is the part that is easiest to get wrong. A block of L lanes holds
samples `L·k + 0 … L·k + L−1`, lane 0 first. One FFA step treats the even
lanes (0, 2, 4, …) as an L/2-lane block of the even-phase sequence, and the
odd lanes as an L/2-lane block of the odd-phase sequence. The sub-filters
see L/2-lane streams and recurse on them. In the 4-lane filter, the first
step groups lanes (0,2), (1,3) and (0+1, 2+3). Each group is a 2-parallel
FFA with its own H0 / H0+H1 / H1 sub-filters.

`ffa2_post` has to delay the stream `C = H1·X1` by one half-rate sample, and
C arrives as an M-lane block (M = L/2). The delay moves lane i−1 to lane i.
Lane 0 gets lane M−1 of the previous block, and that value is kept in a
single register. For M = 1 this is the familiar "D" of a 2-parallel FFA. The
output block is then:

    y[2i]   = A[i] + (i == 0 ? C_prev[M-1] : C[i-1])
    y[2i+1] = B[i] − A[i] − C[i]

So an L-lane FFA filter has one such register per `ffa2_post`: 1, 4, 13 and
40 for L = 2, 4, 8, 16. These registers, plus the sub-filter delay lines
when N > L, hold the filter's history across blocks.

## Arithmetic

Samples and coefficients are 8-bit two's-complement values. Every recursion
level widens the pre-added samples and coefficients by one bit. Products are
formed at full precision. Every post-add and every output is `YW = 8 + 8 +
log2(N)` bits wide, which holds the exact sum of N full-scale products.
Intermediate terms such as `(H0+H1)(X0+X1)` can exceed YW bits. They wrap
modulo 2^YW, and because the final result fits, the wrap-around cancels and
the output is exact. Nothing is rounded or saturated. The testbenches include
all-(−128) samples against all-(−128) coefficients, the largest output there
is.

## Interface and timing

`par_ffa_filter #(L, N, XW, HW, YW)` is the usable filter. It places the FFA
core between an input register and an output register.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | block clock: one block of L samples per cycle |
| `reset` | in | 1 | synchronous, active high; clears every register (history becomes zero) |
| `clk_enable` | in | 1 | when low, every register holds (a stall); nothing is lost |
| `x[L]` | in | XW each | lane l = x(L·k + l) |
| `h[N]` | in | HW each | h(0) … h(N−1); not registered, keep them steady while filtering |
| `y[L]` | out | YW each | lane l = y(L·k + l), registered |

A block applied before rising edge 1 is captured at that edge. Its outputs
appear after edge 2, i.e. in the third cycle counting the cycle in which it
was applied. Only edges with `clk_enable` high count. Throughput is one block
per enabled clock. Example (4-tap, h = 1,1,1,1, after reset): the input block
(2,2,1,1) followed by zeros gives (2,4,5,6), then (4,2,1,0).

`ffa_fir_top` places the 2-, 4-, 8- and 16-tap filters side by side. They
share `clk`, `reset` and `clk_enable`, and each has its own ports `x2/h2/y2`,
`x4/h4/y4`, `x8/h8/y8` and `x16/h16/y16`. The output widths are 17, 18, 19
and 20 bits.

## Module map

    ffa_fir_top
    └── par_ffa_filter  (x4: L = 2, 4, 8, 16)   input/output registers
        └── ffa16_fir → ffa8_fir → ffa4_fir → ffa2_fir   (one per level, 3 children each)
            ├── ffa2_pre   (samples, coefficients)
            ├── ffa2_post  (post-adds, one register)
            └── block_fir  (in ffa2_fir: N/2-tap sub-filter; one multiplier when N = L)
    ffa_pkg: default widths and the output-width function

The cores `ffa2_fir` … `ffa16_fir` are combinational from `x` to `y`, apart
from their history registers. Each takes a parameter `N`, which must be a
multiple of its lane count. With N > L, each `block_fir` becomes an N/L-tap
direct-form filter with a delay line at the block rate. This also works and
is tested (with N = 2L), but it is not one of the configurations the article
presents. Each level is a separate module rather than one recursive module,
so that every file can also be elaborated as a top module on its own.

## Where this departs from, or goes beyond, the source

* Widths of outputs and internal sums, signedness, synchronous reset,
  `clk_enable`, the register placement and unregistered coefficients are
  this design's choices. The article gives 8-bit example vectors, the signal
  names `clk`, `reset` and `clk_enable`, and outputs "in the third clock
  cycle". The rest is not specified.
* The 8-tap drawing in the article shows only four independent 2-parallel FFA
  groups. Those are the innermost level here. The two outer levels, which the
  equations require for a correct 8-tap result, were added. The 16-tap
  structure is not drawn at all; it is one more level of the same recursion.
* The article also compares 8- and 16-tap filters built from 4-parallel FFA
  blocks. It prefers the 2-parallel versions, which are the ones built. The
  conventional and the plain polyphase parallel filters it compares against
  are not included.
* A 3-tap FFA filter appears only in the article's results table. A
  3-parallel FFA needs its own equations, which are not given, so it is not
  built.
* Cost figures: the article's count of 9N/4 multipliers and 20 + 9(N/4 − 1)
  adders for the 4-parallel filter matches this structure (9 and 20). Its
  general formula 2N − N/L holds only for L = 2. The adder counts in its
  results table do not follow from the structure and were not used.
* The article's printed FFA simulation example (all inputs 1, outputs
  4, 0, 6, −2) is not consistent with y(n) = Σ h(k)x(n−k). The 4-parallel
  example given for the plain parallel filter, which computes the same
  function, is reproduced exactly instead.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_block_fir`, `tb_ffa2_pre`, `tb_ffa2_post`: the building blocks, against
  their equations, with random data, random stalls and a reset in the middle
  of the run.
* `tb_ffa2_fir`, `tb_ffa4_fir`, `tb_ffa8_fir`, `tb_ffa16_fir`: each core at
  N = L and N = 2L, checked every cycle against a direct convolution over the
  full-rate sample history.
* `tb_par_ffa_filter`: the example vector above with its exact cycle timing,
  then random runs of the 4-tap and an 8-lane/16-tap filter.
* `tb_ffa_fir_top`: all four filters at their default sizes for 2000 cycles,
  checked by `tb/filter_scoreboard.sv`. It counts stalls, mid-stream resets,
  coefficient changes and full-scale blocks, and fails if any of them never
  happened.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ffa_pkg.sv tb/tb_ffa_fir_top.sv --top-module tb_ffa_fir_top
    ./obj_dir/Vtb_ffa_fir_top

All testbenches pass and take well under a second each. Not verified: timing
closure, and the article's FPGA area and delay figures. The Verilator lint
reports that `clk`, `reset` and `clk_enable` are unused in a 1-tap
`block_fir` (it has no delay line), and that top product bits are unused
where YW is narrower than a full product. Both are expected.
