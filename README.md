# Threshold-gate networks for periodic symmetric functions, serial addition and serial multiplication

A linear threshold gate ("neural gate") outputs 1 when a weighted sum of its
inputs reaches a threshold. A symmetric Boolean function depends only on how
many of its inputs are 1. That count is a weighted sum with all weights 1. So
one threshold gate can decide "x >= t", and a small feedforward network of such
gates can compute any function of x.

This library builds these networks in synthesizable SystemVerilog. All of them
use one structure: a chain of gates in which every gate sees all inputs plus
the outputs of every gate above it. With the right weights and thresholds:

- the chain computes a **periodic** symmetric function (parity is one) with
  `1 + ceil(log2(ceil((n-a)/T) + 1))` gates;
- the chain is an **n|r counter**, because each bit of a binary count is a
  periodic function of the count;
- with a latch stage in front of every level, the counter becomes the core of a
  **delta-bit serial adder** and a **block-serial multiplier**. The counter
  yields its most significant bits first, and those bits are the carries.

Everything is modelled at gate level: each neural gate is a `threshold_gate`
instance with integer weights, and the network's weights and thresholds are
computed at elaboration.

## The level structure, and how thresholds place transitions

This is the part to understand first; every other module is built on it.

Number the gates by level, `0` (top) to `R-1` (bottom). Gate `l` computes

    y_l = [ sum_i w_i*x_i  +  sum_{j<l} v_j*y_j  >=  psi_l ]

Every gate gets the same data weights `w`. The output of level `j` enters
every later gate with the same weight `v_j`, which is negative. Suppose an
upper gate fires at some count. From then on, the gates below see the count
reduced by `|v_j|`. Their thresholds therefore "restart" at `psi + |v_j|`. With
`R` levels, the bottom gate sees `2^(R-1)` effective thresholds, one per
combination of upper outputs, so it can have up to `2^(R-1)` rising edges as `x`
goes from 0 to n.

**Counter** (`nr_counter`, `pipelined_counter`). Level `l` has threshold
`2^(R-1-l)`, and each output enters the gates below with weight
`-2^(R-1-j)`. Level 0 decides whether `x >= 2^(R-1)`, i.e. the MSB. Level 1
sees `x - 2^(R-1)*MSB` and extracts the next bit, and so on. This is
binary long division by powers of two, done by thresholds. Bit `S_i` is ready
after `R-i` gate delays, so the MSB is ready first. With data weights `2^k`
instead of 1, the same network adds binary numbers.

**Periodic function** (`periodic_symmetric_net`). The function is 1 on
`[a+kT, b+kT-1]`. Number the gates `i = 1..R` from the top. Then:

- the bottom gate's threshold is `a`;
- the threshold of gate `R-1` is `b`;
- going upward, `psi_i = psi_(i+1) + T*2^(R-(i+2))`;
- gate `i` feeds every gate below it with weight `-T*2^(R-(i+1))`.

The bottom gate then has rising edges at `a + kT` for every `k` up to
`2^(R-1)-1`. The gate above it falls back at `b + kT`. For `T = 2, a = 1, b = 2`
this is parity, and its upper gates are the counter bits.

**Cutoff** (`symmetric_cutoff_net`). This module builds a function that follows
the pattern only up to `x = K` and is constant after that. The chain is sized
for `K` inputs, and on its own it would keep oscillating above `K`. One extra
gate detects `x >= K+1` and feeds the bottom gate with weight `+N` or `-N`.
This forces the output to 1 or to 0, whichever the pattern has at `K`.
Shifting every threshold by `a` moves the function's first rising edge to
`x = a`, and no gate needs to be added.

**OR of periodic parts** (`multi_periodic_net`). Some symmetric functions are
an OR of a few periodic functions with different periods. Each part gets its
own chain, and one more gate (weights 1, threshold 1) ORs the parts. Size and
depth stay logarithmic in n while the number of parts is fixed.

## The serial adder

`serial_adder` adds two N-bit operands that arrive LSB first, `DELTA` bits of
each per clock, with `DELTA = K*ceil(log2 N)`. This choice keeps the largest
weight at `2^DELTA`, which is polynomial in N.

One `pipelined_counter` with `DELTA+1` levels sums the following inputs:

- `a_blk`, bit `i` with weight `2^i`;
- `b_blk`, bit `i` with weight `2^i`;
- a carry-in bit with weight 1.

The result is a `DELTA+1`-bit number. Its MSB is the block's carry-out, and it
comes from the very first level, one stage after the block enters. That output
is fed back to the carry-in latch as the next block pair is loaded, so the
adder accepts one block pair every cycle.

    cycle:      0      1      2    ...   DELTA+1
    block 0:   in    lvl1   lvl2   ...   out
    block 1:          in    lvl1   ...         out        (carry from block 0, level 0)

- Latency per block: `DELTA+1` cycles.
- An addition of `ceil(N/DELTA)` block pairs: the last result comes
  `DELTA + ceil(N/DELTA)` cycles after the first block was loaded.
  At the default N = 32, DELTA = 5, that is 12 cycles.
- `in_first` marks the first block of an addition. That block takes its carry
  from `cin`.
- A cycle with `in_valid` low is a bubble. The input latch keeps its block, so
  the fed-back carry stays correct.
- `out_carry` of the last block is sum bit N.
  If N is not a multiple of DELTA, the sum bits above N in the last block are 0.

Data latches: `2*DELTA+1` at the input, `2*DELTA+1+i` between levels `i-1` and
`i`, and `DELTA+1` at the output, `(5*DELTA^2 + 9*DELTA)/2 + 2` in all. That is
87 at the defaults. Valid and tag bits come on top of that.

## The serial multiplier

`serial_multiplier` computes an `N x N -> 2N` product. It cuts the
partial-product matrix into column blocks of `L = ceil(log2 N)` columns.

- **Inputs of one block sum.** Block `j` holds `N*L` partial products:
  `a_(jL+c-i) & b_i`, where `c` is the column inside the block, `i` is the row,
  and the weight is `2^c`. The `L` carries of block `j-1` are added with weights
  `2^0 .. 2^(L-1)`.
- **Range.** The sum is at most `(N+1)(2^L-1) <= N^2-1`, so it fits in `2L`
  bits. This requires `N <= 2^L`, which an elaboration-time assertion checks.
- **The counter.** One `pipelined_counter` has `(N+1)L` inputs and `2L` levels.
  Its low `L` bits are product bits `jL .. jL+L-1`. Its high `L` bits come from
  the first `L` levels and are the next block's carries.
- **Cycles per block.** The carries are complete `L` cycles after a block
  enters, so a new block enters every `L` cycles.
- **Cycles per product.** A product takes `L*ceil(2N/L) + L` cycles from its
  first block to its last result. When `L` divides `2N` this is `2N + log2 N`:
  36 cycles at N = 16. At N = 32 it is 70, one more than `2N + log N`.

Operands arrive LSB first, `L` bits of each per block, over `ceil(N/L)`
blocks. Block `j` only needs operand bits below `(j+1)L`, so reduction starts
with the first operand block. The operands are kept in latches for the later
blocks. There is an `in_valid`/`in_ready` handshake:

- `in_ready` is high in the cycle a block may enter.
- If an operand block arrives late, the carries wait in a latch, and the block
  enters when it comes.
- A new product may start in the cycle after the previous product's last block
  entered.

Results come out one `L`-bit block at a time, LSB block first, marked by
`out_first` and `out_last`. Each result block appears `2L` cycles after its
block entered. A simulation assertion checks that nothing carries out of
the last block, since the product fits in 2N bits.

## Interfaces and timing summary

| module | kind | latency | throughput |
|---|---|---|---|
| `threshold_gate` | combinational | 1 gate | - |
| `kautz_net` (helper) | combinational | R gates | - |
| `periodic_symmetric_net` | combinational | R gates | - |
| `symmetric_cutoff_net` | combinational | R_K gates | - |
| `multi_periodic_net` | combinational | max R_i + 1 gates | - |
| `nr_counter` | combinational | 1 + ceil(log2 N) gates | - |
| `pipelined_counter` | pipelined | R cycles | 1 vector / cycle |
| `serial_adder` | pipelined | DELTA+1 cycles per block | 1 block pair / cycle |
| `serial_multiplier` | pipelined | 2L cycles per block | 1 block / L cycles |
| `neural_arith_top` | all of the above side by side | | |

Both sequential units use one rising-edge clock and a synchronous active-low
reset, `rst_n`, which clears all latches. Each file opens with a comment that
describes its ports.

`neural_arith_top` has one example instance of each design, each with its own
ports:

- a periodic function: N = 16, a = 2, b = 4, T = 5;
- a cutoff version of the same function, with K = 12;
- an OR of the parts (1,2,4) and (3,5,7);
- a 16-input counter;
- a 32-bit serial adder;
- a 32-bit serial multiplier.

## Where this RTL goes beyond, or differs from, the construction

- **Sizes.** The construction is stated for a general n. The defaults
  (N = 16 for the networks, N = 32 for the adder and multiplier, K = 1, and
  the example functions) are choices of this implementation. Logarithms are
  base 2, rounded up.
- **The gate.** The gate is a digital model with integer weights and a 32-bit
  sum. Analog threshold devices are not modelled.
- **Multiplier interface.** These parts are this design's own:
  - operand reception, L bits per block, and the operand latches;
  - the AND gates that form the partial products;
  - the in_valid/in_ready handshake;
  - the carry latch for late operands.
  The construction assumes the matrix and the operands are simply available
  on time.
- **Multiplier weights and fan-in.** The largest weight is `2^(2L-1)`, which
  is `N^2/2`, inside the `N^2` bound. The bottom gate's fan-in is
  `(N+1)L + 2L - 1`: the gates above it number `2L-1`, not `2L`.
- **Multiplier delay when L does not divide 2N.** There are `ceil(2N/L)`
  blocks, so at N = 32 a product takes 70 cycles rather than `2N + log N = 69`.
- **Adder framing.** `in_first`, bubbles, and back-to-back additions through
  the same pipeline are framing added by this design. The construction streams
  one addition.
- **Cutoff net.** Here the cutoff is applied to a periodic chain sized for
  `[0, K]`. The technique works for a network of any restriction, but a general
  construction for an arbitrary restriction is not part of this library.
  The cutoff weight defaults to N.
- **Not built.** Periodic functions with more than two transitions per period
  have no direct construction here, because the network for the first period is
  not specified. Such functions can be built as an OR of two-transition parts
  with `multi_periodic_net`, when that decomposition exists.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Networks** (`tb_threshold_gate`, `tb_periodic_symmetric_net`,
  `tb_nr_counter`, `tb_symmetric_cutoff_net`, `tb_multi_periodic_net`). Every
  count of ones 0..N is applied, through random input vectors with exactly that
  many ones, in several configurations. The results are compared with the
  closed-form definitions: `x >= a and (x-a) mod T < b-a`, the count itself,
  the value at K, or the OR of the parts. The threshold gate is checked
  exhaustively.
- **`tb_pipelined_counter`.** Random weighted vectors with gaps. It checks the
  sums, the R-cycle latency, the tags, and that the MSB is visible one stage
  after entry.
- **`tb_serial_adder`** (N = 32 with DELTA = 5, N = 16 with DELTA = 8, and
  N = 64 with DELTA = 6).
  Random and carry-chain additions, bubbles and back-to-back additions. It
  checks every sum, every block's latency, and the `DELTA + ceil(N/DELTA)`
  delay.
- **`tb_serial_multiplier`** (N = 32, 16, 8 and 64). Random products and all-ones
  products, late operand blocks and back-to-back products. It checks every
  product, the `2L` block latency, the spacing of at least L cycles between
  blocks, and the `L*NB + L` product delay.
- **`tb_neural_arith_top`.** Runs the whole top at its default parameters.
  Each mechanism must happen at least once:
  - the cutoff forcing the output;
  - a fed-back carry of 1;
  - a bubble;
  - back-to-back additions;
  - nonzero multiplier carries;
  - the carry latch;
  - back-to-back products.

All testbenches use only `$urandom` and need no data files. `tb/sym_vec.svh` is
a shared macro that builds a random vector with a given number of ones.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -I. \
        rtl/neural_pkg.sv tb/tb_neural_arith_top.sv --top-module tb_neural_arith_top
    ./obj_dir/Vtb_neural_arith_top

Replace the testbench name to run any other testbench. Modules are found
through `-Irtl`/`-Itb` by file name, one module per file. To change a size,
override the parameters: `N`, `A`, `B`, `T` and `K` on the networks, `N` and
`K` (or `DELTA`) on the adder, and `N` (or `L`) on the multiplier. Elaboration
asserts check the parameter ranges.
