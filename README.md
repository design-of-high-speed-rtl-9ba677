# High-speed parallel-prefix adders, a Kogge-Stone Ling adder and two of its applications

Binary addition is slow because a carry may have to travel across every bit.
Parallel-prefix adders break that chain: they compute, for every bit, whether
the group of bits below it *generates* a carry or *propagates* one, combining
groups in a tree of about log2 N levels. This RTL contains five such adders
and two circuits built on the fastest of them:

| Module | What it is |
|---|---|
| `kogge_stone_adder` | Kogge-Stone tree: log2 N levels, fanout 2, most cells |
| `brent_kung_adder` | Brent-Kung tree: 2 log2 N - 1 levels, fewest cells |
| `sklansky_adder` | Sklansky (divide and conquer): log2 N levels, fanout doubling per level |
| `han_carlson_adder` | Han-Carlson: Kogge-Stone on the odd bits plus one level for the even bits |
| `ks_ling_adder` | Kogge-Stone tree computing **Ling carries** instead of ordinary carries |
| `ling_adder_wide` | wide Ling adder chained from 16-bit `ks_ling_adder` blocks |
| `comparator_unsigned`, `comparator_signed` | magnitude comparators that subtract on the Ling adder |
| `lattice_filter` | third-order IIR lattice filter whose nine adders are 32-bit Ling adders |
| `hs_adders_top` | all of the above side by side |

Everything is combinational except the three delay registers of the filter.

## Generate, propagate and the two prefix cells

Each bit first passes through `bit_pg_cell`:

    g = a AND b      (this bit generates a carry)
    p = a OR  b      (this bit passes an incoming carry on)
    d = a XOR b      (half sum)

A *group* i:j of bits has a generate G(i:j) and a propagate P(i:j). Two
adjacent groups i:k and k-1:j merge with the prefix operator

    G(i:j) = G(i:k) + P(i:k) . G(k-1:j)
    P(i:j) = P(i:k) . P(k-1:j)

`black_cell` computes both; `gray_cell` computes only G and is used where the
lower group already reaches the carry in, because from then on the group
propagate is never needed. The pair {G,P} travels as the packed struct
`adder_pkg::gp_t`.

After the tree, G(i:0) is the carry out of bit i, so sum bit i is
`d(i) XOR G(i-1:0)`. OR is used for the propagate inside the tree (it is
equivalent there and is what the cells use); the sum therefore uses the
half sum d, not p.

### Carry in

All adders have a carry in. Before the tree, a gray cell merges it into the
generate of bit 0: G(0:-1) = g_0 + p_0 . cin. Position 0 then already holds
its own carry out, the tree needs no extra position, and sum bit 0 is
d_0 XOR cin. The tree depths below are therefore those of an adder without a
carry in (for example 4 levels for a 16-bit Kogge-Stone adder), and the same
adder subtracts with `b` inverted and `cin = 1`.

## The four conventional trees

All four modules build a two-dimensional array `t[level][position]` of
`gp_t`; on each level a position either passes its pair on or gets a gray or
black cell. They differ only in which positions combine on which level:

* **Kogge-Stone**: on level l every position i >= 2^l combines with i - 2^l.
  log2 N levels, each cell drives two others.
* **Sklansky**: on level l, positions are split into blocks of 2^(l+1); every
  position in the upper half of a block combines with the top position of the
  lower half. Same depth as Kogge-Stone, fewer cells, but the fanout doubles
  on each level.
* **Brent-Kung**: an up-sweep forms the prefixes of groups of 2, 4, 8, ...
  positions; a down-sweep of one level fewer fans them back into the
  positions in between. 2 log2 N - 1 levels, fewest cells.
* **Han-Carlson**: the first level pairs each odd position with the even one
  below it, a Kogge-Stone tree then runs on the odd positions only, and a last
  level of gray cells hands every odd result to the even position above it.
  log2 N + 1 levels.

For N = 16 a coarse synthesis gives roughly 198 (Kogge-Stone), 147
(Sklansky), 147 (Han-Carlson) and 129 (Brent-Kung) word-level gates, which
shows the usual ordering of the trees by size. Delay, power and transistor
counts depend on the cell library and are not modelled here.

## The Kogge-Stone Ling adder

This is the part that takes the most thought.

### Ling carries

Let c_i be the ordinary carry out of bit i. Ling's idea is to compute instead

    H_i = g_i + g_(i-1) + p_(i-1) g_(i-2) + p_(i-1) p_(i-2) g_(i-3) + ...

which is related to the carry by `c_i = p_i . H_i`. H_i has one AND term less
in each product than c_i (for bit 4 the carry needs five levels of two-input
gates, H_4 only four), so the tree is faster; the missing factor p_i is put
back when the sum is formed.

### Two interleaved trees

Define for each position the pair values (`ling_pg_cell`)

    G*_i = g_i + g_(i-1)
    P*_i = p_i . p_(i-1)

Then H_i is an ordinary prefix, but over every *second* position:

    H_i = (G*_i, P*_(i-1)) o (G*_(i-2), P*_(i-3)) o (G*_(i-4), P*_(i-5)) o ...

For example H_4 = G*_4 + P*_3 G*_2 + P*_3 P*_1 G*_0. The even positions and
the odd positions thus form two independent prefix problems, each half as
long. `ks_ling_adder` solves both with one Kogge-Stone array whose distances
are 2, 4, 8, ... instead of 1, 2, 4, ...: a cell at position i always meets a
position of the same parity. The leaves are (G*_i, P*_(i-1)); nothing lies
below bit 0. Each parity tree has log2 N - 1 levels, one fewer than the
ordinary Kogge-Stone tree for the same width (3 instead of 4 at 16 bits).

### Sum selection

Because the true carry into bit i is `p_(i-1) . H_(i-1)`,

    s_i = H_(i-1) ? (d_i XOR p_(i-1)) : d_i

`ling_sum_cell` is this two-way multiplexer. The XOR of d_i and p_(i-1) is
ready long before H arrives, so the mux costs about as much as the final XOR
of an ordinary adder. The carry out is `p_N . H_N`.

The carry in is merged into g_0 as in the other adders; since
g_0 + p_0 . cin still implies p_0, the relation c_i = p_i . H_i keeps
holding, and sum bit 0 is simply d_0 XOR cin.

### Wider Ling adders

`ling_adder_wide` places N/BLK blocks of the 16-bit Ling adder side by side
and passes each block's carry out to the next block's carry in. The default
is the 32-bit adder (two blocks); `N = 64` gives the 64-bit adder. N must be a
multiple of BLK (elaboration stops otherwise). The chaining between blocks is
a plain ripple of block carries; a faster join (a second-level prefix over the
block carries) would be a design change.

## Magnitude comparators

Both comparators compute `B - A = B + ~A + 1` on an 8-bit `ks_ling_adder` and
detect a zero difference with a NOR over the sum (Z).

* **Unsigned** (`comparator_unsigned`): a carry out C = 1 means A <= B, so
  `agtb = ~C`, `equal = Z`, `altb = C & ~Z`.
* **Signed** (`comparator_signed`): the sign N of the difference can be wrong
  when the subtraction overflows. Overflow V happens when A and B have
  different signs and the difference's sign differs from B's sign. The true
  sign is `S = N XOR V`; S = 1 means A > B. So `agtb = S`, `equal = Z`,
  `altb = ~S & ~Z`. The carry out is not needed here.

Exactly one of the three outputs is high for every input pair.

## Third-order lattice filter

The filter shows the Ling adder inside a clocked block: every one of its nine
additions is a 32-bit `ling_adder_wide`, so the adder's delay sets the clock
period. Samples are 32-bit two's complement integers. With delay registers
s1, s2, s3, each cycle computes

    f1 = x  - s1        g1 = f1/2 + s1
    f2 = f1 - s2        g2 = f2/2 + s2
    f3 = f2 - s3        g3 = f3/2 + s3
    y  = g1/2 + g2/2 + g3/2 + f3/2

and then loads `s1 <= g2`, `s2 <= g3`, `s3 <= f3`. So the forward chain
subtracts one delayed value per stage, each stage's backward value g goes
into the delay of the stage before it (the last forward value f3 into the
last delay), and the output is the sum of four halved taps.

* A subtraction is the Ling adder with the subtrahend inverted and carry in 1
  (the coefficient -1 of the structure). Halving is an arithmetic right shift
  (rounds towards minus infinity). All arithmetic wraps modulo 2^32; no
  saturation.
* Timing: x to y is combinational (up to six adders deep); the delays load on
  the rising edge of `clk`; `rst` is synchronous and active high and clears
  the delays.
* The coefficients are fixed (0.5 and -1). With these connections the
  filter's poles lie on the unit circle, so an impulse response does not die
  out; inputs of large amplitude will wrap. Treat the filter as a vehicle for
  the adder rather than as a tuned filter, and see the notes below on how the
  structure was read.

## Top level

`hs_adders_top` has parameters `FW = 32` (filter width), `CN = 8`
(comparator width) and `AN = 16` (width of the stand-alone adders). Its ports
are grouped by prefix: `clk`, `rst`, `flt_x`, `flt_y` for the filter;
`cu_*` and `cs_*` (a, b, agtb, altb, equal) for the unsigned and signed
comparators; `ks_*`, `bk_*`, `sk_*`, `hc_*`, `ln_*` (a, b, cin, sum, cout) for
the Kogge-Stone, Brent-Kung, Sklansky, Han-Carlson and Ling adders. The parts
share no signals.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| the four trees, `ks_ling_adder` | `N` | 16 | any N >= 2; 8, 16 and 32 are tested |
| `ling_adder_wide` | `N`, `BLK` | 32, 16 | N a multiple of BLK; 32 and 64 tested |
| comparators | `N` | 8 | 8 and 16 tested |
| `lattice_filter` | `W` | 32 | adder width = sample width |

## Simulation

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl rtl/adder_pkg.sv tb/ks_ling_adder_tb.sv \
              --top-module ks_ling_adder_tb
    ./obj_dir/Vks_ling_adder_tb

`adder_pkg.sv` must be read first; the other files are found through `-Irtl`.

* Cells: exhaustive truth tables.
* Adders: 8-, 16- and 32-bit instances (32 and 64 for `ling_adder_wide`)
  against the simulator's own `+`, with carries started and stopped at every
  bit and 20000 random operand pairs; the tree depth of each instance is
  checked against the level count given above.
* Comparators: all 65536 8-bit operand pairs against `>`, `<`, `==` (signed
  and unsigned), plus a 16-bit instance on random pairs.
* Filter: a reference model in integer arithmetic checks `y` every cycle
  through an impulse, a sampled sine wave, full-range random samples (which
  make the sums wrap) and a reset in mid-run.
* `hs_adders_top_tb` runs the whole top at its default sizes for about 2400
  cycles, checks every output each cycle, and fails if any of these never
  happened: filter wrap-around, mid-run reset, each comparator outcome, a
  signed comparison whose subtraction overflows, carry in and carry out on
  every adder.

All testbenches pass and finish in well under a second.

## Where this RTL departs from or goes beyond its source

The adder equations, the cell set, the five tree topologies, the Ling
formulation with two interleaved trees, the 16-bit block and its use for
32/64 bits, the comparator method and the filter's structure and
coefficients come from the published design. The following are choices made
here:

* A carry in on every adder, merged into bit 0 by a gray cell.
* Sum formed with the half sum d (the source's general formula writes the
  sum with p while defining p as OR, which only works for an XOR propagate).
* The wide Ling adder joins its 16-bit blocks with a simple carry chain.
* The comparators are 8 bits wide and use the Ling adder; a reduction NOR is
  the zero detector, and the adder's carry in is tied to 1 inside rather than
  brought out as a pin.
* The filter's number format (32-bit integers), halving by shift, wrap-around
  arithmetic and synchronous reset. The filter's connections were read from a
  block diagram without accompanying equations; the reading (which values
  feed which delay, and which taps feed the output) could not be
  cross-checked against equations, and the resulting poles on the unit
  circle suggest the intended filter may differ in some connection or
  coefficient.
* Not modelled: the transistor-level CMOS and transmission-gate versions of
  the cells, and all area, power and delay figures; the ripple-carry adder
  that served only as a baseline.
