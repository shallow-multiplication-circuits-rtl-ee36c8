# Shallow carry-save multipliers

An N x N multiplier spends nearly all its logic adding N partial products.
The classic answer is a tree of 3-to-2 carry-save adders (a Wallace tree)
followed by one fast adder. The tree has logarithmic depth, and its constant
factor depends on how well the carry-save units fit together in time.

This RTL implements two carry-save units built with that timing in mind, the
bit adders inside them, and a network generator that places the units
according to when each of their inputs is actually needed:

* **CSA 6->3**, built from an **FA_{5,1}** cell (seven half adders and three
  merge gates). Of its six inputs, four are needed at once, one two gate
  delays later and one four gate delays later. A network of these units
  reaches depth about 3.56·log2 n gate delays. This is the variant for when
  XOR gates are allowed.
* **CSA 11->4**, built from an **FA_{7,4}** cell made only of AND-like gates
  (AND/OR/NAND/NOR with optional input inversions, no XOR). Its networks reach
  about 4.95·log2 n. This is the variant for when XOR gates are not allowed.

All figures are in the *unit-delay dyadic gate model*: every two-input gate
costs one time unit, wires are free, and inverting an input or output of an
AND-like gate is free. The RTL is purely combinational. It has no clock, no
reset and no handshake.

## Top level

`shallow_mult_top` (default `N = 32`) holds two independent unsigned
multipliers side by side:

| ports | multiplier |
|---|---|
| `a_xor`, `b_xor` -> `p_xor` | partial products, CSA 6->3 network, final adder |
| `a_and`, `b_and` -> `p_and` | partial products, CSA 11->4 network, final adder |

Each one is a `shallow_multiplier` with three stages:

1. `partial_products`: N rows, where row i is `(a & {N{b[i]}}) << i`, all
   2N bits wide.
2. `csa_network`: reduces the N rows to two numbers.
3. `cla_adder`: a Kogge-Stone parallel-prefix adder that adds the two numbers.

All numbers are 2N bits wide and the arithmetic is modulo 2^(2N). Nothing is
lost, because every intermediate number is at most the product.

## Bit adders and the carry-save units built from them

A *bit adder* takes input bits of given significances and outputs their sum
in binary. A carry-save unit is a row of identical bit adders, one per bit
position. No carry travels along the row, so the unit's delay does not depend
on the word width.

### FA3 and CSA 3->2 (`full_adder`, `csa_3to2`)

FA3 is the ordinary full adder. The CSA 3->2 puts the FA3 at position i on
`a[i]`, `b[i]` and `c[i]`. Its sum bit goes to `u[i]` and its carry to
`v[i+1]`, and `v[0] = 0`. In this design the CSA 3->2 only finishes off a
network (see below).

With `AND_LIKE = 1` the FA3 is built without XOR gates, for the AND-like
multiplier. Each XOR becomes `(x | y) & ~(x & y)`, three AND-like gates of
depth 2, and the carry is the majority `a·b | ci·(a | b)`. The sum is then
ready after 4 gate delays and the carry after 3. `cla_adder` has the same
option for its propagate and sum XORs.

### FA_{5,1} (`fa_5_1`, with `half_adder`)

Inputs: `x1..x5` of significance 0 and `x6` of significance 1. Output:
`y = x1+..+x5 + 2·x6` as three bits. Cell by cell:

```
level 1  HA(x1,x2) -> s1,c1          HA(x3,x4) -> s2,c2
level 2  HA(s1,s2) -> s3,c3          HA(c1,c2) -> s4 (sig 1), c4 (sig 2)
level 3  HA(x5,s3) -> y0, c5         m1 = c3 ^ s4            (sig 1)
level 4  HA(c5,m1) -> s6, c6
level 5  HA(x6,s6) -> y1, c7         m2 = c4 ^ c6            (sig 2)
level 6  y2 = m2 ^ c7
```

The three lone gates `m1`, `m2` and `y2` each join signals of the same
significance that can never be 1 together. For example, `c3 = 1` needs
`x1 != x2` and `x3 != x4`, which forces `c1 = c2 = 0` and so `s4 = 0`. So a
half adder in their place would always have carry 0. An XOR or an OR gives
the same result; the `MERGE_WITH_OR` parameter selects OR.

Depth from each input: y0 is 3 gates below x1..x4 and 1 below x5. y1 is 5
below x1..x4 and 1 below x6. y2 is 6 below x1..x4 and 2 below x6. So the cell
can accept **x5 at time 2 and x6 at time 4** and still deliver y0, y1 and y2
at times 3, 5 and 6.

### CSA 6->3 (`csa_6to3`)

The FA_{5,1} at position i takes `a[i] b[i] c[i] d[i] e[i]` and `f[i+1]`. It
drives `u[i]`, `v[i+1]` and `w[i+2]`. The one bit of `f` that no cell takes,
`f[0]`, goes directly into the free slot `w[0]`. `v[0]` and `w[1]` are 0.
Timing: a..d are needed at 0, e at 2 and f at 4; u is ready at 3, v at 5 and
w at 6.

### Symmetric-function blocks (`sym3_funcs`, `sym4_funcs`)

The AND-only cells are written with symmetric functions. `S_A` is 1 exactly
when the number of ones among its inputs lies in the set A. For example,
S_4567 over seven inputs is the majority function.

* `sym3_funcs` computes `U_A` over `u = (x1,x2,x3)`: U3, U03, U13, U23 and
  U123, plus the free complements U01, U02 and U12.
* `sym4_funcs` computes `V_A` over four bits: V1, V2, V3, V4, V13, V04, V34,
  V024, V234 and V1234.

Each formula is bracketed so that x1 reaches the output by a shorter path
than x2 and x3. For instance, `U13 = ~x1·(x2 xor x3) | x1·(x2 xnor x3)`,
where the xor/xnor terms are two-level AND/OR. The depths are written in each
file's header.

### FA7 (`khrapchenko_fa7`)

This is an older all-AND-like 7-input counter, included because the FA_{7,4}
is built from its parts. It splits the seven bits into u (3 bits) and v
(4 bits) and sums over the ways the total can be divided between them:

```
y0 = S1357 = U02·V13 | U13·V024
y1 = S2367 = (U23·V04 | U12·V1) | (U01·V2 | U03·V3)
y2 = S4567 = (U23·V234 | U123·V34) | (U3·V1234 | V4)
```

Depths are 6, 7 and 6. Input x1 may arrive late: 2, 2 and 1 gate delays late
for y0, y1 and y2 respectively.

### FA_{7,4} (`fa_7_4`) — the hardest part

Inputs: `s = x1..x7` of significance 0 and `t = x8..x11` of significance 1.
Output: `y = s + 2t` as four bits. S functions are of s, T functions of t
(`sym4_funcs` on x8..x11). Each output bit is a case split on t:

```
y0 = S1357
y1 = S0145·T13 | S2367·T024                              bit 1 of s, flipped if t is odd
y2 = (S4567·T04 | S2345·T1) | (S0123·T2 | S0167·T3)     bit 2 of s + 2t for each t mod 4
y3 = (S234567·T34 | S67·T1234) | T234·(S4567 | T4)      s + 2t >= 8
```

Here S0145, S0123 and S0167 are the free complements of S2367, S4567 and
S2345. The remaining S functions come from the FA7's U and V terms:

```
S234567    = U123·V1234 | (U23 | V234)
S67        = U23·V4 | U3·V34
S2345      = S234567 & ~S67
S4567 | T4 = (U23·V234 | U123·V34) | ((U3·V1234 | V4) | T4)
```

The key trick is in the last line. T4 is folded into the OR tree of S4567
instead of being ORed in at the end, so y3 is not held up. The resulting
timing is: **x2..x7 needed at 0, x1 at 1, x8..x11 at 2; y0 ready at 6, y3 at
8, y1 and y2 at 9**.

### CSA 11->4 (`csa_11to4`)

The FA_{7,4} at position i takes bit i of `x[0..6]` and bit i+1 of
`x[7..10]`. `x[0]` is the late x1 input. The cell drives `y0[i]`, `y1[i+1]`,
`y2[i+2]` and `y3[i+3]`.

Bit 0 of the four significance-1 numbers would be left over. That is four
bits of weight 1, but the outputs have only three free weight-1 slots. This
design adds them with one extra FA_{7,4} at position -1, whose seven
significance-0 inputs are tied to 0. That cell's y0 is always 0 (an
assertion checks this), and its y1, y2 and y3 land in `y1[0]`, `y2[1]` and
`y3[2]`.

## Planning the network (`csa_network`, `shallow_pkg::csa_schedule`)

Because a unit needs some of its inputs later than others, the best network
is not a layered tree. Units should be started ("based") early and fed their
late inputs from other units' outputs as those appear.

The underlying theory works like this. Describe a unit by its characteristic
polynomial: sum of z^(output times) minus sum of z^(input times). Its
smallest real root λ > 1 sets the asymptotic depth of the best network,
log_λ n. For the two units:

| unit | polynomial | λ | depth |
|---|---|---|---|
| CSA 6->3 | z^6 + z^5 - z^4 + z^3 - z^2 - 4 | 1.21486 | 3.56·log2 n |
| CSA 11->4 | 2z^9 + z^8 + z^6 - 4z^2 - z - 6 | 1.15041 | 4.95·log2 n |

`csa_schedule()` is a constant function run once per network instance. It
returns a table that the generate loops of `csa_network` wire up. The
algorithm:

* Every number (an input or a unit output) has a ready time. Inputs are ready
  at 0.
* Time t steps forward one gate delay at a time. At each t, a copy of the main
  unit is based whenever every input slot can be filled. A slot with input
  time x can take an unused number that is ready by t + x. Slots are filled in
  order of their times, latest first, each with the latest-ready number that
  still fits. This keeps early numbers for the early slots.
* A based unit's outputs become new numbers, ready at t + (output time).
* Once fewer numbers remain than the main unit takes, CSA 3->2 units (sum at 2
  gate delays, carry at 3) reduce them to two.

The localparam `DEPTH` of each network is the planned ready time of its two
results. The planned depths, against the asymptotic term log_λ n:

| inputs | CSA 6->3 | log_λ n | CSA 11->4 | log_λ n |
|---|---|---|---|---|
| 32 | 20 | 17.8 | 28 | 24.7 |
| 100 | 26 | 23.8 | 37 | 33.0 |
| 128 | 28 | 24.9 | 38 | 34.6 |

The planned networks stay within a small constant of the asymptotic term.
A CSA 11->4 network finishes with AND-like CSA 3->2 units, which are slower
than the XOR ones. `N_IN` may be 1 to 128.

## How far to trust it, and where it departs from the construction

* **Function:** checked exhaustively for every bit adder and symmetric-function
  block, and for both 8 x 8 multipliers. The wider units, networks and
  multipliers (13 and 32 bits) are checked on random and corner operands.
* **Depth and timing:** the RTL has no gate delays, so simulation does not
  check timing. Instead, the cells were mapped one-to-one to two-input gates
  and analysed statically, with inverters free and inputs arriving at the
  times given above. This analysis gives exactly the stated timing:
  * FA_{5,1}: outputs at 3, 5 and 6;
  * CSA 6->3: u, v and w at 3, 5 and 6;
  * FA_{7,4}: y0..y3 at 6, 9, 9 and 8;
  * FA7: depths 6, 7 and 6, unchanged with x1 one gate delay late.

  The network's `DEPTH` is computed from these unit timings. It is not a
  timing analysis of the whole multiplier. A synthesis tool will restructure
  the logic, so the depths describe the netlist as written, in the unit-delay
  model, not a synthesized circuit.
* **Own choices, not from the source construction:**
  * the greedy network planner (the source gives an asymptotic construction
    and mentions an optimal polynomial-time planner without giving it);
  * the CSA 3->2 tail and its FA3 timing;
  * the extra low slice of the CSA 11->4;
  * AND-gate partial products (unsigned, no Booth recoding);
  * the Kogge-Stone final adder (only "a carry look-ahead adder" is
    specified);
  * the default widths (N = 32, unit WIDTH = 32).
* The CSA 11->4 multiplier uses AND-like gates only. Its CSA 3->2 tail and
  its final adder are built in their AND-like forms, and mapping the
  multiplier to two-input gates gives only AND, OR and inverters.

## Files

| file | content |
|---|---|
| `rtl/shallow_pkg.sv` | `csa_kind_e`, the U/V function structs, unit timings, `csa_schedule()` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | HA, FA3 |
| `rtl/fa_5_1.sv`, `rtl/csa_6to3.sv` | FA_{5,1} and CSA 6->3 |
| `rtl/sym3_funcs.sv`, `rtl/sym4_funcs.sv`, `rtl/khrapchenko_fa7.sv`, `rtl/fa_7_4.sv`, `rtl/csa_11to4.sv` | AND-like family |
| `rtl/csa_3to2.sv`, `rtl/csa_network.sv` | CSA 3->2, network |
| `rtl/partial_products.sv`, `rtl/cla_adder.sv`, `rtl/shallow_multiplier.sv`, `rtl/shallow_mult_top.sv` | multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
They use `#` delays, so build them with `--timing`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/shallow_pkg.sv tb/tb_shallow_mult_top.sv --top-module tb_shallow_mult_top
./obj_dir/Vtb_shallow_mult_top
```

`tb_shallow_mult_top` runs both 32-bit multipliers at their default size on
20,000 operand sets in under a second. It also counts three events and fails
if any never occurs:

* the f[0] bypass of a CSA 6->3 carrying a 1;
* the extra low slice of a CSA 11->4 seeing a nonzero input;
* a carry chain of 16 or more bits in each final adder.

To change the size, set `N` on `shallow_mult_top` (3 to 128). To change the
unit, set `KIND` on `shallow_multiplier` or `csa_network`.
