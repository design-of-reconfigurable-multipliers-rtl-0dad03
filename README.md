# Reconfigurable integer / GF(2^8) multipliers with Shannon-adder cells

Many DSP and communication workloads need two kinds of multiplication.
Filters and transforms need unsigned integer products. Error-correcting codes
and ciphers need products in the Galois field GF(2^8). The two share their
first step. Both form the partial products `a_i & b_j` and add them up by
weight. The difference is that GF addition is XOR: no carries. Integer
addition keeps the carries. So one array of cells can do both jobs if its
carries can be switched off.

This library holds three such multipliers. Each takes two 8-bit operands, an
8-bit generator polynomial and a mode bit `conf`, and gives a 16-bit result:

| multiplier    | how partial products are summed                     | integer final stage         |
|---------------|-----------------------------------------------------|-----------------------------|
| `csa_mgf_mul` | carry-save array, 8 x 8 reconfigurable cells        | 8-bit ripple carry adder    |
| `ba_mgf_mul`  | Braun array, 7 x 7 reconfigurable cells             | 7-bit ripple carry adder    |
| `wt_mgf_mul`  | Wallace tree of carry-save stages                   | 17-bit ripple carry adder   |

Every adder in all three is built from the same Shannon-expanded full adder.
All three use the same GF reduction array. All three are purely
combinational: there is no clock, and the result settles after the
propagation delay.

## The result word

| `conf`       | `m[15:8]`                                  | `m[7:0]`                          |
|--------------|--------------------------------------------|-----------------------------------|
| 1 (integer)  | high byte of `a * b`                       | low byte of `a * b`               |
| 0 (GF)       | `{0, q[14:8]}`, the high part of `q(x)`    | `q(x) mod (x^8 + p(x))`           |

Here `q(x) = a(x) * b(x)` is the carry-less product: polynomial
multiplication with XOR as addition, degree at most 14.

`p` holds the coefficients `g_0..g_7` of the generator polynomial. The
`x^8` term is implicit. For example, `p = 8'h1D` is
x^8 + x^4 + x^3 + x^2 + 1, and `p = 8'h1B` is the AES field. Because `p` is an
input, one circuit serves every field of the form GF(2^8).

Reference values, taken from simulations of the original design and
reproduced by this RTL (`p = 1d`):

| a  | b  | `conf=1` | `conf=0` |
|----|----|----------|----------|
| 5d | d0 | 4b90     | 3cc6     |
| 60 | d5 | 4fe0     | 2fdc     |
| 63 | da | 544e     | 2cb5     |
| 66 | df | 58da     | 2ec3     |

The GF-mode upper byte is not specified anywhere except by these simulation
values. The first three GF results above fix it as the high part of `q`.

## The Shannon full adder (`shannon_fa`)

By Shannon's expansion theorem, a function can be written as a choice between
its value with one input at 0 and its value with that input at 1. The adder
expands both outputs around the carry input:

    sum  = cin ? ~(a ^ b) : (a ^ b)
    cout = cin ?  (a | b) : (a & b)

The late-arriving carry then only drives the final selection. The carry form
is the same as the majority function. The design does not say which input is
expanded; `cin` is this implementation's choice.

## The reconfigurable cell (`rcfg_cell`)

    pp       = a & b
    ci_gated = ci & conf
    {co, so} = si + pp + ci_gated      (Shannon full adder)

With `conf = 1` the cell is an ordinary multiplier-array cell. With
`conf = 0` it reduces to `so = si ^ (a & b)`, the AND-XOR cell of a
carry-less multiplier. The only cost is one AND gate. `co` is not gated. In
GF mode every cell that reads it gates it, and the final adder's output is
discarded.

## The two arrays (`csa_pps`, `ba_pps`)

Indexing: cell `(i, j)` sits in row `j`, column `i`. It has weight `i + j`
and adds `a_i & b_j`.

- **Carry-save array.** There are N rows of N cells. A cell takes its sum
  from cell `(i+1, j-1)`, which has the same weight. It takes its carry from
  cell `(i, j-1)`, one weight lower. Row 0 and the leftmost column take 0.
  Product bit `j` comes from the rightmost cell of row `j`. The last row
  leaves sums of weights 8..14 and carries of weights 8..15. The merging adder
  adds them.
- **Braun array.** Row 0 is only the AND gates `a & b_0`. The leftmost
  partial products `a_7 & b_j` skip the array and enter the next row as
  sums. That leaves 7 rows of 7 cells and a 7-bit merging adder. The adder's
  carry out is product bit 15.

In GF mode, both arrays deliver the carry-less product `q` on their sum
outputs. Each array's outputs are:

- `s[2N-2:0]`: the low product bits, then the last row's sums.
- `c`: the last row's carries.

## The Wallace-tree version (`wt_pps`, `wallace_tree`)

A tree adds all rows in parallel, so there is no row of cells whose carries
could simply be gated. The work is split in two instead:

- **`wt_pps`** forms the rows `M_j = a & {8{b_j}}` for j = 1..7, which go
  straight to the tree.
- It also forms a vector `s`:
  - With `conf = 1`, `s` is row `M_0`.
  - With `conf = 0`, rows 1..7 are XORed into `s` at their weights, so `s`
    is the carry-less product `q`. Those XOR terms are gated by `~conf`.
- `s` goes through the mode demultiplexer, so in integer mode the tree
  receives all eight rows.

The tree (`wallace_tree`) uses carry-save stages of fixed widths:

    A  10 bit  M2, M1, M0                 weights 0..9
    B  10 bit  M5, M4, M3                 weights 3..12
    C  11 bit  M7, M6, carry(B)           weights 4..14
    D  13 bit  sum(B), sum(A), carry(A)   weights 0..12
    E  15 bit  sum(D), carry(D), sum(C)   weights 0..14
    F  16 bit  sum(E), carry(E), carry(C) weights 0..15
    G  17-bit ripple carry adder on sum(F), carry(F)

The stage widths and the rows each stage takes come from the original tree.
Which of a stage's two outputs feeds which later stage is this
implementation's choice. It is the only assignment under which every stage
spans exactly its width. Each stage (`carry_save_adder`) is a row of
independent Shannon full adders. The tree is defined for eight rows, so
`wallace_tree` and `wt_mgf_mul` stop elaboration for any `N` other than 8.

## GF reduction (`gf_modulo`)

The reduction array takes `q` (15 bits) and `p`. It has 7 rows of AND-XOR
cells (`so = c' ^ (c & p)`), one row for each of the coefficients `q_14`
down to `q_8`. The row for `q_k` XORs `q_k & p` into bits `k-8 .. k-1`,
which replaces `x^k` by `x^(k-8) p(x)`. Rows run from the highest coefficient
down. Each row sees the bits that the rows above it have already changed.
The final low 8 bits are `q mod (x^8 + p)`.

## Mode switching (`conf_demux`, `conf_mux`)

- **`conf_demux`** sends the array's sum vector to the GF path (`o0`, when
  `conf = 0`) or to the integer path (`o1`, when `conf = 1`). The path that
  is not selected receives zeros, so it stays quiet.
- **`conf_mux`** picks the result.

## Files

- **Package.** `rtl/rmul_pkg.sv` holds the width (`WIDTH = 8`), the mode
  enum (`MODE_GF`, `MODE_INT`), the input bundle `rmul_in_t {a, b, p, conf}`
  and the constant `POLY_X8_X4_X3_X2_1`.
- **`rtl/rmul_top.sv`** places the three multipliers side by side. Each has
  its own input bundle (`csa_in`, `ba_in`, `wt_in`) and result (`csa_m`,
  `ba_m`, `wt_m`).
- **Hierarchy.** Each `*_mgf_mul` contains its partial-product block,
  `conf_demux`, the integer stage (`ripple_carry_adder` or `wallace_tree`),
  `gf_modulo` and `conf_mux`.
- **Parameters.** The modules are parameterised by `N` (default 8). The two
  array multipliers and their parts work for other N ≥ 3. The Wallace-tree
  parts need `N = 8`, and `rmul_top` uses the package width.
- **Testbenches.** Each module has a self-checking testbench
  `tb/tb_<module>.sv`. The testbenches share the reference models in
  `tb/rmul_ref_pkg.sv`, which compute the expected values by different
  algorithms: shift-and-XOR for the carry-less product, and `xtime`
  multiplication or sums of `x^k mod g` for the field.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb rtl/rmul_pkg.sv tb/rmul_ref_pkg.sv \
        tb/tb_rmul_top.sv --top-module tb_rmul_top
    ./obj_dir/Vtb_rmul_top

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. Replace
`tb_rmul_top` with any other testbench name.

`tb_rmul_top` runs at the default width. It covers:

- the reference sequence above;
- all 65536 operand pairs in both modes with `p = 1d`;
- 20000 random operand, polynomial and mode triples.

It also counts the events the design has to handle. It fails if any of them
never happened:

- integer to GF switches;
- GF to integer switches;
- GF products that need reduction;
- integer products that reach bit 15;
- polynomial changes.

The per-multiplier and array testbenches are exhaustive over all operands in
both modes. The smaller blocks are checked exhaustively or with random
vectors.

## How far it follows the original design

These parts follow the original design directly:

- the Shannon full adder;
- the reconfigurable cell with its conf-gated carry;
- the carry-save and Braun array layouts;
- the Wallace-tree stage widths;
- the AND-XOR reduction array with the polynomial as an input;
- the demux / adder / modulo / mux structure;
- the 8-bit default.

These are interpretations:

- **Which input the adder expands.** The expansion is taken around `cin`.
- **The GF-mode upper byte.** It is fixed from published simulation values,
  not from a description.
- **The Wallace-tree version's partial-product stage.** The split between
  `wt_pps` and the tree is read from block diagrams: row 0 travels through
  the demux, and the other rows go directly to the tree.
- **The Wallace tree's internal connections.** Which stage output feeds which
  later stage is this implementation's choice.
- **The demux's idle outputs.** They are held at zero.
- **No registers.** The multipliers are combinational. The original's
  timing measurements wrap the circuits in input and output registers. Add
  those outside these modules if needed.

Not included are the designs the original only compares against:

- the "reference" multipliers, which place separate integer and GF
  multipliers in parallel behind a mux;
- the reconfigurable multipliers built from a conventional two-half-adder
  full adder.

Swapping `shannon_fa` for a conventional full adder gives the second of
these.

The area, power and delay figures of the original are synthesis results in a
90 nm cell library. Simulating this RTL does not check them.
