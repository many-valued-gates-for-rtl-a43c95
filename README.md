# Many-valued PLA circuit for systems of partial Boolean functions

A binary PLA that realizes `r` Boolean functions of `m` inputs over `q` product
terms needs `(2m + r) * q` programmable crossings: every product line crosses
each input twice (true and inverted) and each output once. This design does the
same job with fewer crossings by working in a K-valued logic (K = 2^b) inside
the array:

```
 x1..xm  ──► T(2/K) ×n ──► v1..vn ──► K-PLA(n,s,q) ──► f1..fs ──► T(K/2) ×s ──► g1..gr
 binary      b bits → 1 value        K-valued           K-valued   1 value → b bits   binary
```

Each group of `b = log2 K` binary inputs is packed into one K-valued signal, the
K-valued PLA has only `n = ceil(m/b)` inputs and `s = ceil(r/b)` outputs, and the
results are unpacked back into binary. For K = 4 the crossing count of one
array drops from `(2m + r) q` to `m/2 (20 + q) + r/2 (12 + q)` (translators
included), which for a 16-input, 8-output, 100-term PLA is 1408 instead of 4000.

The example built by default is a system of 6 partial Boolean functions of 18
inputs, defined on 20 input words, realized with K = 8: six T(2/8) translators,
an 8-PLA with 6 inputs, 2 outputs and 21 product lines, and two T(8/2)
translators. Everything is combinational; there is no clock.

## How a K-valued signal is represented

Real many-valued gates use K signal levels on one wire. In this RTL every
K-valued line is a `$clog2(K)`-bit unsigned number, value 0 … K-1. The gates
below are written against that number, so the RTL describes the logic function
of the many-valued circuit, not its electrical form. Synthesized to a binary
library it will of course not save area; the area argument applies only to a
real K-level implementation.

## The three gate types

| gate | function | used in |
|---|---|---|
| `gate_aj` — GATE(A,j) | `y = A` if `x == j`, else `0` | everywhere; A and j are fixed by programming |
| `mv_min` — MIN | smallest input; the K-valued AND | product lines of the PLA |
| `mv_max` — MAX | largest input; the K-valued OR | T(2/K) output, PLA outputs |

GATE(A,j) is the only programmable element. Its two constants are parameters:
they stand for the setting a one-time programmer (much like a PROM blower)
writes into the cell. In the drawings of the original circuit the MIN and MAX
gates form a chain, one gate per cell along a line; here each chain is one
N-input gate.

## Translators

**T(2/K)** (`t2k`). A full decoder: column `c` (0 … K-1) is the AND of the
input bits, each taken true or inverted as bit `c` demands, so exactly one
column carries 1. Column `c` drives GATE(c,1), which turns that 1 into the
value `c`; a MAX gate over the columns gives the output. The first pin is the
most significant bit: pins 1,0,1 give 5.

**T(K/2)** (`tk2`). Column `j` (1 … K-1) holds GATE(1,j), which is 1 only when
the input equals `j`. Output pin `b` is the OR of all columns whose index has
that bit set (for K = 8: pin 1 ORs columns 4–7, pin 2 columns 2,3,6,7, pin 3
columns 1,3,5,7). Value 4 gives pins 1,0,0. The original drawing also shows a
GATE(0,0) in column 0. Its output is always 0 and feeds no OR gate, so it is
left out here.

## The K-PLA and its programming matrices

`kpla` has `N` K-valued inputs, `S` outputs and `Q` product lines. It has two
planes:

* **AND plane.** Where line `r` crosses input `vi` there is either no cell or
  GATE(K-1, j). That cell is the literal "vi equals j": K-1 when true, 0
  otherwise. A MIN over the cells of the line gives `p[r] = K-1` when every
  literal holds, else 0. A line with no cell stays at K-1.
* **OR plane.** Where line `r` crosses output `fk` there is either no cell or
  GATE(A, K-1), which puts out the constant `A` while the line is active. A MAX
  over the column gives `fk` = the largest `A` among active lines, or 0 when
  none is active.

The circuit is therefore a sum of products in which each product selects
exact values of some inputs, and each output takes the largest constant of
the products that fire. Several lines that fire at once on the same output combine by
MAX. A minimized program relies on this: for every defined input, the lines
that fire must all carry constants no larger than the required value, and at
least one must carry exactly that value.

The programming comes as two parameters, each a packed array of 8-bit entries.
A matrix reads as written: line 1 first, and within a line input v1 (or
output f1) first. Being packed, the first entry written has the highest index,
so line `r+1`, input `v(i+1)` is `AND_MAT[Q-1-r][N-1-i]`:

* AND entry — the `j` of the cell on that line and input, or **K** for
  "no cell";
* OR entry — the `A` of the cell on that line and output, or **K** for
  "no cell".

Two programs for the example are in `mvl_pkg`:

| constant | array | idea |
|---|---|---|
| `S18_AND_FULL`, `S18_OR_FULL` | 8-PLA(6,2,20) | one line per defined input word; the AND row is the word's six octal digits and the OR row its two output digits |
| `S18_AND_MIN`, `S18_OR_MIN` (default) | 8-PLA(6,2,21) | minimized: most lines test one or two inputs only |

For example, line 1 of the minimized program is AND row `4 8 8 8 8 8` and OR
row `8 1`: "v1 = 4" sets f2 to at least 1 and leaves f1 alone.

**Change from the published minimized program.** In the published matrix,
line 14 is `8 8 8 8 0 8 / 5 8` ("v5 = 0 ⇒ f1 ≥ 5"). Line 8 has the same
product, so line 14 would add nothing. With it, the input words
(7,0,6,6,0,7) and (5,4,4,7,0,6) would output f1 = 5 instead of 3, and
(4,6,1,5,6,0) would output f1 = 0 instead of 5. Here line 14 tests v6 = 0
instead. That is the only one-cell change on that line that makes all 20
defined words come out right, and the testbenches check this. The drawing of
the published minimized array places that cell on v5 too. This design follows
the function table instead.

## The example system

The 20 defined words of the (18,6,20) system. Binary on the left, and the same
words grouped into octal digits (x1 x2 x3 → v1, …; f1 → g1 g2 g3, f2 → g4 g5 g6)
on the right. The full list is in `tb/tb_circuit_s.sv` and `tb/tb_kpla.sv`.

| x1 … x18 | g1 … g6 | v1 … v6 | f1 f2 |
|---|---|---|---|
| 100 011 000 110 011 100 | 011 100 | 4 3 0 6 3 4 | 3 4 |
| 100 010 111 100 100 101 | 110 110 | 4 2 7 4 4 5 | 6 6 |
| 111 101 100 011 010 010 | 010 011 | 7 5 4 3 2 2 | 2 3 |
| … 17 more | | | |

The functions are partial. Outside the 20 words, the output is whatever the
programmed array gives: 0 for the unminimized program, and a mix of the
constants of the lines that fire for the minimized one.

## Module map and parameters

| file | module | main parameters (default) |
|---|---|---|
| `rtl/mvl_pkg.sv` | package: example sizes and both programs | — |
| `rtl/gate_aj.sv` | GATE(A,j) | `K` (8), `A`, `J` |
| `rtl/mv_max.sv`, `rtl/mv_min.sv` | N-input MAX / MIN | `K` (8), `N` |
| `rtl/t2k.sv`, `rtl/tk2.sv` | translators | `K` (8), must be a power of two |
| `rtl/kpla.sv` | K-PLA | `K` 8, `N` 6, `S` 2, `Q` 21, `AND_MAT`, `OR_MAT` |
| `rtl/circuit_s.sv` | top: translators + K-PLA | `K` 8, `M` 18, `R` 6, `Q` 21, `AND_MAT`, `OR_MAT` |

Top ports: `x[M-1:0]` (bit M-1 is x1), `g[R-1:0]` (bit R-1 is g1). Three more
ports expose the internal K-valued buses `v`, `f` and the product lines `p`
for observation. When `M` or `R` is not a multiple of `log2 K`, the last input
group is padded with 0s in its low bits and the surplus output bits are dropped.

To realize another function, set `K`, `M`, `R`, `Q` and give matrices of size
`[Q][ceil(M/log2 K)]` and `[Q][ceil(R/log2 K)]`, with K marking empty crossings.
`tb/tb_circuit_s_k4.sv` shows how to compute such matrices in a constant
function from a function table.

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_circuit_s \
          rtl/mvl_pkg.sv tb/tb_circuit_s.sv
./obj_dir/Vtb_circuit_s
```

The same pattern works for every `tb_*`: name the testbench as top and list
the package first; `-Irtl -Itb` lets verilator find the modules.

| testbench | what it shows |
|---|---|
| `tb_circuit_s` | default circuit (18,6,20): all 20 defined words. 4000 other words against a behavioural model of the programmed array. Also counts that every product line fires, outputs merge by MAX, undriven outputs stay at 0, and every translator value occurs. |
| `tb_circuit_s_full` | the same system with the unminimized 8-PLA(6,2,20): each defined word fires only its own line, and undefined words give 0. |
| `tb_circuit_s_k4` | K = 4 circuit with 16 inputs, 8 outputs, 100 lines, built from a generated 100-word function: every word, and 3000 undefined words give 0. |
| `tb_kpla` | both example programs against the function table and a behavioural sum-of-products model |
| `tb_t2k`, `tb_tk2` | exhaustive, K = 2, 4, 8, 16, including the worked examples 1,0,1 → 5 and 4 → 1,0,0 |
| `tb_gate_aj`, `tb_mv_max`, `tb_mv_min` | exhaustive / random checks of the gates |

## Area estimate behind the design

With K = 4, one binary 2-PLA(m,r,q) costs `L = (2m + r) q` crossings. The
translator-plus-4-PLA circuit costs `Ls = m/2 (20 + q) + r/2 (12 + q)` (m, r
even). The saving per array is `c = ((3m + r)(q − 12) + 16m) / 2`. A larger
system is built from many such arrays. For the example (64,64,4000), 560
arrays of size (16,8,100) are needed, so the saving is 560 × 2592 = 1,451,520
crossings. That is the area of about 362 of the 4000-crossing binary arrays.
These formulas are about layout area, and the RTL does not model it.

## Limits

* The RTL is a logic model. Multi-level signalling, cell electrical design and
  the programming equipment are not modelled. Programming is a
  build-time parameter.
* The minimized program differs in one cell from the published one (see
  above).
* No minimizer is included. Programs for other functions must be produced
  outside the RTL, or made one line per defined word as in `tb_circuit_s_k4`.
