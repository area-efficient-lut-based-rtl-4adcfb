# Booth/GPC tree multiplier for LUT fabrics with dual 5-input LUT halves

A signed integer multiplier built only from LUT logic and carry chains, no DSP
blocks. It targets FPGA fabrics (AMD Versal style) in which a 6-input LUT can
act as two 5-input LUTs that share four inputs but take *independent* fifth
inputs. Two ideas make it small:

1. **Two Booth partial-product bits per LUT.** With radix-4 modified Booth
   recoding every partial-product bit is a function of five signals. Two
   neighbouring bits of the same partial product share four of them, so one
   LUT yields both. The whole partial-product bit heap of an n x n product
   then costs about n²/4 LUTs, against about n²/2 for a plain AND array.
2. **A stage-wise compressor tree of generalized parallel counters (GPCs)**,
   drawn from a library of counters that fit the fabric's LUT cascade path.
   It ends in a quaternary (four-row) adder made of two carry-chained layers.

Everything is parameterized SystemVerilog. The compression plan is worked
out by constant functions at elaboration time, so any operand width needs no
external generator.

## Data path

```
 a[N-1:0] ─┐
           ├─► booth_ppg ──heap──► compressor_tree ──────────────► p[N+M-1:0]
 b[M-1:0] ─┘   (Booth digits,      (stages of GPCs,  quaternary_adder)
                booth_lut_pair)
```

`booth_mult` is the top. Its ports are `clk`, `rst_n`, `in_valid`, `a`, `b`,
`out_valid` and `p`. With the default parameters (16 x 16, no registers) it
is purely combinational and `out_valid` = `in_valid`.

### Booth partial-product heap (`booth_ppg`, `booth_lut_pair`)

`b` is sign-extended to an even width and cut into digits
`d_i = -2*b[2i+1] + b[2i] + b[2i-1]`, with `b[-1] = 0`. Each digit is in
{-2, -1, 0, 1, 2}. Digit `i` gives an (N+1)-bit partial product of weight
4^i:

* `one = b[2i] ^ b[2i-1]` selects `a`;
* `two` (digit ±2) selects `a` shifted left by one;
* `neg = b[2i+1]` inverts the bits. The missing +1 of the two's complement
  goes into the heap as a separate bit `c_i` at weight 2^(2i).

Bit `j` is `((one & a[j]) | (two & a[j-1])) ^ neg`. Bits `j` and `j+1`
share `a[j]` and the three `b` bits. Their fifth inputs are `a[j-1]` and
`a[j+1]`. `booth_lut_pair` holds exactly that pair of 5-input functions: one
LUT in dual 5-LUT mode.

Sign extension is not built as wide rows. The sign bit of each partial
product is inverted, and the constant `-Σ_i 2^(2i+N)` (mod 2^(N+M)) is added
as fixed `1` bits in the heap. Column `c` of the heap therefore holds, in
this order:

1. one bit per digit whose partial product covers the column;
2. the carry `c_i` if `c = 2i`;
3. a constant bit where the constant has a one.

`lutmul_pkg::booth_height(N, M, c)` gives that count. For 16 x 16 the
tallest column has 9 bits.

### Counter library (`gpc_*`)

A GPC `(p_k … p_1, p_0 : …)` counts bits of several weights into fewer
output bits. The tree uses eight of them:

| counter | module | how it is built |
|---|---|---|
| (3 : 2] | `gpc_3_2` | full adder |
| (1, 5 : 3] | `gpc_1_5_3` | two LUTs: FA(a0,b0,c0) → FA(sum,d0,e0) gives s0; the carry crosses the cascade path; the upper LUT adds it to a1 and the first FA's carry |
| (2, 5 : 1, 2, 1) | `gpc_2_5_1_2_1` | the cell of the dual-rail counters |
| (3,9:2,3,1), (4,13:3,4,1), (5,17:4,5,1) | `gpc_dual_rail #(N=2,3,4)` | N (2,5:1,2,1) cells; the weight-1 sum **and** one weight-2 sum ripple from cell to cell (two "rails") |
| (9 : 4, 1) | `gpc_ripple_sum #(N=4)` | 4 full adders in one column; the sum ripples, each carry is an output |
| (6 : 3] | `gpc_6_3` | population count (only its function is specified) |
| (2, 2, 3 : 4] | `gpc_2_2_3_4` | weighted sum (only its function is specified) |

`gpc_cell` wraps them behind one port shape so that the tree can place any of
them. `x0`/`x1`/`x2` are the bits taken from the anchor column and the two
columns above it. `y0`…`y3` are the bits put into the anchor column and the
three above it.

### Compression plan (`compressor_tree`)

This is the least obvious part of the design. `compressor_tree` takes any
heap shape through `HEIGHTS` (16 bits per column). At elaboration,
`make_plan()` simulates the reduction stage by stage:

* Columns are scanned from the least significant one upward.
* A column that is taller than the adder accepts (more than 4 bits, or more
  than 6 in column 0) gets counters until fewer than 3 of its free bits are
  left. Each time, the first counter whose condition holds is taken:

  | counter | condition |
  |---|---|
  | (5,17:4,5,1) | a ≥ 17, an ≥ 5 |
  | (4,13:3,4,1) | a ≥ 13, H ≥ 16, an ≥ 4 |
  | (9:4,1) | a ≥ 9, H ≥ 12, 5H > 17·Hn |
  | (3,9:2,3,1) | a ≥ 9, H ≥ 12, an ≥ 3 |
  | (6:3] | a ≥ 6, H = 9, Hn ≤ 3, Hnn ≤ 3 |
  | (2,2,3:4] | 5 ≤ H ≤ 6, 4 ≤ Hn ≤ 5, 4 ≤ Hnn ≤ 5, an ≥ 2, ann ≥ 2 |
  | (1,5:3] | a ≥ 5, an ≥ 1 |
  | (3:2] | a ≥ 3 |

  Here H, Hn and Hnn are the heights of this column and the next two at the
  start of the stage. a, an and ann are the bits of those columns that no
  counter has taken yet. The H/Hn/Hnn conditions are the counter-necessity
  conditions of the heuristic this design follows. The a/an/ann bounds make
  sure a counter gets real bits for every input.
* A counter never takes a bit that another counter took in the same stage.
  Counters at column c take bits of column c+1 (and c+2) only when those bits
  are free.
* Leftover bits pass to the next stage unchanged.

Stages are added until the heap fits the adder. Plan limits: at most 12
stages; a column may not grow more than 8 bits above `MAXH`. Elaboration
stops with `$error` if a heap breaks either limit.

Each stage's heap is stored column by column, in this order:

1. the bits passed on unchanged;
2. the outputs of counters anchored in this column;
3. then those anchored 1, 2 and 3 columns below.

Counter inputs are taken in the opposite order:

1. bits for counters two columns below;
2. bits for counters one column below;
3. this column's own counters, by type, then instance.

The functions `in_off`/`out_off` turn this into fixed bit indices. The
generated tree is therefore just counters and wires.

The (5,17:4,5,1), (9:4,1), (1,5:3] and (3:2] counters do most of the work.
One column of 512 bits takes 5 stages, and so does the 16 x 16 radix-2 heap.
The 16 x 16 Booth heap (9 bits tall) takes 3 stages; the 32 x 32 one takes 6.

### Terminal quaternary adder (`quaternary_adder`)

This adder sums rows `a`, `b`, `c`, `d` and two extra weight-1 bits `e0`
and `e1`. It works in two carry-chained layers:

1. Each column puts `a_i`, `b_i`, `c_i` through a full adder. A carry chain
   adds the full-adder sums to row `d`, with carry-in `e0`.
2. A second carry chain adds that result to the full-adder carries moved one
   column up, with `e1` in the free bit 0.

The carry chains are written as `+`, so synthesis maps them onto the carry
logic.

### Pipelining

Register positions are chosen by parameters. Each one is optional:

| parameter | where it puts a register |
|---|---|
| `PIPE_PPG` | after the heap |
| bit s of `PIPE_MASK` | after compression stage s |
| `PIPE_OUT` | after the adder |

A valid bit passes through the same registers. Latency is the number of
registers enabled. Only the valid registers are reset (`rst_n`, synchronous,
active low). Data registers are not reset.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `booth_mult` | `N`, `M` | 16, 16 | widths of `a` and `b` (signed); N + M ≤ 128 |
| | `PIPE_PPG`, `PIPE_MASK`, `PIPE_OUT` | 0 | register positions, see above |
| `compressor_tree` | `COLS`, `MAXH`, `HEIGHTS` | 2, 16, 16 per column | heap shape |
| | `OW` | enough for the full sum | output width; the sum is taken modulo 2^OW |
| `gpc_dual_rail` | `N` | 2 | cells in the chain |
| `gpc_ripple_sum` | `N` | 4 | cells in the chain |
| `quaternary_adder` | `W` | 32 | row width (≥ 2) |

## Where this RTL departs from the reference architecture

These parts of the reference architecture are **not** built:

* **Row counters under carry-lookahead constraints.** The reference
  compressor chains (1,5:3], (3:2] and (2,2,3:4] counters horizontally. Each
  counter passes its top output to the next as a carry through the fabric's
  LOOKAHEAD8 block. The scan then jumps to that column. Here every counter is
  independent, and the scan moves one column at a time. The sums are the
  same; the LUT count and delay of a real mapping will differ.
* **Last-stage consolidation.** Merging the last two compression stages
  when the last stage's counters can be left partly empty is not done.
* **Vendor primitives.** The LUT with its cascade multiplexers and the
  LOOKAHEAD8 carry block are not instantiated. Their functions are written
  as logic: `booth_lut_pair`, the FA equations inside the counters, and `+`
  for carry chains. A vendor flow will choose its own mapping. The
  "two bits per LUT" property holds only if the tool packs each
  `booth_lut_pair` into one dual-output LUT.
* **Automatic pipeline balancing.** Registers are placed where the
  parameters say. They are not placed by delay.

These points are this design's own choices:

* The Booth heap layout and the inverted-sign-bit-plus-constant sign
  extension.
* The exact LUT mapping of the (1,5:3], (2,5:1,2,1) and dual-rail counters.
  It is read from structural drawings, and every counter is checked
  exhaustively or at random against its arithmetic function.
* How (6:3] and (2,2,3:4] are built (only their function is specified).
* The adder's input shape: 4 rows plus 2 bits.
* The valid/reset scheme.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lutmul_pkg.sv \
          tb/tb_booth_mult.sv --top-module tb_booth_mult -Mdir obj -o sim
./obj/sim
```

| testbench | what it checks |
|---|---|
| `tb_gpc_3_2`, `tb_gpc_1_5_3`, `tb_gpc_2_5_1_2_1`, `tb_gpc_6_3`, `tb_gpc_2_2_3_4`, `tb_booth_lut_pair` | all input patterns against the arithmetic definition |
| `tb_gpc_dual_rail` | N = 2 exhaustively; N = 3 and 4 at random |
| `tb_gpc_ripple_sum` | N = 4 and N = 2, exhaustively |
| `tb_quaternary_adder` | random rows and all-ones rows, W = 32 and W = 8 |
| `tb_booth_ppg` | weighted heap sum = a·b and exact column heights, for 16 x 16 and 9 x 7 |
| `tb_compressor_tree` | see below |
| `tb_booth_mult` | see below |
| `tb_booth_mult_full` | the top exactly as delivered (all defaults): all corner pairs and 20000 random pairs |
| `tb_mult_widths` | every N x N width from 6 to 32, with corner operands, plus a pipelined 18 x 18 |

`tb_compressor_tree` runs these heap shapes and checks each sum: single
columns of 128, 256 and 512 bits; two columns of 128, 256 and 512 bits each;
the 16 x 16 radix-2 heap; and a small 9 + 2 heap. It also checks that all
eight counter types get placed, and the latency of a fully pipelined tree.

`tb_booth_mult` covers three things:

* the default 16 x 16 instance, untouched;
* a pipelined instance with bubbles in its input, checking the 3-cycle
  latency;
* a 7 x 5 instance (odd widths).

It counts every Booth digit value, including the `111` "negative zero"
pattern.

The 512-bit-tall heaps take about a minute to elaborate in Verilator: the
plan functions run once per counter instance.
