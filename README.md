# Pipelined multiply-accumulate array of m-bit cells

This is a multiply-accumulate (MAC) unit built as a square array of identical small
multiply-accumulate cells:

    Y[2n-1:0] = A[n-1:0] * B[n-1:0] + C[n-1:0] + D[n-1:0]

It targets reconfigurable fabrics whose cells handle m-bit words rather than single bits. A
cell computes `y = a*b + c + d` on m-bit portions, giving a 2m-bit result. The n-bit unit
uses K = ceil(n/m) portions per operand and exactly K x K cells. A textbook carry-save array
needs an extra adder row of K cells. This one folds that row's work into the most significant
column. The array is pipelined with one register stage per cell, so a new operation can start
every clock cycle.

The same array also multiplies two's-complement numbers. Only the cells' operand formats
change, not the wiring. Each cell is itself an m x m array of 1-bit elements wired the same
way. All element kinds reduce to four small logic functions.

The default build is n = 20 and m = 4, so K = 5 and the array has 25 cells of 16 elements
each. Every internal line is registered, and the latency is 3K-2 = 13 cycles. A 1000-element
vector product takes 1000 + 13 - 1 = 1012 cycles. The simulation checks this number.

## Files

| file | contents |
|---|---|
| `rtl/pmac_pkg.sv` | cell/element kinds, operand formats, evaluation-step functions, elaboration-time derivation of cell kinds |
| `rtl/mac_element.sv` | 1-bit MAC element, four logic functions |
| `rtl/mac_cell.sv` | m-bit MAC cell of any kind A..H, built from m x m elements |
| `rtl/pmac_array.sv` | K x K pipelined array, staggered B and Y |
| `rtl/pmac_top.sv` | top level: aligned operands, valid/mode pipeline |
| `rtl/delay_line.sv` | register chain used for pipeline, skew and deskew registers |
| `tb/tb_*.sv` | one self-checking testbench per module, the broadcast configuration of the top, and other sizes |
| `tb/pmac_size_run.sv` | stimulus and scoreboard for one configuration, used by `tb_pmac_top_sizes` |

## Arithmetic of one cell

A cell receives portions `a` and `b` plus two addends `c` and `d`, all m bits wide. It returns
`y = a*b + c + d`, and the result always fits in 2m bits. Its high half `y[2m-1:m]`
has weight 2^m relative to its low half. Cell (i, j) multiplies portion i of A by portion j
of B. Its result therefore belongs at portion weight i + j: the low half lands at weight
i + j and the high half at weight i + j + 1.

## The array and its wiring

Columns are numbered i = 0 (least significant, drawn on the right) to K-1 (most significant,
"left column"). Rows are numbered j = 0 (top) to K-1. Each cell gets its two addends as
follows:

| position | c | d |
|---|---|---|
| top row, j = 0 | portion i of C | portion i of D |
| upper triangle, i + j <= K-1 | high half of the cell above, (i, j-1) | low half of the upper-left cell, (i+1, j-1) |
| lower triangle, i + j >= K, i < K-1 | high half of the right neighbour, (i-1, j) | low half of the upper-left cell, (i+1, j-1) |
| left column, i = K-1, j >= 1 | high half of the cell above | high half of the right neighbour |

Result portion w is the low half of the cell in the right column (w < K) or in the bottom row
(K-1 <= w <= 2K-2). The high half of the bottom-left cell is result portion 2K-1.

The upper triangle is an ordinary carry-save array. A carry-save array leaves two terms per
weight at its bottom and needs a ripple adder row to merge them. Here, the lower triangle
passes high halves sideways to the left instead, and the left column takes two high halves,
where a carry-save array would give it one. The carry ripple is thereby spread over the array
itself. Without pipeline registers the longest path runs through 2K-1 cells.

Every cell is one pipeline stage. Cell (i, j) is evaluated in a fixed step relative to the
start of its operation. Two schedules are provided, selected by the `PIPE_LINES` parameter:

* **`PIPE_LINES = 1` (default), registered lines:** cell (i, j) works in step i + 2j. Every
  line between cells has at least one register. Portion j of B moves along row j, one
  column per cycle. Portion j of B is needed in step 2j. Result portion w leaves after step
  2w (w < K), after step w + K - 1 (K-1 <= w <= 2K-2), or after step 3K-3 (the top portion).
  The latency is 3K-2.
* **`PIPE_LINES = 0`, broadcast:** cell (i, j) works in step j + max(0, i + j - K + 1). All
  cells of row j in the upper triangle use portion j of B in the same cycle, so that portion
  fans out across the row. Portion j of B is needed in step j. Result portion w leaves after
  step w, least significant first, and the two top portions both leave after step 2K-2. The
  latency is 2K-1.

The broadcast schedule has the shorter latency. The registered schedule avoids the
row-wide fan-out, which may permit a faster clock on a fabric with only neighbour
connections. `pmac_array` puts a `delay_line` on every line whose producing and consuming
steps differ by more than one cycle. A, C, D and the mode enter in step 0 and are delayed
inside the array. B must arrive staggered, and Y leaves staggered. A chain of units could
therefore pass Y into the next unit's B without realignment. `pmac_top` adds the skew and
deskew registers so that users see one aligned operation per cycle.

## Two's-complement operation: cell kinds A to H

In two's complement, the most significant portion of each operand is a signed m-bit number,
and the other portions are unsigned. Through the array, this makes some cell inputs and
outputs signed. One cell is special: the top-left cell multiplies a signed portion of A and
adds the signed top portions of C and D. To cover its full range, both halves of its result
must be signed, meaning `y = 2^m * y_hi + y_lo` with each half in two's complement. For m = 4,
`y = {2, -7}` means 25. Eight operand-format combinations ("kinds") occur:

| kind | a | b | c | d | y_hi | y_lo |
|---|---|---|---|---|---|---|
| A | + | + | + | + | + | + |
| B | - | + | - | - | - | - |
| C | + | + | + | - | + | - |
| D | - | + | - | + | - | + |
| E | + | - | - | + | - | + |
| F | + | - | + | - | - | + |
| G | + | + | - | + | + | - |
| H | - | - | - | - | - | + |

(`+` unsigned, `-` two's complement.) In the 5 x 5 array the kinds come out as follows
(left column on the left, top row first):

    B A A A A
    D C A A A
    D A C A A
    D A A C A
    H E E E F

The kind of every position is not typed in by hand. `pmac_pkg::array_kind` computes it
at elaboration by walking the array in evaluation order and propagating which lines are
signed. At run time the `tc` bit of each operation picks that kind or plain A for every
cell. `tc` travels down the columns with A, so unsigned and signed operations can be
interleaved cycle by cycle. The result of a two's-complement operation is an exact
2n-bit two's-complement number. No correction hardware is needed.

Which neighbour feeds `c` and which feeds `d` is significant, because kinds C and G differ
only in that. With the assignment above, a cell with unsigned `a` and `b` and one signed
addend always receives that addend on `d` (kind C). As a result, kind G never occurs in the
word-level array. It does occur inside cells of kind E.

## Inside a cell: elements and their four functions

A cell of any kind is an m x m array of 1-bit elements with exactly the wiring above, at
bit level. Element (i, j) computes `psi = (alpha & beta) + gamma + delta` in the formats of
its own kind. A signed bit of value 1 stands for -1, so a kind-B element computes
`-2 psi1 - psi0 = -(alpha & beta) - gamma - delta`. That is the same logic as kind A. The low
bit is always `alpha&beta ^ gamma ^ delta`. The high bit is one of four majority functions,
with `p = alpha & beta`:

| function | used by element kinds | psi1 |
|---|---|---|
| FN_A | A, B | MAJ(p, gamma, delta) |
| FN_C | C, D, E | MAJ(p, gamma, ~delta) |
| FN_F | F, G | MAJ(p, ~gamma, delta) |
| FN_H | H | ~MAJ(p, ~gamma, ~delta) |

`mac_cell` gets the element kind at each position the same way as the array gets its cell
kinds: by propagating the cell's operand formats through the element array
(`pmac_pkg::cell_elem_fns`). The `kind` input then selects, per element, one of eight
precomputed function codes. Examples of the result: a kind-E cell uses elements of kinds A,
C, E, F and G. A kind-H cell has the same arrangement as the whole two's-complement array.
A kind-B cell uses A, B, C and D elements, which need only the FN_A and FN_C functions.

## Top level interface (`pmac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; clears only the valid pipeline |
| `in_valid` | in | 1 | an operation is presented this cycle |
| `in_tc` | in | 1 | 1 = two's complement, 0 = unsigned, per operation |
| `a`, `b`, `c`, `d` | in | N | operands |
| `out_valid` | out | 1 | result of the operation presented LATENCY cycles earlier |
| `out_tc` | out | 1 | that operation's mode |
| `y` | out | 2N | A*B + C + D |

The parameters are `N` (20), `M` (4) and `PIPE_LINES` (1). `LATENCY` is 3K-2 with
registered lines and 2K-1 with broadcast. There is no back-pressure: the unit accepts one
operation every cycle and always delivers its result LATENCY cycles later. If N is not a
multiple of M, the operands are zero- or sign-extended to whole portions.

## How far it is checked

| testbench | what it checks |
|---|---|
| `tb_mac_element` | all 16 inputs of each of the 8 element kinds against the signed/unsigned arithmetic |
| `tb_mac_cell` | every input combination of all 8 kinds at m = 4 (524,288 cases), random cases at m = 3, and the worked 4-bit kind-B examples (25, 60, -25, -60, 119, -136) |
| `tb_pmac_array` | both schedules at n = 20, m = 4: 400 random mixed-mode operations back to back; every result portion is checked in the exact cycle it is due, which pins down the B and Y timing and both latencies |
| `tb_pmac_top` | default parameters, end to end: a 1000-element unsigned vector product (checks 1012 cycles), then 3000 random operations with gaps, mode changes in both directions, random addends and corner values; every result, mode and latency checked, and each of these events counted |
| `tb_pmac_top_bcast` | the same with `PIPE_LINES = 0` (1008 cycles, latency 9) |
| `tb_pmac_top_sizes` | other sizes in both schedules, 500 random mixed-mode operations each: 18/4 and 7/3 (widths that are not whole portions), 6/1 (a cell is a single element), 8/2 and 16/8 |

Expected values are computed in the testbenches with 64-bit integer arithmetic, independent
of the RTL. Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

To run one with Verilator:

    verilator --binary --timing -Irtl rtl/pmac_pkg.sv rtl/delay_line.sv rtl/mac_element.sv \
        rtl/mac_cell.sv rtl/pmac_array.sv rtl/pmac_top.sv tb/tb_pmac_top.sv --top-module tb_pmac_top
    ./obj_dir/Vtb_pmac_top

## Where this design departs from, or goes beyond, its source

* The cell-to-cell wiring is a reconstruction. It was rebuilt from the properties the source
  design states: K^2 cells; the left column absorbing the work of the removed adder row; a
  critical path of 2K-1 cells; Y produced least significant portion first, one per cycle;
  B needed staggered and broadcast along rows; latency 3K-2 with registered lines; 1008 and
  1012 cycles for 1000 operations; the cell kinds of the two's-complement array (seven kinds,
  no G); kind E cells containing G elements. The wiring here meets all of these. The
  original drawing may still differ in details that affect none of them.
* The registered-lines schedule (cell (i, j) in step i + 2j) is the only one of its form that
  registers every line, avoids the B fan-out and has latency 3K-2.
* In a kind-B cell the derivation puts kind-D elements in the left column. The source
  lists that cell as using kinds A, B and C only. D and C elements share one logic function,
  so the function count is the same.
* The run-time mode bit (`tc`) and the kind and function encodings are this design's own.
  In a reconfigurable fabric the kinds would be configuration. Here they are selected per
  operation, so modes can be mixed in one stream.
* The skew/deskew registers, valid pipeline and reset belong to `pmac_top` and are additions.
  The array itself follows the staggered interface of the source.
* Not modelled: the LUT-based reconfigurable element and the cell-to-cell routing fabric that
  such an array would be mapped onto, and the carry-save multiplier used as a point of
  comparison.
