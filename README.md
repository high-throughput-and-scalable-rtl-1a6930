# Unified 4x4 / 2x2 transform kernel for H.264/AVC on a systolic PE array

H.264/AVC uses four small integer transforms on residual data: the 4x4
forward and inverse integer DCT, the 4x4 Hadamard (on the sixteen luma DC
coefficients of an intra-16x16 macroblock) and the 2x2 Hadamard (on the
four DC coefficients of each chroma block). All of them are matrix products
`Y = C * X * C^T` whose coefficients are only 0, ±1, ±2 and ±1/2, so they need
adders and shifts but no multipliers.

This kernel computes all four with one 4x4 systolic array of identical
processing elements (PEs). The 2-D transform is split into two 1-D passes
(rows, then columns) that run on the same array one after the other. The
unusual part is the transposition between the passes: it uses no transpose
memory. The array's skewed timing delivers the first-pass results in exactly
the order the second pass needs, so a handful of multiplexers feeding them
back is enough. The same kernel can also be built with only two rows or one
row of PEs. Each vector then passes through the array two or four times, so
it needs less area but gives lower throughput.

## How a block flows through the array

```
             input buffer (4 columns x 4 lines)        transposition switch
in_line ──►  [col0] [col1] [col2] [col3]   ◄── fb ───  4:1 mux per column
               │      │      │      │                  (+2:1 for 2x2 mode)
               ▼      ▼      ▼      ▼                        ▲
        0 ──► PE00 ─► PE01 ─► PE02 ─► PE03 ──────────────────┤ row 0
        0 ──► PE10 ─► PE11 ─► PE12 ─► PE13 ──────────────────┤ row 1
        0 ──► PE20 ─► PE21 ─► PE22 ─► PE23 ──────────────────┤ row 2
        0 ──► PE30 ─► PE31 ─► PE32 ─► PE33 ──────────────────┘ row 3
```

* **Vertical data.** Each column gets one element of the current input vector.
  The value moves down one row per cycle through a register in each PE.
* **Horizontal partial sums.** Each row starts from 0 at the left. PE(r,c)
  adds `C[r][c] * x` to the sum from its left neighbour. The right edge of
  row r therefore delivers output coefficient r of the 1-D transform.
* **Wavefront.** A vector that enters PE(0,0) at cycle T is handled by PE(r,c)
  at cycle T+r+c. Column c must receive its element c cycles after column 0.
  The input buffer provides this skew: a whole line is written at once, and
  column c is read c cycles later. Row r's result is in its last register at
  cycle T+4+r. The 1-D latency is 4 cycles, and the array accepts one vector,
  four values, every cycle.

For a 4x4 block the control unit issues the block's four lines as first-pass
vectors in cycles T0..T0+3. It issues the four second-pass vectors in cycles
T0+4..T0+7. The next block can start at T0+8.

### Why no transpose memory is needed

Let `W[i][j]` be coefficient i of first-pass vector j, which is line j. The
second pass must feed column k of vector m with `W[m][k]`, at cycle
T0+4+m+k. Coefficient m of vector k is the output of row m. It sits in that
row's last register at cycle T0+k+4+m, the same cycle. The value is therefore
already at the array edge when column k needs it, and only for that one
cycle. The switch needs one 4:1 multiplexer per column. Column k selects
row `(t - t0 - k)`, where t0 is the cycle the block marker `NEW_4x4T` leaves
PE(0,3). Each column keeps a 2-bit select counter, which the marker (delayed
by k cycles) resets to row 0.

This timing requires that a block, once started, runs through all eight of
its cycles without a gap. The control unit therefore starts a block only
after all of its lines are in the input buffer.

### Two 2x2 transforms at once

For `T_HAD2`, one line carries row m of two independent 2x2 blocks: the left
block in elements 0-1 and the right block in elements 2-3. Only array rows 0
and 1 work; rows 2 and 3 multiply by zero. The PEs in column 2 discard the
partial sum from their left (the ACC_CLR decoder), so each row computes two
2-point sums:

* the left block's sum is tapped after column 1;
* the right block's sum leaves at the right edge.

In the switch, columns 2-3 reuse their 4:1 multiplexers on rows 0-1. Columns
0-1 take the column-1 taps through two 2:1 multiplexers, timed by the marker
leaving PE(0,1). A pair takes 2 + 2 cycles, so a new pair can start every
4 cycles.

## The processing element

Each PE has an arithmetic part and a control part.

* **Multiplier.** The M decoder turns (TYPE_T, row, column) into a magnitude
  (0, 1, 2, 1/2) and a sign. The magnitude is produced by selecting the
  input, the input shifted left or the input shifted right (arithmetic). The
  sign is applied as a bit inversion, with the +1 entering as the carry-in of
  the accumulator adder. One 32-bit adder per PE is the only arithmetic.
* **Registers.** The standing-data register passes X downwards. The
  accumulator register (ACC_out) passes the partial sum to the right.
* **Control part.** CALC (compute), CLR (clear the accumulator), NEW_4x4T
  (first vector of a block) and TYPE_T are registered and passed to the right
  and to the PE below. A single command at PE(0,0) thus sweeps the array with
  the data.
* **Stalls and reset.** A PE without CALC holds its state. EN low freezes
  every PE. RST clears them.

TYPE_T encoding (`utc_pkg::ttype_t`): `00` forward DCT, `01` inverse DCT,
`10` 4x4 Hadamard, `11` 2x2 Hadamard pair.

Coefficient matrices (rows = output coefficient, columns = input element):

| type | matrix |
|---|---|
| forward DCT | `[1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]` |
| inverse DCT | `[1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2]` |
| 4x4 Hadamard | `[1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]` |
| 2x2 Hadamard | `[1 1; 1 -1]` on elements 0-1 and again on 2-3 |

The ×1/2 is an arithmetic shift right of the input value. Rows are
transformed before columns, so the inverse DCT matches the H.264 1-D
butterflies exactly. As in H.264, scaling and normalisation (for example the
final `(x+32)>>6` of the decoder) belong to the quantiser and are not done
here.

## Interface (`utc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `en` | in | 1 | global enable; low freezes the whole kernel |
| `clr_req` | in | 1 | clear all PE accumulators; taken only in a cycle with no vector issued |
| `in_valid` / `in_ready` | in / out | 1 | one line per cycle when both are high |
| `in_line[4]` | in | 32 each | one row of a block, element 0 first |
| `in_type` | in | 2 | transform type of the line's block |
| `out_valid[3:0]` | out | 4 | a result is on lane r |
| `out_h2[3:0]` | out | 4 | the lane carries a 2x2 result |
| `out_data[4]` | out | 32 each | result lanes |
| `busy` | out | 1 | a vector enters the array this cycle |

Parameters: `ROWS` (4, 2 or 1 rows of PEs, default 4; see below) and
`DEPTH` (lines per input buffer column, default 4).

**Input.** A 4x4 block is four consecutive lines (row 0 first) of the same
type. A 2x2 pair is two lines. `in_ready` falls when any buffer column is
full.

**Output.** For a 4x4 block, lane r delivers row r of Y: element m comes on
its m-th valid cycle, and lane r runs one cycle behind lane r-1. For a 2x2
pair, lanes 0-1 carry rows 0-1 of the left result and lanes 2-3 carry rows
0-1 of the right result.

**Timing.** All timings are counted in enabled cycles from the cycle a block
enters the array.

| | first result | last result | new block every |
|---|---|---|---|
| 4x4 block | 8 | 14 | 8 cycles |
| 2x2 pair | 4 | 8 | 4 cycles |

(four rows; the reduced setups are listed further down)

A 1-D pass produces 4 values per cycle. A finished 2-D 4x4 transform comes
out at 2 coefficients per cycle, because every block passes through the
array twice.

Data are 32-bit two's complement throughout, with no saturation. Residues
(9 bits) and H.264 coefficient ranges stay far inside that.

## Reduced setups (2x4 and 1x4 PEs)

The parameter `ROWS` of `utc_top` (default 4) builds the kernel with 2 or
1 rows of PEs instead of 4, trading throughput for area. The columns, the
input buffer and the interface are unchanged.

* **Sweeps.** With R rows, each vector passes through the array S = 4/R
  times (a 2x2 pair: twice on one row, once on two). On sweep s, array row r
  computes coefficient `s*R + r`. The sweep number moves through the array
  with the wavefront and forms the PE's row coordinate for the M decoder.
  The input buffer re-reads a block's lines at an offset for every sweep and
  releases them only on the last one.
* **Variable delay elements** (`utc_vde`, one per column). The second pass
  reads each first-pass value only after all sweeps of the first pass, so
  the value must wait. Each element has four standing-data registers. It
  writes coefficient `s*R + r` when row r presents it on sweep s, counted
  from the delayed block marker, and the second-pass vector number reads it.
  With four rows, and for a 2x2 pair on two rows, the elements are bypassed.

| rows | 4x4 block every | 4x4 last result | 2x2 pair every | 2x2 last result |
|---|---|---|---|---|
| 4 | 8 | 14 | 4 | 8 |
| 2 | 16 | 20 | 4 | 8 |
| 1 | 32 | 35 | 8 | 11 |

Cycles are counted from the cycle a block enters the array. Lane j still carries row j
of Y (or of the 2x2 results), but fewer lanes are active at once; `out_valid`
marks them.

## Files

| file | contents |
|---|---|
| `rtl/utc_pkg.sv` | word type, `ttype_t`, multiplier command, coefficient table `coef()` |
| `rtl/utc_pe.sv` | processing element |
| `rtl/utc_pe_array.sv` | ROWSx4 array with the row outputs and column-1 taps |
| `rtl/utc_input_buffer.sv` | line-loaded, per-column-read FIFOs and feedback multiplexers |
| `rtl/utc_transpose_switch.sv` | memory-free transposition multiplexers and their select counters |
| `rtl/utc_vde.sv` | variable delay element of the switch (reduced setups) |
| `rtl/utc_control.sv` | block scheduler, per-column controls, result-valid delay lines |
| `rtl/utc_top.sv` | the kernel |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_utc_macroblock.sv` | whole-macroblock workload at the default size |
| `tb/tb_utc_top_core.sv`, `tb/tb_utc_scaled.sv` | the kernel test for any `ROWS`, run with 2 and 1 rows |

Each testbench prints `TB_RESULT checks=N failures=M`. The block testbenches
compare each module against an independent model: integer coefficient tables
and queues. `tb_utc_top` runs the whole kernel at its default size. It sends
a random mix of all four types with input gaps, back-pressure, enable drops
and clear requests, and checks:

* every coefficient against a reference 2-D transform;
* the latency of each block (14 or 8 cycles);
* the 8- and 4-cycle block spacing of a continuous stream;
* that each of these mechanisms actually occurred.

`tb_utc_macroblock` streams whole 4:2:0 macroblocks: 24 forward DCTs back to
back, then the luma DC Hadamard and the chroma DC pair, built from the
kernel's own DC results. A macroblock takes 210 cycles from its first block
to its last result: 204 cycles of issue plus a short wait for the chroma DC
values.

`tb_utc_scaled` runs the same test on the 2-row and 1-row kernels, with the
latencies and spacings of the table above.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/utc_pkg.sv rtl/utc_pe.sv \
  rtl/utc_pe_array.sv rtl/utc_input_buffer.sv rtl/utc_control.sv \
  rtl/utc_vde.sv rtl/utc_transpose_switch.sv rtl/utc_top.sv tb/tb_utc_top.sv --top-module tb_utc_top
./obj_dir/Vtb_utc_top
```

## What follows the original architecture and what is this design's own

From the original architecture:

* the overall organisation (input buffer, 4x4 array of identical PEs, memory-free transposition switch, control unit);
* the downward data and rightward partial-sum flow with zeros fed into column 0;
* the PE with standing-data registers, a shift-based multiplier, M and ACC_CLR decoders, and forwarded CALC/CLR/NEW_4x4T/TYPE_T;
* the TYPE_T encoding;
* the wavefront schedule: second pass after four cycles, new block after eight;
* the 14-cycle 2-D latency;
* the 2x4 and 1x4 setups with the vectors re-fed and variable delay elements of registers and bypass multiplexers in the switch;
* two 2x2 transforms on the top two rows;
* four 4:1 plus two 2:1 feedback multiplexers reset by NEW_4x4T;
* the 32-bit adders.

Choices made here where the architecture leaves the detail open:

* the valid/ready line interface, and the type carried with each line;
* the result lanes and their valid flags;
* the start rule (a block waits until all its lines are buffered);
* the counter form of the switch control;
* which multiplexer feeds which column in 2x2 mode;
* negation through the adder carry;
* the gate-level form of the control part;
* synchronous reset;
* the sweep-number coordinate, the read-ahead re-feed and the addressed four-register delay elements of the reduced setups;
* clear requests accepted only between vectors.

Known departures and limits:

* **Setup chosen at build time.** The number of PE rows is a parameter.
  Switching between setups while running, by a system controller, is not
  built. The input buffer, switch and control unit are built for the same
  `ROWS`; with 4 rows the delay elements and the re-feed logic drop out
  instead of sitting there bypassed.
* **2-D throughput.** A 2-D 4x4 transform comes out at 2 coefficients per
  cycle. Figures of 4 coefficients per cycle for this architecture count the
  1-D rate of the array.
* **No 8x8 transform.** The 8x8 DCT of the High profile is not supported.
