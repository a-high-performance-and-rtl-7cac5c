# Pipelined lifting 2-D DWT for JPEG2000 (5/3 and 9/7)

This is a one-level, two-dimensional discrete wavelet transform for the two
JPEG2000 filters: the reversible integer 5/3 and the irreversible 9/7. The
forward transform takes one pixel per clock cycle and produces one
coefficient per cycle. The inverse transform runs the same way in the other
direction, and sits beside it in the top.

The main idea is to rewrite each lifting step so that the predictor and the
updater merge into a single formula. In the standard form, a lifting step
needs three neighbouring input samples before it can produce anything. In the
merged form, a pair of samples (one even, one odd) is enough to advance the
step: all that must be kept for the next pair is two partial sums. That has
two effects:

* A whole lifting step runs on one multiplier and two adders, with one
  multiplier delay as the critical path. Every sample is multiplied once,
  right after it enters, and only additions follow.
* The row transform of a 2-D DWT can start as soon as two neighbouring
  columns have been column-transformed. It needs only two words of state per
  image row, not a buffer of several columns. For an N-row image the on-chip
  memory is 3.5N words for 5/3 and 5.5N words for 9/7.

The image is processed column-first, in three concurrent stages:

```
 raw pixels ─┐
             ├─► column processor ─► transposing buffer ─► row processor ─┬─► LL  → external RAM
 LL from RAM ┘    (registers only)    (N + N/2 words)      (2N words/step) └─► HL, LH, HH out
```

The LL band goes to an external RAM of MN/4 words. A further decomposition
level reads it back through the same input.

The inverse transform uses the same three kinds of stages in the same order,
with inverse lifting PEs in place of the forward ones.

## The merged lifting step

A lifting step with predictor α and updater β turns a signal of even
samples s⁰ and odd samples d⁰ into

```
d¹_j = d⁰_j + α (s⁰_j + s⁰_{j+1})
s¹_j = s⁰_j + β (d¹_{j-1} + d¹_j)
```

Multiply the predictor line by β and call the result H:

```
H_j = β·d⁰_j + βα·(s⁰_j + s⁰_{j+1})          ( = β·d¹_j )
L_j = s⁰_j + H_{j-1} + H_j                   ( = s¹_j   )
```

With pairs (e_j, o_j) = (s⁰_j, d⁰_j) arriving one sample per cycle, this is
computed as follows. Index j is the pair that arrives now.

| quantity | formed when | formula |
|---|---|---|
| Sum_j | o_j has been multiplied | c_o·o_j + c_e·e_j |
| H_{j-1} | e_j has been multiplied | Sum_{j-1} + c_e·e_j |
| L_{j-1} | H_{j-1} is known | T_{j-1} + H_{j-1} |
| T_j | H_{j-1} is known | e_j + H_{j-1} |

Sum and T are the only state a line carries from one pair to the next.
Per pair there are two multiplications and four additions. One multiplier
and two adders, each used every cycle, cover that.

**9/7 filter.** It has two lifting steps and a scaling step. Both lifting
steps use the merged form, with coefficients that absorb each other's
factors. The values below are 12-bit fractions, stored as signed 16-bit
integers (value × 4096) in `dwt_pkg`.

| use | constant | value | integer |
|---|---|---|---|
| step 1, odd | β | −0.052978515625 | −217 |
| step 1, even | βα | 0.083984375 | 344 |
| step 2, odd | (δ/β)/2 | −4.185546875 | −17144 |
| step 2, even | (δγ)/2 | 0.195556640625 | 801 |
| scaling, high | 2·K2/δ | 5.546875 | 22720 |
| scaling, low | 2·K1 | 1.62548828125 | 6658 |

Step 1 outputs s¹ and βd¹. Step 2 takes those as its even and odd inputs and
outputs s² and δd². Its coefficients are halved to keep the internal range
below four times the input range. Its even input is halved on the adder
path too, so both outputs are exactly half size. The scaling multiplier's
doubled factors undo that halving.

**5/3 filter (reversible).** Here c_o = 1/4 and c_e = −1/8. The integer
lifting rules use floors and rounding:

```
d¹ = d⁰ − ⌊(s⁰_j + s⁰_{j+1})/2⌋
s¹ = s⁰ + ⌊(d¹_{j-1} + d¹_j + 2)/4⌋
```

The merged step reproduces them exactly with three changes:

* 0.5 is added to the odd sample before the multiplier, and to the even
  sample on the adder path.
* H keeps only two fraction bits.
* L is floored to an integer.

The H output is then shifted left by two bits so that it equals d¹.

**Boundaries.** The design uses whole-sample symmetric extension, as in
JPEG2000, which becomes two doublings:

* The first pair of a line uses 2·H₀ in place of H₋₁ + H₀.
* The last pair uses 2·c_e·e_{K-1} in place of c_e·(e_{K-1} + e_K).

## The processing element (`lift_pe`)

One PE is one merged lifting step: a pipeline of one multiplier and two
adders. The table shows when each slot of a pair is active. Cycle 0 is the
cycle the even sample enters.

| cycle | multiplier | upper adder | lower adder | output |
|---|---|---|---|---|
| 1 | c_e·e_j | | | |
| 2 | c_o·o_j | H_{j-1} = Sum + c_e·e_j | | |
| 3 | | Sum = c_o·o_j + c_e·e_j | L_{j-1} = T + H_{j-1} | |
| 4 | | | T = e_j + H_{j-1} | L_{j-1} |
| 5 | | | | H_{j-1} |

Pair j thus completes pair j−1: its L leaves 6 cycles after e_j entered,
and its H leaves 7 cycles after. The last pair of a line is completed in the
slot of the next line's first pair. That slot has nothing of its own to
finish, so the stream stays continuous across lines. For a lone line of N
samples, the last output leaves N + 5 cycles after the first input.

The registers are the following:

* input
* product
* c_e·e
* Hi
* Hi_delay
* Low
* two even-sample delays
* Sum
* T

That is ten in all.

The parameters choose where Sum and T live:

* `MAX_ROWS = 1`: the state is two registers. This is the column PE, which
  handles one line at a time.
* `MAX_ROWS = N`: the state is two N-word memories, Sum_MEM and T_MEM,
  indexed by row. This is the row PE. Rows arrive interleaved pair by pair
  (row 0 pair j, row 1 pair j, …), and each memory is read and written once
  per pair, at the same address.

When the input stops at the end of a frame, the last pair of every line is
still pending. The PE then drops `in_ready` and runs `cfg_rows` flush slots
by itself. If the next frame follows at once, its first pairs do that work
and no flush happens.

Other parameters:

* `LOSSLESS` selects the reversible 5/3 rounding.
* `SHR_EVEN` halves the even samples on the adder path. The second 9/7 step
  uses it.
* `IN_REG = 0` drops the input register when the PE follows another PE,
  whose output register serves instead. This saves one cycle of latency in
  the 9/7 cascade.

## Column processor (`column_processor`)

The column processor is the 1-D transform along each column, with its state
in registers:

* 5/3: one PE.
* 9/7: PE (step 1) → PE (step 2) → scaling multiplier (`scale_mult`).

Samples go in and out in the same order: s₀, d₀, s₁, d₁, … for each column,
with columns back to back. The last output of a column leaves N + 5 cycles
(5/3) or N + 11 cycles (9/7) after the column's first sample.

## Transposing buffer (`transpose_buffer`)

The row processor needs, for each pair of neighbouring columns (2k, 2k+1),
the samples in the order x(0,2k), x(0,2k+1), x(1,2k), x(1,2k+1), …. The
buffer builds that order from the column stream with 1.5N words:

* An even column is written into Even_MEM (N words).
* When the first sample of the following odd column arrives, output starts
  and runs at one sample per cycle. It alternates between Even_MEM and the
  odd column.
* The odd column arrives at full rate but leaves at half rate. So only N/2
  of its samples need to wait, in Odd_MEM.
* While the second half of the pair drains, the next even column is already
  being written into the Even_MEM words that have been freed.

Both memories are first-in first-out, each with one wrapping pointer. The
latency is N cycles and the output is continuous over a frame. For N = 4,
the cycle-by-cycle order is:

| clk | in | out | clk | in | out |
|---|---|---|---|---|---|
| 0 | x(0,0) | | 10 | x(2,2) | x(3,0) |
| 1 | x(1,0) | | 11 | x(3,2) | x(3,1) |
| 2 | x(2,0) | | 12 | x(0,3) | x(0,2) |
| 3 | x(3,0) | | 13 | x(1,3) | x(0,3) |
| 4 | x(0,1) | x(0,0) | 14 | x(2,3) | x(1,2) |
| 5 | x(1,1) | x(0,1) | 15 | x(3,3) | x(1,3) |
| 6 | x(2,1) | x(1,0) | 16 | | x(2,2) |
| 7 | x(3,1) | x(1,1) | 17 | | x(2,3) |
| 8 | x(0,2) | x(2,0) | 18 | | x(3,2) |
| 9 | x(1,2) | x(2,1) | 19 | | x(3,3) |

## Row processor (`row_processor`)

The row processor has the same cascade as the column processor, built from
row PEs (`MAX_ROWS = 512`). Each row PE holds 2N words (Sum_MEM and T_MEM).
A row's state is read, updated and written back each time a new pair of
that row arrives. So all N rows are transformed in step, one column pair
at a time.

The output keeps the row-interleaved order: for each output pair index p and
each row r, first L then H. The last pair of every row can only be finished
after the whole frame has been read. It comes out in N flush slots (2N
cycles) after the last input, or during the next frame's first column pair.

## The 2-D top (`dwt2d_top`)

Parameters:

* `FILTER` is `F97` (default) or `F53`.
* `MAX_ROWS` and `MAX_COLS` set the largest image: 512 × 512 by default.

The 9/7 forward transform holds:

* 6 multipliers and 8 adders;
* 45,056 bits of memory: 1.5N + 4N words of 16 bits, with N = 512.

The 9/7 inverse beside it has 8 multipliers (including a K2⁻¹ multiplier
ahead of each processor) and 53,248 bits of memory: 6.5M words of 16 bits.

**Frame protocol.**

1. Set `cfg_rows` = N and `cfg_cols` = M. Both must be even, with
   2 ≤ N ≤ `MAX_ROWS` and 2 ≤ M ≤ `MAX_COLS`.
2. Set `src_sel`: 0 takes `raw_pix` (8-bit unsigned, no level shift), 1
   takes `ll_data`.
3. Present the M·N samples column by column, one per cycle, while
   `in_ready` is high. `in_valid` must not drop inside a frame.
4. After the last sample, `in_ready` stays low until every coefficient of
   the frame has left. `done` pulses once after the last one.

**Outputs.**

* LL coefficients come out on `ll_wr_en`, `ll_wr_addr` and `ll_wr_data`.
  The address is row × M/2 + column of the LL band.
* The other bands come out on `hp_valid`, `hp_band`, `hp_row`, `hp_col` and
  `hp_data`. `hp_band` is 1 for HL (high along rows), 2 for LH (high along
  columns) and 3 for HH.

**Next level.** For the next level, set N/2, M/2 and `src_sel = 1`. The top
drives `ll_rd_addr` (row × cfg_cols + column) with the address of the
sample it expects in the current cycle, so an asynchronous-read RAM can
feed `ll_data` directly. Reading and writing the same RAM in one level
would overwrite data still to be read, so use two banks, or one of
2 × MN/4 words.

**Timing.** Counted from the first input to `done`, a frame takes:

* 5/3: M·N + 3N + 10 cycles;
* 9/7: M·N + 5N + 20 cycles.

The terms are:

* M·N: one pixel per cycle.
* N: the transposing buffer's latency.
* 2N: the right-boundary pairs of all rows, after the last input.
* 2N (9/7 only): the second row PE's boundary pairs.
* The pipelines: 10 cycles for the two 5/3 processors and 20 for the two
  9/7 processors.

When frames follow back to back, the flush tail overlaps the next frame.

## The inverse transform (`ilift_pe`, `idwt_column_processor`, `idwt2d`)

The inverse lifting steps can be merged in the same way as the forward ones.
Undoing an update step and then a predict step becomes one step with two
coefficients c_s and c_d:

```
G_j = c_s·s_j + c_d·(d_{j-1} + d_j)        new even sample
D_j = d_j ± k·(G_j + G_{j+1})              new odd sample
```

`ilift_pe` computes this with the forward PE's resources: one multiplier and
two adders, plus two words of state per line (E = c_d·d_{j-1} and
T = d_{j-1} ± k·G_{j-1}). The upper adder builds G. The lower adder finishes
the previous pair's D and starts the next one. For the boundary it doubles
the c_d term on the first pair and doubles G on the last pair, so every
line ends with a flush slot as in the forward PE. The output of a pair slot
is the previous pair's odd sample, then this pair's even sample. For one
line at a time that is simply x(0), x(1), x(2), ….

The inverse chains are:

| | 5/3 | 9/7 |
|---|---|---|
| input | s, d | d × K2⁻¹ (combinational, before the first PE's input register) |
| PE 1 | c_s = ½, c_d = −⅛, reversible mode | c_s = (γ/K1)/2, c_d = −(δγ)/2, d halved on the adder path: gives γs¹/2 and d¹/2 |
| PE 2 | — | c_s = (α/γ)/2, c_d = −(βα)/2, k = 2: gives αs⁰/4 and d⁰/2 |
| scaling | — | even × 4/α, odd × 2 |

The halvings keep every internal value inside Q11.5, as in the forward
direction. In the reversible 5/3 mode the PE does three things:

* It adds ¼ to s before the multiplier.
* It keeps one fraction bit of G and doubles it on output.
* It floors D.

Together these give s⁰ = ⌊s¹ + ¼ − (d_{j-1} + d_j)/4⌋ and
d⁰ = ⌊d¹ + (s⁰_j + s⁰_{j+1})/2⌋ exactly.

`idwt_column_processor` is the 1-D inverse, with a latency of N + 5 (5/3)
or N + 11 (9/7) cycles. `idwt2d` puts it together with a transposing buffer
and an inverse row processor (`idwt_row_processor`), the same
column-buffer-row arrangement as the forward transform:

```
coefficients, row by row ─► idwt_column_processor ─► transpose_buffer ─► idwt_row_processor ─► (row, col, sample)
                             (undo rows)              (1.5M words)         (undo columns)
```

The coefficient array goes in row by row. It uses the interleaved layout
of the forward transform: LL at even row and even column, HL at even row
and odd column, and so on. Because of that scan order, the first processor
undoes the horizontal transform and the second undoes the vertical one. That
is the exact reverse of the forward order, and it is what makes the 5/3 round
trip bit-exact.

Interface of the inverse (`inv_*` ports of the top):

* Set `inv_cfg_rows` = N and `inv_cfg_cols` = M.
* Present the N·M coefficients on consecutive cycles while `inv_in_ready`
  is high.
* Each reconstructed sample leaves with its `inv_out_row` and
  `inv_out_col`.
* `inv_done` pulses after the last sample: N·M + 3M + 10 cycles after the
  first input for 5/3, N·M + 5M + 21 for 9/7.

The size must not change until the previous frame's `done`.

**Realigning between the two 9/7 row PEs.** With M interleaved lines, the
first PE produces (D_{j-1}, G_j) in each slot. The second PE needs
(s_j, d_j) of the same j. The first row PE therefore runs with `REALIGN`:
it keeps each line's G in an extra M-word memory until the matching D is
known, and then emits the pair in natural order. The cost is M words. The
9/7 inverse row processor holds 5M words instead of 4M, so the whole 9/7
inverse holds 6.5M words, and the 5/3 inverse 3.5M.

The published inverse data path avoids this memory. Each of its slots pairs
d_{j-1} with s_j, and the ends of a line are padded with empty operations.
That way each step's output order is already the next step's input order.
Moving `ilift_pe` to that pairing would remove the realignment memory.

## Numbers and accuracy

Samples are 16-bit signed fixed point with 5 fraction bits (Q11.5): −1024
to +1023.97. Coefficients are Q4.12. Every product is floored back to 5
fraction bits; additions are exact.

Eight-bit input plus two bits of growth plus a sign fits in 11 integer bits.
The range limits behind that:

* The scaled 9/7 steps keep intermediate values below 4× the input range.
* Measured extremes over ten 512 × 512 test images at 5 fraction bits stay
  within −553 … 504.

Results:

* **5/3:** bit-exact with integer JPEG2000 lifting, at every level.
* **9/7:** compared with a double-precision reference on a 512 × 512 image,
  the rms error is about 0.6 and the worst coefficient is off by about 2.9.
  Most of this comes from flooring βd¹ to 5 fraction bits before step 2
  multiplies it by δ/β ≈ −8.4. Keeping more fraction bits reduces it; the widths are
  the `DATA_W` and `FRAC_W` constants of `dwt_pkg`.
* **9/7 inverse:** the output is within about 1.3 of a double-precision
  inverse of the same coefficients (rms about 0.4). A full 512 × 512
  forward-then-inverse round trip returns the image with rms error 0.81,
  which is 49.9 dB PSNR.
* **5/3 round trip:** the original image comes back exactly.

## Where this implementation makes its own choices

* **Frame time.** The published cycle counts are M·N + N + 10 (5/3) and
  M·N + 3N + 22 (9/7) for one level. This design takes 2N cycles more for
  one isolated frame. The reason is that a row cannot finish its last pair
  before a column pair beyond it would have arrived, so the boundary pairs
  of all N rows leave after the input ends. With frames back to back the
  extra time overlaps the next frame.
* **Scaling of step 2.** The halving of step 2 and where the even path is
  halved are inferred from the halved coefficients and the stated ranges.
  The same holds for the 5/3 coefficients ¼ and −⅛ and the 2-bit output
  shift.
* **Design-specific details.** The following were chosen here:
  * the handshake, flush and `done`/`busy` signals;
  * reset: asynchronous, active low, control only;
  * the FIFO addressing of the transposing buffer;
  * the band code and RAM address maps;
  * no level shift of raw pixels.
* **Inverse transform.** The inverse follows the merged inverse equations
  and the inverse coefficient values. The following were chosen here:
  * where the halvings are undone;
  * the 5/3 inverse coefficients and rounding;
  * the row-by-row input scan;
  * the realignment memory between the two 9/7 inverse row PEs.

  The inverse is separate hardware beside the forward transform. The two
  directions do not share one set of processors.

## Files

| file | content |
|---|---|
| `rtl/dwt_pkg.sv` | sample and coefficient types, coefficients, truncating multiply |
| `rtl/lift_pe.sv` | merged lifting PE (column or row form) |
| `rtl/scale_mult.sv` | 9/7 scaling multiplier |
| `rtl/column_processor.sv` | 1-D column transform |
| `rtl/transpose_buffer.sv` | Even_MEM/Odd_MEM reordering |
| `rtl/row_processor.sv` | 1-D row transform on interleaved rows |
| `rtl/ilift_pe.sv` | merged inverse lifting PE |
| `rtl/idwt_column_processor.sv` | 1-D inverse transform |
| `rtl/idwt_row_processor.sv` | 1-D inverse on interleaved lines |
| `rtl/idwt2d.sv` | one-level inverse 2-D DWT |
| `rtl/dwt2d_top.sv` | one-level 2-D DWT, forward and inverse side by side |
| `tb/dwt_ref_pkg.sv` | reference models: integer 5/3, double-precision 9/7, 1-D and 2-D, forward and inverse |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a full-size one |

## Simulation

Every testbench:

* prints `TB_RESULT checks=<n> failures=<n>` and finishes;
* has a watchdog;
* checks cycle counts where the design promises them.

To run one with Verilator 5, from the project root:

```
verilator --binary --timing -Wno-fatal rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv \
    rtl/lift_pe.sv rtl/scale_mult.sv rtl/column_processor.sv \
    rtl/transpose_buffer.sv rtl/row_processor.sv rtl/ilift_pe.sv \
    rtl/idwt_column_processor.sv rtl/idwt_row_processor.sv rtl/idwt2d.sv \
    rtl/dwt2d_top.sv \
    tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top
./obj_dir/Vtb_dwt2d_top
```

| testbench | what it covers |
|---|---|
| `tb_lift_pe` | column and row PEs: 9/7 step 1, halved step 2, exact 5/3; single-pair lines, self-flush, N + 5 latency |
| `tb_scale_mult` | both factors against exact products |
| `tb_transpose_buffer` | the N = 4 table above cell by cell, larger N, frames back to back |
| `tb_column_processor` | 5/3 and 9/7 columns against the references; N + 5 and N + 11 |
| `tb_row_processor` | 5/3 and 9/7, interleaved rows, two frames back to back, then a self-flush; time to first output |
| `tb_idwt_column_processor` | 5/3 (exact) and 9/7 inverse columns; N + 5 and N + 11; back to back, pause, short columns |
| `tb_idwt2d` | 5/3 (exact) and 9/7 inverse 2-D frames of several sizes, back to back and after pauses |
| `tb_dwt2d_top` | 9/7 and 5/3 tops, multi-level runs through the LL path (16×24 → 8×12 → 4×6), forward-then-inverse round trips, frame times, every band, counts of each mechanism |
| `tb_dwt2d_full` | the default top on one 512 × 512 9/7 frame, forward and then inverse |

Lint warnings that remain:

* unused bits, for example the top bit of `hp_row`, which a halved row
  index never sets;
* unused package constants;
* the odd-sample flag of the first inverse PE, which realignment makes
  redundant, and that of the inverse column processor inside `idwt2d`;
* the reset net also feeding assertions.
