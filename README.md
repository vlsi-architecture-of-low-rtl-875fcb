# 2-D lifting 5/3 DWT with interlaced read scan

This is a one-level, two-dimensional discrete wavelet transform for
JPEG2000's reversible (lossless) 5/3 filter. It needs no transpose memory: the
only storage that grows with the image is **N words** for an N x N image, and
an image takes **(3/4)N² + 6 clock cycles**. The default size is 128 x 128,
which takes 12 294 cycles and uses 128 words of 12 bits.

The architecture follows Chiang, Hsia, Chen and Lo, *"VLSI Architecture of Low
Memory and High Speed 2-D Lifting-Based Discrete Wavelet Transform for JPEG2000
Applications"*. That text gives the read order, the block structure (two row
processors, two column processors, shift-and-add lifting units, queues), the
memory size and the cycle count. It does not give the internal schedule,
the widths or the interfaces. These were worked out for this RTL, and the
section "Where this RTL departs or fills in" lists them.

## The problem and the trick

A separable 2-D DWT filters every row and then every column of the row
results. Done naively, the row results of the whole image must be stored
and read back transposed, which takes N² words. A line-based design needs a
few lines, which is about 2.5N to 3.5N words.

The **interlaced read scan (IRSA)** changes the order in which the image is
read. A 5/3 lifting step needs only three neighbouring pixels X(2k), X(2k+1)
and X(2k+2) to produce one high-pass and one low-pass coefficient. So the scan
reads those three pixels of row 0, then the same three columns of row 1, of
row 2, and so on to the last row. Only then does it move right, to columns
2k+2 .. 2k+4. Column 2k+2 is read twice.

```
 pass k = 0          pass k = 1           ...   pass k = N/2-1
 row 0: X0 X1 X2     row 0: X2 X3 X4            row 0: X(N-2) X(N-1) [X(N-2)]
 row 1: X0 X1 X2     row 1: X2 X3 X4                   ...
  ...                 ...
```

Each pass therefore produces a complete *column* of row coefficients (H(r,k)
and L(r,k) for r = 0..N-1), in top-to-bottom order. The vertical filter can
consume that column as it comes out, so nothing needs transposing. Input is
row-wise, output is column-wise.

One thing must still be remembered between passes. The low-pass update of
row r in pass k needs H(r,k-1), the high-pass coefficient that row produced
in the previous pass, N/2 steps earlier. Keeping one such value per row gives
the N-word memory.

## Lifting arithmetic

For a 1-D line x[0..N-1], with floor division:

```
hi[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)        predict
lo[n] = x[2n]   + floor((hi[n-1] + hi[n] + 2) / 4)    update
```

Both edges use whole-sample symmetric extension: x[N] = x[N-2] and
hi[-1] = hi[0]. No multiplier is needed. One **shift-and-add unit**
(`dwt_mac`) adds the two neighbours (plus 2 for the update), shifts
arithmetically right by 1 or 2, and subtracts from or adds to the centre
sample. An arithmetic shift is a floor division for negative values as well.
The reversible 5/3 filter has no scaling step.

## Data flow

```
            pix1 (even rows)                     pix2 (odd rows)
                 |                                     |
         +-------v--------+                    +-------v--------+
         | Image_1        |                    | Image_2        |
         | input unit     |                    | input unit     |
         | shift-and-add  |                    | shift-and-add  |
         | queue N/2 words|                    | queue N/2 words|
         +---H--------L---+                    +---H--------L---+
             |         \______________________/____|        |
             |          _______________________\___         |
             |         /                        \  \        |
         +---v--------v---+                    +-v--v-------v---+
         | Vertical_H     |                    | Vertical_L     |
         | even: H(2m)    |                    | even: L(2m)    |
         | odd : H(2m+1)  |                    | odd : L(2m+1)  |
         +---HH------HL---+                    +---LH------LL---+
```

* **Control unit** (`dwt_ctrl`) counts the phase (A, B, C = the three pixels
  of a read), the row pair m and the pass k. It puts out the requested
  addresses: rows 2m and 2m+1 and one shared column. It also puts out
  `first_pass` and `last_pass`.
* **Row processors** (`dwt_row_proc`, two instances) each handle half the rows
  and take one pixel per clock. Each has an **input unit**
  (`dwt_input_unit`), one shift-and-add unit and a **queue** (`dwt_queue`) of
  N/2 words.
* **Column processors** (`dwt_col_proc`, two instances) run the same lifting
  down the columns. Vertical_H turns the H column into HH (its high-pass) and
  HL (its low-pass). Vertical_L turns the L column into LH and LL. In each
  name the first letter is the row filter and the second the column filter.
  A column arrives two rows at a time and in order, so these units need only a
  few registers.

## Schedule: the hard part

Two pixels enter per clock, one per row processor. Each three-pixel step
gives each processor one H and one L, so there are (N/2)·(N/2) steps of
three clocks. Every shift-and-add unit does two operations in each
three-clock window. Clock numbers are relative to the start of step s:

| clock | row processor                                          | column processor (one pair every 3 clocks)                 |
|-------|--------------------------------------------------------|------------------------------------------------------------|
| 3s    | pixel A → reg; **update** of step s-1 → L              | pair m arrives: **predict** hi(m-1), using Y(2m) off the bus |
| 3s+1  | pixel B → reg; L of step s-1 valid                      | **update** lo(m-1)                                          |
| 3s+2  | pixel C on bus: **predict** H                           | (hi(m-1), lo(m-1)) valid                                    |
| 3s+3  | H valid, pushed to queue; old H(r,k-1) popped           | next pair arrives                                           |

Details that are easy to miss:

* **The row update takes its left neighbour from the queue.** The update in
  clock 3s+3 uses H(r,k-1) from the queue head and H(r,k) from the register,
  then pushes H(r,k). On pass 0 nothing is popped and H(r,0) is used twice
  (left extension). On the last pass nothing is pushed, so the queue is empty
  again when the image ends.
* **Right extension happens in the input unit.** On the last pass X(N) would
  be needed. The input unit substitutes the held X(N-2), which is the pixel A
  of that step. The control unit also shows column N-2 on `rd_col`, so the
  address stays in range.
* **Column end flush.** The predict for pair m needs Y(2m+2) from the next
  pair, so pair m is normally finished when pair m+1 arrives. The last pair
  of a column has no successor. When it arrives, the column unit does four
  operations in a row: predict and update of pair N/2-2, then predict (with
  Y(N) = Y(N-2)) and update of pair N/2-1. The fourth one falls on the
  arrival of pair 0 of the next column, which needs no arithmetic, so the
  shared unit is never asked to do two things in one clock. Assertions check
  this in both processor types.
* **Latency.** The last input is in clock T-1, where T = (3/4)N². The last H
  pair reaches Vertical_H at T. The L pair reaches Vertical_L one clock later,
  at T+1. Vertical_L's flush ends with the last LL valid in clock T+5. Counted
  from the first pixel request to the last output, inclusive, an image takes
  T + 6 clocks. That is 54 for N = 8 and 12 294 for N = 128.

## Interface (`dwt2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse; accepted while idle or in the `done` clock, ignored otherwise |
| `busy` | out | 1 | an image is in flight |
| `rd_valid` | out | 1 | pixel request this clock |
| `rd_row1`, `rd_row2`, `rd_col` | out | log2 N | pixel addresses: `pix1` = image[`rd_row1`][`rd_col`], `pix2` = image[`rd_row2`][`rd_col`] |
| `pix1`, `pix2` | in | 8 | pixels, expected **in the same clock** as the request |
| `vh_valid`, `hh`, `hl`, `vh_row`, `vh_col` | out | 1, 12, 12, log2 N - 1 ×2 | HH and HL coefficients at subband position (row, col) |
| `vl_valid`, `lh`, `ll`, `vl_row`, `vl_col` | out | same | LH and LL coefficients |
| `done` | out | 1 | last LL coefficient of the image |

There is no flow control. The pixel source must answer every request in the
same clock, for example from an asynchronous-read frame buffer. The outputs
must be taken when they are valid. Each (HH, HL) and (LH, LL) pair comes out
exactly once. The order is column by column, and top to bottom within a
column.

Parameters: `N` (default 128, even, ≥ 4) on every module that depends on the
image size. The widths are constants in `dwt_pkg`: `PIXEL_W = 8` and
`COEF_W = 12`. For 8-bit pixels the 5/3 coefficients stay within 11 signed
bits: the row L lies in [-128, 383], LL in [-384, 639], and HH, HL and LH
within ±511. The twelfth bit is margin.

Size after coarse synthesis at N = 128: about 290 word-level cells, 396
flip-flop bits and 1536 memory bits (2 × 64 × 12).

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | widths, `pixel_t`, `coef_t`, lifting-op and phase enums |
| `rtl/dwt_mac.sv` | shift-and-add lifting unit (predict / update) |
| `rtl/dwt_input_unit.sv` | three-pixel collector with right-edge mirroring |
| `rtl/dwt_queue.sv` | circular FIFO, push and pop in one clock |
| `rtl/dwt_ctrl.sv` | IRSA counters and addresses |
| `rtl/dwt_row_proc.sv` | horizontal lifting processor (Image_1 / Image_2) |
| `rtl/dwt_col_proc.sv` | vertical lifting processor (Vertical_H / Vertical_L) |
| `rtl/dwt2d_top.sv` | the complete transform |
| `tb/dwt_ref_pkg.sv` | golden model: whole-image 5/3 DWT with integer floor division |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dwt2d_full` |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog. For example, the N = 128 run:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dwt_pkg.sv tb/tb_dwt2d_full.sv --top-module tb_dwt2d_full -Mdir obj -o sim
./obj/sim
```

Replace the name for the other testbenches.

* `tb_dwt2d_full` runs at the default N = 128 with no parameter overrides. It
  transforms three images back to back (random, checkerboard, gradient) and
  compares all 16 384 coefficients of each against the golden model. It also
  checks 12 294 clocks per image. It takes about 20 s to build and run.
* `tb_dwt2d_top` runs at N = 8 with fourteen images, including all-0, all-255
  and checkerboard images. It checks the 54-clock time of each. It starts
  images back to back, and sends a start pulse during a run that must be
  ignored. It counts, and requires at least once, each mechanism: left and
  right row extension, queue reuse, top extension and bottom flush in the
  columns, the ignored start, and the back-to-back start.
* The block testbenches check the lifting unit against integer floor division
  and the queue against a queue model. They check the control unit's read
  order for N = 8 and N = 6, the row processor per row, and the column
  processor for N = 8 and N = 4, including output timing.

## Where this RTL departs or fills in

* **Only even N.** The scan is also defined for odd sizes, but this RTL
  requires N even and at least 4. An odd N would need one extra low-pass
  output per line and an idle second processor on the last row.
* **Where the queue sits.** The original text speaks of FIFOs that feed the
  row results to the 2-D stage, and its block diagram draws queues next to the
  vertical units. In this schedule the column stage needs no storage. The
  memory that grows with the image is the previous-pass H of each row, so the
  queues are inside the row processors. The total is still N words.
* **Shared arithmetic unit.** One shift-and-add unit per processor does both
  predict and update, time-multiplexed as tabled above. The clock-by-clock
  schedule, including the column flush, was designed for this RTL. It
  reproduces the stated (3/4)N² + 6 cycle count exactly.
* **Widths, reset, handshake** (8-bit pixels, 12-bit coefficients,
  asynchronous reset, `start`/`busy`/`done`, same-clock pixel reads, output
  coordinates) are this design's choices.
* **One decomposition level.** Further levels, for example by running the
  transform again on LL, are not included.
* **Not modelled:** the frame memory the pixels come from, and the reported
  100 MHz / 0.35 µm implementation figures. No timing has been checked here.
