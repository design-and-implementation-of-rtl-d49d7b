# Shape feature extractor: centroid distance and Fourier descriptors

A binary image of an object outline goes in; a stream of Fourier coefficients
that describe the object's shape comes out. The shape is turned into a
one-dimensional signature: the distance of each boundary pixel from the
object's centroid,

    r(t) = sqrt((x_t - x_c)^2 + (y_t - y_c)^2),   x_c, y_c = mean of the boundary coordinates

and the signature is transformed with a discrete Fourier transform,

    X[k] = sum_n r[n] * exp(-j 2 pi k n / M).

The signature does not change when the object moves in the image, and its
Fourier coefficients are a compact descriptor that a classifier (for example
an SVM in software) can use. The RTL is written for a Zynq-7000 system in which
the ARM processor loads each image into a block RAM and the programmable logic
does everything after that. It runs on a single clock. The reference system ran
it at 62 MHz.

Main configuration: a 32 x 64 image (32 rows, 64 columns) and a 16-point
transform.

## The processing chain

```
 processor bus ──► BRAM1 (2048 x 32, image, one pixel per word)
                     │ port B
                     ▼
              ┌──────────────────── bram_control ─────────────────────┐
              │ boundary_scan  IDLE → RD_BRAM1 ⇄ WR_BRAM2 → DONE      │
              │      │ {row,col} of every pixel == 1                   │
              │      ▼                                                 │
              │  BRAM2 (2048 x 16) ──port B──► pass 1: centroid_calc   │
              │                               (row sum, col sum, ÷ N)  │
              │                    ──port B──► pass 2: ccd_sqdist      │
              │                               → isqrt_pipe (16 stages) │
              └──────────────────────────────┬─────────────────────────┘
                   CCD sample, index, last   ▼
                                      fft_process → fft_core (16-point)
                                             ▼
                      re / im descriptors, coefficient index, frame done
```

The work is split into four steps:

1. **Boundary scan.** A row counter and a column counter walk the image.
   Every pixel word equal to 1 is an object pixel, and its (row, column) is
   written to BRAM2. The image must already hold only the outline. Words with
   any other value, including other non-zero values, are ignored.
2. **Centroid.** BRAM2 is read once. The row indices and the column indices
   are summed separately, and each sum is divided by the number of points.
   Both quotients are truncated to integers.
3. **Centroid contour distance (CCD).** BRAM2 is read a second time. For each
   point the unit forms `(row - x_c)^2 + (col - y_c)^2` as a 32-bit unsigned
   integer. A pipelined square root turns it into `floor(sqrt(.))`.
4. **Transform.** The CCD samples are cut into consecutive frames of 16. Each
   frame is transformed, and its 16 coefficients leave in natural order with
   their index.

Rows play the role of x and columns the role of y. Because the distance is
symmetric in the two, this choice does not change any result.

## Memories and the processor side

| memory | size | contents | port A | port B |
|---|---|---|---|---|
| BRAM1 | 2048 x 32 bits | pixel `row*64 + col` at byte address `4*(row*64+col)`; 1 marks an object pixel | top-level ports `i_bram1a_*`, for a bus-to-BRAM controller (byte enables, byte addresses) | boundary scan, read only |
| BRAM2 | 2048 x 16 bits | boundary point `n` as `{row[7:0], col[7:0]}` | boundary scan, write only | centroid and distance passes, read only |

Both memories have one cycle of read latency, and their outputs hold while the
port is disabled (`bram_tdp`). BRAM2 is as deep as the image, so even an
all-ones image fits.

To process a frame:

1. Write the image through port A.
2. Pulse `i_start` for one cycle.
3. Collect the coefficients on `o_tdata_*` whenever `o_tdata_valid` is high.
   `o_frame_done` is high with the last coefficient.

A start pulse is accepted only while the controller is not reading BRAM2 for
the previous frame. If the previous scan ended in DONE, a single pulse takes
the scan through IDLE into the new frame. Do not write BRAM1 while a scan is
running. `o_stateCheck` shows the scan state: 0 IDLE, 1 RD_BRAM1, 2 WR_BRAM2,
3 DONE.

## The boundary scan state machine

`boundary_scan` has four states:

| state | what happens | next state |
|---|---|---|
| IDLE | Clears the counters and the BRAM2 write address. | RD_BRAM1 on `i_start` |
| RD_BRAM1 | Issues one pixel address per cycle. Each word is checked the cycle after its address was issued. | WR_BRAM2 when the word is 1; DONE once the last pixel has been checked |
| WR_BRAM2 | Writes the pixel's `{row, col}` to BRAM2 and advances the write address. | RD_BRAM1 |
| DONE | Holds the point count. | IDLE on the next start |

A few details of RD_BRAM1:

- When the word is 1, no new address is issued in that cycle. The read
  pointer therefore needs no rewind.
- After leaving RD_BRAM1, the scan reads no further pixel until it comes back
  from WR_BRAM2.

With H boundary pixels, the scan spends `ROWS*COLS + 2H + 2` cycles in
RD_BRAM1 and WR_BRAM2. The count is one less when the last pixel is an
object pixel.

The scan records points in **raster order** (row by row), not by following
the contour. The signature is therefore the distance sequence in scan order.
This matters for the transform, as the next section explains.

## Signature framing and the descriptor word

This section describes the least obvious part of the design.

- **Frames of 16.** The transform length is 16, so the coefficient index is
  4 bits. Before the transform the signature is padded with zeros to a
  multiple of 16 samples. Each padding sample is made by sending the centroid
  itself through the distance unit, which gives a distance of 0. Each 16-sample
  frame is transformed independently. A signature of N points gives
  `ceil(N/16)` frames of 16 coefficients. For a typical 32 x 64 outline of 60
  to 80 points, that is 4 or 5 frames.
- **Sample index.** `o_indexCount` (7 bits) numbers the samples modulo 128.
  A sample whose index has its low four bits all ones closes a frame.
  `o_last` marks the final sample.
- **Transform output word.** The transform produces a 48-bit word in the
  layout of a common FFT core:

  | bits | contents |
  |---|---|
  | `[20:0]` | real part, unscaled, sign-extended through bit 23 |
  | `[44:24]` | imaginary part, sign-extended through bit 47 |

  The 21-bit fields come from 16 input bits, plus log2(16) bits of growth,
  plus 1. The bin index travels on a separate 4-bit `tuser`.
- **Descriptor outputs.** `fft_process` forms the outputs from that word:

  | output | formed from |
  |---|---|
  | `o_tdata_re_tmp` | `{tdata[20], tdata[14:0]}`, the real part as a 16-bit signed number |
  | `o_tdata_im_tmp` | `{tdata[44], tdata[38:24]}`, the imaginary part |
  | `o_tdata_usrink_tmp` | the coefficient index |
  | `o_tdata_re`, `o_tdata_im` | the coefficients divided by M = 16 (arithmetic shift), which is the 1/M normalisation of the DFT definition |

  For a 32 x 64 image no descriptor can overflow the 16-bit fields: the
  largest magnitude is 16 x 70 = 1120.

**Invariance.** Translation invariance holds exactly. The end-to-end test
moves a rectangle and gets bit-identical coefficients. Rotation invariance,
which holds for a full-length transform of a contour-ordered signature, does
**not** carry over to this framing. A rotated object changes the raster order
and the split into 16-sample frames. If rotation invariance is needed, take
magnitudes of a transform of the contour-ordered signature, which requires a
contour-following scan and a longer transform. Neither is implemented.

## The arithmetic units

- **`centroid_calc`** accumulates 20-bit sums and a 12-bit count, one point
  per cycle. Two restoring dividers (`seq_divider`, one quotient bit per
  cycle) run in parallel. The centroid is ready 21 cycles after the divide
  request. An empty image gives the centroid (0, 0).
- **`ccd_sqdist`** computes `(x-x_c)^2 + (y-y_c)^2` with signed differences.
  It takes one cycle.
- **`isqrt_pipe`** is a digit-by-digit integer square root. It takes a
  32-bit unsigned input and gives a 17-bit output, truncated. It has 16
  pipeline stages, one result bit per stage, and accepts one input per cycle.
  The output width and the truncation follow the square-root setting of a
  CORDIC core. A tag (the sample index and the last flag) travels with the
  data.
- **`fft_core`** is a pipelined radix-2 FFT of the single-path delay
  feedback (R2SDF) kind, with decimation in frequency. Four butterfly stages
  follow each other. Stage s holds a feedback shift register of `8 >> s`
  complex words. Each stage handles groups of `2D` samples, where D is its
  register length:
  - during the first D samples it stores the input, and sends out the
    differences it stored in the previous group, multiplied by their
    twiddle factor;
  - during the next D samples it adds each input to the stored sample and
    sends the sum on, and stores the difference.

  The twiddle factors are `cos(2 pi m/16)` in Q1.14 (16384 stands for 1.0),
  with rounding. Every stage uses one 26-bit width with 4 fractional guard
  bits, so nothing overflows. The result is rounded back to an integer. It
  stays within one unit of the exact transform for inputs below 100, such as
  distances in a 32 x 64 image, and within two units for full-scale 16-bit
  input. The whole pipeline
  moves one step for each sample accepted.

  The last stage gives the bins in bit-reversed order. A ping-pong pair of
  16-word buffers puts them back in natural order and sends them out one per
  cycle.

  When the input stops at a frame boundary while a frame is still inside,
  the core pushes it out by feeding a frame of zeros. Meanwhile
  `s_axis_data_tready` is low for 16 cycles. The zero frame gives no output.
  The first bin leaves 21 cycles after the last sample of its frame. That
  holds when the next frame follows without a gap, and when the core
  flushes. A gap inside the next frame delays it. Frames can follow each
  other at one sample per cycle. There is no output back-pressure.
  `bram_control` never sends samples during a flush, because its samples
  within one signature are gapless at frame boundaries; `fft_process`
  asserts this. Only FFT_LEN = 16 is supported, because the twiddle table is
  written for it.

## Timing

Let N be the number of boundary points and S = 16 * ceil(N/16). The last CCD
sample leaves `ROWS*COLS + 3N + S + 46` cycles after `i_start`. Add one cycle
when padding is needed, and one more when the scan restarts from DONE. The
cycles divide up as follows:

| step | cycles |
|---|---|
| scan | `ROWS*COLS + 2N` |
| centroid sums | `N` |
| division | 21 |
| distance stream | `S` |
| distance and square root pipeline | 17 |

The last coefficient, and `o_frame_done`, follow 37 cycles after the last CCD
sample: 21 to the first bin, 15 more bins, and the output register of
`fft_process`. A 72-point
outline takes about 2,400 cycles, which is about 39 µs at 62 MHz. The scan
dominates: it reads one pixel per cycle.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `ROWS`, `COLS` | 32, 64 | top, `bram_control`, `boundary_scan` | image size; BRAM1 depth is `ROWS*COLS` |
| `FFT_LEN` | 16 | top, `bram_control`, `fft_process`, `fft_core` | transform length (16 only) |
| `DATA_W`, `ADDR_W`, `WE_W` | 32, 11, 4 | `bram_tdp` | memory shape |
| `IN_W`, `OUT_W` | 32, 17 | `isqrt_pipe` | square-root widths |
| `IDX_W` | 8 | `shape_pkg` | width of a row or column index |

BRAM2 addresses are fixed at 11 bits, and the sample index at 7 bits. Images
larger than 2048 pixels need a wider BRAM2 and wider counters in
`bram_control`.

## How far this follows the reference system

These parts follow the reference system:

- the block structure: image BRAM, custom controller, index BRAM, FFT block;
- the custom blocks' port names (`o_bram1Addr`, `i_bram2PortBData`,
  `o_totalDistanceSqrt`, `outEnSqrt`, `o_indexCount`, `o_tdata_re_tmp`, …);
- the four scan states and the pixel test "equal to 1";
- the separate row and column sums;
- the distance formula;
- the square-root widths and truncation;
- the FFT output bit layout and the 4-bit index.

These parts are this implementation's own choices:

- one pixel per 32-bit word;
- the `{row, col}` packing;
- the pipelined scan timing;
- the second state machine's states;
- the dividers;
- zero padding and 16-sample framing;
- the FFT's R2SDF structure, guard bits, rounding and zero-frame flush;
- the meaning of `o_tdata_re` and `o_tdata_im` as the 1/M-scaled outputs;
- the start, valid and done signals;
- the reset values, all synchronous and active high on `reset`.

The reference system used vendor cores for the square root (CORDIC) and for
the FFT, which was pipelined and streaming. Here both are plain RTL with the
same function and output format. The transform length of 16 is inferred from
the 4-bit coefficient index. The latencies of the replacements differ from
those of the vendor cores.

These parts of the surrounding system are not included:

- the ARM processing system and its DDR;
- the AXI interconnect and the AXI-to-BRAM controller (their BRAM port is
  brought out instead);
- the reset synchroniser;
- the conversion from grey levels to a binary image, which happens before the
  image is written;
- an optional BRAM for the feature vectors;
- the logic analyser;
- the classifier.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog.
`tb_ref_pkg` is an independent reference model of the whole chain. It finds
the raster-order points and the truncated centroid, computes the floor square
root with `$sqrt`, pads with zeros and evaluates the DFT in double precision.

| testbench | what it checks |
|---|---|
| `tb_bram_tdp` | random traffic on both ports, byte enables, read-first behaviour, output hold |
| `tb_boundary_scan` | points in raster order, counts, exact scan cycle count, non-object values ignored, restart from DONE |
| `tb_centroid_calc` | truncated means for 0, 1, 2048 and random point sets; divide latency |
| `tb_ccd_sqdist` | random points against integer arithmetic; latency |
| `tb_isqrt_pipe` | edge values and random inputs: `r^2 <= x < (r+1)^2`, 16-cycle latency, tag |
| `tb_fft_core` | bins against a double-precision DFT, back-to-back and gapped frames, flushes with `tready` low, word layout, first-bin latency |
| `tb_fft_process` | descriptor fields, 1/M outputs, index, done flag over two signatures |
| `tb_bram_control` | CCD samples, index and last flag against the model for rectangle, circle, random and empty images; exact cycle count |
| `tb_shape_feature_top` | the whole design at its default size, through the processor port (details below) |
| `tb_workload_tools` | 40 hand-tool silhouettes (8 synthetic classes at 5 positions) through the whole design: every coefficient, identical coefficients for every position, and 10 low-order descriptor magnitudes that differ between classes |

`tb_shape_feature_top` runs rectangle, translated-rectangle, circle, random
and empty images and checks:

- every coefficient;
- translation invariance;
- that each mechanism happened at least once: boundary writes, ignored
  clutter, padding, multi-frame signatures, back-to-back transform frames,
  restart from DONE, and an empty image.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/shape_pkg.sv tb/tb_ref_pkg.sv tb/tb_shape_feature_top.sv \
    --top-module tb_shape_feature_top
obj_dir/Vtb_shape_feature_top
```

Substitute another testbench name to run it. The whole-design test at full
size takes well under a second.

The coefficients have not been compared with the reference system's own
hardware output. The only published sample of that output is a short
waveform snapshot of a different image.
