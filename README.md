# Gaze-guided streaming and distortion correction for a spherical display

A remote operator watches a camera feed projected through a wide-angle lens
onto a spherical screen. Two problems stand between the camera and the
screen: a raw Full-HD stream at 60 fps needs close to 3 Gbit/s, and the sphere
stretches the picture vertically, more so towards its left and right edges.
This RTL solves both in streaming hardware on two FPGA boards:

* the **sender** keeps full resolution only where the operator is looking (the
  gaze point, delivered over a UART by an eye-tracking PC) and reduces the
  resolution ring by ring further out, down to 1/36 of the samples;
* the **receiver** pushes every pixel down by a pre-measured displacement
  alpha(x, y) **without a frame buffer**. It holds only as many lines as the
  displacement of each column region needs, and fills the gaps the shift
  leaves behind.

Everything runs at one pixel per clock (148.5 MHz for 1080p60). The
corrector's output trails its input by about one line, not by a frame.

```
 camera ──► [sender: spherical_stream_top.src_*]                     [receiver: lnk_*] ──► projector (prj_*)
             gaze_uart_rx ─► gaze_receiver ─► (gx, gy)                 distortion_corrector
                                                │                        write_addr_ctrl ◄─ correction_map
             foveated_compressor ◄──────────────┘                        region_buffer (10 rings)
               gaze_distance ─► fovea_selector                           read_addr_ctrl ◄─ blank_map
               block_downsampler x5 (K = 1,2,3,4,6)                                      ◄─ line_buffer
               band_upsampler ──────────► cmp_* ═══ HDMI cable ═══► lnk_*
```

The HDMI connectors, the TMDS encoders and decoders, the eye tracker, the PC
and the projector are not part of the RTL. The top module
`spherical_stream_top` brings out the RGB side of each HDMI port. A testbench
joins `cmp_*` to `lnk_*` to stand in for the cable.

## Video stream convention

Every video port is a push stream of active pixels with no back-pressure.
Each beat has:

* `valid`;
* `sof` on pixel (0, 0);
* `eol` on the last pixel of every line;
* 24-bit `rgb` (R in bits 23:16, G in 15:8, B in 7:0).

Blanking is simply clocks without `valid`. Both pipelines take one pixel per
clock. They emit each output line as one burst of `H_ACTIVE` pixels, so they
keep pace even with lines that follow each other without a gap. Real 1080p
timing has 2200 clocks per line. Reset is synchronous and active low.

## The distortion corrector (receiver)

### Why no frame buffer is needed

Input pixel (x, y) goes to output position (x, y + alpha(x, y)), with
alpha >= 0. An output row Y can therefore only receive pixels from input
lines 0..Y. Once input line Y has been written, row Y is final and can be
read out.

`write_addr_ctrl` writes each pixel as it arrives. At the end of each input
line it pulses `line_done`. `read_addr_ctrl` counts these pulses as credits
and reads row Y out at once, in raster order. An output row therefore
starts 5 clocks after the end of the input line with the same number, or up
to one line later when input lines arrive back-to-back. A conventional
design would store the whole frame in external memory first and lose a
frame time (16.7 ms at 60 fps).

### Ring buffers per region (`region_buffer`)

A pixel written at input line y for row y + alpha is read about one line
after input line y + alpha. So column x must hold about alpha lines. The
frame is split into `NREG` = 10 regions of 192 columns. Region r is a ring
of `DEPTH[r]` lines inside one simple dual-port memory:

```
slot(r, Y)  = (line counter of r + alpha) mod DEPTH[r]       (writer)
address     = BASE[r] + slot * 192 + (x mod 192),   BASE[r] = 192 * sum(DEPTH[0..r-1])
```

Each region has its own line counter, running mod `DEPTH[r]`. The counters
keep counting across frames and are cleared only by reset, so nothing has to
be flushed between frames. The reader keeps an identical set of counters,
advanced once per output row.

Because alpha is small in the middle of the frame and reaches 300 at the
edges, the rings are deep only where they need to be:

| regions (from the edge) | 0 / 9 | 1 / 8 | 2 / 7 | 3 / 6 | 4 / 5 |
|---|---|---|---|---|---|
| `DEPTH` (lines)         | 304   | 244   | 184   | 124   | 64    |

That is 1840 region-lines, against 3000 for ten uniform 300-line rings: a
39 % saving, 8.48 Mbit in all. A ring must be at least 2 lines deeper than
the largest alpha of its region. The extra lines cover the reader's lag
behind the writer. An assertion in `write_addr_ctrl` fires if a displacement
does not fit its ring. The per-region depths assume an alpha that rises
roughly linearly from 0 at the centre to 300 at the edge. For a measured
map, set each `DEPTH[r]` to the region's largest alpha plus 4.

Rows with y + alpha >= 1080 fall off the bottom of the frame and are not
written.

### The 1-bit correction map (`correction_map`, 345.6 kbit)

A table of 9-bit alpha for every pixel would take 18.7 Mbit. Three
properties of the distortion shrink it 54-fold:

1. **Symmetry.** alpha(x) = alpha(1919 - x), so only 960 columns are kept. The
   table is indexed by i, the distance of a column from the centre:
   i = x - 960 right of the centre, i = 959 - x left of it.
2. **Line groups.** Three consecutive lines share one table row, giving
   360 groups.
3. **1-bit steps.** Going outwards, alpha grows by 0 or 1 per column. Bit i
   of a group stores alpha(i) - alpha(i-1), and bit 0 stores alpha(0).

Table address = group * 960 + i. alpha is recovered as a running sum, which
is the subtle part. A line is scanned left to right, so it starts at the
edge, where alpha is largest. The write controller:

* starts every line with alpha = popcount(whole group);
* subtracts bit (959 - x) after each pixel left of the centre;
* keeps alpha unchanged from x = 959 to x = 960;
* adds bit (x + 1 - 960) after each pixel right of the centre.

Port A of the map fetches the bit for the next step one clock ahead. The
popcount at the start of each line comes from a counting engine on port B.
The engine reads the 960 bits of a group in 962 clocks. It fills two result
slots, tagged with their group number: one for the current group and one for
the next. Each new group starts its successor's count, and a group lasts
three lines (5760 or more clocks), so the result is always ready in time.

After a reset, and after any write to the map, the engine starts over from
the current group. The first pixel must then wait **962 idle clocks**; an
assertion checks this. The number of groups must be even (360 is).

### Blank filling (`blank_map`, `line_buffer`)

Where alpha grows from one line to the next, the shifted lines leave output
positions that no input pixel reaches. These positions are precomputed in
the blank map: one bit per output position of the half frame (960 x 1080,
1.0 Mbit), with address Y * 960 + i. For each output pixel the reader
fetches three things in parallel: the ring word, the blank bit and the line
buffer entry of the column. One clock later:

* **not blank:** output the ring pixel and save it in the line buffer;
* **blank:** output the line buffer pixel, i.e. the last real pixel above it
  in the same column, so a gap is filled by stretching the pixel above
  downwards;
* **blank in row 0:** there is no pixel above, so output black and store
  black. This keeps the previous frame out of the top rows.

Both maps are computed off-line from the measured displacements and loaded
through the `cmap_*` and `bmap_*` ports. The blank map follows from alpha:
output (x, Y) is blank exactly when no input line y has y + alpha(x, y) = Y.

## Gaze-guided compression (sender)

### Five stages in parallel (`block_downsampler`)

The frame is tiled into 12 x 12 blocks. Each block is sent at one of five
stages:

* stage 0: 1/1 (full resolution);
* stage 1: 1/4 (2 x 2 means);
* stage 2: 1/9 (3 x 3 means);
* stage 3: 1/16 (4 x 4 means);
* stage 4: 1/36 (6 x 6 means: a 12 x 12 block becomes 2 x 2).

All five stages are computed on every pixel. A stage with square size K
works as follows:

* it sums K neighbouring pixels of a line;
* it adds each sum into a per-column accumulator (read-modify-write once per
  K pixels);
* on the K-th row of the square it writes the rounded mean,
  (sum + K*K/2) / (K*K) per channel, into a band memory.

The band memory holds the means of one 12-line band and has two banks, so
one band can be read out while the next is written.

### Distance to the gaze point (`gaze_distance`)

The squared distance S(x, y) = (x - gx)^2 + (y - gy)^2 is tracked with
adders only. At the frame start the unit sets dx = -gx, dy = -gy and
S = dx^2 + dy^2. Then:

* along a line: S += 2dx + 1, dx += 1;
* at a line end: dy^2 += 2dy + 1, dy += 1, S = gx^2 + dy^2.

The gaze is taken once per frame, at `sof`, so a new position never splits
a frame. Only gx^2 and gy^2 at the frame start need multipliers.

### Stage per block and read-out (`fovea_selector`, `band_upsampler`)

At pixel (6, 6) of each block, S is compared with four squared radii
`thr_sq[0..3]`, which are run-time inputs in ascending order. The block gets
stage n for the first n with S < `thr_sq[n]`, and stage 4 otherwise. The
stage is stored per block in a two-bank table.

When a band is complete, `band_upsampler` reads it out in raster order at
one pixel per clock. For each pixel it:

* addresses all five stage memories at (bank, row in band, column);
* looks up the block's stage;
* one clock later, selects that stage's mean.

Each stage memory returns the mean of the K x K square that covers the
pixel, so the read-out also up-samples by replication. The result is
full-resolution video again, with detail falling off around the gaze point.
`cmp_level` reports each pixel's stage. From it one can count the samples a
link would really carry: one per K x K square. With radii of
120/240/360/480 pixels, this is 7.7 % of the raw samples in the full-size
test, a reduction of more than 90 %.

The sender's latency is one band (12 lines) plus 5 clocks.

### Gaze input (`gaze_uart_rx`, `gaze_receiver`)

The UART uses 8N1 framing with `CLKS_PER_BIT` = 1289 (115200 baud at
148.5 MHz). A message is five bytes: `A5`, gx[15:8], gx[7:0], gy[15:8],
gy[7:0]. Bytes before a sync byte are ignored. Coordinates beyond the frame
are clamped. After reset the gaze is the frame centre. Each accepted message
gives a one-clock `gaze_update` pulse.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `H_ACTIVE`, `V_ACTIVE` | 1920, 1080 | frame size; `H_ACTIVE` a multiple of 12 and of `NREG`, `V_ACTIVE` a multiple of 12 |
| `NREG` | 10 | column regions of the ring buffer |
| `DEPTH[NREG]` | 304, 244, 184, 124, 64, 64, 124, 184, 244, 304 | ring depth of each region in lines |
| `CLKS_PER_BIT` | 1289 | UART bit time in clocks |
| `K` (block_downsampler) | 6 | square side of a stage (1, 2, 3, 4, 6) |

Packed constants and types live in `rtl/sdisp_pkg.sv`. Memory at the
defaults:

* receiver: 8.48 Mbit ring buffer, 1.04 Mbit blank map, 0.35 Mbit
  correction map and a 46 kbit line buffer;
* sender: about 1.7 Mbit of band memories and accumulators.

All memories are plain arrays with one-clock reads, written to map onto
block RAM.

## Design choices beyond the original description

The system architecture, the five stages, the distance recurrence, the
ten-region adaptive buffer, the three reductions of the correction map, the
blank map and the line-buffer fill all follow the published design. The
following are this implementation's own choices, because the description
leaves them open:

* the stream format, the credit scheduling of both read-outs, and the
  12-line band buffering of the sender;
* down-sampling by rounded mean and up-sampling by replication;
* sampling the block distance at pixel (6, 6);
* thresholds as inputs, since no values are given;
* ring depths for an assumed, roughly linear alpha profile;
* the bit order and address layout of both maps, the load ports, the
  popcount engine and its 962-clock start-up;
* black for blank pixels in row 0, and dropping rows pushed below the frame;
* UART rate and message format;
* one clock for both boards;
* the compressed samples are not serialised for a separate link. The sender
  outputs full-resolution video as it would over HDMI, and reports the stage
  of each pixel.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares outputs
with values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the frame-level
reference models:

* a random displacement map generator;
* the blank map derivation;
* pixel-move-and-fill correction;
* block-mean compression.

| testbench | what it covers |
|---|---|
| `tb_distortion_corrector` | 240 x 60 frames, two random maps reloaded between frames, random line gaps; every pixel, row latency, blank fills, dropped rows, ring wrap-around |
| `tb_write_addr_ctrl`, `tb_read_addr_ctrl` | exact ring addresses, line_done, blank filling against modelled memories |
| `tb_foveated_compressor` | two frames, gaze changing mid-frame, every pixel and stage, 5-clock band latency |
| `tb_block_downsampler`, `tb_fovea_selector`, `tb_band_upsampler`, `tb_gaze_distance` | stage means for K = 1, 3, 6, threshold boundaries, replication and bank alternation, the recurrence against (x-gx)^2 + (y-gy)^2 |
| `tb_gaze_uart_rx`, `tb_gaze_receiver` | framing, framing errors, sync, clamping |
| `tb_region_buffer`, `tb_line_buffer`, `tb_correction_map`, `tb_blank_map` | every word written and read back, one-clock read latency, old data on a read of the word being written, both map ports at once |
| `tb_spherical_stream_top` | both boards end to end at 240 x 60 with the UART delivering two gaze points; counts gaze updates, all five stages, blank fills, dropped rows, ring wraps and queued rows |
| `tb_full_system` | the same at the default 1920 x 1080 parameters: two full frames, 12.4 million checks, under 10 s of simulation |

Run any testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sdisp_pkg.sv tb/tb_ref_pkg.sv tb/tb_full_system.sv --top-module tb_full_system
./obj_dir/Vtb_full_system
```

`-Wno-fatal` is needed only for the reduced-size tests. There the memories
are smaller than their address ports, and Verilator reports the unused
address bits as width warnings.

Replace `tb_full_system` with any other testbench name. The reduced-size
tests change only parameters (`H_ACTIVE`, `V_ACTIVE`, `NREG`, `DEPTH`,
`CLKS_PER_BIT`). Arbitrary camera timing and real measured maps have not been
simulated: the maps in the tests are random maps that obey the same rules
(monotone 1-bit steps, each region within its ring depth).

## Limits

* A stream must be well formed: `sof` on the first pixel, exactly
  `V_ACTIVE` lines of `H_ACTIVE` pixels. The pixel position counters restart
  at every `sof`, but the row credits of the read-outs and the ring line
  counters assume complete frames. Behaviour after a truncated frame is
  neither defined nor tested.
* Line gaps of 0 to 20 clocks have been simulated; camera timing with real
  blanking intervals has not.
* The end-to-end latency of the real system is dominated by the eye tracker,
  the PC, HDMI transport and the projector. None of these is modelled; the
  logic adds one band (sender) and about one line (receiver).
