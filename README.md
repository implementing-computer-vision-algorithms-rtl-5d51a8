# Colour-blob finder for a robot-soccer camera

A mobile robot needs to know, for every video frame, where the ball and the
other coloured objects are. This RTL does that entirely in logic. A 16-bit
RGB frame goes in. Out comes a short list of 32-bit records, one per object,
giving the line and column of its area centre and the length of its outline.

The pipeline has three stages that run one after the other on one frame:

```
 video decoder    16 bit     +-----------+  1 bit   +-----------+  1 bit   +-------------+
 (RGB 5-6-5)  ------------->| threshold |--------->|   edge    |--------->| chain-code  |---> object table
 pix_valid/pix_sof          | + capture |  binary  | extraction|  outline | segmentation|     (64 x 32 bit)
                            +-----------+  image   +-----------+  image   +-------------+       |
                                                                               |                +--> read port
                                                                 chain codes, measurements     +--> RS-232
```

1. **Threshold.** Each pixel becomes one bit: 1 if red, green and blue all lie
   inside configurable ranges. The bit is stored in a 320 x 240 one-bit image.
2. **Edge extraction.** A 2x2 window turns the filled blobs into one-pixel
   outlines. All 320 columns of a line are done in parallel, so the whole
   image takes 241 clocks.
3. **Chain-code segmentation.** The outline image is scanned at one pixel per
   clock. Each outline found is walked pixel by pixel as a Freeman chain, and
   its area, centre, perimeter and shape factor are measured along the way.

At 100 MHz and 320 x 240 a frame takes about 1.54 ms: 768 µs of capture,
2.41 µs of edge extraction and 768 µs of scanning, plus a few hundred clocks
per object. That is roughly 650 frames per second. In simulation, a frame with
five objects (584 chain steps) took 154,537 clocks, or 1.545 ms.

## Frame flow and timing

`frame_sequencer` owns the frame and moves it through four phases
(`phase_t`):

| phase        | what happens | clocks |
|--------------|--------------|--------|
| `PH_IDLE`    | waits for a pixel with `pix_sof` set | – |
| `PH_CAPTURE` | each valid pixel's threshold bit is written at the next raster position | W·H valid pixels (at most one per clock) |
| `PH_EDGE`    | `edge_extract` runs | H+1 |
| `PH_CHAIN`   | the object table is cleared and `chain_coder` runs | W·H + Σ(Lᵢ + 21) |

Here Lᵢ is the number of chain steps of object i. `frame_done` pulses when
segmentation ends. The last frame's records stay in the table until the next
frame reaches `PH_CHAIN`.

The stages do not overlap, so each image needs only one buffer. The price is
that the camera is ignored during `PH_EDGE` and `PH_CHAIN`. A frame that
starts then is skipped, and `frames_dropped` counts it. If `pix_sof` arrives
during capture, capture starts over at (0, 0).

## Pixels and the threshold

`pix_rgb` is `rgb565_t`: red in bits 15:11, green in 10:5, blue in 4:0.
`thr_cfg` gives an inclusive low/high limit for each component. The
`threshold` module is plain combinational logic. The bit is registered when
it is written into the binary image.

A simple setting accepts every colour whose three components are all below
half of full scale (r 0..15, g 0..31, b 0..15). In practice you set a narrow
band around the ball colour.

## Image memories

`bitplane_ram` stores a one-bit image with one word per image line, so bit x
of word y is pixel (x, y). It has these properties:

- It has a masked write port. Capture and chain-coder erasure change single
  bits; the edge stage writes whole lines.
- It has any number of asynchronous read ports.
- Reading a line number of H or more returns zeros. Line "−1" wraps to 511,
  so it also reads as black. Callers get a black border above and below the
  image with no extra logic.

There are two instances: the binary image (one read port) and the outline
image (three read ports, for the lines above, at and below the current
chain pixel). Neither memory is reset.

## The 2x2 edge operator

For each pixel (x, y) the operator looks at the square (x, y), (x+1, y),
(x, y+1), (x+1, y+1). Up to rotation, the sixteen possible patterns fall into
six classes: all black, all white, one white, one black, two adjacent white,
two diagonal white. The output pixel is white for the four mixed classes and
black for the two uniform ones.

Because the window reaches right and down, the outline sits half a pixel up
and to the left of the true boundary. It is closed and one pixel wide. For a
filled rectangle spanning x0..x1, y0..y1, the outline is the rectangle ring
from (x0−1, y0−1) to (x1, y1).

Pixels outside the image count as black. An object touching the right or
bottom edge still gets a closed ring. An object touching the top or left edge
gets **no** outline along that edge: its ring is open there, and the chain
coder closes it with a straight segment (see below). Its centre and area then
describe the region the open outline cuts off, not the full object.

Timing: in clock k = 0..H the unit reads line k and writes output line k−1,
built from the previous line (held in a register) and the current one. A
pass takes H+1 clocks.

## Chain following and measurement

This is the part of the design that needs the most care.

**Scan.** `chain_coder` steps through the outline image in raster order, one
pixel per clock. The first set pixel it meets is the top-most, left-most
pixel of some outline. It becomes the start of a chain and is erased.

**Follow.** Each clock the coder reads the three lines around the current
pixel and builds an 8-bit neighbour mask indexed by Freeman direction:

```
 3 2 1        NW N NE
 4 . 0        W  .  E       (lines grow downwards)
 5 6 7        SW S SE
```

It moves to the first set neighbour in the order E, S, W, N, SE, SW, NW, NE,
erases that pixel and puts the step's direction out on `code`.
`code_first` marks the first step of each chain. Erasing guarantees each
outline is walked once and never starts a second chain. Trying straight steps
before diagonal ones matters where the outline has a two-pixel stair step: a
diagonal move there would strand a pixel, which would later show up as a tiny
extra object. The chain ends when no neighbour is left. A closed ring ends
next to its start pixel.

**Measure.** With the current pixel at (x, y) and a step of (dx, dy), each
step adds:

- c = x·dy − y·dx to twice the signed area. This is the area between the
  vector and the origin, i.e. the shoelace formula.
- (2x+dx)·c and (2y+dy)·c to six times the first moments of area.
- one straight or diagonal step to the perimeter count.
- the new pixel to the enclosing rectangle and to the pixel count.

When the chain ends, one more clock adds the closing segment from the last
pixel back to the start pixel. For a ring this is one more unit step. For an
open outline it is a straight chord, computed with real multipliers.

**Results.** The accumulated values give:

- **centre** = moment / (3 · twice-area) for each axis, rounded to the
  nearest pixel. Two 9-bit sequential dividers compute it. For a rectangle
  ring the result is exact: the ring's geometric centre, with halves rounded
  up.
- **flat objects** (area zero: a dot or a straight line) use the centre of
  their enclosing rectangle instead, and set `obj_stats.flat`.
- **size** (record field) = number of pixels in the chain, saturating at
  16383.
- **perimeter** = straight steps + √2 · diagonal steps, in 16.8 fixed point
  (√2 is taken as 362/256). The closing step counts if it is a unit step.
- **area** = |twice-area| / 2 (integer part). For a filled rectangle of w × h
  pixels its ring gives exactly w·h.
- **shape factor** = area / perimeter in 8.8 fixed point, from a third
  16-bit divider.

The record goes to the object table. The record and the full `obj_stats`
also appear for one clock on `obj_valid`. Then the scan resumes at the pixel
after the chain's start.

**Cycle cost.** Each object adds L+1 follow clocks (L steps plus the clock
that finds no neighbour), then one clock to close, one to start the
dividers, 17 while they run and one to emit the record: L + 21 clocks in
all. This comes on top of the W·H scan clocks. The scan keeps its one pixel
per clock only when objects are few and small, which is the usual case for a
ball and a few robots.

## Object records and output

`obj_rec_t` (32 bits): `line[31:23]`, `column[22:14]`, `size[13:0]`.

`object_table` holds up to `MAX_OBJ` (64) records in the order the objects
were found: top to bottom by the topmost pixel of their outline. Records past
the end are dropped and `obj_overflow` is set. `obj_count` says how many
records are valid. The table has two asynchronous read ports. One is brought
out as `obj_rd_addr`/`obj_rd_data` for a consumer such as a strategy unit.
The other feeds `rs232_tx`.

`rs232_tx` sends the table when `uart_send` pulses. The message is one byte
with the record count, then four bytes per record, most significant byte
first. Each byte is 8N1, least significant bit first, `CLK_HZ/BAUD` clocks
per bit (868 at 100 MHz and 115200 baud), and the line idles high. Start it
only after `frame_done`: the table must not change during a message.

## Top-level ports (`vision_system`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `pix_valid`, `pix_sof`, `pix_rgb` | in | decoder pixel stream; `pix_sof` marks pixel (0,0) |
| `thr_cfg` | in | colour ranges (`thr_cfg_t`) |
| `phase`, `frame_done`, `frames_dropped` | out | sequencing status |
| `obj_count`, `obj_overflow` | out | table state |
| `obj_rd_addr` / `obj_rd_data` | in / out | table read port |
| `obj_valid`, `obj_rec`, `obj_stats` | out | per-object strobe with measurements |
| `code_valid`, `code`, `code_first` | out | chain code stream |
| `uart_send` / `uart_txd`, `uart_busy` | in / out | serial transfer of the table |

Parameters: `W` = 320, `H` = 240 (both at most 511, since coordinates are
9 bits), `MAX_OBJ` = 64, `CLK_HZ` = 100 MHz, `BAUD` = 115200.

## What follows the original system and what does not

These parts follow the original system:

- the stage order (threshold, 2x2 edge, chain code)
- 16-bit RGB input with 5/6/5-bit components
- range thresholding
- a line per clock for edges and a pixel per clock for the scan
- 320 × 240 at 100 MHz
- the 9 + 9 + 14-bit record
- Freeman chains with area by integration, centroid, perimeter as the sum of
  vector lengths, and shape factor = area / perimeter
- a serial link as one possible output

These are choices made here:

- the pixel bit order and the record field order
- run-time colour limits
- which 2x2 patterns count as border, and the black image border
- the neighbour order, erasing followed pixels, and the closing segment
- the rounding and the flat-object fallback
- the fixed-point formats
- the table depth and overflow rule
- the frame start and drop rules
- the serial message format and baud rate

The video decoder chip itself is outside this RTL. Its RGB output is the
`pix_*` input. No strategy logic is included.

Known limits:

- Objects touching the top or left image edge are measured from an open
  outline.
- Touching or nested objects merge or split the way their outlines do.
- The per-object cost of L + 21 clocks is not hidden behind the scan.
- Orientation is not computed; doing so would need second moments of area
  and an angle unit.

## Files

`rtl/vision_pkg.sv` holds the shared types (`rgb565_t`, `thr_cfg_t`,
`obj_rec_t`, `obj_stats_t`, `freeman_t`, `phase_t`). The other RTL files are
`threshold`, `bitplane_ram`, `frame_sequencer`, `edge_extract`,
`chain_coder` (with its helper `seq_divider`), `object_table`, `rs232_tx`
and the top `vision_system`.

Each block has a self-checking testbench `tb/<block>_tb.sv`, which prints
`TB_RESULT checks=N failures=M`:

- `chain_coder_tb` compares every chain code, record, measurement and the
  exact clock count with a software model, and checks rectangles, dots,
  lines and discs against geometry.
- `vision_system_tb` runs the full-size design on two synthetic frames. It
  covers exact records for filled squares, a disc, a corner object, a
  dropped frame, a restarted capture, table overflow with 70 objects, and
  decoding of the serial message. It takes a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/vision_pkg.sv tb/vision_system_tb.sv --top-module vision_system_tb
./obj_dir/Vvision_system_tb
```

Use the same command with any other `tb/*_tb.sv` (add `-y tb` if needed).
The block testbenches override `W`/`H` to keep images small. Lint a module
with `verilator --lint-only -Wall -y rtl rtl/vision_pkg.sv rtl/<module>.sv`.

To retarget the design:

- Change `W`, `H` and `MAX_OBJ` on `vision_system`.
- The colour band is a run-time input.
- For a different outline rule, edit the expression that computes
  `dst_data` in `edge_extract`.
- For a different neighbour order, edit the priority chain in `chain_coder`
  (and the model in `chain_coder_tb`).
