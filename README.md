# Rectangular-access search window SRAM

A motion-estimation datapath that compares an 8x8 block against a reference picture wants
all 64 reference pixels of a candidate position in one clock, at any pixel position, and
often also in sub-sampled form (every other column, every other line, or both, e.g. for
field pictures or a coarse search on a decimated picture). A plain wide SRAM cannot do
this: a row of 16 pixels can be fetched at x = 0..15 or 16..31, but not at x = 10..25
without a second cycle, and the classic fix of one small SRAM per pixel position needs
(2n x 2m) = 256 separate row decoders for an 8x8 window with sub-sampling.

This SRAM returns (or writes) an n x m = 8 x 8 rectangle at any position of a 320 x 160
picture of 8-bit pixels, in any of four forms, every clock cycle, using only one row
decoder per bank (8 in total). Two ideas make that possible:

* A **modified X-decoder** raises two adjacent global word lines (GWLs) at once, and each
  segment of a row gates them with its own **local word-line select lines** (LWLSLs), so a
  run of pixels that straddles a row boundary is still read in one access
  ("segmentation-free").
* The picture is **spread over 8 banks x 2 blocks x 8 segments** so that any 8 consecutive
  or 8 every-other pixels of a line land in different segments or in different bit-line
  halves, and any 8 consecutive or every-other lines land in different blocks, with the
  two blocks of a bank always needing the same row, so they can share one decoder.

The default geometry (n = m = 8, 320 x 160 pixels, 51,200 bytes) is the search window
buffer of an HDTV H.264 integer-pel motion estimator; the RTL is parameterised in all four
numbers.

## Access forms

| `req_form` | name | rectangle element `[i][c]` |
|---|---|---|
| `FORM_INT`  (00) | integer-pel | pixel (x + c, y + i) |
| `FORM_HSUB` (01) | horizontally sub-sampled | pixel (x + 2c, y + i) |
| `FORM_VSUB` (10) | vertically sub-sampled | pixel (x + c, y + 2i) |
| `FORM_HV`   (11) | both | pixel (x + 2c, y + 2i) |

Any x and y are allowed as long as the whole rectangle lies inside the picture.

## Where a pixel lives

This is the part of the design that everything else follows from. Pixel (x, y) is
stored at:

| level | formula (defaults n = m = 8) | range |
|---|---|---|
| block | b = y mod 2m | 0..15 |
| bank | b / 2 | 0..7 |
| side | b mod 2 (0 = left block, 1 = right block) | 0..1 |
| line in block | L = y / 2m | 0..9 |
| segment | j = x mod n | 0..7 |
| pixel index in segment | k = x / n | 0..39 |
| GWL in line | w = k / 2 | 0..19 |
| row address (X-decoder) | L * (W / 2n) + w | 0..199 |
| bit-line half | h = w mod 2 | 0..1 |
| slot in the LWL half | t = k mod 2 | 0..1 |

### Vertical: lines to blocks

Consecutive lines go to consecutive blocks, left and right alternating inside a bank:
lines 0,1 to bank 0, lines 2,3 to bank 1, ..., lines 14,15 to bank 7, then line 16 starts
over in bank 0 one row further down.

* 8 consecutive lines y..y+7 cover 8 different blocks. A bank that gets two of them gets
  an even line and the line after it, which always lie in the same 16-line group and so
  share the line number L: the bank's one X-decoder serves both blocks.
* 8 lines at stride 2, y..y+14, are all even or all odd, so they use one side of every
  bank, each bank exactly once.

Each block has a **block control** signal ANDed onto the shared GWLs, so a bank can access
its left block, its right block, or both.

### Horizontal: pixels to segments, GWLs and halves

Inside a block, the pixels of a line are dealt to the 8 segments at intervals of 8
pixels: segment j holds x = j, j+8, j+16, ... Each GWL carries two of those per segment
(slots t = 0, 1). Even GWLs and odd GWLs are wired to separate bit-line halves of the
segment, so when the decoder raises the pair (w, w+1) every segment exposes **four**
pixels, k = 2w .. 2w+3, and its **read circuit** passes at most two of them to its two
output ports.

Any 8-pixel run at stride 1 or 2 starting at x lies on GWLs w0 = (x / 8) / 2 and w0 + 1:

* stride 1: each segment supplies exactly one pixel (port 0);
* stride 2: four segments supply two pixels each, k and k+1, and rectangle column c uses
  port (2c) / 8. The two may sit in the same LWL half (k even) or in opposite halves
  (k odd); either way the four exposed pixels contain both.

Example, x = 196 at stride 2 (pixels 196, 198, ..., 210), GWL pair (12, 13):

| segment | pixels | k | GWL / half / slot |
|---|---|---|---|
| 4 | 196, 204 | 24, 25 | both on GWL 12, half 0, slots 0 and 1 |
| 6 | 198, 206 | 24, 25 | both on GWL 12, half 0, slots 0 and 1 |
| 0 | 200, 208 | 25, 26 | GWL 12 half 0 slot 1, GWL 13 half 1 slot 0 |
| 2 | 202, 210 | 25, 26 | GWL 12 half 0 slot 1, GWL 13 half 1 slot 0 |

An LWL is the AND of a GWL with an LWLSL. There are 2n = 16 LWLSLs per block, one per
segment and bit-line half; the Y-decoder raises the ones whose half holds a needed pixel.

## One access, step by step

1. `y_decoder` turns x and the horizontal form into w0, the 16 LWLSLs and, per segment,
   which of the four exposed pixels each read-circuit port carries (`pval`, `psel`).
   It is shared by all 16 blocks, since every row of a rectangle uses the same columns.
2. `line_mapper` turns y and the vertical form into a line number and two block control
   signals per bank, and records which bank and side hold each rectangle row.
3. In each bank, `modified_x_decoder` raises GWLs `L*20 + w0` and the next one; the block
   controls gate them into the left and right `sram_block`.
4. In each block, the active row of each bit-line half is taken from the GWL vector; in
   each segment half (`lwl_column`) whose LWL is on, the row's two pixels are read into
   the output register, or the addressed pixels are written.
5. One cycle later `rect_align` picks each rectangle element from its bank, side, segment
   and port (using the previous request's x mod 8, form and row routing) and presents the
   rectangle in raster order.

## Interface and timing (`rect_sram`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the control registers |
| `req_valid` | in | 1 | request this cycle |
| `req_we` | in | 1 | 1 = write `wdata`, 0 = read |
| `req_x`, `req_y` | in | 9, 8 | top-left pixel |
| `req_form` | in | 2 | `access_form_e` |
| `wdata` | in | 8 x 8 x 8 | rectangle to write, `[row][column]` |
| `rd_valid` | out | 1 | `rdata` holds the rectangle of the previous cycle's read |
| `rdata` | out | 8 x 8 x 8 | rectangle read, `[row][column]` |
| `req_err` | out | 1 | the previous cycle's request left the picture and was dropped |

Requests are sampled on a rising edge; one is accepted every cycle, reads and writes in
any mix. The rectangle of a read request is on `rdata`, with `rd_valid` high, during the
cycle that follows the edge that sampled it (latency 1), and stays there until the next
read returns. A write takes effect at its edge, so a read in the following cycle sees it.
The cell arrays are not reset; only `rd_valid`, `req_err` and the alignment selects are.

## Modules

| file | role |
|---|---|
| `rtl/swb_pkg.sv` | default geometry, pixel type, access form enum |
| `rtl/rect_sram.sv` | top: range check, decoders, 8 banks, alignment, request pipeline |
| `rtl/sram_bank.sv` | merged X-decoder, block control AND gates, left and right block |
| `rtl/modified_x_decoder.sv` | one-hot row decoder plus OR gates raising GWL a and a+1 |
| `rtl/y_decoder.sv` | LWLSLs, read-circuit selects and GWL base from x and the form |
| `rtl/sram_block.sv` | 8 segments x 2 halves of cells, LWL = GWL AND LWLSL, two-of-four read circuit |
| `rtl/lwl_column.sv` | cells of one segment half, two pixels per row |
| `rtl/line_mapper.sv` | lines to banks and blocks, block control signals |
| `rtl/rect_align.sv` | read and write multiplexer network between blocks and rectangle |

## What follows the published architecture and what is this design's own

Taken from the architecture: 8 banks of a left and a right block; one X-decoder per bank
shared by both blocks with block-control AND gates; a modified X-decoder with OR gates
raising two adjacent GWLs; LWL = GWL AND LWLSL with 2n LWLSLs per block; pixels of a line
spread over the segments at intervals of n; a read circuit picking two of four pixels per
segment; single-cycle access of an 8 x 8 rectangle in four forms; 320 x 160 bytes.

Chosen here, because the architecture leaves it open or only shows it in diagrams:

* the exact line-to-block mapping (y mod 16, alternating sides inside a bank) and the
  pixel-to-slot/half placement inside a segment, both chosen so that the properties above
  hold and checked exhaustively by the unit testbenches;
* an access enables 8 of the 16 blocks (one per rectangle row); the hardware could enable
  all 16 at once, but no access form needs more than 8 lines;
* the write port (same decode as reads, all four forms) — the buffer has to be filled
  somehow, and nothing else about writing is specified;
* one Y-decoder shared by all blocks, and the final multiplexer network that puts pixels in
  raster order;
* registered read data with one cycle of latency, and dropping out-of-picture requests
  with an error flag;
* the cell arrays are register arrays. The 6T cells, sense amplifiers, bit lines and the
  90-nm layout (area 2.0 x 1.2 mm^2, 20.3 mW at 100 MHz and 1.0 V) are circuit-level and
  have no RTL counterpart; nothing here reproduces the power and area figures.

The architecture's second use case, 4096 pixels per cycle for 7680 x 4320 video, is a
matter of larger n and m; the parameters allow it (n and m powers of two, width a multiple
of 2n, height a multiple of 2m). `rect_sram_wide_tb` runs the end-to-end test with
32 x 32 rectangles over a 128 x 128 picture; set to 64 x 64 over 256 x 256 (4096 pixels per
access) the same test passes too, after a compile of several minutes. The picture sizes
of these runs are not taken from any application.

## Verification

Every module except `lwl_column` (covered through `sram_block_tb`) has a self-checking
testbench in `tb/` that ends with a `TB_RESULT checks=<n> failures=<n>` line:

* `modified_x_decoder_tb`, `y_decoder_tb`, `line_mapper_tb`: exhaustive over all addresses,
  x or y positions and forms, against independently computed placements; the decoder and
  mapper tests also check the no-conflict properties (two GWLs suffice, no block used twice,
  one line per bank).
* `sram_block_tb`, `sram_bank_tb`: random word-line level traffic against a cell-level
  reference model, including disabled blocks.
* `rect_align_tb`: random data through both directions of the network.
* `rect_sram_tb`: the full-size buffer. Fills the picture, then 6,000 random back-to-back
  reads, writes in all four forms and out-of-picture requests, checking data, the one-cycle
  latency and `req_err`, and counting that every form, GWL-straddling reads, banks using
  both blocks, rectangles wrapping the 16-line group and dropped requests all occur.
* `rect_sram_wide_tb`: the same end-to-end test at 32 x 32 rectangles (1024 pixels per
  access) over a 128 x 128 picture.
* `ime_search_tb`: a +-8 full-search motion estimation over the buffer for 16x16 blocks in
  all four forms and a 16x32 block, fetched as 8x8 tiles at one tile per cycle; it checks
  every tile, that the stream has no gaps, and that the best SAD (zero) is at the true
  position.

## Simulating

With Verilator 5 from the repository root, for any testbench `<tb>`:

```
verilator --binary -Irtl rtl/swb_pkg.sv tb/<tb>.sv --top-module <tb>
./obj_dir/V<tb>
```

Each testbench builds and runs in well under a minute, except `rect_sram_wide_tb`, whose
build takes a couple of minutes. To try another geometry, override
`N`, `M`, `IMG_W` and `IMG_H` on `rect_sram` (and the matching localparams in the
testbench); the unit testbenches are written for the defaults.
