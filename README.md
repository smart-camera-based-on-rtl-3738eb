# Smart camera: image processing on an FPGA straight from the camera

A camera's raw 12-bit pixels go directly into an FPGA board instead of into a
host PC. The FPGA stores them in on-board memory and starts processing windows
of the image as soon as enough rows have arrived, long before the frame is
complete. The host reads back only the finished results. The first result
appears a fraction of a millisecond after the first pixel. A 30 frames/s
camera needs 33 ms just to send one frame.

Two applications share the same front end:

* **RVT (retinal vascular tracing).** Every pixel of a 512 x 512 frame is
  filtered by 16 directional 11 x 11 matched filters. The strongest response
  and its direction are stored next to the pixel. Vessel tracing software
  then uses these results.
* **PIV (particle image velocimetry).** Two images of a seeded flow
  (1008 x 1016) are cross-correlated window by window. The correlation peak,
  refined to a fraction of a pixel, gives the local displacement of the
  particles.

Everything is synthesizable SystemVerilog on a single clock. The design
targets 60 MHz.

## Data path at a glance

```
 camera pixels -> pixel_packer -> input_mem_switch <-> Memory 0 / Memory 1 (off chip)
                                      |
              +-----------------------+------------------------+
              | RVT: window column words                       | PIV: random word reads
              v                                                v
      rvt_image_processor                             piv_processing_unit
      (rvt_window_buffer -> rvt_filter_unit)          (piv_window_loader, area RAMs,
              |                                        piv_correlator, plane RAM,
              v                                        peak, piv_subpixel)
      output_mem_switch -> Memory 2 / Memory 3                  |
                                                      output_mem_switch -> Memory 2
```

`smart_camera_top` holds both applications side by side, each with its own
`rvt_*` or `piv_*` ports. A real board carries one of the two at a time. The
camera, framegrabber, memory chips and host are outside the top, and their
signals are the top's ports.

## Front end: packing and the two-chip memory trick

**Packing.** `pixel_packer` puts five 12-bit pixels into one 64-bit word:
* Pixel *k* of a word occupies bits `12k+11:12k`, and bits 63:60 are zero.
* A word is also closed at the last pixel of a row. Each row therefore
  becomes `WPR = ceil(W/5)` words: 103 for a 512-pixel row, which is
  padded to 515.
* The padding lets the RVT window keep moving in steps of five pixels
  without treating the row end as a special case.

**Why two chips.** A memory chip cannot be read and written in the same
clock. The filter wants one new word every clock, and the camera keeps
writing. `input_mem_switch` interleaves at word level:

* Word *i* of a frame goes to memory `i mod 2`, at address `{half, i/2}`.
  Consecutive frames alternate between the two address halves, so one frame
  can still be read while the next is being written.
* The RVT window reads column *k* as the words `k + r*WPR`, for r = 0..10.
  WPR is odd (103), so each read goes to the other chip than the read before
  it. Each chip is therefore read at most every other clock.
* Packed words wait in a 4-deep FIFO. The head word is written in any clock
  in which its chip is not being read.
* **The stall rule.** A read waits (`stall`) until its word has been
  written: either the frame in that half is complete, or the word's index is
  below the count of words written so far. This one rule is what lets
  processing begin after about ten rows and then follow the camera. No
  separate "11 rows are ready" state machine is needed.
* In RVT mode a half is marked free again once its last window has been read.
* `EXT_READS = 1` replaces the window walk with a request/grant read port.
  The PIV loader uses this port, under the same stall rule, so a PIV window
  can start while the second image is still arriving.
* `overflow` (FIFO full) and `overrun` (a frame overwritten while it is
  being read) are sticky error flags. The top brings them out as
  `rvt_overflow`/`rvt_overrun` and `piv_overflow`/`piv_overrun`, together
  with `rvt_stall` and `piv_stall`.

Memory interface: each chip is driven by a `mem_req_t {en, we, addr[18:0],
wdata[63:0]}`, one request per clock. Read data is expected on `memN_rdata`
`RD_LAT` clocks later (default 2). Chips are assumed to hold 512K x 64-bit
words.

## RVT: sixteen matched filters, five results per eleven reads

**Window.** `rvt_window_buffer` keeps an 11 x 15 pixel window as three
11 x 5 sections, each one column of 11 words. A fourth 11-word buffer fills
with the column being read.
* When the new column is complete, the sections shift left by one, so the
  window moves right by five pixels.
* The buffer then issues five 11 x 11 windows, p = 0..4, on consecutive
  clocks. Their centres are the five pixels of the middle section.
* Reading a column takes 11 clocks, so the rate is five results per 11
  clocks. At the row end two of the five windows straddle two rows. Those
  results are produced anyway and are meaningless. Nothing depends on image
  borders.

**Filters.** The eight base filters (directions 0..7) each have seven taps
each of +1, +2, -1 and -2. All other taps are zero. Directions 8..15 are the
negations of 0..7.
* Direction 0 uses rows 3 (+1), 4 (+2), 6 (-2) and 7 (-1), columns 2..8,
  around the centre (5,5). The other directions are rotated versions.
* The tap list is the table `RVT_TAPS` in `rvt_pkg.sv`, written as
  `{row, col}` hex digits.
* The testbenches check it against an independent drawing of the templates
  in `tb_ref_pkg.sv`.

**Arithmetic** (`rvt_filter_unit`):
* `rvt_interconnect` routes the 7 pixels of each weight group of each
  direction; this is fixed wiring.
* Eight `rvt_response` units each compute `S(+1) - S(-1) + 2*(S(+2) - S(-2))`.
  The groups are summed with 3-level adder trees, the ±2 groups are
  subtracted and shifted, and the result is made absolute.
* Each response unit keeps the sign bit. That bit says whether the filter or
  its complement (direction + 8) matched. There is one register after every
  add, subtract and compare.
* A three-level tree of `rvt_template_comparator`s picks the largest
  magnitude. On a tie the lower label wins. The label is `{complement,
  direction[2:0]}`.
* Latency: interconnect 1 + response 6 + comparators 3 = 10 clocks, at one
  window per clock.

**Results.** `rvt_image_processor` forms one 64-bit word per target pixel:
`{31'b0, pixel[11:0], label[3:0], magnitude[16:0]}`.
* The word's address is the pixel's position in the padded raster.
* `output_mem_switch` writes even frames to Memory 2 and odd frames to
  Memory 3, alternating with the frame halves of the input.
* At the end of a frame it pulses `frame_done` and reports the bank in
  `done_bank`.

Timing at 512 x 512: 51,706 windows x 11 clocks = 569k clocks, which is
9.5 ms at 60 MHz. A frame period at 30 frames/s is 33 ms. The first result
needs 1,033 words (10 rows and 3 words) in memory, plus about 30 clocks of
reading and pipeline.

## PIV: one correlation window per start

The host writes the registers and pulses `piv_start`.

| addr | register | default |
|------|----------|---------|
| 0 | centre column `cx` | 0 |
| 1 | centre row `cy` | 0 |
| 2 | side *m* of Area A | 40 |
| 3 | side *n* of Area B | 32 |
| 4 | output word address of the result | 0 |

Writes are ignored while `piv_busy` is high. The limits are m ≤ 40, n ≤ 32,
and m − n even. Area A is the m x m square of image 1 and Area B the n x n
square of image 2, both centred on (cx, cy), and both must lie inside the
image. Image 1 is the first frame streamed in after reset; it lands in
address half 0. Image 2 lands in half 1. Sizes can change from one window to
the next.

`piv_processing_unit` then does the following:

1. **Load.** `piv_window_loader` requests every word that overlaps each
   area row through the input switch's read port. It keeps up to four reads
   outstanding, and writes the up to five overlapping pixels of each
   returned word into `piv_area_ram` A or B in one clock.
2. **Correlate.** The plane has (m−n+1)² values,
   `R(x,y) = Σ_i Σ_j A(i+y, j+x) · B(i,j)`, with x the column shift and y the
   row shift, in raster order. `piv_correlator` has X = 32 multipliers, a
   5-stage adder tree and an accumulator. Each clock it takes one row of B
   and the matching 32-pixel segment of one row of A. One value therefore
   takes n clocks, and values follow each other without gaps: 81 x 32 = 2,592
   clocks for 40/32.
   * Values go into `piv_plane_ram` (Block RAM C).
   * `piv_peak_detector` keeps the first maximum as the values go by.
3. **Fit.** The four neighbours of the peak are read back. `piv_subpixel`
   evaluates the three-point parabolic fit on each axis with two restoring
   dividers in parallel:
   `p = x + (R(x−1) − R(x+1)) / (2R(x−1) − 4R(x) + 2R(x+1))`.
   * The fraction is kept with 8 bits, truncated toward zero.
   * The fraction on an axis is 0 when the peak is on the plane edge or the
     denominator is 0.
4. **Result.** One word is written to Memory 2 at the programmed address:
   `{rsvd, cy[10:0], cx[10:0], py[15:0], px[15:0]}`.
   * px and py are signed, with 8 fraction bits.
   * They give the peak position relative to the plane centre. With both
     areas centred on the same point, the particles moved by (−px, −py) from
     image 1 to image 2.
   * `piv_res_peak` gives the peak value.

A 40/32 window takes 3,243 clocks from start to result at full size. This is
about 650 clocks of loading, 2,592 of correlation and about 60 of fit and
output. A 1008 x 1016 image pair with 50 % overlapping windows (step 16,
3,782 windows) therefore needs about 12.3 M clocks, or 0.20 s at 60 MHz.

## Where this design makes its own choices

The overall structure, the numbers (12-bit pixels, five per word, 11 x 15
window, 16 filters from 8 responses, three comparator levels, 40/32 areas,
parabolic fit) and the memory scheme follow the original smart camera
design. These points are this implementation's own:

* **Clock.** One clock for everything. The original framegrabber side ran at
  30 MHz; here pixels arrive with a valid strobe in the processing clock, and
  there is no clock-domain crossing.
* **Filter taps.** The taps were read from a drawing of the filters as
  ±1/±2 patterns. If your filters differ, change `RVT_TAPS` in `rvt_pkg.sv`
  and `TEMPLATE` in `tb/tb_ref_pkg.sv` together.
* **Memory interface.** The protocol, read latency and chip size are
  assumptions. So are the frame halves, the write FIFO and the per-word
  stall rule.
* **Result formats.** The RVT result word, its addressing, and the
  alternation of output banks per frame are this design's own.
* **PIV parallelism.** X = 32 multipliers is a choice, as are the row-wise
  schedule, the register map, the result word and the fixed-point fit.
* **PIV window stepping.** The host steps the PIV windows (writing each
  centre); there is no automatic scan over the image.
* **Reset.** Reset is synchronous and active low.
* **Storage.** All on-chip memories are plain arrays (area RAMs as
  registers, so a whole row can be read at once).

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `smart_camera_top` | `RVT_IMG_W`, `RVT_IMG_H` | 512, 512 | RVT frame size |
| | `PIV_IMG_W`, `PIV_IMG_H` | 1008, 1016 | PIV image size |
| | `RD_LAT` | 2 | memory read latency in clocks |
| `input_mem_switch` | `FIFO_DEPTH` | 4 | write FIFO depth |
| | `EXT_READS` | 0 | 0 = RVT window walk, 1 = external reads |
| `smart_camera_pkg` | `MEM_AW` | 19 | address bits per chip |
| `piv_pkg` | `M_MAX`, `N_MAX`, `X` | 40, 32, 32 | largest areas; multipliers (must equal `N_MAX`) |
| | `FRAC_W` | 8 | fraction bits of the displacement |

Parameters called "derived" in the module headers (`WPR`, `FW`, `NWIN`,
`IDX_W`, `K_W`) must not be overridden.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with values computed independently in the testbench and
prints `TB_RESULT checks=N failures=M`:

* RVT blocks are checked against a reference built from the template
  drawing (`tb_ref_pkg`), including latencies and the 5-per-11 rate.
* PIV blocks are checked against a full software correlation, the first
  maximum and a 64-bit parabolic fit.
* `tb_input_mem_switch` ends by raising both error flags on purpose.
  Frames sent back to back at one word per clock must raise `overrun`. A
  read of one chip held every clock must block its writes until the FIFO
  is full, which raises `overflow`. At camera rates, or even one pixel per
  clock on small frames, neither flag rises; the end-to-end runs check this.
* `tb_smart_camera_top` runs both applications end to end at reduced sizes
  (RVT 13 x 14 frames, PIV 64 x 48 images) with memory models
  (`board_sram`).
  * RVT: three camera frames at about a quarter of the clock rate, each
    result frame compared in full.
  * PIV: four windows of changing size, the first started before image 2
    has been stored.
  * It counts each mechanism and fails if one never occurs: read stalls,
    writes to one chip during a read of the other (both ways), frames
    finished in each output bank, PIV reads of both images, PIV reads
    waiting for unwritten data, size changes, results.
* `tb_smart_camera_full` runs the top at its default parameters.
  * RVT: one 512 x 512 frame; it checks the result count and every 13th
    result.
  * PIV: two 1008 x 1016 images and one 40/32 window.
  * It takes about 20 s with Verilator.
* `tb_smart_camera_workloads` also runs at the default parameters, with the
  camera's timing: pixels at 30 MHz and a 30 frames/s frame period.
  * RVT: two frames. The first result was written 10,289 clocks (172 µs)
    after the first pixel. The limit checked is 250 µs.
  * Each frame was complete 9.65 ms after its first pixel, well inside the
    33 ms frame period.
  * PIV: a row of 61 windows at 50 % overlap. It starts as soon as image 1
    is stored.
  * The first window finished while image 2 was still arriving, about
    73k clocks later, once the rows it needs had come in. The following
    windows took 3,249 clocks each.
  * It takes about a minute.

To run one testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_smart_camera_top \
  -y rtl -y tb +libext+.sv rtl/smart_camera_pkg.sv rtl/rvt_pkg.sv rtl/piv_pkg.sv \
  tb/tb_ref_pkg.sv tb/tb_smart_camera_top.sv
./obj_dir/Vtb_smart_camera_top
```

Verilator simulates with two states. The testbenches initialise what they
read.

## Files

* `rtl/smart_camera_pkg.sv`, `rtl/rvt_pkg.sv`, `rtl/piv_pkg.sv`: shared
  types and constants, including the filter tap table.
* Front end: `pixel_packer`, `input_mem_switch`, `output_mem_switch`.
* RVT: `rvt_window_buffer`, `rvt_interconnect`, `rvt_response`,
  `rvt_template_comparator`, `rvt_filter_unit`, `rvt_image_processor`.
* PIV: `piv_window_loader`, `piv_area_ram`, `piv_correlator`,
  `piv_plane_ram`, `piv_peak_detector`, `piv_subpixel` (with the helper
  `seq_divider`), `piv_processing_unit`.
* `smart_camera_top`.
* `tb/`: one `tb_<module>.sv` per module, `tb_smart_camera_full.sv`,
  `tb_smart_camera_workloads.sv`, the
  reference package `tb_ref_pkg.sv`, and the memory model `board_sram.sv`.

Not included: the camera, the framegrabber card, the memory chips
(behavioural model only) and the host/PCI side.
