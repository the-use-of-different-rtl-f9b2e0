# Differences Method streak detector for space-debris images

A space-debris camera sees faint moving objects against a field of stars.
Between two exposures taken a fraction of a second apart the stars stay
almost where they were: the whole field drifts slightly with the pointing.
The debris moves. This design registers frame B onto frame A using the stars
themselves. It then subtracts the two frames, so the stars cancel and only
what moved is left. Only small regions around those changes, plus a few
reference stars, are sent down, run-length coded. The downlink volume for a
2048 × 2048 frame pair then drops from 8 MB per frame to a few hundred
kilobytes.

The design follows the "Differences Method" of the ESA *Optical In-Situ
Monitor* study, in the form described for a Microsemi RTG4 FPGA:

1. remove saturated stars;
2. find the brightest non-saturated stars;
3. estimate one integer displacement vector per sub-frame;
4. bin both frames, taking the vectors into account;
5. subtract;
6. threshold.

The study gives these steps, the order in which the FPGA runs them, and
their clock counts per step. It does not give their internals. Where this
RTL had to choose, the choice is stated below and in each file's header.

## The processing chain

`dm_top` runs one frame pair through these phases. A phase starts only
after the previous one has finished. The clock counts are for one-shot mode
(next section).

| phase | block | work | clocks at 2048 × 2048 |
|---|---|---|---|
| STORE_A, STORE_B | `frame_store` | camera stream → external SRAM of that frame, 4 clocks per pixel | 2 × 16,777,216 |
| BIN | 2 × `prebin`, 2 × `star_detect` | 4 × 4 average binning of both frames at once; reference stars taken from the binned stream | 4,194,306 |
| DISP | `disp_vector` | 25 displacement vectors | 25 |
| BIN2 | 2 × `box_bin3` | 3 × 3 sliding sums of both binned frames | 262,146 |
| DIFF | `frame_diff` | B(r+dy, c+dx) − A(r, c), two-sided threshold, tile hit map | 258,066 |
| ROI | `roi_select` | flagged tiles → ROI list and ROI mask | 29,240 |
| STARS | `star_add` | raw windows around frame B's reference stars | 25 |
| COMPRESS | `rle_compress` | frame B masked to ROIs and star windows, zero-run coded | 4,196,354 |

Every unit that touches a frame is duplicated, so frames A and B are binned
and second-binned in the same pass. From the end of binning onward both
frames live in on-chip RAM (`dp_ram` instances inside `dm_top`). Frame B is
read from external SRAM once more, for the final compression.

## One-shot and continuous mode

The `continuous` input is sampled with `start`.

- **One-shot:** two new frames are stored, A in SRAM slot 0 and B in slot 1,
  and both are processed by the duplicated units.
- **Continuous:** only one new frame is stored. It overwrites the slot of
  the older frame of the previous run. Only the new frame is binned,
  searched for stars and second-binned. The newer frame of the previous run
  becomes frame A. Its binned and second-binned images and its star table
  are still on chip from that run and are reused as they are. The run
  therefore saves the storing of one frame (16.8 M clocks at 2048 × 2048).
  A continuous start with no previous run behaves as a one-shot start.

Internally, `nslot` names the slot of the newer frame B. Every A/B role
below (star tables to `disp_vector`, second-binned RAMs to `frame_diff`,
star table to `star_add`, SRAM read port for `rle_compress`) is selected
through it.

## Coordinate systems

Most of the difficulty in reading this RTL is knowing which grid a
coordinate refers to. There are four grids:

| grid | size at default | produced by | one element covers |
|---|---|---|---|
| raw | 2048 × 2048 | camera | 1 pixel |
| binned | HB × WB = 512 × 512 | `prebin` | raw rows 4r..4r+3, columns 4c..4c+3 (average; HB, WB rounded up) |
| second-binned | H2 × W2 = 510 × 510 | `box_bin3` | binned rows r..r+2, columns c..c+2 (sum of 9) |
| tile | HT × WT = 170 × 170 | `frame_diff` | second-binned rows 3t..3t+2, columns 3u..3u+2 |

- **Sub-frames:** the 5 × 5 grid of sub-frames is defined on the binned grid,
  in strips of ceil(HB/5) rows and ceil(WB/5) columns. The last strip is
  narrower.
- **Reference stars and vectors:** both are in binned pixels.
- **Vector lookup:** `frame_diff` picks the vector for second-binned position
  (r, c) from the sub-frame that holds the window centre (r+1, c+1).
- **Result image:** `rle_compress` maps raw pixel (y, x) to tile
  (y/4/3, x/4/3). The tile therefore covers the top-left 12 × 12 raw pixels
  of its 3 × 3 windows, not the full 20 × 20 footprint of the sums.
- **Edges:** a raw frame whose sides are not multiples of 4 is padded with
  zeros to the next multiple, so its last binned row or column is a partial
  block (668 × 1002 bins to 167 × 251). This matches the published
  clock counts for that size. Partial tiles at the right and bottom edges
  of the second-binned grid are dropped. The last sub-frame strip is
  narrower than the others.

## Registration: reference stars and displacement vectors

For each sub-frame, `star_detect` keeps the brightest binned pixel in the
range STAR_MIN ≤ p < SAT_LEVEL, with its position. Pixels at or above
SAT_LEVEL are ignored: a saturated star has no usable centre. The table
updates as binned pixels stream out of `prebin`, so star detection costs no
pass of its own.

`disp_vector` takes the position difference B − A of the two reference stars
of each sub-frame. It keeps the vector only when both stars exist and both
components are within ±MAX_DISP. Otherwise the sub-frame gets (0, 0). A large
jump usually means that the two frames picked different objects in that
sub-frame, for example a debris streak that outshines the star in one frame.

MAX_DISP is also the border `frame_diff` leaves unscanned, so that
B(r+dy, c+dx) always exists. The default of 1 binned pixel (4 raw pixels) is
read from the published clock counts. Second binning produces 510 × 510
values and the difference 508 × 508, i.e. a one-pixel margin per side.

A field that drifts by more than MAX_DISP binned pixels between frames is
not registered: raise MAX_DISP, at most 2, for such cases. The vectors are
applied when frame B is read for the difference, on the already binned sums.
Because registration is at whole binned pixels, a drift that is not a whole
multiple of BIN raw pixels leaves star residuals. DIFF_THR has to absorb
them.

## Difference, tiles and regions of interest

`frame_diff` flags a second-binned pixel when B − A > DIFF_THR (a new object
in B) or B − A < −DIFF_THR (an object that was in A). The flags are OR-ed
per 3 × 3 tile into a WT-bit row word. The word is written to the tile hit
map when the scan leaves a tile row.

`roi_select` reads the map one row word at a time and inspects one tile per
clock. Each flagged tile becomes a region of interest: it appears on
`roi_valid/roi_tr/roi_tc` and is set in the ROI mask. This continues until
MAX_ROI tiles have been taken, which bounds the size of the result image.

## Result image and its coding

The result image is raw frame B where the pixel lies in an ROI tile or in a
reference-star window, and zero elsewhere. `star_add` turns frame B's 25
reference stars into raw windows of (2·STAR_HALF+1)² pixels, clipped to the
frame.

`rle_compress` reads frame B once from SRAM, in raster order, and decides per
pixel whether to keep it. It spends one extra clock per row to fetch that
row's ROI-mask word. Kept pixels are never copied to a separate buffer.

Output words are 32 bits, `{run[15:0], val[15:0]}`: "run zero pixels, then
one pixel of value val". A word is emitted:

- for every non-zero pixel;
- when the run reaches 65535;
- for the last pixel of the frame.

Decoding therefore always gives exactly W·H pixels. The output has no
back-pressure: one word per clock at most.

## Interfaces of `dm_top`

- **Camera:** `pix_valid / pix_data / pix_ready`, 16-bit pixels in raster
  order, after a `start` pulse. In one-shot mode frame A comes first, then
  frame B; in continuous mode only the new frame is sent. `pix_ready` is high at
  most one clock in WR_CYCLES.
- **External SRAMs:** two slots, one frame each; which one is B depends on
  the mode. Each
  slot has a write port `sram_we/sram_waddr/sram_wdata` and a read port
  `sram_re/sram_raddr`, with `sram_rdata` valid one clock after `sram_re`.
  Each slot needs W·H 16-bit words: 8 MB at the default size.
- **Results:**
  - `roi_valid / roi_tr / roi_tc`: selected tiles, during the ROI phase.
  - `out_valid / out_word`: the coded result image, during COMPRESS.
  - `done`: pulses after the last word.
- **Status:** `phase` (0 idle, 1–9 as in the table above), `matched`
  (trusted vectors), `hit_count` (flagged pixels), `roi_count`, `n_words`,
  `busy`.
- **Reset:** `rst_n` is asynchronous and active low. The RAM contents are
  not reset; every word is written before it is read.

## Parameters (`dm_top`)

| parameter | default | meaning |
|---|---|---|
| W, H | 2048, 2048 | raw frame size (the study also used 668 × 1002 and 2672 × 4008) |
| BIN | 4 | pre-binning factor, power of two |
| WR_CYCLES | 4 | clocks per external SRAM write |
| MAX_DISP | 1 | largest trusted vector component, binned pixels (≤ 2) |
| SAT_LEVEL | 0xFF00 | binned value treated as saturated |
| STAR_MIN | 2000 | faintest binned value accepted as a reference star |
| DIFF_THR | 3000 | difference threshold, in units of a 3 × 3 sum of binned averages |
| MAX_ROI | 1024 | most ROI tiles kept per frame pair |
| STAR_HALF | 8 | half size of a reference-star window, raw pixels |

The five values from SAT_LEVEL down are this design's own, to be tuned to
the camera's noise. The remaining sizes and WR_CYCLES come from the study.

On-chip storage at the default size:

- binned frames: 2 × 512 × 512 × 16 bits;
- second-binned frames: 2 × 510 × 510 × 20 bits;
- tile hit map and ROI mask: 2 × 170 × 170 bits.

That is 18.9 Mbit in total. This is more block RAM than an RTG4 has (about
5 Mbit, a figure not from the study). A real RTG4 build would need the
second-binned frames recomputed on the fly or kept in external memory.

## Departures from the published FPGA design

- **Star detection:** runs inside the binning pass. The published design
  spends a separate pass plus about 6,000 clocks on it, and it was that
  design's critical path. Here the method is a plain brightest-pixel search.
- **Fixed overheads:** the published design has fixed overheads in storing
  (5,760 clocks), vector calibration (4,504) and adding stars (3,200). They
  are not reproduced, because what they do is not known.
- **ROI copy:** ROI and star pixels are selected during compression instead
  of being copied between RAMs. The published design spends 324 clocks per
  ROI on that copy.
- **Compression:** the published design's compression method is unknown
  (it costs one clock per raw pixel there, as here). A zero run-length code
  is used instead.
- **Memory variant:** the study also timed a variant built on single-port
  memories, whose binning is about 6 % slower. Only the dual-port variant
  is built here: each SRAM slot has separate read and write ports.
- **Algorithm choices:** the second-binning window (3 × 3 sliding sum), the
  tile size (3 × 3) and MAX_DISP = 1 are inferred from the published clock
  counts. These are (H−2)·(W−2) values for the second binning,
  (H−4)·(W−4) for the difference and (H−2)/3 · (W−2)/3 tiles for ROI
  selection.

## Verification

Each block has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench and checks the clock count
of the block. Each ends with a line `TB_RESULT checks=N failures=M`.

- `tb_dm_top` runs the whole chain on 256 × 256 frames with MAX_ROI = 8.
- `tb_dm_top_full` runs it at the default 2048 × 2048 with default
  parameters, in under a minute and a half.
- `tb_dm_top_sizes` runs the study's two other frame sizes side by side:
  668 × 1002 (one-shot and continuous) and 2672 × 4008 (one-shot only).

Each test runs one-shot over frames 0 and 1, then continuous with frame 2
against frame 1; at 2672 × 4008 only the one-shot run is made, to bound the
simulation time. All use `dm_tb_harness`, which provides three things:

- **A synthetic scene:** noisy background, 3 × 3 stars, saturated 8 × 8
  stars, the field moving 4 raw pixels per frame, and a debris streak at a
  different place in each frame.
- **The external SRAM model.**
- **A reference model of the full chain,** compared with the ROI list, the
  decoded image pixel by pixel, the vector and hit counts.

The harness also counts how often each mechanism occurred and fails the run
if one never did. The mechanisms are:

- store back-pressure;
- saturated-star rejection;
- trusted, non-zero and rejected vectors;
- both threshold signs;
- ROIs and the ROI limit;
- star windows;
- continuous-mode runs.

At full size, a one-shot run takes 33,554,431 clocks to store the pair and
8,940,175 to process it. A continuous run stores one frame in 16,777,215
clocks and needs the same processing time.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dm_pkg.sv tb/tb_dm_top.sv --top-module tb_dm_top
./obj_dir/Vtb_dm_top
```

Any other testbench runs the same way, with its name in place of
`tb_dm_top`. Read the package first. Everything else is found through
`-y`.

## Files

- `rtl/dm_pkg.sv`: pixel, coordinate, star, vector, window and output-word
  types; the sub-frame lookup.
- `rtl/dm_top.sv`: sequencer, per-frame duplication, on-chip buffers.
- `rtl/frame_store.sv`, `prebin.sv`, `star_detect.sv`, `disp_vector.sv`,
  `box_bin3.sv`, `frame_diff.sv`, `roi_select.sv`, `star_add.sv`,
  `rle_compress.sv`: the steps, in chain order.
- `rtl/dp_ram.sv`: one-write, one-read RAM with registered output.
- `tb/tb_<block>.sv`: block tests.
- `tb/dm_tb_harness.sv`, `tb/dm_size_run.sv`, `tb/tb_dm_top.sv`,
  `tb/tb_dm_top_full.sv`, `tb/tb_dm_top_sizes.sv`: end-to-end tests.
