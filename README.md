# Steerable Gaussian smoother

An image filter that smooths along a chosen direction needs a Gaussian kernel
that is stretched and rotated. Computing such a 2-D kernel directly for every
orientation is expensive. A cheaper way, used here, splits the oriented Gaussian
into two parts:

1. an **isotropic** Gaussian. It is separable, so it is computed as a vertical
   7×1 pass followed by a horizontal 1×7 pass;
2. one more **directional** 1-D Gaussian (1×9) along the wanted direction.

Each part is a 1-D convolution, so the whole filter is three 1-D passes of one
kind of hardware: a window fetch, a multiply-accumulate and a rescale to 8 bits.
This RTL builds two directions, horizontal and vertical. Both are computed from
the same smoothed image in the same clock.

The default configuration handles images of up to 158×158 8-bit pixels. It runs
at 2 clocks per pixel, which is 49,940 clocks for a full 158×158 frame. A
variant with an unpipelined separable stage runs at 3 clocks per pixel.

## Data flow

```
 load port ──► image BRAM ──► [separable stage] ──► BRAM1 ──┬─► row window ─► pixel&mask ─► mult&add ─► st_h
 (pixel by     (banked)        vertical 7x1 pass    (banked, │
  pixel)                       horizontal 1x7 pass   2 read  └─► col window ─► pixel&mask ─► mult&add ─► st_v
                                   │                 ports)
                                   └──► sc_* (isotropic result)
```

Every 1-D pass has the same three parts:

| part | module | job |
|---|---|---|
| read controller | `raster_scan` | visits every (row, col) once, one per clock, tags the last one |
| pixel & mask controller | `pixel_mask_ctrl` | holds the mask; pairs each window tap with its coefficient; zeroes taps outside the image |
| multiplier & adder | `mac_rescale` | Σ pixel×coef, then rounds, drops 16 fraction bits and clamps at 255 |

Every pixel in flight carries a tag (`sgs_pkg::tag_t`). The tag holds the
pixel's row and column and a last-of-frame flag, so no stage needs its own
position counters. Results are written wherever their tag says, and the next
pass starts on the tag with `last` set.

## Fetching a whole window in one clock: the banked frame store

`banked_frame_ram` is the most important part of this design, and the least
obvious. A 1-D pass at one pixel per clock must read B = 7 or 9 pixels per
clock, which one block RAM port cannot do. So the frame is split across B
block RAMs (`bram_sdp`). The directional stage must read a **row** window and a
**column** window, so the split has to serve both. The store uses a diagonal
interleave:

```
bank(r, c)    = (r + c) mod B
address(r, c) = r * ceil(MAX_W / B) + floor(c / B)
```

Take B pixels in a row, (r, c … c+B-1). Their values of r+c are B consecutive
integers, so each lands in a different bank. The same holds for B pixels in a
column. The address is unique within a bank: for a fixed row r, the columns in
bank b are exactly one per group of B columns.

Per read, the store computes each tap's (row, col) and checks it against the
run-time image size. It sends the tap's address to the tap's bank, one clock
later routes each bank's word back to the tap, and reports a per-tap `rd_ok`
flag. A tap outside the image reaches no bank; its data is meaningless, and the
pixel & mask controller replaces it with zero.

`N_RD` read ports are made by duplicating the banks. Every write goes to all
copies. BRAM1 uses two ports, so both directions are read in the same clock.

Memory per store: `B × MAX_H × ceil(MAX_W/B) × 8` bits.

| store | size |
|---|---|
| image BRAM (B=7) | 203,504 bits |
| IC BRAM (unpipelined variant only, B=7) | 203,504 bits |
| BRAM1 (B=9, two copies) | 409,536 bits |

## The separable stage: two variants

`PIPELINED` on the top selects the variant when the design is built.

**Pipelined (`sep_conv_pipelined`, default).** The vertical pass reads a 7-pixel
column window from the image BRAM each clock. Its intermediate convolution (IC)
results come out in raster order. `ic_fifo` keeps the last 7 IC results. Each
time one is pushed, `ic_fifo` presents the horizontal window centred 3 pushes
back. Entries are tagged, so taps from the previous or the next row are marked
not ok, and this gives the left and right border padding. After the `last`
pixel the FIFO shifts 3 empty entries in on its own, which flushes the final
windows out. One frame takes `W*H + 9` clocks.

**Unpipelined (`sep_conv_unpipelined`).** The vertical pass writes the whole IC
image into a second banked store (the IC BRAM). When the last IC pixel has been
written, a second read controller scans that store by row windows. One frame
takes `2*W*H + 6` clocks. This variant has the same logic as the pipelined one,
plus a whole extra frame store. It is slower and, as built here, it does not
save memory; see "Departures" below.

## The directional stage

`steer_dir_conv` writes the separable result into BRAM1 as it arrives. On the
`last` pixel it starts its own scan. Each clock, port 0 returns the 9-pixel row
window and port 1 the 9-pixel column window of the same pixel. Two pixel & mask
controllers and two multiplier & adders, all using the same 1×9 mask, produce
`st_h` and `st_v` together. The stage runs at one clock per pixel, and only
after the separable frame is complete. This is why the totals come to 2 clocks
per pixel (pipelined) and 3 (unpipelined).

## Number format and rescaling

- Pixels are unsigned 8-bit intensities.
- Mask coefficients are unsigned 16-bit, with 16 fraction bits: a mask whose
  taps add up to 65,536 has unity gain. The largest coefficient is 65,535, just
  below 1.0.
- Each multiplier & adder forms the exact sum, adds 2^15, shifts right by 16
  and clamps at 255. This rescaling happens after **every** pass, so the
  intermediate images are 8-bit as well. `sc_sat` / `st_sat` flag a clamp.
- Borders are zero-padded, and the output has the same size as the input. Near
  the edges, unity-gain masks therefore darken the image slightly.

Masks are run-time inputs, captured on `start`. Any Gaussian up to 7 (or 9)
taps can be loaded, including smaller masks padded with zero taps. For a
σ_x = 3, σ_y = 5 oriented Gaussian, for example, use σ = 3 for the isotropic
masks and σ = √(5² − 3²) = 4 for the directional one. Sample each Gaussian,
scale it to sum to 65,536, and put the rounding remainder on the centre tap.
The testbenches compute their masks this way (`sgs_ref_pkg::gauss`).

## Top-level interface (`steerable_gaussian_top`)

| parameter | default | meaning |
|---|---|---|
| `MAX_W`, `MAX_H` | 158, 158 | largest image |
| `K` | 7 | isotropic mask taps |
| `KD` | 9 | directional mask taps |
| `PIPELINED` | 1 | 1: pipelined separable stage; 0: unpipelined |

To run a frame:

1. While `busy` is low, write the image with `load_we`, `load_row`,
   `load_col` and `load_pix`, one pixel per clock, in any order.
2. Pulse `start` for one clock. In that clock `img_cols` (10 bits),
   `img_lines` (9 bits), `mask_v[7]`, `mask_h[7]` and `mask_d[9]` must be
   valid. All of them are captured in that clock.
3. The isotropic result streams out on `sc_valid` / `sc_row` / `sc_col` /
   `sc_pix`.
4. The directional results then stream out on `st_valid` / `st_row` /
   `st_col` / `st_h` / `st_v`. Both streams are in raster order, one pixel per
   clock.
5. `done` pulses with the last directional pixel, and `busy` falls.

There is no back-pressure: the consumer must accept a pixel every clock. A
`start` while `busy` is ignored. An assertion checks that the two output streams
never overlap.

Latency: the first `sc` pixel appears about 10 clocks after `start` (pipelined) or about `W*H` clocks after it (unpipelined), and `done`
comes `2*W*H + 12` clocks (pipelined) or `3*W*H + 9` clocks (unpipelined)
after `start`.

## Verification

Each module has a self-checking testbench in `tb/`. All compare against an
independent integer model, `tb/sgs_ref_pkg.sv`, which runs whole-frame 1-D
passes with zero padding, rounding and clamping.

- `tb_steerable_gaussian_top` runs the pipelined and the unpipelined top side by
  side on three frames:
  - 158×158 with unity-gain masks;
  - 23×11 with gain-1.6 masks, which forces clamping in both stages;
  - 7×7 with a 3×3 σ=1 mask, placed as 7 taps with zeros around it.

  It checks every `sc`, `st_h` and `st_v` pixel and the frame time (2 or 3
  clocks per pixel, plus at most 32). It fails if clamping never happened in
  either stage, or if no frame smaller than the maximum size was run.
- `tb_sgs_full_size` runs one 158×158 frame through the top with all defaults.
- `tb_sep_conv_pipelined`, `tb_sep_conv_unpipelined` and `tb_steer_dir_conv`
  run at a 40×30 maximum size. The directional stage is fed with random gaps.
- `tb_banked_frame_ram`, `tb_ic_fifo`, `tb_raster_scan`, `tb_pixel_mask_ctrl`,
  `tb_mac_rescale` and `tb_bram_sdp` cover the parts.

All results are bit-exact against the model. Timing closure at a given clock
rate has not been checked: each multiplier & adder does up to 9 8×16 products
and their sum in one clock, and the store computes bank addresses with
constant divide and modulo in one clock.

Running a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sgs_pkg.sv tb/sgs_ref_pkg.sv tb/tb_steerable_gaussian_top.sv \
  --top-module tb_steerable_gaussian_top -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Testbenches that do
not use the reference package (`tb_bram_sdp`, `tb_raster_scan`,
`tb_mac_rescale`, `tb_pixel_mask_ctrl`, `tb_banked_frame_ram`, `tb_ic_fifo`)
need only `rtl/sgs_pkg.sv` before them. The full-size frame simulates in well
under a second.

## Departures and open points

- **Direction.** Only horizontal and vertical are built. Steering to another
  angle would need a directional window along that angle, which this
  interleave cannot fetch in one clock.
- **Pixel width.** Pixels are 8 bits throughout. A 16-bit pixel format was
  mentioned for a small 7×7 test; this design keeps every intermediate image at
  8 bits instead, with a rescale after each pass.
- **Coefficient scale.** Coefficient scaling is a power of two (2^-16), chosen
  so that rescaling is a shift, not a multiply by an arbitrary normalising
  factor.
- **Border handling.** Zero padding at the borders, the start/done/valid
  handshake, reset behaviour (control state only, memories not reset) and the
  image load port are this design's choices.
- **Intermediate FIFO size.** The pipelined variant keeps only 7 IC results in
  its FIFO, not several rows. The column window comes straight from the banked
  image store.
- **Memory of the unpipelined variant.** It is usually described as the cheaper
  one. Built this way, it needs *more* memory (an extra 203,504-bit IC store) and
  about the same logic. Only its rate (3 clocks per pixel, against 2) matches
  that description.
- **Device fit.** At its defaults the design holds about 613 kbit of frame
  memory. That is far more than a small FPGA of the Virtex-E/Spartan-II class
  provides (tens of kbit of block RAM).
- **Directional pass overlap.** The directional pass does not overlap the
  separable pass of the same frame. Pipelining it behind the separable stage
  (one clock per pixel overall) would need a line-buffer scheme for the column
  window; that is not built.
- **Colour.** No colour (RGB) path and no mode pins are built.

## Files

| file | contents |
|---|---|
| `rtl/sgs_pkg.sv` | widths, `tag_t`, `dir_e` |
| `rtl/steerable_gaussian_top.sv` | top |
| `rtl/sep_conv_pipelined.sv`, `rtl/sep_conv_unpipelined.sv` | separable stage variants |
| `rtl/steer_dir_conv.sv` | directional stage with BRAM1 |
| `rtl/banked_frame_ram.sv`, `rtl/bram_sdp.sv` | frame stores |
| `rtl/ic_fifo.sv` | IC result FIFO with window output |
| `rtl/raster_scan.sv`, `rtl/pixel_mask_ctrl.sv`, `rtl/mac_rescale.sv` | the three parts of a 1-D pass |
| `tb/sgs_ref_pkg.sv` | reference model, mask and image generators |
| `tb/tb_*.sv` | testbenches |
