# Stereo depth mapping without frame buffers

This is synthesizable SystemVerilog for a real-time stereo vision datapath. It takes
two rectified 8-bit grayscale camera streams (256x192 pixels) and produces a dense
disparity map. A disparity is the horizontal shift between the two views, so it
measures depth: a larger disparity means a nearer object.

Two ideas keep the hardware small:

* **No frame is stored.** Matching works on 10x3-pixel blocks, so only the two most
  recent image lines of each camera are kept in RAM. The final median filter keeps
  two lines of the disparity map. The four line stores add up to 1344 bytes in all.
* **Two cheap matching costs, checked against each other.** Every block is matched
  with two costs: the sum of squared differences (SSD) and the Census transform
  with Hamming distance. Each cost is searched in two directions: right image against
  left (RL) and left against right (LR). A disparity is kept only where the LR and RL
  results of a cost agree. This check removes occluded areas and most false matches
  in flat areas. A 3x3 median filter then cleans up what is left.

Each pixel pair takes 28 clocks: 3 for buffering and 25 for the displacements 0..24,
one per clock. At 75 MHz this gives 54.5 frames per second.

## Data flow

```
 in_left/in_right ──► input_buffer ──RL blocks──► ssd_unit (RL)    census_unit (RL) ─┐
 (valid/ready)        (line RAM +   ──LR blocks──► ssd_unit (LR)    census_unit (LR) ─┤
                       2 shift banks)                                                 ▼
 pixel_controller: phases of the 28-clock pixel cycle      displacement_module (best d, LR→viewpoint)
                                                                                      ▼ 4 disparities
                                                           merge_module (consistency + priority)
                                                                                      ▼ 1 code
                                                           output_filter (3x3 median) ──► out_code
```

| Module | File | What it does |
|---|---|---|
| `stereo_top` | `rtl/stereo_top.sv` | Wires the chain together. |
| `stereo_pkg` | `rtl/stereo_pkg.sv` | Default sizes and shared types: `disp4_t` and `merge_cfg_t`. |
| `pixel_controller` | `rtl/pixel_controller.sv` | Runs the 28-clock pixel cycle and the input handshake. |
| `input_buffer` | `rtl/input_buffer.sv` | Two-line RAM ringbuffer, two shift register banks and the block selection. |
| `line_ram` | `rtl/line_ram.sv` | Single-port RAM that is two lines deep. |
| `ssd_unit` | `rtl/ssd_unit.sv` | Combinational SSD of two 10x3 blocks. |
| `census_unit` | `rtl/census_unit.sv` | Combinational Census signatures of two 10x3 blocks and their Hamming distance. |
| `displacement_module` | `rtl/displacement_module.sv` | Finds the best displacement of each of the four searches and maps LR results to the output viewpoint. |
| `merge_module` | `rtl/merge_module.sv` | LR/RL consistency check and priority selection. |
| `output_filter` | `rtl/output_filter.sv` | 3x3 median filter with its own two-line RAM. |

## The pixel cycle

`pixel_controller` splits every pixel into 28 phases:

| phase | action |
|---|---|
| 0 | Wait for `in_valid`; `in_ready` is high. The pair is taken, and line y-2 is read at column x. |
| 1 | Read line y-1 at column x. |
| 2 | Write the new pair into the slot of line y-2; shift the column {y-2, y-1, y} into both banks. |
| 3..27 | Search step for displacement d = phase-3: both SSD units and both Census units each evaluate one block pair. |
| next 0 | `commit`: the four best displacements are final and move on. This happens even if no new pixel waits. |

One single-port RAM serves the input buffer, because it needs only three accesses per
28 clocks. Line y goes into slot y mod 2, which is also the slot of line y-2. Each word
is therefore read just before it is overwritten.

## Block search and the two banks

For each camera, the three-pixel columns enter a bank that is 34 columns wide
(BLK_W + DISP_N - 1). Let x be the newest column. Both searches then use the same bank:

* **RL**: the right block starting at x_r = x-33 is compared with left blocks at
  x_r + d, for d = 0..24.
* **LR**: the left block starting at x_l = x-9 is compared with right blocks at
  x_l - d. Only d <= x_l is allowed, so the candidate never leaves the line.

The best displacement has the lowest cost. On equal cost the smaller displacement
wins. Both directions of both costs finish in the same pixel cycle.

## Bringing LR to the output viewpoint (the subtle part)

The RL results are already in right-image coordinates. An LR result is not: a left
block at x_l with disparity d shows the scene point that sits at x_l - d in the right
image. `displacement_module` therefore keeps a window of 25 entries per cost function,
for right positions x-33 .. x-9. Each pixel cycle it does three things:

1. Shifts the window by one position. The new entry starts invalid, and the whole
   window is cleared at the start of a line.
2. Writes the new LR result at position x_l - d. If that entry is already valid, the
   larger disparity is kept. Two left blocks landing on one spot means one hides the
   other, and the nearer surface is the one that is seen.
3. Reads out the oldest entry, position x-33. No later left block can reach it any more.

Its RL partner, the block at x_r = x-33, has been searched in the same pixel cycle. The
four values of position x_r therefore come out together. Right positions that no left
block maps to stay invalid; they are the occluded areas. A block's result is placed at
its middle line and at column x_r + 4. The first and last lines, the 4 leftmost columns
and the 29 rightmost columns are never searched, so they are invalid.

## Merging and the map code

The map carries 5-bit codes. **0 means "no valid disparity"**, and code k means
disparity k-1 (codes 1..25). `merge_module` applies the following rules, set by `cfg`
(`merge_cfg_t`):

* A cost function *passes* if its LR and RL values are both valid and differ by at most
  `cfg.tol` (0..3). It must also be enabled by `cfg.en_ssd` or `cfg.en_census`.
* If both functions pass, `cfg.prefer_census` picks the winner. The default is SSD.
* The winner's RL disparity is output. If neither function passes, the code is 0.

`stereo_pkg::MERGE_CFG_DEFAULT` enables both functions, prefers SSD and uses tolerance 0.

`output_filter` takes the median of each 3x3 neighbourhood of codes and outputs 0 on
the map border. Code 0 sorts below every disparity. A lone dropped pixel inside a
surface is therefore filled in, and a lone stray disparity is removed.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset. |
| `cfg` | in | 5 | Merge configuration; sampled for each map position. |
| `in_valid`, `in_ready` | in/out | 1 | A pair is taken on a rising edge where both are high. |
| `in_sof` | in | 1 | Marks the first pixel of a frame and resets the position counters. |
| `in_left`, `in_right` | in | 8 | The two pixels at the same image position, in raster order. |
| `out_valid` | out | 1 | One-clock pulse per map code. There is no back-pressure. |
| `out_code`, `out_row`, `out_col` | out | 5/8/8 | The map code and its position. |

One map code leaves for every pixel pair taken. The code for position (r,c) leaves
2*IMG_W + BLK_W - BLK_W/2 + DISP_N + 1 pixel cycles plus 5 clocks after the pair at
(r,c) was taken. With the defaults and no stalls that is 543*28 + 5 = **15209 clocks**.

The map therefore trails the input by a little over two lines. The last two lines of
a frame leave while the next frame streams in. A source that stops after one frame
must feed about two more lines to flush it.

Parameters of `stereo_top` are `IMG_W`, `IMG_H`, `BLK_W` and `DISP_N`, with the
defaults 256, 192, 10 and 25. The block height is fixed at 3, because the Census
transform uses a 3x3 window on the middle line. The widths of displacements, map codes
and SSD sums follow `DISP_N` and `BLK_W` (a map code has $clog2(DISP_N+1) bits, so
`out_code` grows to 6 bits for 37 displacements). A pixel cycle is always DISP_N + 3
clocks. `IMG_H` must be even, because of the line ringbuffer. The testbenches run the
design at 256x192 with 10x3 blocks and 25 displacements, at 384x288 with the same
blocks, and at 384x288 with 15x3 blocks and 37 displacements. Blocks taller than 3
lines, and replicated correlation units for higher rates, are not supported.

## Where this departs from, or goes beyond, the source description

The source gives the block structure: an input buffer with RAM ringbuffer and two
shift banks, 2x SSD, 2x Census, a displacement module that builds four maps, a merge
module and a median output filter. It also gives the Census transform in detail
(3x3 window, the "brighter" comparison, 8 inner pixels of a 10x3 block forming a
64-bit signature), the sizes (256x192, 8 bit, 10x3, 25 displacements) and the 28-clock
pixel cycle. Everything below is this design's own choice:

* **Input handshake and output format.** The source only says the streams use "a
  generic protocol".
* **The merge rule.** The source mentions a configurable priority scheme without
  details. The `cfg` fields, the tolerance test and "output the RL value" are this
  design's choices.
* **The median window.** 3x3 was chosen. With 5-bit codes, its two-line store brings
  the total RAM to 1344 bytes, which matches the 1.34 KBytes quoted for the chip.
  This is a plausible reading, not a stated one.
* **The output viewpoint.** The right image is used; the source speaks of a "virtual
  viewpoint" without defining it.
* **Mapping details.** The tie rule (smaller d), the collision rule (larger d) and the
  placement of a result at the block centre are this design's own.
* **Latency.** It is 15209 clocks, that is 543 pixel cycles plus 5 clocks. The
  fabricated chip is quoted at 15,204 clocks, exactly 543 pixel cycles.
* **Memory.** The RAMs are plain arrays (`line_ram`), not process SRAM macros.
  Nothing of the physical chip (pads, clocking, layout) is modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | Checks |
|---|---|
| `tb_stereo_top` | The full design at default sizes, over three frames with synthetic scenes (described below). |
| `tb_stereo_pal_small` | The same end-to-end test at 384x288 (quarter PAL), with `IMG_W`/`IMG_H` overridden. |
| `tb_stereo_pal_large` | The same at 384x288 with 15x3 blocks and 37 displacements (40 clocks per pixel). |
| `tb_census_unit` | The published 10x3 worked example (signature `A9 00 90 BB 21 F7 FF 44`), plus random and near-flat blocks. |
| `tb_ssd_unit` | Extremes and random blocks. |
| `tb_line_ram` | Read/write and the ringbuffer access pattern. |
| `tb_pixel_controller` | Exact 28-clock cycle, phase offsets, stalls. |
| `tb_input_buffer` | Every window at every displacement against blocks cut from the images, at a 48-pixel width that is not a power of two. |
| `tb_displacement_module` | Random costs with many ties; argmin, mapping and collisions against a line-level model. |
| `tb_merge_module` | Random values and configurations. |
| `tb_output_filter` | Median, positions and 3-clock timing. |

In `tb_stereo_top`, each synthetic scene has a textured background at disparity 6, a
nearer textured box at disparity 15 that hides background from one camera, and a flat
grey patch. Every output code and position is compared with a frame-level reference
model written independently of the streaming RTL. The test also checks the
15209-clock latency, and it requires each mechanism to occur at least once: input
stalls, consistency drops, SSD wins, Census wins, median corrections, LR mapping
collisions and a configuration change. It runs in a few seconds.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/stereo_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

Replace `tb_stereo_top` with any other testbench name. Every testbench has a watchdog
and finishes on its own.
