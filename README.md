# FEMIP — feature extraction and matching for visual navigation

A spacecraft that steers by what its camera sees has to find the same ground
points in two consecutive frames, and it has to do so at frame rate. This core
does that work in hardware. It has three parts:

1. A 7×7 Gaussian filter smooths each incoming grey-scale frame.
2. A Harris corner detector scores every filtered pixel.
3. A matcher pairs the strongest corners of the current frame with corners of
   the previous frame. It compares the 11×11 neighbourhoods of the two corners.

The output is a list of matched coordinate pairs `(x1,y1) → (x2,y2)`, each with
its dissimilarity score.

Three ideas keep the hardware small:

- **A pixel goes into the core only once.** The filter keeps just seven image
  rows on chip. It produces one filtered pixel per clock. Every filtered pixel
  is written to an external frame store, so the matcher can read
  neighbourhoods back later without keeping frames on chip.
- **The detector's threshold sets itself.** It is adjusted between frames so
  that the number of corners stays in a useful band, without help from a host.
- **Searches are bounded by known limits.** Limits on feature density and on
  motion between frames bound each search. Non-maximum suppression only looks
  ±20 entries around a feature in the list. Matching only compares corners
  that lie within 17 pixels of each other. The correlation datapath is a single
  subtractor and accumulator, whatever the window size.

Defaults: 1024×1024 frames, 10 bits per pixel, and a 32-bit input bus.

## Data flow

```
in_data (32b, packed 10b pixels)
   │
splitter ──► smart_write_dispatcher ──► rows_buffer (7 × 1 row)
                                             │ one column / clock
                                   smart_read_dispatcher (reorder)
                                             │
                                   sliding_window_buffer (7×7 regs)
                                             │
                                   conv_mul_add_tree (49 mul, 48 add) ──► em_wr_* (external store)
                                             │ 10.15 pixel / clock
                                   harris_extractor (+ adaptive_threshold)
                                             │ features above threshold
                         features_matcher:
                           features_buffer ─► nms_3x3 ─► nms_buffer (frame A / frame B)
                                                                  │
                           correlation_controller ◄── mem_req/mem_rsp (external store)
                             patch_register, correlation_compute
                                             │
                           matched_buffer (512 pairs) ──► match_valid/match_data
```

`gaussian_filter` wraps the first six blocks. `femip_top` chains
`gaussian_filter`, `harris_extractor` and `features_matcher`. Shared widths
and structs are in `rtl/femip_pkg.sv`:

- pixels are 10 bits
- filtered pixels are 25 bits (10.15)
- coordinates are 10 bits
- R is 50 bits, signed
- `feature_t`, `point_t` and `match_t`

## The filter: circular rows buffer and reordering network

This is the least obvious part of the design.

**splitter.** Pixels arrive packed with no padding: 16 pixels fill 5 bus
words. The splitter keeps a 64-bit reservoir. It accepts a word whenever at
most 32 bits are waiting (`in_valid/in_ready`) and emits one pixel per clock
from the least significant end. Pixel 0 of the stream is in bits [9:0] of the
first word.

**smart_write_dispatcher and rows_buffer.** There are seven single-row RAMs.
Row `y` of the image is written into bank `y mod 7`, at address `x`. Row 7
therefore overwrites row 0, row 8 overwrites row 1, and so on. The dispatcher
counts `x`, `y` and a frame parity bit. Frames carry no markers: the first
pixel after reset is pixel (0,0) of frame 0.

**smart_read_dispatcher.** This block handles column `x` of the current row
`y` (`y ≥ 6`), in the same clock that the pixel is written. It reads address
`x` from all seven banks, which takes one clock. The bank that is being
written returns stale data, so its word is replaced by the new pixel from a
bypass register. The seven words are then rotated so that ordered row `k`
(0 = oldest) comes from bank `(slot+1+k) mod 7`, where `slot = y mod 7`. The
window therefore always receives rows `y-6 … y` from top to bottom, wherever
the circular policy has put them.

**sliding_window_buffer.** This is a 7×7 register array, and each ordered
column is shifted in from the right. Once `x ≥ 6`, element `[i][j]` holds
pixel `(y-6+i, x-6+j)`, which is the neighbourhood of `(y-3, x-3)`.

**conv_mul_add_tree.** It runs 49 multipliers and then a six-level adder tree
(24+12+6+3+2+1 = 48 adders). A pipeline register sits after the multipliers
and after every adder level, so the latency is 7 clocks and one result comes
out per clock. The kernel is 49 coefficients in unsigned 0.15 format. The
result is saturated to 10.15 (25 bits).

The default kernel is the binomial `C(6,i)·C(6,j)/4096`, a close
approximation of a Gaussian that sums to exactly 1.0. It is computed in the
package (`binomial_kernel()`). Any other 0.15 kernel can be passed in through
`gaussian_filter`'s `KERNEL` parameter.

**Timing.** The filtered pixel centred on `(x,y)` leaves `gaussian_filter`
9 clocks after input pixel `(x+3, y+3)` leaves the splitter. The 3-pixel
image border is never produced, so a frame yields `(W-6)·(H-6)` filtered
pixels. Each one is sent to Harris (`fp_*`) and to the external store
(`em_wr_*`). The store word is the 25-bit value zero-extended to 32 bits, and
it is addressed by frame parity, x and y.

## Corner detection and the self-adjusting threshold

`harris_extractor` uses the 10 integer bits of each filtered pixel and runs a
fully pipelined Harris detector. Its stages are:

1. a 3×3 window (`window3x3`, two line buffers) gives central-difference
   gradients `Ix`, `Iy`
2. the products `Ix²`, `Iy²`, `IxIy`
3. a second 3×3 window sums each product
4. `R = det − k·trace²`, with `k = 3/64`
5. comparison with the threshold

It delivers one R per clock. Positions nearer than 8 pixels to the image edge
are never reported, so every reported feature has an 11×11 neighbourhood made
only of filtered pixels. `frame_start` and `frame_end` mark the first and the
last position the detector scores.

`adaptive_threshold` counts features above the threshold during a frame, and
at `frame_end` it sets the threshold for the next frame:

| features in the frame | next threshold |
|---|---|
| more than `TARGET_HI` | doubled |
| fewer than `TARGET_LO` | halved (never below 1) |
| otherwise | unchanged |

`thr_stable` is high when the last adjustment left the value unchanged.

## Matching: collect, suppress, correlate

`features_matcher` takes each frame through the steps below. Collection
and the rest overlap: the features buffer has two banks that alternate
between frames. While frame N is suppressed and then matched against frame
N-1, frame N+1 is already being collected into the other bank. One engine
runs suppression and correlation, one frame at a time, in frame order.

1. **Collect.** Features stream into one `features_buffer` bank (1024
   entries) in raster order. Extra features are dropped and `fb_overflow` is
   set.
2. **Suppress** (`nms_3x3`). This starts after `frame_end`, once the engine
   is free. For each feature `i`
   the block reads entries `i-20 … i+20` and looks for another feature within
   ±1 pixel in x and y with a larger R. If R is equal, the earlier entry wins.
   A feature that no neighbour beats is written to the half of `nms_buffer`
   that belongs to the current frame parity. This frees the features bank.
   The ±20 window is valid because
   at most about 10 features fall on one image row, so any neighbour one row
   away lies within 20 list entries.
3. **Correlate** (`correlation_controller`). This runs only if the frame
   just before was also collected and the threshold is stable.
   - For each previous-frame point `p1`, every current-frame point `p2` with
     `|dx|, |dy| ≤ 17` is a candidate.
   - At the first candidate, the 121 filtered pixels around `p1` are read from
     the external store into `patch_register`.
   - For each candidate, the 121 pixels around `p2` are then streamed in.
     `correlation_compute`, a 25-bit subtractor and an accumulator, forms the
     sum of absolute differences on the fly.
   - The candidate with the lowest sum is kept, and the first one wins a tie.
     It goes to `matched_buffer` if its sum is below `cc_thr`.
4. **Output.** `matched_buffer` is a 512-entry FIFO, drained through
   `match_valid/match_ready`. `mb_overflow` flags dropped pairs, and
   `match_done` pulses at the end of every pass.

Frames can therefore arrive back to back, as long as suppression plus
matching of one frame takes less than one frame time. A frame that starts
while its bank still holds a frame waiting for suppression is skipped.
`frame_missed` pulses, and the frame after it is not matched, because its
predecessor is lost. The 1024×1024 bench streams frames back to back, and its
longest pass took 946,217 clocks against a frame time of 1,048,576 clocks.

Matching time depends on the scene.

- **Suppression** costs about `4 + (entries scanned)` clocks per feature,
  which is at most about 45.
- **Correlation** costs 121 read responses per patch and 121 per candidate,
  plus the external store's latency.

## Interfaces

All blocks use one clock (`clk`) and an asynchronous, active-low reset
(`rst_n`).

| group | signals | protocol |
|---|---|---|
| pixel input | `in_data[31:0]`, `in_valid`, `in_ready` | a word moves when both are high |
| store write | `em_wr_valid`, `em_wr_data[31:0]`, `em_wr_frame`, `em_wr_x`, `em_wr_y` | one word per clock, no backpressure: the store must accept every write |
| store read | `mem_req_valid/ready`, `mem_req_frame/x/y`, `mem_rsp_valid`, `mem_rsp_data` | requests move on valid&ready; responses come back in request order, with any latency |
| matches | `match_valid`, `match_ready`, `match_data` (`match_t`: p1, p2, score) | a pair moves when both are high |
| control/status | `cc_thr`, `harris_thr`, `harris_thr_stable`, `fb_overflow`, `mb_overflow`, `frame_missed`, `match_done`, `match_count` | levels and pulses |

The external store is not part of the RTL. It needs two frame slots, selected
by the frame parity bit. `tb/ext_frame_memory.sv` is a behavioural model of
it, with a configurable read latency and random request stalls.

## Choices made where the source description is silent, and departures

The original description gives the block structure, the sizes and the rates.
The following are this design's choices:

- **Bit order on the bus.** Packing is tight and LSB-first.
- **Filter start timing.** The reordering network starts on the seventh row
  as it arrives, using the write bypass, rather than after the row is fully
  stored. This is one row of latency less, and the row-to-bank mapping is
  unchanged.
- **Kernel values.** The binomial approximation described above.
- **Pipelining of the adder tree.** There is a register after every level.
  The output saturates.
- **Harris details.** Gradient operator, summation window, `k = 3/64`, use of
  the integer part only, and an 8-pixel feature border.
- **Threshold rule.** The double/halve rule and its band (256…1024 features,
  start value 2³⁰).
- **Correlation measure.** Sum of absolute differences, where the lowest is
  best. A single subtractor and accumulator, plus the rule "lowest value
  wins", point to a difference-based measure.
- **Features buffer.** It has two banks, where the original describes one
  buffer. The second bank lets a frame be collected while the previous one
  is processed, which is needed to match every consecutive pair when frames
  arrive back to back. Each bank holds 1024 entries; the original gives no
  size.
- **Sequencing and store interface.** How the phases overlap frames (skip and
  report), and the read and write interfaces of the external store.

Not built: the external frame store itself, which is an off-chip memory.

Throughput is one pixel per clock through the filter and the detector. No
clock frequency or technology mapping is claimed. At the default sizes, the
on-chip memories total about 55 KiB:

- rows buffer: 7×1024×10 bits
- Harris line buffers
- features buffer: 2×1024×70 bits
- NMS buffer: 2×1024×20 bits
- matched buffer: 512×72 bits

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv` that compares the
block against an independent model written in the testbench. Each one prints
`TB_RESULT checks=N failures=M` at the end, and each has a cycle watchdog.
Latencies are checked where they are part of the contract:

- one pixel per clock out of the splitter and the filter
- the 7-clock adder tree
- the 9-clock filter
- the Harris output position

Two end-to-end benches share `tb/femip_bench.sv`. The scene is textured
squares that move by (+1,+1) in every frame. The bench checks every filtered
pixel against a direct convolution. It checks that every reported match is
`p2 = p1 + (1,1)` with score 0. The external store model stalls read
requests at random, and the matched pairs are drained with a randomly stalling
`match_ready`. Two assertions check that a stalled read request or matched
pair is held unchanged. The bench also counts each mechanism and fails if any
never happened:

- input backpressure
- threshold changes
- the threshold becoming stable
- suppression
- several candidates
- SAD rejections
- patch reuse
- accepted matches
- a skipped frame
- complete matching passes

| bench | size | frames |
|---|---|---|
| `tb_femip_top` | 64×64 | 9, with a reduced threshold band |
| `tb_femip_full` | 1024×1024, all defaults | 7, back to back; 3 matching passes, no frame skipped (about 10 s in verilator) |

Simulate with plain verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/femip_pkg.sv $(ls rtl/*.sv | grep -v femip_pkg) \
    tb/ext_frame_memory.sv tb/femip_bench.sv \
    tb/tb_femip_full.sv --top-module tb_femip_full -o sim
./obj_dir/sim
```

The package has to come first on the command line. For a block testbench, use
the package, the other RTL files and `tb/tb_<block>.sv`, with
`--top-module tb_<block>`. `tb_correlation_controller` and
`tb_features_matcher` also need `tb/ext_frame_memory.sv`. The benches reset
everything they read, so they also pass with random initial state
(`+verilator+rand+reset+2`).
