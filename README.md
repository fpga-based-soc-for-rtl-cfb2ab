# Local-histogram video shot detector and summarization engine

This RTL detects *cuts*: the abrupt transitions between two shots of a video.
It also keeps a key frame for each shot. Every frame is reduced to sixteen
small gray-level histograms, one per region of a 4 x 4 grid over the image.
When the total L1 distance between a frame's histograms and the previous
frame's exceeds a threshold, a cut is reported. The first frame after the cut
is then copied into a key-frame buffer, and every output frame shows the
current image with the key frame of its shot as a small inset.

The design is written for an FPGA system-on-chip. There, a soft processor, a
multiport DDR controller, a video input and a TFT display controller surround
these blocks. Those parts are standard vendor IP and are not part of this RTL.
The top module brings their signals out as ports.

## The detection algorithm

For frame *i*, pixel by pixel:

1. **Gray conversion.** `Y = 0.257 R + 0.504 G + 0.098 B + 16`. It is computed
   as `((66 R + 129 G + 25 B + 128) >> 8) + 16`, so Y lies in 16..235.
2. **Quantization** to C levels (C = 4, 8 or 256). The level is simply the
   log2(C) most significant bits of Y, so level k covers Y in
   [k*256/C, (k+1)*256/C).
3. **Region.** The pixel's column i and line j select one of 16 regions. The
   regions are numbered row-major: region = 4 * (j / (H/4)) + i / (W/4).
   Region 0 is top left and region 9 is the second column of the third row.
4. **Histogram.** Bin `region * C + level` is incremented. The C x 16 bins
   together are the frame's *local histogram* (LH).

At the end of the frame:

5. **Distance.** `FDM = sum over all bins |h_i(k) - h_{i-1}(k)|`.
6. **Decision.** A cut is reported when `FDM > alpha`. The threshold alpha is
   a run-time input.

The register that holds the previous histogram starts at zero. The first frame
after reset is therefore measured against an empty histogram, gets the
largest possible distance, and counts as a cut. As a result, the first shot
also gets a key frame.

## The LH module (`lh_core`)

```
pixel ─► rgb2gray ──────────┐ (q)
     └─► region_detect ─────┤ (region one-hot / number)
                            ├─► ARCH=LH_REG: hist_counters ───────────┐ (all bins in parallel)
                            └─► ARCH=LH_MEM: addr_calc ─► hist_memory ┤ (one bin per cycle)
                                                                      ▼
                          lh_ctrl (WE/EN, Sel, Reset)           lh_distance ─► distance, cut
```

`rgb2gray` and `region_detect` work in parallel, each with one register
stage.

`region_detect` has a column counter and a line counter. The column counter
advances on every valid pixel and wraps at W-1. The line counter advances when
the column counter wraps. Sixteen comparators test the counters against the
region limits x0..x3 = W/4, W/2, 3W/4, W (and likewise y0..y3). A 16-to-4
encoder turns the one-hot comparator vector into a region number.

The module takes one pixel per clock. Pixels may have gaps, marked by
`pix_valid`. Without gaps, a frame of W x H pixels takes this many cycles from
`frame_start` to `done`:

| version | cycles per frame |
|---|---|
| `LH_REG` | W*H + 3 + 16C |
| `LH_MEM` | W*H + 4 + 16C |

For 640 x 480 at C = 4 that is 307 267 cycles. This is the throughput that
the HD-rate claims depend on: 1080p60 needs 148.5 Mpixel/s, so this module
needs a clock of at least 148.5 MHz.

### Two ways to hold the histogram

This is the central design choice. The `ARCH` parameter selects one of two
versions. In an FPGA flow with partial reconfiguration, each version would be
a separate bitstream for the same region.

**Register version (`LH_REG`, `hist_counters`).** There are C x 16 separate
counters. Counter `r*C + l` increments when EN is high, comparator bit r is
set, and the decoded level is l. The 16-to-4 encoder is not needed. The
counters are plain registers, so at the end of a frame the whole vector is
copied into *register set 1* of the distance block in a single cycle. In that
same cycle the one-cycle `Reset` clears the counters for the next frame. This
version uses no block memory, but its flip-flop count grows with C: 960 bits
for C = 4 at 640 x 480.

**Memory version (`LH_MEM`, `addr_calc` + `hist_memory`).** The bins live in a
C*16-word memory at address `Rn * C + cq`. The bin address width is 6, 7 and
12 bits for C = 4, 8 and 256. `addr_calc` adds a register stage. The hard part
is that consecutive pixels often hit the same bin. Each update must therefore
read, increment and write the bin within one cycle. `hist_memory` does this
with an asynchronous read port and a synchronous write port. Two multiplexers
switch its mode:

| Sel | MUX-2 (address) | MUX-1 (write data) | write enable |
|---|---|---|---|
| 0 accumulate | bin address from `addr_calc` | read value + 1 | WE |
| 1 distance | `addr_in` from the distance block | 0 | `clr_we` |

In distance mode, each bin is read out once and zero is written in its place.
Reading the histogram therefore also clears it for the next frame. The memory
starts all zero from its initial contents. It has no reset, so a reset in the
middle of a frame leaves partial counts for that frame.

### Distance schedule (`lh_distance`)

The distance block has one subtractor for the absolute difference, one adder
and one accumulator, and handles one bin per cycle.

- **`PARALLEL = 1`** (register version):

  | cycle | action |
  |---|---|
  | 0 | copy the counter vector into set 1 |
  | 1 .. 16C | accumulate \|set1[k] - set2[k]\| |
  | at the last edge | copy set 1 into set 2 for the next frame |
  | 16C + 1 | `done`, with `distance` and `cut` |

  For C = 4 that is 65 cycles: one for the transfer and 64 for the bins.
- **`PARALLEL = 0`** (memory version): the block drives `addr_in` = 0 .. 16C-1
  with `clr_we`. It takes each bin straight from the histogram memory and
  writes it into set 2 as it goes, so set 1 is not needed. Here set 2 is a
  memory of 16C words.

The distance is `ceil(log2(2WH+1))` bits wide (20 bits at 640 x 480), because
two histograms of W x H pixels differ by at most 2WH.

### Control (`lh_ctrl`)

The controller has four states:

| state | what happens |
|---|---|
| IDLE | wait for `frame_start` |
| ACCUM | EN/WE follow the pipeline's valid bit at the histogram stage, which covers the conversion and region-detection latency |
| XFER | one cycle: Sel = 1, Reset, and the distance start |
| DIST | Sel stays 1 until the distance is done |

## The summarization engine (`lh_soc_top`)

The frame memory outside the top holds four areas of W*H words, one 24-bit
RGB pixel per word:

| area | words | use |
|---|---|---|
| 0, 1 | 0 .. 2WH-1 | acquisition ping-pong: the video input fills one while the other is analysed |
| 2 | 2WH .. 3WH-1 | key frame of the current shot |
| 3 | 3WH .. 4WH-1 | output frame for the display controller (`disp_base`) |

When the video input has stored a frame in area `acq_area`, it pulses
`frame_ready`. The top then does four things:

1. It points `acq_area` at the other area.
2. It streams the stored frame through `lh_pixel_reader` (an address counter
   that issues pipelined reads) into `lh_core`. At the end it pulses
   `dist_valid` with `distance` and `cut`.
3. In parallel, if the *previous* frame ended with a cut, `key_frame_updater`
   copies this frame into area 2 and raises `key_valid`. A cut between frames
   i-1 and i therefore makes frame i+1 the key frame.
4. When the key-frame copy has finished, or right away if there is none,
   `multidisplay_manager` writes area 3. The output is the current frame, with
   the key frame decimated by 4 in both directions as a W/4 x H/4 inset in the
   top-right corner. Without a key frame, the output is the current frame.

`busy` stays high until all of this is done. If a `frame_ready` arrives while
`busy` is high, it is dropped: `frame_dropped` pulses and `acq_area` does not
change.

The three engines share one memory port through `mem_access_ctrl`. This is a
round-robin arbiter. It remembers, in a FIFO of 8 entries, which master issued
each outstanding read, and routes read data back to that master. A master
that is not granted keeps its request, so it stalls.

### Memory port protocol

- A request (`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) is taken in any
  cycle where `mem_ready` is high.
- Read data comes back on `mem_rvalid`/`mem_rdata`, in request order, any
  number of cycles later.
- Writes need no response.
- Internally each master uses the `mem_req_t`/`mem_rsp_t` structs from
  `lh_pkg`.

### Throughput at the default size

Per frame, the port carries:

| traffic | accesses |
|---|---|
| LH reads | W*H |
| display frame | 2*W*H |
| key-frame copy (after a cut only) | 2*W*H |

The display and key-frame engines keep one pixel in flight, at about 3 cycles
per pixel. The full-size test measures about 1.3 million cycles per 640 x 480
frame with a memory that is ready 90% of the time. At a 100 MHz system clock
that is about 13 ms, or 75 frames/s.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 640, 480 | frame size; both must be multiples of 4 |
| `C` | 4 | quantization levels (power of two, up to 256) |
| `ARCH` | `LH_REG` | `LH_REG` counters or `LH_MEM` memory |
| `BW` (derived) | 15 | bin width `ceil(log2((W/4)(H/4)+1))` |
| `DW` (derived) | 20 | distance width `ceil(log2(2WH+1))` |

Bin widths for the usual frame sizes:

| frame size | bin width |
|---|---|
| 320x240 | 13 bits |
| 512x512 | 15 bits |
| 640x480 | 15 bits |
| 1280x1024 | 17 bits |
| 1920x1080 | 17 bits |

For 512 x 512, the rule `2^n >= (W/4)(H/4)` would give 14 bits. That is one
bit short when every pixel of a region falls into the same bin, so the `+1`
is used here.

The reconfigurable versions map onto the parameters as follows:

| version | ARCH | C |
|---|---|---|
| "LH-Reg4" | `LH_REG` | 4 |
| "LH-Reg8" | `LH_REG` | 8 |
| "LH-BRAM8" | `LH_MEM` | 8 |

## Choices made here, and limits

These points go beyond the published description of the detector, or differ
from it:

- **Fixed-point gray conversion** with 8-bit coefficients.
- **Region limits.** Intervals are half-open, so every region is exactly
  W/4 x H/4. The limits are parameters, not run-time inputs.
- **Register stages.** There is one stage after conversion and region
  detection, and one after the address calculation.
- **Histogram memory read port.** It is asynchronous, like distributed RAM, so
  that read, increment and write fit in one cycle. A synchronous block RAM
  would need an added forwarding path for back-to-back hits on one bin.
- **Previous histogram in the memory version.** It is kept in a second memory
  (set 2), which is filled as the bins stream out.
- **Frame sequencing.** The area layout, the dropping of `frame_ready` while
  busy, and the rule that the display is composed after the key-frame copy
  are this design's own.
- **Display layout.** The inset layout of the multidisplay frame is this
  design's own. The source only calls for "current frame + key frame".
- **One shared memory port.** Instead of one controller port per engine,
  there is one shared port with a round-robin arbiter. Giving each engine its
  own port would remove the arbitration stalls.
- **Engines with one access in flight.** The key-frame copy and the display
  composition keep a single access in flight. That is simple, but it is the
  throughput bottleneck of the engine.
- **Not included.** The processor, the DDR controller, the display and video
  IP, and partial reconfiguration (loading the versions through the
  configuration port) are not part of this RTL.
- **Gray level only.** The histograms use the gray level. Colour histograms
  would need one histogram memory per component, working in parallel, at the
  same pixel rate. That variant is not built.

## Files

| file | contents |
|---|---|
| `rtl/lh_pkg.sv` | shared types (`lh_arch_e`, `mem_req_t`, `mem_rsp_t`), sizing functions |
| `rtl/rgb2gray.sv` | gray conversion and quantization |
| `rtl/region_detect.sv` | pixel counters, region comparators, 16-to-4 encoder |
| `rtl/addr_calc.sv` | bin address `Rn*C + cq` |
| `rtl/hist_counters.sv` | register-based histogram |
| `rtl/hist_memory.sv` | memory-based histogram with accumulate/read-clear modes |
| `rtl/lh_distance.sv` | register sets, L1 distance, threshold |
| `rtl/lh_ctrl.sv` | WE/EN, Sel, Reset state machine |
| `rtl/lh_core.sv` | the LH module |
| `rtl/lh_pixel_reader.sv` | frame reader (address counter) |
| `rtl/key_frame_updater.sv` | key frame copy |
| `rtl/multidisplay_manager.sv` | display frame composition |
| `rtl/mem_access_ctrl.sv` | memory port arbiter |
| `rtl/lh_soc_top.sv` | top |

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each compares
the block against values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

`tb/frame_mem_model.sv` is a behavioural frame memory. Its readiness is
random and its read latency is random but in order.

The whole-engine tests share `tb/soc_test_body.svh`:

| testbench | configuration |
|---|---|
| `tb_lh_soc_top` | register version, 32 x 16 frames, 7 frames |
| `tb_lh_soc_top_mem` | memory version with C = 8, 32 x 16 frames, 7 frames |
| `tb_lh_soc_top_full` | the top at its defaults, five 640 x 480 frames |

For every frame these tests check the distance and the cut against a
reference histogram computed in the testbench. They also check the key-frame
area, the display area word by word, and the ping-pong area. Each mechanism
must occur at least once: cut, no cut, key-frame update, inset, dropped
frame, memory stall and arbitration stall.

`tb_lh_core` runs C = 4 (register), C = 8 and C = 256 (memory) on small
frames, and the default configuration on four full 640 x 480 frames. It also
checks the exact cycle count per frame.

`tb_lh_workloads` runs the LH module at every frame size for which its cost
and speed are usually quoted: 320 x 240, 512 x 512, 640 x 480, 1280 x 1024
and 1920 x 1080. At each size it runs counters with C = 4 and 8, and memory
with C = 4, 8 and 256. That makes 25 configurations with two frames each. The
first frame of each pair is fed without gaps, and its cycle count must be
exactly W*H + 3 + 16C (counters) or W*H + 4 + 16C (memory). It takes about
half a minute.

Testbenches drive `rst_n` from 1 to 0 right after time zero. The memory
histogram has no reset, so a reset that is only ever low would leave the
control registers at their power-up values until the first clock edge. Do
the same in any new testbench.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lh_soc_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/lh_pkg.sv tb/tb_lh_soc_top.sv
./obj_dir/Vtb_lh_soc_top
```

Replace the module name to run another testbench. The full-size test takes
about 10 seconds.

Lint a module with:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/lh_pkg.sv rtl/lh_soc_top.sv
```

The remaining lint warnings are intentional:

- unused outputs left open (`busy`, `done` of sub-blocks);
- signals that only one `ARCH` uses;
- the reset used both in flops and in assertion `disable iff` clauses.
