# Low-cost spatial-domain image and video watermark embedders

This RTL puts an invisible, robust watermark into grey-scale images and video frames. It is
small enough for a camera node or a low-end FPGA. Each pixel of the cover image `x` gets a
Gaussian watermark `w` added to it. The watermark is weighted by a local *noise-visibility
mask* and scaled by one global strength `alpha`:

```
y(i,j) = x(i,j) + alpha * M_NVF(i,j) * w(i,j)
```

- The mask comes from the mean and variance of each pixel's 3x3 neighbourhood. It is close to 1
  in busy regions, where the watermark hides well, and close to 0 in flat regions.
- `alpha` is chosen so that the watermarked picture has a requested PSNR. The 16 steps run from
  30 to 45 dB.

Three embedders are provided. They share one set of arithmetic blocks:

| variant | module | throughput measured here | arithmetic |
|---|---|---|---|
| still image, parallel | `image_embedder #(.PARALLEL(1))` | 17.2 cycles/pixel at 1280x720 | 9 multipliers share the mean/variance work |
| still image, serial | `image_embedder #(.PARALLEL(0))` | 30.2 cycles/pixel at 1280x720 | 1 multiplier and 1 adder, 9 cycles each |
| video, pipelined | `video_embedder` | 3.007 cycles/pixel at 1280x720, stalls included | 12 multipliers, two SRAMs |

All three embedders share these rules:
- Each has one divider and one square-root unit. Both are pipelined.
- The divider is shared between the mask and `alpha`.
- Everything runs in 20-bit fixed point.

The top module `wm_top` places the three embedders side by side, each with its own memories.

## Arithmetic: why everything fits in 20 bits

All values use the **10.10 signed fixed-point** format: 10 integer bits (sign included) and 10
fraction bits (`wm_pkg::fx_t`).

- **Multiplication:** a multiply keeps bits [29:10] of the 40-bit product, truncated
  (`wm_pkg::fx_mul`).
- **Pixel conversion:** an 8-bit pixel becomes `{2'b00, x, 10'b0}`.

To fit every intermediate into this format, the textbook formulas are rearranged:

- **Local mean** (`mu`). Each neighbour is shifted right by 8 and multiplied by the constant
  256/9 (29127 in 10.10). The nine products are then added. Pre-shifting keeps the adder at 20
  bits and loses less precision than dividing the sum by 9.
- **Local variance**, kept as `sigma^2/256`:
  - Each difference `d = x - mu` is formed with two's-complement addition.
  - The products `(d >>> 5) * (d >>> 6)` are summed. This is 1/256 of the variance, split
    evenly between the two operands.
  - Neighbours outside the image count as zero.
- **Mask**, `M_NVF = 1 - (1/256) / (1/256 + sigma^2/256)`:
  - 1/256 is the 10.10 constant 4.
  - The dividend is padded with ten zero bits, so the divider is 30:20 bits. Its 20 low
    quotient bits are the 10.10 result.
  - `1 - q` is formed as `1024 + ~q + 1`.
- **Masked watermark**: `u = M_NVF * w`.
- **Strength**: `alpha = A*16 / sqrt(256 * ||u||^2)`, where `||u||^2` is the mean of `u^2` over
  the image. Summing `u^2` over a 1280x720 image would overflow the format, so the sum is taken
  in *chunks*:
  - `u^2` values are added to a temporary sum until it reaches 462. Because `|w| < 7`, the sum
    then cannot pass 511, which fits the format.
  - The chunk is divided by `M/16`, then by `N/16`, and added to the `256*||u||^2`
    accumulator.
  - After the last pixel, any remainder is divided the same way.
  - The accumulator goes through the square root. The root is 10 bits in 5.5 format, widened
    to 10.10 as `{5'b0, r, 5'b0}`.
  - `A*16` is divided by the root.

  `A = 255 / sqrt(10^(PSNR/10))` comes from a 16-entry table in `wm_pkg::psnr_amplitude`. Its
  values are that formula in 10.10, truncated. `psnr_sel = PSNR - 30`.
- **Output**: `y = x + alpha*u`. It is kept in 10.10 and not clipped. The watermark is at most
  about `6*alpha`, so `y` stays inside the format.

Divider and square root:
- The divider (`pipe_div`) is a restoring divider. Its 30 quotient bits are spread evenly over
  `STAGES` register stages. Dividing by zero returns all ones.
- The square root (`pipe_sqrt`) is a digit-by-digit integer root, spread the same way.

With 10 integer bits, the two chunk divisions by `M/16` and `N/16` allow images up to
2^13 x 2^13.

## Still-image embedder (`image_embedder`)

Only one computation block is active at any time, so blocks share units:
- The mask and `alpha` share the divider.
- In the serial build, the mean and the variance share one multiplier.
- In the parallel build, the mean and the variance share the nine-multiplier structure
  (`mac9`).

The embedder uses one single-port SRAM with a registered read. Its layout:

| words | contents |
|---|---|
| `0 .. MN-1` | x (8 bits used) |
| `MN .. 2MN-1` | w |
| `2MN .. 3MN-1` | u, later overwritten by y |

A `start` pulse runs two passes.

**Pass 1** visits pixels column by column. This is the order in which the chunks of `u^2` are
defined. For each pixel, the controller:
1. Has the neighbourhood read. At the top of a column all nine pixels are read. Further down
   only the three new ones are read and the other six are shifted.
2. Computes `mu` and `sigma^2/256`, and reads `w` meanwhile.
   - Parallel build: 6 cycles, on `mu_var_par`.
   - Serial build: 19 cycles, on `mu_var_ser`.
3. Issues the mask division in the cycle the variance is ready.
4. Forms `u = M * w` as the mask arrives, and writes `u` back.
5. Passes `u` to the strength block (`alpha_block`). `alpha_block` raises `take` in the same
   cycle when this `u` completes a chunk. Without `take`, the controller moves to the next pixel
   in that cycle. With it, the controller waits while `alpha_block` uses the divider.

Neighbour reads are done by a small read engine, separate from the state machine. The memory is
idle during the mask division, and the neighbourhood registers are free once the variance is
known. So the engine reads the next pixel's three new neighbours while the division runs. In the
middle of a column, no cycle is spent on reading. The parallel build takes about 17.2 cycles
per pixel in all, and the serial build about 30.2.

After the last pixel, `alpha_block` computes `alpha`.

**Pass 2** reads `x` and `u` of every pixel again and writes `y` over `u`. It is pipelined into
three memory cycles per pixel: read `x(p)`, read `u(p)`, write `y(p-1)`.

`done` pulses at the end, and `alpha` stays readable.

## Video embedder (`video_embedder`), the pipelined one

The video version must take a new pixel every few cycles from a camera, in raster order. The
difficult parts are:
- getting neighbourhoods without reading memory,
- sharing one set of multipliers between mean and variance,
- fitting five memory accesses per pixel onto single-port SRAMs,
- handing the divider to `alpha` without losing the mask divisions already in flight.

**Neighbourhoods** come from `window_3x3`:
- Two line buffers of `IMG_N-2` pixels each, circular, plus a 3x3 register window.
- The frame is scanned as `(IMG_M+1) x (IMG_N+1)` positions. Zeros fill the extra row and
  column, so the last row and column still get their lower and right neighbours.
- Window positions outside the frame are forced to zero.

**The three-cycle slot.** Work proceeds in slots of three cycles, with phase counter 0, 1, 2.
Two limits set that length:
- The mean of one pixel and the variance of another use the same `mac9` in different phases.
  That alone allows one pixel every two cycles.
- Each pixel costs five memory accesses: write x, write u, read x, read u, read w. To fit them
  into three cycles, x goes into SRAM1 and w and u go into SRAM2. The accesses are paired:

| phase | SRAM1 (x, 8 bit) | SRAM2 (w at 0, u at MN) | datapath |
|---|---|---|---|
| 0 | write the incoming x | read an old u for the output pass | load differences, load sigma^2/256, window advances |
| 1 | read an old x for the output pass | write the new u | load mean products, issue the mask division, add u^2 |
| 2 | – | read w for the next mask | load mu, load variance products, take a mask result |

The pipeline stage counts are:

| step | stages |
|---|---|
| mean | 2 |
| variance | 3 |
| mask | the divider stages (6 by default) |
| u | 1 |
| alpha without its divisions | 1 |
| output | 2 |

Each stage here is one slot.

**Stalls for alpha, and the capture register.** When a `u^2` chunk is full, `alpha_block`
needs the divider for two divisions. The slot machine then freezes in phase 2, with `stall`
high and `pix_ready` low. Mask divisions already inside the divider keep moving. Their results
are parked in the capture register of `mnvf_block`, which holds `DIV_STAGES-1` results (5 by
default). When the pipeline resumes, the parked results are used first, in order. New divider
results then take their place. Because the register is always drained before the divider
delivers again, nothing has to be recomputed.

**Frame overlap and the output pass.** `y` needs `alpha`, and `alpha` needs the whole frame, so
no pixel can leave before its frame has been fully seen. Each pixel's x and u wait in the SRAMs.
Once `alpha` is known:
1. The output pass walks the frame again, one pixel per slot.
2. It reads x from SRAM1 into a seven-entry buffer inside `y_block`, and u from SRAM2.
3. It multiplies `alpha*u` into the `a_u` register, then adds x.
4. It streams `y` out on `y_valid` / `y_out`, with `y_last` on the last pixel.

Meanwhile the next frame enters and overwrites x and u at the same addresses. A pixel of the
new frame is accepted only when the output pass has already read that address (`evt_wait_out`
counts the waits). The two frames run about one slot apart, and the x buffer absorbs the
offset.

At each frame boundary there is a short gap while the last pixels drain and `alpha` is
computed. The next frame is held back during that gap.

**Handshakes.** `pix_valid` / `pix_ready` carry the input. `pix_ready` is high at most once per
slot, and never during a stall. The output has no back-pressure: `y_valid` marks each result.

## Modules

| file | what it is |
|---|---|
| `wm_pkg.sv` | format, `fx_mul`, constants (256/9, 1/256, threshold 462*1024), PSNR table |
| `wm_top.sv` | the three embedders, their memories and host ports |
| `image_embedder.sv` | still-image controller, serial or parallel |
| `video_embedder.sv` | pipelined video embedder |
| `window_3x3.sv` | line buffers and 3x3 window |
| `mu_var_par.sv` | mean and variance on the shared `mac9`, 5 strobes |
| `mu_var_ser.sv` | mean and variance on one multiplier, 19 cycles |
| `mac9.sv` | 9 multipliers, product registers, 8-adder tree |
| `mnvf_block.sv` | mask around the shared divider, with the capture register |
| `pipe_div.sv` | pipelined 30:20 divider with a tag |
| `pipe_sqrt.sv` | pipelined 20-bit square root |
| `u_block.sv` | `u = M * w` |
| `alpha_block.sv` | `u^2` chunks, accumulator, square root, `alpha` |
| `y_block.sv` | `a_u` register, x buffer, adder |
| `sram.sv` | single-port SRAM, registered read (plain array) |

`wm_top` parameters and structure:
- Parameters are `IMG_M` (rows, default 720) and `IMG_N` (columns, default 1280).
- The serial image embedder uses a 5-stage divider. The parallel one uses 6.
- Both image embedders use a 2-stage square root.
- The video embedder uses a 6-stage divider and a 1-stage square root.

`wm_top` ports:
- `*_host_en/we/addr/wdata/rdata` give the outside world each memory while `*_host_en` is high.
  The embedder must be idle at that time.
- `evt_*` outputs are one-cycle pulses for observation: chunk divisions, parked mask results,
  and frame waits.

The image sensor, a watermark generator and a board interface are outside the design. The pixel
stream and the host ports stand in for them.

## How far it can be trusted

**Testing.** Every module has a self-checking testbench in `tb/`. Each one compares against
`tb/wm_ref_pkg.sv`, an independent model of the same fixed-point arithmetic. The model is
written with plain integer and `real` code, with a bit-serial divider and square root. All
results are bit-exact:
- every `y`,
- every `u`,
- `alpha`,
- the number of `u^2` chunks.

**End-to-end tests:**
- `tb_wm_top` runs the whole top at 32 x 48 pixels. It loads the memories through the host
  ports and runs both image embedders while three video frames stream through. It checks
  everything, and it fails if any of these never happened: chunk divisions, stalls, parked
  mask results, or frame waits.
- `tb_wm_full` does the same at the default 720 x 1280 with two video frames. That is about
  43 million cycles, and about a minute in Verilator. It also checks that the video embedder
  sustains no more than 3.3 cycles per pixel.
- `tb_wm_vga` does the same on a build for 640 x 480 frames.
- `tb_image_fpga` and `tb_video_fpga` repeat the embedder tests with the FPGA pipeline depths.

**Cycle counts measured here versus the reference design's published throughput:**

| variant | here | published |
|---|---|---|
| parallel image embedder | 17.17 cycles/pixel (10.5 images/s at 166.7 MHz) | about 18.1 (10 images/s of 1280x720 at 166.7 MHz) |
| serial image embedder | 30.15 cycles/pixel (6.5 images/s at 181.8 MHz) | about 35 (5.6 images/s at 181.8 MHz) |
| video embedder | 3.007 cycles/pixel over a 1280x720 frame (65.6 frames/s at 181.8 MHz) | about 3.06 (64.4 frames/s at 181.8 MHz) |

At 640x480 the figures are the same per pixel: 17.17 and 30.15 cycles/pixel for the image
embedders, and 3.012 for the video embedder. That is 31.6 and 19.6 images/s, against the
published 30.1 and 16.9. The published still-image controller is not described, so the schedule
here is this design's own. Both builds are somewhat faster than published.

**Other departures from the reference:**
- The video embedder accumulates `u^2` chunks in raster order, the order pixels arrive from a
  camera. The still-image embedder uses column order, as the chunked formula is defined. The
  chunk boundaries, and so the last bits of `alpha`, therefore differ between the two for the
  same picture.
- The FPGA builds use deeper dividers: 11 or 12 stages, and a 4-stage square root for the
  serial FPGA build. The capture register then holds 10 results. Set `DIV_STAGES` /
  `SQRT_STAGES` to build them. `tb_image_fpga` and `tb_video_fpga` run the embedders at these
  depths on small frames, bit-exact. The image embedders take 22.1 (parallel) and 37.1 (serial)
  cycles/pixel there. The published FPGA rates (3.9 and 2.3 images/s of 1280x720 at 79.84 and
  88.69 MHz) need at most 22.2 and 41.8. The video embedder is not timed at full size in this
  configuration.
- No timing or area closure has been done. The SRAMs are plain arrays. A real device would use
  memory macros or external SRAM with the same one-cycle registered interface.

## Simulating

Plain Verilator 5 runs any testbench. Add `-Itb` so the testbench's reference model and the
`tb_` module itself are found. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wm_pkg.sv tb/wm_ref_pkg.sv \
          tb/tb_video_embedder.sv --top-module tb_video_embedder -o sim
./obj_dir/sim
```

Every testbench:
- prints `TB_RESULT checks=<n> failures=<n>`,
- has a cycle-count watchdog,
- generates its own data with `$urandom` (no data files).

Block testbenches use small frames through parameter overrides. Those overrides, including
`tb_wm_top`'s 32 x 48, are the easiest place to change sizes.
