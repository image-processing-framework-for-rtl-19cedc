# A stream-based FPGA vision pipeline: pyramid, stereo and optical flow

This design is a small toolkit of building blocks for real-time image processing in an FPGA. It also contains one complete system built from them.

Every block talks to its neighbours through a **stream**: a data word plus a one-bit valid strobe, one word per clock at most. A stream has no ready signal and no start-of-frame or end-of-line markers. Frames are always exactly `W x H` words in raster order, so a block finds its position in the image by counting words.

Because streams carry so little protocol, a processing block can be written and tested on its own and then placed into a data-flow graph. That is the main idea of the framework. The source blocks at the edges of a graph absorb the untidy parts:

- a camera that delivers short lines;
- two cameras that are not exactly in step;
- a shared RAM bus that stalls.

The system in `ipf_top` is the vision front end of a car with two 768 x 500 cameras. It runs three graphs side by side on one bus to external RAM.

```
 cam0 --LDSO--+--> MDSI(L0)
              +--> SC --> SC --> SC --> SC          Gaussian pyramid
                   |      |      |      |
                 MDSI(L1) MDSI(L2) MDSI(L3) MDSI(L4)

 cam0 --LDSO--> GIT --+
                      +--> SDSO --> SSD 11x11 --> MDSI(disparity)   stereo
 cam1 --LDSO--> GIT --+

 RAM --> MDSO --(I, J)--> Lucas-Kanade --+--> MDSI(flow)           optical flow
                                         +--> MDSI(derivatives)
                                         +--> MDSI(covariance)

 all MDSI and MDSO --> sys_bus (round robin, packet lock) --> RAM controller port
```

A supervisor processor, the RAM controller and the link to a host PC are outside this RTL. In particular:

- The supervisor's configuration and status signals are ports of `ipf_top`.
- The RAM side is a simple bus port (`ram_req` / `ram_rsp`).

## Blocks

| Module | Role |
|---|---|
| `ldso` | Live data source. Turns a camera pixel bus (`fval`, `lval`, pixel enable, data) into a stream of exactly `W x H` words per frame. Short lines and frames are padded; extra pixels are dropped and flagged. |
| `mdso` | Memory data source. Reads `NCH` frames from RAM and emits them as `NCH` word-synchronous streams, all under one valid. Use it in place of `ldso` to feed stored or synthetic images. |
| `sdso` | Synchronising source. Aligns up to three streams that arrive loosely in step. |
| `mdsi` | Memory data sink. Packs a stream into 32-bit bus words and writes them as locked packets into a ring of frame buffers. It pulses `frame_irq` with the buffer index when a frame is complete. |
| `sep_conv` | Separable 2D FIR filter. A vertical K-tap pass runs over K-1 line buffers, then a horizontal K-tap pass. Coefficients are parameters; the default is the 1-4-6-4-1 binomial (Gaussian). |
| `git_remap` | Geometric transformation. Each output pixel is fetched from a displaced source position. The displacement map can be rewritten while frames flow. |
| `lk_flow` | Lucas-Kanade optical flow on two frames I and J. |
| `ssd_matcher` | Stereo block matcher: 11 x 11 SSD with uniqueness check, left-right consistency check and sub-pixel refinement. |
| `sys_bus` | Bus interconnect. Round-robin arbitration over N masters; a master keeps the grant while it holds `lock`; read data is routed back in order. |
| `sfifo`, `box_sum`, `lk_div` | Helpers: FIFO, causal K x K window sum, pipelined signed divider. |
| `ipf_pkg` | Image size, pixel type, marked-pixel type and bus structs. |
| `fdso`, `fdsi` | Simulation only. `fdso` reads a comma-separated file into a stream; `fdsi` writes a stream to a comma-separated file. Together they let a block and a software reference model be compared file to file. |

## Causal windows: where an output pixel really is

This is the point most likely to confuse a user of these blocks.

Every window operation is **causal**: it emits one output word per input word, a fixed few cycles later, with no extra line delay. The word leaving together with input `(x, y)` therefore belongs to the window *centred* on `(x - K/2, y - K/2)`.

| Block | Window size `K` | Output delay |
|---|---|---|
| `sep_conv` | 5 | 2 cycles |
| Lucas-Kanade window sums (`WIN=2`) | 5 | as below |
| `ssd_matcher` | 11 | 4 cycles without the left-right check; with it, DMAX words + 5 cycles (see below) |

Lucas-Kanade also uses 3 x 3 derivatives. Its output streams leave:

- derivatives: 1 cycle after the input word;
- covariance: 3 cycles after;
- flow: 19 cycles after.

Chaining causal blocks adds their offsets. For example, level L4 of the pyramid is shifted by 4 x (2, 2) pixels against L0. Consumers that need centred results must subtract the offset when they read a frame from RAM. The reference models in the testbenches do exactly that.

At the top and left borders, `sep_conv` replicates the edge pixel. `lk_flow` and `ssd_matcher` instead clear an `ok` bit in their output word wherever the window leaves the image.

## Synchronising two cameras (`sdso`)

Each channel has a FIFO of `DEPTH` words.

- **Normal case.** When every FIFO holds a word, one word is popped from each and sent as one output set. Streams with a small, steady offset thus come out pixel-aligned.
- **Forced set.** If one camera runs ahead until its FIFO is full, a set is sent anyway. Every pixel of that set carries the **invalid** mark (`mpix_t.invalid`), and empty channels give 0. The `desync` counter counts such sets.

The stereo matcher treats any window containing a marked pixel as unusable.

## Run-time geometric transformation (`git_remap`)

The transformation is a displacement map. There is one entry per 16 x 16 block, `{dx[7:0], dy[7:0]}` (signed), written through `map_we`/`map_addr`/`map_data`. An all-zero map is the identity.

Output pixel `(x, y)` is source pixel `(x + dx, y + dy)`:

- sampling is nearest-neighbour;
- a source outside the image gives `FILL`.

The block keeps a ring of `2*D` lines. Its output is therefore `D` lines behind its input, and vertical displacements are clamped to `±(D-1)` lines (default `D = 8`). Lens undistortion and rectification of a calibrated stereo rig fit in this range. Arbitrary warps do not.

## Lucas-Kanade (`lk_flow`)

For each pixel the module computes:

- derivatives `Ix = I(x+1,y) - I(x-1,y)` and `Iy` alike. These are carried at twice the usual central difference so they stay integers; the scale cancels in the flow.
- the temporal difference `dI = I - J`;
- over a `(2*WIN+1)^2` window, the sums `Gxx = ΣIx²`, `Gxy = ΣIxIy`, `Gyy = ΣIy²`, `bx = ΣdI·Ix` and `by = ΣdI·Iy`;
- the flow from the closed-form 2 x 2 inverse:

  `u = 2(Gyy·bx − Gxy·by)/det`, `v = 2(Gxx·by − Gxy·bx)/det`, where `det = Gxx·Gyy − Gxy²`.

  Two pipelined restoring dividers produce `u` and `v` as signed 16-bit values with `FRAC = 8` fraction bits, saturated.

Outputs:

- `der_data = {ok, Ix[8:0], Iy[8:0]}`
- `cov_data = {ok, det, Gyy, −Gxy, Gxx}`: the inverse of G as adjugate and determinant, so nothing is lost to rounding.
- `flow_data = {ok, u, v}`

`ok` is low near the border and where `det = 0`.

Sign convention: if J equals I shifted one pixel to the right, then `u = +1.0` (256).

## Stereo matching (`ssd_matcher`)

The cost for every disparity `d = 0..DMAX` is the sum of squared differences between the left 11 x 11 block and the right block shifted `d` pixels left. A right pixel left of column 0 costs 255².

All 64 costs are produced every clock from two incremental sums:

- **Column sums.** A memory of `W` words x 64 lanes holds, per column, the sum over the last 11 rows. Each new pixel adds its row's squared difference and subtracts the one from 11 rows earlier.
- **Line sum.** A running sum along the line adds the new column sum and drops the one 11 columns back.

Decision:

1. Pick the lowest cost (lowest `d` on ties).
2. Find the lowest cost at least two disparities away. Keep the match only if `best·16 ≤ second·(16 − UNIQ)`. This rejects low-texture and repetitive areas.
3. Refine with a parabola through the three costs around the minimum, to 1/16 pixel.
4. Left-right check (`LR = 1`, the default): keep the match only if matching from the right image leads back to the same disparity, within `LR_TOL = 1`. This removes occluded pixels, which have no partner in the other image.

The output is `{ok, disparity}` with 4 fraction bits.

### How the left-right check reuses the cost vector

Searching from the right image needs, for the right block at column `xr`, the costs `C(xr + d, d)` for all `d`. Those are lane `d` of the cost vectors of the next `DMAX` columns, so no second cost computation is needed.

A chain of `DMAX+1` compare stages runs along this diagonal. Stage `k` holds the best (cost, d) found so far for the right block `k` columns back. Each new cost vector:

- offers lane `k` to stage `k`;
- shifts the chain by one;
- completes one right-referenced disparity `D_R`.

Candidates whose right block would wrap into the previous line are masked.

A left result with disparity `D` needs `D_R(x − D)`, which is complete `DMAX − D` columns later. So every left result waits in a `DMAX`-word delay line, while the completed `D_R` values move through a matching shift register, where the check reads them.

The price is a stream delay. The result for an input word leaves 5 cycles after the word `DMAX` positions later. The last `DMAX` results of a frame are therefore pushed out by the first words of the next frame. A memory sink stores them at the start of its next buffer, so in a stored disparity frame, pixel `p` sits at word `p + DMAX`. Set `LR = 0` to get the plain, 4-cycle, frame-aligned output.

## Memory sinks, the source and the bus

`ipf_pkg::bus_req_t` is `{valid, we, lock, addr, wdata}` and `bus_rsp_t` is `{ready, rvalid, rdata}`.

- Addresses count 32-bit words.
- A request is accepted in a cycle where `ready` is high.
- Read data returns in order, any number of cycles later, with `rvalid`.

`mdsi` collects `PKT_G` bus words (8 by default) and sends them with `lock` held, so one packet reaches consecutive addresses without interleaving.

- Frame buffer `b` starts at `cfg_base + b*cfg_stride`, with `NBUF = 2` buffers used in turn.
- Stream words of 8 bits are packed four per bus word. Wider words take one or more beats.
- With no back-pressure on streams, a sink whose FIFO fills drops words and sets the sticky `overflow` flag.

`mdso` issues reads for its channels in turn. It keeps at most `DEPTH` words in flight per channel and emits one set every `1 + cfg_gap` cycles once data is there.

`sys_bus` keeps a queue of which master issued each outstanding read. An assertion checks that no `rvalid` arrives without one.

## Using `ipf_top`

The supervisor must do the following:

1. Program the sinks: `sink_enable`, `sink_base`, `sink_stride`.
   - Sink order: L0..L4 (0..4), disparity (5), flow (6), derivatives (7), covariance (8).
   - 8-bit levels need `W*H/4` words per buffer. The covariance sink needs `4*W*H`.
2. Optionally write the two displacement maps.
3. To compute flow: set `src_base[0]` to the current frame (I) and `src_base[1]` to the previous frame (J), usually two pyramid buffers, then pulse `src_start`.

Status ports:

- sink interrupts and buffer indices;
- overflow flags;
- camera frame-done and format-error pulses;
- the desync count.

The camera buses are treated as synchronous to `clk`.

Defaults: `W=768`, `H=500`, 8-bit pixels, `SC_LEVELS=4`, `SSD_DMAX=63`, `GIT_D=8`, `SDSO_DEPTH=1024`.

Throughput: each stream carries one word per clock at most. 768 x 500 at 30 frames/s is 11.5 Mpixel/s per camera. The shared bus is the limit: all nine sinks plus the source need about 3.5 M bus words per frame. At 30 frames/s that is about 107 M transfers/s, so the bus clock and the RAM must sustain more than that.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. Each has a watchdog. Run them from the repository root, because `fdso` opens `tb/fdso_stimuli.dat` by that relative path. For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_ipf_top_full \
    rtl/ipf_pkg.sv $(ls rtl/*.sv | grep -v ipf_pkg) tb/ram_model.sv tb/tb_ipf_top_full.sv
./obj_dir/Vtb_ipf_top_full +verilator+rand+reset+2
```

The package must come first. `+verilator+rand+reset+2` starts every unreset register at a random value, which is how the tests are meant to run. A unit test needs only the package, the module under test, its helpers (`sfifo` for `sdso`, `mdsi` and `mdso`; `box_sum` for `lk_flow` and `ssd_matcher`; `lk_div` for `lk_flow`) and `tb/ram_model.sv` where a bus is involved. Listing every file in `rtl/` also works.

| Testbench | What it checks |
|---|---|
| `tb_ldso`, `tb_sdso`, `tb_mdsi`, `tb_mdso`, `tb_sys_bus` | Formatting, padding, alignment and invalid marking, packing, addressing, buffer rotation, overflow, arbitration, locking, read routing. All against queues of expected words. |
| `tb_sep_conv`, `tb_git_remap`, `tb_lk_flow`, `tb_ssd_matcher` | Every output word against a behavioural reference computed in the testbench. Includes synthetic shifts with a known flow and disparity. |
| `tb_file_verification` | Drives `sep_conv` from a comma-separated file via `fdso`. Writes the hardware and reference results through two `fdsi` instances, then compares the two files. |
| `tb_ipf_top` | Whole system at 32 x 24 with `DMAX=15`. Counts each mechanism and fails if one never happened: padding, desync, accepted and rejected disparities, valid flow, bus contention, locked beats, source completion, map writes. |
| `tb_ipf_top_full` | The same test with every parameter of `ipf_top` at its default, for three 768 x 500 frames. It runs in under a minute with verilator. |

In both system tests, camera 1 sees camera 0's scene shifted by a known disparity, with a lag of a few pixels. The tests check:

- all five pyramid levels;
- that the disparity is correct wherever a true match exists;
- the mean flow between two shifted frames.

## Choices made in this design

The overall structure is the framework's: block roles, streams, sinks and sources on a shared bus, the three graphs, 768 x 500 images, the 11 x 11 SSD block, four Gaussian levels, and the Lucas-Kanade and SSD formulas. Everything below was chosen here.

- **Stream and bus protocols.** Valid-only streams; the bus structs above; `lock` for packets; two frame buffers per sink.
- **Camera pixel bus and frame repair** in `ldso`.
- **Gaussian kernel.** 5-tap binomial, edge replication, rounding after each pass. Pyramid levels are not decimated; each level is full size.
- **Transformation format.** Block-wise displacement map, nearest-neighbour sampling, ±(D−1) line reach.
- **Lucas-Kanade.** Window 5 x 5; 8 fraction bits; covariance as adjugate plus determinant. Single-level estimation, with no coarse-to-fine iteration over the pyramid.
- **SSD.** `DMAX = 63`; the uniqueness rule; parabolic refinement; the diagonal left-right search and its tolerance; rejection of invalid-marked pixels.
- **Sizes.** `sdso` FIFO depth 1024; `git_remap` delay of 8 lines.
- **`fdso`** reads only comma-separated decimal text, not image files.
