# Hierarchical Horn–Schunck optical flow engine

This RTL computes dense optical flow: for every pixel of an image I1, the motion
vector (u, v) that carries it to the next image I2. It uses the Horn–Schunck
method. On its own, that method only sees motion below about one pixel per
frame, because its derivatives span just 2×2×2 pixels. The engine therefore runs
it on an image pyramid:

1. It halves both images repeatedly.
2. It estimates the flow at the coarsest level.
3. At each finer level, it up-scales the coarser flow and uses it to warp I2
   towards I1. Horn–Schunck then only has to find the small remaining
   correction.

With the default three levels, displacements of up to about 7 pixels at full
resolution can be followed.

The architecture follows a published HLS (high-level synthesis) design for
Arria 10 FPGAs. The RTL is not by its authors. The architecture rests on two
ideas:

* **One set of hardware for all levels.** Each core has delay lines (the row
  buffers that hold image neighbourhoods) sized once for the largest level. At
  a smaller level the same buffers are used with a shorter row length.
* **One pixel stream per level.** Up-scaling, warping, the Horn–Schunck
  iterations and the final sum are chained. Pixels flow through them at PAR
  pixels per clock, and no intermediate image goes back to memory.

Several chained Horn–Schunck cores, one iteration each, form the iteration
engine. A level that needs more iterations than there are cores runs several
passes through the chain.

## The computation at one level

For level λ, with `(u,v)_final` of level λ+1 already known:

```
(u0, v0)   = 2 * Upscale((u,v)_final of level λ+1)     (zero at the coarsest level)
I2rec(x,y) = I2(x + u0, y + v0)                        (bilinear or bicubic)
(du, dv)   = 0, then repeated it_λ times:
    Ix, Iy, It = derivatives of I1 and I2rec over the 2x2x2 cube at (x,y)
    ū, v̄       = weighted 3x3 mean of du, dv (1/6 edge, 1/12 corner neighbours)
    r          = (Ix ū + Iy v̄ + It) / (α² + Ix² + Iy²)
    du = ū − Ix r,   dv = v̄ − Iy r
(u,v)_final = (u0, v0) + (du, dv)
```

Level λ needs it_λ = IT0 · ITF^λ iterations, so coarse levels, which are
cheap, iterate more. The default is 5, 10 and 20 iterations for levels 0, 1
and 2.

Before the levels are processed, the pyramid is built. Each level of both
images is the previous one filtered with a 5×5 Gaussian
(`[1 4 6 4 1]ᵀ[1 4 6 4 1]/256`) and decimated by 2.

## Jobs, passes and the two pipeline modes

`of_ctrl` runs a start request as a list of *jobs*. Each job streams one frame
through the datapath. With the defaults (3 levels, 5 cores):

| job | level | frame | what runs | passes (mode) |
|---|---|---|---|---|
| DOWN | 0 → 1 | 2048×2048 in | downsample_core | – |
| DOWN | 1 → 2 | 1024×1024 in | downsample_core | – |
| FLOW | 2 | 512×512 | warp + 5 cores | 4 passes of 5 iterations (P⁴) |
| FLOW | 1 | 1024×1024 | up + warp + 5 cores | 2 passes (P²) |
| FLOW | 0 | 2048×2048 | up + warp + 5 cores + sum | 1 pass (F) |

* **Fully pipelined (F).** One pass runs all iterations. The last core feeds
  `sum_core`, and the final flow leaves on `flow_out`.
* **Partial (Pᵏ).** k = ceil(it/NCORES) passes. Every pass re-reads the
  images and re-warps them. It starts the chain from the residual (du, dv) of
  the previous pass, read on `delta_in`. All passes except the last write the
  residual back on `delta_out`.
* **Bypass.** If the iteration count is not a multiple of NCORES, the last
  pass bypasses the surplus cores. They keep their latency but pass the
  residual unchanged (`job.ncores`).

A pass ends when the last beat of its frame has left the chain. One idle cycle
separates jobs.

## Delay lines and windows (win_gen)

`hs_core` and `downsample_core` both get their neighbourhoods from `win_gen`.
Its timing sets the latency of the whole datapath.

* A frame enters in raster order, one *group* of PAR adjacent pixels per
  accepted beat.
* Storage:
  * 2R row buffers, each WMAX/PAR groups deep, addressed by group column;
  * a register window NG = 2·ceil(R/PAR)+1 groups wide and 2R+1 rows high.
* For each input group the window shifts by one group. The buffers hand their
  entry at that column one row down.
* The output is the neighbourhood of the group R rows and ceil(R/PAR) groups
  back. It is (2R+1) × (PAR+2R) pixels. Latency: `R·width/PAR + ceil(R/PAR)`
  groups.
* Window positions outside the frame read the nearest frame pixel (border
  replication). This also removes stale pixels of the previous frame or of the
  next row.
* After the last input group, the block runs the remaining latency steps by
  itself to emit the last windows. During this flush, `in_ready` is low.
* Only the row length `width` changes between levels. The same buffers serve
  every level.

`hs_core` uses R = 1: a 3×3 window of a 192-bit pixel record. The record holds
u0, v0, I1, I2rec, du and dv, so the final sum needs no extra memory read.
`downsample_core` uses R = 2 over (I1, I2) pairs. It keeps the even rows and
columns and packs them into output groups of PAR pixels.

## The warp window (warp_core)

Warping reads I2 at a displaced position. The data for that read must already
be on chip, or the stream stalls.

* At level λ, the displacement is limited to D = 2^(LVL−λ) pixels.
* The core keeps the last 2D+2 rows of the frame. The memory has 2·2^LVL + 2
  rows of WMAX pixels, sized for level 0. Coarser levels use fewer of its rows.
* Output group g is computed when input group `g + D·width/PAR + ceil(D/PAR) + 1`
  arrives. At that point every pixel within ±D rows and columns of it has been
  stored.
* Velocities are clamped to the window:
  * bilinear: |u|, |v| < D;
  * bicubic: the 4×4 neighbourhood must also fit, so the limit is D−1.
* The velocity is split by floor into an integer part, which selects the
  neighbourhood, and a fraction in [0, 1), which weights it.
* Sample positions outside the frame use the nearest frame pixel.
* Bicubic uses the Catmull–Rom kernel (a = −0.5), applied separably.

Like win_gen, the warp core flushes after each frame.

## Number format

All words are 32-bit two's complement Q16.16 (`of_pkg::fx_t`):

* Intensities are expected in [0, 1), for example an 8-bit pixel value p
  shifted left by 8.
* Velocities are in pixels of their level.
* `α²` is a run-time input (`alpha2`). The benches use 0.1.
* Products truncate towards −∞. The division in the update truncates towards
  zero and gives 0 when its denominator is not positive.
* The 1/12 averaging weight is 5461/65536.

The original design computes in IEEE single precision. The 32-bit word length
is kept, but results are not bit-compatible with floating point.

## Top-level interface (of_top)

External memory is not part of the RTL. `of_top` announces each job on `job`
(kind, level, pass, npasses, ncores, first, last, coarse), with a pulse on
`job_start`. Memory must then serve that job's streams:

| stream | dir | used when | contents (raster order, PAR per beat) |
|---|---|---|---|
| `img_in` | in | DOWN, every FLOW pass | I1, I2 of `job.level` |
| `pyr_out` | out | DOWN | I1, I2 of level `job.level+1` |
| `coarse_in` | in | FLOW, `job.coarse` | final (u,v) of level `job.level+1` (half size) |
| `delta_in` | in | FLOW, `!job.first` | residual written by the previous pass |
| `delta_out` | out | FLOW, `!job.last` | residual after this pass |
| `flow_out` | out | FLOW, `job.last` | final (u,v) of `job.level` |

* All streams are valid/ready. Every input may pause, and every output may be
  back-pressured.
* A level's frame is (WIDTH >> level) × (HEIGHT >> level).
* Drive `start` for one cycle. `busy` stays high until `done` pulses after
  level 0.
* The final result is the level-0 `flow_out` frame. The coarser levels'
  `flow_out` frames are stored by memory and read back on `coarse_in`.
* Reads and writes of the residual within one pass never touch the same pixel
  out of order. The read always leads, so one buffer per level is enough.

Parameters, with defaults in brackets:

* `WIDTH`, `HEIGHT` [2048]
* `LVL` [3]
* `PAR` pixels per clock [4]
* `NCORES` [5]
* `IT0` iterations at level 0 [5]
* `ITF` iteration factor per level [2]
* `INTERP` [0: bilinear, 1: bicubic]

The defaults are the original design's fastest configuration: 3 levels,
20/10/5 iterations, 20 core lanes (5 cores × 4 pixels), bilinear, 2048×2048.
Constraints:

* `WIDTH >> (LVL-1)` must be an even multiple of `PAR`.
* Heights must stay even at every level.
* For the 4-level configurations of the original design, set `LVL=4` (and
  `INTERP=1` for the bicubic one). The schedule then becomes P⁸, P⁴, P², F.

## Files

| file | block |
|---|---|
| `rtl/of_pkg.sv` | types (`fx_t`, `img_t`, `vel_t`, `warp_in_t`, `hs_pix_t`, `job_t`), `fx_mul`, `fx_div` |
| `rtl/win_gen.sv` | reusable line-buffer window generator |
| `rtl/hs_calc.sv` | one Horn–Schunck pixel update (combinational) |
| `rtl/hs_core.sv` | streaming iteration core: win_gen plus PAR hs_calc lanes |
| `rtl/warp_core.sv` | bilinear/bicubic motion compensation |
| `rtl/upscale_core.sv` | 2× up-scaling and doubling of the coarse flow |
| `rtl/downsample_core.sv` | Gaussian 5×5 reduction of both images |
| `rtl/sum_core.sv` | final = initial + residual |
| `rtl/of_ctrl.sv` | job sequencer (pyramid, levels, passes, bypass) |
| `rtl/of_top.sv` | top level |
| `tb/of_ref_pkg.sv` | behavioural reference of every step, on whole frames |
| `tb/of_bench.sv` | external-memory model and end-to-end checker |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_top` (reduced size, with stalls) and `tb_top_full` (defaults) |

## Simulating

Verilator 5 with `--timing`, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/of_pkg.sv tb/of_ref_pkg.sv tb/tb_top.sv --top-module tb_top
./obj_dir/Vtb_top
```

Substitute any `tb_<block>` for `tb_top`.

* Every bench prints `TB_RESULT checks=N failures=M`.
* The end-to-end benches compare every pyramid level and every level's final
  flow bit-exactly with `of_ref_pkg`.
* `tb_top` runs a 32×16, 3-level, PAR = 2, 3-core configuration with random
  stalls. It counts the jobs, the F and P passes, bypassed cores, up-scaling,
  input stalls and output back-pressure, and fails if any of them never
  occurred.
* `tb_top_full` runs the default configuration on a 2048×2048 pair, without
  stalls. It takes about 30 s and 400 MB. It checks the cycle count against
  one group per clock plus each stage's fill latency.

`tb_wl_4lvl_bicubic` and `tb_wl_4lvl_bilinear` run the original design's 4-level
configurations at full 2048×2048 size, with 40/20/10/5 iterations (P⁸, P⁴, P², F):

* bicubic at 1 pixel per clock: 13.48 M cycles;
* bilinear at 4 pixels per clock: 3.37 M cycles.

Each takes about 30 s.

To try another configuration, instantiate `of_bench` with other parameters.

Measured at the defaults: 3,162,240 cycles for one image pair. Of these,
about 1.31 M go to the pyramid and about 1.85 M to the 7 flow passes. Throughput is
one group per clock in every stage, plus the per-frame fill and flush. The
pyramid jobs read the full level at PAR pixels per clock and take about 40 %
of the total.

The test pattern moves by (2.5, −1.5) pixels. The mean flow measured at
level 0 is (1.56, −0.85) with these few iterations and the small α. This is a
plausibility check only; flow accuracy is not verified.

## Where this RTL departs from the original design

* **Arithmetic:** Q16.16 fixed point instead of single-precision floating
  point.
* **Delay lines:** addressed row memories plus a small register window,
  instead of shift registers. The sequence of windows is the same.
* **Details the original design leaves open, chosen here:**
  * the derivative stencil and the averaging weights (classic Horn–Schunck);
  * the Gaussian coefficients;
  * nearest-neighbour up-scaling;
  * floor rounding of the velocity;
  * the Catmull–Rom cubic kernel;
  * border replication;
  * clamping of displacements beyond the warp window;
  * the valid/ready handshake with self-flushing stages;
  * the job protocol;
  * the bypass of surplus cores.
* **Not included:**
  * external memory and its controller (the streams are ports);
  * the design-space prediction model, which is a planning spreadsheet and
    not hardware.
* **Not established:**
  * The 250 MHz clock rate of the original design. The warp and Horn–Schunck
    datapaths are single-cycle combinational: each includes a 64-bit divider
    or up to 16 interpolation multiplies. They would need pipelining to reach
    a high clock rate.
  * Resource use. The large modules (warp core, delay lines with 2048-pixel
    rows) were not synthesised to a size.
