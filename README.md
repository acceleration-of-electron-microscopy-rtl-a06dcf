# Streaming rotation and translation of electron-microscopy images

Single-particle analysis and electron tomography spend a large part of their
run time on one operation: rotating and shifting thousands of 2-D projection
images so that they line up. This RTL is a streaming FPGA engine for that
affine transformation, following the FPGA accelerator proposed in
*Acceleration of Electron Microscopy Applications with GPGPUs and FPGAs*.
Images come in from one board memory (DRAM1), are transformed in single
precision floating point, and go out to a second board memory (DRAM2). After
a short start-up it consumes one pixel and produces one pixel per clock
cycle, for any rotation angle and shift.

The main idea is a ping-pong pair of lanes. Each lane has a local image memory
that can hand out the four pixels surrounding any point in a single cycle,
and a deep floating-point pipeline that turns those four pixels into one output
pixel per cycle. While one lane works through image *k*, the other lane loads
image *k+1*, so neither DRAM stream has to wait for the other.

```
                 DRAM1 pixel stream (+ per-image descriptor)
                               |
                        +-------------+
                        | input_demux |  odd images -> lane 0, even -> lane 1
                        +-------------+
                     wr |             | wr
              +--------------+   +--------------+
              | neighbor_ram |   | neighbor_ram |   RAM1 / RAM2
              +--------------+   +--------------+
         p00 p10 p01 p11 |             | p00 p10 p01 p11
            +-----------------+   +-----------------+
            | affine_pipeline |   | affine_pipeline |   PIPELINE1 / PIPELINE2
            |  (CORDIC setup, |   |                 |
            |   12 FP stages) |   |                 |
            +-----------------+   +-----------------+
                         |             |
                        +---------------+
                        |  output_mux   |  round-robin merge
                        +---------------+
                               |
                DRAM2 result stream (image number, x, y, value)
```

## The transformation

Every output pixel is computed by *inverse mapping*: instead of pushing
original pixels to new places, the engine asks, for each pixel (x, y) of the
result, where it came from in the original image. With the image side N,
centre c = (N-1)/2, rotation angle alpha and shift (s_x, s_y), and
b = -alpha:

```
xs = (x - c) cos b + (y - c) sin b + c - s_x
ys = (y - c) cos b - (x - c) sin b + c - s_y
```

If (xs, ys) lies inside [0, N-1] x [0, N-1], the result is the bilinear
interpolation of the four original pixels around it. With
x0 = floor(xs), y0 = floor(ys), fx = xs - x0 and fy = ys - y0:

```
r = (1-fx)(1-fy) p(x0,y0) + fx(1-fy) p(x0+1,y0) + (1-fx) fy p(x0,y0+1) + fx fy p(x0+1,y0+1)
```

Outside the original image the result is 0. A point exactly on the last row
or column (xs = N-1) is handled by using x0 = N-2 with fx = 1, so the identity
transform reproduces the image including its border, and the memory is never
asked for a pixel outside the image.

## The pipeline (`affine_pipeline`)

This is the densest part of the design. All arithmetic is IEEE-754 single
precision, using the combinational units `fp_add`, `fp_mul`, `fp_floor` and
`fp_from_fixed`, each followed by a pipeline register.

**Per-image setup.** When its memory reports a complete image (`buf_full`),
the pipeline negates the angle, scales it by 2^29 by adding 29 to the
exponent, and floors it into the CORDIC's fixed-point format (radians, 29
fraction bits). `cordic_sincos` then runs 28 shift-and-add iterations, one
per cycle. Angles beyond +-pi/2 are first moved by pi and the results negated,
because CORDIC only converges within about +-99.7 degrees. cos and sin are
converted back to single precision. The constants c and c - s are formed in
the same step. The setup takes about 30 cycles per image.

**Per-pixel stages** (one position enters per cycle, in raster order):

| stage | work |
|---|---|
| S0 | output column and row to float |
| S1 | subtract the centre c |
| S2 | four products: (x-c)cos, (y-c)sin, (x-c)sin, (y-c)cos |
| S3 | rotate: sum and difference |
| S4 | add c - s: source point (xs, ys) |
| S5 | floor, inside test, clamp to N-2; address goes to the memory |
| S6 | fractions fx, fy; the four neighbours come back from memory |
| S7 | 1 - fx, 1 - fy |
| S8 | the four bilinear weights |
| S9 | four weighted neighbours |
| S10, S11 | two-level sum; zero if outside |

A position issued in one cycle has its result on the output register 12 cycles
later. With the sink always ready, the first result of an image appears 43
clock edges (ITER + 15) after the pipeline first sees `buf_full`. The
remaining results follow one per cycle. If the output is not taken
(`out_ready` low while `out_valid`), the whole pipeline and the memory read
port hold.

**Releasing the memory.** The pipeline pulses `buf_release` in the cycle in
which the last neighbourhood is read (stage S5), not when the last result
leaves. From then on the input side may overwrite the memory with the next
image for this lane while the last results drain. Stages S0 to S5 are the
only ones that use the per-image constants, and they are empty by then, so
the next image's setup can begin at once.

**Numerics.** The floating-point units round to nearest, ties to even
(`fp_from_fixed` truncates, which is exact for pixel coordinates).
Subnormals are treated as zero, and infinities or NaNs simply give infinity.
Pixel values and coordinates never come near those ranges. The CORDIC error
is below 2e-7. Against a double-precision model, results agree to within 1e-4
for pixels in [0, 1) on images up to 512 x 512. The exception is points
within about 1e-3 pixel of the image border, where a rounding difference can
legitimately decide between "inside" and 0.

## The neighbour memory (`neighbor_ram`)

Interpolation needs four pixels per cycle from one image. The memory stores
pixel (x, y) in bank `{y[0], x[0]}` at address `{y >> 1, x >> 1}`. For any
x0, the two columns x0 and x0+1 have different parities, and the same holds
for the rows. So the four neighbours always fall in four different banks.
Bank (bx, by) reads column `(x0 + (x0[0] != bx)) >> 1` and row
`(y0 + (y0[0] != by)) >> 1`. The registered bank outputs are routed back to
p00/p10/p01/p11 using the registered parities of (x0, y0). Each bank is a
plain one-write, one-read memory, so it maps to block RAM.

The address grid is always 2^LOG2N wide, and smaller images use its upper-left
corner. At the default LOG2N = 9 each memory holds one 512 x 512
single-precision image (1 MB), and there are two of them. This is more than
the embedded memory of the Stratix III device considered in the original
work; like that work, this design assumes the memory is available.

## Stream control (`input_demux`, `output_mux`)

`input_demux` numbers images from 1 in arrival order. It writes odd images to
lane 0 (RAM1) and even images to lane 1 (RAM2). Each memory is FREE, LOADING
or FULL. A FULL memory belongs to its pipeline until `buf_release`. If the
next image's memory is still FULL, `in_ready` stays low and the DRAM1 stream
waits. The descriptor sampled with an image's first pixel is kept with the
memory and handed to the pipeline.

`output_mux` passes one result per cycle. When both pipelines have a result,
it alternates between them and holds the other lane's pipeline. While DRAM2
holds a result (`out_valid` high, `out_ready` low) the grant is locked, so the
offered result does not change until it is taken. Every result
carries its image number and (x, y), so DRAM2 can be written at the right
address whatever the interleaving.

**Throughput.** A pipeline starts only once its whole image has arrived.
Loading the first image is therefore never overlapped. After that, each image
costs its N^2 cycles plus about 20 cycles of setup and handover. In
simulation, six 32 x 32 images take 7286 cycles for 6144 pixels; 1024 of the
extra cycles are the first load. During a 512 x 512 image, DRAM2 receives one
result every cycle. At the 200 MHz clock used in the original work, that is
5 ns per pixel: about 0.2 s for the 10,000 64 x 64 images of a typical
single-particle data set, and about the same for 150 tomography images of
512 x 512.

## Interface of `em_affine_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state |
| `in_valid` / `in_ready` | in / out | 1 | DRAM1 pixel handshake; a pixel moves when both are high |
| `in_data` | in | 32 | pixel, single precision, raster order (x fastest) |
| `in_desc` | in | 100 | `img_desc_t`: `angle` (radians, \|alpha\| <= pi), `shift_x`, `shift_y` (pixels, single precision), `log2n` (image side 2^log2n, 1..LOG2N); sampled with each image's first pixel |
| `out_valid` / `out_ready` | out / in | 1 | DRAM2 result handshake |
| `out_img` | out | 16 | image number, 1, 2, ... in input order |
| `out_x`, `out_y` | out | LOG2N | position of the result in its image |
| `out_data` | out | 32 | transformed pixel, single precision |
| `out_last` | out | 1 | last pixel of an image |

Parameters: `LOG2N` (default 9, so images up to 512 x 512) and `ITER` (CORDIC
iterations, default 28). Shared types and constants are in `em_pkg`. The
size of each image is chosen at run time, so one build serves both the
64 x 64 and the 512 x 512 workloads.

## Where this RTL departs from, or adds to, the original description

The original gives the architecture: two local memories that deliver four
neighbours at a time, fed with odd and even images; two pipelines that
deliver one result per cycle after a latency; merging towards DRAM2;
single-precision operators; a CORDIC core. It also gives the algorithm. The
following are this design's own:

- **Rotation sign.** The printed algorithm's second coordinate line,
  `y_i = x_r sin b - y_r cos b + dy`, describes a reflection. The RTL uses
  the rotation `y_i = y_r cos b - x_r sin b + dy`.
- **Interpolation weights.** The printed weight `d_x * d_y` (distance to the
  neighbour) is replaced by the bilinear weight (1-|d_x|)(1-|d_y|), which
  sums to one.
- **Design details not specified in the original:**
  - the centre of rotation, (N-1)/2;
  - the memory banking;
  - the stage split and latency;
  - the CORDIC word length, iterations and angle folding;
  - the rounding simplifications;
  - the valid/ready protocol, descriptors and result tags;
  - run-time image size;
  - round-robin merging;
  - the release point of a memory.
- **Operator depth.** Each pipeline stage holds one complete single-precision
  add or multiply. The original work ran its pipelined vendor operators at
  200 MHz. This RTL has not been through FPGA timing analysis. Reaching that
  clock would probably need the adder's alignment, normalisation and
  rounding spread over more stages; the latency would then grow, but not the
  one-result-per-cycle rate.
- **Not part of the RTL:** the two DDR3 DRAMs, their controller and the PCIe
  link to the host. The top's two streams are where they would connect.

## Files

| file | content |
|---|---|
| `rtl/em_pkg.sv` | shared types (`fp32_t`, `img_desc_t`, `img_id_t`) and constants |
| `rtl/em_affine_top.sv` | top: demux, two lanes, output mux |
| `rtl/input_demux.sv`, `rtl/output_mux.sv` | stream control |
| `rtl/neighbor_ram.sv` | four-bank neighbour memory |
| `rtl/affine_pipeline.sv` | per-image setup and the 12-stage pixel pipeline |
| `rtl/cordic_sincos.sv` | iterative CORDIC |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_floor.sv`, `rtl/fp_from_fixed.sv` | single-precision operators |
| `tb/tb_*.sv` | self-checking testbenches; `tb_fp_pkg` and `tb_em_ref_pkg` hold the double-precision reference |

## Simulating

The stream rules are also written as assertions in the RTL:

- a result that is offered but not taken stays offered and unchanged
  (`affine_pipeline`, `output_mux`);
- no pixel is written into a memory that its pipeline still owns, and only a
  full memory is released (`input_demux`).

Simulate with `--assert` to check them.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog counts a failure if a testbench hangs. Example, the end-to-end
test at a 32 x 32 grid:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_em_affine_top \
  rtl/em_pkg.sv tb/tb_fp_pkg.sv tb/tb_em_ref_pkg.sv rtl/*.sv tb/tb_em_affine_top.sv
./obj_dir/Vtb_em_affine_top
```

Each testbench covers the following:

- `tb_fp_mul` and `tb_fp_add`: tens of thousands of random operands, compared
  bit-exactly with correctly rounded references, plus special cases.
- `tb_cordic_sincos`: angles in all four quadrants, compared with `$cos` and
  `$sin`; also the latency.
- `tb_neighbor_ram`: every neighbourhood of a small image, plus random ones.
- `tb_input_demux` and `tb_output_mux`: routing, ordering, hold and
  alternation under random stalls.
- `tb_affine_pipeline`: one lane, against the reference, for these images:
  - identity;
  - rotations in all quadrants;
  - shifts;
  - a smaller run-time size;
  - latency and one-per-cycle checks.
- `tb_em_affine_top`: 14 images of mixed sizes through the whole design,
  with DRAM2 back-pressure and a throughput check. It counts that each of
  these events happened at least once:
  - input hold;
  - both lanes competing for the output;
  - back-pressure;
  - pixels outside the image;
  - folded angles;
  - size changes.
- `tb_em_affine_full`: the top at its default parameters, with one 512 x 512
  image and three 64 x 64 images. Every result is checked. It runs in about a
  second.
