# Parallel filtered back-projection for CT reconstruction

This RTL reconstructs a 512 x 512 cross-section image from a parallel-beam
CT sinogram of 1024 projections, each with 1024 detector samples. It uses
filtered back-projection (FBP). Each projection is ramp-filtered in the
frequency domain. It is then smeared back over the image along its angle, with
linear interpolation between detector samples. The smeared images are summed.

The design is built for speed on a small FPGA. It uses two kinds of
parallelism at once:

* **Pixel parallelism.** The image is cut into 8 disjoint segments of
  256 x 128 pixels. Each segment has its own back-projector and accumulator.
  Back-projecting one projection therefore takes 256 x 128 = 32768 clocks
  instead of 512 x 512.
* **Projection parallelism.** The 1024 projections are split into 5 groups
  (205, 205, 205, 205 and 204). Each group has a complete FBP block with its
  own 8 segments, so the groups work at the same time. At the end, the 5
  partial images are added.

Filtering of the next projection runs while the current one is
back-projected. The total time is therefore about one filtering plus 205
back-projections of a segment. Readout of the finished image comes on top.

```
              +------------------------------------------------------------+
 projection   |  fbp_group  (x5, one per projection group)                 |
 memory  ---->| proj_acq -> filtration -> ppdm (x8) -> back_projection (x8)|
 (external)   |              |    ^                        |               |
              |       FFT / IFFT cores (external)     img_accum (x8)       |
              |                                    (odd/even img_ram)      |
              +------------------------------------------------------------+
                                  |  x5 groups x 8 segments
                                  v
                    img_combine: sum of groups, raster stream out
```

## Fixed-point formats

Formats are written (sign, integer, fraction) bits.

| signal | format | bits |
|---|---|---|
| projection sample `P` | (1,8,7) | 16 |
| FFT / IFFT output (N = 1024) | (1,19,7) | 27 |
| filter coefficient | (0,0,9) | 9, unsigned |
| filtered bin (after rounding) | (1,8,7) | 16 |
| filtered projection `Pf` | (1,4,11) | 16 |
| cos / sin of the angle | (1,1,14) | 16 |
| `T = X cos + Y sin` | (1,10,14) | 25 |
| back-projected pixel `imn` | (1,4,11) | 16 |
| accumulated image | (1,8,7) | 16 |
| final pixel (sum of 5 groups) | (1,11,7) | 19 |

All roundings are round-half-up. Every narrowing saturates.

## Filtration and the FFT core interface

The FFT and IFFT are vendor cores and are **not part of this RTL**. Each group
brings its two cores' ports out through `ct_fbp_top` (`fft_*`, `ifft_*`,
indexed by group). `tb/fft_core_model.sv` is a behavioural stand-in. The
filtration logic relies on this protocol:

* A one-clock `start` opens an input window of N clocks. During the window
  `rfd` = 1 and `xn_index` counts 0 .. N-1.
* The core takes the sample for index k **three clocks after** `xn_index`
  shows k.
* Later, the unscaled transform comes out in natural order: N clocks with
  `dv` = 1 and `xk_index`, `xk_re`, `xk_im`.

`filtration` works through one projection in these steps:

1. It starts the FFT. The FFT's window (`d_wind`) and `xn_index` go to
   `proj_acq`. `proj_acq` reads the projection memory at
   `projection * 1024 + xn_index`. The memory has one clock of read latency,
   and `proj_acq` has an address register and an output register. So the
   sample arrives exactly three clocks after its index.
2. Each FFT output is multiplied, real and imaginary parts alike, by the
   filter coefficient of its index. The coefficient comes from a ROM. The ROM
   read and a three-stage multiplier take four clocks.
3. The IFFT is started in the clock of the FFT's first output. Its window
   then asks for index k exactly four clocks after the FFT produced bin k.
   The FFT output streams into the IFFT with no buffer.
4. The IFFT's real output, (1,19,7), is rounded to (1,14,1). Read as (1,4,11),
   these same bits are the value divided by 1024, which is the 1/N of the
   inverse transform. The result is written into the ping-pong memories with
   `pf_dv` / `pf_ind`.

The coefficient ROM holds the Ram-Lak ramp with a rectangular window. It is
computed at elaboration: `coef[k] = min(511, round(512 * min(k, N-k) / (N/2)))`.
Any other window means a different table in `ct_pkg::ramp_table`.

With the model cores, one filtration takes `2*(N + 3 + L) + N + 4` clocks.
Here L is the core's processing gap between its last input and its first
output. The full-size test uses a core whose start-to-last-output time is
12320 clocks (a small radix-2 "lite" FFT). That gives 23,618 clocks per
filtration. This is well under the 32,775 clocks of one segment
back-projection, so filtration is hidden.

## Back-projection

`back_projection` chains three parts:

* **`t_gen`** has two counters that scan the segment from its top-left
  pixel. X counts up along a row; Y counts down once per row. For each pixel
  it computes `T = X cos(theta) + Y sin(theta)` from the latched (1,1,14)
  cos/sin values. Coordinates run from -256 to 255 across the full image.
  Each segment only changes the counters' start values. `tint`, the integer
  part of T, is the floor (bits 24:14). `tfr`, the fraction, is bits 13:0. A
  pixel address counter runs 0 .. W*H-1 in scan order.
* **`proj_address`** adds 364 to `tint`, which makes every address positive.
  The most negative T of a 512 x 512 image is about -363, at the bottom-left
  corner and 45 degrees. It outputs addresses `a` and `a+1`.
* **`bp_interp`** computes `imn = P(a) + tfr * (P(a+1) - P(a))` with a single
  multiplier in three pipeline stages.

The ping-pong memory (`ppdm`) has two reads per clock, so `P(a)` and
`P(a+1)` arrive together. The first pixel leaves 6 clocks after `start`.
After that, one pixel comes out per clock.

The angle of projection k is `k * pi / 1024`. `trig_rom` builds its tables
at elaboration. Each angle is folded into [0, pi/2] and its cosine and sine
are summed as Taylor series in Q30 integers. The tables equal
`round(2^14 cos)` and `round(2^14 sin)` exactly.

## Ping-pong memory and the overlap of filtering with back-projection

Each segment has a `ppdm` with two 1024-word RAMs. Filtration writes one of
them while the back-projector reads the other. Every segment gets the same
filtered projection.

The group controller in `fbp_group` launches the next back-projection when
both of these hold:

* the next filtered projection is complete;
* all back-projectors and their pipelines have drained.

In that clock it does three things:

* swaps the PPDM banks;
* tells the accumulators that a new image starts;
* asks `proj_acq` for the projection after that.

Two status outputs show which side is waiting. `stall_filt` means a finished
projection waits for the back-projectors; this is the normal case at full
size. `stall_bp` means the back-projectors wait for filtration. The draining
adds 7 clocks per projection, so one projection costs 32,775 clocks instead
of 32,768.

## Image accumulation

`img_accum` holds a segment's running sum in two RAMs (`img_ram`), odd and
even, used in turn:

* Image 1 is written to the odd RAM as it is.
* Image 2 is added to the odd RAM and the sum is written to the even RAM.
* Image 3 is added to the even RAM and written to the odd RAM, and so on.

One RAM is always read while the other is written, so each pixel costs one
read and one write with no conflict.

Before adding, the four least significant bits of each (1,4,11) pixel are
dropped, which gives (1,4,7). The result is sign-extended to (1,8,7), and the
sum saturates. The odd/even choice travels down the two-clock pipeline with
each pixel, so consecutive images need no gap between them.

In the original system the image RAMs are external chips. Here they are
on-chip arrays: 2 x 32768 x 16 bits per segment, 80 RAMs and about 42 Mbit in
all at full size. On a real FPGA they would have to be mapped to external
memory.

## Combining the groups

When all 5 groups report `done`, `img_combine` walks through every segment
address. It reads that address in all 40 accumulators at once and adds the 5
group values of the current segment. It emits the sum with
`pix_index = row * 512 + col`, counted from the top-left pixel. One pixel
leaves per clock, so the readout takes 262,144 clocks.

## Timing at the default size

| phase | clocks |
|---|---|
| first filtration | ~23,600 (depends on the FFT core) |
| 205 back-projections of a 256 x 128 segment | 205 x 32,775 = 6,718,875 |
| readout and group summation | 262,144 |

At 50 MHz the back-projection is finished after about 134.9 ms, and the
readout takes another 5.2 ms. The full-size test measured 7,004,440 clocks
from `start` to the last pixel, or 140.1 ms. Both end-to-end tests check the
measured count against this formula.

## Top-level interface (`ct_fbp_top`)

| port | dir | meaning |
|---|---|---|
| `start` | in | one clock. The sinogram must already be in the projection memories. |
| `busy`, `done` | out | `busy` stays high until `done` pulses with the last pixel. |
| `proj_mem_rd[g]`, `proj_mem_addr[g]`, `proj_mem_rdata[g]` | out/out/in | Projection memory read port of group g. Address = projection x 1024 + sample; the data is expected one clock later. |
| `fft_*[g]`, `ifft_*[g]` | | FFT/IFFT cores of group g; protocol above. |
| `stall_bp[g]`, `stall_filt[g]` | out | overlap status per group |
| `pix_valid`, `pix_index`, `pix_value` | out | the reconstructed image, 19-bit signed (1,11,7) |

Parameters, with their defaults:

* `NSAMP` = 1024, `NPROJ` = 1024, `NGRP` = 5;
* `IMG` = 512, `SEG_W` = 256, `SEG_H` = 128;
* `OFFSET` = 364.

The non-parallel configuration is `NGRP=1, SEG_W=SEG_H=512`. Pixel
parallelism alone is `NGRP=1`. `NSAMP` must be a power of two, 16 or more.
`OFFSET` must keep `tint + OFFSET + 1` inside the projection.

## Design choices not fixed by the original description

* **Bus width.** The data path is the 16-bit version, for which every
  format is known. The reduced 9-bit / 12-bit variant is not modelled.
* **Filter coefficients.** The coefficients are a Ram-Lak ramp, because the
  original table was generated by a software simulator and is not given.
* **Multiplier clocking.** `t_gen` registers its product on the rising edge
  instead of using a falling-edge multiplier. This costs one clock of latency
  and nothing in throughput.
* **Segment layout.** The segments sit 2 across and 4 down; segment s is at
  column s mod 2, row s div 2.
* **Group membership.** Groups take consecutive projections: group g gets
  projections 205g .. 205g+204, and the last group ends at 1023.
* **Width growth.** The interpolation difference is one bit wider than the
  samples. The final group sum is 3 bits wider. All narrowing saturates.
* **Drain gap.** There are 7 clocks of pipeline drain between projections.
* **Image RAMs.** The image RAMs are on-chip arrays; see above.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_ref_pkg` holds independent reference arithmetic: a floating-point DFT,
  and the fixed-point filter, interpolation and accumulation.
* `fft_core_model` stands in for the FFT and IFFT cores.

The group and end-to-end tests compare the images they read back with the
reference, pixel by pixel. The end-to-end test also counts these events, and
each must occur:

* back-projection waiting for filtration;
* filtration waiting for back-projection;
* PPDM bank swaps;
* writes to both accumulator RAMs.

It also checks the cycle count.

* `tb_ct_fbp_top` runs at a reduced size: 20 projections of 128 samples,
  5 groups, a 64 x 64 image in eight 32 x 16 segments.
* `tb_ct_fbp_top_full` runs the top at its default parameters: one full
  512 x 512 reconstruction from 1024 projections. It compares every 16th
  image row with the reference, to keep the reference model's run time
  down. Filtration is the faster step at this size, so only the filtration
  wait is required. The test takes about 7 minutes to build and run.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ct_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_fbp_group.sv --top-module tb_fbp_group -o sim
./obj_dir/sim
```

Replace the file and top name for any other testbench. Every module takes its
sizes from its parameters, so the small configurations in the testbenches
need no source changes.

## Files

| file | content |
|---|---|
| `rtl/ct_pkg.sv` | formats, sizes, cos/sin and ramp table functions, rounding helpers |
| `rtl/ct_fbp_top.sv` | top: 5 groups and the final combination |
| `rtl/fbp_group.sv` | one FBP block with 8 segments and the overlap controller |
| `rtl/proj_acq.sv` | projection memory controller |
| `rtl/filtration.sv` | FFT/IFFT sequencing, coefficient ROM, multiplier, scaling |
| `rtl/ppdm.sv` | ping-pong dual-port memory |
| `rtl/trig_rom.sv` | COS/SIN ROMs |
| `rtl/t_gen.sv`, `rtl/proj_address.sv`, `rtl/bp_interp.sv`, `rtl/back_projection.sv` | back-projector |
| `rtl/img_ram.sv`, `rtl/img_accum.sv` | image accumulation |
| `rtl/img_combine.sv` | group summation and raster output |
