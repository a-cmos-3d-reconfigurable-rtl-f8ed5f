# Two-tier vision sensor with in-pixel Gaussian pyramid and feature detection

This design is a 3D-stacked image sensor that computes the early stages of several feature
detectors right under the photodiodes. SIFT, Harris and Hessian detectors all start from the
same work: a Gaussian pyramid, differences of Gaussians (DoG), first derivatives and a
second-moment or Hessian matrix. Here that work is split over two stacked dies:

* **Top tier (analog).** It holds 320 x 240 photodiodes and 160 x 120 analog processors, one
  for each 2 x 2 block of photodiodes. Each processor samples its four pixels with correlated
  double sampling (CDS) onto four state capacitors. A switched-capacitor network between
  neighbouring capacitors then blurs the image: every cycle of the network is one pass of a
  small Gaussian, and repeated cycles widen it. Switches merge the capacitors to halve the
  resolution for the next octave. One comparator per processor is the analog half of an
  8-bit single-slope A/D converter.
* **Bottom tier (digital).** Under each processor sits a set of six 8-bit registers. Together
  they form a frame buffer that holds scale k as it is converted and scale k-1 for the DoG.
  Multiplexers read the buffer in 20-pixel strings. A DoG unit and a serial gradient / Hessian
  / Harris unit process each string, and the results leave as 128-bit beats for the DRAM
  stacked below.

An external processor configures each frame: the number of octaves, the scales per octave,
the diffusion cycles per scale (which set sigma) and the detector thresholds. It then reads
the results from DRAM. The DRAM and that processor are not part of this RTL; the top module
brings out their interfaces.

The top tier is analog. It is delivered as a behavioural model (`top_tier_array`,
`ramp_generator`) that uses `real` values, so that the whole stack simulates end to end. All
the rest is synthesizable SystemVerilog.

## Four pixels, one processor: planes P1..P4

The idea that shapes everything else is that four photodiodes share one processor and one
through-silicon via. In a cell, the pixels are

| name | position  | state capacitor | scale-k register | scale-k-1 register |
|------|-----------|-----------------|------------------|--------------------|
| P1   | (i, j)    | s1              | R13              | R1                 |
| P2   | (i, j+1)  | s2              | R24              | R2                 |
| P3   | (i+1, j)  | s3              | R13              | R3                 |
| P4   | (i+1, j+1)| s4              | R24              | R4                 |

At full resolution (octave 1), the four pixels of all cells are converted one after the
other: every P1 at once, then every P2, and so on. Each "plane" is a 160 x 120 image made of
every second photodiode in each direction. The digital side sees one plane at a time, so a
pixel's horizontal and vertical neighbours are not in the same read. Two things follow from
that:

* The first derivatives in octave 1 are taken along axes rotated by 45 degrees, on the
  plane: `dx' = I(i+1,j+1) - I(i-1,j-1)`, `dy' = I(i+1,j-1) - I(i-1,j+1)`.
* The second derivatives in octave 1 use neighbours that are two photodiodes apart. The
  one-apart neighbour is estimated as the mean of the pixel and the two-apart one. This
  halves `dxx` and `dyy` compared with the plain second difference.

After the 1/4 merge (octave 2), each cell holds one pixel and the image is 160 x 120. After
the 1/16 merge (octave 3), one cell in four holds a pixel: the cell with even row and even
column. That image is 80 x 60. From octave 2 on, conventional central differences are used.

## One frame

`stack_sequencer` runs a frame as a fixed sequence of steps:

1. `phi_acq`: CDS acquisition into the state capacitors.
2. For each octave (up to 3): the merge (`phi_quarter` before octave 2, `phi_sixteenth`
   before octave 3). Then, for each scale:
   1. `cfg_diff[scale]` diffusion cycles (`phi_diff`, one per clock).
   2. Conversion steps. Octave 1 has four planes, later octaves one. Step *p* converts plane
      *p* and, at the same time, reads plane *p-1* out of the frame buffer. The step ends when
      both are done. When a read finishes, `we[plane]` copies the plane just read into its
      scale-k-1 register.
   3. The last plane is read after the last conversion. In octave 1 that plane is P4, which
      lives in R24 and R4. Its read runs on through the next diffusion and the next P1
      conversion, which writes only R13, so it costs no time. In octaves 2 and 3 the only
      plane lives in R13, which the next conversion would overwrite, so the sequencer waits
      for that read.

So P1 is converted into R13. P2 goes into R24 while P1 is read, and R13 is then copied to R1.
P3 goes into R13 while P2 is read, and so on. The first scale of each octave gives no DoG,
because R1..R4 then hold another octave.

A conversion is 256 counter codes of `STEP_CYCLES` = 75 clocks each. That is 19 200 cycles,
or 120 us at the 160 MHz processing clock. Reading a 160 x 120 plane is 10 strips x 120 rows
x 16 cycles = 19 200 cycles, which matches the conversion time (a 10 MHz string rate).

## Single-slope conversion across the two tiers

`code_counter` runs the global code 0..255. `ramp_generator` turns the code into the ramp
`(code - 0.5) * VFS/256`. The comparator of each cell stays high while the selected state
capacitor is at or above the ramp. In `fb_register_set`, that bit is ANDed with `conv13` or
`conv24`, and the result enables R13 or R24 to load the code. When the ramp passes the pixel
value, the comparator falls and the register keeps the nearest code. A cell therefore needs
only one vertical connection, and the counter and the ramp are shared by all 19 200 cells.

## The diffusion network (behavioural)

One network cycle updates every active node as

    V(n) = V(n-1) + a * (sum of the 4 cardinal neighbours - 4 V(n-1)),   a = (CE/C) / (1 + 4 CE/C)

With C = 100 fF and CE = 10 fF, a = 0.0714. A node on the array edge exchanges charge only
with the neighbours it has, so the total charge is kept. `phi_quarter` replaces the four
capacitors of a cell by their mean. `phi_sixteenth` replaces four cells by their mean.
Diffusion then runs between nodes two or four photodiodes apart, with the same `a`. The
original circuit keeps the same sigma per cycle after merging by switching two of the four
capacitors out.

The model leaves out capacitor mismatch, charge injection and clock feedthrough. The original
analysis found their effect on the sigma-versus-cycles relation to be small.

## Reading the frame buffer and the serial feature unit

`frame_buffer` answers a read request (plane, row, 16-column strip) one cycle later with 20
values of scale k and 20 of scale k-1: columns `16*strip-2 .. 16*strip+17`. Columns outside
the plane read as 0. In octave 3 the multiplexers step by two cells. Strings are read row by
row down each strip, one every `READ_PERIOD` = 16 cycles.

`dog_unit` forms the 16 DoG values of each string in parallel. The detectors get either the
scale or the exact (9-bit) DoG, chosen per frame with `cfg_det_src`.

`feature_unit` keeps the last five strings (rows r-4..r). For the 16 centre pixels of row
r-2, it works one pixel per cycle:

* `gradient_unit`: dx, dy at the pixel, and at its 8 neighbours for Harris.
* `hessian_detector`: `dxx`, `dyy`, `dxy` = 4 x the mixed derivative (the cross difference),
  and `det = 16 dxx dyy - dxy^2`. The flag is `det > thr_hessian`.
* `harris_detector`: `A = sum dx^2`, `B = sum dy^2`, `C = sum dx dy` over the 3 x 3 window,
  and `R = AB - C^2 - (A+B)^2/16`. The class is corner `00` if `R > thr_corner`, edge `01` if
  `R < -thr_edge`, and flat `10` otherwise.

The results come out 17 cycles after the string. A point whose neighbourhood leaves the plane
cannot be computed. For such a point dx = dy = 0, Hessian = 0 and Harris = flat, and the flags
byte marks it. Rows 0 and 1 of a strip have no output, and the last two plane rows are never
centre rows. All of these are border rows.

## Output beats

`result_packer` sends at most one 128-bit beat per cycle on `dram_valid / dram_data /
dram_tag`. There is no back-pressure: the stacked DRAM takes far more than the 6.4 Gbit/s
offered. Byte *i* (bits 8i+7..8i) is pixel `16*strip + i` of the row. The tag (`beat_tag_t`)
holds the kind, octave, scale, plane, row and strip.

| kind         | content per byte |
|--------------|------------------|
| `BEAT_SCALE` | S(k), unsigned |
| `BEAT_DOG`   | S(k) - S(k-1), saturated to -128..127 (not sent for the first scale of an octave) |
| `BEAT_DX`    | dx (octave 1: dx'), saturated |
| `BEAT_DY`    | dy (octave 1: dy'), saturated |
| `BEAT_FLAGS` | `{harris_valid, grad_valid, 3'b0, hessian, harris[1:0]}` |

Each string gives SCALE and DOG beats straight away, and DX/DY/FLAGS 17 cycles later. Five
beats in 16 cycles never overrun the one-deep slots. `overflow` (sticky) and an assertion
guard this.

## Top-level interface (`cmos3d_stack_top`)

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | 160 MHz processing clock, asynchronous active-low reset |
| `light` | 240 x 320 x 8 | per photodiode VS(t0)-VS(t1), in ADC steps (drives the analog model) |
| `start` | 1 | start a frame |
| `cfg_octaves` | 2 | 1..3 |
| `cfg_scales` | 4 | 1..8 scales per octave |
| `cfg_diff` | 8 x 8 | diffusion cycles before each scale (the first may be 0) |
| `cfg_det_src` | 1 | detectors on the scale (0) or on the DoG (1) |
| `thr_hessian`, `thr_corner`, `thr_edge` | 30, 48, 48 | detector thresholds |
| `busy`, `frame_done` | 1 | frame running / one-cycle end pulse |
| `dram_valid`, `dram_data`, `dram_tag` | 1, 128, 23 | result beats |
| `overflow` | 1 | a result beat was lost (never in normal operation) |

The parameters are `IMG_C` = 320, `IMG_R` = 240, `STEP_CYCLES` = 75 and `READ_PERIOD` = 16.
Sizes and types shared by the modules are in `fd_pkg`.

## Throughput

The main configuration is 3 octaves x 6 scales. Each slot below is one conversion time of
about 19 200 cycles:

* Octave 1: 6 scales x 4 slots. The P4 reads are hidden.
* Octave 2: 6 x 2 slots (a conversion, then a read).
* Octave 3: 6 x (a conversion plus a quarter-size read of 4 800 cycles).

With the diffusion cycles this adds up to about 836 000 cycles. At 160 MHz that is about
5.2 ms, or about 190 frames/s. The original architecture quotes 180 frames/s for this
configuration with 120 us conversions. A frame is almost entirely conversion time, so the
rate scales with `STEP_CYCLES`.

A VGA array (320 x 240 cells) would not keep pace as built. A plane would be 4 800 strings, or
76 800 cycles: 480 us at 160 MHz, against a 120 us conversion. The serial unit needs 16 cycles
per string, so VGA would need a 640 MHz clock or four feature units working side by side.

## Where this RTL makes its own choices

The architecture fixes the array sizes, the pixel-to-processor mapping, the six-register
cell, the AND-gated conversion strobes, the copy strobes, the order of conversion and reading,
the 20-register strings, the one-pixel-per-cycle serial unit at 16x the read rate, the
rotated octave-1 gradient, the interpolated second derivatives, the 1-bit Hessian and 2-bit
Harris results, and the 128-bit result groups. This RTL chose the rest:

* **Derivative formulas.** As usually printed, the second-derivative formulas subtract only
  one centre term in octave 1 and add all four diagonal terms for `dxy`. They do not vanish on
  a flat image. This RTL follows the interpolation rule instead, which gives half the plain
  second difference in octave 1. It also uses the usual cross difference for `dxy`.
* **Detector rules.** The Hessian rule (determinant threshold), the Harris window (3 x 3,
  unweighted), k = 1/16 and all thresholds are this design's.
* **Conventional gradient.** Plain central differences are used from octave 2 on.
* **Formats.** The read-request interface, the 5-row window, the border handling, the beat
  kinds, the tag and the flags byte are this design's.
* **Sequencer.** The step structure, one diffusion cycle per clock, the drain time and hiding
  only the octave-1 P4 read behind the next conversion are this design's.
* **Analog models.** The ramp levels, the half-LSB offset, C equal to the state capacitor in
  the CDS gain, the edge rule of the diffusion network and the even/even active cell in
  octave 3 are this design's.
* **Not built.** The 27-neighbour SIFT extremum search over three DoGs is not built, because
  the frame buffer holds only two scales. DoG beats go to memory for the external processor.

## Files

`rtl/` holds one module or package per file:

    cmos3d_stack_top
    ├── stack_sequencer
    ├── code_counter
    ├── ramp_generator        (behavioural)
    ├── top_tier_array        (behavioural)
    ├── frame_buffer
    │   └── fb_register_set   (x 19 200)
    ├── dog_unit
    ├── feature_unit
    │   ├── gradient_unit     (x 9)
    │   ├── hessian_detector
    │   └── harris_detector
    └── result_packer

`tb/` holds one self-checking testbench per module (`tb_<module>`). It also has `tb_ref_pkg`,
with reference arithmetic written independently of the RTL, and `tb_stack_check.svh`, the
end-to-end checker used by `tb_cmos3d_stack_top`. That testbench runs a 64 x 16 image (32 x 8
cells, two strips) with a fast counter (2 cycles per code). It runs two frames of 3 octaves,
the first with the detectors on scales and the second on DoGs. It checks every beat against a
full recomputation, analog model included. It also counts each mechanism and fails if one
never happened:

* conversions into R13 and into R24, and copies into R1..R4;
* both merges, and DoG beats;
* P4 reads hidden behind the next P1 conversion;
* rotated and conventional gradients, and border points;
* corners, edges and Hessian points.

Each testbench prints `TB_RESULT checks=N failures=M`.

64 x 16 is the largest size simulated. At the default 320 x 240, Verilator unrolls the
19 200 register-set instances into C++ code that takes well over an hour to compile. The
full-size frame has therefore not been simulated. The frame time above comes from the
sequencer's step structure. `tb_stack_sequencer` checks that structure at a small size.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -Irtl -Itb -y rtl -y tb +libext+.sv rtl/fd_pkg.sv tb/tb_ref_pkg.sv \
      tb/tb_cmos3d_stack_top.sv --top-module tb_cmos3d_stack_top
    ./obj_dir/Vtb_cmos3d_stack_top

Replace the testbench name to run another one. The end-to-end test builds in about three
minutes and runs in seconds. Lint one module with `verilator --lint-only -Wall -Irtl -y rtl rtl/fd_pkg.sv rtl/<module>.sv`.

Lint warnings that remain, and why they stay:

* `BLKSEQ` in the behavioural top tier, which computes its analog state in place.
* `UNUSEDPARAM` for the package constants that a given module does not use.
* `SYNCASYNCNET`, because assertions sample the asynchronous reset.
* Unused Hessian and Harris intermediate values, which are kept as outputs of the detector
  modules.
