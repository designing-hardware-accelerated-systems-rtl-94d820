# FPGA accelerators for imaging flow cytometry

An imaging flow cytometer photographs cells as they flow past a camera
at tens of thousands of frames per second. Almost all frames are empty. The
few that hold a cell must be measured quickly enough to steer that cell
(for example to sort it). This repository holds synthesizable
SystemVerilog for two independent accelerators for this kind of
instrument:

* a **cell analysis core**. It takes a raw 64x64 camera stream, throws away
  the frames with no cell, and for each cell frame returns the cell's
  position, the centre of the cell and the cell outline as 360 radii (one
  per degree). The outline is what deformability measurements are built on;
* a **multilevel streaming clustering core**. It groups a stream of
  d-dimensional samples (for example pixel features) into clusters in one
  pass, without storing the data set.

The architecture follows D. Lee, *Designing Hardware Accelerated Systems for
Imaging Flow Cytometry* (PhD thesis, UC San Diego, 2017). That work built
both cores with high-level synthesis. This is an independent RTL
implementation. Where the thesis gives an algorithm step only by name, this
RTL picks a concrete method. Those choices are listed in
[Departures and choices](#departures-and-choices).

The top module `ifc_system` (`rtl/ifc_system.sv`) places the two cores side
by side. They share only `clk` and `rst_n`. The cell core has `cam_*`,
`res_*` and status ports; the clustering core has `cl_*` ports. In the
original system each core talks to a host PC over PCIe. Here every host
link is replaced by plain valid/ready streams or register-style ports.

## Cell analysis pipeline

```
camera --> bg_average --> cell_detect --> frame_fifo --> find_cell --> crop --> find_center_ch x3 --> average --> trace_wall --> result stream
           (256 frames)   (B=|C-BG|,      (2 frames of                          (B, C, E channels)                (360 radii)
                           hist, erode,    B and C)
                           count)
```

`cell_analysis_core` chains the stages. A sequencer runs the analysis of one
stored frame at a time, while detection keeps accepting camera frames.

### Background and detection (streaming, one pixel per cycle)

* **`bg_average`** sums the first `N_AVG` = 256 frames into a per-pixel
  accumulator, divides by 256 (a shift) and keeps the result as the
  background image BG in on-chip memory. Those frames produce no output.
  Every later pixel is forwarded together with its background pixel.
* **`cell_detect`** forms B = |C − BG| and builds a 256-bin histogram of B.
  It binarises B against a threshold, erodes the binary image with a 3x3
  window, and counts the pixels that survive.
  * After the last pixel it spends 256 cycles scanning the histogram. The
    new threshold is the lowest grey level below which 240/256 of the
    pixels lie, but never less than 20.
  * That threshold is applied to the **next** frame. The background is
    static, so consecutive thresholds barely differ, and the frame never
    has to be read twice.
  * If at least `MIN_PIX` = 16 pixels survive, the frame is a cell frame.
  * B and C are written into the frame FIFO as they stream past. The slot is
    then committed (cell frame) or simply reused (empty frame).
* **`frame_fifo`** holds `NSLOT` = 2 complete frames (B and C planes, plus
  the frame number and threshold). When both slots are full, detection
  holds the camera stream off (`cam_tready` low) at the next frame start.

One frame through detection takes 4096 + 256 = 4352 cycles. At 250 MHz that
is 57K frames/s.

### Find cell

**`find_cell`** streams B through three 3x3 stages built on
**`window3x3`** (two line buffers and a shifting 3x3 register window):

1. a Gaussian blur ([1 2 1; 2 4 2; 1 2 1]/16), giving E, which is stored for
   the crop;
2. thresholding, then an opening (erosion followed by dilation) to remove
   specks;
3. the mean x and y of the white pixels, from two serial dividers.

That mean is the cell location. Each 3x3 stage gives no output for the last
row and column of the frame, which is harmless because cells are not
analysed at the frame border.

### Find center: resizing without storing the resized image

This is the stage that needs the most care.

A 24x24 crop around the cell location is taken from three images:

* B, the background-subtracted frame (cell bright);
* C, the raw frame (cell wall dark);
* E, the blurred B (cell bright).

Each crop goes to its own **`find_center_ch`**. A channel:

1. enlarges the crop 5x by bicubic interpolation (Keys kernel, a = −0.5,
   Q8 weights) to 120x120;
2. stretches its contrast so that the 1 % and 99 % grey levels map to 0 and
   255;
3. binarises it with Otsu's threshold;
4. returns the mean position of the white pixels. White means brighter
   than the threshold in B and E, and not brighter in C.

The 120x120 image (14,400 pixels) is never stored. The 576 crop pixels sit
in registers, and any resized pixel is a function of 16 of them
(`ifc_pkg::bicubic_px`). The channel splits the resized image into four
60x60 quadrants, one per lane, and makes two passes over them:

| phase  | cycles | work |
|--------|-------:|------|
| pass 1 | 3600   | each lane recomputes its pixels and adds them to its own 256-bin histogram |
| scan   | 256    | the four histograms are summed bin by bin; the running counts give the 1 %/99 % points and Otsu's threshold |
| scale  | ~17    | a serial divider computes the stretch factor 255·256/(hi−lo) |
| pass 2 | 3600   | the pixels are recomputed and compared with the threshold; white counts and x/y sums are kept per lane |
| centre | ~22    | two dividers turn the sums into the centre |

Otsu's rule maximises the between-class variance. That is the ratio
(Σt·n − N·s)² / (n·(N − n)), where n and s are the count and grey-level sum
below the bin, Σt is the total grey-level sum and N = 14,400. The
candidate ratios are compared by cross-multiplication in 128 bits, so no
divider is needed during the scan.

Because the stretch is monotonic, thresholding the raw resized pixel equals
thresholding the stretched pixel, except for clipped pixels. The stretch
parameters (`lo`, `scale`) are still output, because the wall tracer uses
them. A channel takes 7,499 cycles.

The three channels run in parallel. The cell centre is the mean of the
centres of the channels that found any white pixel.

### Trace cellular wall

**`trace_wall`** holds the C crop and, with the C channel's stretch, samples
the resized, stretched image along a ray from the centre for every whole
degree. It takes radii 1..59 resized pixels, rounded to the nearest pixel,
with sines and cosines computed during elaboration.

Along each ray it keeps three estimates of where the wall is:

* the darkest sample;
* the steepest fall in brightness from one radius to the next;
* the first sample darker than 64.

The wall radius is the median of the three. A ray that leaves the image
stops there. Four lanes each cover 90 degrees, so the 360 radii take
90 × 59 = 5,310 cycles.

### Result record

Each cell frame produces 93 32-bit words on `res_*`, with `res_tlast` on the
last word:

| word | content |
|------|---------|
| 0 | frame number, counting every camera frame from 0, including the 256 averaging frames |
| 1 | bit 31 = 1 (iscell), bits 15:8 = cell row, bits 7:0 = cell column (frame coordinates) |
| 2 | bit 16 = centre found, bits 15:8 = centre row, bits 7:0 = centre column (0..119, resized crop coordinates) |
| 3..92 | radii for angles 4i..4i+3, lowest angle in the low byte (angles counter-clockwise from +x, y pointing down in the image) |

The crop origin is the cell location minus 12, clamped to 0..39. The host
can therefore map the centre back to frame coordinates as
origin + centre/5. Empty frames produce nothing.

### Timing of the cell core

| quantity | this RTL | original HLS design |
|---|---|---|
| detection, per frame | 4,352 cycles | 4,102 cycles |
| analysis, per cell frame (last pixel in to last word out) | ~17,900 cycles | 8,287 cycles |
| frames/s at 250 MHz, 15–20 % cell frames | ~57K, set by detection | 60.9K |

The analysis stages run one after another on one frame. The original design
pipelined them. With the two-slot FIFO, bursts of cell frames stall the
camera stream. The end-to-end tests provoke this on purpose.

## Multilevel streaming clustering

```
            +--> subcluster (alpha 1/8)  --+
samples ----+--> subcluster (alpha 1/16) --+--> reduction: minimum cost pick | DBSCAN --> lookup table
            +--> subcluster (alpha 1/32) --+     (centroid -> cluster ID)
```

* **`subcluster`** is one-pass vector quantisation over `K` = 128
  centroids of `D` = 3 16-bit unsigned coordinates.
  * A sample arrives one coordinate per cycle.
  * On its last coordinate, the L1 distance to every centroid is computed
    in parallel, and the nearest centroid (lowest index on ties) moves
    toward the sample: c ← c + (x − c)·2^−SHIFT, an arithmetic shift.
  * A new sample is accepted every D cycles: 41.67 M samples/s at 125 MHz
    for D = 3.
  * The summed distance is the module's cost.
* **`stream_cluster`** runs `M` = 3 subclustering modules on the same
  stream, with learning rates 1/8, 1/16 and 1/32 (`SHIFT0 + m`). Each
  module's nearest-centroid index is output for every sample. On
  `reduce_start`, one of two reductions runs:
  * mode 0, **`min_cost_pick`**: the module with the lowest cost wins. Its
    centroid k becomes cluster k + 1, and the other modules' entries read 0.
  * mode 1, **`dbscan_reduce`**: all M·K = 384 centroids are copied into a
    DBSCAN engine (L1 radius `EPS` = 2048, `MINPTS` = 3). The engine visits
    points in index order and keeps its candidates in a FIFO. The labels
    (0 = noise) become the table. The run takes at most about 3·N² cycles
    (about 0.3–0.45 M cycles at N = 384).
* The table is read with `lut_m`/`lut_k` → `lut_id`. Seeds are loaded
  through `init_*`.

Shuffling the input stream and the BIRCH reduction of the original system
run on the host and are not part of this RTL.

| data set (from the thesis) | d | k | fits the default core? |
|---|---|---|---|
| 3-D clouds, 16,384 points | 3 | 128 | yes, 41.67 M samples/s at 125 MHz |
| blobs / moons / circles, 1,500 points | 2 | 2–3 | yes: the third coordinate is sent as 0 and the data scaled to 16-bit |
| cell image features, 1-D | 1 | 10 | yes: unused coordinates are sent as 0 |
| cell image features, 9-D | 9 | 10 | needs `D=9, K=10`: 125 MHz/9 = 13.89 M samples/s |
| spambase / census 1990 | 57 / 68 | 10 | needs `D=57` / `D=68`: 125 MHz/68 = 1.84 M samples/s for census |

`tb_cluster_workloads` builds the core at `D=9, K=10` and at `D=68, K=10`.
It streams one window of synthetic data of each size (16,384 and 8,192
samples) and checks every result. It also measures exactly one sample per
D cycles, which is the 13.89 M and 1.84 M samples/s above.

## Files

* `rtl/ifc_pkg.sv`: shared constants and types, plus the arithmetic helpers
  (bicubic weights and sampling, contrast stretch, sine/cosine
  approximation).
* `rtl/ifc_system.sv`: the top level.
* `rtl/cell_analysis_core.sv`, `bg_average.sv`, `cell_detect.sv`,
  `frame_fifo.sv`, `window3x3.sv`, `find_cell.sv`, `find_center_ch.sv`,
  `trace_wall.sv`, `seq_divider.sv`: the cell analysis core.
* `rtl/stream_cluster.sv`, `subcluster.sv`, `min_cost_pick.sv`,
  `dbscan_reduce.sv`: the clustering core.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

Every file starts with a comment covering its operation, interface and
timing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ifc_pkg.sv rtl/window3x3.sv \
    tb/tb_window3x3.sv --top-module tb_window3x3 -o sim && obj_dir/sim
```

For a larger block, list `rtl/ifc_pkg.sv` first and then every file the
block uses. For the whole system that is all of `rtl/*.sv` with
`tb/tb_ifc_system.sv` and `--top-module tb_ifc_system`.

* **`tb_ifc_system`** runs the top with every parameter at its default. It
  sends 256 background frames and then a mix of empty and cell frames, with
  random stalls on the result stream. At the same time it streams 16,384
  3-D samples (a window the size of the 3-D clouds set) into the clustering
  core and runs both reductions.
  * It checks results against behavioural models.
  * It counts these mechanisms and fails if any never happens: averaging,
    discarding an empty frame, analysing a cell frame, a FIFO-full input
    stall, result backpressure, centroid updates in every module, and each
    reduction.
  * About 1.4 M cycles; roughly 20 s of simulation.
* **`tb_cluster_workloads`** covers the 9-D and 68-D clustering
  configurations (see above), in about 15 s.
* **`tb_cell_analysis_core`** is the same cell test with a 4-frame
  background, which is much faster.
* The unit testbenches compare each block with an independent behavioural
  model, and also check cycle counts:
  * one pixel per cycle in the streaming stages;
  * NPIX + 256 cycles for detection;
  * 7,456–7,600 cycles for find-center;
  * 90 × 59 cycles for the wall trace;
  * one sample every D cycles for subclustering.

  The find-center and wall-trace models reuse the package's bicubic and
  trigonometric helpers, so those helpers are checked only through the
  end-to-end plausibility checks (centre on the disk, radii on the ring).

Verilator simulates with two states, so every register that is read is
either reset or written before use.

## Departures and choices

Where the original describes a step only by name, this RTL makes its own
choice:

* **Detection threshold**: a percentile of the B histogram (240/256, at
  least 20), carried over to the next frame.
* **Cell decision**: at least 16 pixels left after erosion.
* **Gaussian kernel**: 3x3 binomial.
* **Adaptive threshold**: Otsu's method.
* **Contrast adjust**: a 1 %/99 % stretch.
* **Bicubic kernel**: Keys, a = −0.5, Q8 weights, source position x/5,
  edge pixels repeated.
* **Three channels**: B, C and E are all used, and their centres averaged;
  the wall is traced on C.
* **Wall estimates**: the darkest sample, the steepest fall and the first
  dark sample, with their median as the wall.
* **Result word layout**: see [Result record](#result-record).
* **FIFO depth**: two frames.
* **DBSCAN**: L1 distance, EPS = 2048, MINPTS = 3. The visiting order is
  index order.
* **Learning rates**: 1/8, 1/16 and 1/32 for the three modules.
* **Tie-breaking**: ties go to the lowest index, for both the nearest
  centroid and the minimum cost.

Known differences in behaviour:

* Analysis is about twice as slow per cell frame as the original pipelined
  HLS design (see the timing table). Detection, not analysis, still sets
  the frame rate for typical cell densities.
* Detection takes 256 cycles per frame more than the original, for the
  histogram scan.
* The PCIe/RIFFA host link, the camera, input shuffling and the BIRCH
  reduction are not implemented.
