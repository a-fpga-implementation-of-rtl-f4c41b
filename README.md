# Neural/wavelet face detector in SystemVerilog

This design finds faces in an 8-bit grey-scale frame. It does not compare pixels
directly. It describes every 32x32 window of the image by its wavelet sub-bands
and lets a small neural network decide whether that window is a face.

Each window goes through a three-level 2-D discrete wavelet transform twice:
once with the Haar wavelet and once with the Daubechies-4 wavelet. Each transform
leaves four 4x4 sub-bands (LL, LH, HL, HH), so a window gives eight 4x4 images.
A two-layer multilayer perceptron (MLP) with tanh neurons classifies them. It is
*locally connected*: each of its eight hidden neurons sees only the 16
coefficients of one sub-band. A single output neuron combines the eight hidden
outputs and is positive for a face. Faces larger than 32x32 are found by
shrinking the image in steps of 1.2 rather than growing the window. A final
stage merges the many overlapping hits that one face produces into a single
entry.

The architecture follows the FPGA design published as "A FPGA Implementation of
Neural/Wavelet Face Detection System". That paper targets a Xilinx Spartan-3
XC3S4000. It gives the block structure, the network topology, the 8-bit pixel
and weight widths, the decimator structure and the neuron datapath. It does not
give the frame size, filter coefficients, number formats, handshakes or the
trained weights. Those are this design's own choices, listed under
[Departures and open points](#departures-and-open-points).

## Data flow

```
 pixels ──► image_store ◄── addresses ── image_scaler  (pyramid: f = 1.2^s, 32x32 windows on a grid)
                 │ pixel stream (1024 per window)
        ┌────────┴────────┐
   dwt3_2d (Haar)    dwt3_2d (Daubechies-4)      each: 3 levels, rows then columns,
        │ LL LH HL HH     │ LL LH HL HH                  decimators = FIR + 1-bit counter + register
        └──────┬──────────┘
        mlp_classifier: 8 x feature_norm ─► 8 hidden neurons ─► mux+counter ─► output neuron ─► y
               │ y per window (>0 = face)
          arbitration: per-scale map ─► neighbour vote ─► discard overlaps ─► faces[]
```

The top-level module `face_detect_top` handles one window at a time:

1. The scaler reads the window's 1024 pixels from the frame store, one per clock.
2. Both wavelet engines take the same pixel stream and transform it in parallel.
3. When both have finished, the MLP classifies the window.
4. The arbitration stage stores the result, and the scaler moves on to the next window.

At the end of each scale, the arbitration stage runs its merging pass before
the next scale starts.

## The wavelet engines (`dwt3_2d`, `decimator`, `fir_filter`)

This is the part with the most structure.

**Decimator.** The building block is the decimator from the paper. It has
three parts:
- an FIR filter that pulses `load` each time it finishes a filter operation;
- a 1-bit counter that `load` advances;
- a parallel-load register that takes the FIR result only when the counter's
  new state is 1.

So it keeps every second filter output: y[n] = f[2n]. Here the counter and the
register run on the system clock with `load` as their enable, rather than being
clocked by `load`. The counter is cleared at the start of every line, so the
first complete window of the line (samples 0..T-1) is the one that is kept.

**Filters.** All taps are Q2.10 integers (tap/1024):

| wavelet | low-pass (trend) | high-pass (fluctuation) |
|---|---|---|
| Haar, T = 2 | (1, 1)/√2 → 724, 724 | (1, −1)/√2 → 724, −724 |
| Daubechies-4, T = 4 | (1+√3, 3+√3, 3−√3, 1−√3)/(4√2) → 495, 857, 230, −133 | (a3, −a2, a1, −a0) → −133, −230, 857, −495 |

A filter output is Σ tap·sample, shifted right by 10 (floor), then saturated
to 16 bits signed. The filters are orthonormal, so each 2-D level multiplies
the DC level by 2. The level-3 LL coefficient of a flat window is therefore 8×
the pixel value, at most 2040.

**Line schedule.** The engine holds the window in buffer A (32x32 words of 16 bits).
For level L it works on the top-left N x N region, where N = 32, 16 and 8.

*Row pass.* Each row of A is streamed into a low-pass and a high-pass decimator
at once. After the N row samples come T−2 wrap-around samples (samples 0 and 1
again for Daubechies-4), which gives a periodic extension at the edge. The N/2
trend values go to B[r][0..N/2−1] and the N/2 fluctuation values to
B[r][N/2..N−1].

*Column pass.* Each column of B is streamed the same way back into A. The trend
values go to the upper half and the fluctuation values to the lower half.

A line takes N + T + 1 clocks: N + T − 2 samples in, two clocks to drain the
pipeline, and one clock to clear the decimators.

After level 3, A[0..7][0..7] holds the sub-bands. The first letter of a
sub-band's name is the filter along the rows, the second the filter along the
columns:

```
            columns 0-3   columns 4-7
 rows 0-3      LL            HL
 rows 4-7      LH            HH
```

`feat_idx = k` reads coefficient k (row k/4, column k%4) of all four sub-bands at
once. This is a combinational read port.

**Timing.** `done` is set by clock edge 2·(32·(33+T) + 16·(17+T) + 8·(9+T))
after the edge that takes the last pixel. That is 3024 clocks for Haar and 3248
for Daubechies-4.

## The classifier (`mlp_classifier`, `neuron`, `tanh_lut`, `feature_norm`)

**Formats.**

| quantity | format | range |
|---|---|---|
| network input (normalised coefficient) | Q1.7 | −1 .. 0.992 |
| weight and bias | Q3.5 (8 bits, as in the paper) | −4 .. 3.97 |
| product and accumulator | Q.12, 24-bit accumulator | |
| tanh argument | signed byte a, x = a/32 | −4 .. 3.97 |
| neuron output | Q1.7, round(127·tanh x) | −1 .. 1 |

`feature_norm` brings coefficients into range. It shifts them right by
`NORM_SHIFT` (default 4, so 2040 maps to 127) and saturates to a byte.

**Neuron.** The datapath follows the paper:

weight ROM → 16-bit register holding {weight, input} → multiplier → adder and
accumulator → tanh look-up table (256 words, synchronous read) → output register.

- `start` loads the accumulator with the bias, which is the ROM word after the
  weights. The bias is shifted left by 7 to match the product format.
- Each `in_valid` pairs the next weight with the input.
- The accumulated sum is shifted right by 7 and saturated to a byte, which
  gives the LUT address.
- `y_valid` is set by the third clock edge after the edge that took the last
  input.

**Schedule of the control unit.**

1. For 16 clocks, coefficient k of all eight sub-bands is normalised and
   registered, and all eight hidden neurons take their input in parallel.
2. A counter then drives a multiplexer that passes one hidden output per clock
   to the output neuron.

`done` is set by the 33rd clock edge after `start`. Then `y` holds the output
and `face = (y > 0)`.

**Weight download.** The ROMs are written through the `w_*` port after offline
training. They are only read during detection.

| `w_neuron` | neuron | `w_addr` 0..15 | bias address |
|---|---|---|---|
| 0..3 | hidden: Haar LL, LH, HL, HH | weight of coefficient k | 16 |
| 4..7 | hidden: Daubechies-4 LL, LH, HL, HH | weight of coefficient k | 16 |
| 8 | output | 0..7 = weight of hidden neuron i | 8 |

No trained weights are included.

## Image pyramid and window scan (`image_scaler`, `image_store`)

The frame is written in raster order (`in_sof` marks the first pixel). The
frame store then pulses `frame_ready` and the scan starts.

**Scales.** Scale s uses the factor f = 1.2^s. The factor is held as a Q.16
step `inc`. It starts at 65536, and each new step is the previous one × 78643
(1.2 in Q.16), rounded. Scales continue while a 32x32 window still fits in the
scaled image, that is while 31·f is less than both the height and the width.
A 320x240 frame therefore has 12 scales.

**Pixel mapping.** Pixel (x, y) of the scaled image is original pixel
(⌊x·f⌋, ⌊y·f⌋): nearest-neighbour sampling that takes the upper-left
neighbour. The addresses are produced by adding `inc` once per pixel, so no
multiplier is needed.

**Window grid.** Windows lie on a grid of `STRIDE` scaled pixels and are
scanned in raster order. A window is used only if it lies entirely inside the
scaled image. Grid cell (gx, gy) covers the original-image square that starts
at (gx·STRIDE·f, gy·STRIDE·f) and has an edge of 32·f.

## Merging detections (`arbitration`)

During a scale, each classified window writes its MLP output into a map at its
grid cell. When the scale ends, a pass visits every cell in raster order. It
skips cells that are not positive and cells that an earlier face has discarded.
For each remaining cell it counts how many of the other cells in its
(2·`NEIGH_R`+1)² neighbourhood are positive:

- If the count is above `THRESH`, the cell becomes a face. Its position and
  size in original pixels are appended to `faces[]`, and all other positive
  cells in the neighbourhood are marked as discarded.
- Otherwise the detection is dropped.

A discarded cell still counts as a neighbour of later cells.

The output array collects every scale of a frame. It holds `MAX_FACES` entries
and drops any further faces. The pulses `ev_face`, `ev_reject` and
`ev_discard` report each decision. The pass takes about one clock per cell,
plus 2·(2R+1)² clocks for each positive cell it examines.

## Using the top level

| port group | signals | notes |
|---|---|---|
| frame in | `in_sof`, `in_valid`, `in_pixel[7:0]` | raster order; processing starts after the last pixel. Do not write a new frame while `busy`. |
| weights | `w_we`, `w_neuron[3:0]`, `w_addr[4:0]`, `w_data[7:0]` | see the table above |
| per window | `win_valid`, `win_gx`, `win_gy`, `win_scale`, `win_y` | one pulse per classified window |
| per frame | `busy`, `frame_done`, `face_count`, `faces[MAX_FACES]` | `face_t` = {x, y, size}, 16 bits each, original pixels |
| events | `ev_scale_end`, `ev_face`, `ev_reject`, `ev_discard` | one-clock pulses |

Reset (`rst`) is synchronous and active high. Each window costs about 4300
clocks: 1024 to read it, 3248 for the slower transform and 34 for the MLP. A
320x240 frame with `STRIDE` = 4 has 10,718 windows and takes about 46 million
clocks.

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 320, 240 | frame size |
| `STRIDE` | 4 | window grid pitch in scaled pixels |
| `NEIGH_R` | 1 | neighbourhood radius in grid cells (3x3) |
| `THRESH` | 1 | a face needs more than THRESH positive neighbours |
| `MAX_FACES` | 16 | length of the output array |
| `NORM_SHIFT` | 4 | coefficient-to-input scaling (right shift) |

Window size, level count, word widths and formats are in `rtl/fd_pkg.sv`.

At the defaults the memories total about 734 kbit, which fits the block RAM of
the XC3S4000:

| memory | size |
|---|---|
| frame | 614,400 bits |
| two wavelet engines | 65,536 bits |
| nine tanh tables | 18,432 bits |
| detection map and weights | the rest |

## Departures and open points

**Activation function.** The paper describes the network as two layers of tanh
neurons. Its general MLP section instead mentions a sigmoid and a linear output
neuron. This design uses tanh in both layers, so the sign of the output can
give the decision.

**Settings the paper does not give.** The following are choices of this design:
- filter coefficients and their quantisation;
- boundary handling (periodic);
- how the inputs are normalised;
- all fixed-point formats;
- the frame size, window grid, neighbourhood size, threshold and output-array
  length.

**Schedule.** Everything is sequential: one window at a time, with no overlap
between loading, transforming and classifying. The paper claims high frame
rates but gives no figures. Overlapping the window load with the transforms
and the MLP, or running several windows at once, would be the first things to
add for throughput.

**Decimator clocking.** The decimator's counter and register are clock-enabled
flip-flops, not clocked by the FIR's `load` line. The function is the same.

**Frame store.** It does not protect a frame that is being processed from a
new frame being written.

**Weights.** The trained weights are not available. The testbenches use a
hand-made weight set that reacts to a bright centre on a darker surround. They
exercise the datapath, not detection quality.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
models written independently in `tb/tb_ref_pkg.sv`:
- filter taps computed from their closed forms;
- a loop-based periodic DWT;
- the tanh table;
- neuron sums;
- a complete reference detector (pyramid, both transforms, MLP and the
  arbitration pass).

The testbenches check values and, where the timing is fixed, cycle counts.

| testbench | what it covers |
|---|---|
| `tb_fir_filter`, `tb_decimator` | filter results, the kept even outputs, load timing, idle cycles, saturation |
| `tb_dwt3_2d` | all 64 coefficients of both wavelets for 8 windows; latency 3024 / 3248 |
| `tb_feature_norm`, `tb_tanh_lut` | every input value / every table entry |
| `tb_neuron`, `tb_mlp_classifier` | random weights; exact outputs; 3-edge and 33-edge timing; both classes |
| `tb_image_store`, `tb_image_scaler` | storage and read latency; every window address at every scale of a 64x48 frame; handshakes |
| `tb_arbitration` | random maps; accepted, rejected and discarded counts; coordinates; output array overflow |
| `tb_face_detect_top` | two 96x72 frames end to end, window by window; several scales, both classes, all arbitration outcomes and a full output array occur |
| `tb_test_set` | 30 separate 32x32 patterns (16 face-like, 14 others), each one window, the way the network is evaluated; exact outputs |
| `tb_face_detect_full` | one 320x240 frame with every parameter at its default: 10,718 windows over 12 scales, all matching the reference (about a minute of simulation) |

`tb_fd_bench.sv` holds the stimulus and checking that the two whole-detector
testbenches share. Each testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fd_pkg.sv tb/tb_ref_pkg.sv tb/tb_dwt3_2d.sv --top-module tb_dwt3_2d
./obj_dir/Vtb_dwt3_2d
```

Replace `tb_dwt3_2d` with any other testbench name. The RTL uses only
synthesizable SystemVerilog. The tanh table is computed with `$tanh` when the
design is elaborated, so no data files are needed.

## Files

- `rtl/fd_pkg.sv`: shared sizes, types, filter taps, band order.
- `rtl/fir_filter.sv`, `rtl/decimator.sv`, `rtl/dwt3_2d.sv`: wavelet front end.
- `rtl/feature_norm.sv`, `rtl/tanh_lut.sv`, `rtl/neuron.sv`, `rtl/mlp_classifier.sv`: classifier.
- `rtl/image_store.sv`, `rtl/image_scaler.sv`: frame buffer and pyramid scan.
- `rtl/arbitration.sv`: merging detections.
- `rtl/face_detect_top.sv`: the complete detector.
- `tb/`: testbenches, the shared whole-detector bench and the reference models.
