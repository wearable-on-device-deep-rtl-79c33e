# Gesture recognition accelerator for a Cortex-M0 data glove

A data glove carries six inertial sensors: one on the second joint of each
finger and one on the back of the hand. Each sensor reports two angles, so
every sample frame holds 12 values. The goal is to recognise hand gestures
(the numbers one to ten) on the glove's own microcontroller, with no PC or
cloud behind it. A Cortex-M0 reads the sensors. The heavy numerical work goes
to this accelerator, which hangs directly on the M0's AHB-Lite bus and runs
three stages:

1. **Preprocessing (PM).** Each of the 12 angle channels is de-noised with a
   one-level DB4 wavelet filter bank whose high-frequency coefficients are
   hard-thresholded. The part of the record that holds the movement is then
   cut out as a window of 50 frames. All channels get the same window.
2. **Feature extraction (FEM).** A small CNN reduces the 50 x 12 window to
   four features: three 3x3 convolution layers, each followed by 2x2 max
   pooling, then a fully connected layer.
3. **Classification (CM).** The processor rescales the four features to
   [-1, 1]. A 4-8-8-1 perceptron then turns them into the gesture number in
   21 clocks, using eight shared multipliers.

```
 AHB-Lite ──► ahb_regs ──► pm ──────────────► fem ──► FEAT regs ──► (M0 rescales)
   (M0)        │  raw buffer   wavelet_db4     conv3x3/maxpool2x2 x3        │
               │  128x12       swab_segment    fc_serial                    ▼
               └────────────────────────────────────────── CM_IN regs ──► cm ──► RESULT
```

## Files

| file | what it is |
|---|---|
| `rtl/gr_pkg.sv` | types, number formats, DB4 coefficients, placeholder CNN weights |
| `rtl/wavelet_db4.sv` | streaming DB4 analysis, threshold, synthesis |
| `rtl/swab_segment.sv` | change measure per frame and window placement |
| `rtl/pm.sv` | raw and de-noised buffers, sequencing of the preprocessing |
| `rtl/conv3x3.sv` | 3x3 convolution layer with a register line buffer |
| `rtl/maxpool2x2.sv` | 2x2 max pooling with a one-row cache |
| `rtl/fc_serial.sv` | fully connected layer with serial inputs |
| `rtl/fem.sv` | the CNN chain |
| `rtl/tanh_pwq.sv` | interval and coefficient table of the Tanh fit |
| `rtl/cm.sv` | the 21-clock perceptron on eight multipliers |
| `rtl/ahb_regs.sv` | AHB-Lite slave and register map |
| `rtl/gr_accel_top.sv` | the top level |
| `tb/gr_ref_pkg.sv` | integer reference models of every stage |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_gr_accel_top` |

## Number formats

| quantity | format |
|---|---|
| angles, activations, features | 16-bit Q9.7 (1/128 degree, range ±256) |
| CNN weights | 8-bit Q1.6 |
| CNN biases | Q9.7 |
| wavelet coefficients | Q2.14 |
| Tanh fit coefficients | 18-bit Q3.14 |
| classifier weights and biases | 16-bit Q7.8 |

Every product sum is rounded to nearest by adding half an LSB and shifting
arithmetically. Results are saturated to 16 bits. The testbench reference
models use the same rules, so they are compared bit for bit.

## The wavelet de-noiser (`wavelet_db4`)

The filter bank comes from three constants: s = 0.483, a0 = 1.732 and
a1 = −0.268.

```
G(z) = s(1 + a0 z^-1 − a0·a1 z^-2 + a1 z^-3)      low pass  (= DB4)
H(z) = s(−a1 − a0·a1 z^-1 − a0 z^-2 + z^-3)       high pass
Ĝ(z) = H(−z),   Ĥ(z) = −G(−z)                     synthesis
```

With these synthesis filters, analysis followed by synthesis returns
**−x[n−3]**. The module stores the synthesis taps already negated, so the
output is +x[n−3].

The module handles one sample per beat, in polyphase form:

- On every odd sample it forms a new low-pass / high-pass pair (a, d) from
  the last four samples.
- If |d| < threshold, d is set to 0 (hard threshold).
- Every sample, even or odd, produces one output. It is built from the
  current and previous pairs, using the two even or the two odd synthesis
  taps.
- `in_first` preloads the delay line with the first sample. The filter then
  sees a constant signal before the record starts, so there is no start-up
  transient.

With a threshold of 0, the output matches the delayed input to within a few
LSB. The testbench checks this. The threshold is a register. The standard
formula th = γ·σ·√(2 ln N), with σ = median(|d|)/0.6754, has to be worked out
by the processor, because the median is not computed in hardware.

## Segmentation (`swab_segment`, inside `pm`)

A recording has three stages: hand still, gesture, hand still again. For
every frame the change measure is

    signal(f) = Σ over the 12 angles of angle²      (integer degrees²)

Frame 0 is the baseline. A frame is *active* when
|signal(f) − signal(0)| > `SEG_TH`. The 50-frame window is centred between
the first and the last active frame, and clamped so that it stays inside the
record.

- With no active frame, the window starts at 0.
- A record shorter than 50 frames is padded by repeating its last frame.

Because every channel shares this one window, all CNN inputs have the same
length and no fill data is needed.

This is a simplified stand-in for the SWAB (sliding-window and bottom-up)
segmentation that this kind of system is based on. The bottom-up
piecewise-linear merging is **not** implemented. Only the outcome is: one
start point, one end point, one common length.

## The CNN (`fem`)

| layer | in | out |
|---|---|---|
| C1 conv 3x3, 4 kernels | 50x12x1 | 50x12x4 |
| P1 max 2x2 | 50x12x4 | 25x6x4 |
| C2 conv 3x3, 6 kernels | 25x6x4 | 25x6x6 |
| P2 max 2x2 | 25x6x6 | 12x3x6 (odd row dropped) |
| C3 conv 3x3, 6 kernels | 12x3x6 | 12x3x6 |
| P3 max 2x2 | 12x3x6 | 6x2x6 (odd column kept) |
| FC | 72 | 4, ReLU |

The convolutions use "same" padding, and the border is filled with the
constant **180** (degrees). Every convolution is followed by ReLU.

Data flow between layers:

- Every layer passes one pixel per beat, with all channels of that pixel in
  the beat, using a valid/ready handshake. No layer holds a whole feature
  map.
- `conv3x3` keeps three rows in a register line buffer. It accepts a pixel
  of row r+2 only after output row r is finished. That back-pressure is what
  throttles the PM stream.
- The COUT kernels of a layer run in parallel, each with nine multipliers
  for the window. The input channels are taken one per clock.
- The weight ROM is addressed by a Gray-code counter over the input channel,
  so only one address bit toggles per step.
- `maxpool2x2` caches one row and keeps the left pixel of each pair. It uses
  three comparators per channel.
- Pooling edges: an output size rounded up keeps the partial window at an odd
  edge; an output size rounded down drops it.

A window of 600 samples takes about 1,970 clocks through the FEM.

**Weights.** No trained weights are available. The ROMs are filled by
`gr_pkg::cnn_w` and `gr_pkg::cnn_b`, a fixed integer hash. This is enough to
check that the datapath is bit-exact. The four features it produces carry no
gesture information. To deploy the design, replace those two functions (or
the ROM initialisation) with trained values.

## The classifier (`cm`)

- Hidden layer 1 has 8 Tanh neurons.
- Hidden layer 2 has 8 ReTanh neurons, where ReTanh(x) = max(0, tanh(x)).
- A single output neuron uses ReLU. Its value, rounded to an integer, is the
  gesture number.

Tanh is a piecewise quadratic on |x|. The negative half reuses the table and
negates the result.

| interval | y |
|---|---|
| [0,1] | −0.3275x² + 1.0977x − 0.0038 |
| (1,2] | −0.1690x² + 0.7021x + 0.2324 |
| (2,3] | −0.0282x² + 0.1703x + 0.7370 |
| (3,4] | −0.0039x² + 0.0313x + 0.9363 |
| > 4 | 1 |

Eight 18x18 multipliers, one per hidden neuron, do all the work in a fixed
schedule:

| clocks | work |
|---|---|
| 4 | layer 1: neuron j accumulates x[k]·w1[j][k], one input per clock |
| 3 | Tanh on all 8 neurons: \|z\|², then c2·\|z\|², then c1·\|z\| |
| 8 | layer 2 |
| 3 | ReTanh |
| 1 | the 8 output-layer products |
| 1 | their sum plus the bias |
| 1 | ReLU and rounding; `done` pulses |

That is 21 clocks from start to done. The testbenches check this count.
Weights and biases sit in a 128-word register memory written over the bus:

| words | contents |
|---|---|
| 4j+i | w1[j][i] |
| 32+j | b1[j] |
| 40+8j+i | w2[j][i] |
| 104+j | b2[j] |
| 112+i | w3[i] |
| 120 | b3 |

## Register map (AHB-Lite, word accesses, zero wait states)

| offset | name | access | meaning |
|---|---|---|---|
| 0x000 | CTRL | W | bit0 start PM+FEM, bit1 start CM |
| 0x004 | STATUS | R | bit0 PM/FEM busy, bit1 features valid, bit2 result valid, bit3 CM busy |
| 0x008 | NFRAMES | RW | frames in the record (1..128) |
| 0x00C | WT_TH | RW | wavelet threshold, Q9.7 |
| 0x010 | SEG_TH | RW | activity threshold, degrees² |
| 0x014 | IRQ_EN | RW | bit0 features, bit1 result |
| 0x018 | SEG | R | [7:0] window start, [15:8] first active, [23:16] last active, bit24 activity seen |
| 0x01C | RESULT | R | [3:0] gesture, [31:16] output neuron Q9.7 |
| 0x020–0x02C | FEAT0–3 | R | features |
| 0x030–0x03C | CM_IN0–3 | RW | rescaled features |
| 0x200–0x3FC | CM weights | W | word k at 0x200+4k |
| 0x2000– | raw buffer | W | sample of frame f, channel c at 0x2000 + 4(12f + c) |

Starting a run clears its valid flag. `irq` is (IRQ_EN0 & features valid) |
(IRQ_EN1 & result valid).

A typical run:

1. Write the raw samples, then NFRAMES, WT_TH and SEG_TH.
2. Write CTRL = 1 and wait for the features.
3. Read FEAT0–3 and compute x' = 2(x − mean)/(max − min) in software.
4. Write CM_IN0–3, write CTRL = 2, and read RESULT.

A full 128-frame record takes about 5,100 clocks from start to features.
The classifier adds 21.

## Measured timing and size

| measurement | value |
|---|---|
| start to features, 128-frame record | 5,088 clocks |
| start to features, 40-frame record | 2,976 clocks |
| one 600-sample window through the CNN alone | 1,974 clocks |
| classifier | 21 clocks |
| total at 50 MHz, 128-frame record | about 0.10 ms |

The total does not include bus transfers or the software rescaling step.
The document's figure for a whole recognition on the M0 system is 1.544 ms,
which is 77,200 clocks at 50 MHz. That figure includes the software side.

The two record buffers are a choice of this design: 2 x 128 x 12 x 16 bits,
about 49 kbit. A build that streams the de-noised data, or that stores fewer
frames, needs far less memory. The `MAX_FRAMES` constant in `gr_accel_top` sets the
buffer size.

## Simulating

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gr_pkg.sv tb/gr_ref_pkg.sv tb/tb_gr_accel_top.sv --top-module tb_gr_accel_top
./obj_dir/Vtb_gr_accel_top
```

The same command works for the other blocks: use `tb_<block>.sv` and
`--top-module tb_<block>`. `tb_maxpool2x2` also needs `tb/pool_case.sv`,
which `-y tb` finds.

`tb_gr_accel_top` acts as the processor and runs five records:

- a normal gesture;
- a movement at the end of the record (clamped window);
- a 40-frame record (padded window);
- a still hand (no activity);
- a noisy record with a high threshold.

It compares every window start, feature, output value and gesture with the
reference chain in `gr_ref_pkg`. It also fails if any of these never
happens: thresholded wavelet coefficients, activity detection, window
clamping, short-record padding, back-pressure from the CNN, the line buffer
holding back a row, the dropped row and kept column in pooling, Tanh
saturation, negative Tanh inputs, the ReTanh clamp, and the interrupt. It
also checks the 21-clock classifier latency.

## Where this RTL goes its own way, and what is left out

- **Host and peripherals are not included.** The Cortex-M0, its APB
  peripherals (I2C to the sensors, SPI, UART) and the sensors with their
  internal Kalman filters are outside this RTL. The testbench plays the
  processor.
- **Own choices.** The wavelet depth (one level), the threshold as a
  register, the number formats, the raw record length (128 frames), the
  register map, the window placement rule and the single-neuron output layer
  are this design's decisions.
- **Input normalisation.** Mean normalisation of the CNN input is not done
  in hardware. The CNN works on angles, matching its border value of 180.
  Rescaling between the CNN and the classifier is left to software.
- **Placeholder weights.** The CNN weights are placeholders. The classifier
  weights are loaded at run time.
- **No clock gating.** Clock gating is not modelled. An FPGA build would use
  clock enables.
- **Untested limits.** Clock speed, resources and power have not been
  measured for this RTL.
