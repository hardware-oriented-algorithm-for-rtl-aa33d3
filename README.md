# GMM-MRCoHOG human recognition circuit

This circuit decides whether a 32×64-pixel grey-scale window shows a person.
It streams the window in at one pixel per clock. From it, it computes
*GMM-MRCoHOG* features: pairs of gradient directions, taken at three image
resolutions, are scored against a small Gaussian mixture on the 36×36
direction-pair plane. A 3,024-1-2 binarized neural network (BNN) then
classifies those features. The whole decision takes 2,085 clocks from the
first pixel, about 21 µs at 100 MHz.

Two ideas make the feature extractor cheap in hardware:

* **No arctangent.** The direction of a gradient (fx, fy) is found by
  comparing `|fy|·2^F` with `|fx|·T[k]`. Here `T[k]` is a fixed-point table of
  tan 10°, 20°, … 80°. This uses no division and no CORDIC. The signs of fx
  and fy then place the result in one of 36 directions of 10° each.
* **No Gaussians.** Each mixture component is a rectangle whose half widths
  are powers of two. Testing whether a pair lies in a component is two
  subtractions and two shifts. The pair's responsibility is shared equally
  among the components that contain it.

The architecture, the tangent-table method, the sizes (32×64 input, three
resolutions, 36 directions, 6 mixture components, 3,024 features fed 216 at
a time, one hidden neuron, two outputs, 3 integer and 6 fraction bits in the
table, a 6-clock angle unit) follow the published GMM-MRCoHOG/BNN circuit.
That publication does not specify the co-occurrence offsets, the cells, the
exact responsibility rule, the BNN's input binarization or the control.
Those are this design's own choices; the section
[Own choices](#own-choices-and-departures) lists them.

## Data flow

```
pix ──┬─────────────────────────────► 3-line buf 32 ─► deriv ─► angle ─┐ level 0
      └► ½ (2×2 mean) ─┬────────────► 3-line buf 16 ─► deriv ─► angle ─┤ level 1
                       └► ½ ────────► 3-line buf 8  ─► deriv ─► angle ─┤ level 2
                                                                       ▼
                 gradient_pair: 2-line gradient buffers + cross-resolution buffers
                                 │ 14 pair ports (a, b, cell)
                                 ▼
                 14 × gmm_resp (6 rectangular components each)
                                 │ 14 × 6 responsibilities
                                 ▼
                 feature_hist: 14 × 36 × 6 = 3,024 counters
                                 │ 216 features / clock, 14 clocks
                                 ▼
                 bnn 3,024-1-2  ──► res_valid, res_human, res_hid_sum
```

| module | role |
|---|---|
| `gmm_pkg` | sizes, `gauss_t`, `pair_t`, `resp_t`, `cell_of()` |
| `downsample2x` | 1/2 reduction, rounded 2×2 mean; two in cascade |
| `image_line_buffer` | 3-line buffer, 3×3 windows of interior pixels |
| `derivative_filter` | fx = right − left, fy = bottom − top (−255…255) |
| `tan_angle` | tangent-table direction, 0…35, 6-clock pipeline |
| `grad_line_buffer` | 2-line buffer of directions, centre + 4 neighbours |
| `cross_res_buffer` | pairs a direction with the finer level's direction at the same place |
| `gradient_pair` | the 14 pair types and their cells |
| `gmm_resp` | responsibilities of 6 rectangular components for one pair type |
| `feature_hist` | the 3,024 feature counters |
| `bnn` | binarized 3,024-1-2 network |
| `gmm_mrcohog_top` | everything, plus frame control |

## The angle unit (`tan_angle`)

With F fraction bits, `T[k] = round(tan(10k°) · 2^F)` for k = 1…8. At the
default F = 6 this is 11, 23, 37, 54, 76, 111, 176, 363. Three integer bits
hold tan 80° = 5.67. The first-quadrant sector d (0…8, meaning
[10d°, 10d+10°)) is the number of k for which `|fy|·2^F ≥ |fx|·T[k]`.
Because the table rises with k, the comparisons form a thermometer code, and
their population count is d. The quadrants are half-open, so a gradient
that lies exactly on an axis gets its true angle:

| condition | direction |
|---|---|
| fx > 0, fy ≥ 0 (and fx = fy = 0) | d |
| fx ≤ 0, fy > 0 | 17 − d |
| fx < 0, fy ≤ 0 | 18 + d |
| fx ≥ 0, fy < 0 | 35 − d |

Direction 0 points along +fx, and directions count counter-clockwise with +fy
pointing *down* the image, because fy = bottom − top. A zero gradient
gets direction 8. That is simply what the comparisons give, and a flat
patch makes many such pairs.

The pipeline has six registers: input, magnitudes and quadrant, the eight
products, the comparisons, the sector, and the direction. A result comes
out 6 clocks after its input, and a new input is taken every clock. The
published unit also takes 30 ns at a 5 ns clock.

Against `floor(atan2(fy, fx)/10°)` over all 511×511 gradients, the
unit agrees as follows (`tb_tan_frac_sweep`):

| fraction bits F | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| match, this RTL (%) | 46.84 | 57.67 | 79.75 | 90.39 | 96.28 | 97.43 | 98.99 | 99.21 |
| match, published (%) | 46.7 | 57.6 | 79.5 | 90.1 | 96.0 | 97.1 | 98.7 | 98.8 |
| largest error (directions) | 2 | 1 | 1 | 1 | 1 | 1 | 1 | 1 |

The largest errors equal the published ones. The match rates are 0.1 to 0.4
points higher, probably because the published figures count gradients that
lie on an axis differently. `FRAC_BITS` is a parameter of `tan_angle` and
of the top.

## Co-occurrence pairs, cells and the feature layout

Three resolutions (levels 0, 1 and 2) each produce a stream of directions for
their interior pixels. The level's 2-line gradient buffer presents each
centre of the previous gradient row together with its four neighbours. The
*pair types* are:

| type | pair (a, b) | centres |
|---|---|---|
| 4l + 0 | centre, right neighbour (x+1, y) | level l, columns 2…W−3, rows 1…H−3 |
| 4l + 1 | centre, down-left (x−1, y+1) | same |
| 4l + 2 | centre, down (x, y+1) | same |
| 4l + 3 | centre, down-right (x+1, y+1) | same |
| 12 | level 0 at (2X, 2Y), level 1 at (X, Y) | all level-1 gradients |
| 13 | level 1 at (2X, 2Y), level 2 at (X, Y) | all level-2 gradients |

Each pair is counted in a **cell** of the full-resolution image: 4 columns of
8 pixels by 9 row bands, where band = ⌊9y/64⌋. The pair's position is scaled
to full resolution first. With 14 types, 36 cells and 6 components, there
are exactly 14 × 216 = 3,024 features. Feature `f = type·216 + cell·6 + k`.
The network reads one pair type, 216 features, per clock.

**Pairs between resolutions.** A coarse direction at (X, Y) becomes available
about two fine rows after the fine row 2Y was produced. `cross_res_buffer`
therefore stores the fine directions of even rows and even columns in two
banks of W/2 entries, selected by (y/2) mod 2. The coarse direction reads
the bank Y mod 2. Any fine row written between that write and this read
goes to the other bank, so no entry is overwritten before it is read.
`tb_gradient_pair` checks this on the exact schedule the pixel pipeline
produces. The end-to-end test checks it again in the real pipeline.

## Mixture responsibilities (`gmm_resp`)

Each pair type has its own table of 6 components `{ca, cb, wa, wb}`: a
centre on the 36×36 plane and log2 half widths. Component k holds the pair
(a, b) when `(|a−ca| >> wa) == 0` and `(|b−cb| >> wb) == 0`. If n components
hold the pair, each of them gets 240/n and the others get 0. The value 240
is divisible by 1…6, so the shares are exact. A pair that no component
holds adds nothing. The distance is linear: direction 35 and direction 0
are 35 apart. The result is registered one clock after the pair.

## Feature memory and network

`feature_hist` has one bank of 36 16-bit counters per pair type and
component: 84 banks, each with a single write port. All 14 pair ports can
therefore add in the same clock. The counters cannot overflow, because a
counter sees at most 64 pairs × 240. The memory is cleared in one clock
after each result.

`bnn` does the following:

* **Input layer:** bit `x_i = feature_i ≥ th_in`.
* **Hidden neuron:** sum `s = popcount(XNOR(x, w))`, added up 216 bits per
  clock over 14 clocks. Its activation is `h = s ≥ th_hid`.
* **Output layer:** `score_o = b_out[o] + (h == v_out[o] ? +1 : −1)`. The
  window is human when score 1 > score 0.

`res_hid_sum` returns s for inspection. The network has three layers of
3,024, 1 and 2 neurons, with binary weights and activations, as published.
The threshold form and the output arithmetic are this design's own.

## Interface and timing of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | rising-edge clock; synchronous active-high reset |
| `pix_valid`, `pix_ready`, `pix` | in/out/in | 1/1/8 | raster pixel stream; `pix_ready` is high while an image is being taken |
| `cfg_we`, `cfg_pair`, `cfg_k`, `cfg_g` | in | 1/4/3/`gauss_t` | write component k of pair type `cfg_pair` |
| `w_we`, `w_hid`, `w_step`, `w_data` | in | 1/1/4/216 | write weights `w_step·216 … +215` of the hidden neuron |
| `th_in`, `th_hid` | in | 16/12 | input and hidden thresholds (static) |
| `v_out[2]`, `b_out[2]` | in | 1 / 8 signed | output layer (static) |
| `res_valid`, `res_human`, `res_hid_sum` | out | 1/1/12 | one-clock result pulse |

The trained values (component tables, weights, thresholds) come from offline
training with EM and a BNN trainer. Load them after reset and before the
first pixel. Reset clears the component tables.

Per image, the circuit goes through three states:

1. **STREAM:** 2,048 pixels, one per clock when `pix_valid` is high. The
   source may pause at any point. A pixel it offers while `pix_ready` is low
   must stay unchanged until it is taken; an assertion checks this.
2. **DRAIN:** `DRAIN_CYC` = 20 clocks. The longest path from the last pixel
   to its last feature update is about 14 clocks.
3. **CLASSIFY:** 14 chunk clocks plus 2 more.

From the first pixel to `res_valid` takes 2,085 clocks. The published
circuit needs 0.044 ms at 100 MHz, that is 4,400 clocks, which the test uses
as an upper bound. `pix_ready` is low for 38 clocks between images, so a
source that streams back to back must wait then.

Latencies per stage, in clocks: reduction 1 per level, line buffer 1,
derivative 1, angle 6, gradient buffer 1, pair register 1, responsibility 1,
counter update 1.

## Own choices and departures

Choices made where the published description is silent:

* **Reduction:** the 1/2 and 1/4 images use a rounded 2×2 mean.
* **Derivative:** central differences. Pixels on the image border get no
  gradient.
* **Table rounding:** round to nearest. The measured match rates above
  support this.
* **Pairs:** the four neighbour offsets, the two cross-resolution pair types,
  and the cell grid of 4 × 9 cells. Together they are chosen to give exactly
  the 3,024 features and the 216-feature chunks. The published feature layout
  may differ.
* **Responsibilities:** equal shares among the holding rectangles. This is
  the simplest rule consistent with "rectangular components, bit shifts and
  fuzzy inference".
* **Network:** input binarization by one shared threshold. The choice of
  output 1 as the "human" output.
* **Control:** the ready/valid input, the fixed drain, clearing the features
  after each result, and configuration through ports.

The published block diagram shows the responsibility stage as 32 parallel
units. Here there are 14 units, one per pair type, each evaluating its 6
components in one clock. This keeps up with the pair rate.

Not included: whatever sends the image (a DMA or host), and the offline
training. No trained parameters are available, so the recognition
accuracies reported for the original (97.1 % on the test set) cannot be
reproduced here. The tests use random tables and weights.

## Verification

Each testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tan_angle` | all 261,121 gradients against an integer reference; 6-clock latency; ≥ 98 % match with atan2; largest error 1 |
| `tb_tan_frac_sweep` | F = 0…7 side by side; match rates and largest errors against the published curve |
| `tb_downsample2x` | every output pixel, the number of outputs and their timing, over two images |
| `tb_image_line_buffer` | every 3×3 window and its coordinates |
| `tb_derivative_filter` | fx, fy, coordinates, latency |
| `tb_grad_line_buffer` | every centre and its four neighbours |
| `tb_gradient_pair` | the 14 pair streams, on the real schedule |
| `tb_gmm_resp` | memberships and shares; table writes to other pair types are ignored |
| `tb_feature_hist` | 14 concurrent update ports against a shadow model; clear |
| `tb_bnn` | hidden sum, class, chunk order, latency; both classes |
| `tb_gmm_mrcohog_top` | 5 images end to end at full size, one with idle clocks from the source: all 3,024 features, the hidden sum, the class, and 2,085 clocks per gap-free image |

The end-to-end test contains an independent behavioural model of the whole
algorithm. It streams the images back to back, so the source is stalled
between images. It also counts that every pair type fires, that components
overlap, that some pairs fall outside every component, and that both classes
occur.

Run one test with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/gmm_pkg.sv tb/tb_gmm_mrcohog_top.sv --top-module tb_gmm_mrcohog_top
./obj_dir/Vtb_gmm_mrcohog_top
```

To run another test, replace the testbench name. The top test builds in
under a minute and runs in well under a second. To change sizes, edit
`gmm_pkg.sv`. `N_PAIR`, `N_CELL` and `N_MIX` fix the feature count, and
`CHUNK` must divide it.
