# Wavelet-domain RGB image fusion with a Booth/Wallace multiplier

This design fuses two RGB images in the wavelet domain. Each colour plane of each image goes
through a one-level, one-dimensional (9,7) discrete wavelet transform (DWT). The two
transforms of a plane are combined coefficient by coefficient. The result goes through the
inverse transform (IDWT) to give the fused plane. All the arithmetic rests on one multiplier:
a 16 x 16 signed multiplier built from radix-4 Booth encoders, a Wallace tree of carry save
adders and a carry look-ahead adder. Each wavelet filter uses five of them in a folded
symmetric structure.

The architecture follows the article "An Efficient Multiplier Design for Discrete Wavelet
Transform (DWT) in Image Fusion" (S. Udhaya Suriya, P. Rangarajan, Middle-East J. Sci. Res.
23(8), 2015). The article gives the multiplier's structure, the Booth table and the folded
filter's block diagram. Many details are not in the article: the coefficient values, every
number format, the inverse transform's insides, the interfaces and the frame handling. Those
are choices made here. They are listed under "Departures and choices" below.

## Data flow

```
 image 1 R,G,B ──► 3 x dwt97 ──► Y_L, Y_H ─┐
                                           ├─► 6 x fusion (per plane: L band, H band)
 image 2 R,G,B ──► 3 x dwt97 ──► Y_L, Y_H ─┘          │ re-interleave L,H,L,H...
                                                      ▼
                                        3 x idwt97 ──► fused R,G,B
```

`image_fusion_top` takes one pixel pair per cycle (8 bits per plane for each image) with a
valid/ready handshake. `in_last` marks the last pixel of a frame. A frame is handled as one
raster-order 1-D signal, so rows are not transformed separately. Forward then inverse
transform of a continuous signal rebuilds it up to rounding, so row ends need no special
treatment.

Each forward transform produces one coefficient per input pixel. Lowpass (Y_L) and highpass
(Y_H) alternate: L0 H0 L1 H1 and so on, which is the decimated two-band transform. The two
lowpass streams of a plane go to one fusion unit and the two highpass streams to another.
Their outputs alternate, so they merge back into a single L/H stream for the inverse
transform.

### Frame sequencing and timing

The (9,7) window reaches four samples ahead of its centre. The forward transform therefore
emits coefficient *m-4* when sample *m* arrives, and the inverse transform emits pixel *k-4*
when coefficient *k* arrives. The whole chain lags by 8 samples. The top handles this with a
small sequencer:

* After `in_last` it drops `in_ready` and feeds 8 zero samples (flush) into all six forward
  transforms.
* The first 8 outputs of the inverse transform belong to positions before pixel 0. They are
  not shown on `out_valid`.
* When the frame's last pixel leaves (`out_last`), all filters are cleared and `in_ready`
  rises again for the next frame.

Signals before the first pixel count as zero. With the 8 flush samples, every pixel of the
frame sees its full window.

Fused pixel *i* appears 11 clock cycles after stream element *i+8* entered: 5 cycles in the
DWT, 1 in fusion and 5 in the IDWT. With gap-free input, a frame of N pixels takes N + 8
cycles of input and N + 8 + 11 cycles until `out_last`, plus one cycle to restart. The output
has no back-pressure.

## The folded (9,7) filter (`fold97_filter`)

This is the core of the design. Both the forward and the inverse transform are instances of
it with different coefficient sets.

**Window and pre-adders.** A 9-sample shift register `w[0..8]` (`w[0]` newest) advances on
each valid sample. Its centre is `w[4]`. The filters are symmetric, so the sample pair
`w[4-j] + w[4+j]` is formed first for j = 1..4. Five multipliers then suffice instead of
nine:

```
y = c0*w4 + c1*(w3+w5) + c2*(w2+w6) + c3*(w1+w7) + c4*(w0+w8)
```

**Two coefficient sets.** Each multiplier's coefficient comes from a 2-way select. A phase
bit that toggles with every sample chooses `C_EVEN` or `C_ODD`. In the forward transform,
even centres use the 9-tap lowpass h and odd centres use the 7-tap highpass g; g has no tap
at distance 4, so its outer coefficient is 0. The filter thus computes a lowpass output and a
highpass output on alternate samples. That is exactly the decimated transform, at one
multiplier pass per input sample.

**Inverse transform with the same datapath.** The synthesis filters of the (9,7) pair are a
7-tap lowpass `(-1)^j g_j` and a 9-tap highpass `(-1)^j h_j`. Take an interleaved stream
u = L0 H0 L1 H1 and so on. An output sample at even position n sums lowpass coefficients at
even distances j, weighted `g_j`, and highpass coefficients at odd distances, weighted
`-h_j`. At odd positions the roles swap. This is again one symmetric 9-tap filter whose
coefficient set alternates with the sample parity, so `idwt97` reuses `fold97_filter` as it
is.

Coefficients (signed Q1.14, index = distance j from the centre, j = 0..4):

| set | j=0 | j=1 | j=2 | j=3 | j=4 |
|---|---|---|---|---|---|
| DWT even (lowpass h) | 13971 | 6183 | -1812 | -391 | 620 |
| DWT odd (highpass g) | 12919 | -6850 | -667 | 1057 | 0 |
| IDWT even | 12919 | -6183 | -667 | 391 | 0 |
| IDWT odd | 13971 | 6850 | -1812 | -1057 | 620 |

They are the CDF (9,7) filters with the lowpass normalised to sum sqrt(2):
h = 0.852699, 0.377403, -0.110624, -0.023849, 0.037828 and
g = 0.788486, -0.418092, -0.040689, 0.064539, each multiplied by 2^14 and rounded. Forward
and inverse together give perfect reconstruction for the unquantised values. With them the
gain of the round trip is 1.

**Pipeline.** There are five register stages:

1. pre-add (and coefficient select)
2. products
3. pair sums (taps 4+3 and 2+1, centre delayed)
4. sum of the pairs (centre delayed)
5. final sum

`out_valid` follows `in_valid` by exactly 5 cycles. A new sample can enter every cycle. Gaps
in `in_valid` only pause the window. `clr` empties the window and the pipeline and resets the
phase to even. Assertions in `fold97_filter` and `dwt97` flag a pre-adder sum
that would not fit 16 bits and a DWT output that would not fit its format.

## Number formats and accuracy

| signal | format |
|---|---|
| pixels | unsigned 8 bit |
| filter coefficients | signed 16 bit, 14 fraction bits |
| multiplier | 16 x 16 signed, 32-bit product; sums kept at 35 bits |
| wavelet coefficients (DWT out, fusion, IDWT in) | signed 16 bit, 4 fraction bits (Q11.4), rounded to nearest |
| fused pixel | IDWT sum rounded to nearest, clamped to 0..255 |

For 8-bit pixels the lowpass stays below 476 and the highpass below 468 in magnitude, so the
sum of two coefficients fits the multiplier's 16-bit input. The pre-adder relies on this and
cuts its result to 16 bits. Fusion adds the two coefficients and halves the sum (floor), so
the fused image is the average of the two inputs in the wavelet domain. The round-trip error stays
well under half a step. In the tests every fused pixel lies within two steps of the integer
pixel average (the bound they check), and the clamp never fires for valid pixel inputs. It is there for
arbitrary coefficient streams fed to `idwt97` directly.

## The multiplier (`booth_wallace_mult`)

**Booth encoder** (`booth_encoder`). This is radix-4 recoding. The overlapping multiplier bits
`{y[2i+1], y[2i], y[2i-1]}` (with `y[-1] = 0`) select a multiple of the multiplicand:

| y[i+1] y[i] y[i-1] | NEG | 2X | 1X | multiple |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | 0 | 0 | 1 | +X |
| 011 | 0 | 1 | 0 | +2X |
| 100 | 1 | 1 | 0 | -2X |
| 101, 110 | 1 | 0 | 1 | -X |
| 111 | 1 | 0 | 0 | 0 (NEG with a zero multiple) |

A 16-bit multiplier gives 8 digits, hence 8 encoders and 8 partial products.

**Partial product generator** (`booth_ppg`). Bit cell j picks `x[j]` for 1X or `x[j-1]` for
2X, then XORs the result with NEG. A row is 17 bits wide, because 2X of a 16-bit number needs
17. A negative row is therefore only one's complemented. The missing +1 is the NEG bit
itself: the NEG bits of all 8 digits form a ninth operand, with digit i's NEG at bit 2i. The
111 code gives an all-ones row plus 1, which is zero. Every row is sign-extended to 32 bits
and shifted left by 2i.

**Wallace tree** (`wallace_tree`, `csa`, `full_adder`). A carry save adder is a row of full
adders with no carry chain. The third operand enters where a ripple adder would take its
carry. The tree groups the operands of each level in threes and takes the carry vectors one
place left. The 9 operands reduce as 9 → 6 → 4 → 3 → 2, a depth of four full adders. The tree
is generic in the operand count N and the width W.

**Carry look-ahead adder** (`cla_adder`). This adds the final sum and carry vectors. Each bit
forms propagate `p = a ^ b` and generate `g = a & b`. Inside each 4-bit group every carry is
a two-level AND-OR of these terms and the group carry-in. The groups are chained through
their group generate and propagate.

The multiplier is purely combinational. In the filter it sits between the pre-add register
and the product register.

## Departures and choices

These points are this design's own. The source either does not fix them or gives them only
in outline:

* **Coefficients and formats.** The numeric values of the (9,7) filters, Q1.14 coefficients,
  Q11.4 wavelet coefficients, 8-bit pixels, and round-to-nearest everywhere.
* **Inverse transform.** The source only names an IDWT. Here it is the forward filter
  datapath with synthesis coefficients.
* **Fusion rule.** The source adds the two transforms. Here the sum is also halved, so the
  output stays in pixel range. The same rule is used for both bands.
* **Indexing of the figure's coefficient labels.** The highpass coefficients are read as
  g1..g4, with g1 at the centre. The tap at distance j then holds h_j or g_{j+1}.
* **Booth encoder count.** Four Booth encoders would not cover a 16-bit multiplier. This
  design uses one per partial product, eight in all.
* **Pipeline depth.** Five stages, from the register positions of the block diagram; the
  exact number of registers on each adder-tree path is an interpretation.
* **Interfaces and frame handling.** The valid/ready input, in_last, the flush/drop/clear
  sequencer, the clr input of the filters and the asynchronous active-low reset.
* **One dimension.** The transform is one-level and one-dimensional, applied to the raster
  stream. A two-dimensional transform is not part of this design.
* **Not modelled.** The resizing of the input images to 480 x 640, and the image sources and
  display.

**Resources.** The source reports 832 FPGA logic elements at 241 MHz for the multiplier alone,
and 2965 logic elements at 188 MHz for the whole fusion application. This RTL instantiates
all twelve filters as separate hardware: 60 multipliers, about 4,900 flip-flops. It is much
larger than 2965 logic elements. The source does not say how its figure was reached, for
example by sharing filters between planes. No FPGA timing or power has been measured for this
RTL.

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | Booth select type, widths, coefficient sets |
| `rtl/booth_encoder.sv`, `rtl/booth_ppg.sv` | Booth encoder, partial product row |
| `rtl/full_adder.sv`, `rtl/csa.sv`, `rtl/wallace_tree.sv` | carry save adder and the tree built from it |
| `rtl/cla_adder.sv` | carry look-ahead adder |
| `rtl/booth_wallace_mult.sv` | 16 x 16 signed multiplier |
| `rtl/fold97_filter.sv` | folded 9-tap filter with five multipliers |
| `rtl/dwt97.sv`, `rtl/idwt97.sv` | forward and inverse transform around the filter |
| `rtl/fusion.sv` | coefficient fusion |
| `rtl/image_fusion_top.sv` | the whole RGB fusion pipeline and its frame sequencer |
| `tb/wavelet_ref_pkg.sv` | integer reference model: direct 9-term sums, rounding, fusion, clamp |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `image_fusion_full_tb` |

Every testbench prints `TB_RESULT checks=N failures=M` and stops through a watchdog if
something hangs.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/dwt_pkg.sv tb/wavelet_ref_pkg.sv tb/image_fusion_top_tb.sv \
    --top-module image_fusion_top_tb
./obj_dir/Vimage_fusion_top_tb
```

Replace the testbench name to run another one. The packages must come first on the command
line.

* `image_fusion_top_tb` sends five frames of 37, 120, 1, 64 and 91 pixels with random idle
  cycles. The frames hold random texture, black and white patches and hard 0/255 edges. It
  checks every fused pixel exactly against the reference model and within two steps of the
  pixel average. It also checks the 11-cycle latency, the pixel count, `out_last`, the flush,
  the hold-off of the next frame and the restart between frames.
* `image_fusion_full_tb` runs one complete 480 x 640 RGB frame through the default
  configuration and checks all 921,600 fused values. It needs about half a minute, most of it
  compilation.
* The block testbenches cover the following:
  * the Booth table, exhaustively;
  * partial product rows under every select;
  * the 4-bit CSA, exhaustively;
  * the tree and the CLA, with random and carry-chain cases;
  * the multiplier, on corner and random values, and an 8 x 8 instance exhaustively;
  * the filter, the DWT and the IDWT against direct sums, with their 5-cycle latency;
  * IDWT reconstruction of a real pixel row to within one step;
  * both clamps.

The coefficient sets are parameters of `fold97_filter`, so another symmetric filter pair of
up to 9 taps can be tried by changing `dwt_pkg`. Wider pixels need the wavelet coefficient
range re-checked against the 16-bit multiplier input.
