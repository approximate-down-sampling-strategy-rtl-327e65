# Convolution accelerator with approximate max pooling

In a CNN, a 3x3 convolution followed by 2x2 max pooling computes four
convolution outputs and then throws three away. This accelerator avoids most
of that work. For each pooling patch it first *predicts* which of the four
outputs will be the maximum, using very cheap approximate arithmetic, and then
computes only that one output exactly with full 32-bit fixed-point
multiplies. The result is approximate: when the prediction is wrong, the
output is a convolution value from the patch other than its maximum. In
exchange, the accelerator does a quarter of the exact multiply-accumulates of
a conventional convolution + pooling engine with the same throughput.

The RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking
testbenches are in `tb/`.

## The approximate convolution

The prediction works on coded operands:

* **Ifmap values** are unsigned (they come out of a ReLU). The range
  `R_fmaps` is split into `D_fmaps` equal sub-ranges. A value gets code 0 if
  it is zero, otherwise the index of its sub-range plus one (1 to
  `D_fmaps`). With `R_fmaps` and `D_fmaps` both powers of two, the code is
  just the top bits of the value plus one (`ifmap_encoder`). Values above the
  range saturate to `D_fmaps`.
* **Filter coefficients** are coded offline, in software. The range
  `R_filter` is split into `D_filter` sub-ranges, half for each sign. A
  coefficient whose magnitude falls in sub-range `c` becomes `+2^c` or
  `-2^c`, and zero stays zero. With the defaults (`R_filter` = 2.0,
  `D_filter` = 8), magnitudes in [0, 0.25) give ±1, [0.25, 0.5) give ±2,
  [0.5, 0.75) give ±4, and 0.75 or more give ±8.

The approximate product is then the ifmap code shifted left by `c` and
negated for a negative coefficient. For each candidate window, an adder tree
sums the `k*k*T_M` shifted codes. These sums are added up over all input
channels, and the window with the largest sum wins. Ties go to the first
window in raster order (top-left, top-right, bottom-left, bottom-right).

The hardware does not encode filters. Each coefficient reaches it as a 4-bit
`wcode_t {nz, neg, exp[1:0]}` (see `accel_pkg`). `tb/tb_pkg.sv`
(`ref_wcode`) holds a reference encoder, written as a sub-range search.

## Two stages, N+1 rounds

The datapath has two stages. Both run at the same time and read the same
ifmap stream:

```
                 +--------------------------- Predict stage ---------------------------+
ifmap stream --> | ifmap  --> 16xT_M encoders -> shift -> 4 adder trees -(+)-> argmax --|--> index buffer
(T_M ch/cycle)   | buffer                                        Bank 0 <-'            |    (ping-pong)
                 |   |                                                                  |         |
                 |   +--> window select (winner, or bottom-right in bypass) <-----------|---------'
                 |            -> MAC array (T_M*k*k exact mults) -(+)-> ReLU -> out     |
                 |                                      Bank 1 <-'                      |
                 +------------------------------------------------ MAC stage ----------+
```

A layer with `M` input channels and `N` filters is processed in rounds. In
each round the whole ifmap volume is streamed once: `M/T_M` channel groups
(`cfg_groups`), each sent as `W_in x H_in` pixels of `T_M` channels, one
pixel per cycle.

* In round `r`, the **Predict stage** computes the approximate sums for
  filter `r`. It keeps the running sums in **Bank 0**, one word of four sums
  per pooling patch. In the last group it writes the winner index
  `(r_m, c_m)` of every patch into the index buffer.
* In the same round, the **MAC stage** computes filter `r-1`. For every
  patch it reads the winner that the Predict stage found in round `r-1`.
  It picks that 3x3 window from the same patch region and multiplies it
  exactly. The partial result is kept in **Bank 1**, one word per pooled
  output. In the last group it adds the final group, applies the ReLU and
  sends the value out.

So `N` filters take `N+1` rounds. The ifmaps are read only once more than
by a conventional design. Round 0 only predicts and round `N` only computes.
The index buffer has two halves, and they swap every round. The Predict stage
writes half `r mod 2` while the MAC stage reads the other half.

With `cfg_pool = 0` (**bypass**), there is no prediction. A layer takes `N`
rounds. Each round computes one filter exactly at every convolution output:
the MAC stage uses the bottom-right 3x3 of the region, which is the window
that ends at the newest pixel.

### What one filter beat carries

The filter input (`flt_*`) takes one beat per (round, group), in order. A
beat carries two slices side by side:

* the original coefficients for the MAC stage (filter `r-1`, or `r` in
  bypass);
* the coded coefficients for the Predict stage (filter `r`).

Whatever a stage does not use in the first or last round is ignored. Beats
go into `filter_buffer`, which has room for one beat besides the one in use.
The next group's beat can therefore load while the current group streams.

## Pipeline and timing

```
pixel accepted -> ifmap buffer region + event (1 cycle)
               -> stage A: codes, shifts, adder trees; Bank 0 / index reads issued
               -> stage B: Predict compare + Bank 0 write / winner write;
                           MAC window select + multipliers; Bank 1 read issued
               -> stage C: accumulate; Bank 1 write, or output register
```

* The ifmap buffer (`ifmap_buffer`) holds `k+kP-2 = 3` previous rows in a
  line memory with one word per column. It also holds a 4x4 register window
  that shifts one column per pixel.
* A **pooling event** fires when the newest pixel completes a 2x2 patch of
  conv outputs, which happens on every other pixel of every other row. The
  window then holds the full 4x4 ifmap region of that patch.
* A **conv event** fires when the newest pixel completes a 3x3 window
  (bypass mode uses these).
* The output is a single register with valid/ready. While an output waits
  (`out_ready = 0`), the whole pipeline holds (`adv = 0`), and so do the
  input and the memories.
* Between channel groups the controller waits for the pipeline to empty,
  because the filter slice and the group flags must not change under a patch
  that is still in flight. It then takes the next filter beat.

A group therefore costs `W_in x H_in` cycles plus about 6. A layer costs
`(N+1) x M/T_M x (W_in x H_in + ~6)` cycles when the streams never stall. For
example, a 226x226 layer with 2 groups and 4 filters takes 510,760 pixel
cycles plus 60.

## Data formats and configuration

| item | format |
|---|---|
| ifmap (`in_pix`), ofmap (`out_data`) | unsigned 32-bit, Q16.16 |
| original coefficient (`flt_wgt`) | signed 32-bit, Q16.16 |
| coded coefficient (`flt_code`) | `{nz, neg, exp[1:0]}` |
| exact group sum | full-precision products summed, `>>> 16`, wrapped to 32 bits, accumulated in 32 bits |
| approximate sum | 24-bit signed (Bank 0) |

Convolutions are "valid": a 3x3 window never reaches outside the streamed
ifmap. A layer that needs zero padding gets it as part of the stream.
`cfg_w`/`cfg_h` are the padded size, so a 224x224 VGG16 layer is streamed as
226x226 and gives 112x112 pooled outputs. Pooling uses stride 2. An odd last
conv row or column is dropped.

Outputs come in raster order, one filter after another. Each output is tagged
with `out_filter` and a position: the pooled `(y, x)`, or the conv `(y, x)`
in bypass.

Top-level parameters (defaults in brackets): `T_M` [4], `K` [3], `KP` [2],
`D_FMAPS` [64], `FMAP_RANGE_LOG2` [24, i.e. R_fmaps = 256.0], `PRED_W` [24],
`MAX_W`/`MAX_H` [226], `MAX_GROUPS` [128], `MAX_FILTERS` [512].
`accel_pkg` fixes `DATA_W` = 32, `FRAC_W` = 16, `D_FILTER` = 8 and
`R_filter` = 2.0. `D_FMAPS` trades accuracy for power: fewer sub-ranges
mean narrower codes and adders, but predictions that miss more often. The
default, 64, is the finest coding.

## Memories

| memory | default size | contents |
|---|---|---|
| Bank 0 (`bank0`) | 12,544 x 96 bits | 4 approximate sums per pooling patch |
| Bank 1 (`bank1`) | 12,544 x 32 bits | running exact sum of the winning window, per pooled output |
| index buffer (`index_buffer`) | 2 x 12,544 x 2 bits | winners of the previous and current round |
| line buffer (in `ifmap_buffer`) | 226 x 384 bits | 3 rows x 4 channels |

Depths cover a 224x224 conv output. All are plain arrays with synchronous
read (except the line buffer) and no reset, ready to be mapped to SRAM
macros. Bank 1 serves bypass layers too: there it is addressed per conv
output, so a bypass layer with more than one channel group may have at most
12,544 conv outputs. An assertion checks this. In VGG16 the only larger
layer without pooling is the first one, and it has a single group (3
channels).

## Design choices beyond the method

The method fixes the coding, the shift-based approximate products, the
argmax over the patch, the two concurrent stages with N+1 ifmap reads, Bank
0 / Bank 1, parallel loading of original and coded filters, and the bypass
path. These points are choices of this implementation:

* Q16.16 fixed point, `R_fmaps` = 256.0, and a 24-bit approximate sum.
* Truncating rescale per channel group, with no saturation and no bias. A
  ReLU at the output can be switched off (`cfg_relu`).
* Stride-2 pooling, and "valid" convolution with any padding streamed in.
* The ping-pong index buffer, the draining between groups, the two-entry
  filter buffer, and the single-register output stage.
* Each ifmap pixel is coded once and shared by the four overlapping windows
  (16 x T_M encoders rather than 36 x T_M). The result is the same.
* The layer size is configured at run time (`start` + `cfg_*`).

The convolution engine does not handle fully connected layers, and the
accelerator has no interface to DRAM. Its three streams stand in for the
external memory, which holds ifmaps, original and coded filters, and
ofmaps.

## Where this differs from the published method

* The ifmap range here is a power of two (`R_fmaps` = 256.0), so the
  encoder is a bit slice plus one. A range such as 255 would need a
  comparator per sub-range boundary.
* `D_fmaps` is a build-time parameter. It is not switched per layer at run
  time.
* Bank 0 holds one word of four approximate sums per pooling patch. That is
  the same amount of data as one short word per conv output, but it lets one
  read and one write per patch serve all four windows.
* The Predict stage codes each pixel of the 4x4 patch region once, instead of
  coding each of the four 3x3 windows separately.
* Only `k_P` = 2 with stride 2 has been simulated. `KP` is a parameter, but
  other values are untested.

## Verification

Each module has a testbench, `tb/tb_<module>.sv`, that compares against
references written independently in `tb/tb_pkg.sv` or in the testbench
itself:

* `tb_ifmap_encoder`: sub-range search, both at the defaults and at a
  4-level, 0..255 example configuration.
* `tb_predict`: approximate sums and argmax over 3 groups, with stalls.
* `tb_bank0`, `tb_bank1`: read/write behaviour of the memories.
* `tb_mac_array`: 64-bit product sums.
* `tb_ifmap_buffer`: patch and window contents and addresses for several
  image sizes.
* `tb_filter_buffer`: slice order and back-pressure.
* `tb_controller`: round/group sequence, per-group flags and layer time.

`tb_approx_pool_accel` runs five small layers end to end: pooled and bypass,
one and several groups, with random input gaps, late filter beats and output
back-pressure. It checks every output value and tag, the output count and
the layer time. It also requires each mechanism to occur at least once:
prediction, both bank accumulations, bypass, stall, bubble, filter wait,
ReLU clamp, both index halves, and both stages busy at once.

`tb_approx_pool_accel_full` runs the top at its default parameters through
one pooled VGG16-sized layer: 226x226 padded input, 8 channels, 4 filters,
50,176 outputs. Its input is a smooth synthetic image. On that image the
predicted window is the true max-pooling window for about 89% of the
outputs. It then runs a CIFAR-sized pooled layer (34x34 padded input, 8
channels, 4 filters) with random input gaps and output back-pressure, and
two layers without pooling: 226x226 with one group of 4 channels and 2 filters (the
shape of the first VGG16 layer), and 114x114 with 8 channels, whose 12,544
conv outputs use every word of Bank 1. On the
uniformly random data of the small tests the hit rate is near chance,
because values far beyond the coding range dominate the exact sums.

`tb_lenet5_layers` builds the top with `K = 5` and `T_M = 2`, the kernel
size and parallelism of LeNet-5, and with the coarsest ifmap coding,
`D_FMAPS = 4`. It runs its two convolution + pooling
layers back to back: 32x32x1 with 6 filters, then the 14x14x6 pooled result
with 16 filters. The outputs of the first layer are fed to the second, and
every output is checked against a software model of the same approximation.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_approx_pool_accel rtl/accel_pkg.sv tb/tb_pkg.sv \
    tb/tb_approx_pool_accel.sv
./obj_dir/Vtb_approx_pool_accel
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. The full-size
test takes a few seconds.
