# Line-based multi-scale Retinex for HDTV, with a line-at-a-time co-simulation link

Multi-scale Retinex (MSR) enhances a picture by dividing each pixel by an
estimate of the local illumination: `R = log I - log Ibar`. `Ibar` is a blend of
Gaussian blurs at several scales. Done naively, each scale of an HDTV frame
needs a full-frame blur and interim frame memories. This RTL instead builds
`Ibar` with a pyramid of 2x down-sampling and 2x up-sampling filters, all in
raster order. Each filter stage needs only a few line memories, and nothing in
the design stores a frame.

The design also includes the FPGA end of a Simulink/FPGA co-simulation link.
The PC sends the picture one line at a time into a one-line input memory and
fetches results from a one-line output memory. This lets an HDTV design be
emulated on an FPGA that could never hold a frame. A monitoring mode records
the IP core's output on every clock, which makes processing delays visible.

The structure comes from the paper "Application on the Hardware/Software
Co-simulator; Implementation of Multi-stage, Multi-rate 2-D filter". Where that
description stops, this RTL makes its own choices. Each one is listed under
"Design choices" below.

## Data flow

```
             +--------------------- delay FIFO (12 lines) ----------------------------+
             |                                                                         v
 I (WxH) --fork--> DOWN1 --fork--> DOWN2 --fork--> DOWN3 --> w3 --> UP3 --(+)--> UP2 --(+)--> UP1 --> Ibar --> log I - log Ibar --> R
                   (W/2)   |       (W/4)   |       (W/8)                  ^             ^
                           |               +-- FIFO (8 lines) --> w2 -----+             |
                           +------------------ FIFO (8 lines) --> w1 -------------------+
```

* `DOWN` = `lpf_down`: X-Y separable 9-tap Gaussian with 2x2 decimation.
* `UP` = `lpf_up`: 2x2 polyphase interpolator with the same kernel.
* `w1..w3` = `weight_mul`: the scale weights omega_n, which sum to one.
  Default values are 85, 85 and 86 (in 1/256).
* `(+)` = `stream_add`.

There are three scales: D1 is 960x540, D2 is 480x270 and D3 is 240x135.
`Ibar` comes back at 1920x1080. Every stage passes pixels on a valid/ready
stream in raster order.

`msr_core` is this whole chain. `cosim_top` puts `cosim_bridge` (the host link)
in front of one `msr_core` at 1920x1080. Beside it, with its own stream ports,
it has the block-based path: `block_avg4x4` feeds a second `msr_core` at
480x270.

## The line-based filters

All filters use the 9-tap kernel `h = 1 8 28 56 70 56 28 8 1` (the parameter
`COEF`, default `msr_pkg::GAUSS9`). Its sum is 256. Its even taps and its odd
taps each sum to 128, which gives every polyphase branch an exact unit DC gain.

**Down-sampling (`fir_x_down`, then `fir_y_down`).** The horizontal filter is
polyphase. The line is split into even and odd samples. The even taps act on
the odd samples, the odd taps act on the even samples, and the two partial sums
are added. Only the output samples that survive decimation are computed, at
half the pixel rate:

    y[m] = round( sum_k h[k] * x[2m+1-k] / 256 )

Because the line is halved before the vertical filter, that filter's eight line
delays (`line_delay`) are only half a line long (960 words). The vertical
filter is one multiply-and-add over the nine lines of a column. It computes
only on odd lines (`y[q] = sum_k h[k] x[2q+1-k]`); even lines only fill the
delays. Each direction rounds to 8 bits. With `PACKED_DELAYS = 1`,
`fir_y_down` keeps the eight delays in one memory of 64-bit words instead of
eight 8-bit memories, which gives the same result with fewer block RAMs.

**Up-sampling (`lpf_up`).** This is zero-stuffed 2x interpolation computed
without the zeros:

    z[2n]   = sum_{i=0..4} h[2i]   x[n-i] / 128
    z[2n+1] = sum_{i=0..3} h[2i+1] x[n-i] / 128

The vertical direction comes first. While low-rate line `q` arrives, four line
delays supply the column history. The even-phase result (output line `2q`) goes
straight to the horizontal stage. The odd-phase result (output line `2q+1`) is
parked in a one-line buffer and replayed once line `q` is complete. The
horizontal stage turns each sample into two pixels, so the output runs at one
pixel per cycle. The input is taken at most every other cycle, and not at all
during the replay.

**Borders and delay.** Every filter is causal. An output leaves as soon as its
newest input sample has arrived, and samples above or left of the frame count
as zero. No stage needs a flush at the right or bottom edge. The last output
pixel of a frame follows the last input pixel within about one line: the final
up-sampler still has to replay its last odd-phase line.

The price is a spatial shift: each scale is displaced by the filters'
processing delay. That delay is exactly what the monitoring mode is meant to
show.

A scale with an odd line count (135 lines at HDTV, or 5 in the reduced tests)
follows two rules:

* the down filter emits a last line, using a zero line below the frame;
* the up filter's `H_OUT` parameter drops the surplus odd-phase line.

## Delay adjustment between scales

This is the least obvious part. The fine scale D2 reaches its adder long before
`UP3(w3 * D3)` does, because the coarse copy must go two octaves further down
and come back. The same holds for D1 against `UP2`, and for `I` itself against
`Ibar`. Each of these feed-forward paths holds its samples in a `sync_fifo`.
Each adder (and the log stage) joins its two streams sample by sample, so the
n-th sample of one is always combined with the n-th sample of the other. The
delay never has to be computed.

What must be right is the FIFO depth. If a FIFO is too small, it fills up and
stops its fork, the fork stops the input, and the coarse path never receives
the samples it is waiting for. The pipeline then stalls for good.

On HDTV frames the peak fill levels were:

| FIFO | Peak fill | Default depth |
|---|---|---|
| `I` | 7.1 lines | 12 lines (`FIFO_I_LINES`) |
| D1 | 3.1 lines | 8 lines (`FIFO_D1_LINES`) |
| D2 | 1.1 lines | 8 lines (`FIFO_D2_LINES`) |

Depths are given in lines of the scale held, so they scale with the picture
width. Keep them above these levels if you change the kernel length or the
pipeline.

## Retinex output (`ssr_log`)

`log2_approx` returns log2 of a pixel in Q3.5: the leading-one position, then
the five bits after it as a linear fraction. Zero is treated as one. The output
is:

    R = clamp(128 + 2 * (log2 I - log2 Ibar) * 32, 0, 255)

Equal contrast maps to mid-grey, and +-2 octaves fill the 8-bit range. `OFFSET`
and `GAIN` are parameters.

## Host link (`cosim_bridge`)

* **Input memory.** Takes `BLOCK_WORDS` host writes. That is one line (1920) by
  default; `cosim_top`'s `BLOCK_LINES` sets more lines per block. It takes the
  writes on `h_wr_valid`/`h_wr_ready`. When it is full it starts streaming into the IP
  core by itself (`block_start` pulses), and it accepts writes again once the
  block is out.
* **Output memory.** Collects IP results. When it holds a block, `h_notify`
  rises and the IP core is held off (`ip_out_ready` low). The host then reads
  the words in order: `h_rd_data` shows the next word, and `h_rd_en` advances.
* **Lag.** The filter pyramid's output lags its input by up to about eight
  lines. The host must therefore keep writing lines while it waits for
  notifications; the two host activities are independent.
* **Monitoring mode (`h_monitor = 1`).** From the cycle a block starts into the
  IP core, the output memory stores the IP output on every clock. A cycle
  without a valid output stores 0. The IP core is never held off in this mode,
  and results that find the memory full are lost. The number of leading zero
  words is therefore the processing delay in clocks. Change `h_monitor` only
  while the link is idle.

Each memory is one line of 8-bit words (15,360 bits), so it fits one 18 kbit
block RAM.

## Block-based path

`block_avg4x4` averages each 4x4 block, with rounding. It keeps a one-line
buffer of W/4 partial sums and outputs on every fourth line. The resulting
480x270 thumbnail runs through its own `msr_core`: 1/16 of the pixel work, at
the 4x4 resolution a later segmentation stage needs.

## Design choices

* **Kernel values, weights, log and normalisation.** The source gives the
  kernel length (a 9x9 window) and requires the weights to sum to one. The
  coefficients, the weight values, the log approximation and the 0..255
  normalisation are this design's own choices.
* **Order of the sum and the log.** The block diagram blends the illuminations
  of the scales and applies one log stage, and that is what is built. The
  algebraic MSR formula instead blends per-scale Retinex outputs.
* **Vertical polyphase.** The source's 2-D polyphase figure also splits lines
  into phases. Here the vertical filter simply computes only the kept lines,
  which saves the same work.
* **Up-sampling filter insides.** The source draws only the down-sampling
  polyphase filter. The up-sampling insides are this design's own.
* **Delay adjustment.** The source fixes the delay between scales by observing
  it. Here FIFOs with order-based pairing handle it automatically. The spatial
  shift caused by the causal filters is not corrected.
* **Handshakes and reset.** Valid/ready streams, a sequential host bus and a
  synchronous active-low reset are this design's own choices.
* **Memory reads.** Line memories and FIFOs read asynchronously
  (read-before-write). A block-RAM mapping with registered reads needs one
  cycle of read-ahead in `line_delay`, `sync_fifo`, `lpf_up` and
  `cosim_bridge`.
* **Colour.** One colour component is processed. Instantiate one path per
  component.
* **Block-based path connection.** How the block-based path connects to the
  host link is not specified, so it has plain stream ports.
* **Resource use.** The source reports 30 DSP multipliers and 32 block RAMs for
  its filters. This RTL uses constant-coefficient multipliers, and its memory
  is 56,400 8-bit words per `msr_core` at HDTV size, including the delay FIFOs.

## Not built

* **Two-FPGA split.** The source's experiment splits the filters over two
  FPGAs, which is not built.
* **Box-filter delay test.** The source's delay test uses a box kernel of 1/M
  per tap. `COEF` can be set to a box kernel, but with the fixed division by
  256 it is exact only when the taps sum to 256.

## Files

* `rtl/msr_pkg.sv`: pixel and kernel types, the default kernel, rounding.
* `rtl/line_delay.sv`, `rtl/sync_fifo.sv`, `rtl/stream_fork.sv`: storage and
  plumbing.
* `rtl/fir_x_down.sv`, `rtl/fir_y_down.sv`, `rtl/lpf_down.sv`,
  `rtl/lpf_up.sv`: the filters.
* `rtl/weight_mul.sv`, `rtl/stream_add.sv`, `rtl/log2_approx.sv`,
  `rtl/ssr_log.sv`: scale blending and the Retinex output.
* `rtl/msr_core.sv`: the pyramid.
* `rtl/cosim_bridge.sv`: the host link.
* `rtl/block_avg4x4.sv`: the thumbnail averager.
* `rtl/cosim_top.sv`: the top.
* `tb/msr_ref_pkg.sv`: a reference model written from the equations above, not
  from the hardware structure. The testbenches compare every output pixel
  against it.
* `tb/tb_<module>.sv`: one self-checking testbench per module, with random
  valid/ready gaps. Where a rate applies, they also check full-rate throughput
  with no stalls.
* `tb/tb_cosim_top.sv`: a 64x40 end-to-end run of two frames through the host
  link (with 2-line blocks) and the block path. It also checks that each mechanism occurs: automatic
  start, notification, the output memory holding the core off, the host
  waiting, FIFO use, odd scales and monitoring mode.
* `tb/tb_marker_delay.sv`: the marker-band delay measurement. The frame starts
  with 8 black lines, then 8 white lines. The test finds where the white step
  lands in `Ibar`: at a 64x48 picture it is 9 lines lower. Both `Ibar` and the
  output are checked pixel by pixel.
* `tb/tb_cosim_top_full.sv`: the same test with every parameter at its default:
  one 1920x1080 frame, in 1-line blocks. It takes about 15 s.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cosim_top \
  -y rtl -y tb +libext+.sv rtl/msr_pkg.sv tb/msr_ref_pkg.sv tb/tb_cosim_top.sv
./obj_dir/Vtb_cosim_top
```

Uninitialised memories are harmless: the filters mask lines that have not been
written yet.

To change the picture size, set `LINE_W` and `FRAME_H` on `cosim_top`, or `W`
and `H` on `msr_core`. `W` must be a multiple of 8, and `H` must be at least 8.
For the top, `LINE_W` must be a multiple of 32 and `FRAME_H` a multiple of 4 and
at least 32, because of the thumbnail path. `FRAME_H` must also be a multiple of
`BLOCK_LINES`.
