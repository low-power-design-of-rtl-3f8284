# Approximate bilateral filter with flip-flop based clock gating

A bilateral filter removes noise from an image without blurring its edges.
Each output pixel is a weighted mean of its neighbourhood. A neighbour's weight
is the product of two terms. The spatial weight falls off with distance from
the centre. The range weight falls off with the difference in brightness from
the centre pixel. Across an edge the intensity differs a lot, so the range
weight drops to nearly zero and the far side of the edge is not averaged in.

The range weight is normally a Gaussian of the intensity difference, which is
the expensive part in hardware. Here it is replaced by an eight-entry table
indexed by the top three bits of the difference. The filter itself is a small
combinational data path feeding an 8-bit output register. That register, and
the one-bit done flag, are clocked through a flip-flop based clock gate. When
the filter is not needed, its enable input is dropped and those flip-flops
receive no clock edges at all.

The whole design holds ten flip-flops: eight for the result, one for the done
flag and one in the clock gate. It stores no image. The 3x3 neighbourhood of
each pixel comes in on input ports, one pixel per clock.

## Block structure

```
            clk, enable ──► flipflop_based_clk ──gated_clk──┐
                                                            │
 pixel, row, col ──► area_detect ──area──┐                  ▼
                                         ▼             output_register ──► data_filtered
 window (3x3) ─────────────► filter_processing_unit ──► (load = write & start)
                              ├ case on area → tap mask
                              ├ bf_filter_row  (top row)
                              ├ bf_filter_row  (centre row)
                              ├ bf_filter_row  (bottom row)
                              └ sum and divide
 pixel, row, col, write, start ──────────────────────► done_logic ──► done
                                                      (gated_clk)
```

| File | Contents |
|---|---|
| `rtl/bf_pkg.sv` | Area type, weight widths, spatial weights, range-weight table |
| `rtl/flipflop_based_clk.sv` | Clock gate: enable flip-flop and AND gate |
| `rtl/area_detect.sv` | Pixel index → one of nine image areas |
| `rtl/bf_filter_row.sv` | One filter stage: weights and partial sums for one window row |
| `rtl/filter_processing_unit.sv` | Case on area, three filter stages, normalisation |
| `rtl/output_register.sv` | 8-bit result register with clock enable |
| `rtl/done_logic.sv` | End-of-image flag |
| `rtl/bilateral_filter.sv` | Top level |

## Clock gating

`flipflop_based_clk` is a D flip-flop followed by a two-input AND gate. The
flip-flop registers `enable` and its output `q_out` is ANDed with `clk` to give
`gated_clk`.

The flip-flop samples `enable` on the **falling** edge of `clk`. So `q_out`
only changes while `clk` is low, and the AND gate cannot cut a high phase
short. With a rising-edge flip-flop, `q_out` could fall while `clk` is high and
leave a runt pulse on the gated clock. The falling edge is this design's
choice: the source material shows a flip-flop and an AND gate but does not say
which edge the flip-flop uses.

What this means for a user:

- `enable` must be stable at the falling edge before the rising edge it should
  pass or block. In practice: change it together with the other inputs, just
  after a rising edge.
- After `reset`, `q_out` is 0 and the gate is closed. The first edge that gets
  through is the rising edge after the first falling edge that sees `enable`
  high.
- While the gate is closed, writes are ignored. The output register holds its
  value and `done` does not change.
- `clk_active` shows `q_out`, so a system can see whether the filter is
  currently being clocked.

On an FPGA, a clock made from logic like this gets routed through general
fabric unless the tools map it to a clock buffer with an enable (for example
BUFGCE). For an ASIC, replace the flip-flop and gate with a library
clock-gating cell. The RTL keeps the flip-flop and AND structure because that
structure is the subject of the design.

## Pixel interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | asynchronous, active high; clears the gate, the result and done |
| `enable` | in | 1 | clock-gating control, sampled on the falling edge of `clk` |
| `start` | in | 1 | level: high for the whole image; dropping it clears `done` |
| `write` | in | 1 | this cycle's pixel is valid |
| `pixel` | in | 32 | raster index of the pixel (`y*col + x`) |
| `row`, `col` | in | 32 | image height and width |
| `window` | in | 3x3x8 | neighbourhood; `window[r][c]` is at offset (r-1, c-1), `window[1][1]` is the pixel |
| `data_filtered` | out | 8 | filtered pixel |
| `done` | out | 1 | the last pixel of the image has been filtered |
| `clk_active` | out | 1 | the clock gate is open |

The host streams the pixels in raster order, one per clock, with `start` and
`write` high and `enable` high. On each rising edge of the gated clock where
`write && start` is true, the result for the presented pixel is loaded into
`data_filtered`. So the result appears one clock after its pixel was
presented, and the throughput is one pixel per clock.

`done` rises on the same edge that loads the result of pixel `row*col - 1`. It
stays high until `start` is dropped. The host can hold `write` low at any
cycle to insert a bubble.

The host supplies the neighbourhood, so it needs line buffers of its own (two
image lines). Taps that fall outside the image may hold any value. The filter
ignores them (see the next section).

## Area detection and image borders

For a pixel on the image border, part of its 3x3 window lies outside the
image. `area_detect` works out the pixel's column `x = pixel mod col` and row
`y = pixel div col` from its index. From those it names one of nine areas:
four corners, four borders, or the interior.

`filter_processing_unit` turns the area into a 3x3 mask with a `case`
statement. For example, a pixel on the top border loses the window's top row,
and a top-left corner pixel loses the top row and the left column. Masked taps
add nothing to either sum. So a border pixel is the weighted mean of only those
neighbours that exist, with no padding or replication.

The areas are defined for images of at least 2x2 pixels. The divider and
modulo in `area_detect` are 32-bit. They are the largest logic in the design
and set its longest path. An image width that is a power of two, or a
host-side column counter, would remove them.

## Filter arithmetic

For each valid tap *i* with intensity *I_i* and centre intensity *I_c*:

- **Spatial weight** `w_s = 2^(2 - |dy| - |dx|)`: 4 at the centre, 2 at the
  four edge neighbours, 1 at the corners.
- **Range weight** from the table in `bf_pkg::range_weight`, indexed by
  `k = |I_i - I_c| >> 5` (the top three bits of the difference):
  `w_r(k) = round(16 * exp(-(32k)^2 / (2 * 64^2)))`, that is
  16, 14, 10, 5, 2, 1, 0, 0. This is a Gaussian range kernel with
  sigma_r = 64 grey levels, sampled at the bottom of each 32-level bin.
  Neighbours 192 or more levels from the centre get weight 0.
- **Weight** `w = w_s * w_r`, at most 64 (7 bits).

Each `bf_filter_row` handles one row of the window. It forms `sum(w)` (at most
128) and `sum(w*I)` for its three taps. The processing unit adds the three
partial sums and divides, rounding to nearest:

```
data = (sum(w*I) + sum(w)/2) / sum(w)
```

The centre tap always takes part with weight 4*16 = 64. So the divisor is never
zero, and the result always lies between the smallest and the largest valid
tap. The kernels, sigma_r and the 3-bit quantisation are this design's
choices. The source material says only that the filter coefficients are preset
and that the range kernel is approximated.

To change the filter:

- Edit the table in `bf_pkg.sv` to change the range kernel. Keep the entry for
  bin 0 non-zero, so the centre always counts.
- Change the `WS_*` constants to change the spatial kernel. Widen `W_W` and the
  `den`/`num` widths if the weights grow.
- `DATA_W` sets the intensity width. The range table always uses the top three
  bits of the difference.

## Verification

Every module has a self-checking testbench in `tb/`. Each one computes its
expected values independently. `tb/bf_ref_pkg.sv` evaluates the range kernel
from its exponential formula with real arithmetic. It decides which taps lie
inside the image from the pixel's coordinates, not from the area code.

| Testbench | What it checks |
|---|---|
| `tb_flipflop_based_clk` | `q_out` follows `enable` at falling edges; `gated_clk = clk & q_out`; every gated pulse is a full half period; edge count; asynchronous reset |
| `tb_area_detect` | every position of 2x2, 3x5, 7x4, 16x16, 256x256 and 33x640 images |
| `tb_bf_filter_row` | both kinds of stage, every range bin, 5,000 random cases |
| `tb_filter_processing_unit` | all nine areas on noise, on noisy step edges and on extremes; taps outside the image must not change the result |
| `tb_output_register` | load and hold, asynchronous reset |
| `tb_done_logic` | done only after the last index, held while `start` is high, cleared by dropping it, writes ignored while `start` is low |
| `tb_bilateral_filter` | full 256x256 noisy test image at default parameters, then a 5x7 image. Every result is checked one clock after its pixel; the clock gate is closed for about 1,300 random cycles with a write offered each time; idle cycles; all nine areas; `done` timing; cycle count = pixels + bubbles |

`tb_denoise_samples` is a denoising workload: two 256x256 scenes, discs on a
shaded background and bars, stripes and fine diagonal texture, with grain noise
of about 25 grey levels rms (noisy PSNR about 19.9 dB). Every result is checked
against the reference, and both PSNR and SNR must improve. A typical run gives
27.1 dB and 25.8 dB PSNR after filtering.

The end-to-end test draws a ramp with two discs and a bar, adds ±20 levels of
uniform noise, and reports the PSNR of the noisy and the filtered image
against the clean one. It requires at least 3 dB of improvement. A typical run
gives 26.7 dB noisy and 34.2 dB filtered.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bf_pkg.sv tb/bf_ref_pkg.sv tb/tb_bilateral_filter.sv \
    --top-module tb_bilateral_filter
./obj_dir/Vtb_bilateral_filter
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The top
level also asserts that every pixel index written lies inside the image
(`--assert` enables it). Each also has
a watchdog that counts a failure and stops the run if it hangs. The full-size
run takes a few seconds.

## How far this follows its source, and what is new

Taken from the published design:

- the block structure: flip-flop based clock gating, area detection, a case
  statement on the area, three identical filter stages, output register, done
  logic
- the flip-flop and AND-gate clock gate
- the 8-bit result
- the 32-bit pixel index and image size (256x256 in its simulation)
- the names of the control signals
- the fact that the range kernel is the part that is approximated

Synthesis of this RTL gives the same flip-flop count as the published design:
nine in the filter and one in the clock gate.

This design's own choices:

- the falling-edge gating flip-flop
- a 3x3 window supplied on ports
- the meaning of `start` (a level for the whole image) and `write` (per
  pixel)
- the reading of "area" as the pixel's position, with masking of taps outside
  the image
- giving each of the three filter stages one window row
- both kernels and the range table
- the rounding divider
- the reset behaviour

Not provided:

- the host-side conversion of images to and from pixel files
- the serial or parallel link that carries pixels to the FPGA

The published power figures (about a third less power with gating, same area
and delay) and its reported PSNR values depend on its own images, device and
tool flow. This RTL does not claim to reproduce them.
