# Adaptive contrast stretching for a video stream, without a frame buffer

Video from a camera in poor light, or under water, often uses only part of
the 8-bit luminance range: the picture looks washed out, dark or flat.
Contrast stretching fixes this by mapping the range that the pixels really
occupy, `[h_low, h_high]`, linearly onto `[0, 255]`:

    p' = (p - h_low) * 255 / (h_high - h_low)

The difficulty in hardware is that `h_low` and `h_high` depend on the frame
being processed (normally on its histogram, with 1 % of the pixels at each
end thrown away as outliers), and the hardware sees each pixel once, in
raster order, as it streams past. This core solves that without storing a
frame or a histogram:

* **Limits come from the previous frame.** While frame *n* streams through,
  it is stretched with the limits found on frame *n-1*, and it is measured
  to produce the limits for frame *n+1*. Consecutive video frames are
  nearly identical, so the limits are almost right.
* **The limits are tracked, not computed.** Two counters count the pixels
  darker than `h_low` and brighter than `h_high`. At each new frame, each
  limit moves by one grey level towards the point where exactly 1 % of the
  frame lies outside it. Four registers (two limits, two counters) are the
  whole state.
* **No divider.** The division by `h_high - h_low` becomes a multiplication
  by a reciprocal read from a 256-entry table.

The result is a one-pixel-per-clock pipeline: at 100 MHz it takes 640 x 480
frames at up to 325 frames/s, and 1920 x 1080 frames at 48 frames/s (with
the frame size changed, see *Parameters and sizes*).

The algorithm and its structure are those of the contrast stretching core
described in *Rapid Prototyping of Image Contrast Enhancement Hardware
Accelerator on FPGAs Using High-Level Synthesis Tools*, which was built in a
model-based flow. This is an independent hand-written SystemVerilog
implementation. The points where it had to fill gaps are listed under
*Choices made here*.

## Structure

```
contrast_stretch_ip            AXI4-Stream video in/out, flow control
 └─ contrast_stretch_hw        pixel-stream core
     ├─ rgb2intensity          RGB -> 8-bit luminance (2 cycles)
     ├─ adaptive_limits        h_low / h_high tracker (no latency)
     └─ stretch_eq1            (p - h_low) * 255 * 1/(h_high - h_low) (4 cycles)
         └─ recip_lut          1/d table, 256 x 16 bit, 1.15 fixed point
cs_pkg                         pixel_ctrl_t and shared widths
```

`pixel_ctrl_t` is the control bundle that travels beside every pixel:
`hStart`, `hEnd` (first/last pixel of a line), `vStart`, `vEnd` (first/last
pixel of a frame) and `valid`. Every pipeline stage delays the bundle with its
pixel, so a stage never needs to know where it is in the frame.

## Tracking the limits (`adaptive_limits`)

This is the part that needs the most care to understand.

**Per frame.** With `N = FRAME_W * FRAME_H` pixels and outlier fractions of
1 %, the target is `T = N / 100` (3072 for 640 x 480). During a frame,
`cnt_lo` counts valid pixels with `y < h_low` and `cnt_hi` counts pixels
with `y > h_high`, each compared with the limits in force for that frame.
At the first pixel of the next frame:

| count      | `h_low`        | `h_high`        |
|------------|----------------|-----------------|
| `< T`      | `+1` (too few below: move up)  | `-1` (too few above: move down) |
| `> T`      | `-1`           | `+1`            |
| `== T`     | unchanged      | unchanged       |

Limits saturate at 0 and 255. After reset `h_low = 0`, `h_high = 255`. The
first frame after reset is only measured.

**When the update happens.** The update is made on the pixel that carries
`vStart` with `valid`. That pixel must already be stretched, and counted,
with the new limits. So `h_low_o`/`h_high_o` are combinational: on that
pixel they show the updated values, computed from the counters and the old
limits, and the registers take them at the clock edge. On every other
pixel they show the registers. `stretch_eq1` samples the limits together
with the pixel, so a frame is stretched with one consistent pair of limits.

**What to expect from it.**
* The limits move one grey level per frame. A change of scene needs as many
  frames as the limit has to travel: from the reset values, reaching a
  limit at 100 takes 100 frames (3 s at 30 frames/s).
* The "hold" case needs the count to equal `T` exactly. In natural images
  that is rare, so in steady state a limit usually toggles by one level
  between two frames. This is as specified. It changes the output by at
  most about one code per toggle.
* On a nearly uniform frame, `h_low` can rise past `h_high`. The stretch
  then degenerates into a threshold at `h_low` (see below) until the
  content changes.
* `P1_PCT` and `P2_PCT` set the outlier fractions in whole percent.
  `STEP` sets the step size.

## The stretch datapath (`stretch_eq1`, `recip_lut`)

| stage | work |
|-------|------|
| 1 | `out1 = 255 * (p - h_low)` as a signed 18-bit value. `out2 = h_high - h_low`, or 0 if the limits have met or crossed |
| 2 | `recip = TABLE[out2]`, read from a synchronous ROM |
| 3 | `prod = out1 * recip` (one multiplier, 18 x 17 bits, signed) |
| 4 | `(prod + 2^14) >>> 15`, then clip to `[0, 255]` |

The table holds `round(2^15 / d)` for `d = 1..255`, as unsigned 16-bit words
with 15 fraction bits (`1/1 = 32768`, `1/255 = 128`). It is computed at
elaboration by a constant function, so no data file is involved. Entry 0
repeats entry 1. With it, crossed limits give `255` for `p > h_low` and `0`
otherwise.

Pixels below `h_low` clip to 0 and pixels above `h_high` clip to 255. These
are the outliers the limits were chosen to discard. Using the rounded
reciprocal instead of a true divide costs at most one code: the testbench
checks every result against the exact real-valued stretch with a tolerance
of one.

## Colour conversion (`rgb2intensity`)

`Y = 0.299 R + 0.587 G + 0.114 B` (BT.601). The weights are 16-bit fractions
19595, 38470 and 7471, which add up to exactly 65536, so white stays 255.
Stage 1 holds the three products and stage 2 the rounded sum. Only
luminance is stretched, and the output is grey.

## Stream interface and flow control (`contrast_stretch_ip`)

* Input beat: `s_tdata[7:0]` = R, `[15:8]` = G, `[23:16]` = B. `[31:24]` is
  a transparency channel and is ignored. `s_tuser` marks the first pixel of
  a frame and `s_tlast` the last pixel of each line.
* Output beat: `m_tdata = {8'hFF, Y, Y, Y}` (opaque grey), with `m_tuser`
  and `m_tlast` carried with the pixel.
* The control bundle is rebuilt from the stream. `vStart` comes from
  tuser, `hEnd` from tlast, and `hStart` marks the beat after a tlast.
  `vEnd` is the tlast of row `FRAME_H-1`, from a row counter. The core uses
  `valid`, `vStart` and `hEnd`. The other two are carried for other
  consumers of the bundle.
* Back-pressure: every register in the core has a clock enable
  `ce = m_tready | !m_tvalid`, and `s_tready = ce`. A stalled output
  freezes the whole pipeline. An empty output slot lets it advance, so
  input bubbles are squeezed out. A simulation-only assertion checks that a
  stalled output beat does not change.
* `h_low_o` / `h_high_o` expose the limits in force, for monitoring.
* Latency is 6 clock cycles (with `ce` high). Throughput is one pixel per
  cycle.
* Reset is asynchronous and active low.

The frame size is a parameter, not measured. The 1 % target is a constant
derived from it, so the input frames must have exactly
`FRAME_W x FRAME_H` pixels.

## Parameters and sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `FRAME_W`, `FRAME_H` | 640, 480 | frame size; sets the 1 % target |
| `P1_PCT`, `P2_PCT` | 1, 1 | outliers allowed below `h_low` / above `h_high`, percent |
| `CNT_W` | 20 | width of the two outlier counters |

The 20-bit counters can count a whole VGA frame (307200 pixels). For
1920 x 1080, set `FRAME_W=1920` and `FRAME_H=1080`. `CNT_W=22` lets the
counters hold a whole frame. The counters saturate instead of wrapping, so
any width whose maximum exceeds the target `T` (20736 here) decides
correctly, and 20 bits would also do. After synthesis
(generic cells) the whole IP is about 110 word-level cells, 237 flip-flops
and the 4 kbit reciprocal ROM. There are four multipliers: three in the
colour conversion and one in the stretch.

## Choices made here

The original description gives the algorithm, the four registers, the
widths (8-bit limits, 20-bit counters, 16-bit/15-fraction table words), the
1 % targets, the ±1 step, the VGA sizing and the AXI4-Stream video
interface. The following are this implementation's own choices:

* BT.601 weights and 16-bit coefficients in the colour conversion.
* The update happens on the `vStart` pixel, with a combinational bypass. No
  update happens after the first frame following reset.
* Saturation of the limits and counters, and the handling of crossed
  limits (entry 0 of the table).
* The output is rounded to nearest and clipped.
* The pipeline depths (2 + 4) and the global clock-enable stall scheme.
* The channel byte order in `tdata`, the grey RGB output with alpha 0xFF,
  and the row counter that produces `vEnd`.

The following are not included: the optional AXI-Lite register port (the
design has no user settings), and the surrounding system (processor, video
DMA, interconnect, HDMI input), which are standard platform components.

## Testbenches

All are self-checking and print `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_rgb2intensity` | luminance of corner and random pixels against BT.601 in real arithmetic; control alignment; 2-cycle latency; stalls |
| `tb_recip_lut` | all 256 entries against `2^15/d`; 1-cycle read; ce hold |
| `tb_stretch_eq1` | every input value over several windows and 20000 random cases. Checked against the exact stretch (±1) and a bit-exact integer model, including clipping, crossed limits, 4-cycle latency and stalls |
| `tb_adaptive_limits` | 20 x 10 frames with bubbles and stalls. The limits are compared every cycle with a model, and each rule case must occur: up, down, hold, and saturation at 255 |
| `tb_contrast_stretch_hw` | core on 16 x 8 frames of wandering content: every pixel, control bundle and final limits against the reference model; 6-cycle latency |
| `tb_contrast_stretch_ip` | end to end on 32 x 16 frames, 263 frames long. Exercises limits up, down, held and crossed, clipping at both ends, input bubbles and output stalls, and counts each. Checks every output beat and the one-pixel-per-cycle rate |
| `tb_accuracy_vs_software` | 64 x 48 stills (washed out, dark, flat), each run for 260 identical frames. The settled output is compared with a full-precision stretch whose limits come from each frame's own histogram. Measured: mean error 2.0 / 2.0 / 0.0 codes, largest 4 / 4 / 5. The bounds checked are a mean of 3 and a maximum of 10 |
| `tb_contrast_stretch_ip_full` | the IP at its default 640 x 480 size, 30 frames (9.2 M pixels, about 10 s). The limits climb to the 1 % outliers and hold. Every beat is checked, and one frame is timed at one pixel per clock |

`tb/cs_ref_pkg.sv` holds the reference model: luminance, the tracker rule
and the stretch, written from the algorithm. `tb/cs_ip_harness.sv` is the
stream driver and scoreboard shared by the two IP testbenches.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cs_pkg.sv tb/cs_ref_pkg.sv tb/tb_contrast_stretch_ip.sv \
    --top-module tb_contrast_stretch_ip
./obj_dir/Vtb_contrast_stretch_ip
```

For other testbenches, change the last file and the top module. The
per-block testbenches that do not use the reference model need only
`rtl/cs_pkg.sv` and their own file.

## How far to trust it

Each block is checked against models written independently of its RTL. All
testbenches pass. For each of them, a deliberately broken copy of its module
was shown to fail. Accuracy against a histogram-based software stretch was measured only on
synthetic stills, not on real video. There the settled error is about 2
codes on average and at most 5. The original work reports an average of
up to 3 and a maximum of 10 on its test images. Behaviour while the limits
are still moving, such as after a scene change, is exercised but not
graded.
