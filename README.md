# Streaming 5x5 Laplacian edge detector for Full HD video

This is a pixel-streaming edge-detection pipeline for the programmable logic of
an ARM+FPGA SoC. Colour video arrives one pixel per clock from an HDMI video
decoder or a video DMA channel. The pipeline turns each pixel into grey,
applies a 5x5 Laplacian high-pass filter (a discrete second derivative), and
sends out an edge map: bright edges on a black background, or dark edges on
white when the invert option is set. The heavy part is the 25
multiply-accumulates per pixel. They run in hardware at one pixel per clock.
The processor only configures the pipeline and moves frames.

At the default 1920x1080 frame and a 100 MHz clock, one frame takes
1922 x 1082 = 2,079,604 clock cycles. That is about 48 frames per second
when neither side stalls. It is enough for a real-time target of about 44
frames per second of Full HD.
That figure is the filter's own rate. In a complete system, frames also have
to be moved between memory and the pipeline by DMA. That transfer time comes
on top, unless the pipeline runs directly between the HDMI input and output.

## Pipeline

```
 RGB AXI4-Stream in                                        RGB AXI4-Stream out
 (24 bit, tuser=SOF, tlast=EOL)                            (grey copied to R,G,B)
        |                                                           ^
        v                                                           |
   +----------+   8-bit grey   +-------------------------------------------+
   | rgb2gray |--------------->| laplace_filter                            |
   +----------+                |  scan counter -> line_buffer -> 5x5       |
                               |  window -> conv5x5 -> |x|, sat, invert    |
                               +-------------------------------------------+
```

| module | what it does | latency |
|---|---|---|
| `video_edge_top` | top level: the two stages, RGB in and RGB out | 1 + filter |
| `rgb2gray` | Y = (77 R + 150 G + 29 B + 128) >> 8 | 1 cycle |
| `laplace_filter` | scan control, zero padding, window, output mapping, stream framing | see below |
| `line_buffer` | four line memories, one column of five pixels per cycle | 1 cycle read |
| `conv5x5` | 25 products, 5 row sums, total; full precision, signed | 3 cycles |
| `edge_pkg` | widths, types (`rgb_t`, `kernel_t`, `window_t`), default kernel | |

All modules are in `rtl/`, one per file.

## How the filter walks a frame

This is the part that takes the most care. A 5x5 window centred on pixel
(x, y) needs two lines and two columns that arrive *after* (x, y). It also
needs pixels outside the image near the borders. `laplace_filter` handles
both with one idea: it scans an **extended raster** of (W+2) x (H+2)
positions, with W = `IMG_W` and H = `IMG_H`.

* Inside the image (x < W and y < H), a scan position takes one input pixel.
* The two extra columns at the right of each line insert a zero and take no
  input. So do the two extra lines at the bottom.
* Each position pushes one column into the 5x5 window register. The column
  is the new pixel plus the four pixels above it, read from `line_buffer`.
* The window then covers columns sx-4..sx and lines sy-4..sy. Its centre is
  the output pixel (sx-2, sy-2). An output is produced whenever sx >= 2 and
  sy >= 2, which gives exactly W x H outputs per frame.

Borders are **zero padded**. A column tap that holds line sy-k is forced to
zero when that line lies outside 0..H-1, or when the column is a padding
column. The two padding columns at the end of one line also serve as the zero
columns to the left of the next line. So the left border needs no extra work.
Because of this masking, the line memories never need clearing between
frames. Leftovers from the previous frame are never used.

The extra positions at the end of a frame also drain its last two lines.
After the last position, the filter returns to idle. It starts the next frame
on the next pixel marked start-of-frame. That pixel may arrive while the
previous frame's last outputs are still in the pipeline.

### Flow control

The whole filter has a single enable: `en = !m_valid || m_ready`. When the
output is stalled, every stage freezes together. This includes the line
memories' read register and the convolution pipeline. `s_ready` is `en`,
except during padding positions, when no input is wanted. A missing input
pixel (`s_valid` low) simply leaves a bubble. Inserting padding positions
does not depend on the input.

### Timing

* One scan position per clock, so (W+2)(H+2) cycles per frame without stalls.
* An output pixel is handed over 6 clock edges after the scan position that
  completes its window. The stages are: input register, window register,
  three convolution stages, and the output register.
* In the filter, the first output pixel of a frame follows the accepted
  start-of-frame pixel by 2(W+2) + 2 + 6 cycles. At the top level there is
  one more cycle for the grey stage.

### Framing and control

* Input `tuser` marks the first pixel of a frame. While idle, the filter
  accepts and drops pixels without `tuser`. This resynchronises it to the
  stream. Input `tlast` is not used. The line length is `IMG_W`.
* Output `tuser` and `tlast` are generated from the output position.
* `coef` (a 5x5 array of signed 8-bit coefficients) and `invert` are sampled
  with the first pixel of a frame. They travel with that frame's first
  window, so changing them between frames never disturbs the frame still in
  flight. In a system these inputs come from processor-written control
  registers. That register interface is not part of this RTL.

### Output value

The convolution sum is signed. The output is its magnitude, clamped to 255,
or 255 minus that when `invert` is set. The default kernel
(`edge_pkg::LAPLACE5`) is

```
  0  0 -1  0  0
  0 -1 -2 -1  0
 -1 -2 16 -2 -1
  0 -1 -2 -1  0
  0  0 -1  0  0
```

It has negative taps on a plus-shaped cross, zero corners and a positive
centre. The taps sum to zero, so flat areas give 0. The sum is kept at full
precision (22 bits) and never overflows for any 8-bit kernel.

## What is taken from the design description and what is chosen here

Taken from the description:

* A Laplacian high-pass filter on grey-scale video.
* A 5x5 kernel with a negative cross, non-negative corners and a centre of
  either sign.
* Full HD frames.
* A streaming pipeline in the programmable logic, placed between the HDMI
  video decoder and encoder, with two processing stages.
* A 100 MHz system clock and AXI streams.
* An inverted view of the edge map.

Chosen here, and worth checking before reuse:

* **Grey conversion.** Integer BT.601 weights.
* **Exact coefficients.** The default kernel above is a common 5x5
  Laplacian. It is not a published coefficient set. The kernel is a run-time
  input, so any other set can be loaded.
* **Border rule.** Zero padding, with the output the same size as the input.
  Replicated or mirrored borders would change only the masking in
  `laplace_filter`.
* **Output mapping.** Magnitude with saturation. A zero-crossing detector
  would be a different back end after `conv5x5`.
* **Stream conventions.** Start-of-frame resynchronisation, sampling of the
  kernel per frame, and copying the grey value to R, G and B on the output.
* **Structure.** Line-buffer organisation, pipeline depth and reset
  behaviour. Reset is asynchronous and active low. It clears control state
  and valid bits, not the memories.

The surrounding system is not in this RTL. It consists of the HDMI
receiver/transmitter and their TMDS video decoder/encoder, the video timing
controller, the video DMA engines, the AXI interconnect, the ARM processor
system, and the clock generators. The top level's two AXI4-Stream ports are
where the decoder or read DMA, and the encoder or write DMA, connect.

## Resources

The line storage is 4 x 1922 x 8 = 61,504 bits, which fits two 36 Kb block
RAMs. The convolution needs 25 small multipliers; `conv5x5` writes them as
plain products. Synthesis of the top at default size reports 61,504 memory
bits and about 1,250 flip-flop bits.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against `tb/edge_ref_pkg.sv`. This is a plain model written from the
formulas: grey conversion, then the zero-padded 5x5 sum, then magnitude,
saturation and inversion.

| testbench | what it covers |
|---|---|
| `tb_rgb2gray` | random and corner-case colours, random stalls, side-band, 1-cycle latency |
| `tb_line_buffer` | 40 lines on a 7-pixel-wide buffer, random enable gaps between read and write |
| `tb_conv5x5` | 3000 random windows and kernels, extreme values, random enable stalls, 3-cycle latency |
| `tb_laplace_filter` | 8 back-to-back 9x6 frames, random kernels, invert, stray pixels, gaps and stalls; first-output latency and one position per clock |
| `tb_video_edge_top` | 6 RGB frames of 16x10 end to end, counting that each mechanism occurred: output stall, input gap, zero-padded border pixel, stray-pixel drop, saturation, negative sum, inverted frame, kernel change, and a frame that starts while the previous one drains |
| `tb_video_edge_full` | one 1920x1080 frame at the default parameters, every pixel checked, plus the frame timing (2,079,610 cycles from first input to last output) |

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a cycle
watchdog.

To run one with Verilator, for example the full-size frame (about 2 s of
simulation time on a desktop machine):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/edge_pkg.sv tb/edge_ref_pkg.sv tb/tb_video_edge_full.sv \
    --top-module tb_video_edge_full
./obj_dir/Vtb_video_edge_full
```

Verilator finds the other modules through `-Irtl` by their file names. Use
the same pattern for the other testbenches. `tb_rgb2gray`, `tb_line_buffer`
and `tb_conv5x5` need only `rtl/edge_pkg.sv` in front (plus
`tb/edge_ref_pkg.sv` for `tb_rgb2gray`).

## Changing it

* **Frame size.** Set `IMG_W` and `IMG_H` on `video_edge_top`. The line
  memories follow as `IMG_W + 2` pixels deep. The frame size is a parameter,
  not a run-time input.
* **Kernel values.** Drive `coef`. To change widths, edit `COEF_W`, `PIX_W`
  and `ACC_W` in `edge_pkg`.
* **Kernel size.** `KSIZE` and `KHALF` live in `edge_pkg`, and the window
  and line buffer follow them. However, `conv5x5`, the 2-position centre
  offset and the reference model are written for 5x5.

## Known warnings

Verilator's lint reports the ascending `[0:4]` ranges used for the window
and kernel arrays. These are kept so that index 0 is the top line and the
left column. Lint also reports that `rst_n` is used both asynchronously and
in the `disable iff` of the stream-stability assertion in `laplace_filter`.
No latches, combinational loops or multiply-driven nets are reported.
