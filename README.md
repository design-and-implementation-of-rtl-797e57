# Reconfigurable image and video processing platform

This RTL is a single-FPGA video pipeline. It captures interlaced YCbCr
video and stores it as progressive frames in on-chip memory. It then shows
the video on a 640x480 display at a 25 MHz pixel clock. On the way out, four
functions can be switched in and out with push buttons while the video runs:

* edge recognition: a 3x3 gradient filter;
* zoom-in x2: bilinear or nearest-neighbour;
* zoom-out 1/2: low-pass filtering, then decimation;
* layer mixing: the edge picture blended over the video.

The design follows a published FPGA platform for general-purpose image and
video handling, built on a Virtex-II Pro (XC2VP30) board. That description
names the units and gives some of their insides:

* a deinterlace unit;
* two frame buffers, one for luminance and one for chroma;
* an RGB conversion unit with standard and user-defined constants;
* a mixer that blends layers;
* an edge recognizer with two line buffers, six window registers and a
  10-clock processing time;
* a zoom unit using half-weight bilinear interpolation and low-pass
  filtering;
* push-button control.

Sizes, encodings, handshakes and the exact filters are not specified there.
The values chosen here are listed in "Departures and choices" below.

## Data path

```
 interlaced video ──► deinterlacer ──► frame_buffer (luma)    ◄──┐ 2x2 window
 (Y + 4:2:2 C)        (field weave)    frame_buffer (chroma)  ◄──┤ reads
                                                                 │
 video_timing ──(x,y)──► scaler ─────────────────────────────────┘
 640x480, 25 MHz          │ Y,Cb,Cr (4:4:4)
                          ├──► ycbcr2rgb ──► delay ──┐
                          └──► edge_detector (Y) ────┴──► video_mixer ──► RGB, DE, HSYNC, VSYNC
 push buttons ──► mode_ctrl (zoom mode, interpolation, layer enables)
```

There are two clocks. The capture side runs on `vin_clk`, the clock of the
incoming video; input pixels are strobed with `vin_valid`. This side is the
deinterlacer and the frame buffer write ports. Everything else runs on the
25 MHz display clock `clk`.

The frame buffers are the only place where data crosses between the two
clocks. There is no frame locking: while a new frame is being captured, the
display may show a seam between old and new content. All units take one
pixel per clock.

## Frame buffers and the 2x2 window

This is the least obvious part of the design. It explains how the zoom unit
gets four neighbouring source pixels in every clock.

Each of the two frame buffers (`frame_buffer.sv`) holds a 320x240 frame of
8-bit samples. The write port runs on the capture clock and the read port on
the display clock. The luma buffer stores Y. The chroma buffer stores the 4:2:2
samples interleaved: Cb at even columns, Cr at odd columns.

Internally each buffer is four memories, selected by (row parity, column
parity). Any 2x2 window (r..r+1, c..c+1) touches each of the four memories
exactly once. So a window read is four independent one-port reads, each of
which maps to an ordinary block RAM with one write port and one read port.

The read port takes the window's top-left corner and returns `q00`, `q01`,
`q10` and `q11` one clock later. On the bottom row and the right column the
missing neighbour is replaced by the edge sample.

The chroma window is always read at the even column of a Cb/Cr pair. The
four chroma samples are then Cb and Cr of two adjacent lines.

The deinterlacer (`deinterlacer.sv`) writes line L of field F to row
2L+F. This is weaving: after both fields the buffers hold one progressive
frame. `frame_done` pulses on the last write of field 1.

## Zoom unit

`scaler.sv` turns every display position (x, y) into a frame buffer address.
It forms the pixel from the returned windows. Averages are rounded to
nearest.

| mode | image on screen | luma | chroma |
|---|---|---|---|
| 1:1 | 320x240, top-left | source pixel | pair of that pixel |
| zoom-in x2, bilinear | 640x480 | even x,y: source; odd x or y: mean of the 2 neighbours; odd x and y: mean of 4 | odd y: mean of 2 lines |
| zoom-in x2, nearest | 640x480 | pixel repeat | pixel repeat |
| zoom-out 1/2 | 160x120, top-left | mean of the 2x2 block (box low-pass + decimation) | mean of 2 lines |

Outside the image, the pixel is black (Y=16, Cb=Cr=128) and `in_img` is low.
The mixer then shows the background colour there.

Latency is 2 clocks from (x, y) to the pixel.

## Edge recognition

`edge_detector.sv` filters the luma of the pixels actually displayed, so
edges follow the current zoom.

* The three-line window comes from two line buffers of one display line
  each. The nine pixels are the line-buffer outputs, the incoming pixel, and
  six registers that hold the two previous columns.
* Two 3x3 kernels are applied as a convolution, h[i,j] = Σ f[k,l]·g[i−k,j−l].
  The defaults are the Sobel kernels; they are parameters `KX` and `KY`.
* The magnitude is |h_x| + |h_y|, clamped to 255.
* `out_edge` compares the magnitude with `thresh`.

Timing:

* The arithmetic takes 7 clocks. Delay stages pad it to `LATENCY` = 10
  clocks, and `out_valid` is the input valid delayed by the same amount.
* The result at clock t+10 belongs to the window centred one line above
  and one pixel left of the pixel that entered at clock t. On screen the edge
  picture is therefore offset by one line and one pixel from the video layer.
* Pixels whose window leaves the frame at the top or left give 0.

## Colour conversion and mixing

`ycbcr2rgb.sv` computes RGB = M · (Y−yoff, Cb−128, Cr−128) / 256, rounded and
clamped, in 3 clocks. M is chosen by `csc_sel`:

* BT.601 (studio range);
* BT.709 (studio range);
* a user matrix: nine signed 12-bit coefficients plus a luma offset, given
  as ports.

`video_mixer.sv` combines two layers and a background:

* the video layer (inside the image area only);
* the edge layer, drawn as a grey level equal to the magnitude, or, with
  `edge_binary`, in `edge_color` where the threshold is passed.

If both layers are on, the result is `(alpha·edge + (256−alpha)·video)/256`.
If one is on, that layer is shown alone. If none is on, the background
colour is shown. Latency is 1 clock.

## Control

`mode_ctrl.sv` synchronises the four buttons and debounces them. A level
must be stable for `DEBOUNCE` clocks; the default of 250,000 clocks is
10 ms at 25 MHz. Each accepted press acts once:

| button | action |
|---|---|
| 0 | zoom 1:1 → zoom-in → zoom-out → 1:1 |
| 1 | edge layer on/off |
| 2 | video layer on/off |
| 3 | zoom-in interpolation bilinear/nearest |

Changes are collected and applied together on the first blanking line, once
the last pixel of the frame has left the pipeline. A frame never mixes two
settings.

After reset the mode is 1:1, bilinear, video on and edges off.

## Timing summary

| path | clocks |
|---|---|
| input pixel → frame buffer write | 1 |
| frame buffer read | 1 |
| display position → scaler output | 2 |
| scaler → edge result | 10 |
| scaler → RGB | 3 (then delayed 7 to meet the edge layer) |
| mixer | 1 |
| timing generator → `rgb`/`de`/`hsync_n`/`vsync_n` | 13 |

The raster is 800x525 clocks: 640x480 active, with front porch, sync and
back porch of 16/96/48 pixels and 10/2/33 lines. Syncs are active low.

## Top-level interface (`video_platform_top`)

* Video in:
  * `vin_clk`, `vin_valid`, `vin_sof` (first pixel of a field), `vin_sol` (first
    pixel of a line), `vin_field`;
  * `vin_y`, `vin_c` (the interleaved 4:2:2 chroma sample);
  * `frame_done` (output).
* Buttons: `btn[3:0]`, active high.
* Settings, meant to be driven by a processor's registers:
  * `csc_sel`, `csc_user_m`, `csc_user_yoff`;
  * `alpha`, `edge_thresh`, `edge_binary`, `edge_color`, `bg_color`.
* Status: `cur_mode`, `cur_bilinear`, `cur_edge_en`, `cur_video_en`.
* Display: `rgb` (struct r/g/b), `de`, `hsync_n`, `vsync_n`.

Parameters set the source frame size, the display raster and the debounce
time. Shared types (`ycc_t`, `rgb_t`, `scale_mode_e`, `csc_sel_e`,
`csc_matrix_t`) and the edge latency are in `video_pkg.sv`.

## Departures and choices

These points are not fixed by the published design:

* The source frame size is 320x240 and the display is 640x480. The only
  timing figure given is the 25 MHz clock, which is the standard 640x480
  pixel clock.
* Deinterlacing is done by weaving. Bobbing and motion-adaptive methods are
  not built.
* The capture clock frequency is not specified. The testbenches use
  27 MHz. There is no frame locking between capture and display.
* The 4:2:2 chroma format and the input framing signals
  (`vin_sof`/`vin_sol`/`vin_field`) are choices of this design.
* The frame buffers are on chip and split into four parity banks.
* The edge filter uses Sobel kernels and an |h_x|+|h_y| magnitude. The
  edge layer is offset by one line and one pixel (see above).
* The zoom-out filter is a 2x2 box. The image sits in the top-left corner.
* The colour matrices are BT.601, BT.709 and a user matrix, in 1/256
  fixed point.
* The mixer blends with an 8-bit alpha. The button mapping and the 10 ms
  debounce are choices of this design.

Block RAM use: the frame buffers alone need 1,228,800 bits, about 67 blocks of
18 Kbit. That matches the 68 block RAMs reported for the original
implementation. With each parity bank rounded up to whole 2048-entry blocks,
about 80 blocks are needed. The XC2VP30 has 136.

These parts of the platform are outside this RTL:

* the embedded PowerPC 405. Its settings registers appear as top-level
  ports;
* the I2C set-up of the video devices. The published design does this in
  processor software;
* the external DDR memory;
* the board connectors and the video DAC.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/video_pkg.sv tb/tb_video_platform_top.sv \
    --top-module tb_video_platform_top -o sim
./obj_dir/sim
```

Replace the testbench and top-module names to run another testbench. The
`--timescale` option matters: the testbenches use fractional delays to
generate the 27 MHz capture clock. `-y rtl` lets Verilator find the
submodules by file name.

| testbench | what it checks |
|---|---|
| `tb_video_timing` | counters, active area, sync widths, frame period over two frames |
| `tb_frame_buffer` | every 2x2 window including edge clamping; read-before-write; writes on a separate clock |
| `tb_deinterlacer` | weave addresses; dropped out-of-frame pixels; one write per position; `frame_done` |
| `tb_scaler` | every display pixel in all modes against a model on source coordinates |
| `tb_edge_detector` | exact 10-clock latency and every output against a direct convolution |
| `tb_ycbcr2rgb` | all three matrices; known black and white points; clamping |
| `tb_video_mixer` | all layer combinations |
| `tb_mode_ctrl` | glitch rejection, mode cycling, toggles; clock by clock, no change outside a frame start |
| `tb_video_platform_top` | end to end at 16x12 source / 40x28 display, eight frames (see below) |
| `tb_video_platform_full` | end to end with all defaults (320x240 → 640x480): 1:1, edge blend, zoom-in, zoom-out, all 307,200 pixels per frame (about 5 s) |

The end-to-end testbenches send a source through both fields. They compare
every displayed pixel with a model built from the functional definitions.
The reduced testbench also counts the mechanisms it exercised, and fails if
one never happened:

* each zoom mode, and both interpolations;
* blending, edge-only, binary edges;
* each colour matrix;
* a rejected button glitch;
* `frame_done`.
