# Digital sundial with a sun-angle alarm clock

A camera looks straight down at a small sundial. The gnomon's shadow makes the lit
part of the dial lopsided. Its **centre of mass** is pulled away from the dial's
**geometric centre**, on the side opposite the shadow. The vector between the two
points gives the shadow's direction, so it gives the "time" as an angle. How far
the centroid moves also gives the shadow's **length**. The FPGA computes both
every video frame, in integer hardware, and draws them over the live camera image
on a 720p HDMI output. The measured angle also drives an alarm clock. The user
sets up to four alarm angles with three buttons. When the sun reaches one of them,
a WAV file is streamed from an SD card through a ping-pong buffer, an optional
31-tap FIR filter and a PWM or PDM speaker output.

All of this is written as synthesizable SystemVerilog-2017. The exceptions are the
clock generator, the HDMI TMDS serialiser and the SD-card SPI controller. They are
stock infrastructure, and the top level brings out their interfaces as ports.

## Measuring the dial in one frame

The camera frame is 320x240 RGB565. It is sent byte by byte by a microcontroller
bridge (8 data lines, a byte strobe, HREF, VSYNC). It is stored in a dual-port
frame buffer, then read back under the 720p raster at 3x scale, giving 960x720 on
the left of the 1280x720 screen. On the way out, each pixel is reduced to one
8-bit value. The value is red, green, blue or a luma mix, chosen at run time. A
lower/upper threshold band turns it into a one-bit **mask**: 1 on the bright dial
face, 0 on the background and in the shadow.

Two accumulators watch every mask pixel of the active frame:

* `edge_detection` keeps min/max x and y. The true centre is the midpoint of this
  bounding box. Edge detection therefore does not see the shadow, unless the
  shadow reaches the rim.
* `center_of_mass` sums x, y and the pixel count. At the first blanking line it
  divides both sums by the count on two 32-bit serial dividers (34 cycles).

All coordinates are raster coordinates: x 0..1279 in 11 bits, y 0..719 in 10 bits,
with y growing downwards.

## The angle, without trigonometry

Let `(x, y) = CoM - centre`. Computing `atan2` directly would need a division
with a wide result and a large table. Instead, the vector is first placed in one
of the eight 45° octants:

* The quadrant `i` (1..4) comes from the signs.
* Inside the quadrant, the vector has a component `a` along the quadrant's first
  axis (at `90(i-1)`°) and a component `b` along its second axis (at `90i`°).
  Quadrant I: `a=x, b=y`; II: `a=y, b=-x`; III: `a=-x, b=-y`; IV: `a=-y, b=x`.
* The smaller component always goes on top of the fraction, so the ratio is
  0..1. It is formed as `R = round(100 * small / large)`, an integer 0..100,
  computed as `(200*small + large) / (2*large)` on a 20-bit serial divider.
* `angle_lut` turns R into whole degrees 0..45 with the nearest-degree rule
  `d = round(atan(R/100))`. It is built as 45 comparisons with the thresholds
  `T[k] = ceil(100 * tan((k - 0.5)°))`, k = 1..45, and d is the number of
  thresholds that R reaches.
* The octant sets the rest: `angle = 90(i-1) + d` when `a >= b`, and
  `angle = 90i - d` otherwise.

The result is 0..359 whole degrees, measured from the +x axis towards +y (so
clockwise on screen). It is ready 25 clock cycles after the centroid. Because R
is rounded to 1/100, the angle can be off by one degree near steep octant
borders. The testbench accepts exactly that, and checks it against
`atan2` computed in floating point.

## The shadow length

The dial is modelled as an ellipse whose area (its pixel mass) is
`m = π·a·b`, where a and b are the half-sides of the bounding box. `mass_estimate`
computes it as `(201/256)·dx·dy`. The shadow is modelled as a rectangle of known
width `w` (a run-time input, the calibrated shadow width in pixels) and unknown
length `L`. The shadow removes `w·L` pixels, centred `L/2` from the centre. The
centroid therefore moves by `r = w·L·(L/2)/(m − w·L)`. Solving for the positive
root gives

    L = (r/2) · ( −1 + sqrt(1 + 2m/(w·r)) ),   r = |CoM − centre|.

`shadow_length` runs this in four sequential steps on one 40-bit divider and one
40-bit iterative square root:

1. `r = floor(sqrt(dx² + dy²))`.
2. `q = (2m << 16) / (w·r)`, a Q16 ratio.
3. `s = floor(sqrt(q + 2^16))`, which is `sqrt(1+q)` in Q8.
4. `L = (r · (s − 256)) >> 9`, saturated to 11 bits.

It takes about 90 cycles. The block test evaluates the same formula in floating
point, with `r` truncated as in step 1. It allows an error of 2 pixels plus 1% of
L for the Q16/Q8 fixed-point steps.

## Frame timing

Results are computed in the vertical blanking after the frame that produced
them, and shown throughout the next frame. The centroid division, the angle and
the length need under 130 pixel clocks together. The blanking lasts
30 × 1650 = 49,500 clocks. The frame-buffer read has two cycles of latency, so
the raster coordinates and syncs go through two register stages to stay aligned
with the pixel. The mux adds one more registered stage before the output.

## What the screen shows

`video_mux` picks, in priority order:

* white number sprites;
* a green crosshair on the centre of mass;
* a blue crosshair on the true centre;
* either the camera image or the mask, with mask pixels in pink.

The measured angle, labelled "ANGLE:", is shown near the bottom right corner,
with the length in pixels directly underneath. The four alarm angles are shown
in a column at the top right. `number_sprite` draws decimal numbers with a
built-in 5×7 digit font at 4× scale, using a combinational double-dabble
binary-to-BCD converter. `text_sprite` draws the fixed label on the same grid.

## Setting alarms

`user_interface` uses three debounced buttons (10 ms at 74.25 MHz):

| Press | Effect |
|---|---|
| BTN3 | edited alarm +10° |
| BTN2 | edited alarm −1° |
| BTN2 + BTN3 together | store the edited value in the current slot; move to the next of 4 slots and load its value |
| BTN1 | next audio track (1..4, wrapping) |

Values saturate at 0 and 360. A press takes effect when every button is released
again, using all buttons that were held during the press. That is how the
two-button chord is told apart from the single presses. Two RGB LEDs show the
slot being edited:

* slot 1: LED0 red;
* slot 2: LED0 green;
* slot 3: LED1 red;
* slot 4: LED1 green.

The eight-digit seven-segment display shows the edited alarm in decimal on the
upper four digits and the track number on the lower four.

`alarm_trigger` fires when an angle update first equals one of the stored
alarms. It fires on the edge of equality, so a dial that sits on the alarm angle
for many frames rings only once. No trigger comes from the first result after
reset. The one-cycle trigger crosses to the audio clock with a toggle
synchroniser (`toggle_sync`).

## Audio: sectors in, samples out

The audio side runs on its own 24.75 MHz clock. `audio_playback` reads the
selected track, unsigned 8-bit mono PCM in a WAV file, from the SD controller.
Reads are 512-byte sectors delivered one byte per `byte_available` strobe. The
bytes go into a 1024-byte `audio_buffer` used as two halves:

* While one half plays, the other is refilled.
* A half is requested as soon as it has been played out.
* A phase accumulator makes a 48 kHz sample tick from the audio clock.
* The first 44 bytes (the WAV header) are skipped.
* Playback stops after the track's byte count.
* If a half is not ready in time, the player waits and counts an underrun.

Track `k` starts at byte address `k × 0x100000`. Each track is 0x76800 bytes by
default.

Each played byte goes through the following steps:

* The `fir31` switch decides whether the byte goes through the filter. `fir31` is
  a 31-tap FIR with one multiply-accumulate per clock. It works on the signed
  sample (the byte with its top bit flipped). A result is ready 33 cycles after
  each sample, so the sample rate must leave at least 33 clocks between samples;
  48 kHz leaves 515. The default coefficients are a triangular low-pass
  (1, 2, … 16, … 2, 1)/256 with unity DC gain. A parameter replaces them with a
  filter designed for the track.
* The resulting 8-bit level drives both an 8-bit `pwm` (256-clock period) and a
  first-order sigma-delta `pdm`.
* A second switch picks which of the two drives both speaker pins.
* Between tracks the level rests at mid-scale (0x80).
* The two switches are synchronised into the audio clock.

## Module map

| Module | Role |
|---|---|
| `sundial_pkg` | shared widths, 720p timing, RGB structs, channel and modulation enums |
| `sundial_top` | wires everything: two clock domains, SD and camera interfaces as ports |
| `camera_byte_rx` | two bytes → RGB565 pixel with its 320x240 coordinates |
| `frame_buffer` | 76,800 × 16 dual-clock RAM, 2-cycle read |
| `scale` | raster → frame-buffer address, 3× nearest-neighbour |
| `channel_select`, `threshold` | pixel → 8-bit value → mask bit |
| `edge_detection`, `center_of_mass` | bounding box / centre, centroid |
| `divider` | restoring radix-2 divider, WIDTH+2 cycles |
| `angle_division`, `angle_lut` | octant angle, 0..359° |
| `mass_estimate`, `isqrt`, `shadow_length` | ellipse area, integer root, length |
| `video_sig_gen`, `video_mux`, `number_sprite`, `text_sprite`, `bcd_convert` | raster and overlay |
| `debouncer`, `user_interface`, `seven_segment_controller` | alarm panel |
| `alarm_trigger`, `toggle_sync` | alarm detection, clock crossing |
| `audio_playback`, `audio_buffer` | SD streaming and ping-pong buffer |
| `fir31`, `pwm`, `pdm` | filter and speaker drive |

## Where this RTL goes its own way

* **Crosshair colours.** The centre of mass is green and the true centre blue.
  One description of the original screenshot has the colours the other way round.
* **Angle readout position.** It sits at the bottom right, as in the original
  screen photo. The only word sprite is the "ANGLE:" label.
* **Sample rate.** It is 48 kHz. A 44.1 kHz tick would need only a change to
  `SAMPLE_HZ`.
* **Square roots.** They come from an exact iterative square root, not from
  reduced-resolution lookup tables. The divider is a simple bit-serial one. It
  needs far fewer than the roughly 100 cycles allowed.
* **Interpretations.** The channel choices, threshold band, sprite font, LED
  patterns, track layout on the card, FIR coefficients, button timing and reset
  values are interpretations. Each file's header says which parts are choices.
* **Not built.** These are absent:
  * the JPEG decoding path for a high-resolution camera, with its colour
    conversion;
  * an image-rotation stage;
  * a second angle output whose meaning is undefined.
* **Camera bridge signals.** The two spare signals of the camera bridge (a block
  signal and a camera clock) are not used.
* **Reset.** It is synchronous and active high in the pixel domain. It is
  synchronised into the audio domain.

## Simulating

Every testbench is self-checking, and prints one line at the end:

    TB_RESULT checks=<n> failures=<m>

Each testbench also has a watchdog. To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
        rtl/sundial_pkg.sv rtl/*.sv tb/sd_card_model.sv tb/angle_division_tb.sv \
        --top-module angle_division_tb -o sim && ./obj_dir/sim

List `sundial_pkg.sv` first. Extra `rtl` files are harmless. Block tests compare
against reference values computed in the testbench:

* floating-point `atan2` and the length formula;
* direct sums and loops;
* per-cycle models for the raster, the buffer and the player.

Each block test finishes in seconds.

The two system tests are:

* `sundial_top_tb`: a reduced raster (256×128 active) and a 64×40 camera frame, for
  speed. It sends two frames of a synthetic dial with a shadow through the camera
  port. It then checks the following:
  * the angle and length against the exact geometry;
  * the crosshair, sprite and mask colours on the video output;
  * the alarm setting with single presses and the chord, and a track change;
  * an alarm firing on the sun angle, and playback from the behavioural SD card
    model (`tb/sd_card_model.sv`) over several sectors;
  * the FIR, PWM and PDM paths.

  Each of these mechanisms is counted, and one that never happens counts as a
  failure.
* `sundial_top_full_tb`: the top at its default parameters: full 720p timing, a
  320×240 frame, 48 kHz from 24.75 MHz. It feeds one frame and checks the angle
  and length in the next. It checks that both results arrive inside the vertical
  blanking, and counts the label's pixels in one frame. It then fires an alarm
  and checks 1,536 played samples byte for byte against the card contents, each
  515 or 516 audio clocks apart. It takes a few seconds.

To change the design:

* Widths and timing constants live in `sundial_pkg`.
* Sizes are module parameters.
* Overriding `ACTIVE_H/V`, `IMG_W/H` or `SAMPLE_HZ` on `sundial_top` is the
  quickest way to shorten a simulation.
