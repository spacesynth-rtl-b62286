# SpaceSynth — a synthesizer played by moving coloured lights

SpaceSynth is an FPGA instrument. The player holds a red LED in one hand and a green LED in the
other, and can also move a blue LED. A small camera watches all three. Each hand drives one of
two subtractive synthesizer voices:

- how far right the hand is sets the pitch;
- how high it is sets the volume;
- the horizontal distance between the hands opens or closes a low-pass filter on both voices.

The size of the red light sets the rate of a pitch-wobbling LFO (low-frequency oscillator). The
size of the green light sets its depth. Where the blue light is across the picture picks the
waveshape of the voices' first oscillator. A 1024×768 VGA screen shows what the camera has
classified, with crosshairs on each tracked light and bar graphs of the measurements. Audio
leaves as a one-bit PWM signal for the board's analog filter.

Everything runs from one 65 MHz clock, except the camera interface, which runs on the camera's
own pixel clock.

```
 camera ──► camera_to_mask ──► red/green/blue blobs ──► control_mapper ──► pitch, volume,
   ▲          │  (HSV masks,        (centre h,v + area)      │    ▲          cutoff, LFO rate/depth
   │ xclk     │   frame buffers)                          waveshape   lfo ◄── sample_trigger (48 kHz)
   └──────────┤                                          _selector          │
              ▼                                             ▼               ▼
          vga_display ◄── xvga                     synthesizer ×2 ──► mixer ──► pwm ──► audio pin
              ▼
             VGA
```

## Files

| file | contents |
|---|---|
| `rtl/spacesynth_pkg.sv` | shared constants, `wave_t` waveshape enum, `blob_t` measurement struct, fixed-point sine/cosine used to build tables at elaboration |
| `rtl/top_level.sv` | the instrument: camera, controls, two voices, LFO, PWM, display |
| `rtl/sample_trigger.sv` | 48 kHz one-clock strobe |
| `rtl/oscillator.sv`, `rtl/sine_lut.sv` | 32-bit phasor oscillator with four waveshapes |
| `rtl/mixer.sv`, `rtl/amplitude_control.sv` | halve-and-add mixer; shift-based volume |
| `rtl/filter_coefs.sv`, `rtl/iir_filter.sv` | coefficient table and one-multiplier first-order IIR low-pass |
| `rtl/synthesizer.sv` | one voice: two oscillators → mixer → filter → volume |
| `rtl/lfo.sv` | low-frequency oscillator with attenuation |
| `rtl/control_mapper.sv`, `rtl/waveshape_selector.sv` | blob measurements → synth settings |
| `rtl/pwm.sv` | ramp-compare PWM output |
| `rtl/camera_read.sv` | camera byte bus → RGB565 pixels with address and x/y |
| `rtl/rgb_2_hsv.sv`, `rtl/pipe_divider.sv` | 22-clock pipelined RGB → HSV |
| `rtl/thresholding.sv` | HSV windows for the three LED colours, switch-selectable |
| `rtl/frame_bram.sv` | 320×240 frame buffer, one write and one read port |
| `rtl/center_finder.sv`, `rtl/seq_divider.sv` | per-frame centroid and area of one mask |
| `rtl/camera_to_mask.sv` | the whole camera path |
| `rtl/xvga.sv`, `rtl/vga_display.sv` | 1024×768 timing and picture composition |
| `tb/` | one self-checking testbench per block, `tb_top_level.sv` end to end, `cam_model.sv` (camera model) and `audio_model_pkg.sv` (reference models) |

## The audio engine

### Phasor oscillator

Each oscillator is a 32-bit accumulator (the *phasor*). It advances once per 48 kHz sample, by

    step = frequency × round(2^32 / 48000) = frequency × 89478

so that it wraps around exactly `frequency` times per second. Frequency is a 12-bit number of
hertz (0–4095). The top bits of the phasor become the waveform. Every shape is first made as an
unsigned 16-bit value; its MSB is then inverted to give a signed sample.

| shape (`wave_t`) | unsigned value |
|---|---|
| `WAVE_SAW` (3) | `phase[31:16]` |
| `WAVE_TRIANGLE` (2) | `phase[30:15]` while `phase[31]` is 0, `16'hFFFF − phase[30:15]` while it is 1 |
| `WAVE_SQUARE` (1) | `16'hFFFF` while `phase[31]` is 0, `0` while it is 1 |
| `WAVE_SINE` (0) | `sine_lut[phase[31:24]]` |

The sine table holds 256 samples, `32768 + round(32767·sin(2πi/256))`. It is computed during
elaboration by a fixed-point Taylor series in the package, so no data file is needed. The output
follows the phasor combinationally. The phasor updates on the clock after `step_in`.

### Mixer and volume

`mixer` adds two signed samples after halving each with an arithmetic shift, so the sum can never
overflow. `amplitude_control` shifts a sample right by 0–15 places. Each step is −6 dB; the last
few steps leave too few bits to be musical.

### The IIR low-pass filter

The filter is first order:

    y[n] = a1·y[n−1] + b0·x[n] + b1·x[n−1]

**Coefficients.** `filter_coefs` holds 256 coefficient sets. Entry *i* is a first-order
Butterworth low-pass with cutoff `fc = 100 + i·4900/255` Hz, so the range is 100 Hz to 5 kHz in
linear steps. Each set is made by the bilinear transform:

    K = tan(π·fc / 48000)
    b0 = b1 = K / (1 + K)
    a1 = (1 − K) / (1 + K)

All three are scaled by 2^14 and rounded. `a1` is kept positive, so the equation above is a
plain sum. The table is computed at elaboration (tan as a ratio of the package's sine and cosine
series).

**Datapath.** The FPGA clock is over 1300 times faster than the sample rate. So the filter uses
one 16×16 multiplier, driven by a small state machine:

| state | what happens this clock |
|---|---|
| IDLE | on `sample_valid`: clear `sum`, latch the coefficients, multiplier ← `b0 · x[n]` |
| B0 | `sum += product >>> 13`, multiplier ← `b1 · x[n−1]` |
| B1 | `sum += product >>> 13`, multiplier ← `a1 · y[n−1]` |
| A1 | `sum += product >>> 13` |
| DONE | `filter_out ← {sum[31], sum[15:1]}`, store x[n] and y[n], `out_valid` pulses |

The scaling needs care. Each product carries the 2^14 coefficient scale. The products are
shifted right by 13, and taking bits `[15:1]` of the sum removes one more bit, so the total
shift is 14 and the filter has unity gain at DC. Bit 31 of the sum supplies the sign. A filtered
sample appears 4 clocks after `sample_valid`.

### One voice

`synthesizer` has two oscillators:

- `osc_1` plays `frequency_in`;
- `osc_2` plays `frequency_in` shifted by a signed octave offset of −4 to +3. A left shift goes
  up, a right shift goes down, and the result is cut to 12 bits.

Their mix goes through the filter and the volume shift. `synth_out` is registered when the
filter finishes each sample, about 6 clocks after the 48 kHz strobe.

### LFO and pitch

The LFO is an oscillator followed by an attenuator. Its signed output is added directly to both
voices' pitches in hertz. That is cheap, but it is not musically even: a fixed swing changes low
notes by more octaves than high ones. A pitch that would go below 0 Hz is clipped to 0. Without
the clip the unsigned frequency would wrap and screech.

### PWM output

A 16-bit ramp climbs by 256 every clock, so it repeats at about 254 kHz. `pwm_release` is 1
(release the pin to high impedance) while the ramp is below the sample level, and 0 (pull the
pin low) otherwise. The sample is made unsigned by inverting its MSB before it reaches `pwm`.
The board's analog low-pass filter turns the pulse train into audio.

## The camera path

`camera_to_mask` turns the camera stream into three one-bit masks, a raw 12-bit image and one
measurement per colour per frame: centre `h` (0–319), centre `v` (0–239) and `area` in pixels.
These are packed in `blob_t`.

1. **Camera interface.** `cam_xclk` is the system clock divided by four (16.25 MHz). The camera
   returns it as `pclk`. `camera_read` works on `pclk`: it pairs the two bytes of each RGB565
   pixel (high byte first, while `href` is high) and counts address, x and y. The counters reset
   on `vsync`.
2. **Clock crossing.** Each new pixel flips a toggle bit. Two flip-flops resynchronise it to the
   65 MHz clock, and a third detects the change. The pixel word is held in the camera domain until the next pixel, at
   least two camera clocks later. So the change is safe to take over on the clock after the
   toggle is seen. This needs the system clock to be at least about twice the pixel clock.
3. **Raw image.** The pixel is cut to its top 4 bits per colour and written to a 12 × 76800
   buffer on the next clock.
4. **Classification.** The 5/6/5-bit colours are widened to 8 bits with zeros and sent to
   `rgb_2_hsv`. That block is a 22-clock pipeline:
   - a min/max stage;
   - two 16-stage pipelined dividers, one for the hue fraction and one for saturation;
   - a combine stage;
   - pad stages.

   Hue is 0–255, with 43 counts per 60° sector (sector starts 0, 85 and 171). Saturation is
   `255·(max−min)/max`; value is `max`. The pixel's address and x/y travel beside it in a
   22-stage delay line, so each mask bit is written, and counted, with its own coordinates.
5. **Thresholding.** The hue windows are red ≥ 235 or ≤ 10, green 64–120 and blue 145–190.
   A pixel must also reach a minimum saturation and value. Switches 7–10 choose between five
   settings; the highest raised switch wins:

   | switches | s_min | v_min |
   |---|---|---|
   | none | 80 | 96 |
   | sw[7] | 60 | 64 |
   | sw[8] | 100 | 128 |
   | sw[9] | 120 | 160 |
   | sw[10] | 140 | 192 |

   These numbers are a starting point and must be tuned to the actual LEDs and room.
6. **Mask buffers.** There are three 1 × 76800 buffers. Their read ports expand a bit into
   12'hF00, 12'h0F0 or 12'h00F for the display. All four buffers read with 2 clocks of latency.
7. **Centre finding.** There is one `center_finder` per colour. Its state machine (INIT, IDLE,
   NEW_PIXEL, DONE) runs on the 65 MHz clock:
   - it treats a change of x/y as a new pixel;
   - it sums x and y of every set pixel (24-bit sums) and counts them (17 bits);
   - at the start of the last row (x = 0, y = 239) it starts two 26-clock sequential dividers.

   New measurements appear 28 clocks after that pixel, well before the next frame. So the last
   row is not counted, and the INIT pixel (0,0) is not counted either. This costs nothing
   measurable.

## From blobs to sound: control mapping

A colour counts as *detected* when its area is at least 200 pixels.

| control | source | rule |
|---|---|---|
| synth 1 frequency | red | `200 + h` Hz (+ LFO if `sw[14]`), clipped to 0…4095; **0 Hz when red is not detected** |
| synth 2 frequency | green | same rule, from green |
| synth 1 / 2 volume | red / green `v` | attenuation shift `v / 16` (hand high = loud) |
| filter cutoff (both) | red and green `h` | index `min(|h_red − h_green|, 255)` |
| LFO frequency | red area | `area / 4096` Hz (0–18 Hz) |
| LFO depth | green area | attenuation `15 − min(area / 512, 10)`; at most ±1024 Hz of swing |
| osc_1 shape (both) | blue `h` | `h / 80`: sine, square, triangle, saw from left to right |
| osc_2 shape (both) | `sw[4:3]` | direct |

Frequencies follow their blob on every clock. The other controls keep their last value while
their colour is lost, so taking a hand away silences its voice but does not reset its volume.

## The display

`xvga` generates 1024×768 at 60 Hz timing for a 65 MHz pixel clock:

- 1344 clocks per line and 806 lines per frame;
- hsync low for clocks 1048–1183 and vsync low for lines 771–776.

`vga_display` composes the picture:

| area | content |
|---|---|
| x 0–319, y 0–239 | red mask, or the raw camera image when `sw[2]` is up |
| x 320–639, y 0–239 | blue mask with yellow dividers at local x = 80, 160, 240 (the waveshape regions) |
| x 640–959, y 0–239 | green mask |
| y 240–429 | 1024×190 label image from an external ROM (`label_rom_addr = (y−240)·1024 + x`) |
| y 430–767 | nine bar graphs, bottom at row 767 |

In raw view the blue and green areas are black. A magenta crosshair (12'hF0F) goes through each
colour's centre, and only while that colour is detected.

There are three bar graphs per colour, in the order red, blue, green. Within each triplet:

| bar | value | scale |
|---|---|---|
| left | `v` | 240 rows |
| middle | `h` | 320 rows |
| right | `area >> 8` | 300 rows |

The bars are 12 pixels wide, with left edges at x = 96, 192, 288, 416, 512, 608, 736, 832 and
928. Each has a white outline.

**Alignment.** The buffer and ROM addresses are computed combinationally from
`hcount`/`vcount`. All reads take 2 clocks, and the chosen colour is registered once more. So
hsync, vsync and blank are delayed by exactly 3 clocks, and every pixel lines up with its sync.

## Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk_65mhz`, `rst` | in | system clock; synchronous active-high reset |
| `sw[15:0]` | in | `[1:0]` LFO shape, `[2]` raw view, `[4:3]` osc_2 shape, `[10:7]` threshold setting, `[13:11]` osc_2 octave offset (signed), `[14]` LFO on |
| `cam_xclk` | out | camera clock (clk/4) |
| `cam_pclk`, `cam_vsync`, `cam_href`, `cam_data[7:0]` | in | camera bus |
| `label_rom_addr[17:0]` / `label_rom_pixel[11:0]` | out / in | external label image ROM, 2-clock read |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` | out | VGA |
| `aud_pwm_release` | out | 1 = release the audio pin (high impedance), 0 = drive low; connect to an open-drain output |

Yosys (coarse synthesis) reports about 1400 cells, 4000 flip-flop bits and 1.18 Mbit of memory
for the whole design. The memory is four frame buffers: three of 76800 × 1 and one of 76800 × 12.

## Where this design is its own

The instrument's structure follows the original project. That covers the block structure, the
phasor, waveshape and sine table sizes, the mixer, the filter's state machine and output bits,
the coefficient scaling, the LFO addition with clipping, the PWM ramp, the HSV classification
with switch-selectable thresholds, the early-stopping centre finder, the screen layout and the
3-clock display alignment. The following are choices made here, where the original gives no
numbers or only names a block:

- filter coefficients from an exact first-order Butterworth formula, with linearly spaced
  cutoffs;
- all threshold values, and the HSV conversion's internal structure and scaling;
- every control scaling in the mapping table except `200 + h`, and the 4095 Hz upper clip;
- blue-position waveshape regions, and osc_2 shape and octave on switches;
- `sample_trigger` period 1354 clocks (48.006 kHz);
- toggle-based clock crossing with a delay line that keeps coordinates aligned with their pixel;
- frame buffer latency of 2 clocks;
- bar positions and widths, label placement and colour codes;
- a zero-divisor division gives centre 0.

Not included:

- the label image itself: the ROM is outside, behind two ports;
- the camera chip and its register setup;
- the analog output filter.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. They run on plain Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -y rtl -y tb \
    rtl/spacesynth_pkg.sv tb/tb_top_level.sv --top-module tb_top_level
./obj_dir/Vtb_top_level
```

Swap in another testbench name for a single block. Verilator finds the other modules and the
testbench packages through the `-y` search paths.

`tb_top_level` runs the complete design at full size: 320×240 camera and 1024×768 screen, with no
parameter overrides. A behavioural camera (`tb/cam_model.sv`) shows coloured squares, and the
testbench moves them through five scenes over about 15 camera frames. It counts these
mechanisms, and any that never occurs is a failure:

- tracking;
- pitch and volume mapping;
- cutoff change;
- waveshape change;
- osc_2 octave switch;
- crosshairs and dividers;
- labels and bars;
- raw view;
- losing a hand;
- silence;
- LFO modulation and clipping at 0 Hz;
- PWM activity;
- sync counts.

It takes about 40 s.

The block testbenches compare against models written separately:

- the audio ones use the phase-step formula, a real-valued sine, the bilinear-transform
  coefficients and a bit-true filter model;
- `tb_camera_to_mask` checks centres, areas and buffer contents over several frames and
  threshold settings;
- `tb_vga_display` checks every pixel of two full screens;
- `tb_xvga` checks every clock of a frame.
