# A digital storage oscilloscope for the Nexys 4 FPGA board

This is the digital part of a small storage oscilloscope. The board's XADC
converter samples a probe signal at 1 MSPS, which covers signals up to
500 kHz. The samples are kept in on-chip block RAM. A 1024x768 monitor shows
the waveform over a graticule, with a text label giving the sample interval.
The design rests on two ideas:

* **A double buffer.** Acquisition never stops. One ring buffer fills with
  new samples while the display draws from another, frozen one. At the start
  of every frame the two swap roles, so each frame shows one consistent
  record. A trigger marks where the signal crossed a threshold, so the trace
  can be drawn from that point and stands still on screen.
* **A sprite chain.** The monitor's raster position and sync signals pass in
  series through a row of "sprites". Each sprite either passes the pixel of
  the sprite before it through or paints over it. Each sprite delays the sync
  signals by its own latency, so everything reaches the monitor in step.

The whole design runs on one clock, the 65 MHz pixel clock of the 1024x768
mode. The XADC core's `ready` output is taken as a one-clock pulse in that
clock domain.

```
 XADC ──ready/data──► adc_controller ──► sample_buffer ◄──address── curve_sprite
 (outside)              │   (÷ samplePeriod)  ▲  │ dataOut           ▲
                        └──► trigger ─────────┘  └───────────────────┘
                                isTriggered → isTrigger     drawStarting → lockTrigger

 xvga ──► grid_sprite ──► curve_sprite ──► text_sprite ──► hsync, vsync, blank, pixel
          (1 clock)        (2 clocks)       (2 clocks)

 buttons, switches ──► user_control ──► samplePeriod, threshold, gain, edge, mode
                                      └──► stop, single-shot ──► run_stop ──► disableCollection
```

## From the converter to the buffer

`adc_controller` downsamples the stream. It forwards the first of every
`samplePeriod` conversions and drops the others, so the stored rate is
1 MSPS / samplePeriod. A forwarded sample comes out one clock after the XADC
pulse, together with a one-clock `readyOut`. Downsampling before storage keeps
the buffer simple. The cost is that a slower time base only shows up once new
data has been taken at the new rate.

`trigger` looks at the top 10 bits of each 12-bit sample. It compares each
value with the value from the clock before:

* a rising crossing is `previous < threshold <= current`;
* a falling crossing is `previous >= threshold > current`.

When the crossing matches the selected edge and `triggerDisable` is low,
`isTriggered` is high for exactly one clock, one clock after the sample
appears. The controller holds its output between samples, so no valid strobe
is needed: a held value cannot cross twice.

## The double buffer (`sample_buffer`)

This block holds most of the design's subtlety.

**Storage.** There are two banks, `bank0` and `bank1`. Each holds `DEPTH`
(1024) 12-bit samples and is used as a ring. The `active` bit says which bank
takes new samples. The other bank is *locked*, and only the locked bank can
be read. Each bank keeps two pointers of its own:

* its write pointer, the slot the next sample goes to;
* its trigger slot.

Both pointers stay with the bank when the roles swap.

**Trigger mark.** While `isTrigger` is high, the active bank records the
slot of the current sample. That is the slot being written in the same
clock, if there is one, and otherwise the most recent one. In the top level,
`isTrigger` comes from `trigger`. It rises one clock after the crossing
sample has been written, so the mark lands on that sample.

**Swap.** A pulse on `lockTrigger` flips `active`. In the top level this is
the curve sprite's `drawStarting`, at pixel (0,0) of every frame. The bank
that was filling becomes the frozen record for the whole frame, trigger mark
included. Acquisition carries on in the other bank, overwriting its oldest
data.

**Reads.** The 20-bit `address` is an offset, taken modulo `DEPTH`, from a
base in the locked bank:

| `readTriggerRelative` | base | address 0 is | address `DEPTH-1` is |
|---|---|---|---|
| 1 | the trigger slot | the trigger sample | the 1023rd sample after it (wrapping into older data) |
| 0 | the write pointer | the oldest sample | the newest sample |

The read takes one clock. `dataOut` is the top 10 bits of the stored sample.
`dataOutReady` pulses for one clock whenever a new request was made. A new
request is a clock in which `address` or the mode differs from the clock
before, or the first clock after reset. The data also follows the address
every clock, so the curve sprite treats the buffer as a one-clock ROM and
ignores `dataOutReady`.

**Run/stop.** `disableCollection` blocks writes and trigger marks. Swaps
follow one extra rule while it is high: a swap happens only if it moves the
bank with the newest samples into the locked role. So the first frame after
a stop shows the most recent record, even if that record was still filling.
Every later frame shows the same record. A buffer that simply refused all
swaps would freeze the *older* record instead. It would also lose a
single-shot capture, whose trigger mark is always in the active bank.

Two things follow from this scheme and are worth knowing:

* In trigger-relative mode, the columns after the newest sample show older
  data. The last trigger before a swap may have come only a few samples before
  it. The ring then wraps, and the right part of the screen shows samples from
  before the trigger, about one buffer length old.
* If no trigger happened in a bank since reset, its trigger slot is 0.

The memories are not cleared by reset. Until a bank has been filled once,
part of the trace is whatever the RAM held.

## The display chain

`xvga` counts `displayX` (0..1343) and `displayY` (0..805). Its outputs are:

* `blank`, high outside the visible 1024x768 area;
* `hsync`, active low, 136 pixels long, after a 24-pixel front porch;
* `vsync`, active low, 6 lines long, after a 3-line front porch.

The position and sync signals travel as one packed struct, `dso_pkg::video_t`.

| sprite | latency | draws |
|---|---|---|
| `grid_sprite` | 1 clock | Black background. Grey lines every 128 columns and 96 rows, plus the last column and row. Brighter centre lines at column 512 and row 384. Black while blanked. |
| `curve_sprite` | 2 clocks | Asks the buffer for the sample at address `displayX` and paints yellow on row `384 − ((s − 512) · gain) >>> 4`, where `s` is the 10-bit sample. With gain 12 the full ADC range fills the screen; larger gains zoom in. Pulses `drawStarting` at each frame start. |
| `text_sprite` | 2 clocks | `DISPLAY_LENGTH` characters at (`positionX`, `positionY`). Each character cell is 10 pixels wide and 15 rows high. White where the glyph has a dot. |

The monitor outputs are therefore five clocks behind the raster counters.
The curve sprite's `address` is combinational from its input position. It
counts on the buffer answering exactly one clock later: give the sprite a
different read latency and the trace shifts.

**Font.** `font_rom` holds 40 glyphs in the order digits, `A`–`Z`, space,
`.`, `:`, `-`. That is 40 × 15 rows × 10 bits = 6,000 bits, read from
`rtl/font.hex`. Word `code·15 + row` holds one glyph row, with bit 9 the
leftmost pixel. Each glyph is a 5×7 dot pattern with every dot doubled to
2×2 pixels, filling rows 0–13; row 14 is empty. To change the font,
regenerate the file by the same rule.

In the top level, one text sprite at (16,16) shows `DT: nnnnUS`, the time
between stored samples (`samplePeriod` µs at 1 MSPS). `period_label`
produces these characters.

## Controls (`user_control`)

Every button and every used switch goes through `debounce`: a two-flop
synchronizer, then a counter that passes a new level only once it has been
stable for `DEBOUNCE_CYCLES` clocks. The default is 650,000 clocks, 10 ms at
65 MHz. Each button acts once per press.

| input | effect |
|---|---|
| `buttons[0]` centre | threshold back to 512 |
| `buttons[1]` up / `buttons[2]` down | threshold ± 16, held within 0..1023 |
| `buttons[3]` left / `buttons[4]` right | `samplePeriod` halved / doubled, held within 1..512 |
| `switches[3:0]` | vertical gain (12 = full range) |
| `switches[4]` | trigger on falling edges |
| `switches[5]` | trigger disabled |
| `switches[6]` | free-running display: read from the oldest sample instead of the trigger |
| `switches[7]` | stop (freeze the buffer) |
| `switches[8]` | single-shot mode: stop at the next trigger |

After reset, `samplePeriod` is 1 and the threshold is 512.

`run_stop` turns the two stop switches into the buffer's
`disableCollection`. It is a three-state machine:

* **RUNNING**: collecting. Turning single-shot mode on moves to ARMED.
* **ARMED**: still collecting. The next trigger pulse moves to HELD.
* **HELD**: stopped.

Turning single-shot mode off from ARMED or HELD returns to RUNNING; turning
it on again re-arms. The stop switch overrides all states: while it is on,
collection stops. `disableCollection` rises one clock after the trigger
pulse. The trigger mark of that pulse is therefore still recorded, and the
held record shows the trigger sample at address 0.

## What is fixed and what is chosen

The following come from the original design:

* the block set and its connections;
* the double buffer with its swap, trigger mark and two read modes;
* the downsampling before the buffer;
* the one-clock trigger pulse with its disable and edge choice;
* the sprite chain, with each sprite delaying the sync signals;
* the curve request at address `displayX` and the `drawStarting` swap;
* the text sprite's `DISPLAY_LENGTH` and `characterString`;
* debounced user inputs;
* the signal widths: 12-bit samples, 10-bit buffer output and threshold,
  20-bit read address, 11/10-bit positions and 24-bit pixels;
* the sizes: about 1,000 samples per buffer and a 40-glyph font of 15 × 10
  pixels.

The following are this design's own choices:

* the single 65 MHz clock and the 1024x768 timing numbers;
* a depth of exactly 1024;
* downsampling by keeping one conversion, not by averaging;
* the exact crossing comparisons;
* the base and direction of each read mode;
* detecting a read request from a change of address;
* the swap rule during a stop;
* re-arming single-shot mode by switching it off and on;
* the grid spacing and the colours;
* the scaling formula and its 4-bit gain;
* drawing single dots, with no lines joining neighbouring samples;
* the glyph shapes and the character codes;
* the label text and its position;
* the control mapping, step sizes and debounce time.

The 12-bit to 10-bit steps take the top bits.

## Not included

* The analog biasing network in front of the converter.
* The XADC itself, a vendor core. Its `ready`/`data` outputs are the top
  level's `adcReady`/`adcData` inputs. Its clock, reset and enable inputs are
  not driven from this design.
* The proposal's stretch goals: multiple channels, cursors and measurements,
  math and FFT, autoset, and frame averaging. Run/stop and its
  single-shot mode are included, because the buffer's `disableCollection`
  input is part of the main design.

## Resources

* Sample memory: 2 × 1024 × 12 = 24,576 bits, against the roughly
  24,000 bits the design calls for.
* Font: 6,000 bits.

Both fit easily in the board's 4,860 Kbit of block RAM. The datapath accepts
one sample per clock, far above the one sample per 65 clocks the converter
delivers.

## Simulating

Every block has a self-checking testbench in `tb/`. The small helpers are
tested through their users: `debounce` in `user_control_tb`, `font_rom` in
`text_sprite_tb`, and `period_label` in `dso_top_tb`. Each testbench prints
`TB_RESULT checks=N failures=M` and ends itself with a watchdog if it hangs.
Run them from the directory that holds `rtl/` and `tb/`, because the font
file is read as `rtl/font.hex`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dso_pkg.sv tb/dso_top_tb.sv --top-module dso_top_tb -Mdir obj_top
./obj_top/Vdso_top_tb
```

Use the same command with another `*_tb.sv` and `--top-module` for any other
block.

| testbench | checks |
|---|---|
| `adc_controller_tb` | Decimation for periods 0, 1, 3, 7, 100 and 1023, with random gaps. The one-clock latency and pulse width. |
| `trigger_tb` | A held random walk against the crossing rule on both edges, with random disable. |
| `sample_buffer_tb` | Random writes, marks, swaps, stops and reads in both modes, against a model with two banks. Uses `DEPTH` 12, so wrapping is tested at a depth that is not a power of two. |
| `xvga_tb` | Two full frames: position, blank and sync timing, pixel counts. |
| `grid_sprite_tb` | Every pixel of a frame. |
| `curve_sprite_tb` | Two full frames against a buffer stand-in with random samples and per-line gains. Checks the `drawStarting` timing. |
| `text_sprite_tb` | Random strings and positions, against glyphs written by hand in the testbench. |
| `user_control_tb` | Clean and bouncing presses, saturation at both ends, switch glitches. Uses a 20-clock debounce. |
| `run_stop_tb` | Random stop, mode and trigger sequences against the three-state model. Each of manual stop, capture and re-arm must occur. |
| `dso_top_tb` | 15 full frames at the default parameters, a few seconds of run time: see below. |

`dso_top_tb` drives a 12-bit triangle wave at 1 MSPS. It uses the real
10 ms debouncers. A reference model of the acquisition path predicts every
visible pixel outside the label: trace, grid or black. The test walks through
these settings:

* rising edge, trigger-relative;
* sample period 4, falling edge;
* free-running with the trigger disabled;
* stopped;
* single-shot;
* a higher threshold.

It fails unless each of these happened at least once: decimation, rising and
falling triggers, a suppressed crossing, a bank swap, both display modes, a
stop with at most one swap, a single-shot capture, and the label being
drawn.

The testbench gets some settings by reading internal nets of the top level:
the user-control and run/stop outputs, and the frame-start strobe. Two stretches
are not compared:

* the first raster line of each frame, because the banks swap while it is
  drawn;
* the first five clocks after reset. The sprite pipeline registers have no
  reset, so the monitor outputs are defined only from the fifth clock on.
