# A low-cost digital oscilloscope on one FPGA

A bench oscilloscope is expensive mainly because of its screen, its
acquisition memory and its control electronics. This design puts all of the
digital part of a simple oscilloscope into one small FPGA and uses an
ordinary VGA computer monitor as the screen and a PS/2 mouse as the only
control. An 8-bit video converter samples the conditioned input at 25 MHz.
The FPGA waits for the signal to cross a trigger level, stores the next 640
samples (one per screen column), and redraws them as a trace on a 640x480
VGA image. While the record is shown, the memory's second port is free to
take the next record.

The RTL here is the FPGA logic plus a behavioural model of the converter.
The analog front end is an anti-alias low-pass filter, a Zener voltage
limiter, a gain selector with AC/DC coupling, and a level shifter into the
converter's 1.5 V to 3.5 V range. It is circuitry, not logic, so it is
reached only through two control outputs.

## Signal path

```
 probe -> [analog front end] -> ADC (8 bit, 25 MHz) --adc_data--> osc_top
                ^  ^                ^
     scale_sel  |  | coupling_ac    | adc_clk
                                                     osc_top (one FPGA)
   adc_data -> input reg --+--> trigger --trig--> capture_ctrl --we/addr/data--> sample_ram
                           +------------------------^                               |
                                                                        read port   v
   VGA pins <- rgb, hsync_n, vsync_n <---------------------------------------- image_gen
   PS/2 pins <-> mouse_if --packets--> ctrl_ui --trigger level--> trigger
                                               --coupling, scale--> front-end outputs
   clk_ctrl: adc_clk, sample_en, pix_en for everything above
```

| Module | Role |
|---|---|
| `osc_top` | Top level: wires the blocks together; pins for the converter, the VGA connector, the PS/2 port and the front-end switches |
| `osc_pkg` | Screen geometry, record size, `rgb_t`, `mouse_pkt_t`, `settings_t` |
| `clk_ctrl` | Converter clock and the sample and pixel strobes |
| `trigger` | Rising-edge level trigger |
| `capture_ctrl` | Write-side manager of the sample memory: arm, write, hold, re-arm |
| `sample_ram` | 640 x 8 dual-port memory, one write port and one read port |
| `vga_timing` | 640x480 counters and sync pulses |
| `image_gen` | Reads the memory column by column and paints the trace |
| `mouse_if`, `ps2_rx`, `ps2_tx` | PS/2 mouse host: enables the mouse and decodes its packets |
| `ctrl_ui` | Turns mouse actions into trigger level, coupling and scale |
| `adc_model` | Behavioural model of the converter (testbenches only) |

## Clocking and the converter interface

Everything runs on one board clock, 100 MHz by default. `clk_ctrl` divides
it by `SAMPLE_DIV` = 4 to make the converter clock `adc_clk` (25 MHz). It
also makes two one-cycle strobes: `sample_en` for the sample rate and
`pix_en` for the pixel rate, also 25 MHz (`PIX_DIV` = 4). Using strobes
instead of derived clocks keeps a single clock domain. The memory therefore
needs no clock-domain crossing between its write side and its read side.

`adc_clk` is low for the first half of each sample period and high for the
second half. The converter changes its output word at the rising edge.
`osc_top` registers `adc_data` every board cycle and uses the registered
word when `sample_en` is high. `sample_en` comes in the last board cycle
before `adc_clk` rises. By then the word has been stable for about half a
sample period. With the defaults this is 2 board cycles = 20 ns. The word
that is used left the converter at the previous rising edge. If your
converter's output delay differs, move `sample_en` within the period.
`SAMPLE_DIV` must be at least 2.

The converter model has a 5-clock pipeline latency and a straight-binary or
two's-complement output. The FPGA logic expects straight binary.

## The life of a record

`capture_ctrl` decides when the memory is written. This is the part of the
design that determines what the user sees.

1. **ARMED.** Nothing is written. `trigger` compares each new sample with the
   previous one. It fires when the previous sample was below the trigger
   level and the new one is at or above it. The sample that fires it is
   written to address 0.
2. **WRITE.** Each later `sample_en` writes the next address. After address
   639 the record is complete and the `captures` counter increments. There
   are no pre-trigger samples. The first column of the screen is always the
   crossing point, so a periodic signal stands still on the screen.
3. **HOLD.** The record is left alone. Triggers are ignored. After
   `REARM_FRAMES` (default 2) `frame_start` pulses, the manager goes back to
   ARMED. `frame_start` marks the start of vertical blanking. The first
   pulse ends the frame in which the record was completed. That frame may
   have shown part of the old record and part of the new one. The second
   pulse ends a frame that showed only the new record. So every record is
   shown cleanly at least once.

Writes and display reads use the two ports of the memory and may happen in
the same cycle. A record written while the screen is being drawn shows up
partly in the frame being drawn. Re-arming only at a frame boundary keeps
the time this takes to one frame. If the signal never crosses the level,
the last record stays on the screen.

The write outputs (`we`, `wr_addr`, `wr_data`) are registered and come one
cycle after their `sample_en`. An assertion checks that no write goes past
the end of the memory.

## Drawing the trace

`image_gen` maps column x of the screen to sample x of the record. The
memory is read once per pixel (`rd_en = pix_en`), so the whole record is
read once for every visible line. A sample value s is drawn at row

    row(s) = 479 - floor(s * 480 / 256)      (s = 0 at the bottom, 255 at row 1)

A pixel (x, y) is painted in the trace colour (yellow, `r=3 g=3 b=0`) when y
lies between row(sample[x-1]) and row(sample[x]), both included. At x = 0
only row(sample[0]) is painted. This joins neighbouring samples with
vertical strokes, so fast edges appear as lines and not as scattered dots.
Every other pixel is black. The blue component is therefore always 0.

Pipeline: the timing counters point at pixel P. The memory returns
sample[P] at the next strobe. The colour of pixel P leaves at the strobe
after that. `hsync_n` and `vsync_n` pass through the same two stages, so
the pins stay aligned: each pixel reaches them two pixel periods after its
counters. The timing is the standard 640x480 at 60 Hz: 800 x 525 pixels
per frame, sync pulses active low, hsync on pixels 656 to 751, vsync on
lines 490 to 491. With a 25 MHz pixel rate instead of 25.175 MHz the frame
rate is 59.5 Hz, which monitors accept.

## Mouse control

`mouse_if` is a PS/2 host. The lines are open collector, so the module does
not drive them. It has inputs for the line levels and drive-low enables
`ps2_clk_low` and `ps2_data_low` for external open-drain buffers. After
reset:

* it sends "enable data reporting" (0xF4). To do so it holds the clock low
  for 100 µs (`INHIBIT_CYCLES`), then pulls data low, then sends 8 bits,
  odd parity and a stop bit on the clock edges the mouse generates, and then
  reads the mouse's acknowledge bit;
* it waits for the answer byte 0xFA. If the command fails, or another byte
  arrives instead, it sends the command again;
* it then decodes the stream of 3-byte packets (buttons, 9-bit signed X and
  Y movement). A first byte without bit 3 set is taken as out of step and
  dropped. A frame with a parity or framing error restarts packet assembly.

If no mouse is connected the transmitter waits for clock edges that never
come, and the instrument keeps its reset settings.

`ctrl_ui` maps packets to settings:

| Mouse action | Effect |
|---|---|
| vertical movement dy | trigger level += dy >> `MOVE_SHIFT`, held within 0..255 |
| left button press | `scale_sel` steps 0, 1, 2, 3, 0, ... |
| right button press | `coupling_ac` toggles (DC after reset) |

A press means the button was up in the previous packet and is down in this
one, so holding a button does not repeat. After reset the trigger level is
128 (mid-scale). Nothing on the screen shows the settings. The trace only
shows where the record starts.

## Outside the FPGA

| Part | What connects to it |
|---|---|
| Low-pass filter, limiter, level shifter | nothing (analog) |
| Gain selector (4-input analog multiplexer) and AC/DC coupling | `scale_sel[1:0]`, `coupling_ac` |
| 8-bit converter | `adc_data[7:0]` in, `adc_clk` out (`adc_model` stands in for it in simulation) |
| VGA resistor DAC, 2 bits per colour | `rgb` (`rgb_t`: `r[1:0]`, `g[1:0]`, `b[1:0]`), `hsync_n`, `vsync_n` |
| PS/2 mouse | `ps2_clk_i`, `ps2_data_i`, `ps2_clk_low`, `ps2_data_low` |

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `SAMPLE_DIV` | 4 | `osc_top`, `clk_ctrl` | board cycles per sample (100 MHz / 4 = 25 MHz) |
| `PIX_DIV` | 4 | `osc_top`, `clk_ctrl` | board cycles per pixel |
| `INHIBIT_CYCLES` | 10000 | `osc_top`, `mouse_if` | PS/2 request time, 100 µs |
| `RX_TIMEOUT` | 20000 | `osc_top`, `mouse_if` | drop a partial PS/2 frame after this many idle cycles |
| `REC_DEPTH` | 640 | `osc_pkg` | record length = visible pixels per line |
| `SAMPLE_W` | 8 | `osc_pkg` | converter word |
| `REARM_FRAMES` | 2 | `capture_ctrl` | frame starts between the end of a record and re-arming |
| `MOVE_SHIFT` | 0 | `ctrl_ui` | mouse-to-level sensitivity |
| `HA` ... `VBP` | 640, 16, 96, 48, 480, 10, 2, 33 | `vga_timing`, `image_gen` | screen timing |

If you change the board clock, scale `SAMPLE_DIV`, `PIX_DIV` and the PS/2
cycle counts with it. The record is 640 words of 8 bits, 5120 bits in all,
which is one small block RAM.

## Where this design makes its own choices

The block structure comes from the source design. So do the record size and
the "write from address 0 when the trigger says so" rule, the 25 MHz sample
rate and 8-bit samples, the 640x480 VGA output with 2 bits per colour, and
mouse control of trigger, coupling and scale. The following were decided
here:

* the single clock domain with strobes, and the point in the period at
  which the converter word is taken;
* the trigger: a rising-edge level crossing only, with no slope choice and
  no automatic or free-running mode;
* no pre-trigger samples, and the hold-for-one-full-frame re-arm policy;
* the vertical scaling, the joined-sample drawing and the colours; there is
  no grid, cursor or on-screen readout;
* the PS/2 handling, which is the standard protocol, and the mapping of
  mouse actions to settings;
* the 2-bit scale select, sized for a 4-input analog multiplexer;
* the converter model's latency and output timing.

Not built: a longer record (a memory of about 40 kbit would fit the FPGA
used, but the display would need a way to pick which 640 samples to show),
a second channel, averaging, harmonic analysis, a spectrum view and a
signal generator. These are possible extensions of the original design,
not parts of it. There is also no timebase selection: the sample rate is
fixed at 25 MHz, so one screen spans 25.6 µs.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. Build and run one with
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_osc_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/osc_pkg.sv tb/tb_osc_top.sv
./obj_dir/Vtb_osc_top
```

| Testbench | What it checks |
|---|---|
| `tb_osc_top` | The whole design at its default parameters: a 200 kHz sine through the converter model, a PS/2 mouse model with real PS/2 timing. Checks mouse enable. Each record must equal a 640-word stretch of the converter's output that starts at a rising crossing of the level. A whole VGA frame, decoded from the pins only, is compared pixel by pixel with the expected trace. A mouse move and two clicks change level, scale and coupling, then a second record is checked at the new level. Counts trigger starts, completed records, re-arms, ignored triggers, memory writes during visible lines and mouse packets. About 10 s. |
| `tb_clk_ctrl` | strobe periods, `adc_clk` duty cycle, `sample_en` right before the rising edge |
| `tb_trigger` | random stream against a reference of the crossing rule |
| `tb_capture_ctrl` | every write against a reference model of ARMED/WRITE/HOLD, with random strobes, triggers and frame starts (16-word record) |
| `tb_sample_ram` | full fill and readback, random simultaneous read and write, old data on collision, hold while `rd_en` is low |
| `tb_vga_timing` | two full frames: counters, active area, sync positions, `frame_start` |
| `tb_image_gen` | one full frame against the drawing rule, with ramps, full-scale jumps and random samples |
| `tb_mouse_if` | command and parity, ready, 40 random packets, a stray byte and a parity error |
| `tb_ctrl_ui` | level clamping at both ends, scale stepping, coupling toggling, no repeat while a button is held |
| `tb_adc_model` | transfer function, clamping, latency, output format |

`tb/ps2_mouse_model.sv` is a behavioural PS/2 mouse. It answers the host's
request with 0xFA and sends packets on demand. Testbenches use it.
