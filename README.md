# Single-FPGA oscilloscope with VGA display

This is a two-channel, low-cost digital oscilloscope. It fits in a small FPGA
(an Intel MAX10 10M08 with about 8k logic elements and 378 kbit of block RAM)
and needs no parts outside the chip. The FPGA's built-in 12-bit ADC samples
the inputs at up to 1 MS/s. A soft processor runs the user interface, and the
picture goes straight to a 1024 x 768 VGA monitor.

The main difficulty is the display. A 1024 x 768 frame with 3 bits per pixel
needs 2.36 Mbit, over six times the chip's block RAM. So no frame buffer is
kept. Each pixel's colour is computed on the fly as the beam reaches it, from
small memories:

* one sample per screen column for each trace;
* a one-bit-per-pixel graphic window for text;
* a handful of registers.

The RTL here covers the two hardware blocks of that system and the bus
between them:

* **Sequencer**: paces the ADC, triggers with hysteresis, stores 1024
  samples and interrupts the processor.
* **VGA module**: generates the picture.

The processor, its memory and peripherals, the ADC hard block and the PLLs
are vendor parts. They are not described here, and their signals are ports
of `oscilloscope_top`.

## System view

```
            Avalon-ST cmd / rsp                    Avalon-MM (processor)
 ADC core <=====================> sequencer <----+
 (vendor)                        (1024 x 12 RAM)  |   avalon_decoder   <==== avs_req / avs_readdata
                                       irq ------------------------------> irq
                                                  |
                                    vga_module <--+
                                    3 plot RAMs, text RAM, settings
                                       |
                                       +--> vga_r/g/b, hsync, vsync
```

An acquisition cycle runs like this:

1. The processor configures the sequencer and starts it.
2. The sequencer samples continuously until the trigger condition occurs.
   It then records 1024 samples and raises `irq`.
3. The processor reads the samples over the bus. In dual-channel mode it
   splits them into the two channels and computes the arithmetic channel
   (+, -, *, / between channels 1 and 2).
4. The processor writes the three traces into the VGA module's plot
   memories.
5. The processor updates the text window and the settings (gain, offset,
   trigger line, colours).

The trigger modes auto, normal and single, and button debouncing, are all
software on top of this.

Clocks:

* `clk`, 50 MHz: the processor, the Avalon bus, the sequencer and the ADC
  control core's streams.
* `clk_pix`, 65 MHz: the picture side of the VGA module.

The ADC hard block has its own 10 MHz clock from the first PLL, which does
not enter this RTL. `rst_n` is asynchronous and active low. The VGA module
releases it synchronously in the pixel domain.

## Acquisition: the sequencer

`sequencer` holds the four parts of the acquisition path: `adc_sampler`,
`trigger_unit`, `seq_control` and the acquisition memory (`dual_port_ram`,
1024 x 12).

### Pacing the ADC

`adc_sampler` makes one tick every `PERIOD` clocks while an acquisition is
armed or storing. On each tick it sends conversion commands on the Avalon-ST
command stream:

* **Single-channel mode**: one command for channel 1.
* **Dual-channel (chop) mode**: a two-command packet, channel 1 then
  channel 2.

The ADC converts the two commands back to back, so channel 2 is sampled one
conversion time (1 µs) after channel 1. Only one input is sampled at a time,
and each channel gets at most 500 kS/s.

Results come back on the response stream, which has no backpressure. They
are tagged as channel 1 or channel 2 by their channel number, so the two ADC
channel numbers must differ in dual mode.

If a tick arrives while the previous commands have not been accepted, the
tick is dropped and `ev_overrun` pulses. This happens when `PERIOD` is below
50 in single mode or below 100 in dual mode at 50 MHz. The ADC then simply
runs at its maximum rate.

| mode   | PERIOD (clocks at 50 MHz) | rate                      |
|--------|---------------------------|---------------------------|
| single | 50 (reset value)          | 1 MS/s                    |
| dual   | 100                       | 500 kS/s per channel      |
| either | N                         | 50 MHz / N ticks per second |

### Trigger with hysteresis

A plain level-crossing trigger fires on every wiggle of a noisy signal near
the level T. `trigger_unit` instead uses a band from T-H to T+H:

* **Rising edge**: a sample at or below T-H *arms* the trigger. A later
  sample at or above T+H *fires* it.
* **Falling edge**: the mirror image. A sample at or above T+H arms the
  trigger, and a sample at or below T-H fires it.

Firing disarms the trigger. Noise smaller than 2H around T can therefore
fire it only once per real edge. In the testbench, a noisy triangle with
±150 codes of noise fires dozens of times with H = 0 and exactly once per
edge (5 times) with H = 200.

Other details:

* The band limits saturate at 0 and 4095.
* The trigger watches only the selected channel's samples (channel 1 or 2
  in dual mode).
* Starting an acquisition disarms it.
* A forced trigger (a register write) fires it at once. Software uses this
  for the auto and single modes.

The trigger output is registered. It pulses the clock after the sample that
caused it.

### Storage

Storage is post-trigger only. The 1024 samples that follow the triggering
sample are written to addresses 0..1023.

In dual mode, channel 1 goes to even addresses and channel 2 to odd
addresses, giving 512 pairs. The write address's low bit must match the
sample's channel, and a sample that would break this is skipped. So a record
always starts with a channel 1 sample, whichever channel triggered. An
assertion in `seq_control` guards this rule.

After the last sample the state goes to DONE, sampling stops and the
interrupt becomes pending. Completing an acquisition takes 1024 x `PERIOD`
clocks after the trigger (512 x `PERIOD` in dual mode).

States: IDLE -> (start) ARMED -> (trigger or force) STORING -> (1024
samples) DONE. A new start restarts from any state, and stop returns to IDLE.

### Register map

The sequencer uses Avalon-MM word addresses. Bus address bit 13 = 0 selects
the sequencer. There is one clock of read latency and no wait states.

| word address | name   | access | bits |
|---|---|---|---|
| 0 | CTRL   | W | b0 start (re-arm), b1 force trigger, b2 stop |
| 0 | STATUS | R | b0 armed, b1 storing, b2 done |
| 1 | CONFIG | R/W | b0 dual, b1 trigger source (0 = ch1, 1 = ch2), b2 falling edge, [12:8] ADC channel of ch1 (reset 1), [20:16] ADC channel of ch2 (reset 2) |
| 2 | PERIOD | R/W | [23:0] clocks per sampling tick (reset 50) |
| 3 | LEVEL  | R/W | [11:0] trigger level T (reset 2048) |
| 4 | HYST   | R/W | [11:0] hysteresis H (reset 16) |
| 5 | IRQEN  | R/W | b0 interrupt enable (reset 0) |
| 6 | IRQ    | R, W1C | b0 pending; write 1 to clear |
| 1024 + i | sample i | R | [11:0] |

`irq` is the pending bit ANDed with the enable bit.

## Display: on-the-fly frame generation

### Pixel pipeline

`vga_signal_generator` runs column and row counters over the full
1344 x 806 frame, blanking included. It sends them as the *pixel address*
(`pix_addr_t`: col, row, active) to six frame generators working in
parallel:

| priority | generator | draws |
|---|---|---|
| 1 (top) | `text_generator` | set bits of the graphic text window |
| 2, 3, 4 | `plot_generator` x3 | channel 1, channel 2, arithmetic channel |
| 5 | `trigger_generator` | horizontal line at the trigger row |
| 6 | `grid_generator` | dotted 8 x 8 graticule |
| - | (none) | background colour |

Each generator answers with a *pixel request*: "I have a foreground pixel
here". It answers exactly `GEN_LATENCY` = 3 clocks after the address.
`priority_mux` takes the colour of the highest-priority requester, or the
background colour, and registers it. That is `PIXEL_LATENCY` = 4 clocks in
all.

The signal generator delays hsync, vsync and blanking by the same 4 clocks.
It then registers the colour (forced to black outside the visible area)
together with the sync signals, so the pins change together.

If you add a generator, it must have the same 3-clock latency. Alternatively,
change `GEN_LATENCY` / `PIXEL_LATENCY` in `osc_pkg`.

The timing is the standard 1024 x 768 at 60 Hz mode: 24/136/160 clocks of
horizontal front porch, sync and back porch; 3/6/29 lines vertically;
negative sync. 65 MHz / (1344 x 806) = 60.0 Hz. All of these are parameters
of `vga_module`.

### Plot channels

Each `plot_generator` contains its own 1024 x 12 plot memory. The column
counter addresses the memory, so column c shows sample c. The sample is
scaled to a screen row and compared with the row counter:

```
y = offset - ((sample * gain) >> 8)      gain: unsigned 8.8, offset: row of code 0
request when row == y
```

The three clocks are: memory read, multiply-subtract, compare.

At reset the gain is 48 and the offset is 767, which maps codes 0..4095 onto
rows 767..0. Each column lights exactly one pixel. Steep edges therefore show
as separate dots rather than joined vertical segments.

### Text as graphics

There is no font ROM. The text window is a bit map that the processor fills
with character patterns from its own memory, so fonts and symbols are purely
software. By default the window is 1024 x 32 pixels at the top of the screen,
stored as 1024 words of 32 bits:

* word `row * 32 + col / 32`;
* bit `col % 32`, with bit 0 as the leftmost pixel.

Its position and size are parameters of `text_generator`.

### Register map

The VGA module uses word addresses with bus address bit 13 = 1.
`address[12:10]` selects the region.

| region | contents |
|---|---|
| 0 | registers, below |
| 1, 2, 3 | plot memory of channel 1, 2, arithmetic; `address[9:0]` = column, data [11:0]; write-only |
| 4 | text bit map; `address[9:0]` = word; write-only |

| reg | name | bits (reset) |
|---|---|---|
| 0 | ENABLE | b0..b2 plots, b3 text, b4 trigger line, b5 grid (all 1) |
| 1..3 | GAIN k | [15:0] 8.8 (48) |
| 4..6 | OFFSET k | [11:0] row of code 0 (767) |
| 7 | TRIG | [11:0] trigger line row (384) |
| 8 | COLOUR | 3 bits each, {r,g,b}, LSB first: plot0 (yellow), plot1 (cyan), plot2 (magenta), text (white), trigger (red), grid (blue), background (black) |

The settings live in the 50 MHz domain. They reach the pixel domain through
two plain register stages. They are static in normal use, and a change in
mid-frame affects only that frame. The memories are simple dual-port RAMs,
written on `clk` and read on `clk_pix`.

## Bus

`avalon_decoder` connects one Avalon-MM master to the two slaves:

* The shared address and write data go to both slaves.
* The read and write strobes go only to the slave selected by address
  bit 13.
* Read data is returned one clock later from the slave that was read.

The bus uses simple transfers with separate read and write data buses. In a
full system the vendor's bus generator plays this role, and the processor's
interrupt controller takes `irq`.

## Files

| file | what it is |
|---|---|
| `rtl/osc_pkg.sv` | widths, Avalon request struct, register maps, settings struct, pixel address struct, latencies |
| `rtl/oscilloscope_top.sv` | top: decoder + sequencer + VGA module |
| `rtl/avalon_decoder.sv` | bus decode and read-data return |
| `rtl/sequencer.sv` | acquisition module |
| `rtl/adc_sampler.sv`, `rtl/trigger_unit.sv`, `rtl/seq_control.sv` | its parts |
| `rtl/dual_port_ram.sv` | simple dual-port RAM with two clocks (acquisition, plot and text memories) |
| `rtl/vga_module.sv` | display module |
| `rtl/vga_control.sv`, `rtl/vga_signal_generator.sv`, `rtl/plot_generator.sv`, `rtl/text_generator.sv`, `rtl/trigger_generator.sv`, `rtl/grid_generator.sv`, `rtl/priority_mux.sv` | its parts |
| `tb/adc_model.sv` | behavioural ADC + control core: 50-clock conversions, sample-and-hold at command acceptance |
| `tb/tb_*.sv` | one self-checking testbench per module |

The memory footprint is 81,920 bits (acquisition 12,288; plots 36,864; text
32,768). In 9-kbit block RAMs that is about 12 blocks, leaving the rest of
the device's RAM for the processor's program and data.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --assert -Wno-fatal \
    -y rtl -y tb rtl/osc_pkg.sv tb/tb_oscilloscope_top.sv \
    --top-module tb_oscilloscope_top -o sim
./obj_dir/sim
```

Replace the top module and the testbench file for any other testbench.
`-y` lets Verilator find the other modules by file name, and `-Wno-fatal`
keeps the width warnings in the testbenches from stopping the build.

`tb_oscilloscope_top` runs the whole design with every parameter at its
default. Its sequence:

1. A single-channel acquisition on a rising edge.
2. A dual-channel chop acquisition triggered on channel 2's falling edge,
   with a period short enough to cause overruns.
3. A forced trigger on a flat input.

Each record read back over the bus is compared with the samples the ADC model
returned after the trigger. After the dual acquisition, the testbench plays
the processor: it separates the channels, computes (ch1 + ch2) / 2, writes
the plots, text and settings, and compares one whole 1024 x 768 frame at the
VGA pins with a reference picture. The run also counts and requires each of
these: triggers, forced trigger, both edges, both modes, overrun, interrupt,
frames, every generator's pixels and priority decisions. It takes a few
seconds.

The module testbenches check the following:

* The sequencer at full depth against an independent trigger/storage model,
  including the 1024 x `PERIOD` acquisition time.
* The sampler's tick spacing, packet framing and 1 µs channel spacing.
* The trigger against a reference model on random data.
* Every generator pixel by pixel over a whole frame.
* The VGA timing: line and frame length, sync widths and colour/sync
  alignment.

## Trust and departures

The following are design choices, because the original design description
does not give them:

* all register maps, reset values and field widths;
* the 12-bit sample width (that of the MAX10 ADC);
* the exact hysteresis rule;
* the post-trigger-only recording (no pre-trigger samples);
* the text window size and place;
* the grid spacing and style;
* the priority order;
* the plot scaling formula;
* the trigger line as a solid line at a row written by software;
* the porch and sync values of the VGA mode;
* one clock of read latency on the bus.

These are not in the RTL:

* the processor and its software (user interface, trigger modes, channel
  separation, arithmetic channel, text rendering, debouncing);
* the processor's RAM, GPIO, timer, UART and system ID peripherals;
* the PLLs;
* the ADC and its control core, which are modelled in `tb/adc_model.sv`.

The plot memories cannot be read back over the bus. The ADC model has a
fixed 50-clock conversion and no analog behaviour.
