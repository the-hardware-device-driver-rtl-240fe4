# CCB backend FPGA core

The Caltech Continuum Backend (CCB) is a radiometer backend. Sixteen A/D converters sample the
analog integrators of the receiver: 2 detectors × 4 bands × 2 radiometers. Two phase switches, A
and B, modulate the signal. The FPGA accumulates every converter's samples separately for each of
the four A/B switch combinations. At the end of each integration period it hands the resulting 64
sums to the host driver by PCI DMA and raises an interrupt. This repository holds synthesizable
SystemVerilog for that core. The behaviour follows the CCB hardware/driver interface
specification: the programmable phase-switch sequence, sample blanking, calibration-diode
switching, the scan life cycle, the DMA data layout and the interrupt protocol.

The PCI core, the A/D converters and the power-supply monitors are outside this RTL. The core
connects to them through a plain register bus, a valid/ready DMA write port and a strobe/valid
A/D interface.

## Time structure: samples, cycles, integrations, scans

Everything is timed in ticks of 0.1 µs.

| unit | made of | set by |
|---|---|---|
| sample | `sample_interval` ticks (default 250 = 25 µs) | per-scan register |
| cycle | `samples_per_cycle` samples (1..32, default 1) | per-scan register |
| integration | `integ_period` cycles (default 40 → 1 ms) | per-scan register |
| scan | integrations sharing one per-scan configuration | start/stop scan commands |

The **per-scan** registers are only read when a scan starts. The driver may write them at any
time. The **per-integration** registers (the two cal-diode states and an update flag) are copied at
the start of every integration. The integration interrupt tells the driver that this copy has just
happened, so it can write the values for the *next* integration. This is why the per-integration
configuration always runs one integration ahead.

## Phase switching and blanking (`ccb_phase_switch`, `ccb_sample_timer`)

Three 32-bit words describe one cycle, one bit per stage: switch A's state, switch B's state and
an update flag. At the first sample of a cycle the words are loaded into shift registers. Each
later sample shifts them right, so bit *k* governs sample *k* of the cycle. Where the update flag
is set, the switches take that stage's A/B bits. Where it is clear, they keep their previous
states, even across cycle, integration and scan boundaries. The 2-bit state `{B,A}` selects which
of the four integrations a sample goes into.

Each sample begins with a blanked span, during which the analog integrator does not integrate
(`integ_gate` low):

```
 tick: 0 ........ ireset ........ ireset+ps_blank ............ interval-1
       |-int_reset-|-- ps blanking --|--------- integ_gate ---------|adc_convert
                    (only after a phase-switch update)
```

The integrator-reset blanking (`int_reset` high) applies to every sample. The phase-switch
blanking is added only to samples whose stage has its update flag set. On the last tick
`adc_convert` pulses. The 16 converters return their results together with `adc_valid`. They may
return any number of clocks later, but must do so before the end of the next sample. The
integrator adds the results to the state the sample had when it ended. The driver must keep
`sample_interval` above the sum of the two blanking times. The hardware does not check this.

## The life of a scan (`ccb_scan_ctrl`)

This is the part that needs the most care. The states are:

```
 IDLE --en_irq--> LOAD_SCAN --> LOAD_INTEG --> IRQ --> CAL --(settled)--> RUN
                      ^              ^                                    |  |
                      |              +--------- not stop_scan -----+      |  |
                      |                                            |      |  |
                      +---------- stop_scan ------------------- DUMP <----+  |  last sample of
                      |                                                      |  the integration
                 WAIT_PPS <---------- start_scan (at end of current sample) -+
                      (leaves on the next 1-PPS rising edge)
```

* **Start-up.** After reset the control register is zero and nothing runs. The first scan starts,
  using whatever the registers then hold, when the driver sets *enable interrupts*. This lets the
  driver set up the registers before the first scan.
* **Integration start** (`LOAD_INTEG`, `IRQ`, `CAL`). The steps happen in this order:
  1. Copy the per-integration registers.
  2. Clear the 64 sums.
  3. Arm the monitoring cache.
  4. Restart the phase-switch cycle.
  5. One clock later, set the integration-interrupt-sent register, which raises the interrupt.
  6. If the cal diodes were switched, wait out their settling time.
  7. Start sampling.

  The interrupt always comes after the copy. The driver therefore never races the hardware for the
  per-integration registers.
* **Integration end** (`DUMP`). When the last sample of the last cycle has been converted and
  added, the DMA writer copies out the 82 words of results. The next integration then starts with
  its interrupt. Every integration interrupt except the first of a scan therefore means "new data
  is in memory". Sampling pauses for the dump, which takes about 82 clocks.
* **Start scan** (control bit 0). The current sample is allowed to finish. If the command arrives
  while the cal diodes are settling, no sample is running, so it takes effect at once. The core then waits for
  the next rising edge of 1-PPS. On that edge it copies the per-scan registers and starts a new
  scan. The partial integration is thrown away: no dump is made, so the scan's first interrupt
  carries no data. This gives scans that start on a chosen second.
* **Stop scan** (control bit 1). The current integration is completed and written out. A new scan
  with the current registers then starts immediately, without waiting for 1-PPS. It is meant for
  quick monitoring changes.
* **Reload** (control bit 2). All registers return to their defaults and the control register is
  cleared, just as after loading the FPGA. `reload_req` pulses so that board logic can reconfigure
  the device. The core then waits for *enable interrupts* again.

Start and stop commands stay set until the controller accepts them, and then read back as 0.

## Calibration diodes (`ccb_cal_diode`)

At each integration start, if the update flag is set and the requested states differ from the
current ones, the diodes switch. Sampling is then held off for `cal_settle` ticks. The settle
counter is 32 bits wide, much longer than any other timer, because the diodes' real settling time
was uncertain. If the flag is clear, or the states do not change, there is no delay.

## Results: integrators and the DMA area (`ccb_integrator`, `ccb_monitor`, `ccb_dma_writer`)

The 64 sums are unsigned 32-bit values. A sum that would pass 2^32−1 stays at 2^32−1, and its
overflow flag stays set until the next integration. The DMA area is written as little-endian
32-bit words:

| byte offset | contents |
|---|---|
| 0 .. 255 | value *i* = sum for phase state *s* of converter *c*, *i* = *s* + 4·*c* |
| 256 .. 263 | overflow mask: bit *i* belongs to value *i* |
| 264 .. 327 | monitoring: the 16 converters' first results after the integration started |

Converter numbering is *c* = detector + 2·band + 8·radiometer, counting from 0. The phase state is
*s* = A + 2·B.

The overflow mask is stored big-endian as a 64-bit quantity. Bit 0 is the least significant bit of
byte 263 and bit 63 is the most significant bit of byte 256. As little-endian words, the word at
256 is `ovf[63:32]` byte-reversed and the word at 260 is `ovf[31:0]` byte-reversed.

The monitoring values let the driver spot dead or saturating converters. They are captured at the
start of each integration, so the dump only has to copy them.

## Registers (`ccb_regs`)

All registers are 32-bit words. The word address goes on `bus_addr`, so byte address = 4 × word
address.

| word | register | bits | default |
|---|---|---|---|
| 0 | sample interval (0.1 µs) | 15:0 | 250 |
| 1 | samples per cycle | 5:0 | 1 |
| 2 | phase switch A states | 31:0 | 0 |
| 3 | phase switch B states | 31:0 | 0 |
| 4 | phase switch update flags | 31:0 | 0 |
| 5 | integration period (cycles) | 15:0 | 40 |
| 6 | phase-switch blanking (0.1 µs) | 7:0 | 0 |
| 7 | integrator-reset blanking (0.1 µs) | 7:0 | 0 |
| 8 | cal-diode settling time (0.1 µs) | 31:0 | 0 |
| 9 | cal-diode states (bit 0 = A, bit 1 = B) | 1:0 | 0 |
| 10 | cal-diode update flag | 0 | 0 |
| 11 | control: 0 start scan, 1 stop scan, 2 reload, 3 enable interrupts, 4/5 drive phase switch A/B, 6/7 drive cal diode A/B | 7:0 | 0 |
| 12 | integration interrupt sent | 0 | 0 |
| 13 | 1-PPS interrupt sent | 0 | 0 |

Words 0–8 are per-scan and words 9–10 are per-integration. Each bit of words 2–4 is one stage,
bit 0 first.

## Interrupts (`ccb_irq`)

One level-sensitive, active-high line, `irq`, is shared by two sources:

* the integration interrupt;
* the 1-PPS interrupt, raised on every rising edge of `pps_in`, which is synchronised with two
  flip-flops.

Each source sets its own "sent" register. The driver's handler reads both registers to tell the
sources apart, and to recognise spurious interrupts. It clears each one by writing 0. The line is
high while either register is set. Clearing *enable interrupts* stops the sent registers from
being set and masks the line. The scan machinery keeps running, and 1-PPS edges still synchronise
start-scan.

Bits 4–7 of the control register only gate the outputs `ps_a_oe`, `ps_b_oe`, `cal_a_oe` and
`cal_b_oe`. The switch and diode state machines behind them keep running. This lets the backend
share a front end with other equipment or use fewer switches.

## Top level (`ccb_top`)

| group | ports |
|---|---|
| register bus | `bus_we`, `bus_addr[3:0]`, `bus_wdata[31:0]`, `bus_rdata[31:0]` (combinational read) |
| interrupt, time | `irq`, `pps_in` (asynchronous) |
| A/D converters | `adc_convert` (pulse), `adc_valid`, `adc_data[16][ADC_W]` |
| analog integrators | `int_reset`, `integ_gate` |
| front end | `ps_a`, `ps_b`, `cal_a`, `cal_b` and their `_oe` enables |
| DMA | `dma_valid`, `dma_ready`, `dma_addr[11:0]` (byte offset), `dma_data[31:0]` |
| configuration | `reload_req` |

Parameters:

* `CLK_PER_TICK` (default 10): clocks per 0.1 µs tick. The default assumes a 100 MHz clock.
* `ADC_W` (default 16): A/D result width, at most 32.

Everything is synchronous to `clk`, with an asynchronous active-low `rst_n`. Shared types,
defaults and addresses are in `ccb_pkg`.

## Choices this design makes

These points are not fixed by the interface specification, or it could be read more than one way:

* The clock, the A/D width and interface, the register addresses, the bus protocols and the
  positions of the overflow mask and monitoring words in the DMA area.
* The specification calls the cal-diode settling time a count of A/D samples to discard in one
  place, and a time in 0.1 µs units in its register table. This design follows the table: it
  waits that many ticks without sampling.
* The specification both asks for a new scan with default values right after a reload, and for
  the FPGA to wait for *enable interrupts* after being loaded. This design waits.
* Inside the blanked span, integrator-reset blanking comes first and phase-switch blanking second.
  Only their sum is specified.
* Sums saturate on overflow rather than wrap.
* The monitoring cache holds the first conversion after each integration start.
* The power-supply voltage monitoring values are not produced. Their number and the measuring
  hardware are unspecified.
* The exact split of the scan sequence into states is this design's own. Only the behaviour seen
  by the driver is specified.
* Out-of-range register values are handled as follows: an interval, cycle length or period of 0
  is treated as 1, and a cycle length above 32 as 32.

## Simulation

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. Every testbench has a watchdog.

* `ccb_top_tb` runs the whole core end to end against an independent model. It plays the driver,
  the converters, a stalling DMA target and a 1-PPS source. It goes through phase switching,
  blanking, cal-diode settling, start and stop scan, overflow, masked interrupts, disabled outputs
  and reload. It then compares every DMA dump word by word. It uses `CLK_PER_TICK=2` and
  `ADC_W=32` so that overflow is reached quickly.
* `ccb_modes_tb` builds the switch patterns for no switching, 1-diode switching and 2-diode
  switching, the way a driver would. It starts a 1-PPS-synchronised scan for each mode, and
  checks that each phase state collects exactly the expected number of samples.
* `ccb_full_tb` runs the core at its defaults. It checks three 1 ms integrations at the reset
  configuration, including their timing and contents.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module ccb_top_tb rtl/ccb_pkg.sv tb/ccb_top_tb.sv
./obj_dir/Vccb_top_tb
```

Swap in any other testbench name. Each finishes in a few seconds.
