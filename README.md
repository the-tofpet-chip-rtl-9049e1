# TOFPET digital readout: time-stamping 64 SiPM channels

This chip reads out 64 silicon photomultiplier (SiPM) channels for a
time-of-flight PET scanner. It measures everything as a time. Every hit gets
two time stamps:

- **t1** is when the low-threshold *timing* discriminator output (DOT) rises.
- **t2** is when the high-threshold *energy* discriminator output (DOE) falls.

t1 is the arrival time. t2 − t1 is the time over threshold, and the energy is
read from that. Each time stamp has two parts:

- A **coarse** part: the count of a 160 MHz master clock (6.25 ns steps), kept
  in 10 bits and Gray-coded.
- A **fine** part, from a time-to-amplitude converter (TAC). The TAC charges
  from the trigger until the next clock edge that stops it. A Wilkinson ADC
  then discharges it 128 times more slowly, and the discharge time is counted
  in master clocks. 6.25 ns / 128 gives a bin of 48.8 ps.

The SystemVerilog here is the chip's **digital part**:

- a TDC controller per channel, with four TAC pairs used as a derandomising
  buffer;
- a data buffer that collects events from the 64 channels;
- a global controller with the time base, SPI configuration, test pulse and
  serial output.

The analog parts are outside the RTL and reach it through ports. They are the
front-end amplifiers, the discriminators, the DOT delay line, the analog
validation gate, the TACs and ADCs, the calibration and bias DACs, and the LVDS
pads. A behavioural TAC/ADC model in `tb/` stands in for them in simulation.

## Blocks

| module | role |
|---|---|
| `tofpet_pkg` | widths (64 channels, 10-bit coarse count, 4 TAC pairs), configuration and event records, default configuration vector, Gray/binary functions |
| `trigger_latch` | catches an asynchronous discriminator edge. It gives the half-clock flag and a copy synchronised through 0–3 flip-flops |
| `wtac_generator` | writes one TAC (IDLE → CHECK → [HOLD] → STOP → PRESET) |
| `sync_validation` | SYNC-mode hit decision from the synchronised DOT and DOE latches |
| `tdc_ctrl` | one channel: three latches, two TAC writers, validation, TAC-pair allocation, conversion control, channel data register |
| `data_buffer` | round-robin collection of the 64 channel registers into a 16-entry FIFO with back-pressure |
| `coarse_counter` | free-running 10-bit Gray counter; the frame id toggles at each wrap |
| `spi_config` | SPI slave, register file, default vector, status read-back |
| `test_pulse_gen` | internal test pulse (position and length within the frame) or external one |
| `event_formatter` | event → one Compact slot or two Full slots of 40 bits |
| `tx_serializer` | slots → line at 1, 2 or 4 bits per clock; training pattern |
| `global_controller` | counter, configuration, test pulse, formatter, serialiser, status counters |
| `tofpet_top` | 64 × `tdc_ctrl` + `data_buffer` + `global_controller` |

## How a channel takes a hit

Each channel has a *timing branch* and an *energy branch*. Each branch has four
TACs, and the two TACs with the same index form a **TAC pair**. The pair index
is the event's TAC id. Pairs are allocated round robin, and each pair holds one
event from its write until its conversion has been read out.

1. **Latch.** The timing trigger sets a flip-flop clocked by the trigger edge.
   That flip-flop drives `wtac_t[pair]` straight away, so the TAC starts
   charging at the trigger itself, not at a clock edge. The latch also records
   `hcc`, the level of the master clock at the trigger. It shows in which half
   of the period the trigger fell.
2. **Stop on a clock edge.** The synchronised latch (`DOxL_syn`) moves the
   `wtac_generator` from IDLE to CHECK, then to STOP. When `hcc` = 1 it goes
   through HOLD, which adds one clock, so a trigger just before an edge still
   gets a ramp long enough to be linear. `stopramp` ends the TAC write. The
   coarse count at that edge is stored as Tcoarse.
3. **Decide.** The hit is then accepted or rejected according to the channel's
   validation mode:
   - **PRAEDICTIO** (the default): the timing latch is fed with *delayed DOT
     AND DOE*. A dark pulse that never crosses the energy threshold therefore
     writes no TAC at all, and an event that reaches the latch is valid at once.
   - **SYNC**: the DOT and DOE latches are polled every clock by
     `sync_validation`. The hit is valid if DOE was latched with DOT or one
     clock later. Otherwise it is a false hit.
   - **ASYN**: an analog gate outside the chip's digital part flags
     `asyn_valid` or `asyn_false`. The flags are synchronised and their rising
     edges decide.

   A false hit, or no decision within 255 clocks, frees the pair (`tac_clr`)
   and pulses `darkcount`.
4. **Energy edge.** The energy branch is armed as soon as the timing TAC has
   been written. It latches the DOE *falling* edge into the same pair's energy
   TAC in the same way, and stores Ecoarse. Once the hit is valid and the
   energy TAC is written, the pair is queued for conversion and the allocation
   pointer moves on. If no energy edge comes within 255 clocks, the pair is
   freed and `trig_err` pulses.
5. **Convert.** Queued pairs are converted one at a time, in allocation order.
   `conv` rises with `conv_sel` = pair, and the current coarse count is kept as
   SoC. Each ADC comparator, after two synchronising flip-flops, gives its end
   of conversion: Teoc and Eeoc. A stuck comparator is cut off after 1023
   clocks.
6. **Channel data register.** The finished event waits here for the data
   buffer. The event holds the TAC id, frame id, Tcoarse, Ecoarse, SoC, Teoc
   and Eeoc, all raw Gray codes. While the register is full, conversions stall.
   When all four pairs are then in use, a new timing trigger is lost and counted
   on `trig_err`.

The branch re-arms only after the previous event has been queued and the next
pair is free. In that state (PRESET) the trigger latch is held cleared. A
trigger that comes during PRESET is ignored, and that is the channel's dead
time. For a single event it lasts about 5 clocks after the DOE fall. Masking a
channel gates its timing input and keeps the branch disarmed.

## Rebuilding a time from the raw fields

This is the part a user of the data must get right. With the default single
synchroniser flip-flop:

- **TAC write length.** The TAC is written from the trigger until the edge
  whose count is Tcoarse. That is 1–2 clock periods after the trigger (2–3 with
  HOLD). Each extra synchroniser flip-flop adds one clock.
- **Fine count.** The ADC discharges 128 times slower, so the conversion length
  is `Teoc − SoC = ceil(write_length × 128 / T) + 2`. The +2 comes from the
  comparator synchronisers.
- **Trigger time.** So, with `fine = Teoc − SoC − 2` (binary, modulo 1024):

      t1 = time_of_edge(Tcoarse) − (fine − 0.5) × T / 128

- **DOE fall.** t2 follows in the same way from Ecoarse and `Eeoc − SoC`.

All coarse values are Gray codes, and a frame is one wrap of the 10-bit count,
1024 × 6.25 ns = 6.4 µs. The frame id bit tells consecutive frames apart. On
silicon, the 128 gain and the offsets are per-TAC quantities to be calibrated.
The testbenches use exactly this formula and reproduce the driven times to
within one bin.

## Output data

Events leave the data buffer one per clock, round robin over the channels.
They are then packed by `event_formatter`.

- **Full** mode sends the raw event in two 40-bit slots, with no arithmetic:

      slot 0: {0, frame_id, ch_id[5:0], tac_id[1:0], Tcoarse, Ecoarse, SoC}
      slot 1: {Teoc, Eeoc, 20'b0}

- **Compact** mode converts to binary and subtracts on chip, giving one slot:

      {1, frame_id, ch_id[5:0], tac_id[1:0], Tcoarse, Teoc − SoC, Ecoarse − Tcoarse}

  These fields are the timing coarse count, the timing fine count, and the time
  over threshold in whole clocks. The energy fine count is dropped.

On the line (`tx_bits`, bit 3 first), the idle level is 0. Each slot is a 1
start bit followed by its 40 bits, MSB first. The rate is 1, 2 or 4 bits per
clock (160, 320 or 640 Mb/s), so a slot takes 41, 21 or 11 clocks. The bit 39
of the first slot tells a Compact event from a Full one. The training bit
replaces the idle line with 1010… so the receiver can find its bit phase.
`clk_out_gate` enables clock forwarding at the pad.

What the link can carry at the chip's specified hit rate, 100 kHz on each of
64 channels (6.4 Mevents/s):

| mode, rate | clocks per event | Mevents/s | enough for 6.4? |
|---|---|---|---|
| Full, 160 Mb/s | 82 | 1.95 | no |
| Full, 320 Mb/s | 42 | 3.81 | no |
| Full, 640 Mb/s | 22 | 7.27 | yes |
| Compact, 320 Mb/s | 21 | 7.62 | yes |
| Compact, 640 Mb/s | 11 | 14.5 | yes |

When the link is slower than the hits, nothing is dropped silently.

1. The data buffer fills and back-pressures the channel registers.
2. Conversions stall.
3. The TAC pairs fill, and new triggers are lost and counted on `trig_err`.

## Configuration

The configuration link is SPI mode 0, MSB first. A frame is 40 bits,
`{rd, addr[6:0], data[31:0]}`. A write takes effect when `cs_n` rises after
exactly 40 bits. A read returns the addressed register during the data bits.
SCK is oversampled in the master clock domain, so it must stay below clk/6.
Reset loads a default vector, so the chip works even if the link never does.

| address | register |
|---|---|
| 0–63 | channel record (28 bits): discriminator monitor select, mask, validation mode, synchroniser depth 0–3, input polarity, coarse gain, baseline DAC, timing and energy thresholds, energy shaping |
| 64 | global record (31 bits): Compact, output rate, training, clock forwarding, internal/external test pulse and its position/length, calibration amplitude and polarity, TDC test mode |
| 65–72 | 6-bit bias cell codes |
| 80, 81, 82 | status, read only, 16 bits saturating: rejected dark pulses, trigger errors, clocks with the data buffer full |

Channel defaults:

- PRAEDICTIO validation;
- one synchroniser flip-flop;
- timing threshold code 8 and energy threshold code 14, taken as 0.5
  photoelectron steps, which gives 4 and 7 p.e.;
- baseline code 16.

Global defaults are Full mode at 160 Mb/s with clock forwarding on.

The field layouts, the address map and the status counters are this design's
own choices. The source gives only the register contents in general terms, and
the exact bit assignment of the real chip is not known.

## Test pulse and TDC test mode

The test pulse can come from inside the chip or from outside:

- **Internal.** It rises at a programmed coarse count (`tp_pos`) for `tp_len`
  clocks, once per frame.
- **External.** With `tp_ext_sel` it is passed through unregistered, so its
  phase against the clock is kept. That is what a phase scan of the TDC needs.

The pulse leaves on `tp` towards the calibration charge injector. In TDC test
mode (`tdc_test`) it also replaces DOT, delayed DOT and DOE on every channel,
so all 64 TDCs measure the same edge without the front end.

For jitter measurements, each channel can put one of its discriminator
outputs on the `mon_out` pin. The 2-bit `mon_sel` field of the channel record
selects DOT (before the delay line), delayed DOT (after it) or DOE. The pin is
the OR of all channels and is not registered. Select one channel at a time.

## Where this RTL departs from the chip as described

**Taken from the chip's description:**

- the channel and branch structure;
- the quad TAC buffering with a shared TAC id;
- the three validation modes;
- the state names and the printed transitions of the TAC-write machine and the
  SYNC validation machine;
- the event fields and the two output modes;
- the 10-bit coarse count, the 128× gain and the 50 ps bin;
- the 160–640 Mb/s output with training or forwarded clock;
- the SPI link with its default vector, the internal and external test pulse,
  the discriminator monitor,
  channel masking, the 6-bit bias DACs.

**This design's own:**

- **SYNC exit.** The return of the SYNC validation machine from IS_VALID_HIT to
  waiting, which is taken to be the same as from IS_FALSE_HIT.
- **TAC-write machine details.** `stopramp` is held through PRESET, and the
  latch clear is dropped in the last PRESET cycle.
- **Energy arming.** The energy branch is armed from the end of the timing
  write on, not only after validation.
- **Channel controller.** The acquisition and conversion machines, the
  decision and conversion timeouts, and the meaning of `darkcount` and
  `trig_err` (named on the chip, with no definition given).
- **Readout path.** The data-buffer arbitration, its 16-entry depth and its
  back-pressure.
- **Data and link formats.** Both slot bit layouts, the Compact fields, and
  the line format with its start bit.
- **Configuration and status.** The SPI frame, address map and record layouts,
  the status counters, `sync_rst`, and the monitor's selector and shared pin.

**Not digital, left as ports:** the analog front end, discriminators, DOT delay
line, ASYN gate, TACs, Wilkinson ADCs, calibration DAC, bias generators and LVDS
pads. Their settings come out on `ch_cfg`, `g_cfg` and `bias_code`.

**Limits.**

- The trigger latch is an edge-clocked flip-flop with an asynchronous clear, as
  on the chip. Synthesis and timing tools must treat every discriminator input
  as a clock.
- Metastability is only modelled as far as the chosen synchroniser depth goes.
- The simulator used has two states, so X propagation was not checked.
- **Minimum time over threshold.** The energy branch is armed only once the
  timing TAC write has ended. DOE must therefore fall at least about
  `sync_depth + 6` clocks after the time trigger (about 40 ns at depth 1).
  An earlier fall is missed, and the next DOE fall is taken as the event's
  energy edge. The testbenches keep the time over threshold at 12 clocks or
  more.
- **Reset of the trigger latches.** A latch has a single asynchronous clear,
  `rst_n` AND NOT `reset_bar`. To clear a latch whatever its power-up state,
  the synchronising buffers reset to all ones. The TAC-write machine therefore
  sees a trigger after reset and stays in PRESET, requesting a clear, until the
  buffers have flushed. A channel is ready `sync_depth + 1` clocks after
  reset.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. All of them pass:

| testbench | what it exercises |
|---|---|
| `tb_coarse_counter` | Gray sequence, frame id, synchronous restart |
| `tb_trigger_latch` | edge capture on either polarity, clear timing, synchroniser depths 0–3, half-clock flag |
| `tb_wtac_generator` | every transition, HOLD on `hcc`, PRESET holding conditions, TAC write length |
| `tb_sync_validation` | valid and false hits for every DOE lag |
| `tb_tdc_ctrl` | one channel with the TAC/ADC model: all three modes, dark pulses, masking, pair overrun, back-pressure; every time rebuilt |
| `tb_data_buffer` | arbitration fairness, ordering, back-pressure (8 channels, depth 4) |
| `tb_event_formatter`, `tb_tx_serializer` | bit layouts, all rates, training, throughput |
| `tb_spi_config`, `tb_test_pulse_gen` | register map, defaults, read-back; pulse position and length |
| `tb_global_controller` | the controller from SPI pins to serial line, status counters and saturation |
| `tb_tofpet_top` | the whole 64-channel chip at its defaults (see below) |
| `tb_workload_rate` | 64 channels at 100 kHz each for 60,000 clocks, Compact at 320 Mb/s: every event rebuilt, lost triggers matched against the trigger-error counter and kept under 1% |

`tb_tofpet_top` runs the full 64-channel chip at default parameters. It decodes
the serial line, rebuilds every time stamp, and counts each mechanism, failing
if one never happens. The mechanisms are:

- data buffer full (back-pressure);
- triggers lost with all TAC pairs busy;
- dark pulses rejected;
- the HOLD state;
- both output modes and all three rates;
- the training pattern;
- TDC test mode;
- the discriminator monitor;
- SYNC and ASYN validation;
- all four TAC pairs;
- both frame ids.

To build and run one with Verilator 5, name the package and the testbench and
let Verilator find the modules in the two folders:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb \
      rtl/tofpet_pkg.sv tb/tb_tofpet_top.sv --top-module tb_tofpet_top -o sim
    ./obj_dir/sim

The two full-chip testbenches take about half a minute to build and a few
seconds to run.
