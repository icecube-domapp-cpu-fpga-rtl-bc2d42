# DOMAPP FPGA: event building, triggering and calibration logic for the IceCube DOM main board

An IceCube Digital Optical Module (DOM) holds a photomultiplier and a main
board whose central device pairs an ARM CPU with an FPGA. The FPGA does the
work that has to happen at the speed of the signals. It watches the
discriminators and launches one of two waveform digitizers (ATWD A and B)
when a trigger arrives. It talks to the neighbouring DOMs for local
coincidence (LC). It fires the calibration light sources at known times. It
counts rates for monitoring and for the supernova search. Finally it packs
each digitized event into a fixed 2 kB record and writes it by DMA into a
large ring in the CPU's SDRAM, the **look back memory (LBM)**. The CPU only
configures the logic through a register window and collects finished events
from the LBM.

This repository contains synthesizable SystemVerilog for that FPGA logic,
seen from the CPU interface. Every block has a self-checking testbench. There
is also an end-to-end test of the whole design and a full-size run at the
real parameter values.

## Clock and time base

Everything runs on one 40 MHz clock. `systime_counter` counts clocks in a
48-bit register, so one tick is 25 ns. The counter wraps after about 81 days.
Every time stamp in the design is a `systime` value:

- event headers;
- the last calibration flash;
- the supernova words.

Systime bit 2 is the "5 MHz toggle" in the DOM status word.

## Data path: from a discriminator pulse to an LBM record

```
 disc_spe/mpe, LC pins -> pulse_sync -> trigger_ctrl -> atwd_a/b_launch
                                     \-> lc_unit ---------\
 front end sample stream (768 samples) -> event_builder -> LBM write port
 calib_ctrl (flashes, forced launches) -> trigger_ctrl
```

**Inputs and trigger selection.** The asynchronous pins pass through
three-flop synchronisers (`pulse_sync`), which produce one-clock pulses.
`trigger_ctrl` masks the fired sources with the Trigger Source register.
The sources are:

- SPE and MPE discriminators;
- the CPU;
- the front-end pulser, the LED and the flasher board;
- the two R2R ladders;
- LC from above and from below.

When both SPE and MPE are selected, SPE wins.

**ATWD ping-pong.** The controller then launches whichever ATWD is enabled
and free, alternating between A and B. A trigger that finds both busy is
dropped, and a `dropped` pulse records it. An ATWD stays busy until its event
has been written, or thrown away.

**Front end interface.** The digitizers themselves are outside this design.
After a launch, the front end delivers one event as a valid/ready stream of
768 ten-bit samples:

- 256 FADC samples;
- then ATWD channels 0..3, 128 samples each, in read-out order (sample 127
  first).

`s_atwd` says which ATWD the stream belongs to. The builder accepts only the
stream of the ATWD whose event it is currently building.

**Event builder.** `event_builder` takes one event at a time. It records
time stamp, trigger word and dead time at the launch. It subtracts the
pedestal of that ATWD from each ATWD sample (a 512-entry signed table per
ATWD, clamped at 0). It then writes the record into the LBM block at the
current pointer:

| Offset | Contents |
|---|---|
| +0x000 | `{16'h0001, timestamp[15:0]}` |
| +0x004 | `timestamp[47:16]` |
| +0x008 | trigger source (15:0), ATWD A/B (16), FADC available (17), ATWD available (18), ATWD size (20:19), LC from below (24), LC from above (25) |
| +0x00C | dead time, in clocks from launch to the first sample taken |
| +0x010 | FADC samples, two per word (even in 9:0, odd in 25:16) |
| +0x210 + 0x100·ch | ATWD channel ch, 64 words, same packing, read-out order |

Data words are written as the samples stream in. The header goes last,
because the ATWD size and the LC decision are known only at the end. A kept
event advances the LBM byte pointer by 2048.

**What gets stored** follows the DAQ register:

- *DAQ mode.* ATWD & FADC; FADC only; or time stamp only (header only).
- *ATWD mode.*
  - Normal mode stores channel 0. It then stores channel n+1 only if some
    sample of channel n reached the overflow level (`OVF_LEVEL`, 768), up to
    channel 2.
  - Testing and debugging modes store all four channels.
  - The size field says how many channels were stored.
- *LC mode.*
  - OFF keeps every event.
  - HARD drops an event without LC. The pointer does not advance, so the next
    event reuses the block.
  - SOFT keeps only the header of such an event.
  - FLABBY is treated as SOFT.
  - Calibration-triggered events are exempt from the LC requirement (the
    "heart beat"), unless DAQ bit 19 disables that exemption.
- *LBM mode.*
  - *Wrap* writes at pointer modulo the LBM size.
  - *Stop when full* stops taking new events once the pointer has reached
    the size. The sample stream then backs up.
  - A pointer reset (LBM Control bit 0) takes effect at the start of the
    next block, never in the middle of an event.

The LBM is 8 MB at CPU address `0x0100_0000`, which holds 4096 event blocks.

## Local coincidence

`lc_unit` has two roles.

**Sending.** On each hit of the selected discriminator (SPE or MPE) it sends
a one-clock LC pulse to the upper and/or lower neighbour.

**Receiving.** For each ATWD launch it decides whether a neighbour's pulse
belongs to that launch. A pulse counts in either of two windows:

- *Pre window:* it arrived in the `PreWindow+1` clocks ending at the launch.
- *Post window:* it arrived in the `PostWindow+1` clocks after the launch.
  This window is lengthened by the cable delay of that direction, which is
  the LC Cable Length register entry for the configured span.

A *self LC* window can also make the event coincident on its own, using a
second discriminator hit. When the longest window has closed, the unit
reports:

- LC from above;
- LC from below;
- whether the event qualifies (either neighbour, or both if "require both"
  is set).

The event builder waits for this decision before writing the header.

## Calibration sources: flashing ahead of time

`calib_ctrl` is the subtlest block. The CPU selects:

- the sources:
  - front-end pulser, LED, flasher board;
  - front-end R2R ladder, ATWD R2R ladder.
- the mode:
  - *repeating*: at rate `2^PulserRate / 2^26` of the clock;
  - *time match*: once, when `systime[31:0]` equals Calibration Time;
  - *CPU forced*: writing `0xA5` to Calibration CPU Launch.
- an ATWD launch offset of −8..+7 clocks relative to the flash.

A negative offset means the ATWD must launch *before* the light. The block
therefore decides every flash `LEAD = 8` clocks early:

- It evaluates its conditions on `systime + 8`. In repeating mode, that is
  the rising edge of systime bit `25 − PulserRate`.
- It pushes each decision into a short shift register.
- The flash outputs fire two clocks after the recorded time T.
- The ATWD launch fires at `T + 2 + offset`.
- T is what the Last Calibration Flash register reads.

A calibration launch goes through `trigger_ctrl` like any other trigger.
Its source bits say which lights fired.

With an R2R source selected, a 256 × 8 pattern memory written by the CPU is
played out one entry per clock from the flash cycle on:

- to the ATWD R2R bus;
- to the front-end pulser pins, as low nibble to `FE_pulser_N` and high
  nibble to `FE_pulser_P`.

## Monitors and interrupts

- **Rate meters** (`rate_monitor`, one for SPE and one for MPE). Each counts
  hits over a 1 s gate (40 000 000 clocks). After every counted hit it
  applies an artificial dead time of (n+1)·100 ns. It reports a 16-bit
  saturating count at the end of each gate.
- **Supernova meter** (`supernova_meter`). It counts hits in consecutive
  2^16-clock (1.6384 ms) slots aligned to systime. Its dead time is
  (n+1)·6.4 µs. Four 4-bit slot counts are packed with systime bits 31..16
  into one word per four slots.
- **Interrupts** (`interrupt_ctrl`). The sources are:
  - calibration flash;
  - rate meter update;
  - supernova update.

  Each source sets a pending bit if its enable bit is set. Writing 1 to a bit
  of the ACK register clears it, and clearing an enable also clears its
  pending bit. `irq` is the pending vector.

## Register window and communication bookkeeping

`domapp_regs` decodes the 13-bit byte offset of the CPU window at
`0x9000_0000`. Writes take effect at the clock edge where `wr` is high. Read
data is registered and valid one clock after `rd`, flagged by `rvalid`. The
window contains:

- version words;
- trigger, DAQ and LBM control;
- LBM pointer and DOM status;
- systime;
- LC and calibration control;
- rate and supernova registers;
- interrupt enable and ACK;
- flasher board control and status;
- communication registers and DOM ID;
- compression and IceTop control words;
- PONG and firmware debugging scratch registers;
- the R2R pattern memory at 0xC00 and the ATWD A/B pedestal memories at
  0x1000 and 0x1800.

The register offsets are listed in `domapp_pkg.sv`.

`comm_dpm_ctrl` keeps the CPU side of the two communication ring buffers in
the dual-ported memory:

- the transmit head and the receive tail pointers;
- a count of messages waiting to be sent;
- a count of received packets not yet consumed;
- the Communication Status bits.

Writing tx_head tells the communication engine that one complete message is
ready. Writing rx_tail consumes one received packet.

## What is outside this RTL

These parts appear here only as ports:

- the ATWD and FADC digitizers and their read-out sequencing;
- the discriminators;
- the CPU and its bus bridges;
- the SDRAM;
- the dual-ported memory;
- the communication engine;
- the flasher board.

Three features are not built:

- **Delta compression.** The compression mode bits are stored and brought
  out, but events are always written raw.
- **Supernova buffer memory.** Its window reads 0.
- **IceTop mode.** Its control word is stored and brought out.

## Where this design makes its own choices

The register fields, the record layout, the window and gate lengths and the
mode meanings follow the interface specification. This design fills in what
that specification leaves open. Each file's header says which is which. The
main choices are:

- **Interfaces:** the CPU bus handshake and the valid/ready handshakes of
  the sample stream and the LBM write port.
- **Event handling:**
  - one event is processed at a time;
  - the overflow level that selects extra ATWD channels is 768;
  - FLABBY LC behaves like SOFT;
  - the dead time ends when the first sample is accepted.
- **Calibration timing:**
  - the look-ahead of 8 clocks and the two-clock flash delay;
  - one-clock pulses on the flash outputs;
  - a time match is armed by switching the mode from off to time match.
- **Repeating-mode bit.** The repeat bit is bit `25 − PulserRate`, counting
  from 0. This is the only reading under which the period agrees with the
  rate formula `2^PulserRate / 2^26` of the clock.
- **Saturation:** counters saturate instead of wrapping.
- **Status word:** DOM status bits that belong to parts outside this design
  read 0.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `domapp_top` | `RATE_GATE` | 40 000 000 | rate meter gate in clocks (1 s) |
| `domapp_top` | `SN_GATE_BITS` | 16 | supernova slot = 2^bits clocks |
| `domapp_top`, `event_builder` | `LBM_SIZE` | 8 388 608 | LBM bytes (power of 2) |
| `event_builder` | `OVF_LEVEL` | 768 | ATWD overflow level for channel selection |
| `calib_ctrl` | `LEAD` | 8 | look-ahead in clocks |
| `comm_dpm_ctrl` | `ALMOST` | 1024 | almost-empty/full threshold in words |

The defaults are the real values. The parameters exist so that testbenches
can shorten the gates and the LBM.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a hung run as
a failure. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/domapp_pkg.sv tb/tb_event_builder.sv --top-module tb_event_builder
./obj_dir/Vtb_event_builder +verilator+rand+reset+2
```

Replace the name for any other testbench. `+verilator+rand+reset+2` starts
every flop at a random value, which checks that reset covers everything read.

- `tb_<block>`: one per block. Each compares the block with values computed
  independently in the testbench. Examples are exact header words, dead-time
  cycle counts, LC window edges and flash/launch cycle positions.
- `tb_domapp_top`: the whole design with short gates and a 4-block LBM.
  - The design is driven by a CPU model that services interrupts, a front-end
    model and an LBM model.
  - It checks every written record and counts each mechanism; a mechanism
    that never happens counts as a failure. The mechanisms are:
    - A/B alternation and channel selection on overflow;
    - LBM wrap;
    - LC-coincident events, HARD drops and LC sending;
    - forced calibration with R2R playback;
    - triggers dropped with both ATWDs busy;
    - rate and supernova interrupts;
    - stop-when-full back-pressure and the pointer reset;
    - packet counting.
- `tb_domapp_full`: the top at its default parameters.
  - It writes pedestals and records three events.
  - It checks every FADC and ATWD channel 0 word.
  - It waits for the first full one-second rate gate (about 41 million
    clocks, under a minute of simulation).
