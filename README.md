# ToASt digital back end: time-of-arrival and time-over-threshold readout for 64 strips

ToASt is a 64-channel readout chip for silicon strip detectors. It works with either
strip polarity. Each channel's analog front end ends in two discriminators: a low **time
threshold** and a higher **energy threshold**. For every particle hit the chip reports
two 12-bit time stamps of its 160 MHz clock, so one count is 6.25 ns:

* **Le**, the leading edge, is the time the signal crossed the time threshold. A low
  threshold gives little jitter, so this is the time of arrival.
* **Te**, the trailing edge, is the time the signal fell back through the energy
  threshold. The front end discharges at constant current, so Te − Le (the time over
  threshold) is linear in the deposited charge.

A hit is kept only if the signal also crossed the energy threshold. Noise pulses that
only touch the low threshold are thrown away. This *double threshold* scheme gives the
timing of a low threshold with the noise rejection of a high one.

This repository holds synthesizable SystemVerilog for the chip's digital part: the
channel logic, the two buffer levels, the output framing and links, the configuration
link and registers, reset decoding and upset protection. The analog front end is not
included. Its 2 × 64 discriminator outputs are inputs of the top module, and every
register field that controls it is an output.

## Signal path

```
 hit_t[63:0], hit_e[63:0]                    (from the analog front end)
        │
  8 × region_readout ── 8 × channel_logic ─ round-robin ─ region FIFO (8 hits)
        │
  global_readout ─ round-robin over regions ─ global FIFO (64 hits)
        │
  data_framer ─ header / data / trailer / sync words (32 bit)
        │
  2 × serializer ─ tx_out_0, tx_out_1   (160 Mb/s each, 1 bit per clock)

  config_unit ── cfg_rx / cfg_tx (80 Mb/s)  → GCR0-13, and the 16 CCRs in each region
  reset_manager ── pon_rst_n, sync_reset    → power-on, global and time stamp resets
  time_stamp_counter ── 12-bit stamp (binary or Gray) and 8-bit frame number
```

Channels `8r … 8r+7` form region `r`. A region arbitrates its eight channels round-robin
and moves at most one hit per clock into its local FIFO. The global readout unit does the
same over the eight regions, adds the region number, and fills a 64-entry FIFO. Every
stage uses a valid/ready handshake, so back-pressure travels all the way back to the
channels. The only place a hit can be lost is a channel that still holds an unread hit
when the next one arrives (`lost_hit`).

## Double threshold measurement (`channel_logic`)

Both discriminator outputs are asynchronous. Each is synchronised with two flip-flops.
Le and Te are therefore both taken two clocks after the real crossing, and the offset
cancels in Te − Le. The channel state machine works as follows:

| state  | waits for | then |
|--------|-----------|------|
| IDLE   | rising edge of the time discriminator | store Le. If the energy discriminator is already high go to VALID, else ARMED |
| ARMED  | energy discriminator high | go to VALID. If the time discriminator falls first, the pulse was noise: back to IDLE |
| VALID  | energy discriminator low  | store Te, go to DONE |
| DONE   | the region taking the hit | go to IDLE, or to WAIT while a discriminator is still high |
| WAIT   | both discriminators low   | IDLE (no re-trigger on the tail of the same pulse) |

Three configuration bits change this flow:

* **Single threshold mode** (GCR0 bit 8) ignores the energy discriminator. Every time
  threshold crossing is a hit, and Te is taken when the time discriminator falls.
* **Leading-edge-only mode** (GCR0 bit 9) ends the hit at validation and reports Te = 0.
* **Channel mask** (CCR0 bit 7) keeps the channel in IDLE.

A hit is in the region FIFO two clocks after DONE at the earliest: one clock for
arbitration and one to write the FIFO. The channel can hold one finished hit. A time
threshold crossing while it still holds one raises `lost_hit` for one clock, and that
pulse is lost.

The time stamp bus is either binary or Gray coded (GCR0 bit 1). Gray coding keeps a
sample taken during a transition within one count. Le and Te carry whichever code is on
the bus. The counter runs while GCR0 bit 0 is set. It wraps every 4096 clocks (25.6 µs),
which is far longer than the longest time over threshold of the front end (about 5 µs at
150 fC).

## Output words and frames (`data_framer`, `serializer`)

All output is in 32-bit words, sent MSB first at one bit per clock (160 Mb/s):

| word    | bits 31:30 | bits 29:0 |
|---------|-----------|-----------|
| data    | `01` | Region[2:0] Channel[2:0] Le[11:0] Te[11:0] |
| header  | `00` | `11` ChipId[6:0] 13 × `0` FrameN[7:0] |
| trailer | `11` | `00` DataCnt[11:0] CRC[15:0] |
| sync    | `10` | `01 1001 0110 0110 1001 1001 0110 0110` |

A **frame** is one period of the time stamp counter (4096 clocks). FrameN counts
frames. It is cleared by a global reset and held at zero while GCR0 bit 6 is set. When
the time stamp wraps, the framer queues two words:

* the trailer of the frame that ended, with the number of data words sent in it and a
  CRC-16-CCITT (polynomial 0x1021, initial value FFFF) over those data words;
* the header of the new frame.

Trailer and header go ahead of any waiting data. When there is nothing to send, the
framer offers sync words.

Each link has a shift register plus a one-word holding register, which it asks to be
refilled as soon as it is empty. Words therefore stream back to back, and a link never
waits for the framer. GCR0 bits 4 and 5 enable link 0 and link 1. With both enabled,
each word goes to whichever link asks first (link 0 on a tie). A hit stream then
alternates between the links, and its order can only be rebuilt from the time stamps. A
disabled link drives 0. When a link is enabled it starts with a sync word.

Throughput: one link carries 5 M words/s. At the maximum rate of 40 kHz per strip, 64
strips produce 2.56 M hits/s, so one link is about 52 % loaded. Two links halve that.
In simulation (`tb_rate_40khz`), 64 strips at 40 kHz for 16 frames gave about 1000 hits
on one link. None was lost, and the global FIFO never held more than 5 of its 64 entries.

## Configuration link (`config_unit`)

The command link runs at half the master clock: one bit every second clock, on the
clocks where an internal toggle is high, MSB first. Each command is a 4-bit function
code and a 12-bit operand:

| command | code | operand |
|---------|------|---------|
| chip select      | `1101` | `01` aB a6…a0 `00`. Selects this chip if aB = 1 (broadcast) or a6…a0 = `chip_addr`; otherwise it deselects it |
| chip deselect    | `0000` | ignored |
| select channel register | `0100` | `0000` r2r1r0 `0` c2c1c0 a0: region r, channel c, register a0 |
| select region register  | `0100` | `0000` r2r1r0 `1` a3…a0. Accepted, but no region register exists: writes do nothing and reads return 0 |
| select global register  | `0100` | `0001 0` a6…a0: GCR a. Addresses 14 and up do nothing |
| write            | `0101` | 12-bit data into the selected register |
| read             | `0110` | `0000 0000 0000` |
| no operation / idle | `1111` | `0000 0000 0000` |
| read reply (output only) | `1000` | 12-bit register contents |

Select, write and read act only on a selected chip. Every command received is sent back
on `cfg_tx`, beginning one bit period after its last bit. After a read, the next word
sent is the reply `1000 dddd dddd dddd`, not the echo of the following command. That
following command is ignored, so the host sends an idle word there.

**Word alignment.** After reset, the receiver waits for the first 1 on the line and
takes it as bit 15 of a word. From then on it counts 16-bit words back to back. If the
line stays low for 32 bit periods, the link resets and waits for a 1 again. The host
must therefore keep sending idle words (`F000`) whenever it has no command. A stream
that restarts after silence must begin with a word whose first bit is 1.

**Registers.** All registers are 12 bits.

* GCR0 holds the modes and enables:

  | bit | meaning |
  |-----|---------|
  | 0 | time stamp counter enable |
  | 1 | Gray-coded time stamps |
  | 4 | link 0 enable |
  | 5 | link 1 enable |
  | 6 | frame counter reset |
  | 8 | single threshold mode |
  | 9 | leading-edge-only mode |
  | 10 | detector polarity (0 = n-type strips, 1 = p-type) |

* GCR1 bits 7:0 disable regions 7…0.
* GCR2-13 drive the front-end bias DACs. They start at their nominal power-on values
  (in `toast_pkg::gcr_default`). GCR0 and GCR1 start at 0, so after power-on the time
  stamp counter and both links are off until configured.
* Each channel has two registers, stored in its region:
  * register 0: mask (bit 7), delay enable (bit 6), calibration enable (bit 5), ToT
    discharge DAC (bits 4:0);
  * register 1: energy threshold DAC (bits 9:5), time threshold DAC (bits 4:0).

  The whole 12-bit word is stored.
* The top brings all registers out on `fe_gcr` and `fe_ccr`. In `fe_ccr`, register k
  of channel n is at index 2n + k.

## Resets and upset protection

`pon_rst_n` is the asynchronous, active-low power-on reset. It is released
synchronously, two clocks after it rises, and clears everything, including the
registers. `sync_reset` carries commands in the length of its pulses. The reset manager
counts how many clocks the line is high and acts one clock after it falls:

| pulse length | action |
|--------------|--------|
| 2 clocks | time stamp reset |
| 4 or more clocks | global reset and time stamp reset |
| 1 or 3 clocks | ignored |

The global reset clears the channels, both FIFO levels and the framer, and restarts the
frame numbering. It leaves the configuration registers and the command link alone, so a
running system can be resynchronised without being reconfigured.

Against single event upsets, every configuration register and every state machine
register (channel, configuration unit, reset decoder) is a `tmr_reg`: three copies, a
bitwise majority vote at the output, and each copy rewritten with the voted value every
clock. An upset in one copy never reaches the output and is repaired at the next edge.
Data registers (time stamps, FIFOs, shift registers) are not triplicated.

## What is specified and what was chosen here

These parts follow the ToASt design description:

* 64 channels in 8 regions of 8;
* the double threshold principle;
* the 12-bit stamps and the 160 MHz clock;
* a local FIFO per region, and a 64-cell second-level FIFO;
* the four word formats, and 1 or 2 links at 160 Mb/s;
* the 80 Mb/s 16-bit command set, echo and read reply;
* the register map and the GCR2-13 defaults;
* the pulse-length reset code;
* SEU protection of registers and state machines.

These are this implementation's own choices, and the places to look when matching
another implementation:

* depth 8 of the region FIFOs;
* round-robin arbitration at both levels;
* input synchronisers, and the hold-until-read / lost-hit behaviour of a channel;
* the exact meaning of single-threshold and leading-edge-only modes, and Te = 0 in the
  latter;
* frame = one time stamp period, and the frame counter counting wraps;
* the CRC polynomial, its initial value and its coverage (data words only);
* the trailer and header priority, and that only the latest trailer/header survives
  while links are off;
* how words are shared between two links, and MSB-first bit order;
* command-link bit phase, word alignment and the 32-bit-period link reset;
* that a select addressed to another chip deselects this one;
* region registers accepted but not implemented;
* a channel-register write stores all 12 bits, including mask, delay and calibration
  enables;
* resets issued one clock after the end of the `sync_reset` pulse, and the global reset
  keeping the registers;
* triplication as the SEU protection method.

Not modelled at all: the analog front end (preamplifier, peaking time adjuster, current
buffer, ToT stage, hysteresis comparators, delay, test-pulse injection), the bias DACs,
pads, link drivers and receivers. `test_pulse` is passed straight to `fe_test_pulse`
for the injection circuit.

## Files

`rtl/` (one module or package per file):

| file | content |
|------|---------|
| `toast_pkg.sv` | widths, word formats, function codes, GCR bit positions, GCR defaults, CRC step |
| `toast_top.sv` | the chip: all blocks wired together |
| `channel_logic.sv` | double threshold state machine of one channel |
| `region_readout.sv` | 8 channels, arbiter, region FIFO, 16 channel registers |
| `global_readout.sv` | region arbiter and 64-entry FIFO |
| `data_framer.sv` | output word generation, frame count and CRC |
| `serializer.sv` | one 160 Mb/s link |
| `config_unit.sv` | command link, decoding, GCRs, echo and replies |
| `reset_manager.sv` | power-on reset release and pulse-length decoding |
| `time_stamp_counter.sv` | time stamp and frame counters |
| `tmr_reg.sv` | triplicated register |
| `rr_arbiter.sv`, `sync_fifo.sv` | helpers |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops. `tb_toast_top` runs the whole chip at its
default sizes, driven only through its pins. It:

* configures the chip over the command link and reads a register back;
* injects random pulses, including noise pulses, on all 64 channels;
* decodes both serial links bit by bit and matches every hit's Le and Te against the
  pulse timing;
* checks headers, trailer counts and CRCs;
* goes through single-threshold, Gray, leading-edge-only and two-link operation,
  full-buffer overload with lost hits, and a global reset.

It counts each of these events and fails if one never happens. `tb_rate_40khz` runs the
chip at the specified maximum hit rate (see Throughput above).

## Simulating

With Verilator 5, from the repository root, for any testbench `tb_X`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv rtl/toast_pkg.sv tb/tb_X.sv --top-module tb_X
./obj_dir/Vtb_X
```

The full-chip test simulates about 330 µs of chip time in a few seconds. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/toast_pkg.sv rtl/toast_top.sv`. The
remaining warnings are:

* unused status signals in the top;
* unused upper bits of a loop index;
* `SYNCASYNCNET` from assertions that sample the asynchronous reset.

To change sizes, use the top's parameters `REGION_FIFO_DEPTH` and `GLOBAL_FIFO_DEPTH`,
both powers of two. Word formats and register layouts are constants in `toast_pkg`.

## How far to trust it

Every module has a testbench that checks it against an independent reference model,
with random stimulus. The full chip is tested end to end at its default sizes. Each
testbench was also run against a deliberately broken copy of its module and caught the
fault.

The design has not been checked against the real chip's behaviour or its test data.
Where the ToASt description is silent (see the list above), this RTL is one reasonable
reading, not necessarily the silicon's.
