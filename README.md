# CBC3 digital readout logic in SystemVerilog

The CBC3 ("CMS Binary Chip", version 3) reads out 254 silicon microstrips of a
**2S module**: two strip sensors stacked a few millimetres apart, with the strips
of one sensor on the even channels and the strips of the other on the odd
channels. Every 25 ns bunch crossing the chip does two things with the binary
hits of its channels:

* it **stores** them in a 512-crossing pipeline so that, when the first-level
  trigger asks for a crossing up to 12.8 µs later, the full hit pattern of that
  crossing can be sent out (the *triggered data* path);
* it **finds stubs** at once: a cluster of hits in one sensor paired with a
  cluster in the other sensor close enough to it that the particle must have a
  high transverse momentum. Up to three stubs per crossing, with their position
  and bend, leave the chip every crossing for the track trigger (the *stub*
  path).

This repository holds synthesizable RTL for the digital part of such a chip:
command reception and clock recovery, hit detection with suppression of highly
ionising particles, the pipeline and event buffer, stub finding, the bend
look-up table, the two output serialisers, and the I2C-programmed configuration
registers. The analogue front end, the pads and the fuses are not modelled; a
behavioural model stands in for the delay-locked loop.

## Block structure and data flow

```
 fcmd_in (320 Mb/s) ─► fast_cmd_interface ──window──► clock_recovery ─► bx_en, clk40 ─► dll_model ─► clk40_out
                        │ Trigger / Fast Reset / Test Pulse / Orbit Reset
                        ▼
 comp[253:0] ─► hit_detect ─hits─┬─► pipeline (254 x 512) ─► l1_buffer (254 x 32) ─► triggered_data_assembler ─► l1_out
                                 │
                                 └─► stub_finder ─► stub_select ─► bend_lut ─► stub_data_assembler ─► stub_out[4:0]

 scl/sda ─► i2c_slave ─► config_regs (330 x 8) ─► settings of all blocks, cfg_raw (analogue settings)
```

`cbc3_top` wires these together. Shared sizes, types and the register map are in
`cbc3_pkg`.

## One clock, one strobe

Everything runs on a single 320 MHz clock `clk`, the bit clock of the serial
lines. The 40 MHz bunch-crossing rate is a clock *enable*, `bx_en`, high in
bit slot 7 of every crossing (slots are numbered 0–7, slot 0 being the first
bit of a command word or of an output byte). Logic that works at the crossing
rate updates only on `bx_en`. A real chip of this kind clocks that logic with
the recovered 40 MHz clock instead; using one clock here keeps the design free
of clock-domain crossings and races in simulation. The recovered 40 MHz clock
itself is still produced (`clk40`, high in slots 0–3) and leaves the chip
through the DLL model.

Latencies, counted in crossings, with crossing *b* ending at strobe *b*:

| event | when |
|---|---|
| hits of crossing *b* available (`hit_detect.hits`) | after strobe *b* |
| written into the pipeline | strobe *b*+1 |
| stubs found / selected | strobes *b*+1 / *b*+2 |
| stub packet of crossing *b* on `stub_out` | slots 0–7 after strobe *b*+3 |
| trigger decoded at strobe *m* reads crossing | *m* − latency − 1 |
| first frame bit on `l1_out` | slot 0 after the first free strobe |

## Fast commands and clock recovery

One 8-bit word arrives per crossing on `fcmd_in`. Sent first to last it is

```
1 1 0 FastReset Trigger TestPulse OrbitReset 1
```

The words are not encoded: each command has its own bit. The first three bits
and the last bit never change, and `clock_recovery` uses them to find the word
boundary. A 3-bit counter checks the receive shift register in slot 7; while
unlocked, a failed check holds the counter for one extra clock, moving the check
point one bit later. After `LOCK_N` (4) good words the block is locked and
`bx_en` starts. Once locked, the counter runs freely, and `LOCK_N` bad words in
a row drop the lock. The idle word `11000001` matches only at the true
boundary.

Trigger, Fast Reset and Test Pulse are mutually exclusive. A word with two or
more of them is dropped and raises `cmd_conflict`. Orbit Reset may come with
any of them. Fast Reset clears the pipeline write pointer, the event buffer,
the trigger count and the error flags. Test Pulse and Orbit Reset act on
circuits outside this design, so they only appear as outputs.

## Hit detection and HIP suppression

Each comparator is sampled eight times per crossing. A channel has a hit if
any sample was high, so a pulse much shorter than 25 ns is not lost. A pulse
that stays high over several crossings (pile-up) gives a hit in each of them.

A highly ionising particle (HIP) can hold a comparator on for many crossings.
The programmable 3-bit `hip_count` limits this. A pulse that is high through
whole crossings gives hits in its first `hip_count` crossings and none after
that, until the comparator is seen low again. The crossing in which the pulse
starts counts as the first. `hip_count = 0` switches the suppression off.

## Stub finding, the heart of the chip

**Layers.** Channel 2k is strip k of the *seed* layer and channel 2k+1 is strip
k of the *correlation* layer, k = 0..126.

**Clusters at half-strip resolution.** In each layer any run of adjacent hit
strips is a cluster. Its centre is *first + last*, in half-strip units, so the
253 possible centres are 0..252. A cluster with an odd number of strips is
centred on its middle strip. A cluster with an even number of strips is centred
between its two middle strips, with no bias towards either side. No width
limit is applied.

**Correlation.** For a seed centre *p*, a correlation centre *q* matches if

```
| q − p − offset | ≤ window          (both in half strips)
```

`window` (4 bits, 0..15) and `offset` (4 bits, two's complement, −8..+7) are
registers. If several correlation clusters match, the one with the lowest *q*
is taken. The **bend** is *q − p*, a 5-bit two's-complement number that tells
how far the track leans from normal incidence. A candidate whose bend does not
fit in 5 bits is not matched. Nothing outside the window ever produces a stub.
In hardware this is one small matcher per seed position (253 of them). Each
matcher scans the 32 possible bends in ascending order.

**Selection.** A stub at centre *p* gets the 8-bit address *p* + 1, which
leaves 0 free to mean "no stub". The three stubs with the lowest addresses are
sent. If there were more than three, the overflow flag is set.

**Bend codes.** The 5-bit bends are reduced to 4-bit codes through a
programmable 32-entry table (`bend_lut`). The table is indexed by the bend read
as an unsigned number, so entries 0–15 hold bends 0..+15 and entries 16–31
hold bends −16..−1.

**Stub packet.** 40 bits per crossing on five lines at 320 Mb/s, each byte
sent MSB first:

| line | bits 7..0 |
|---|---|
| `stub_out[0]` | address of stub 1 |
| `stub_out[1]` | address of stub 2 |
| `stub_out[2]` | address of stub 3 |
| `stub_out[3]` | bend code 1, bend code 2 |
| `stub_out[4]` | timing bit (1), error, OR of all hits, stub overflow, bend code 3 |

The timing bit is in slot 0, on the rising edge of the recovered 40 MHz clock,
so a receiver can find the packet boundary. The error bit is the sticky
buffer-overflow flag of the triggered path.

## Triggered data path

**Pipeline.** This is a 254 × 512 memory written every crossing at a wrapping
write pointer. A trigger reads the cell at *write pointer − latency*, where
`latency` is a 9-bit register. The read is registered and returns the data and
the 9-bit pipeline address.

**Buffer.** A 32-event FIFO sits between the pipeline and the slow output. It
stores each event with its pipeline address, a 9-bit trigger count and two
error flags:

* `err[1]` (sticky) means an event has been lost because the buffer was full.
* `err[0]` means the buffer held 31 or more events when this event arrived.

The trigger count counts every trigger since the last Fast Reset, lost ones
included, so losses show as gaps.

**Frame.** 276 bits, MSB first, on `l1_out`:

```
11 | err[1:0] | pipeline address[8:0] | trigger count[8:0] | channel 0 ... channel 253
```

A frame starts only in slot 0, in the same slot as the stub packet's timing
bit. Frames start at most every 304 bit periods (38 crossings, 950 ns), so the
chip can sustain slightly more than 1 MHz of triggers on average. The 32-event
buffer absorbs bursts.

## Configuration registers and I2C

There are 330 eight-bit registers, written and read over I2C in the usual
register-pointer form: device address with W, pointer byte, then data bytes.
The pointer auto-increments after each byte. A read is a write of the pointer,
a repeated START and the device address with R. The target never stretches the
clock. SCL and SDA are oversampled at 320 MHz through synchronisers. The 7-bit
device address is an input (`chip_addr`).

The pointer is 8 bits, so the registers are split into two pages. Bit 7 of
register 0 selects the page, and register 0 is visible in both pages. Page 0
address *a* is register *a*. Page 1 address *a* (1..74) is register 255 + *a*.

| address (page 0) | content |
|---|---|
| 0x00 | bit 7: page |
| 0x01 | bits 2:0: HIP count (0 = off) |
| 0x02, 0x03 | trigger latency bits 7:0, bit 8 |
| 0x04 | bits 3:0: correlation half-window, half strips |
| 0x05 | bits 3:0: correlation offset, half strips, signed |
| 0x06 | bits 4:0: 40 MHz output phase, 1 ns steps (0–24) |
| 0x07–0x16 | bend table: register 0x07+i holds entry 2i in bits 3:0 and entry 2i+1 in bits 7:4 |
| others | analogue settings (thresholds, biases, trims): stored only, all on `cfg_raw` |

All registers reset to 0. The table must be programmed before bend codes mean
anything.

## What is modelled and what is not

* **Analogue front end** (preamplifier, shaper, comparator per channel): not
  modelled. The 254 comparator outputs are the `comp` input.
* **SLVS pads**: not modelled. The serial signals are single-ended ports.
* **DLL**: `dll_model` is a behavioural transport delay of the exported 40 MHz
  clock, 1 ns per step. It is for simulation only (synthesis drops its
  delays), and the internal logic does not use the delayed clock.
* **E-fuses** (trimming, chip identity), **inter-chip connections** to
  neighbouring chips, and the **test-pulse injection** circuit are not
  modelled.
* The radiation-tolerant memory and register cells are plain arrays and
  flip-flops.

## Choices made in this design

The chip's published description fixes the sizes and the functions: 254
channels, the 512-deep pipeline, the 32-event buffer, 330 registers, half-strip
clusters with a programmable window and offset, 5-bit bends reduced to 4 bits,
8-bit addresses, three stubs with an overflow flag, a timing bit, five stub
lines and one triggered line at 320 Mb/s, 276-bit frames every 950 ns, and
one-hot 8-bit command words. The following are this design's own choices:

* the single 320 MHz clock with a crossing strobe;
* the command-word bit order and the bit-slip lock procedure;
* the "any sample high" hit rule and the exact HIP counting;
* which layer is the seed;
* the lowest-*q* rule and the 5-bit fit when several clusters match;
* the widths of the window and offset registers;
* address = centre + 1;
* the stub packet layout and its flags;
* the order of the fields in a frame and the meaning of its two error flags;
* the register map, the paging and the I2C protocol details;
* the effect of Fast Reset.

## Simulating

Every module and package is in `rtl/<name>.sv`. Each block has a
self-checking testbench, `tb/tb_<name>.sv`. A testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
`tb/i2c_master_model.sv` is a behavioural I2C controller used by two of them.
Example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_cbc3_top rtl/cbc3_pkg.sv tb/tb_cbc3_top.sv -o sim && obj_dir/sim
```

`tb_cbc3_top` runs the whole chip at its full size, in about a minute. It:

* locks to a command stream started at a random bit offset;
* configures the chip over I2C and reads the settings back;
* checks a single stub, an even-width (half-strip) cluster, the overflow of
  five stubs and HIP suppression in the decoded stub packets, including the
  four-crossing latency;
* checks about 40 triggered frames against the hits injected *latency* + 1
  crossings before each trigger, including back-to-back frames and a
  buffer-overflow burst of 40 triggers;
* checks Fast Reset, Test Pulse, Orbit Reset, a conflicting command word and
  the DLL delay.

It counts each of these mechanisms and fails if one never happened.

`tb_cbc3_trigger_rate` runs the whole chip under its intended trigger load.
The latency is set to the longest value, 511 crossings (12.78 µs). Random
triggers arrive with probability 1/40 per crossing, which is 1 MHz on average,
for 4000 crossings. Every frame must carry the right hits, pipeline address
and consecutive trigger count, with no error flag. In the seeded run, 105
triggers (1.05 MHz) are all read out and the buffer never holds more than 8
events. The trigger stream is random but repeatable. At this load the queue is
close to saturation (950 ns service time against 1000 ns mean spacing), so a
much longer run can eventually fill the 32 events.

The block testbenches compare against models written independently of the
RTL. For example, the stub-finder reference builds cluster lists and searches
them, where the RTL uses per-position matchers. The hit-detect reference works
from the time of the last low sample, where the RTL keeps a run counter.

## Size

After coarse synthesis the whole design is about 72 300 word-level cells, 6 170
flip-flops and 139 kbit of memory. Most of the memory is the 130 kbit
pipeline; the buffer is 8.8 kbit. The stub finder is 61 000 of the cells: one
matcher per seed position is a wide block of comparators.
