# OTIS: a clock-driven 32-channel TDC in SystemVerilog

OTIS is a time-to-digital converter for the straw-tube outer tracker of the
LHCb experiment. Its job is to measure, for 32 discriminated straw signals,
when each signal arrived relative to the 40 MHz LHC bunch-crossing clock. It
keeps those measurements for the 4 µs that the first-level (L0) trigger needs
to decide, then sends the selected ones off-chip as a fixed-length byte
stream.

The architecture is **clock driven**. Every clock cycle the chip writes one
complete *data set* (all 32 channels, hit or not) into a pipeline memory,
whether or not anything happened. Because of this, the amount of work per
cycle does not depend on occupancy, and a trigger always produces a sequence
of the same length (36 bytes in 900 ns).

This repository holds RTL for the digital part of the chip. It also holds
behavioural models for the two analog parts: the delay-locked loop and the
threshold DACs. A self-checking testbench is provided for every module.

```
 hit_in[31:0] ──► channel mask ──► hit_register (64 FFs on 64 DLL phases) ──► ppl (decode / play back)
                                        ▲                                        │ 32 x {hit, 6-bit time}
 clk ──► dll (64 phases) ───────────────┘   bcc (8-bit BX no.) ──┐               ▼
      └► addr_counter ──────────────────────────────────────► pipeline dp_sram 164 x 240 (written every cycle)
 trigger ──► trigger_ctrl (copies 3 data sets) ──────────────────────────────────┘
                        ▼
             derand_buffer 48 x 240 (16 events) ──► readout_ctrl (first hit, header) ──► readout_if ──► dout[7:0]
 scl/sda ──► i2c_slave ──► config_regs (mask, latency, play back, DAC codes) ──► dac x4 ──► vth[]
```

## From a pulse to a 6-bit time

This is the least obvious part of the design, and the only part that uses
more than one clock.

**DLL (`dll`, behavioural).** In silicon, the clock runs through a chain of 64
voltage-controlled delay elements. A phase detector and a charge pump adjust
the delay until the end of the chain is in phase with the clock again. The
64 element outputs then divide the 25 ns period into bins of 390.6 ps. The
model measures the clock period and drives `tap[i]` as the clock delayed by
`i/64` of a period (50 % duty). It raises `locked` 40 cycles (1 µs) after
reset is released. The pipeline stores `lock_lost = !locked` with every data
set.

**Hit register (`hit_register`, one per channel).** There are 64 flip-flops,
all with the channel's signal as data. Flip-flop `i` is clocked by
`tap[i]`. Over one clock period the register therefore takes a 64-sample
picture of the signal. At the clock edge that ends the period, the picture
is copied into the clock domain as `pic`, so `pic[i]` is the signal level at
time `i/64` of the period that has just ended. The channel-mask bit gates
the signal in front of the flip-flops, so a masked channel never sees a hit.

**Decoder and play back (`ppl`, one per channel).** The decoder searches the
picture for the first rising edge. An edge is in bin `i` when `pic[i]` is 1
and the bin before it is 0. For bin 0, "the bin before it" is bin 63 of the
previous picture. The lowest such `i` is the 6-bit drift time, with a hit
flag. A pulse whose leading edge falls between phases `i-1` and `i` is
reported as `i`. A signal that is still high from the previous period is not
a new hit.

**Timing.** A hit in the period starting at clock edge *k* appears in `pic`
after edge *k+1*. It appears at the PPL output after edge *k+2*. It is
written into the pipeline at edge *k+3*.

## The data set and the pipeline

Each data set is 240 bits wide. Only the 32 × 6-bit drift times are fixed by
the chip description; the rest of the layout is this design's own:

| bits      | content                                            |
|-----------|----------------------------------------------------|
| 191:0     | drift time of channel *c* in `[6c+5:6c]`           |
| 223:192   | hit flag of channel *c* at bit `192+c`             |
| 231:224   | bunch crossing number from `bcc`                   |
| 239:232   | status: bit 0 DLL lock lost, bit 1 play back mode  |

The pipeline (`dp_sram`, 164 × 240) is a ring addressed by `addr_counter`.
One data set is written every cycle. The counter's `zero_x` flag marks the
pointer passing address 0 and is a debug output. 164 rows cover the 4 µs
trigger latency (160 cycles) plus the three-cycle search window, with one
spare row.

## Triggers, the search window and the derandomizer

Drift times in the straws reach 50 ns, so a particle's signal can arrive up
to two bunch crossings after the bunch crossing it belongs to.
`trigger_ctrl` handles each trigger as follows:

1. It computes the triggered row: the write pointer at the trigger edge minus
   the latency register (default 160).
2. It copies that row and the next two into the derandomizing buffer, one row
   per cycle, through the pipeline's read port.

Put end to end: a trigger sampled at clock edge *t* covers the hits of the
periods that start at edges *t−163*, *t−162* and *t−161*. Its bunch crossing
number is that of the data set written at edge *t−160*.

**Trigger losses.** Copying a trigger takes three cycles, so triggers wait in
a queue of two entries: the one being copied and one waiting. A trigger is
lost, and flagged in the next header and in the status register, in two
cases:

- the queue is full, which means a third trigger within three cycles;
- the derandomizer already holds or has reserved 16 events.

The latency is clamped to 160 cycles. A larger value would let a queued
trigger's rows be overwritten before they are copied.

**Derandomizer.** `derand_buffer` is a 48 × 240 dual-ported array used as a
ring of 16 events of 3 rows. Space for an event is reserved when its trigger
is accepted. The event becomes readable when its third row is written and is
freed when its third row is read. `full` and `empty` are debug outputs.

## The readout sequence

`readout_ctrl` reads one event (3 rows). For each channel it keeps only the
first hit, which makes OTIS a single-hit TDC. It writes that hit as an 8-bit
extended drift time:

| hit found in       | byte          |
|--------------------|---------------|
| 1st bunch crossing | `00tttttt`    |
| 2nd bunch crossing | `01tttttt`    |
| 3rd bunch crossing | `10tttttt`    |
| no hit             | `11000000`    |

The sequence is 4 header bytes followed by channels 0 to 31. Byte *k* is
`seq[8k+7:8k]` and is sent *k*-th. The chip is known to put a chip ID,
status and the bunch crossing number into the header. The byte order and the
flag meanings below are this design's own choice:

| byte | content                                                                     |
|------|-----------------------------------------------------------------------------|
| 0    | chip ID (the 4 `chip_id` pins)                                              |
| 1    | bit 0: a trigger was lost since the previous sequence; bit 1: derandomizer full; bit 2: DLL not locked |
| 2    | OR of the status bytes of the three data sets                               |
| 3    | bunch crossing number of the triggered data set                             |

`readout_if` is the readout buffer. It holds one finished sequence and sends
it on `dout` at one byte per cycle, with `dvalid` high for 36 cycles and
`sop` on byte 0. A new sequence can be loaded during the last byte, so
sequences follow each other without gaps. Meanwhile `readout_ctrl` prepares
the next event, which takes about 5 cycles. The sustained rate is therefore
one trigger per 900 ns.

## Play back mode

Play back mode bypasses the TDC core so that the data path can be tested
without detector or DLL. Each `ppl` has a 7-bit play back register
`{hit, time}`, and the 32 registers form a shift chain. Each write to I2C
register 0x06 pushes a word in at channel 0. After 32 writes, the first word
written sits at channel 31. When bit 0 of register 0x00 is set, every data
set carries these words instead of measured times, with status bit 1 set.

## Slow control

`i2c_slave` is an I2C slave at 7-bit address `101` + `chip_id`. SCL and SDA
are oversampled by the 40 MHz clock, so standard and fast mode are fine. SDA
is open drain: `sda_oe` pulls the line low.

A write sends a register address and then data bytes to consecutive
registers. A read returns bytes from the current address and increments
after each byte. `config_regs` has this register map (all values are this
design's choice):

| addr      | register                                                            | reset |
|-----------|---------------------------------------------------------------------|-------|
| 0x00      | bit 0: play back mode                                               | 0     |
| 0x01      | trigger latency in cycles (values above 160 act as 160)             | 160   |
| 0x02–0x05 | channel enable, channels 8k…8k+7 in register 2+k                    | 0xFF  |
| 0x06      | play back word `{hit, 0, time[5:0]}`; a write shifts the chain      | 0     |
| 0x08–0x0B | threshold codes of DACs 0–3                                         | 0x80  |
| 0x0C      | status (read only): {0,0,0, copy busy, trigger lost (sticky), derandomizer empty, derandomizer full, DLL lock lost} | – |

**DACs (`dac`, behavioural).** There are four 8-bit DACs, one per 8-channel
ASD discriminator chip. Each outputs `2.5 V × code / 256` as a `real`. The
resolution and range are assumptions.

## How far to trust it, and where it departs

These points follow the chip description: 32 channels, 64 DLL bins, 6-bit
drift times, 240-bit data sets, a 164-deep pipeline, a 48-deep derandomizer
for 16 triggers, a three-bunch-crossing search window with first-hit
selection, the 8-bit extended-time code, a 4 + 32 byte sequence of 900 ns,
play back mode, a channel mask, an 8-bit bunch counter, I2C slow control,
and the debug signals (pointer zero crossing, derandomizer full and empty,
DLL lock lost).

The following are this design's own choices:

- the data-set layout beyond the drift times;
- the header layout;
- the trigger queue and loss rule;
- the latency register and its clamp;
- the play-back chain protocol;
- the register map and I2C addressing;
- the readout handshake;
- the edge-decoding rule;
- the DAC count and range;
- the DLL model's lock time.

Further points to be aware of:

- The chip's block diagram labels the pipeline with 160 rows, while its
  memory is specified as 164 rows; this RTL uses 164.
- The block diagram also shows optional *sparsification* and *truncation*
  stages before the readout buffer. Their behaviour is not specified, so
  they are not implemented: every sequence is the full 36 bytes.
- The prototype chip showed a fine-time non-linearity for single hits. This
  RTL models the intended linear behaviour, not that effect.
- The DLL and the DACs are behavioural models with `#` delays and `real`
  values, not synthesizable logic. The hit registers are synthesizable, but
  they use 64 clocks (the DLL phases) and need timing constraints that are
  outside this repository.

## Files and simulation

`rtl/` holds one module or package per file. `otis_pkg.sv` holds the shared
sizes and the data-set layout, and `otis_top.sv` is the chip. Each
`tb/tb_<module>.sv` is a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. `tb_otis_top` runs the whole chip at its
default sizes. It configures the chip over I2C, drives random hits with
known fine times, sends isolated triggers, bursts and a train that fills the
derandomizer, then switches to play back mode. It compares every output
sequence with its own model, and it fails if any of these mechanisms never
happened: hits in each of the 3 bunch crossings, empty channels, several
hits in one window, channel mask, trigger loss, derandomizer full, pointer
wrap, play back, and back-to-back sequences.

`tb_fine_time_sweep` repeats the chip's basic fine-time measurement. It
sweeps a pulse's leading edge across the 25 ns period in 0.1 ns steps, on all
channels, through the full chip. It checks that the code is
`ceil(delay / 390.625 ps)`, so that it rises linearly from 1 to 63, and that
an edge after the last phase reads as bin 0 of the next bunch crossing.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_otis_top \
          rtl/otis_pkg.sv tb/tb_otis_top.sv -Mdir obj_top
./obj_top/Vtb_otis_top
```

Replace `tb_otis_top` by any other testbench name to run a single block. The
full-chip test simulates about 20 000 clock cycles in a few seconds. The
sizes are parameters with the chip's values as defaults. `otis_top`'s
`PDEPTH` sets the pipeline depth, and the package constants set the
derandomizer size and the search window.
