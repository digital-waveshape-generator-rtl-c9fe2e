# Digital Waveshape Generator

A Digital Waveshape Generator (DWG) makes a musical tone by playing an
arbitrary, user-loaded wave shape from RAM at the pitch of a note. A
microprocessor loads the shape and the pitch, and the hardware runs on its
own. The 8-bit samples drive a DAC, which is analog and outside this RTL.

The pitch can be made in two ways, and this repository holds four designs
that use them:

| design | module | how pitch is made | voices |
|---|---|---|---|
| original divider voice | `dwg_voice` | master clock / N / 256 | 1 |
| top-octave scheme | `top_octave_gen` x12, `tov_voice` | 12 note clocks, then / N / 256 | 1 per voice module |
| multi-channel DDS | `mcdds` | 32-bit phase accumulator, time-sliced | 4, 8 or 16 |
| FPGA DDS | `dds16` (16 x `dds_channel` + `sum_tree16`) | 32-bit phase accumulator per channel | 16 |

`dwg_top` puts all four side by side. Each design has its own clock, reset
input, byte-wide host write bus (`host_wr_t`: `we`, 16-bit `addr`, 8-bit
`data`) and 8-bit DAC code output. The designs share nothing but the reset.

## 1. The divider voice (`dwg_voice`)

A 16-bit divisor N, written as two bytes, sets a divide-by-N counter. The
counter pulses its terminal count (TC) once every N master clocks. Each TC
advances an 8-bit divide-by-256 counter, which addresses the wave RAM. So one
256-point wave plays every 256·N clocks:

    f_out = f_clk / (256 · N)

The wave RAM is 1024x8 and holds four shapes. A shape-select register picks
one at once, without stopping the voice. The original master clock is
1802240 Hz = 256 · 7040 Hz, so N = 1 plays A8, N = 16 plays A4 and N = 256
plays A0. Notes other than A are approximated by the nearest integer N.

Register map: `0x0000` divisor low byte, `0x0001` divisor high byte, `0x0002`
shape (bits 1:0), `0x0400`–`0x07FF` wave RAM at address `{shape, point}`.

`div_n_counter` runs from N-1 down to 0 and reloads, so its period is exactly
N. A new divisor takes effect at the next reload.

## 2. The top-octave scheme (`top_octave_gen`, `clock_mux12`, `tov_voice`)

A single divider cannot be accurate for all twelve notes unless the master
clock is a common multiple of their frequencies (about 3.9 GHz once the ×256
is included). This scheme makes the twelve top-octave notes C8..B8 instead.
Each comes from its own 16-bit divider of a 14417920 Hz clock:

| note | C8 | C#8 | D8 | D#8 | E8 | F8 | F#8 | G8 | G#8 | A8 | A#8 | B8 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| N | 3444 | 3251 | 3068 | 2896 | 2734 | 2580 | 2435 | 2299 | 2170 | 2048 | 1933 | 1825 |

The worst tuning error is 0.024 % (B8, 7900.23 Hz against 7902.13 Hz), less
than half a cent.
Each note frequency then goes to an analog PLL that multiplies it by 256.
`top_octave_gen` is the divider part. `dwg_top` brings its twelve outputs out
on `to_note_tick` and takes the twelve PLL outputs back in on `to_clk`.

A voice (`tov_voice`) selects one of the twelve clocks with `clock_mux12` and
divides it by an 8-bit N. A power of two gives the same note in a lower
octave. The result steps a divide-by-256 counter through a 256x8 wave RAM.
Register map: `0x0000` N, `0x0001` note select (0 = C … 11 = B; 12–15 =
silent), `0x0100`–`0x01FF` wave RAM.

All clocks are synchronous in this RTL. The "top-octave clocks" are
one-cycle enable pulses in the voice's clock domain, not real clocks. A
system with true PLL clocks needs a synchroniser or a real glitch-free clock
mux in front of `tov_voice`.

## 3. The multi-channel time-sliced DDS (`mcdds`)

This is the most involved design. A direct-digital-synthesis (DDS) channel adds a 32-bit addend
to a 32-bit phase every sample and looks up the wave at the top phase bits:

    f_out = addend · f_sample / 2^32

`mcdds` serves up to 16 channels with one adder and one lookup table. The
addends and phases sit in small RAMs, and the channels take turns in a
pipeline. One channel time slot (a "pipeline step") is **two clock cycles**:
a write half, then a read half.

### Pipeline

| register | holds, at the end of step t |
|---|---|
| latch 1, latch 2 | addend and phase of the channel read in step t |
| latch 3 (32 bits) | latch 1 + latch 2: the new phase of the channel read in step t-1 |
| latch 4 (8 bits) | lookup-table entry at latch 3's top phase bits (channel of step t-2) |
| latch 5 (12 bits) | latch 4 + (mux ? latch 5 : 0): the running sum of the frame |
| latch 6 (8 bits) | bits 11:4 of a finished sum, held for a whole frame: the DAC code |

In the write half of a step, latch 3 is written back to the phase RAM at the
address of its channel. In the read half, the next channel's addend and phase
are read from the addend DPRAM and the phase RAM. So the RAM address sequence
for four channels is `2,0 | 3,1 | 0,2 | 1,3 | …`. In each pair, the first
address is the write-back and the second is the read.

### Microsequencer (`mcdds_sequencer`)

Nothing in the datapath counts channels. A 16-word, 16-bit microprogram
drives every step. It sits in two 16x8 dual-port RAMs followed by two 8-bit
latches. The low four bits of each word are the address of the next word,
so the loop length of the program sets the number of channels. The latches
load once per step. After reset they hold zero, so the first step fetches
word 0.

`microword_t` (in `dwg_pkg`), from bit 15 down:

| bits | field | meaning in the step the word is active |
|---|---|---|
| 15 | spare | unused |
| 14 | `we_en` | write latch 3 back to the phase RAM |
| 13 | `l6_en` | load latch 6 at the end of the step |
| 12 | `mux_acc` | 1: add to latch 5; 0: start a new sum |
| 11:8 | `wr_ch` | channel in latch 3: write-back address and table bank |
| 7:4 | `rd_ch` | channel to read |
| 3:0 | `next` | next word |

For C channels (4, 8 or 16), load word k (k = 0 … C-1) with:

    next = (k+1) mod C,  rd_ch = k,  wr_ch = (k-2) mod C,
    mux_acc = (k != 3),  l6_en = (k == 3),  we_en = 1

Word 3 is the step in which latch 4 holds channel 0's lookup. That step
restarts the sum and moves the finished sum into latch 6. Other orders are
possible as long as `wr_ch` follows `rd_ch` two steps later.

For the first three steps after reset, write-back is blocked while the
pipeline fills. Without this, latch 3's reset content would overwrite two
channels' phases. Any program that starts at word 0 therefore runs cleanly
from reset. The sequencer RAMs are not cleared by reset, so load the program
before releasing reset. An assertion in `mcdds` reports any step whose
write-back channel is not the channel read two steps earlier. That is the one
rule a program must keep.

### Lookup-table split

The lookup table is 1024x8. The `lut_mode` register divides it into one bank
per channel. The bank is the channel number in latch 3:

| `lut_mode` | channels | samples per wave | table address |
|---|---|---|---|
| 0 (`LUT_4CH`) | 4 | 256 | `{ch[1:0], phase[31:24]}` |
| 1 (`LUT_8CH`) | 8 | 128 | `{ch[2:0], phase[31:25]}` |
| 2 (`LUT_16CH`) | 16 | 64 | `{ch[3:0], phase[31:26]}` |

### Rates and latency

* A new DAC sample comes every 2·C clocks, so `f_sample = f_clk / (2·C)`.
* After reset, the first full-frame sample appears 2·C + 10 clocks later.
  It is the sum over the channels of their first lookups, taken at phase =
  addend.
* Example: C8 (4186.0 Hz) at a 10 MHz sample rate needs addend 1797877.
  With 4 channels that takes an 80 MHz clock in this RTL.

Register map: `0x0000`–`0x003F` addends (`{channel, byte}`, byte 0 = bits
7:0); `0x0100`–`0x010F` microword bits 7:0; `0x0110`–`0x011F` microword bits
15:8; `0x0200` `lut_mode`; `0x0400`–`0x07FF` lookup table.

## 4. The FPGA DDS (`dds_channel`, `sum_tree16`, `dds16`)

In an FPGA there is no reason to share the adder. Each of 16 `dds_channel`s
has its own 32-bit phase adjustment register, adder, phase register and
256x8 wave table, and produces a sample every clock. Its output is registered
one clock after the phase. `sum_tree16` adds the 16 outputs in a four-level
tree (8-, 9-, 10- and 11-bit adders, each followed by a register) and passes
bits 11:4 of the 12-bit sum to the DAC. The DAC code therefore lags the phases
by 1 + 4 clocks.

`dds16` register map: address bits 12:9 select the channel. Within a channel,
`0x000`–`0x003` are the adjustment bytes and `0x100`–`0x1FF` the wave table.

Size after generic synthesis: about 1170 flip-flops and 32 kbit of RAM.

## Choices made here, and departures from the original description

* **Two clocks per DDS channel slot.** The source's timing diagram shows two
  RAM addresses (write-back, then read) per pipeline clock, and this RTL
  follows it. The source's prose says instead that the master clock equals
  sample rate × channels. Here it is twice that.
* **Sequencer steps once per channel slot**, not once per master clock. With
  four fed-back address bits, there are 16 words. One word per master clock
  could not cover the 32 clocks a 16-channel frame needs.
* **Microword fields** other than the 4-bit next address are this design's
  own layout.
* **Lookup-table banking** is read from "4 channels × 256 samples, 8 × 128,
  16 × 64" in a 1024-entry table. How the mode is selected is not described,
  so it is a host register here.
* **DAC bits.** Which 8 of the 12 sum bits reach the DAC is not specified.
  The top 8 (bits 11:4) are used in both `mcdds` and `sum_tree16`. With
  4 channels this uses only a quarter of the DAC range.
* **Divide-by-N period** is exactly N, which is what the divisor table
  needs.
* **Wave RAM of the divider voice** is 1024x8 with 4 shapes and a
  shape-select register. The original block diagram shows a 256x8 part.
* **The top-octave voice** takes an 8-bit N, so any N from 1 to 255 works,
  not only powers of two.
* **Host interface.** A generic byte-write bus with per-design register maps.
  There is no read-back.
* **Reset.** Reset is synchronous and active low. It clears counters,
  latches, registers and the DDS phases, but not RAM contents. Load every
  memory before use.
* **Not built:** the DACs, the 8-bit multiplying DAC meant for an envelope,
  the master oscillators, the ×256 PLLs and the host processor.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Testbenches compare
against models written from the definitions above, not from the RTL:

* the counters are checked by counting enables between terminal counts;
* `tb_mcdds` uses a frame-level DDS model, with phase = (f+1)·addend in frame
  f, at 4, 8 and 16 channels. It checks every clock of every sample, the
  2·C-clock sample period and the 2·C + 10 start latency;
* `tb_dds16` tracks 16 reference phases and checks the 5-clock latency;
* `tb_dwg_top` runs all four designs together at their default sizes. It
  uses the twelve top-octave divisors and a behavioural stand-in for the
  PLLs. It counts that each mechanism occurs at least once: divider reload,
  256-point wrap, shape switch, note select, octave division, phase
  write-back, sum restart, latch-6 load, table-split mode and adder-tree
  carry.

With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
        rtl/dwg_pkg.sv tb/tb_mcdds.sv --top-module tb_mcdds -Mdir obj -o sim
    ./obj/sim +verilator+rand+reset+2

Swap in any other `tb_<module>` the same way. Every testbench finishes in
seconds. Lint with `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/dwg_pkg.sv rtl/<module>.sv`. The remaining warnings are unused bits: the
spare and next-address fields of the microword in `mcdds`, the top nibble of
the top-octave voice's divisor latch, and latch 5's test output.

## Files

`rtl/dwg_pkg.sv` holds the shared types. Each other file in `rtl/` is one
module, named as above. `dpram` is the generic dual-port RAM used for every
memory except the phase RAM. `tb/` holds one testbench per module, plus
`tb_dwg_top`.
