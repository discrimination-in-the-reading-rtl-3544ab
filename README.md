# Optical strip encoder emulation with lost counts, and transition capture

A damaged strip on a linear optical encoder loses counts. The controller then sees the
wrong position, drives the motor harder to correct it, and eventually reports an
electrical fault. This RTL builds a test bench for that problem in one FPGA design.
One half emulates a 150 LPI strip encoder whose A/B quadrature outputs carry lost
counts at random places. The other half is the capture logic a board would run against
a real encoder. It records every A/B transition and how long the state before it
lasted, stores the records in a 512 kB SRAM, and reads them back afterwards for
offline analysis, which looks for timing outliers and direction reversals.

The design follows a published student design built for a Digilent Cmod A7 (Artix-7)
board. That design was written in VHDL, with a neural-network classifier in Python run
offline. This is a SystemVerilog re-implementation of its hardware part. Departures
from the original are listed near the end.

## Encoder units and the A/B channels

| quantity | value |
|---|---|
| strip | 150 lines per inch, 4 A/B states per line, so one *physical encoder unit* (peu) = 1/600 in |
| resolution | 1 peu = 2^7 = 128 *encoder units* (eu); each A/B state lasts 64 eu |
| speed | 20 in/s = 1,536,000 eu/s, about 1 eu per tick of a 1.5 MHz clock |
| emulation tick | 100 MHz / 68 = 1.47 MHz (0.68 us); one A/B state lasts 64 ticks = 43.5 us |
| run | 1,536,000 eu (20 in) out, then back to 0 |
| position | 24-bit two's complement; the sign of the speed gives the direction |

Position bits [7:6] select the A/B state:

| pos[7:6] | {A,B} |
|---|---|
| 00 | 10 |
| 01 | 11 |
| 10 | 01 |
| 11 | 00 |

Going forward, the channels therefore cycle 10 → 11 → 01 → 00. Going back, they cycle
the other way.

## How a lost count is played

This is the least obvious part of the design. It is spread over `error_generator`,
`eu_pos` and `encoder_operator`.

**The error list.** Releasing the encoder-operation button (the falling edge of the
operator's `enable`) draws a new list. The list holds 16 + (2 random bits) errors, so
16 to 19. The first error is uniform in [0, 0x16BE]. The others are uniform in
[first, first + 0xB1]. These are the upper 16 bits of a 24-bit position, so the
cluster covers 0xB1 × 256 eu, about 1.5 cm of strip, and it always lies within the
first 20 inches. The lower byte depends on the direction:

- `7F` going forward. This is the last eu of pos[7:6] = 01, where the A/B state is 11.
- `3F` going back. This is the last eu of pos[7:6] = 00, where the A/B state is 10.

These are the states in which a lost count first shows in each direction. Random
numbers come from a free-running 32-bit LFSR, scaled to a range by multiply-and-shift.
The list is written one entry per tick.

**Matching.**

- Going forward, an entry fires when {entry, 7F} = position + 2.
- Going back, an entry fires when {entry, 3F} = position.
- When an entry fires, it is disarmed, together with any entry holding the same value.
  While the error plays, the position moves back over that point, and this stops it
  from firing again.
- The entry that fired before it is re-armed, so errors met on the way out come back
  on the way home. The last one hit on the way out stays disarmed.
- No match is looked for while an error is playing.

**Playback.** `error` is high for 320 ticks (five A/B states). While it is high,
`eu_pos` freezes its integrators. Each tick it then either steps the position back by
one velocity step (`e_block_minus` = 0) or holds it (`e_block_minus` = 1).

| direction | ticks 0–127 | ticks 128–255 | ticks 256–319 |
|---|---|---|---|
| forward | step back | hold | step back |
| backward | hold | hold | hold |

Going forward, the channels therefore run backwards through a state and dwell in it.
In the capture this shows as a direction reversal inside the forward half, plus
abnormally long states. Going back, a lost count only stretches one state to five
times its normal length.

## The capture record

`trans_change_ab` samples A/B on alternate 10 MHz ticks. When A/B differs from the
held value, it emits one write request. The request carries the state *just left* and
how long that state lasted, in whole microseconds modulo 128. The duration is the
difference of a free-running microsecond counter between two transitions.
`address_control` stores one byte per transition:

    bit  7 6 5 4 3 2 | 1 0
         duration[6:1] | A B

Bit 0 of the duration is dropped: twice the stored value is the duration rounded down
to an even number of microseconds. Records are written at consecutive addresses from 0.
Pressing the encoder-operation button rewinds the write address. A clean state of
43.5 µs is stored as 21 or 22 (43 or 44 µs).

Example: A/B = 01 from time 0, then 11 at 150 µs, 10 at 195 µs and 01 at 240 µs. This
stores 0x2D, 0x5B and 0x5A at addresses 0, 1 and 2 (150 mod 128 = 22, 45, 45 µs).

## Memory controller and read-back

`address_control` is a three-state machine: idle, write, read. It drives the SRAM's
active-low CE, OE and WE, the 19-bit address, and the write byte. All of these are
registered, so a request seen on one 10 MHz tick drives the RAM during the next tick.
A write leaves OE high and a read leaves WE high; an assertion checks that the two
never fall together. Simultaneous read and write requests are ignored. Reads use their
own address counter, so the RAM reads back first in, first out.

Reading is allowed only after the run, when `empty` is high (the emulated position is
back at 0). The read button then starts `read_ram`'s pulse train: one read request
every 202 ticks (20.2 µs). The train continues until `empty` falls or the design is
reset; it does not stop at the last written address. `memory_ram` returns each byte on
`mem_db_rd` one tick after OE was seen low. Outside the design, a host or testbench
logs the address and byte as a line of the capture file.

## Clocking

The design has one clock, the 100 MHz board clock. `freq_div` produces two
one-cycle enable strobes: `ce_enc` every 68 cycles (1.47 MHz) for the emulation, and
`ce_ram` every 10 cycles (10 MHz) for the capture logic and the RAM. Every flip-flop
is clocked by `clk` and advances only on its strobe. The A/B channels therefore pass
from the emulation to the capture side with no clock-domain crossing. All resets are
synchronous and active high.

## Files

| file | contents |
|---|---|
| `rtl/enc_pkg.sv` | widths, the A/B table, the record packing |
| `rtl/freq_div.sv` | 1.47 MHz and 10 MHz enable strobes |
| `rtl/encoder_operator.sv` | button-driven round-trip motion profile |
| `rtl/eu_pos.sv` | acceleration → speed → position integrator with hold / step-back |
| `rtl/error_generator.sv` | random error list, matching, playback |
| `rtl/eu_conv_ab.sv` | position bits [7:6] → {A,B}; `empty` |
| `rtl/encoder_emulation.sv` | the four blocks above, wired together |
| `rtl/trans_change_ab.sv` | transition detector with microsecond durations |
| `rtl/address_control.sv` | SRAM controller, write/read address counters |
| `rtl/read_ram.sv` | read pulse train |
| `rtl/cmod_a7.sv` | the capture logic: the three blocks above |
| `rtl/memory_ram.sv` | 2^19 × 8 synchronous model of the board SRAM, split data bus |
| `rtl/encoder_project.sv` | top: divider, emulation, capture, RAM |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_encoder_project.sv` | end-to-end run, shortened trip |
| `tb/tb_encoder_project_full.sv` | end-to-end run with every parameter at its default |
| `tb/tb_encoder_project_2m.sv` | end-to-end 2 m round trip, with faster strobes |
| `tb/project_monitor.sv`, `tb/data_to_file.sv` | checker and read-back sink used by the testbenches |

The top's parameters are the divider ratios (`DIV_ENC`, `DIV_RAM`), `TICKS_PER_US`,
`READ_GAP`, the trip length `MAX_POS`, and the error-list shape (`MAX_ERRORS`,
`QERR_MIN`, `QERR_RAND_BITS`, `MAX_FIRST_ERR`, `ERR_SPAN`, `SEED`). For a 2 m trip,
set `MAX_POS = 5931642`: the 24-bit position and the 512 kB RAM both hold it, since
about 185,000 records are needed for the round trip.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        --top-module tb_encoder_project rtl/enc_pkg.sv tb/tb_encoder_project.sv -o sim
    ./obj_dir/sim

Replace the top module name to run any other testbench.
`tb_encoder_project` (a 32,768 eu trip, about 1,100 records) runs in a few seconds.
`tb_encoder_project_full` covers the full 20-inch round trip: about 48,000 records,
16 to 19 lost counts, and 3.1 s of board time, which takes about 3 minutes.
`tb_encoder_project_2m` runs the 2 m round trip (`MAX_POS = 5931642`, about 185,000
records). Both strobes run at 50 MHz and the read gap is shortened, so it takes
under 20 seconds. Memory
contents and uninitialised state are random in a two-state simulator, which the
design tolerates: everything that is read is reset first.

## What is verified

- Each block's testbench compares the block against values worked out independently
  of the RTL:
  - the strobe periods;
  - a reference integrator;
  - the A/B table;
  - the 320-tick error profiles and where errors fire;
  - the example record bytes and random microsecond durations;
  - byte-exact writes and reads at consecutive addresses;
  - the 202-tick read spacing;
  - a reference RAM.
- The end-to-end testbenches check every byte read back against the byte written at
  that address.
- They also check the captured sequence:
  - neighbouring A/B states only;
  - at least 90 % of states last one T_state;
  - the record count matches the distance travelled;
  - backward steps appear in the forward half for every lost count played.
- They count the turn-around, lost counts in both directions, writes, read pulses,
  and `empty` rising. Each of these must happen at least once.

## Departures from the original description

- **Enables instead of divided clocks.** The original generated a separate 1.47 MHz
  clock and a 10 MHz clock.
- **The RAM divisor gives 10 MHz, as stated.** The original's divider listing would
  have produced 8.33 MHz.
- **Hardware replacements for simulator-only constructs.** The LFSR replaces the
  simulator's `uniform()` random generator. A microsecond counter replaces reading
  simulation time.
- **When the error list is drawn.** It is drawn when the button is released rather
  than at reset, and its size is 16–19 as described in the text. The original
  listing used 10–25.
- **`empty` gates reading in the described sense.** Reading is allowed after the run;
  the original listing had the opposite polarity.
- **A/B table.** pos[7:6] = 11 maps to A/B = 00, which completes the quadrature
  cycle.
- **SRAM write condition.** `memory_ram` writes only with CE and WE both low. The
  original model wrote on any access with CE low, which corrupted bytes being read.
- **Motion.** The constant-acceleration mode was not completed in the original and is
  absent here. The acceleration input of `eu_pos` is kept and works, but is tied
  to 0.
- **Turn-around and stop.** These are decided one step early, so the position peaks at
  exactly `MAX_POS` and stops at exactly 0.

## Not included

- The offline analysis: decoding the capture file and the single-neuron classifier.
- The capture-file writer, except as a testbench model.
- The board's pin constraints.
- The physical SRAM chip. `memory_ram` is a synchronous stand-in for the board's
  asynchronous 8 ns part. Driving the real chip would need its own timing (for
  example, WE pulse width and address setup).
