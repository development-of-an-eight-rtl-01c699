# Eight-channel DDS waveform generator: FPGA logic

This is the FPGA logic for a transmit waveform generator with eight AD9910 direct
digital synthesizers (DDS). Each DDS drives one element of an eight-element
antenna array. The beam is steered by giving every chip its own start frequency
and start phase, which is the same as delaying otherwise identical chirps by
different amounts. The settings can change from one radar pulse to the next.

The chips are programmed over their SPI ports, and that is far too slow to do
from software on every pulse. So the host compiles, ahead of time, the complete
SPI bit stream for every waveform and every chip. It loads these streams into a
16K x 16 pattern RAM. The FPGA then works like this on every pulse-repetition
(PRF) trigger:

1. It plays the current waveform's slice of the RAM onto the eight
   CS_N/SCLK/SDIO buses, one RAM word per clock.
2. A programmable delay after the PRF, it fires IO_Update on all eight chips at
   the same moment. IO_Update is retimed to the DDS `Sync_Clk`, so the new
   frequency, phase and ramp settings take effect together.

A playlist steps through up to 16 waveforms, each repeated for a programmable
number of presums. The playlist can also alternate 0/pi phase from pulse to
pulse. An EPRI reset, once per playlist, returns it to waveform 1.

Static settings are written in *byte-bang* mode. These are the control
registers, the per-chip amplitude (AuxDAC) codes and the DDS amplitude RAM. In
that mode the FPGA serialises single bytes from the host to whichever chips have
their manual chip select low.

## Clocks and resets

| Clock | Frequency | Use |
|---|---|---|
| `sample_clk` | 111.167 MHz | Radar sample clock; only the divider and the external-trigger capture run on it |
| logic clock (`ref_clk`) | 55.583 MHz | `sample_clk / 2` (`clk_div2`). Runs all registers, the UART, playback and timing. It leaves the chip as `ref_clk` (DDS reference) and `sync_in` |
| `sync_clk` | 222.3 MHz | `SYNC_CLK` output of DDS #1; only the IO_Update edge detector runs on it |
| `osc_clk` | 100 MHz | Local oscillator; only the house-keeping block runs on it |

`rst_n` is an asynchronous, active-low reset for every domain. Note that the
logic clock is itself a divided clock held low in reset. Its flops are cleared
by the reset's falling edge, not by clock edges, so a simulation must apply a
real 1→0 edge on `rst_n` (the top-level testbench does this).

All delays below are in logic clocks (17.99 ns).

## Hierarchy

```
dds_8ch_wfg                  top
├── clk_div2        u_div    sample clock / 2
├── uart_rx         u_rx     115.2 kbaud 8N1 receiver
├── uart_tx         u_tx     115.2 kbaud 8N1 transmitter
├── cmd_processor   u_cmd    packet protocol -> 8-bit register bus
├── reg_file        u_regs   register map, waveform table, write strobes
├── timing_gen      u_tgen   internal PRF / EPRI generator
├── ext_trig_capture u_ext   external PRF / EPRI inputs -> logic clock
├── pattern_ram     u_ram    16K x 16 serial pattern RAM, byte write port
├── playback_ctrl   u_play   playlist state machine and RAM address counter
├── byte_bang_serializer u_bb  one byte -> SPI, MSB first
├── dds_port_mux    u_mux    byte-bang or pattern RAM -> CS_N/SCLK/SDIO pins
├── io_update_delay u_dly    PRF -> programmed delay -> stretched request
├── io_update_edge  u_edge   request -> one Sync_Clk IO_Update pulse x 8
├── debug_leds      u_leds   boot sweep, then debug signals
└── accessory       u_acc    1 PPS, 50 MHz / 1 MHz / 1 kHz enables, button debounce
```

`wfg_pkg` holds the shared constants, the register addresses and the
configuration structs.

## The serial pattern RAM

This part of the design needs the most care from whoever writes the host
software. The hardware only plays words; everything the chips receive in run
mode is encoded in the RAM contents.

### Word format

| Bit | Drives |
|---|---|
| 0..7 | SDIO of DDS #1..#8 (one data line per chip) |
| 8 | SCLK of all chips |
| 9 | common CS_N, *zero-phase* version |
| 10 | common CS_N, *pi-phase* version |
| 11..15 | unused |

One SPI bit takes two words. The first word has SCLK low and the data bit on
SDIO, and the second has SCLK high with the same data. The chips sample on the
rising edge, so SCLK runs at 27.8 MHz.

All chips share the clock and the chip selects, but each has its own SDIO line.
One frame therefore writes the same register of all eight chips with eight
different values, for example eight start phases.

0/pi modulation uses the two CS_N lines. The stream carries the phase-offset
frame twice: once with the zero-phase value, framed by bit 9, and once with the
value + 180°, framed by bit 10. On each pulse the playback logic passes only one
of the two CS_N bits to the pins, so each chip accepts only one of the two
phase words. Frames that must always be accepted (frequency, ramps) have both
bits low.

Put at least one word with both CS_N bits high between frames, and at the end of
each waveform. When no pattern is playing, the pins idle with CS_N high and SCLK
and SDIO low.

### Loading

Write any value to 0x4B to reset the write pointer. Then stream the bytes to
0x4C: for each word, the low byte first and then the high byte. The pointer
counts bytes and is 15 bits wide.

### Waveform table (0x50-0x93)

There are 17 entries of four bytes each. Entry *n* (n = 0..16) is at
0x50 + 4n:

| Byte | Bits | Field |
|---|---|---|
| +0 | 7:0 | presums[11:4] |
| +1 | 7:4 | presums[3:0] (bits 3:0 reserved) |
| +2 | 6 | 0/pi enable |
| +2 | 5:0 | start address[13:8] |
| +3 | 7:0 | start address[7:0] |

Waveform *n* plays from its own start address up to the next entry's start
address minus one. That is why there are 17 entries for 16 waveforms: the 17th
entry only marks where waveform 16 ends. An entry whose successor does not start
later plays nothing, but its PRFs are still counted.

The presum field holds **presums − 1** (0 → 1 pulse, 4095 → 4096 pulses), the
same "setting = count − 1" convention as the PRF and EPRI registers.

### Playback timing

Let `prf_trig_out` be high in clock *k*. Then:

- The RAM address counter loads the start address at edge *k*+1.
- The first word reaches the pins after edge *k*+3.
- One word follows per clock.

IO_Update rises between *D* + 0.5 and *D* + 1.5 clocks after the clock in which
`prf_trig_out` is seen high, where *D* is the IO Update Time register. The exact
position depends on the phase of `Sync_Clk`.

To be safe, make *D* at least the longest waveform's word count + 4. A 10.4 µs
load (the typical per-pulse programming time: phase, ramp limits, step sizes
and RAM profile) is about 578 words. It needs *D* ≥ 582, and at least that much
PRI: at 12.5 kHz the PRI is 4,447 clocks.

A PRF that arrives while a pattern is still playing is ignored. It does not
restart the pattern or advance the playlist.

## Playlist, PRF and EPRI

`playback_ctrl` keeps the current waveform, a presum counter and a phase flag.
On each PRF trigger while idle:

- When run mode is on (DDS config bit 0 = 0) and per-waveform loading is enabled
  (bit 4 = 0), it plays the current waveform's pattern with the current phase.
- It counts one presum. After (presum field + 1) PRFs it moves to the next waveform.
  It stays on waveform 16 if it gets there.
- When the current waveform has 0/pi enabled, the phase flag alternates 0, pi,
  0, … on successive PRFs. It restarts at 0 for each new waveform.

An EPRI reset returns the playlist to waveform 1, clears the counters and aborts
a pattern in flight. The EPRI length is set by software to the sum of all the
presums, so the playlist never needs to wrap on its own.

With loading disabled (bit 4), the chips still get IO_Update and the playlist
still advances, but no chip is selected. The chips then repeat the values they
already hold.

**Internal generator** (`timing_gen`; wavegen config bits 2 and 0 set):

- A PRF pulse comes every PRF setting + 1 clocks. The setting is 24 bits; a PRF
  of 12.5 kHz is a setting of 4445.
- An EPRI reset comes every EPRI setting + 1 PRFs (16-bit setting), 3 clocks
  before the first PRF of its group.
- While the enable is off, the generator is held. When it is switched on, the
  first pulse is an EPRI reset on the next clock, with the first PRF 3 clocks
  later. Turn the enable off while configuring.

**External inputs** (bit 2 clear):

- `ext_prf_trig` and `ext_epri_reset` are pulses of at least one sample clock,
  synchronous to `sample_clk`.
- Each input is stretched to two sample clocks and then edge-detected in the
  logic clock. Every input pulse, however long, gives one one-clock trigger,
  2 to 3 clocks later.

Whichever pair is selected also drives `prf_trig_out` and `epri_reset_out`.

## IO_Update path

`io_update_delay` loads a down-counter on each PRF. The request rises exactly
*D* clocks after the clock that samples the PRF; *D* = 0 behaves as 1. A new
PRF restarts a running count. A write to 0x3E (force IO update) raises the
request on the next clock. That is how static settings written in byte-bang mode
are made active.

The request is held for two logic clocks. `io_update_edge` synchronises it into
the `Sync_Clk` domain with two flops and sends the rising edge as a one-cycle
pulse on all eight registered `dds_io_update` outputs. Because the pulse is made
in the DDS's own `Sync_Clk` domain, all chips update on the same SYSCLK/4 edge.

## Serial command port

The port runs at 115,200 baud, 8 data bits, no parity, 1 stop bit. `uart_rx` and
`uart_tx` run on the 55.58 MHz logic clock with 482 clocks per bit (0.1 % rate
error). The parameter `CLKS_PER_BIT` scales this for simulation.

| Packet | Bytes | Reply |
|---|---|---|
| write | `0x77` ('w'), addr, data | one byte: the register's value after the write |
| read | `0x72` ('r'), addr, any | one byte: the register's value |
| stream | `0x73` ('s'), addr, count[15:8], count[7:0], then *count* bytes | none; every byte is written to *addr*. A count of 0 means 65,536 |

Any other first byte is ignored. There is no timeout: a truncated packet leaves
the parser waiting for its remaining bytes. A stream to 0x4C loads the pattern
RAM, and a stream to 0x43 sends a block of bytes to the chips (used for the DDS
amplitude RAM).

### Register map

| Addr | R/W | Contents |
|---|---|---|
| 0x31 | RW | scratch |
| 0x32 | R | revision: major[7:5], middle[4:0] (`REV_MAJOR`, `REV_MIDDLE` parameters, default 1.0) |
| 0x33 | R | revision minor (`REV_MINOR`, default 0) |
| 0x34 | RW | wavegen config: bit 2 internal timing (1) / external inputs (0); bit 1 internal 100 MHz clock select (to pin `clk_sel_internal`); bit 0 timing generator enable |
| 0x35-0x37 | RW | PRF setting [23:16], [15:8], [7:0] |
| 0x38-0x39 | RW | EPRI setting [15:8], [7:0] |
| 0x3A-0x3B | RW | IO Update Time [15:8], [7:0], in logic clocks |
| 0x3C-0x3D | R | temperature [15:8], [7:0], taken from input `temp_value` |
| 0x3E | W | force one IO_Update |
| 0x40 | RW | DDS config: bit 4 disable per-waveform loading; bit 3 master reset; bit 2 IO reset; bit 1 SDIO as input (output enable off); bit 0 byte-bang mode |
| 0x41 | RW | manual CS_N of DDS #8..#1 (bits 7..0); resets to 0xFF |
| 0x43 | W | byte-bang send |
| 0x4B | W | reset pattern RAM write pointer |
| 0x4C | W | pattern RAM byte write |
| 0x50-0x93 | RW | waveform table |

Write-only and unused addresses read 0, so the echo of a write to them is 0.
All registers reset to 0 except CS_N (0xFF).

## Byte-bang mode

When DDS config bit 0 is 1:
- every chip's CS_N follows its bit in 0x41;
- SCLK and SDIO of all chips come from `byte_bang_serializer`.

Each write to 0x43 sends that byte MSB first. SDIO changes while SCLK is low,
and each bit is two clocks, so a byte takes 16 clocks. Bytes arrive over the
serial link at most one per 4,820 clocks, so the serializer can never be
overrun. An assertion checks this anyway.

A typical bring-up sequence is:

1. Pulse master reset (0x40 bits 3/2 high, then low).
2. Select all chips and send the control, sync and default registers.
3. Select each chip alone and send its AuxDAC code (0-255).
4. Stream the DDS amplitude RAM through 0x43.
5. Force an IO update.
6. Load the pattern RAM and the waveform table, program PRF/EPRI/IO Update Time,
   clear bit 0, and set the timing generator enable.

## House-keeping

`debug_leds` runs a two-sweep back-and-forth LED pattern at boot, with one step
per `STEP_CYCLES` (50 ms). After that the LEDs show these signals (LED 7..0):

| LEDs | Signal |
|---|---|
| 7..4 | current waveform index |
| 3 | pattern write pointer bit 0 |
| 2 | byte-bang busy |
| 1 | timing generator enable |
| 0 | byte-bang mode |

`accessory`, on the 100 MHz oscillator, makes:
- a one-pulse-per-second strobe;
- 50 MHz, 1 MHz and 1 kHz one-cycle clock enables (not divided clocks);
- a 10 ms debounce for two push-buttons.

## What follows the original board and what is this design's own

The following come from the original board:
- the architecture: UART and packet state machine, register map and bit fields,
  pattern RAM with two CS_N versions and the RAM line assignment;
- the playlist rules: waveform *n* plays up to the start of *n*+1, EPRI returns
  to waveform 1, presums and 0/pi per waveform;
- the timing: 24/16-bit timing settings, the EPRI 3 clocks before the PRF, the
  first pulse being an EPRI, the delayed IO_Update retimed to `Sync_Clk`, and
  the divide-by-two reference clock.

These are this design's own choices, where the original is silent or differs:
- **UART clock.** The UART runs on the logic clock rather than on the 100 MHz
  oscillator. This avoids a clock crossing into the register map.
- **Encodings and orders:**
  - presum field = presums − 1;
  - bit 9 carries the zero-phase CS_N and bit 10 the pi-phase one;
  - the phase order is 0 first;
  - bytes within a pattern word are little-endian;
  - SPI is sent MSB first.
- **Latencies and widths:**
  - one-clock RAM read;
  - registered pin outputs;
  - two-clock request stretch;
  - two-sample-clock trigger stretch.
- **Reset values and readback:** reset values; reads of write-only addresses
  return 0; unknown command bytes are ignored.
- **Per-waveform loading disable (0x40 bit 4).** The original lists this bit but
  had not implemented it. It is implemented here as described.
- **Temperature.** The temperature registers read an input port. The sensor
  interface was never specified, so no sensor controller is included.
- **SDIO direction.** The SDIO-direction bit only drives the output enable
  `dds_sdio_oe`. Reading back from the chips is not supported, as on the
  original.
- **Ticks.** The 50 MHz/1 MHz/1 kHz outputs are clock enables.
- **House-keeping details:** the debug LED assignment, the boot sweep length and
  the button count and debounce time.

The following have no logic in this design: the DDS chips themselves, the LVDS
clock buffer, the RS-232 level shifter, the oscillators, power supplies and
monitors, the status LEDs, the temperature sensor, EEPROM and ID chip, the
configuration PROM and the daughter-board connector. Their signals are top-level
ports.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. They check outputs
against values worked out in the testbench, including cycle counts:

| Module | What its testbench checks |
|---|---|
| UART | bit time |
| timing generator | PRF period and EPRI lead |
| IO_Update delay | exact delay |
| serializer | 16-clock byte |
| pattern playback | one word per clock, exact address ranges |
| trigger capture | 2-3 clock latency and one pulse per input |
| LED sweep | step timing |
| house-keeping | tick periods and debounce times |

`tb_dds_8ch_wfg` runs the whole chip through its pins. It:
- sends real serial packets;
- decodes the replies;
- listens to the eight SPI buses with `dds_spi_model`, a small model of the DDS
  serial port. The model decodes instruction and register bytes, buffers writes
  and copies them to the active registers on IO_Update, and clears on master
  reset.

It carries out a complete bring-up:
- register access;
- byte-bang broadcast and per-chip writes;
- master reset;
- forced update;
- a byte-bang stream;
- pattern compilation and download.

Then it runs 22 PRFs from the internal generator, 3 from the external inputs and
3 with loading disabled. On every pulse it checks, for each chip:
- that it accepted exactly the expected frames;
- the phase word for the expected 0/pi state;
- its own frequency word;
- that no transfer was cut;
- that IO_Update fired once on every chip with the right delay.

It counts each mechanism and fails if one never occurs.

That testbench uses a 16-clock bit time and a 3-clock LED step to stay short.
`tb_dds_8ch_wfg_full` is the same test with the top at its real parameters
(482 clocks per bit). It simulates about 130 ms and takes about 1.5 minutes with
Verilator.

`tb_dds_8ch_wfg_burst` runs the radar's operating case at the pins:
- a burst of one noise waveform and three beam waveforms with 1, 8, 8 and 8
  presums, 0/pi on the three beam waveforms;
- a 12.5 kHz PRF (setting 4445) and an IO Update Time of 600 clocks;
- two full EPRIs (50 pulses).

Every pulse reloads each chip with its own phase word (zero- and pi-phase
versions), ramp limits, ramp steps and a profile register. That is 533 pattern
words, about 9.6 µs. The testbench checks, for every pulse:
- the PRI;
- the EPRI lead;
- that the load ends before IO_Update;
- the IO_Update delay;
- every chip's values against the burst table.

With the update time cut to 400 clocks, shorter than the load, it reports
every cut transfer.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb --top-module tb_dds_8ch_wfg \
    rtl/wfg_pkg.sv $(ls rtl/*.sv | grep -v wfg_pkg) \
    tb/dds_spi_model.sv tb/tb_dds_8ch_wfg.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The package must come first. For a unit testbench, list `rtl/wfg_pkg.sv`, the
module's file and the testbench. `+verilator+rand+reset+2` starts all uninitialised state at random
values, which the testbenches are written to tolerate.

### Limits of what has been checked

- The DDS model knows only register lengths and the write/update behaviour. It
  does not model the AD9910's real SPI timing limits or register meanings.
  Pattern contents in the tests are arbitrary frames, not a real chirp set-up.
- The clock domains are simulated with independent clocks. In hardware,
  `Sync_Clk` is locked to `ref_clk`. The two-flop synchroniser and the stretched
  request cover either case, but the exact IO_Update edge relative to SYSCLK
  must be checked on the board (the DDS's Sync_In delay line is the adjustment).
- No FPGA timing closure has been done. The logic clock is 55.6 MHz and the
  `Sync_Clk` domain (222 MHz) holds only three flops per output.
