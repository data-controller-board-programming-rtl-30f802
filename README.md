# Data controller board: memory and I/O decode

The data controller board of this instrument is built around an 8085
processor. The processor sees a 64K memory space and a 256-port I/O space. The
board's bus controller logic turns those accesses into:

- chip selects for the program ROM and the working RAM;
- reads and writes of the board's own registers (bus controller, packet
  formatter, packet formatter memory test port);
- 16-bit accesses on the IDPU backplane, which connects up to nine detector
  interface cards (DIFs) and two other subsystems.

This repository is synthesizable SystemVerilog for that logic and for the
register side of the detector interface cards. It follows the board's register
maps bit for bit. Where the maps say what a register does but not how, the RTL
uses the simplest circuit that does it. Those choices are listed in
[Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## Memory map

| Address       | Reads                                 | Writes |
|---------------|---------------------------------------|--------|
| 0000-1FFF     | ROM while the ROM is powered, else RAM | RAM    |
| 2000-7FFF     | RAM                                   | RAM    |
| 8000-FFFF     | RAM (second copy of 0000-7FFF)        | RAM    |

The 32K RAM appears twice in the 64K space: its address is `la[14:0]`. The 8K
ROM appears only once and does not wrap into 8000-9FFF. At reset the ROM is
powered and the processor boots from it. All writes go to RAM, so the program
can copy itself into the RAM under the ROM. It then clears bit 0 of port B0,
which removes the ROM's power (`rom_pwr`), and from then on reads of 0000-1FFF
come from RAM. While the ROM is on, the RAM under it can still be read at
8000-9FFF.

`bcf_decode` captures the multiplexed low address byte while ALE is high. It
forms `la = {A[15:8], latched AD[7:0]}` and drives `rom_cs_n` and `ram_cs_n`
combinationally for the length of the strobe.

## I/O space

The upper nibble of the port address selects a subsystem:

| Nibble | Subsystem                              | Where in this RTL |
|--------|----------------------------------------|-------------------|
| 0-8    | detector interface card with that id   | `dif_card` (backplane) |
| 9      | aspect data processor                  | outside (backplane, `ext_rdata`) |
| A      | power controller                       | outside (backplane, `ext_rdata`) |
| B      | bus controller registers               | `bcf_regs`, `idpu_bridge` (B2) |
| C      | packet formatter registers             | `pff_regs` |
| D      | DMA controller (82C37)                 | outside (`dma_cs_n`) |
| E      | packet formatter memory test mode      | `pff_test_port` |
| F      | backplane broadcast                    | all cards (write only) |

Each I/O cycle becomes an `io_req_t` (see `dcb_pkg`) with these fields:

- `addr`: the port address.
- `wdata`: the write byte.
- `wr`, `rd`: one-clock strobes in the first clock in which WR_n or RD_n is
  seen low.

Every register block decodes the nibble itself. Writes take effect at the end
of that clock. Read data is combinational from the port address. Each block
returns zero when it is not addressed, so the top ORs all the read data.
`ad_oe` tells the board to drive AD[7:0] during I/O reads. It stays low for
nibble D, because the DMA controller drives its own data.

## 16-bit backplane registers through an 8-bit processor

The detector interface card registers are 16 bits wide, but the processor
moves one byte per cycle. Port B2, the bus extension register, bridges the gap
(`idpu_bridge`):

- **Write a 16-bit register:** first write the upper byte to B2, then write the
  lower byte to the card's port. That second cycle becomes one backplane write
  of `{B2 byte, processor byte}`. The B2 byte stays set, so several writes with
  the same upper byte need only one B2 write.
- **Read a 16-bit register:** read the card's port, which returns the lower
  byte. In the same cycle the upper byte is captured, and the next read of B2
  returns it.

The written byte and the captured byte are kept apart. Writing B2 does not
change what B2 reads back, and a backplane read does not change the upper byte
of the next write. Broadcast writes (nibble F) reach every card. The only
broadcast register is F0, the analog multiplexer select. The card whose id
matches data bits 7:4 turns on AMUXENB1 or AMUXENB0 (data bit 3) with mux
address bits 2:0. Every other card turns both enables off, so at most one card
drives the analog line to the housekeeping ADC.

## Bus controller registers (B0-BA, `bcf_regs`)

| Port | Read                          | Write |
|------|-------------------------------|-------|
| B0   | particle detector counter A   | bit 0: ROM on (1 at reset) |
| B1   | particle detector counter B   | bit 0 fast rate enable, bit 1 monitor rate enable, bit 2 uplink enable, bit 3 disable overcurrent shutdown |
| B2   | upper byte of last backplane read | upper byte of next backplane write |
| B3   | 0                             | any write touches the watchdog |
| B4   | ADC data 7:0                  | bit 0: ADC run (0 = nap) |
| B5   | ADC data 15:8                 | any write pulses ADC start of conversion |
| B6   | 0                             | byte to the particle detector DAC |
| B7   | 0                             | diagnostic byte (kept for telemetry, strobed to the debug latch) |
| B8   | status                        | bit 0 clear uplink parity error, bit 1 clear ADC overcurrent |
| B9   | 0                             | transfer request mask, ETR[7:0] |
| BA   | 0                             | bit 0 mask ETR8, bit 1 mask the ADP request |

Status byte, bit 7 to bit 0:

- bit 7: ROM on.
- bit 6: uplink enable.
- bit 5: monitor rate enable.
- bit 4: fast rate enable.
- bit 3: overcurrent shutdown disable.
- bit 2: ADC overcurrent input, unlatched.
- bit 1: ADC overcurrent, latched.
- bit 0: uplink parity error.

ADCSHUTDOWN is the latched overcurrent unless B1 bit 3 disables it. The
transfer request outputs are the requests AND NOT the mask bits.

The particle detector counters count for 1/8 s, and the count of the previous
eighth is read as one compressed byte (see below). The watchdog (`bcf_watchdog`)
pulses `wdt_rst` for 16 clocks when TIMEOUT_CYCLES clocks pass without a write
to B3. The default is one second.

## Packet formatter (C0-CF, E8-ED)

`pff_regs` holds the packet formatter's registers:

- C0: control. Bit 0 memory test mode, bit 1 memory bank, bit 2 telemetry
  inhibit, bits 6:4 timer rate, bit 7 internal timer.
- C1: latched interrupt flags (timer, one second, DMA end of process), plus the
  RRECRDYF and SAFE inputs. Writing C1 clears the flags.
- C2: eight packet collection error flags, cleared together by C1 bit 7.
- C4-C7: the 32-bit seconds register.
- C8-CD: six telemetry header bytes.
- CE-CF: subseconds bits 19:4.

Its time base (`pff_timebase`) has two sources. By default the 1 MHz and 1 Hz
signals come from the spacecraft; they are synchronised and edge-detected.
With C0 bit 7 set, the board makes them itself: a prescaler divides the board
clock to 1 MHz, and a second ends after 1,000,000 microseconds. Time is kept in
three counters:

- The subseconds counter counts microseconds and clears at each second.
- The seconds register counts seconds and can be written byte by byte.
- The timer interrupt fires every `125000 >> n` microseconds, for n = C0[6:4].
  That gives 8, 16, ... 1024 Hz; because the periods are whole microseconds,
  the top rates are within 0.05 % of nominal.

The packet formatter memory (`pf_memory`, 32K x 16) is normally owned by the
packet formatter's own port `pfw_*`. In test mode it belongs to the processor
through `pff_test_port`:

1. Write the word's address: bits 7:0 to EA, bits 13:8 to EB. C0 bit 1 supplies
   address bit 14.
2. Write the data: low byte to E8, high byte to E9.
3. Write ED to store the word.
4. To read a word, read any of E8-EB. That returns the low byte of the word at
   the test address and captures the high byte, which the next read of EC-EF
   returns.

The memory is read continuously at the test address, so the data is ready one
clock after the address registers change.

## Detector interface cards (`dif_card`)

Each card answers at X0-XF, X being its id:

| Port | Read (16 bits)                               | Write |
|------|----------------------------------------------|-------|
| X0   | event word 31:16                              | general: spare output, AFE power, test pulser power, enable overcurrent shutdown |
| X1   | event word 15:0 (releases the event)          | global: event request enable, pulser enable, test mode (2 bits), test energy (4 bits) |
| X2   | fast rate word 0                              | front detector enables (6 bits) |
| X3   | fast rate word 1 (0 on cards 0-2)             | front decimation count and energy |
| X4   | front preamp reset, front slow valid          | rear detector enables |
| X5   | front slow over ULD, front fast valid         | rear decimation count and energy |
| X6   | front live time MSBs, rear preamp reset       | - |
| X7   | rear slow valid, rear slow over ULD           | bit 0: clear latched overcurrent |
| X8   | rear fast valid, rear live time MSBs          | pulser rate (0-10) |
| XC   | status                                       | DAC programming word |

Status word, bit 15 down to bit 0:

- bits 15:8: the global register.
- bit 7: rear event enable.
- bit 6: front event enable.
- bit 5: test pulser power.
- bit 4: AFE shutdown line 1.
- bit 3: AFE shutdown line 0.
- bit 2: overcurrent, latched.
- bit 1: overcurrent shutdown enable.
- bit 0: AFE power.

**Counters and compression.** `dif_counters` holds ten counters. Their widths
are 8 to 20 bits, and they are latched once per second. Each one is read as a
byte. Event counters use a quasi-logarithmic code (`dcb_pkg::compress8`),
which the bus controller's particle detector counters also use:

- A value below 16 is sent as is.
- Above that, the byte is `{E, M}`, with E from 1 to 15 and M the four bits
  below the leading one. The count is about `(16 + M) << (E - 1)`.
- The code keeps about 6 % precision.
- Counts of 2^19 and above read FF.

The live-time counters count microseconds in which the channel was live, and
are read as their top 8 bits (1,000,000 reads 244).

**Overcurrent.** Either AFE shutdown input sets a latch, which the X7 pulse
clears. If X0 bit 3 (enable overcurrent shutdown) is set, a latched
overcurrent turns the AFE power output off until the latch is cleared.

**Test pulser and event strobe** (`dif_pulser`). With the pulser enabled, rate
n gives a pulse every `1000000 >> n` microseconds (1 Hz to about 1 kHz). The
test mode field picks the event strobe:

- 00: the detector's own strobe.
- 01: the 1 MHz tick.
- 10: every 16th tick (62.5 kHz).
- 11: the pulser.

**DAC programming** (`dif_dac_seq`). A write to XC latches bits 11:0 as the
DAC data word and bit 14 as SELA. Both hold until the next write. Bits 12, 13
and 15 choose which active-low strobes follow:

- bit 12: data strobe 0.
- bit 13: data strobe 1.
- bit 15: the pulser DAC write.

After one set-up clock the chosen strobes go low together for `STROBE_CYCLES`
clocks (300 ns at 10 MHz).

## Clocking and timing

Everything runs on one board clock, `clk`, with an asynchronous active-low
reset `rst_n`. The defaults assume a 10 MHz clock: `CLK_PER_US = 10` and
`STROBE_CYCLES = 3`. For another clock, set both. The 8085 strobes are sampled
on `clk`, so ALE, RD_n and WR_n must each last at least one clock. Pulse
outputs (`adc_soc`, `pd_dac_wr`, `diag_stb`, `wdt_touch`, and the memory test
write) are one clock long and come one clock after the write strobe.

## Where this RTL makes its own choices

The register maps define the bits. The following points are this design's own
choices, made where the specification says nothing or is ambiguous:

- The board clock frequency (10 MHz) and the synchronous sampling of the 8085
  bus.
- The count compression law and counter saturation. The 16-bit width of the
  particle detector counters. Live time counted in microseconds.
- The watchdog timeout (1 s), its 16-clock reset pulse, and its repeat when
  left untouched.
- Which I/O nibbles are on the backplane (0-A, F). A simple strobe protocol
  for the backplane.
- Separate bytes for B2 reads and writes.
- Timer interrupt periods as whole microseconds (`125000 >> n`).
- The 8 Hz latch tick restarted at each second.
- Pulser rates 2^n Hz. The specification only says "11 rates from 1 Hz to
  1 kHz".
- One set-up clock before the DAC strobes; writes during a running sequence
  are ignored.
- Cards not selected by F0 turn their mux enables off. An enabled overcurrent
  shutdown removes AFE power.
- The X1 read releases the event. The event request is "event waiting AND
  event request enable".
- The captured upper memory byte is readable at any of EC-EF. The
  specification names both ED and "EC-EF".
- Undefined ports read zero. When a flag is set and cleared in the same clock,
  the set wins.

## What is outside this RTL

These parts connect through top-level ports:

- The 8085 itself, the ROM and RAM chips, and the 82C37 DMA controller.
- The aspect data processor and the power controller.
- The ADC and the DACs.
- The packet formatter's packet collection and telemetry readout. Its error
  pulses and memory port are ports.
- The cards' event detection, decimation and fast rate formatting. Their event
  words, fast rate words and event strobes are ports.

The collect-time clock that latches the fast rate words is an input
(`collect_tick`).

## Files

`rtl/`:

| Module | Role |
|--------|------|
| `dcb_pkg` | shared types (`io_req_t`, `idpu_req_t`), nibble constants, `compress8` |
| `dcb_top` | the board: everything below plus nine `dif_card`s |
| `bcf_decode` | address latch, memory and I/O decode |
| `bcf_regs` | bus controller registers B0-BA (except B2) |
| `bcf_watchdog` | watchdog timer |
| `idpu_bridge` | 8-to-16-bit backplane bridge, bus extension register B2 |
| `rate_counter` | latched, saturating counter with byte readout |
| `pff_regs` | packet formatter registers C0-CF (contains `pff_timebase`) |
| `pff_timebase` | seconds, subseconds, timer and 8 Hz ticks |
| `pff_test_port` | memory test registers E8-ED |
| `pf_memory` | 32K x 16 single-port RAM |
| `dif_card` | one detector interface card |
| `dif_regs` | card register file |
| `dif_counters` | the card's ten counters |
| `dif_pulser` | test pulser, event strobe selection |
| `dif_dac_seq` | DAC word latch and strobe sequencer |

`tb/` has one self-checking testbench per module, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`. `tb/cpu8085_model.sv` is a
testbench-only bus model of the processor.

There are two board-level testbenches:

- `tb_dcb_top` runs the whole board at a shortened second (a 1024-microsecond
  second). It drives only processor bus cycles and the board's external inputs.
  It checks every mechanism listed above, from the ROM power switch to the AFE
  overcurrent cut, and fails if any of them never occurs.
- `tb_dcb_top_full` uses the default parameters and runs one full second: ten
  million clocks at 10 MHz. It checks the second's length, the latched card
  counters, a DAC sequence and a test-mode memory word.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/dcb_pkg.sv tb/tb_dcb_top.sv --top-module tb_dcb_top -o sim
./obj_dir/sim
```

`-Wno-fatal` is needed because the testbenches' check task takes 64-bit
arguments, and Verilator warns about every narrower value passed to it.
`--assert` turns on the bus-rule assertions:

- `bcf_decode` checks that RD_n and WR_n are never low together.
- `bcf_decode` also checks that the ROM and RAM are never selected at once.
- `dcb_top` checks that at most one analog mux enable is on.

To run any other testbench, replace `tb_dcb_top` with its name. The package
file must come first. Every testbench finishes in seconds. The full-size one
takes about 15 s.

Verilator has only two logic states, so the testbenches reset every register
they read. Their pulse counters ignore the clocks while reset is held. The
memory contents are the only state not reset.

To lint a module on its own:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/dcb_pkg.sv rtl/dcb_top.sv --top-module dcb_top
```

Lint gives only warnings:

- empty connections for counter outputs that are not needed;
- signals and package constants that a given module does not use;
- SYNCASYNCNET, because the assertions sample `rst_n` on the clock for their
  `disable iff` while the flip-flops use it as an asynchronous reset.
