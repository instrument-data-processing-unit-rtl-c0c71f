# IDPU digital logic: instrument data processing for a spinning science probe

A small spinning magnetospheric probe carries several instruments: field
instruments, particle analysers and magnetometers. One box, the Instrument Data
Processing Unit (IDPU), runs them all. It sends each instrument its commands
and collects its telemetry over serial links. It stores the data in a
radiation-tolerant solid state recorder (SSR) of about 200 MB. Later it plays
the data back to the spacecraft as fixed-size transfer frames. It also keeps
time to 1/256 s, follows the spin of the probe, reads housekeeping voltages,
and switches power to the instruments, heaters and deploy actuators.

An 80C85 processor does the decisions. Two FPGAs do everything that must be
exact in time or fast:

* the **Data Controller Board (DCB)** FPGA. It holds the processor bus and
  memory map, the instrument links, the recorder controller with error
  correction, the SDRAM controller, the telemetry framer, the UART with DMA,
  the time base, spin sectoring, housekeeping ADC control and the watchdog;
* the **Power Controller Board (PCB)** FPGA. It takes commands from the DCB
  over one more instrument link and drives 28 power-switch controls.

This repository is the SystemVerilog for both FPGAs. The top module is
`idpu_top`. It is built for a single 20 MHz system clock. The processor,
memories, SDRAM chips, ADC chip, power switches and line drivers are outside
chips, so they appear as ports. The testbenches model those parts.

```
            spacecraft: 2^23 Hz clock, 1 Hz sync, sun pulse, UART, HST link
                                   |
  80C85 ── cpu_bus ── dcb_regs ────┼──── time_base, spin_sector, reset_wdog
   |  |       |                    |
  ROM EEPROM SRAM ── dma_chan x2 ── uart
                                   |
  instruments ── cdi_rx x3 ── tlm_merge ── ssr_ctrl ── sdram_ctrl ── SDRAM
  instruments ── cdi_tx x3                 (edac)  └── hst_framer ── HST link
  PCB FPGA    ── cdi_tx ── cdi_rx ── pcb_ctrl ── 28 switch controls
```

## Clocks and time

Everything runs on `clk` (20 MHz). The spacecraft sends three asynchronous
inputs:

* a 2^23 Hz clock (8.388608 MHz);
* a 1 Hz sync pulse;
* a sun pulse.

Each one passes through `edge_sync`, a two-flop synchroniser. It gives a
one-clock strobe per rising edge, 2–3 clocks after the edge. The 2^23 Hz clock
is used only as such a strobe (`cdi_tick`). No logic is clocked by it. It
times the instrument links, the time base and the spin counter.

`time_base` counts 2^23 Hz ticks in a 23-bit sub-second counter.

* In **internal mode** the counter wrapping makes the 1 Hz pulse.
* In **external mode** the spacecraft 1 Hz sync makes it, and the sub-second
  counter is cleared.

Either way the 32-bit seconds count advances and the fraction is zero at the
pulse. A seconds value written by the processor is taken at the next 1 Hz
pulse. A 256 Hz interrupt fires once per 2^15 ticks. The 1 Hz pulse also goes
to the instruments (`instr_1hz`).

## Processor bus and memory map (`cpu_bus`)

The 8085 multiplexes the low address byte with data. `cpu_bus` latches that
byte while ALE is high. It synchronises the control strobes to `clk` (an 8085
T-state is 10 clocks at 2 MHz) and decodes memory and I/O cycles.

| CPU address | after reset | after `rom_off` |
|---|---|---|
| 0x0000–0x1FFF | 8 K boot ROM (writes go to the SRAM under it) | SRAM |
| 0x2000–0x7FFF | SRAM | SRAM |
| 0x8000–0xBFFF | window 0: page register 0 | same |
| 0xC000–0xFFFF | window 1: page register 1 | same |

* The boot ROM can copy itself into the SRAM under it and then switch itself
  off with `rom_off`. That also opens the ROM power switch (`rom_pwr_en`).
* A page register is 16 bits. Bits [15:14] pick the space: SRAM, EEPROM, SSR
  or none. Bits [13:0] give a 16 K page number. So a window can reach the
  rest of the 128 K SRAM, the 128 K EEPROM or any 16 K of the recorder.
* EEPROM writes are blocked while the `eeprom_wp` control bit is set. It is
  set at reset.
* An SSR access holds the processor with READY low until the recorder
  answers.
* The SRAM is on a private bus driven by the FPGA. Two DMA channels share
  it, and the processor always goes first. A DMA access takes 2 clocks plus one
  idle clock. It waits (`dma_stall`) while a processor SRAM cycle is in
  progress.

## Register map (`dcb_regs`, constants in `idpu_pkg`)

The processor reaches the FPGA through 8085 I/O ports. Multi-byte values are
written low byte first. They take effect on their last byte or on a load
strobe. Reading seconds byte 0x20 takes a snapshot, so all time bytes read
belong to the same instant.

| port | register |
|---|---|
| 0x00 | control: [0] rom_off, [1] eeprom_wp, [2] external clock mode, [3] HST enable, [7] flush HST frame |
| 0x01 | watchdog clear (any write) |
| 0x02–0x05 | page registers 0 and 1 |
| 0x08–0x0B | CDI command: address, data high, data low, send on channel N |
| 0x0C | CDI status: busy per channel, [7] telemetry overrun |
| 0x18–0x1A | ADC control ([2:0] channel, [3] nap, [4] start), status, result |
| 0x20–0x25 | seconds, 1/256 s, load |
| 0x28–0x2C | spin period, spin phase, sun time |
| 0x30–0x33 | SSR single-/multi-bit error counters, scrub address, clear / scrub enable |
| 0x34–0x37 | SSR write pointer (writing 0x37 loads it; reads give the live pointer) |
| 0x38–0x3E | playback pointer, length, go |
| 0x3F | SSR status: [0] playback busy, [1] frame sent, [2] SDRAM ready |
| 0x40–0x44, 0x48–0x4C | command (RX) and telemetry (TX) DMA: address, length, go/status |

At reset the ROM is mapped, the EEPROM is write-protected, the clock mode is
internal, HST is off, the scrubber is off and both pages are 0.

## Instrument links (`cdi_tx`, `cdi_rx`)

Each instrument board has a Command and Data Interface (CDI). The DCB sends
the board a continuous 2^23 Hz clock, a command line and a telemetry line. A
CDI word is 24 bits: an 8-bit destination address and 16 bits of data. There
is no handshake.

The line format is this design's own:

* the line idles low;
* a word starts with a '1' marker, followed by 24 bits MSB first;
* each bit lasts 8 clock periods (`CDI_BIT_TICKS`), about 1 Mbit/s;
* a word takes (1+24)×8 ticks, about 23.8 µs.

The receiver samples in the middle of each bit. It starts a word only on a
low-to-high change. So a trailing '1' data bit cannot start a false word.

A received word waits until it is taken. If another word completes first,
the new word replaces it and `overrun` pulses. The sender cannot be held off,
so dropping the word is the only choice.

There are four transmitters. Channels 0–2 go to the instrument boards.
Channel 3 goes to the PCB FPGA. There are three telemetry receivers.

## The recorder path

This is the largest and least obvious part of the design.

### Packing telemetry (`tlm_merge`, `ssr_ctrl` write DMA)

`tlm_merge` serves the three receivers in fixed priority. It turns each word's
16 data bits into two bytes, high byte first. The CDI address is not stored.
A receiver delivers at most one word every 23.8 µs. Two bytes take well under
a microsecond to store, so the fixed priority never starves a receiver.

`ssr_ctrl` packs the bytes three to a recorder word, first byte in lane 0.
It writes each word at the write pointer `wptr`, which then increments. The
processor loads `wptr` and reads it back live.

### Words, error correction and scrubbing (`edac`)

A recorder word is 32 bits on the SDRAM: 24 data bits plus an 8-bit check
field in the top byte. So a quarter of the memory holds check bits. The code
is an extended Hamming code (SEC-DED):

* Hamming check bit *i* covers every codeword position, numbered from 1,
  whose index has bit *i* set;
* the data bits fill the positions that are not powers of two;
* one more bit is the parity of the whole codeword;
* with 24 data bits that makes 5+1 check bits; the top two bits of the
  check byte are zero.

The decoder is combinational. It reports:

* `sbe`: a single-bit error, corrected, including an error in a check bit;
* `mbe`: a double-bit error, detected but not corrected.

Every decoded read counts into two saturating 8-bit counters that the
processor can clear.

With the scrubber enabled, `ssr_ctrl` reads one word of the whole array every
`SCRUB_INTERVAL` clocks. If that word has a single-bit error, it writes the
word back corrected. The scrub address wraps at the end. Its top 8 bits are a
status register, so software can see how far the scrub has got.

### Sharing the SDRAM

Four users share the one `sdram_ctrl` port, one word at a time, in this
priority:

1. **The processor byte window** (through a page window). The byte address is
   word×4 + lane.
   * Lanes 0–2 read corrected data. A write is a read-modify-write with a new
     check byte.
   * Lane 3 reads the raw check byte and writes it without re-encoding. This
     is for diagnostics and for error injection.
2. **The telemetry write DMA.**
3. **The playback read DMA.** The processor starts it per packet with a word
   pointer and a byte length. The bytes leave as a stream with start and end
   of packet.
4. **The scrubber.**

### SDRAM controller (`sdram_ctrl`)

The SDRAM is ordinary single-data-rate SDRAM with 32-bit data, 4 banks,
8192 rows and 2048 columns: 2^26 words of 3 data bytes, about 201 MB. The
word address is {bank, row, column}. At 20 MHz one clock (50 ns) covers tRCD,
tRP, tRRD and tWR. tRC/tRFC take `RC_CYCLES`.

* **Initialisation:** 100 µs of NOP, PRECHARGE ALL, two AUTO REFRESH, and
  LOAD MODE REGISTER with burst 1 and CAS latency 2.
* **Refresh:** AUTO REFRESH every 156 clocks (7.8 µs). It takes priority over
  a waiting request.
* **Access:** each access is ACTIVE, then READ or WRITE with auto-precharge.
  Read data is taken CAS latency + 1 clocks after the READ.
* **Handshake:** the host holds `req` until a one-clock `ack`.

This is simple and slow, about 8 clocks per word. That is still far more than
the telemetry needs.

### Transfer frames (`hst_framer`)

Playback bytes go into fixed-size transfer frames (`FRAME_BYTES` = 1024). Two
data buffers alternate: one fills while the other is sent. When both are full,
the playback stream stalls.

The frame header follows the CCSDS telemetry frame in spirit:

* a 6-byte primary header: version, spacecraft ID, virtual channel, master
  and virtual channel frame counts, and the first-header pointer. That pointer
  is the offset of the first packet start in the frame, or 0x7FF if no packet
  starts in it;
* a 5-byte secondary header carrying the 32-bit seconds at which the frame was
  closed.

The frame has no sync marker or Reed-Solomon code. The spacecraft's bus
avionics unit adds those. A flush (control bit 7) pads the frame being filled
and closes it.

When the link is enabled and the spacecraft raises `bau_hst_ready`, the whole
frame is shifted out MSB first at 2 MHz (`HST_BIT_DIV` = 10). There is one
`hst_clk` pulse per bit. Data changes while the clock is low.

## UART and DMA (`uart`, `dma_chan`)

Commands from the spacecraft arrive, and low-rate telemetry leaves, over a
38.4 kbaud UART. The frame is 8N1. One bit is 521 clocks, 0.03 % fast. The
receiver samples mid-bit and flags a missing stop bit.

Two `dma_chan` instances move the bytes between the UART and SRAM:

* RX: UART to memory;
* TX: memory to UART.

The processor gives each one an SRAM address, a length (1–256, 0 means 256)
and a go strobe. The status shows busy until the last byte is done.

## Spin sectoring (`spin_sector`)

A programmable divider makes pulses from the 2^23 Hz ticks, dividing by
`period`+1. Those pulses clock a 14-bit spin counter:

* its top 5 bits give 32 `spin_sector_pulse`s per spin;
* its wrap gives one `spin_synch_pulse` per spin.

At each sun pulse the circuit captures the counter (the spin phase) and a
16-bit time. Software closes a phase-locked loop by reprogramming `period`, so
that the counter wraps once per spin. For a 3 s spin the period is about 1536
ticks.

## Housekeeping ADC (`hk_adc_ctrl`)

The processor picks one of 8 analog mux channels. It waits for the mux and
filter to settle, then starts a conversion. The ADC stays in nap (power-down)
until it is woken, and it is in nap at reset.

The converter is taken as a 12-bit serial ADC read in a 16-clock frame: four
leading zeros, then 12 bits MSB first. `sclk` is 1 MHz. A conversion takes
16×2×`SCLK_DIV`+2 clocks.

## Reset and watchdog (`reset_wdog`)

The system reset is the OR of two sources:

* the external power-on reset `por_n`;
* a watchdog that fires if the processor has not written the watchdog clear
  port for 3 s (60 M clocks).

The watchdog pulse lasts 16 clocks. A jumper input `wd_disable` turns the
watchdog off. Reset is asserted asynchronously and released two clocks after
both sources end.

## Power controller (`pcb_ctrl`)

The PCB FPGA receives 16-bit CDI command words on its own link. It drives 28
switch controls:

* 9 instrument services;
* 5 heater services;
* 14 actuator services: attenuators, covers, doors and booms.

Its register map:

| CDI address | register |
|---|---|
| 0x00, 0x01 | switch enables [15:0], [27:16] |
| 0x02, 0x03 | clear trips [15:0], [27:16] |
| 0x04 | housekeeping mux address |

The current limiters latch. An over-current input (`pcb_oc`) turns its service
off until the DCB clears the trip. Actuator services also need the separate
arm plug (`pcb_act_plug`). At power-on every service is off. That is also
the Safe Mode state.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The testbenches use these behavioural models:

* `i8085_bus`: 8085 bus cycles;
* `sdram_model`: a sparse SDRAM with command checks;
* `adc_model`: the serial ADC.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb \
    rtl/idpu_pkg.sv tb/tb_idpu_top.sv --top-module tb_idpu_top
obj_dir/Vtb_idpu_top
```

Use the same command for any `tb_<block>` or for `tb_idpu_full`. The
testbenches carry no `` `timescale ``, so they need `--timescale 1ns/1ps`.
The spacecraft clock is generated with a 59.605 ns half period. A coarser time
precision changes its frequency, and the timing checks then fail. The
simulations are 2-state, and everything that is read is reset.

* **`tb_idpu_top`** runs the whole design end to end at reduced sizes: a
  4 kHz time base, 64-byte frames and a fast UART. It counts 24 mechanisms and
  fails if any never happened. Among them:
  * SDRAM init and refresh;
  * ROM boot and switch-off;
  * paged SRAM, EEPROM and SSR access;
  * EEPROM write protection;
  * CDI commands and telemetry;
  * EDAC correction, error counting and the scrubber;
  * playback, frames and frame stalls;
  * both UART DMA directions;
  * both time modes;
  * spin pulses;
  * the ADC;
  * PCB switching and trips;
  * the watchdog.
* **`tb_idpu_full`** uses every default. It simulates 5 s of operation in
  about two minutes. It checks:
  * 1024-byte frames at 10 clocks per bit;
  * 5210 clocks per UART byte;
  * 256 interrupts and 2^23 ticks per internal second;
  * all three telemetry links sending back to back at once, with the
    scrubber running. Every word must be stored, in order, with no overrun.
    The stored data rate is about 1.8 Mbit/s, which must exceed the 630 kbit/s
    the recorder is specified for;
  * the sector period;
  * the 3 s watchdog.

## What follows the source description, and what is this design's own

The description this RTL follows gives what each function does, not how it is
built. These numbers come from it:

* the 20 MHz clock and the 2^23 Hz probe clock;
* 24-bit CDI words at about 1 Mbit/s;
* 38.4 kbaud UART and 2 MHz HST;
* the 8085 memory map: 8 K ROM, 128 K SRAM and EEPROM, two paged windows and
  EEPROM write protection;
* the 3 s watchdog with a disable jumper;
* the 1/256 s time with internal and external modes;
* the 14-bit spin counter with 32 sectors;
* 8-bit error counters and scrub-address status;
* about 200 MB of SSR with automatic single-bit correction;
* 8 ADC channels with nap mode;
* the 28 power services with latching limiters and an actuator plug.

These are this design's own choices:

* all register maps and bit fields;
* the CDI line format;
* the EDAC code;
* the SDRAM geometry and timing;
* the frame header layout and size;
* the DMA programming model;
* arbitration priorities.

Known departures:

* **Spin count.** The hardware is described with a 14-bit spin counter. A
  software passage speaks of 2^16 pulses per spin. The 14-bit counter is
  built, so software sees 2^14 counts per spin.
* **Packet formatting.** The packet (CCSDS) formatting and compression are
  software and are not here. The framer only packs bytes it is given.
* **Not built.** The instrument boards' own FPGAs, the analog housekeeping
  muxes on other boards, the power converters and the current-sense
  electronics are outside this RTL. The PCB logic only takes their
  over-current and mux signals as ports.
* **Check-bit placement.** The source reserves the upper quarter of the SDRAM
  for check bits and scrubs the lower 200 MB. Here each 32-bit word carries
  its own check byte in its top 8 bits, so the scrubber walks every word. The
  ratio of data to check bits is the same.
* **Debug interface.** The test-time debug port for diagnostic peripherals on
  the processor bus is not built.
* **Unused outputs.** Some status outputs of sub-blocks are not connected in
  `idpu_top`. Examples are the ADC done strobe (software polls the busy bit)
  and the 14-bit spin count captured at the sun pulse. Software reads the sun
  time and the current 8-bit phase instead. Verilator reports these as unused.
