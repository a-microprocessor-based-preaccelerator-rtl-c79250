# Preaccelerator control system: timing link, card file and serial links in SystemVerilog

A test stand for an ion-source preaccelerator has equipment in two places. Some of
it sits at ground potential (the operator's console and the beam transport line) and
some in a terminal held at high voltage (the ion-source electronics). No copper can
join the two places. The control system therefore uses two small microprocessor card
files, one at each place, joined only by optical fibers:

* a **timing link**: a 500 kHz pulse train from the ground side, with pulses left
  out on purpose to carry events;
* a **data link** in each direction: bytes sent serially by an ACIA (asynchronous
  communication interface adapter).

Each card file is a backplane of memory-mapped cards. These are PROM/RAM, PIAs
(programmable parallel ports), dual 12-bit D/A cards, relay I/O cards, dual 16-bit
delay timers and an ACIA. The CPU reaches every card register as a memory address.
Each chassis also has a front panel with switches, a hex display, LEDs and buttons.
The software reads and drives the panel through the same bus.

This RTL models the digital hardware of both stations and of the timing system. The
CPUs, the A/D converters, the PLL oscillators, the fiber transmitters and receivers,
the operator's display and keyboard, and the panels' manual memory examine/load are
not built. Their electrical signals are
ports of the top module.

## The timing train and its gaps

This is the least obvious part of the design.

`timing_transmitter` runs on a 1 MHz crystal clock. A divide-by-2 makes a 500 kHz
train, and each pulse is the high half of a 2 µs period. Two events are coded by
removing whole pulses:

| event | how it is made | pulses removed | low time seen on the line |
|---|---|---|---|
| beam cycle (15 Hz) | every 4th 60 Hz zero crossing (`LINE_DIV` = 4) | 1 | 5 µs instead of 1 µs |
| dome CPU reset | rising edge of `reset_req` | 4 | 11 µs |

The generator is synchronous. A gap starts only on a period boundary, and at least
one pulse always separates two gaps. When both requests are pending, the 4-gap goes
first and the 1-gap follows.

Each station has an identical `clock_receiver`, which runs on the 10 MHz output of
that station's ×20 PLL. The PLL is analog and is outside the RTL. The receiver
contains:

* **the ÷20 scaler** (`pulse_divider`, N = 20). In hardware it sits inside the PLL
  loop. Its square wave goes back to the PLL's phase detector (`div20_fb`). The
  same signal is an *ungapped* 500 kHz that clocks the ACIAs. Because the real
  loop's lock is not modelled, the scaler is re-phased at every received rising
  edge. During a gap it keeps running on its own, so its output has no gaps.
* **the gap detector**, which counts 10 MHz clocks between received rising edges and
  rounds to whole 2 µs periods. An interval of 2 periods means one pulse was missing
  and gives `one_gap`. An interval of 5 periods gives `four_gap`. Any other interval
  is ignored. Each flag is one clock long and comes in the clock after the edge that
  ends the gap.

What the events do:

* `one_gap` starts every delay timer whose start source is "external".
* At the ground station, `one_gap` also sets the 15 Hz interrupt latch, which drives
  the software's main loop.
* At the dome, `four_gap` becomes `dome_cpu_reset`, a one-clock pulse for the dome
  CPU.

## The serial data links

`acia` works in the divide-by-1 clock mode. Both ends take their bit clock from the
same timing train, which makes 500 kbit/s possible without oversampling. The
transmitter changes the line at the falling edge of the ungapped 500 kHz
(`bit_fall`). The receiver samples at the rising edge (`bit_rise`), which is
mid-bit.

Character format: start bit, 8 data bits with the LSB first, parity (even, or odd
when selected), stop bit. That is 11 bits, or 22 µs per byte.

The receiver checks for three errors:

* **framing error** (FE): the stop bit is 0;
* **parity error** (PE);
* **overrun** (OVRN): a byte completes while the previous one is still unread. The
  new byte is lost, and the old byte is kept.

Registers follow the usual 6850 layout:

| RS (addr[0]) | read | write |
|---|---|---|
| 0 | status: bit0 RDRF, bit1 TDRE, bit4 FE, bit5 OVRN, bit6 PE, bit7 IRQ | control: `11` in bits 1:0 = master reset, bit2 odd parity, bit7 receive-interrupt enable |
| 1 | received byte (clears RDRF and OVRN) | byte to send |

The station software sends records over these links. A record is a header byte, a
word count, the 16-bit words, a checksum byte and a zero byte. The dome's data pool
is 26 words (in the test program: 8 D/A settings, 3 relay words, 14 A/D readings and the front-panel
raise/lower request), which makes a 56-byte record. On the link that takes 56 × 22 µs =
1.232 ms. The end-to-end testbench measures exactly that. The record format belongs
to the software, not to the hardware.

## The card file

The bus is `pac_pkg::bus_req_t`: `vma`, `rw` (1 = read), a 16-bit `addr` and `wdata`.
A bus cycle lasts one station clock with `vma` high. The selected card returns its
byte combinationally on `rdata`. Writes, and read side effects such as clearing a
flag, take effect at the clock edge that ends the cycle. `station_bus` decodes the
address and selects the read data:

| address | contents |
|---|---|
| 0000 – 03FF | RAM (`memory_card`) |
| 8000 + 16·s | I/O slot s, s = 0..15 (slots 8–15 are the expansion crate at the dome) |
| 8100 | station control register: bit0 beam-cycle / 15 Hz latch (write 1 to clear), bit1 a 4-gap was seen |
| top of memory | PROM: E000–FFFF (8K) at the ground station, FC00–FFFF (1K) at the dome |

The PROMs read FF (erased) unless `ROM_FILE` names a hex image. The station program
is not part of this design.

**Dome (`dome_station`)**

| slot | card | outputs |
|---|---|---|
| 0 | PIA | A/D control and readout, spare I/O |
| 1 | dual D/A | arc modulator voltage, extractor voltage |
| 2 | dual D/A | filament current, magnet current |
| 3 | dual D/A | negative cup bias, positive cup bias |
| 4 | dual D/A | Pd leak current, spare |
| 5 | ACIA | data links |
| 8 | relay I/O | power-supply on/off control |
| 9 | relay I/O | power-supply status |
| 10 | relay I/O | over/under-current status |
| 11 | dual timer | cup on, cup pulse width |
| 12 | dual timer | arc sample time, arc current on |
| 15 | front panel | hex display, switches, raise/lower buttons |

The dome station has no interrupt output, because the dome software polls.

**Ground (`ground_station`)**

| slot | card |
|---|---|
| 0 | binary interface card: four PIAs (`binary_io_card`). PIA 3 port A reads the knob counter (`encoder_counter`). |
| 1 | ACIA |
| 2–3 | dual D/A for the beam transport |
| 4 | dual timer |
| 15 | front panel (its interrupt latch asks for a manual store) |

`irq` is the OR of the 15 Hz latch, the PIA interrupts and the ACIA interrupt.

### Card registers

**`dual_dac_card`**

* Registers: +0/+1 are channel A high/low, and +2/+3 are channel B.
* Words use the analog format of the system: a left-adjusted signed fraction of
  10 V. The 12-bit code is word bits 15:4, so 0x800 = −10 V.
* A high-byte write is buffered. The converter takes the whole word on the low-byte
  write.
* Reset clears the settings to 0 V.

**`relay_io_card`**

* +0 is the relay latch, which reads back.
* +1 reads the status contacts, after two synchroniser flops.

**`dual_timer_card`**

Channel A is at +0 and channel B at +8. Each channel has these registers:

| offset | register |
|---|---|
| +0 / +1 | preset, high byte / low byte |
| +2 | control: bit0 clock (0 = 1 MHz CPU clock, 1 = 10 MHz external); bits 2:1 start source (0 = external beam-cycle pulse, 1 = CPU only, 2 = the other channel's output) |
| +3 | write to start the channel from the CPU |
| +4 | status: bit0 done, bit1 running. Reading clears done. |
| +5 / +6 | count, high byte / low byte |

How a channel runs (`preset_timer`):

* A start clears the count and starts it running.
* On the count that equals the preset, the channel gives a one-clock pulse and stops.
* The delay is therefore `preset` counts. On the 10 MHz base that gives up to
  65535 × 100 ns = 6.55 ms.
* Chaining channel B to channel A gives a second trigger a set time after the first.

**`pia`**

* Ports A and B each have an output register, a direction register and a control
  register.
* Register select: 0 = A data (or DDRA when CRA bit2 = 0), 1 = CRA, 2 = B data (or
  DDRB), 3 = CRB.
* Control register bits: 0 = C1 interrupt enable, 1 = C1 active edge, 3 = C2 enable
  or output level, 4 = C2 active edge, 5 = C2 is an output. Bits 7 and 6 are the C1
  and C2 flags. Reading the data register clears them.
* The 6821's C2 handshake and pulse modes are not provided.

**`front_panel`**

The dome's operator uses the panel for local adjustment. The data switches hold a
channel number (high byte) and an increment (low byte). The raise or lower button
says which way to apply it. The dome software puts that request into the data
pool, and the ground station answers with a setting record. The ground station
therefore always knows every setting. At the ground station, a button sets the
interrupt latch. The software then writes the data-switch word to the address on
the address switches, or sends it to the dome when a toggle switch says the
address is there.

| offset | read | write |
|---|---|---|
| +0 / +1 | address switches, high / low byte | – |
| +2 / +3 | data switches, high / low byte | – |
| +4 | toggle switches | – |
| +5 | bit0 raise, bit1 lower (level) | – |
| +6 | bit0 interrupt latch, set by a rising edge of the button | 1 in bit0 clears it |
| +8 / +9 | hex display word | hex display word |
| +A | LEDs | LEDs |

All switch and button inputs pass two synchroniser flops. The latch has no interrupt
line of its own; the software reads it during its 15 Hz work.

**`encoder_counter`**

* Counts once per quadrature cycle, on the rising edge of A: up when B is low, down
  when B is high.
* The count wraps modulo 256. The software uses differences between readings.

## Clocks, reset and timing

* `preaccelerator_top` has three clocks: `clk_1mhz` for the transmitter, and
  `clk_gnd` and `clk_dome`, the two 10 MHz PLL outputs.
* All station logic runs on the station's 10 MHz clock, using clock enables.
  * The ACIA bit clock is made from the ÷20 strobes.
  * The "1 MHz CPU clock" that a timer may count is a ÷10 of the station clock.
  * CPU bus cycles are one station clock long.
* `rst_n` is an active-low power-on reset. It is registered into each clock domain
  and all resets are synchronous.
* Asynchronous inputs pass two-flop synchronisers before they are used: the
  received timing train, serial data, PIA control lines, relay contacts, encoder
  phases, front-panel switches, the zero-crossing pulse and the reset request.

## Where this design departs from, or adds to, the original system

The following are choices made here because the original description does not give
them:

* the address map, except the ground PROM range;
* every register layout;
* the character format;
* the gap-detection method;
* the number of D/A cards and RAM size at the ground station;
* relay card width;
* the encoder decoding;
* the ordering of simultaneous gap requests;
* the front-panel register layout, its slot and the number of toggle switches and
  LEDs.

The ACIA and PIA are functional equivalents of the 6850 and 6821, reduced to what
this system uses. The ACIA receiver also checks parity.

These parts are not built: the PLL loop filter and VCO, the line zero-crossing
comparator, the A/D converter, the isolation amplifiers, the fiber optics, the
crate controllers and expansion bus drivers, the front panels' manual memory
examine/load (which would take the bus from the CPU), the Self Scan display and
keyboard, and the CPUs.

## Files and simulation

| file | role |
|---|---|
| `rtl/pac_pkg.sv` | bus struct, shared constants |
| `rtl/preaccelerator_top.sv` | whole system |
| `rtl/ground_station.sv`, `rtl/dome_station.sv` | the two card files |
| `rtl/station_bus.sv`, `rtl/memory_card.sv` | decoder/read mux, PROM/RAM |
| `rtl/front_panel.sv` | chassis front panel |
| `rtl/timing_transmitter.sv`, `rtl/clock_receiver.sv`, `rtl/gap_detector.sv`, `rtl/pulse_divider.sv` | timing system |
| `rtl/acia.sv`, `rtl/pia.sv`, `rtl/binary_io_card.sv`, `rtl/encoder_counter.sv` | serial and parallel I/O |
| `rtl/dual_dac_card.sv`, `rtl/relay_io_card.sv`, `rtl/dual_timer_card.sv`, `rtl/preset_timer.sv` | output cards and timers |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_train_gen.sv`, `tb/prom_test.hex` | testbench helpers |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To run
one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_acia \
    -y rtl -y tb +libext+.sv rtl/pac_pkg.sv tb/tb_acia.sv -o sim && ./obj_dir/sim
```

Run it from the folder that holds `rtl/` and `tb/`, because `tb_memory_card` reads
`tb/prom_test.hex` by a relative path.

`tb_preaccelerator_top` runs the whole system at its default sizes for about
118 ms of simulated time, which takes a few seconds. In that time it:

* runs two 15 Hz beam cycles;
* exchanges two data pools and two D/A settings between the stations;
* raises a dome D/A channel from the dome front panel, through the data pool and a
  setting record sent back by the ground station;
* stores words from the ground front-panel switches into a ground D/A card and,
  through a store record on the link, into a dome D/A card;
* causes an overrun and a framing error on the dome's ACIA;
* fires timers started by the beam cycle, by the other channel and by the CPU;
* resets the dome CPU through the 4-gap.

It counts each of these events and fails if any of them never happens.
