# CUS card logic: a PC-controlled analog/digital I/O system

A personal computer drives a box of measurement and control hardware through
its 16-bit I/O slot: an eight-input 12-bit analog-to-digital converter, two
12-bit digital-to-analog converters, three 8-bit parallel ports and three 8-bit
counters used as serial ports. Everything is reached through the PC I/O
addresses 300H-31FH, a window the IBM PC architecture leaves free for add-on
hardware. Any language that can issue I/O reads and writes can run the whole
box. No driver is needed.

In the original system, two pieces of glue logic sit between the PC and those
chips:

* a **slot buffer card** in the PC. It decodes the address window, buffers the
  address, data, strobe and interrupt lines, and collects bytes or serial bits
  into 16-bit words. The PC can then fetch a word in one access.
* **two GAL16V8 programmable logic devices** in the I/O box. They turn PC
  cycles into chip selects and the control sequences the converters need.

This repository gives that glue logic as synthesizable SystemVerilog. The
converters, the multiplexer, the port chips and the analog circuitry are
bought-in parts. They stay outside the RTL, and their pins are ports of the
top module `cus_top`.

```
 PC slot                     cus_top                                  I/O box chips
 A9..A0, IORD, IOWR ──► pcsb_addr_decoder ─ range_sel[3:0] ─┬─► gal_port_ctrl ──► 8255 / 8253 CS, RD, WR
 D15..D0 ◄──────────► pcsb_bus_buffer ◄─► device bus ───────┼─► gal_analog_ctrl ► ADS774 CS/A0/R/C/CE, STS
 IRQ3, IRQ5 ◄────────┘                                      │                     MPC508 A2..A0/EN, relay K1
                                                            │                     DAC8012 CS x2, R/W
                      pcsb_byte_packer   ◄── byte_in/byte_stb
                      pcsb_serial_packer ◄── ser_clk/ser_data
```

## Address window and decoding

An address belongs to the card when A9..A0 = `11_000X_XXXX`. A9 and A8 must be
high, and A7, A6 and A5 must be low. A4 and A3 then select one of four ranges of
eight addresses. On the real card this is a 74LS138 one-of-eight decoder with
its enables built from 74LS00 gates. `pcsb_addr_decoder` writes that network as
its Boolean function:

| range | addresses | used for |
|---|---|---|
| 0 | 300H-307H | 8255 parallel ports, 8253 counters |
| 1 | 308H-30FH | ADC, multiplexer, input range |
| 2 | 310H-317H | two DACs |
| 3 | 318H-31FH | slot-card word buffers |

Each range can be switched off with the `range_en` input. A switched-off range
leaves its addresses to other equipment. `all_sel` covers the whole window and
gates the bus buffer. Accesses outside the window never reach the device chips,
and the card never drives the PC data bus for them.

## Register map

The window and its four ranges come from the original system. The offsets
inside each range are this design's own. They are kept in `rtl/cus_pkg.sv`.

| address | access | meaning |
|---|---|---|
| 300H-302H | R/W | 8255 port A, B, C (D7..D0) |
| 303H | W | 8255 control register |
| 304H-306H | R/W | 8253 counter 0, 1, 2 (D7..D0) |
| 307H | W | 8253 control register |
| 308H | R | ADC result, 12 bits on D11..D0 |
| 309H | R | ADC status: D0 = STS, 1 while converting |
| 30AH | W | channel: D2..D0 multiplexer input, D3 multiplexer enable |
| 30BH | W | start a conversion; data ignored |
| 30CH | W | sensitivity: D0 = relay K1, 0 = ±5 V range, 1 = ±10 V range |
| 310H, 311H | R/W | DAC 0, DAC 1 data, D11..D0, read back at the same address |
| 318H | R | word built from two device bytes |
| 319H | R | word built from 16 serial bits |
| 31AH | R | D0 byte word ready, D1 byte overrun, D2 serial word ready, D3 serial overrun |

A typical measurement looks like this: write the channel, write the
sensitivity, write 30BH, poll 309H until D0 is 0, then read 308H.

## Converter control (`gal_analog_ctrl`)

The ADS774 is controlled by five lines: CE, CS, R/C, A0 and STS. The logic
produces them combinationally from the decoded address and the strobe:

* **Start (write 30BH):** CE=1, CS=0, R/C=0, for as long as IOWR is low. The
  converter starts on the edge where all three are true.
* **Read (read 308H):** CE=1, CS=0, R/C=1. All 12 bits come out at once.
* **Idle:** CE=0, CS=1, R/C=1.
* **A0:** always 0. This selects a full 12-bit conversion and a 12-bit
  parallel read; the converter's 8-bit mode is not used.
* **Busy interlock:** a start is blocked while STS reports a conversion. A
  second start during a conversion therefore cannot disturb it. This interlock
  is this design's addition.

The channel register (30AH) and the sensitivity register (30CH) are the GAL's
registered outputs. They load on the card clock while the write strobe is low.
Reset clears them: multiplexer disabled, ±5 V range. Choosing the range is
left to software. The relay follows bit 0 of the last sensitivity write.

The DAC8012s need one select each and a read/write line. R/W is low during a
PC write, which loads the DAC latch, and high otherwise, which makes the
selected chip drive its latch back onto the bus.

The module also reports which source must drive the device read bus (`rd_src`,
an enum in `cus_pkg`). `cus_top` uses it to build the value returned to the PC.

## Port-chip selects (`gal_port_ctrl`)

In range 0, A2 picks the chip: the 8255 at 300H-303H, the 8253 at 304H-307H.
A1..A0 go to both chips unchanged. The chip selects follow the address alone.
The read and write strobes reach the chips only inside the range. Both chips
are 8 bits wide, so a PC read returns their byte on D7..D0 with D15..D8 zero.

## Word buffers (`pcsb_byte_packer`, `pcsb_serial_packer`)

The slot card can gather device data into 16-bit words, so the PC needs half
as many I/O reads, or one read per 16 serial bits.

* **Byte packer:** each `byte_stb` pulse brings a byte. The first byte of a
  pair goes to D7..D0, the second to D15..D8, and `ready` rises with the
  second.
* **Serial packer:** bits arrive on rising edges of `ser_clk`, which comes from
  outside. The clock passes a two-flip-flop synchroniser, so each half-period
  must last at least two card clocks. Bits enter MSB first. Every 16th bit
  copies the shift register into the output word. Shifting carries on, so the
  next word can arrive while the PC reads this one.
* **Hand-shake:** in both packers `ready` and `overrun` clear at the end of the
  PC read, the falling edge of the read select. The word therefore stays
  stable during the read.
* **Overrun:** the two packers differ here. The byte packer drops a byte that
  arrives while a full word is unread, and keeps the old word. The serial
  packer replaces the unread word with the new one. In both cases the overrun
  flag is set.

Byte order, bit order, the hand-shake and the overrun rules are this design's
choices. The original system states only that bytes or serial bits are
collected into 16-bit words.

## Bus buffering (`pcsb_bus_buffer`)

On the card, 74LS245 buffers carry A9..A0, IORD, IOWR and D15..D0 from the PC
to the device, and IRQ3 and IRQ5 back to the PC. In this RTL:

* The data direction follows IORD: towards the PC while it is low, towards the
  device otherwise.
* Data and strobes are enabled only while the decoder reports a card address.
* Each three-state bus is split into a data input, a data output and an output
  enable, so the design simulates on a two-state simulator. At the top level
  these are `pc_d_wr`/`pc_d_rd`/`pc_d_oe` on the PC side and
  `sys_d`/`sys_d_oe` on the device side.
* The device-side read data is a multiplexer in `cus_top`, steered by the
  decoders, in place of a shared three-state bus.
* IRQ3 and IRQ5 are top-level inputs. What raises them in the box is not
  specified.

## Timing

* The card has one clock, `clk`, and an asynchronous active-low reset,
  `rst_n`.
* The testbenches assume an 8 MHz ISA bus clock.
* The PC strobes are taken as levels in that clock domain. A cycle of at least
  two clocks with the strobe low is expected.
* Decoding, selects and read data are combinational, as with the TTL and GAL
  parts.
* Registers load on the clock edge while their strobe is low.
* The ADS774 quotes 8.5 µs per conversion, which is 68 clocks at 8 MHz. The
  system testbench checks that the status polled by the PC shows busy for that
  long and no more than one poll longer.

## What is outside the RTL

These parts are bought-in chips or analog circuitry. Their pins are ports of
`cus_top`:

* the ADS774 ADC
* the MPC508 multiplexer
* the OP27 input amplifier
* the range relay and the offset jumpers
* the DAC8012s and their output amplifiers
* the 8255 and the 8253

The testbenches use small behavioural models of the parts they need. They
model the interface only:

* `tb/ads774_model.sv`: conversion time, STS and the result latch
* `tb/dac8012_model.sv`: latch and read back
* `tb/port_chip_model.sv`: four byte registers standing in for the 8255 or
  the 8253

The models do not cover analog accuracy, the 8255 port modes or the 8253
counting.

## Where this design departs from, or adds to, the original

The original gives:

* the address window and its four ranges
* which signals are buffered
* the chips and their control pins
* the 12-bit conversion mode
* the DAC read back
* the idea of the word buffers

The following are this design's own:

* the register offsets and the data-bit positions of channel, sensitivity and
  status
* the busy interlock on start
* a card clock for the registered parts
* the word-buffer byte order, bit order, hand-shake and overrun rules
* `range_en` as an input. The original says the ranges can be enabled
  individually but not how.

Each converter is reached with one 16-bit access, and all 12 bits move at
once. The original address table also names separate low-byte and high-byte
addresses for the ADC and the DACs, for software that moves the data a byte at
a time. This design does not decode them, and the converter's 8-bit read mode
(eight MSBs, then four LSBs) is not used.

The range relay is set by software through the sensitivity register. The
original describes it as switching "according to the amplitude" of the input.
No amplitude detector is built here.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cus_pkg.sv rtl/cus_top.sv \
          tb/tb_cus_top.sv --top-module tb_cus_top -Mdir obj_top
obj_top/Vtb_cus_top
```

| testbench | covers |
|---|---|
| `tb_pcsb_addr_decoder` | all 1024 addresses under four enable masks |
| `tb_pcsb_bus_buffer` | direction and gating for every strobe and select combination |
| `tb_pcsb_byte_packer` | pairing, read hand-shake, overrun |
| `tb_pcsb_serial_packer` | serial assembly, words held across the next word, overrun |
| `tb_gal_analog_ctrl` | converter pins, DAC selects and read source for every offset; register loads |
| `tb_gal_port_ctrl` | all select and strobe combinations |
| `tb_cus_top` | the whole card at its default parameters with chip models (see below) |

`tb_cus_top` covers:

* conversions on all eight channels in both ranges, with timing
* a start while busy
* DAC read back
* 8255 and 8253 access
* both word buffers, including overrun
* the interrupt lines
* a disabled range
* foreign addresses

It counts how often each of these mechanisms occurs and fails if one never
does.

The parameters are few. `pcsb_addr_decoder.BASE_ADDR` moves the window; only
its upper bits A9..A5 take part in the match. `gal_analog_ctrl.NDAC` sets the
number of DAC selects. `pcsb_serial_packer.WORD_BITS` sets the serial word
length.
