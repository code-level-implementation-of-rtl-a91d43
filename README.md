# Block-framed USART with CRC-16 and sync-character alignment

This is a serial interface for a processor (a USART). It sends data in
**blocks** instead of one character at a time. The processor fills an
eight-entry transmit buffer and issues a single "send" command. The USART then
sends a sync character, an optional address, the block of one to eight data
characters, and a 16-bit check field (normally a CRC-16). On the far side, a
second USART looks for the sync character in the bit stream, stores the data
characters in its own eight-entry buffer, checks parity, stop bits, buffer
overrun and the check field, and reports what happened in a 16-bit status
register that can raise an interrupt.

The same frame can travel in two ways:

* **synchronous**: the bits follow each other back to back, and the
  transmitter sends its bit clock on a second wire (`tx_clk`). The receiver
  takes one bit on each rising edge of that clock.
* **asynchronous**: no clock is sent. Each character is wrapped in a start bit
  and one or two stop bits. The receiver times the bits itself, at 16 times
  the baud rate.

The structure follows the article *Code-Level Implementation of High Speed
Synchronized Data Transmission Technique for Faster Data Transmission*, which
describes a USART built this way. The article gives the blocks, their
connections and the feature list, but not the bit-level details, so many of
those are this design's own choices (see
[Choices made here](#choices-made-here)).

## The frame

Every frame has this layout, characters in this order:

```
 SYNC | ADDRESS (optional) | DATA 0 ... DATA n-1 | CHECK[15:8] | CHECK[7:0]
 8 b  | 8 b                | dlen (+1 parity)    | 8 b         | 8 b
```

* Every character goes on the line **least significant bit first**.
* **SYNC** is the sync register (reset value `8'hE7` = `1110_0111`).
* **ADDRESS** is sent only when `addr_en` is set. The transmitter sends its
  `DSTADDR` register. A receiver accepts the frame only if this matches its
  `OWNADDR` register, so a master can reach one of 256 devices on a shared
  line.
* **DATA**: `n` = block length, 1 to 8, from the control register. Each data
  character has `dlen` bits (5, 6, 7 or 8), followed by one parity bit when
  parity is on (even or odd). Only data characters get parity.
* **CHECK** is one of four fields:

  | `crc_mode` | field |
  |---|---|
  | 0 | CRC-16 of the data bits |
  | 1 | `16'hFFFF` |
  | 2 | `16'h0000` |
  | 3 | sync character twice |

  The CRC covers only the `dlen` data bits of each data character, in line
  order. It does not cover sync, address or parity bits. The polynomial is
  x^16 + x^12 + x^5 + 1 (`16'h1021`). The register starts at all ones and is
  shifted MSB-first, with each line bit XORed into bit 15. `crc16.sv` gives
  the exact step. The high byte of the field goes first.

In **synchronous mode** the frame is one unbroken run of bits. For the default
block of eight 8-bit characters that is 8 + 64 + 16 = 88 bits. Each bit period
begins with a falling edge of `tx_clk` and the data changes there. `tx_clk`
rises in the middle of the bit, which is where the receiver samples. `tx_clk`
runs all the time in synchronous mode. Between frames the line is 1.

In **asynchronous mode** each character becomes

```
 start(0) | bits, LSB first | stop(1) [| stop(1)]
```

and the characters still follow each other without idle time. An 8-character
block with 8-bit data, no parity and one stop bit is 11 characters x 10 bits =
110 bit periods.

### How the receiver finds a frame

The receiver's frame FSM (`rx_controller`) starts in **HUNT**:

* Synchronous mode: the comparator checks the 8-bit receiver register
  against the sync register **after every received bit**. A match can
  therefore start at any bit position. The idle line is all ones and cannot
  look like `E7`.
* Asynchronous mode: a character (start bit, 8 bits, stop bits) is received
  first and then compared with the sync register.

A match restarts the CRC and moves the FSM through ADDR (if enabled), DATA
(block-length characters) and the two CHECK characters, then back to HUNT. The
receiver counts characters, so both ends need the same control-register
setting: mode, data length, parity, block length, check field and
addressing.

A frame addressed to another device is still followed to its end. Its data
could contain the sync pattern, and starting to hunt in the middle of it could
lock onto a false frame. Nothing of such a frame is stored. Only `addr_miss`
is reported.

## Transmitter

`usart_tx` contains:

* **`usart_fifo`**: the eight-entry TX buffer on a dual-port RAM (`dp_ram`).
  Its write side is fed by the processor. Its read side gives the oldest entry
  to the sequencer.
* **`tx_controller`** (frame sequencer): a start command stays pending until
  the buffer holds a whole block. In half duplex it also waits until the
  receiver is idle. It then hands one character at a time to the serializer:
  sync, address, data (popping the buffer and updating the CRC), check high,
  check low. Finally it waits for the last bit to leave and pulses `tx_done`.
* **`crc16`** and **`crc_select`**: the CRC register and the choice of check
  field.
* **`tx_serializer`**: the parallel-to-serial shift register.
  * A free-running 4-bit phase counter, advanced by the 16x baud tick,
    defines the bit periods.
  * A loaded character is expanded into its line bits: start and stop bits
    are added in asynchronous mode.
  * `ready` rises as soon as the last bit of a character has *started*. The
    next character is loaded well before the next bit boundary, so the
    characters of a frame have no gaps. The synchronous receiver depends on
    this.

The article draws the transmitter as four state machines around the RAM. Here
they map as follows:

* writing the RAM: the write side of `usart_fifo`, fed by TXDATA writes;
* choosing the check field from the control register: `crc_select`;
* reading the RAM into the CRC: the read side of `usart_fifo`, popped by
  `tx_controller` as each data character enters `crc16`;
* building the frame from sync register, RAM and check field: the
  `tx_controller` FSM itself.

## Receiver

`usart_rx` contains:

* **`rx_deserializer`** (the receiver register). Both `rx_in` and `rx_clk` go
  through two-flip-flop synchronizers.
  * Synchronous mode: each rising edge of `rx_clk` shifts one bit into the
    8-bit register and, once a frame has started, into the current
    character.
  * Asynchronous mode: a low line starts a character, and the start bit is
    checked again 8 ticks later, in its middle. A start bit that is gone by
    then is ignored. After that, each bit is sampled every 16 ticks. A low
    stop bit gives `framing_err`.
  * The FSM tells the deserializer the length of the next character
    (`exp_bits`).
* **`sync_comparator`**: compares the register (or character) with the sync
  character and pulses `sync_match` one cycle later.
* **`rx_controller`** (frame FSM):
  * counts the characters;
  * checks parity;
  * pushes data characters into the RX buffer;
  * compares the check field with the one worked out locally (same `crc16` +
    `crc_select`);
  * emits one-cycle events: `sync_match`, `addr_match`, `addr_miss`,
    `parity_err`, `overrun_err`, `framing_err`, `crc_match`, `crc_err`,
    `rx_done`.

  A data character that finds the RX buffer full is dropped and raises
  `overrun_err`. A bad check field does not remove the data: it stays in the
  buffer and `crc_err` tells the processor not to trust it.
* **`usart_fifo`**: the eight-entry RX buffer.

In half duplex (`half_dup` = 1) the receiver is held in HUNT while its own
transmitter sends.

## Programming model

The bus runs on the USART clock:

* `cs` selects the device.
* `wr_p` and `rd_p` are one-cycle strobes.
* `addr` picks one of the 16-bit registers below.
* Read data appear on `rdata` one clock after `rd_p`.

| addr | name | access | content |
|---|---|---|---|
| 0 | TXDATA | W | `wdata[7:0]` pushed into the TX buffer (ignored if full) |
| 1 | RXDATA | R | oldest received character in `[7:0]`; the read removes it |
| 2 | CONTROL | R/W | see below, reset `16'hE061` |
| 3 | SYNC | R/W | sync character `[7:0]`, reset `8'hE7` |
| 4 | STATUS | R, W1C | see below; writing 1 clears a sticky bit |
| 5 | INTCTRL | R/W | `[15]` global interrupt enable, `[14:0]` mask of STATUS`[14:0]` |
| 6 | OWNADDR | R/W | own address `[7:0]` |
| 7 | DSTADDR | R/W | address sent in frames `[7:0]` |
| 8 | COMMAND | W | `[0]` = 1: send one block |

CONTROL (`usart_pkg::ctrl_t`):

| bits | field | meaning |
|---|---|---|
| 15:13 | `blk_len_m1` | block length − 1 (1 to 8 data characters) |
| 12 | `addr_en` | address character after sync |
| 11:10 | `crc_mode` | check field: 0 CRC-16, 1 all ones, 2 all zeros, 3 sync twice |
| 9:7 | `baud_sel` | {S0,S1,S2}: 0 = 115200, 1 = 57600, 2 = 38400, 3 = 19200, 4 = 9600, 5 = 4800, 6 = 1200, 7 = 300 |
| 6:5 | `dlen` | data bits: 0 = 5, 1 = 6, 2 = 7, 3 = 8 |
| 4 | `stop2` | two stop bits (asynchronous) |
| 3 | `par_odd` | odd parity (else even) |
| 2 | `par_en` | parity bit after each data character |
| 1 | `half_dup` | half duplex |
| 0 | `sync_mode` | 1 synchronous, 0 asynchronous |

The reset value `16'hE061` selects synchronous mode, 8 data bits, 115200
baud, CRC-16 and blocks of 8.

STATUS (`usart_pkg::status_t`):

* Bits 5:0 show levels: `tx_empty`, `tx_full`, `rx_empty`, `rx_full`,
  `tx_busy`, `rx_busy` (bit 0 up).
* Bits 15:6 are sticky events: `sync_match` (6), `crc_match` (7),
  `crc_err` (8), `parity_err` (9), `overrun_err` (10), `framing_err` (11),
  `addr_match` (12), `tx_done` (13), `rx_done` (14), `addr_miss` (15).

`irq = INTCTRL[15] & |(STATUS[14:0] & INTCTRL[14:0])`. Bit 15 of STATUS
(`addr_miss`) cannot interrupt, because bit 15 of INTCTRL is the global
enable.

A typical transfer:

1. Write CONTROL on both ends.
2. Write n characters to TXDATA.
3. Write 1 to COMMAND.
4. Wait for `tx_done` (or its interrupt).
5. On the receiver, wait for `rx_done` and check `crc_match`.
6. Read RXDATA n times.
7. Clear the status bits by writing them back.

## Rates and timing

`baud_gen` divides the clock down to a tick at 16 times the chosen rate. Its
divisor is round(`CLK_HZ` / (16 · baud)), at least 1. One bit lasts 16 ticks,
in both modes. With the default `CLK_HZ` = 50 MHz the divisors are:

| baud | divisor | clocks/bit | error |
|---|---|---|---|
| 115200 | 27 | 432 | +0.47 % |
| 57600 | 54 | 864 | +0.47 % |
| 38400 | 81 | 1296 | +0.47 % |
| 19200 | 163 | 2608 | −0.15 % |
| 9600 | 326 | 5216 | −0.15 % |
| 4800 | 651 | 10416 | 0.0 % |
| 1200 | 2604 | 41664 | 0.0 % |
| 300 | 10417 | 166672 | 0.0 % |

Timing of a transfer:

* Sending starts at the first bit boundary after the block is ready, so it
  begins up to one bit period after the command.
* `tx_done` comes when the last bit period ends.
* The receiver reports `rx_done` a few clocks after the middle of the last
  bit of the check field (synchronous mode), or of the last stop bit
  (asynchronous mode).

With one bit per 16 ticks, a synchronous frame of 88 bits at 115200 baud takes
88 × 432 = 38 016 clocks (0.76 ms). The clock frequency is a parameter of
`usart`. A different clock changes the divisors, not the design.

## Choices made here

The article gives the architecture, not its details. The following are this
design's own choices and can be changed without touching the structure:

* one system clock for everything;
* the register map and the bit layouts of CONTROL and STATUS;
* the CRC polynomial, initial value and coverage;
* least-significant-bit-first order;
* the `tx_clk` phase;
* 16x oversampling with mid-bit sampling;
* the meaning of "CRC is Sync" (sync twice);
* the block-length field;
* the start command waiting for a full block;
* the half-duplex rule;
* dropping a character on overrun;
* following a foreign-address frame to its end;
* the 16-bit bus.

Where this design departs from what the article states, or reads it in one
particular way:

* **Asynchronous mode** carries the same sync/data/CRC frame as synchronous
  mode, with each character framed by start and stop bits. The article
  attaches sync and CRC to asynchronous transfers and stop bits and framing
  errors to asynchronous mode, and this reading satisfies both.
* **Rates**: the article names a range of 50 Hz to 3 MHz, but its selection
  table has only the eight rates above, 300 to 115200 baud. Only those eight
  can be selected here.
* **Addresses** are 8 bits (256 devices), as in the article's feature list.
  A 9-bit address mentioned elsewhere is not implemented.
* **Buffer word**: one 8-bit character. The article's waveforms show a
  16-bit RAM output.
* **Other clocks**: the article's processor interface also shows two more
  clocks whose role it does not explain. They are not used.
* **Transmit shift register**: 12 bits wide, so it can hold start and two
  stop bits around 9 data/parity bits. The article names an 8-bit one.
* **Not modelled**: the POWER-PC host, the RS-232 voltage levels and the
  FPGA tool flow. The host's bus is the top's port list.

## Files

All SystemVerilog is IEEE 1800-2017. There is one module or package per file.

| file | role |
|---|---|
| `rtl/usart_pkg.sv` | shared types: control/status structs, register map, baud table, CRC constants |
| `rtl/usart.sv` | top: registers, baud generator, transmitter, receiver |
| `rtl/usart_regs.sv` | processor interface and register file, interrupt |
| `rtl/baud_gen.sv` | 16x baud tick from the selection table |
| `rtl/usart_tx.sv` | transmitter subsystem |
| `rtl/tx_controller.sv` | frame sequencer |
| `rtl/tx_serializer.sv` | parallel-to-serial shift register and line format |
| `rtl/usart_rx.sv` | receiver subsystem |
| `rtl/rx_deserializer.sv` | receiver register, synchronous and oversampled reception |
| `rtl/sync_comparator.sv` | sync detection |
| `rtl/rx_controller.sv` | receive frame FSM and error detection |
| `rtl/crc16.sv` | CRC-16 LFSR, one character per clock |
| `rtl/crc_select.sv` | check-field choice |
| `rtl/usart_fifo.sv` | eight-entry buffer: pointers, count, full/empty |
| `rtl/dp_ram.sv` | dual-port RAM (synchronous write, asynchronous read) |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.
`tb/tb_usart.sv` is the system test.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
the system test at the default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
          rtl/usart_pkg.sv tb/tb_usart.sv --top-module tb_usart -Mdir obj_usart
./obj_usart/Vtb_usart
```

A unit test is the same command with `tb/tb_<module>.sv` and
`--top-module tb_<module>`. The package has to come first on the command line.
The RTL files carry no `` `timescale ``, so `--timescale` gives them the
testbenches' unit of 1 ns. The unit tests use a 10 ns clock; `tb_usart` runs at 20 ns (50 MHz).
Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/usart_pkg.sv
rtl/usart.sv`.

`tb_usart` links two USARTs back to back at 50 MHz. The link from the first
to the second passes through an XOR, which the test uses to flip chosen line
bits. The test checks:

* synchronous and asynchronous frames;
* all data lengths, parity modes and both stop-bit settings;
* all four check fields;
* address match and miss;
* TX buffer full, RX buffer full, and overrun;
* parity, framing and CRC errors caused by flipped bits;
* the interrupt with and without global enable;
* full duplex (both directions at once) and half duplex (the second device's
  transmission waits until its reception is over);
* a change of rate.

The test computes the expected CRCs, frame lengths and bit times on its own.
It counts each mechanism and fails if one never happened. It takes under a
second of simulated time and under a second of run time.

The unit testbenches hold the baud tick high (one bit = 16 clocks) and compare
each block with models written in the testbench: a bitwise CRC model, a queue
for the buffer, line encoders and decoders.

## Limits

* The control register must not change while a frame is in flight.
  Transmitter and receiver read it directly.
* A framing error in the middle of an asynchronous frame usually costs the
  receiver its alignment. It finishes the frame as best it can, reports the
  error and returns to hunting.
* The synchronous receiver assumes the sender keeps its characters
  contiguous, as `tx_serializer` does. Idle bits inside a frame would be
  taken as data.
* No CDC is needed beyond the input synchronizers: `rx_clk` is sampled, never
  used as a clock. It must therefore be slower than about 1/4 of `clk`. With
  the rates above it is slower by a factor of 400 or more.
