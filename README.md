# VMEbus exerciser: FPGA logic for a PC-controlled bus master

A VMEbus exerciser is a test board for a VME crate. It sits in a slot, becomes
bus master on request, and runs single bus cycles against a slave under test. This lets
an engineer check a new slave board, a backplane or a crate without writing
software for a VME processor. This repository holds the logic for the FPGA card on
such an exerciser. A PC sends commands over RS-232. The FPGA wins the bus, runs
one cycle, gives the bus back and reports the result. The result goes to the PC, to
an LED and to a 7-segment display.

Three single-cycle transfer (SCT) types are supported:

* **address-only (ADO)**: address and address modifier are presented, AS* is
  strobed, no data moves;
* **write** and **read** of one byte (D08(EO) or D08(O)), one 16-bit word (D16) or one
  32-bit long word (D32);

all with A16, A24 or A32 addressing. Block transfers, interrupts and
read-modify-write are not part of the exerciser.

## How a command travels

```
 PC ──RS-232──► uart_rx ──► cmd_sequencer ──► vme_requester ── BR3*/BG3IN*/BBSY*/BG3OUT*
     ◄────────  uart_tx ◄──┘      │   ▲
                 ▲                 ▼   │ done / berr / rdata
             baud_gen       vme_ado_core ┐
                            vme_write_core ├─► bus multiplexer ─► dtb_o (A, AM, strobes, D + enables)
                            vme_read_core  ┘              ◄── d_i, DTACK*, BERR*
                                  │
                            status_display ─► LEDs, 7-segment display
```

`vme_exerciser_top` wires these together. The sequencer is the exerciser's
"program". It runs the same loop for every command:

1. collect a frame from the receive buffer, echoing every character;
2. **bus request**: raise `bus_req` and wait for `bus_granted`;
3. **data transfer**: start the ADO, write or read core and wait for `done`;
4. **bus release**: drop `bus_req`;
5. after a read, send the data back; update the LEDs and the display.

Only one core runs at a time. The bus outputs come from the core that is busy,
and the idle value otherwise (all strobes high, no enables).

## The serial protocol

The line runs at 9600 baud with 8 data bits, no parity and 1 stop bit. A command
frame is 6 bytes (ADO, read) or 10 bytes (write):

| byte | content |
|------|---------|
| 0 | command byte: bits [1:0] operation (0 ADO, 1 write, 2 read), [3:2] data width (0 D08(EO), 1 D08(O), 2 D16, 3 D32), [5:4] address width (0 A16, 1 A24, 2 A32), [7:6] ignored |
| 1 | address modifier in bits [5:0], sent to the bus unchanged |
| 2–5 | byte address, most significant byte first |
| 6–9 | write data, right-aligned, most significant byte first (writes only) |

* **Echo.** Every received character is sent straight back. The PC can use the echo to
  confirm each character.
* **Pacing.** After each character handed to the transmitter, the sequencer waits
  `CHAR_GAP_US` (1 ms). It also waits while the transmit buffer is full.
* **Read reply.** After the echoes of a read frame come 1, 2 or 4 data bytes
  (D08, D16, D32), most significant first. After a bus error the data are zero.
* **Invalid bytes.** A command byte with operation 3 or address width 3 is
  dropped. The receiver then tries the next byte as a command byte, so a PC that
  lost alignment can recover. A valid-looking stray byte is still taken as a
  command, so the PC should not send garbage.

A complete write frame therefore takes about 10 × (1.04 ms + 1 ms) ≈ 20 ms
end to end. The serial link, not the bus, sets the command rate.

## Bus ownership (`vme_requester`)

The exerciser requests on level 3 with single-level release-when-done behaviour:

* drive BR3* low;
* wait for BG3IN* low (passed through a two-flip-flop synchroniser);
* drive BBSY* low and withdraw BR3*;
* keep BBSY* low until the sequencer drops its request **and** BG3IN* has gone
  high again, then release BBSY*.

While the board neither requests nor owns the bus, BG3IN* is passed on to
BG3OUT*, so boards further down the daisy chain can still be granted.
While it requests or owns the bus, BG3OUT* is held high. An assertion checks that
BBSY* is never driven before a grant was seen.

## The three cycles

All three cores take a `vme_cmd_t` and a one-clock `start`. Each returns `busy`,
a one-clock `done` and `berr`, and drives a `vme_dtb_out_t` record. DTACK* and BERR*
pass through two-flip-flop synchronisers inside each core. Every step below
takes one clock unless it waits for something.

| step | ADO | write | read |
|------|-----|-------|------|
| present address, AM, LWORD*, IACK* high | ✓ | ✓ | ✓ |
| wait set-up time (`SETUP_CYC`) | ✓ | ✓ | ✓ |
| AS* low | ✓ | with WRITE* low | with WRITE* high |
| wait for DTACK* and BERR* both high | | ✓ | ✓ |
| put data on the lanes, then DS* one clock later | | ✓ | DS* only |
| wait for DTACK* or BERR* low | ✓ | ✓ | ✓ |
| wait 25 ns (`READ_WAIT_NS`), then latch data | | | ✓ |
| DS0*/DS1* high, then AS* high | ✓ | ✓ | ✓ |

With the clock counted from the edge that takes `start` to the edge that raises `done`:

* ADO: `SETUP_CYC + ADO_WAIT + 4`, where ADO_WAIT is the slave's response time in clocks;
* write: `SETUP_CYC + 7 + ACK`, where ACK is the slave's DTACK* delay in clocks;
* read: `SETUP_CYC + 6 + ACK + READ_WAIT_CYC`, with READ_WAIT_CYC = ceil(25 ns / clock period) = 2 at 50 MHz.

At 50 MHz, `SETUP_CYC = 2` and a slave answering in 3 clocks, a D32 write takes
12 clocks (240 ns) and a D32 read 13 clocks (260 ns). Both are far below the 10 µs per
cycle the exerciser was required to meet.

An ADO cycle never drives a data strobe or the data lines. A read never drives
the data lines. Assertions in the cores check both. A bus error ends any cycle
early through the same release steps.

### Byte lanes

Byte placement follows the VMEbus standard (big-endian), see
`vme_pkg::dtb_lanes`:

| width | strobes | LWORD* | A01 | data lines |
|-------|---------|--------|-----|------------|
| D08(EO), even address | DS1* | high | addr[1] | D15–D08 |
| D08(EO), odd address | DS0* | high | addr[1] | D07–D00 |
| D08(O) | DS0* | high | addr[1] | D07–D00 |
| D16 | DS1*, DS0* | high | addr[1] | D15–D00 |
| D32 | DS1*, DS0* | low | 0 | D31–D00 |

For A16 and A24, address bits above the width are driven as zero. Data in
`vme_cmd_t` and `rdata` are always right-aligned. The cores shift them to and
from the lane.

## Front panel (`status_display`)

* `led[7]`, the left-most LED, lights when the last cycle completed with DTACK*.
* `led[6]` lights when it ended in BERR*. Both clear when a new frame starts.
  `led[5:0]` are unused.
* The four-digit display shows the last read data in hexadecimal. Without the
  `show_high` switch it shows bits 15..0; with it, bits 31..16. The digits are
  scanned one at a time, `DIGIT_CYC` clocks each (1 ms). Segments and digit
  enables are active low: `seg_n = {dp, g, f, e, d, c, b, a}`, with the decimal
  point held off.

## UART (`uart_tx`, `uart_rx`, `baud_gen`)

The transmit and receive blocks have the port set of a common FPGA UART macro.
Each has a 16-byte FIFO, `buffer_full` and `data_present` flags, and a
`reset_buffer` input. The bit timing comes from a shared `en_16_x_baud` pulse.
`baud_gen` makes that pulse by dividing the clock by round(CLK_HZ / (16·BAUD)),
which is 326 at 50 MHz. That gives 9586 baud, 0.15 % slow.

The receiver works as follows:

* It starts a frame only on a falling edge of the synchronised line.
* It re-checks the start bit at mid-bit.
* It samples each data bit at its middle.
* It discards a frame whose stop bit is low.

## Top-level ports

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock, synchronous active-high reset |
| `rs232_rxd`, `rs232_txd` | in/out | serial link to the PC |
| `dtb_o` | out | `vme_dtb_out_t`: `addr_oe`, A31..A01, AM, LWORD*, IACK*, WRITE*, AS*, DS0*, DS1*, `d_oe`, D31..D00 |
| `d_i` | in | D31..D00 from the backplane |
| `dtack_n_i`, `berr_n_i` | in | DTACK*, BERR* |
| `br3_n_o`, `bbsy_n_o`, `bg3in_n_i`, `bg3out_n_o` | | level-3 arbitration lines |
| `show_high` | in | display the high half of the read data |
| `led`, `seg_n`, `an_n` | out | LEDs, segments, digit enables |

All bus signals are in backplane polarity. External bus transceivers sit between
these ports and the backplane: `addr_oe` enables the address and strobe drivers,
and `d_oe` the data drivers. Open-collector lines (BBSY*, BR3*) must be
driven by an open-collector buffer from the corresponding output.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 50 000 000 | clock frequency; sets the baud divider, the 25 ns wait and the pause |
| `BAUD` | 9600 | serial bit rate |
| `CHAR_GAP_US` | 1000 | pause after each transmitted character |
| `SETUP_CYC` | 2 | clocks between address valid and AS* low (40 ns at 50 MHz) |
| `READ_WAIT_NS` | 25 | wait between DTACK* and data latch on reads |
| `DIGIT_CYC` | 50 000 | clocks per display digit |
| `FIFO_DEPTH` | 16 | UART buffer depth |

At a different clock, set `CLK_HZ`. Check that `SETUP_CYC` clock periods still
cover the 35 ns address set-up time of the VMEbus standard.

## Departures from the original exerciser

* **No soft processor.** The original runs its program on an 8-bit soft
  processor core. The program covers the UART routines, bus request/release and the
  three cycle routines. Here the same steps are hardware state machines. The
  behaviour visible on the bus and the serial line keeps the same order, but
  instruction timing is gone. Cycles are therefore much shorter than on the
  original, which measured 6–12 µs per cycle.
* **Frame encoding.** The original PC program sends a header, the address
  modifier, four address bytes and four data bytes. The byte coding of the
  header and the read reply format are not known. The encoding above is this
  design's own.
* **Clock.** 50 MHz is assumed. All clock-derived values are computed from
  `CLK_HZ`.
* **Pause after received characters.** The original also waits 1 ms after each
  received character. That wait is dropped; the receive FIFO makes it
  unnecessary.
* **BBSY*.** In the original board, BBSY* is driven by the bus-request routine
  but was left unconnected at the pins. Here it is a proper output.
* **Additions:** input synchronisers, the BERR* path in the write and read
  cores, a bus-error LED, and the rule that BBSY* is kept until the grant has gone.
* **No bus timeout.** A slave that answers neither DTACK* nor BERR* leaves
  the exerciser waiting until reset. A crate
  normally has a bus timer that raises BERR* in that case.
* **Not included:** the main-board transceivers (they are external parts) and
  the PC program. The future arbitration core that would share the bus pins
  between the three cycle cores is replaced by the simple busy-flag
  multiplexer in the top.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_baud_gen` | tick period 326 clocks, one clock wide; a second rate |
| `tb_uart_tx`, `tb_uart_rx` | 8N1 framing, bit order, FIFO full/drop, ±2 % rate error, glitch and framing-error rejection |
| `tb_cmd_sequencer` | echo, pacing, frame decode, one start per frame under grant, read reply, invalid bytes |
| `tb_vme_requester` | BR3*/BG3IN*/BBSY* order and timing, wait while another master owns the bus, daisy chain |
| `tb_vme_ado_core`, `tb_vme_write_core`, `tb_vme_read_core` | every address × data width against a slave memory model, lanes, set-up time, bus error, exact cycle length |
| `tb_status_display` | LEDs, digit scan, hex patterns for both halves |
| `tb_vme_exerciser_top` | end to end at default parameters |

`tb_vme_exerciser_top` plays the PC, a level-3 arbiter (`vme_arbiter_model`)
and a 1 KiB slave (`vme_slave_model`). It runs:

* ADO cycles with A16, A24 and A32;
* writes and read-backs for every address width × D08/D16/D32, plus D08(O);
* a bus error, an invalid command byte, a request held off by another master, and
  a grant passed down the daisy chain.

It counts each of these mechanisms and fails if one never occurred. It simulates
about 27 ms of real time, which takes roughly 15 s.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_vme_exerciser_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/vme_pkg.sv tb/tb_vme_exerciser_top.sv
obj_dir/Vtb_vme_exerciser_top +verilator+rand+reset+2
```

Add `+trace` to the run to print each serial character with its time. The
other testbenches build the same way with their own top module.
