# IrPHY: an IrDA SIR + FIR physical layer core

This core drives an IrDA infrared transceiver from an 8-bit host bus. It
handles the two IrDA speed groups:

- **SIR**, 9.6 to 115.2 kb/s. Ordinary UART frames are sent as short light
  pulses (3/16 RZI).
- **FIR**, 4 Mb/s. Framed packets use 4-pulse-position modulation (4PPM) and
  carry a CRC-32 frame check sequence.

The host writes bytes into a transmit FIFO and reads received bytes from a
receive FIFO. Framing, modulation, CRC generation and checking, and flag
detection all happen in hardware. Interrupt and DMA-request pins tell the
host when to move data.

The architecture, register map, frame formats and CRC follow the IrGate-IrPHY
design in the NCTU thesis *A Universal Entrance System Using IrDA
Transmission*. The original targeted an FPGA on an ARM7 (S3C4510) evaluation
board. This is an independent SystemVerilog implementation. Where that
description is silent or contradicts itself, the choices made here are listed
in [Choices and departures](#choices-and-departures).

MIR (0.576 and 1.152 Mb/s) and the 2.4 kb/s SIR rate are not supported. The
original design leaves them out too.

## On the wire

### SIR: 3/16 RZI

A byte is framed as a UART character: start bit 0, eight data bits LSB first,
stop bit 1. Each bit lasts 16 ticks of a 16x bit-rate enable.

- A **0** bit is sent as a light pulse during the first 3 of its 16 ticks.
- A **1** bit sends no light.
- The line (`ir_txd`, 1 = LED on) therefore rests at 0.

The receiver works as follows:

1. It stretches every received pulse to 16 ticks, which rebuilds the NRZ
   UART signal.
2. It confirms the start bit at its middle (tick 7).
3. It samples the data bits and the stop bit at mid-bit, 16 ticks apart.
4. A missing stop bit is a framing error. The receiver then waits for the
   line to go idle before looking for a new start bit, so it never resyncs on
   a pulse in the middle of a character.

The bit rate comes from BRCR, which sets a divisor of the 1.8432 MHz SIR
clock (16 x 115200 Hz):

| BRCR | divisor | rate |
|---|---|---|
| 0 | 12 | 9600 |
| 1 | 6 | 19200 |
| 2 | 3 | 38400 |
| 3 | 2 | 57600 |
| 4 | 1 | 115200 |
| other | 12 | 9600 |

### FIR: 4PPM frames

At 4 Mb/s, time is cut into 125 ns **chips**. Every 4 chips carry one data
bit pair (DBP), with a single pulse in one of the four chips. Take the pair as
(first bit, second bit) and read it as a 2-bit number:

| pair | chips |
|---|---|
| 00 | `1000` |
| 01 | `0100` |
| 10 | `0010` |
| 11 | `0001` |

Bytes go LSB first, two bits per symbol, so 16 chips (2 us) per byte.

A frame is laid out as follows. Patterns are written first chip first.

```
PA  x16   1000 0000 1010 1000                          preamble, locks the receiver
STA       0000 1100 0000 1100 0110 0000 0110 0000      start flag
payload   4PPM symbols
FCS       32-bit CRC, as four more bytes, 4PPM
STO       1100 0000 1100 0000 0110 0000 0110 0000      stop flag
```

The flags contain pairs of adjacent pulses and empty symbols. No legal 4PPM
symbol has either, so the receiver can tell flags from data without any
escaping.

**CRC-32** uses the IEEE 802 polynomial 04C11DB7h. It is computed bit-serially
over the payload bits in transmission order (LSB of each byte first):

1. The register is preset to all ones.
2. After the last payload bit, the inverted register is shifted out MSB first
   as the FCS, with 0 shifted in behind it.
3. The receiver runs payload and FCS through the same register. A good frame
   leaves the residue C704DD7Bh.

This is the ordinary IEEE 802.3 / IrDA FIR CRC. The testbench checks it
against a byte-wise reflected (EDB88320h) software model.

## Structure

```
              host bus (ncs/nwe/noe, addr[3:0], data[7:0])   irq  dreq_rx  dreq_tx
                       |                                      ^      ^        ^
               host_interface  (strobe synchronisers)         |      |        |
                       |                                      |      |        |
               irphy_controller  (MCR, address decode, mode, irq/DMA select)
                 |                                 |
        sir_controller                       fir_controller
        BRCR, FCR, 2 x async_fifo,           IER IIR FCR LCR OFDLR IFDLR,
        sir_clock_gen, SIR interrupt         2 x sync_fifo, FIR interrupt,
          |          |                       chip clock enable
        sir_tx     sir_rx                      |           |
          |          |                      fir_tx      fir_rx
          |          |                      (crc32)     (crc32)
          +----------+---------- output_mux -------------+
                                 |       |
                              ir_txd   ir_rxd     (IrDA transceiver)
```

| module | role |
|---|---|
| `irphy_top` | Wires everything together. It has one reset synchroniser (`reset_sync`) per clock domain. |
| `host_interface` | Turns the asynchronous bus strobes into one-cycle register read/write requests. It also holds read data. |
| `irphy_controller` | Holds the Master Control Register. Steers register accesses to the SIR or FIR controller. Latches the active mode. Selects the interrupt and DMA sources. |
| `sir_controller` | SIR registers, the two SIR FIFOs (dual-clock), the baud clock and the SIR interrupt. |
| `sir_clock_gen` | Makes the 16x bit-rate enable from BRCR. |
| `sir_tx`, `sir_rx` | The SIR encoder and decoder, each with its FIFO handshake. |
| `async_fifo` | Gray-pointer dual-clock FIFO, used for the SIR FIFOs. |
| `fir_controller` | FIR registers, the two FIR FIFOs, the interrupt identification logic, the DMA requests and the chip-rate enable. |
| `sync_fifo` | Single-clock first-word-fall-through FIFO. It has an overwrite-last mode for the RX overrun rule. |
| `fir_tx` | FIR transmitter: reads bytes from the FIFO, updates the CRC, does the 4PPM encoding, generates the flags and muxes the output. |
| `fir_rx` | FIR receiver: synchronises to the chip phase, detects flags, decodes 4PPM, checks the CRC and writes bytes to the FIFO. |
| `crc32` | Bit-serial CRC generator and checker. |
| `output_mux` | Connects the active transmitter to `ir_txd`, and `ir_rxd` to the active receiver. |
| `irphy_pkg` | Shared register addresses, MCR layout, IIR bit positions, flag patterns and 4PPM table. |

### Clocks

There are two clock domains:

- **`clk`, 32 MHz.** Runs the host interface, the MCR and all of FIR. A FIR
  chip is 4 clocks; `fir_controller` gives an enable one clock in four while
  FIR mode is active.
- **`sir_clk`, 1.8432 MHz (16 x 115200).** Runs the SIR encoder, decoder and
  baud-rate divider.

The SIR FIFOs are the boundary between the domains. Their write side for TX
and read side for RX run on `clk`, so the host sees ordinary FIFO registers.
BRCR and the SIR enables cross through two-flop synchronisers. The SIR TX
FIFO clear crosses as a toggle. Change BRCR only while SIR is idle.

The original description says the core has four clock domains but describes
only these two. The other two are not built.

## Registers

The address is 4 bits and every register is 8 bits. Address 0 is always the
MCR. Which register the other addresses reach depends on MCR[4:3].

### MCR (address 0, reset 00h)

| bits | meaning |
|---|---|
| 0 | Mode switch. While 1, every transmitter and receiver is held idle, and the active mode follows bits 4:3 and 1. Clearing it starts the selected engine. |
| 1 | 0 = receive, 1 = transmit |
| 4:3 | 00 SIR, 01 FIR, 10 "IR transmit mode", 11 reserved. Codes 10 and 11 enable no engine. |

To change mode, write the MCR with bit 0 set and the new bits 4:3 and 1, set
up the new mode's registers, then write the same value with bit 0 clear. The
FIFOs can be filled while bit 0 is set; nothing is sent until it is cleared.
The link is half duplex: only one of the four engines (SIR or FIR, TX or RX)
runs at a time.

### SIR mode (MCR[4:3] = 00)

| addr | name | access |
|---|---|---|
| 1 | BRCR | R/W: rate select (table above) |
| 2 | FCR | W: bit 1 clears the RX FIFO, bit 2 clears the TX FIFO |
| 3 | TX FIFO | W |
| 4 | RX FIFO | R (pops) |

The SIR interrupt is a one-cycle `irq` pulse when the TX FIFO becomes empty or
the RX FIFO becomes full. There is no enable register and no status register.
A SIR framing error drops the character and is not reported to the host.
Both FIFOs are 16 deep (`SIR_FIFO_DEPTH`).

### FIR mode (MCR[4:3] = 01)

| addr | name | access | notes |
|---|---|---|---|
| 1 | IER | R/W | enables for IIR[6:0] |
| 2 | IIR | R | see below |
| 3 | FCR | R/W | [1:0] RX trigger 8/10/12/14; [2] W clears RX FIFO; [5:4] TX low level 2/4/6/8; [6] W clears TX FIFO and aborts the frame; [7] end-of-frame on underrun. Reset 33h. |
| 4 | LCR | R/W | [0] force break (line held at 0), [1] count mode |
| 5, 6 | OFDLR0/1 | R/W | outgoing frame length (count mode) |
| 7, 8 | IFDLR0/1 | R | payload length of the last good-format frame |
| 9 | RX FIFO | R | pops |
| A | TX FIFO | W | |

IIR bits:

| bit | event | clears |
|---|---|---|
| 0 | RX FIFO count >= trigger level | by level |
| 1 | end of frame received | when the RX FIFO drains, is cleared, or IIR is read while it is empty |
| 2 | CRC error | on IIR read |
| 3 | RX overrun | on IIR read |
| 4 | receiver error | on IIR read |
| 5 | TX FIFO count <= low level | by level |
| 6 | TX underrun | on IIR read |
| 7 | busy | by level; not an interrupt source |

`irq` gives a one-cycle pulse whenever an enabled IIR bit rises. `dreq_rx`
follows IIR[0] and `dreq_tx` follows IIR[5]. DMA is always on.

## FIR transmitter: when a frame ends

A frame starts as soon as all of these hold:

- the FIR transmitter is enabled (MCR = FIR, transmit, bit 0 clear);
- LCR[0] is clear;
- the TX FIFO holds a byte.

The preamble and start flag take 36 us, which gives the host plenty of time
to top the FIFO up. There are four ways a frame can end:

| condition | result |
|---|---|
| Count mode (LCR[1] = 1) and OFDLR bytes sent | Normal end: FCS, then STO. Any bytes left in the FIFO start the next frame. |
| FIFO empty, FCR[7] = 1 | Normal end, and IIR[6] is also set. |
| FIFO empty, FCR[7] = 0 | Underrun abort: the line stops at 0 (break) and IIR[6] is set. The far receiver sees an illegal symbol and reports a receiver error. |
| FCR[6] written | Immediate abort, line at 0, TX FIFO emptied. |

LCR[0] (force break) gates the output pin to 0 whatever the transmitter is
doing. It also keeps a new frame from starting.

At 4 Mb/s the FIFO drains one byte per 2 us (64 clocks). One bus access costs
about 7 clocks, so an 8-byte refill on `dreq_tx` takes under a microsecond.

## FIR receiver: finding the chips and the frame

**Phase.** The receive line is synchronised with two flops. Every rising edge
restarts a modulo-4 phase counter, and the chip is sampled two clocks (62.5
ns) after the edge. Every symbol contains a pulse, so the phase is corrected
at least once per 500 ns. Clock differences of a few hundred ppm between the
two ends do not matter. The testbench checks chip periods of 124.8 and 125.2
ns.

**Flags.** The last 32 chips are kept in a shift register.

1. The receiver waits for a PA.
2. Each following PA must be followed, 16 chips later, by another PA, or by
   STA 32 chips later.
3. STA fixes the symbol boundary.
4. After STA, each 4-chip symbol with exactly one pulse is data.
5. The first symbol without exactly one pulse must be the start of STO. If
   the next 28 chips complete STO, the frame ends. Anything else is a
   receiver error and the frame is dropped.

**The FCS never reaches the FIFO.** The payload length is only known when STO
arrives, so the receiver holds the last four decoded bytes back. Each new
byte pushes the oldest held byte into the RX FIFO. At STO the four held
bytes, which are the FCS, are dropped.

At STO, `IFDLR` gets the payload length and IIR[1] rises. IIR[2] rises with it
if the CRC residue is wrong. The bytes of a CRC-failed frame are still in the
FIFO; the host should discard them.

A frame shorter than its FCS, or one that is not a whole number of bytes, is a
receiver error.

**Overrun.** A byte arriving while the RX FIFO is full replaces the last byte
in the FIFO and sets IIR[3]. The earlier bytes are kept.

## Host bus timing

`bus_ncs`, `bus_nwe` and `bus_noe` are active low and asynchronous to `clk`.

- **Write.** Drive `bus_addr` and `bus_wdata`, then pull `ncs` and `nwe` low.
  The write happens about 3 clocks later, on the synchronised falling edge.
  Keep address and data stable for at least 3 clocks (about 100 ns) after the
  strobe falls.
- **Read.** Drive `bus_addr`, then pull `ncs` and `noe` low. `bus_rdata` is
  valid 4 clocks (125 ns) after the fall and stays put until the next read.
  Each read of a FIFO or of IIR therefore has its side effect exactly once,
  however long `noe` is held.

Release both strobes for at least 2 clocks between accesses.

## Choices and departures

Where the original description leaves a point open or contradicts itself,
this design does the following.

- **Bit order inside a 4PPM pair.** The first bit sent is the high bit of the
  pair number (00 -> `1000` ... 11 -> `0001`). The description says only that
  the four states map to the four slots.
- **SIR pulse position.** The pulse sits at the start of the bit cell. The
  description gives only its 3/16 width.
- **FIR trigger levels.** The IIR text says "above" the trigger level and
  "below" the low level. The FCR text says the level itself counts. The FCR
  text is followed (>= and <=). As a result, IIR reads 20h after reset rather
  than the 00h its table lists, because an empty TX FIFO is at or below every
  low level.
- **Busy interrupt.** Busy appears in the list of interrupt conditions, but
  IER bit 7 is reserved. The register table is followed: busy is status only.
- **End-of-frame clearing.** The rule for clearing IIR[1] is not given. It is
  chosen as in the IIR table above.
- **DMA.** DMA has no enable bit, so it is always on.
- **Underrun with FCR[7] = 1.** This also sets IIR[6]; the description says
  the interrupt is raised "in this case, too".
- **MCR[0].** It is treated as a hold: engines stop while it is set and the
  new mode takes effect when it is cleared. The description says only to set
  it while switching modes.
- **"IR transmit mode" (MCR[4:3] = 10).** It is not described, so it has no
  engine.
- **Host bus protocol.** The strobe protocol is this design's own. The
  description lists only interrupt, DMA, address and data pins.
- **SIR FIFO addresses and depth.** The SIR TX/RX FIFO data addresses (3 and
  4) and the SIR FIFO depth (16) are not given.
- **Clock-domain crossing.** How the SIR FIFOs cross between the two domains
  is not given.

## Not included

- The optical transceiver and the host processor board. The core's `ir_txd`
  and `ir_rxd` pins and its bus pins are where they connect.
- MIR rates and 2.4 kb/s SIR. These are excluded by design.
- The two clock domains that are mentioned but not described.
- Serial infrared interaction pulses (SIP). The busy bit's description
  mentions them, but the core never sends one.
- SIR error reporting to the host. Framing errors are detected and the
  character is dropped, but no register shows them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, stops itself with a watchdog, and uses
`$urandom` for random stimulus. `tb/irphy_tb_pkg.sv` holds the reference
models. They are written from the frame format, not from the RTL: a
table-free byte-wise CRC-32 and a builder that writes out the chip sequence of
a whole FIR frame.

| testbench | what it checks |
|---|---|
| `crc32_tb` | FCS of random payloads against the software CRC, residue on good and corrupted frames |
| `sync_fifo_tb`, `async_fifo_tb` | Random traffic against a queue model, full/empty/count, overwrite-last, clear/flush, both clock-rate directions |
| `sir_clock_gen_tb` | Tick period for every BRCR code, including the "others" case |
| `sir_tx_tb` | Pulse position and width (3/16 bit), frame length (10 bit times), back-to-back bytes, at 9600 and 115200 b/s |
| `sir_rx_tb` | Random bytes at 9600, 57600 and 115200 b/s with 3/16 pulses and with minimum-width (1.63 us) mid-cell pulses; framing error; disabled receiver |
| `fir_tx_tb` | Every chip of a frame against the reference builder; frame length in clocks; the four end-of-frame rules; force break |
| `fir_rx_tb` | Reference frames of several sizes, FCS kept out of the FIFO, CRC error, illegal symbol, wrong flag, recovery for the next frame, chip periods off by ±0.16 % |
| `fir_controller_tb` | Reset values, every trigger and low level, EOF set/clear, clear-on-read, overrun overwrite, interrupt edges, chip-enable rate |
| `sir_controller_tb`, `irphy_controller_tb`, `host_interface_tb`, `output_mux_tb` | Register paths, domain crossing, mode decode, strobe-to-request timing |
| `irphy_top_tb` | End to end, see below |

`irphy_top_tb` runs two full-size cores face to face (A's `ir_txd` drives
B's `ir_rxd` and back), using only their pins. It covers:

- SIR in both directions at all five rates (9600 to 115200 b/s);
- FIR frames ended by count mode and by FCR[7], from 1 to 300 bytes (the
  300-byte frame exercises the high length bytes OFDLR1 and IFDLR1);
- DMA-driven FIFO refill;
- the RX trigger interrupt;
- underrun abort;
- forced break;
- FCR[6] abort;
- a frame from the testbench's own generator;
- a CRC-error frame;
- RX overrun;
- engines held during MCR[0].

It counts each of these and fails if any never happens. It uses the default
parameters and finishes in under 20 s of run time.

To run a testbench with plain verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/irphy_pkg.sv tb/irphy_tb_pkg.sv tb/irphy_top_tb.sv --top-module irphy_top_tb
./obj_dir/Virphy_top_tb
```

Swap in the name of any other testbench. The RTL has no simulator-specific
code. Assertions cover FIFO occupancy, pop-when-empty and one strobe per
cycle.

Lint (`verilator --lint-only -Wall`) leaves three kinds of warning, and all
are deliberate:

- Unused outputs: FIFO flags and CRC taps that a given instance does not need.
- Reset used both asynchronously and in assertion `disable iff`.
- Package constants that a module importing `irphy_pkg` does not use.

## Size

The defaults are 16-entry FIFOs. After generic synthesis the whole core is
about 840 word-level cells, 590 flip-flop bits and 512 bits of FIFO memory
(4 x 16 x 8).
