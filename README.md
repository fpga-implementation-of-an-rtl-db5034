# RFID hub: one FPGA serving many RFID readers over Ethernet

A security installation with several doors needs one RFID reader per door.
Giving each reader its own PC or embedded board is expensive. An antenna
multiplexer is cheap, but it scans the antennas one after another, so every
door waits for the others. The RFID hub takes a middle path. One FPGA holds a
small system-on-chip with one serial port (UART) per reader, so all readers
work at the same time. It also holds a compact 10BaseT Ethernet interface that
carries commands and tag data to and from a server PC. Several hubs can share
one server through an ordinary Ethernet switch.

This repository holds the hub's own logic in SystemVerilog: the reader UARTs,
the 10BaseT Ethernet core and the peripheral-bus address decoder that joins
them. The processor that runs the reader-control software, and the other
off-the-shelf cores of the system (local memory, debug module, GPIO, external
SRAM controller), are not in this RTL. Their bus connections are brought out
as ports of the top module, `rfid_hub_top`.

```
             server PC / Ethernet switch
                        |  (10BaseT pair, external differential receiver on RX)
     eth_rxd  ----------+----------  eth_txdp / eth_txdm
        |                               ^
  +-----v-------------------------------+------------------------------+
  |  eth_core   eth_rx  (clock extraction, preamble sync,              |
  |             deserializer, CRC-32 check)  -> receive frame buffer   |
  |             eth_tx  (Manchester, preamble, padding, FCS, link      |
  |             pulses)  <- transmit frame buffer                      |
  +------------------------------^-------------------------------------+
                                 | peripheral bus (opb_req_t / opb_rsp_t)
  m_req/m_rsp (processor) -> opb_decoder -> mem_*, dbg_*, gpio_* (ports)
                                 |
         +-----------+-----------+-----------+-----------+
      uart_core   uart_core   uart_core   uart_core      (NUM_UARTS, 4 by default)
      RS232       RS232_1     RS232_2     RS232_3
        |            |           |           |
     reader 0     reader 1    reader 2    reader 3     (38400 baud, 8-O-1)
```

Everything runs on one clock, `clk`, at 48 MHz. The Ethernet logic needs that
frequency; it works anywhere from 46 to 50 MHz. On a board with a different
oscillator, derive 48 MHz with the FPGA's clock manager (a DLL or PLL). Reset `rst` is synchronous and
active high.

## The 10BaseT core

10BaseT sends Manchester code at 10 Mb/s. Each 100 ns bit cell has a
transition in its middle: low-to-high for a 1, high-to-low for a 0. A second
transition at the cell boundary appears only when two equal bits follow each
other. The core works without a separate recovered clock. It samples the line
with the 48 MHz system clock, which gives only 4.8 samples per bit, and all
timing decisions are made by counting those samples.

### Receiver (`eth_rx`)

The receiver uses one FPGA input, `eth_rxd`. An external two-transistor
differential amplifier converts the twisted pair to a logic level (high when
RD+ is above RD-). Inside the FPGA there are three stages.

1. **Clock extraction** (`eth_manchester_rx`). Two flip-flops synchronize
   `rxd`, and a third keeps the previous sample to detect transitions. A
   counter measures the time since the last *mid-bit* transition. A transition
   seen at least 3/4 of a bit period after it is the next mid-bit transition:
   the new line level is the bit, and the counter restarts. An earlier
   transition is a cell boundary and is ignored. At 48 MHz the threshold is
   4 cycles. Boundary transitions arrive 2 or 3 cycles after a mid-bit one, and
   the next mid-bit transition arrives 4 to 6 cycles after it. The thresholds
   are computed from `CLK_HZ`, and the testbench checks the receiver at 46, 48
   and 50 MHz.
   On a quiet line the first transition is taken as a mid-bit one. That is
   right because the preamble (1010...) has no boundary transitions. With no
   mid-bit transition for 3/2 bit periods (8 cycles) the carrier has ended.
2. **Preamble synchronizer and deserializer** (`eth_rx_framer`). While
   hunting, the framer counts alternating bits. Two 1s in a row after at least
   8 alternating bits are the end of the start frame delimiter (0xD5), and the
   frame begins. It does not demand the whole 62-bit preamble, because the
   first few bits can be lost while the receiver locks. Bits are then shifted
   in LSB first, and every eighth bit yields a byte. The end of carrier closes
   the frame. A partial last byte is dropped.
3. **Checksum checker.** The Ethernet CRC-32 (reflected polynomial
   0xEDB88320, start value all ones) runs over every byte, FCS included. At the
   end of a good frame the register equals the fixed residue 0xDEBB20E3.

Outputs are pulses: `sof`, `byte_valid`/`byte_data`, and `eof` with `crc_ok`
and `len` (bytes including the FCS). A byte appears about 4 cycles after its
last mid-bit transition. `eof` follows about 3/2 bit periods after the last
transition of the frame.

### Transmitter (`eth_tx`)

The transmitter drives the pair `txdp`/`txdm`. They are complementary while
sending and both low when the line is idle. 50 ns half-bits cannot be cut
evenly from 48 MHz, so a phase accumulator adds 2 x 10 MHz every clock and
ticks when it passes 48 MHz. Each half-bit therefore lasts 2 or 3 cycles, and
the bit rate is exactly 10 Mb/s on average. The largest timing error is one
clock cycle (21 ns).

A frame is fed as a byte stream (`in_valid`/`in_ready`, `in_last`). The
transmitter adds:

- 7 preamble bytes 0x55 and the delimiter 0xD5;
- zero padding up to 60 bytes;
- the FCS: the complemented CRC-32, least significant byte first;
- an end delimiter: the line held high for 6 half-bits;
- an interframe gap of 96 bit times;
- while idle, a link test pulse (txdp high for about 100 ns) every 16 ms, so
  that a hub or switch keeps the link up.

A one-byte holding register takes the next byte while the current one is being
sent. The source therefore has a whole byte time (about 38 cycles) to deliver
each byte. If no byte is ready when one is needed, the frame ends without an
FCS and `underrun` pulses.

### Host side of the Ethernet core (`eth_core`)

`eth_core` puts one receive and one transmit buffer of 2048 bytes each behind
the peripheral bus. Either buffer holds a full 1518-byte frame. Each buffer
byte sits in bits [7:0] of its own 32-bit word.

| offset | access | meaning |
|---|---|---|
| 0x0000 | read | STATUS: [0] frame held, [1] CRC good, [2] truncated, [3] tx busy, [4] carrier now, [15:8] dropped frames (saturating), [31:16] bytes stored (FCS included) |
| 0x0004 | write | release the receive buffer |
| 0x0008 | write | TX_LEN: send [15:0] bytes from the transmit buffer (ignored while busy, 0, or above the buffer size) |
| 0x2000 + 4i | read | receive buffer byte i |
| 0x4000 + 4i | write | transmit buffer byte i |

A frame that starts while the receive buffer is free is stored in it. The
buffer is then held until software releases it, and frames that arrive in the
meantime are counted and dropped. Bytes beyond the buffer are discarded, and
such a frame is marked truncated and not good. The transmitter streams the
transmit buffer to `eth_tx`, which adds preamble, padding and FCS.

## Reader UARTs (`uart_core`)

Each reader has a UART fixed at 38400 baud, 8 data bits, odd parity and
1 stop bit. One bit lasts exactly 1250 cycles at 48 MHz. The receiver samples
the middle of each bit and re-checks the start bit half a bit after its
falling edge. Each direction has a 16-entry FIFO.

| offset | access | meaning |
|---|---|---|
| 0x0 | read | oldest received byte (removed from the FIFO) |
| 0x4 | write | byte to send |
| 0x8 | read | [0] rx data, [1] rx full, [2] tx empty, [3] tx full, [5] overrun, [6] framing error, [7] parity error; error flags clear on read |
| 0xC | write | [0] clear tx FIFO, [1] clear rx FIFO |

## Peripheral bus and address map

The bus has a single master, the processor. Its request (`opb_req_t`: select,
read-not-write, address, write data) is held until one cycle with `xferack`
(done) or `errack` (error) in the response (`opb_rsp_t`). Both types are
defined in `hub_pkg`. The in-FPGA slaves acknowledge in the cycle after they
see the request. `opb_decoder` forwards the request to the single slave that
owns the address and ORs the slaves' responses together. An address nobody
owns gets an `errack` as fast as the fastest slave. A slave that stays silent
for 16 cycles also gets an `errack`, so the processor never hangs.

| slave | window | in this RTL |
|---|---|---|
| RS232 (reader 0) | 0x40660000-0x4066FFFF | `uart_core` |
| RS232_1 | 0x40640000-0x4064FFFF | `uart_core` |
| RS232_2 | 0x40620000-0x4062FFFF | `uart_core` |
| RS232_3 | 0x40600000-0x4060FFFF | `uart_core` |
| readers 4..7 (`NUM_UARTS` > 4) | further down in steps of 0x20000 | `uart_core` |
| Ethernet core | 0x40800000-0x4080FFFF | `eth_core` |
| debug module | 0x41400000-0x4140FFFF | port `dbg_*` |
| GPIO | 0x40000000-0x4000FFFF | port `gpio_*` |
| external SRAM (512 KiB) | 0x20080000-0x200FFFFF | port `mem_*` |

The processor's 4 KiB local instruction and data memory (0x0-0xFFF) is on its
own local bus, not on this one.

## Parameters of `rfid_hub_top`

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 48000000 | system clock; the Ethernet logic needs 46-50 MHz |
| `NUM_UARTS` | 4 | readers served (1 to 8) |
| `BAUD` | 38400 | reader line rate |
| `ETH_RX_BYTES`, `ETH_TX_BYTES` | 2048 | Ethernet frame buffers |
| `NLP_PERIOD` | 768000 | cycles between link test pulses (16 ms) |

## What follows the original hub and what is this design's own

From the original design:

- one UART per reader, with 4 built and up to 8 intended;
- 38400 baud, 8-O-1 framing;
- the UART, debug, GPIO and SRAM addresses;
- a 48 MHz clock (46-50 MHz tolerated);
- a 10BaseT interface with one receive input and a txdp/txdm output pair;
- the receiver built from clock extraction, preamble synchronizer,
  deserializer and checksum checker.

This design's own choices:

- the internals of every block;
- the bus signalling and the error timeout;
- the register maps of both peripherals;
- FIFO and buffer sizes;
- the Ethernet core's address;
- the receive-buffer hand-over;
- the standard 10BaseT details (padding, FCS, end delimiter, interframe gap,
  link pulses).

The original system used the processor vendor's UART core. `uart_core` is a
functional replacement with the same settings, not a copy of that core's
registers.

Limits worth knowing:

- With 4.8 samples per bit, the receiver's margin against pulse-width
  distortion on the line is under one clock cycle (about 20 ns).
- Link pulses are sent but not checked on receive. There is no link-status
  detection, collision handling or full-duplex negotiation.
- The receiver stores every frame regardless of its destination address.
  Filtering is left to software.
- No interrupts are provided. Software polls the status registers.
- The Ethernet core is not sized for the smallest FPGAs. Apart from its two
  2 KiB frame buffers, which should map to block RAM, it has about 280
  flip-flops. That is well over 3% of a 2352-slice device.
- The two 2 KiB buffers take 8 block RAMs of 4 Kbit. A small FPGA that also
  holds the processor's 4 KB local memory may not have that many; set
  `ETH_RX_BYTES`/`ETH_TX_BYTES` to 1024 there, which limits frames to 1024
  bytes.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/hub_pkg.sv tb/tb_rfid_hub_top.sv --top-module tb_rfid_hub_top
./obj_dir/Vtb_rfid_hub_top
```

Replace the testbench name to run another one. All of them finish in seconds. `-Wno-fatal` keeps width warnings in the testbench code from stopping the build.

| testbench | what it shows |
|---|---|
| `tb_rfid_hub_top` | The whole hub at default sizes. The testbench plays the server, four readers and the processor. One server frame carries a command for each reader, the four serial exchanges run at the same time, and the replies return in one padded Ethernet frame that is checked byte by byte. It also forces and counts: a bad-CRC frame, a dropped frame, a link pulse, a UART parity error, SRAM access, an unmapped address and a bus timeout. |
| `tb_hub_eight_readers` | The same operation with `NUM_UARTS = 8`. |
| `tb_eth_rx` | Receiver against an independent Manchester/CRC generator: good and bad frames, a short preamble, ±0.02 % bit-rate offset, link pulses, a maximum-size frame, byte rate and end-of-frame latency, and receivers clocked at 46 and 50 MHz. |
| `tb_eth_tx` | Transmitter decoded by run-length analysis: symbols, preamble, padding, FCS, end delimiter, frame duration at 10 Mb/s, interframe gap, link pulses and underrun. |
| `tb_eth_core` | Loopback through the registers: transmit, receive with FCS, padding, drop while held, truncation, bad FCS, and TX_LEN ignored while busy. |
| `tb_uart_core` | 8-O-1 framing and the 1250-cycle bit time, received data, parity, framing and overrun flags, and FIFO clears. |
| `tb_opb_decoder` | Every window of the address map, unmapped addresses and the timeout. |

## Files

- `rtl/hub_pkg.sv`: bus types, address map, CRC-32 and parity functions
- `rtl/rfid_hub_top.sv`: top level
- `rtl/opb_decoder.sv`: bus address decoder
- `rtl/uart_core.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv`, `rtl/sync_fifo.sv`:
  reader UART
- `rtl/eth_core.sv`: Ethernet peripheral with its buffers
- `rtl/eth_rx.sv`, `rtl/eth_manchester_rx.sv`, `rtl/eth_rx_framer.sv`:
  receiver
- `rtl/eth_tx.sv`: transmitter
