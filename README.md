# Ethernet front ends for a small FPGA web server

This design has the network front end of a web server that runs on an FPGA instead of a
PC. A web server needs a TCP/IP stack, and the stack needs a working Ethernet link. That
link is the part built here, in two forms that sit side by side in one top module:

* **Nexys3 front end** (`nexys3_mws`): a 10/100 Mbps Ethernet MAC that talks to an
  external PHY chip over MII. It has a Wishbone register block, a transmit and a receive
  packet RAM, and a state machine that configures the MAC. The same state machine
  sends a UDP and an ARP test frame once a second, and hands each received frame to the
  layer above. In a complete server that layer is the TCP/IP stack and HTTP server. They
  are not part of this RTL: their interface is a set of `host_*` ports.
* **D2SB 10 Mbps sender** (`d2sb_udp_arp_sender`): an FPGA board with no PHY chip. It
  drives a 10BASE-T twisted pair itself through a small extension card, which carries an
  RJ-45 jack, a 60 MHz oscillator and three green LEDs. It Manchester-codes one UDP and
  one ARP frame per second from a 20 MHz clock. It decodes the receive pair, oversampled
  at 60 MHz, with a state machine that finds the start-of-frame delimiter and the end of
  the frame. It checks each frame and shows the first 16 bytes of received frames in
  hexadecimal on a two-line character LCD, through a FIFO.

Both paths share the Ethernet framing logic: `mac_tx`, `crc32` and `frame_check`, with
the constants and types in `eth_pkg`.

```
eth_web_fpga_top
├── nexys3_mws                       100 MHz system clock
│   ├── period_timer                 1 s tick
│   ├── pkt_gen                      UDP / ARP frame bytes
│   ├── mac_ctrl_fsm                 Wishbone master: configure, send, hand up
│   ├── pkt_ram  (TX)                2048 x 8
│   ├── pkt_ram  (RX)                2048 x 8
│   └── eth_mac
│       ├── mac_wb_regs              Wishbone slave registers
│       ├── mac_tx ── crc32          preamble, SFD, pad, FCS, gap
│       ├── mii_tx_if                bytes -> TXD nibbles
│       ├── mii_rx_if                RXD nibbles -> bytes, preamble removal
│       └── frame_check ── crc32     FCS, too short, too long
└── d2sb_udp_arp_sender
    ├── 20 MHz domain: period_timer, pkt_gen, mac_tx, manchester_tx
    └── 60 MHz domain: manchester_rx, frame_check, sync_fifo, lcd_ctrl
```

The two halves share only the reset. The top's ports carry the prefixes `n3_` and `d2_`.

## Frames on the wire

Every frame sent has the IEEE 802.3 layout:

* 7 preamble bytes of `0x55` and the SFD `0xD5`;
* the frame, padded with zeros to 60 bytes;
* a 4-byte FCS;
* at least 12 idle byte times before the next frame.

`mac_tx` produces this from a byte stream with a valid/ready handshake. Its `byte_tick`
input sets the pace, so the same block serves both line codes:

* every 16 clocks of the 20 MHz clock for Manchester (10 Mbps);
* every other TX_CLK edge for MII.

The source must not run dry inside a frame; an assertion checks this.

The FCS is the reflected CRC-32: polynomial `0xEDB88320`, preset to all ones, sent
complemented, low byte first. `crc32` handles one byte per clock. On receive,
`frame_check` runs the CRC over the whole frame including its FCS and compares the result
with the fixed residue `0xDEBB20E3`. The frame length counts the FCS. A frame is marked
too short below 64 bytes and too long above 1518. `good` means the FCS is correct and the
length is in range.

The test frames come from `pkt_gen`:

| Frame | Size before padding and FCS | Content |
|---|---|---|
| UDP | 74 bytes | IPv4 header (identification = sequence number, DF, TTL 64, checksum computed), UDP ports 5000 → 5000, UDP checksum 0, 32-byte payload = 32-bit sequence number (big-endian) then byte index |
| ARP | 42 bytes, padded to 60 | request for the peer's IP address, sent to broadcast |

The station addresses are parameters. Defaults:
* MAC `02:00:00:00:00:01`
* IP `192.168.1.10`
* peer IP `192.168.1.1`

Each second starts with the UDP frame and then the ARP frame, so both the normal path and
the padding path are exercised.

## 10BASE-T Manchester line (D2SB)

`manchester_tx` runs on the 20 MHz clock, two clocks per bit.

* **Encoding:** the first half of each bit cell carries the inverse of the bit and the
  second half the bit. A 1 is therefore a rising edge in mid-cell. Bits go LSB first.
* **Line pair:** `tx_p`/`tx_n` are driven as complements. `line_en` is high while the
  pair is driven.
* **End of frame:** the line stays positive for two bit times, then both wires go low.
* **Link pulses:** no normal link pulses are generated. A PHY that needs them to see the
  link will not come up.

`manchester_rx` samples the receive line at 60 MHz, 6 samples per bit.

* **Start:** the first rising edge starts a frame.
* **Decoding:** an edge that comes at least 3/4 of a cell after the last mid-cell edge
  is a new mid-cell edge, and the new level is the bit. Earlier edges are cell-boundary
  edges and are ignored. This tolerates the ±1 sample jitter of an asynchronous clock.
* **SFD search:** the state machine looks for two 1 bits in a row, the end of `10101011`.
  A damaged or shortened preamble is therefore accepted.
* **Output:** from that point it packs bits LSB first into bytes. `m_sof` marks the first
  byte.
* **End of frame:** when no mid-cell edge comes for 1.5 cells, `m_eof` pulses.

The sample count is a parameter, `SAMPLES_PER_BIT`. The thresholds scale with it.

The receive side of the D2SB design uses two more blocks:
* `frame_check` checks every decoded frame.
* A capture stage copies the first 16 bytes of each frame into `sync_fifo` (64 bytes by
  default), if the FIFO has room for all 16. A frame that finds the FIFO full is counted in
  `lcd_skipped`.

The LCD shows the frames that have been captured:
* `lcd_ctrl` drives an HD44780-style 8-bit, write-only bus. It runs the power-up sequence
  `38 0C 01 06`.
* For each 16-byte record it writes line 1 (`0x80` and the hex of bytes 0–7) and line 2
  (`0xC0` and bytes 8–15).
* Every delay is derived from `CLK_HZ`: E pulse ≥ 250 ns, 40 µs per command, 2 ms after
  clear, 15 ms at power-up.
* `lcd_rw` is tied low.

The three LEDs:
* `led[0]`: transmit or carrier activity;
* `led[1]`: toggles on each good frame;
* `led[2]`: toggles on each bad frame.

The 20 MHz and 60 MHz domains do not exchange data. Each has its own reset synchroniser.
On the board, the FPGA's DLL derives the 20 MHz clock from the 60 MHz oscillator. That
primitive is not part of the RTL: the top takes `d2_clk20` and `d2_clk60` as inputs.

## MII and the Ethernet MAC (Nexys3)

The whole Nexys3 path runs on the 100 MHz system clock. TX_CLK and RX_CLK, 25 MHz at
100 Mbps and 2.5 MHz at 10 Mbps, do not clock any logic. They are synchronised, and their
edges are detected in the 100 MHz domain.

* **`mii_tx_if`:** changes TXD/TX_EN after a detected rising TX_CLK edge, low nibble
  first. The PHY samples them on its next rising edge.
* **`mii_rx_if`:** takes RXD on a detected falling RX_CLK edge, halfway through the data
  eye. It skips preamble nibbles `5` until it sees `D`, then pairs nibbles into bytes.
  When RX_DV falls it drops an odd trailing nibble and pulses `m_eof`.

This scheme needs at least four system clocks per MII clock. 100 MHz against 25 MHz gives
exactly four.

`eth_mac` joins these adapters to `mac_tx` and `frame_check`. It talks to the packet RAMs
through direct ports, not Wishbone:

* **Transmit:** a TX reader fetches the frame from the TX RAM. The RAM has a one-cycle
  read latency. The reader offers each byte two clocks after it sets the address. A byte
  time is at least eight system clocks, so `mac_tx` is never starved.
* **Receive:** an RX writer stores the received frame from address 0, FCS included.
* **Held frames:** a received frame is held until it is released. Frames that arrive
  while one is held, or while RX_EN is low, are dropped and counted (`rx_dropped`). A
  single buffer keeps the hand-off simple. The price is that a slow consumer loses frames.
* **Not built:** there is no address filter and no collision handling (full duplex only).

### Register map (`mac_wb_regs`, 32-bit, word addresses)

| Addr | Name | Bits |
|---|---|---|
| 0 | CTRL | [0] TX_EN, [1] RX_EN, [2] PAD_EN; all 0 after reset |
| 1 | MAC_LO | station address bits 31:0 |
| 2 | MAC_HI | [15:0] station address bits 47:32 |
| 3 | TX_CMD | write: [10:0] length, [31] start (ignored while busy); read: [31] busy, [10:0] length |
| 4 | RX_STAT | read: [31] frame held, [19] too long, [18] too short, [17] CRC error, [16] good, [10:0] length; write [31]=1: release the buffer |
| 5 | COUNT | [31:16] frames received, [15:0] frames sent |

Wishbone classic single cycles: ACK comes one clock after CYC&STB and lasts one clock.
Assertions check that an ACK is always preceded by a request and is never held.

### Control flow (`mac_ctrl_fsm`)

After reset the FSM does the following:

1. It writes MAC_LO, MAC_HI and then CTRL = 7, and raises `init_done`. `init_done` starts
   the one-second timer.
2. In its idle state it serves, in this order of priority:
   * a release from the layer above: write RX_STAT bit 31;
   * a pending tick or a pending ARP frame: poll TX_CMD until the MAC is idle, let
     `pkt_gen` write the frame into the TX RAM at one byte per clock, then write TX_CMD
     with the length and the start bit;
   * otherwise, if no frame is held: poll RX_STAT. A held frame raises `host_rx_valid`
     with its status.

While the layer above holds a frame, it reads the RX RAM through `host_rd_addr`/`host_rd_data`
(one-cycle latency) and ends by pulsing `host_rx_release`. Test frames keep going out
while a frame is held. A tick that arrives while a send is still in progress is kept, not
lost.

## Where this departs from, or goes beyond, the original description

The original description gives the system and the MAC's feature list, not their insides.
It lists these MAC features: preamble generation and removal, automatic padding,
too-long/too-short detection, full duplex, MII, and 10 and 100 Mbps. It also names:
* a state machine that sets the registers and feeds Wishbone;
* two packet RAMs;
* the 1 s UDP/ARP test traffic;
* the D2SB clocking (60 MHz crystal, DLL, 20 MHz for 10 Mbps);
* a Manchester receiver with an SFD and end-of-frame state machine;
* a FIFO and LCD state machine;
* three LEDs and differential Tx/Rx pairs.

Everything else is this design's own choice:

* **Interfaces:** the register map, the single hold-and-release RX buffer, the `host_*`
  hand-off and the MII sampling scheme.
* **Manchester receiver:** the 6× oversampling scheme.
* **Test frames:** the 32-byte UDP payload and its contents, and the addresses.
* **D2SB displays and sends:** which frames reach the LCD and what the LEDs show. The
  D2SB sender also uses the same one-second period as the Nexys3 test traffic.

Two points differ from the original description:

* **Packet RAM access:** in the original, frames move between the packet memories and
  the MAC over Wishbone. Here Wishbone carries only the register accesses. The MAC reads
  and writes the two RAMs through direct ports.
* **Large frames:** `mac_tx` itself has no length limit. The 11-bit TX_CMD length and the
  2048-byte RAM limit a sent frame to 2047 bytes before the FCS. Frames received above
  1518 bytes are stored as far as the RAM allows and flagged too long.

The original system also has the following. They are **not** in this RTL:
* the TCP/IP stack and HTTP server that serve images, LED and switch state, taken from an
  existing open-source project;
* the controller for the board's external RAM;
* the PHY chip and its mode-strap buffers;
* the DLL;
* the extension card's analogue parts.

The 100 Mbps image-retrieval response-time measurements need the TCP/IP stack and HTTP
server, so they cannot be reproduced with this RTL.

Sizes at the defaults:
* A 1518-byte maximum frame fits the 2048-byte packet RAMs.
* One UDP + ARP second on the D2SB line takes 98 + 84 byte times, about 146 µs of each
  second.
* A 16-byte LCD record takes about 1.5 ms to display. A burst of minimum frames therefore
  outruns the display: the FIFO holds four records, and the rest are counted as skipped.

## Simulating

All sources are SystemVerilog 2017. The testbenches use `$realtime`, so set a timescale.
Any testbench runs the same way, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  rtl/eth_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_mac_tx.sv \
  --top-module tb_mac_tx -Mdir obj_mac_tx
obj_mac_tx/Vtb_mac_tx +verilator+rand+reset+2
```

(`eth_pkg.sv` may appear twice on the command line. Alternatively, list the `rtl/` files
by hand.)

Each testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog. The expected
values come from `tb/tb_ref_pkg.sv`, which builds frames independently of the RTL: a
bit-serial CRC, a reference UDP/IPv4 and ARP builder, and padding. The testbenches start
every register at a random value (`+verilator+rand+reset+2`), so reset coverage is
exercised.

| Testbench | What it shows |
|---|---|
| `tb_crc32` | CRC against the bit-serial model; residue on good frames |
| `tb_period_timer` | exact tick spacing; first tick; no ticks while disabled |
| `tb_pkt_gen` | UDP and ARP bytes against the reference builder, with back-pressure |
| `tb_mac_tx` | preamble/SFD, padding on and off, FCS, exact 12-byte gap |
| `tb_manchester_tx` | cell levels, bit order, end-of-frame positive level, byte-tick rate |
| `tb_manchester_rx` | decoding at 6 samples/bit, SOF/EOF, shortened preamble |
| `tb_mii_tx_if`, `tb_mii_rx_if` | nibble order, one byte per two MII clocks, preamble removal, odd nibble |
| `tb_frame_check` | good, CRC error, too short, too long, boundary lengths |
| `tb_mac_wb_regs` | register read-back, start/release pulses, ACK timing |
| `tb_pkt_ram`, `tb_sync_fifo` | read latency and read-first; FIFO full/empty with random traffic |
| `tb_lcd_ctrl` | init sequence, character codes, E pulse width and command spacing |
| `tb_eth_mac` | send from RAM, loop back through MII, receive, hold, drop, release |
| `tb_mac_ctrl_fsm` | register set-up, UDP then ARP per tick, hand-off to the host |
| `tb_nexys3_mws` | periodic frames on MII, gap, period, frames read back by a slow host |
| `tb_d2sb_udp_arp_sender` | line frames decoded from the pair, loop-back receive, LCD text, LEDs |
| `tb_eth_web_fpga_top` | both halves at full size (1 s period, 100/20/60 MHz) |

`tb_eth_web_fpga_top` runs the top with every parameter at its default, through just
over one simulated second, in about 3 minutes.

**Nexys3 half:**
* the first UDP and ARP frames on MII;
* their loop-back reception;
* an injected bad-FCS frame;
* a frame dropped while the slow host holds the buffer;
* padding and the inter-frame gap.

**D2SB half:**
* the same two frames on the Manchester pair;
* a burst of good and corrupted frames from a line model;
* FIFO overflow into `lcd_skipped`;
* LCD records shown;
* the LED toggles.

Each of these mechanisms is counted, and a mechanism that never happens fails the test.
The other testbenches shorten the periods and clock rates through parameters so that they
run in seconds.

Limits of the verification:
* There is no PHY model beyond loop-back and a line driver.
* Clock-domain behaviour is simulated with ideal clocks, not with metastability.
* The LCD timing is checked against the HD44780 datasheet minima, not a real display.
