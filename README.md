# OLT datapath for a distributed-control hybrid PON

In a passive optical network (PON) one optical line terminal (OLT) at the
central office serves several optical network units (ONUs) at the
subscribers over a shared fibre tree. In the *distributed-control hybrid
PON* this design belongs to, the ONUs no longer ask the OLT for upstream
time slots, which costs a round trip of tens of kilometres. Instead they
report their queue sizes to a dynamic bandwidth allocation (DBA) processor
next to the splitter. That processor grants the ONU with the longest queue,
so the grant comes back almost at once. The network is "hybrid" because the
ONUs share a wavelength by time division up to an arrayed waveguide grating,
and wavelength division is used beyond it.

The scheduling is done out in the field, so the OLT does no polling or
granting. Its job is a datapath:

* **Upstream.** It receives a stream of fixed 280-byte frames from four
  ONUs. Each frame carries one fragment of an Ethernet packet. The OLT puts
  the packets back together per ONU and sends whole packets out on a
  Gigabit Ethernet (GMII) port.
* **Downstream.** It takes Ethernet packets from the GMII port, puts a short
  PON header in front of each, and sends them to the ONUs.

Each ONU, in turn, packs its subscriber's Ethernet packets into those
frames and holds them until the DBA processor grants it a slot, and picks
its own packets out of the downstream broadcast.

This repository holds synthesizable SystemVerilog for the OLT datapath, the
ONU and the DBA processor, joined in a system top (`dhpon_system`: one OLT,
four ONUs, one DBA processor), with a self-checking testbench for every
block.

## Data formats

Data is sent as 16-bit words, big-endian: the first byte is in bits 15:8.

### Upstream frame (one per 280-byte slot)

| bytes | field | value |
|---|---|---|
| 8 | preamble | `AA` × 8 |
| 1 | delimiter | `E2` |
| 1 | ONU-ID | 1…4 |
| 2 | payload length | bits 14:0 = payload bytes (1…268), bit 15 = last fragment of the Ethernet packet |
| n | payload | fragment of the Ethernet packet |
| 268 − n | idle | fill up to 280 bytes |

The header is 12 bytes, so a frame carries at most 268 payload bytes. An
Ethernet packet of 46 to 1500 bytes therefore takes one to six frames. Only
the frame that holds the last fragment has bit 15 set.

### Downstream frame (variable length)

| bytes | field | value |
|---|---|---|
| 3 (`PSYNC_BYTES`) | PSYNC | `AA` |
| 1 | delimiter | `E2` |
| 2 | payload length | packet bytes |
| n | Ethernet packet | as received on GMII |

A 187-byte packet starts `AAAA AAE2 00BB`. When no packet is waiting, the
framer sends idle words (`0000`).

## Upstream path

```
us_din ─► pon_processor ─► onu_buffer ×4 ─► onu_mux ─► gmii_tx ─► TXD/TXEN
 77.76 MHz, 16 bit                                    │  125 MHz, 8 bit
```

**Frame alignment (`pon_processor`).** The SerDes gives one word per clock
with no valid flag. The receiver may lose some preamble bytes, so a frame can
start on either half of a word. Two registers keep the last two input words.
From them the block builds the stream both as it is and shifted by one byte,
and in each it looks for `AAAA` followed by the delimiter byte. Whichever
offset matches is used for the rest of the frame, so the payload leaves on
word boundaries. The block reads the ONU-ID and length, forwards the payload
words, and tags the last word of the fragment. It also tags the last word of
the Ethernet packet (length bit 15). The idle fill is skipped by going back
to searching. A frame with an unknown ONU-ID, or with a length of 0 or more
than 268, is thrown away.

**Reassembly and counting (`onu_buffer`).** Each ONU has its own buffer of
2048 words. A frame can only come from one ONU at a time, so the fragments
of one ONU's packet arrive in order. They are stored back to back, which puts
the packet together again. Each buffer has a counter of *complete* packets:

* It goes up when the last word of a packet is written.
* It goes down when that word is read out.

A commit pointer keeps the reader from ever seeing a packet that is still
arriving. If the buffer fills in the middle of a packet, that packet is
dropped whole: the write pointer goes back to the commit point, and the
packet's remaining fragments are thrown away.

**Choosing the next packet (`onu_mux`).** Whenever it is idle, the
multiplexer picks the buffer that holds the most complete packets. On a tie,
the lower-numbered ONU wins (ONU1, ONU2, ONU3, ONU4). It then sends exactly
one packet and decides again. Packets are never interleaved on the Ethernet
side, even when their fragments were interleaved on the PON side. Example:
packet 3 from ONU3 is split into A and B, and packet 4 from ONU4 into C and
D. The frames arrive in the order A, C, B, D. Packet 3 becomes available
when B arrives and packet 4 when D arrives, so they leave one right after
the other.

**GMII transmit (`gmii_tx`).** Words cross from the 77.76 MHz clock to the
125 MHz GTXCLK through a 16-entry dual-clock FIFO. They leave as bytes,
high byte first, with TXEN high for the whole packet. The byte after an odd
final byte is not sent. Packets are at least 12 byte times apart. A packet is
only started once it is complete in its ONU buffer, and the word side
supplies up to 155.5 Mbyte/s against 125 Mbyte/s drained, so the FIFO cannot
run dry. If it ever did, TXER would be raised to the end of that packet.

## Downstream path

```
RXD/RXDV ─► gmii_rx ─┬─► data_buffer ──┬─► framer ─► ds_dout
 125 MHz, 8 bit       └─► length_buffer ┘   77.76 MHz, 16 bit
```

**GMII receive (`gmii_rx`).** Bytes taken while RXDV is high are packed into
words, and the bytes of each packet are counted. The last word of a packet
is marked. An odd final byte goes out as a half-filled word. The byte count
goes into the length store once the packet has ended. A packet is only
accepted if, at its first byte, the data buffer can hold the longest allowed
packet (1526 bytes) and the length store is not full. Otherwise the whole
packet is ignored.

**Stores (`data_buffer`, `length_buffer`).** Both are dual-clock FIFOs,
written at 125 MHz (RXCLK) and read at 77.76 MHz. The data buffer holds 2048
words and the length store holds 16 counts. The GMII side has no length
field, and the count is known only at the end of a packet. So the framer
waits for a count before it starts a frame, which makes the downstream path
store-and-forward.

**Framer (`framer`).** For each count it sends the header words, then the
packet's words one per clock, then goes back to idle. Between back-to-back
frames there is exactly one idle word.

## Clocks, rates and reset

| clock | frequency | used by |
|---|---|---|
| `clk_pon` | 77.76 MHz | PON processor, ONU buffers, multiplexer, framer, read side of the downstream stores |
| `gtx_clk` | 125 MHz | GMII transmit |
| `rx_clk` | 125 MHz, recovered by the PHY | GMII receive, write side of the downstream stores |

The three clocks are treated as unrelated, and only gray-pointer FIFOs cross
between them. `rst_n` is asynchronous and is released separately in each
domain.

16 bits at 77.76 MHz is 1.244 Gbit/s on the PON side, against 1 Gbit/s on
GMII:

* **Downstream.** The framer always outruns the GMII input, so the
  downstream stores never fill.
* **Upstream.** A stream of full frames carries 268/280 × 1.244 =
  1.19 Gbit/s of payload, more than GMII can send. The ONU buffers absorb
  bursts. Sustained full load makes them drop whole packets, which the
  status counters show.

## The ONU (`onu_top`)

```
MII RX ─► onu_mii_rx ─► onu_ethernet_mac ─► onu_upstream_buffer ─► onu_framer ─► onu_data_buffer ─► upstream
 25 MHz, 4 bit                                    │ 77.76 MHz                          ▲ grant   │ queue size
                                                                                   DBA processor ◄┘
downstream ─► onu_pon_mac ─► onu_mii_tx ─► MII TX
```

**Upstream.** `onu_mii_rx` packs MII nibbles (low nibble of each byte
first) into 16-bit words and marks the last word of each packet.
`onu_ethernet_mac` counts the packet's bytes. `onu_upstream_buffer` keeps
the words and the counts in two dual-clock FIFOs, from the MII clock to the
PON clock. A packet is refused whole at its first nibble if the longest
packet would not fit.

`onu_framer` is the mirror image of the OLT's PON processor. It reads a
length, cuts the packet into fragments of at most 268 bytes, and writes each
fragment as a complete 140-word frame: `AAAA` ×4, `E2` with the ONU-ID, the
length with bit 15 on the last fragment, the payload, and `0000` fill.
`onu_data_buffer` queues these frames. Its queue size, counted in whole
frames, goes to the DBA processor. On a grant it sends exactly one frame,
one word per clock. The rest of the time it outputs `0000`.

**Downstream.** `onu_pon_mac` looks for `AAAA … AAE2`, reads the length,
and follows the packet through a delay line of seven words. The packet
passes only if the destination MAC address (packet bytes 8–13, after the
GMII preamble) is this ONU's own address or broadcast. The decision falls
when the address has been seen, so a packet always leaves whole or not at
all. `onu_mii_tx` sends the words as nibbles on MII through a dual-clock
FIFO. The PON side delivers a packet at 77.76 Mwords/s, far faster than
MII drains it, so transmission starts at once and cannot underrun. A
packet that finds too little room in the FIFO is dropped whole.

## The DBA processor (`dba_processor`)

The splitter-side processor divides the upstream into slots of
`SLOT_CLKS` = 160 PON clocks. That is 2.048 µs rounded up to whole clocks,
and it holds one 140-word frame plus a gap. At the start of each slot it
compares the four queue sizes. It grants the slot to the ONU with the most
frames queued; on a tie, the lower-numbered ONU wins. An ONU sends its
granted frame and its queue shrinks by one before the next slot is decided.
In the board example, ONU1 and ONU2 hold one frame each and ONU3 and ONU4
two each. The slots then go to ONU3, ONU4, ONU1, ONU2, ONU3, ONU4, so the
two-frame packets arrive at the OLT interleaved (A, C, B, D), as the OLT
must handle.

## System top: `dhpon_system`

The system top joins one `olt_top`, four `onu_top` and one `dba_processor`.
The ONUs' upstream outputs are ORed into the OLT's upstream input; only the
granted ONU is sending, and the others output `0000`. The OLT's downstream
output goes to every ONU. ONU *n* has ONU-ID *n* and MAC address
`02:00:00:00:00:0n`. The fibre, splitter, AWG and optics are not modelled:
the PON links are wires, and all units share `clk_pon`. Ports are the OLT's
GMII and status (below) and, per ONU, the MII receive and transmit sides,
plus the DBA grants and per-ONU event pulses.

Parameters: `ONU_BUF_AW` (11, the OLT's per-ONU buffer) and `SLOT_CLKS`
(160).

## OLT top level: `olt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_pon`, `rst_n` | in | 1 | PON clock, asynchronous active-low reset |
| `us_din` | in | 16 | upstream words from the SerDes receiver |
| `ds_dout`, `ds_in_frame` | out | 16, 1 | downstream words to the SerDes transmitter; high during a frame |
| `gtx_clk` | in | 1 | GMII transmit clock |
| `gmii_txd`, `gmii_tx_en`, `gmii_tx_er` | out | 8, 1, 1 | GMII transmit |
| `rx_clk` | in | 1 | GMII receive clock |
| `gmii_rxd`, `gmii_rx_dv`, `gmii_rx_er` | in | 8, 1, 1 | GMII receive |
| `status` | out | `olt_status_t` | 16-bit event counters (frames, bad headers, realignments, dropped fragments, tie decisions, packets out, underruns, downstream packets in, dropped and sent) |

Parameters: `ONU_BUF_AW` (11: 2048 words per ONU), `DS_BUF_AW` (11),
`PSYNC_BYTES` (3). The frame constants, ONU count, preamble and delimiter
values live in `rtl/olt_pkg.sv`. The counters each run in their own clock
domain: read them while the link is idle.

## Where the design makes its own choices

The frame layouts, the field values, the four ONUs, the
most-packets-first rule with its tie order, the 16↔8-bit GMII conversion and
the two clock rates are the published design. The following points are this
implementation's own choices, made where the description leaves them open:

* **PSYNC length.** The framer description gives six PSYNC bytes, but a
  captured downstream frame shows three (`AAAA AAE2 00BB`). Three is the
  default because it keeps the header a whole number of words. `PSYNC_BYTES`
  accepts any odd value.
* **Upstream values.** The upstream delimiter and preamble bytes are taken
  to be the downstream values (`E2`, `AA`). ONU-IDs are 1 to 4. Idle is
  `0000`.
* **Byte realignment.** Losing preamble bytes is handled by the one-byte
  realignment described above. Frames with a bad ONU-ID or length are
  rejected.
* **Depths and handshakes.** All buffer depths, the valid/ready handshakes,
  the clock-domain FIFOs and the reset synchronisers.
* **Overflow, admission and errors.** The overflow rule (drop the whole
  packet), downstream admission and truncation, the TXER-on-underrun
  behaviour and the inter-packet gap.
* **Status counters.** These are additions for monitoring.

On the ONU side and at the splitter the published design names each part
and says what it does, but not how. These blocks are therefore the simplest
logic that does the job:

* The nibble order on MII and the position of the destination address are
  standard Ethernet practice.
* The DBA processor counts queue sizes in frames and grants one frame per
  2.048 µs slot, with the same tie order as the OLT multiplexer.
* Broadcast packets go to every ONU.
* The upstream uses OR combining, and all units share one clock.

Not in this RTL:

* the SerDes and the Ethernet PHYs, which are external devices;
* the Gigabit Ethernet MAC, which is only named in the OLT data flow and has
  no function in the described datapath (GMII bytes pass through
  unchanged);
* the optical parts (splitter, AWG, lasers), and the control wavelength
  that carries queue sizes and grants. Here they are plain wires.

## Verification

Every block has a testbench in `tb/` that checks itself and ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | what it shows |
|---|---|
| `tb_pon_processor` | payload, ONU and packet-end tags at both byte offsets; lost preamble; bad ID/length rejected; one word per clock |
| `tb_onu_buffer` | packet counter, incomplete packets hidden, order, whole-packet drop on overflow and recovery |
| `tb_onu_mux` | decision sequence against a reference (most packets, lowest ONU on ties); one word per clock with one clock between packets; random back-pressure |
| `tb_gmii_tx` | bytes on TXD in order, unbroken TXEN per packet, 12-clock gap, odd lengths, a deliberate underrun flagged by TXER |
| `tb_gmii_rx` | word packing, odd lengths, lengths including the 187-byte packet, refused and truncated packets |
| `tb_data_buffer`, `tb_length_buffer` | order across unrelated clocks, full at exactly the depth |
| `tb_framer` | header `AAAA AAE2 LLLL`, payload, zero padding, one word per clock, one idle word between frames, starvation flag |
| `tb_olt_top` | both directions end to end with 256-word ONU buffers. Covers the four-packet board test (fragments A, C, B, D), byte-shifted frames, an unknown ONU-ID, bursts that force tie decisions, and a 1500-byte packet dropped on overflow. Every other packet must arrive complete and in order |
| `tb_olt_full` | the same traffic with every parameter at its default and no overflow allowed |
| `tb_onu_mii_rx` | nibble order, word packing, odd lengths, a refused packet, at most one word per four clocks |
| `tb_onu_ethernet_mac` | byte counts (1, 2, 1518 and random) given with the last word |
| `tb_onu_upstream_buffer` | words and lengths in order across clocks; `room_ok` falls when full and returns when emptied |
| `tb_onu_framer` | every frame word against independently built frames, fragments up to 268 bytes, packet-end bit, fill to 140 words |
| `tb_onu_data_buffer` | queue size, one whole frame per grant, two clocks after the grant, idle `0000`, grants with an empty queue |
| `tb_dba_processor` | slot spacing, largest queue wins, lowest ONU on ties, no grant when all are empty, the board example order |
| `tb_onu_pon_mac` | own, broadcast and foreign addresses, whole packets only, seven-clock latency, short headers skipped |
| `tb_onu_mii_tx` | nibble order, TX_EN per packet, 24-clock gap, a dropped packet when the FIFO is full |
| `tb_dhpon_system` | the whole network at default parameters: the four-packet board example and random traffic upstream from all four ONUs to GMII, and downstream from GMII to the right ONUs. Counts fragmented packets, DBA grants and ties, OLT multiplexer ties, odd lengths, broadcasts and filtered packets |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_dhpon_system \
  -y rtl -y tb +libext+.sv -Irtl rtl/olt_pkg.sv tb/tb_dhpon_system.sv
./obj_dir/Vtb_dhpon_system
```

The testbenches use `$urandom` for data and lengths and run in a few seconds.
All of them pass. The design has been simulated only, not tried in hardware.
The GMII and MII timing against real PHYs and the SerDes word alignment are
therefore untested. The ONU was only simulated on the shared PON clock;
real ONUs recover their own clocks. In particular, the byte realignment assumes the SerDes
delivers a word stream that is at worst one byte off.
