# Ethane flow switch datapath

An Ethane network takes every forwarding decision away from the switches. A
central controller checks each new flow against a network-wide policy and, if
the flow is allowed, installs an exact-match entry for it in every switch on
the path. The switch has no learning, no routing, no spanning tree and no
access lists. It keeps a flow table and does what the matching entry says.
A packet that matches no entry goes to the switch's local CPU, which asks the
controller.

This repository holds synthesizable SystemVerilog for the hardware forwarding
path of such a switch: four Gigabit Ethernet ports, a 62.5 MHz clock, a 64-bit
datapath, and an 8,192-entry flow table in two external 32-bit SRAM banks. The
table is looked up by double hashing. Testbenches for every block and for the
whole datapath are in `tb/`.

## How a packet is handled

```
 RX stream ─► A undersize_checker ─┬─► B header_parser ─► C crc_hash ─► request FIFO
                                   │                                       │
                                   │          SRAM P, Q ◄─► E sram_ctrl ◄─► D flow_lookup
                                   │                          ▲              │
                                   │                    CPU flow-table port  ▼
                                   └─► F word_buffer ──────────────► G hdr_overwrite_enq ◄─ result FIFO
                                                                      │        │        │
                                                         port queues (H, I, ...)  J to CPU   (dropped)
                                        K from CPU ─┐         │                    │
                                                    ▼         ▼                    ▼
                                                  L rr_mux ─► TX stream      CPU RX stream
```

The letters are the block names used in the comments of each file.

1. **A, undersize check.** A packet shorter than 64 bytes is discarded
   whole. Every other packet goes to B and F at the same time.
2. **B, header parser.** Up to the first 80 bytes are copied into a header
   buffer. The 155-bit *flow tuple* is extracted from them (table below).
3. **C, hashing.** The tuple is padded to 160 bits with five zero bits at
   the bottom. It goes through two different CRC-32 generators, CRC-32 (IEEE)
   and CRC-32C. The low 12 bits of each CRC give an index into one of the two
   hash tables of 4,096 slots.
4. **D, lookup.** Both candidate slots are read from SRAM, one after the
   other. A slot hits if its valid bit is set and its stored tuple equals the
   packet's tuple. Table 0 wins if both hit. On a hit, the entry's 20-bit
   packet counter is incremented and the packet length is added to its 32-bit
   byte counter. Both counters wrap. The counter word is then written back.
5. **F, word buffer.** The packet's words wait here until their lookup
   result is ready. Results and packets are both in packet order, so no tags
   are needed.
6. **G, action.** Each packet is paired with its result and does one of
   three things:
   - it goes to an output-port queue;
   - it goes to the CPU queue, on a miss or when the entry says CPU;
   - it is dropped, when the entry names the null port.
   The MAC destination and source addresses can be overwritten on the way.
7. **L, output.** A packet-granular round-robin multiplexer merges the port
   queues and the queue of packets sent by the CPU onto the TX stream.

Packets are carried as 64-bit words (`ethane_pkg::pkt_word_t`). Byte 0 of the
frame is in bits 63:56. `sop` marks the first word and `eop` the last. Two
sideband fields ride on every word but only matter on the first:
- `len` is the frame length in bytes, Ethernet CRC included;
- `port` is the ingress port on the RX side and the egress port on the TX
  side.

The RX stream is the merged output of the per-port MAC receive FIFOs, and the
TX stream feeds the per-port MAC transmit FIFOs. The MACs and their FIFOs are
not part of this RTL.

## The flow entry and its place in SRAM

The flow tuple, 155 bits, packed in this order (`ethane_pkg::flow_tuple_t`):

| field | bits |
|---|---|
| MAC destination, low 16 bits | 16 |
| MAC source, low 16 bits | 16 |
| Ethertype | 16 |
| IPv4 source | 32 |
| IPv4 destination | 32 |
| IP protocol | 8 |
| TCP/UDP source port | 16 |
| TCP/UDP destination port | 16 |
| ingress port | 3 |

Fields a frame does not have are zero. A non-IPv4 frame has no IP fields or
ports, and an IPv4 frame that is neither TCP nor UDP has no ports. The ports
are located with the IP header-length field, so IP options are handled. VLAN
tags are not parsed.

An entry is the tuple plus a 152-bit action and statistics field: 307 bits in
all. Each entry sits in a 320-bit slot, which is five 64-bit SRAM words
(`ethane_pkg::flow_slot_t`, most significant bits first):

| slot bits | field |
|---|---|
| 319:165 | flow tuple |
| 164 | valid |
| 163:161 | destination: 0-5 physical port, 6 CPU, 7 null (drop) |
| 160:113 | MAC destination overwrite (0 = keep) |
| 112:65 | MAC source overwrite (0 = keep) |
| 64:52 | unused |
| 51:32 | packet counter |
| 31:0 | byte counter |

Word *k* of a slot is bits `[319-64k -: 64]`, so both counters are in word 4
and one write updates them. Slot *s* occupies SRAM words `5s .. 5s+4`. Slots
0-4095 are hash table 0 and slots 4096-8191 are hash table 1. Each 64-bit word
is split across the two banks: bank 0 holds bits 31:0 and bank 1 holds bits
63:32. The table uses 8,192 × 40 bytes = 320 KB of the 4 MB the two 512K × 32
banks provide.

### Installing entries from software

Software uses the CPU flow-table port of `sram_ctrl`. Each access reads or
writes one 32-bit word. The address is `{64-bit word address, bank}`, so
64-bit word *w* is CPU words `2w` (bits 31:0) and `2w+1` (bits 63:32).

To install a flow, software:
1. computes both CRC indices, exactly as `crc_hash` does;
2. writes the slot into whichever table has a free slot;
3. writes the word holding the valid bit (word 2) last.

If both slots are taken, the flow has collided and software must handle its
packets itself. `tb_flow_occupancy` installs random flows this way:

| concurrent flows | in table 0 | in table 1 | collided |
|---|---|---|---|
| 500 | 472 | 28 | 0 |
| 1,500 | 1,240 | 247 | 13 (0.9 %) |

The published prototype saw no collisions with up to 500 active flows, and
the 500-flow round agrees. At 1,500 flows a few collide, so the software
fallback is needed. Doubling the
table (`IDX_W = 13`) reduces collisions further and still fits in the SRAM. To read a flow's counters, software reads CPU words
`2(5s+4)` and `2(5s+4)+1`. At full line rate the packet counter wraps in
about 0.7 s and the byte counter in about 34 s. Polling every 0.5 s and every
30 s respectively keeps up with both.

The hardware does not keep an activity bit, time entries out or evict them.
Software infers activity from the counters and clears the valid bit to remove
an entry.

## Timing: the 16-cycle packet budget

The SRAM controller (`sram_ctrl`) runs a free-running 16-cycle frame. In the
last cycle of each frame the CPU has priority. In every other cycle the
lookup block does. Either side may use a cycle the other leaves idle.

| step of one lookup | cycles |
|---|---|
| accept the request | 1 |
| issue ten reads (two slots) | 10 |
| wait for the last read (`RD_LAT`) | 2 |
| compare, write the counters back, emit the result | 1 |
| **total** | **14** |

A CPU access can cost one more cycle per frame, giving at most 15. The design
therefore keeps within a budget of one packet per 16 cycles: two slot reads,
one counter update and one CPU access. At 62.5 MHz that is 3.9 million
packets per second.

Two ports at Gigabit line rate need:
- 2.98 Mpackets/s with 64-byte frames (one packet every 21 cycles);
- 61.8 M words/s with 1518-byte frames, against a capacity of 62.5 M.

So the datapath forwards two full-duplex ports at line rate for every frame
size. `tb_line_rate` measures this:

| frame size (bytes) | 64 | 65 | 100 | 1518 |
|---|---|---|---|---|
| forwarded, Mb/s (Ethernet CRC counted, gap and preamble not) | 1523 | 1529 | 1666 | 1962 |
| line rate for two ports, Mb/s | 1524 | 1529 | 1667 | 1974 |

The small shortfalls are end effects of the measuring window, which for
1518-byte frames is only 40 packets per port. No receive FIFO ever held more than one waiting
packet.

Four ports at line rate with minimum-size frames would need 5.95 Mpackets/s.
A single lookup engine at 62.5 MHz cannot reach that. It would need a faster
clock or two SRAMs looked up in parallel.

Flow control inside the datapath:
- RX accepts a new packet only while the request FIFO between C and D has
  room for its lookup;
- the word buffer pushes back when full;
- every queue pushes back on block G, which stops mid-packet if needed.

Nothing is dropped except by an action or the undersize check.

## Blocks and files

| file | block | what it does |
|---|---|---|
| `rtl/ethane_pkg.sv` | – | word, tuple, slot and result types, port codes, CRC function |
| `rtl/undersize_checker.sv` | A | drops frames under 64 bytes, counts them |
| `rtl/header_parser.sv` | B | builds the flow tuple |
| `rtl/crc_hash.sv` | C | two CRC-32 indices, registered |
| `rtl/flow_lookup.sv` | D | two slot reads, compare, counter update |
| `rtl/sram_ctrl.sv` | E | arbitration of lookup and CPU over the two banks |
| `rtl/word_buffer.sv` | F | packet word FIFO (1,024 words) |
| `rtl/hdr_overwrite_enq.sv` | G | action: forward, to CPU or drop, MAC rewrite |
| `rtl/pkt_queue.sv` | H, I, J, K | store-and-forward packet queue (512 words) |
| `rtl/rr_mux.sv` | L | round-robin packet multiplexer |
| `rtl/sync_fifo.sv` | – | small FIFO for lookup requests and results |
| `rtl/ethane_datapath.sv` | top | wires it all together |

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `NUM_PORTS` | 4 | physical ports (at most 6 with the 3-bit destination code) |
| `IDX_W` | 12 | log2 of the slots per hash table; the table holds 2 × 2^IDX_W entries |
| `AW` | 19 | SRAM word address width (512K words per bank) |
| `RD_LAT` | 2 | SRAM read latency in cycles |
| `BUF_DEPTH` | 1024 | word buffer depth |
| `QUEUE_DEPTH` | 512 | depth of each output queue, in words |
| `REQ_DEPTH` | 8 | depth of the lookup request and result FIFOs |

Each output queue must hold at least one maximum-size packet (190 words for
1518 bytes). A 16K-entry table (`IDX_W = 13`) still fits the SRAM.

The top brings out these interfaces:
- the RX and TX streams;
- the CPU packet streams in both directions;
- the CPU flow-table port;
- the pins of both SRAM banks;
- seven 32-bit statistics counters.

Reset is asynchronous and active low. Memories are not reset.

## What follows the published design and what is this design's own

These follow the published prototype:
- the block structure and order;
- the 64-byte minimum frame;
- the fields and widths of the tuple and of the action (valid, 3-bit
  destination, two 48-bit MAC overwrites, 20-bit packet counter, 32-bit
  byte counter);
- the 160-bit padding;
- double hashing with two CRCs into two tables of one SRAM, looked up one
  after the other;
- 8,192 entries and the 320 KB footprint;
- two 32-bit × 512K banks;
- one packet per 16 cycles at 62.5 MHz, with two entry reads, one counter
  update and one 4-byte CPU access in that time;
- the three outcomes of a lookup;
- the queues to the ports, to the CPU and from the CPU;
- the round-robin output multiplexer.

These were chosen here, where the published description is silent:
- the 64-bit word format and its sideband;
- a single merged RX and TX stream;
- the CRC polynomials, preset and index bits;
- the slot bit layout and SRAM memory map;
- the encoding of the destination field;
- all-zero overwrite fields meaning "keep";
- the arbitration scheme and the 2-cycle SRAM latency;
- all FIFO and queue depths, and store-and-forward queues;
- how non-IPv4, non-TCP/UDP and IP-option frames fill the tuple;
- the statistics counters at the top level.

Departures and omissions to be aware of:
- **One flow table with two hash tables.** An earlier part of the
  description speaks of one exact-match table for application flows and
  another for misbehaving hosts. The detailed hardware description uses two
  hash tables for all entries, and that is what is built. There is no
  separate per-host entry matching only a source address and ingress port.
  To block a host, the controller installs a null-port entry for each of
  its flows. Until that entry exists, the host's packets miss and go to
  software, which can discard them.
- **No activity bit.** The general description mentions one, but the
  152-bit action layout leaves no room for it. Activity is read from the
  counters.
- **Only two of the possible actions.** Per-class queues, rate control and
  other header rewrites beyond the two MAC addresses are mentioned as
  possible extensions. They are not built.
- **Software is outside.** The small associative table for collided flows,
  the wildcard table and entry time-outs live in switch software, which is
  not part of this RTL.
- **Figure labels.** The block diagram labels only two port queues. With
  `NUM_PORTS = 4` there are four.
- **Shared CPU word.** A CPU write to a counter word can race with a
  hardware counter update of the same entry. The later write wins, so
  software should clear counters only when the entry is invalid.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ethane_datapath \
  -y rtl -y tb +libext+.sv rtl/ethane_pkg.sv tb/tb_util_pkg.sv tb/tb_ethane_datapath.sv
./obj_dir/Vtb_ethane_datapath
```

Replace the top module and file for any other testbench. The packages must
come first on the command line.

| testbench | what it shows |
|---|---|
| `tb_ethane_datapath` | The whole datapath at default size, run through a full sequence. Flows are installed through the CPU port. It then checks: forwarding, MAC rewrite, send-to-CPU, null-port drop, a hash-table-1 hit after a collision, misses, undersize drops, CPU-sent packets, counters read back by the CPU, back-pressure on both sides, and a burst of 200 back-to-back minimum-size frames. |
| `tb_line_rate` | The forwarding-rate table above: two ports at full line rate. |
| `tb_flow_occupancy` | 500 and 1,500 concurrent flows installed as software would, then every flow sent once. |
| `tb_<block>` | One per block, with its own reference model. |

`tb/sram_bank_model.sv` is a behavioural model of one external SRAM bank with
a fixed read latency. `tb/tb_util_pkg.sv` contains the testbench helpers:
- a frame builder;
- the expected tuple, built directly from the header fields;
- a reference CRC computed by polynomial long division;
- slot packing.

The whole-datapath and line-rate testbenches use two 512K-word SRAM models
and run in seconds.
