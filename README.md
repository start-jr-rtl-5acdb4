# StarT-jr network adapter: Squall module and Arctic network card

StarT-jr turns ordinary PCs into a parallel machine. Each PC gets a PCI card
carrying an i960 *service processor* (SP) and a small amount of custom
hardware. The SP relieves the host of two jobs:

- **Message passing.** The SP formats packets and exchanges them with other
  nodes over the Arctic switch fabric.
- **Global shared memory (GSM).** A 128 MB window of the host's address space
  (0xC0000000–0xC7FFFFFF) is shared by every node. A two-set, level-one cache
  in fast dual-ported SRAM answers host accesses to it. Anything the hardware
  cannot answer on its own is passed to SP software, which runs the coherence
  protocol.

The custom hardware is deliberately small. The SP does the clever work in
software. The hardware keeps the common case fast: a packet goes out with no
per-word handshaking, and a shared-memory hit is served without the SP. The
hardware also makes every uncommon case safe for software to handle: a packet
with a bad CRC never becomes visible, and a shared-memory miss is held off by
bus retries until the SP has fixed things.

This repository holds synthesizable SystemVerilog for that custom hardware,
with one self-checking testbench per block. The processors, the PCI interface
chip, the SP's DRAM and the Arctic router are not part of it; they appear as
ports.

```
             SP local bus (clk_lb)                      Arctic cable
   i960 SP ─────┬───────────────────────────┐         (16 bit @ 80 MHz)
                │                           │
        ┌───────┴──────┐  HPTF/LPTF ┌───────┴────────────────────────┐
        │     mphi     │ ─────────► │ arctic_nic                     │
        │ 4 packet     │            │  core (20 MHz): CRC, credits,  │── tx data/PHASE/FRAME ─►
        │ FIFOs + ctrl │ ◄───────── │  register requests, errors     │◄─ BUFFER_FREE ──────────
        └──────────────┘  HPRF/LPRF │  link_tx (80 MHz) link_rx (rx) │◄─ rx data/PHASE/FRAME ──
                                    └────────────────────────────────┘── BUFFER_FREE ─────────►
   PCI chip ── GSM port ── acd ── port A ─┐
                                          dpsram (16 KB)
   SP ──────────────────────────── port B ┘
```

## Files

| File | Contents |
|---|---|
| `rtl/startjr_pkg.sv` | Shared constants: address map, tag/control word, packet header bits, register-request opcodes, error register |
| `rtl/startjr_node.sv` | Top level: one node's custom hardware |
| `rtl/mphi.sv` | Message-passing hardware interface: HPTF, LPTF, HPRF, LPRF and the control register |
| `rtl/pkt_fifo.sv` | Dual-clock FIFO that exposes only whole packets; supports commit and abort |
| `rtl/arctic_nic.sv` | Arctic network card: core, link halves, NIC FIFOs, clock crossings |
| `rtl/arctic_nic_core.sv` | 20 MHz transmit and receive engines, buffer credits, register requests, error register |
| `rtl/arctic_link_tx.sv` | 32-bit words to 16-bit cable halves; PHASE and Manchester-coded FRAME and BUFFER_FREE |
| `rtl/arctic_link_rx.sv` | Cable to 32-bit words; PHASE, FRAME and BUFFER_FREE checking |
| `rtl/crc16_ccitt32.sv` | CCITT-16 CRC, one 32-bit word per clock |
| `rtl/acd.sv` | Address capture device: the GSM level-one cache controller |
| `rtl/dpsram.sv` | 16 KB dual-ported synchronous SRAM |
| `rtl/sync_2ff.sv`, `rtl/rst_sync.sv`, `rtl/gray_event_sync.sv` | Clock-domain crossing helpers |
| `tb/tb_<block>.sv` | Self-checking testbench for each block |
| `tb/tb_startjr_node.sv` | End-to-end test of the whole node at default sizes |
| `tb/tb_two_nodes.sv` | Two nodes joined by a cable: latency, echo round trip, bidirectional traffic |

## Message path

### The SP's view: four packet FIFOs

The SP sees four FIFOs, 512 × 32 bits each:

- **HPTF** and **LPTF**: high- and low-priority transmit.
- **HPRF** and **LPRF**: high- and low-priority receive.

Each FIFO entry also carries a *last word* flag. The SP writes every word of a
packet to a FIFO's data address, except the final word. The final word goes to
the FIFO's *last-word* address, which marks it and **commits** the packet.

`pkt_fifo` shows its reader only committed words. This has two consequences:

- The network card never starts on half a packet.
- On the receive side, the SP needs to test the empty flag only once per
  packet. Once the flag says "not empty", a complete packet is there.

The FIFO can also **abort**, which discards uncommitted words. The network
card aborts a received packet whose CRC is wrong, so a bad packet never
appears to the SP.

`pkt_fifo` crosses clocks with gray-coded read and committed-write pointers
through two-flop synchronizers. The flags therefore lag by two or three
clocks of the other side. The lag only makes them conservative.

**MPHI registers** (word addresses in the MPHI window):

| addr | write | read |
|---|---|---|
| 0 / 1 | HPTF word / last word | – |
| 2 / 3 | LPTF word / last word | – |
| 4 | – | pop HPRF |
| 5 | – | pop LPRF |
| 6 | bit 9 FIFO reset, bit 8 NIC reset | `{last-flag of last pop, fifo_reset, nic_reset, 0000, hprf_empty, lprf_empty, hptf_full, lptf_full}` |

Notes on the flags:

- A transmit FIFO reads "full" as soon as it cannot take another maximum
  packet of 24 words.
- NIC reset is set at power-up. While it is set, the whole network card is held
  in reset.
- FIFO reset empties all four FIFOs. The SP uses it during error recovery.

### Packets and register requests

The first word of each HPTF/LPTF entry decides what it is:

| First word | Meaning |
|---|---|
| bit 31 = 0 | A network packet. Bit 30 is its priority, which the receiver uses to steer it to HPRF or LPRF. Packets are at most 24 words (96 bytes). |
| bit 31 = 1 (HPTF only) | A register request, with opcode in bits 3:0. |

The register requests are:

| Opcode | Words | Action | Answer in HPRF |
|---|---|---|---|
| 1 `REG_RX_ENABLE` | 2 | Receive enable ← bit 0 of the second word; clear the error register; reset the router buffer count to 3 | `{0x8000_0001, old error register}` |
| 2 `REG_READ_ERR` | 1 | None | `{0x8000_0002, error register}` |

The error register is `{28'0, crc, buffer_free, phase, frame}`.

### Arctic link

The cable carries 16 data bits at 80 MHz in each direction. Pairs of 80 MHz
cycles carry one 32-bit word, upper half first. Three control lines go with
the data:

- **PHASE** toggles every cycle. It is low on the first half of a pair.
  A missing toggle is a PHASE error.
- **FRAME** is Manchester coded: one bit per pair, sent as the value and then
  its complement. A pair whose two halves are equal is a FRAME error.
  - FRAME is true for every word of a packet except the last. The last word is
    the CRC word, so the receiver can see the end coming.
  - After each packet the transmitter sends one all-zero idle word with FRAME
    false.
- **BUFFER_FREE** runs in the opposite direction to the data. It is Manchester
  coded the same way. A bad pair is a BUFFER_FREE error and counts as "no
  buffer freed".

`arctic_link_tx` runs on the 80 MHz transmit clock. It takes a word from the
NIC transmit FIFO every second cycle, which is the 40 MHz rate of the cable
word clock. `arctic_link_rx` runs on the clock received from the cable. It
writes received words to the NIC receive FIFO, commits a packet at its last
word, and aborts it on a PHASE or FRAME error.

The NIC core runs at 20 MHz and moves one word per clock. The cable needs
40 M words/s, so the two 32-bit NIC FIFOs decouple the rates:

- Transmit: the core starts a packet only when the NIC transmit FIFO has room
  for a whole one. It then commits the packet, together with its CRC word and
  idle word, so the packet goes out back to back.
- Receive: the NIC receive FIFO (128 words) holds the three packets the
  router may send ahead.

Measured end-to-end rate through the looped-back cable: about **68 MB/s** with
maximum-length packets, about 43% of the 160 MB/s link. The limit is the 20 MHz
core plus two overhead words per packet.

### Buffer credits and the two priorities

The Arctic router has three packet buffers per input. The sender must count
them:

- The core starts with 3 free buffers after `REG_RX_ENABLE`.
- It spends 1 per packet sent.
- It gets 1 back per BUFFER_FREE received.
- The last free buffer is kept for high-priority traffic. A low-priority packet
  needs 2 free buffers; a high-priority one needs 1. Low-priority congestion
  therefore never blocks high-priority packets.
- High priority goes first when both FIFOs have a packet waiting.

In the other direction, the core sends BUFFER_FREE as soon as it has moved a
good packet into HPRF or LPRF. When that FIFO is full, the move stalls, so no
BUFFER_FREE goes out and the router stops sending. Nothing is ever dropped for
lack of space.

### Errors and recovery

| Error | Effect |
|---|---|
| CRC | Packet discarded (FIFO abort), no BUFFER_FREE, reception disabled |
| PHASE | Partial packet discarded, reception disabled |
| FRAME | Partial packet discarded, reception disabled |
| BUFFER_FREE | Pair ignored, reception continues; one router buffer may be lost until re-initialization |

Every error sets its error-register bit and raises `irq_nic`.

The CRC is CCITT-16: x¹⁶+x¹²+x⁵+1, start value 0xFFFF, data MSB first. The
CRC goes in the low 16 bits of the CRC word and is computed over all the data
words of the packet. For the bytes "12345678" as two words, the check value is
0xA12B.

Bring-up and recovery are the same sequence:

1. Drain the good packets.
2. Reset the FIFOs, in case a partial packet is left (FIFO reset bit).
3. Clear the NIC reset bit, if it is set.
4. Send any packet once. The NIC transmit FIFO holds junk after power-up, and
   the idle word that follows a packet leaves the cable idle.
5. Issue `REG_RX_ENABLE` with bit 0 set.
6. Read its two-word answer, the old error register, from HPRF.

## Global shared memory cache

### DPSRAM layout (32-bit word addresses)

| Words | Use |
|---|---|
| 0x000–0x3FF | Set 0 data: 512 lines × 2 words |
| 0x400–0x7FF | Set 1 data |
| 0x800–0x9FF | Set 0 tag/control words, one per line |
| 0xA00–0xBFF | Set 1 tag/control words |
| 0xC00–0xFFF | SP scratch |

A GSM byte address splits as:

- offset inside the 128 MB window `[26:0]`;
- tag `[26:12]`;
- line index `[11:3]`;
- word in line `[2]`.

The tag/control word is:

| Bits | Field |
|---|---|
| 31:17 | tag |
| 4 | IR: interrupt on any read |
| 3 | IW: interrupt on write |
| 2 | NC: non-coherent |
| 1 | W: writable |
| 0 | R: readable |

### Address capture device

For every GSM access from the PCI chip, `acd` reads both tag/control words of
the line over DPSRAM port A (two clocks). It then decides in the third clock:

| Access | Condition (set 0 checked first) | Result |
|---|---|---|
| Read | tag matches and R | Complete. If IR, interrupt afterwards (split-phase reads). |
| Write | tag matches and (W or NC) | Complete. If IW, interrupt afterwards. |
| Write | no such set, but a set has NC with a different tag | Write into that line and interrupt |
| Anything else | – | No answer |

"No answer" works because the PCI chip's local-bus time-out, set just above
the ACD's 3-clock response time, turns into a PCI retry. Then the ACD:

- interrupts the SP;
- records the access: address, write data, direction, set, cause, and whether
  it completed;
- **disables itself**.

While disabled, every GSM access goes unanswered and is retried. This
continues until the SP has read the capture registers, fixed the tags or data,
and written the enable bit. The ACD also comes out of reset disabled, so that
tag space can be set up first.

ACD registers (word addresses in the ACD window):

| Addr | Contents |
|---|---|
| 0 | Captured address |
| 1 | `{completed[8], set[4], write[3], cause[2:0]}` |
| 2 | Captured write data |
| 3 | Control. Read: `{irq, enabled}`. Write bit 0: enable; writing 1 also clears irq. |

Cause codes: 1 read miss, 2 write miss, 3 interrupt-on-read, 4 non-coherent
write, 5 interrupt-on-write.

These rules support three ways of using the cache:

- **Coherent writes.** A write to a line this node does not own finds no
  W-marked tag match. It is retried until the SP has gained ownership.
- **Transparent (non-coherent) writes.** The SP dedicates one set to writes by
  marking all its lines NC with an unused tag. Any write then lands
  immediately, and the SP sorts it out from the interrupt.
- **Split-phase reads.** The SP fills a missing line with a "miss pattern" and
  sets IR. The retried read returns the pattern at once, so the host can sleep
  rather than spin. The interrupt tells the SP to revoke the line again.

## Top level and SP address map

`startjr_node` joins `mphi`, `arctic_nic`, `acd` and `dpsram`.

SP local-bus word addresses are decoded by `sp_addr[15:12]`:

| Window | Target |
|---|---|
| 0x0xxx | DPSRAM port B. The SP uses it to fill the cache, edit tags and use scratch. |
| 0x1xxx | MPHI registers |
| 0x2xxx | ACD registers |

Read data appears the clock after the read.

There are four clocks:

| Clock | Drives |
|---|---|
| `clk_lb` | SP local bus, DPSRAM, ACD, and the SP side of the Squall FIFOs |
| `clk_nic` | 20 MHz NIC core |
| `clk_tx` | 80 MHz transmit, also forwarded on the cable |
| `rx_clk` | From the cable |

Events cross domains as gray-coded counters, levels through two flops, and
resets through reset synchronizers.

## What is this design's own choice

The overall behaviour follows the original StarT-jr description: the four
priority FIFOs, packet-granular flags, CRC, PHASE/FRAME/BUFFER_FREE signalling,
three-buffer credit counting with a high-priority reserve, the enable command
that returns and clears the four-bit error register, the two-set level-one
cache with retry-by-silence, and capture and self-disable.

The following details were not specified and were chosen here:

- all register maps, bit positions and opcodes;
- the packet priority bit;
- the tag/control field layout;
- the DPSRAM layout within its quarters;
- the CRC start value and bit order, and the word order on the cable;
- the idle word value;
- the NIC FIFO depths (64 transmit, 128 receive);
- the `REG_READ_ERR` request;
- reloading the credit count on enable;
- high priority first when both wait;
- ACD set 0 priority and 3-clock timing.

**Simplifications**:

- Four-word SP bursts are ordinary single accesses.
- The FIFO depth of 512 is that of the FIFO parts such a card would use.
- The alternative IEEE 1394 network card is not included.
- Host-to-host DMA support is not included.

A simultaneous write by both DPSRAM ports to one word is resolved in favour of
port B (the SP).

## Simulating

All testbenches are self-checking and print
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_startjr_node \
    rtl/startjr_pkg.sv rtl/*.sv tb/tb_startjr_node.sv
./obj_dir/Vtb_startjr_node
```

Substitute any `tb_<block>` to test one block. `tb_startjr_node` uses every
default size. It loops the cable back on itself and drives the SP and PCI
sides. It counts, and requires at least one of, each of the following:

- high- and low-priority packets, and register requests;
- transmit stalls waiting for router buffers;
- receive stalls on a full HPRF;
- BUFFER_FREE returns;
- each of the four error kinds, injected as cable glitches, followed by
  recovery;
- GSM read and write hits;
- retried misses and SP refills;
- a non-coherent write;
- a split-phase read.

It finishes in about a second.

Other testbenches:

- `tb_two_nodes` joins two full-size nodes, each on its own slightly different
  clocks. It measures the one-way latency of a 24-word packet from the SP's
  last-word write to the packet appearing in the far HPRF: 3.53 µs. That is
  checked against 3.0–4.2 µs, the bounds set by three store-and-forward stages
  plus the synchronizers. It then echoes a packet back, and has both SPs
  exchange 40 packets of random length and priority at the same time.

- `tb_arctic_nic` checks the link rate (64–80 MB/s).
- `tb_acd` checks the 3-clock hit latency.
- `tb_crc16_ccitt32` compares 2000 random words with a bitwise reference.
- `tb_pkt_fifo` runs a 16-entry FIFO with random commits and aborts across
  unrelated clocks.

The `a_*` assertions inside the RTL are active with `--assert`. They check:

- no FIFO overrun;
- whole packets only;
- no NIC receive overflow;
- a stable GSM request while the ACD is deciding.
