# DMA ARQ: reliable end-to-end transport on a mesh network-on-chip

Soft errors can corrupt or lose packets in a network-on-chip. The usual
end-to-end remedy is an ARQ (automatic repeat request) protocol. The sender
keeps what it has sent until the receiver acknowledges it, and resends it after
an error. Stop-and-Wait sends one packet per acknowledgement round trip.
Go-Back-N allows n packets in flight but needs a retransmission buffer of n
packets. Neither suits DMA transfers, which are long bursts: throughput is
capped by the round trip time, or the buffers grow large.

**DMA ARQ** exploits two facts about DMA:

1. The length of a transfer (n_dma packets) is known when it starts. The send
   window is therefore the whole transfer. Every packet goes out as soon as
   its data is read, and the receiver answers once, at the end: an ACK, or a
   NACK that lists the missing packets so that only those are resent.
2. The data of a DMA transfer still sits in the sender's local memory. A
   packet that must be resent is read from memory again (at the cost of one
   memory access time, t_mem). No retransmission buffer is needed.

This repository holds synthesizable SystemVerilog for a 3 x 4 mesh NoC built
this way. Every node's network interface has:

- a DMA ARQ sender and receiver for DMA transfers;
- a Go-Back-N sender and receiver for general traffic, set by default to a
  window of 1, which is Stop-and-Wait;
- a local memory that the DMA sender reads and the DMA receiver writes.

Two protocol instances per node let DMA and general traffic travel in parallel.

## System structure

```
            tile side (ports of arq_noc_top, one set per node)
  dma_start_*  dma_*_done   gen_tx_*   gen_rx_*   mem_*    fault_inj
       |           |           |          |         |          |
  +----v-----------+----+ +----v---+ +----+---+ +---v------+   |
  | dma_arq_tx  dma_arq_rx| | gbn_tx | | gbn_rx | | local_mem|   |
  +--+------^-----+---^--+ +--+--^--+ +-+---^--+ +----------+   |
     | data |rply |   |data   |  |ACK   |   |ACK  (rd: dma_arq_tx,
     v      |     v   |       v  |      v   |      wr: dma_arq_rx)
  +--------------------------------------------------------+   |
  | network_interface: VC0 = data, VC1 = ACK/NACK,          |<--+
  | XY route insertion, per-VC ejection FIFOs and credits   |
  +---------------------------+----------------------------+
                              | local port
                        +-----v------+
                        | noc_router | x 12 in noc_mesh (3 rows x 4 columns)
                        +------------+
```

Node n sits at row n / 4 and column n % 4, with row 0 at the north edge.

| file | what it is |
|---|---|
| `rtl/arq_pkg.sv` | flit and head-flit types, packet types, CRC and XY-route functions |
| `rtl/arq_noc_top.sv` | the whole network: mesh plus, per node, interface, four engines and memory |
| `rtl/dma_arq_tx.sv`, `rtl/dma_arq_rx.sv` | DMA ARQ sender and receiver |
| `rtl/gbn_tx.sv`, `rtl/gbn_rx.sv` | Go-Back-N / Stop-and-Wait sender and receiver |
| `rtl/crc16_acc.sv` | CRC accumulator used by every engine |
| `rtl/local_mem.sv` | local memory with a pipelined read latency of t_mem |
| `rtl/network_interface.sv` | engines to router |
| `rtl/noc_router.sv`, `rtl/noc_mesh.sv` | wormhole VC router and the mesh |

## Packets and flits

A flit carries 128 data bits (16 bytes), a 2-bit kind (head, body, tail, or a
single-flit packet) and a 16-bit check field. The check field means something
only on the last flit of a packet. There it holds a CRC-16 (CCITT, 0x1021,
initial value 0xFFFF) over every data word of the packet. The route field of
the head is masked out of the CRC, because routers rewrite it. The packet
sizes follow from the 16-byte flit:

| packet | flits |
|---|---|
| DMA data, 128 bytes | head + 8 = 9 |
| general data, 64 bytes | head + 4 = 5 |
| DMA NACK | head + 1 bitmap flit |
| DMA ACK, general ACK | 1 |

Head-flit fields (`hdr_t`, most significant first):

| field | bits | use |
|---|---|---|
| route | 24 | eight 3-bit output ports, consumed from the low end; 0 = eject |
| ptype | 3 | DMA data / ACK / NACK, general data / ACK |
| src, dst | 4 + 4 | node ids |
| xfer_id | 8 | DMA transfer number |
| seq | 8 | DMA packet index, Go-Back-N sequence number, or ACK number |
| npkts_m1 | 8 | transfer length minus one |
| last | 1 | last packet of a DMA pass: asks for a reply |
| base_addr | 32 | receiver word address of packet 0 of the transfer |

## The DMA ARQ protocol in detail

### Sender (`dma_arq_tx`)

A command gives the destination node, a local source word address, a
destination word address and the number of packets (1 to 128). The sender
holds a bitmap of packets pending for the current pass. Two sequencers walk
that bitmap in ascending order:

- The **read sequencer** requests the 8 words of each pending packet from
  local memory. Memory reads are pipelined with latency t_mem. Results go into
  a 64-word prefetch FIFO, and reads are issued only when the FIFO has room.
- The **send sequencer** emits the head flit of the same packet, then one body
  flit per word taken out of the FIFO. The next head follows the previous tail
  in the very next cycle.

The memory latency is therefore paid once per pass, not once per packet. A
9-flit packet leaves every 9 cycles. The packet that empties the bitmap is
marked `last`. After its tail has left, the sender waits:

| event while waiting | reaction |
|---|---|
| ACK with this transfer number | transfer complete, `done` pulses |
| NACK with a bitmap | the bitmap becomes the pending set; only those packets are re-read and resent; the highest one is marked `last` |
| nothing for TOUT cycles | packet n_dma - 1 is re-read and resent, marked `last` |
| reply with a bad CRC, wrong transfer number or wrong source | ignored |

Each retransmission costs t_mem (the re-read), the packet itself and a round
trip. A lost reply therefore costs t_out + t_mem + a round trip, whatever the
length of the transfer.

### Receiver (`dma_arq_rx`)

Packets are collected into one of two 8-word staging buffers while their CRC is
computed. At the tail flit:

- **Corrupt packet:** dropped.
- **Intact packet of a new transfer** (another source or transfer number): the
  received-packet bitmap is cleared.
- **Packet whose bit is already set:** a duplicate, dropped.
- **Any other packet:** marked received and handed to the memory writer. The
  writer stores its 8 words at `base_addr + 8 * index`. Meanwhile the other
  buffer takes the next packet, so packets are accepted back to back.
- **Intact packet with the `last` flag**, duplicate or not: a reply follows
  once all accepted data is in memory. The reply is an ACK if no packet of the
  transfer is missing. Otherwise it is a NACK whose body flit is the 128-bit
  bitmap of missing packets.

`done` pulses when the last missing packet has been written. A receiver
handles one transfer at a time. Transfers to one receiver must be serialized
by software or by the DMA controllers. Transfers to different receivers may
overlap.

### Why the corner cases work

- **Last data packet lost.** No reply comes, so the sender times out and
  resends that packet. The receiver now sees `last` and answers with the NACK
  or ACK it owes.
- **ACK lost.** The sender times out and resends the last packet. The
  receiver drops the duplicate but acknowledges again.
- **NACK lost.** Same as a lost ACK: the resent last packet brings a new
  NACK.
- **Duplicate replies.** Replies that arrive after the sender has left the
  wait state are ignored. The timeout still guarantees progress.
- **Loss of a corrupt packet's payload.** The network never reorders packets
  of one stream, because each stream follows one XY path on one VC. The
  receiver's bitmap is therefore the whole truth about what is missing.

## Stop-and-Wait / Go-Back-N (`gbn_tx`, `gbn_rx`)

**Sender.** The sender copies each 64-byte tile packet into a retransmission
buffer of WINDOW packets and numbers it with an 8-bit sequence number. At most
WINDOW packets are unacknowledged. ACKs are cumulative: ACK a frees everything
before a. Once all buffered packets have been sent, a timer runs. If no ACK
arrives for TOUT cycles, the sender goes back and resends every
unacknowledged packet.

**Receiver.** The receiver keeps one expected sequence number per source. It
delivers in-order packets to the tile. Out-of-order and duplicate packets are
discarded. Both are answered with the current cumulative ACK, so a lost ACK is
repaired by the next retransmission. Corrupt packets get no ACK.

**Destinations.** The sender serves one destination at a time. It may switch
destination when its window is empty, and keeps the next sequence number for
each destination.

## The network

### Router

`noc_router` is a 5-port (local, N, E, S, W) wormhole router with two virtual
channels:

- **Buffering:** 4-flit buffers per input VC.
- **Flow control:** credit-based.
- **Switching:** a head flit locks the output VC (same VC number) until its
  tail passes.
- **Routing:** source routing. The head's lowest route entry names the output,
  and the router shifts the route by one entry.
- **Switch allocation:** one iteration of iSLIP (request, round-robin grant
  per output, round-robin accept per input). Pointers move only on accepted
  grants. A round-robin pick chooses among the VCs of an input.
- **Timing:** output flits are registered, so a hop takes 2 cycles when the
  path is free.

### Network interface

`network_interface` puts the two data sources on VC0 and the two reply
sources on VC1. Each VC is held by one source from head to tail. The two VCs
are interleaved flit by flit, and only a VC that has a credit may send. Replies
can therefore always pass blocked data, so the handshakes cannot deadlock. The
interface writes the XY route (columns first, then rows) into every head flit.
On ejection it keeps a 4-flit FIFO per VC and returns a credit per flit. It
steers each packet to the engine named by its packet type.

### Soft-error injection

`fault_inj` models a soft error: data bit 0 of the next flit ejected at that
node is flipped. The packet then fails its CRC at the engine, which behaves
exactly as if the packet had been lost. Errors that hit control information
(routes, flit kinds) are outside this design's fault model. They are assumed
to be handled by lower layers.

## Measured timing (default parameters, 3 x 4, t_mem = 40, t_out = 60)

These figures come from `tb_workload_dma`. Node 0 sends to one destination at
a time while two Stop-and-Wait streams run in the background. The last column
is the extra time when the final ACK is corrupted.

| transfer | packets | error-free, cycles | one lost ACK |
|---|---|---|---|
| 4 KB | 32 | 360 | +103 |
| 8 KB | 64 | 652 | +103 |
| 16 KB | 128 | 1232 | +103 |

The error-free time is close to t_mem + 9 cycles per packet + one round trip.
The protocol adds no waiting inside a transfer. The error overhead is
t_out + t_mem plus a few cycles, and does not grow with transfer length.
`tb_arq_noc_top` also runs a 4 KB transfer while another transfer shares its
links. That run takes about 510 cycles instead of about 375: the difference is
network interference, not protocol overhead.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| ROWS, COLS | 3, 4 | top, mesh | mesh size |
| T_MEM | 40 | top, `local_mem.LAT` | local memory read latency, cycles |
| TOUT | 60 | top, both senders | timeout, cycles |
| GBN_WINDOW | 1 | top, `gbn_tx.WINDOW` | general-traffic window (1 = Stop-and-Wait) |
| MEM_WORDS | 2048 | top | 16-byte words per local memory (32 KB) |
| DEPTH | 4 | top, router, interface | flits per VC buffer |
| MAX_PKTS | 128 | `dma_arq_*` | longest DMA transfer (16 KB) |
| PF_DEPTH | 64 | `dma_arq_tx` | prefetch FIFO; keep it at least T_MEM for full rate |

Node ids are 4 bits, so meshes of up to 16 nodes fit the header as built. The
route field holds 8 hops, which covers any mesh with ROWS + COLS - 2 <= 8.

## Departures and limits

- **Own design choices.** The head-flit layout, the CRC, the NACK bitmap, the
  `last` flag and the two-VC split are this design's own. So are the buffer
  sizes and the router micro-architecture (credits, single-iteration iSLIP,
  fixed VC per packet). The described system names wormhole switching, VC
  flow control, XY source routing and SLIP arbitration, but not their details.
- **Receiver forwarding.** A DMA packet is written to memory after its CRC has
  been checked, one packet later than "as soon as it arrives". Two staging
  buffers keep the receiver at full rate.
- **General packet size.** The top carries 64-byte general packets only.
  `gbn_tx`/`gbn_rx` accept other sizes (PKT_WORDS = 8 or 16 for 128 or
  256 bytes), but the top's general-traffic ports are 4 words wide.
- **Tiles not included.** The processing elements and memory controllers of an
  application are not part of this RTL. Their traffic enters through the
  top's tile-side ports.
- **Write transfers only.** A DMA transfer here is a write: the source pushes
  data into the destination's memory. A read transfer differs only in a
  request packet that starts it. That request is left to the tile, which can
  send it as general traffic.
- **Consistency and clock.** The destination memory is not locked during a
  transfer. Keeping readers away from half-written data is up to software.
  The design has a single clock domain and no frequency is built in. The
  numbers above are in cycles; at 800 MHz one cycle is 1.25 ns.
- **Errors on control fields.** A soft error on a route or flit-kind field is
  not handled. The fault model covers data corruption only.

## Verification

Each block has a self-checking testbench in `tb/`. Each bench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog:

| testbench | what it checks |
|---|---|
| `tb_crc16_acc` | CRC against an independent byte-wise reference (itself checked with the "123456789" vector) |
| `tb_local_mem` | read latency exactly LAT, streaming reads, both write ports |
| `tb_dma_arq_tx` | a 4-packet pass sent back to back within t_mem + 48 cycles, selective resend of NACKed packets only (each at least t_mem later), timeout resend of the last packet no earlier than TOUT, bad replies ignored, a 40-packet transfer under random back-pressure |
| `tb_dma_arq_rx` | memory addresses and data, corrupt and duplicate drops, NACK bitmap contents, no reply to a corrupt last packet, transfer restart |
| `tb_gbn_tx` | window limit, cumulative ACK, go-back-N on timeout, bad ACKs ignored, per-destination numbering |
| `tb_gbn_rx` | in-order delivery, discard and re-ACK, corrupt drop, per-source numbering |
| `tb_noc_router` | random wormhole traffic on all ports and VCs: routing, route shift, no interleaving, credits, contention |
| `tb_noc_mesh` | all-to-all traffic on the 3 x 4 mesh, including corner-to-corner |
| `tb_network_interface` | VC assignment, route insertion, credit discipline, ejection steering, fault injection |
| `tb_arq_noc_top` | the whole network at default parameters. DMA transfers with and without errors, checked in the destination memories; Stop-and-Wait streams with corrupted data and ACKs; link sharing. Every recovery mechanism must occur at least once. |
| `tb_workload_dma` | 4, 8 and 16 KB transfers, error-free and with one error (table above) |

Each testbench has also been run against a copy of its block with one
deliberate bug, and reported failures every time.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl rtl/arq_pkg.sv tb/tb_arq_noc_top.sv \
    -y rtl --top-module tb_arq_noc_top -Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_arq_noc_top` with any other testbench name. The package must come
first on the command line. Everything else is found through `-y rtl`. The
full-size end-to-end test takes under a minute. The testbenches rely on reset
only: every register read by the design is reset by `rst_n` (active low,
asynchronous).
