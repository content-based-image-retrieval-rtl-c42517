# SMILE node logic: a CBIR search coprocessor and a cluster packet switch

Content-based image retrieval (CBIR) finds the images in a database that look
most like a query image. Every image is summarised by a *signature*: 42
numbers (wavelet energies of the three colour planes at several resolutions),
stored as 32-bit integers. A search compares the query's signature with every
signature in the database by Euclidean distance and keeps the closest ones.

The SMILE cluster runs this search on many low-cost FPGA boards at once. Each
board (a *node*) has an embedded processor running Linux and MPI, a share of
the signature database in its DDR memory, and FPGA logic made of two parts:

* **the CBIR coprocessor** streams the node's share of the database out of
  memory by DMA, two 32-bit words per clock, computes the distance of each
  signature to the query and keeps the 15 best matches in a sorted buffer;
* **the SMILE Communication Element (SCE)**, a three-link packet switch that
  carries the cluster's messages over the board's serial links and forwards
  packets for other nodes. At the end of a search the nodes pass their
  top-15 lists along the network, each merging the incoming list with its own,
  until one node holds the top 15 of the whole database.

This repository holds synthesizable SystemVerilog for both parts, the top
module `smile_node` that places them side by side, and self-checking
testbenches, including an eight-node cluster simulation that runs a complete
search and merge. The processor, the DDR memory and its controller, the
processor bus and the serial-link cores are vendor parts and are not included:
their connections are ports of `smile_node`.

```
                 smile_node
   +-----------------------------------------------------------+
   |  cbir_coprocessor                                         |
   |   plbci  --regs--> signature_reg ---+                     |
 bus <-> (register map)                  v                     |
   |   DMA --> FIFO --> distance_calc --> topk_sorter --> regs |
 mem <-> (bursts)                                              |
   |                                                           |
   |  sce                                                      |
 host tx --> route --> txf[0..2] --+                           |
   |                               +--> arbiter[j] --> link j tx
   |  link i rx --> route --+--> fwf[i] (for other nodes) --+  |
   |                        +--> rxf[i] (for this node)        |
 host rx <-- arbiter <-- rxf[0..2]                             |
   +-----------------------------------------------------------+
```

## The coprocessor datapath

### Data format

A signature is 42 unsigned 32-bit words, 168 bytes, stored contiguously in
memory. The DMA reads memory in 64-bit beats, so one signature is 21 beats.
Within a beat the word at the lower address is in bits [63:32] (the PowerPC
405 is big-endian): beat *k* carries word 2*k* high and 2*k*+1 low. Signatures
follow each other with no padding; the image identifier the coprocessor
reports is simply the position of the signature in the stream, counted from 0.
Software adds a node's offset to make it a global identifier.

### Distance (`distance_calc`)

For each beat the two database words are subtracted from the matching query
words, both differences are squared and added, and the sums are accumulated
over the 21 beats. The result is the *squared* Euclidean distance: the square
root changes no ordering, so it is left out. The width is chosen so nothing
overflows: a squared 32-bit difference is below 2^64 and 42 of them below 2^70,
so distances are 70 bits.

The unit is a three-stage pipeline (subtract, square, accumulate) that takes a
beat every cycle and never stalls. The distance of a signature appears three
cycles after its last beat. When memory keeps the FIFO fed, the coprocessor
processes one signature every 21 cycles.

### Keeping the 15 best (`topk_sorter`)

The sorter holds 15 (distance, identifier) slots in ascending order. An empty
slot counts as infinitely far. A new distance is compared with all 15 slots at
once. Because the slots are sorted, the comparison results form a thermometer
code (0...0 1...1), and the first 1 is where the new entry belongs. Every slot
from that point takes its upper neighbour's contents, the old slot 14 falls
out, and the new entry fills the gap. All of this happens in one clock. An
entry is only inserted if it is strictly smaller than a kept one. Equal
distances therefore stay in arrival order, and a distance equal to the 15th
kept one is discarded. An assertion checks that the buffer stays sorted.

### Bus interface and DMA (`plbci`)

The processor reaches the coprocessor through a simple register bus. A request
with `bus_we` writes; without it, it reads. `bus_ack` and `bus_rdata` follow
one cycle later. On the board this port sits behind a bridge to the
processor's PLB bus; that bridge is not part of this design.

| word address | register | access |
|---|---|---|
| 0x00 | CTRL: bit 0 start, bit 1 interrupt enable | W (bit 1 readable) |
| 0x01 | STATUS: bit 0 busy, bit 1 done (write 1 to bit 1 to clear) | R/W1C |
| 0x02 | DMA_ADDR: byte address of the first signature | R/W |
| 0x03 | DMA_COUNT: number of signatures | R/W |
| 0x04 | PROCESSED: signatures whose distance is done | R |
| 0x40 + w | query signature word w, w = 0..41 | R/W |
| 0x80 + 4i + 0 | result i: image identifier | R |
| 0x80 + 4i + 1, + 2 | result i: distance bits [31:0], [63:32] | R |
| 0x80 + 4i + 3 | result i: bit 31 valid, bits [5:0] distance [69:64] | R |

Result 0 is the best match.

A search goes like this:

1. Write the 42 query words.
2. Write DMA_ADDR and DMA_COUNT.
3. Write CTRL = 3 (start, interrupt enabled).
4. Wait for `irq` or for done.
5. Read the results.

Start clears the sorter and the distance unit's counters for one cycle. The
DMA then requests bursts of up to 16 beats over the memory port
(`mem_req/mem_addr/mem_len`, accepted by `mem_gnt`). The memory returns the
data on `mem_rvalid/mem_rdata`, and that stream cannot be stalled. So the DMA
only asks for a burst when the 64-beat input FIFO has room for it and for
every beat still in flight. The FIFO can therefore never overflow, and with a
memory that answers without gaps the stream runs at one beat per cycle. done
rises in the cycle after the last distance has entered the sorter.

## The communication element (`sce`)

### Topology and routing

Nodes are grouped in fours, called SBEs (SMILE Block Elements). A node's
address is 5 bits (32 nodes), and bits [4:2] are its SBE number. Inside an SBE
the nodes are chained, and SBEs are joined to their neighbours. Each node has
three links, and the driver tells the SCE at start-up which link plays which
role (`sce_cfg_t`):

| setting | used for a destination that is ... |
|---|---|
| `node_addr` | this node: deliver to the processor |
| `port_prev` | in the same SBE, lower address |
| `port_next` | in the same SBE, higher address |
| `port_sbe_dn` | in a lower-numbered SBE |
| `port_sbe_up` | in a higher-numbered SBE |

The SBE links only need to exist on the nodes that act as gateways. On the
other nodes, `port_sbe_up` and `port_sbe_dn` simply point along the chain
towards the gateway. The cluster testbench uses exactly this: a ring of two
SBEs, 0-1-2-3 and 4-5-6-7, closed by a link between nodes 0 and 7.
`sce_router` is the combinational decision, and the SCE uses seven copies of
it.

### Packets and FIFOs

Every stream in the SCE carries `beat_t` words under a valid/ready handshake.
A word is 32 data bits plus `sof` and `eof` flags. The first word of a packet
is the header, and its low 5 bits are the destination node. The SCE does not
interpret any other bits.

Each link has three FIFOs, 512 words deep by default (one 2048-byte packet):

* `txf[j]`, the send FIFO. It holds packets from this node's processor that
  leave on link j. The router picks the FIFO from the header. A packet the
  processor addresses to its own node is dropped.
* `rxf[i]`, the receive FIFO. It holds packets that arrived on link i for
  this node.
* `fwf[i]`, the routing buffer. It holds packets that arrived on link i for
  another node while their outgoing link is busy.

The local/forward choice and the send-FIFO choice are made on the header and
held for the rest of the packet. At the head of each routing buffer a router
picks the outgoing link, and that choice is also held for the packet. Each
link output has a packet-level round-robin arbiter (`pkt_arbiter`) between its
send FIFO and the three routing buffers. A packet may turn back on the link it
came from. Another arbiter merges the three receive FIFOs towards the
processor. The arbiters keep a grant from header to `eof`, so packets never
interleave. Packets stream through (cut-through), so a packet longer than a
FIFO still passes.

Forwarding is cut-through, and a blocked packet holds every link it
occupies. In a network whose links form a cycle, a ring for example, heavy
traffic going round in one direction can therefore block itself. The SCE has
no virtual channels or other deadlock avoidance, and the SMILE design does
not specify any. The line of SBEs used in the 32-node test has no cycle.

The link receive ports have a ready signal. This assumes the serial-link
cores use flow control; without it, a full receive FIFO or routing buffer
would drop data. `cfg` must not change while traffic flows.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `SIG_WORDS` | 42 | `smile_pkg` | words per signature |
| `WORD_W` / `BEAT_W` | 32 / 64 | `smile_pkg` | word and DMA beat width |
| `TOPK` | 15 | `smile_pkg` | results kept |
| `DIST_W` / `ID_W` | 70 / 20 | `smile_pkg` | distance and identifier width (2^20 signatures covers a 128 MB database buffer) |
| `NODE_W`, `SBE_SIZE`, `NLINKS` | 5, 4, 3 | `smile_pkg` | node address bits, nodes per SBE, links per node |
| `COP_FIFO_DEPTH` | 64 | `smile_node` | DMA input FIFO, beats |
| `COP_BURST` | 16 | `smile_node` | longest DMA burst, beats |
| `SCE_DEPTH` | 512 | `smile_node` | depth of each of the nine SCE FIFOs, words |

## What follows the SMILE design and what is this implementation's own

These parts follow the SMILE design:

* the block structure: bus interface with DMA, signature register, distance
  unit, 15-entry ordered buffer, SCE with three links and nine FIFOs;
* 42 words of 32 bits, two words per clock from 64-bit DMA beats;
* Euclidean distance and keeping the 15 best in order;
* the node-by-node merge of top-15 lists;
* SBEs of four nodes and routing to the previous or next neighbour or towards
  the next SBE, with routing information set by the driver.

These are this implementation's own choices, since the design leaves them
open:

* word order within a beat, unsigned words, and the squared distance with no
  square root;
* how ties are handled;
* the register map and the simplified register bus in place of PLB, the
  memory port handshake, burst length and FIFO depths;
* the packet format, separate up and down SBE directions, round-robin
  arbitration, link flow control, and dropping self-addressed packets;
* asynchronous active-low reset everywhere.

One passage of the SMILE design speaks of subtracting *bytes* of the
signatures. This implementation works on 32-bit words, which is consistent
with the 32-bit integer format and the 64-bit, two-word beats.

Not modelled: the processor and its software (MPI library, drivers), the PLB
bus, the DDR controller, the serial-link cores and transceivers, and the
Ethernet management network. The register bus and link streams here are
where those parts would connect.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog:

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue, flags, count, full reached |
| `tb_signature_reg` | word and beat ports, reset, out-of-range writes |
| `tb_distance_calc` | distances against a reference, identifiers, 3-cycle latency, one signature per 21 cycles, extreme values |
| `tb_topk_sorter` | all slots after every input against a sorted reference, ties, clears |
| `tb_plbci` | register map, burst lengths and addresses, stream contents, clear, done/irq timing |
| `tb_cbir_coprocessor` | four complete searches through the register map, rate check (at most 21 cycles per signature plus 40), fewer signatures than slots, memory with gaps |
| `tb_sce_router` | every destination for many configurations |
| `tb_pkt_arbiter` | no interleaving, completeness, round-robin under load |
| `tb_sce` | random traffic on all inputs with stalls on all outputs; routing of every packet, ordering, dropping, routing buffers holding packets |
| `tb_smile_node` | eight nodes at default parameters: query broadcast over the network, eight parallel searches, chain merge, final top 15 against a reference; counts DMA bursts, sorter insertions and rejections, local deliveries, all four forwarding cases, routing-buffer waits and link back-pressure |

Two further testbenches run the cluster workloads at default parameters:

* `tb_cluster_experiments` searches on 1, 2, 4 and 8 nodes. In the first
  series every node holds the same number of signatures (24), so the search
  time stays at 518 cycles whatever the node count. In the second series a
  fixed database of 96 signatures is split over the nodes, and the search
  time falls from 2030 to 266 cycles. The merge along the chain adds time
  with every node. Every final list is checked.
* `tb_sce_table1` sends packets of 256, 512, 1024 and 2048 bytes over 1 to
  4 hops of ideal links. From the first word sent to the last word received
  takes 66 to 517 cycles: one cycle per 32-bit word, plus one cycle for every
  SCE on the path.

* `tb_sce_cluster32` builds the full 32-node network: eight SBEs in a line,
  where the last node of each SBE links to the first node of the next. Every
  node sends a packet to every other node at the same time, 992 packets in
  all. The test checks that each packet arrives once and intact, and that the
  number of SCEs that forward it equals its distance along the line (up to 31
  links).

`tb/mem_model.sv` (memory with latency and optional gaps) and
`tb/link_model.sv` (a serial link with random stalls) are behavioural
stand-ins for the vendor parts.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/smile_pkg.sv tb/tb_smile_node.sv --top-module tb_smile_node
./obj_dir/Vtb_smile_node
```

Replace `tb_smile_node` with any other testbench name. The cluster test takes
a few seconds.
