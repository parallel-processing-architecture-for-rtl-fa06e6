# A parallel-processor DQDB access unit

DQDB (Distributed Queue Dual Bus, IEEE 802.6) is a metropolitan-area network
built from two opposite, unidirectional slotted buses. A node reads every
53-octet slot on the forward bus, copies what is addressed to it, and writes
its own segments into empty slots. It may only do that when a distributed
queue, kept as two counters, says that it is its turn. At 150 Mbit/s a new
slot passes every 2.72 µs. One processor cannot check the CRC, decode the
header, match the addresses and manage the reassembly in that time.

This design splits the work between small processors that run in parallel:

* **Receive side.** A hardware front end (the ILLP) accepts a slot. It hands
  the slot, in round-robin order, to one of four identical receive processors
  (R1). Each R1 takes up to 39 "operations" (about 8 µs) to deal with a
  segment, roughly three slot times. With four R1s taking turns, the node
  still keeps up with a busy bus. Behind the R1s, one reassembly processor
  (R2) joins multi-segment messages. A host interface processor (HIP) with a
  DMA engine copies the finished messages into host memory.
* **Transmit side.** A transmit processor (T1) builds the message header and
  trailer and cuts the message into 44-octet units. Two segment processors
  (T2) turn each unit into a list of small *control blocks*. A bus-side
  engine (the OLLP) executes those blocks. It fetches the octets from a
  dual-port buffer memory, adds the CRC, and ORs the segment onto the bus
  when the distributed-queue state machine (DQSM) allows.

Everything is synthesizable SystemVerilog in `rtl/`. One clock cycle is one
bus octet. The top module is `dqdb_top`.

## Bus model and framing

A bus is a stream of `bus_octet_t {sof, d[7:0]}`, one per clock. `sof` marks
the first octet of a slot, the access control field (ACF). Every node
registers each bus once, so a node adds one clock of delay. Nodes are chained
by wiring `bus_a_out` of one node to `bus_a_in` of the next.

| Octets | Field |
|---|---|
| 0 | ACF: bit 7 BUSY, bit 6 TYPE (0 = queued-arbitrated), bit 5 PSR, bits 2:0 REQ for priorities 2..0 |
| 1–4 | segment header: VCI (20 bits), payload type, priority, HCS (CRC-8, x⁸+x²+x+1) |
| 5–6 | DMPDU header: segment type (BOM 10, COM 00, EOM 01, SSM 11), sequence number (4 bits), MID (10 bits) |
| 7–50 | 44-octet segmentation unit |
| 51–52 | DMPDU trailer: payload length (6 bits), CRC-10 (x¹⁰+x⁹+x⁵+x⁴+x+1) |

The CRC-10 covers DMPDU octets 0–46 and the six length bits. Both CRCs start
from zero and shift MSB first. The `crc_unit` module computes either CRC,
one octet per clock.

A message (MSDU, up to 9188 octets) is carried in an IMPDU. The IMPDU has:

* a 24-octet header: reserved, BE tag, BAsize, destination and source
  addresses, PAD length, QOS, HEL, bridging;
* the MSDU;
* 0–3 PAD octets, bringing the total to a multiple of 4;
* a 4-octet trailer: reserved, BE tag, Length.

The IMPDU is cut into 44-octet units. A message that fits one unit travels as
an SSM (single-segment message). A longer one travels as a BOM, COMs and an
EOM. The maximum MSDU needs 9216 IMPDU octets, which is 210 segments.
Addresses are 64 bits; a top nibble of `1110` marks a group address.

## Receive datapath

```
bus A ─► ILLP ──round robin──► R1[0..3] ──shared bus (FCFS)──► R2 ──► HIP_FIFO ──► DMA ─► host
          │                      ▲  │                                    ▲
          └── PSR request ──► OLLP  └──────── SSM requests ──────────────┘
```

**ILLP** (`illp`). It reads the forward bus.

* For each busy queued-arbitrated slot, it checks the HCS and whether the VCI
  is one of the node's programmed VCIs or the all-ones default.
* If both match and an R1 is ready, `rr_sched` picks the next ready R1 after
  the last one served. The ILLP then writes the slot into a free packet
  buffer of that R1.
* While the DMPDU streams past, it computes the CRC-10 and passes the
  remainder along with the packet.
* A slot that arrives when no R1 is ready is dropped and counted
  (`stats.rx_drop_busy`).
* The ILLP also raises `empty_slot` for the DQSM.

**R1** (`r1_proc`). It holds 54 packet buffers of 56 octets each. The R1
program follows a seven-state diagram. Each state lasts a fixed number of
"memory-reference operations", and each operation lasts `CYC_PER_OP` clocks
(default 4):

| State | Operations | Work |
|---|---|---|
| I | 1 | idle, signal `ready` to the ILLP |
| II | 16 | read the packet, the CRC remainder and the PSR setting |
| III | 2 | CRC-10 check; a bad packet is dropped |
| IV | 9 | segment type; MID, VCI, destination address; for COM/EOM, is there an open reassembly? |
| V | 4 | COM/EOM: send a reassembly request to R2 |
| VI | 11 | BOM: send the whole unit to R2 |
| VII | 9 | SSM: validate lengths, BE tags and HEL; queue a HIP request |

The paths through the diagram therefore take these times:

| Path | Operations | Clocks | Time |
|---|---|---|---|
| drop after the CRC | 19 | 76 | 3.9 µs |
| COM/EOM | 32 | 128 | |
| BOM | 39 | 156 | 8.0 µs |
| SSM | 37 | 148 | |
| drop after the address check | 28 | 112 | |

One clock is 51.3 ns (2.72 µs / 53). These times are why four R1s are
needed: each R1 gets a new slot at most every fourth slot, which is 212
clocks.

The datapath itself does each state's work as wide, single-clock transfers.
The counter only fixes how long the R1 stays busy, so the timing is the same
as the processor program it stands for. To model a faster or slower
processor, change `CYC_PER_OP`.

A packet for an individual address that the R1 accepts pulses `psr`. The
OLLP then sets the PSR bit in the next slot on the bus (if `psr_en`).

Packets are not copied out of an R1. A buffer stays busy until the DMA has
moved its octets to the host and frees it. Only then does the R1 report it
free.

**Shared bus** (`fcfs_arbiter`). The R1s and R2 write their messages over a
single path. Grants go first come first served. A request is held until it
is granted, and the message moves in the grant clock.

**R2** (`r2_proc`). It keeps up to `NREASM` reassembly processes, one for
each open MID/VCI pair.

* A **BOM** opens a process. R2 records the BE tag, BAsize and header fields,
  and starts a *segment list*: the (R1, buffer) pairs that hold the message.
* A **COM** is appended to the list after a sequence-number check.
* An **EOM** closes the process. R2 checks that:
  * the trailer BE tag equals the header BE tag;
  * the trailer Length equals BAsize;
  * both equal the number of octets received minus 8.

  If all checks pass, R2 queues a copy request to the HIP. If not, it queues
  a discard request, which frees the buffers.
* A BOM that arrives on a pair that is still open discards the old message.
* A COM or EOM with no open process is discarded.

The process is released when the HIP has finished with it.

**HIP and DMA** (`hip_dma`). Requests from the R1s and R2 wait in the
HIP_FIFO and are served in order. For a copy request, the DMA walks the
segment list. It reads each unit from its R1 buffer, skips the IMPDU header,
and writes the MSDU octets one per clock to `rx_base` onward (`hw_valid`,
`hw_addr`, `hw_data`).

* **Cycle stealing.** While `host_busy` is high the DMA waits. Each lost
  clock is counted in `stats.dma_stall`.
* **Completion.** At the end of each message, `rx_done` reports the
  message's host address and length. It also reports the destination and
  source addresses and the QOS delay field (`rx_da`, `rx_sa`, `rx_qos`). The
  DMA captures these from the IMPDU header octets it reads on the way to the
  MSDU. Together they form the data indication to the host. The DMA then frees the packet buffers and releases the R2
  process.

## Transmit datapath

```
host ─► T1 ──round robin──► T2[0..1] ──(issue order)──► OLLP FIFO ─► OLLP ─► bus A (segments, PSR)
         │   ▲                                               │  ▲       └───► bus B (REQ)
         ▼   │ release                                       ▼  │
     buffer list                 buffer memory (host port / serial port)   DQSM
```

**Host handshake.** The host sends a request (`hreq`: connection,
addresses, byte count, QOS). Then:

1. T1 allocates a 9216-octet block from that connection's buffer list and
   returns its address (`hgrant_addr`).
2. The host writes the MSDU through the random-access port (`hd_we`,
   `hd_addr`, `hd_data`) and signals `host_done`.

If the connection has no free block, `hreq_ready` stays low: the host is
blocked.

**Buffer list** (`buffer_list`). Each connection has a ring of `NCELL` blocks
with `first_free`, `first_busy` and `last_busy` pointers. A busy count tells
a full ring from an empty one, since both have `first_free == first_busy`.

**T1** (`t1_proc`). It builds the IMPDU header and trailer:

* BAsize = Length = 20 + MSDU + PAD;
* PAD = (4 − MSDU mod 4) mod 4;
* a BE tag that counts up.

T1 then walks the IMPDU in 44-octet units. Each unit is described as a job:
segment type, sequence number, the part of the header it holds, where its
MSDU octets lie in the block, its PAD octets, and whether it carries the
trailer. Each job goes to the next idle T2 in round-robin order. An order
FIFO records which T2 got each job, so segments leave in sequence even
though the T2s work in parallel.

**T2** (`t2_proc`). It turns a job into control blocks. Each block is 4
octets: TYPE, count, and a 16-bit address.

* TYPE bits [1:0] = 1 (*inline*): `count` octets follow in the FIFO itself.
  This is used for the ACF, the segment header with its HCS computed by T2,
  the DMPDU header, the IMPDU header and trailer, PAD, zero fill and the
  DMPDU trailer.
* TYPE bits [1:0] = 2 (*memory*): `count` octets are to be read from the
  buffer memory at `address`. This is used for the MSDU octets, which are
  never copied.
* TYPE bit 7 marks the last block of a segment.
* TYPE bit 6 marks the last segment of the IMPDU, which releases the block
  back to the buffer list once it has been sent.
* TYPE bit 3 names the connection.

T2 leaves the CRC field zero.

**Buffer memory** (`buffer_mem`). A 64 K × 8 dual-port array. One port is
random access for the host. The other is a serial port for the OLLP: it loads
an address and then yields one octet per clock, auto-incrementing.

**OLLP** (`ollp`). It executes the control blocks into a 52-octet segment
buffer, computing the CRC-10 on the way, and inserts the CRC at the end of
the segment. It then queues the segment with the DQSM.

* **Writing a segment.** When the DQSM grants an empty queued-arbitrated
  slot, the OLLP sets BUSY and ORs the segment into it as it passes. Nothing
  on the bus is ever overwritten.
* **PSR.** A PSR request from an R1 sets the PSR bit of the next slot.
* **REQ.** On bus B, the OLLP reports each slot's REQ bits to the DQSM
  before writing its own. It sends a pending request in the first slot whose
  REQ bit at that priority is still clear.

**DQSM** (`dqsm`). It keeps one request counter (RQ) and one countdown
counter (CD) per priority.

* **Idle.** RQ counts REQs seen on the reverse bus at the same or higher
  priority, and counts down for every empty slot that passes on the forward
  bus.
* **Queueing a segment.** RQ moves into CD, RQ clears, and a REQ is
  scheduled for the reverse bus.
* **Queued.** CD counts down on empty slots and up on higher-priority REQs.
  New REQs go to RQ.
* **Sending.** The segment may take the first empty slot after CD reaches
  zero.

Bandwidth balancing adds one to RQ after every `BWB_MOD` (8) own
transmissions. This leaves a slot now and then for nodes further
downstream.

## Interface of `dqdb_top`

* **Buses:** `bus_a_in/out` (forward) and `bus_b_in/out` (reverse).
* **Configuration:**
  * `msap_addr`, `group_addr`: the node's individual and group addresses;
  * `vci_tab`, `vci_valid`: the VCIs it accepts;
  * `psr_en`;
  * `tx_vci`, `tx_mid`, `tx_prio`: the VCI, MID and priority of its own
    traffic.

  The layer-management protocol that would set these values is not part of
  the design.
* **Host transmit:** `hreq_valid/hreq/hreq_ready`, `hgrant_valid/addr`,
  `hd_we/addr/data`, `host_done`.
* **Host receive:** `host_busy`, `rx_base`, `hw_valid/addr/data`,
  `rx_done/addr/len`, `rx_da/sa/qos`.
* **`stats`:** event counters for:
  * accepted slots;
  * each drop reason;
  * reassemblies completed and discarded;
  * DMA stall clocks;
  * IMPDUs and segments sent, PSR bits written;
  * clocks the host was blocked and bandwidth-balancing skips.

One instance carries data on bus A: it reads and writes bus A and writes
REQs on bus B. A full node on both buses would use a second instance with
the buses swapped. Slot generation at the head of each bus is not part of a
node; the testbenches generate the slots.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_R1` | 4 | receive processors |
| `NBUF` | 54 | packet buffers per R1 (4 × 54 ≥ 210 segments of a maximum message) |
| `CYC_PER_OP` | 4 | clocks per R1 operation |
| `MAXSEG` | 210 | segment-list length per reassembly process |
| `NREASM` | 4 | concurrent reassembly processes |
| `NVCI` | 4 | programmable VCIs |
| `N_T2` | 2 | segment processors |
| `NCELL` | 3 | buffer-memory blocks per connection (two connections) |
| `BLOCK_BYTES` | 9216 | block size, one maximum IMPDU |
| `DATA_DEPTH` | 65536 | buffer-memory octets (16-bit control-block address) |
| `CB_DEPTH` | 128 | OLLP FIFO octets |
| `BWB_MOD` | 8 | bandwidth-balancing modulus |

## Where this design departs from, or adds to, the architecture

* **Timing of the processors.** The R1, R2, T1 and T2 are hardware state
  machines, not programmed CPUs. Only the R1's timing is taken from the
  processor program: its state durations are counted out. R2, HIP, T1 and T2
  run as fast as their logic allows.
* **Length and BAsize include the PAD**, as in IEEE 802.6. The
  architecture defines BAsize on the transmit side without the PAD, but adds
  the PAD in its receive check. This design includes it on both sides, so
  the check is Length = BAsize = octets received − 8.
* **Buffer memory.** The two ports of the buffer memory never contend. A
  video-RAM part would lose one random-access cycle for each row it loads
  into its serial shift register; that is not modelled.
* **CRC-32** (the optional IMPDU CRC) is neither generated nor checked. HEL
  is always 0 on transmit, and header extensions are not interpreted on
  receive.
* **Validation rules.** An SSM must carry MID 0 and a BOM a nonzero MID. A
  group destination is accepted if it equals the node's group address or is
  all-ones. These follow IEEE 802.6.
* **Host ports are octet-wide** and use simple valid/ready handshakes.
* **The OLLP has one segment buffer.** It starts assembling the next segment
  only after the current one has been sent.
* **Overflow.** When every R1 is busy, the ILLP drops the slot rather than
  stalling the bus.
* **Not built:**
  * pre-arbitrated (isochronous) slots, which are passed through untouched;
  * connection-oriented VCIs beyond the programmable VCI table;
  * layer management;
  * the physical layer and the head-of-bus slot generator.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
`tb/tb_dqdb_util.sv` is a package with the CRC, slot and IMPDU builders the
testbenches share. For example:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/dqdb_pkg.sv tb/tb_dqdb_util.sv tb/tb_dqdb_top.sv --top-module tb_dqdb_top \
    --Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_dqdb_top` with any other testbench name. Unit testbenches that do
not use the utility package can leave out `tb/tb_dqdb_util.sv`.

`tb_dqdb_top` runs two nodes on one dual bus, at the default parameters. It:

* sends single-segment messages, multi-segment messages and a maximum
  9188-octet (210-segment) message from node 1 to node 2;
* injects slots with bad CRC, bad HCS, an unknown VCI, an orphan COM and a
  mismatched BE tag;
* keeps node 2's host bus busy at random, and once long enough to make the
  ILLP overflow;
* exhausts node 1's buffer list so that the host is blocked;
* lets node 2 transmit, so that node 1 must honour its REQs.

Every delivered message is compared octet by octet with what was sent. Each
mechanism (drops of each kind, overflow, DMA stall, host block, PSR, REQ,
bandwidth balancing, reassembly) is counted, and must occur at least once.
The run takes about a minute.

`tb_r1_proc` checks that every path through the R1 takes its number of
operations times `CYC_PER_OP`.
