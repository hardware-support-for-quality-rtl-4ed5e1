# RDMA QoS engine

This is the transfer scheduling front end of an RDMA engine. User processes
post transfers by writing descriptors into per-channel slots over AXI. The
engine then:

- orders them by class and priority;
- cuts memory transfers into 64 KB blocks;
- hands the blocks, one at a time, to an RDMA send unit;
- turns tiny transfers (payload carried in the descriptor) and completion
  notifications into ready-made packets;
- tracks the acknowledgement of every block;
- publishes a per-channel status that software can poll, 32 channels per load.

Each transfer has at most two blocks in flight. Congestion-managed transfers
are spread over flow IDs, so that a congestion-control layer can rate-limit
them per flow.

Everything is synthesizable SystemVerilog-2017. The send unit, its rate
limiter and the network are outside the design. The engine's ports are where
they connect.

## Channels and descriptors

There are 2048 virtual channels: 16 pages (protection domains) of 128
channels. Channels 0..63 of a page are write channels. Each channel owns one
256-bit line of the **transfer table**, so a page occupies 4 KB of address
space:

| AXI write address bits | meaning |
|---|---|
| [15:12] | page |
| [11:5]  | channel (line = {page, channel}) |
| [4:3]   | 64-bit word within the line |
| [2:0]   | must be 0 |

A line may be written with 64-bit writes (strobes `0x00FF` or `0xFF00`) or
with 128-bit writes (strobes `0xFFFF`, address bit 3 = 0), in any order. The
AXI slave collects the words of one line in a single accumulator. When all
four words are present, the line goes to the transfer table in that same
cycle. A write to a different line while a line is half written is refused
with SLVERR. There is one accumulator, not one per protection domain.

First line of a descriptor (word 0 in the low bits):

| word | contents |
|---|---|
| 0 | source address, or payload bytes 0..7 of an inline transfer |
| 1 | destination address |
| 2 | [4:0] type, [8:5] intra priority, [31:9] QoS field, [63:32] size in bytes |
| 3 | bit 0 = `enq`: this line completes the descriptor |

Type bits: bit 0 = inline payload; bits 2:1 = congestion management (0 none,
1 unipath with one flow ID, 2 multipath with four flow IDs); bit 3 =
completion notification wanted.

A transfer with a notification, or an inline payload longer than 8 bytes,
has a second line in the next channel's slot (line + 1):

- words 0..2 are the three notification addresses (destination written,
  first data, last data), or payload bytes 8..31;
- `enq` = 1 is in word 3.

The second line must not arrive before the first. When the line carrying
`enq` is complete, the transfer is enqueued and its channel's status turns
BUSY.

## Scheduling queues

There are 66 FIFO queues, highest priority first:

| queue | holds |
|---|---|
| 0 | control queue (notifications due) |
| 1 | transfers without congestion management (need a free TID) |
| 2..17 | unipath transfers that already hold a flow ID, by intra priority |
| 18..33 | unipath transfers still needing one |
| 34..49 | multipath transfers holding a flow-ID group |
| 50..65 | multipath transfers still needing one |

Within a class, intra priority 0 is served first. A queue is only eligible
when the resource it needs is available (a free TID, a free unipath FID, or a
free group of four multipath FIDs).

A transfer sits in at most one queue at a time. The queues therefore share
one pool of 2048 nodes, where node *x* is the transfer at line *x*. A queue is
just a head, a tail and an empty bit, plus a 2048 x 11-bit next-pointer
memory. One enqueue and one dequeue are served per cycle.

A dequeue that leaves nodes behind reads the next pointer from memory. A
dequeue of the same queue in the very next cycle takes the new head straight
from the memory output. Three clients enqueue, with fixed priority:

1. the message handler (re-scheduling on ACK, control queue);
2. the segmenter (re-scheduling for a second outstanding block);
3. the AXI slave (new transfers).

## Transfer segmenter: the pipeline

The segmenter is a three-stage pipeline. Stage 1 selects and dequeues a
transfer. Stage 2 does the bookkeeping. Stage 3 computes the block.

**Stage 1** picks the highest-priority eligible queue and dequeues its head
when three conditions hold:

- the metadata arbiter grants the read;
- stage 2 will be free;
- the packet creator is not using the transfer-table read port.

In the same cycle it reads the descriptor line and the transfer's metadata,
and pops a TID or flow ID from its free FIFO if needed.

**Stage 2**, in its first cycle, works out from the descriptor and the
metadata:

- the block count `ceil((dst + size)/64K) - floor(dst/64K)`;
- the block's TID (the free TID, or `FID*4 + next`; multipath hops over the
  group's four FIDs);
- the global sequence number.

In that same cycle it writes the pending-transactions entry and the updated
metadata. Then, as each becomes possible, it:

- re-enqueues the transfer if blocks remain and fewer than two are
  outstanding;
- asks the packet creator for an inline packet, or for a control packet (when
  the transfer came from the control queue, or when its last block goes out
  with all earlier blocks already acknowledged and a notification is wanted);
- issues the transfer's first block straight to the transaction table when
  stage 3 is empty (bypass), or hands later blocks to stage 3.

**Stage 3** computes the block offset `first + (n-1)*64K` and the block's size,
then writes the block descriptor through a valid/ready handshake.

Stall causes, each visible on an observation output:

- transaction table not ready;
- packet queue full;
- metadata read not granted;
- re-enqueue refused.

The last one cannot happen in this build. The segmenter and the message
handler both enqueue in the cycle after their own metadata grant, and only
one of them is granted per cycle.

Inline transfers reach the packet queue 4 cycles after the AW handshake of
their descriptor. Back-to-back 8-byte inline transfers written with 128-bit
writes produce one packet every 2 cycles, which is the AXI limit.

## IDs, flows and the tables

| table | size | indexed by |
|---|---|---|
| transfer table | 2048 x 256 | line |
| transfer metadata | 2048 x 76 | line |
| transaction table (block descriptors) | 1024 x 256 | TID |
| pending transactions | 1024 x 121 | TID |

TIDs 0..511 are free TIDs, used by transfers without congestion management
and by inline packets. TIDs 512..1023 belong to flow IDs 128..255 (TID =
FID*4 + 0..3):

- FIDs 128..191 are handed out one by one to unipath transfers;
- FIDs 192..255 are handed out in groups of four (by group base) to multipath
  transfers.

A congestion-managed transfer keeps its flow ID(s) until its last block is
acknowledged. After reset, `id_fifo_init` fills the three free-ID FIFOs, one
ID per cycle (592 cycles). `ids_ready` tells the outside when that is done.

The metadata table has one read and one write port. The segmenter and the
message handler share the read port through a least-recently-served arbiter.
A read in the same cycle as a write to the same entry returns the new value,
because the two clients read-modify-write in back-to-back cycles.

## Acknowledgements

The message handler takes one response at a time, as a (TID, sequence number,
ACK/NACK) header, and runs three states:

1. **RX**: registers the response and reads the pending entry.
2. **PEND**: decides what to do with the response:
   - an invalid entry drops the response;
   - a NACK, or a sequence-number mismatch, sets the channel's status to
     ERROR (retransmission is not implemented);
   - a match requests the metadata.
3. **META**: handles the acknowledged block:
   - decrements the outstanding count and works out `acks = issued -
     outstanding`;
   - re-enqueues the transfer if it has blocks left and is not already queued;
   - when all blocks are acknowledged, sets the status to DONE and returns the
     FID(s);
   - when all blocks are issued, all but one are acknowledged and a
     notification is wanted, puts the transfer in the control queue;
   - invalidates the pending entry, returns the TID of a non-managed block and
     goes back to RX.

A response takes 3 cycles when the metadata read is granted at once.

## Status polling

The read address works as follows:

- bit 16 selects the status registers;
- bit 17 selects 32-channel mode;
- bits [15:12] give the page;
- bits [10:5] give the channel (in 32-channel mode, bit 10 selects the half
  page).

Statuses come back as 2-bit codes in the low bits of the read data: IDLE 0,
BUSY 1, DONE 2, ERROR 3. Every channel returned as DONE or ERROR is reset to
IDLE by the read. Software can therefore post up to 64 transfers on a page
and collect all their outcomes with two loads.

## Top level

`qos_engine` connects all the blocks. Its ports:

- an AXI4-style slave (`s_aw*`, `s_w*`, `s_b*`, `s_ar*`, `s_r*`; 32-bit
  addresses, 128-bit data, no IDs or bursts);
- the send-unit side: `su_ready`, plus the `blk_valid`/`blk_tid` strobe for
  each new block descriptor, which is read through `txn_rd_*` one cycle
  later;
- the packet queue (`pkt_valid`, `pkt_ready`, `pkt_data`; 16 entries);
- the response header input (`rsp_*`);
- `ids_ready`.

The package `qos_pkg` holds every size, struct layout and queue number.

## Departures and open points

- **Queue count.** The scheduling hierarchy gives 2 + 4 x 16 = 66 queues with
  16 intra priorities. Some summaries of this engine quote 32 queues; that
  count was not followed.
- **Widths.** The block-size field of a block descriptor is 17 bits; a 64 KB
  block does not fit in 16. The metadata entry is 76 bits and the pending
  entry 121 bits: the sum of their fields, not the rounder totals sometimes
  quoted for them.
- **Initialisation time.** ID initialisation takes 592 cycles (512 + 64 + 16).
- **Own choices.** These are this design's own:
  - the register map;
  - the type encoding;
  - the packet-queue entry layout and its depth of 16;
  - the status code values;
  - the write-first metadata forwarding;
  - protection-domain ID = page;
  - the intra-priority order.
- **Not built:**
  - timeouts and retransmission (a NACKed or mismatched transfer stays in
    ERROR and keeps its TID);
  - remote read requests;
  - statistics registers;
  - multiple accumulator sets for interleaved descriptor writes.

## Verification

Every block except the segmenter has its own self-checking testbench in
`tb/` (`tb_<module>.sv`). Each one compares the block with a model under
random traffic and checks that its corner cases were reached. These include:

- the AXI slave: random mixes of 64/128-bit writes, invalid and interleaved
  writes, refused enqueues, status reads;
- the message handler: every decision, with table models and a random
  arbiter;
- the packet creator: a shared read port and a stalling packet queue.

The segmenter is checked inside the whole engine by `tb_qos_engine`.

`tb_qos_engine` runs the whole engine at its default sizes. A processor model
posts 16 back-to-back inline transfers and checks:

- the latency is 4 cycles from AW to the packet queue;
- the rate is one packet per 2 cycles;
- with the consumer stopped, the packet queue fills.

It then checks two special cases:

- an interleaved write gets SLVERR;
- a response for an idle TID is dropped.

Finally it posts 240 random transfers of every kind: inline of 1..32 bytes,
and memory transfers of up to 9 blocks (about 590 KB) with and without
congestion management, some with notifications. Two of them are 1 MB
transfers (17 blocks), one unipath and one multipath. Some transfers receive a
NACK or a wrong sequence number. The send unit and the packet consumer stall
at random, and the network acknowledges out of order.

Every block descriptor is checked against an independent model of the
segmentation, and every packet against its descriptor. At the end the test
checks:

- the final status of all 1024 channels, read 32 at a time, and that the
  reads clear them;
- the number of control packets and errors;
- that every TID came back.

It also counts each mechanism (each stall cause, the stage-3 bypass, queue
forwarding, both control-packet paths, drops, re-enqueues, flow-ID
allocation, second-line reads) and fails if one never happened.

The largest transfer simulated is 1 MB. A 4 GB transfer follows from the
same counters (an 18-bit block count) but was not run.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_qos_engine rtl/qos_pkg.sv tb/tb_qos_engine.sv
./obj_dir/Vtb_qos_engine
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.
