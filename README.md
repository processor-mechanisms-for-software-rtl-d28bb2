# Shared-memory mechanisms of a MAP node (M-Machine)

Distributed shared memory done purely in software is flexible but slow: the
processor has to notice that a reference is remote, find out which node owns
the data, start a handler, and move data in whole pages. The M-Machine's MAP
processor keeps the protocol in software but puts four small mechanisms into
the processor so that the common steps of every protocol cost almost nothing:

| Mechanism | What it does in hardware | Where it lives here |
|---|---|---|
| Block status bits | 2 bits per 8-word block (invalid, read-only, read-write, dirty), checked on every load and store in parallel with the hit test | `ltlb`, `cache_bank`, `bsb_check` |
| Event system | turns a refused operation into a record in a 128-word queue, drops the operation, wakes the handler | `event_gen`, `reg_head_queue` |
| Global TLB (GTLB) | maps a virtual address to its home node in the 2-D mesh | `gtlb`, `netout` |
| Dedicated thread slots | handler threads stay resident in their own slots and sleep on an empty queue-head register | `cluster_issue` |

This RTL is the memory-side and network-side hardware of one MAP node that
carries these mechanisms, wired as on the chip: three cluster memory ports, a
memory switch, two interleaved cache banks, the external memory interface
(EMI) with the local TLB (LTLB), the event queue, the GTLB beside the network
output, and the network input queues. The processor clusters, the router and
the SDRAM are outside it and connect through ports.

## How a remote reference moves through the node

This is the path the whole design exists for, so it is worth following cycle
by cycle. The numbers are for this RTL, counting the cycle in which a cluster
offers the load as cycle 1:

| Cycle | Where | What happens |
|---|---|---|
| 1 | `memory_switch` | the load goes to the bank chosen by address bit 6 (block interleave) and is accepted |
| 2 | `cache_bank` stage s1 | tag compare and status check together; the block is not cached, so the load goes to the EMI |
| 3 | `emi` LOOKUP | LTLB hit test and `bsb_check` together; the block's status is *invalid*, so the load is refused |
| 4 | `emi` FAULT | fault offered to `event_gen` and taken; the load is gone and the cluster can carry on |
| 5 | `event_gen` | three-word record written into the event queue |
| 6 | `reg_head_queue` | queue head register becomes full; the event handler's read of it may issue |

The published chip has the event handler running by cycle 10 of the same
sequence. In the end-to-end test the handler's read issues on cycle 7, because
a user thread of cluster 0 wins the round-robin on cycle 6. The test checks
the 10-cycle bound.

From then on the work is software running in the dedicated slots, using the
hardware as follows:

1. The event handler (cluster 0, slot 3) reads the record from its queue-head
   register: header, address, store data.
2. It probes the GTLB for the home node (`gprb_*` port, result one cycle later).
3. It sends a priority-0 request message to the virtual address; `netout`
   translates the address again through the GTLB to get the flit destination.
4. At the home node the message lands in the priority-0 queue of `netin`,
   whose head is a register of the request handler (cluster 1, slot 4).
5. The reply (the 8-word block) travels on priority 1 to the reply handler
   (cluster 2, slot 4) of the requester.
6. The reply handler installs the block: it writes the data and sets the
   block's status to read-write (`cfg_bs_*`), then completes the original load
   into its destination register, named in the record header.

Steps 1-6 are not in the RTL (they are handler code); the top-level testbench
plays them with its own processes so the hardware path is exercised end to end.

## Block status bits

Every 8-word (64-byte) block has a state:

| State | Code | Load | Store |
|---|---|---|---|
| invalid | 0 | refused (`EV_LOAD_INVALID`) | refused (`EV_STORE_INVALID`) |
| read-only | 1 | allowed | refused (`EV_STORE_READ_ONLY`) |
| read-write | 2 | allowed | allowed, block becomes dirty |
| dirty | 3 | allowed | allowed |

The states live in three places. The page table holds the master copy (software). The
LTLB holds the 64 states of each mapped 4 KB page: 64 entries × 128 bits = 1 KB.
Each cache line holds the state of its block: 2 banks × 512 lines × 2 bits =
0.25 KB. Keeping the copies consistent is the part most worth understanding:

- A line is only filled by the EMI after the LTLB allowed the access, and the
  fill carries the LTLB's state. A fill whose state is invalid is not installed.
- The caches are write-through. A store that hits a read-write line makes the line
  dirty and is also passed to the EMI, which checks the LTLB copy (still
  read-write, so allowed) and makes that dirty too.
- When a handler changes a block's state (`cfg_bs_wr`), the LTLB entry is
  updated and any cached copy of the block is invalidated. The next reference
  then refills the line with the new state.
- An LTLB miss does not raise an event. The EMI holds the operation and raises
  `ltlb_miss` for the LTLB miss handler thread. It retries once that handler has written
  the entry (`ltlb_fill_*`, carrying the page's 64 states from the page table).

## Event records and queue-head registers

`event_gen` writes one record per refused operation:

| Word | Contents |
|---|---|
| 0 | bits 2:0 event type, bit 3 operation (0 load, 1 store), bits 13:4 destination register {cluster[1:0], slot[2:0], reg[4:0]} |
| 1 | virtual address |
| 2 | store data (zero for loads) |

The event queue (`reg_head_queue`, 128 words) accepts a record only when all
three words fit, so 42 records fit. Behind a full queue, `event_gen` holds
one more record. The EMI and banks then stall, and finally the memory
switch refuses new operations. The head of the queue is not read with a load:
it is a register of the handler thread, and `head_valid` is that register's
scoreboard bit. While it is clear, the handler's instruction that reads it is
not eligible to issue (`cluster_issue`), so the handler waits without polling
while the user threads of the cluster keep issuing. The two message queues in
`netin` are the same queue with one-word records, one per network priority.

## GTLB translation

An entry (`gtlb_entry_t`) describes a page group and the region of the mesh it
is spread over:

| Field | Encoding | Meaning |
|---|---|---|
| `base_vpn` | plain | first page of the group (group aligned to its size) |
| `log_pages` | log2 | group size in pages |
| `start` | plain (x, y) | corner node of the region |
| `log_xext`, `log_yext` | log2 | region width and height in nodes |
| `log_ppn` | log2 | consecutive pages placed on one node before moving on |

For page p of the group: chunk c = p >> log_ppn; home node is
start + (c mod 2^log_xext, (c >> log_xext) mod 2^log_yext). Chunks fill the
region x first and wrap around it. Sixteen pages on a 2×2 region therefore
give:

| Pages per node | Node (0,0) | Node (1,0) | Node (0,1) | Node (1,1) |
|---|---|---|---|---|
| 4 | 0-3 | 4-7 | 8-11 | 12-15 |
| 2 | 0,1,8,9 | 2,3,10,11 | 4,5,12,13 | 6,7,14,15 |
| 1 | 0,4,8,12 | 1,5,9,13 | 2,6,10,14 | 3,7,11,15 |

Changing `start` moves the whole mapping across the machine unchanged, which
is how space sharing works. Four entries are searched associatively and
combinationally on two ports: port 0 for the handler's probe, port 1 for
`netout`. Two entries are enough for a program: code mapped locally, data
spread over the machine.

## Thread slots

| Slot | Cluster 0 | Cluster 1 | Cluster 2 |
|---|---|---|---|
| 0, 1 | user | user | user |
| 2 | exception | exception | exception |
| 3 | **event handler** (event queue head) | evict proxy | bounce proxy |
| 4 | LTLB miss handler | **request handler** (priority-0 queue head) | **reply handler** (priority-1 queue head) |

`map_shm_node` connects the three queue heads to the slots in bold. An
instruction is represented by three bits per slot: it exists, its operands
are ready, and it reads the slot's queue-head register. Selection is round-robin
over eligible slots, one instruction per cluster per cycle.

## Module hierarchy

```
map_shm_node
├── memory_switch          3 cluster ports -> 2 banks, round-robin per bank
├── cache_bank  x2         direct-mapped, write-through, status per line
│   └── bsb_check
├── emi                    miss / write-through server, LTLB miss stall
│   └── ltlb               64 entries, 2-way, 64 block states per entry
│       └── bsb_check
├── gtlb                   4 entries, 2 lookup ports
├── netout                 GTLB-addressed message send, flits
├── netin                  two message queues
│   └── reg_head_queue x2
├── event_gen              fault -> 3-word record
├── reg_head_queue         128-word event queue
└── cluster_issue  x3      thread selection with queue-head blocking
```

`mm_pkg` holds the shared types (`mem_req_t`, `fault_t`, `gtlb_entry_t`,
`flit_t`, the status and event enums) and widths.

## Top-level ports

- **Cluster memory:** `mreq_*`, valid/ready per cluster, and `resp_*`, one load
  response per bank per cycle. A response carries the destination register it
  belongs to. Stores get no response.
- **External memory:** `ext_req_*` is a request with ready; a read returns one
  8-word block on `ext_resp_*`, any number of cycles later.
- **Handler writes:** `ltlb_fill_*`, `cfg_bs_*` and `gtlb_wr_*`. These stand for
  the stores a handler makes through the configuration space. `ltlb_miss` asks
  for an LTLB fill.
- **Probe and send:** `gprb_*` is the GTLB probe. `send_*` is a message send
  (priority, virtual address, length, up to 9 words).
- **Router:** `out_flit_*` and `in_flit_*`, valid/ready. A flit is
  {head, tail, priority, destination, 64-bit data}. The head flit's data is
  {length[3:0], 6'b0, virtual address}.
- **Thread slots:** `inst_valid`, `opnd_ready`, `reads_qhead` and
  `issue_valid`/`issue_slot`, per cluster. The queue-head contents come out
  as `evq_head`, `p0_head` and `p1_head`.
- **Activity pulses for measurement:** events, queue-full stalls, bank hits and
  misses, switch conflicts, handler waits and message arrivals.

## Parameters

| Parameter (top) | Default | Origin |
|---|---|---|
| `LTLB_ENTRIES` | 64 | 1 KB of LTLB status storage ÷ 128 bits per 4 KB page |
| `LTLB_WAYS` | 2 | two-way, as in the published simulation model |
| `CACHE_LINES` | 512 per bank | 0.25 KB of cache status storage ÷ 2 bits ÷ 2 banks |
| `GTLB_ENTRIES` | 4 | as built on the chip (16 were planned originally) |
| `EVQ_DEPTH` | 128 words | published |
| `NETQ_DEPTH` | 64 words | own choice |
| `MAX_MSG_WORDS` | 9 | own choice: one block plus a header word |

The published evaluation used a 128-entry LTLB; set `LTLB_ENTRIES=128` for it.

## Where this design fills gaps or departs

The mechanisms, their sizes and the chip organisation above come from the
published MAP design. The following are this design's own choices:

- Widths come from the published design only where it gives them: 64-bit words, 54-bit virtual and
  40-bit physical byte addresses, 4 KB pages and 5-bit mesh coordinates are
  this design's. The page size is the one that makes the 1 KB of LTLB status
  storage equal 64 entries.
- The status encoding, and the read-write → dirty change on a store, are this design's.
- The cache organisation (direct-mapped, write-through, no write-allocate, one
  block per line, one-cycle lookup) is this design's. Only the bank count, the
  interleaving and the status copy are given.
- The EMI serves one operation at a time and stalls on an LTLB miss. How the
  LTLB miss handler is started is not specified, so it is a port.
- The record layout, the atomic three-word push and the priority between event
  sources are this design's.
- GTLB field widths are this design's. The group is aligned to its own size,
  and nodes are numbered x first. The published GTLB uses 64 bytes of CAM for 4 entries
  (128 bits each); the entry here is 71 bits.
- The flit format, the message head word, the queue depth and the dropping of a message
  with no GTLB mapping (reported as `EV_GTLB_MISS`) are this design's.
- The GPRB returns its result one cycle after the probe. Its latency on the
  chip is not published.
- The thread selection is round-robin. The cluster pipeline is reduced to
  readiness bits.

## Not included

- The processor clusters (integer, memory and FP units, register files,
  including the 1.25 KB of dedicated handler registers) and the cluster switch.
- The configuration space. Its effect on this hardware is the handler write
  ports listed above.
- The exception slots' special hardware.
- The router and the network itself, and the SDRAM and external memory bus.
- All handler software: the event, request and reply handlers, the proxies, the
  LTLB miss handler and the coherence protocol with its invalidations. The
  published 336-cycle remote access time is mostly this software, so it is not
  reproduced. The hardware part, event detection within 10 cycles, is
  checked.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles
if it hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/mm_pkg.sv tb/tb_map_shm_node.sv \
          --top-module tb_map_shm_node -Mdir obj_top
./obj_top/Vtb_map_shm_node
```

Replace the testbench name for any other block. The package has to come first on the
command line; the other modules are found through `-y rtl`. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/mm_pkg.sv rtl/<module>.sv`.

`tb_map_shm_node` runs the top at its default sizes in well under a second.
It models the SDRAM, the LTLB miss handler with a page table, a router that
loops every flit back, and the three handler threads. It runs one complete
remote reference (fault, record, GPRB, request, reply, install, completed
load) and also produces:

- cache hits and misses;
- LTLB miss stalls;
- a store refused on a read-only block;
- a store that turns an installed block dirty;
- a bank conflict and two banks working in the same cycle;
- handlers waiting on empty queues while user threads issue;
- 50 remote loads against a stopped event handler, which fill the queue
  (42 records), stall the memory system, and are then all delivered;
- a message refused for lack of a GTLB mapping.

It checks the 10-cycle event bound and counts each of these, failing if one
never happens.

`tb_shm_sharing` puts nine nodes at their default sizes on one mesh and runs
a store to a block shared by 2, 4 and 8 nodes, which needs 1, 3 and 7
invalidations. The testbench plays a three-hop protocol in the handler slots:

1. The requester's store is refused and becomes an event record.
2. The requester's event handler probes the GTLB and sends a request to the home node.
3. The home drops its own copy, sends an invalidation to each other sharer, and replies with the block and an acknowledgement count.
4. Each sharer invalidates its copy and acknowledges to the requester.
5. The requester collects every message, installs the block read-write and completes the store.

Messages are addressed by virtual address only. Each node is reached through
an address in the page the GTLB homes on it. The test then checks:

- the message count at the requester's reply queue;
- the dirty state at the requester;
- the stored value;
- that every former sharer is refused on its next load.

The handlers here take no time, so the printed cycle counts are the hardware's
and the network model's share of a remote store.

The block testbenches check, among other things:

- every state/operation pair of the status rules;
- the 128-word queue's capacity and order;
- the 2×2 GTLB mappings tabulated above, plus a 4×2 region and a start-node
  offset;
- LTLB replacement and update-port priority;
- fairness of the memory switch;
- flit framing of `netout`;
- back-pressure of `netin`;
- agreement of `cluster_issue` with a reference selection model.
