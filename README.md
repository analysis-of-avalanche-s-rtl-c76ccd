# Avalanche Widget: shared-memory datapath in SystemVerilog

Avalanche is a cluster of HP PA-RISC workstations. Each node runs shared
memory in hardware through a small custom chip, the Widget. The Widget sits on
the workstation's Runway bus as a peer of the processors. It does not control
main memory. It keeps the node's part of a distributed shared memory coherent
and talks to the other nodes over a Myrinet link.

Shared data is held in Simple COMA (S-COMA) style. Each node keeps its own
copy of the pages it uses in ordinary main memory. Coherence is tracked per
128-byte block (four 32-byte processor lines, 32 blocks per 4 KB page). Every
block has a *home* node. The home's directory controller knows where the
block is.

This RTL models one node's Widget and its Shared Buffer SRAM. The end-to-end
testbench runs two Widgets, each with a behavioural model of the processor
bus and memory, joined by a simple network model.

## The central problem: answering the bus before knowing the answer

On the Runway, every coherent read gets a coherency response from each bus
client, in bus order:

- `COH_OK`: the client has no interest in the line.
- `COH_SHR`: the client keeps a read-only copy.
- `COH_CPY`: the client holds the data and will send it later by a
  cache-to-cache write. Memory then drops the read.

The Widget answers for the whole rest of the cluster. To answer correctly it
needs the block's state, but that state is metadata kept in main memory. Only
a small cache of it is on the Widget (tags on chip, records in the Shared
Buffer). The memory controller serves reads in order, so the Widget cannot
fetch the metadata before it answers.

The SM-CC (shared memory cache controller) therefore works like this for a
read inside the shared region:

| metadata cache | block state         | response    | then                                              | class |
|----------------|---------------------|-------------|---------------------------------------------------|-------|
| hit            | valid here          | OK / SHR    | memory supplies the line                          | LSMSH |
| miss           | valid here          | CPY at once | read the line from memory into the SB, write it cache-to-cache | LSMSM |
| hit or miss    | not valid, home here   | CPY      | request to the local DC                           | LDCM  |
| hit or miss    | not valid, home remote | CPY      | request to the remote DC                          | RDCM  |

Reads outside the shared region `[sh_base, sh_limit)` get `COH_OK` at once.
The region is contiguous, so a compare is enough.

For LDCM and RDCM, the SM-CC allocates an SB line to receive the block and
sends an `MT_REQ` message to the home DC. The DC reads its own record
(global state, owner, copyset) and does one of two things:

- **Block is free at home.** The DC allocates an SB line and pulls the block
  out of home memory and local caches with a flush read. It sends the block
  to the requester as `MT_DATA`.
- **Block is exclusive at another node.** The DC sends `MT_INV_FWD` to the
  owner. The owner's SM-CC flushes the block, marks it invalid and sends it
  straight to the requester.

Either way, the DC then records the requester as the exclusive owner. This is
the migratory protocol: a block moves on every miss, reads included.

When the block arrives, the requesting SM-CC does three things:

1. It writes the block into the local S-COMA page (a 16-beat memory write).
2. It supplies the missed 32-byte line to the waiting processor by
   cache-to-cache write.
3. It marks the block exclusive.

### Concurrency

The SM-CC and the DC each run up to four operations at once, in four slots.
Each slot is a small state machine. The slots share these resources, and
each is granted to the lowest-numbered slot that asks:

- the metadata cache
- the RIM command port
- the SB line allocator
- the NI send port

Operations on different blocks overlap, but the operations on any one
block are serialized. A queued request waits while another slot is still
working on the same block.

This matters with three or more nodes. The home DC records the new owner as
soon as it sends the forward. A later request's invalidate-and-forward can
therefore reach that owner before the block itself does. Served at once, it
would flush the owner's stale page copy. The DC likewise serves two requests
for one block in turn, so the second sees the record the first wrote.

In the SM-CC, forwards from the network have a queue of their own, separate
from bus reads. A forward for a busy block takes a free slot and parks there
until the block is done. A bus read for a busy block stalls the head of the
bus queue; that keeps the bus responses in order. With a single queue, a
parked forward could block a forward behind it that another node is waiting
on. If that node is in turn waiting on this one, both stop for good.

Metadata lookups are done one at a time, in arrival order. This keeps the
bus responses in bus order. A lookup for one request can run while another
request waits on memory or the network.

A four-entry queue holds requests while every slot is busy. There is no flow
control back to the bus. More than four outstanding shared misses would
overflow the queue, and an assertion fires if that happens.

### Measured latencies

The end-to-end testbench measures each miss class, in 120 MHz cycles. It
uses a memory model that returns the first doubleword after 26 cycles and an
instant network. The published figures are minimum observed latencies from a
full-system simulation with a real network model.

| class | this RTL | published minimum |
|-------|----------|-------------------|
| LSMSH | 44       | 32                |
| LSMSM | 104      | 154               |
| LDCM  | 341      | 354               |
| RDCM  | 357      | 452               |

The testbench checks the order LSMSH < LSMSM < LDCM, RDCM, not the values.
LSMSM costs 60 cycles more than LSMSH here. That gap is the memory read and
cache-to-cache write that the early `COH_CPY` forces, and the published
study puts it at 50 to 59 cycles.
RDCM is lower here mainly because the network model has no switch
fall-through delay.

## Subsystems

All SB traffic goes through one 64-bit SRAM port. The manager answers a read
four cycles after the request: two cycles of arbitration, then two cycles of
SRAM read.

| module          | role |
|-----------------|------|
| `rim`           | Runway interface. Runs commands for the other subsystems one at a time: memory read into the SB, memory write from the SB, cache-to-cache write from the SB, flush read. Drives the Taxiway, the bus word delayed one cycle, for the snoopers. Merges the snoopers' responses (strongest wins). Holds the diff/splice logic. |
| `rim_diff`      | Combinational. Diff: mask of the 32-bit words that differ between a clean and a dirty line. Splice: merge the masked words into a line. |
| `sbm`           | Shared buffer manager. Round-robin arbiter for the SB port. Line allocator: a free-line FIFO plus a counter of never-used lines, with lines 0-255 reserved. |
| `shared_buffer` | 256 KB SRAM: 32768 x 64 bits, i.e. 2048 lines of 128 bytes. Two-cycle read. |
| `meta_cache`    | Blocking metadata cache. Tags are on chip; records live in SB lines. A miss fetches the record from main memory through the RIM. Writes go through to memory. Round-robin replacement per set. |
| `smcc`          | Shared memory cache controller (above). |
| `dc`            | Directory controller (above). |
| `rsb`           | Release state buffer (below). |
| `mpcc`          | Message passing cache controller. Keeps SB lines of incoming message data. Answers `COH_CPY` to a processor read of such a line, then supplies it by cache-to-cache write. |
| `ni`            | Network interface. Sends a header flit, plus 16 payload flits read from an SB line when the message carries data. On receive, writes the payload into an SB line and passes the header to the SM-CC, DC or MP-CC. Messages to the node itself loop back inside the NI. |
| `widget`        | Top. Wires all of the above. |

Metadata cache configurations (16 KB each, 32-byte entries):

- **SM-CC:** 2-way. 64-bit records: `[1:0]` block state, `[3:2]` protocol,
  `[9:4]` home node. Uses SB lines 0-127.
- **DC:** 4-way. 128-bit records: `[1:0]` global state, `[7:2]` owner, one
  copyset bit per node from bit 8. Uses SB lines 128-255.

A record's number is its offset in the shared region divided by 128.
`KEY_W` = 20 covers a 128 MB shared region.

### Release state buffer

The RSB supports the delayed write-update protocol.

1. On an acquire, it stores a clean copy of a line.
2. On a release, or when an acquire finds it full (then for the oldest
   entry), it fetches the line's current contents.
3. It diffs the current contents against the clean copy.
4. It emits a compressed update: line address, modified-word mask, word
   count, and the modified words packed together.

A line with no changes produces no update.

In this RTL, the RSB's processor-side ports and its update output are ports
of `widget`. So is the RIM's splice port, which a receiving node uses to
merge an update into a line.

## Interfaces and formats of this design

These are this design's own choices. The Runway and Myrinet protocols are
proprietary and are not reproduced.

- **Runway word (80 bits, `runway_t`):** `{op 4, source 4, tag 8,
  payload 64}`.
  - In an address cycle, the payload holds `{beats, address}`.
  - Data beats carry the requester's source and tag.
  - A cache-to-cache write is an address cycle that names the requester,
    followed by its data beats.
- **Coherency responses** arrive one per coherent read, in bus order, on
  `coh_valid`/`coh_resp`.
- **Network:** 64-bit flits with valid/ready. A message is one header flit
  (`msg_t`: type, source, destination, requesting node, block, SB line,
  requester's slot, sub-line, has-data), plus 16 payload flits when it has
  data.
- **Internal handshakes** are request/grant or request/ack/done. Grants are
  combinational and lowest-index-first, except the SB bus, which is
  round-robin.
- **Reset** is asynchronous and active low. Each testbench pulses it at the
  start.

## How far to trust it, and what is missing

Each block has a self-checking testbench. Each testbench was also run
against a deliberately broken copy of its block and caught the fault. The
end-to-end test runs two nodes at default parameters and checks:

- the data of every processor read;
- that every mechanism happened at least once:
  - all four miss classes
  - the DC's supply-from-home and invalidate-and-forward paths
  - NI loopback
  - MP-CC supply and eviction
  - overlapped SM-CC operations
  - RSB flush on full and on release
  - the splice result;
- that every SB line is returned at the end.

A second system test, `tb_widget_random`, runs four nodes. Every processor
reads a small set of blocks at random, some with private intent. The blocks
are spread over pages homed on every node, so blocks keep migrating while
other nodes are also missing on them. This includes remote misses where
home, owner and requester are three different nodes. The data is never
written, so every read must return the home node's original contents. A
node answering from its own stale page copy would return the complement
instead. The test also checks that every SB line comes back at the end.

A third, `tb_widget_footprint`, sweeps a benchmark-sized shared data set
through four nodes at default parameters. The data set is 784 pages of
4 KB, the footprint of the largest SPLASH-2 input in the published study,
which is far beyond the 512-entry metadata caches.

- Phase 1: each node reads two lines of every block it is home for.
- Phase 2: each node reads every block homed on its neighbour.

All 75,000 reads are checked. The test takes about 12 s of simulation.

Not built, or simplified:

- **Protocol processing engine (Direct Deposit message passing):** not
  built. Its SB line allocation port is brought out.
- **Only the migratory protocol is built.** Missing pieces:
  - the write-invalidate and write-update flows in the SM-CC and DC;
  - the counts of pending invalidate and update acknowledgments;
  - the acquire state buffer;
  - sending RSB updates to the nodes in the copyset.

  The DC's shared state and copyset are stored but not used for sharing.
- **Page state is not kept.** The SM-CC assumes an S-COMA page is at the
  same physical address on every node, so it does no page-address
  translation.
- **Metadata miss timing.** A metadata miss costs a full RIM memory read,
  not the 36-cycle best case.
- **Possible deadlock with a strictly ordered memory controller.** A
  metadata fill could wait behind a younger coherent read that is itself
  waiting on the Widget. The memory model in the testbench does not order
  Widget reads behind pending processor reads.
- **Placeholder bus and link protocols.** The Runway and Myrinet interfaces
  use the simplified formats above.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The package has to come first on the command line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_widget \
    rtl/avl_pkg.sv tb/tb_widget.sv -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace `tb_widget` with any other testbench in `tb/` to run it. The
testbenches are:

- `tb_rim_diff`
- `tb_shared_buffer`
- `tb_sbm`
- `tb_meta_cache`
- `tb_rim`
- `tb_smcc`
- `tb_dc`
- `tb_rsb`
- `tb_mpcc`
- `tb_ni`
- `tb_widget_random`
- `tb_widget_footprint`

Helper models:

- `tb_runway_model`: processor, Runway and memory controller of one node.
  Memory latency is `MEM_LAT` = 26 cycles to the first doubleword.
- `tb_mem_env`: RIM, SBM, SRAM and a memory responder, used by the RIM and
  metadata cache tests.

Useful parameters:

- `meta_cache`: `WAYS` and `SIZE_BYTES`
- `sbm`: `LINES` and `RESERVED`
- `smcc`, `dc`: `N_SLOTS`
- `mpcc`, `rsb`: `ENTRIES`
- `widget`: `SMCC_MD_BASE`, `DC_MD_BASE` (where the metadata sits in main
  memory)
