# Inferentially queued locks with speculative push

In a shared-memory multiprocessor, a contended lock is costly for two reasons.
The lock-line moves through the home directory on every hand-over. The data the
critical section writes is usually still dirty in the cache of the previous lock
holder, so the new holder's first writes are three-hop misses.

This RTL implements the coherence-controller side of two hardware mechanisms
that attack both costs without changing the program:

* **Inferentially queued locks (IQL).** Each node predicts which
  synchronizing instructions acquire a lock. While it holds such a lock, it
  holds back incoming low-priority lock requests and hands the line over the
  moment it sees the release. The directory lets those requests form a
  distributed queue instead of NACKing them. The lock then moves straight from
  one holder to the next.
* **Speculative push (SP).** While a node holds a lock, it learns which data
  lines the critical section writes. Once it is confident, it pushes those lines
  to the next lock holder together with the lock. The next holder then finds
  its data in exclusive state instead of missing on it.

The system built here is the directory-based one: 16 nodes, an Origin-2000-like
exclusive-ownership directory protocol, and a fully connected point-to-point
network. Everything is written in synthesizable SystemVerilog. The processor,
caches, DRAM and data path are outside the design and appear as ports.

## Structure

```
                 iql_sp_system (top)
 ┌──────────────────────────────────────────────────────────────┐
 │  iql_sp_node  x NODES                                        │
 │  ┌─────────────────────────────────────────────┐             │
 │  │ lpt ──lock address──> lst ──> message       │             │
 │  │                        ^       generation ──┼──┐          │
 │  │ push_match <───────────┼── incoming msgs <──┼──┤          │
 │  │ MSHRs + retry          │                    │  │          │
 │  └────────────────────────┼────────────────────┘  │          │
 │        ^ processor ports  │ cache ports     msg_network      │
 │                                                   │          │
 │                                         iql_directory (home) │
 └──────────────────────────────────────────────────────────────┘
```

| file | what it is |
|---|---|
| `rtl/iql_pkg.sv` | line and node identifiers, message format and kinds, state encodings |
| `rtl/lpt.sv` | Lock Predictor Table |
| `rtl/lst.sv` | extended Lock State Table: lock states, request deferral, push learning |
| `rtl/push_match.sv` | pairs incoming push hints with the directory's permissions |
| `rtl/iql_sp_node.sv` | one node's controller: joins the three tables, MSHRs, outgoing queue |
| `rtl/iql_directory.sv` | home directory with the inferential queue and push ordering |
| `rtl/msg_network.sv` | fully connected network, one cycle per hop, round-robin per destination |
| `rtl/iql_sp_system.sv` | top: NODES nodes + directory + network |

Messages carry only a kind, sender, receiver, an auxiliary node, a retry bit and
a 26-bit line address (64-byte lines). No data travels in them. When the
protocol says "line X goes to node N", the data would move on the memory system's
data path next to that message.

## Lock prediction (lpt)

The processor looks up the PC of every synchronizing instruction at dispatch.
The instruction carries the prediction to the execute stage. If it predicted an
acquire, its byte address is passed to the LST one cycle later as a predicted
lock. The predictor is a direct-mapped table of 64 tagged 2-bit counters.
External training reports whether an instruction did turn out to acquire a
lock. A wrong prediction costs performance, never correctness: a mispredicted
"lock" is never released, so the deferral bound below hands it over.

## The Lock State Table (lst)

Each predicted lock has an entry, found by lock-line address, in one of four
states:

| state | meaning |
|---|---|
| INVALID | the lock-line is not here |
| PRESENT | the line is here but the lock is not held |
| HELD | this processor holds the lock |
| REQUESTED | a `rd_X_lp` for the line is outstanding |

The transitions are as follows:

* **Predicted acquire.** It goes to HELD if the cache has the line. Otherwise
  it issues a `rd_X_lp` (low-priority read-for-exclusive) and goes to
  REQUESTED. If no entry can be allocated, an ordinary `rd_X` is issued.
* **Lock-line arrives.** REQUESTED goes to HELD.
* **Store to the lock's byte address while HELD.** This is the inferred
  release. The lock goes to PRESENT, or to INVALID if a request was waiting;
  the lock-line is then sent to that requestor.
* **Incoming `rd_X_lp` while PRESENT.** The line is sent at once.
* **Incoming `rd_X_lp` while HELD or REQUESTED.** The request is buffered in
  the entry.
* **Lock-line evicted or invalidated.** The entry goes to INVALID.

Deferral is bounded. A buffered request is served after `DEFER_LIMIT` (1024)
cycles even without a release, and is flagged as a timeout. If the node's own
`rd_X_lp` is NACKed because the directory broke its queue down, the buffered
request is dropped: its sender was NACKed too and will retry.

A plain `rd_X` intervention, or a `rd_X_lp` for a line the LST does not track,
is answered at once as in the base protocol.

## The inferential queue at the directory (iql_directory)

Each directory entry holds a state, a `synch_bit`, an owner pointer and a
sharing bit-vector with one bit per node. The base protocol forwards a request
for an owned line to the owner, and the requestor becomes the new owner. The
entry then stays Busy until the old owner's revision message arrives, and any
request in the meantime is NACKed. IQL changes this:

* **Exclusive + `rd_X_lp`.** The request is forwarded to the owner. The
  requestor's bit is set and `synch_bit` is set. The owner pointer now names
  the *last requestor*.
* **Busy with `synch_bit` + `rd_X_lp`.** The request is not NACKed. It is
  forwarded to the last requestor, the requestor's bit is set, and the
  requestor becomes the last requestor. Each node therefore gets at most one
  intervention per line, and the forwarded requests chain into a queue. Each
  node in it waits for its predecessor's release.
* **Revision.** This is sent by each node as it hands the line on. It clears
  the sender's bit. When one bit is left, that node is the owner, `synch_bit`
  is cleared and the entry is Exclusive again.

**Queue breakdown.** The directory records who is queued, not in which order.
Suppose a queue member writes the line back instead of passing it on, and more
than two bits are set. The directory cannot tell whose intervention will never
be answered. It then does the following:

1. It clears `synch_bit` and the writer's bit, and NACKs every other node in
   the vector, one per cycle.
2. Each NACKed node retries its `rd_X_lp` with the retry bit set (a
   piggybacked ack-for-NACK). That retry clears its bit and is NACKed again.
3. When the vector is empty, the entry is Unowned and the next retry is served
   from memory.

With exactly two bits set, the directory knows which node is stranded. It gives
that node the written-back line directly.

Not built: the underlying protocol's Shared state, invalidations and
read-shared requests. Every grant here is exclusive, which is all that lock
hand-over and pushes use. The home serves line addresses 0..`LINES-1` (256),
one entry each, and an assertion flags any other address.

## Learning what to push (lst, Speculative Push part)

Each LST entry has `DATA_SLOTS` (2) candidate slots. Each slot holds a line
address, an access bit A, a 2-bit saturating confidence counter and an
enable bit. Two lines are enough: critical sections rarely write-miss on more,
and a third line adds almost nothing.

* **While HELD:** any access to a recorded line sets its A bit.
* **Allocation while HELD:** a slot is allocated with A = 1 by a write fault to
  an unrecorded line, or by the first access to a line that arrived here by
  push. The slot is a free one, else the one with the lowest counter, with ties
  broken by an LFSR. A line that arrived by push causes no write fault, so the
  node reports that first access separately. This keeps a migrating line being
  pushed along the chain of lock holders.
* **At the release:** each counter counts up if A is set and down otherwise,
  then A is cleared. Reaching the maximum enables the line and reaching zero
  disables it. The hysteresis stops a line that is only sometimes written from
  flapping.
* **Replacement eviction** of a recorded line counts it down.

Each counter belongs to one line, not to the whole entry, so lines are enabled
one by one.

## Pushing through the directory (iql_sp_node, iql_directory)

A push is triggered when a lock-line is handed over, whether at a release, at
once for a PRESENT lock, or at the deferral bound. Each enabled candidate that
the cache still holds modified is pushed. In order, the node:

1. sends a **push hint** (line address) to the requestor;
2. sends the **lock-line** and the **revision message**;
3. sends an **annotated write-back** (`M_PUSH_WB`, target = requestor) to the
   home, and invalidates its own copy.

The directory serializes the push like any write-back:

* If the pusher still owns the line (Exclusive), the data is written back,
  the target becomes the owner, and **`M_PERM_X`** (exclusive permission, with
  the data) goes to the target.
* Otherwise, for example because another node's `rd_X` made the entry busy,
  it is an ordinary write-back and the target gets **`M_PERM_NACK`**.

This keeps the push free of new races: a push the directory cannot grant is
just a write-back. The remaining latency the target sees is one directory
lookup, not a three-hop miss.

**The hint's purpose.** It tells the target a line is coming. If the target
write-faults on the line before the permission arrives, it sends no request.
The fault waits in an MSHR and is completed by the permission. If the push is
cancelled, the waiting fault turns into a normal `rd_X`. The network keeps
messages from one node to another in order, so the hint, sent first, reaches
the target before the lock-line. The protocol does not depend on that order: a
late hint costs only a redundant request.

*Departure:* the scheme as first described sends the hints when the lock
request arrives at the holder. This design sends them when the request is
served. Only then is it known which candidates are still modified and will
really be pushed, so a target is never told to wait for a line that will not
come.

## Matching pushes with permissions (push_match)

The hint (from the pusher) and the permission (from the directory) take
different paths and may arrive in either order. The target may also be unable
to take the line. The table keeps each unmatched event (hint or permission,
line address, accepted/granted) until its partner arrives, then decides:

| hint | permission | outcome |
|---|---|---|
| accepted | `PERM_X` | **commit**: install the line exclusive |
| accepted | `PERM_NACK` | **drop**: nothing installed; a waiting write fault becomes a `rd_X` |
| refused | `PERM_X` | **hand back**: the target owns a line it cannot keep, so it writes it back |
| refused | `PERM_NACK` | nothing |

Two refusals pair with each other regardless of line, so refusals never pile
up. `TRACK` (4) entries are kept. An assertion flags overflow, and an
outcome leaves one cycle after the completing message. A hand-back is skipped
when the node has its own request for that line outstanding, or sends one in
the same cycle, because the directory will answer that request.

## Node controller details (iql_sp_node)

The cache is outside the node and is asked combinationally:

* is the lock-line present?
* is the line of an incoming intervention held?
* is each push candidate still modified?
* is there room to sink a pushed line?

The node reports back through two fill strobes (reply or lock-line, and
committed push) and `2+DATA_SLOTS` invalidate strobes.

The cache's answers do not yet reflect the fills and invalidations of the
current cycle, so the node corrects two cases itself:

* A lock-line that is handed over in this cycle does not count as present for
  an acquire in the same cycle. Without this, the acquire would move the LST
  entry to HELD with no line behind it.
* An intervention for a line whose push commits in this cycle is answered from
  the pushed data. The line passes straight through to the requestor and is not
  installed. A write fault waiting on that push is turned into a `rd_X`.

Outstanding requests sit in `MSHRS` (4) entries. A NACKed request is retried
after `RETRY_DELAY` (16) cycles, a `rd_X_lp` with its retry bit. One cycle can
produce up to `9+2*DATA_SLOTS` messages (for example, an intervention answer and
a full hand-over with pushes), so the messages go into a 32-entry queue and leave
one per cycle.

Latency through the design, in clock cycles:

* A release store puts the lock-line on the network two cycles later.
* A network hop takes one cycle.
* The directory turns a request into its reply in one cycle, plus one cycle in
  its output queue.

## Parameters (top: iql_sp_system)

| parameter | default | notes |
|---|---|---|
| `NODES` | 16 | largest machine of the evaluation |
| `DATA_SLOTS` | 2 | lines pushed per lock |
| `LST_ENTRIES` | 8 | locks tracked per node (own choice) |
| `DEFER_LIMIT` | 1024 | deferral bound in cycles (own choice; only "brief and bounded" is required) |
| `TRACK` | 4 | push/permission table entries (own choice) |
| `RETRY_DELAY` | 16 | cycles before a NACKed request is retried (own choice) |
| `DIR_LINES` | 256 | lines served by the home (own choice; a real home covers all its memory) |

Line size is 64 bytes (`LINE_OFF = 6` in the package) and node ids are 6 bits.
The LPT has 64 entries and the node 4 MSHRs.

Synthesized by yosys at these defaults, the top is about 60k cells and 83k
flip-flop bits. Most of the flip-flops are the 256 directory entries and the 16
nodes' message queues.

## How far to trust it; what is missing

Built and checked: lock prediction, the four-state LST with bounded deferral,
and the directory queue with revision-driven dissolution and write-back
breakdown. Also built and checked: push learning with per-line confidence,
hint/write-back/permission pushing, push matching, waiting write faults, NACK
retry, and a contended network. Each has its own testbench. An end-to-end test
at the default size checks across 16 nodes that no line is ever owned by two
caches. It also checks that every critical section completes and that every
mechanism fires.

Not built:

* **Processor, caches, DRAM and data path.** These are conventional parts
  outside the scheme. The processor is 4-wide out-of-order with 64 KB/128 KB
  L1s and a 1 MB L2. Their interfaces are the top's ports.
* **The directory's Shared state and read-shared traffic.**
* **The snoop-bus (SMP) variant.** It uses the same LPT/LST but pushes data
  directly over a crossbar and orders the annotated write-back on the bus.
* **Distribution of memory over several homes.**

The push-matching table, the LPT organisation, all table sizes, the deferral
bound and the retry delay are this design's own choices.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. List the package first,
then the modules the testbench needs:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/iql_pkg.sv rtl/lpt.sv rtl/lst.sv rtl/push_match.sv rtl/iql_directory.sv \
  rtl/msg_network.sv rtl/iql_sp_node.sv rtl/iql_sp_system.sv \
  tb/iql_sp_system_tb.sv --top-module iql_sp_system_tb -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb/lpt_tb.sv` | allocation on an observed acquire, counter training, tag mismatch, one-cycle lock-address hand-off |
| `tb/lst_tb.sv` | REQUESTED→HELD→release with a buffered request; counter learning and hysteresis; slot replacement; deferral bound (exact cycle count); NACK dropping a buffered request; eviction |
| `tb/push_match_tb.sv` | all four hint/permission outcomes in both orders; refusal pairing; pending query; free count |
| `tb/iql_directory_tb.sv` | three-node queue and its dissolution; NACK of a busy line; breakdown of a four-node queue and its draining; two-node write-back race; push grant and both refusal cases |
| `tb/msg_network_tb.sv` | one-cycle hop; round-robin and fairness; random traffic with back-pressure, checked for loss, duplication, misrouting and per-pair order |
| `tb/iql_sp_node_tb.sv` | the node's message sequences for acquire, write fault, NACK retry (cycle count), deferral and release, learning then pushing (hint before lock-line), commit/drop/hand-back, waiting write fault, plain intervention, deferral bound (cycle count), eviction |
| `tb/iql_sp_kernel_tb.sv` | lock-contention kernels at the default size with 4, 8 and 16 processors (the machine sizes of the evaluation): two migratory lines, one migratory line, data that does not follow the lock, and a stress mix of two locks with caches that evict lines and refuse one push in four at random; reports critical sections, lock hand-over time and push outcomes (used, evicted, rejected, invalidated) |
| `tb/iql_sp_system_tb.sv` | the default 16-node top with four active processors: contention with queueing and pushes, refusing caches, a holder past the deferral bound, a queue breakdown, and a third processor stealing a line mid-push; counts and checks every mechanism |

In the kernel test at 4 to 16 processors, a lock moves from one holder to the
next about 5 clock cycles after the release store. That is release, one hop, and
fill; the directory is not on the path. Where the critical section writes the
same lines every time, nearly every pushed line is used. Where it writes a
random line of a pool, the confidence counters hold pushes down to about a
third of a line per critical section, and most of those are not used. The
counters limit that waste but cannot remove it.

The stress mix runs 16 processors on two locks. The caches evict data lines
between critical sections and refuse a quarter of the pushes. All 96 critical
sections finish, and no line is ever held by two nodes; this was run with 20
random seeds. Refused pushes are handed back to the home, and the rest are
almost all used.

The end-to-end testbench's processors are small behavioural models. Each trains
its predictor, acquires, write-faults on two data lines, holds the lock and
releases it. The caches are one ownership bit per line.
