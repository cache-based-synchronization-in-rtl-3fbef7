# Cache-based locks for shared-memory multiprocessors

Processors that share memory usually synchronise by spinning on a lock word,
which floods the bus or network with retries whenever a lock is contended. This
design moves the lock into the cache line itself. A cache line can be
read-locked or write-locked, and the processors waiting for a lock form a
hardware queue out of their own cache lines. A release hands the lock (and the
block's data) straight to the next waiter. Readers that are queued together
get the lock together, and nobody spins.

There are two implementations, one for each kind of machine. They share no
hardware and sit side by side in the top module `cbl_top`:

| system | interconnect | queue kept by | default size |
|---|---|---|---|
| snoopy (`cbl_snoopy_top`) | one broadcast bus | line states and answers on the bus; each group's leader counts its readers | 16 processors |
| directory (`dcbl_top`) | any network that delivers messages in order between each pair of endpoints | a doubly linked list through the cache lines; memory keeps only the queue tail | 128 processors |

Processors are not part of the design. Each node has a processor port, and
testbenches drive it.

## Processor port (both systems)

`p_valid`, `p_op`, `p_addr`, `p_word`, `p_wdata` in; `p_done`, `p_err`,
`p_rdata` out. The requester holds `p_valid` until `p_done`.

- `p_op` is one of `PR_RLOCK`, `PR_WLOCK`, `PR_UNLOCK`, `PR_READ`, `PR_WRITE`
  (defined in `cbl_pkg`).
- A lock request finishes when the lock is held. A queued requester simply
  waits; `p_done` then stays low.
- Unlock, read and write finish in the cycle they are presented, unless the
  node is busy with bus or network traffic.
- An unlock returns at once. The hand-over to the next waiter goes on in the
  background.
- Reads and writes are allowed only on a block whose lock the node holds, and
  writes only under a write lock. Any other access gets `p_err`.

## The snoopy system

Each node has a small fully associative lock cache (`cbl_lock_cache`, 4
entries). An entry holds:

- the block,
- one of 13 line states,
- a next-node id,
- a count.

Every state name combines the same letters:

- R or W: read or write lock.
- O: owner, the leader of a group.
- V: waiting ("void").
- T: the tail of the queue.

So `RO` is a read owner, `ROVT` is a waiting read leader at the tail, `WOV` is a
waiting writer, and so on. `O` and `OT` are owners whose own processor has
unlocked while other readers of the group still hold the lock.

A lock request is broadcast on the bus (`cbl_bus`: round-robin arbiter with one
transaction per cycle). The tail of the queue answers:

- **hit**: a read request reached a read tail whose group has not yet formed a
  waiting queue. The requester shares the lock. The group's owner counts it in,
  and the requester records the owner as its leader.
- **wait**: a read request reached a waiting read group at the tail. The
  requester joins that group.
- **wait(T)**: any other case. The requester starts a new group and takes over
  the tail. The old tail records it as its next node.
- **no answer** (hit(M)): nobody holds the block. Memory (`cbl_memory`, 4-cycle
  access) supplies it.

Releases:

- A reader that is not the leader broadcasts **read-unlock** addressed to its
  leader, which counts down.
- When a leader's count reaches zero and somebody waits, it sends **wake** with
  the block to its next node. A woken read leader wakes the whole group in the
  same cycle.
- A writer releases by wake with write-back, or by write-back alone when nobody
  waits.

An idle owner at the tail keeps the line. Its own processor can re-lock it
without a bus cycle. When another node asks, it drops the line silently and
memory answers.

## The directory system

Each node (`dcbl_node`) has one lock line. It holds:

- the block,
- the lock kind,
- `prev` and `next` pointers,
- its position state.

The memory (`dcbl_directory`) keeps one queue-tail pointer per block.
Everything happens by messages (`dcbl_pkg`).

**Joining.** A LOCK request goes to memory.

- If the block is free, memory answers GRANT with the data.
- Otherwise memory forwards the request to the current tail (FWD) and makes the
  requester the new tail.
- The old tail links the requester as its `next`. It answers SHARE with the data
  if both are readers and it holds the lock; otherwise it answers WAIT.
- A reader that gets the lock passes SHARE on to a reader waiting behind it. In
  this way a release runs down the list until it reaches a writer.

**Leaving** depends on where the node sits.

- **Head** (no prev): WAKE to `next`, with the data. A head writer first writes
  the block back (WB).
- **Middle**: PREV_CHG to `next`. After next's ACK, NEXT_CHG to `prev`.
- **Tail**: UNL_TAIL to memory. Memory accepts only if the sender is still the
  tail. It moves the tail back to `prev` and sends TAIL_CHG there; prev then ACKs
  the leaver. With no prev, memory ACKs the leaver directly and the block
  becomes free.

**Races.** While a node is leaving, it is *transient*. It refuses (NACK) a WAKE
or PREV_CHG from its prev. NEXT_CHG and TAIL_CHG are always honoured, which
prevents deadlock. A refused leaver retries, using the pointers it has by then.
A WAKE or PREV_CHG is also honoured only from the node's current prev, so a
stale retry cannot reach a node that has since left and rejoined.

**Network.** The protocol needs only in-order delivery per source–destination
pair. `dcbl_network` provides that:

- a 4-deep FIFO per source;
- per destination, round-robin choice among the source FIFOs whose head message
  is addressed to it.

It stands in for the packet-switched multistage network that the evaluation
machines would use.

## Where this departs from the original proposal or fills gaps

- **Snoopy state machine.** It is rebuilt from the written rules. These are
  this design's choices:
  - a waiting writer keeps its tail state when woken;
  - read tails answer wait(T) to write requests;
  - an idle owner drops its line silently.
- **Snoopy releases.** They are queued per line. The line keeps answering as if
  still held until its release has been on the bus.
- **Aborts.** The original only says that an unlock aborts when it meets a
  transient node or a changed tail. Here an abort is a NACK message followed by
  a retry.
- **Directory lock lines.** Each node has one. The original lock cache for the
  directory machine has no given size.
- **Not built:**
  - the data caches and their ordinary coherence protocol;
  - the processors;
  - the option of keeping lock state in memory for direct-mapped caches;
  - the multistage network itself.
- **Widths.** Message and field widths are this design's choice: 8-bit node ids,
  10-bit block addresses (1024 blocks), 128-bit blocks of four 32-bit words.

## Files

`rtl/`: `cbl_pkg`, `cbl_lock_cache`, `cbl_bus`, `cbl_memory`, `cbl_snoopy_top`,
`dcbl_pkg`, `dcbl_node`, `dcbl_directory`, `dcbl_network`, `dcbl_top`, `cbl_top`.
All resets are synchronous, active low (`rst_n`).

`tb/`: one self-checking testbench per module, `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_cbl_snoopy_top` plays a six-processor queue example, then a 16-node
  random stress test.
- `tb_dcbl_top` walks through every list operation with 8 nodes, then a random
  stress test.
- `tb_cbl_top` runs both systems at full size together. It counts every bus
  answer and every message kind and fails if one never occurs.

Simulate, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
  rtl/cbl_pkg.sv rtl/dcbl_pkg.sv tb/tb_cbl_top.sv --top-module tb_cbl_top
./obj_dir/Vtb_cbl_top
```

## How far to trust it

Every testbench passes with random start values:

- mutual exclusion is checked at every grant;
- data is handed on correctly under contention;
- every block's counter matches the number of write locks taken on it.

The directory protocol's retry scheme has been exercised by random stress, not
proven. Gate-level synthesis of the 128-node system is slow because the network
compares every source against every destination.
