# NetTM: eager hardware transactional memory for a multithreaded soft multicore

Packet-processing software on a soft multicore usually protects shared state
with locks. Coarse locks are easy to write but make threads wait on each other
even when they touch different data; fine-grained locks are fast but hard to get
right. This design lets the programmer keep the coarse critical sections and
runs them *optimistically* as hardware transactions instead. All threads may be
inside "the same" critical section at once. The hardware tracks, per thread,
which memory words the section read and wrote. Only when two threads really
touch the same word does one of them give way. The loser either waits or is
rolled back to the start of its section.

The RTL here is the memory and synchronisation side of a two-processor,
four-threads-per-processor (eight thread contexts) multicore:

- the lock/transaction unit;
- the conflict-detection pipeline in front of a shared data cache;
- the undo-log that rolls back aborted transactions;
- the path to off-chip memory;
- the packet input and output memories.

The processors are not included. Their traffic (data accesses, lock/unlock
requests, stack-pointer writes) enters through ports of the top module,
`nettm_top`.

Transactional memory is *eager* here in both senses:

- Conflicts are detected at the access itself, not at commit time.
- Stores go straight into the shared cache and memory. The old value is saved
  in an undo-log, so commit costs nothing and abort must restore memory.

## Thread identity and the package

`rtl/nettm_pkg.sv` holds the shared constants and types:

- 2 processors × 4 threads = 8 thread contexts. A thread's global number is
  `{processor, local thread}`, 3 bits.
- 16 lock identifiers.
- 2-bit version numbers.
- 32-bit addresses and data.
- The signature-row slice type `{rd, wr, ver[1:0]}` and the undo-log entry
  `{addr, data}`.
- The response code `resp_t`: DONE, REPLAY or ABORT.

## Locks become transactions (`sync_unit`)

Software keeps using lock/unlock instructions with a 4-bit identifier. The
parameter `TX_ID_MASK` (default: identifier 0 only) says which identifiers mean
"transaction"; the others stay ordinary mutexes.

- **Mutex:** a lock on a free mutex is granted. A lock on a held mutex blocks
  the thread (`thread_blocked`) until the owner unlocks. The mutex then passes
  straight to the next waiting thread, in round-robin order after the old owner.
- **Transaction:** a lock on a transactional identifier is always granted and
  starts a transaction. Nested locks only count depth; the outermost unlock
  commits. Commit is one cycle: the thread's version number advances (which
  invalidates its signature bits everywhere, see below), and its undo-log
  partition is emptied.
- **Abort:** the conflict pipeline asks the unit to abort a set of threads. The
  unit pulses `thread_abort` and marks the thread *aborting* while its undo-log
  is played back. When the rollback ends, the version advances. The thread then
  waits (`thread_awaiting_restart`) until the transactions it lost to have
  ended, and `thread_restart` then tells its processor to re-execute the
  section from the start. The processor is responsible for restoring its
  registers to the lock point.
- **Age order:** the unit keeps an age matrix `older[i][j]`. A new transaction
  is younger than every running one. A restarted transaction keeps its original
  age, so it eventually becomes the oldest and cannot starve.

The reply to a lock/unlock comes one cycle after the request (`resp_granted`
= 0 means the thread is now blocked).

## Signatures: one BRAM row per hashed address

This is the central structure and the least obvious one. Every transaction
needs a read-set and a write-set. Instead of a separate bit vector per thread,
the sets are stored *transposed* in one block RAM:

- `sig_hash` folds the word address (bits 31:2) into a 10-bit row index by
  XOR.
- `signature_table` has 1024 rows of 32 bits. Each row holds a 4-bit slice per
  thread: a read bit, a write bit and a 2-bit version. Thread *i* owns bits
  `[4i+3:4i]`.

One read of one row therefore shows, for that address hash, which of the eight
threads have read or written it. Conflict detection is a single BRAM access,
however many threads there are.

**Clearing without clearing.** A commit or an abort would have to wipe a
thread's bits from all 1024 rows. Instead, every thread has a current version
number (`cur_ver`), and a slice only counts as *valid* when:

- the thread has a live transaction, and
- the slice's version equals the thread's current version.

Bumping the version at commit or rollback end makes all the thread's old bits
invalid at once. Stale slices are rewritten lazily: every access that writes a
row back also clears each stale slice and stamps it with its owner's current
version.

With 2-bit versions, a slice left untouched for exactly four transactions of
its owner looks valid again. That causes a false conflict, which costs time but
never correctness.

**Conflict rule** (`conflict_detector`, combinational):

- a load conflicts with another thread's valid write bit;
- a store conflicts with another thread's valid read *or* write bit.

A conflict-free transactional access sets its own read or write bit in the row
that is written back. Because rows are hashed, two different addresses can
share a row, which gives false conflicts but never missed ones.

## The access pipeline (`tm_access_stage`)

Every data access from the processors goes through three cycles:

| cycle | work |
|---|---|
| 0 | hash the address, read the signature row, look up the data cache |
| 1 | check for conflicts, decide the outcome; at the end of the cycle write the updated row back, write the store into the cache, append the old word to the undo-log |
| 2 | registered response on `mem_resp_*`: DONE (with load data), REPLAY or ABORT |

The outcome is chosen in this priority order:

1. **The requester is already being aborted:** ABORT.
2. **Conflict with running transactions:**
   - A transactional requester older than all of them gets REPLAY (it waits).
   - A transactional requester that is not the oldest aborts itself. The
     winners are recorded so that it restarts only after they finish.
   - A non-transactional requester gets REPLAY, and the transactions in its
     way are aborted. Ordinary code always wins, so it can never be blocked by
     a transaction.
3. **Conflict only with transactions already rolling back:** REPLAY, until
   their old data is back.
4. **Cache miss:** REPLAY, and a fill is requested.
5. **Store with the load/store queue full:** REPLAY.

REPLAY means the processor simply re-issues the same access later. Nothing has
changed in the signature table, cache or log.

Stores log the *old* word, read by the cache lookup in cycle 0, before they
overwrite it. Stores into the part of the stack the transaction allocated
itself are not logged (see the log filter). A write in cycle 1 to the address
looked up in cycle 0 is forwarded, both in the signature table and in the
cache, so back-to-back accesses to one word see each other.

## Rolling back (`undo_log`, `log_filter`)

`undo_log` is one memory of `8 × LOG_DEPTH` entries (1024 at the default). It is
split into equal partitions with one write pointer per thread.

- **Commit** resets the thread's pointer.
- **Abort** starts a flush:
  1. The log raises `flush_req`. The access pipeline then stops accepting new
     accesses.
  2. Once the pipeline has drained, it answers `flush_grant`.
  3. The log writes the saved words back into the cache (and through it to
     memory), newest first, so that the oldest value of each word wins.
  4. `flush_done` tells the sync unit that the rollback is complete.
- **Several aborts** are served one at a time, lowest thread first.
- **A full partition** drops the entry and raises a sticky `log_overflow` flag
  for that thread. Size `LOG_DEPTH` for the longest transaction.

`log_filter` saves log space. For each thread it keeps:

- the last stack-pointer value reported on `sp_wr_*`;
- a checkpoint of it taken when the transaction began.

The stack grows downward, so a store with `last_sp <= addr < checkpoint` lands
in stack space that did not exist when the transaction started. Such a store
needs no undo and is not logged (`ev_log_filtered`).

## Cache and memory path (`data_cache`, `load_store_queue`, `bus_arbiter`)

- **`data_cache`:** 16 KB, shared by all processors, direct-mapped, one 32-bit
  word per line.
  - It is write-through and does not allocate on a store miss.
  - A load miss sends a read into the queue, and the access replays. The fill
    comes back from the queue and is written into the cache when the write port
    is free.
  - Per line, it remembers that a fill is pending. A store to the line in the
    meantime marks the fill stale, and the stale fill is discarded.
- **`load_store_queue`:** up to 64 requests (loads and stores merged), served
  to memory strictly in order, with one read outstanding. Read data goes back
  to the cache as a fill.
- **`bus_arbiter`:** a small round-robin arbiter. It is used four times: data
  bus, sync bus, input-memory bus and output-memory bus. Each bus carries one
  request per cycle, in a ready/valid handshake.

## Packet memories (`input_buffer`, `output_buffer`)

- **`input_buffer`:** 16 KB divided into 10 slots of 1536 bytes.
  - A packet arrives as a stream of 32-bit words (`rx_*`, `rx_last` marks the
    end) and fills a free slot.
  - A processor requests TAKE to get the next complete packet as
    `{valid[31], slot[19:16], length[15:0]}`, READs its words, and FREEs the
    slot when done.
  - When all slots are busy, `rx_ready` is low.
- **`output_buffer`:** 16 KB.
  - Processors WRITE words and then SEND a packet (start address and
    length in words). The reply says whether the send was queued.
  - Up to 8 sends are queued and streamed out in order on `tx_*`.
  - `tx_sent` pulses when a packet has left.
  - Which thread owns which part of the output memory is left to software.
    This is one of the things the design expects software to protect with an
    ordinary mutex.

## Top-level interface and timing

`nettm_top` brings out these ports:

| ports | meaning |
|---|---|
| `mem_req_*[p]` / `mem_resp_*` | data access with local thread number; response two cycles after acceptance, with the global thread number |
| `sync_req_*[p]` / `sync_resp_*` | lock/unlock; reply one cycle after the grant |
| `sp_wr_*[p]` | stack-pointer writes |
| `thread_*`, `log_overflow` | per-thread status and abort/restart pulses |
| `sdram_*` | in-order memory requests and read data |
| `rx_*`, `ib_*`, `ob_*`, `tx_*` | packet paths |
| `ev_*` | one-cycle strobes: conflict, filtered log entry, rollback write |

A processor built for this interface must:

- re-issue an access that got REPLAY;
- on `thread_abort`, discard its in-flight work for that thread;
- on `thread_restart`, resume the thread at its saved lock point;
- report its stack-pointer writes.

Parameters of `nettm_top`:

| parameter | default | meaning |
|---|---|---|
| `TX_ID_MASK` | `16'h0001` | lock identifiers treated as transactions |
| `SIG_ROWS` | 1024 | signature-table rows (power of two) |
| `LOG_DEPTH` | 128 | undo-log entries per thread |
| `DCACHE_BYTES` | 16384 | data cache size |
| `LSQ_DEPTH` | 64 | load/store queue entries |

## What follows the source design and what is chosen here

These follow the source design:

- 8 thread contexts on 2 processors;
- 16 hardware mutexes, with a designer-set mapping of identifiers to
  transactions;
- a signature table with read, write and 2-bit version per thread per 32-bit
  row;
- version-based lazy clearing;
- the extra pipeline cycle for hashing and conflict detection;
- an undo-log of 1024 entries shared by the 8 threads, cleared at commit by a
  pointer reset and flushed newest-first under exclusive cache access;
- the stack filter with last and checkpoint stack pointers;
- a shared 16 KB data cache with 32-bit lines;
- an in-order load/store queue of 64;
- 16 KB packet memories, with 10 input slots.

These are this design's own choices:

- **The hash.** The source design uses application-specific hash functions
  whose bit selections are not given, so this design uses an XOR fold.
- **1024 signature rows.** This is two 512-row BRAMs stacked.
- **The contention policy.** This covers oldest-waits, younger-aborts-itself,
  non-transactional-wins, and restart only after the winners have ended.
- **When the version advances after an abort.** It advances at the end of the
  rollback, not at the abort, so that the aborted writer's bits keep others
  off its data until the data is restored.
- **Cache organisation:** direct-mapped, write-through, no write-allocate.
- **Log overflow behaviour.**
- **Packet memory details:** slot size, request set, send-queue depth and
  stream formats.
- **All handshakes and response codes.**

Not included:

- the processors (5-stage, 4 threads issued round-robin) and their instruction
  caches;
- the register checkpoint and restart inside the processor;
- the DDR2 SDRAM controller.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Most combine directed corner cases with a long
randomized run compared against a small reference model. For example, the
access-stage test models every signature row and the outcome rules, and the
cache test models the queue and memory behind the cache. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/nettm_pkg.sv rtl/*.sv tb/tb_nettm_top.sv \
          --top-module tb_nettm_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run a single block. The package must come first.

`tb_nettm_top` runs the whole design at its default sizes. Its scenario:

- Six threads on both processors increment one shared counter and a private
  word inside nested transactions.
- Two threads use an ordinary mutex.
- Memory is a behavioural model with random latency and stalls.
- At the end, a burst of stores against stalled memory fills the load/store
  queue.
- Four packets are forwarded through the input and output memories.

The testbench checks that:

- the shared counter equals the number of commits;
- every private word is right;
- the mutex section was never entered by two threads at once.

It also counts each mechanism (conflict, abort, rollback write, restart,
replay, cache miss, filtered log entry, mutex block, nesting, queue full) and
fails if any never happened. It runs in a few seconds.

`tb_nettm_flow` runs a stateful packet-processing workload on the full-size
design. Forty packets belonging to six flows stream into the input memory, and
all eight threads process them:

1. Take a packet.
2. Update its flow's packet and word counts and a global counter in one
   transaction. Every fourth packet only reads its flow entry, as a read-only
   transaction.
3. Allocate output memory from a shared pointer, copy the packet there and
   queue it for sending, all under an ordinary mutex. I/O is not undoable, so
   it stays lock-protected.

At the end the testbench checks that:

- every packet left exactly once and unchanged;
- the flow table, counter and allocation pointer in memory match what the
  packet list predicts.

This is the usage pattern the design targets: a coarse transaction around
shared state and a lock around I/O.
