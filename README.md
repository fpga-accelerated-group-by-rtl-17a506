# Group-by COUNT aggregation with CAMs as synchronizing caches

This is synthesizable SystemVerilog for a hardware-multithreaded hash aggregator. It computes
`SELECT key, COUNT(*) ... GROUP BY key` over a relation that sits in host memory. It follows the
FPGA design published as *"FPGA-Accelerated Group-by Aggregation Using Synchronizing Caches"*.

An aggregation over a large hash table has almost no locality. Every tuple costs several dependent
memory round trips: read the bucket head, walk the bucket list, then write. Each round trip takes
hundreds of cycles. The engine does not wait on them. Every tuple becomes a small hardware *job*.
A job that issues a memory request parks its context in a register file. The single execution
stage then advances some other job. With enough jobs in flight, the memory channels stay busy.

Many jobs in flight bring two problems:

* **Conflicting updates.** Two jobs whose keys hash to the same bucket must not interleave their
  read-modify-write of that bucket's list.
* **Repeated keys.** Many jobs may carry the same key, and each of them would walk the same list.

Two small content-addressable memories (CAMs) solve both problems without any memory-side locking:

* The **Filter CAM** caches (key, partial count) for every key that has a job in flight. A tuple
  whose key is already there adds 1 to the cached count and ends at once. No memory traffic
  happens for it.
* The **Lock CAM** holds the bucket index of every bucket list that some job is reading or
  modifying. An entry is an exclusive lock on that bucket.

## Life of a job

The execution stage takes one event per clock and moves that job one step forward. Events, in
priority order:

1. a memory response: bucket-list write, then bucket-list read, then hash-table channel;
2. alternately, a job from the ready FIFO or a new tuple. A new tuple is taken only if a job id
   is free.

```
new tuple ─► Filter CAM search
   hit  ─► count+1, job ends                          (early termination)
   miss, CAM full ─► push to ready FIFO, retry later  (wait for space)
   miss ─► insert (key,1) and, in the same cycle,
          Lock CAM search on hash(key)
             hit or full ─► push to ready FIFO, retry (wait for lock)
             miss ─► insert bucket (lock acquired), read bucket head
bucket head = 0 ────────────────────────────────► insert new node
node word0 read: key matches ─► take+remove Filter entry, write count+partial ─► ack ─► unlock
                 no match    ─► read word1 (next): 0 ─► insert new node, else read next node
insert new node: take+remove Filter entry, write {key,partial} into a fresh node ─► ack
                 ─► link it (tail.next or bucket head) ─► ack ─► unlock
```

Correctness rests on two ordering rules:

* **Removal point of the Filter CAM entry.** A job reads its accumulated count and removes its
  Filter CAM entry in the same cycle as it issues the final write. Tuples with the same key that
  arrive later open a new entry with count 1. Their job then finds the bucket still locked until
  the earlier write has completed.
* **Lock release point.** A lock is released only after the memory write-complete response.
  The reason is that reads and writes travel on different channels, which do not order against
  each other.

Worked example, with keys `A, C, A, B, A` and `hash(A) = hash(C)`:

1. A inserts (A,1) and locks the bucket.
2. C inserts (C,1) and waits for the lock.
3. The second A hits the Filter CAM: the entry becomes (A,2) and the job ends.
4. Job 1 finds no A in the table. It removes (A,2), writes a node with count 2 and unlocks.
5. C takes the lock.
6. The last A arrives after (A,2) was removed. It opens a new (A,1) and later adds 1 to the
   stored 2, giving A = 3.

`tb_agg_engine` replays exactly this sequence.

Each job has at most one memory request outstanding. The engine sizes its request, response
and ready FIFOs to `NJOBS`, so none of them can overflow, and responses never need
back-pressure.

## Hash table in memory

Each engine owns one table. All words are 64 bits and all addresses are word addresses
(`agg_pkg.sv`).

| region     | address                  | contents                                   |
|------------|--------------------------|--------------------------------------------|
| relation   | `rel_base + i`           | tuple i: `[63:32]` grouping key, `[31:0]` primary key |
| buckets    | `ht_base + b`            | index of the first node, 0 = empty         |
| node k     | `node_base + 2k`         | `{key[31:0], count[31:0]}`                 |
|            | `node_base + 2k + 1`     | index of the next node, 0 = end of list    |

Rules for these regions:

* Nodes are allocated from a counter that starts at 1, and indices below `node_cap` are usable.
* The bucket array and the node pool must be zero before `start`.
* A new node is appended at the list tail. The new node's `next` is therefore already 0, and
  only one existing word changes.
* If the pool runs out, the job drops its partial count and `stats.overflow` is raised.

The bucket index is `(key * 0x9E3779B1 mod 2^32) >> (32 - BUCKET_W)`.

## Channels and the multiplexed pair

Memory is reached through channels. A channel takes one 64-bit read or write per cycle with
valid/ready. It returns read data or a write-complete, tagged, one per cycle. Responses are
always accepted.

A single engine uses four channels, one per function:

* tuple stream;
* hash-table bucket heads;
* bucket-list reads;
* bucket-list writes.

Such fixed assignment leaves channels idle whenever one stage backs up. `mux_engine_pair`
therefore puts two engines on five channels:

| pair channel | use |
|---|---|
| 0 | tuples, shared by both engines |
| 1 | hash table, engine 0 only |
| 2 | hash table, engine 1 only |
| 3 | bucket-list reads, shared |
| 4 | bucket-list writes, shared |

`chan_arbiter` handles each shared channel:

* It arbitrates round-robin when both engines request.
* It writes the engine index into the top tag bit of the request.
* It routes each response back by that tag bit.

`agg_fpga_top` fits 3 pairs (6 engines) into 16 channels. Channel 15 stays idle. Each engine
aggregates its own slice of the relation into its own table. The host then merges the six
tables, and other FPGAs add more tables if there are several. That merge is not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/agg_pkg.sv` | widths, channel request/response structs, engine configuration and statistics structs |
| `rtl/agg_fpga_top.sv` | top: 3 pairs, 16 channels |
| `rtl/mux_engine_pair.sv` | two engines on five channels |
| `rtl/chan_arbiter.sv` | sharing of one channel by two engines |
| `rtl/agg_engine.sv` | one engine: job contexts, event selection, the workflow above |
| `rtl/filter_cam.sv` | key/count CAM: parallel compare, increment, insert, read-and-remove |
| `rtl/lock_cam.sv` | bucket-lock CAM |
| `rtl/key_hash.sv` | bucket hash |
| `rtl/tuple_reader.sv` | relation streaming with credit flow control |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO: ready queue, tuple queue, channel buffers |
| `tb/mem_model.sv` | behavioural multi-channel memory used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CHANNELS` | 16 | memory channels of the FPGA; pairs = `CHANNELS / 5` |
| `NJOBS` | 128 | job contexts per engine |
| `FILTER_ENTRIES` | 64 | Filter CAM entries per engine; bounds the jobs past the filter |
| `LOCK_ENTRIES` | 64 | Lock CAM entries per engine |
| `BUCKET_W` | 20 | log2 of the bucket count of each table |
| `TUPLE_FIFO` | 256 | tuple queue depth, and the tuple-read credits |

The following are the published design's own numbers: 16 channels, 4 channels per engine,
5 per pair, 6 engines, 8-byte tuples with a 4-byte grouping key, and COUNT as the aggregate.

The published design gives no job count, CAM size, bucket count, hash function or node
format. Those values here are this implementation's choices. Larger CAMs cost clock frequency
on an FPGA, because every entry has its own comparator.

For full throughput, `TUPLE_FIFO` must exceed the memory latency in cycles. `FILTER_ENTRIES`
should be of the order of the memory latency too.

## Simulating

Each testbench is self-contained and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/agg_pkg.sv tb/tb_agg_fpga_top.sv --top-module tb_agg_fpga_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others.

`tb_agg_fpga_top` runs the top at its default parameters. It runs the five key distributions at
2^10 distinct keys, uniform keys at 2^16 and 2^22, and an overflow case. For each run it:

* starts all six engines together;
* walks every table in memory and checks bucket placement and key uniqueness;
* merges the tables and compares them with reference counts.

It also checks that every mechanism occurred at least once:

* Filter CAM hit;
* Filter-full wait;
* lock wait;
* update;
* insert;
* list walk past a non-matching node;
* contention on a shared channel;
* memory back-pressure;
* node-pool overflow.

It also checks the rate:

* every checked run must reach 0.9 tuples per cycle for the six engines together;
* the uniform rate at 2^22 keys must stay within 10 % of the rate at 2^10 keys.

The bound comes from the Filter CAM. Each engine has at most 64 jobs past it, and a tuple
that misses needs about three memory round trips. The whole run takes a few seconds.

The memory model has a latency of 100–120 cycles and drops ready in 5 % of cycles. Under that
model the six engines sustain:

* about 1.0 tuple per cycle on uniform keys;
* 1.1–1.6 tuples per cycle on skewed keys (heavy hitter, self-similar, moving cluster,
  Zipf 0.5). Filter CAM hits skip the memory traffic entirely there.

For comparison, the published system reports about 450 M tuples/s on two FPGAs at 150 MHz,
which is about 1.5 tuples per cycle per FPGA. The memory model is not that platform, so the two
figures are indicative only.

## How far to trust it, and where it departs

* **What the testbenches check.** Every module has a testbench that compares it with an
  independent model. The engine, pair and top testbenches check complete aggregation results
  against counts computed in the testbench. Timing closure, area and real-platform behaviour
  are untested.
* **Fixed policies.** The workflow, the two CAMs, the recycling of waiting jobs through a ready
  FIFO, and the channel counts follow the published design. The following are this
  implementation's own choices:
  * the event priorities of the execution stage;
  * memory responses wake their job directly from a per-channel response queue. The published
    design re-queues a job into the ready FIFO once its request is fulfilled. Here the ready
    FIFO only holds jobs that wait for a CAM slot or a lock;
  * the Filter CAM entry is removed when the final write is issued, and the lock is released at its
    write-complete. The published worked example frees both CAM entries in the cycle the table
    entry is written;
  * tail insertion;
  * the two-word node;
  * round-robin channel sharing;
  * one hash-table channel per engine of a pair.
* **Single clock.** The engines run on one clock. The platform's 300 MHz memory-controller domain
  and any clock crossing are outside this RTL.
* **Not included:**
  * the final merge of the per-engine tables;
  * splitting the relation across engines or FPGAs;
  * the host software;
  * any memory controller or crossbar;
  * the alternative "replicated" layout, with four engines of four channels each. That layout
    is four `agg_engine` instances wired straight to channels, and is not provided as a top.
* **Assumptions about memory contents and engine restarts.**
  * The hash table and node pool must be zero before `start`.
  * An engine may be restarted after `done`. It then starts a new table: nodes are allocated
    from 1 again.
* **Only COUNT.** Other aggregate functions would change the Filter CAM's stored value and
  update, and the node word.
