# SpliCS: a split latency primary data cache

A primary cache is either large or fast, not both. This design splits the L1 data
cache into two stores that work together. Cache A is small and answers in one cycle.
Cache B is large and slower, three or five cycles. Every line in A is also in B
(strict inclusion). A reference probes both directories in the same cycle.

- A line found in A comes back in one cycle.
- A line found only in B comes back after B's latency alone. It is not A's latency
  plus B's, as it would be behind an L0 cache.
- A line that B supplies is then copied into A in the background, so the next
  references to it are fast.

Because most hits are served by A, B can be made bigger and slower than a normal L1
would allow without hurting the processor much. There are no L0-style queues
between A and B. Every store writes both A and B, so A never holds dirty data and
never has to send anything down. B is the write-back cache that L2 sees.

The RTL is SystemVerilog (IEEE 1800-2017). It can be synthesized, and the data
stores are written as plain arrays.

## Organisation

```
            processor (one reference per cycle, id-tagged responses)
              |  req_*            rsp_fast (A hits)     rsp_slow (B hits, misses)
     +--------+-------------------------+--------------------+
     |   directory A   directory B     (both probed in the request cycle)
     |        |              |
     |   data A  <--- BtoAbuf <--- data B  ---- lat_pipe(B_LAT) --> rsp_slow
     |        |                        |
     |   lat_pipe(1) --> rsp_fast    miss_unit (pending miss, write-back buffer)
     +---------------------------------+---------------------------------------
                                       | l2_req_* / l2_w* / l2_r*  (32-byte beats)
                                      L2
```

| module | role |
|---|---|
| `splics_pkg` | sizes, `rsp_t`, `events_t`, line and word helper functions |
| `splics` | top: classifies each reference, steers the data stores, directories, BtoAbuf and miss unit |
| `tag_dir` | one directory per cache: valid, dirty and tag per way, true LRU per set |
| `data_array` | one data store per cache: whole-line read, byte-masked write |
| `btoa_buf` | the B-to-A promotion FIFO, with lookup, squash and store merge |
| `lat_pipe` | fixed-latency response pipeline (1 stage for A, `B_LAT` stages for B) |
| `miss_unit` | the one pending miss, the L2 line transfer, critical-word forwarding, write-back |

Default geometry (the `splics` parameters):

| | cache A | cache B |
|---|---|---|
| size | 4 KB (`A_SETS`=16 x `A_WAYS`=2 x 128 B) | 64 KB (`B_SETS`=256 x `B_WAYS`=2 x 128 B) |
| latency | 1 cycle | `B_LAT` = 3 cycles (5 is the other setting studied) |
| line | 128 bytes | 128 bytes |
| replacement | LRU | LRU |
| write policy | written by every store that hits it | write-back, write-allocate |

Other defaults:

- `BUF_DEPTH` is 1: BtoAbuf holds one line.
- The L1-L2 bus is 32 bytes wide (`BEAT_BYTES`), so a line moves in 4 beats.
- The processor word is 64 bits and byte addresses are 32 bits wide. These two are
  this design's own choice.

Cache B sizes of 32, 64, 128 and 256 KB are all meaningful. Set `B_SETS` to 128,
256, 512 or 1024 to get them. All sizes must be powers of two.

## How a reference is served

In its request cycle, a reference looks up directory A, directory B, the BtoAbuf
entries and the pending-miss register. It then takes exactly one of five paths.
The numbers below are the case numbers used in the RTL comments.

1. **Line in A (and so in B).** The word comes back on `rsp_fast` the next cycle.
   The line becomes MRU in both A and B. A store writes the bytes into A and B in
   that same cycle and marks the line dirty in B.
2. **Line in B only.** The word comes back on `rsp_slow` after `B_LAT` cycles, and
   the line becomes MRU in B. In the same cycle the whole line is copied into
   BtoAbuf, with the store merged in if the reference is a store. If BtoAbuf is
   full, the promotion is dropped and the line stays in B only.
3. **Line in neither.** `miss_unit` sends a read to L2 and collects the four beats.
   The cycle after the beat that holds the requested word, it forwards that word
   on `rsp_slow` (critical-word bypass). After the last beat comes one fill cycle,
   in which no reference is accepted:
   - B picks a victim: an invalid way, else the LRU way.
   - The new line is written into B as MRU, dirty if the miss was a store.
   - The line is also written into A, replacing A's LRU (or invalid) way.
   - The line B cast out is invalidated in A and squashed in BtoAbuf, which keeps
     A inside B. If it was dirty it goes to the write-back buffer, which sends it
     to L2 as one write request and four beats.
   - If that buffer is still busy with an earlier write-back, the fill waits.
4. **Line in B and still waiting in BtoAbuf.** Served as in case 2, but no second
   promotion is made. A store also updates the waiting copy, so A gets current
   data when the line arrives.
5. **Line is the pending miss.** `req_ready` stays low until the fill has written
   the line. The reference then hits.

Hits in A or B go ahead while a miss is pending. A second miss to a different line
waits until the first miss has been filled (see below).

### Promotions and squashes

BtoAbuf drains into A only in a cycle that does not use A, meaning no reference is
accepted and no fill happens. A stalled reference therefore frees A for a drain. A
drained line goes into the LRU (or an invalid) way of its A set. A lines are never
dirty, so nothing is written back.

A promotion can be lost in two ways:

- **Drop.** The buffer is full when the B hit happens.
- **Squash.** B casts the line out while it is still waiting.

A squash happens when a miss is filled into the same B set as a waiting line, and
the waiting line is that set's victim. With the default one-line buffer and
eager draining, this needs a run of accepted references from the promotion up to
the fill cycle. It is therefore rare with a 2-way B and common with a
direct-mapped B. The end-to-end test forces it with a direct-mapped B.

### Timing at the ports

- `req_valid`/`req_ready` is a valid/ready handshake. `req_ready` is combinational
  in the request's address, because it depends on the lookup result. It is low in
  these cases:
  - case 5;
  - a miss while another miss is pending;
  - the fill cycle;
  - a reference that B would serve while the forwarded miss word is still waiting
    for the slow lane (this keeps the slow lane from being starved).
- Every accepted request gets exactly one response carrying its `req_id`. Loads
  return the addressed 64-bit word. Stores return zero.
- `rsp_fast` carries A hits exactly 1 cycle after acceptance.
- `rsp_slow` carries B hits exactly `B_LAT` cycles after acceptance, and miss words
  when they arrive. The B pipeline has priority on this lane, and the miss word
  waits in a one-entry register until the lane is free.
- Responses from the two lanes can come back out of order. The processor side
  must therefore track ids and have no more than 16 references in flight.
- `ev` gives one-cycle strobes for each case, stalls, promotions, drops, moves into
  A, squashes, inclusion invalidations and write-backs. It is meant for
  performance counters.
- L2 side:
  - A request is a handshake on `l2_req_*`.
  - A write request is followed, starting the next cycle, by 4 beats on
    `l2_wvalid/l2_wdata`, which L2 must accept.
  - A read is answered some cycles later by 4 beats on `l2_rvalid/l2_rdata`, in
    address order.
  - A write-back is always sent before a read, and no read is sent while a
    write-back is still moving. So L2 never returns a line older than one being
    written back.

## Where this RTL makes its own choices

The five cases, parallel probing of two directories, strict inclusion, stores
written to both caches, write-back B, LRU, equal line sizes, a one-line BtoAbuf,
the latencies and the bus width all follow the published design. The following
were left open there and are choices made here:

- **One pending miss.** Hits proceed under a miss, and a second miss waits. A
  processor with more memory-level parallelism would want more miss registers.
- **Write-allocate for store misses.** The store bytes are merged into the fill
  line.
- **When the promotion copy is taken.** The line is copied into BtoAbuf in the
  cycle of the B hit. The data arrays are read combinationally, and the latency of
  B is modelled by `lat_pipe` on the response only. A real slow B array would
  produce the line later. This changes when a promotion can land, not what it
  contains.
- **BtoAbuf depth.** The block diagram draws BtoAbuf with three slots, while the
  text gives it one line. One line is the default here; `BUF_DEPTH` changes it.
- **Stores to a waiting promotion update the waiting copy.**
- **B victim chosen at fill time.** The choice is made when the L2 reply is
  processed, not when the miss starts.
- **A victim chosen before the inclusion invalidation.** In a fill, the A victim is
  picked before the same cycle's inclusion invalidation takes effect. A can lose
  one line it did not need to lose, but inclusion always holds.
- **Responses.** There are two response lanes with request ids, and stores get a
  response.
- **Widths and reset.** The word is 64 bits, the address 32 bits and the id 4 bits.
  Reset is asynchronous and active low; it clears all valid bits. The data arrays
  are not reset.
- **Separate directories.** A single shared directory for both caches was also
  proposed as an option; the two-directory form is built here.

Not part of this RTL: the processor, the L2 cache and main memory. The testbench
has a behavioural L2. The same organisation could serve an instruction cache, but
only the data cache is built.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tag_dir` | 4-set, 4-way directory against a recency-list model; random touch/install/invalidate; lookup, victim and invalidate match every cycle |
| `tb_data_array` | random byte-masked writes against a byte-array model |
| `tb_btoa_buf` | 3-entry buffer against a queue model: push, pop, squash, merge, drop, lookup, count in any combination |
| `tb_lat_pipe` | exact 1- and 3-cycle delay and the busy flag |
| `tb_miss_unit` | one L2 read of 4 beats; critical word one cycle after its beat; store merge; write-back ordered before a read of the same line, 4 consecutive beats |
| `tb_splics` | end to end, two reduced caches side by side (see below) |
| `tb_splics_full` | end to end at the default size |
| `tb_splics_configs` | end to end in all eight evaluated configurations (cache B of 32, 64, 128 and 256 KB, each at 3 and 5 cycles), plus a 1 KB direct-mapped and a 4 KB 4-way cache A |

`splics_env` is the checker shared by the two end-to-end tests:

- It drives random loads and stores and keeps a reference memory.
- It checks every response's data, and its latency:
  - exactly 1 cycle for an A hit;
  - exactly `B_LAT` cycles for a B hit;
  - more than the L2 latency for a miss.
- It counts every mechanism. One that never happens is a failure.
- The assertions in `splics` check inclusion during the run: an A hit is always a
  B hit, a BtoAbuf line is in B and not in A, and a pending line is not in B.

`tb_splics` runs two caches side by side:

- **s0** has the published organisation shrunk to a 2-set A and a 4-set B.
- **s1** has a direct-mapped B, `B_LAT`=5 and a two-line BtoAbuf. It ends with a
  directed sequence that casts a waiting line out of B.

`tb_splics_full` runs 40,000 references over 256 KB of addresses at the default
size, with no parameter overrides. Every mechanism except the squash occurs there.

`tb_splics_configs` runs ten caches side by side: one for each cache B size and
latency the evaluation used, and two with the smallest and the most associative
cache A it tried. Each gets 10,000 random references over 512 KB of
addresses and prints its event counts. The evaluation's traces (TPC-C, TPC-D,
SPEC95) and its processor model are not part of this design, so no CPI figures are
reproduced.

`tb/l2_model.sv` is the behavioural L2. It always hits, answers reads after 10
cycles, stores write-backs and initialises lines from a pattern
(`splics_tb_pkg::init_line`).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/splics_pkg.sv tb/splics_tb_pkg.sv \
    tb/tb_splics.sv --top-module tb_splics -o sim && obj_dir/sim
```

Replace `tb_splics` with any other testbench name. The unit testbenches do not need
`tb/splics_tb_pkg.sv`, except `tb_miss_unit`. Other files are found through `-I`,
because every module, package and interface lives in a file of its own name. For
lint, run `verilator --lint-only -Wall -Irtl rtl/splics_pkg.sv rtl/splics.sv`. The
remaining warnings are unused bits: the byte offset within a word, and the victim
fields of directory A, which A does not need because its lines are never dirty. A
full lint also reports `rst_n` as used both synchronously and asynchronously; the
synchronous use is the assertions' `disable iff`.

## Changing it

- **Cache B size or latency:** `B_SETS`, `B_WAYS`, `B_LAT` on `splics`. 32 KB is
  `B_SETS`=128, and a 5-cycle B is `B_LAT`=5.
- **Cache A:** `A_SETS` and `A_WAYS`. A must keep the same line size as B.
- **BtoAbuf depth:** `BUF_DEPTH`.
- **Line, bus, word and address widths:** these live in `splics_pkg`.
- **More than one pending miss:** this would need several copies of the `miss_unit`
  registers and a per-line pending check in `splics`. Case 5 is already handled by
  comparing the request line with the pending line.
