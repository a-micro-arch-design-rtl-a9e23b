# GPGPU L1 data cache with RVWMO ordering through release-consistency-directed coherence

GPU L1 caches are private to one streaming multiprocessor and usually have
no hardware coherence protocol. Snooping or directories would cost too much
area and bandwidth. Without coherence, a program that passes data between
cores can still be correct if its synchronisation points move the data
explicitly:

- a **release** writes every dirty L1 line back to L2 (global flush);
- an **acquire** drops every L1 line (global invalidate), so later reads
  fetch fresh data from L2.

This is release-consistency-directed coherence (RCC). This design applies
it to the RISC-V weak memory model (RVWMO). The `.aq`/`.rl` bits of
LR/SC/AMO and the predecessor/successor sets of `FENCE` are turned into
three cache operations:

- drain MSHR;
- global flush;
- global invalidate.

The cache orders ordinary same-address accesses with a write status holding
register (WSHR). Together these give an L1 that runs RVWMO programs
correctly and stays non-blocking.

The cache itself is a vector L1 data cache:

- One request covers a whole cache line plus a word mask, which is one word
  per thread of a warp.
- Stores are write-back on a hit and write-around on a miss.
- A vector MSHR with subentries handles read misses.
- A separate "special" MSHR handles atomics, which are performed at L2.

```
            LSU instruction                      LSU response
                 |                                    ^
          +------v-------+                            |
          |  rvwmo_seq   |  FENCE/.aq/.rl -> drain / flush / invalidate
          +------+-------+                            |
                 | L1 operation                       |
  +--------------v------------------------------------+---------------+
  | l1d_cache                                                         |
  |  stage 0: request reg | L2 response reg, tag lookup, MSHR/WSHR    |
  |           probes, decision, all bookkeeping updates               |
  |  stage 1: data array read                                         |
  |  stage 2: data array write, LSU response queue, L2 request queue  |
  |  l1d_tag_array  l1d_data_array  l1d_mshr  l1d_wshr  l1d_amo_mshr  |
  +--------------+------------------------------------^---------------+
                 | L2 request                         | L2 response
                 v                                    |
                              shared L2 (not part of this RTL)
```

## Files

| file | contents |
|---|---|
| `rtl/l1d_pkg.sv` | operation enums, L2 message enums, the event-pulse struct |
| `rtl/l1d_rcc_top.sv` | top: `rvwmo_seq` in front of `l1d_cache` |
| `rtl/rvwmo_seq.sv` | maps RVWMO instructions to L1 operations |
| `rtl/l1d_cache.sv` | the cache pipeline and control |
| `rtl/l1d_tag_array.sv` | tags, valid and dirty bits, victim choice, dirty-line scan |
| `rtl/l1d_data_array.sv` | line storage: synchronous read, word-masked write |
| `rtl/l1d_mshr.sv` | vector MSHR: in-flight refills with ordered subentries |
| `rtl/l1d_amo_mshr.sv` | special MSHR for LR/SC/AMO in flight at L2 |
| `rtl/l1d_wshr.sv` | write status holding register: writes in flight to L2 |
| `rtl/l1d_fifo.sv` | small FIFO for the LSU response and L2 request queues |
| `tb/l2_model.sv` | behavioural L2 with random latency, LR/SC reservation, AMOs |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_mp_litmus` |

## Mapping RVWMO onto cache operations (`rvwmo_seq`)

RVWMO's preserved program order splits into two groups:

- Same-address rules. The cache pipeline enforces these itself (see the
  WSHR section).
- Rules created by explicit ordering instructions. These are mapped onto
  the three cache operations:

| cache operation | what it does | used for |
|---|---|---|
| drain MSHR (`OP_WAIT_MSHR`) | wait until every refill and atomic in flight has its L2 response | `FENCE R,W` |
| global flush (`OP_FLUSH`) | write every dirty line to L2, then wait until every write is acknowledged | `.rl`, `FENCE W,W` |
| global invalidate (`OP_INV`) | drain MSHR, global flush, then clear every valid bit | `.aq`, `FENCE R,R`, `FENCE W,R` |

Each operation is stronger than the one above it. For example, invalidate
includes a flush, so an acquire also acts as a release.

The front end sends the operations around an atomic as follows:

- With `.rl`, the flush goes in front of the atomic.
- With `.aq`, the invalidate goes after it.
- Both operations are sent with the top bit of the widened request id set.
  Their responses are dropped on the way back, so the LSU sees exactly one
  response per instruction.

A `FENCE` is answered by the response of the operation it maps to. If a
`FENCE` names several predecessor/successor pairs, the strongest operation
needed is used:

- Any read successor, or `R,W` together with `W,W`, gives invalidate.
- `W,W` alone gives flush.
- `R,W` alone gives drain.
- A `FENCE` with an empty set does nothing and gets no response.

The front end holds one instruction at a time. When the cache is ready, the
first L1 request leaves one cycle after the instruction is accepted.

## The cache pipeline (`l1d_cache`)

**Stage 0** holds either the LSU request or an L2 response. An L2 response
waiting there has priority. Stage 0 does the following:

- looks up the tags;
- probes the MSHR and the WSHR;
- decides what the operation is.

Every state change happens here, in the cycle the operation moves on:

- tag fill, dirty bit, invalidation;
- MSHR allocate or append;
- WSHR allocate;
- special MSHR allocate.

This makes all bookkeeping strictly ordered, one operation per cycle. A
request that has to wait stays in stage 0. It does not block L2 responses,
so the misses it waits for can still complete.

**Stage 1** reads the data array.

**Stage 2** does the following:

- writes the data array (store hit, or refill with any merged stores);
- pushes the LSU response queue and/or the L2 request queue;
- for a refill, returns one waiting read per cycle, then writes back the
  dirty victim, if there is one.

A stage-1 read of the row that stage 2 writes in the same cycle has the
written words forwarded to it.

Unblocked latencies are counted in clock edges from the accepting handshake.
The benches check them.

| path | cycles |
|---|---|
| LSU request → LSU response (hit, store, fence operation on a clean cache) | 4 |
| LSU request → L2 request (miss, write-around, atomic) | 4 |
| LSU request → data array write (store hit) | 3 |
| L2 refill → LSU response | 4 |
| L2 refill → data array write | 3 |
| L2 refill → victim write-back request | 4 |

Through `l1d_rcc_top`, one more cycle is added by the `rvwmo_seq` register.

### Reads and writes

| case | action |
|---|---|
| load hit | data from the array |
| load miss | new MSHR entry and an L2 `GET`; the victim way is chosen when the refill returns |
| load that hits an in-flight refill | appended to that MSHR entry as a subentry |
| store hit | words written, line marked dirty (write-back) |
| store miss that hits an in-flight refill | appended as a write subentry, merged in order into the refilled line, which becomes dirty; acknowledged at once |
| other store miss | sent to L2 as a masked `PUT` (write-around); tracked in the WSHR until L2 acknowledges; the LSU is answered without waiting |

A refill answers its read subentries in order. Each read sees exactly the
stores that came before it.

### Write status holding register (`l1d_wshr`)

The WSHR holds the line address of every write-around and every dirty-line
write-back until L2 acknowledges it. A read miss, a write-around store or an
atomic to a line with a write in flight waits in stage 0 until the
acknowledgement arrives. This is "WSHR protection". L2 therefore never sees
a later access to a line overtake an earlier write to it. This covers the
same-address rules of RVWMO and the load value axiom, without any fence.
Accesses to different lines may complete out of order, as RVWMO allows.

The WSHR has two probe ports. The first checks the request. The second
checks the victim of a refill, so that its write-back is not issued while an
older write to the same line is still open.

"Drain WSHR" is the tail of every flush: the operation waits in stage 0
until the WSHR is empty.

### Vector MSHR (`l1d_mshr`)

There is one entry per line with a refill in flight. Each entry holds an
ordered list of subentries, which are reads and merged writes, with id, word
mask and data. An entry stops accepting subentries ("closes") when its
refill enters the pipeline. It is freed when its last subentry has been
answered. A full MSHR, or a full subentry list, stalls the request in stage
0.

### Special MSHR and atomics (`l1d_amo_mshr`)

LR, SC and AMO are performed at L2. The L1 records each one in the special
MSHR until L2 answers, then returns the result to the LSU. Before an atomic
is forwarded, it goes through these steps in order:

1. If its line is present and dirty, the line is written back first.
2. The atomic then waits for:
   - any write to the line in flight (WSHR protection);
   - any refill of the line in flight;
   - a free special-MSHR entry;
   - for an SC only, any LR still in flight.
3. It invalidates its local copy of the line.
4. It goes to L2.

L2 holds the LR reservation; the L1 keeps no reservation state.

### Global flush and invalidate

The tag array always reports the lowest-numbered dirty line, from a
priority scan of the dirty bits. A flush sends one write-back per cycle
until no dirty line remains, then drains the WSHR. On a clean cache it costs
no extra cycle.

An invalidate:

1. waits for both MSHRs to be empty;
2. flushes, including the wait for the WSHR to drain;
3. clears every valid bit in one cycle, as it leaves stage 0. The tags are
   kept in flip-flops so that this is possible.

### Blocking conditions

Each stall has an event pulse on the `events` output (`l1d_pkg::l1_events_t`):

| stall | event |
|---|---|
| LSU response queue full | `lsu_q_full` |
| L2 request queue full | `l2_q_full` |
| WSHR full | `wshr_full` |
| WSHR protection | `wshr_protect` |
| MSHR not empty (drain, invalidate) | `mshr_wait` |
| MSHR or subentries full | `mshr_full` |
| SC behind an LR | `lr_sc_wait` |
| dirty line write-back (flush, atomic) | `dirty_wb` |
| refill with several subentries | `multi_sub` |
| replacement write-back | `replace_wb` |

Other pulses mark the following:

- hits, misses and merges;
- write-around;
- atomics;
- forwarding (`bypass`);
- the completion of each consistency operation.

## Interfaces

All channels use valid/ready. A transfer happens on a clock edge where both
are high.

`l1d_rcc_top` has four channels.

**LSU instruction in.** Signals:

- `lsu_op`: `OP_LOAD`, `OP_STORE`, `OP_LR`, `OP_SC` or `OP_AMO`;
- `lsu_fence`, `lsu_pred`/`lsu_succ` (each `{R,W}`), `lsu_aq`, `lsu_rl`;
- `lsu_amo_fn`: the `amo_fn_e` encoding;
- `lsu_id`;
- `lsu_blk`: the line address;
- `lsu_mask`: one bit per 32-bit word;
- `lsu_data`: a full line.

**LSU response out.** Signals: op, id, mask, data. Loads and atomics return
data. LR returns the loaded word, SC returns 0 on success and 1 on failure,
and an AMO returns the old value.

**L2 request out.** The operation is `GET` (line), `PUT` (masked write),
`LR`, `SC` or `AMO`. Each request carries a source index (`src`), which
names the MSHR, WSHR or special-MSHR entry that waits for the answer.

**L2 response in.** The response is `DATA` (refill), `ACK` (write done) or
`ATOM` (atomic result), each with the `src` of its request.

Requirements on the L2:

- It must accept requests whether or not its responses are being taken.
- It must not hold a write acknowledgement behind a refill that the L1 is
  not taking.

The L1 takes acknowledgements at the port in any cycle. A refill may wait in
stage 0 for a free WSHR entry, and only an acknowledgement can free one.
`tb/l2_model.sv` follows both rules: it offers due acknowledgements before
other responses.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SETS` | 128 | sets |
| `WAYS` | 2 | ways; replacement takes the first invalid way, else round robin per set |
| `WORDS` | 32 | 32-bit words per line: one per thread of a 32-thread warp, so a line is 128 B |
| `ADDR_W` | 32 | byte address width; the line address is `ADDR_W - log2(WORDS*4)` bits |
| `MSHR_ENTRIES` / `MSHR_SUBS` | 4 / 4 | vector MSHR lines and subentries per line |
| `WSHR_ENTRIES` | 4 | writes in flight |
| `AMO_ENTRIES` | 4 | atomics in flight |
| `ID_W` | 8 | LSU request id width |

At these defaults the cache is 32 KiB. Synthesis of the top with yosys gives
about 2.5 k cells, about 7.3 k flip-flop bits, and 293 k memory bits (data
array, MSHR and WSHR payloads).

## Simulating

Each bench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. It
also has a watchdog. For example, to run the end-to-end bench:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_l1d_rcc_top \
    rtl/l1d_pkg.sv tb/tb_l1d_rcc_top.sv
./obj_dir/Vtb_l1d_rcc_top
```

Any other bench runs the same way with its own name. The remaining modules
are found through `-y rtl -y tb` or by listing them. For example:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb --top-module tb_l1d_cache \
    rtl/l1d_pkg.sv tb/tb_l1d_cache.sv
```

- **`tb_l1d_rcc_top`** runs at the default parameters. It sends 2500 random
  instructions to lines that crowd four sets:
  - vector loads and stores;
  - LR/SC/AMO with random `.aq`/`.rl`;
  - fences with random sets.

  The LSU response and L2 request channels get random back-pressure, and
  the L2 answers after a random latency. Every response is
  checked against a program-order reference memory, and every fence against
  the mapping table. A final `FENCE W,W` must leave L2 equal to the
  reference. The bench also checks that every mechanism in the event list
  happened at least once.
- **`tb_l1d_cache`** does two things on a small cache (4 sets, 4-word lines):
  - checks each latency in the table above against a fixed-latency L2;
  - runs 3000 random operations in the same way.

  Add `+trace` to print every operation.
- **`tb_mp_litmus`** is the message-passing test. It uses two full
  `l1d_rcc_top` instances sharing one L2:
  - Core 0 writes `A` and `B`, then sets `Flag`.
  - Core 1 first caches the old `A` and `B`, spins on `Flag`, then
    reads `A` and `B`.

  The bench runs twelve rounds, each with a new value, and cycles through
  three modes. Two modes synchronise properly: one with `amoswap.rl` /
  `amoor.aq`, the other with `FENCE W,W` / `FENCE R,R`. In both, core 1
  must see the new values even though it held stale copies. The third mode
  is a control: core 1 polls with a plain `amoor`, which has no acquire. It
  must still read the old `A` and `B` after seeing the flag, and read the
  new values only after a `FENCE R,R`.
- **The unit benches** compare each module with a reference model under
  random stimulus.

The simulator here has two states. The benches drive inputs at the falling
edge and sample at the rising edge.

## What follows the original design and what is this implementation's

These parts follow the original design:

- the division of labour between the front-end mapping and the cache;
- the three consistency operations and what each one includes;
- the mapping of `.aq`, `.rl` and the four single-pair fences;
- write-back on hit and write-around on miss;
- the vector MSHR that merges reads and writes into an in-flight refill;
- atomics forwarded to L2 and tracked in a special MSHR;
- WSHR protection for the same-line ordering rules;
- the three-stage pipeline with its unblocked latencies (4/4/3 from a
  request, 4/4/3 from a refill);
- the list of blocking conditions.

These are choices of this implementation:

- **Sizes.** All sizes and widths, and the message encodings of both
  interfaces.
- **Fence combinations.** The rule for fences with several pairs, and the
  silent empty fence.
- **Replacement.** First invalid way, else round robin per set.
- **Priority and state updates.** L2 responses have priority in stage 0,
  and all state changes are made at the stage 0 → 1 handoff.
- **Drains.** Flush and invalidate drain the WSHR while waiting in stage 0.
  They do not wait in stage 2, so a write-around queued behind them can
  still leave.
- **Dirty-line scan.** Flushing uses a priority scan of the dirty bits.
- **Atomics on a local copy.** An atomic writes back a dirty local copy,
  then invalidates it. Before going to L2 it also waits for a refill of its
  line.
- **LR/SC.** An SC waits for an LR in flight, and the reservation lives in
  L2.
- **Write acknowledgements.** They are taken at the port, which sets the
  rule above on L2 response order.
- **Storage.** The data array is a plain synchronous memory array, where
  the original uses a 40 nm SRAM macro. The tag array is in flip-flops.

These are not provided:

- the L2 cache itself (only a behavioural model for simulation);
- the SRAM macro;
- any timing or area figure for a particular process.

The original reports 420 MHz for the SRAM and 320 MHz for the rest, at
40 nm. Nothing here has been checked against those numbers.
