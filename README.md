# TCC chip multiprocessor memory system

Transactional Coherence and Consistency (TCC) replaces per-access cache
coherence with transactions that run back to back. Each processor executes a
transaction speculatively and keeps everything it reads and writes inside its
own L1 data cache. At the end of the transaction it wins a system-wide
arbitration and broadcasts its whole write-set in one burst. Every other
processor watches that burst. If a committed word was read by a transaction
still running elsewhere, that transaction has used stale data, so it is rolled
back and restarted. Commits happen in one global order, so the result behaves
as if the transactions ran one after another. Coherence and consistency are
handled only at transaction boundaries.

This repository is synthesizable SystemVerilog for the memory side of such a
chip multiprocessor: the transactional L1 caches, the commit arbiter, the commit
and refill buses, a shared L2, and per-processor register checkpoints. The
processor cores are not included. Their interface to the memory system comes
out of the top module as ports.

The default configuration is:

| Item | Default |
|---|---|
| Processors | 8 (`N_CPU`, 1 to 16) |
| L1 data cache | 32 KB, 32-byte lines, 4-way, 1-cycle hit, per-word V/SR/SM bits |
| Victim cache | 8 entries, fully associative |
| Store address FIFO | 1024 entries of 10-bit pointers |
| Buses | 16 bytes wide, 3-cycle arbitration, 3-cycle transfer |
| L2 | 8 MB, 16 cycles from bus request to data, arbitration and transfers included |
| Protocol | invalidate, word-level tracking, single buffering |

## Life of a transaction

1. **Start.** The processor raises `cpu_tx_begin`. Its register checkpoint
   (`tcc_reg_checkpoint`) saves the architectural registers.
2. **Execute.** Loads and stores go to the L1 (`tcc_l1_dcache`).
   - A load sets the word's SR (speculatively read) bit.
   - A store writes the word and sets V and SM (speculatively modified).
   - The first store to a line in a transaction pushes a pointer
     `{set, way}` into the store address FIFO (`tcc_saf`). The FIFO is the list
     of lines the commit must send, so the commit never has to search the cache.
3. **Commit.** The processor raises `cpu_commit` and stalls. The commit engine
   (`tcc_commit_control`) asks the arbiter for the commit bus. Once granted, it
   pops the FIFO one pointer at a time. For each line it sends:
   - the line address and the 8-bit SM mask;
   - only the modified words, packed four to a 16-byte beat.

   It then sends the speculative lines parked in the victim cache, followed by
   an END beat that releases the bus. Finally all SR and SM bits are
   flash-cleared and `cpu_commit_done` is raised.
4. **Violation.** A committed word may have SR set in another processor's
   cache. That processor's transaction then read a value that is now stale, and:
   - every line with SM bits is invalidated (the speculative writes are discarded);
   - all SR/SM bits are cleared and the FIFO is emptied;
   - `cpu_violation` pulses;
   - the checkpoint is handed back on `ckpt_regs` with `ckpt_restore`.

   The processor then restarts the transaction.

While a processor is committing, it waits. Only single buffering is built: the
next transaction does not overlap the commit.

## Per-word state and why it matters

Each 32-byte line holds eight words. Each word has three bits:

- **V (valid):** the word holds usable data.
- **SR:** the word was read by the running transaction.
- **SM:** the word was written by the running transaction.

Tracking these per word, not per line, gives three effects:

- **No false violations.** Two transactions that write different words of the
  same line do not conflict. A commit violates a receiver only on words that
  have SR set.
- **Renaming.** A load does not set SR on a word that already has SM, because
  the transaction reads its own value. Another processor's commit to that word
  does not violate, and the local value is kept. A commit that hits only such
  words is counted as `n_renamed`.
- **Partial invalidation.** Committed words that are not locally modified are
  invalidated one by one (V cleared). The rest of the line stays. A later
  access to an invalidated word fetches the line again and refills only the
  missing words.

`tcc_snoop_control` performs this check against all four ways and all eight
victim entries in the cycle a foreign commit beat is on the bus.

## Misses in flight

A load miss first reserves a way: the tag is written and all words are left
invalid. It then sends a read request on the commit bus. The fill control
(`tcc_fill_control`, a one-entry MSHR) collects the two 16-byte refill beats.

If another processor commits to the same line while the miss is outstanding,
the fill control marks those words *stale*. Stale words are not written, nor
are words that are valid or SM in the cache. The access that needs a stale word
misses again and gets the committed value. This keeps a refill that was
launched before a commit from overwriting the newer data.

## Overflow and the victim cache

A transaction's state must stay in the L1. Suppose a new line needs a way, and
all four ways of its set hold speculative (SR or SM) lines. The overflow
control (`tcc_overflow_control`) then chooses among:

1. an invalid way;
2. a way with no speculative bits, evicted silently (its committed data is
   already in the L2);
3. a speculative way moved into the victim cache (`tcc_victim_cache`), if the
   victim cache has an entry that is free or holds no speculative bits.

A victim entry has the same format as a cache line, and snoops see it. When the
processor touches a line that is in the victim cache, the line is swapped back
into its set.

If none of the three is possible, or the store address FIFO is full, the cache
overflows:

- It performs an *early commit* of everything buffered so far, with `bus_hold`
  set.
- The arbiter then keeps commit permission with this processor. Refill reads
  from others are still granted, but no other processor may commit until this
  one reaches its regular commit.

This serializes the system while the overflow lasts, which is acceptable
because overflows are rare.

## Buses, arbitration and timing

- **Commit bus** (`tcc_commit_arbiter` + `tcc_commit_bus`)
  - Carries read requests (address only) and commit beats (address, mask and
    16 bytes of data). Every processor and the L2 see each beat in the same
    order.
  - Arbitration is round-robin over the processors. A grant arrives
    1 + `ARB_LAT` cycles after the request. A read request is a one-beat
    tenure. A commit tenure lasts until its END beat.
  - A beat reaches all listeners `XFER_LAT` cycles after it is driven.
- **Refill bus** (`tcc_refill_bus`) carries line data from the L2, tagged with
  the requesting processor. It has the same `XFER_LAT` pipeline.
- **L2** (`tcc_l2_cache`)
  - Writes committed words under their mask.
  - Answers a read after an internal delay of
    `ACCESS_LAT = HIT_LAT - ARB_LAT - 2*XFER_LAT - 2` (5 at the defaults),
    through a reply queue.
  - The first refill word reaches the L1 exactly `HIT_LAT` = 16 cycles after
    `bus_req`. Queueing behind other reads can only add to this.

Commit time for one line is 1 examine cycle plus one cycle per group of up to
four modified words.

## Top-level interface

`tcc_cmp_top` has one set of processor signals per CPU, packed into arrays
indexed by processor number:

- `cpu_req`, `cpu_we`, `cpu_addr`, `cpu_wdata` → `cpu_done`, `cpu_rdata`: a
  blocking 32-bit word access. It is held until `cpu_done`. A hit completes in
  the same cycle.
- `cpu_commit` → `cpu_commit_done`: end the transaction. It is held until done.
- `cpu_violation`: restart. The processor drops any pending request.
- `cpu_tx_begin`, `cpu_regs` → `ckpt_restore`, `ckpt_regs`: register checkpoint.
- Event counters: load misses, violations, overflows, victim moves and swaps,
  commits, renamed snoops, bus tenures, busy cycles and beats.

## Where this design goes beyond the published description

The description leaves many details open. These choices are this design's own:

- Processor accesses are whole words, one at a time, and blocking. Sub-word
  stores, which would set both SR and SM, are not supported.
- A store to a line that is not cached allocates the line without fetching it.
  Only the stored word becomes valid.
- Only one miss can be outstanding per processor.
- Snoops have priority. A processor access, fill or victim move that coincides
  with a foreign commit beat waits one cycle.
- Speculative victim-cache lines are committed after the FIFO walk, since they
  have no FIFO pointer. Each commit ends with an END beat.
- A repeated FIFO pointer (a line that left for the victim cache and came back)
  is skipped, because SM is cleared once a line has been sent.
- Arbitration is round-robin and not overlapped with the previous tenure.
  Transactions are unordered, so ordered-transaction support is not built.
- The L2 has no tags and always hits. Its array covers the address space modulo
  its size, and the main memory below it is not modelled.
- The register checkpoint holds 32 registers of 32 bits.

Not built, because they are alternatives rather than the main configuration:

- double buffering (write victim buffer, second SR/SM set, second FIFO and
  checkpoint);
- the update protocol;
- line-level state tracking.

## Simulating

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if it
hangs. With plain Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/tcc_pkg.sv tb/tb_tcc_cmp_top.sv -y rtl --top-module tb_tcc_cmp_top
./obj_dir/Vtb_tcc_cmp_top
```

Replace `tb_tcc_cmp_top` with any other testbench name.

`tb_tcc_cmp_top` runs the whole chip at its default size. Eight processor
drivers run four workloads:

- **Shared counter.** Read-modify-write transactions on one word. This causes
  violations and restarts, and the final count must be exact.
- **False sharing.** Processors write different words of one line. No violation
  and no lost update are allowed.
- **Renaming.** Processors write a shared word and then read it back. Each must
  see its own value.
- **Overflow.** Sixteen lines map to one set. This causes victim moves, an early
  commit with held permission, and a check that every value reaches the L2.

The testbench also measures the 16-cycle refill latency. It counts each
mechanism and fails if any of them never happened. A run takes well under a
second.

Sizes are parameters of `tcc_cmp_top`: `N_CPU`, `L1_BYTES`, `L1_WAYS`,
`VC_ENTRIES`, `SAF_DEPTH`, `L2_BYTES`, `L2_HIT_LAT`, `ARB_LAT`, `XFER_LAT` and
`NREGS`. The processor id field in bus beats is 4 bits wide, which allows up to
16 processors.
