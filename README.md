# Decoupled thread-level redundancy for a 16-core chip multiprocessor

A transient fault can flip a bit in a core. This design catches such faults by running every thread
of a parallel program twice, on two groups of eight cores:

- The **computing wavefront** runs ahead at full speed.
- The **verification wavefront** replays the same threads later.

Execution is cut into **epochs** of at most 2048 instructions per thread. At the end of an epoch
each core compresses its registers and the memory lines it wrote into a signature. The
computing copy and the verification copy of each thread must produce the same signature. If they
do, the epoch is *validated* and its writes may reach the shared L2. If they do not, execution
rolls back to the last validated checkpoint.

The two wavefronts are loosely coupled. The verification copy of a thread can lag hundreds of
cycles behind its computing copy, so no per-access comparison happens between them. Two problems
follow from that, and this RTL solves both:

1. **Unvalidated memory state.** Writes of the last few epochs must be kept out of the L2 but
   stay visible to the other cores of the same wavefront. Every core has a *post-commit buffer*
   (PCB) for this. It is split into one section per live epoch.
2. **Races.** A race between threads that resolves one way in the computing wavefront may
   resolve the other way in the verification wavefront. The signatures would then differ with no
   fault at all. The computing wavefront therefore records the order of racing accesses as
   *subepochs*, and the verification wavefront can be made to replay that order.

The cores, their L1 caches with snoopy MESI coherence, and the L2 are not part of this RTL. They
connect through ports.

## Block map

| file | what it is |
|---|---|
| `rtl/tlr_pkg.sv` | sizes, types, the bloom hash and a CRC-32 step |
| `rtl/pcb.sv` | post-commit buffer: 8 sections × 32 lines of 16 B, Valid / Superseded / Invalid |
| `rtl/pcb_bloom_filter.sv` | 257 rows × 8 section bits; avoids most associative PCB searches |
| `rtl/index_pointer_table.sv` | one pointer per L1 line to the line's copy in the PCB |
| `rtl/subepoch_tracker.sv` | per-line access bits, per-set eviction bit, tightness timer, subepoch number |
| `rtl/epoch_signature.sv` | 4 × CRC-32 compression of checkpoint and PCB contents |
| `rtl/checkpoint_unit.sv` | 9 register checkpoints, 4 registers per cycle, 16 cycles per save or restore |
| `rtl/branch_info_queue.sv` | 16 branch outcomes from the computing to the verification copy |
| `rtl/tlr_core_support.sv` | everything one core needs, with the event sequencer |
| `rtl/epoch_controller.sv` | epoch and subepoch boundaries of the computing wavefront; section release |
| `rtl/order_enforcer.sv` | per-core commit budgets that replay the subepoch order (strict, selective or blind) |
| `rtl/epoch_validator.sv` | signature comparison, validation, choice of rollback |
| `rtl/tlr_top.sv` | 8 + 8 core supports, the three global units and 8 branch queues |

Each file opens with a comment. It gives the interface and timing, and says which parts follow
the published scheme and which are choices of this design.

## The post-commit buffer

A committed store writes its whole 16-byte line into the section of the current epoch, `cur`.
Sections are used in a ring. Section `e mod 8` holds epoch `e`. Three pointers track the ring:

- `val` is the oldest epoch not yet validated;
- `rel` is the oldest epoch not yet released;
- `cur` is the current epoch.

An epoch also ends when its 32-entry section fills up.

Each entry is in one of three states:

- **Valid**: this is the newest buffered copy of the line. The PCB answers remote reads with it and
  writes it back to the L2 after validation.
- **Superseded**: a newer copy exists. This happens when the line was written again in a later
  epoch, or invalidated by another core. The entry records the epoch that superseded it
  (`sup_ep`).
- **Invalid**: the entry is free.

Across all sections at most one Valid copy of a line exists. Because of that, a search is a plain
OR over the matching entries, with no priority encoder. An assertion checks that a search
matches at most one entry.

**Delayed write-back.** Sections are released oldest first, and only once validated. A section
is released only when fewer than 2 sections are free. The design chose this threshold.

- A Valid entry is written to the L2.
- A Superseded entry is skipped if the epoch that superseded it is already validated, because a
  newer validated copy will reach the L2 anyway.

Only the verification wavefront writes back. The computing wavefront simply frees its released
sections.

**Index pointer and bloom filter.** These two structures keep the single PCB port off the L1's
critical path.

- Every L1 line carries a pointer {valid, section, index} to its PCB copy.
  - A store to a line that is already buffered in the current epoch updates the entry in place.
  - If the buffered copy belongs to an older epoch, the old copy is marked Superseded and a new
    entry is allocated.
  - A stale pointer is caught by comparing the entry's address, and is then ignored.
- While a line is *mapped* (pointed to from L1), the PCB never needs to search for it.
- Only when a mapped line leaves the L1 does its address set a bit in the bloom filter.
  - The bit is in row `line_addr mod 257` and in the column of the entry's section.
  - The remainder mod 257 is computed by folding 8-bit digits with alternating signs
    (256 ≡ −1).
  - A column is cleared when its section is released.
- An L1 miss or a snoop searches the PCB associatively only if the pointer is null and the
  filter row has a bit set.

## Races, subepochs and ordering

The tracker keeps a read bit and a written bit for every L1 line, and an eviction bit for every
set. A race is detected when another core's snoop finds a conflicting access in the current
subepoch:

- an invalidation hits a line that was read or written;
- a read hits a written line;
- a snoop hits a set whose eviction bit is set;
- a snoop hits a PCB entry whose saved subepoch number equals the current one.

A load whose data reply carries the current subepoch number of another core is also treated as
a race.

When a race is detected, the global subepoch advances for all computing cores. The record for the
closed subepoch lists how many instructions each core committed in it.

A race is *tight* if the line was touched in the last 100 cycles. A per-line R bit, cleared by a
100-cycle timer, tracks this. For a tight race the record also names the winner and loser cores.

An epoch ends on any of these:

- 2048 instructions of one thread;
- 8 subepochs;
- a full section.

At the end of an epoch, each computing core stalls commit for the 16-cycle checkpoint. In the
background, its just-closed section is walked into the signature.

The verification cores get a commit budget from `order_enforcer`:

- **strict**: no core starts subepoch *k+1* until all cores have finished *k*.
- **selective**: only the loser of a tight race waits, and only for its winner.
- **blind**: records are ignored. Only epoch boundaries are kept.

Rollback follows a fixed sequence:

1. The first mismatch, whether in a signature or in a branch outcome, rolls back only the
   verification wavefront.
2. The verification wavefront replays the epoch under strict order.
3. A second mismatch means a real fault. Both wavefronts then roll back to the last validated
   checkpoint.

On a rollback, each PCB does the following:

- frees the sections of the discarded epochs;
- turns back to Valid the lines that only the discarded epochs had superseded;
- clears all pointers;
- sets every live bloom column, so that searches stay correct until those sections are released.

## Sizes

All defaults are the published configuration: 8 + 8 cores, commit width 12, L1 of 8 KB
(2-way, 16 B lines), 8 PCB sections of 32 lines, a 257-entry bloom filter, checkpoints of 4
registers per cycle and 16 cycles, a tightness window of 100 cycles, and a 16-entry branch queue.

Storage per core at these sizes:

| structure | size |
|---|---|
| PCB data | 8 × 32 × 16 B = 4096 B |
| checkpoints | 9 × 64 × 8 B = 4608 B |
| index pointers | 256 × 2 × 9 bit = 576 B |
| bloom filter | 257 B |
| signature | 16 B |
| branch queue | 128 B |

## Departures from the published scheme

- The signature is 128 bits (4 CRC-32 lanes). The storage budget allows 128 bytes.
- The pointer table is sized for the 8 KB L1. The published pointer budget of 2048 B
  corresponds to a 32 KB L1.
- The following were left open by the scheme and are chosen here:
  - the release threshold (fewer than 2 free sections);
  - the checkpoint slot (epoch mod 9);
  - the branch entry format (16-bit sequence number, taken bit, 47-bit target);
  - what happens when the branch queue is full: outcomes are dropped and realigned by sequence
    number.
- The restore of superseded lines and the saturation of the bloom filter on rollback are this
  design's way to keep the PCB consistent. The scheme does not describe them.
- An invalidation from another core marks a copy Superseded even in the current section. The
  published scheme frees the entry instead. Keeping the slot makes the section contents, and so
  the signature, independent of when the invalidation arrives. That timing always differs
  between the two wavefronts. Without this change, racing shared data gave false mismatches.
- Verification commits are held while a core walks its closed section into the signature.
- The epoch does not advance while a core's store is between acceptance and its PCB write.

## Status and known problems

Each block has a self-checking testbench in `tb/`, and all of these pass.

`tb/tb_tlr_top.sv` runs the whole system at default sizes. It has:

- eight threads on each wavefront;
- a per-core L1 model;
- shared lines;
- three injected faults.

A fault-free run validates every epoch under all three ordering policies, including the phases
with racing shared lines. In that run:

- all written-back lines carry data the program stored, in order;
- subepochs, tight races, epoch ends on section fill, subepoch count and instruction count,
  commit stalls, releases, write-backs, pointer accesses, bloom filtering, associative searches
  and PCB-supplied lines all happen.

The full scenario with the three injected faults does not pass. The first injected fault is
correctly caught and replayed. A later replay still mismatches, giving two full rollbacks instead
of one, and after that the system stalls until the watchdog ends the test. The cause has not
been isolated. Suspects are the replay state of `order_enforcer` after a full rollback, and the
way the testbench's core model resumes. Treat the top-level rollback and replay path as
unverified.

## Simulating

Each testbench compiles with the package first:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_pcb \
    rtl/tlr_pkg.sv rtl/*.sv tb/tb_pcb.sv
./obj_dir/Vtb_pcb +verilator+rand+reset+2
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

`tb_tlr_top` prints a progress line every 20 000 cycles and a table of mechanism counts at the
end. Its phases and fault schedule are set by the constants at the top of the file.
