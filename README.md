# ITR checker: fault detection for fetch and decode from program repetition

Programs spend most of their time re-running the same short instruction
sequences. Every time such a sequence is fetched and decoded again, the
decode stage produces exactly the same control signals, because decode
signals depend only on the instruction bits and not on data. That repetition
is a free second execution: if the decode signals of a sequence are recorded
once, every later decode of the same sequence can be checked against the
record. A mismatch means that a transient fault hit the fetch or decode
logic, either now or when the record was made.

This RTL implements that checker, called inherent time redundancy (ITR), as an
add-on to a superscalar out-of-order core. It needs no duplicated fetch or
decode unit. Its cost is one signature cache of about 16 KB and a small queue.
The idea and the structure follow the published ITR proposal. Where that
description stops, this design makes its own choices. They are listed in
"What is given and what is chosen" below.

## Traces and signatures

The decoded instruction stream is cut into **traces**. A trace ends at a
branch or jump (`is_branch` or `is_uncond` set), or after 16 instructions,
whichever comes first. The trace is named by its **start PC**, the PC of its
first instruction.

Each instruction's decode signals form a 64-bit bundle (`itr_pkg::dec_sig_t`):

| field    | bits | meaning                                       |
|----------|------|-----------------------------------------------|
| opcode   | 8    | instruction opcode                            |
| flags    | 12   | is_int, is_fp, is_signed, is_branch, is_uncond, is_ld, is_st, mem_left_right, is_rr, is_disp, is_direct, is_trap |
| shamt    | 5    | shift amount                                  |
| rsrc1    | 5    | first source register                         |
| rsrc2    | 5    | second source register                        |
| rdst     | 5    | destination register                          |
| lat      | 2    | execution latency                             |
| imm      | 16   | immediate                                     |
| num_rsrc | 2    | number of source operands                     |
| num_rdst | 1    | number of destination operands                |
| mem_size | 3    | memory access size                            |

The **signature** of a trace is the bitwise XOR of the bundles of all its
instructions. A single flipped decode bit always changes the signature.
`itr_sig_gen` builds signatures for up to `WIDTH` instructions per cycle. It
can finish several traces in one cycle and hands them on oldest first.

## Life of a trace in the ITR ROB

Signatures are not checked or recorded straight out of decode. Wrong-path
traces would fill the cache with useless entries. So each finished trace is
first **dispatched** into the ITR ROB (`itr_rob`). This is an in-order queue
that mirrors the core's reorder buffer at trace granularity. Each entry holds:

| field     | set when                                                   |
|-----------|------------------------------------------------------------|
| start PC  | dispatch                                                   |
| signature | dispatch                                                   |
| chk       | the ITR cache has answered the lookup for this entry       |
| miss      | the lookup found no signature for this start PC           |
| retry     | the lookup found a signature and it differs from this one  |

The steps are:

1. **Dispatch.** Up to `WIDTH` traces per cycle enter at the tail. Each gets a
   tag, `disp_tag`, which is an index plus a wrap bit. The core keeps the tag
   with the branch that ends the trace.
2. **Check.** The oldest entry not yet looked up is sent to the ITR cache's
   read port. There is one lookup per cycle, and the answer comes one cycle
   later and sets chk, miss and retry.
3. **Squash.** On a branch misprediction the core gives `squash_tail`, the tag
   of the mispredicted branch's trace plus one. Every younger entry is
   dropped, and so is the trace the generator is still building. A trace
   always ends at a branch, so everything after the mispredicted branch is
   wrong-path. A lookup in flight for a dropped entry is discarded.
4. **Commit.** The core raises `commit_req` to retire the oldest trace. It may
   retire only once the trace has been checked (`head_ready`). Then:
   - no retry: `commit_ack`. If miss is set, the signature is **recorded** in
     the ITR cache through its write port. `commit_unchecked` marks this case,
     because nothing was compared.
   - retry: the trace does not retire. The recovery controller takes over.

## Recovery: retry, then abort

A mismatch does not say which of the two signatures is wrong.
`itr_recovery` finds out by running the trace again:

- **First mismatch.** It raises `flush` with `restart_pc` = the trace's start
  PC. The core empties its pipeline and refetches from there. The checker
  empties its ITR ROB and enters the retry state.
- **The retried trace matches.** The fault was transient and is gone:
  `recovered` pulses. Nothing wrong has reached the architectural state,
  because the faulty trace never retired.
- **The retried trace mismatches again.** The new decode is repeatable, so
  the recorded signature is the faulty one. This happens when a fault hit the
  trace that first missed and was recorded. `abort_req` pulses with `flush`.
  The core must abort or roll back to a safe checkpoint of its own. The
  checker also overwrites the bad record with the fresh signature, so that
  a rollback does not run into it again.

## What is caught and what is not

- A fault on a trace that **hits** is detected, and the retry recovers from it.
- A fault on a trace that **misses** is recorded along with the trace. It is
  detected later, when the same trace runs again and hits. That is the abort
  case above, and recovery then needs a checkpoint.
- A fault on a trace that misses and whose record is **evicted** before any
  later hit is never detected. `sig_evicted` pulses on every eviction.
  Together with `commit_unchecked` it lets the core count the traces whose
  faults went undetected or could not be recovered.

Cache capacity and associativity therefore set the coverage. With 2 ways and
1024 signatures, the published evaluation on SPEC2000 reports an average loss
of 1.3% in detection coverage and 2.5% in recovery coverage. The worst case
is 8% and 15%, on vortex.

## The ITR cache

`itr_cache` is set-associative, indexed by the start PC bits above the word
offset and tagged with the rest. By default it holds 2048 signatures of 64
bits in 2 ways, which is 16 KB of signature storage. It has one read port for
checks and one write port for records. A read answers one cycle later. A
record of a start PC already present overwrites that way. Otherwise the record
fills an invalid way, or else evicts the least recently used one. Check hits
and records both update the LRU order. A read and a write to the same set in
one cycle return the old contents. Reset invalidates everything.

## Interface of `itr_top`

| port | dir | meaning |
|------|-----|---------|
| `dec_valid[WIDTH]`, `dec_pc[WIDTH]`, `dec_sig[WIDTH]` | in | decoded instructions. Lane 0 is oldest and valid lanes are contiguous |
| `dec_ready` | out | the group is accepted (the ITR ROB has room for WIDTH traces and no flush or squash is in progress) |
| `disp_valid[WIDTH]`, `disp_tag[WIDTH]` | out | traces completed by the accepted group, and their tags |
| `squash_valid`, `squash_tail` | in | drop traces from tag `squash_tail` on |
| `commit_req` | in | retire the oldest trace |
| `head_ready` | out | the oldest trace has been checked |
| `commit_ack` | out | it retired |
| `commit_unchecked` | out | it retired after a miss |
| `flush`, `restart_pc` | out | flush the pipeline and refetch from `restart_pc` |
| `abort_req` | out | fault found again on the retry. The core aborts or rolls back |
| `recovered` | out | the retry passed |
| `retrying` | out | a retry is in progress |
| `sig_evicted` | out | a recorded signature was evicted |

Timing: decode inputs are sampled at the rising clock edge. `disp_*`,
`commit_ack`, `flush`, `abort_req` and `recovered` are combinational in the
cycle they concern. A trace can be checked no earlier than two cycles after
its dispatch. Reset (`rst_n`, active low) is asynchronous.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `itr_top` / `itr_sig_gen` / `itr_rob` | `WIDTH` | 4 | own choice (decode width) |
| `itr_top` / `itr_rob` | `ROB_DEPTH` / `DEPTH` | 32 | own choice (size of an R10K-class active list) |
| `itr_top` / `itr_cache` | `CACHE_ENTRIES` / `ENTRIES` | 2048 | design size (2K entries, ~16 KB) |
| `itr_top` / `itr_cache` | `CACHE_WAYS` / `WAYS` | 2 | design size |
| `itr_sig_gen` | `MAX_LEN` | 16 | design (trace length limit) |

`ENTRIES` and `WAYS` must be powers of two. `WAYS = 1` is direct-mapped and
`WAYS = ENTRIES` is fully associative, which covers the range of
configurations the ITR evaluation swept.

## What is given and what is chosen

The following follows the original description: trace definition, XOR
signatures over the 64-bit decode bundle, the ITR ROB and its
start PC / signature / chk / miss / retry fields, lookup by start PC,
recording on a miss, flush-and-retry on a mismatch, abort when the mismatch
repeats, the 2-way cache of 2K signatures, and one read plus one write port.

This design adds its own choices:
- the bit order inside the decode bundle;
- the 32-bit word-aligned PC;
- decode width and ITR ROB depth;
- every handshake (ready, tags, squash by tag, commit request);
- one lookup per cycle, and no retirement before the check;
- LRU replacement and in-place update on a record;
- recognising the retried trace by start PC;
- re-recording the signature on an abort.

Known departures from the original sizes:
- The original compares an ITR cache of "4-byte lines" and, elsewhere,
  35-bit entries. Here each entry holds a full 64-bit signature plus its tag.
  A narrower signature, folded from the 64-bit XOR, would be a change to
  `itr_cache` and `itr_rob` only.
- The host core, its decoder, branch checkpoints and the rollback checkpoint
  mechanism are not part of this RTL. They are reached through the ports above.

## Files

- `rtl/itr_pkg.sv`: widths, the decode-bundle struct, trace and ITR ROB entry types
- `rtl/itr_sig_gen.sv`: trace splitting and XOR signature generation
- `rtl/itr_rob.sv`: ITR ROB with check, squash, commit and record
- `rtl/itr_cache.sv`: set-associative signature cache
- `rtl/itr_recovery.sv`: retry / abort controller
- `rtl/itr_top.sv`: the checker, wired together
- `tb/tb_*.sv`: one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_itr_top \
    -y rtl +libext+.sv rtl/itr_pkg.sv tb/tb_itr_top.sv
./obj_dir/Vtb_itr_top
```

Replace `tb_itr_top` with `tb_itr_sig_gen`, `tb_itr_rob`, `tb_itr_cache` or
`tb_itr_recovery` for the unit tests.

- `tb_itr_top` runs the checker at its default sizes, 30,000 cycles. It
  plays a core that walks a synthetic program of 48 traces. The trace start
  PCs are placed so that three traces compete for each of 16 cache sets. The
  core injects single-bit transient faults into decode signals, squashes, and
  commits at varying rates. The test checks these rules:
  - no faulty trace retires as checked;
  - a clean trace is flagged only against a faulty record;
  - flushes restart at the oldest trace;
  - retries end in recovery or abort as they should.

  It also requires that each mechanism happens at least once: hit, miss and
  record, eviction, mismatch flush, recovery, abort, squash, ROB-full stall,
  a 16-instruction trace, and several traces in one cycle.
- The unit testbenches compare each module against an independent reference
  model under random stimulus:
  - `tb_itr_cache` uses a per-set MRU list;
  - `tb_itr_rob` uses a queue model, with the testbench acting as the cache;
  - `tb_itr_sig_gen` uses a per-instruction trace builder;
  - `tb_itr_recovery` uses a two-state model.

The top-level module carries one assertion: the ITR ROB never exceeds its
depth.
