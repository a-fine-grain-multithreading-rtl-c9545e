# Fine-grain multithreaded four-wide superscalar core

A superscalar core loses most of its throughput whenever one instruction
takes a long time. Examples are a load from remote memory across a network,
a divide, or an instruction-cache miss. Each of these makes its dependents
wait, and the central window soon fills with work that cannot move.

This core keeps up to six hardware threads in flight and switches between
them every cycle. Each cycle, the fetch stage takes a block of four
instructions from a different ready thread. When decode recognises a
long-latency instruction, its thread is **suspended**. The remaining threads
then fill the issue slots until the result comes back.

Two pieces of hardware make this cheap:

- **Register relocation.** Threads that run the same code use disjoint
  physical registers, with no renaming tables.
- **The release mechanism.** A long-latency instruction that reaches the
  bottom of the window unfinished leaves the window. It later commits from a
  small buffer beside its functional unit. The window never blocks on it.

The structure follows the fine-grain multithreaded superscalar architecture
of Loikkanen and Bagherzadeh, which is built on a four-way superscalar base
processor. Their description does not give the base processor's instruction
set, window size or stage timing. Those parts here are this design's own;
see [Departures and omissions](#departures-and-omissions).

## Block diagram and flow of one instruction

```
            +------------------------- Thread Attribute Store (6 threads) <-----------+
            | thread, PC, RRM                ^ suspend / wake / redirect / fork / join |
            v                                |                                         |
  Fetch unit + Cache Miss Buffer --> I-cache (512 x 4 words) <--> imem_*               |
            | 4-instruction block                                                      |
            v                                                                          |
  Decoder (register relocation, TSI detection) --- suspend request ---> TAS            |
            | up to 4 decoded instructions                                             |
            v                                                                          |
  Central window (16 entries) --issue--> 4 ALUs / branch                               |
            |  ^                 +-----> divide unit   = TSIB(2) + divider             |
            |  +-- write-back ---+-----> load/store unit: D-cache (512 x 4) <--> dmem_*|
            |                           |  Load Queue = TSIB(6) <--> net_* (remote)    |
            v commit (4/cycle, in order)|  Store Queue(4) --> st_* / net_*             |
  Register file (64 physical)  <--------+ direct commit of released TSIs ---- wake ----+
```

An instruction moves through the core as follows:

1. **Fetch.** The Thread Attribute Store (TAS) picks a ready thread
   round-robin. The fetch unit looks up that thread's PC in the instruction
   cache. On a hit, the aligned 4-instruction block goes into the
   fetch/decode register. Slots before the PC are marked invalid.
2. **Decode.** Register fields are relocated with the thread's relocation
   mask (RRM). Thread-suspending instructions (TSIs) are detected. Operands
   are looked up, and the block is written into the top of the window.
3. **Issue.** Each instruction issues out of order as soon as its operands
   are ready. ALU results come back on the write-back buses in the same
   cycle.
4. **Commit.** Up to four instructions leave the bottom of the window each
   cycle, in order, and write the 64-entry register file.

## Thread Attribute Store and scheduling (`tas`)

The TAS has one entry per hardware thread. Each entry holds a valid bit, a
PC, a 3-bit RRM and two suspend flags. One flag is set by a TSI and the
other by an instruction-cache miss. A thread is **ready** when it is valid
and neither flag is set.

**Fetch choice.** Every cycle the TAS offers the next ready thread after the
one chosen last. This is fine-grain, cycle-by-cycle switching, with no
switch penalty.

**Reset.** After reset only thread 0 is valid. It starts at `boot_pc` with
RRM 0.

**Thread events.** These all take effect at the clock edge:

| event | effect |
|---|---|
| TSI suspend (from decode) | Granted only if another thread is ready and `suspend_en` is 1. The thread's PC is set to the instruction after the TSI. |
| I-cache miss (from fetch) | The thread is suspended with the missed PC. It is woken when the line fill ends. |
| wake (`act_mask`) | The TSI flag is cleared when the TSI retires: from the window, or directly from a TSIB. |
| redirect (taken branch at commit) | New PC. The TSI flag is cleared, because a TSI on the wrong path no longer matters. |
| FORK at commit | A free entry becomes valid with the fork target and the RRM given in the instruction. If no entry is free, the FORK waits at the bottom of the window. |
| JOIN at commit | If the joining thread is the only valid thread, it continues after the JOIN with the RRM given in the instruction. Otherwise it dies, and its entry is freed. |

With `suspend_en` at 0, TSIs never suspend and only hold their thread's
later instructions in the window. This no-suspend mode is the reference
point for measuring what suspension gains.

## Register relocation (`reg_remap`)

There are 32 logical and 64 physical registers. A thread's RRM is ORed into
bits 5:3 of the physical number for logical registers 1 to 15. Register 0
and logical registers 16 to 31 are the same for every thread. They are the
shared registers through which threads communicate.

| logical register | physical register |
|---|---|
| 0 | 0 (reads as zero) |
| 1 .. 15 | `{RRM, 3'b000} \| {1'b0, lreg}` |
| 16 .. 31 | 16 .. 31 (shared) |

For example, logical 7 with RRM 6 is physical 55, and logical 7 with RRM 4
is physical 39. The RRM of a new thread is chosen by the program, in the
FORK instruction.

Relocation is an OR, not an add. The intended partitions are:

| threads running | logical registers per thread | RRM values |
|---|---|---|
| 1 | 1 .. 15 | 0 |
| 2 to 3 | 1 .. 15 | 0, 4, 6 |
| 4 to 6 | 1 .. 7 | 0, 1, 4, 5, 6, 7 |

Other combinations overlap. For example, RRM 1 and RRM 0 overlap for
logical 8 to 15. Software picks masks, and a register range, that keep the
threads it runs together apart. The hardware does not check this.

## Thread-suspending instructions and the TSIB

This is the part of the design that is least like an ordinary
superscalar. The TSIs here are `DIV` (32+ cycles) and the remote load `LDR`
(network latency).

**At decode.** For the first TSI in a block, the decoder asks the TAS to
suspend the thread.

- If the TAS grants it, the instructions after the TSI in the same block
  are invalidated. They will be fetched again from the resume PC when the
  thread wakes.
- The decoder also cancels any fetch of the same thread that is in
  progress. With this pipeline's round-robin rule, the fetch stage never
  holds the suspending thread in that cycle, so the cancel path exists but
  does not fire at the top level. The fetch unit's testbench exercises it.
- The TAS refuses when the thread is the only ready one. Suspending it would
  leave the core with nothing to fetch. The TSI then runs as an ordinary
  long-latency instruction.

**In the window.** The TSI issues as soon as its operands are ready, into
the Thread Suspending Instruction Buffer (TSIB) of its unit. The divide unit
has a 2-entry TSIB. The Load Queue of the load/store unit is a 6-entry TSIB.
A TSIB entry records the window tag, thread and physical destination. The
unit starts entries and completes them with a result.

**Leaving the TSIB.** A completed entry leaves in one of two ways:

- **Write-back.** The window entry is still in the window. The result goes
  back by tag, like any other result, and the instruction commits normally.
  Its commit wakes the thread.
- **Release and direct commit.** The window entry reached the bottom while
  the TSI was still running, and its thread is suspended. The window then
  *releases* it: it sends `rel_valid/rel_tag` to the TSIB, pops the entry
  and goes on committing. Later instructions of that thread are not in the
  window, because the thread stopped fetching after the TSI. When the unit
  finishes, the TSIB writes the register file directly (its own write port)
  and wakes the thread.

If a release and a write-back of the same entry fall in one cycle, the
release wins. The entry then commits directly one cycle later.

**Flushes.** A taken branch or a JOIN of the same thread flushes that
thread. The flush removes all of the thread's unreleased TSIB entries. An
entry the unit has already started is kept as *dead* until its completion
arrives, so that a late result can never land in a reused entry.

A TSI whose thread was *not* suspended is never released. It blocks commit
like an ordinary instruction, because its thread's later instructions are
behind it in the window.

Sequence of a remote load whose thread was suspended: decode suspends the
thread → the load issues into the Load Queue once its base register is
ready → the network request goes out in a following cycle → the entry
reaches the bottom of the window and is released, so other threads keep
committing → the reply arrives, the Load Queue writes the register
directly and wakes the thread → the thread is fetched again from the
instruction after the `LDR`. If the reply comes before the entry reaches
the bottom, the result is written back into the window instead.

## Central window and commit (`central_window`)

The window is a 16-entry circular buffer, and the slot number is the tag.

**Dispatch.** A decoded block is taken only if four slots are free.
Otherwise decode stalls, and the fetch/decode register holds.

**Operand lookup at dispatch.** For each source, the window looks in this
order:

1. older instructions of the same block;
2. the window, from youngest to oldest, for the last writer of that
   physical register;
3. the register file.

Values on the write-back buses in the same cycle are taken too. A source
waiting on a tag is woken by the write-back buses.

**Issue.** Each cycle, oldest first:

- up to four ALU or branch instructions;
- one `DIV` to the divide TSIB, when it has room;
- one memory instruction to the load/store unit, when it accepts it.

A load waits while an older store of its own thread is in the window. The
load/store unit may refuse a load. This happens when a queued store has the
same address, when the load misses the data cache, or when the Load Queue
is full. A refused load stays in the window and is offered again.

**Commit.** Up to four entries per cycle, in order:

- a finished entry writes the register file;
- a store enters the store queue (one per cycle);
- a finished TSI of a suspended thread wakes the thread;
- an unfinished TSI of a suspended thread is released (see above).

Branches are fetched as not taken. A taken branch (`BEQ`, `BNE`, `JMP`)
redirects its thread at commit and flushes that thread from the window, the
fetch path and the TSIBs. `FORK` and `JOIN` also act at commit. A
redirect, `FORK` or `JOIN` ends the commit group of its cycle.

## Instruction fetch, I-cache and Cache Miss Buffer (`fetch_unit`, `icache`)

The instruction cache is direct-mapped and non-blocking. It has
4-instruction lines, fills on read misses only, and has 512 lines (8 KiB) by
default.

**Lookup and miss.** Lookup is combinational. On a miss, the fetch unit does
three things:

- starts one line fill (`imem_req_*`);
- suspends the thread in the TAS;
- records the thread and PC in the Cache Miss Buffer.

Other threads keep fetching from the cache while the fill is outstanding.
When the fill ends, the buffered thread is woken and refetches the PC.

**When the buffer is busy.** The buffer holds one miss at a time. A thread
that misses while it is busy stays ready and simply tries again on its next
turn.

**Timing.** A fill takes 2 cycles plus the memory latency: one cycle to
send the request and one to write the line.

## Loads, stores and the network (`load_store_unit`, `dcache`)

- **Local loads (`LD`)** look up an 8 KiB direct-mapped data cache (512
  lines of 4 words) in their issue cycle. A hit returns the value at once.
  A miss starts a line fill from data memory (`dmem_req_*`, `dmem_rsp_*`),
  and the load is refused and retried from the window. **A data-cache miss
  does not suspend the thread.** It is detected only at execute, when the
  thread's younger instructions are already in the window, and discarding
  that work would cost more than it saves. One fill is outstanding at a
  time.
- **Stores (`ST`, `STR`)** compute their address at issue and enter the
  4-entry store queue when they commit. The queue drains in order, one
  store per cycle:
  - local stores go to data memory on `st_*` and update the cache if the
    line is present (write-through, no write-allocate);
  - remote stores go out on the network;
  - local stores are held while a fill is outstanding, so a fill never
    returns data older than a store.
- **Remote loads (`LDR`)** enter the Load Queue (a TSIB). One request per
  cycle goes to the network, tagged with its queue index. The reply carries
  the index back. The network request channel serves the Load Queue before
  remote stores.

Network protocol:

- Requests (`net_req_*`) are single-cycle and always accepted.
- Replies (`net_rsp_*`) may come in any order, one per cycle, and must
  carry the index of their request.
- A remote store needs no reply.

## Instruction set

The published architecture gives no encoding. This core uses a small
32-bit, word-addressed RISC encoding:

```
[31:26] opcode  [25:21] rd  [20:16] rs1  [15:11] rs2   [15:0] imm16 (sign-extended)
stores/branches:            [20:16] rs1  [15:11] rs2   [10:0] imm11 (sign-extended)
```

| op | code | meaning |
|---|---|---|
| NOP | 0 | |
| ADD SUB AND OR XOR SLT SLL SRL | 1-8 | rd = rs1 op rs2 (SLT signed) |
| ADDI | 9 | rd = rs1 + imm16 |
| LUI | 10 | rd = imm16 << 16 |
| DIV | 16 | rd = rs1 / rs2, unsigned, all ones on divide by 0 (TSI) |
| LD / LDR | 20 / 22 | rd = mem[rs1 + imm16], local / remote (LDR is a TSI) |
| ST / STR | 21 / 23 | mem[rs1 + imm11] = rs2, local / remote |
| BEQ / BNE | 32 / 33 | if rs1 ==/!= rs2: pc = pc + imm11 |
| JMP | 34 | pc = pc + imm16 |
| FORK | 40 | new thread at pc + imm16 with RRM = rd[2:0] |
| JOIN | 41 | end thread unless it is the last one, which continues with RRM = rd[2:0] |

The package `mt_pkg` provides `enc_r`, `enc_i` and `enc_s` for writing test
programs.

## Top-level interface (`mt_superscalar`)

| group | signals | notes |
|---|---|---|
| control | `clk`, `rst_n`, `boot_pc`, `suspend_en` | Reset is asynchronous, active low. `suspend_en` = 0 selects no-suspend mode. |
| instruction memory | `imem_req_valid/addr` out, `imem_rsp_valid/line[4]` in | One line request at a time. Any latency ≥ 1. |
| data memory | `dmem_req_valid/addr` out, `dmem_rsp_valid/line[4]` in; `st_valid/addr/data` out | Line fills for the data cache, plus write-through stores (always accepted). |
| network | `net_req_valid/store/idx/addr/data` out, `net_rsp_valid/idx/data` in | See above. |
| status | `thr_valid`, `thr_ready` | One bit per TAS entry. |
| events | `ev_commit` (count), `ev_tsi_suspend`, `ev_tsi_nosuspend`, `ev_fetch_cancel`, `ev_release`, `ev_tsib_direct`, `ev_tsib_wb`, `ev_icache_miss`, `ev_dcache_miss`, `ev_redirect`, `ev_fork`, `ev_join`, `ev_dispatch_stall` | One-cycle strobes for counting. |

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `mt_pkg` | `NTHREADS` | 6 | TAS entries (published) |
| `mt_pkg` | `FETCH_W` | 4 | fetch/decode width (published) |
| `mt_pkg` | `NPREG` / `NLREG` | 64 / 32 | physical / logical registers (published) |
| `mt_pkg` | `WIN` | 16 | window entries (own choice) |
| top | `ICACHE_LINES` | 512 | 8 KiB instruction cache (published size) |
| top | `DC_LINES` | 512 | 8 KiB data cache (published size) |
| top | `LQ_DEPTH` | 6 | Load Queue entries (published) |
| top | `DIV_DEPTH` | 2 | divide TSIB entries (own choice) |
| `load_store_unit` | `SQ_DEPTH` | 4 | store queue entries (own choice) |
| `central_window` | `NALU`, `COMMIT_W` | 4, 4 | ALUs, commit width |
| `divider` | `W` | 32 | operand width; latency W + 1 cycles |

`WIN` and `TAG_W` must be changed together in `mt_pkg`.

## Departures and omissions

**Own choices where the published description gives none:**

- the instruction set and encoding;
- the window size (16);
- the commit width;
- the stage timing;
- the divider (restoring, 33 cycles);
- the store queue;
- the data-cache write policy;
- the TSIB depth of the divide unit.

**Branches.** They are predicted not taken and resolved at commit. There is
no branch predictor.

**Floating point.** The two floating-point units of the published block
diagram are not built. The divide unit takes their place as the on-chip
long-latency unit, since division is one of the published examples of a
thread-suspending instruction. Floating-point programs cannot run.

**FORK and JOIN.** These execute at the bottom of the window, at most one
per cycle. A FORK waits when all six TAS entries are in use. A JOIN
continues only in the thread that is the last valid one.

**External parts.** The instruction memory, data memory and network are
outside the core. They are modelled in the testbenches.

**Fetch cancel.** The decode-time cancel of a same-thread fetch is built
and tested in the fetch unit's testbench. In this pipeline it cannot occur
at the top level, because a thread is never offered for fetch in the cycle
after its own block.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_reg_remap` | the whole relocation table, exhaustively |
| `tb_regfile` | random multi-port reads and writes |
| `tb_alu`, `tb_divider` | random and corner operands, checked against reference arithmetic; divider latency |
| `tb_tas` | reset state; fork into free entries; round-robin order; suspend grant and refusal; no-suspend mode; I-cache miss suspend and wake; redirect; join continue and die |
| `tb_icache`, `tb_dcache` | misses and line fills from a memory model, tag conflicts; for the I-cache, hits while a fill is outstanding; for the D-cache, random addresses, random fill latency and write-through |
| `tb_fetch_unit` | block alignment, Cache Miss Buffer, cancel, flush, stall |
| `tb_decoder` | relocation, TSI suspension and invalidation, refusal |
| `tb_tsib`, `tb_div_unit` | write-back against release, the release/write-back race, flush with dead entries |
| `tb_load_store_unit` | store queue order and conflicts, data-cache miss and refill, write-through, Load Queue with network, remote stores |
| `tb_central_window` | dependent chains and in-order commit; release of a suspended divide at the bottom; a non-suspended divide holding the bottom; redirect flush of one thread; store commit; fork waiting on a full TAS; join flush; dispatch refusal |
| `tb_mt_superscalar` | the whole core at default parameters, running a three-thread fork/divide/remote-load/join program |
| `tb_mt_workload` | one kernel run single-threaded (ST), multithreaded (MT) and multithreaded without suspension (MTns), at remote latencies 5 and 50 |

**`tb_mt_superscalar`.** Every stored value is checked. The testbench also
requires each mechanism to occur at least once:

- suspension granted and refused;
- release;
- direct commit;
- TSIB write-back;
- I-cache and D-cache misses;
- redirect;
- fork;
- join;
- dispatch stall.

The run takes about 750 cycles.

**`tb_mt_workload`.** Its small kernel computes three sums. Each sum has
eight steps of: remote load, divide by 3, local load from a cold array (six
data-cache misses in all), and accumulate. It measured:

| remote latency | ST | MT | MTns | MT speedup over ST | MT speedup over MTns |
|---|---|---|---|---|---|
| 5 | 1232 | 1009 | 1044 | 1.22 | 1.03 |
| 50 | 2305 | 1343 | 1404 | 1.72 | 1.05 |

The numbers are cycles. The speedup from multithreading grows with remote
latency, as expected.

**Not covered.** The published benchmark programs (integer and
floating-point suites) are not available for this instruction set, so
their cycle counts are not reproduced.

## Simulating

The testbenches use `$urandom` and need a simulator with `--timing`
support. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mt_pkg.sv rtl/*.sv \
          tb/tb_mt_superscalar.sv --top-module tb_mt_superscalar -Mdir obj
./obj/Vtb_mt_superscalar
```

Any other testbench runs the same way with its own name. `mt_pkg.sv` must
come first. To write a program, fill the instruction-memory model's `prog`
array in a copy of `tb_mt_superscalar.sv` using the `enc_*` helpers.
