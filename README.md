# Worst-case-oriented instruction prefetching: loop-directed and compiler-directed

Real-time software is judged by its worst-case execution time (WCET), not its average.
A plain Next-N-Line prefetcher always fetches the N cache lines after the current one.
That helps straight-line code but fails at loop boundaries. Each time a loop branch
executes, the prefetcher fetches the code *after* the loop, although in the worst case
the branch is taken and execution goes back to the loop header. Those useless lines also
evict useful ones. A static WCET analyser must assume the worst about such pollution, so
the WCET bound improves little.

This RTL implements the instruction-fetch side of a processor with two prefetchers built
for the worst case. They follow the paper *Optimizing Instruction Prefetching to Improve
Worst-Case Performance for Real-Time Applications*:

* **Loop-directed prefetching (`PF_LOOP`)**: a Next-N-Line prefetcher plus a small table
  of loop branch and loop header addresses. When an instruction that the compiler marked
  as a loop branch executes, the next prefetch run starts at the **loop header**. At
  every other point it starts at the next sequential line.
* **WCET-oriented prefetching (`PF_WCET`)**: a static cache analysis finds the
  instructions that miss in the worst case. The compiler writes a 4-bit prefetch distance
  into an earlier instruction of the same basic block. When that instruction executes,
  the hardware prefetches the instruction that many places ahead.
* **`PF_OFF`**: no prefetching, the baseline.

Both schemes fill a small L1 instruction cache: 512 bytes, direct-mapped, 8-byte lines,
1-cycle hit, 8-cycle main memory.

## Block diagram

```
                 exec_pc, loop_branch_en (LoopBranchEnable)        exec_pc, exec_instr
                        |                                                 |
          +-------------+--------------+                         +--------v--------+
          |                            |                         | wcet_pf_decoder |
 +--------v------------+     +---------v---------+               | field[9:6] != 0 |
 | loop_branch_addr_reg|     |   nnl_addr_gen    |               | -> PC + 4*field |
 +--------+------------+     | (next line when   |               +--------+--------+
          | lb_addr, lb_en   |  a new line runs) |                        |
 +--------v------------+     +---------+---------+                        |
 | loop_assoc_search   |<--+           | seq_addr                         |
 +--------+------------+   |           |                                  |
          | header, hit  +-+--------+  |                                  |
          |              |loop_table|  |  (8 x {branch, header}, loaded   |
          |              +----------+  |   before the program runs)       |
        1 v                          0 v                                  |
       +--------------------------------+                                 |
       |       prefetch_addr_mux        |  sel = lb_en & hit              |
       +---------------+----------------+                                 |
                       | start_addr                                       |
              +--------v--------+                                         |
              | nnl_prefetcher  |  N = 8 consecutive lines per run        |
              +--------+--------+                                         |
                       | hw prefetch          mode selects one            | sw prefetch
                       +-------------------->[  source  ]<----------------+
                                                  |
          fetch_* ---------------------> +--------v--------+ <---> mem_* (8-cycle memory)
                                         |     icache      |
                                         +-----------------+
```

## The loop-directed prefetcher, cycle by cycle

The core reports each executed instruction on `exec_valid`, `exec_pc` and `exec_instr`.
It raises `loop_branch_en` when the instruction is an annotated loop branch. The
annotation can be a special opcode or a spare field in the branch; decoding it is up to
the core.

* **Cycle t.** An instruction executes.
* **Cycle t+1.** `loop_branch_addr_reg` holds its address and a delayed copy of
  LoopBranchEnable (`lb_en`). At the same time, `nnl_addr_gen` has registered whether
  execution has just entered a new cache line. If so, it offers the following line as a
  sequential start (`seq_addr`). `loop_assoc_search` compares `lb_addr` with all eight
  table entries at once. If `lb_en` is set and an entry matches, the mux picks that
  entry's loop header (input 1). Otherwise it picks the sequential address (input 0).
  The chosen start is registered into `nnl_prefetcher`.
* **Cycle t+2 on.** `nnl_prefetcher` offers lines `start`, `start+8`, … to the cache,
  one per cycle when the cache accepts them, N = 8 lines in all.

Rules this implementation adds, where the scheme says nothing:

* `nnl_prefetcher` keeps a window of lines still to prefetch, `[next, end)`. A start at
  line S asks for lines S … S+N-1.
* If that range continues the current window (`end-N <= S <= end`), only the end moves
  to S+N. Lines already offered are not offered again, and lines below S, which
  execution has passed, are skipped. This is ordinary Next-N-Line behaviour on
  straight-line code.
* Any other start is a jump, such as the redirect to a loop header. It drops the rest
  of the window and opens a new one at S.
* A loop branch missing from the table falls back to sequential prefetching.
* `nnl_addr_gen` only asks for a new window when execution moves to a different line.
  Instructions in the same line add nothing.

The table is written through the `tbl_*` port (index, valid, branch address, header
address) before the program starts. Loop branches and headers are known at compile time.
`tbl_clear` empties it. If the processor has a branch target buffer, this table could
share its storage. Here it is separate.

## The software prefetch field

Every instruction carries a 4-bit *prefetch distance* at bits `[9:6]`. That is inside
the MIPS `shamt` field, which most instructions leave unused. Zero means no prefetch.
A value `d` asks for the instruction at `PC + 4*d`. The distance is counted in
instructions, and it is unsigned because the target lies later in the same basic block.

The compiler sets `d = min(miss penalty, schedule distance)`. That is at most 8 here, so
4 bits are enough. For instructions classified "first miss" or "first hit", the compiler
peels the first loop iteration and annotates only the right copy. All of this is done
before run time; the hardware only decodes the field.

`wcet_pf_decoder` holds one pending request. If another annotated instruction executes
before the cache has taken the first request, the newer one replaces it and
`ev.sw_overwrite` pulses. Prefetching never changes architectural state, so losing a
request only costs time.

## The instruction cache and its fill engine

`icache` has 64 sets of one 8-byte line (two instructions), one tag and one valid bit
each. It has three ports:

* **Demand fetch** (`req_valid/req_ready/req_addr`, response `resp_valid/resp_instr`).
  A hit returns the instruction in the next cycle. A miss blocks the port and returns
  the instruction one cycle after the line arrives from memory, so a miss costs exactly
  the memory latency (8 cycles) more than a hit. The memory request leaves in the same
  cycle the fetch is accepted.
* **Prefetch** (`pf_valid/pf_ready/pf_addr`). A prefetch is dropped at once (accepted,
  nothing done) in three cases:
  * its line is present;
  * its line is the one being filled;
  * it is the line the stalled fetch is waiting for.

  Otherwise it is accepted only when the fill engine is free and no demand miss needs
  it. It then starts a fill, and the line is written into its set like any other line.
  That eviction is the pollution the two schemes try to keep low.
* **Memory** (`mem_req_*`, `mem_resp_*`). Line requests go out with a valid/ready
  handshake. Each response is one pulse carrying the 64-bit line. Only one fill is ever
  outstanding.

Two paths make late prefetches still useful:

* **merge**: a fetch that misses on the line a prefetch is already filling waits for
  that fill, so its penalty is what remains of the 8 cycles;
* **bypass**: a fetch accepted in the very cycle its line arrives is answered from the
  memory data.

Assertions check that only one fill is outstanding, that no memory response arrives
unasked, and that a demand and a prefetch never start a fill together.

## Mode selection and events

`mode` (`ipf_pkg::pf_mode_e`) connects one source to the cache's prefetch port. The
source not selected is held idle, and its state is flushed. The source paper evaluates
the two schemes separately and leaves combining them as future work, so they are not
combined here.

`ev` (`ipf_ev_t`) carries one-cycle pulses for counting:

* from the cache: demand hit, demand miss, merge, bypass, prefetch fill, prefetch drop;
* from the front end: loop redirect, sequential trigger, software prefetch, software
  overwrite.

## Parameters (top level `ipf_top`)

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 512 | L1 instruction cache size |
| `LINE_BYTES` | 8 | line size |
| `LOOP_ENTRIES` | 8 | loop table entries |
| `PF_LINES` | 8 | lines per prefetch run, the "prefetching distance" N. The paper evaluates 2, 4, 8 and 16; 8 gave its best WCET, equal to the miss penalty |
| `PF_FIELD_LSB`, `PF_FIELD_W` | 6, 4 | position and width of the software prefetch field |
| `ADDR_W` | 32 | address width |

Instructions are 32 bits wide (`ipf_pkg::INSTR_W`). The memory latency belongs to the
memory, not to the RTL. The cache works with any latency.

## What is taken from the source and what is chosen here

Taken from the source paper:

* the block structure of the loop prefetcher: loop branch address register,
  LoopBranchEnable, associative search, branch/header table, the 1/0 mux and the
  Next-N-Line address generator and prefetcher;
* 8 table entries and N = 8;
* the 4-bit relative prefetch field, with zero meaning none;
* the cache geometry and latencies.

Chosen here:

* all handshakes and the cycle timing above;
* registering LoopBranchEnable together with the address;
* the valid bits, the write port and the duplicate priority of the table;
* the fallback when a loop branch is missing from the table;
* the window rule of the prefetcher;
* the field position and its units;
* the one-entry software request buffer;
* a blocking cache with one outstanding fill, demand priority, merge and bypass;
* selecting one scheme with `mode`.

The sequential start address is the line *after* the current one. The paper describes
the sequential alternative both as "the next N cache lines" and as "PC+4". Starting at
PC+4 would usually make the run begin with the current line, which is already cached,
and end one line earlier.

Not implemented, since they are not hardware or not designed in the source:

* the VLIW processor (the core only has to drive the `exec_*` and `fetch_*` ports);
* main memory;
* the data cache, which is assumed perfect;
* the compiler's static cache analysis, classification and loop peeling.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_loop_branch_addr_reg` | random traffic against a register model |
| `tb_loop_table` | writes, invalidations and clears against a shadow table |
| `tb_loop_assoc_search` | random tables with duplicates: hit, lowest index, header |
| `tb_prefetch_addr_mux` | random select and inputs |
| `tb_nnl_addr_gen` | random address walk: a request one cycle after each new line, and only then |
| `tb_nnl_prefetcher` | 8 prefetches on 8 consecutive cycles from one start; random starts (extending and jumping), enables and back-pressure against a window model |
| `tb_wcet_pf_decoder` | random fields and back-pressure: address `PC + 4d`, hold, overwrite |
| `tb_icache` | miss = 1 + 8 cycles, hit = 1 cycle, late-prefetch merge, bypass, drop, direct-mapped eviction; 1500 random fetches and prefetches against a tag model, every word checked |
| `tb_ipf_top` | the whole front end at default parameters, described below |

`tb_ipf_top` drives an in-order core model and an 8-cycle memory model
(`tb/main_mem_model.sv`). Memory words are a fixed function of their address
(`tb/tb_mem_pkg.sv`). The program has three parts:

* a 16-instruction prologue;
* a 160-instruction loop body (640 bytes, larger than the cache), run 6 times;
* a 32-instruction epilogue.

It is run in all three modes. The test checks that:

* the `PF_OFF` cycle count matches a reference cache model exactly;
* every loop branch redirects the next run to the loop header;
* each mode uses only its own prefetcher;
* every mechanism happened at least once.

In `PF_WCET` the testbench plays the compiler. Every instruction that misses in the
reference cache model gets its prefetch from the earliest free instruction of the same
basic block, at most 8 places earlier: PD = min(miss penalty, schedule distance), with
one prefetch per carrying instruction.

Measured cycles for this program:

| mode | cycles | normalised |
|---|---|---|
| `PF_OFF` | 3120 | 1.000 |
| `PF_LOOP` | 2887 | 0.925 |
| `PF_WCET` | 2862 | 0.917 |

On this program, one outstanding fill limits both schemes. Most misses in the prefetch
modes merge with a prefetch already in flight, which shortens them without removing
them.

`tb_prefetch_distance` sweeps the prefetch distance. Five copies of `ipf_top` run the
same program side by side: one without prefetching and four in `PF_LOOP` with runs of
2, 4, 8 and 16 lines (LP-2 … LP-16). The program is a prologue, an outer loop holding
an inner loop, and an epilogue that maps onto the loop code's sets. The test checks
every fetched word in every copy and one redirect per executed loop branch. For the
copy without prefetching it also checks the exact cycle count against the reference
model. The printed results are simulated cycles, not WCET bounds:

| setting | cycles | normalised |
|---|---|---|
| no prefetch | 1664 | 1.000 |
| LP-2 | 1579 | 0.948 |
| LP-4 | 1563 | 0.939 |
| LP-8 | 1551 | 0.932 |
| LP-16 | 1520 | 0.913 |

`tb/core_model.sv` is the core model this testbench uses.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ipf_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ipf_pkg.sv tb/tb_mem_pkg.sv tb/tb_ipf_top.sv
./obj_dir/Vtb_ipf_top
```

Substitute any other testbench name. Each runs in well under a second. Lint one module
with `verilator --lint-only -Wall -Irtl -y rtl rtl/ipf_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are unused address bits below the line offset and an unused
`hit_idx`/`busy` at the top. There is also `SYNCASYNCNET`, because the assertions use the
asynchronous reset as their disable condition.

## Files

`rtl/`:

* `ipf_pkg.sv`: shared types, the mode enum and the event structs;
* `ipf_top.sv`: the top level;
* `loop_branch_addr_reg.sv`, `loop_table.sv`, `loop_assoc_search.sv`,
  `prefetch_addr_mux.sv`, `nnl_addr_gen.sv`, `nnl_prefetcher.sv`: the loop-directed
  prefetcher;
* `wcet_pf_decoder.sv`: the software prefetch field;
* `icache.sv`: the cache.

`tb/`: one testbench per module, plus the memory model and its contents package.
