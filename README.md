# Hypothesis-testing processors for inductive logic programming

Systems such as Progol learn rules in first-order logic. Most of their run time
goes into one repeated job: checking a candidate rule (a *hypothesis*) against
every training example. For many scientific data sets the background knowledge
is a long list of ground facts, for example:

    atm(Compound, Atom, Element, Type, Charge)   % about 6000 facts
    bond(Compound, Atom1, Atom2, BondType)       % about 6000 facts

A hypothesis such as

    active(A) :- atm(A,B,c,27,C), bond(A,D,E,1), bond(A,D,B,7).

is then tested for an example `active(d18)` by a nested loop over these facts,
with Prolog backtracking. This RTL builds that loop directly as a datapath, with
no instruction set. Each processor unifies all the arguments of a fact in one
cycle. Many processors test different examples of the same hypothesis in
parallel. Each processor keeps the facts of its current example in small
per-predicate caches, so most reads stay on chip and several processors can
share one external memory bank.

The architecture follows the published design "Customising Parallelism and
Caching for Machine Learning". Its description was written for an FPGA (Handel-C
on a Xilinx XCV2000E). This SystemVerilog is a new implementation. The section
"Where this RTL departs from or adds to the architecture" lists every choice
made here that the architecture does not fix.

## The system

```
            host (hypothesis generation, index tables)
                              |
                        +-----------+
                        | main_ctrl |  broadcast hypothesis, dispatch examples,
                        +-----------+  collect results
              /      /      |      \      \
         +-------+ +-------+     +-------+ +-------+
         |  P0   | |  P1   | ... |  P6   | |  P7   |   hyp_processor x NPROC
         +-------+ +-------+     +-------+ +-------+
              \     /                 \     /
           +----------+            +----------+
           | ram_ctrl |   x NBANK  | ram_ctrl |       one bank per RAM control,
           +----------+            +----------+       shared by NPROC/NBANK processors
                |                       |
            bank 0                  bank 3             external SRAM (not in the RTL)
```

By default there are 8 processors and 4 banks, so each RAM control serves 2
processors. Every bank holds the same packed background data.

The host does the work that software does well. It generates hypotheses and
encodes them as register writes. It also looks up, for each example and each
predicate, where that example's facts start in memory and how many there are.
That is the *section*, read from an index table built when the data were
preprocessed. A query therefore carries `{tag, key, section[atm], section[bond]}`
(`ilp_pkg::query_t`). The result is `{tag, success}`.

## Inside a processor (`hyp_processor`)

| block | module | role |
|---|---|---|
| control | `proc_ctrl` | takes hypothesis writes and queries, binds the example key to variable 0, starts the unifier, returns the result |
| hypothesis data registers | `hyp_regs` | per body literal: predicate; per argument: type register and data register |
| unifier | `unifier` (+ `arg_unify`, `backtrack_stack`) | the search loop described below |
| variable register file | `var_regfile` | one register per clause variable, with one read and one write port per lane |
| cache control | `cache_ctrl` | direct-mapped, demand-filled caches, one per predicate |
| cache | `cache_ram` | 44-line on-chip RAM holding tag and packed clause |
| external memory control | `ext_mem_ctrl` | holds a miss request until the shared RAM control grants it |

### Argument types and one-step unification

The background facts contain only constants. Unifying one argument is therefore
a single step, and the hypothesis compiler fixes each argument's type in
advance (`ilp_pkg::arg_type_e`):

| type | action | succeeds when |
|---|---|---|
| `ARG_OUT` (output variable, first use) | write the fact's value into the variable's register | always |
| `ARG_IN` (input variable, already bound) | compare with the variable's register | equal |
| `ARG_VOID` (occurs once) | nothing | always |
| `ARG_CONST` | compare with the constant in the data register | equal |

`arg_unify` is this table in logic. The unifier has `LANES` copies of it.
With `LANES = 5` (the default) a whole fact of arity up to 5 is unified in one
cycle. With `LANES = 1` arguments are unified one per cycle, and the unifier
stops at the first argument that fails.

A variable must not be both bound (`ARG_OUT`) and read (`ARG_IN`) in the same
literal. The compiler guarantees this: a variable's first use is its output
occurrence.

### The search loop (the part that needs care)

`unifier` implements Prolog's failure-driven loop for one example:

1. Start with literal 0 at the base address of its predicate's section.
2. Read a fact and unify all its arguments.
   * If it fails and the section has more facts, read the next one. The read is
     issued in the same cycle the failing fact arrives, so this inner loop runs
     at one fact every 2 cycles from a hitting cache.
   * If it matches and this is the last literal, the example is **covered**.
   * If it matches otherwise, push `address+1` on the backtrack stack and start
     the next literal at the base of its own section. Its bindings are already
     in the variable registers.
3. When a literal runs out of facts, it fails:
   * for literal 0, the example is **not covered**;
   * otherwise, **backtrack**: pop the resume address and continue the
     previous literal from there. Its output variables are rebound when it
     matches again.

No undo trail is needed. A variable is bound by exactly one literal, and every
literal after it is re-entered from scratch.

The unifier's states are `S_BEGIN` (first read of a literal), `S_FETCH` (issue a
read, or detect the end of the section and backtrack), `S_WAIT` (data
arriving), `S_STEP` (further argument groups when `LANES` is less than the
arity) and `S_DONE`. Costs with a hitting cache: a failing fact takes 2 cycles,
a matching fact takes 1 more cycle before the next literal's first read, and a
backtrack takes 1 cycle.

### Packing the facts

Preprocessing gives every argument its minimum bit width and packs one fact
into one word, argument 0 in the least significant bits (`ilp_pkg::FIELD_W`):

| predicate | field widths (bits) | total |
|---|---|---|
| `bond/4` | 8, 6, 6, 3 | 23 |
| `atm/5` | 8, 6, 4, 8, 32 (floating-point charge) | 58 |

Constants such as the element `c` are mapped to small integers by the same
preprocessing. The unifier unpacks every field and zero-extends it to 32 bits
before comparing.

### Caches

Facts that share an index (the compound) lie next to each other, and there are
at most 44 of them for one predicate. A cache of 44 lines can therefore hold the
whole section of the inner loop. `cache_ctrl` uses **the fact's offset within
its section as the line number**, so one section never conflicts with itself.
The full address is kept as the tag. A section longer than the cache wraps
around (line = offset mod 44). It still reads correctly, but it can no longer
stay fully resident.

There is **one cache per predicate** (`NCACHE = 2`; predicate `p` uses cache
`p mod NCACHE`). Take rule 2, where two `atm` calls are followed by a `bond`
call in the inner loop. The `bond` facts cannot evict the `atm` facts needed
after a backtrack. `NCACHE = 1` gives a single shared cache.

Each cache is only as wide as the facts it holds: 16 + 58 bits for `atm` and
16 + 23 bits for `bond`.

Timing (`cache_ctrl`):

* Hit: a request accepted in cycle t is answered in cycle t+2. Accesses are not
  pipelined, but a new request may be accepted in the response cycle.
* Miss: the external read is requested in t+1 and the line is filled when the
  word returns. With the defaults the word arrives 6 cycles later, so a miss
  costs 8 cycles.
* `flush` clears all valid bits. Use it when the background data change.

### Sharing an external bank (`ram_ctrl`)

Processors that share a bank compete through a semaphore. In each cycle it is
given to one requester, in round-robin order starting after the last owner, and
released as soon as that read is issued. Reads from different processors
therefore follow each other in the bank's pipeline, and a bank can return one
word per cycle. The requester's number travels along a `RD_LAT`-deep pipeline
beside the bank, so each word goes back to the right processor. An uncontended
read takes `MEM_LAT + 2` = 6 cycles from the cache's request to the word.

Bank interface: `mem_rd_en` and `mem_addr` are registered. The bank must
present `mem_rdata` `MEM_LAT` cycles after the edge that sampled them.

## Interfaces of `ilp_top`

| port | dir | meaning |
|---|---|---|
| `h_hyp_valid/ready`, `h_hyp` (`hyp_wr_t`) | in | hypothesis write, accepted only when every processor is idle |
| `h_q_valid/ready`, `h_q` (`query_t`) | in | example query, sent to the lowest-numbered idle processor |
| `h_r_valid/ready`, `h_r` (`result_t`) | out | result with the query's tag; results may return out of order |
| `all_idle` | out | no query in progress and no result waiting |
| `flush` | in | invalidate all caches |
| `ev_hit`, `ev_miss`, `ev_backtrack` [NPROC] | out | one-cycle event strobes for performance counters |
| `mem_rd_en`, `mem_addr`, `mem_rdata` [NBANK] | out/in | external bank read ports |

A hypothesis is loaded as follows. For each literal `l`, send one header write
(`is_header = 1`, `lit`, `pred`, `nlits`), then one write per argument
(`lit`, `arg`, `atype`, `data`). For a variable, `data` is its register number,
and register 0 is the head variable (the example key). For a constant, `data`
is the constant's code.

All handshakes are valid/ready. The reset is synchronous and active low.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ilp_top.NPROC` | 8 | processors |
| `ilp_top.NBANK` | 4 | external banks; NPROC must be a multiple |
| `LANES` | 5 | arguments unified per cycle (5 = parallel, 1 = sequential) |
| `CACHE_DEPTH` | 44 | lines per cache |
| `NCACHE` | 2 | caches per processor |
| `MEM_LAT` | 4 | bank read latency; the external read then takes MEM_LAT + 2 cycles |
| `ilp_pkg::MAX_LITS` | 4 | body literals per hypothesis |
| `ilp_pkg::NVARS` | 8 | variable registers |
| `ilp_pkg::WORD_W`, `ADDR_W` | 64, 16 | memory word and address widths |
| `ilp_pkg::FIELD_W` | see above | packing scheme, one row per predicate |

To target other background data, edit `FIELD_W`, `NPRED` and `PRED_W` in
`ilp_pkg`. Raise `CACHE_DEPTH` to the largest section if sections must stay
fully resident in the cache.

## Where this RTL departs from or adds to the architecture

* **Given by the architecture:** the block structure of the processor and the
  system, the four argument types, the failure-driven loop with its address
  stack, parallel and sequential unification, per-predicate direct-mapped
  caches of 44 lines, 2-cycle non-pipelined cache access, a 6-cycle external
  read including arbitration, a semaphore in each RAM control, two processors
  per bank, 8 processors and 4 banks, and the bit widths of `bond`.
* **Chosen here:**
  * the split of the 58 `atm` bits: only the total and the 32-bit float are
    given;
  * packing order, word width (64), address width (16), variable and literal
    counts (8 and 4), argument type encoding;
  * all handshakes and the query/result formats, including the query tag;
  * the cache line being the offset inside the section;
  * the index table being looked up by the host;
  * the head variable being register 0;
  * round-robin ordering, lowest-idle dispatch, synchronous reset, the flush
    input.
* **Not built:**
  * prefetching of whole sections into dual-ported caches (the alternative to
    demand fetching);
  * second-level on-chip caches;
  * the tree of main controllers proposed for many processors;
  * the uncached baseline (its run time is only estimated, see below);
  * the earlier instruction-processor design.
* **Variables repeated in one fact:** a hypothesis may not bind and test the
  same variable inside one literal (see above).
* **Cycle counts** are this RTL's own. On the generated rule-3 benchmark
  (`tb_ilp_bench`), sequential unification takes 1.46 times as many cycles as
  parallel unification; the published figure is 3.6. The reason is that here
  the 2-cycle read of each fact dominates, and a sequential unifier stops at
  the first failing argument. Speedup over one processor is 7.7 with 8
  processors on 4 banks and 18.5 with 24 processors on 4 banks. With 32 and 64
  processors on one bank it flattens at 12.6 and 12.7, because the single bank
  is saturated at about 0.83 reads per cycle. With 8 processors on one bank,
  the speedup is 7.6 with parallel and 5.2 with sequential unification. One processor with parallel
  unification needs 106 256 cycles for the 188 generated examples.
* **Miss cost** (`tb_ilp_misscost`): with one processor, each extra cycle of
  external latency adds exactly one cycle per external read, since hits never
  wait for the bank. 77% of the reads hit on the generated data. Against an
  estimated uncached processor (every hit replaced by an external read), the
  gain is 1.3 at a 3-cycle miss cost and 3.4 at 30 cycles. The published
  design reports much more for rule 3 (about 12 at 30 cycles) on the real
  data, whose inner loop goes back over the cached facts more often. The
  generated data are the limit here, not the cache.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_arg_unify`, `tb_backtrack_stack`, `tb_var_regfile`, `tb_hyp_regs` and
  `tb_cache_ram` compare the blocks with simple models.
* `tb_unifier` and `tb_unifier_seq` run rules 1–3 over 60 examples each against
  a procedural reference search (`tb_ilp_pkg::ref_eval`). They check the result,
  the number of facts read, the cache line numbers and the 2-cycle inner-loop
  rate.
* `tb_cache_ctrl` checks data, the 2-cycle hit, miss latency, that the two
  predicates do not evict each other, and flush.
* `tb_ram_ctrl` checks routing, the uncontended latency, alternation under
  contention and one grant per cycle.
* `tb_hyp_processor` checks results against the reference, at most one miss per
  fact per example, and the 6-cycle external read.
* `tb_ilp_top` is the full-size system at default parameters. It runs nine
  hypotheses over 188 generated compounds (1692 queries) with random result
  back-pressure, and a cache flush midway. It requires every mechanism to
  occur: hits, misses, backtracking, bank conflicts, all 8 processors busy at
  once, hypothesis reloads, the flush, and both covered and uncovered
  examples.
* `tb_ilp_bench` runs the rule-3 benchmark in eight configurations and prints
  cycle counts, speedups and bank reads per cycle.
* `tb_ilp_misscost` runs the rule-3 benchmark on one processor with external
  read costs of 3, 6, 15 and 30 cycles. It checks that only misses pay the
  latency and that the gain over an uncached estimate grows with the cost.

The background data are generated in `tb_ilp_pkg::gen_background`. Each index
has up to 44 facts of each predicate, with value ranges small enough that rules
both succeed and fail. The `tb/ext_sram_model` bank model serves reads from
that array.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/ilp_pkg.sv tb/tb_ilp_pkg.sv tb/tb_ilp_top.sv --top-module tb_ilp_top -o sim
    ./obj_dir/sim

Replace `tb_ilp_top` with any other testbench name. `tb_ilp_top` runs in a few
seconds. `tb_ilp_bench` runs in about 5 seconds (64 processors).
