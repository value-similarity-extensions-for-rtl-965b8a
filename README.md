# VSX: value-similarity skipping for an in-order core

Many machine-learning kernels walk through arrays whose neighbouring
elements hold nearly the same value. Examples are flat image regions,
sparse feature vectors and saturated activations. When two consecutive
loads bring in similar values, everything computed from them is also
similar. An approximate program can then reuse the earlier result and skip
the load, the arithmetic and even whole loop iterations.

VSX (Value Similarity eXtensions) does this in hardware for a simple
general-purpose core:

* **Similarity is found in the data cache.** When a marked load reads the
  first element of a cache line, the line is compared element by element
  with that first element. Each element gets one *Value Similarity Bit* (VSB).
* **Skipping happens before fetch.** The VSBs are filed per pointer
  register. When the pointer moves to the next element, the VSB for that
  element is looked up. The fetch unit then steps over the load, and over
  the computes that only depend on skipped loads, without fetching them.
* **Skipped results are replaced by saved ones.** The first-element load of
  each line, and the computes of that iteration, store their results in a
  small buffer. A consumer of a skipped instruction reads that buffer
  instead of the register file.
* **Runs of similar iterations are fast-forwarded.** If every load of the
  loop sees *r* more similar elements ahead, fetch jumps to a short routine
  that does the work of *r* iterations at once.

Software decides what may be skipped. Before a kernel runs, the program
fills a small table with one entry per interesting instruction. Each entry
gives the instruction's PC, its role (load, compute, consumer or loop head),
its skip condition and the similarity threshold. A compiler can derive the
entries from a source annotation such as `#pragma vsx(a, TH1, b, TH2)` on a
loop.

This repository holds the VSX logic as synthesizable SystemVerilog. The host
core, its caches and the compiler are not included. `vsx_top` exposes one
group of ports per pipeline stage for a core to drive. The testbenches use a
small behavioural core for this.

## Block map

```
                 +---------------------- vsx_top ------------------------+
 IF  if_pc ----> | isu: sbst (table) + SST + skip controller + ffr_table  |--> if_fetch_pc, if_tag
                 |        ^ srf              ^ rl_min                     |
                 |        |                  |                            |
 WB  wb_* -----> | vsb_save_feed (VSBT, selector, SRF) --> vsb_run_length |
                 |        ^                                               |
 MEM line,addr > | vsb_generator (7 x vsx_similar)                        |
 MEM result ---> | rsru: Result Buffer, save controller, SaveResultIter   |
 ID  rs/rt rf -> |       reuse controller                                 |--> id_rs, id_rt
                 +--------------------------------------------------------+
```

| file | block |
|---|---|
| `rtl/vsx_pkg.sv` | sizes, SBST entry (`sbst_entry_t`), per-instruction tag (`vsx_tag_t`), SBST search function |
| `rtl/vsx_similar.sv` | one comparator, \|a-b\| <= threshold, for integers or IEEE-754 single |
| `rtl/vsb_generator.sv` | VSB Generator: 7 comparators against element 0 |
| `rtl/vsb_save_feed.sv` | VSB Table (VSBT), VSB Selector, Similarity Register File (SRF) |
| `rtl/vsb_run_length.sv` | run length of asserted VSBs per entry, and their minimum |
| `rtl/sbst.sv` | Similarity Based Skip Table |
| `rtl/ffr_table.sv` | start PC of the fast-forward routine for each run length |
| `rtl/isu.sv` | Instruction Skip Unit: search chain, Skip Status Table (SST) |
| `rtl/rsru.sv` | Result Save & Reuse Unit: Result Buffer (RB), save/reuse control |
| `rtl/vsx_top.sv` | the blocks wired to per-stage ports |

Default sizes: 32-byte lines of eight 32-bit elements, so there are 7 VSBs
per line. There are 32 pointer registers and 8 SBST entries, and the Result
Buffer and SST have one slot per SBST entry. The ISU follows a chain of up to
4 table searches per cycle. The line geometry matches a core with 32-byte L1
lines and `float` data. The other sizes are this design's own choices.

## From a cache line to a skipped load

1. The ISU tags a load that has an SBST `LD` entry. The tag carries the
   entry's ID, pointer register and threshold down the pipeline.
2. In MEM, if that load's address is the start of a line, `vsb_generator`
   compares elements 1..7 with element 0. Bit *i* of the result is set when
   \|d[i] − d[0]\| ≤ threshold.
3. `vsb_save_feed` stores {line address, VSBs} in the VSBT entry of the
   load's pointer register. The pointer now addresses element 0 and its SRF
   bit is 0.
4. Every register write-back also goes to the VSB Selector. If the written
   register has a VSBT entry and the new value lies in the same line, the
   VSB of the addressed element is copied into the SRF. If the value lies
   outside the line, the SRF bit is cleared. The written value is taken to
   be the address of the next load through that register. This holds for
   the usual `ld x, 0(ptr)` / `addi ptr, ptr, 4` loop.
5. At fetch, the load's SBST entry has `cond_srf` set. The ISU reads
   `SRF[REG]`, and if it is set, the load is not fetched.

The data format is chosen per SBST entry (`th_fp`):

* **Integer:** signed 32-bit data, with an unsigned threshold. The
  difference is exact.
* **Floating point:** IEEE-754 single. The three significands (a, b and the
  threshold) are aligned to the largest exponent with 8 guard bits, then
  subtracted and compared.
  * Bits shifted out beyond the guard bits are dropped. A difference within
    a few units in the last place of the threshold can therefore go either
    way.
  * Subnormals count as zero.
  * Inf and NaN are never similar.

## Skip table, skip status and the search chain

An SBST entry (`sbst_entry_t`) describes one instruction region:

| field | meaning |
|---|---|
| `next_pc` | PC of the region's first instruction |
| `typ` | `SB_LD` skippable load, `SB_CP` skippable compute, `SB_USE` consumer that is never skipped, `SB_FF` loop head for fast-forwarding |
| `nskip` | number of instructions the region covers; a skip adds `4*nskip` to the PC |
| `ptr_reg` | pointer register of a load (REG) |
| `rs_valid/rs_id`, `rt_valid/rt_id` | SBST IDs of the producers of operands rs and rt (RS, RT) |
| `cond_srf`, `cond_rs`, `cond_rt` | skip condition: `SRF[REG]`, `SST[RS]`, `SST[RT]`. All selected conditions must hold, and an entry with none selected is never skipped. Only `SB_LD` and `SB_CP` entries are ever skipped |
| `th_fp`, `threshold` | data format and similarity threshold of a load |

The entry's index is its **ID**. The ID addresses the Skip Status Table (one
bit: "skipped last time") and the Result Buffer (one word: "saved result").

Each cycle the fetch unit presents the PC it intends to fetch (`if_pc`). The
ISU searches the table, evaluates the condition and, if the region is
skipped, searches again at `PC + 4*nskip` in the same cycle. It does this up
to `CHAIN` = 4 times. Each `LD` or `CP` region met on the way writes its
outcome into the SST, and later searches in the same chain see that outcome.
A compute that depends on two loads can therefore be skipped in the same
cycle as the loads. The dot-product body `LD, LD, MUL` is skipped as a whole
and `ADD` is fetched in that same cycle.

The ISU returns `if_fetch_pc`, the first instruction that is not skipped,
and its tag, and the fetch unit continues from `if_fetch_pc`. If all four
searches skip, nothing is fetched that cycle. `if_fetch_valid` is then low
and the chain resumes from `if_fetch_pc` in the next cycle. The SST is only
written when `if_valid` (fetch accepted) is high, so a stalled fetch can
repeat its lookup safely.

## Saving and reusing results

`rsru` applies three rules in the MEM stage:

* A tagged load whose address is a line start writes its result to
  `RB[ID]` and sets the **SaveResultIter** bit. These are exactly the loads
  whose values the VSBs are relative to.
* A tagged compute writes `RB[ID]` only while SaveResultIter is set. The
  saved compute result therefore always comes from reference operands.
* The loop-closing branch (`mem_iter_end`) clears SaveResultIter.

In the ID stage, an operand whose tag has `rs_reuse`/`rt_reuse` set is read
from the RB instead of the register file. The ISU sets those flags at fetch
time from the SST and the entry's RS/RT. Carrying the decision with the
instruction keeps it stable while younger instructions update the SST.

For example, `dp += a[i]*b[i]` with eight-element lines runs as follows.

| iteration | event | effect |
|---|---|---|
| 0 | both loads hit line starts | VSBs are generated; `a[0]`, `b[0]` and then `a[0]*b[0]` are saved |
| 1 | only `a[1]` is similar | LD1 is skipped; MUL takes `RB[LD1]` as rs; MUL's result is not saved because SaveResultIter was cleared by the branch |
| 2 | both are similar | LD1, LD2 and MUL are skipped in one fetch cycle; ADD takes `RB[MUL]` |

## Fast-forwarding loop iterations

`vsb_run_length` computes a run for each VSBT entry. The run is the number
of consecutive set VSBs starting at the element the pointer addresses now.
An entry whose pointer has left its line, or still sits on element 0, has
run 0. `rl_min` is the smallest run over all valid entries. It is the number
of coming iterations in which every tracked load is similar.

When the searched PC matches an `SB_FF` entry (normally the loop head), fast
forward works like this:

1. `rl_min` must be ≥ 1, and the FFR table must hold a routine for some
   length ≤ `rl_min`.
2. Fetch jumps to the routine for the longest such length (`if_ff`,
   `if_ff_len`). The search chain continues there.
3. All `LD` and `CP` entries are marked skipped in the SST, because those
   iterations would have skipped them. The routine can therefore read the
   saved results through RS/RT. In the example, `r * RB[MUL]` is added to
   the accumulator and the pointers advance by `4r`.

There is one fast-forward jump per cycle. A loop head carries two entries:
the FF entry and the first load's LD entry. The FF entry is tried first.

Which lengths get a routine is software's choice. In the example kernel a
routine costs 9 instructions, while an iteration with both loads skipped
costs 5. So a 1-iteration routine is slower than plain skipping, and a
compiler should only program the lengths that pay off. At 20 % contiguous
similarity, with every length programmed, the testbench shows exactly this
slowdown.

## Connecting a core

The stage ports are meant for a 5-stage in-order pipeline:

| stage | inputs | outputs |
|---|---|---|
| IF | `if_valid`, `if_pc` | `if_fetch_valid`, `if_fetch_pc`, `if_tag`, `if_skip_cnt`, `if_ff`, `if_ff_len` |
| ID | `id_tag`, `id_rs_rf`, `id_rt_rf` | `id_rs`, `id_rt` |
| MEM | `mem_valid`, `mem_is_load`, `mem_tag`, `mem_addr`, `mem_line` (the whole hit line), `mem_result`, `mem_iter_end` | — |
| WB | `wb_valid`, `wb_reg`, `wb_value` | — |
| config | `sbst_we/idx/entry` (the SBST-LD instruction), `ffr_we/len/pc`, `enable`, `clear` | — |

Status outputs: `srf`, `rl_min`, `sst`, `vsb_gen`, `vsb_gen_bits`,
`rb_save`, `save_iter`.

Timing:

* All state changes on the rising edge of `clk`. `rst_n` is an
  asynchronous, active-low reset.
* The IF and ID outputs are combinational from their inputs and the
  registered state.
* A result saved in MEM is forwarded to an ID read of the same slot in the
  same cycle.
* A VSB generation and a write-back of the same register in one cycle are
  handled in that order.

The core must carry `if_tag` with each instruction to ID and MEM. It must
also mark the loop-closing branch with `mem_iter_end`. Data structures used
by skippable loads must start on a line boundary, and loads must address
their pointer register with offset 0.

`vsx_top` checks some of these rules with concurrent assertions, so that a
miswired core or a wrong table shows up in simulation. Build with
`--assert` to enable them. They check that:

* `mem_iter_end` is never raised on a load;
* an instruction tagged by an `LD` entry is a load;
* no routine is written for run length 0;
* a fast-forward never covers more iterations than `rl_min`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vsb_generator` | 400 integer and 400 float random lines against a double-precision reference; special values; trigger rules |
| `tb_vsb_save_feed` | a directed walk through a line, then 2000 random generations and write-backs against a per-register reference |
| `tb_vsb_run_length` | 3000 random VSBT views against a forward-walking reference |
| `tb_isu` | the dot-product table, a three-region skip chain, reuse tags, fast-forward with routine fallback, and random tables against a chained reference model |
| `tb_rsru` | the dot-product save/reuse sequence, then 5000 random MEM/ID cycles against a reference |
| `tb_vsx_top` | end to end at default sizes (see below) |
| `tb_vsx_workloads` | integer and single-precision dot products and a squared-distance kernel, at 0–100 % similarity, random and contiguous |

`tb_vsx_top` contains a behavioural core that executes one instruction per
cycle through all four port groups. It runs a dot product over eight lines
with different similarity patterns, in four configurations:

1. VSX off, which must give the exact result.
2. Skipping only.
3. All fast-forward routines.
4. Routines 1, 2 and 4 only.

For each configuration the testbench compares these against an
algorithm-level model:

* the approximate result;
* the cycle count;
* the number of executed loads, VSB generations, RB saves and
  fast-forwards.

It also checks that every mechanism happens at least once:

* load skip and compute skip;
* operand reuse;
* a three-region chain;
* fast-forward, including a whole similar line handled by the 7-iteration
  routine, and a fallback to a shorter routine;
* SRF set and a pointer leaving its line;
* SaveResultIter clear.

Typical cycle counts for 64 elements are 513 (off), 415 (skipping) and 384
(with fast-forward).

`tb_vsx_workloads` reports speedup and relative error. At 60 % similarity
the contiguous distribution runs 1.56× faster and the random one 1.13×
faster. At 100 % similarity both reach about 3.7–4×. In the distance
kernel both loads, the subtraction and the squaring can be skipped together.
That makes four regions, which fill the search chain, so the chain resumes
in the next cycle.

The float dot product runs the same sweep with the comparator in
floating-point mode. Its core model has FMUL, FADD and FCVT. The results are
compared bit for bit with a reference that rounds in the same order. Speedups
are close to the integer ones: 1.08× random and 1.52× contiguous at 60 %,
and 3.54× at 100 %. The fast-forward routine is one instruction longer here,
because it converts the run length to float.

These figures count one cycle per fetched instruction. A real core with
multi-cycle loads and floating-point multiplies saves more per skipped
instruction, so its speedups can be higher. For comparison, the published
VSX evaluation, on an in-order RISC-V core with an FPU, reports 1.78×
(random) and 2.74× (contiguous) for a dot product at 60 % similarity. That
run used its own vector sizes and instruction timings, which are not
modelled here. The two distributions come out in the same order here, with
contiguous ahead.

The testbench also splits the gain by mechanism, as a compiler would
enable them one by one:

1. loads only, with the compute entries turned into `SB_USE`;
2. loads and computes;
3. loads, computes and iterations.

For each step it checks the skip rates against the reference: the share of
loads skipped, computes skipped and iterations fast-forwarded.

| kernel, similarity | loads | + computes | + iterations |
|---|---|---|---|
| float dot, contiguous 80 % | 1.23× | 1.39× | 2.45× |
| float dot, random 60 % | 1.15× | 1.20× | 1.10× |
| distance, contiguous 80 % | 1.20× | 1.33× | 2.66× |

The random case loses with fast-forwarding, because its runs are mostly one
iteration long. There, the 10-instruction routine costs more than the skipped
iteration it replaces.

To simulate a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/vsx_pkg.sv tb/tb_vsx_top.sv --top-module tb_vsx_top -o sim
./obj_dir/sim
```

Use the same command with any other `tb_*` file. Each build takes a few
seconds and each run well under a second. `--timescale` is needed because
the testbenches declare a timescale and the RTL does not.

## Where this design makes its own choices

VSX is described at block level: the units, their tables and fields, and the
rules for skipping, saving and reusing. The following points are this
implementation's own choices:

* **Search chain.** Up to four SBST searches per cycle let adjacent
  skippable regions pass without fetch bubbles. A longer run of skipped
  regions takes one more cycle per four.
* **SkipCond encoding.** SkipCond is three enable bits that are ANDed.
* **Extra SBST types.** The `SB_USE` type marks consumers that read the RB
  but are never skipped. The `SB_FF` type marks the loop head for
  fast-forwarding.
* **Threshold storage.** The threshold is stored in each load's SBST entry
  and travels with the load's tag to the VSB Generator.
* **Number formats.** Both integer and single-precision data are
  supported. The float comparison is the truncated, aligned version
  described above. Only 32-bit elements are supported, not 8- or 16-bit
  elements or doubles.
* **VSBT indexing.** The VSBT has one entry per architectural register. The
  selector takes the written register value as the next load address.
* **Run length.** The run length is computed continuously from the
  pointers' current positions and combined over all valid VSBT entries by a
  minimum.
* **Fast-forward details.**
  * When there is no routine for the exact run length, the routine for the
    longest length below it is used.
  * A fast-forward marks all LD/CP entries skipped in the SST.
  * There is at most one fast-forward jump per cycle.
* **Reuse timing.** The reuse decision is made at fetch and carried in the
  tag, rather than read from the SST in ID.
* **Added controls and forwarding.** `enable` and `clear` were added, and a
  save is forwarded to a same-cycle reuse.
* **Reset.** All tables reset to empty.

Not included: the core, the instruction and data caches, main memory, the
decoder for the SBST-LD instruction, and the compiler support. Area and power
figures for the host core were not reproduced.
