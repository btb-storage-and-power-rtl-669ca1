# Branch Handling Unit with a Reduced BTB

A conventional branch target buffer (BTB) stores the target of every taken
branch it has seen. To hit often it has to be large, hundreds to thousands of
entries, and it is read on every fetch. That makes it one of the bigger and
more power-hungry structures in a processor front end.

Most of those stored targets are easy to compute. A PC-relative branch
carries its displacement in the instruction word. The usual indirect
branches (return, indirect call, indirect jump) take their target from a
register that the compiler has, by convention, already loaded by the time the
branch is fetched. This front end therefore computes those targets in the
fetch stage, in a small **Branch Handling Unit (BHU)**. It keeps a BTB only
for the branches the BHU cannot handle in time. That BTB holds so few
branches that 32 direct-mapped entries perform as well as a large
conventional BTB. It is called the **Reduced BTB (RBTB)**.

The trick that makes the BHU possible in the fetch stage is the **instruction
buffer (IB)**. The IB is a one-line copy of the last i-cache line. The next
sequential instruction is almost always already in the IB, so the BHU can
decode it at the start of the cycle, in parallel with the RBTB lookup, while
the i-cache access is aborted.

The RTL targets a single-issue, five-stage pipeline running the Alpha
instruction set (32-bit instruction words, word-aligned PCs). The address
width is 32 bits.

## Block diagram

```
 fetch_pc ──┬──────────────► instr_buffer ──instr──► partial_decoder ─┐ (one-hot kind)
            │   ic_line ──►       │ bhu_valid                         ▼
            │                     └──────────────► ebtg ──► 4:1 mux ──► BHU target, valid
            │                                       ▲
            │                rf write port ─────────┘ (register buffers $26/$27/$28)
            ├──────────────► rbtb ─────────────────────► RBTB hit, target
            └──────────────► direction_predictor ──────► taken?

   target   = RBTB hit ? RBTB target : BHU target
   next_pc  = (RBTB hit or BHU valid) and taken ? target : fetch_pc + 4

 branch resolution (EXE) ──► rbtb_alloc_ctrl ──► RBTB write, predictor update
```

`bhu_frontend` is the top. The blocks `bhu` (decoder, EBTG and mux) and
`ebtg` (short adder and register buffers) group the BHU's parts.

## Branch Handling Unit

### Partial decoder (`partial_decoder`)

The decoder looks only at the six op-code bits, `instr[31:26]`:

| kind | op code | test |
|---|---|---|
| PC-relative (BR, BSR, all conditional branches) | `11xxxx` | AND of bits 5 and 4 |
| JMP | `000000` | 6-input match |
| JSR | `000001` | 6-input match |
| RET | `000010` | 6-input match |

It outputs a one-hot `br_type_t`. `JSR_COROUTINE` (`000011`) is deliberately
not decoded. It is rare, and no register is reserved for its target.

The four indirect codes above are the ones this design uses. In the
published Alpha encoding, JMP, JSR, RET and JSR_COROUTINE share a single
major op code (`011010`) and differ only in the hint bits `instr[15:14]`,
which hold the values 0 to 3. To adapt the decoder to real Alpha binaries,
match `011010` in `instr[31:26]` and decode `instr[15:14]`. That means
widening the decoder's input by those two bits and changing the three
comparisons and the constants in `bhu_pkg`.

### Short adder (`short_adder`)

A PC-relative target is `PC + 4 + 4*disp`, where `disp` is the signed 21-bit
field `instr[20:0]`. Bits [1:0] of the result are always zero. Nearly all
branch displacements are short, so the BHU does not use a full 32-bit adder.
Its adder covers only word-address bits [20:2] (`ADDER_W` = 19 bits).

- The adder adds `PC[20:2]` and `disp[18:0]` with carry-in 1. The carry-in
  supplies the "+4".
- Result bits [31:21] are copied unchanged from the PC.

The copied upper bits are right only if nothing has to propagate into them.
That is what `ok` reports:

- **forward branch.** `disp` bits above the adder are all 0. The result is
  complete when the carry-out is 0.
- **backward branch.** `disp` bits above the adder are all 1. The result is
  complete when the carry-out is 1, because adding the all-ones upper part
  and the carry cancel out.
- Any other displacement reaches beyond the adder, and `ok` is 0.

A branch whose target is not `ok` is **unhandleable**. It gets no BHU target
and will end up in the RBTB.

The backward-branch rule is this design's own extension. A carry-out test
alone, written for forward branches, would reject every backward branch.
Those are mostly loop branches and very common. `tb_short_adder` checks both
rules against a full 32-bit addition. It also checks an 8-bit adder instance
so that the overflow cases occur often.

### Register buffers (`register_buffers`)

By the Alpha calling convention, three registers hold indirect targets:

- `$26` holds the return address used by RET;
- `$27` holds the procedure value called by JSR;
- `$28` holds the target of JMP.

The unit keeps a copy of these three registers. It watches the register
file's write port (`rf_we`, `rf_waddr`, `rf_wdata`) and copies every write to
one of these registers into its own buffer. The targets it offers are the
buffer values with bits [1:0] cleared.

The copies cost three 32-bit registers and avoid a register-file read port in
the fetch stage. A copy is only as fresh as the last write that has reached
the register file. An indirect branch fetched before the write that sets up
its register will get a stale target. That is a misprediction, found at
resolution, and the branch is then written to the RBTB. The same happens for
an indirect branch that uses a different register than the convention says.

### Output mux and gating (`bhu`)

A 4:1 mux, steered by the one-hot decoder output, picks the PC-relative,
RET, JSR or JMP target. `valid` is high only when all of these hold:

- the instruction came from the IB;
- it decoded as one of the four kinds;
- for a PC-relative branch, the short adder reported `ok`.

The EBTG (`ebtg`) computes all four candidate targets every cycle,
before the decoder has identified the instruction.

## Instruction buffer and the unhandleable window (`instr_buffer`)

The IB holds one 32-byte line and its address bits `PC[31:5]` (tag and
index). Each fetch compares `PC[31:5]` with the stored value:

- **hit**: the word `PC[4:2]` comes from the IB, and `ic_abort` tells the
  i-cache to drop its access.
- **miss**: the instruction comes from `ic_line`, the i-cache's line for the
  same PC, which must be presented in the same cycle. That line is written
  into the IB (refill).

The BHU is fed only from the IB. The instruction that causes a refill is
therefore never seen by the BHU. A branch fetched in that cycle can only be
predicted from the RBTB.

`REFILL_N` generalises this to slower refills or a deeper BHU. The first
`REFILL_N` instructions fetched from a new line are hidden from the BHU. The
default, 1, is the single-cycle i-cache case. Values 2 and 3 model a two- or
three-cycle combined refill and BHU delay. A BHU that is itself pipelined
over several cycles is not built. Only its effect, more unhandleable
branches, is modelled, through `REFILL_N`.

## Reduced BTB and what goes into it

### Storage (`rbtb`)

`rbtb` is an ordinary set-associative BTB with `SETS` × `WAYS` entries. The
default is 32 × 1, which is direct-mapped.

- **Index**: `PC[log2(SETS)+1:2]`.
- **Tag**: the remaining upper PC bits, stored in full, so there are no false
  hits.
- **Target**: 30 bits (the word address).
- **Lookup**: combinational, in the same cycle as the fetch.
- **Write**: at the clock edge. A write to a branch already present updates
  its target. Otherwise the write takes the least recently used way of the
  set. Per-way age counters track LRU order, and lookups and writes both
  count as use.
- **Reset**: all entries become invalid.

### Allocation policy (`rbtb_alloc_ctrl`)

This is the part that keeps the RBTB small. When a branch resolves, the
pipeline returns it on `res` (`br_resolve_t`) with:

- its PC;
- whether it was taken;
- its correct target;
- the prediction record it got at fetch (`pred`).

The controller then decides as follows:

| resolved branch | action |
|---|---|
| not taken | nothing written (the RBTB holds targets only) |
| taken, RBTB hit, RBTB target right | nothing written |
| taken, RBTB hit, RBTB target wrong | RBTB target rewritten (`fix`) |
| taken, RBTB miss, BHU gave the right target | nothing written: the BHU handles it |
| taken, RBTB miss, BHU gave no or a wrong target | new RBTB entry (`alloc`) |

Every resolved branch also trains the direction predictor.

An RBTB entry is never removed because the BHU could now handle the branch.
It stays until it is replaced. On a hit the RBTB has priority over the BHU.
A branch that was unhandleable once is therefore predicted from the RBTB for
as long as it stays there. This matters, for example, for a branch that is
sometimes fetched in a refill cycle.

## Next-PC selection

Two 2:1 muxes make the choice:

1. `target = rbtb_hit ? rbtb_target : bhu_target`
2. `next_pc = pred_taken ? target : fetch_pc + 4`, where
   `pred_taken = (rbtb_hit || bhu_valid) && dp_taken`.

Without an RBTB hit or a BHU target, the instruction is treated as a
non-branch, even if the direction predictor says taken.

The direction predictor (`direction_predictor`) is a gshare table of 2-bit
counters indexed by `PC[IDX_W+1:2] XOR history`.

- Counters reset to weakly not-taken.
- The global history is updated when a branch resolves, not speculatively.
- The index used at fetch travels in the prediction record, so the counter
  trained later is the one that made the prediction.

Unconditional branches also take their direction from the predictor. The
predictor learns them quickly.

## Interface of `bhu_frontend`

| port | dir | meaning |
|---|---|---|
| `fetch_en`, `fetch_pc` | in | one fetch per cycle when `fetch_en` is high |
| `ic_line` | in | i-cache line holding `fetch_pc`; only used when `ic_abort` is low |
| `ic_abort` | out | IB hit; the i-cache access can be cancelled |
| `instr` | out | fetched instruction |
| `next_pc` | out | predicted next fetch address (combinational) |
| `pred` | out | prediction record (`pred_meta_t`); the pipeline must return it with the branch |
| `rf_we`, `rf_waddr`, `rf_wdata` | in | register-file write port, watched by the register buffers |
| `res` | in | branch resolution (`br_resolve_t`), at most one per cycle |
| `events` | out | one-cycle flags: IB miss, BHU gated, target source, adder overflow, RBTB alloc/fix/evict, mispredict |

`instr`, `ic_abort`, `next_pc` and `pred` are combinational from `fetch_pc`.
All state changes at the rising edge of `clk`. `rst_n` is an asynchronous,
active-low reset. Shared types and op-code constants are in `bhu_pkg`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LINE_BYTES` | 32 | IB and i-cache line size |
| `REFILL_N` | 1 | instructions per new line hidden from the BHU (1, 2, 3 evaluated) |
| `ADDER_W` | 19 | short-adder width in word-address bits |
| `RBTB_SETS` | 32 | RBTB sets (power of two) |
| `RBTB_WAYS` | 1 | RBTB ways |
| `DP_IDX_W` | 10 | direction predictor: log2 of its counter count |
| `DP_HIST` | 10 | direction predictor: global history length |

The defaults of the first five come from the configuration this design is
built around. The BHU was evaluated against conventional BTBs of 128 to 2048
entries. A direct-mapped RBTB of 32 entries was the smallest one that matched
or beat all of them; 16 entries came close. A 19-bit adder computes every
PC-relative target of the usual integer and floating-point benchmark programs
in one step, and narrower adders lose some. The direction-predictor sizes are
this design's own choice. Useful variants are RBTB 16×1, 8×2, 4×4, 64×1,
32×2 and 16×4 at any `REFILL_N`. With `REFILL_N` of 2 or 3 more branches
end up in the RBTB, and 128×1, 64×2 or 32×4 are then the sizes to try.

## Where this design makes its own choices

- The completion rule for backward branches in the short adder (see above).
- How the direction predictor is sized and trained, and that it also decides
  unconditional branches.
- That a BHU or RBTB target is required before the next PC can be anything
  other than PC+4.
- The prediction record that travels with the branch to resolution.
- Reset values: the IB is empty, RBTB entries are invalid, register buffers
  are 0, counters are weakly not-taken.
- Word 0 of a line is `ic_line[31:0]`.

### Not built

- **A BHU pipelined over several cycles.** Such a BHU would decode the
  instruction one or two fetches ahead. Only its cost is modelled, as
  `REFILL_N`: more unhandleable instructions after each line change.
- **Multi-issue variants.** For wider fetch, one BHU can be shared between
  slots by a priority selector, or the decoder outputs can be OR-ed to
  select the first branch in a fetch group. Neither is built. The RTL is
  single-issue.
- **A BHU with no RBTB at all.** The RBTB needs at least one entry.
- **The i-cache and the pipeline.** They are outside this design. Their
  connections are the `ic_line`/`ic_abort`, `rf_*` and `res` ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
it hangs.

| testbench | what it checks |
|---|---|
| `tb_partial_decoder` | all 64 op codes |
| `tb_short_adder` | random and edge-case PCs and displacements against a 32-bit add; 19-bit and 8-bit adders |
| `tb_register_buffers`, `tb_ebtg`, `tb_bhu` | targets and gating against a shadow of the register writes and a full adder |
| `tb_instr_buffer` | hit/miss, word select and the unhandleable window for `REFILL_N` 1 and 3 |
| `tb_rbtb` | random traffic against a reference with per-set recency lists; 32×1 and 4×4 |
| `tb_direction_predictor` | counters and history against a reference table |
| `tb_rbtb_alloc_ctrl` | the allocation table above, on random resolutions |
| `tb_bhu_frontend` | the whole front end at its default parameters, 40,000 cycles |
| `tb_bhu_frontend_configs` | the same in 33 configurations side by side, 20,000 cycles each: RBTB 16×1, 8×2, 4×4, 32×1, 16×2, 8×4, 64×1, 32×2, 16×4 with `REFILL_N` = 1, 2, 3, plus 128×1, 64×2, 32×4 with `REFILL_N` = 2, 3 |

### The end-to-end testbenches

The two end-to-end testbenches share `tb/fe_harness.sv`. The harness
generates a random Alpha-like program in two code regions 3 MB apart, so
that branches between the regions overflow the short adder. The program
contains:

- loops;
- biased forward branches;
- calls and returns;
- indirect calls and jumps, some through a non-conventional register.

Fetch follows the correct path. Branches resolve two cycles after fetch, and
register writes land four cycles after fetch, so some indirect targets are
stale.

Every cycle the harness checks against its own reference models of the IB,
the register buffers and the RBTB:

- the instruction;
- the IB hit;
- the BHU target;
- the RBTB hit and target;
- `next_pc`.

At the end it requires that every mechanism happened at least once:

- IB miss;
- gated BHU;
- BHU-supplied target;
- RBTB-supplied target;
- RBTB priority over a valid BHU target;
- adder overflow;
- RBTB allocation, fix and eviction;
- misprediction.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bhu_pkg.sv rtl/*.sv tb/fe_harness.sv tb/tb_bhu_frontend.sv \
    --top-module tb_bhu_frontend
./obj_dir/Vtb_bhu_frontend
```

For a block testbench, replace the last two files with that testbench, for
example `tb/tb_rbtb.sv --top-module tb_rbtb`. The simulator is two-state, so
every register the design reads has a reset value.
