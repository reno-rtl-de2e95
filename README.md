# RENO: removing instructions at register rename

RENO applies several compiler-style optimizations inside the register renamer of an
out-of-order processor. Many instructions compute nothing new: a register move copies a value,
`addi r1, 4 -> r2` is a known constant away from a value that already exists, and a load often
re-reads a value that an earlier load or store already holds in a register. The renamer already
decides which physical register holds each logical register. RENO lets it point the
destination of such an instruction at an existing physical register. The instruction then
needs no execution: it leaves the dataflow graph and uses no issue slot.

This repository holds synthesizable SystemVerilog for the RENO renamer and the fused execution
units it needs. A small scalar in-order core wraps them so the whole scheme can be simulated end
to end.

## The central idea: a map table entry is `[preg, disp]`

A conventional map table maps a logical register to one physical register. RENO's map table
maps it to a pair:

    r := [p, d]     value(r) = value(p) + d

Here `d` is a 16-bit signed displacement. With this one change the renamer handles four
optimizations:

| kind | instruction | map-table action | executed? |
|------|-------------|------------------|-----------|
| ME, move elimination | `addi rs, 0 -> rd` | `rd := map[rs]` | no |
| CF, constant folding | `addi rs, k -> rd` | `rd := [map[rs].p, map[rs].d + k]` if the sum fits in 16 bits | no |
| CSE, load reuse | load that repeats an earlier load's address | `rd :=` the earlier load's entry | no |
| RA, store-load bypass | load from the slot a store just wrote | `rd :=` the stored register's entry | no |
| anything else | | `rd := [new p, 0]` | yes |

Example of a folding chain (`p3` is a newly allocated register):

    op1  _, _   -> r1      r1 := [p3, 0]      executes, writes p3
    addi r1, 4  -> r2      r2 := [p3, 4]      eliminated
    addi r2, 16 -> r3      r3 := [p3, 20]     eliminated
    op2  _, r3  -> _       reads [p3, 20]     executes as op2(_, p3 + 20)

The consumer receives its operand as `[p3, 20]`, so every functional unit must add a
displacement to each input. This is the cost of constant folding, and the units here are built
for it (see "Fused execution" below).

When a fold would overflow the 16-bit displacement, the `addi` is executed normally. It reads
its source with the source's displacement fused in, and gets a fresh register with
displacement 0.

## Rename pipeline (`reno_renamer`)

The renamer is a two-stage pipeline between DECODE and DISPATCH, one instruction per cycle:

- **RENAME1** reads three map entries: the two sources and the destination's previous mapping.
  A read of the register RENAME2 is writing in the same cycle is forwarded from RENAME2, so an
  `addi` right behind its producer still folds. The displacement accumulation adder forms
  `src1.disp + imm`, 17 bits wide. For an `addi` that sum is the new displacement. For a load
  or store it is the offset of the address key in the reuse table. The "optimize?" decision
  drives the short-circuit mux. The destination comes from one of three places: the source
  register (ME/CF), the reuse table (CSE/RA), or the free list.
- **RENAME2** writes the destination's map entry. It then presents the renamed instruction:
  sources as `[preg, disp]`, the destination register, the old mapping to release later, and
  an `eliminate` flag with the kind of optimization.

RENAME1 stalls when the instruction needs a new register and none is free. Eliminated
instructions do not need one, so they still pass when the free list is empty. Latency from
acceptance to `out_valid` is two cycles.

### Sharing physical registers safely (`free_list`)

Once several mappings can point at one physical register, that register cannot be freed as
soon as one of them is overwritten. The free list therefore keeps a reference count per
physical register:

- allocation sets the count to 1;
- every elimination adds a sharer (+1);
- every release of an overwritten mapping subtracts 1;
- a register is free at count 0.

A share and a release of the same register in one cycle cancel. The lowest-numbered free
register is offered. `freed_en` reports a register that just became free, and the reuse table
uses it.

### Load reuse table (`reuse_table`)

The reuse table has 256 direct-mapped entries. Each entry maps an address key
`[base preg, base disp + literal]` to the map entry holding the value at that address. Because
the key uses the folded base, `ld 8(r1)` and `ld 4(r2)` match when `r2 := [p(r1), 4]`. This
is how constant folding helps load elimination: the address arithmetic between loads is folded
away, and the loads still match.

- A load that misses records its own new destination register.
- A store records its data operand's `[preg, disp]`, so a later load of that stack slot is
  short-circuited to the stored register (a store-load pair).
- A load that hits is eliminated.

Index: `offset[10:3] xor base`. Each entry stores the full key as its tag.

This table is **non-speculative**, which differs from the scheme it implements. The original
scheme bypasses memory speculatively and verifies the eliminated loads later. That
verification machinery is not described, so here two rules keep every hit correct:

- a store invalidates every other entry, since it might alias any of them;
- freeing a physical register invalidates every entry that names it as base or value.

The price is that loads repeated across an intervening store are not eliminated.

## Fused execution (`fused_alu`, `fused_agen`)

Every operand may carry a displacement, so every operation takes an extra immediate input:

- **`fused_alu`** puts an adder in front of each ALU input. An operation with both
  displacements zero finishes in 1 cycle. One with any nonzero displacement goes through the
  pre-add stage and finishes in 2 cycles: the one-cycle penalty of general "addi-X" fusion.
  Both paths share one result register. So in the cycle after a displaced operation is
  accepted, an undisplaced operation is refused (`in_ready` low), which keeps the two from
  finishing together.
- **`fused_agen`** computes `base + literal + displacement`. A 3:2 carry-save stage reduces the
  three addends to two, and the existing address adder sums them. Folding into an address
  therefore costs no extra cycle: the address is registered one cycle after issue. A second
  adder adds a store data operand's displacement.

## The core around it (`reno_core`)

`reno_core` connects the renamer to an in-order issue stage, a 160-entry physical register
file (`regfile`, with write-to-read bypass), the fused ALU and the fused AGEN:

- An eliminated instruction issues at once: it waits for no operand and uses no unit.
- Any other instruction issues when its sources are ready and its unit can take it. Readiness
  comes from a scoreboard with bypass from the write ports.
- At issue the instruction reads the register file and marks its destination not ready. It
  also releases its destination's previous mapping. With in-order issue, every older reader
  has already read that mapping.
- Results are written back through two ports: the ALU, and load data.

Timing, in cycles after issue:

| operation | result written |
|-----------|----------------|
| ALU, no displacement | 1 (a dependent instruction can issue in that cycle through the bypass) |
| ALU with a displacement | 2 |
| load | address on `mem_req_*` after 1; `mem_rdata` expected the next cycle and written then |
| store | written to memory by the environment when `mem_req_valid && mem_req_store` |

Other ports:

- `dbg_lreg` / `dbg_value` return a logical register's architectural value, `value(p) + d`.
- `busy` is low when nothing is in flight.
- `perf` counts renamed instructions and eliminations by kind (ME, CF, CSE, RA). It also counts
  folds that overflowed, fused ALU and AGEN operations, and stall cycles (issue, ALU port,
  rename, empty free list).

The instruction format is a decoded micro-op (`dec_insn_t` in `reno_pkg`): an operation,
`use_imm`, a 16-bit literal, and two sources and a destination, each with a valid bit.

- ALU: `dst = src1 op (use_imm ? imm : src2)`
- Load: `dst = mem[src1 + imm]`
- Store: `mem[src1 + imm] = src2`

Add-immediate (`OP_ADD` with `use_imm`) is the instruction that ME and CF act on.

## Sizes

| parameter | value | origin |
|-----------|-------|--------|
| displacement width `DISP_W` | 16 | evaluated configuration |
| reuse table entries | 256 | evaluated configuration |
| logical registers / data width | 32 / 64 | Alpha integer ISA |
| physical registers | 160 | this design: 32 architectural + 128 in flight |
| reference count width | 8 | this design |

## Where this departs from the scheme it implements

- **Width and back end.** The scheme was evaluated in a 4-wide out-of-order core with a
  128-entry ROB and a 50-entry issue queue. Here rename is scalar and issue is in order. The
  superscalar renamer is not built, nor are the ROB, issue queue, branch recovery, caches and
  front end. The in-order back end only exists so the renamed stream can be executed and
  checked.
- **Non-speculative load reuse**, as described above.
- **A displacement per source.** The rename and execute diagrams of the scheme show one `disp`
  field per instruction, drawn for instructions with one register input. Here each of the two
  sources carries its own displacement, and the ALU adds each to its own operand.
- **Reference counting, the reuse-table key and indexing, register-release timing, and reset
  state** (`r_i := [p_i, 0]`, all registers 0) are this design's choices.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_map_table`, `tb_regfile`: against shadow arrays, including same-cycle write/read and
  bypass.
- `tb_free_list`: random allocate/share/release against a count model, including running the
  list empty and share/release cancellation.
- `tb_reuse_table`: against a reference model of the insert and invalidation rules.
- `tb_reno_renamer`: directed cases.
  - The folding chain above, a move, and a fold that overflows 16 bits.
  - CSE across folded addresses, and a store-load pair.
  - Invalidation by a store.
  - Forwarding between the two stages, and a held output.
  - The two-cycle latency.
  - An empty free list stalling allocating instructions but not eliminated ones.
- `tb_fused_alu`, `tb_fused_agen`: random operands, results and exact latencies (1 or 2 cycles
  for the ALU, always 1 for the AGEN), and the ALU port conflict.
- `tb_reno_core`: end to end at the default sizes.
  - A 6000-instruction random program runs against a sequential reference model.
  - Every store is checked in order, then all 32 registers and the whole memory.
  - The test fails if any mechanism never occurred: ME, CF, CSE, RA, fold overflow, fused ALU,
    fused AGEN, issue stall, ALU-port stall, rename stall.

  A typical run eliminates about a third of the instructions. Its mix is rich in moves and
  small add-immediates, so this is not a prediction for real programs. The free list never
  runs empty in this configuration; that case is covered by `tb_reno_renamer`.

## Simulating

All RTL is in `rtl/`, one module or package per file; `reno_pkg.sv` must be read first.
With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/reno_pkg.sv tb/tb_reno_core.sv \
              --top-module tb_reno_core -Mdir obj
    ./obj/Vtb_reno_core

Replace `tb_reno_core` with any other testbench name to run a block test. The end-to-end test
runs in well under a second.
