# Shakti-T: a RISC-V pipeline that checks every pointer access

Shakti-T is a 64-bit, five-stage, in-order RISC-V core (RV64I) extended
with hardware fat pointers. Each pointer carries a base and a bound. Every
load or store made through a pointer is checked against them, in hardware,
in the same cycle as the address computation. This catches both kinds of
memory-safety error:

- **Spatial errors**: buffer overflows and out-of-bounds indexing.
- **Temporal errors**: use-after-free, because freeing an object revokes
  the bounds of every register still pointing at it.

The problem with the usual hardware schemes is where the bounds live. They
keep a shadow base and bound beside every general-purpose register, which
wastes space:

- Most shadow registers hold nothing.
- Spilling a register to the stack loses its bounds.
- Two registers holding the same pointer hold two copies of the bounds.

This design keeps the metadata in three places:

1. **One tag bit per word.** Every register and every memory word has a
   1-bit tag: 1 = pointer, 0 = data or instruction.
2. **The Pointer Limits Memory (PLM).** A region of ordinary data memory
   holds one {base, bound} entry per object. The entry is selected by a
   small integer, the pointer's `ptr_id`. A special register, PLBR, holds
   the start of the PLM. When a pointer is stored to memory at address `a`,
   its `ptr_id` is stored at `a + 8`. A pointer in memory therefore costs
   one extra word, and each object costs one 128-bit PLM entry.
3. **The BnBCache.** A small table next to the register file caches base,
   bound and `ptr_id` for the pointers currently in registers. Each
   register reaches its entry through one level of indexing. Aliased
   pointers share one entry.

Both the cache check and the tag computation run in the execute stage, in
parallel with the ALU.

## The BnBCache

This is the part of the design that takes the most care. It is two tables
(`rtl/bnb_cache.sv`):

| table      | rows | fields                                   |
|------------|------|------------------------------------------|
| BnBIndex   | 32, one per GPR | `index` (4 bits), `v`         |
| BnBLookUp  | 16 (`BNB_ENTRIES`) | `base`, `bound`, `ptr_id`, `v` |

A register is *bound* when its BnBIndex `v` is set and the BnBLookUp row it
names is valid. Only bound registers are checked. The execute stage reads
the bounds of rs1 and rs2 combinationally. The write-back stage changes
bindings on the clock edge, in one of three ways.

**Bind** rd to {ptr_id, base, bound}. This happens for ldbnb, ldptr and
fnld, and when a pointer is copied or offset by ALU arithmetic. The row is
chosen in this order:

1. A valid row that already holds the same `ptr_id` is reused and its base
   and bound are refreshed. This is how aliases share a row.
2. Otherwise the lowest-numbered free row is taken.
3. Otherwise the row under a round-robin pointer is evicted. Every register
   that pointed at the evicted row loses its index-valid bit.

**Unbind** rd. Overwriting a pointer register with data clears only its
BnBIndex `v`. The BnBLookUp row stays valid. A later `fnld` of the same
pointer, restoring it after a call, finds the row again by `ptr_id` and
skips the two PLM reads.

**Invalidate** a `ptr_id`. This is done by `wrplm`, which is also how
`free()` revokes an object. Every row holding that `ptr_id` is cleared. So
are the BnBIndex entry and the **tag** of every register that pointed at
it: a stale copy of a freed pointer becomes plain data in the registers.
The clear takes effect in the same cycle as the write-back, so an
instruction reading such a register at that moment already sees it
cleared.

**Limitation.** A register whose row was evicted keeps its tag but has no
bounds, and its accesses go unchecked until it is bound again (by ldbnb,
ldptr or fnld). With 16 rows this only happens when more than 16 distinct
objects are live in registers at once. A hardware refill from the PLM on a
miss is not implemented: it would need the `ptr_id` of an unbound
register, which is only stored in memory.

## Tags and how they propagate (`rtl/tcu.sv`)

The TCU is the tag unit. It decides the tag and binding of every result.

| instruction                          | tag of rd            | binding of rd |
|--------------------------------------|----------------------|---------------|
| add/addi, and/or/xor(i) with exactly one pointer operand | 1 | that operand's |
| sub: pointer − integer               | 1                    | the pointer's |
| sub: pointer − pointer               | 0                    | unbound       |
| any other ALU op, lui, auipc, jal/jalr, rdspreg | 0         | unbound       |
| ld/lw/lh/lb…                         | tag of the memory word | unbound     |
| ldptr, fnld, ldbnb                   | 1                    | bound from the PLM or the cache |
| wrtag rd, imm                        | imm[0]               | unbound if imm[0] = 0, else kept |

Stores follow these rules:

- A 64-bit store writes rs2's tag into the memory word.
- A narrower store clears the tag.
- `fnst` writes the register with its tag and, at +8, its `ptr_id`. The
  tag of that second word records whether the register was bound.

## Bounds check (`rtl/seu.sv`)

The SEU is the bounds-checking unit. It checks accesses whose base register rs1
is bound. It has its own adder for `ea = rs1 + imm`.

- An access of N bytes is legal if `base <= ea` and `ea + N <= bound`.
- `bound` is one past the last byte: `bound = base + size`.
- N is the load or store size, or 16 for ldptr, fnld and fnst. Those
  instructions touch the pointer word and the `ptr_id` word after it.

A failing check is a **violation**:

- The access is squashed, so no memory write happens and no register is
  written.
- The two younger instructions are flushed.
- `viol_pc`, `viol_addr` and `viol_count` are updated.
- Fetch continues at `TRAP_VEC` (0x100).

There is no privileged architecture, so the handler is ordinary code at
that address.

## The new instructions

Each instruction is listed with its operands and encoding. custom-0 is
opcode `0001011`, with funct3 selecting the instruction. `wrplm` uses
custom-1, opcode `0101011`, in R4 format with rs3 in bits 31:27.

| instruction           | encoding                 | effect |
|-----------------------|--------------------------|--------|
| `wrtag rd, imm`       | custom-0 I, funct3 000   | tag(rd) ← imm[0] |
| `wrspreg rs1, imm`    | custom-0 I, funct3 001   | imm[0] = 0: PLBR ← rs1; 1: BnB_SP ← rs1 |
| `rdspreg rd, imm`     | custom-0 I, funct3 010   | rd ← PLBR or BnB_SP |
| `ldbnb rd, rs1`       | custom-0 I, funct3 011   | bind rd to PLM entry `ptr_id = rs1` (rd's value is unchanged) |
| `ldptr rd, imm(rs1)`  | custom-0 I, funct3 100   | rd ← M[a]; ptr_id ← M[a+8]; read PLM entry; bind rd |
| `fnld rd, imm(rs1)`   | custom-0 I, funct3 101   | like ldptr, for restoring a register saved by fnst |
| `fnst rs2, imm(rs1)`  | custom-0 S, funct3 110   | M[a] ← rs2 (with tag); M[a+8] ← ptr_id(rs2) |
| `wrplm rs1, rs2, rs3` | custom-1 R4, funct3 000  | PLM[rs1] ← {base = rs2, bound = rs3}; invalidate ptr_id rs1 in the BnBCache |

A PLM entry is two words:

- base at `PLBR + 16*ptr_id`
- bound at `PLBR + 16*ptr_id + 8`

`fnld` behaves differently depending on what it finds:

- If the saved word says the register had no bounds, rd is loaded as
  plain data and unbound.
- If the saved `ptr_id` is still in a valid BnBLookUp row, that row is
  reused.
- Otherwise the PLM is read.

BnB_SP is implemented as a readable and writable register with no further
function.

### Typical sequences

The test program in `tb/tb_shakti_t.sv` uses these sequences:

```
malloc:     a0 = base; t = a0 + n         # bound = base + size
            wrplm  id, a0, t              # PLM[id] = {base, bound}
            ldbnb  a0, id                 # a0 is now a bound pointer
spill:      sd a0, 0(sp); sd id, 8(sp)    # pointer and its ptr_id
reload:     ldptr a1, 0(sp)               # value, ptr_id, bounds
call:       fnst a0, 0(sp) ... fnld a0, 0(sp)
free:       wrplm id, zero, zero          # empty range: revokes the object
```

After `free`, any access through a stale copy of the pointer either has no
tag or has an empty range, so nothing of the freed object can be reached
through it.

## The pipeline (`rtl/shakti_t.sv`)

```
FETCH      PC + next-PC mux, instruction memory
  IF-ID buffer
DECODE     decoder
  ID-EXE buffer
EXECUTE    register file and BnBCache read, PLBR/BnB_SP, forwarding,
           ALU | SEU (bounds check) | TCU (tags), branch resolution
  EXE-MEM buffer
MEMORY     memory controller, data memory (64-bit words + tag, holds the PLM)
  MEM-WB buffer
WRITE-BACK load alignment, register file and BnBCache write
```

All four buffers are instances of one `isb` module with valid, hold and
flush. Registers are read in the execute stage, so an instruction in
decode never needs forwarding.

**Forwarding** (`operand_fwd.sv`):

- The forwarding sources are the memory stage (the EXE-MEM record) and the
  write-back stage.
- Value, tag and bounds are each taken from the newest producer that
  writes them.
- A write-back `wrplm` also clears the forwarded tag and bounds of an
  operand pointing at the `ptr_id` it invalidates.

**Hazards:**

| event                                  | cost |
|----------------------------------------|------|
| use of a load/ldptr/fnld/ldbnb result by the next instruction | 1 stall cycle |
| memory operation longer than 1 cycle   | holds fetch, decode and execute |
| taken branch, jal, jalr, violation     | 2 younger instructions flushed |

**Memory-stage cycles per instruction** (`mem_controller.sv`, one 64-bit
word per cycle):

| instruction   | cycles | words touched |
|---------------|--------|---------------|
| load, store   | 1 | the datum |
| ldbnb         | 2 | PLM base, PLM bound |
| wrplm         | 2 | PLM base, PLM bound |
| fnst          | 2 | value, ptr_id |
| ldptr         | 4 | value, ptr_id, PLM base, PLM bound |
| fnld          | 2 if the ptr_id is cached, else 4 | |

**Other ISA points:**

- `ebreak` stops the pipeline; `halted` rises when it reaches execute.
- `fence` is a no-op.
- Other SYSTEM instructions, ecall and CSRs are not implemented, nor is
  the M extension. An undecodable instruction executes as a no-op and
  pulses `ev.illegal`.
- Accesses are assumed naturally aligned.

## Top-level interface

| port                     | dir | width | meaning |
|--------------------------|-----|-------|---------|
| `clk`, `rst_n`           | in  | 1 | clock; synchronous active-low reset |
| `imem_we/waddr/wdata`    | in  | 1/10/32 | load the instruction memory (hold in reset while loading) |
| `dbg_reg`                | in  | 5 | register to inspect → `dbg_reg_val`, `dbg_reg_tag`, `dbg_bnb_iv`, `dbg_bnb_idx` |
| `dbg_row`                | in  | 4 | BnBLookUp row to inspect → `dbg_row_meta` (bv = row valid) |
| `dbg_mem_addr`           | in  | 10 | data word to inspect → `dbg_mem_data`, `dbg_mem_tag` |
| `plbr`, `bnb_sp`         | out | 64 | special registers |
| `halted`                 | out | 1 | ebreak reached |
| `viol_pc`, `viol_addr`, `viol_count` | out | 64/64/32 | last bounds violation and the count |
| `ev`                     | out | `events_t` | one-cycle strobes: retire, stalls, forwards, redirects, checks, violations, BnBCache hit/alloc/evict/invalidate, fnld reuse, tag propagation |

The inspection ports are combinational and exist for testing.

Parameters of `shakti_t`:

- `IMEM_WORDS` = 1024 (32-bit words)
- `DMEM_WORDS` = 1024 (64-bit words, 8 KiB)
- `RESET_PC` = 0
- `TRAP_VEC` = 0x100

`shakti_t_pkg` sets `XLEN` = 64, 32 registers and `BNB_ENTRIES` = 16.

## What follows the source design and what is this design's own

These parts follow the published design:

- the five-stage structure and the units placed in each stage;
- the tag bit per register and memory word;
- the PLM addressed from PLBR by `ptr_id`;
- `ptr_id` stored at address + 8;
- `bound = base + size`;
- the BnBIndex/BnBLookUp layout and its sizes (32 index entries, 16 rows);
- sharing rows between aliases;
- keeping a row when its register is overwritten;
- clearing a freed pointer's row, register tag and index;
- the names and operand lists of the eight new instructions.

These parts are this design's own, because the source gives no detail:

- all instruction encodings;
- the exact semantics of fnst/fnld and ldbnb's operands;
- the TCU propagation rules;
- the 16-byte check size of ldptr/fnld/fnst;
- the PLM entry size of 16 bytes;
- the row allocation and eviction policy;
- invalidation by `wrplm`;
- all cycle counts, forwarding and hazard handling;
- trap handling, memory sizes and the inspection ports.

The source's figures show the two example objects in rows 9 and 1. With
first-free allocation they take the lowest free rows instead (rows 0 and 1
when the cache starts empty). The behaviour is the same;
only the row numbers differ.

## Known gaps

- A pointer reloaded from memory with a plain `ld` gets its tag back but
  no bounds, so accesses through it are not checked. Compiled code must
  reload pointers with `ldptr` (or `fnld` after a call).
- A register whose BnBLookUp row was evicted is unchecked, as described
  above.
- A second `free` of the same object is an ordinary `wrplm`. Double free
  is not detected.
- Misaligned accesses, the M extension, CSRs, ecall and interrupts are not
  implemented.

## How far it has been tested

Each module has a self-checking testbench in `tb/` with either random
stimulus against a reference model or directed cases. `tb/tb_shakti_t.sv`
runs the complete core at its default parameters. It runs a program that
walks through the source's worked example:

- `foo` allocates `ptr5` (20 bytes at 100);
- `foo` calls `bar`, saving the pointer with `fnst`;
- `bar` allocates `ptr6` (40 bytes at 200);
- `bar` overwrites a pointer register with 10 + 3;
- `bar` frees `ptr6` and returns;
- `foo` restores `ptr5` with `fnld`.

The program then adds:

- an out-of-bounds store;
- a use-after-free through a stale copy;
- a reload with `ldptr`;
- a loop binding more pointers than the cache holds.

The program runs once to the end and again to a series of checkpoints.
Registers, tags, BnBIndex and BnBLookUp contents, memory words and the
violation record are compared with the expected values. The run also
counts every pipeline mechanism and fails if any never occurs: load-use
stall, multi-cycle memory stall, both forwarding paths, redirect,
violation, bounds check, BnBCache hit, allocation, eviction and
invalidation, fnld row reuse, and tag propagation.

`tb/tb_array_access.sv` covers the array case. It declares a 10-byte
array, binds it with `ldbnb` and fills it with a loop that runs one
element too far. The test checks:

- the overflowing store is refused and the byte behind the array is
  intact;
- exactly one violation is recorded, with the right PC and address;
- the trap handler reads `a[4]` correctly.

The design has not been run on compiled C code. There is no compiler
support for the new instructions, so all test programs are assembled by
the encoder functions in `tb/rv_asm_pkg.sv`. Performance and area have not
been measured.

## Simulating

With Verilator 5 from the repository root:

```
verilator --binary --timing -Irtl -Itb --top-module tb_shakti_t \
    rtl/shakti_t_pkg.sv tb/rv_asm_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/tb_shakti_t.sv
./obj_dir/Vtb_shakti_t
```

A block testbench needs only the package, the encoder package, the block
and its testbench, for example:

```
verilator --binary --timing -Irtl -Itb --top-module tb_bnb_cache \
    rtl/shakti_t_pkg.sv tb/rv_asm_pkg.sv rtl/bnb_cache.sv tb/tb_bnb_cache.sv
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
cycle watchdog. Test programs are written in `tb_shakti_t.sv` with the
functions of `rv_asm_pkg`, such as `ADDI(rd, rs1, imm)`, `LDBNB(rd, rs1)`
and `WRPLM(rs1, rs2, rs3)`. They are loaded through the `imem_*` port
while `rst_n` is low.

## Files

| file | contents |
|------|----------|
| `rtl/shakti_t_pkg.sv` | widths, opcodes, enums and pipeline records |
| `rtl/shakti_t.sv` | top: stage wiring, hazards, forwarding select, violation handling |
| `rtl/fetch_stage.sv`, `rtl/instr_mem.sv` | PC and instruction memory |
| `rtl/isb.sv` | inter-stage buffer |
| `rtl/decoder.sv` | RV64I and new-instruction decoder |
| `rtl/gpr_file.sv` | 32 × 64-bit registers with tags, 4 read ports |
| `rtl/operand_fwd.sv` | per-operand forwarding and load-use detection |
| `rtl/alu.sv` | ALU and branch comparator |
| `rtl/bnb_cache.sv` | BnBIndex and BnBLookUp |
| `rtl/spec_regs.sv` | PLBR and BnB_SP |
| `rtl/seu.sv` | bounds check |
| `rtl/tcu.sv` | tag and binding computation |
| `rtl/mem_controller.sv` | memory-stage sequencer |
| `rtl/data_mem.sv` | tagged data memory |
| `rtl/wb_stage.sv` | load alignment and write-back |
| `tb/rv_asm_pkg.sv`, `tb/tb_check.svh` | instruction encoders; check counters |
| `tb/tb_<module>.sv` | one testbench per module |
| `tb/tb_array_access.sv` | end-to-end array overflow test |
