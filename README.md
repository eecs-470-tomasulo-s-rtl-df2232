# Simple Tomasulo: an out-of-order scheduler with copy-based renaming

Instructions enter this core in program order, but each one executes as soon
as its operands exist, not when the instructions ahead of it are done. Two
structures make that possible:

- **Reservation stations (RS).** Each RS holds one waiting instruction. It
  keeps a copy of each source value, or, while the value is still being
  computed, the number of the RS that will produce it (a *tag*).
- **Common data bus (CDB).** Every finished result is broadcast on the CDB
  with its tag. Each waiting station that holds that tag copies the value.

Because an instruction keeps its own copies of its inputs, a younger
instruction can overwrite the same architectural register right away. Reuse
of a register name (write-after-read and write-after-write) then creates no
hazards. Only true data dependences (read-after-write) make instructions
wait.

The machine is the small "Simple Tomasulo" teaching configuration from the
EECS 470 lecture on Tomasulo's algorithm (Winter 2024). It has five RS, one
CDB, a map table and a register file. It does no bypassing. The same lecture
also describes renaming to physical registers through a map table and a free
list. That renamer is included as a second, independent block. Each design
has its own ports in the top level, `tomasulo_top`.

## The machine

| RS# (tag) | kind | unit | execute latency |
|-----------|------|------|-----------------|
| 1 | ALU | integer ADD, SUB, ADDI | 1 cycle |
| 2 | LD  | load: `R = MEM[V2 + imm]` | 1 cycle, memory included |
| 3 | ST  | store: `MEM[V2 + imm] = V1` | 1 cycle, memory included |
| 4 | FP  | shared 3-stage pipelined single-precision multiplier | 3 cycles |
| 5 | FP  | (same unit) | 3 cycles |

The storage is split three ways:

- Each **RS** holds `busy`, `op`, the destination register `R`, the source
  tags `T1`/`T2`, the source values `V1`/`V2` and an immediate.
- The **map table** holds one tag per architectural register. Tag 0 means
  "the register file has the current value". Tag *n* means "RS#*n* will
  produce it".
- The **register file** holds the master copy of every register whose tag
  is 0.

## Life of an instruction: D, S, X, W

This is the heart of the design. Most of the subtle behaviour is in the
same-cycle rules.

**D, dispatch (in order).** The instruction needs a free RS of its kind.
If there is none, `insn_ready` goes low and the instruction waits there.
Every younger instruction waits behind it, so this is a *stall*. The
lowest-numbered free RS of the kind is taken, so of two FP instructions the
first gets RS#4 and the second RS#5. Each used source is filled in one of
three ways:

- Its map-table tag is 0: the value is read from the register file.
- Its tag is being broadcast on the CDB in this same cycle: the value is
  taken from the CDB. Without this, the new RS would keep a tag that is never
  broadcast again.
- Otherwise: the tag is copied.

The destination register is then renamed to this RS's number. D never waits
for write-after-write: the map table simply takes the newer tag.

**S, issue (out of order).** An RS *wakes up* once both tags are clear. A
tag that matches this cycle's CDB counts as clear, so a consumer issues in
the same cycle as the writeback of the value it waited for. Among the woken
stations of one unit, the *select* logic picks the oldest, using an age
matrix in allocation order. A station that keeps waiting holds nothing else
up. The station stays busy after issue: it is marked *issued* and keeps its
values.

**X, execute.** In the cycle after S, the unit reads `V1`/`V2` from the
issuing RS. The RS number travels with the operation as its result tag. ALU,
load and store take one cycle. The FP unit takes three cycles and is
pipelined, so both FP stations can be in flight at once.

**W, writeback.** A finished result waits in its unit's output register until
it wins the single CDB. When several results are ready, the FP unit goes
first, then load, then ALU. The broadcast does four things in the same cycle:

1. Waiting stations whose tag matches copy the value.
2. The map table compares its entry for the destination register with the
   tag. Only if they are still equal is the entry cleared and the register
   file written. A younger instruction may have renamed the register in the
   meantime. Its tag then stays, and the older value lives on only in the
   stations that copied it.
3. The RS is freed. D may hand it to a new instruction in the same cycle.
4. A unit whose result is still waiting accepts no new work, so issue to it
   pauses.

A store has no destination. Its W frees the RS one cycle after X and never
uses the CDB.

There is **no bypassing**. A dependent instruction issues in the producer's
W cycle and executes in the next one.

### The reference timing

The core reproduces this schedule cycle for cycle. Registers f0, f1, f2 and
r1 are mapped to registers 0 to 3. The last two rows past cycle 10 follow
from the same rules.

| instruction | D | S | X | W |
|---|---|---|---|---|
| ldf X(r1),f1    | 1 | 2 | 3 | 4 |
| mulf f0,f1,f2   | 2 | 4 | 5-7 | 8 |
| stf f2,Z(r1)    | 3 | 8 | 9 | 10 |
| addi r1,4,r1    | 4 | 5 | 6 | 7 |
| ldf X(r1),f1    | 5 | 7 | 8 | 9 |
| mulf f0,f1,f2   | 6 | 9 | 10-12 | 13 |
| stf f2,Z(r1)    | 10 | 13 | 14 | 15 |

Several rules show in this table:

- The second `mulf` dispatches even though f2 is still owned by the first
  (no WAW stall).
- The first `mulf`'s writeback in cycle 8 leaves f2 mapped to RS#5.
- The second `stf` stalls in D until cycle 10, when the store RS frees. It
  dispatches in that same cycle.

## Interfaces

`tomasulo_core` (all types in `tomasulo_pkg`):

- `insn_valid`, `insn` (`insn_t`), `insn_ready` carry the decoded
  instruction stream. `insn_t` holds `op`, `rd`, `rs1`, `rs2`, `use1`,
  `use2` and `imm`. An instruction is taken at a rising edge where
  `insn_valid && insn_ready`.
  - Slot 1 (`rs1`, V1) is the first operand of ADD/SUB/MUL/ADDI and the
    data of a store.
  - Slot 2 (`rs2`, V2) is the second operand and the base address of loads
    and stores.
  - `use1`/`use2` say which slots are read. ADDI reads slot 1 only, LD
    slot 2 only.
- `disp_tag` is the RS# given to the instruction being taken.
- `cdb` is the bus this cycle: `{valid, tag, value}`.
- `s_mask`, `x_mask`, `w_mask` (one bit per RS) show issue, start of
  execute and writeback in this cycle. `rs_busy` and `rs_waiting` show RS
  state.
- `dbg_reg` → `dbg_reg_val`, `dbg_reg_tag` let the environment inspect the
  register file and map table.
- `host_we`, `host_addr`, `host_wdata`, `host_rdata` give word access to the
  data memory, for loading and checking it. A store wins over a host write in
  the same cycle.

Reset is asynchronous and active low (`rst_n`). It empties every RS and
clears the map table and the register file to 0. The data memory is not
reset.

`phys_renamer`:

- Inputs are `in_valid`, `src1`, `src2`, `dst` and `has_dst`.
- Outputs are the translated `psrc1`, `psrc2`, `pdst` and `free_count`.
- `in_ready` is low when an instruction has a destination but the free list
  is empty.

Registers are numbered from 1. After reset r*i* → p*i*, and p(N+1)…pM are
free, in order. Sources are translated with the mapping from before the
instruction's own rename. With the defaults (3 architectural, 7 physical
registers) the sequence `add r2,r3,r1; sub r2,r1,r3; mul r2,r3,r3; div
r1,4,r1` becomes `add p2,p3,p4; sub p2,p4,p5; mul p2,p5,p6; div p4,4,p7`.
Nothing ever returns a register to the list. After four renames the block
stalls until reset, because releasing registers belongs to a retirement
mechanism that is not part of this design.

## Choices made here, and departures

- **Number format.** The lecture gives the FP unit's timing, not its
  arithmetic. Here it is an IEEE-754 single-precision multiply (`mulf`) with
  round-to-nearest-even. Subnormal inputs count as zero, and results below
  the normal range flush to a signed zero. Every NaN result is 0x7FC00000.
  ADD, SUB and ADDI are 32-bit integer operations.
- **One register file.** There are 8 registers of 32 bits, shared by
  integer and FP values. A classic pipeline diagram has separate integer and
  FP register files.
- **Sizes and encodings.** These are this design's own: the opcodes, the
  immediate field in each RS, and a data memory of `MEM_WORDS` = 256 words
  addressed by byte address `addr[.. : 2]`.
- **Priorities.** Issue is oldest first. (Random selection, which many
  implementations use, is not built.) CDB arbitration is fixed: FP, then
  load, then ALU. Allocation takes the lowest-numbered free RS.
- **Memory ordering is not checked.** The core assumes loads and stores reach
  memory with their dependences already respected. The single store RS keeps
  stores in program order, but a load may pass an older store to the same
  address.
- **CDB stall.** When the FP unit's result waits for the bus, the whole FP
  pipe holds.

## Not included

These are not built:

- fetch, branch prediction and decode (the core takes decoded instructions);
- branch-misprediction recovery and precise exceptions. A Tomasulo machine
  without a reorder buffer cannot recover the order of instructions in its
  stations.
- bypassing of CDB values straight into the units;
- superscalar (N-wide) dispatch, issue and writeback, and split or FIFO
  station banks;
- a scoreboard;
- a divide unit;
- freeing physical registers in the renamer.

## Files

`rtl/`:

- `tomasulo_pkg.sv` holds the types (`insn_t`, `rs_t`, `cdb_t`, `fu_req_t`),
  sizes and the RS-kind table.
- `tomasulo_top.sv` puts both designs side by side.
- `tomasulo_core.sv` contains dispatch, issue registers, units, the CDB and
  the free logic.
- `rs_entry.sv` is one reservation station.
- `map_table.sv` is the register-to-tag map with the "still matches" check.
- `arch_regfile.sv` is the architectural register file.
- `age_select.sv` is the oldest-first issue select.
- `select_logic.sv` is a fixed-priority encoder, used for allocation and the
  CDB.
- `cdb_arbiter.sv` is the single common data bus.
- `alu_unit.sv`, `fp_unit.sv` and `mem_unit.sv` are the units; `mem_unit`
  covers load, store and the data memory.
- `phys_renamer.sv` is the map-table and free-list renamer.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`:

- `tb_tomasulo_core` replays the timing table above and checks every D/S/X/W
  cycle and the final values. It then runs two four-instruction examples for
  values.
- `tb_tomasulo_top` runs at the default parameters. It checks the renaming
  example above, then 40 random programs of 60 instructions against an
  in-order model. It also counts each mechanism and fails if one never
  happens:
  - dispatch stall;
  - D into an RS in its W cycle;
  - CDB capture at dispatch;
  - issue in the broadcast cycle;
  - CDB conflict;
  - stale writeback;
  - two FP operations in flight;
  - out-of-order issue;
  - oldest-first choice between the FP stations.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tomasulo_pkg.sv \
    tb/tb_tomasulo_top.sv --top-module tb_tomasulo_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_tomasulo_top` with any other testbench to run it. The whole
end-to-end test takes well under a second.

To change the machine, edit `tomasulo_pkg`:

- `NUM_RS` and `rs_fu()` set how many stations there are and which unit each
  feeds.
- `NUM_REGS` and `XLEN` set the register file.

`MEM_WORDS` is a parameter of the core and the top.
