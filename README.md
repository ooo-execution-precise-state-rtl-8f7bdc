# An R10K-style out-of-order core: one register file, tags everywhere else

In a P6-style out-of-order machine, each result is copied several times:
1. From the register file or reorder buffer into a reservation station.
2. Over the result bus into the reorder buffer.
3. From the reorder buffer into the architectural register file.

This core is organised the way the MIPS R10000 is. It has no architectural
register file. One **physical register file** holds every value, committed or
speculative, and values move only between that file and the functional units.

The other structures hold only physical register numbers, called *tags*:
- the map table
- the free list
- the reorder buffer (ROB)
- the reservation stations

The result bus (CDB) carries a tag, not a value.

The hard part of this organisation is precise state. Registers are written out
of order, at completion, so undoing speculative work means winding back the
map table and the free list. This core does that by serial rollback, one
instruction per cycle, using the two tags that each ROB entry keeps.

The default configuration is that of a small worked example:

| | |
|---|---|
| Architectural registers | 4: f0, f1, f2, r1 |
| Physical registers | 8: PR#1..PR#8 |
| Reservation stations | 5, one per unit: ALU, LD, ST, FP1, FP2 |
| ROB entries | 4 |

## Tags and register renaming

- **Map table.** Each architectural register has one entry: the tag it
  currently maps to, plus a *ready* bit (written `T+` when the bit is set). An
  entry is never empty. After reset register *i* maps to tag *i* and is ready.
- **Free list.** A FIFO of the tags no register maps to. After reset it holds
  the last `NUM_PREGS - NUM_ARCH` tags.
- **ROB entry.** For each instruction in flight:
  - `T`, the tag it writes.
  - `Told`, the tag its destination mapped to before it.
  - The destination register, a store flag and a complete bit.
- **Reservation station.** Holds:
  - The operation and `T`.
  - The source tags `T1` and `T2`, each with its ready bit.
  - The immediate and the ROB index.

Tag *n−1* in the RTL is PR#*n* in the example: f0 starts on tag 0 (PR#1), and
the free list starts with tags 4..7 (PR#5..PR#8).

**Sizing rule.** Number of physical registers = number of architectural
registers + number of ROB entries. With 4 + 4 = 8 at the defaults, every
instruction in the ROB can own one register besides the committed ones.

**When a register is freed.** A physical register cannot be freed when the
instruction that wrote it retires, because younger instructions may still read
it. What *can* be freed at retirement is `Told`. `Told` is the previous
version of the retiring instruction's destination, and no instruction at or
after this point in program order can name it any more. Retiring an
instruction therefore returns its `Told` to the free list.

## An instruction's life: D, S, X, C, R

Each stage takes one cycle, and one instruction is in each stage at a time.

| Stage | What happens |
|---|---|
| **D**, dispatch | The map table gives the source tags and their ready bits, which go into the station of the instruction's unit. The current mapping of the destination becomes `Told` in the ROB. A new tag `T` is taken from the free list and written to the station, the ROB and the map table, with the ready bit clear. Stores get no `T`. Dispatch stalls when the station, the ROB or the free list is exhausted. A full ROB whose head retires in the same cycle still accepts the new instruction. |
| **S**, select | The oldest station with both sources ready issues and is freed. "Oldest" means closest to the ROB head. A tag on the CDB in the same cycle counts as ready, so a dependent instruction issues in its producer's C cycle. |
| **X**, execute | Operands are read from the physical register file by tag, and the unit computes. Loads read memory in this cycle. |
| **C**, complete | The result is written to the register file. `T` goes out on the CDB and sets the ready bit of every matching map-table entry and station source. The ROB entry is marked complete. A store instead puts its address and data into the store buffer. |
| **R**, retire | If the ROB head is complete, it is freed and its `Told` returns to the tail of the free list. A retiring store writes memory from the store buffer. |

With ready operands, an instruction dispatched in cycle *n*:
- issues in *n+1*
- executes in *n+2*
- completes in *n+3*
- retires in *n+4* at the earliest.

In the worked example, this is the timing of the first `ldf`. The dependent
`mulf` issues in cycle 4, the cycle `ldf` puts PR#5 on the CDB, and executes
in cycle 5, reading PR#5 from the register file without a bypass.

## Serial rollback

`undo_req` with `undo_rob` asks to undo every instruction from that ROB entry
up to the youngest. The reason for the undo is outside the core: an
exception, a mispredicted branch, or the testbench.

From the next cycle on, the ROB presents one entry per cycle, youngest first
(`undo_valid`, `undo_entry`). The core then does four things for that entry:
1. Frees the entry's station, if it still has one.
2. Returns `T` to the free list. It returns at the tail, so after undoing
   `ldf` and `addi` in the example the list reads PR#2, PR#8, PR#7.
3. Restores the map-table entry of the destination to `Told`. Its ready bit
   comes from a per-register ready vector, because `Told` may or may not have
   been written yet.
4. Frees the ROB entry.

Stores have no registers to restore. Because stores reach memory only at
retirement, an undone store never touches memory.

Walking from the youngest to the oldest leaves each architectural register
mapped to the `Told` of the oldest undone instruction that wrote it. That is
the mapping it had before the undone range.

**Rules around the request.**
- While entries remain to undo, dispatch, issue and retire stop. `rolling` is
  high during this time.
- In the request cycle itself, the head may still retire, unless the head is
  the first entry to undo.
- In the request cycle, an instruction may still issue. If it belongs to the
  undone range it is dropped, as is one from that range in X.
- An instruction of the range that is in C during the request cycle still
  writes its register. This is harmless: that register returns to the free
  list, and its ready bit is cleared when it is handed out again.

The request is accepted only while `rolling` is low, and `undo_rob` must be
an entry that is in the ROB.

## What this design chooses where the R10K scheme leaves it open

- **Single issue, one-cycle units.** The machine has one CDB carrying one tag
  per cycle, and every unit here takes one cycle. Issuing at most one
  instruction per cycle therefore keeps completions from colliding. The five
  stations share one execute datapath (`fu`).
- **Register read in X.** The tags are latched at select and the register
  file is read in the execute cycle. A value written in C is then visible to
  a dependent instruction in the next cycle without a bypass.
- **Data.** Values are 32-bit integers, and `mulf` is an integer multiply, not
  IEEE floating point. The operations are `add`, `sub`, `addi`, `mulf`,
  `ldf` (`rd = mem[rs2 + imm]`) and `stf` (`mem[rs2 + imm] = rs1`).
- **Memory.** A 64-word array with no misses, byte-addressed, word index
  `addr[7:2]`.
  - Loads wait while any older store is in the ROB.
  - Stores wait in a store buffer, one slot per ROB entry, until they retire.
- **Unit choice.** A `mulf` takes FP1 if it is free, otherwise FP2.
- **Front end.** The core takes decoded instructions (`insn_t`) on
  `in_valid`/`in_ready`. Fetch, decode, branch prediction and exception
  detection are not part of it.
- **Not built: checkpoints.** The R10K scheme also allows restoring the map
  table and free list from checkpoints in one cycle, which is fast but
  expensive. Only serial rollback is built.
- **Stations during rollback.** A station is freed when its instruction
  issues. Undoing an instruction that has already issued therefore finds no
  station to free, and that instruction is dropped from the pipeline instead.

## Files

All sizes are parameters. Their defaults come from `r10k_pkg`.

| File | Contents |
|---|---|
| `rtl/r10k_pkg.sv` | Sizes, `op_e`, `fu_e`, the `insn_t` instruction struct, helper functions |
| `rtl/r10k_core.sv` | Top: dispatch, select, execute, complete, retire and rollback wiring |
| `rtl/map_table.sv` | Map table with ready bits, CDB update, rename write, restore |
| `rtl/free_list.sv` | Free-register FIFO |
| `rtl/rob.sv` | Reorder buffer: allocate, complete, retire, serial rollback, older-store query |
| `rtl/reservation_stations.sv` | Five stations: tag wakeup, oldest-first select, flush by ROB index |
| `rtl/prf.sv` | Physical register file: two read ports, one write port, one debug port |
| `rtl/fu.sv` | Execute datapath for all operations |
| `rtl/store_buffer.sv` | Store address and data per ROB entry |
| `rtl/dmem.sv` | Data memory |

**Core parameters.**
- `NUM_PREGS` (8), `ROB_DEPTH` (4) and `DMEM_WORDS` (64) are parameters of
  `r10k_core`.
- The number of architectural registers, `NUM_ARCH` (4), sets the width of
  the register fields in `insn_t`. To change it, edit `r10k_pkg`.
- Keep `ROB_DEPTH = NUM_PREGS - NUM_ARCH`. A deeper ROB only makes the free
  list run out first.

**Core ports besides the instruction and rollback ports.**
- `mem_we`, `mem_addr`, `mem_wdata`: load memory. Use only while `idle` is
  high.
- `dbg_areg`: reads an architectural register through the map table, on
  `dbg_areg_value` and `dbg_areg_tag`.
- `dbg_mem_addr`: reads a memory word on `dbg_mem_data`.
- Status: the stall reasons, the CDB, issue, retire and undo events, `idle`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. The package goes
first, and `-y rtl` finds the modules:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/r10k_pkg.sv \
    tb/tb_r10k_core.sv --top-module tb_r10k_core -o sim
./obj_dir/sim
```

**`tb_r10k_core`** runs the core at its default sizes, in two phases.

Phase 1 replays the worked example cycle by cycle: `ldf`, `mulf`, `stf`,
`addi`, `ldf`, `mulf`, `stf`, with a rollback of instructions 3–5 requested
in cycle 5. It checks:
- the tags handed out at dispatch
- the issue and CDB cycles
- the retirement of the first `ldf`
- each undo step
- the final map table and free-list order.

Phase 2 runs 3000 random instructions with random rollbacks, re-sending the
undone instructions. It then compares all registers and all of memory with
an in-order reference model. It also counts each mechanism and fails if one
never happened:
- station, ROB and free-register stalls
- same-cycle wakeup and issue
- dispatch seeing a tag on the CDB
- a load held behind a store
- rollbacks and dropped instructions
- use of FP2
- a store committed at retire
- a full ROB reused while its head retires.

**`tb_freeing_example`** renames a five-instruction program with 3
architectural and 7 physical registers, using the map table and free list.
It checks the expected renaming, `add p2,p3,p4` … `add p7,p6,p1`. It also
checks that each retirement frees the old mapping: p1, p3, p5, p4, p2.

**Unit testbenches.** `tb_map_table`, `tb_free_list`, `tb_rob`,
`tb_reservation_stations`, `tb_prf`, `tb_fu`, `tb_store_buffer` and `tb_dmem`
each drive random traffic against an independent model.

## How far to trust it

What has been checked:
- The core matches the worked example cycle for cycle where the example gives
  cycles.
- It matches an in-order model over thousands of random instructions and
  hundreds of rollbacks.
- Verilator lints all files, and yosys (slang front end) elaborates and
  synthesises them without latches or multiple drivers.

What has not been checked:
- Timing closure or area on any technology.
- Anything beyond single issue and one-cycle units.
- Real floating-point arithmetic.
