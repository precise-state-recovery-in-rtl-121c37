# P6-style out-of-order core with precise state recovery

An out-of-order core runs instructions as soon as their operands are ready, so
results come back in any order. An exception, an interrupt or a mispredicted
branch, however, has to look as if it happened *between* two instructions:
everything before it finished, nothing after it started. This core gets that
by splitting the old "writeback" step in two:

* **Complete (C)**: a finished result goes into a **re-order buffer (ROB)**
  entry and is broadcast to waiting instructions. This happens out of order.
* **Retire (R)**: the oldest ROB entry, and only that one, copies its result
  into the register file, or its store into data memory. This happens in
  order.

The register file and memory therefore always hold a precise state. To recover,
the core waits until the offending instruction reaches the ROB head and then
empties every speculative structure in one cycle. Every structure is built so
that *zero means the right thing*: an empty ROB entry, a free reservation
station, and a Map Table tag of 0 meaning "the value is in the register file".
After the clear, fetch restarts from a new PC. The same clear undoes a load
that ran ahead of an older store to the same address.

The organisation is the Intel P6 (Pentium Pro) scheme: Tomasulo's algorithm
with ROB numbers used as tags.

## The structures

| structure | file | contents |
|---|---|---|
| ROB, 7 entries | `p6_rob.sv` | circular buffer, head and tail pointers; each entry holds R (destination register), V (value), done, exception, store address, branch target |
| Map Table | `p6_map_table.sv` | per register a tag **T** and a **+** bit ("ready in the ROB") |
| reservation stations (RS), 5 | `p6_rs_entry.sv` ×5 | busy, op, T (own ROB tag), T1/T2 (tags of operands not yet produced), V1/V2 |
| common data bus (CDB) | `p6_cdb_arbiter.sv` | one `<tag, value>` broadcast per cycle |
| register file | `p6_regfile.sv` | 16 × 32-bit, written only at retire |
| functional units | `p6_alu.sv`, `p6_load_unit.sv`, `p6_store_unit.sv`, `p6_mul.sv` ×2 | one unit behind each RS: ALU, LD, ST, FP1, FP2 |
| memories | `p6_imem.sv`, `p6_dmem.sv` | instruction memory; data memory with a present bit per 64-byte page |
| fetch, decode | `p6_fetch.sv`, `p6_decode.sv` | PC and F/D latch; field decoder |
| top | `p6_core.sv` | dispatch, issue select, retire and recovery control, wiring |

Shared types are in `p6_pkg.sv`: ROB size, register count, opcodes, and the
`cdb_t`, `issue_t` and `rob_entry_t` structs.

### Tags and the T+ encoding

ROB entries are numbered 1..7, and that number is the tag an instruction's
result carries. Tag 0 is never an entry. For a source register, the Map Table
entry decides where dispatch finds the value:

| Map entry | meaning | dispatch reads |
|---|---|---|
| `0` | no instruction in flight writes it | register file |
| `T+` | producer finished, value waits in ROB entry T | ROB entry T |
| `T`, and the CDB carries T this cycle | producer is finishing now | CDB value |
| `T` | not produced yet | nothing: T goes into T1/T2 of the RS |

At retire, the register's Map entry is cleared only if it still holds the
retiring tag. If a younger instruction has renamed the register since, its
mapping stays.

## Life of an instruction

One instruction per cycle enters at D and one leaves at R.

1. **F**: fetch reads `pc` and places the instruction in the F/D latch. Fetch
   predicts every branch not-taken.
2. **D (dispatch)**: this stage stalls if the ROB is full or the instruction's
   RS is busy. A `mulf` takes FP1 if it is free, otherwise FP2. Dispatch then
   allocates the ROB tail and the RS, and writes the ROB tag into the RS (T)
   and into the destination's Map entry, with + cleared. Sources are read as
   in the table above. `trap`, `iret`, `pmap` and `halt` need no unit: they
   enter the ROB already complete.
3. **S (schedule)**: an RS whose operands are present sends its instruction
   to its unit, if the unit can accept it. A CDB match counts in the same
   cycle: an instruction can be selected in the cycle its last operand is
   broadcast. The RS is free from the next cycle on.
4. **X (execute)**: ALU, load and store units take 1 cycle; the multipliers
   take `MUL_LATENCY` = 3 cycles and are pipelined.
5. **C (complete)**: one result per cycle wins the CDB. Priority is LD, FP1,
   FP2, ALU. The result is written into the ROB, captured by every RS waiting
   for that tag, and sets + in any Map entry still holding the tag. A unit
   that loses arbitration keeps its result and stops accepting work. Stores
   complete on their own port: address and data go into the ROB, and the CDB
   is not used.
6. **R (retire)**: if the head is complete, its value goes to the register
   file, or its store to data memory, and the entry is freed. Otherwise retire
   waits.

### Timing of the reference loop

The loop below runs on an empty machine. Cycle 1 is the dispatch of the
first `ldf`.

```
 #  instruction          D   S   X      C    R
 1  f1 = ldf (r1)        1   2   3      4    5
 2  f2 = mulf f0, f1     2   4   5-7    8    9
 3  stf f2, (r1)         3   8   9     10   11
 4  r1 = addi r1, 4      4   5   6      7   12
 5  f1 = ldf (r1)        5   7   8      9   13
 6  f2 = mulf f0, f1     6   9  10-12  13   14
 7  stf f2, (r1)         9  13  14     15   16
```

Instruction 7 waits at D in cycles 7 and 8 because the single ST station is
still held by instruction 3. Instruction 4 finishes in cycle 7 but retires
only in cycle 12, behind the stores. Instruction 5 executes in cycle 8,
before the older store (instruction 3) has its address; the addresses differ
(0x44 and 0x40), so no replay follows. `tb_p6_core` checks these dispatch and
retire cycles, and the execute cycle of instruction 5.

## Precise state recovery

All recovery is decided at the ROB head, in `p6_core.sv`. In one cycle, the
core:

* clears all ROB entries;
* frees all reservation stations;
* zeroes the Map Table;
* drops the work in every functional unit and the F/D latch;
* restarts fetch.

After the clear, the ROB head and tail both point at the first aborted
entry, which the next instruction reuses.

| event | detected | head instruction | saved PC (`epc`) | fetch restarts at |
|---|---|---|---|---|
| page fault (load or store to an absent page) | at C, stored in the ROB | not retired | its PC | `PF_VECTOR` |
| `trap` | at D | retired | its PC + 4 | `TRAP_VECTOR` |
| `iret` | at D | retired | — | `epc` |
| taken branch (mispredicted) | at C, with target | retired | — | branch target |
| interrupt `irq_i` | when a head exists | not retired | its PC | `IRQ_VECTOR` |
| load replay (an older store to the same word completed after the load read) | at the store's C | not retired | — | the load's own PC |
| `halt` | at D | retired | — | fetch stops |

Entering any handler masks `irq_i` until that handler's `iret` retires. A page
fault also saves the faulting address. `pmap`, when it retires, marks that
address's page present, so a complete page-fault handler is `pmap; iret`. The
faulting instruction then re-executes.

Because stores write memory only at retire, an aborted store never reaches
memory. Because the register file is written only at retire, the registers a
handler sees are exactly those of the instructions before the faulting one.
The testbench checks this at the moment of the fault: the `addi` after the
faulting store has already completed, but `r1` still holds its old value.

## Loads and stores

Stores reach memory only at retire, so a load could otherwise read stale
memory. Loads do not wait for older stores. Instead:

* When a load executes, the ROB is searched from the head towards the load.
  The youngest older store that has completed and writes the same word
  supplies the data. Without such a store, memory does.
* An older store whose address was still unknown can complete later. In that
  cycle, every younger load to the same word that already has its value is
  marked for replay. The load may be in the X stage, waiting in the C
  register, or already complete in the ROB.
* A marked load is not retired. When it reaches the head, the machine is
  cleared as for a fault, and fetch restarts at the load itself. The load
  runs again with the store now complete and visible to the search.

A replayed load is the oldest instruction in the machine when it runs again,
so no store can replay it a second time, and the loop always makes progress.

The check compares word addresses only and does not look at which store
forwarded the data. A load may therefore be replayed even though its value
was already right. Such a replay costs time but never gives a wrong result.

## Instruction set

This encoding is the design's own. One 32-bit word: `[31:28]` opcode,
`[27:24]` rd, `[23:20]` rs1, `[19:16]` rs2, `[15:0]` signed immediate.
Addresses are byte addresses and the PC advances by 4.

| op | code | meaning | RS |
|---|---|---|---|
| `nop` | 0 | — | none |
| `add` / `sub` | 1 / 3 | rd = rs1 ± rs2 | ALU |
| `addi` | 2 | rd = rs1 + imm | ALU |
| `mulf` | 4 | rd = rs1 × rs2 (low 32 bits) | FP1/FP2 |
| `ldf` | 5 | rd = mem[rs1 + imm] | LD |
| `stf` | 6 | mem[rs1 + imm] = rs2 | ST |
| `beq` / `bne` | 7 / 8 | if rs1 ==/!= rs2: pc = pc + imm | ALU |
| `trap` | 9 | system call | none |
| `iret` | A | return to `epc` | none |
| `pmap` | B | mark the page of the last fault present | none |
| `halt` | F | stop | none |

In a reservation station, `ldf` keeps its base register in operand 2, and
`stf` keeps its data in operand 1 and its base in operand 2.

## Interface of `p6_core`

| port | dir | purpose |
|---|---|---|
| `clk_i`, `rst_ni` | in | clock, asynchronous active-low reset |
| `irq_i` / `irq_ack_o` | in/out | level interrupt request / taken this cycle |
| `imem_we_i`, `imem_addr_i`, `imem_wdata_i` | in | load the program |
| `dmem_we_i`, `dmem_addr_i`, `dmem_wdata_i`, `dmem_rdata_o` | in/out | preload and read data memory |
| `page_we_i`, `page_present_i` | in | set the present bit of the page at `dmem_addr_i` |
| `dbg_reg_i`, `dbg_reg_value_o` | in/out | read a committed register |
| `ret_valid_o`, `ret_pc_o`, `ret_rd_we_o`, `ret_rd_o`, `ret_value_o` | out | retire trace |
| `flush_o`, `epc_o`, `halted_o` | out | recovery in progress, saved PC, halted |

Reset empties the ROB, reservation stations, Map Table and units, and zeroes
the registers. It does **not** touch instruction memory, data memory or page
present bits: load those before releasing reset.

Parameters and their defaults:

* `IMEM_WORDS` = `DMEM_WORDS` = 256, `PAGE_BYTES` = 64;
* `MUL_LATENCY` = 3;
* `RESET_PC` = 0, `PF_VECTOR` = 0x200, `TRAP_VECTOR` = 0x280,
  `IRQ_VECTOR` = 0x300.

ROB size, register count and data width are constants in `p6_pkg`.

## How far it follows the P6 description, and where it departs

Taken from the P6 scheme:

* ROB with head and tail, R and V fields;
* ROB numbers as tags, with 0 meaning "in the register file";
* Map Table with a tag and a ready-in-ROB bit;
* five reservation stations (ALU, LD, ST, FP1, FP2), each with
  T/T1/T2/V1/V2;
* one CDB, with stall on conflict;
* an RS freed at execute and reusable in the same cycle;
* a 7-entry ROB;
* in-order retire that writes the register file and memory;
* recovery by clearing ROB, RS and Map Table at the head;
* cycle timing of the reference loop, in every cell the example shows.

This design's own choices:

* 32-bit data, 16 unified registers, and the instruction encoding;
* `mulf` as an integer multiply, and FP2 as a second multiplier;
* not-taken prediction in place of a branch predictor;
* paging through present bits, `pmap`, the exception vectors, and interrupt
  masking;
* store-to-load forwarding and the load replay rule;
* fixed CDB priority;
* memories modelled as single-cycle arrays rather than caches.

Points where the timing or the order of events differs from the P6 example:

* A fault at the head is acted on in the cycle after the faulting
  instruction completes, like any other retire. In the P6 example with a
  page fault in the first store, the machine is cleared in that store's
  complete cycle (cycle 10); here it is cleared in cycle 11.
* A mispredicted branch retires and then clears what follows it. The P6
  description counts mispredicts among the events handled before the
  instruction. Here the branch itself is correct, so it retires.
* An interrupt is taken at the head even when the head has not completed.
  The head instruction is then aborted and re-executed after the handler.

Not provided: a real branch predictor, caches with misses, floating-point
arithmetic, and dispatch or retire wider than one instruction per cycle.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`,
that compares it with an independent model.

`tb_p6_core` runs the whole core at its default parameters. An instruction-set
model inside the testbench executes the same program in order, and every
retire, page-fault flush and interrupt entry of the core is compared with it.
At the end, all registers and data memory are compared too. It runs:

* the reference loop, with dispatch and retire cycles checked;
* the loop with its stores one word higher, so that the second load must be
  replayed once;
* the loop with its first store to an absent page. The state at the fault is
  checked, and so are the emptied ROB, RS and Map Table in the next cycle.
* 40 random programs, with forward branches, traps, absent pages and random
  interrupts.

The test also counts how often each mechanism occurs, and fails if one never
does:

* ROB-full and RS-full stalls;
* CDB conflicts;
* operands read from the ROB or taken from the CDB at dispatch;
* wakeups in the RS;
* retire stalls;
* forwarding, and load replays;
* page faults, traps, `iret`s, mispredicts, interrupts and `halt`.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/p6_pkg.sv -y rtl \
          tb/tb_p6_core.sv --top-module tb_p6_core -o sim
./obj_dir/sim
```

The package goes first, and `-y rtl` finds the modules by name. The same
command with another `tb_<module>` builds that unit's testbench. Each
testbench ends by printing `TB_RESULT checks=N failures=M`.
