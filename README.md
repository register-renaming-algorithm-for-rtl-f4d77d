# Four-wide MIPS core with one-cycle branch-misprediction recovery

An out-of-order superscalar processor has to undo a wrong branch prediction.
With a reorder buffer and a separate architectural register file, this usually
means waiting several cycles, or walking the buffer backwards, before fetch can
restart on the right path. This core avoids that with two register mapping
tables:

* **IP (Issue Pointer table).** The speculative map from each of the 32 MIPS
  registers to a location in a 64-entry *Value Buffer* (VB). The VB is a merged
  physical register file.
* **CP (Commit Pointer table).** The same map, but updated only when
  instructions commit.

The VB location each table holds is called a *pseudo-pointer*. When a
mispredicted branch (and its delay slot) commits, CP is exactly the machine's
architectural state. Recovery therefore takes one cycle, called **Restore**:

* CP is copied into IP.
* Each VB location's *Commit* bit is copied into its *Allocate* and *Valid*
  bits.
* The reorder buffer and every queue younger than the branch are emptied.
* Fetch restarts at the correct address.

No register values are copied, and no history is walked.

The rest of the core is a conventional four-wide MIPS-I out-of-order machine:

- four instructions fetched and renamed per cycle;
- distributed reservation stations;
- five execution units;
- two common data buses (CDBs);
- a 64-entry reorder buffer (ROB) that commits up to four instructions per
  cycle.

## Pipeline at a glance

```
Fetch -> Decode/Issue -> Dispatch -> Reservation stations -> Execute -> Write-back -> Commit-1 -> Commit-2 (-> Restore)
         (rename)                    ALU0 ALU1 BJU LSU MDU                (2 CDBs)     ROB head     CP, free list
```

| Stage | What happens | Module |
|---|---|---|
| Fetch | Reads 4 words at PC from a four-bank memory. Predicts the first branch (BTB + BPB). Forms the group. | `fetch`, `icache`, `btb`, `bpb` |
| Decode/Issue | Decodes, reads IP and picks four free VB locations. SOW/DOW resolve dependences inside the group. Takes ROB slots. | `issue_stage`, `decoder`, `mapping_table`, `prioritizer`, `overwrite_logic` |
| Dispatch | Reads operands from the VB. Writes at most one instruction per station per cycle. | `dispatch`, `value_buffer`, `status_bits` |
| Schedule | Each station snoops both CDBs and issues its oldest ready entry. | `reservation_station` (x5) |
| Execute | ALU, BJU: 1 stage. LSU: 2 stages. MDU: 3 stages. | `alu`, `bju`, `lsu`, `store_buffer`, `mdu`, `hilo_buffer` |
| Write-back | The two oldest waiting results get the two CDBs. | `writeback` |
| Commit | Commit-1 counts completed head entries. Commit-2 updates CP and frees locations. Restore follows a mispredict. | `rob`, `commit_logic` |

`superscalar_core` wires all of these together. `rr_pkg` holds:

- the sizes;
- the unit codes: MDU 010, ALU 011, BJU 100, LSU 101;
- the ROB instruction codes: register write 000, other 001, link 010,
  branch/jump 100, store 111;
- the structs passed between stages.

## Renaming: IP, CP and the three status bits

Every VB location carries three bits, kept in `status_bits`:

| Bit | Set when | Cleared when |
|---|---|---|
| Allocate | the issue stage hands the location to a destination | Commit-2 frees it; Restore (takes Commit) |
| Valid | a CDB writes its value | Commit-2 frees it; Restore (takes Commit) |
| Commit | Commit-2 makes it the architectural copy of a register | Commit-2 frees it (the register got a newer committed copy) |

Location 0 stands for register R0. Its three bits are always 1, it reads as
zero, and every register maps to it after reset. So an unwritten register reads
as zero, and a restore can never free location 0.

**Allocating destinations.** The `prioritizer` is a priority encoder over the
64 Allocate bits. It returns the four lowest free locations and a found flag for
each. The issue stage hands these out, in slot order, to the slots that write a
register. If fewer free locations exist than the group needs, the whole group
stalls (the *VR stall*). The group also stalls if the ROB lacks room for its
instructions (the *ROB stall*).

**Dependences inside a group.** IP holds the state *before* the group, so two
corrections are needed. `overwrite_logic` makes both:

- **SOW (source overwrite).** If a source register is written by an earlier
  slot of the same group, the source takes that slot's new pseudo-pointer
  instead of IP's.
- **DOW (destination overwrite).** If two slots write the same register, only
  the later one writes IP. Both still get their own VB location and ROB entry.

Both are purely combinational comparisons of register numbers across the four
slots.

**IP and CP.** `mapping_table` holds both tables, 32 × 6 bits each:

- IP: eight read ports for the sources and four write ports for the
  destinations.
- CP: four write ports and four read ports. The reads return the "old" pointer
  that a committing instruction replaces.
- A restore input copies all of CP into IP in one clock edge.

## Reorder buffer, commit and restore

This is the part that makes the design work, and it is the most intricate.

### The ROB (`rob`)

The ROB is a 64-entry circular buffer with two counters:

- **IC (Issue Counter).** The next free position.
- **CC (Commit Counter).** The oldest entry.

A separate occupancy count tells a full buffer from an empty one. Each entry
holds:

- the ROB code;
- the logical destination and its new pseudo-pointer;
- a delay-slot flag;
- the branch address and branch target address;
- the prediction bits;
- a taken bit and a mispredict bit;
- a completion bit C.

Three completion buses write into it:

- B from the branch unit (outcome, target, new prediction bits, mispredict);
- M from the MDU (HI/LO writers, which have no VB destination);
- L from the LSU (stores).

A register-writing instruction needs no completion bus. It is complete when the
Valid bit of its pseudo-pointer is set.

Each cycle IC does one of four things:

- advances by the number of instructions the issue stage kept;
- holds (ROB stall);
- resets;
- on Restore, jumps back to CC, which empties the buffer.

### Commit-1 (combinational, in `commit_logic`)

Commit-1 looks at the four entries at CC and counts NC, the number of
consecutive complete entries. Two rules limit NC:

- **At most one branch or jump per commit group.** The prediction buffer has
  one write port.
- **A mispredicted branch ends the commit stream after its delay slot.** If
  the delay slot is in the same group and complete, it commits with the
  branch. Otherwise later cycles commit the delay slot alone, and nothing after
  it.

CC advances by NC in the same cycle.

### Commit-2 (one cycle later, from registers)

- CP is written with the committing pointers. When two committing instructions
  write the same register, the younger one wins.
- The pointers CP held before are read out. Their locations get Allocate,
  Valid and Commit cleared, so they can be reused.
- The new pointers get their Commit bits.
- Committed stores are counted into the store buffer. Committed HI/LO writers
  are counted into the HILO buffer.
- A committing branch writes its new 2-bit prediction into the BPB. If it was
  taken, it also writes its target into the BTB.

### Restore (the cycle after Commit-2)

If Commit-2 handled a mispredicted branch, `restore` is high for exactly one
cycle. Its `restore_pc` is:

- the branch target, for a mispredicted taken branch;
- the address after the delay slot, for a mispredicted not-taken branch.

In that cycle:

- IP takes CP, and Allocate and Valid take Commit;
- the ROB is emptied and fetch reloads its PC;
- the fetch register, dispatch group, reservation stations and unit pipelines
  are cleared;
- the store buffer drops its uncommitted stores;
- the HILO buffer falls back to its committed value.

Commit-1 stays idle from the moment the mispredict is seen until the restore is
over. So nothing younger than the delay slot can commit.

A misprediction therefore costs the cycles until the branch reaches the ROB
head, plus two: Commit-2 and Restore. It never costs a walk over the
speculative instructions.

## Dispatch and the reservation stations

**Dispatch (`dispatch`)** holds one renamed group. It reads the group's eight
source operands from the VB:

- The Valid bit tells whether a value is present.
- The VB forwards a CDB write made in the same cycle.
- A missing operand keeps its pseudo-pointer as a tag.

Each cycle, dispatch writes at most one instruction into each station. It picks
the first undispatched slot for that station, and marks slots done as it goes.
Dispatch holds the group, and stalls the issue stage, until every slot is in a
station. Two ALU instructions in one group therefore go to ALU0 and ALU1 in the
same cycle. Two loads take two cycles.

**Reservation stations (`reservation_station`, five instances)** have four
entries each. An entry:

- is written into the lowest free slot;
- snoops both CDBs every cycle to fill waiting operands;
- once both operands are present, competes to issue.

**Issue order is by age.** Age is the distance of the entry's ROB position from
CC, `reo − CC` modulo 64. This ordering survives the counters wrapping, and the
smallest distance is the oldest instruction. The selected entry moves into an
issue register that feeds the unit. The unit takes it when its first stage can
move.

**Bypass.** An instruction whose operands are all present and which arrives at
an empty station goes straight to the issue register. This saves a cycle.

**In-order stations.** The LSU and MDU stations are built with
`IN_ORDER = 1`. They only issue their oldest entry, and only when it is ready.

- In the LSU, this keeps loads and stores in program order, which the store
  buffer relies on.
- In the MDU, it keeps MFHI/MFLO behind the MULT/DIV whose HI/LO they read.

## Execution units

- **ALU (`alu`, two copies).** One combinational stage: add/sub, logic, set-less-than, shifts and
  LUI. No overflow traps.
- **BJU (`bju`).** One stage for all branches and jumps:
  - evaluates the condition and the target;
  - compares them with the prediction made at fetch;
  - raises *mispredict* if the direction or the target differs;
  - computes the updated 2-bit counter (jumps store 11).
  JAL/JALR also write the return address (PC + 8) through a CDB.
- **MDU (`mdu`).** Three stages for MULT/MULTU/DIV/DIVU/MFHI/MFLO:
  - MULT and DIV write their HI/LO pair into the HILO buffer and complete
    through the M bus.
  - MFHI/MFLO read the newest HI/LO pair and compete for a CDB.
- **HILO buffer (`hilo_buffer`).** A wrap-around ring of four HI/LO entries.
  - Exactly one entry is *complete*: the architectural HI/LO.
  - Each multiply or divide appends an incomplete entry after the newest one.
  - MFHI/MFLO read the newest entry.
  - When k of these instructions commit, the k oldest incomplete entries
    become complete, and only the newest of them is kept.
  - Restore discards every incomplete entry.
  - With three incomplete entries the ring is full, and the MDU's last stage
    holds.
- **LSU (`lsu`).** Two stages.
  - Stage 1 computes the address.
  - Stage 2 accesses memory. A load first searches the store buffer and takes
    the youngest matching store's data (*store-to-load forwarding*). Otherwise
    it reads data memory.
  - A store enters the store buffer and completes through the L bus.
  - If the buffer is full, the store waits in stage 2 (*store-buffer-full
    stall*), and everything behind it waits too.
- **Store buffer (`store_buffer`).** Ten entries in program order, each marked
  committed or not.
  - Commit marks the oldest uncommitted entries.
  - The oldest committed entry is written to data memory only when LSU stage 2
    holds no load or store. The one exception is a store-buffer-full stall,
    where the buffer drains so the stall can end.
  - Restore drops all uncommitted entries.
  Memory therefore only ever holds committed stores.

## Write-back (`writeback`)

Five units can present a result in the same cycle:

- MDU (MFHI/MFLO);
- ALU0 and ALU1;
- BJU (links);
- LSU (loads).

There are two CDBs. `writeback` sorts the waiting results by age (`reo − CC`)
and gives the buses to the two oldest. A unit that loses keeps its result in
its last stage and stalls behind it. This is counted as CDB contention.

A CDB write does three things:

- writes the VB;
- sets the Valid bit;
- wakes the matching operands in the stations and in dispatch.

## Fetch, branch prediction and the instruction memory

**Four-bank instruction memory (`icache`).** Word *i* of the memory lives in
bank *i* mod 4. For a PC that is not a multiple of four words, the banks below
the starting bank read the next row: this is the *DI* index-increment logic. A
rotation network then puts the four words back in program order. There are no
misses.

**Group formation (`fetch`).** A small pre-decoder finds the first branch or
jump in the group and looks it up in the BTB and BPB. The prediction is
*taken* when the BTB hits and the BPB counter's upper bit is set. The group is
then cut:

- A branch in the fourth slot is dropped and fetched again next cycle, so a
  branch and its delay slot always travel together.
- A branch predicted taken keeps its delay slot and nothing after it. The PC
  loads the BTB target.
- A branch predicted not taken keeps the following instructions up to, but not
  including, the next branch. Only one prediction is made per cycle.

In a cycle where commit writes the BTB, fetch produces nothing. That cycle is
counted as a fetch stall.

**BTB and BPB (`btb`, `bpb`).** Each has 64 direct-mapped entries indexed by
PC bits [7:2]:

- The BTB is tagged with the rest of the PC.
- The BPB holds 2-bit saturating counters. Reset sets them to not taken.
- Both are written only at commit, so wrong-path branches never train them.

**Decoder (`decoder`).** Decodes one MIPS-I word into:

- the unit code and operation;
- the ROB code;
- the destination and source registers;
- the immediate.

The all-zero word and any write to R0 count as NOPs. They are dropped before
the ROB.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| FW | 4 | fetch, issue and commit width |
| NPREG | 64 | VB locations (6-bit pseudo-pointers) |
| ROB_DEPTH | 64 | reorder-buffer entries |
| RS_ENTRIES | 4 | entries per station, 5 stations |
| NUM_CDB | 2 | common data buses |
| SB_DEPTH | 10 | store-buffer entries |
| HILO depth | 4 | speculative HI/LO entries |
| BTB/BPB entries | 64 | direct-mapped |
| IMEM_WORDS / DMEM_WORDS | 1024 | instruction and data memory, addressed by bits [11:2] |
| RESET_PC | 0x80000400 | first fetch address |

The first six rows and the reset PC are the original design's numbers. The HILO
depth, the predictor sizes and the memory sizes are this implementation's
choices.

The two benchmark programs used to evaluate the design fit these defaults
with room to spare:

- a bubble sort of a five-word array kept on the stack near 0x801FFFD0;
- a squared-series sum over i = 0..25 using MULT/MFLO.

The versions in `tb/tb_workloads.sv` need 65 and 19 instruction words, and 12
and 4 stack words.

## Where this implementation departs from the original design

- **Timing.** The original reads and writes IP, the VB, the ROB and the status
  bits on opposite clock edges. Here everything is clocked on the rising edge.
  Same-cycle results reach their readers through forwarding: VB and Valid
  bits from the CDBs.
- **Where groups are cut.** The original cancels the slots after a
  predicted-taken branch, and a branch in the fourth slot, in the decode stage.
  Here the same rules are applied in fetch, so the next PC is known in the
  same cycle. The instructions that reach decode are the same.
- **Dispatch.** The original dispatch controller uses a counter and
  subtractor pipeline. Here a combinational selector picks, per station, the
  first undispatched slot. The behaviour is the same: one instruction per
  station per cycle, and the group is held until all are written.
- **Age.** The original takes `CC − reo` and selects the largest value. This
  design takes `reo − CC` and selects the smallest. Both order the same
  instructions the same way.
- **Branch prediction.** The original calls its predictor a two-bit
  correlating scheme without giving a history length. Here each branch has its
  own 2-bit saturating counter. The BTB is one direct-mapped lookup of the
  first branch rather than a four-bank structure.
- **MDU station.** It issues in order, like the LSU station. The original does
  not say how HI/LO dependences are tracked.
- **Store buffer.** It also drains during a store-buffer-full stall, which
  would otherwise never end.
- **Not built:**
  - exceptions and coprocessor 0 (only the CP0 unit code exists, and the
    decoder never produces it);
  - byte and halfword loads and stores;
  - unaligned accesses;
  - overflow traps;
  - the rest of MIPS-I outside the listed instructions (for example
    syscall/break and the MT/MF moves other than MFHI/MFLO).
- **Memories.** Instruction and data memory are plain arrays with no misses.
  The program is written in through the `imem_*` port while reset is held.

## Verification

Every module has its own self-checking testbench in `tb/`. Each one:

- drives random or directed stimulus;
- compares against a reference model written separately in the testbench;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

Examples of what they cover:

- the prioritizer against a linear search;
- SOW/DOW against a sequential rename model;
- the ROB and commit logic against queue models, including restore and the
  one-branch rule;
- the stations' oldest-first issue and CDB snooping;
- store-buffer forwarding and drain order;
- the four-bank memory for every start alignment;
- fetch group cutting against a slot-by-slot model.

`tb_superscalar_core` runs the whole core at its default sizes on a MIPS
program built with the encoders in `tb/mips_asm_pkg.sv`. The program contains:

- a squared-series-sum loop using MULT/MFLO;
- a store followed by a load of the same address;
- a JAL/JR call;
- a burst of twelve stores;
- a long multiply chain at the ROB head that lets the ROB and the VB fill up.

The testbench compares memory and the committed registers with values it
computes itself. It also counts each mechanism:

- restores and mispredictions;
- VR stalls, ROB stalls and dispatch stalls;
- CDB contention;
- store-buffer-full stalls and store forwarding;
- bypasses, SOW, DOW and BTB writes.

A mechanism that never happens counts as a failure. The run commits about 1.4
instructions per cycle.

`tb_workloads` runs the two benchmark programs on the default-size core. Both
are hand-written in compiler style with a small start routine, so cycle counts
are comparable only roughly to figures for compiled code.

| Program | Result | Cycles | Committed | IPC | Mispredicted / branches |
|---|---|---|---|---|---|
| Bubble sort of {3, 16, 4, 670, 59}, descending, then a check routine | 670, 59, 16, 4, then 1 ("sorted") in the last slot | 269 | 219 | 0.81 | 15 / 55 |
| Squared-series sum, i = 0..25 | 5525 | 134 | 167 | 1.25 | 6 / 29 |

The bubble sort has a loop-carried dependence through memory, so its IPC is
lower. The series sum's iterations are independent, and it overlaps them.

The mapping tables, status bits and VB depend on the sizes in `rr_pkg`. To
change the machine's size, edit that package.

## Simulating

All files are plain SystemVerilog. The package must come first:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/rr_pkg.sv tb/mips_asm_pkg.sv rtl/*.sv tb/tb_superscalar_core.sv \
    --top-module tb_superscalar_core
./obj_dir/Vtb_superscalar_core
```

For a single block, give its testbench and the RTL it uses, for example:

```
verilator --binary --timing -Irtl rtl/rr_pkg.sv rtl/store_buffer.sv tb/tb_store_buffer.sv --top-module tb_store_buffer
```

`tb/mips_asm_pkg.sv` has small functions that encode MIPS instructions. Use
them to write new programs for the core.
