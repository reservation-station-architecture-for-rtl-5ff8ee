# A mutable functional unit with its own reservation station

A superscalar core with a fixed set of functional units fits some programs
badly. On an R10000-style machine (two integer ALUs, one load/store unit, an
FP adder and an FP multiply/divide unit), integer programs leave the FP adder idle
while their integer instructions wait for an ALU. This design turns the FP
adder into a **mutable functional unit (MFU)**. The MFU can also act as a
64-bit integer adder, logic unit and shifter, and as an address generator. It
gets its own small **in-order reservation station (RS-MFU)**. A **steering
logic** at dispatch decides which instructions go there:

* every FP addition;
* while no FP additions are around, a share of the integer and memory
  instructions.

Switching the MFU between FP and integer work ("mutation") costs a few
cycles. The steering therefore tries to keep the MFU in one mode for long
stretches.

The SystemVerilog here is the out-of-order back end of such a core. It runs
from rename to commit, is synthesizable, and is parameterised with the
sizes of the published organisation:

* 4-wide dispatch and a 64-entry reorder buffer;
* a 16-entry integer station and a 16-entry address station;
* an 8-entry RS-MFU, with the FP station cut from 16 to 8 entries. The total
  station area is therefore unchanged.

## Block diagram

```
 decoded group (4 uops/cycle)
        |
        +--> rob_rename ------ tags, operand values/readiness ----+
        +--> steering_logic -- station choice, dispatch prefix ---+
                                                                  v
   Int RS (16, ooo)    Address RS (16, in order)   RS-MFU (8, in order)   FP RS (8, ooo)
     |        |               |                          |                     |
   ALU1     ALU2             LSU + data memory          MFU                  FPU2
  add/sub  add/sub            load/store            FP add/sub           FP mul, div,
  logic    logic                                    int add/sub, logic,  square root
  shift    multiply,                                shift, address gen.
           divide
     |        |               |                     |       |      |         |
     +--------+---------------+---------------------+-------+      |         |
     |        six result buses (ALU1, ALU2, LSU, MFU-int, MFU-fp, FPU2) ------+
     |        -> wake waiting operands in all stations, complete ROB entries
     |
     |                MFU address bus (tag, address) -> Address RS
```

| File | Module | Role |
|---|---|---|
| `rtl/mfu_pkg.sv` | package | Instruction set (`op_e`), `uop_t`, `rs_entry_t`, result/address bus types, counters, opcode helper functions |
| `rtl/fp64_pkg.sv` | package | Double-precision add/sub and multiply functions |
| `rtl/mfu_core.sv` | top | Wires everything; event counters |
| `rtl/steering_logic.sv` | | RS-MFU steering and dispatch prefix |
| `rtl/rob_rename.sv` | | ROB renaming, completion, in-order commit |
| `rtl/arch_regfile.sv` | | 32 x 64 committed register file (int and FP instances) |
| `rtl/rs_ooo.sv` | | Out-of-order station (Int RS, FP RS) |
| `rtl/rs_inorder.sv` | | In-order station (RS-MFU, Address RS) |
| `rtl/mfu.sv` | | Mutable functional unit with mutation timing |
| `rtl/int_alu.sv` | | ALU1 / ALU2 (ALU2 also multiplies and divides) |
| `rtl/fpu2.sv` | | FP multiply, divide, square root |
| `rtl/lsu.sv` | | Load/store unit with a flat data memory |

## Steering: who goes to RS-MFU

The steering logic keeps two counters:

* `Cfp`, a saturating counter that measures recent demand for FP-add
  bandwidth;
* `Crr`, a signed round-robin counter.

The instructions of a dispatch group are handled one after another, in
program order. Each instruction sees the counters left by the one before it.

```
if FP add/sub:
    -> RS-MFU
    Cfp = min(Cfp + CFP_INC, CFP_MAX)
else:
    Cfp = max(Cfp - 1, 0)
    if Cfp == 0 and the MFU can run it (int add/sub/logic/shift, load, store):
        Crr = Crr + 1
        if Crr >= N_CHUNK: Crr = Crr - 4*N_CHUNK
        if Crr >= 0: -> RS-MFU
    otherwise -> its ordinary station
```

With the defaults (`CFP_MAX` = 16, `CFP_INC` = 4, `N_CHUNK` = 4), this works
as follows:

* One FP add keeps integer work away from the MFU for the next three
  instructions. Further FP adds extend this, to at most fifteen.
* In a stretch without FP adds, Crr cycles through 0..3 and then -12..-1.
  Four instructions go to RS-MFU and the next twelve go elsewhere, in turn.
  The MFU thus takes about a quarter of the integer/memory stream, next to
  ALU1, ALU2 and the LSU.

Integer multiplies and divides, and FP multiplies, divides and square roots never go to
RS-MFU. They do count
down Cfp but do not advance Crr.

Cases the rule alone does not settle. Each outcome below is this design's
choice:

* **RS-MFU full, integer or memory instruction.** It goes to its ordinary
  station instead. This counts as a *redirect*.
* **RS-MFU full, FP add.** Dispatch stops at the FP add, because no other unit
  can add floating point. The FP add and the rest of the group are presented
  again next cycle.
* **ROB or ordinary station full.** Dispatch stops there. The core always
  accepts a *prefix* of the group (`n_accept`).
* **Counter updates.** The counters change only for dispatched instructions,
  so a stalled group is steered the same way when it is retried.

## Memory instructions in RS-MFU

The MFU only computes addresses; it never accesses memory. A load or store
steered to RS-MFU is therefore written into **two** stations:

* RS-MFU, where it waits for its base register like any other instruction;
* the Address RS, with the flag `agen_ext` set and its base operand marked
  "waiting for tag = my own ROB tag".

When the MFU issues the instruction, it computes base + offset and drives
the **MFU address bus** one cycle later, tagged with the instruction's ROB
tag. Only Address RS entries with `agen_ext` listen to this bus. The entry
captures the address as its base operand, and the LSU uses that operand as
the address without adding the offset again. A store's data operand still
comes from the ordinary result buses. The RS-MFU copy is gone once it issues;
the Address RS copy stays until the LSU performs the access.

The Address RS issues in order. Loads and stores therefore reach memory in
program order, even when some of them got their address from the MFU and
others from the LSU's own adder.

## Mutation penalty

Switching the MFU from FP addition to integer addition must wait for the FP
pipeline to drain. The published maximum penalties are:

| Current | Next | After next | Extra cycles |
|---|---|---|---|
| Logic / Add | FP add | FP add | 0 |
| Shift | FP add | FP add | 1 |
| FP add | Logic | not Add | 0 |
| FP add | Logic | Add | 1 |
| FP add | Shift | any integer | 1 |
| FP add | Add | any integer | 2 |

`mfu.sv` reproduces the whole table with two small saturating counters:
cycles since the last FP add and cycles since the last shift. Each
operation class must wait a minimum issue distance:

| Operation | Must issue at least | i.e. bubbles |
|---|---|---|
| integer add/sub, address generation | 3 cycles after an FP add | 2 |
| shift | 2 cycles after an FP add | 1 |
| logic | 1 cycle after an FP add | 0 |
| FP add | 2 cycles after a shift | 1 |

Two consequences:

* In "FP add, logic, add", the add is still one cycle short and pays one
  bubble.
* A pipeline that has drained on its own costs nothing.

The MFU reports `in_ready` for the operation at the RS-MFU head. A waiting
head counts as a *mutation stall*. Because RS-MFU is in order, the
instructions behind it wait too.

The MFU's FP add takes two cycles and its integer operations and address
generation take one. The published penalty is a pipeline drain of two
cycles, so a two-stage FP adder is the natural match. The integer path is a
separate 64-bit unit in this RTL: the mutation is modelled in timing, not as
a shared, reconfigured datapath.

## Rename, stations and commit

Renaming uses the reorder buffer, with no separate physical register file.
An instruction's ROB index is its tag. A source operand is resolved in this
order:

1. an older instruction in the same group;
2. the ROB entry named by the rename table, if that entry is still to
   write the register. The value is taken if the entry is done, or if its
   result is on a bus this cycle;
3. the committed register file.

Immediates and unused operands are delivered as ready values.

Stations capture results from the buses at the clock edge. An operand woken
in cycle t can issue in cycle t+1. The out-of-order stations pick the
lowest-numbered ready entry for each port:

* Int RS port 0 feeds ALU1 and cannot multiply or divide.
* Int RS port 1 feeds ALU2 and cannot shift.

Up to four done instructions commit per cycle, in order. Every unit has a
fixed latency and its own result bus, so no arbitration is needed. All units
are pipelined except FPU2's divide and square root and ALU2's integer
divide. While one of those runs, the unit lowers its ready signal and its
station holds back that port (`port_rdy`). This keeps another result from
reaching the unit's bus in the same cycle as the divide result. While ALU2
divides, ALU1 still takes integer work.

Latencies in cycles, from issue to result on the bus:

| Unit | Latency |
|---|---|
| ALU1, ALU2 (including multiply) | 1 |
| ALU2 integer divide | 66 (ALU2 takes nothing else meanwhile) |
| MFU integer/address | 1 |
| MFU FP add | 2 |
| FPU2 multiply | 2 |
| FPU2 divide, square root | 57 (FPU2 takes nothing else meanwhile) |
| LSU load | 1 |

## What is modelled and what is not

Follows the published organisation:

* The unit mix and the station structure.
* In-order RS-MFU and double dispatch of memory instructions.
* The steering algorithm and its parameters.
* The full mutation-penalty table.
* The 64-entry ROB with 32 + 32 registers.
* 4-wide dispatch.
* The 8 + 8 station split.

Not modelled:

* Fetch, decode and the instruction encoding: the core takes decoded uops
  (`uop_t`).
* Branches and the bimodal predictor.
* The caches. The LSU has a flat 32 KB memory with the 1-cycle L1 hit time:
  no misses and no L2.

There are no exceptions. Every dispatched instruction commits, which is why
the LSU can write stores at issue.

Choices of this design where the organisation leaves things open:

* the instruction set and encoding (`mfu_pkg`);
* the in-order Address RS. Otherwise memory disambiguation would be needed;
* the station select policy;
* the latencies of units other than the MFU's integer path, and the
  divide and square-root algorithms;
* the single-cycle multiply;
* the dispatch-stall and redirect rules above.

Floating point is IEEE double with round-to-nearest-even, with three
simplifications:

* subnormals are flushed to zero;
* every NaN becomes the single quiet NaN `0x7FF8_0000_0000_0000`;
* there are no exception flags.

## Configuration

`mfu_core` parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 4 | dispatch width |
| `ROB_N` | 64 | reorder buffer entries |
| `INT_RS_N` | 16 | integer station entries |
| `ADDR_RS_N` | 16 | address station entries (power of two) |
| `MFU_RS_N` | 8 | RS-MFU entries (power of two) |
| `FP_RS_N` | 8 | FP station entries |
| `CFP_MAX` | 16 | FP demand counter saturation |
| `CFP_INC` | 4 | FP demand counter step per FP add |
| `N_CHUNK` | 4 | round-robin chunk size |
| `DMEM_WORDS` | 4096 | data memory words (power of two) |

The other configurations of the size study are parameter settings of the same
RTL:

* `MFU_RS_N` = 16, 8 or 4;
* each with `FP_RS_N` = 16.

The `stats` output counts:

* cycles and committed instructions;
* integer/memory instructions and FP adds steered to RS-MFU;
* redirects;
* cycles with RS-MFU full;
* mutations and mutation-stall cycles;
* addresses sent by the MFU;
* dispatch stall cycles;
* cycles where both ALUs issue;
* cycles FPU2 is busy with a divide or square root;
* cycles ALU2 is busy with an integer divide.

From these counters you can read the IPC, the share of cycles RS-MFU is
full, and the instructions per mutation.

## Simulating

Every block has a self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog. Example
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/mfu_pkg.sv rtl/fp64_pkg.sv -y rtl +libext+.sv \
    tb/tb_mfu_core.sv --top-module tb_mfu_core -o sim
obj_dir/sim
```

| Test bench | What it checks |
|---|---|
| `tb_mfu_core` | End to end, with all defaults. A 1500-instruction random program alternates integer-only and FP-add-heavy stretches. Every register and data word is compared with a sequential reference model. Each mechanism must occur at least once: MFU taking integer work, MFU address generation, RS-MFU full, redirect, mutation, mutation stall, dispatch stall, both ALUs issuing together, FPU2 busy with a divide or square root, and ALU2 busy with an integer divide. |
| `tb_rsmfu_sizes` | Four cores side by side on one program: 8/8 and 16/16, 8/16, 4/16 (RS-MFU / FP RS). Checks each final state against the model. Reports IPC, % of cycles RS-MFU is full, and instructions per mutation. Checks that a smaller RS-MFU is full at least as often as a larger one. |
| `tb_steering_logic` | The 4-in-16 round robin, the Cfp hold-off after an FP add, and the full-RS-MFU rules. Also 3000 random groups against a model of the algorithm. |
| `tb_mfu` | Integer, FP add and address results, each with its latency. Every row of the mutation-penalty table, bubble for bubble. |
| `tb_rs_inorder`, `tb_rs_ooo` | Random traffic against queue/pool models: wakeup values, issue order, port capabilities, free counts. |
| `tb_rob_rename` | Random dependent integer code with out-of-order completion. The final architectural state must equal a sequential run, and the 4-per-cycle commit must be reached. |
| `tb_fpu2` | Pipelined multiplies, then divides and square roots, including zeros, infinities, NaN and negative roots. All are bit-compared with the simulator's IEEE double arithmetic. Latency and busy time are checked. |
| `tb_arch_regfile`, `tb_int_alu`, `tb_lsu` | Unit-level results against references. Latency is checked every cycle. `tb_int_alu` also checks signed divides, including division by zero (result all ones) and the most negative number divided by -1 (result unchanged), and that ALU2 is busy while dividing. |

The end-to-end programs are synthetic instruction mixes, not real
benchmarks. A typical run of `tb_mfu_core` gives an IPC of about 1.5.

## Changing it

* **Steering policy.** The policy is contained in `steering_logic.sv`. The
  core only needs its `accept`/`to_mfu`/`to_home` masks.
* **Another operation for the MFU.**
  1. Extend `mfu_class` in `mfu_pkg`.
  2. Give the operation a penalty class in `mfu.sv`.
  3. Let the steering treat it as MFU-eligible.
* **A new unit.** Add a result bus: raise `NUM_BUSES` and add a `BUS_*`
  index. Every station and the ROB listen to all buses.
