# A task-switching processor for 5G layer-2 bookkeeping

In a 5G modem, the PDCP and RLC layers of the user plane do a lot of small
work for every packet. They track sequence numbers and release windows,
check headers, and tell the memory manager which buffers can be freed. Most
of the data lives in dedicated hardware blocks around the processor. What
is left for the processor is short bursts of control code. These bursts
wait for the SoC again and again.

This design is a small application-specific processor (ASIP) for that job.
It makes such code cheap in three ways:

- **State in registers.** The state the firmware works on sits in
  application-specific registers (ASRs) inside the core, not in memory. The
  core has one PDCP entity register of 170 bits, for example.
- **Work as single instructions.** Dedicated instructions do one
  protocol step each, in one cycle.
- **Waiting costs almost nothing.** Main loops need no branch at all.
  Switching between firmware tasks is done in hardware, in two cycles. When
  nothing is ready, the core sleeps until the SoC raises an IO event.

The core is a 32-bit, four-stage in-order pipeline. It uses AHB-Lite for
its single program-and-data memory. A 320-bit full-duplex command port
connects it to the SoC.

```
             io_ready[15:0]                soc_busy  soc_rdata[319:0]
                  |                           |          |
   +--------------v---------------------------v----------v-----------+
   | asip_core                                                        |
   |  FE ----> ID ----> EX ----> WB         ctx_sched   (tasks 0..7)  |
   |  |hw_loop  gpr_file alu     gpr_file   exc_unit    (error flags) |
   |  |                  soc_port ...       pdcp_unit   (PDCP entity) |
   +--+---------------------------------------------------------------+
      | AHB-Lite (HADDR/HTRANS/HWRITE/HSIZE/HWDATA/HRDATA/HREADY)
   +--v-----------+
   | ahb_sram     |  1024 x 32 bit, program + data, optional wait states
   +--------------+                       asip_top
```

## Files

| File | Contents |
|---|---|
| `rtl/asip_pkg.sv` | Widths, opcodes, register map, SoC command codes, entity field positions, and instruction-building functions |
| `rtl/asip_top.sv` | Core plus memory; SoC port and IO events as plain ports |
| `rtl/asip_core.sv` | The pipeline, and the glue for the units below |
| `rtl/alu.sv` | Base-ISA arithmetic, logic, compares and conditional moves |
| `rtl/gpr_file.sv` | 32 general purpose registers, 2 read ports, 1 write port, write-through |
| `rtl/hw_loop.sv` | Main loop per task, and one counted nested loop |
| `rtl/ctx_sched.sv` | Task scheduler: wait, park, priority pick, sleep |
| `rtl/exc_unit.sv` | Error flag bitmap, ExceptionHandler, JumpIfNoError |
| `rtl/pdcp_unit.sv` | PDCP entity register, SetReleaseFlag update, entity check |
| `rtl/fu_entity_check.sv` | A combinational functional unit with six status bits |
| `rtl/soc_port.sv` | SoC command port: one-cycle writes, two-cycle reads, busy |
| `rtl/ahb_sram.sv` | AHB-Lite memory with an optional wait-state count |

## The pipeline

| Stage | Work |
|---|---|
| **FE** | Puts the PC on the bus. Chooses the next PC. The choices, by priority: a redirect from EX (jump, exception, task switch); a loop start when the fetched address is a loop end; otherwise PC+4. |
| **ID** | Takes the instruction from the bus data phase, or from a holding register after a stall or task switch. Decodes it and reads general purpose registers. |
| **EX** | ALU work, jump decisions, the address phase of loads and stores, SoC commands, and every application-specific unit. Instructions read ASRs here. Base instructions write ASRs here too. |
| **WB** | Writes ALU results and load data to general purpose registers. Data answering a SoC read is written to its ASR here. |

Data reaches the instruction that needs it as follows:

- **From EX and WB:** a result held in WB, whether from the ALU or a load,
  is forwarded to the instruction in EX.
- **Two instructions later:** the register file writes through, so an
  instruction two behind the producer reads the new value directly.
- **ASRs:** they are read and written in EX, so back-to-back use needs no
  forwarding. The only exception is SoC read data, which reaches EX through
  a bypass inside `pdcp_unit`.

Instructions and data share one bus. A load or store takes the bus for one
cycle, and fetch waits for it.

Costs as built (all checked by the testbenches):

| Event | Cycles |
|---|---|
| Any instruction, no stall | 1 |
| Load or store (fetch waits one cycle for the shared bus) | 2 |
| Taken jump (resolved in EX, redirect registered) | 3 |
| Loop back by the hardware loop | 0 extra |
| `wait` that keeps the running task | 1 |
| `wait` that switches task (EX idles once) | 2 |
| SoC write command | 1 |
| SoC read command | 1 in EX; the data arrives as the instruction passes WB |
| SoC busy | EX holds the SoC instruction until busy drops |
| Memory wait state (HREADY low) | The whole pipeline freezes for the cycle |

## Instructions

### Encoding

One 32-bit word per instruction:

| Bits | Field |
|---|---|
| 31:25 | opcode |
| 24:18 | rd |
| 17:11 | rs1 |
| 10:4 | rs2 |
| 15:0 | imm16 (overlaps rs1 and rs2) |
| 10:0 | addi immediate, signed |

Register fields are 7 bits wide, so every instruction can name an ASR as
well as a general purpose register (see the register map).

### Base instructions

The base set has 33 instructions. Opcode numbers are in `asip_pkg`.

| Group | Instructions |
|---|---|
| System | `nop`, `halt` |
| Moves | `movsi` (sign-extended imm16), `movhi` (imm16 to the upper half, lower half kept), `movz rd,rs1,rs2` / `movnz` (rd = rs2 if rs1 is zero / non-zero) |
| Arithmetic | `addi`, `add`, `sub`, `and`, `or`, `xor`, `sll`, `srl`, `sra` (shift by rs2[4:0]) |
| Compare (result 1/0) | `eq`, `neq`, `slt`, `ult`, `sle`, `ule` |
| Memory | `ld`, `ldhu`, `ldhs`, `ldbu`, `ldbs`: address in rs1. `st`, `sth`, `stb`: address in rd, data in rs1. |
| Jumps | `jump imm`, `call imm` (r4 = PC+4), `jumpz rd,imm` and `jumpnz rd,imm` (test rd) |

Jump targets are absolute byte addresses. Loads write only general purpose
registers.

### Application-specific instructions

| Opcode | Name | Operands | Effect |
|---|---|---|---|
| 64 | `hwloop` | rs1 = start, rs2 = end | Sets the running task's main loop |
| 65 | ExceptionHandler | none | If any error flag is set, jumps to r35 |
| 66 | JumpIfNoError | imm16 | No flag set: jumps to imm. Otherwise falls through and copies the flags to r55. |
| 67 | `wait` | imm[3:0] = IO event | Context switch point (see below) |
| 68 | SetReleaseFlag | none | Advances the entity's release pointer. Sends the GetReleaseFlag read carrying the updated entity. Stores returned bit 0 in r33. |
| 69 | load entity | rs1, rs2 | SoC read (command 2) carrying {rs2, rs1}. The answer replaces the entity register. |
| 70 | deallocate SDU | rs1 | SoC write (command 3) carrying rs1 |
| 71 | entity check | rs1 | Runs `fu_entity_check`. Stores its six bits in r62. Bit 4 raises error flag 0. |

The functions `mk_r`, `mk_i` and `mk_addi` in `asip_pkg` build instruction
words. `tb/asip_fw_pkg.sv` shows a complete three-task firmware written
with them.

## Register map

Every ASR has an index, so ordinary instructions can read and change it.
For example, `add r5, r33, r0` copies the release flag, and
`movsi r52, 0` clears the error flags.

| Index | Register |
|---|---|
| r0..r31 | General purpose registers (r4 is the `call` link register) |
| r32 | Current task (read only) |
| r33 | Release flag |
| r34 | Nested loop counter |
| r35 | Exception handler address |
| r36..r43 | Main loop start, task 0..7 |
| r44..r51 | Main loop end, task 0..7 (0 = no loop) |
| r52 | Error flags |
| r53, r54 | Nested loop start, end |
| r55 | Exception cause (flags as JumpIfNoError found them) |
| r56..r61 | PDCP entity, 32-bit chunks, lowest bits first (170 bits) |
| r62 | Entity check status bits (read only) |
| r64..r71 | Saved PC, task 0..7 |
| r72..r79 | Saved instruction, task 0..7 |
| r80..r87 | IO status, task 0..7: bit 4 = parked, bits 3:0 = event |

## Hardware loops

Every task has one main loop. `hwloop` writes its start and end into r36+t
and r44+t; plain register writes work too. Each fetch compares the PC with
the running task's loop end. On a match, the next fetch comes from the loop
start, so the loop closes with no jump and no lost cycle.

The nested loop is shared by all tasks. It has a start (r53), an end (r54)
and a counter (r34). When the end is fetched and the counter is not zero,
the fetch goes back to the start and the counter is decremented. A count of
N therefore runs the body N+1 times. This costs nothing per pass. A
decrement plus a taken `jumpnz` would cost four cycles per pass.

Two rules for firmware:

1. **Write loop registers early.** They are written in EX, but fetch runs
   two instructions ahead. Write them at least three instructions before the
   loop's last instruction.
2. **Leave a nested loop by running out its count.** The counter is
   decremented when the loop end is *fetched*. So if a jump leaves the loop
   just before its end, the discarded fetch still takes one count.

## Tasks, `wait` and the context switch

The firmware is a set of tasks numbered 0..7; task 0 has the highest
priority. Each task sits in its main loop and waits for IO from the SoC.
The SoC reports a 16-bit `io_ready` vector every cycle, one bit per IO
event. Reaching a `wait e` instruction in EX triggers a decision. The
scheduler looks at all tasks at once:

- **The running task is ready** if `io_ready[e]` is set.
- **Any other task is ready** if it is parked (IO status bit 4) and the
  event it is parked on is set.

The lowest-numbered ready task wins:

- **Winner is the running task:** execution continues. The wait cost one
  cycle.
- **Winner is another task:** the running task is parked. Its fetch PC, the
  instruction already in ID, and the event `e` go into its saved PC, saved
  instruction and IO status registers. In the same cycle, the winner's
  saved PC goes to FE and its saved instruction to the ID holding register.
  Its parked bit is cleared. EX idles for one cycle, so the switch costs two
  cycles in all. No general purpose registers are saved: tasks share the
  register file and use separate registers by convention.
- **No task is ready:** the core sleeps. The wait stays in EX (`sleeping`
  is high) and the decision repeats every cycle until an event arrives.

The scheduler only ever switches at a `wait`. There is no preemption.

**Starting a task.** Write its entry address into its saved PC register
(r64+t). Write `0x10 | e` into its IO status (r80+t). The saved
instruction is zero after reset, which is a `nop`. When event `e` comes up,
the task starts at its entry after that `nop`.

**Acknowledging an event.** The SoC clears its `io_ready` bit when the
event has been dealt with. In the test environment, this happens on the
"deallocate SDU" command that names the event.

## Errors and exception jumps

Data-processing instructions report problems by setting bits in the error
bitmap r52. Today only the entity check does this, using bit 0. The bits
stay set until firmware writes r52.

The usual pattern in a task's main loop is:

```
  entity-check  r7        ; may set error flag 0
  JumpIfNoError ok        ; fast path: no flags, jump (3 cycles)
  ExceptionHandler        ; flags set: jump to the routine at r35
ok:
  ...
```

The handler finds the flags in r55 (copied by the failing JumpIfNoError).
It clears r52 and jumps back into the loop.

## The PDCP entity, SetReleaseFlag and the SoC port

The entity register holds one PDCP entity, 170 bits. Three 18-bit fields
have fixed places:

| Field | Bits |
|---|---|
| RcRelNext (release pointer) | 137:120 |
| WinMask (window mask) | 119:102 |
| RcTxNext (transmit pointer) | 101:84 |

The other bits are carried along unchanged.

SetReleaseFlag computes `RcRelNext = (RcRelNext + 1) & WinMask` in EX. It
sends the GetReleaseFlag read with the updated entity on the write port in
the same cycle. The SoC's answer arrives one cycle later, as the
instruction passes WB, and bit 0 goes to r33. Reads in EX see the incoming
value in that same WB cycle. This includes an entity being loaded just
ahead of a SetReleaseFlag, so `load entity` followed directly by
SetReleaseFlag works.

The entity check unit (`fu_entity_check`) derives six bits from three 2-bit
values a, b, c and three 18-bit values x, y, z:

| Bit | Meaning |
|---|---|
| f0 | a ≠ 1 |
| f1 | b ≠ c |
| f2 | x ≠ y |
| f3 | x[7:0] = 0 and (y[17:8] ≠ z[17:8] or y = z) |
| f4 | f0 or f1 or f2 |
| f5 | f4 or f3 |

The inputs come from the instruction's register and the entity:

- a, b, c are rs1[1:0], rs1[3:2] and rs1[5:4];
- z is rs1[31:14];
- x is RcRelNext and y is RcTxNext.

### SoC port protocol

In the cycle of a command:

- `soc_strobe` is high;
- `soc_opcode` gives the command: 1 GetReleaseFlag, 2 load entity,
  3 deallocate SDU;
- `soc_wdata` carries 320 bits;
- `soc_read` marks a read. For a read, the SoC must drive `soc_rdata` in
  the next cycle.

While `soc_busy` is high, no command goes out and the instruction waits in
EX. If a memory wait state freezes the core in the cycle the read data
arrives, the port captures the data, so the SoC still only has to hold it
for one cycle.

## Memory

`ahb_sram` is an AHB-Lite slave of `WORDS` 32-bit words (default 1024). It
supports byte, halfword and word transfers, which must be aligned (an
assertion checks this). `WAIT` inserts that many wait states into every
transfer; the core freezes through them. Firmware is written into the
`mem` array before reset is released. Nothing in the RTL loads it.

Top-level parameters are `MEM_WORDS` (1024) and `MEM_WAIT` (0).

## Verification

Each unit has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`, ends with `$finish`, and has a watchdog.

| Testbench | What it runs |
|---|---|
| `alu_tb`, `gpr_file_tb`, `fu_entity_check_tb` | Random and corner values against reference models |
| `hw_loop_tb` | Per-task main loops, the nested counter, same-cycle redirect |
| `ctx_sched_tb` | Random event patterns against a priority model; counts stay, switch and sleep |
| `exc_unit_tb`, `pdcp_unit_tb`, `soc_port_tb` | Flag logic, entity updates and bypass, port timing with busy and freeze |
| `ahb_sram_tb` | All transfer sizes with 0 and 2 wait states, exact wait-state count |
| `asip_core_tb` | Every base instruction, forwarding, sub-word loads and stores, jump cost (3), load/store cost (2), zero-cost main loop, 4 nested passes back to back; on zero-wait and one-wait memory |
| `asip_top_tb` | End to end, three-task firmware, twice: default parameters, and `MEM_WAIT=1` |
| `asip_top_full_tb` | The same run with the top at its default parameters only |
| `asip_task_round_tb` | A release task's round (wait, load entity, SetReleaseFlag, entity check, exception check, deallocate): 8 cycles without an exception, 13 through the handler |

The end-to-end runs use helpers in `tb/`:

- **`soc_env`** models the SoC. Busy is random. It returns random entities
  and release flags, and checks that the entity sent with GetReleaseFlag
  is the loaded one, advanced correctly. It raises IO events in this
  order: header checks alone, releases alone, both together (priority
  decides), then the end event.
- **`asip_probe`** counts each mechanism. Every count must be non-zero or
  the run fails. The mechanisms are: SoC-busy stall, sleep, context switch,
  wait without switch, main-loop return, nested-loop return, exception
  taken, JumpIfNoError taken and not taken, operand forwarding, entity
  bypass, data bus access, taken jump, and SoC command. With `MEM_WAIT=1`,
  memory wait states and read data held through one are also counted. The
  probe also checks the two-cycle switch and the one-cycle wait on every
  occurrence.

To run a testbench with Verilator, give the packages first and let `-y`
find the modules:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb --top-module asip_top_tb \
          rtl/asip_pkg.sv tb/asip_fw_pkg.sv tb/asip_top_tb.sv
./obj_dir/Vasip_top_tb
```

Unit testbenches need only `rtl/asip_pkg.sv` and the testbench file. Every
run takes well under a second.

## Where this design fills in or departs from its reference

The reference description gives the pipeline, the costs, the scheduling
scheme, the loop and exception ideas, one functional unit and the
SetReleaseFlag update. Everything else had to be decided here:

- **Encoding and operands.** The binary encoding, opcode numbers, register
  count (32) and the register map are this design's own. Only r36 and r52
  are given: r36 is task 0's loop start, r52 the error flags. The same
  holds for the operands of all application-specific instructions except
  SetReleaseFlag.
- **Byte loads.** The reference instruction table swaps the descriptions
  of `ldbu` and `ldbs`. Here the `u` form is unsigned, matching `ldhu` and
  `ldhs`.
- **`movsi` and `movhi`.** These are described only as loading the low or
  the high 16 bits. Here `movsi` sign-extends, and `movhi` keeps the low
  half.
- **`call`.** The reference says `call` saves "the current PC". Here it
  saves PC+4, the return address.
- **Entity layout.** The reference keeps bits 169..138 and 121..0 around
  an 18-bit field, which does not add up (16 bits remain). This design
  puts the release pointer at 137:120. The mask and transmit pointer
  positions are this design's choice.
- **Task count.** Seven tasks are planned, but the scheduling text gives
  priorities 0 to 7. The scheduler has eight slots.
- **Port width.** The 320-bit port width comes from the throughput the
  reference assumes for its comparison. The command codes, the tags, the
  busy signal and the 16 IO events are this design's.
- **JumpIfNoError and ExceptionHandler.** These are named but not
  specified. Their behaviour above is a reading of the names and of the
  exception-routine description. The cause register r55 and the handler
  address register r35 are additions.
- **Load entity and entity check.** These two instructions are additions.
  They give SetReleaseFlag and the functional unit real data to work on.
- **Forwarding.** Forwarding from WB and the register file write-through
  are not described. They keep the one-instruction-per-cycle rate that the
  reference assumes.
- **Resumed instruction address.** A resumed task's instruction is taken to
  sit at its saved PC minus 4. Only jump and branch targets depend on this
  address, and none use it.

## What is not here

- **Task instructions.** Around 50 per-task instructions of the full
  firmware are not built: the sequence-number, header and window handling
  of tasks 1 to 7, and the task-switching group. The reference lists them
  only by number. Firmware can reach the same registers and SoC commands
  through the built instructions and the register map.
- **The SoC hardware.** The blocks behind the command port and the IO
  events exist here only as the behavioural model `tb/soc_env.sv`.
- **Published task timings.** The reference's cycle counts for tasks 1 to 3
  (8 to 29 instructions per round, plus 2 cycles per context switch)
  cannot be replayed, since those tasks' instructions are missing. The
  mechanisms those counts rest on are built and checked cycle for cycle:
  CPI 1, the 3-cycle jump, and the 2-cycle switch. The firmware budget
  (about 1000 instructions) fits the 1024-word memory.
