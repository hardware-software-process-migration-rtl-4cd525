# An execution cache for RTL simulation: Real Machines with process migration

A cycle-based RTL simulator runs a design under test as many small
concurrent processes. Each process is invoked once per simulation cycle
(simcycle) and computes its outputs from its inputs. This design speeds up
such a simulator by treating a block of programmable logic as an *execution
cache*. The processes that run most are migrated out of software into small
hardware processors, called **Real Machines (RMs)**. There they run in parallel
and can exchange values on chip. Idle processes stay in software, in simple
**virtual machines (VMs)** on the host processor. A VM and an RM run the same
code, the **Common Instruction Set (CIS)**, so a process can move in either
direction between simcycles by copying its state.

This repository holds the hardware side:

* 35 RMs, each a two-cycle-per-instruction processor built from distributed
  (LUT) RAM;
* the slave registers that connect the RMs to the host's software;
* a neighbour-to-neighbour hardware link between RMs;
* simcycle control;
* an activity monitor that can skip a process whose inputs did not change;
* a state window used for migration;
* an On-chip Peripheral Bus (OPB) slave port.

The host software (VMs, simulator loop, migration policy) is not part of the
RTL. The testbenches include a CIS interpreter that plays that role.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/rm_pkg.sv` | package | word sizes, opcodes, instruction layout, state-space codes |
| `rtl/rm_lutram.sv` | `rm_lutram` | distributed RAM: 1 synchronous write, 2 asynchronous reads |
| `rtl/rm_regfile.sv` | `rm_regfile` | 8x16 register file with the I/O aliases |
| `rtl/rm_exec_unit.sv` | `rm_exec_unit` | controller and ALU: FETCH/EXEC, two cycles per instruction |
| `rtl/rm_core.sv` | `rm_core` | one RM: execution unit, program memory, data memory, register file, migration port |
| `rtl/rm_array.sv` | `rm_array` | N_RM RMs, slave registers, connectivity, simcycle control, register map |
| `rtl/opb_rm_slave.sv` | `opb_rm_slave` | OPB slave: address decode and acknowledge |
| `rtl/rtr_sim_top.sv` | `rtr_sim_top` | top: OPB slave plus RM array |
| `tb/cis_pkg.sv` | package | CIS assembler helpers, reference interpreter, sort program |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_eot_workload` |

## The Real Machine

An RM holds one process. Its whole state lives in three small distributed
RAMs:

| Memory | Size | Written by |
|---|---|---|
| program memory | 32 x 16 bit | migration only |
| data memory | 32 x 16 bit | the process (`ST`) and migration |
| register file | 8 x 16 bit | the process and migration |

Distributed RAM is used instead of flip-flops for a reason. In the FPGA this
design targets, the RAM contents of a single RM can be replaced on their own,
while flip-flop state can only be restored for the whole device at once.

There is no other architectural state. Every invocation starts at program
address 0 and ends at `HALT`, so between simcycles the program counter is
always 0. Moving a process therefore means copying exactly these 72 words.
The controller's few flip-flops (state, PC, instruction register, operand
latch) are empty between invocations. The flip-flop copy of the output is
kept equal to r5 by every write, migration writes included.

### Two cycles per instruction

The execution unit is not pipelined. Each instruction takes two clock cycles:

| Cycle | Program memory | Register read port | Other |
|---|---|---|---|
| FETCH | read at PC into IR | `rs`, addressed straight from the program-memory output, into latch A | |
| EXEC | | `rt`, or `rd` for a store | ALU result written to `rd`; data memory read or written at A + offset; PC <- PC+1 or branch target |

The RAMs read asynchronously and write on the clock edge. This schedule
therefore needs only one register read port and one write port. There are
no data hazards: a result written at the end of EXEC is in the RAM when the
next FETCH reads it.

An invocation of N instructions, `HALT` included, raises `done` exactly
2·N cycles after the clock edge that took `start`. `busy` is high in
between. `start` is only accepted when the RM is idle, and an assertion
checks this.

### Register aliases

Eight 16-bit registers, with some of them doubling as the process's ports:

| Register | Use |
|---|---|
| r0-r4 | general purpose |
| r5 | the output. Every write also loads the flip-flop that drives `out`. |
| r6 | reads input 0. A write goes to the RAM (and migrates) but is not visible to reads. |
| r7 | reads input 1 (same rule as r6) |

Which registers are aliased, and the flip-flop copy of r5, are choices of
this design.

### The instruction set (CIS)

The instructions are 16 bits wide: `[15:12]` opcode, `[11:9]` rd,
`[8:6]` rs, `[5:3]` rt. The opcodes and the encoding are this design's own:

| Op | Mnemonic | Effect |
|---|---|---|
| 0 | `HALT` | end of this invocation |
| 1-5 | `ADD SUB AND OR XOR rd,rs,rt` | rd = rs op rt (mod 2^16) |
| 6 | `SLTU rd,rs,rt` | rd = (rs < rt, unsigned) ? 1 : 0 |
| 7 | `LDI rd,imm8` | rd = sign-extended `[7:0]` |
| 8 | `LD rd,off(rs)` | rd = dmem[rs + `[4:0]`] (mod 32) |
| 9 | `ST rd,off(rs)` | dmem[rs + `[4:0]`] = rd |
| A / B | `BZ / BNZ rs,tgt` | if rs == 0 / != 0: PC = `[4:0]` |
| C | `JMP tgt` | PC = `[4:0]` |
| D / E | `MOV / NOT rd,rs` | rd = rs / ~rs |
| F | `NOP` | |

`tb/cis_pkg.sv` holds the assembler helpers (`enc_r`, `enc_i`, `enc_ldi`).
It also holds a reference interpreter, `run_invocation`, which is the
executable definition of these rules.

## Simcycles and connectivity

This is the part that is easiest to get wrong. One simcycle runs like this:

1. The host writes the input slave registers of the RMs that use software
   connectivity. It also runs its own software processes.
2. The host writes `CTRL` = 1. On that clock edge, each input whose
   hardware-connectivity bit is set is loaded from the neighbouring RM's
   output. Every *active* RM is started.
3. The RMs run to `HALT`, each at its own pace. One cycle after the last
   active RM's `done`, `running` falls and `simcycle_done` pulses for one
   cycle. The simcycle counter then increments.
4. The host reads the outputs it needs.

Inputs are captured only at the start (step 2). So every RM computes from
its neighbours' outputs *of the previous simcycle*, even when a neighbour has
already halted and changed its output. This gives the same result as a
software cycle simulator, whatever order the RMs finish in.

The hardware link is a fixed chain:

* input 0 of RM *i* comes from RM *i*−1;
* input 1 comes from RM *i*+1;
* the missing neighbours at the ends read `16'h0000` (left) and
  `16'hFFFF` (right).

Each input has its own enable bit, so a run can mix hardware-connected RMs
with software-connected ones. The one RM at the boundary has hardware on one
side and software on the other. This chain is what the even-odd
transposition sort used for evaluation needs. A general run-time routing
network is not built.

State and input writes are ignored while a simcycle runs. Migration and
software connectivity happen between simcycles.

## Activity monitoring

If a process's inputs have not changed since its last invocation, its
outputs will not change either, so it need not run. This gives the host
a way to tell busy processes from idle ones.

Setting an RM's CFG.skip bit turns this on for that RM. In step 2 above, the
array compares the inputs it is about to capture with the inputs of the
RM's last *executed* invocation. If they are equal, the RM is not started
and the simcycle does not wait for it. If no RM runs, the simcycle ends one
cycle after it starts.

After the RM's CFG or any of its state words is written, the next simcycle
always runs it. This covers a process that has just migrated in.

Two 32-bit counters per RM, RUNS and SKIPS, record how many invocations ran
and how many were skipped. These are the figures a migration policy needs.

Skipping is only correct for a process whose outputs depend on its inputs
alone. Any state the process carries from one simcycle to the next must
arrive as an input. The sort process used in the tests keeps a phase bit in
its data memory, so it may only use skipping once its values have settled.

## Register map

Byte offsets from `C_BASEADDR` (default `0x7000_0000`, window 1 MiB). All
accesses are 32-bit words; data sits in the low bits. `i` is the RM index,
0 to N_RM−1.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| `0x00000` | CTRL | W | bit 0 = 1: start a simcycle (ignored while one runs) |
| | | R | bit 0: simcycle running |
| `0x00004` | CYCLES | R | completed simcycles |
| `0x00008` | NRM | R | number of RMs |
| `0x40000 + i·0x1000 + 0x0` | IN0 | RW | input 0 of RM i (its r6) |
| `… + 0x4` | IN1 | RW | input 1 (its r7) |
| `… + 0x8` | OUT | R | output of RM i (its r5) |
| `… + 0xC` | CFG | RW | bit 0: hardware connectivity for IN0; bit 1: hardware connectivity for IN1; bit 2: active; bit 3: skip when inputs are unchanged |
| `… + 0x10` | RUNS | R; a write clears it | invocations executed |
| `… + 0x14` | SKIPS | R; a write clears it | invocations skipped by the activity monitor |
| `0x80000 + i·0x1000 + s·0x100 + w·4` | STATE | RW | word w of memory s of RM i (s: 0 program, 1 data, 2 registers) |

Inactive RMs are not started, and the simcycle does not wait for them.
Reading an RM index beyond N_RM returns 0.

## Migration

To migrate a process *in*, write its 32 program words, 32 data words and
8 registers into the STATE window. Then set CFG.active and the connectivity
bits of the RM and of its neighbours. To migrate it *out*, clear
CFG.active and read the 72 words back. The process resumes in software from
exactly that state: `tb_rtr_sim_top` compares it with a reference run.

In the FPGA implementation this design follows, this copy went through the
device's configuration port, as partial reconfiguration of the RM's RAM
frames. Here a plain register window replaces that path. The state being
moved is the same; the time it takes is not.

## OPB slave timing

| Cycle | `OPB_select` | Address | Action |
|---|---|---|---|
| 1 | high | in the window | a write is performed at the clock edge; a read captures the register |
| 2 | | | `Sl_xferAck` high; `Sl_DBus` carries read data |

* `Sl_DBus` is zero whenever the slave is not acknowledging.
* `Sl_errAck`, `Sl_retry` and `Sl_toutSup` are tied low.
* Byte enables are not used.
* A new transfer may follow in the cycle after the acknowledge.
* An assertion checks that the acknowledge only answers a selected transfer.

## Parameters and size

| Parameter | Default | Where |
|---|---|---|
| `N_RM` | 35 | `rtr_sim_top`, `rm_array` |
| `C_BASEADDR` | `32'h7000_0000` | `rtr_sim_top`, `opb_rm_slave` |
| `WORD`, `NREGS`, `PMEM_DEPTH`, `DMEM_DEPTH` | 16, 8, 32, 32 | `rm_pkg` |

35 RMs is the number that fit the original device after floorplanning.
Coarse synthesis of the default top gives:

* about 6,000 word-level cells;
* about 2,100 flip-flop bits;
* 48,768 memory bits. Of these, 40,320 are the RMs' own RAMs (1,152 per RM).
  Synthesis also maps some per-RM register arrays of `rm_array` (slave
  registers, monitor state) to memories.

All logic is in one clock domain. `rst` is synchronous and active high. It
clears the controllers, slave registers, configuration bits and counters,
but not the RAM contents, which are state written before use.

## Departures from the original system

Taken from the original system:

* the execution-cache and migration concept;
* 35 RMs;
* 16-bit instructions, eight 16-bit registers with I/O aliases;
* 32x16 program and data memories in distributed RAM;
* non-pipelined execution at two cycles per instruction;
* slave registers on the OPB for software connectivity;
* direct RM-to-RM links for hardware connectivity;
* the even-odd transposition sort as the workload.

This design's own choices:

* the CIS opcodes and encoding;
* which registers are aliased;
* the flip-flop copy of the output;
* input capture at the start of a simcycle;
* the neighbour-chain link and its edge constants;
* the register map and the active bit;
* the skip enable, the forced first run and the counters of the activity
  monitor (the rule itself, skip a process whose inputs did not change, is
  the original's);
* the OPB slave's timing;
* the direct state window used for migration, in place of configuration
  frames.

Not in this RTL:

* the host processor and its software (simulator, VMs, migration policy);
* the DDR memory controller and the bus itself;
* the FPGA configuration port and the controller that moves configuration
  frames through it, with its frame caching;
* run-time routing of hardware connectivity;
* compiling CIS to native code;
* RMs tailored to the instructions a process actually uses (every RM here
  implements the whole instruction set).

The speedup model the original work fits to its measurements
(`T(r) = C(t_o + r·t_r + [P−r]·t_v) + r·M·t_m`) describes the whole
processor-plus-FPGA system. This RTL alone cannot reproduce it.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rm_pkg.sv tb/cis_pkg.sv tb/tb_rtr_sim_top.sv -o sim
./obj_dir/sim
```

Give the two packages first. Verilator finds every other module in `rtl/`
and `tb/` by its file name. Replace `tb_rtr_sim_top` with any testbench in
the table below.

| Testbench | What it shows |
|---|---|
| `tb_rm_lutram` | both read ports, read-before-write at the edge |
| `tb_rm_regfile` | I/O aliases, output copy, migration read port |
| `tb_rm_exec_unit` | random programs with forward branches, and loops, against the interpreter; `done` at exactly 2·N cycles |
| `tb_rm_core` | migration in, one invocation, migration out, against the interpreter; writes ignored while busy |
| `tb_rm_array` | six-RM sort with hardware, mixed and software connectivity, checked every simcycle; simcycle length = 2·(longest invocation)+1; skipping of unchanged inputs with its counters and forced run after migration; inactive RMs; register readback |
| `tb_opb_rm_slave` | acknowledge timing, read data, one write strobe per transfer, misses ignored |
| `tb_rtr_sim_top` | full size (35 RMs), over the bus. All in software, then 24 RMs (mixed), then 35, one process migrated out and back in; 40 simcycles checked against the interpreter; then 4 simcycles with skipping on. Counts every mechanism. |
| `tb_eot_workload` | full size: C = 35 with r = 0, 24, 30, 34, 35 (hardware links) and 24, 35 (software links); C = 1024 and 10240 with 35 RMs |

With 35 RMs and hardware links, one sort simcycle takes 19-23 clock cycles:
two cycles for each instruction of the slowest process, plus one. The
host's polling over the bus adds a few cycles on top.
