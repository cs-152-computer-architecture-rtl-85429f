# A five-stage interlocked pipeline with precise exceptions

This is a classic in-order RISC pipeline (IF, ID, EX, MA, WB) that handles every hazard in
hardware, without forwarding and without software-visible delay slots:

* **data hazards** are resolved by an *interlock*: an instruction in ID waits until every older
  instruction that writes one of its source registers has left WB;
* **control hazards** are resolved by *killing* wrong-path instructions: jumps are recognised in
  ID (one lost slot), conditional branches are resolved in EX (two lost slots when taken), or
  optionally in ID with a second zero test (one lost slot, `BRANCH_IN_ID=1`);
* **exceptions and interrupts** are *precise*: each instruction carries its exception flag down
  the pipe, and nothing happens until it reaches the commit point in MA. There, Cause and EPC
  are written, all younger work is thrown away and fetch restarts at the handler.

The instruction set is a small MIPS-I subset (32-bit words, 32 registers), chosen so the design
runs real code and can be checked against an instruction-level model.

## Pipeline at a glance

| Stage | Holds | Does | Can raise |
|---|---|---|---|
| IF | `PC` | reads instruction memory; next-PC mux | misaligned PC |
| ID | `IR_D`, `PC_D` | decode, register read, interlock, J/JAL/JR/JALR redirect | illegal opcode, SYSCALL |
| EX | `IR_E`, A, B | ALU; BEQZ/BNEZ test and target; link value PC+4 | overflow (ADD, ADDI, SUB) |
| MA | `IR_M`, Y | data memory; **commit point**; Cause/EPC/Status; interrupts injected | misaligned load/store, privileged op in user mode |
| WB | | register write | |

Every stage register carries a valid bit. A *bubble* is the all-zero instruction (a no-op) with the
valid bit cleared; the IR muxes of ID and EX select a bubble instead of the incoming instruction
when it must be killed or held back.

With no hazards, one instruction completes per cycle. Costs:

| Event | Bubbles | Why |
|---|---|---|
| J, JAL, JR, JALR | 1 | target known at the end of ID; the instruction fetched behind the jump is killed |
| taken BEQZ/BNEZ | 2 (1 with `BRANCH_IN_ID=1`) | resolved in EX; the instructions in IF and ID are killed |
| not-taken branch | 0 | fetch simply continued at PC+4 |
| read-after-write | up to 3 | consumer waits in ID while the producer is in EX, MA, WB |
| exception | 3 killed + handler refill | handler fetched the cycle after the faulting instruction is in MA |

## The interlock

`hazard_unit` computes, for the instruction in ID,

```
stall = ( (rs_D==ws_E)&we_E | (rs_D==ws_M)&we_M | (rs_D==ws_W)&we_W ) & re1_D
      | ( (rt_D==ws_E)&we_E | (rt_D==ws_M)&we_M | (rt_D==ws_W)&we_W ) & re2_D
  and not (taken BEQZ/BNEZ in EX)
```

`re1`/`re2` say whether the instruction really reads `rs`/`rt` (the decoder knows: LUI reads
neither, a store reads both), `we`/`ws` whether and where an older instruction writes. Writes to
r0 are dropped in the decoder, so r0 never causes a stall. The WB term is needed because the
register file has no write-through path: a value written at the end of WB is read in the next
cycle.

While stalled, PC and `IR_D` hold and a bubble goes into EX. The stall is cancelled when the
branch in EX is taken: the instruction waiting in ID is on the wrong path and is being killed, so
holding it would only delay the branch target. A load followed directly by its consumer costs
three cycles like any other producer, since there is no bypass.

## Control flow: the PC and IR muxes

`pc_ctrl` drives the next-PC mux (`pc_select`) and the two IR muxes. The older instruction always
wins:

1. exception at the commit point: PC := handler, bubbles into ID, EX, MA and WB;
   RFE at the commit point: PC := EPC, bubbles into ID, EX, MA;
2. taken branch in EX: PC := branch target, bubbles into ID and EX;
3. stall: PC and ID hold, bubble into EX;
4. J/JAL in ID: PC := {(PC_D+4)[31:28], index, 00}; JR/JALR in ID: PC := rs value;
   a bubble replaces the instruction being fetched;
5. otherwise PC := PC+4.

A jump in ID that is stalled (JR waiting for its register) does not redirect until the stall
clears, because the PC register is not loaded while stalled. The branch target is
`PC+4+4*offset`, so "100: BEQZ +200" (offset field 50) goes to 304.

With `BRANCH_IN_ID=1` a second `branch_unit` sits on the register-file output in ID. A taken
BEQZ/BNEZ then behaves exactly like J/JAL (priority 4, one bubble), and the branch unit in EX is
disabled. Because there is no bypass, a branch in ID simply waits for its register through the
normal interlock, and the stall-cancel term never fires. The default (0) is the EX-stage
organisation described above.

## Precise exceptions and interrupts

Each pipeline register carries an exception flag `{valid, code}` next to the instruction. A
stage only sets the flag if it is still clear, so for one instruction the earliest stage's cause
wins. An instruction whose flag is set does nothing else as it moves down (it reads and writes no
register and does not redirect fetch).

`exc_unit` sits at MA. For the valid instruction there it decides, in order of priority:

1. an enabled, unmasked interrupt request (injected here, overriding everything);
2. the carried flag (IF, ID or EX cause);
3. a privileged instruction (MFC0, MTC0, RFE) in user mode;
4. a misaligned load or store address.

If any applies, at the next clock edge: EPC := PC of that instruction (PC+4 for SYSCALL, which
counts as completed), Cause := code, Status saves IE/UM and enters kernel mode with interrupts
off, the instruction in MA does not reach WB, the ones in IF, ID, EX become bubbles, and the PC
loads `HANDLER_PC`. Because only the instruction in MA can write memory or the coprocessor
registers, and only WB writes GPRs, nothing younger has changed state: all instructions before
EPC have completed and none after it has. An interrupt is taken only while MA holds a real
instruction, so EPC always names one.

RFE is an indirect jump to EPC executed at the commit point; it also restores IE/UM from the
saved pair. MFC0 reads Status, Cause or EPC in MA, MTC0 writes Status or EPC at commit.

| Register | Bits |
|---|---|
| Status (12) | `[0]` IE, `[1]` UM (1 = user), `[2]` saved IE, `[3]` saved UM, `[15:8]` interrupt mask |
| Cause (13) | `[6:2]` code, `[15:8]` pending (masked) request lines, `[18:16]` line taken |
| EPC (14) | restart PC |

Codes: 0 interrupt, 4 misaligned fetch or load, 5 misaligned store, 8 SYSCALL, 10 illegal
opcode, 11 privileged instruction in user mode, 12 overflow. Eight request lines come in on
`irq`; line 0 has the highest priority. A device must hold its line until the interrupt is
taken; the handler learns the line from Cause.

## Instruction set

Encoding follows MIPS-I. BEQZ and BNEZ use the BEQ/BNE opcodes and test only `rs`.

| Class | Instructions |
|---|---|
| register | ADD, SUB (trap on overflow), AND, OR, XOR, SLT |
| immediate | ADDI (trap on overflow), SLTI, ANDI, ORI, XORI, LUI |
| memory | LW, SW (word only) |
| control | BEQZ, BNEZ, J, JAL (link r31), JR, JALR (link rd); no delay slots |
| system | SYSCALL, MFC0, MTC0, RFE (COP0 function 0x10) |

Any other encoding raises the illegal-opcode exception. The all-zero word is the no-op.

## Files

| File | Role |
|---|---|
| `rtl/pipe5_pkg.sv` | opcodes, exception codes, `ctrl_t`, `exc_t`, `pc_src_t` |
| `rtl/pipe5_cpu.sv` | top: stage registers and wiring |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories (arrays) |
| `rtl/regfile.sv` | 32 x 32 register file, 2 read / 1 write |
| `rtl/decoder.sv` | ID decode and illegal-opcode detection |
| `rtl/hazard_unit.sv` | interlock |
| `rtl/pc_ctrl.sv`, `rtl/pc_select.sv` | PC/IR mux control and next-PC mux |
| `rtl/alu.sv`, `rtl/branch_unit.sv` | EX datapath |
| `rtl/exc_unit.sv`, `rtl/irq_prio.sv` | commit-point exception logic, interrupt priority |

## Top-level interface

Parameters of `pipe5_cpu`: `IMEM_WORDS` and `DMEM_WORDS` (1024 each), `RESET_PC` (0),
`HANDLER_PC` (0x100), `BRANCH_IN_ID` (0: branches resolved in EX; 1: in ID).

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (clears PC, pipeline, GPRs, Status) |
| `irq[7:0]` | in | interrupt request lines |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | program load port (byte address, one word per cycle) |
| `rt_valid`, `rt_pc`, `rt_we`, `rt_ws`, `rt_wd` | out | instruction completing in WB and its register write |
| `exc_take`, `exc_cause`, `exc_epc` | out | exception being taken this cycle (applied at the next edge) |
| `stall`, `br_taken`, `jump_d`, `rfe_take` | out | control events, for observation |

Data memory has no external port; a testbench can preload `u_dmem.mem` hierarchically.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pipe5_pkg.sv tb/tb_pipe5_cpu.sv \
          --top-module tb_pipe5_cpu -o sim && ./obj_dir/sim
```

* `tb_pipe5_cpu` runs the top at its default parameters against an independent
  instruction-set model in the testbench. A directed program checks the cycle costs above; twelve
  random programs (forward branches and jumps, loads and stores, every exception class, a final
  switch to user mode) run with randomly raised interrupts. Every retired instruction and every
  exception is compared with the model, and the final registers and memory too. It fails unless
  stalls, taken branches, jumps, RFE, interrupts and every exception code all occurred.
* `tb_pipe5_diagrams` checks stage occupancy cycle by cycle for three classic sequences at
  addresses 096 to 108: straight-line code, a taken `BEQZ +200` to 304, and an overflowing ADD
  whose handler is fetched the cycle after it reaches MA.
* `tb_pipe5_branch_id` is the same test with `BRANCH_IN_ID=1`; it expects a taken branch to
  cost one bubble instead of two.
* `tb_pipe5_diagrams_id` checks stage occupancy with `BRANCH_IN_ID=1`: a taken `BEQZ +200` at
  100 fetches 304 one cycle earlier than in EX mode, and its diagram is identical to that of a
  `J 304` at the same address.
* The unit testbenches check each block against values computed in the testbench. The decoder
  and the commit-point unit also run 20000 random inputs each against small reference models
  (a table-driven decode; a model of Status, Cause and EPC).

## Design choices and limits

Taken from the pipeline's description: the stage structure; the interlock equation and its
cancellation by a taken branch; jumps in ID and branches in EX with the priority of the older
instruction; exception sources per stage, flags carried to a commit point in MA, interrupts
injected there with top priority, Cause/EPC update, kill of all stages and the writeback, handler
PC injection; EPC, disabling interrupts and kernel mode on entry; RFE re-enabling interrupts and
restoring user mode; a move from EPC to a GPR; SYSCALL as a completed instruction.

Chosen here: the MIPS-I encoding and instruction subset; 32-bit data and 32 registers; memory sizes;
reset PC 0 and handler address 0x100; the valid-bit bubble; the Status and Cause layouts, the
interrupt mask and the fixed line priority; offering branch resolution in ID as a parameter; taking interrupts only on a valid MA instruction;
checking privilege at commit rather than in ID; RFE and MTC0 acting at the commit point; word-only
memory accesses; the program load port.

Not built:

* **bypassing** — the interlock equation above is the no-bypass machine; adding forwarding
  would change both the datapath and the stall terms;
* **branch delay slots** — a different instruction-set contract; restarting a delay-slot
  instruction that faults would need extra EPC state that is not part of this design;
* **virtual-memory exceptions** (page faults, TLB misses, protection) and **FPU exceptions** —
  there is no MMU or FPU; only misaligned addresses raise address exceptions;
* byte and halfword loads and stores, shifts, multiply/divide.
