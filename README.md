# Simplified MIPS processors: single-cycle and multi-cycle

This is a small MIPS subset implemented twice, with the same building blocks:

* a **single-cycle processor**. Each instruction finishes in one long clock
  cycle (CPI = 1), so the clock period must fit the slowest instruction (lw).
  It has separate instruction and data memories.
* a **multi-cycle processor**. Each instruction is split into 3 to 5 short
  steps, one per clock cycle, so simple instructions finish early. One memory
  holds both instructions and data, and one ALU also increments the PC and
  computes branch targets. This processor also handles two exceptions:
  arithmetic overflow and undefined instruction.

The single-cycle processor comes with two interchangeable controllers: a
**logic-based** one (decoded opcode lines ORed into control signals) and a
**ROM-based** one (a 64-word control ROM addressed by the opcode). Both give
the same control signals.

The multi-cycle processor comes with five interchangeable controllers:

* a **hard-wired state machine**: a binary state register plus next-state
  logic;
* the same **hard-wired state machine with one flip-flop per state**: the
  single active bit is passed from flip-flop to flip-flop through gates;
* a **microprogrammed sequencer**: a control ROM of horizontal
  microinstructions addressed by the state, with dispatch ROMs and a +1 adder
  choosing the next address;
* a **vertical microprogrammed sequencer**: the same sequencer, but each
  microinstruction holds four short encoded fields (ALU, memory, register
  write, PC), and one decoder per field produces the control signals;
* a **nano-programmed sequencer**: the same sequencer, but its microprogram
  holds only a 4-bit number per state, and a second small memory (the
  nanoprogram) turns that number into the control signals.

For the same program, all five give the same control signals in every cycle.

All seven processor variants sit side by side in `mips_top`. Each has its own
memories.

## Instruction set

32 general-purpose 32-bit registers. R0 always reads 0. Memory is accessed only
as aligned 32-bit words.

| instruction | format | opcode | operation |
|---|---|---|---|
| add, sub, and, or, slt | R: op rs rt rd sa funct (6/5/5/5/5/6) | 0x00, funct 0x20/0x22/0x24/0x25/0x2A | rd = rs op rt |
| addi | I: op rs rt imm (6/5/5/16) | 0x08 | rt = rs + SignExt(imm) |
| lw | I | 0x23 | rt = Mem[rs + SignExt(imm)] |
| sw | I | 0x2B | Mem[rs + SignExt(imm)] = rt |
| beq | I | 0x04 | if rs == rt: PC = PC+4 + (SignExt(imm) << 2) |
| j | J: op target (6/26) | 0x02 | PC = {(PC+4)[31:28], target, 00} |

The opcode and funct values are the standard MIPS ones. Jump-and-link, jump
register and system instructions are not implemented.

## Single-cycle processor (`sc_cpu`)

In one cycle, the PC addresses the instruction memory and the opcode is
decoded. Then the registers are read, the ALU computes, and for lw the data
memory is read. At the rising edge, the register file, the data memory and the
PC are all written at once. Nothing is read after it is written within the
same cycle, so no extra sequencing is needed.

The next PC is chosen among three values:

* PC + 4, from its own adder;
* the branch target PC + 4 + (offset << 2), from a second adder;
* the jump target.

Parameter `ROM_CTRL` of `sc_cpu` selects the controller. Both are
combinational and produce this table:

* **`sc_control` (ROM_CTRL = 0).** Decodes the opcode into one line per
  instruction. Each control signal is the OR of the lines for which it must
  be 1.
* **`sc_control_rom` (ROM_CTRL = 1).** A 64-word × 9-bit ROM addressed by the
  opcode. Each word holds all control signals of one instruction. The six
  words below are filled in, and all other words are 0.

| | Jump | Branch | RegDst | RegWrite | MemWrite | MemToReg | ALUOp | ALUSrc |
|---|---|---|---|---|---|---|---|---|
| R-type | 0 | 0 | 1 | 1 | 0 | 0 | funct | 1 |
| addi | 0 | 0 | 0 | 1 | 0 | 0 | add | 0 |
| lw | 0 | 0 | 0 | 1 | 0 | 1 | add | 0 |
| sw | 0 | 0 | 0 | 0 | 1 | 0 | add | 0 |
| beq | 0 | 1 | 0 | 0 | 0 | 0 | sub | 1 |
| j | 1 | 0 | 0 | 0 | 0 | 0 | add | 0 |

* `ALUSrc = 1` selects the register operand. `ALUSrc = 0` selects the
  immediate.
* Don't-care entries are driven 0. An unknown opcode writes nothing and
  simply advances the PC.
* This design has no exceptions: an add that overflows wraps around.

## Multi-cycle processor (`mc_cpu`)

Between steps, results are held in the registers IR, A, B, ALUOut and DR.
Because of IR, the PC can be incremented in step 1 without losing the current
instruction.

| step | all / per instruction |
|---|---|
| 1 | IR ← Mem[PC]; PC ← PC + 4 |
| 2 | A ← Reg[rs]; B ← Reg[rt]; ALUOut ← PC + (SignExt(imm) << 2) (branch target, computed just in case) |
| 3 | beq: if A == B then PC ← ALUOut (done) · j: PC ← {PC[31:28], target, 00} (done) · R-type: ALUOut ← A funct B · addi, lw, sw: ALUOut ← A + SignExt(imm) |
| 4 | R-type: Reg[rd] ← ALUOut (done) · addi: Reg[rt] ← ALUOut (done) · sw: Mem[ALUOut] ← B (done) · lw: DR ← Mem[ALUOut] |
| 5 | lw: Reg[rt] ← DR (done) |

Cycles per instruction:

| instruction | cycles |
|---|---|
| beq, j | 3 |
| R-type, addi, sw | 4 |
| lw | 5 |
| undefined-instruction exception | 3 |
| overflow exception | 4 |

The memory must read combinationally and write at the clock edge. `word_mem`
does both.

### Control state machine

These are the states and the signals each state asserts. Signals not listed
are 0. ALUOp is 00 for add, 01 for subtract, and 10 for "use the funct
field". ALUSrcB selects the second ALU operand: 00 is B, 01 is 4, 10 is
SignExt(imm), and 11 is SignExt(imm) << 2. PCSource selects the next PC: 00 is
the ALU result, 01 is ALUOut, 10 is the jump target, and 11 is the exception
vector.

| state | meaning | asserted | next |
|---|---|---|---|
| 0 | fetch | MemRead, IRWrite, IorD=0, ALUSrcA=0, ALUSrcB=01, ALUOp=00, PCWrite, PCSource=00 | 1 |
| 1 | decode, register fetch | ALUSrcA=0, ALUSrcB=11, ALUOp=00 | lw/sw 2, R 6, addi 9, beq 12, j 13, other 14 |
| 2 | memory address | ALUSrcA=1, ALUSrcB=10, ALUOp=00 | lw 3, sw 5 |
| 3 | memory read | MemRead, IorD=1 | 4 |
| 4 | load completion | RegWrite, MemToReg=1, RegDst=0 | 0 |
| 5 | memory write | MemWrite, IorD=1 | 0 |
| 6 | R-type execute | ALUSrcA=1, ALUSrcB=00, ALUOp=10 | overflow ? 15 : 7 |
| 7 | R-type completion | RegDst=1, MemToReg=0, RegWrite | 0 |
| 9 | addi execute | ALUSrcA=1, ALUSrcB=10, ALUOp=00 | overflow ? 15 : 10 |
| 10 | I-type completion | RegDst=0, MemToReg=0, RegWrite | 0 |
| 12 | branch | ALUSrcA=1, ALUSrcB=00, ALUOp=01, PCWriteCond, PCSource=01 | 0 |
| 13 | jump | PCWrite, PCSource=10 | 0 |
| 14 | undefined instruction | ALUSrcA=0, ALUSrcB=01, ALUOp=01, IntCause=0, CauseWrite, EPCWrite, PCSource=11, PCWrite | 0 |
| 15 | arithmetic overflow | as 14, with IntCause=1 | 0 |

States 8 and 11 are unused. If the state register ever holds one of them, the
controller goes to state 0.

The PC is written when `PCWrite` is set, or when `PCWriteCond` is set and the
ALU result is zero.

### Exceptions

The two exception states stop the instruction before it writes anything, and
then:

1. In state 14 or 15, the ALU computes PC − 4. Because PC was already
   incremented in the fetch step, PC − 4 is the address of the faulting
   instruction. It goes into EPC, so a handler can retry or skip that
   instruction.
2. Cause receives 0 for an undefined instruction and 1 for an overflow.
3. The PC jumps to the single handler address `EXC_VECTOR`. By default this is
   `0x8000_0180`, the usual MIPS vector.

Other details:

* Overflow is checked only for add, sub and addi. It is checked at the end of
  the execute state (6 or 9), using the ALU's overflow flag. That is why an
  overflowing instruction never reaches its register-write state.
* An undefined instruction is detected from the opcode alone. An R-type
  instruction with an unknown funct code executes as add.
* The memories wrap around above their size. So with the default 256-word
  memory, the vector `0x8000_0180` lands on word 96. Jumps made from the
  handler keep the upper PC bits `0x8`, and they alias back into the same
  memory.
* EPC and Cause cannot be read by instructions, because no move-from-coprocessor
  instruction exists. They are ports of `mc_cpu` and `mips_top`.

### Five controllers

Parameter `CTRL` of `mc_cpu` selects the controller:

* **`mc_control_fsm` (CTRL_FSM, the default).** A 4-bit state register. The next state
  is computed combinationally from the state, the opcode (Op5..Op0) and the
  ALU overflow flag.
* **`mc_control_onehot` (CTRL_ONEHOT).** The same state machine with 16
  flip-flops, one per state, exactly one of them set. The input of each
  flip-flop is the OR of the transitions into it, each gated by its
  condition (decoded opcode, overflow). A control signal is the OR of the
  flip-flops of the states that assert it, so no state decoder is needed.
  The 4-bit state number is encoded from the flip-flops for observation.
  Reset sets the flip-flop of state 0. There is no recovery if the state ever
  stops being one-hot.
* **`mc_control_useq` (CTRL_MICRO).** The state register is a
  microprogram counter that addresses a control ROM of horizontal
  microinstructions. Each microinstruction holds the raw control signals plus
  `AddrCtl`, the 2-bit choice of the next address:

  | AddrCtl | next address |
  |---|---|
  | 0 | 0 (back to fetch) |
  | 1 | dispatch ROM 1, indexed by opcode (after decode: 2, 6, 9, 12, 13 or 14) |
  | 2 | dispatch ROM 2, indexed by opcode (after state 2: lw 3, sw 5) |
  | 3 | current address + 1 (0→1, 3→4, 6→7, 9→10) |

  The state numbers are laid out so that every straight-line step is a +1.
  The address multiplexer has no input for the overflow flag. An extra
  microinstruction bit, `OvfTrap`, is therefore added: it is set in states 6
  and 9, and it forces address 15 when the ALU overflows.
* **`mc_control_vert` (CTRL_VERT).** Same sequencer, but the control signals
  are stored in encoded form. Each field names one of a few actions that
  never occur together, and a one-hot decoder per field turns it into lines
  that are ORed into the control signals:

  | field | bits | codes |
  |---|---|---|
  | ALU | 3 | 0 idle, 1 PC + 4, 2 PC + (SignExt(imm) << 2), 3 A + SignExt(imm), 4 A funct B, 5 A − B, 6 PC − 4 |
  | memory | 2 | 0 idle, 1 fetch (MemRead, IorD=0, IRWrite), 2 data read, 3 data write |
  | register | 2 | 0 idle, 1 Reg[rt] ← DR, 2 Reg[rd] ← ALUOut, 3 Reg[rt] ← ALUOut |
  | PC | 3 | 0 idle, 1 PC ← ALU, 2 branch, 3 jump, 4 undefined-instruction exception, 5 overflow exception |

  With AddrCtl and OvfTrap a microinstruction is 13 bits, 208 bits in
  total against 352 for the horizontal form. The cost is that only the listed
  combinations can be expressed, and the decoders add delay.
* **`mc_control_nano` (CTRL_NANO).** Same sequencer (AddrCtl, dispatch ROMs,
  OvfTrap). But each microinstruction holds only a 4-bit number instead of
  the 19 control signals. The number indexes a 14-word nanoprogram memory
  that holds the distinct control words. There are 14 because states 2 and 9
  use the same control word, and the unused states 8 and 11 share the
  all-zero word.

  At this size nano-programming does not save space. It needs
  16 × (4 + 3) + 14 × 19 = 378 bits, while the horizontal store needs
  16 × 22 = 352 bits. It pays off only when many microinstructions share few
  combinations. It also adds a second memory read in series.

All controllers take their control words from the same function,
`mips_pkg::mc_state_ctrl`. In the microprogrammed controllers, that function
supplies the contents of the control memories. The ROMs are written as
functions, so no data files are needed.

## Building blocks

| module | function |
|---|---|
| `onehot_decoder` | N-bit binary → 2^N one-hot. Each output is the AND of the inputs, true or inverted according to that output's index. |
| `mux_onehot` | 2^n-input multiplexer built as a one-hot decoder followed by AND-OR. Every datapath multiplexer uses it. |
| `sign_extend` | 16 → 32 bits. |
| `shift_left2` | Wiring that shifts left by 2 (converts a word offset to a byte offset). |
| `adder` | 32-bit adder (PC + 4, branch target). |
| `alu` | add, sub, and, or, slt. Outputs zero, and the signed overflow of add and sub. |
| `alu_control` | Turns ALUOp and funct into an ALU operation. |
| `regfile` | 32×32 registers. Two combinational read ports, one write port written at the clock edge. R0 = 0. Reset to 0. |
| `word_mem` | Word memory. Combinational read, write at the clock edge, plus a load port. |
| `mips_pkg` | Opcodes, funct codes, ALU operation enum, control structs, state enum, state-to-control function. |

## Top level and how a program gets in (`mips_top`)

These ports are shared by all seven processors:

* `clk`
* `rst_n`: active low, synchronous. It sets PC to 0, clears the registers and
  enters the fetch state.

Each memory has a load port, `*_ld_en / *_ld_addr / *_ld_data`, that writes one
word per cycle. It is normally used while `rst_n` is low, and it takes priority
over a processor write in the same cycle. The memories:

* `sc_imem_ld_*` and `sc_dmem_ld_*`: the instruction and data memories of
  the single-cycle processor with the logic-based controller.
* `sr_imem_ld_*` and `sr_dmem_ld_*`: the same for the single-cycle processor
  with the ROM-based controller.
* `mh_ld_*`: the unified memory of the hard-wired multi-cycle processor.
* `mo_ld_*`: the unified memory of the one-flip-flop-per-state multi-cycle
  processor.
* `mu_ld_*`: the unified memory of the microprogrammed multi-cycle processor.
* `mv_ld_*`: the unified memory of the vertical-microprogram multi-cycle
  processor.
* `mn_ld_*`: the unified memory of the nano-programmed multi-cycle processor.

For observation, the top brings out:

* `sc_pc`, `sr_pc`, `mh_pc`, `mo_pc`, `mu_pc`, `mv_pc`, `mn_pc`
* `mh_state`, `mo_state`, `mu_state`, `mv_state`, `mn_state` (controller
  state)
* `*_epc` and `*_cause` of each multi-cycle processor

Cause holds only 0 or 1, so its upper 31 bits are always 0.

Memory contents are not reset. Each memory defaults to 256 words
(parameters `SC_IMEM_WORDS`, `SC_DMEM_WORDS`, `MC_MEM_WORDS`).

## Simulation

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing -Irtl -Itb rtl/mips_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

All testbenches finish in well under a second. What each one checks:

* **Unit testbenches** (`tb_alu`, `tb_regfile`, …) compare each block with
  reference values computed independently.
* **`tb_sc_control` and `tb_sc_control_rom`** check each controller against
  the control table. The ROM one is also compared with the logic one for all
  64 opcodes.
* **`tb_mc_control_fsm`, `tb_mc_control_onehot`, `tb_mc_control_useq`,
  `tb_mc_control_vert` and `tb_mc_control_nano`** walk random opcodes through
  the controller, with and without overflow. They check the order of the
  states, and so the cycle count of every instruction class. They also check
  each state's control word.
* **`tb_sc_cpu`** runs random programs against an instruction-level reference
  model on both single-cycle variants at once. It compares PC and registers
  after every cycle (CPI = 1).
* **`tb_mc_cpu`** runs random programs against an instruction-level reference
  model on all five multi-cycle variants at once. At every instruction boundary it
  compares PC, registers, EPC and Cause, plus the cycle count of each
  instruction. It also checks that the five controllers stay in the same state
  every cycle, and that both exceptions and all instruction kinds occur.
* **`tb_mips_top`** runs `mips_top` at its default sizes on a fixed program:
  an array-sum loop, R-type operations, an overflowing add and an undefined
  opcode. On the single-cycle processors it checks:
  * the loop result;
  * the overflowing add wraps;
  * 62 cycles to the final loop.

  On all five multi-cycle processors it checks:
  * the loop result;
  * the overflowing add traps;
  * EPC and Cause;
  * 259 cycles to the final loop (68 instructions, CPI ≈ 3.8).

  It also checks that the variants of each processor stay in step, and
  that every controller state and both branch outcomes occur.
* **`tb_workload_mix`** runs an instruction mix of 30% loads, 10% stores and
  50% adds, as used in classic single- versus multi-cycle performance
  estimates. The mix's 10% multiplications are left out, since there is no
  multiply instruction. The program is 36 lw, 12 sw and 60 add in random
  order, run on all seven processors. The single-cycle processors need 108
  cycles (CPI 1). The multi-cycle ones need 36 × 5 + 12 × 4 + 60 × 4 = 468
  cycles (CPI 4.33) with a much shorter clock period, since each cycle is only
  one step of an instruction.

## Own choices

These points are not fixed by the design description and were chosen here:

* opcode, funct and state-15 numbering;
* the control values of the fetch and decode states, which are the usual ones
  that carry out steps 1 and 2;
* the exception vector and the Cause encoding;
* where overflow is tested (the end of the execute state), and the `OvfTrap`
  bit the microprogrammed controllers need for it;
* applying vertical microinstructions and nano-programming to this
  controller, the field layout and codes of the vertical form, and the
  numbering of the nanowords;
* reading the single-cycle control ROM without a clock;
* R0 hard-wired to 0, and register reset;
* reset PC = 0;
* memory sizes and the load ports;
* unknown funct codes executing as add;
* an unknown opcode doing nothing on the single-cycle processor;
* the single-cycle controller taking R-type ALU operations from the funct
  field, instead of always adding.

## Not included

* **External interrupts.** They are named as a source of exceptions, but no
  request line, priority or cause code is defined.
* **Other exception sources** such as memory protection faults, system calls
  and hardware failures. Only overflow and undefined instruction are
  detected.
* **Multiplication.** The performance comparisons assume a multiply
  instruction, but none is implemented.
* **Jump-and-link, jump register and system instructions.**
