# A multicycle MIPS-subset CPU at the register-transfer level

This is a small 32-bit CPU that runs a subset of the MIPS instruction set. Every instruction takes
several clocks, and it finishes before the next one starts. The design is a teaching design. Its
purpose is to show how an instruction set maps onto a few registers, multiplexers and an ALU, all
steered by a *control word*. It is not how a real MIPS is built: real MIPS parts are pipelined.

Each clock carries out one or more *microoperations* of the form `destination <- source`, for
example `IR <- M[PC], PC <- PC + 4`. Every microoperation that can happen has a control signal that
enables it. The control unit's only job is to produce, clock by clock, the set of signals for the
current step of the current instruction.

```
             control word (20 bits)
 +---------+ ====================> +----------------------------+  addr   +--------+
 | control |                       |  PC  IR  register set  ALU |-------->|        |
 |  unit   | <-- opcode, func,     |  + multiplexers            |-------->| memory |
 +---------+     ALU zero -------- |                            |<--------|        |
                                   +----------------------------+ data in/out +--------+
```

## Clocking

There is one clock. **Every register changes on the falling edge** (`always_ff @(negedge clk)`).
This includes the PC, the IR, the register set, the three ALU registers, the control state and
memory writes. Reset is synchronous and active high. Testbenches should change inputs near the
rising edge and sample outputs there.

## The building blocks

**Load-enable register (`load_reg`).** Each bit is a D flip-flop that loads on every clock. A 2:1
multiplexer in front of it picks either the flip-flop's own output (hold) or the data input
(load), under Load Enable. The PC and the IR are built from it.

**Register with selectable source (`mux_reg`).** A load-enable register with a 1-of-N multiplexer
on its input. The select bits and the Load Enable are both fields of the control word. The default
configuration (4 bits, 2 sources) is the classic two-input demonstration register. The PC uses it
with four sources.

**Program counter (`pc_reg`).** 32 bits. It is addressed like a byte address, but bits 1..0 are
not stored: they are wired to 0. Loading 7 therefore leaves 4. Its input multiplexer picks:

| `pc_src`   | new PC                                          | used by          |
|------------|-------------------------------------------------|------------------|
| `PC_PLUS4` | PC + 4                                          | every fetch      |
| `PC_ALU`   | ALU output register                             | taken beq/bne, jr |
| `PC_JUMP`  | `{PC[31:28], IR[25:0], 2'b00}`                  | j, jal           |

**Instruction register (`ir_reg`).** 32 bits, loaded from the memory output during fetch. It
breaks the instruction into opcode, rs, rt, rd, shamt, func and the 16- and 26-bit constants.

**Register set (`reg_file`).** 32 registers of 32 bits, with two combinational read ports
selected by the rs and rt fields. Writes go through one data input, chosen from the ALU output or
the memory output. Three decoders make the per-register load enables: one decodes rd, one decodes
rt, and one always selects register 31. Each decoder has its own enable bit in the control word,
and their outputs are ORed for each register. Register 0 has no storage: both read multiplexers
return 0 for it, and writes to it are dropped.

**ALU (`alu`).** Two input registers (A, B) and an output register, all loaded on **every** clock
with no enable. Between them, a combinational network computes every function at once, and a
multiplexer picks one. The function comes either from the control word or, for R-type
instructions, from the IR's func field.

| function | result     | function | result        | function  | result    |
|----------|------------|----------|---------------|-----------|-----------|
| ADD      | A + B      | SLL      | B << shamt    | SLLV      | B << A[4:0] |
| SUB      | A - B      | SRL      | B >> shamt    | SRLV      | B >> A[4:0] |
| AND      | A & B      | SRA      | B >>> shamt   | SRAV      | B >>> A[4:0] |
| OR       | A \| B     | SLT      | A < B, signed | LUI       | B << 16   |
| XOR      | A ^ B      | NOR      | ~(A \| B)     | PASSA     | A         |

All arithmetic is signed: addu/subu/sltu behave like add/sub/slt. An unsupported func code gives
0. The `zero` output (the output register equals 0) is the only status flag, and beq/bne use it.

**Memory (`memory`).** A word array addressed by byte addresses. Bits 1..0 are ignored, and only
the low `log2(WORDS)` word-address bits are decoded, so the space repeats through the 32-bit range.
Reads are combinational and writes happen on the falling edge. With `WAIT_STATES = 0` (the default)
an access completes in the clock in which it is requested, and `ready` is always 1. With
`WAIT_STATES = n`, a request (`req = 1`, held with its address and data) completes in its (n+1)-th
clock. `ready` rises in that clock, and a write takes effect only at that clock's falling edge.

**Datapath (`cpu_datapath`).** This connects the blocks above. Its multiplexers are:

* memory address: PC, or the ALU output;
* memory data in: the rt read port;
* register data in: the ALU output, or the memory output;
* ALU A: register[rs], or the PC;
* ALU B: register[rt], the sign-extended constant, the zero-extended constant, or the
  sign-extended constant times 4.

andi/ori/xori use the zero-extended constant. addi/slti/lui/lw/sw use the sign-extended one.

## How an instruction runs

Because the ALU registers load on every clock, one ALU operation spans three steps. First the
control word selects the A/B sources, and A and B load at the end of that clock. In the next clock
it selects the function, and the output register loads. A third clock uses the result. The
control unit (`control_unit`) is a state machine that does exactly this:

| state   | microoperations                                            |
|---------|------------------------------------------------------------|
| FETCH   | `IR <- M[PC], PC <- PC + 4`                                |
| DECODE  | `A <- reg[rs] or PC, B <- reg[rt] or constant`; j/jal: `PC <- J constant` |
| EXEC    | `Output <- A fn B`                                          |
| WB_RD   | `reg[rd] <- Output` (R-type)                                |
| WB_RT   | `reg[rt] <- Output` (immediate instructions)                |
| WB_31   | `reg[31] <- Output` (jal)                                   |
| MEM_RD  | `reg[rt] <- M[Output]` (lw)                                 |
| MEM_WR  | `M[Output] <- reg[rt]` (sw)                                 |
| WB_PC   | `PC <- Output` (jr)                                         |
| BR_TGT  | `Output <- A + B`, remember whether the previous Output (A-B) was 0 |
| BR_WR   | `PC <- Output` if taken                                     |

Clocks per instruction: **j 2; beq/bne 5; everything else 4**, plus stall clocks on a slow memory.
FETCH, MEM_RD and MEM_WR raise `mem_req` and stay in their state until `mem_ready`. While they
wait, nothing is loaded. In MEM_RD/MEM_WR the ALU keeps recomputing the address from the same
operands, so the ALU output, and with it the memory address, holds steady. Two sequences need a
closer look:

* **jal.** In DECODE, `PC <- J constant` and `A <- PC` happen on the same edge. A therefore gets
  the old PC, which is the return address (PC+4). EXEC passes A through, and WB_31 writes it to
  register 31. There is no delay slot.
* **beq/bne.** DECODE loads A and B with rs and rt. In EXEC the ALU computes A-B. In the same
  clock, the control word already selects `A <- PC` and `B <- 4*offset` for the next step. In
  BR_TGT the output register still holds A-B. The control unit stores "taken" (zero for beq,
  non-zero for bne) in a flip-flop while the ALU forms the target. BR_WR loads the PC if taken.

Supported instructions: add, addu, sub, subu, and, or, xor, nor, slt, sltu, sll, srl, sra, sllv,
srlv, srav, jr, addi, addiu, slti, sltiu, andi, ori, xori, lui, lw, sw, beq, bne, j, jal. Any
other opcode is skipped after DECODE. Not provided: hi/lo, multiply/divide, coprocessors and
floating point, exceptions and interrupts, byte and halfword memory access, and delay slots.

## Top level (`mips_multicycle`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| clk, rst    | in  | 1     | clock (falling-edge active); synchronous reset |
| host_addr   | in  | 32    | memory byte address, used while `rst = 1` |
| host_wdata  | in  | 32    | word to write while `rst = 1` |
| host_we     | in  | 1     | write strobe while `rst = 1` |
| host_rdata  | out | 32    | memory data output (combinational) |
| host_ready  | out | 1     | the memory completes the access in this clock |
| manual_mode | in  | 1     | 1: the datapath takes `manual_ctrl` instead of the control unit's word |
| manual_ctrl | in  | 20    | hand-set control word (`ctrl_word_t`) |
| pc, ir, alu_out | out | 32 | observation |
| instr_done  | out | 1     | high in the last clock of each instruction |

Parameters: `MEM_WORDS = 4096` (16 KiB), `MEM_WAIT_STATES = 0` and `NREGS = 32`. While reset is
held, the memory port belongs to the host port. This lets a program be written and results read
back. With wait states, the host holds `host_we` and its address until `host_ready`. When reset is
released, the CPU fetches from address 0.

**Manual control.** With `manual_mode = 1`, the word on `manual_ctrl` drives the datapath
directly, one step per clock. This is the lecture's way of demonstrating microoperations by
setting the control word by hand. Meanwhile the control unit is held at its fetch step. When
`manual_mode` drops, the control unit starts a new instruction at the current PC. A hand-stepped
instruction must therefore be completed by hand, including its `PC <- PC + 4`, before control is
handed back. `instr_done` stays low in manual mode. A program normally ends in `beq $0,$0,-1`
(`0x1000ffff`), a branch to itself.

## What is and is not taken from the original lecture design

These parts follow the lecture design:

* the register-transfer view and the control-word split;
* the falling-edge clocking;
* the load-enable bit structure, and the multiplexer-selected register sources;
* the PC's three sources, its +4 adder and its wired-zero low bits;
* the IR loaded from memory;
* the register set's two read multiplexers, its ALU/memory input multiplexer, its three decoders
  (rd, rt, 31) and its hard-wired `$0`;
* the ALU's three always-loaded registers and its fifteen functions;
* the memory connections (address from PC or ALU, data in from the register set, data out to the
  register set or the IR).

These are this design's own choices:

* every state sequence except the fetch step and the four-step R-type sequence;
* the branch method, with its stored "taken" bit;
* ALU input A being able to take the PC, and the scaled-constant input of B;
* the zero flag;
* all encodings of the control word;
* reset, the host loading port, and the memory size;
* the req/ready handshake and the wait-state count. The lecture only says a memory access may
  take one clock or stall the CPU;
* the `manual_mode` port. The lecture sets control words by hand in its demonstration, but not
  through a port.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_load_reg`, `tb_mux_reg`: random stimulus against the Load Enable / source-select tables.
* `tb_pc_reg`: all sources. This includes loading 7, which must give 4, and keeping bits 31..28 on
  a jump.
* `tb_ir_reg`: field extraction on known encodings, for example `0x00a62022` = sub $4,$5,$6.
* `tb_reg_file`: all three write decoders, both input sources, and ignored writes to $0. Every
  register is read back through both ports after every write.
* `tb_alu`: all 15 functions and all func codes, against a reference. The result must appear
  exactly two edges after the operands.
* `tb_memory`: random writes and reads, byte-offset and alias addresses. A second instance with 2
  wait states must raise `ready` exactly in the third clock of a request, and write only then.
* `tb_control_unit`: for every instruction class, the clock count, the fetch word, the execute
  function and sources, and the single write at the end. Both branch outcomes are checked for beq
  and bne. With a 2-wait-state ready model, lw, sw and add must take the extra clocks, load
  nothing while waiting, and hold the address selection.
* `tb_cpu_datapath`: the testbench plays the control unit for a short program, including the
  four-step sub, jal, a taken branch and jr to address 7.
* `tb_mips_multicycle`: the whole CPU at default parameters. First the sub walk-through is stepped
  by hand in manual mode and then handed to the control unit. Then programs are loaded through
  the host port:
  1. sub $4,$5,$6 with $5 = 1 and $6 = 2, which gives -1;
  2. the program `8c021000 20420001 ac021000` (lw/addi/sw), which adds 1 to word 0x1000 and
     must take 12 clocks;
  3. a program that covers every instruction, both outcomes of beq and bne, writes to $0, and
     jr to a non-multiple of 4.

  Each program also runs on an instruction-level reference model inside the testbench. The whole
  memory image and the clock count must match. The testbench counts each mechanism and fails if
  one never occurs.
* `tb_mips_multicycle_wait`: the same test (the body is shared in `tb/mips_system_tb.svh`) with
  `MEM_WAIT_STATES = 2`. Each program must take its single-clock count plus 2 clocks per memory
  access, and the measured stall clocks must equal 2 per access.

To run one testbench with plain Verilator (the package first, then search paths for the rest):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_multicycle.sv --top-module tb_mips_multicycle -o sim
./obj_dir/sim
```

The end-to-end test finishes in well under a second of wall time.

## Known limits

* The wait-state memory is a fixed-latency model. There is no cache, and there is no
  variable-latency memory.
* Manual mode does not check the hand-set control word. Any combination is passed to the datapath.
* The two low bits of the PC are dropped silently. An unaligned jr target is not trapped.
* Unsupported opcodes and func codes are not reported. They act as no-ops, or write 0.
