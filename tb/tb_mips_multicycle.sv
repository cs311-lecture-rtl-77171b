// tb_mips_multicycle: end-to-end test of the whole CPU with every parameter
// at its default (single-clock memory of 4096 words).
//
// The test body is shared with tb_mips_multicycle_wait through
// mips_system_tb.svh. First the sub walk-through is stepped by hand: the
// testbench drives the control word itself (manual_mode = 1) for the fetch,
// operand, function and write-back steps of two addi and the sub, then
// hands control to the control unit, which runs the store and the halt
// loop. Then three programs are loaded through the host port while rst = 1, run until
// the CPU reaches the closing "b .-4" loop (beq $0,$0,-1), and their memory
// is read back through the host port:
//   1. sub $4,$5,$6 with $5 = 1 and $6 = 2 (set by addi), result stored;
//   2. the three-instruction program that adds 1 to memory word 0x1000
//      (8c021000 20420001 ac021000), which must take 12 clocks;
//   3. a program that runs every supported instruction: a counting loop
//      (bne taken and not taken), beq taken and not taken, all shifts and
//      logic operations, slt/slti with negative numbers, lui, a write to $0,
//      jal / jr (jr to a non-multiple of 4), j, lw and sw, and finally
//      stores $1..$31 to memory.
// Each program is also run on an instruction-level reference model in this
// testbench; the full memory image and the clock count (j 2, beq/bne 5,
// others 4 clocks) must match. A few results are also checked against
// constants worked out by hand. Every mechanism (each instruction group,
// taken/not-taken branches, the ignored $0 write, the dropped PC low bits)
// is counted from the IR at the end of each instruction, and one that never
// happens counts as a failure. Instruction lengths are measured between
// instr_done pulses; with this single-clock memory no instruction may take
// longer than its base length.
module tb_mips_multicycle;
  import mips_pkg::*;
  localparam int unsigned WORDS = 4096;   // the design's default memory size
  localparam int unsigned WAITS = 0;      // the design's default wait states

`include "mips_system_tb.svh"

  mips_multicycle dut (.*);
endmodule
