// tb_mips_multicycle_wait: end-to-end test of the whole CPU with a slow
// memory (2 wait states per access), so that every fetch, load and store
// stalls the control unit.
//
// It runs the same hand-stepped walk-through and the same three programs as
// tb_mips_multicycle (shared body in mips_system_tb.svh), against the same
// instruction-level reference model. The expected clock count is the
// single-clock count plus 2 per memory access; the stall clocks measured
// between instr_done pulses must equal 2 per access, and at least one
// instruction must have stalled. Memory size stays at its default.
module tb_mips_multicycle_wait;
  import mips_pkg::*;
  localparam int unsigned WORDS = 4096;
  localparam int unsigned WAITS = 2;

`include "mips_system_tb.svh"

  mips_multicycle #(.MEM_WAIT_STATES(WAITS)) dut (.*);
endmodule
