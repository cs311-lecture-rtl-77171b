// ir_reg: the Instruction Register, 32 bits.
//
// A 32-bit register with parallel load whose input is the memory's data
// output; it is loaded when an instruction is fetched (IR <- M[PC]). Its
// fields are broken out for the units that use them: the opcode for the
// control unit, rs/rt/rd for the register set, shamt and func for the ALU,
// the 16-bit constant for the ALU's B input and the 26-bit constant for the
// PC. The field positions are those of the MIPS I/J/R formats.
//
// Timing: loads on the falling clock edge when ir_load = 1. The synchronous
// reset to 0 is this design's addition.
module ir_reg
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ir_load,
  input  word_t       mem_data,
  output word_t       ir,
  output logic [5:0]  opcode,
  output logic [4:0]  rs,
  output logic [4:0]  rt,
  output logic [4:0]  rd,
  output logic [4:0]  shamt,
  output logic [5:0]  func,
  output logic [15:0] imm,
  output logic [25:0] jtarget
);

  load_reg #(.WIDTH(32)) u_ir (
    .clk     (clk),
    .rst     (rst),
    .load_en (ir_load),
    .d       (mem_data),
    .q       (ir)
  );

  assign opcode  = ir[31:26];
  assign rs      = ir[25:21];
  assign rt      = ir[20:16];
  assign rd      = ir[15:11];
  assign shamt   = ir[10:6];
  assign func    = ir[5:0];
  assign imm     = ir[15:0];
  assign jtarget = ir[25:0];

endmodule
