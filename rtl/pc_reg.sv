// pc_reg: the Program Counter, 32 bits, holding the address of the next
// instruction.
//
// The PC is a register with parallel load whose input comes from a
// 1-out-of-4 multiplexer (one input unused) selecting:
//   PC_PLUS4 - an adder whose second input is 1 in bit 2 only (PC + 4);
//   PC_ALU   - the ALU output (taken branches, jr);
//   PC_JUMP  - the 26-bit J-format constant shifted left two places, with
//              bits 31..28 taken from the PC itself (j, jal).
// Because the PC always holds a multiple of 4, bits 1..0 are not stored:
// they are wired to 0, so loading 7 leaves 4 in the PC. All of this follows
// the lecture. Only 30 flip-flops (bits 31..2) exist.
//
// Timing: loads on the falling clock edge when pc_load = 1; synchronous
// reset to RESET_VALUE (address 0, this design's choice).
module pc_reg
  import mips_pkg::*;
#(
  parameter word_t RESET_VALUE = '0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pc_load,
  input  pc_src_e     pc_src,
  input  word_t       alu_out,     // ALU output register
  input  logic [25:0] jtarget,     // IR bits 25..0
  output word_t       pc
);

  logic [31:2]              pc_q;
  logic [3:0][29:0]         sources;

  always_comb begin
    sources[PC_PLUS4] = pc_q + 30'd1;          // + 4, bits 1..0 are zero
    sources[PC_ALU]   = alu_out[31:2];
    sources[PC_JUMP]  = {pc_q[31:28], jtarget};
    sources[3]        = pc_q;                  // unused input: hold
  end

  mux_reg #(.WIDTH(30), .SOURCES(4), .RESET_VALUE(RESET_VALUE[31:2])) u_pc (
    .clk     (clk),
    .rst     (rst),
    .load_en (pc_load),
    .sel     (pc_src),
    .d       (sources),
    .q       (pc_q)
  );

  assign pc = {pc_q, 2'b00};

endmodule
