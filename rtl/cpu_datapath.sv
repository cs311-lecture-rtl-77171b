// cpu_datapath: the ALU, register set and datapaths of the multicycle CPU.
//
// Contains the PC, the IR, the general register set and the ALU, and the
// multiplexers that connect them and the memory, all steered by the control
// word:
//   - memory address: PC or ALU output (mem_addr_src);
//   - memory data in: the register set's rt output (mem_req/mem_we pass the
//     control word's access request and write through);
//   - register set data in: ALU output or memory data out (reg_src);
//   - ALU input A: register[rs] or PC (alu_a_src);
//   - ALU input B: register[rt], the 16-bit constant sign- or zero-extended,
//     or the sign-extended constant times 4 (alu_b_src);
//   - PC input: PC+4, ALU output or the J-format constant (pc_src);
//   - IR input: memory data out.
// The memory connections, the register-set and PC sources follow the
// lecture. The A and B source choices are this design's: the lecture says
// the constant fields of the IR reach the ALU and that the ALU supplies the
// branch target and the jal return address, and the PC input of A and the
// scaled-constant input of B are the simplest way to do that.
//
// Timing: every register changes on the falling clock edge. The outputs
// opcode, func and alu_zero go to the control unit. The ALU's A and B
// register outputs are observation ports of the ALU and are left open here.
module cpu_datapath
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  ctrl_word_t ctrl,
  // memory
  output word_t      mem_addr,
  output word_t      mem_wdata,
  output logic       mem_req,
  output logic       mem_we,
  input  word_t      mem_rdata,
  // status to the control unit
  output logic [5:0] opcode,
  output logic [5:0] func,
  output logic       alu_zero,
  // observation
  output word_t      pc,
  output word_t      ir,
  output word_t      alu_out
);

  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm;
  logic [25:0] jtarget;
  word_t       rs_data, rt_data, a_in, b_in;

  pc_reg u_pc (
    .clk     (clk),
    .rst     (rst),
    .pc_load (ctrl.pc_load),
    .pc_src  (ctrl.pc_src),
    .alu_out (alu_out),
    .jtarget (jtarget),
    .pc      (pc)
  );

  ir_reg u_ir (
    .clk      (clk),
    .rst      (rst),
    .ir_load  (ctrl.ir_load),
    .mem_data (mem_rdata),
    .ir       (ir),
    .opcode   (opcode),
    .rs       (rs),
    .rt       (rt),
    .rd       (rd),
    .shamt    (shamt),
    .func     (func),
    .imm      (imm),
    .jtarget  (jtarget)
  );

  reg_file #(.NREGS(NREGS)) u_regs (
    .clk      (clk),
    .rst      (rst),
    .rs       (rs),
    .rt       (rt),
    .rd       (rd),
    .write_rd (ctrl.reg_write_rd),
    .write_rt (ctrl.reg_write_rt),
    .write_31 (ctrl.reg_write_31),
    .reg_src  (ctrl.reg_src),
    .alu_out  (alu_out),
    .mem_data (mem_rdata),
    .rs_data  (rs_data),
    .rt_data  (rt_data)
  );

  always_comb begin
    a_in = (ctrl.alu_a_src == A_PC) ? pc : rs_data;
    unique case (ctrl.alu_b_src)
      B_RT:      b_in = rt_data;
      B_SEXT:    b_in = {{16{imm[15]}}, imm};
      B_ZEXT:    b_in = {16'h0000, imm};
      B_SEXT_X4: b_in = {{14{imm[15]}}, imm, 2'b00};
      default:   b_in = rt_data;
    endcase
  end

  alu u_alu (
    .clk      (clk),
    .rst      (rst),
    .a_in     (a_in),
    .b_in     (b_in),
    .shamt    (shamt),
    .func     (func),
    .use_func (ctrl.alu_use_func),
    .fn       (ctrl.alu_fn),
    .a_q      (),
    .b_q      (),
    .out      (alu_out),
    .zero     (alu_zero)
  );

  assign mem_addr  = (ctrl.mem_addr_src == MA_ALU) ? alu_out : pc;
  assign mem_wdata = rt_data;
  assign mem_req   = ctrl.mem_req;
  assign mem_we    = ctrl.mem_write;

endmodule
