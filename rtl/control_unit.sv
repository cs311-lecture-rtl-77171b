// control_unit: hardwired control for the multicycle MIPS-subset CPU.
//
// A state machine that sequences the microoperations of each instruction
// and drives the control word to the datapath. Every instruction starts with
// the fetch step the lecture gives, IR <- M[PC], PC <- PC + 4. The ALU's
// input and output registers load on every clock, so an ALU operation is
// "select A and B sources" in one state and "select the function" in the
// next, with the result in the ALU output register one state later.
//
//   FETCH   IR <- M[PC], PC <- PC + 4
//   DECODE  A <- register[rs] or PC, B <- register[rt] or constant
//           (j: PC <- J constant, done; jal: also PC <- J constant)
//   EXEC    Output <- A fn B   (beq/bne: A-B, while A <- PC, B <- 4*const)
//   then one of
//   WB_RD   register[rd] <- Output                 R-type
//   WB_RT   register[rt] <- Output                 immediate instructions
//   WB_31   register[31] <- Output                 jal (Output = old PC+4)
//   MEM_RD  register[rt] <- M[Output]              lw
//   MEM_WR  M[Output] <- register[rt]              sw
//   WB_PC   PC <- Output                           jr
//   BR_TGT  Output <- A + B (target), remember Output==0 from A-B
//   BR_WR   PC <- Output if taken                  beq/bne
//
// Clocks per instruction: j 2; R-type, immediate, lw, sw, jal, jr 4;
// beq/bne 5, plus every clock the memory holds mem_ready low. FETCH,
// MEM_RD and MEM_WR raise mem_req and wait in place until mem_ready; no
// register or PC loads while they wait (a stall). An unsupported opcode is skipped after DECODE. The state
// sequences are this design's; the lecture gives the fetch step, the
// four-step RTL of an R-type instruction and the set of microoperations the
// datapath offers, and defers the control unit itself.
//
// Timing: state changes on the falling clock edge; synchronous reset to
// FETCH. The control word is a combinational function of the state, the
// IR opcode and the remembered branch decision.
module control_unit
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  input  logic       alu_zero,
  input  logic       mem_ready,    // memory completes the access this clock
  output ctrl_word_t ctrl,
  output logic       instr_done   // last state of an instruction
);

  typedef enum logic [3:0] {
    S_FETCH, S_DECODE, S_EXEC, S_WB_RD, S_WB_RT, S_WB_31,
    S_MEM_RD, S_MEM_WR, S_WB_PC, S_BR_TGT, S_BR_WR
  } state_e;

  state_e state, next_state;
  logic   taken_q;

  logic   is_jr;
  always_comb is_jr = (opcode == OP_RTYPE) && (func == FN_JR);

  // Operand sources per opcode (used in DECODE and EXEC).
  function automatic void operand_sources(input logic [5:0] op,
                                          output alu_a_src_e a,
                                          output alu_b_src_e b);
    a = A_RS;
    b = B_RT;
    unique case (op)
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_LUI, OP_LW, OP_SW: b = B_SEXT;
      OP_ANDI, OP_ORI, OP_XORI:                                 b = B_ZEXT;
      OP_JAL:                                                   a = A_PC;
      default: ;
    endcase
  endfunction

  // Explicit ALU function per opcode (R-type uses the func field).
  function automatic alu_fn_e exec_fn(input logic [5:0] op);
    unique case (op)
      OP_SLTI, OP_SLTIU: return ALU_SLT;
      OP_ANDI:           return ALU_AND;
      OP_ORI:            return ALU_OR;
      OP_XORI:           return ALU_XOR;
      OP_LUI:            return ALU_LUI;
      OP_BEQ, OP_BNE:    return ALU_SUB;
      OP_JAL:            return ALU_PASSA;
      default:           return ALU_ADD;
    endcase
  endfunction

  function automatic logic supported(input logic [5:0] op);
    unique case (op)
      OP_RTYPE, OP_J, OP_JAL, OP_BEQ, OP_BNE, OP_ADDI, OP_ADDIU, OP_SLTI,
      OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI, OP_LW, OP_SW: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    ctrl       = CTRL_IDLE;
    next_state = S_FETCH;
    instr_done = 1'b0;
    unique case (state)
      S_FETCH: begin
        ctrl.mem_req      = 1'b1;
        ctrl.mem_addr_src = MA_PC;
        ctrl.ir_load      = mem_ready;
        ctrl.pc_load      = mem_ready;
        ctrl.pc_src       = PC_PLUS4;
        next_state        = mem_ready ? S_DECODE : S_FETCH;
      end
      S_DECODE: begin
        operand_sources(opcode, ctrl.alu_a_src, ctrl.alu_b_src);
        if (opcode == OP_J || opcode == OP_JAL) begin
          ctrl.pc_load = 1'b1;
          ctrl.pc_src  = PC_JUMP;
        end
        if (opcode == OP_J || !supported(opcode)) begin
          next_state = S_FETCH;
          instr_done = 1'b1;
        end else begin
          next_state = S_EXEC;
        end
      end
      S_EXEC: begin
        operand_sources(opcode, ctrl.alu_a_src, ctrl.alu_b_src);
        ctrl.alu_fn = exec_fn(opcode);
        if (opcode == OP_RTYPE) ctrl.alu_use_func = !is_jr;
        if (is_jr)              ctrl.alu_fn       = ALU_PASSA;
        unique case (opcode)
          OP_RTYPE:       next_state = is_jr ? S_WB_PC : S_WB_RD;
          OP_JAL:         next_state = S_WB_31;
          OP_LW:          next_state = S_MEM_RD;
          OP_SW:          next_state = S_MEM_WR;
          OP_BEQ, OP_BNE: begin
            // Prepare the target: A <- PC (already PC+4), B <- 4 * constant.
            ctrl.alu_a_src = A_PC;
            ctrl.alu_b_src = B_SEXT_X4;
            next_state     = S_BR_TGT;
          end
          default:        next_state = S_WB_RT;
        endcase
      end
      S_WB_RD: begin
        ctrl.reg_write_rd = 1'b1;
        ctrl.reg_src      = RD_ALU;
        instr_done        = 1'b1;
      end
      S_WB_RT: begin
        ctrl.reg_write_rt = 1'b1;
        ctrl.reg_src      = RD_ALU;
        instr_done        = 1'b1;
      end
      S_WB_31: begin
        ctrl.reg_write_31 = 1'b1;
        ctrl.reg_src      = RD_ALU;
        instr_done        = 1'b1;
      end
      S_MEM_RD, S_MEM_WR: begin
        // Keep the address computation selected: the ALU registers load
        // on every clock, so while the memory stalls the output register
        // must keep recomputing the same address.
        operand_sources(opcode, ctrl.alu_a_src, ctrl.alu_b_src);
        ctrl.alu_fn       = ALU_ADD;
        ctrl.mem_req      = 1'b1;
        ctrl.mem_addr_src = MA_ALU;
        if (state == S_MEM_RD) begin
          ctrl.reg_write_rt = mem_ready;
          ctrl.reg_src      = RD_MEM;
        end else begin
          ctrl.mem_write    = 1'b1;
        end
        instr_done = mem_ready;
        next_state = mem_ready ? S_FETCH : state;
      end
      S_WB_PC: begin
        ctrl.pc_load = 1'b1;
        ctrl.pc_src  = PC_ALU;
        instr_done   = 1'b1;
      end
      S_BR_TGT: begin
        ctrl.alu_fn = ALU_ADD;
        next_state  = S_BR_WR;
      end
      S_BR_WR: begin
        ctrl.pc_load = taken_q;
        ctrl.pc_src  = PC_ALU;
        instr_done   = 1'b1;
      end
      default: next_state = S_FETCH;
    endcase
  end

  always_ff @(negedge clk) begin
    if (rst) begin
      state   <= S_FETCH;
      taken_q <= 1'b0;
    end else begin
      state <= next_state;
      // In BR_TGT the output register still holds A - B.
      if (state == S_BR_TGT) taken_q <= alu_zero ^ (opcode == OP_BNE);
    end
  end

  // A register write never uses more than one decoder.
  assert property (@(negedge clk) disable iff (rst)
    $onehot0({ctrl.reg_write_rd, ctrl.reg_write_rt, ctrl.reg_write_31}));
  // Memory is never written while the PC addresses it.
  assert property (@(negedge clk) disable iff (rst)
    ctrl.mem_write |-> ctrl.mem_addr_src == MA_ALU && ctrl.mem_req);
  // While the memory stalls, nothing architectural is loaded.
  assert property (@(negedge clk) disable iff (rst)
    (ctrl.mem_req && !mem_ready) |->
      !(ctrl.ir_load || ctrl.pc_load || ctrl.reg_write_rd || ctrl.reg_write_rt
        || ctrl.reg_write_31));

endmodule
