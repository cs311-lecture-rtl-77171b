// tb_control_unit: self-checking test of control_unit.
//
// For every supported instruction class (and an unsupported opcode) the
// testbench holds opcode/func constant, runs the state machine from reset
// and records the control word of each clock. It checks:
//   - the number of clocks until instr_done (j 2; beq/bne 5; others 4);
//   - the fetch word (IR load, PC <- PC + 4, memory address = PC);
//   - the operand sources and ALU function of the execute step;
//   - the final step's register/memory/PC write and nothing written in the
//     steps in between (j/jal load the PC in the decode step);
//   - beq/bne load the PC exactly when the ALU reported zero (beq) or not
//     (bne).
//   - with a memory that answers after 2 wait states, fetch, lw and sw wait
//     in place (4 + 2 per access clocks), load nothing while waiting, and
//     keep the address computation selected so the ALU output holds.
// The expectations are written out per instruction here, not taken from
// the design. mem_ready comes from a small wait-state model of the memory.
module tb_control_unit;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic       rst, alu_zero, instr_done, mem_ready;
  logic [5:0] opcode, func;
  ctrl_word_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  ctrl_word_t words [16];
  logic       ready_at [16];

  // Memory ready model: an access completes in its (waits+1)-th clock.
  int waits = 0, wcount = 0;
  always_comb mem_ready = ctrl.mem_req && (wcount == waits);
  always @(negedge clk) begin
    if (rst || !ctrl.mem_req || mem_ready) wcount <= 0;
    else                                   wcount <= wcount + 1;
  end
  int         ncyc;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL op=%h func=%h: %s", opcode, func, what); end
  endtask

  // Run one instruction from FETCH, recording the control words.
  task automatic run(input logic [5:0] op, input logic [5:0] fc, input logic z);
    rst = 1'b1; opcode = op; func = fc; alu_zero = z;
    @(posedge clk);
    rst = 1'b0;                      // FETCH until the next falling edge
    ncyc = 0;
    while (ncyc < 16) begin
      words[ncyc]    = ctrl;
      ready_at[ncyc] = mem_ready;
      ncyc++;
      if (instr_done) break;
      @(posedge clk);
    end
  endtask

  function automatic bit writes(ctrl_word_t c);
    return c.reg_write_rd | c.reg_write_rt | c.reg_write_31 | c.mem_write | c.pc_load;
  endfunction

  task automatic common(input int exp_cyc);
    chk(ncyc == exp_cyc, $sformatf("clocks %0d, expected %0d", ncyc, exp_cyc));
    chk(words[0].ir_load && words[0].pc_load && words[0].pc_src == PC_PLUS4
        && words[0].mem_addr_src == MA_PC && !words[0].mem_write
        && !words[0].reg_write_rd && !words[0].reg_write_rt && !words[0].reg_write_31,
        "fetch word");
    for (int i = 1; i < ncyc; i++) chk(!words[i].ir_load, "IR loaded outside fetch");
    for (int i = 2; i < ncyc - 1; i++) chk(!writes(words[i]), "write in a middle step");
  endtask

  // Register-writing ALU instructions: R-type, immediate forms.
  task automatic alu_instr(input logic [5:0] op, input logic [5:0] fc,
                           input alu_b_src_e bsrc, input alu_fn_e fn);
    run(op, fc, 1'b0);
    common(4);
    chk(!writes(words[1]), "decode writes");
    chk(words[1].alu_a_src == A_RS && words[1].alu_b_src == bsrc, "decode sources");
    chk(words[2].alu_a_src == A_RS && words[2].alu_b_src == bsrc, "exec sources");
    if (op == OP_RTYPE) chk(words[2].alu_use_func, "exec uses func field");
    else                chk(!words[2].alu_use_func && words[2].alu_fn == fn, "exec function");
    if (op == OP_RTYPE)
      chk(words[3].reg_write_rd && !words[3].reg_write_rt && words[3].reg_src == RD_ALU,
          "register[rd] <- ALU");
    else
      chk(words[3].reg_write_rt && !words[3].reg_write_rd && words[3].reg_src == RD_ALU,
          "register[rt] <- ALU");
  endtask

  int n_taken = 0, n_not_taken = 0;

  initial begin
    rst = 1'b1; opcode = '0; func = '0; alu_zero = 1'b0;
    @(posedge clk);

    alu_instr(OP_RTYPE, FN_SUB, B_RT, ALU_SUB);
    alu_instr(OP_RTYPE, FN_SLL, B_RT, ALU_SLL);
    alu_instr(OP_ADDI,  0, B_SEXT, ALU_ADD);
    alu_instr(OP_ADDIU, 0, B_SEXT, ALU_ADD);
    alu_instr(OP_SLTI,  0, B_SEXT, ALU_SLT);
    alu_instr(OP_SLTIU, 0, B_SEXT, ALU_SLT);
    alu_instr(OP_ANDI,  0, B_ZEXT, ALU_AND);
    alu_instr(OP_ORI,   0, B_ZEXT, ALU_OR);
    alu_instr(OP_XORI,  0, B_ZEXT, ALU_XOR);
    alu_instr(OP_LUI,   0, B_SEXT, ALU_LUI);

    // lw: register[rt] <- M[ALU output]
    run(OP_LW, 0, 1'b0);
    common(4);
    chk(words[2].alu_b_src == B_SEXT && words[2].alu_fn == ALU_ADD, "lw address");
    chk(words[3].reg_write_rt && words[3].reg_src == RD_MEM
        && words[3].mem_addr_src == MA_ALU && !words[3].mem_write, "lw write-back");

    // sw: M[ALU output] <- register[rt]
    run(OP_SW, 0, 1'b0);
    common(4);
    chk(words[3].mem_write && words[3].mem_addr_src == MA_ALU
        && !words[3].reg_write_rt && !words[3].reg_write_rd, "sw write");

    // j: PC <- J constant in the decode step
    run(OP_J, 0, 1'b0);
    common(2);
    chk(words[1].pc_load && words[1].pc_src == PC_JUMP
        && !words[1].reg_write_31, "j");

    // jal: PC <- J constant, A <- PC; Output <- A; register[31] <- Output
    run(OP_JAL, 0, 1'b0);
    common(4);
    chk(words[1].pc_load && words[1].pc_src == PC_JUMP && words[1].alu_a_src == A_PC,
        "jal decode");
    chk(words[2].alu_fn == ALU_PASSA && !words[2].alu_use_func, "jal exec");
    chk(words[3].reg_write_31 && words[3].reg_src == RD_ALU && !words[3].pc_load,
        "jal link");

    // jr: Output <- register[rs]; PC <- Output
    run(OP_RTYPE, FN_JR, 1'b0);
    common(4);
    chk(words[2].alu_fn == ALU_PASSA && !words[2].alu_use_func, "jr exec");
    chk(words[3].pc_load && words[3].pc_src == PC_ALU && !words[3].reg_write_rd, "jr");

    // beq / bne, each with both comparison outcomes.
    for (int b = 0; b < 4; b++) begin
      automatic logic [5:0] op = (b < 2) ? OP_BEQ : OP_BNE;
      automatic logic       z  = 1'(b % 2);
      automatic logic       tk = (op == OP_BEQ) ? z : !z;
      run(op, 0, z);
      common(5);
      chk(words[1].alu_a_src == A_RS && words[1].alu_b_src == B_RT, "branch compare sources");
      chk(words[2].alu_fn == ALU_SUB && words[2].alu_a_src == A_PC
          && words[2].alu_b_src == B_SEXT_X4, "branch subtract, target operands");
      chk(words[3].alu_fn == ALU_ADD && !writes(words[3]), "branch target add");
      chk(words[4].pc_load == tk && words[4].pc_src == PC_ALU, "branch decision");
      if (tk) n_taken++; else n_not_taken++;
    end
    chk(n_taken == 2 && n_not_taken == 2, "branch coverage");

    // Stalls: 2 wait states on every memory access.
    waits = 2;
    run(OP_LW, 0, 1'b0);
    chk(ncyc == 8, $sformatf("lw with stalls: %0d clocks, expected 8", ncyc));
    for (int i = 0; i < ncyc; i++) begin
      if (words[i].mem_req && !ready_at[i])
        chk(!writes(words[i]) && !words[i].ir_load, "load while stalled");
    end
    chk(!words[0].ir_load && !words[1].ir_load && words[2].ir_load, "fetch waits 2 clocks");
    for (int i = 5; i < 8; i++)
      chk(words[i].mem_req && words[i].mem_addr_src == MA_ALU && words[i].alu_fn == ALU_ADD
          && words[i].alu_b_src == B_SEXT && words[i].alu_a_src == A_RS,
          "address held during load stall");
    chk(words[7].reg_write_rt && words[7].reg_src == RD_MEM, "lw writes after the stall");
    run(OP_SW, 0, 1'b0);
    chk(ncyc == 8, $sformatf("sw with stalls: %0d clocks, expected 8", ncyc));
    for (int i = 5; i < 8; i++) chk(words[i].mem_write && words[i].mem_req, "sw held");
    run(OP_RTYPE, FN_ADD, 1'b0);
    chk(ncyc == 6, $sformatf("add with stalls: %0d clocks, expected 6", ncyc));
    waits = 0;

    // Unsupported opcode: skipped.
    run(6'h3f, 0, 1'b0);
    common(2);
    chk(!writes(words[1]), "unsupported opcode writes nothing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
