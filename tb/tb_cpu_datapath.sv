// tb_cpu_datapath: self-checking test of cpu_datapath driven by hand-made
// control words.
//
// The testbench plays the control unit: it issues, clock by clock, the
// control words of a short program held in a testbench memory (combinational
// read, write on the falling edge):
//   0x00 addi $5,$0,1      0x04 addi $6,$0,2     0x08 sub $4,$5,$6
//   0x0c sw   $4,0x100($0) 0x10 lw  $7,0x100($0) 0x14 lui $8,0x1234
//   0x18 ori  $8,$8,0xd678 0x1c jal 0x30         0x30 beq $0,$0,+2
//   0x3c addi $9,$0,7      0x40 jr  $9
// and after each step compares PC, IR, the ALU output register, the memory
// address/data and memory contents with values worked out by hand. The sub
// follows the four-step RTL IR <- M[PC], PC <- PC+4; A <- register[rs],
// B <- register[rt]; Output <- A func B; register[rd] <- Output. The jr to 7
// checks that the PC drops the two low bits.
module tb_cpu_datapath;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic       rst, mem_req, mem_we, alu_zero;
  ctrl_word_t ctrl;
  word_t      mem_addr, mem_wdata, mem_rdata, pc, ir, alu_out;
  logic [5:0] opcode, func;
  word_t      mem [256];
  int checks = 0, failures = 0;

  cpu_datapath dut (.*);

  assign mem_rdata = mem[mem_addr[9:2]];
  always @(negedge clk) if (mem_we) mem[mem_addr[9:2]] <= mem_wdata;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s (pc=%h ir=%h alu_out=%h)", what, pc, ir, alu_out);
    end
  endtask

  task automatic clock(input ctrl_word_t c);
    ctrl = c;
    @(posedge clk);
  endtask

  function automatic ctrl_word_t w_fetch();
    ctrl_word_t c = CTRL_IDLE;
    c.ir_load = 1'b1; c.pc_load = 1'b1; c.pc_src = PC_PLUS4; c.mem_addr_src = MA_PC;
    c.mem_req = 1'b1;
    return c;
  endfunction

  function automatic ctrl_word_t w_ops(alu_a_src_e a, alu_b_src_e b, alu_fn_e f,
                                       logic uf);
    ctrl_word_t c = CTRL_IDLE;
    c.alu_a_src = a; c.alu_b_src = b; c.alu_fn = f; c.alu_use_func = uf;
    return c;
  endfunction

  // Fetch, then the two ALU steps; returns with Output loaded.
  task automatic fetch_exec(input word_t exp_ir, input alu_a_src_e a,
                            input alu_b_src_e b, input alu_fn_e f, input logic uf,
                            input word_t exp_out);
    word_t pc0 = pc;
    ctrl = w_fetch();
    #1;
    chk(mem_addr == pc && mem_req && !mem_we, "memory addressed by PC during fetch");
    @(posedge clk);
    chk(ir == exp_ir, $sformatf("IR <- M[PC] (%h)", exp_ir));
    chk(pc == pc0 + 4, "PC <- PC + 4");
    clock(w_ops(a, b, f, uf));                 // A, B loaded
    clock(w_ops(a, b, f, uf));                 // Output loaded
    chk(alu_out == exp_out, $sformatf("Output = %h", exp_out));
  endtask

  task automatic wb(input logic wrd, input logic wrt, input logic w31,
                    input reg_src_e src);
    ctrl_word_t c = CTRL_IDLE;
    c.reg_write_rd = wrd; c.reg_write_rt = wrt; c.reg_write_31 = w31; c.reg_src = src;
    if (src == RD_MEM) c.mem_addr_src = MA_ALU;
    clock(c);
  endtask

  initial begin
    ctrl_word_t c;
    foreach (mem[i]) mem[i] = '0;
    mem[0]  = 32'h20050001;  // addi $5,$0,1
    mem[1]  = 32'h20060002;  // addi $6,$0,2
    mem[2]  = 32'h00a62022;  // sub  $4,$5,$6
    mem[3]  = 32'hac040100;  // sw   $4,0x100($0)
    mem[4]  = 32'h8c070100;  // lw   $7,0x100($0)
    mem[5]  = 32'h3c081234;  // lui  $8,0x1234
    mem[6]  = 32'h3508d678;  // ori  $8,$8,0xd678
    mem[7]  = 32'h0c00000c;  // jal  0x30
    mem[12] = 32'h10000002;  // beq  $0,$0,+2  -> 0x3c
    mem[15] = 32'h20090007;  // addi $9,$0,7
    mem[16] = 32'h01200008;  // jr   $9
    rst = 1'b1; ctrl = CTRL_IDLE;
    @(posedge clk);
    rst = 1'b0;
    chk(pc == 0, "PC reset to 0");

    fetch_exec(32'h20050001, A_RS, B_SEXT, ALU_ADD, 1'b0, 32'd1);
    wb(0, 1, 0, RD_ALU);
    fetch_exec(32'h20060002, A_RS, B_SEXT, ALU_ADD, 1'b0, 32'd2);
    wb(0, 1, 0, RD_ALU);
    fetch_exec(32'h00a62022, A_RS, B_RT, ALU_ADD, 1'b1, 32'hFFFF_FFFF);  // func field: sub
    chk(opcode == 6'h00 && func == 6'h22, "opcode/func to control");
    wb(1, 0, 0, RD_ALU);

    // sw $4,0x100($0): M[Output] <- register[rt]
    fetch_exec(32'hac040100, A_RS, B_SEXT, ALU_ADD, 1'b0, 32'h100);
    c = CTRL_IDLE; c.mem_addr_src = MA_ALU; c.mem_write = 1'b1;
    ctrl = c;
    #1;
    chk(mem_addr == 32'h100 && mem_we && mem_wdata == 32'hFFFF_FFFF, "store address/data");
    @(posedge clk);
    chk(mem[64] == 32'hFFFF_FFFF, "M[0x100] = $4 = 1 - 2");

    // lw $7: register[rt] <- M[Output]; then verify through sw-free path:
    fetch_exec(32'h8c070100, A_RS, B_SEXT, ALU_ADD, 1'b0, 32'h100);
    wb(0, 1, 0, RD_MEM);

    fetch_exec(32'h3c081234, A_RS, B_SEXT, ALU_LUI, 1'b0, 32'h1234_0000);
    wb(0, 1, 0, RD_ALU);
    fetch_exec(32'h3508d678, A_RS, B_ZEXT, ALU_OR, 1'b0, 32'h1234_d678);
    wb(0, 1, 0, RD_ALU);

    // jal 0x30: PC <- J constant, A <- PC (0x20) at the same clock.
    clock(w_fetch());
    chk(ir == 32'h0c00000c && pc == 32'h20, "fetch jal");
    c = w_ops(A_PC, B_RT, ALU_PASSA, 1'b0); c.pc_load = 1'b1; c.pc_src = PC_JUMP;
    clock(c);
    chk(pc == 32'h30, "PC <- J-format constant * 4");
    clock(w_ops(A_PC, B_RT, ALU_PASSA, 1'b0));
    chk(alu_out == 32'h20, "Output <- A = return address");
    wb(0, 0, 1, RD_ALU);

    // beq $0,$0,+2 at 0x30: compare, then target = PC + 4*2.
    clock(w_fetch());
    clock(w_ops(A_RS, B_RT, ALU_SUB, 1'b0));
    clock(w_ops(A_PC, B_SEXT_X4, ALU_SUB, 1'b0));
    chk(alu_zero, "zero after $0 - $0");
    clock(w_ops(A_PC, B_SEXT_X4, ALU_ADD, 1'b0));
    chk(alu_out == 32'h3c, "branch target 0x34 + 8");
    c = CTRL_IDLE; c.pc_load = 1'b1; c.pc_src = PC_ALU;
    clock(c);
    chk(pc == 32'h3c, "PC <- ALU output");

    fetch_exec(32'h20090007, A_RS, B_SEXT, ALU_ADD, 1'b0, 32'd7);
    wb(0, 1, 0, RD_ALU);
    fetch_exec(32'h01200008, A_RS, B_RT, ALU_PASSA, 1'b0, 32'd7);
    c = CTRL_IDLE; c.pc_load = 1'b1; c.pc_src = PC_ALU;
    clock(c);
    chk(pc == 32'd4, "jr to 7 leaves 4 in the PC");

    // Register contents, read out through the ALU (A <- rs, Output <- A).
    // IR now holds jr $9 (rs = 9, rt = 0).
    clock(w_ops(A_RS, B_RT, ALU_PASSA, 1'b0));
    clock(w_ops(A_RS, B_RT, ALU_PASSA, 1'b0));
    chk(alu_out == 32'd7, "$9 = 7");
    // Store $7, $8, $31 by loading hand-made sw instructions.
    mem[1] = 32'hac070104;   // sw $7,0x104($0)
    mem[2] = 32'hac080108;   // sw $8,0x108($0)
    mem[3] = 32'hac1f010c;   // sw $31,0x10c($0)
    for (int k = 0; k < 3; k++) begin
      clock(w_fetch());
      clock(w_ops(A_RS, B_SEXT, ALU_ADD, 1'b0));
      clock(w_ops(A_RS, B_SEXT, ALU_ADD, 1'b0));
      c = CTRL_IDLE; c.mem_addr_src = MA_ALU; c.mem_write = 1'b1;
      clock(c);
    end
    chk(mem[65] == 32'hFFFF_FFFF, "$7 loaded from memory");
    chk(mem[66] == 32'h1234_d678, "$8 = lui/ori constant");
    chk(mem[67] == 32'h20, "$31 = jal return address");

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
