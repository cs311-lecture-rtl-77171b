// mips_system_tb.svh: body shared by the end-to-end testbenches of
// mips_multicycle. The including module declares WORDS and WAITS and
// instantiates the CPU as "dut" with implicit port connections. It holds
// the clock, a small assembler, an instruction-level reference model of the
// supported instruction set, per-mechanism counters, instruction-length
// (stall) measurement, and the test sequence.

  localparam word_t HALT = 32'h1000ffff;  // beq $0,$0,-1

  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic       rst, host_we, host_ready, instr_done, manual_mode;
  ctrl_word_t manual_ctrl;
  word_t      host_addr, host_wdata, host_rdata, pc, ir, alu_out;
  int checks = 0, failures = 0;

  // ---------------- assembler helpers ----------------
  function automatic word_t R(logic [4:0] rs, logic [4:0] rt, logic [4:0] rd,
                              logic [4:0] sh, logic [5:0] fn);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction
  function automatic word_t I(logic [5:0] op, logic [4:0] rs, logic [4:0] rt, int imm);
    return {op, rs, rt, 16'(imm)};
  endfunction
  function automatic word_t J(logic [5:0] op, int unsigned byte_addr);
    return {op, 26'(byte_addr >> 2)};
  endfunction

  // ---------------- reference model ----------------
  word_t img [WORDS];     // initial image of the current program
  word_t rmem [WORDS];
  word_t rreg [32];
  longint ref_cycles;     // clocks with a single-clock memory
  longint ref_accesses;   // memory accesses (fetches, loads, stores)

  function automatic void ref_run();
    word_t rpc = 0, ins, a, b, res, imm_s, imm_z;
    int steps = 0;
    foreach (rmem[i]) rmem[i] = img[i];
    foreach (rreg[i]) rreg[i] = '0;
    ref_cycles = 0;
    ref_accesses = 0;
    forever begin
      ins = rmem[rpc[13:2]];
      if (ins == HALT) break;
      rpc   = rpc + 4;
      a     = rreg[ins[25:21]];
      b     = rreg[ins[20:16]];
      imm_s = {{16{ins[15]}}, ins[15:0]};
      imm_z = {16'h0, ins[15:0]};
      ref_cycles += 4;
      ref_accesses++;
      unique case (ins[31:26])
        6'h00: begin
          res = 'x;
          unique case (ins[5:0])
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2a, 6'h2b: res = {31'b0, $signed(a) < $signed(b)};
            6'h00: res = b << ins[10:6];
            6'h02: res = b >> ins[10:6];
            6'h03: res = $unsigned($signed(b) >>> ins[10:6]);
            6'h04: res = b << a[4:0];
            6'h06: res = b >> a[4:0];
            6'h07: res = $unsigned($signed(b) >>> a[4:0]);
            6'h08: rpc = {a[31:2], 2'b00};
            default: res = '0;
          endcase
          if (ins[5:0] != 6'h08) rreg[ins[15:11]] = res;
        end
        6'h02: begin rpc = {rpc[31:28], ins[25:0], 2'b00}; ref_cycles -= 2; end
        6'h03: begin rreg[31] = rpc; rpc = {rpc[31:28], ins[25:0], 2'b00}; end
        6'h04: begin if (a == b) rpc = rpc + (imm_s << 2); ref_cycles += 1; end
        6'h05: begin if (a != b) rpc = rpc + (imm_s << 2); ref_cycles += 1; end
        6'h08, 6'h09: rreg[ins[20:16]] = a + imm_s;
        6'h0a, 6'h0b: rreg[ins[20:16]] = {31'b0, $signed(a) < $signed(imm_s)};
        6'h0c: rreg[ins[20:16]] = a & imm_z;
        6'h0d: rreg[ins[20:16]] = a | imm_z;
        6'h0e: rreg[ins[20:16]] = a ^ imm_z;
        6'h0f: rreg[ins[20:16]] = {ins[15:0], 16'h0};
        6'h23: begin rreg[ins[20:16]] = rmem[12'((a + imm_s) >> 2)]; ref_accesses++; end
        6'h2b: begin rmem[12'((a + imm_s) >> 2)] = b; ref_accesses++; end
        default: ref_cycles -= 2;
      endcase
      rreg[0] = '0;
      if (++steps > 10000) break;
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int n_rtype, n_shift_imm, n_shift_var, n_imm, n_lui, n_lw, n_sw, n_j, n_jal,
      n_jr, n_jr_unaligned, n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_zero_write;
  word_t last_pc;

  // Classify each instruction at its last clock; branch outcome from the PC
  // seen at the next fetch.
  logic  pending_branch;
  word_t pending_ir, pending_fallthrough;
  always @(posedge clk) begin
    if (!rst && instr_done) begin
      unique case (ir[31:26])
        6'h00: begin
          if (ir[5:0] == FN_JR) begin
            n_jr++;
            if (alu_out[1:0] != 2'b00) n_jr_unaligned++;   // Output = rs
          end else if (ir[5:0] inside {FN_SLL, FN_SRL, FN_SRA}) n_shift_imm++;
          else if (ir[5:0] inside {FN_SLLV, FN_SRLV, FN_SRAV}) n_shift_var++;
          else n_rtype++;
          if (ir[15:11] == 5'd0 && ir[5:0] != FN_JR) n_zero_write++;
        end
        6'h02: n_j++;
        6'h03: n_jal++;
        6'h0f: n_lui++;
        6'h23: n_lw++;
        6'h2b: n_sw++;
        6'h04, 6'h05: ;
        default: begin
          n_imm++;
          if (ir[20:16] == 5'd0) n_zero_write++;
        end
      endcase
    end
  end
  always @(negedge clk) begin
    // After the falling edge that ends a branch, the PC shows the outcome.
    if (!rst && instr_done && (ir[31:26] == OP_BEQ || ir[31:26] == OP_BNE)) begin
      pending_branch      <= 1'b1;
      pending_ir          <= ir;
    end else pending_branch <= 1'b0;
  end
  always @(posedge clk) begin
    if (pending_branch && pending_ir != HALT) begin
      if (pc != last_pc + 4) begin
        if (pending_ir[31:26] == OP_BEQ) n_beq_t++; else n_bne_t++;
      end else begin
        if (pending_ir[31:26] == OP_BEQ) n_beq_n++; else n_bne_n++;
      end
    end
  end
  // The clock after an instruction's last one is the next fetch.
  logic in_fetch;
  always @(negedge clk) in_fetch <= rst || instr_done;
  always @(negedge clk) if (!rst && in_fetch) last_pc <= pc;   // fetch address

  // Instruction length, measured between instr_done pulses at the falling
  // edges; clocks beyond the single-clock length are stall clocks.
  int len_count, n_stall_clocks, n_stalled_instr;
  function automatic int base_clocks(input word_t ins);
    unique case (ins[31:26])
      OP_J:           return 2;
      OP_BEQ, OP_BNE: return 5;
      OP_RTYPE, OP_JAL, OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI,
      OP_XORI, OP_LUI, OP_LW, OP_SW: return 4;
      default:        return 2;
    endcase
  endfunction
  always @(negedge clk) begin
    if (rst || manual_mode) len_count <= 0;
    else if (instr_done) begin
      if (len_count + 1 > base_clocks(ir)) begin
        n_stall_clocks  <= n_stall_clocks + len_count + 1 - base_clocks(ir);
        n_stalled_instr <= n_stalled_instr + 1;
      end
      len_count <= 0;
    end else len_count <= len_count + 1;
  end

  // One hand-made control word per clock; a memory step is first held with
  // its loads masked until the memory is ready.
  int n_manual_steps, n_mode_switches;
  task automatic mstep(input ctrl_word_t c);
    ctrl_word_t held = c;
    held.ir_load = 1'b0; held.pc_load = 1'b0; held.mem_write = 1'b0;
    held.reg_write_rd = 1'b0; held.reg_write_rt = 1'b0; held.reg_write_31 = 1'b0;
    if (c.mem_req) begin
      manual_ctrl = held;
      #1;
      while (!host_ready) begin
        @(posedge clk);
        #1;
      end
    end
    manual_ctrl = c;
    n_manual_steps++;
    @(posedge clk);
  endtask

  function automatic ctrl_word_t w_fetch();
    ctrl_word_t c = CTRL_IDLE;
    c.mem_req = 1'b1; c.mem_addr_src = MA_PC;
    c.ir_load = 1'b1; c.pc_load = 1'b1; c.pc_src = PC_PLUS4;
    return c;
  endfunction
  function automatic ctrl_word_t w_alu(alu_b_src_e b, alu_fn_e f, logic uf);
    ctrl_word_t c = CTRL_IDLE;
    c.alu_a_src = A_RS; c.alu_b_src = b; c.alu_fn = f; c.alu_use_func = uf;
    return c;
  endfunction
  function automatic ctrl_word_t w_wb(logic to_rd);
    ctrl_word_t c = CTRL_IDLE;
    c.reg_write_rd = to_rd; c.reg_write_rt = !to_rd; c.reg_src = RD_ALU;
    return c;
  endfunction

  // ---------------- running a program ----------------
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Host write: hold the request until the memory is ready.
  task automatic host_write(input int unsigned w, input word_t v);
    host_addr = word_t'(w << 2); host_wdata = v; host_we = 1'b1;
    #1;
    while (!host_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    host_we = 1'b0;
  endtask

  // Host read; only while rst = 1.
  function automatic word_t host_read_now(input int unsigned w);
    return rmem_dut[w];
  endfunction
  word_t rmem_dut [WORDS];

  int dut_cycles;

  task automatic run_program(input string name, input int max_cycles);
    int mism = 0;
    int stall_before = n_stall_clocks;
    rst = 1'b1;
    @(posedge clk);
    for (int unsigned w = 0; w < WORDS; w++) host_write(w, img[w]);
    ref_run();
    @(posedge clk);
    rst = 1'b0;                    // CPU starts fetching at 0
    dut_cycles = 1;                // this clock is already the first fetch
    while (dut_cycles < max_cycles) begin
      @(posedge clk);
      dut_cycles++;
      if (ir == HALT && in_fetch) break;   // fetching again
    end
    dut_cycles -= 6 + WAITS;       // the HALT's own clocks and this fetch
    rst = 1'b1;                    // hand memory back to the host
    @(posedge clk);
    chk(longint'(dut_cycles) == ref_cycles + WAITS * ref_accesses,
        $sformatf("%s: %0d clocks, reference %0d", name, dut_cycles,
                  ref_cycles + WAITS * ref_accesses));
    // The HALT's fetch is one more access than the reference counts.
    chk(longint'(n_stall_clocks) - longint'(stall_before) == WAITS * (ref_accesses + 1),
        $sformatf("%s: %0d stall clocks, expected %0d", name,
                  n_stall_clocks - stall_before, WAITS * (ref_accesses + 1)));
    for (int unsigned w = 0; w < WORDS; w++) begin
      host_addr = word_t'(w << 2);
      #1;
      rmem_dut[w] = host_rdata;
      if (host_rdata !== rmem[w]) begin
        mism++;
        if (mism < 5) $display("  %s: M[%h] = %h, reference %h", name, w << 2,
                               host_rdata, rmem[w]);
      end
    end
    chk(mism == 0, $sformatf("%s: %0d memory words differ from reference", name, mism));
  endtask

  initial begin
    int p;
    rst = 1'b1; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    manual_mode = 1'b0; manual_ctrl = CTRL_IDLE;
    len_count = 0; n_stall_clocks = 0; n_stalled_instr = 0;
    n_manual_steps = 0; n_mode_switches = 0;

    // ---- Program 0: the sub walk-through stepped by hand, then handed over
    // to the control unit ----
    foreach (img[i]) img[i] = '0;
    img[0] = I(OP_ADDI, 0, 5, 1);       // $5 = 1
    img[1] = I(OP_ADDI, 0, 6, 2);       // $6 = 2
    img[2] = 32'h00a62022;              // sub $4,$5,$6
    img[3] = I(OP_SW, 0, 4, 'h100);
    img[4] = HALT;
    @(posedge clk);
    for (int unsigned w = 0; w < WORDS; w++) host_write(w, img[w]);
    manual_mode = 1'b1;
    rst = 1'b0;
    for (int k = 0; k < 3; k++) begin
      mstep(w_fetch());                             // IR <- M[PC], PC <- PC + 4
      chk(ir == img[k] && pc == word_t'(4 * (k + 1)), "manual fetch");
      if (k < 2) begin
        mstep(w_alu(B_SEXT, ALU_ADD, 1'b0));        // A <- reg[rs], B <- constant
        mstep(w_alu(B_SEXT, ALU_ADD, 1'b0));        // Output <- A + B
        chk(alu_out == word_t'(k + 1), "manual addi result");
        mstep(w_wb(1'b0));                          // reg[rt] <- Output
      end else begin
        mstep(w_alu(B_RT, ALU_ADD, 1'b1));          // A <- reg[rs], B <- reg[rt]
        mstep(w_alu(B_RT, ALU_ADD, 1'b1));          // Output <- A func B
        chk(alu_out == 32'hFFFF_FFFF, "manual sub: Output = 1 - 2");
        mstep(w_wb(1'b1));                          // reg[rd] <- Output
      end
    end
    manual_mode = 1'b0;                             // hardwired from here
    n_mode_switches++;
    begin
      int guard = 0;
      @(posedge clk);
      while (!(ir == HALT && in_fetch) && guard < 200) begin
        @(posedge clk);
        guard++;
      end
    end
    rst = 1'b1;
    @(posedge clk);
    host_addr = 32'h100;
    #1;
    chk(host_rdata == 32'hFFFF_FFFF, "walk-through: sw by the control unit stored -1");

    last_pc = '0; pending_branch = 1'b0; pending_ir = '0; pending_fallthrough = '0;
    {n_rtype, n_shift_imm, n_shift_var, n_imm, n_lui, n_lw, n_sw, n_j, n_jal,
     n_jr, n_jr_unaligned, n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_zero_write} = '0;

    // ---- Program 1: sub $4,$5,$6 ----
    foreach (img[i]) img[i] = '0;
    img[0] = I(OP_ADDI, 0, 5, 1);
    img[1] = I(OP_ADDI, 0, 6, 2);
    img[2] = 32'h00a62022;              // sub $4,$5,$6
    img[3] = I(OP_SW, 0, 4, 'h100);
    img[4] = HALT;
    run_program("sub demo", 400);
    chk(rmem[64] == 32'hFFFF_FFFF && host_read_now(64) == 32'hFFFF_FFFF,
        "sub demo: $4 = 1 - 2 = -1");

    // ---- Program 2: add 1 to memory word 0x1000 ----
    foreach (img[i]) img[i] = '0;
    img[0] = 32'h8c021000;   // lw   $2,0x1000($0)
    img[1] = 32'h20420001;   // addi $2,$2,1
    img[2] = 32'hac021000;   // sw   $2,0x1000($0)
    img[3] = HALT;
    img[32'h1000 >> 2] = 32'h0000_0041;
    run_program("add-1 demo", 400);
    chk(host_read_now(32'h1000 >> 2) == 32'h0000_0042, "add-1 demo: M[0x1000] = 0x42");
    chk(dut_cycles == 12 + 5 * WAITS,
        $sformatf("add-1 demo: %0d clocks (got %0d)", 12 + 5 * WAITS, dut_cycles));

    // ---- Program 3: every instruction ----
    foreach (img[i]) img[i] = '0;
    p = 0;
    img[p++] = I(OP_ADDI, 0, 1, 5);            // 0x00
    img[p++] = I(OP_ADDI, 0, 2, 0);            // 0x04
    img[p++] = R(2, 1, 2, 0, FN_ADD);          // 0x08 loop: $2 += $1
    img[p++] = I(OP_ADDI, 1, 1, -1);           // 0x0c
    img[p++] = I(OP_BNE, 1, 0, -3);            // 0x10 -> 0x08
    img[p++] = I(OP_BEQ, 1, 2, 1);             // 0x14 not taken (0 vs 15)
    img[p++] = I(OP_LUI, 0, 3, 'h8000);        // 0x18
    img[p++] = R(0, 3, 4, 4, FN_SRA);          // $4 = 0xf8000000
    img[p++] = R(0, 3, 5, 4, FN_SRL);          // $5 = 0x08000000
    img[p++] = I(OP_ADDI, 0, 6, 3);
    img[p++] = R(6, 2, 7, 0, FN_SLLV);         // $7 = 15 << 3 = 120
    img[p++] = R(6, 3, 8, 0, FN_SRAV);
    img[p++] = R(6, 3, 9, 0, FN_SRLV);
    img[p++] = R(2, 7, 10, 0, FN_SUB);         // $10 = -105
    img[p++] = R(10, 2, 11, 0, FN_SLT);        // 1
    img[p++] = R(2, 10, 12, 0, FN_SLT);        // 0
    img[p++] = I(OP_BEQ, 12, 0, 1);            // taken, skips the next
    img[p++] = I(OP_ADDI, 0, 12, 99);          // skipped
    img[p++] = I(OP_SLTI, 10, 13, -100);       // 1
    img[p++] = I(OP_SLTIU, 2, 14, 16);         // 1
    img[p++] = I(OP_ANDI, 10, 15, 'hff);
    img[p++] = I(OP_ORI, 0, 16, 'hbeef);
    img[p++] = I(OP_XORI, 16, 17, 'hffff);
    img[p++] = R(10, 16, 18, 0, FN_AND);
    img[p++] = R(10, 16, 19, 0, FN_OR);
    img[p++] = R(10, 16, 20, 0, FN_XOR);
    img[p++] = R(10, 16, 21, 0, FN_NOR);
    img[p++] = R(2, 16, 22, 0, FN_ADDU);
    img[p++] = R(2, 16, 23, 0, FN_SUBU);
    img[p++] = R(10, 2, 24, 0, FN_SLTU);
    img[p++] = I(OP_ADDIU, 0, 25, -1);
    img[p++] = R(0, 2, 26, 2, FN_SLL);         // $26 = 60
    img[p++] = I(OP_ADDI, 0, 0, 9);            // write to $0, ignored
    img[p++] = R(2, 2, 0, 0, FN_ADD);          // write to $0, ignored
    img[p++] = J(OP_JAL, 'h100);               // 0x88: $31 = 0x8c
    img[p++] = J(OP_J, 'h140);                 // 0x8c
    // subroutine at 0x100
    img['h100 >> 2] = I(OP_ADDI, 31, 27, 0);   // $27 = $31
    img['h104 >> 2] = I(OP_ADDI, 31, 29, 3);   // $29 = 0x8f
    img['h108 >> 2] = R(29, 0, 0, 0, FN_JR);   // jr $29 -> 0x8c
    // at 0x140: store $1..$31 to 0x300.., reload one, then halt
    p = 'h140 >> 2;
    for (int r = 1; r < 32; r++) img[p++] = I(OP_SW, 0, 5'(r), 'h300 + 4 * r);
    img[p++] = I(OP_LW, 0, 30, 'h308);         // $30 = stored $2
    img[p++] = I(OP_SW, 0, 30, 'h380);
    img[p++] = I(OP_SW, 0, 0, 'h384);          // $0 reads as 0
    img[p++] = HALT;
    img['h384 >> 2] = 32'hFFFF_FFFF;
    run_program("instruction mix", 4000);
    chk(host_read_now('h308 >> 2) == 32'd15, "sum 5+4+3+2+1 = 15");
    chk(host_read_now('h310 >> 2) == 32'hF800_0000, "sra");
    chk(host_read_now('h314 >> 2) == 32'h0800_0000, "srl");
    chk(host_read_now('h31c >> 2) == 32'd120, "sllv");
    chk(host_read_now('h328 >> 2) == 32'hFFFF_FF97, "sub = -105");
    chk(host_read_now('h330 >> 2) == 32'd0, "slt false and skipped addi");
    chk(host_read_now('h334 >> 2) == 32'd1, "slti with negatives");
    chk(host_read_now('h340 >> 2) == 32'h0000_BEEF, "ori zero-extends");
    chk(host_read_now('h36c >> 2) == 32'h8c, "$27 = jal return address");
    chk(host_read_now('h374 >> 2) == 32'h8f, "$29 = return + 3");
    chk(host_read_now('h380 >> 2) == 32'd15, "lw of stored value");
    chk(host_read_now('h384 >> 2) == 32'd0, "$0 = 0 after writes");

    // ---- mechanisms ----
    chk(n_rtype > 0,        $sformatf("R-type ALU instructions: %0d", n_rtype));
    chk(n_shift_imm > 0,    $sformatf("shifts by shamt: %0d", n_shift_imm));
    chk(n_shift_var > 0,    $sformatf("shifts by register: %0d", n_shift_var));
    chk(n_imm > 0,          $sformatf("immediate instructions: %0d", n_imm));
    chk(n_lui > 0,          $sformatf("lui: %0d", n_lui));
    chk(n_lw > 0,           $sformatf("lw: %0d", n_lw));
    chk(n_sw > 0,           $sformatf("sw: %0d", n_sw));
    chk(n_j > 0,            $sformatf("j: %0d", n_j));
    chk(n_jal > 0,          $sformatf("jal: %0d", n_jal));
    chk(n_jr > 0,           $sformatf("jr: %0d", n_jr));
    chk(n_jr_unaligned > 0, $sformatf("PC low bits dropped: %0d", n_jr_unaligned));
    chk(n_beq_t > 0,        $sformatf("beq taken: %0d", n_beq_t));
    chk(n_beq_n > 0,        $sformatf("beq not taken: %0d", n_beq_n));
    chk(n_bne_t > 0,        $sformatf("bne taken: %0d", n_bne_t));
    chk(n_bne_n > 0,        $sformatf("bne not taken: %0d", n_bne_n));
    chk(n_zero_write > 0,   $sformatf("writes to $0: %0d", n_zero_write));
    chk(n_manual_steps > 0, $sformatf("hand-driven control words: %0d", n_manual_steps));
    chk(n_mode_switches > 0, $sformatf("manual-to-hardwired switches: %0d", n_mode_switches));
    if (WAITS > 0)
      chk(n_stalled_instr > 0, $sformatf("stalled instructions: %0d", n_stalled_instr));
    else
      chk(n_stall_clocks == 0, $sformatf("no stalls with a single-clock memory: %0d", n_stall_clocks));
    $display("stalls: %0d clocks in %0d instructions; manual steps %0d, mode switches %0d",
             n_stall_clocks, n_stalled_instr, n_manual_steps, n_mode_switches);
    $display("mechanisms: rtype=%0d shamt=%0d shiftv=%0d imm=%0d lui=%0d lw=%0d sw=%0d j=%0d jal=%0d jr=%0d jr_unaligned=%0d beq_t=%0d beq_n=%0d bne_t=%0d bne_n=%0d zero_writes=%0d",
             n_rtype, n_shift_imm, n_shift_var, n_imm, n_lui, n_lw, n_sw, n_j, n_jal,
             n_jr, n_jr_unaligned, n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_zero_write);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
