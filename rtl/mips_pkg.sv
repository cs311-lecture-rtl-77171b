// mips_pkg: types and constants shared by the multicycle MIPS-subset CPU.
//
// Holds the instruction encodings (opcode and func fields of the MIPS ISA),
// the ALU function codes, the source-select codes of the datapath
// multiplexers, and the control word that the control unit sends to the
// datapath every cycle. The set of ALU functions, the three PC sources, the
// three register-file write destinations and the two memory address sources
// follow the lecture design; the numeric codes of the ALU functions and of
// the multiplexer selects are this design's own choice.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;

  // Major opcodes (instruction bits 31..26) of the supported subset.
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0a,
    OP_SLTIU = 6'h0b,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_XORI  = 6'h0e,
    OP_LUI   = 6'h0f,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // func field (bits 5..0) of the R-type instructions.
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  // The fifteen functions of the ALU's combinational network.
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,   // A + B
    ALU_SUB   = 4'd1,   // A - B
    ALU_AND   = 4'd2,   // A & B
    ALU_OR    = 4'd3,   // A | B
    ALU_XOR   = 4'd4,   // A ^ B
    ALU_NOR   = 4'd5,   // ~(A | B)
    ALU_SLL   = 4'd6,   // B << shamt
    ALU_SRL   = 4'd7,   // B >> shamt (logical)
    ALU_SRA   = 4'd8,   // B >>> shamt (arithmetic)
    ALU_SLLV  = 4'd9,   // B << A
    ALU_SRLV  = 4'd10,  // B >> A
    ALU_SRAV  = 4'd11,  // B >>> A
    ALU_SLT   = 4'd12,  // A < B, signed, as 0 or 1
    ALU_LUI   = 4'd13,  // B << 16
    ALU_PASSA = 4'd14   // A
  } alu_fn_e;

  // PC source multiplexer (fourth input unused).
  typedef enum logic [1:0] {
    PC_PLUS4 = 2'd0,
    PC_ALU   = 2'd1,
    PC_JUMP  = 2'd2
  } pc_src_e;

  // ALU input A source.
  typedef enum logic {
    A_RS = 1'b0,
    A_PC = 1'b1
  } alu_a_src_e;

  // ALU input B source.
  typedef enum logic [1:0] {
    B_RT      = 2'd0,  // register[rt]
    B_SEXT    = 2'd1,  // sign-extended 16-bit constant
    B_ZEXT    = 2'd2,  // zero-extended 16-bit constant
    B_SEXT_X4 = 2'd3   // sign-extended constant times 4 (branch offset)
  } alu_b_src_e;

  // Memory address source.
  typedef enum logic {
    MA_PC  = 1'b0,
    MA_ALU = 1'b1
  } mem_addr_src_e;

  // Register file data input source.
  typedef enum logic {
    RD_ALU = 1'b0,
    RD_MEM = 1'b1
  } reg_src_e;

  // The control word: one field per load enable or multiplexer select.
  typedef struct packed {
    logic          pc_load;
    pc_src_e       pc_src;
    logic          ir_load;
    mem_addr_src_e mem_addr_src;
    logic          mem_req;        // a memory access is in progress
    logic          mem_write;
    logic          reg_write_rd;   // enable of the rd-field decoder
    logic          reg_write_rt;   // enable of the rt-field decoder
    logic          reg_write_31;   // enable of the register-31 select
    reg_src_e      reg_src;
    alu_a_src_e    alu_a_src;
    alu_b_src_e    alu_b_src;
    logic          alu_use_func;   // take the function from the IR func field
    alu_fn_e       alu_fn;         // explicit function when alu_use_func = 0
  } ctrl_word_t;

  localparam ctrl_word_t CTRL_IDLE = '{
    pc_load: 1'b0, pc_src: PC_PLUS4, ir_load: 1'b0, mem_addr_src: MA_PC,
    mem_req: 1'b0, mem_write: 1'b0, reg_write_rd: 1'b0, reg_write_rt: 1'b0,
    reg_write_31: 1'b0, reg_src: RD_ALU, alu_a_src: A_RS, alu_b_src: B_RT,
    alu_use_func: 1'b0, alu_fn: ALU_ADD
  };

endpackage
