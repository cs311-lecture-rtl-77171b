// mips_multicycle: a multicycle implementation of a MIPS subset.
//
// The CPU is split the classic way: a control unit that issues one control
// word per clock, and the ALU/register set/datapaths that carry out the
// microoperations the control word selects. The memory hangs off the
// datapath by an address, a data input and a data output. Each instruction
// takes several clocks and finishes before the next begins.
//
// Supported instructions: R-type add/addu/sub/subu/and/or/xor/nor/slt/sltu/
// sll/srl/sra/sllv/srlv/srav/jr; addi/addiu/slti/sltiu/andi/ori/xori/lui;
// lw/sw; beq/bne; j/jal. No hi/lo, multiply/divide, coprocessors,
// exceptions or unsigned arithmetic distinctions, and no branch delay slot.
//
// Control source: with manual_mode = 0 the hardwired control unit drives
// the control word; with manual_mode = 1 the word on manual_ctrl drives the
// datapath directly, one microoperation step per clock, and the control
// unit is held at its fetch step so that it starts a fresh instruction
// when control is handed back. This mirrors stepping microoperations by
// hand and then letting the control unit generate the words.
//
// Memory: MEM_WORDS words; MEM_WAIT_STATES extra clocks per access (default
// 0: single-clock memory). While the memory is not ready the control unit
// stalls in the accessing step.
//
// Host port: while rst = 1 the memory's port belongs to the host_* signals,
// so a program and its data can be written (host_we; the write happens at
// the falling edge of the clock in which host_ready = 1) and read back
// (host_rdata, combinational) with the CPU held; when rst = 0 the CPU owns
// the memory. Execution starts at address 0 when rst falls. This loading
// port is this design's addition.
//
// Timing: single clock, all state changes on its falling edge; rst is
// synchronous.
module mips_multicycle
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS       = 4096,
  parameter int unsigned MEM_WAIT_STATES = 0,
  parameter int unsigned NREGS           = 32
) (
  input  logic       clk,
  input  logic       rst,
  // control source
  input  logic       manual_mode,
  input  ctrl_word_t manual_ctrl,
  // memory loading port, active while rst = 1
  input  word_t      host_addr,
  input  word_t      host_wdata,
  input  logic       host_we,
  output word_t      host_rdata,
  output logic       host_ready,
  // observation
  output word_t      pc,
  output word_t      ir,
  output word_t      alu_out,
  output logic       instr_done
);

  ctrl_word_t unit_ctrl, ctrl;
  logic [5:0] opcode, func;
  logic       alu_zero, unit_done;
  word_t      cpu_addr, cpu_wdata, mem_addr, mem_wdata, mem_rdata;
  logic       cpu_req, cpu_we, mem_req, mem_we, mem_ready;

  control_unit u_ctrl (
    .clk        (clk),
    .rst        (rst || manual_mode),
    .opcode     (opcode),
    .func       (func),
    .alu_zero   (alu_zero),
    .mem_ready  (mem_ready),
    .ctrl       (unit_ctrl),
    .instr_done (unit_done)
  );

  always_comb begin
    ctrl       = manual_mode ? manual_ctrl : unit_ctrl;
    instr_done = unit_done && !manual_mode;
  end

  cpu_datapath #(.NREGS(NREGS)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .mem_addr  (cpu_addr),
    .mem_wdata (cpu_wdata),
    .mem_req   (cpu_req),
    .mem_we    (cpu_we),
    .mem_rdata (mem_rdata),
    .opcode    (opcode),
    .func      (func),
    .alu_zero  (alu_zero),
    .pc        (pc),
    .ir        (ir),
    .alu_out   (alu_out)
  );

  always_comb begin
    mem_addr  = rst ? host_addr  : cpu_addr;
    mem_wdata = rst ? host_wdata : cpu_wdata;
    mem_req   = rst ? host_we    : cpu_req;
    mem_we    = rst ? host_we    : cpu_we;
  end

  memory #(.WORDS(MEM_WORDS), .WAIT_STATES(MEM_WAIT_STATES)) u_mem (
    .clk   (clk),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .req   (mem_req),
    .we    (mem_we),
    .rdata (mem_rdata),
    .ready (mem_ready)
  );

  assign host_rdata = mem_rdata;
  assign host_ready = mem_ready;

endmodule
