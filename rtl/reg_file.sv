// reg_file: the general register set, NREGS registers of 32 bits.
//
// Read side: two 1-out-of-NREGS multiplexers, one selected by the rs field
// and one by the rt field of the instruction, give the rs and rt outputs
// (combinational). Register 0 is not stored: input 0 of both multiplexers is
// wired to the constant 0 and writes to it are ignored.
//
// Write side: one data input, chosen by a 1-out-of-2 multiplexer from the
// ALU output or the memory data output. Three decoders derive the
// per-register load enables: one decodes the rd field, one the rt field and
// one always selects register 31; each has its own enable from the control
// word, and a register loads when any decoder selects it. This supports
// register[rd], register[rt] and register[31] <- ALU output or memory.
// All of this is the lecture's structure.
//
// Timing: writes on the falling clock edge. The synchronous reset clearing
// every register is this design's addition.
module reg_file
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] rs,
  input  logic [4:0] rt,
  input  logic [4:0] rd,
  input  logic       write_rd,    // enable of the rd decoder
  input  logic       write_rt,    // enable of the rt decoder
  input  logic       write_31,    // enable of the register-31 select
  input  reg_src_e   reg_src,     // data input: ALU or memory
  input  word_t      alu_out,
  input  word_t      mem_data,
  output word_t      rs_data,
  output word_t      rt_data
);

  localparam int unsigned IW = $clog2(NREGS);

  word_t              regs [NREGS];
  word_t              din;
  logic [NREGS-1:0]   dec_rd, dec_rt, dec_31, load;

  always_comb din = (reg_src == RD_MEM) ? mem_data : alu_out;

  // Decoders and the OR of their outputs per register.
  always_comb begin
    for (int unsigned i = 0; i < NREGS; i++) begin
      dec_rd[i] = write_rd && (rd[IW-1:0] == IW'(i));
      dec_rt[i] = write_rt && (rt[IW-1:0] == IW'(i));
      dec_31[i] = write_31 && (i == NREGS - 1);
    end
    load = dec_rd | dec_rt | dec_31;
  end

  // Register 0 stays 0: its flip-flops are never loaded.
  always_ff @(negedge clk) begin
    for (int unsigned i = 0; i < NREGS; i++) begin
      if (rst || i == 0)  regs[i] <= '0;
      else if (load[i])   regs[i] <= din;
    end
  end

  always_comb begin
    rs_data = (rs[IW-1:0] == '0) ? '0 : regs[rs[IW-1:0]];
    rt_data = (rt[IW-1:0] == '0) ? '0 : regs[rt[IW-1:0]];
  end

endmodule
