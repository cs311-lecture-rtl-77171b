// tb_ir_reg: self-checking test of ir_reg.
//
// Loads the instructions used in the lecture demonstrations (sub $4,$5,$6 =
// 0x00a62022, 0x00220000, and the lw/addi/sw program) and random words,
// and checks the register value and each field against fields cut out by
// the testbench itself; checks that the IR holds while ir_load = 0.
module tb_ir_reg;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic        rst, ir_load;
  word_t       mem_data, ir, model;
  logic [5:0]  opcode, func;
  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm;
  logic [25:0] jtarget;
  int checks = 0, failures = 0;

  ir_reg dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (ir=%h)", what, ir); end
  endtask

  task automatic load(input logic ld, input word_t w);
    ir_load = ld; mem_data = w;
    if (ld) model = w;
    @(posedge clk);
    chk(ir === model, "value");
    chk(opcode === model[31:26] && rs === model[25:21] && rt === model[20:16]
        && rd === model[15:11] && shamt === model[10:6] && func === model[5:0]
        && imm === model[15:0] && jtarget === model[25:0], "fields");
  endtask

  initial begin
    rst = 1'b1; ir_load = 1'b0; mem_data = '0;
    @(posedge clk);
    rst = 1'b0; model = '0;
    load(1'b1, 32'h00a62022);
    chk(rs == 5'd5 && rt == 5'd6 && rd == 5'd4 && func == 6'h22 && opcode == 6'h00,
        "sub $4,$5,$6 fields");
    load(1'b0, 32'hFFFFFFFF);
    load(1'b1, 32'h00220000);
    chk(rs == 5'd1 && rt == 5'd2, "rs=1 rt=2");
    load(1'b1, 32'h8c021000);
    chk(opcode == 6'h23 && rt == 5'd2 && imm == 16'h1000, "lw fields");
    load(1'b1, 32'h20420001);
    chk(opcode == 6'h08 && rs == 5'd2 && rt == 5'd2 && imm == 16'h0001, "addi fields");
    for (int i = 0; i < 100; i++) load(1'($urandom), $urandom);
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
