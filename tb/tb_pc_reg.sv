// tb_pc_reg: self-checking test of pc_reg.
//
// Checks reset to 0, PC <- PC + 4, PC <- ALU output (loading 7 must leave 4,
// since bits 1..0 are wired to 0), PC <- J-format constant with bits 31..28
// kept from the PC, and holding when the load enable is 0. Ends with a
// random sequence compared against a reference model.
module tb_pc_reg;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic        rst, pc_load;
  pc_src_e     pc_src;
  word_t       alu_out, pc, model;
  logic [25:0] jtarget;
  int checks = 0, failures = 0;

  pc_reg dut (.*);

  task automatic step(input logic ld, input pc_src_e src, input word_t a,
                      input logic [25:0] t);
    pc_load = ld; pc_src = src; alu_out = a; jtarget = t;
    if (ld) begin
      unique case (src)
        PC_PLUS4: model = model + 32'd4;
        PC_ALU:   model = {a[31:2], 2'b00};
        PC_JUMP:  model = {model[31:28], t, 2'b00};
        default:  ;
      endcase
    end
    @(posedge clk);
    checks++;
    if (pc !== model) begin
      failures++;
      $display("FAIL ld=%b src=%s: pc=%h expected %h", ld, src.name(), pc, model);
    end
  endtask

  initial begin
    rst = 1'b1; pc_load = 1'b0; pc_src = PC_PLUS4; alu_out = '0; jtarget = '0;
    @(posedge clk);
    rst = 1'b0; model = '0;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    step(1'b1, PC_PLUS4, '0, '0);                 // 4
    step(1'b1, PC_PLUS4, '0, '0);                 // 8
    step(1'b0, PC_ALU, 32'h1234, '0);             // hold at 8
    step(1'b1, PC_ALU, 32'd7, '0);                // 7 loads as 4
    checks++;
    if (pc !== 32'd4) begin failures++; $display("FAIL load 7: pc=%h", pc); end
    step(1'b1, PC_ALU, 32'hA000_0010, '0);
    step(1'b1, PC_JUMP, '0, 26'h0000400);         // {A, 0x0001000}
    checks++;
    if (pc !== 32'hA000_1000) begin failures++; $display("FAIL jump: pc=%h", pc); end
    step(1'b1, PC_ALU, 32'hFFFF_FFFC, '0);
    step(1'b1, PC_PLUS4, '0, '0);                 // wraps to 0
    for (int i = 0; i < 200; i++)
      step(1'($urandom), pc_src_e'($urandom_range(0, 2)), $urandom, 26'($urandom));
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
