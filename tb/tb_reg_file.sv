// tb_reg_file: self-checking test of reg_file.
//
// Writes through each of the three decoders (rd, rt, register 31) with data
// from the ALU input and from the memory input, tries to write register 0,
// and reads both ports combinationally. A reference array in the testbench
// follows the same rules; after every falling edge every register is read
// back through both ports and compared. Random stimulus follows the
// directed part.
module tb_reg_file;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic       rst, write_rd, write_rt, write_31;
  logic [4:0] rs, rt, rd;
  reg_src_e   reg_src;
  word_t      alu_out, mem_data, rs_data, rt_data;
  word_t      model [32];
  int checks = 0, failures = 0;
  int n_rd = 0, n_rt = 0, n_31 = 0, n_zero = 0;

  reg_file dut (.*);

  task automatic write(input logic wrd, input logic wrt, input logic w31,
                       input logic [4:0] t, input logic [4:0] d,
                       input reg_src_e src, input word_t a, input word_t m);
    word_t din;
    write_rd = wrd; write_rt = wrt; write_31 = w31; rt = t; rd = d;
    reg_src = src; alu_out = a; mem_data = m;
    din = (src == RD_MEM) ? m : a;
    if (wrd && d != 0) model[d] = din;
    if (wrt && t != 0) model[t] = din;
    if (w31)           model[31] = din;
    if ((wrd && d == 0) || (wrt && t == 0)) n_zero++;
    n_rd += int'(wrd); n_rt += int'(wrt); n_31 += int'(w31);
    @(posedge clk);
    write_rd = 1'b0; write_rt = 1'b0; write_31 = 1'b0;
    // Read every register through both ports.
    for (int r = 0; r < 32; r++) begin
      rs = 5'(r); rt = 5'(31 - r);
      #0.1;
      checks++;
      if (rs_data !== model[r] || rt_data !== model[31 - r]) begin
        failures++;
        $display("FAIL read r%0d=%h (exp %h) r%0d=%h (exp %h)", r, rs_data,
                 model[r], 31 - r, rt_data, model[31 - r]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; write_rd = 0; write_rt = 0; write_31 = 0;
    rs = 0; rt = 0; rd = 0; reg_src = RD_ALU; alu_out = 0; mem_data = 0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk);
    rst = 1'b0;
    write(1, 0, 0, 5'd0, 5'd4, RD_ALU, 32'd0, 32'hDEAD);      // $4 <- 0
    write(0, 1, 0, 5'd5, 5'd0, RD_ALU, 32'd1, 32'hDEAD);      // $5 <- 1
    write(0, 1, 0, 5'd6, 5'd0, RD_MEM, 32'hBEEF, 32'd2);      // $6 <- M
    write(0, 0, 1, 5'd0, 5'd0, RD_ALU, 32'h0040_0010, 0);     // $31 <- ALU
    write(1, 0, 0, 5'd0, 5'd0, RD_ALU, 32'h1234_5678, 0);     // $0 ignored
    write(0, 1, 0, 5'd0, 5'd0, RD_MEM, 0, 32'h8765_4321);     // $0 ignored
    write(1, 0, 0, 5'd3, 5'd1, RD_MEM, 0, 32'hCAFE_F00D);     // rd=1 only
    for (int i = 0; i < 300; i++) begin
      int k = $urandom_range(0, 2);
      write(k == 0, k == 1, k == 2, 5'($urandom), 5'($urandom),
            reg_src_e'($urandom_range(0, 1)), $urandom, $urandom);
    end
    checks++;
    if (n_rd == 0 || n_rt == 0 || n_31 == 0 || n_zero == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
