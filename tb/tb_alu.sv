// tb_alu: self-checking test of alu.
//
// For each of the fifteen explicit functions and for every supported func
// code, random (and some corner) operands are presented at the inputs; the
// result must appear in the output register exactly two falling edges
// later (input registers, then output register) and not after one. Expected
// values are computed in the testbench. The zero flag and the input
// registers are checked too, as is 0 for an unsupported func code.
module tb_alu;
  import mips_pkg::*;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic       rst, use_func, zero;
  word_t      a_in, b_in, a_q, b_q, out;
  logic [4:0] shamt;
  logic [5:0] func;
  alu_fn_e    fn;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic word_t ref_fn(alu_fn_e f, word_t a, word_t b, logic [4:0] sh);
    unique case (f)
      ALU_ADD:   return a + b;
      ALU_SUB:   return a - b;
      ALU_AND:   return a & b;
      ALU_OR:    return a | b;
      ALU_XOR:   return a ^ b;
      ALU_NOR:   return ~(a | b);
      ALU_SLL:   return b << sh;
      ALU_SRL:   return b >> sh;
      ALU_SRA:   return word_t'($signed(b) >>> sh);
      ALU_SLLV:  return b << a[4:0];
      ALU_SRLV:  return b >> a[4:0];
      ALU_SRAV:  return word_t'($signed(b) >>> a[4:0]);
      ALU_SLT:   return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      ALU_LUI:   return {b[15:0], 16'h0000};
      ALU_PASSA: return a;
      default:   return 'x;
    endcase
  endfunction

  // Present operands, then hold the function for two clocks.
  task automatic run(input logic uf, input alu_fn_e f, input logic [5:0] fc,
                     input word_t a, input word_t b, input logic [4:0] sh,
                     input word_t exp);
    a_in = a; b_in = b; use_func = uf; fn = f; func = fc; shamt = sh;
    @(posedge clk);                  // A, B loaded
    checks++;
    if (a_q !== a || b_q !== b) begin
      failures++; $display("FAIL input registers");
    end
    a_in = $urandom; b_in = $urandom;  // must not disturb this result
    @(posedge clk);                  // output loaded
    checks++;
    if (out !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL uf=%b fn=%s func=%h a=%h b=%h sh=%0d: out=%h exp=%h",
               uf, f.name(), fc, a, b, sh, out, exp);
    end
  endtask

  localparam logic [5:0] FUNCS [15] = '{FN_ADD, FN_ADDU, FN_SUB, FN_SUBU,
    FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLL, FN_SRL, FN_SRA, FN_SLLV, FN_SRLV,
    FN_SRAV, FN_SLT};
  localparam alu_fn_e FUNC_FN [15] = '{ALU_ADD, ALU_ADD, ALU_SUB, ALU_SUB,
    ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLLV,
    ALU_SRLV, ALU_SRAV, ALU_SLT};

  initial begin
    word_t a, b;
    logic [4:0] sh;
    rst = 1'b1; a_in = 0; b_in = 0; use_func = 0; fn = ALU_ADD; func = 0; shamt = 0;
    @(posedge clk);
    rst = 1'b0;
    // Pipelining: output is one step behind A/B.
    a_in = 32'd7; b_in = 32'd5; fn = ALU_SUB; use_func = 0;
    @(posedge clk);
    checks++;
    if (out !== 32'd0) begin failures++; $display("FAIL output too early"); end
    // Corners.
    run(0, ALU_SLT, 0, 32'hFFFF_FFFF, 32'd1, 0, 32'd1);       // -1 < 1 signed
    run(0, ALU_SLT, 0, 32'd1, 32'hFFFF_FFFF, 0, 32'd0);
    run(0, ALU_SRA, 0, 0, 32'h8000_0000, 5'd4, 32'hF800_0000);
    run(0, ALU_SRL, 0, 0, 32'h8000_0000, 5'd4, 32'h0800_0000);
    run(0, ALU_LUI, 0, 0, 32'h0000_1234, 0, 32'h1234_0000);
    run(0, ALU_SUB, 0, 32'd1, 32'd2, 0, 32'hFFFF_FFFF);
    run(1, ALU_ADD, FN_SUB, 32'd1, 32'd2, 0, 32'hFFFF_FFFF);  // sub $4,$5,$6
    run(0, ALU_SUB, 0, 32'd9, 32'd9, 0, 32'd0);               // zero flag
    run(1, ALU_ADD, 6'h3f, 32'd9, 32'd9, 0, 32'd0);           // unsupported func
    run(1, ALU_ADD, FN_JR, 32'h0040_0000, 32'd9, 0, 32'h0040_0000);
    for (int i = 0; i < 20; i++) begin
      for (int f = 0; f < 15; f++) begin
        a = $urandom; b = $urandom; sh = 5'($urandom);
        if (i == 0) b = a;                                    // equal operands
        run(0, alu_fn_e'(f), 6'($urandom), a, b, sh, ref_fn(alu_fn_e'(f), a, b, sh));
        a = $urandom; b = $urandom; sh = 5'($urandom);
        run(1, alu_fn_e'($urandom_range(0, 14)), FUNCS[f], a, b, sh,
            ref_fn(FUNC_FN[f], a, b, sh));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
