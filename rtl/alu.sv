// alu: the ALU subsystem - two input registers, a combinational network and
// an output register.
//
// On every clock the A and B input registers load their inputs and the
// output register loads the function of the previous A and B, so an
// operation takes two clocks from the inputs to the output:
//   clock n:   A <- a_in, B <- b_in
//   clock n+1: Output <- A fn B
// The three registers have no load enable; they load on every clock. The
// combinational network computes every function in parallel and a
// multiplexer selects one: A+B, A-B, A&B, A|B, A^B, A nor B, B<<shamt,
// B>>shamt, B>>>shamt, B<<A, B>>A, B>>>A, A<B, B<<16, A. The function is
// given explicitly by the control word (fn) or, when use_func = 1, decoded
// from the func field of the current R-type instruction. All arithmetic is
// signed (add/addu, sub/subu and slt/sltu behave alike). Variable shifts use
// A's low five bits. A func code outside the supported set gives 0.
// The register structure and function list follow the lecture; the func
// decoding table is the MIPS one; zero (output register equals 0) is this
// design's status signal to the control unit for beq/bne.
//
// Timing: registers load on the falling clock edge; synchronous reset
// clears them.
module alu
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      a_in,
  input  word_t      b_in,
  input  logic [4:0] shamt,     // IR bits 10..6
  input  logic [5:0] func,      // IR bits 5..0
  input  logic       use_func,
  input  alu_fn_e    fn,
  output word_t      a_q,       // input register A (for observation)
  output word_t      b_q,       // input register B (for observation)
  output word_t      out,       // output register
  output logic       zero
);

  alu_fn_e sel;
  logic    func_ok;
  word_t   result;

  // Function selection: explicit, or decoded from the func field.
  always_comb begin
    func_ok = 1'b1;
    sel     = fn;
    if (use_func) begin
      unique case (func)
        FN_ADD, FN_ADDU: sel = ALU_ADD;
        FN_SUB, FN_SUBU: sel = ALU_SUB;
        FN_AND:          sel = ALU_AND;
        FN_OR:           sel = ALU_OR;
        FN_XOR:          sel = ALU_XOR;
        FN_NOR:          sel = ALU_NOR;
        FN_SLL:          sel = ALU_SLL;
        FN_SRL:          sel = ALU_SRL;
        FN_SRA:          sel = ALU_SRA;
        FN_SLLV:         sel = ALU_SLLV;
        FN_SRLV:         sel = ALU_SRLV;
        FN_SRAV:         sel = ALU_SRAV;
        FN_SLT, FN_SLTU: sel = ALU_SLT;
        FN_JR:           sel = ALU_PASSA;
        default: begin
          sel     = ALU_ADD;
          func_ok = 1'b0;
        end
      endcase
    end
  end

  // Combinational network and its output multiplexer.
  always_comb begin
    unique case (sel)
      ALU_ADD:   result = a_q + b_q;
      ALU_SUB:   result = a_q - b_q;
      ALU_AND:   result = a_q & b_q;
      ALU_OR:    result = a_q | b_q;
      ALU_XOR:   result = a_q ^ b_q;
      ALU_NOR:   result = ~(a_q | b_q);
      ALU_SLL:   result = b_q << shamt;
      ALU_SRL:   result = b_q >> shamt;
      ALU_SRA:   result = word_t'($signed(b_q) >>> shamt);
      ALU_SLLV:  result = b_q << a_q[4:0];
      ALU_SRLV:  result = b_q >> a_q[4:0];
      ALU_SRAV:  result = word_t'($signed(b_q) >>> a_q[4:0]);
      ALU_SLT:   result = word_t'($signed(a_q) < $signed(b_q));
      ALU_LUI:   result = b_q << 16;
      ALU_PASSA: result = a_q;
      default:   result = '0;
    endcase
    if (!func_ok) result = '0;
  end

  always_ff @(negedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
      out <= '0;
    end else begin
      a_q <= a_in;
      b_q <= b_in;
      out <= result;
    end
  end

  assign zero = (out == '0);

endmodule
