// load_reg: n-bit register with a Load Enable.
//
// Every bit is a D flip-flop that loads on every clock; a 2:1 multiplexer in
// front of it feeds back the flip-flop's own output when Load Enable is 0 and
// the data input when it is 1, so the register holds its value or copies the
// data input. All bits share the clock and the Load Enable. This is the
// lecture's structure for one register bit, replicated WIDTH times.
//
// Timing: state changes on the falling clock edge, as in the rest of this
// CPU. The synchronous reset (rst = 1 at a falling edge loads RESET_VALUE)
// is this design's addition; the lecture's register bit has none.
module load_reg #(
  parameter int unsigned      WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_en,  // 1: copy d on the clock, 0: hold
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] next_q;

  // The per-bit multiplexer: own output or data input.
  always_comb next_q = load_en ? d : q;

  always_ff @(negedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= next_q;
  end

endmodule
