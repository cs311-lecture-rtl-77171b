// memory: the memory system seen as a black box - an address input, a data
// input and one data output.
//
// It performs instruction reads (IR <- M[PC]), data reads
// (register <- M[ALU out]) and writes (M[ALU out] <- data in). Addresses are
// byte addresses of 32-bit words; bits 1..0 are ignored and only the low
// $clog2(WORDS) word-address bits are decoded, so the space of WORDS words
// repeats through the 32-bit address range. The array is read
// combinationally and written on the falling edge.
//
// Access time: with WAIT_STATES = 0 (the default) every access completes in
// the clock in which it is requested and ready is always 1. With
// WAIT_STATES = n an access requested with req = 1 completes only in its
// (n+1)-th clock: ready rises in that clock, the write (we = 1) takes
// effect at its falling edge, and the requester must hold address, data and
// req until then - this is how the CPU is stalled on a slow memory. The
// wait counter restarts whenever req is 0 or an access completes.
// Size, wait-state scheme and the lack of reset of the array are this
// design's choices: the lecture treats memory as a black box that may take
// one clock or stall the CPU.
module memory
  import mips_pkg::*;
#(
  parameter int unsigned WORDS       = 4096,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic  clk,
  input  word_t addr,
  input  word_t wdata,
  input  logic  req,     // access requested (read or write)
  input  logic  we,      // the access is a write
  output word_t rdata,
  output logic  ready    // the access completes in this clock
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  if (WAIT_STATES == 0) begin : g_no_wait
    assign ready = 1'b1;
    logic unused_req;
    assign unused_req = req;
  end else begin : g_wait
    localparam int unsigned CW = $clog2(WAIT_STATES + 1);
    logic [CW-1:0] count;
    assign ready = req && (count == CW'(WAIT_STATES));
    always_ff @(negedge clk) begin
      if (!req || ready) count <= '0;
      else               count <= count + 1'b1;
    end
  end

  always_ff @(negedge clk) begin
    if (we && ready) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
