// mux_reg: n-bit load-enable register with a selectable data source.
//
// One 1-out-of-SOURCES multiplexer per bit picks which source feeds the
// register; the source-select bits and the Load Enable are control-word
// bits. With Load Enable 0 the register keeps its value whatever the select;
// with Load Enable 1 it copies the selected source as it was before the
// clock. The lecture demonstrates the 4-bit, 2-source case and notes that
// four sources need 2 select bits; the PC uses this block with four sources.
//
// Timing: loads on the falling clock edge. The synchronous reset to
// RESET_VALUE is this design's addition.
module mux_reg #(
  parameter int unsigned      WIDTH       = 4,
  parameter int unsigned      SOURCES     = 2,
  parameter int unsigned      SEL_W       = (SOURCES > 1) ? $clog2(SOURCES) : 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            load_en,
  input  logic [SEL_W-1:0]                sel,
  input  logic [SOURCES-1:0][WIDTH-1:0]   d,
  output logic [WIDTH-1:0]                q
);

  logic [WIDTH-1:0] selected;

  // A select value beyond the last source picks source 0.
  always_comb begin
    selected = d[0];
    for (int unsigned i = 1; i < SOURCES; i++)
      if (sel == SEL_W'(i)) selected = d[i];
  end

  load_reg #(.WIDTH(WIDTH), .RESET_VALUE(RESET_VALUE)) u_reg (
    .clk     (clk),
    .rst     (rst),
    .load_en (load_en),
    .d       (selected),
    .q       (q)
  );

endmodule
