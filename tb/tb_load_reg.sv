// tb_load_reg: self-checking test of load_reg.
//
// Drives random data and Load Enable values into an 8-bit register and
// compares its output after every falling clock edge with a reference
// that follows the Load Enable table: 0 keeps the value, 1 copies the data
// input as it was before the clock. Also checks the synchronous reset.
module tb_load_reg;
  localparam int unsigned W = 8;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic         rst, load_en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  load_reg #(.WIDTH(W), .RESET_VALUE(8'hA5)) dut (.*);

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    rst = 1'b1; load_en = 1'b0; d = '0;
    @(posedge clk);
    check(8'hA5, "reset value");
    rst   = 1'b0;
    model = 8'hA5;
    for (int i = 0; i < 200; i++) begin
      d       = W'($urandom);
      load_en = 1'($urandom);
      if (load_en) model = d;
      @(posedge clk);
      check(model, load_en ? "load" : "hold");
    end
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
