// tb_mux_reg: self-checking test of mux_reg.
//
// Instance 1 is the 4-bit register with two inputs: it is checked against
// the table Load Enable 0 -> no change, Load Enable 1 with select 0 -> copy
// of source A, with select 1 -> copy of source B. Instance 2 has four 8-bit
// sources and two select bits. Both get random stimulus and are compared
// with reference models after every falling clock edge.
module tb_mux_reg;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic            rst, le2, le4;
  logic            sel2;
  logic [1:0]      sel4;
  logic [1:0][3:0] d2;
  logic [3:0][7:0] d4;
  logic [3:0]      q2, m2;
  logic [7:0]      q4, m4;
  int checks = 0, failures = 0;

  mux_reg #(.WIDTH(4), .SOURCES(2)) dut2 (
    .clk(clk), .rst(rst), .load_en(le2), .sel(sel2), .d(d2), .q(q2));
  mux_reg #(.WIDTH(8), .SOURCES(4)) dut4 (
    .clk(clk), .rst(rst), .load_en(le4), .sel(sel4), .d(d4), .q(q4));

  initial begin
    rst = 1'b1; le2 = 1'b0; le4 = 1'b0; sel2 = 1'b0; sel4 = '0; d2 = '0; d4 = '0;
    @(posedge clk);
    checks++;
    if (q2 !== 4'h0 || q4 !== 8'h00) begin
      failures++; $display("FAIL reset");
    end
    rst = 1'b0; m2 = '0; m4 = '0;
    for (int i = 0; i < 300; i++) begin
      le2 = 1'($urandom); sel2 = 1'($urandom); d2 = 8'($urandom);
      le4 = 1'($urandom); sel4 = 2'($urandom); d4 = $urandom;
      if (le2) m2 = sel2 ? d2[1] : d2[0];
      if (le4) m4 = d4[sel4];
      @(posedge clk);
      checks += 2;
      if (q2 !== m2) begin
        failures++; $display("FAIL 2-input: le=%b sel=%b q=%h exp=%h", le2, sel2, q2, m2);
      end
      if (q4 !== m4) begin
        failures++; $display("FAIL 4-input: le=%b sel=%0d q=%h exp=%h", le4, sel4, q4, m4);
      end
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
