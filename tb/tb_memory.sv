// tb_memory: self-checking test of memory.
//
// Writes random words to random addresses of a 256-word instance, reading
// each location back combinationally in the same and later cycles, and
// checks that byte-offset bits 1..0 and address bits above the decoded
// range are ignored. A reference array in the testbench tracks the
// expected contents (every location is written before it is checked).
// A second instance with 2 wait states must raise ready exactly in the
// third clock of a held request, write only then, and start counting again
// for the next request.
module tb_memory;
  import mips_pkg::*;
  localparam int unsigned WORDS = 256;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  word_t addr, wdata, rdata;
  logic  we, req, ready;
  assign req = 1'b1;

  // Slow instance.
  word_t s_addr, s_wdata, s_rdata;
  logic  s_req, s_we, s_ready;
  memory #(.WORDS(16), .WAIT_STATES(2)) slow (
    .clk(clk), .addr(s_addr), .wdata(s_wdata), .req(s_req), .we(s_we),
    .rdata(s_rdata), .ready(s_ready));
  word_t model [WORDS];
  int checks = 0, failures = 0;

  memory #(.WORDS(WORDS)) dut (.*);

  task automatic wr(input int unsigned w, input word_t v);
    @(posedge clk);                  // keep changes away from the falling edge
    addr = word_t'(w << 2); wdata = v; we = 1'b1; model[w] = v;
    @(posedge clk);
    we = 1'b0;
  endtask

  task automatic rd(input word_t a, input int unsigned w);
    addr = a;
    #1;
    checks++;
    if (rdata !== model[w]) begin
      failures++; $display("FAIL read %h: %h expected %h", a, rdata, model[w]);
    end
  endtask

  initial begin
    int unsigned w;
    word_t       a;
    we = 1'b0; addr = 0; wdata = 0;
    @(posedge clk);
    for (w = 0; w < WORDS; w++) wr(w, $urandom);
    for (w = 0; w < WORDS; w++) rd(word_t'(w << 2), w);
    for (int i = 0; i < 500; i++) begin
      w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1) == 1) wr(w, $urandom);
      // Byte offset and alias above the decoded range.
      a = ($urandom_range(0, 4095) << 10) | (w << 2) | $urandom_range(0, 3);
      rd(a, w);
    end
    // Slow memory: two writes back to back, then a read.
    s_req = 1'b0; s_we = 1'b0; s_addr = '0; s_wdata = '0;
    @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      s_req = 1'b1; s_we = (k < 2); s_addr = word_t'(4 * k); s_wdata = 32'hA0 + k;
      if (k == 2) s_addr = 32'h4;              // read back the second write
      for (int c = 1; c <= 3; c++) begin
        #1;
        checks++;
        if (s_ready !== (c == 3)) begin
          failures++; $display("FAIL slow ready in clock %0d of access %0d: %b", c, k, s_ready);
        end
        if (k == 2) begin
          checks++;
          if (s_rdata !== 32'hA1) begin failures++; $display("FAIL slow read %h", s_rdata); end
        end
        if (k == 1 && c < 3) begin
          // The second write has not happened yet.
          checks++;
          if (s_rdata === 32'hA1) begin failures++; $display("FAIL slow write too early"); end
        end
        @(posedge clk);
      end
    end
    s_req = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
