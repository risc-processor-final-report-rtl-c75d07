// tb_dmem: self-checking test of the data memory.
//
// Writes random words to random word-aligned byte addresses, keeping a model,
// and checks the combinational read, the output enable (read data is zero
// with oe low), that the two low address bits do not select a different
// word, and that a write happens only at the clock edge with we high.
module tb_dmem;
  timeunit 1ns; timeprecision 1ps;

  localparam int WORDS = 128;
  logic        clk = 1'b0;
  logic [31:0] addr, rd, wd;
  logic        oe, we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .oe(oe), .rd(rd), .we(we), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    oe = 0; we = 0; addr = 0; wd = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(4 * i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(4 * i) | 32'($urandom_range(0, 3)); oe = 1; #1;
      chk(rd, model[i], $sformatf("read word %0d", i));
      oe = 0; #1;
      chk(rd, 0, "oe low gives zero");
    end
    repeat (500) begin
      @(negedge clk);
      addr = 32'(4 * $urandom_range(0, WORDS - 1)); oe = 1; we = 1'($urandom);
      wd = $urandom;
      #1;
      chk(rd, model[addr[8:2]], "read before edge");
      @(posedge clk);
      if (we) model[addr[8:2]] = wd;
      #1;
      chk(rd, model[addr[8:2]], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
