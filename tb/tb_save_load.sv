// tb_save_load: the save/load demonstration sequence on the full processor.
//
// With the switches as a user would set them: save 3 at address 4, load it;
// save 6 at address 8, load it; then load address 4 again, which must still
// hold 3. After each load r0 (and the display nibble of r0) holds the value
// and r1..r7 are zero; after each save r0..r7 are zero. The fibonacci case
// the design's waveform shows (n = 6 -> 8) is run as well.
module tb_save_load;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic        clk = 1'b0;
  logic        reset, irq;
  logic [7:0]  sw_lo;
  logic [6:0]  sw_hi;
  logic [2:0]  prog_sel;
  logic [31:0] first_eight, pc;
  logic        illop;
  int checks = 0, failures = 0;

  beta_top dut (
    .clk(clk), .reset(reset), .irq(irq), .sw_lo(sw_lo), .sw_hi(sw_hi),
    .prog_sel(prog_sel), .first_eight(first_eight), .pc(pc), .illop(illop)
  );

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

  // Press the selector for program k for 2 cycles, then wait 200 cycles.
  task automatic press(int k);
    @(negedge clk);
    prog_sel = 3'(k);
    repeat (2) @(negedge clk);
    prog_sel = '0;
    repeat (200) @(negedge clk);
    chk(pc, 0, "back at the idle loop");
  endtask

  initial begin
    reset = 1; irq = 0; sw_lo = 0; sw_hi = 0; prog_sel = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    sw_lo = 8'd3; sw_hi = 7'd4;
    press(3);
    chk(first_eight, 0, "save clears the display registers");
    press(4);
    chk(dut.u_rf.regs[0], 3, "load address 4");
    chk(first_eight, 32'h0000_0003, "display after load");
    sw_lo = 8'd6; sw_hi = 7'd8;
    press(3);
    press(4);
    chk(dut.u_rf.regs[0], 6, "load address 8");
    sw_hi = 7'd4;
    press(4);
    chk(dut.u_rf.regs[0], 3, "address 4 still holds 3");
    chk(first_eight, 32'h0000_0003, "display");
    sw_lo = 8'd6;
    press(1);
    chk(dut.u_rf.regs[0], 8, "fibonacci(6)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
