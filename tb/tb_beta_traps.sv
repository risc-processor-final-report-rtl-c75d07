// tb_beta_traps: processor test with a ROM of its own, for the instructions
// and events the shipped programs do not use.
//
// The ROM (built below with the isa_pkg assembler) runs MUL, DIV, MODC,
// SRAC, ST and LDR, then an illegal opcode. The illegal-opcode handler at
// vector 0x80000004 copies XP and jumps back to it; the program then spins
// until an interrupt arrives, whose handler at 0x80000008 copies XP, steps
// it back by 4 and returns. Checks the results, the trap addresses, XP, that
// an interrupt held high is not taken again while in a handler (PC[31] set),
// and that illop is raised exactly once. A second run after reset (r24 = 1)
// executes PUSHA with an interrupt raised in its fourth cycle: the interrupt
// must wait until the eight stores are done.
module tb_beta_traps;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  localparam int unsigned WORDS = 64;
  typedef logic [WORDS-1:0][31:0] rom_t;

  function automatic rom_t build();
    rom_t r = '0;
    r[0]  = asm_br(OP_BEQ, 5'd31, 0, 3, 5'd31);
    r[3]  = asm_br(OP_BNE, 5'd24, 3, 30, 5'd31);         // r24 != 0: second phase
    r[1]  = asm_br(OP_BEQ, 5'd31, 1, 20, 5'd31);        // illegal-opcode vector
    r[2]  = asm_br(OP_BEQ, 5'd31, 2, 24, 5'd31);        // interrupt vector
    r[4]  = asm_movc(16'd7, 5'd1);
    r[5]  = asm_movc(-16'sd3, 5'd2);
    r[6]  = asm_op(OP_MUL, 5'd1, 5'd2, 5'd3);
    r[7]  = asm_op(OP_DIV, 5'd3, 5'd1, 5'd4);
    r[8]  = asm_opc(OP_MODC, 5'd1, 16'd4, 5'd5);
    r[9]  = asm_opc(OP_SRAC, 5'd2, 16'd1, 5'd6);
    r[10] = asm_opc(OP_ST, 5'd31, 16'd48, 5'd1);         // mem[48] = r1
    r[11] = asm_opc(OP_LDR, 5'd0, 16'd0, 5'd7);          // r7 = mem[PC+4]
    r[12] = 32'h0000_0000;                               // illegal opcode
    r[13] = asm_movc(16'd99, 5'd8);
    r[14] = asm_br(OP_BEQ, 5'd31, 14, 14, 5'd31);        // spin
    r[20] = asm_mov(5'd30, 5'd10);
    r[21] = asm_jmp(5'd30, 5'd31);
    r[24] = asm_mov(5'd30, 5'd11);
    r[25] = asm_opc(OP_SUBC, 5'd30, 16'd4, 5'd30);
    r[26] = asm_jmp(5'd30, 5'd31);
    r[30] = asm_pusha(5'd25);                            // second phase
    r[31] = asm_br(OP_BEQ, 5'd31, 31, 31, 5'd31);
    return r;
  endfunction

  logic        clk = 1'b0;
  logic        reset, irq, illop;
  logic [7:0]  sw_lo = 8'd0;
  int          t0;
  logic [31:0] first_eight, pc;
  int checks = 0, failures = 0, n_illop = 0, n_irq = 0;

  beta_top #(.IMEM_WORDS(WORDS), .ROM(build())) dut (
    .clk(clk), .reset(reset), .irq(irq), .sw_lo(sw_lo), .sw_hi(7'd32),
    .prog_sel(3'd0), .first_eight(first_eight), .pc(pc), .illop(illop)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!reset && illop) n_illop <= n_illop + 1;
    if (!reset && dut.c.pcsel == PC_XADR) n_irq <= n_irq + 1;
  end

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
    reset = 1; irq = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    while (pc != 32'd48) @(negedge clk);        // at the illegal instruction
    chk(32'(illop), 1, "illop flagged");
    @(negedge clk);
    chk(pc, 32'h8000_0004, "illegal-opcode vector");
    chk(dut.u_rf.regs[30], 32'd52, "XP after illegal opcode");
    repeat (20) @(negedge clk);
    chk(pc, 32'd56, "spinning after return");
    chk(dut.u_rf.regs[3], -32'sd21, "MUL 7 * -3");
    chk(dut.u_rf.regs[4], -32'sd3, "DIV -21 / 7");
    chk(dut.u_rf.regs[5], 32'd3, "MODC 7 % 4");
    chk(dut.u_rf.regs[6], -32'sd2, "SRAC -3 >>> 1");
    chk(dut.u_rf.regs[7], 32'd7, "LDR reads the stored word");
    chk(dut.u_rf.regs[8], 32'd99, "instruction after the illegal one ran");
    chk(dut.u_rf.regs[10], 32'd52, "handler saw XP");
    irq = 1;
    @(negedge clk);
    chk(pc, 32'h8000_0008, "interrupt vector");
    @(negedge clk);
    irq = 0;
    chk(pc[31], 1, "still in supervisor mode, interrupt not retaken");
    repeat (10) @(negedge clk);
    chk(dut.u_rf.regs[11], 32'd60, "XP after interrupt");
    chk(pc, 32'd56, "returned to the interrupted instruction");
    chk(32'(n_illop), 1, "one illegal-opcode trap");
    chk(32'(n_irq), 1, "one interrupt taken");

    // second phase: interrupt during PUSHA r25 (r25 = 32)
    @(negedge clk);
    reset = 1; sw_lo = 8'd1;
    @(negedge clk);
    reset = 0;
    while (pc != 32'd120) @(negedge clk);
    t0 = 0;
    while (dut.multi_cnt != 5'd3) begin @(negedge clk); t0++; end
    irq = 1;
    while (pc == 32'd120) begin
      chk(32'(dut.c.pcsel), 32'(PC_INC), "no interrupt while PUSHA runs");
      @(negedge clk); t0++;
    end
    chk(32'(t0), 8, "PUSHA took 8 cycles");
    chk(pc, 32'd124, "PUSHA completed");
    @(negedge clk);
    irq = 0;
    chk(pc, 32'h8000_0008, "deferred interrupt taken after PUSHA");
    chk(dut.u_rf.regs[30], 32'd128, "XP points past the instruction after PUSHA");
    for (int i = 0; i < 8; i++)
      chk(dut.u_dmem.mem[8 + i], dut.u_rf.regs[i], $sformatf("PUSHA stored r%0d", i));
    chk(32'(n_irq), 2, "two interrupts taken in all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
