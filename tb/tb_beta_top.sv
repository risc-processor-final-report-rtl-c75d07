// tb_beta_top: end-to-end test of the processor with its shipped ROM, at
// the default parameters.
//
// Drives the board inputs the way a user would: set the switches, raise the
// program selector until the program has been entered, drop it again and
// wait for the processor to return to its idle loop at address 0. It runs
//   - fibonacci for n = 0..15 and checks r0 and the display nibbles,
//   - save eight random values to addresses 0..28 and checks the memory,
//   - sort and checks memory and r0..r7 against an independent sort,
//   - load of every sorted word back into r0,
//   - pusha to address 64 and checks the eight stored words and that the
//     instruction held the PC for exactly 8 cycles,
//   - an interrupt during a fibonacci loop (PC -> 0x80000008, XP = PC+4).
// Each mechanism (branch taken / not taken, jump, load, store, multi-cycle
// hold, interrupt) is counted; one that never happens is a failure.
module tb_beta_top;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic        clk = 1'b0;
  logic        reset, irq;
  logic [7:0]  sw_lo;
  logic [6:0]  sw_hi;
  logic [2:0]  prog_sel;
  logic [31:0] first_eight, pc;
  logic        illop;

  int checks = 0, failures = 0, cycles = 0;
  int n_br_taken = 0, n_br_not = 0, n_jmp = 0, n_ld = 0, n_st = 0;
  int n_hold = 0, n_irq = 0;

  beta_top dut (
    .clk(clk), .reset(reset), .irq(irq), .sw_lo(sw_lo), .sw_hi(sw_hi),
    .prog_sel(prog_sel), .first_eight(first_eight), .pc(pc), .illop(illop)
  );

  always #5 clk = ~clk;

  // ---- mechanism counters -------------------------------------------------
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (!reset) begin
      if (dut.id[31:26] inside {OP_BEQ, OP_BNE} && !dut.irq_take) begin
        if (dut.c.pcsel == PC_BR) n_br_taken <= n_br_taken + 1;
        else                      n_br_not   <= n_br_not + 1;
      end
      if (dut.c.pcsel == PC_JT)   n_jmp  <= n_jmp + 1;
      if (dut.c.moe)              n_ld   <= n_ld + 1;
      if (dut.c.mwr)              n_st   <= n_st + 1;
      if (!dut.multi_done)        n_hold <= n_hold + 1;
      if (dut.c.pcsel == PC_XADR) n_irq  <= n_irq + 1;
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run program k with the given switch values and wait until idle again.
  task automatic run(input int k, input logic [7:0] lo, input logic [6:0] hi);
    int guard;
    @(negedge clk);
    sw_lo = lo; sw_hi = hi; prog_sel = 3'(k);
    guard = 0;
    while (pc < 32'(programs_pkg::FIB_ADDR * 4) && guard < 100) begin @(negedge clk); guard++; end
    prog_sel = '0;
    guard = 0;
    while (!(pc == 0 && dut.c.pcsel == PC_BR) && guard < 5000) begin
      @(negedge clk); guard++;
    end
    check(guard < 5000, $sformatf("program %0d returned to idle", k));
  endtask

  function automatic logic [31:0] fib(int n);
    logic [31:0] a = 0, b = 1, t;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  function automatic logic [31:0] nibbles();
    logic [31:0] v;
    for (int i = 0; i < 8; i++) v[4*i +: 4] = dut.u_rf.regs[i][3:0];
    return v;
  endfunction

  logic [31:0] vals [8];
  logic [31:0] sorted [8];
  logic [31:0] t;
  int          hold_start, hold_len;
  logic [31:0] pc_before;

  initial begin
    reset = 1'b1; irq = 1'b0; sw_lo = '0; sw_hi = '0; prog_sel = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    check(pc == 0, "idle at address 0 after reset");

    // fibonacci
    for (int n = 0; n < 16; n++) begin
      run(1, 8'(n), 7'd0);
      check(dut.u_rf.regs[0] == fib(n),
            $sformatf("fib(%0d) = %0d, got %0d", n, fib(n), dut.u_rf.regs[0]));
      check(first_eight == {28'd0, fib(n)[3:0]}, $sformatf("display after fib(%0d)", n));
    end

    // save eight values to addresses 0..28
    for (int i = 0; i < 8; i++) begin
      vals[i] = 32'($urandom_range(0, 255));
      run(3, vals[i][7:0], 7'(4 * i));
      check(dut.u_dmem.mem[i] == vals[i], $sformatf("save word %0d", i));
      check(first_eight == 0, "save clears r0..r7");
    end

    // reference sort
    sorted = vals;
    for (int i = 1; i < 8; i++)
      for (int j = i; j > 0 && sorted[j-1] > sorted[j]; j--) begin
        t = sorted[j]; sorted[j] = sorted[j-1]; sorted[j-1] = t;
      end

    run(2, 8'd0, 7'd0);
    for (int i = 0; i < 8; i++) begin
      check(dut.u_dmem.mem[i] == sorted[i], $sformatf("sorted memory word %0d", i));
      check(dut.u_rf.regs[i] == sorted[i], $sformatf("sorted r%0d", i));
    end
    check(first_eight == nibbles(), "display shows r0..r7 nibbles");

    // pusha to byte address 64, timing of the multi-cycle instruction
    hold_start = -1; hold_len = 0;
    fork
      run(5, 8'd0, 7'd64);
      begin
        wait (pc == 32'(programs_pkg::PUSHA_ADDR * 4));
        hold_start = cycles;
        wait (pc != 32'(programs_pkg::PUSHA_ADDR * 4));
        hold_len = cycles - hold_start;
      end
    join
    check(hold_len == 8, $sformatf("PUSHA takes 8 cycles, took %0d", hold_len));
    for (int i = 0; i < 8; i++)
      check(dut.u_dmem.mem[16 + i] == sorted[i], $sformatf("pushed r%0d", i));

    // load each sorted word back
    for (int i = 0; i < 8; i++) begin
      run(4, 8'd0, 7'(4 * i));
      check(dut.u_rf.regs[0] == sorted[i], $sformatf("load word %0d", i));
      check(first_eight == {28'd0, sorted[i][3:0]}, "load display");
    end

    // interrupt in the middle of a long fibonacci loop
    @(negedge clk);
    sw_lo = 8'd40; prog_sel = 3'd1;
    while (pc < 32'(programs_pkg::FIB_ADDR * 4 + 16)) @(negedge clk);
    prog_sel = '0;
    repeat (7) @(negedge clk);
    pc_before = pc;
    irq = 1'b1;
    @(negedge clk);
    irq = 1'b0;
    check(pc == XADR_ADDR, $sformatf("interrupt vector, pc=%h", pc));
    check(dut.u_rf.regs[30] == pc_before + 4, "XP holds PC+4 of interrupted instruction");
    repeat (300) @(negedge clk);
    check(pc == 0, "back in idle loop after interrupt");

    check(n_br_taken > 0, "branch taken seen");
    check(n_br_not > 0, "branch not taken seen");
    check(n_jmp > 0, "jump seen");
    check(n_ld > 0, "load seen");
    check(n_st > 0, "store seen");
    check(n_hold > 0, "multi-cycle hold seen");
    check(n_irq == 1, "one interrupt taken");
    $display("mechanisms: br_taken=%0d br_not=%0d jmp=%0d ld=%0d st=%0d hold=%0d irq=%0d",
             n_br_taken, n_br_not, n_jmp, n_ld, n_st, n_hold, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
