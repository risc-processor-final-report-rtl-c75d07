// tb_regfile: self-checking test of the register file.
//
// Keeps a model of the 32 registers, issues random writes and reads through
// both ports, and checks r31 = 0, the board inputs on r24/r25/r26 (which
// ignore writes) and the display nibbles of r0..r7.
module tb_regfile;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic        clk = 1'b0;
  reg_idx_t    ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd, first_eight;
  logic        we;
  logic [7:0]  sw_lo;
  logic [6:0]  sw_hi;
  logic [2:0]  prog_sel;
  logic [31:0] model [32];
  logic [31:0] nib;
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
               .wa(wa), .wd(wd), .we(we), .sw_lo(sw_lo), .sw_hi(sw_hi),
               .prog_sel(prog_sel), .first_eight(first_eight));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_rd(reg_idx_t a);
    case (a)
      5'd24:   return {24'd0, sw_lo};
      5'd25:   return {25'd0, sw_hi};
      5'd26:   return {29'd0, prog_sel};
      5'd31:   return 0;
      default: return model[a];
    endcase
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    sw_lo = 8'hA5; sw_hi = 7'h33; prog_sel = 3'd5;
    // fill every register once
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; wa = 5'(i); wd = $urandom;
      if (!(i inside {24, 25, 26, 31})) model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      chk(rd1, expect_rd(ra1), $sformatf("rd1 r%0d", i));
      chk(rd2, expect_rd(ra2), $sformatf("rd2 r%0d", 31 - i));
    end
    // random traffic
    repeat (400) begin
      @(negedge clk);
      sw_lo = 8'($urandom); sw_hi = 7'($urandom); prog_sel = 3'($urandom);
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      chk(rd1, expect_rd(ra1), "rd1 random");
      chk(rd2, expect_rd(ra2), "rd2 random");
      for (int i = 0; i < 8; i++) nib[4*i +: 4] = model[i][3:0];
      chk(first_eight, nib, "first_eight");
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      if (we && !(wa inside {24, 25, 26, 31})) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
