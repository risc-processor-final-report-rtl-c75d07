// tb_ctl: self-checking test of the control logic.
//
// For all 64 opcodes, both values of Z, and with RESET and IRQ, compares the
// control word with the entries of the control table, written out here
// column by column (don't-care entries are not compared).
module tb_ctl;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic [5:0] op;
  logic       reset, irq, z, illop;
  ctl_t       c;
  int checks = 0, failures = 0;

  ctl dut (.op(op), .reset(reset), .irq(irq), .z(z), .c(c), .illop(illop));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%b z=%b irq=%b reset=%b %s: got %0h expected %0h",
               op, z, irq, reset, what, got, exp);
    end
  endtask

  // ALUFN of register/literal operate instructions, by mnemonic.
  function automatic logic [5:0] fop(logic [3:0] lo);
    logic [5:0] t [16] = '{6'b010000, 6'b010001, 6'b100010, 6'b100011,
                          6'b000011, 6'b000101, 6'b000111, 6'b100100,
                          6'b101000, 6'b101110, 6'b100110, 6'b101001,
                          6'b110000, 6'b110001, 6'b110011, 6'b000000};
    return t[lo];
  endfunction

  task automatic check_trap(int vec);
    expect_eq(32'(c.mwr), 0, "MWR");
    expect_eq(32'(c.pcsel), vec, "PCSEL");
    expect_eq(32'(c.wasel), 1, "WASEL");
    expect_eq(32'(c.wdsel), 0, "WDSEL");
    expect_eq(32'(c.werf), 1, "WERF");
    expect_eq(32'(c.multi), 0, "MULTI");
  endtask

  initial begin
    reset = 0; irq = 0;
    for (int o = 0; o < 64; o++) begin
      for (int zz = 0; zz < 2; zz++) begin
        op = 6'(o); z = zz[0];
        #1;
        if (op[5] && op[3:0] != 4'hF) begin            // OP / OPC
          expect_eq(32'(c.alufn), 32'(fop(op[3:0])), "ALUFN");
          expect_eq(32'(c.asel), 0, "ASEL");
          expect_eq(32'(c.bsel), 32'(op[4]), "BSEL");
          expect_eq(32'(c.mwr), 0, "MWR");
          expect_eq(32'(c.pcsel), 0, "PCSEL");
          if (!op[4]) expect_eq(32'(c.ra2sel), 0, "RA2SEL");
          expect_eq(32'(c.wasel), 0, "WASEL");
          expect_eq(32'(c.wdsel), 1, "WDSEL");
          expect_eq(32'(c.werf), 1, "WERF");
          expect_eq(32'(c.multi), 0, "MULTI");
          expect_eq(32'(illop), 0, "illop");
        end else begin
          case (op)
            6'b011000: begin // LD
              expect_eq(32'(c.alufn), 32'b010000, "ALUFN");
              expect_eq(32'(c.asel), 0, "ASEL"); expect_eq(32'(c.bsel), 1, "BSEL");
              expect_eq(32'(c.moe), 1, "MOE");   expect_eq(32'(c.mwr), 0, "MWR");
              expect_eq(32'(c.pcsel), 0, "PCSEL"); expect_eq(32'(c.wasel), 0, "WASEL");
              expect_eq(32'(c.wdsel), 2, "WDSEL"); expect_eq(32'(c.werf), 1, "WERF");
            end
            6'b011111: begin // LDR
              expect_eq(32'(c.alufn), 32'b101010, "ALUFN");
              expect_eq(32'(c.asel), 1, "ASEL"); expect_eq(32'(c.moe), 1, "MOE");
              expect_eq(32'(c.mwr), 0, "MWR");   expect_eq(32'(c.pcsel), 0, "PCSEL");
              expect_eq(32'(c.wasel), 0, "WASEL"); expect_eq(32'(c.wdsel), 2, "WDSEL");
              expect_eq(32'(c.werf), 1, "WERF");
            end
            6'b011001: begin // ST
              expect_eq(32'(c.alufn), 32'b010000, "ALUFN");
              expect_eq(32'(c.asel), 0, "ASEL"); expect_eq(32'(c.bsel), 1, "BSEL");
              expect_eq(32'(c.moe), 0, "MOE");   expect_eq(32'(c.mwr), 1, "MWR");
              expect_eq(32'(c.pcsel), 0, "PCSEL"); expect_eq(32'(c.ra2sel), 1, "RA2SEL");
              expect_eq(32'(c.werf), 0, "WERF");
            end
            6'b011011: begin // JMP
              expect_eq(32'(c.mwr), 0, "MWR"); expect_eq(32'(c.pcsel), 2, "PCSEL");
              expect_eq(32'(c.wasel), 0, "WASEL"); expect_eq(32'(c.wdsel), 0, "WDSEL");
              expect_eq(32'(c.werf), 1, "WERF");
            end
            6'b011100, 6'b011101: begin // BEQ, BNE
              expect_eq(32'(c.mwr), 0, "MWR");
              expect_eq(32'(c.pcsel), (z ^ op[0]) ? 1 : 0, "PCSEL");
              expect_eq(32'(c.wasel), 0, "WASEL"); expect_eq(32'(c.wdsel), 0, "WDSEL");
              expect_eq(32'(c.werf), 1, "WERF");
            end
            6'b011010: begin // PUSHA
              expect_eq(32'(c.alufn), 32'b010000, "ALUFN");
              expect_eq(32'(c.asel), 0, "ASEL"); expect_eq(32'(c.bsel), 1, "BSEL");
              expect_eq(32'(c.moe), 0, "MOE");   expect_eq(32'(c.mwr), 1, "MWR");
              expect_eq(32'(c.pcsel), 0, "PCSEL"); expect_eq(32'(c.ra2sel), 1, "RA2SEL");
              expect_eq(32'(c.werf), 0, "WERF"); expect_eq(32'(c.multi), 7, "MULTI");
            end
            default: begin   // illegal opcode
              check_trap(3);
              expect_eq(32'(illop), 1, "illop");
            end
          endcase
        end
        // the same opcode with an interrupt pending, then with reset
        irq = 1; #1;
        check_trap(4);
        irq = 0; reset = 1; #1;
        expect_eq(32'(c.mwr), 0, "MWR in reset");
        expect_eq(32'(c.multi), 0, "MULTI in reset");
        reset = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
