// tb_imem: self-checking test of the instruction ROM.
//
// Checks hand-encoded instruction words of the shipped ROM (the idle loop
// BEQ r26 -> itself is 0x73FAFFFF), that the selector's branches reach the
// program entry points, that unused words read as zero, that the address
// wraps modulo the ROM size (trap vectors read words 1 and 2), and that a
// second instance with its own ROM parameter returns that contents.
module tb_imem;
  timeunit 1ns; timeprecision 1ps;
  import programs_pkg::*;

  localparam logic [3:0][31:0] SMALL = {32'hDEAD_BEEF, 32'h0123_4567, 32'hCAFE_F00D, 32'h1111_2222};

  logic [31:0] ia, id, ia2, id2;
  int checks = 0, failures = 0;

  imem dut (.ia(ia), .id(id));
  imem #(.WORDS(4), .ROM(SMALL)) dut_small (.ia(ia2), .id(id2));

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

  function automatic int br_target(int at, logic [31:0] w);
    return at + 1 + int'(signed'(w[15:0]));
  endfunction

  int entries [5] = '{FIB_ADDR, SORT_ADDR, SAVE_ADDR, LOAD_ADDR, PUSHA_ADDR};

  initial begin
    ia = 0; #1;
    chk(id, 32'h73FA_FFFF, "word 0: BEQ r26, self");
    for (int k = 0; k < 5; k++) begin
      ia = 32'(4 * (3 + 2 * k)); #1;
      chk(32'(id[31:26]), 32'b011101, "selector uses BNE");
      chk(32'(br_target(3 + 2 * k, id)), 32'(entries[k]), $sformatf("selector entry %0d", k + 1));
    end
    ia = 32'(4 * SAVE_ADDR); #1;  chk(id, 32'h6719_0000, "save: ST r24 -> mem[r25]");
    ia = 32'(4 * LOAD_ADDR); #1;  chk(id, 32'h6019_0000, "load: LD mem[r25] -> r0");
    ia = 32'(4 * PUSHA_ADDR); #1; chk(id, 32'h6819_0000, "pusha r25");
    ia = 32'(4 * PUSHA_ADDR + 4); #1; chk(id, 32'h6FFF_0000, "jmp r31");
    for (int i = ROM_USED; i < ROM_WORDS; i++) begin
      ia = 32'(4 * i); #1;
      chk(id, 0, "unused word");
    end
    for (int i = 0; i < ROM_WORDS; i++) begin
      ia = 32'(4 * i) | 32'h8000_0000 | 32'($urandom_range(0, 3)); #1;
      ia2 = 32'(4 * i); #1;
      chk(id, rom_image()[i], "address wraps and ignores byte offset");
      chk(id2, SMALL[i % 4], "custom contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
