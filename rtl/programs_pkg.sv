// programs_pkg: contents of the instruction ROM.
//
// rom_image() assembles, with the isa_pkg assembler functions, the program
// selector and the five demonstration programs the processor ships with.
// Every program ends with a jump to address 0, where the selector waits.
//
//   selector (word 0)  spins while r26 (program select input) is 0, then
//                      copies r26 to r27 once (a two-cycle press of the
//                      selector is enough) and branches to program 1..5;
//                      other values return to word 0. Uses r27/r28 as
//                      scratch, so r0..r7 survive.
//   1 fibonacci        r0 = F(n), n = r24 (F(0) = 0, F(1) = 1); r1..r7 = 0.
//   2 sort             sorts the eight words at byte addresses 0..28 in
//                      ascending signed order (insertion sort), then loads
//                      them into r0..r7 for the display.
//   3 save             mem[r25] = r24; r0..r7 = 0.
//   4 load             r0 = mem[r25]; r1..r7 = 0.
//   5 pusha            PUSHA r25: stores r0..r7 at mem[r25 + 4*i].
//
// The programs' functions and register conventions (inputs in r24/r25,
// selector in r26, results in r0..r7) are the design's; the instruction
// sequences are written for this ROM. Start addresses are word addresses.
package programs_pkg;
  import isa_pkg::*;

  localparam int unsigned ROM_WORDS = 128;

  localparam int FIB_ADDR   = 13;
  localparam int SORT_ADDR  = 31;
  localparam int SAVE_ADDR  = 54;
  localparam int LOAD_ADDR  = 64;
  localparam int PUSHA_ADDR = 73;
  localparam int ROM_USED   = 75;

  typedef logic [ROM_WORDS-1:0][31:0] rom_t;

  function automatic rom_t rom_image();
    rom_t r;
    int   p;
    r = '0;   // unused words hold opcode 0, an illegal instruction

    // ---- program selector ------------------------------------------------
    r[0]  = asm_br(OP_BEQ, 5'd26, 0, 0, 5'd31);          // wait for r26 != 0
    r[1]  = asm_mov(5'd26, 5'd27);                       // sample the selector once
    r[2]  = asm_opc(OP_CMPEQC, 5'd27, 16'd1, 5'd28);
    r[3]  = asm_br(OP_BNE, 5'd28, 3, FIB_ADDR, 5'd31);
    r[4]  = asm_opc(OP_CMPEQC, 5'd27, 16'd2, 5'd28);
    r[5]  = asm_br(OP_BNE, 5'd28, 5, SORT_ADDR, 5'd31);
    r[6]  = asm_opc(OP_CMPEQC, 5'd27, 16'd3, 5'd28);
    r[7]  = asm_br(OP_BNE, 5'd28, 7, SAVE_ADDR, 5'd31);
    r[8]  = asm_opc(OP_CMPEQC, 5'd27, 16'd4, 5'd28);
    r[9]  = asm_br(OP_BNE, 5'd28, 9, LOAD_ADDR, 5'd31);
    r[10] = asm_opc(OP_CMPEQC, 5'd27, 16'd5, 5'd28);
    r[11] = asm_br(OP_BNE, 5'd28, 11, PUSHA_ADDR, 5'd31);
    r[12] = asm_jmp(5'd31, 5'd31);

    // ---- fibonacci: r1 = F(k), r2 = F(k+1), r3 counts n down --------------
    p = FIB_ADDR;
    r[p+0] = asm_movc(16'd0, 5'd1);
    r[p+1] = asm_movc(16'd1, 5'd2);
    r[p+2] = asm_mov(5'd24, 5'd3);
    r[p+3] = asm_br(OP_BEQ, 5'd3, p+3, p+9, 5'd31);        // loop: n == 0 ?
    r[p+4] = asm_op(OP_ADD, 5'd1, 5'd2, 5'd4);
    r[p+5] = asm_mov(5'd2, 5'd1);
    r[p+6] = asm_mov(5'd4, 5'd2);
    r[p+7] = asm_opc(OP_SUBC, 5'd3, 16'd1, 5'd3);
    r[p+8] = asm_br(OP_BEQ, 5'd31, p+8, p+3, 5'd31);
    r[p+9] = asm_mov(5'd1, 5'd0);
    for (int i = 1; i < 8; i++)
      r[p+9+i] = asm_zero(reg_idx_t'(i));
    r[p+17] = asm_jmp(5'd31, 5'd31);

    // ---- sort: r0 = 4*i, r1 = 4*j, r3 = a[j], r4 = a[j-1], r5 = flag -------
    p = SORT_ADDR;
    r[p+0]  = asm_movc(16'd4, 5'd0);
    r[p+1]  = asm_mov(5'd0, 5'd1);                          // outer
    r[p+2]  = asm_br(OP_BEQ, 5'd1, p+2, p+11, 5'd31);       // inner: j == 0 ?
    r[p+3]  = asm_opc(OP_LD, 5'd1, -16'sd4, 5'd4);
    r[p+4]  = asm_opc(OP_LD, 5'd1, 16'd0, 5'd3);
    r[p+5]  = asm_op(OP_CMPLE, 5'd4, 5'd3, 5'd5);
    r[p+6]  = asm_br(OP_BNE, 5'd5, p+6, p+11, 5'd31);       // in order: stop
    r[p+7]  = asm_opc(OP_ST, 5'd1, -16'sd4, 5'd3);
    r[p+8]  = asm_opc(OP_ST, 5'd1, 16'd0, 5'd4);
    r[p+9]  = asm_opc(OP_SUBC, 5'd1, 16'd4, 5'd1);
    r[p+10] = asm_br(OP_BEQ, 5'd31, p+10, p+2, 5'd31);
    r[p+11] = asm_opc(OP_ADDC, 5'd0, 16'd4, 5'd0);          // next
    r[p+12] = asm_opc(OP_CMPLTC, 5'd0, 16'd32, 5'd5);
    r[p+13] = asm_br(OP_BNE, 5'd5, p+13, p+1, 5'd31);
    for (int i = 0; i < 8; i++)
      r[p+14+i] = asm_opc(OP_LD, 5'd31, 16'(4*i), reg_idx_t'(i));
    r[p+22] = asm_jmp(5'd31, 5'd31);

    // ---- save ------------------------------------------------------------
    p = SAVE_ADDR;
    r[p+0] = asm_opc(OP_ST, 5'd25, 16'd0, 5'd24);
    for (int i = 0; i < 8; i++)
      r[p+1+i] = asm_zero(reg_idx_t'(i));
    r[p+9] = asm_jmp(5'd31, 5'd31);

    // ---- load ------------------------------------------------------------
    p = LOAD_ADDR;
    r[p+0] = asm_opc(OP_LD, 5'd25, 16'd0, 5'd0);
    for (int i = 1; i < 8; i++)
      r[p+i] = asm_zero(reg_idx_t'(i));
    r[p+8] = asm_jmp(5'd31, 5'd31);

    // ---- pusha -----------------------------------------------------------
    p = PUSHA_ADDR;
    r[p+0] = asm_pusha(5'd25);
    r[p+1] = asm_jmp(5'd31, 5'd31);

    return r;
  endfunction

endpackage
