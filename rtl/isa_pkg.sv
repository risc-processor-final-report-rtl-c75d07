// isa_pkg: instruction set, ALU function codes and control-word type of the
// single-cycle Beta-style processor.
//
// Instruction formats (32 bits, word aligned):
//   register form : {opcode[31:26], rc[25:21], ra[20:16], rb[15:11], 11'b0}
//   literal form  : {opcode[31:26], rc[25:21], ra[20:16], literal[15:0]}
// The literal is always sign extended. Register 31 reads as zero.
//
// The ALUFN codes are the ones of the design's ALU table. The opcode values
// follow the MIT 6.004 Beta the design is derived from (BEQ = 6'b011100 is
// the one value confirmed by the design's own waveforms); MOD, MODC and
// PUSHA, which the Beta lacks, take opcodes that the Beta leaves unused.
// The asm_* functions are a small assembler used to build the program ROM.
package isa_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [4:0] reg_idx_t;

  typedef enum logic [5:0] {
    OP_LD     = 6'b011000,
    OP_ST     = 6'b011001,
    OP_PUSHA  = 6'b011010,
    OP_JMP    = 6'b011011,
    OP_BEQ    = 6'b011100,
    OP_BNE    = 6'b011101,
    OP_LDR    = 6'b011111,
    OP_ADD    = 6'b100000,
    OP_SUB    = 6'b100001,
    OP_MUL    = 6'b100010,
    OP_DIV    = 6'b100011,
    OP_CMPEQ  = 6'b100100,
    OP_CMPLT  = 6'b100101,
    OP_CMPLE  = 6'b100110,
    OP_MOD    = 6'b100111,
    OP_AND    = 6'b101000,
    OP_OR     = 6'b101001,
    OP_XOR    = 6'b101010,
    OP_XNOR   = 6'b101011,
    OP_SHL    = 6'b101100,
    OP_SHR    = 6'b101101,
    OP_SRA    = 6'b101110,
    OP_ADDC   = 6'b110000,
    OP_SUBC   = 6'b110001,
    OP_MULC   = 6'b110010,
    OP_DIVC   = 6'b110011,
    OP_CMPEQC = 6'b110100,
    OP_CMPLTC = 6'b110101,
    OP_CMPLEC = 6'b110110,
    OP_MODC   = 6'b110111,
    OP_ANDC   = 6'b111000,
    OP_ORC    = 6'b111001,
    OP_XORC   = 6'b111010,
    OP_XNORC  = 6'b111011,
    OP_SHLC   = 6'b111100,
    OP_SHRC   = 6'b111101,
    OP_SRAC   = 6'b111110
  } opcode_t;

  typedef enum logic [5:0] {
    ALU_CMPEQ = 6'b000011,
    ALU_CMPLT = 6'b000101,
    ALU_CMPLE = 6'b000111,
    ALU_ADD   = 6'b010000,
    ALU_SUB   = 6'b010001,
    ALU_AND   = 6'b101000,
    ALU_OR    = 6'b101110,
    ALU_XOR   = 6'b100110,
    ALU_XNOR  = 6'b101001,
    ALU_A     = 6'b101010,
    ALU_SHL   = 6'b110000,
    ALU_SHR   = 6'b110001,
    ALU_SRA   = 6'b110011,
    ALU_MUL   = 6'b100010,
    ALU_DIV   = 6'b100011,
    ALU_MOD   = 6'b100100,
    ALU_ZERO  = 6'b000000
  } alufn_t;

  // PCSEL choices of the next-PC multiplexer.
  typedef enum logic [2:0] {
    PC_INC   = 3'd0,
    PC_BR    = 3'd1,
    PC_JT    = 3'd2,
    PC_ILLOP = 3'd3,
    PC_XADR  = 3'd4
  } pcsel_t;

  // WDSEL choices of the register write-data multiplexer.
  typedef enum logic [1:0] {
    WD_PC4 = 2'd0,
    WD_ALU = 2'd1,
    WD_MEM = 2'd2
  } wdsel_t;

  localparam logic [31:0] ILLOP_ADDR = 32'h8000_0004;
  localparam logic [31:0] XADR_ADDR  = 32'h8000_0008;
  localparam reg_idx_t    XP         = 5'd30;   // exception pointer
  localparam int unsigned MULTI_W    = 5;
  localparam logic [MULTI_W-1:0] PUSHA_MULTI = 5'd7;  // 8 cycles, r0..r7

  typedef struct packed {
    alufn_t                alufn;
    logic                  asel;
    logic                  bsel;
    logic                  moe;
    logic                  mwr;
    pcsel_t                pcsel;
    logic                  ra2sel;
    logic                  wasel;
    wdsel_t                wdsel;
    logic                  werf;
    logic [MULTI_W-1:0]    multi;
  } ctl_t;

  // ---- assembler -------------------------------------------------------
  function automatic logic [31:0] asm_op(opcode_t op, reg_idx_t ra, reg_idx_t rb, reg_idx_t rc);
    return {op, rc, ra, rb, 11'b0};
  endfunction

  function automatic logic [31:0] asm_opc(opcode_t op, reg_idx_t ra, logic [15:0] lit, reg_idx_t rc);
    return {op, rc, ra, lit};
  endfunction

  function automatic logic [31:0] asm_mov(reg_idx_t ra, reg_idx_t rc);
    return asm_opc(OP_ADDC, ra, 16'd0, rc);
  endfunction

  function automatic logic [31:0] asm_movc(logic [15:0] lit, reg_idx_t rc);
    return asm_opc(OP_ADDC, 5'd31, lit, rc);
  endfunction

  function automatic logic [31:0] asm_zero(reg_idx_t r);
    return asm_op(OP_XOR, r, r, r);
  endfunction

  function automatic logic [31:0] asm_jmp(reg_idx_t ra, reg_idx_t rc);
    return asm_opc(OP_JMP, ra, 16'd0, rc);
  endfunction

  function automatic logic [31:0] asm_pusha(reg_idx_t ra);
    return asm_opc(OP_PUSHA, ra, 16'd0, 5'd0);
  endfunction

  // Branch from word address `at` to word address `target`; the offset is
  // counted in words from the following instruction.
  function automatic logic [31:0] asm_br(opcode_t op, reg_idx_t ra, int at, int target, reg_idx_t rc);
    int off;
    off = target - (at + 1);
    return asm_opc(op, ra, off[15:0], rc);
  endfunction

endpackage
