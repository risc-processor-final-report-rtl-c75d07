// ctl: combinational control logic of the processor.
//
// Decodes the opcode of the current instruction, together with the RESET
// and IRQ inputs and the Z flag (register Ra is zero), into the control word
// that steers the datapath: ALUFN, ASEL, BSEL, MOE, MWR, PCSEL, RA2SEL,
// WASEL, WDSEL, WERF and MULTI. The value of every signal for each
// instruction class (OP, OPC, LD, LDR, ST, JMP, BEQ, BNE, illegal opcode,
// PUSHA) and for RESET and IRQ follows the design's control table; entries
// the table leaves as don't-care are driven with 0 here.
//
// Priority: RESET over IRQ over the instruction. During RESET the write
// enables (MWR, WERF) are 0. The caller qualifies irq (it must only be
// raised between instructions).
//
// Purely combinational.
module ctl
  import isa_pkg::*;
(
  input  logic [5:0] op,
  input  logic       reset,
  input  logic       irq,
  input  logic       z,
  output ctl_t       c,
  output logic       illop      // current opcode is not implemented
);

  // ALU function of a register-form or literal-form operate instruction,
  // from the low four opcode bits (the OP and OPC groups share them).
  function automatic alufn_t f_of_op(logic [3:0] fn);
    case (fn)
      4'h0:    return ALU_ADD;
      4'h1:    return ALU_SUB;
      4'h2:    return ALU_MUL;
      4'h3:    return ALU_DIV;
      4'h4:    return ALU_CMPEQ;
      4'h5:    return ALU_CMPLT;
      4'h6:    return ALU_CMPLE;
      4'h7:    return ALU_MOD;
      4'h8:    return ALU_AND;
      4'h9:    return ALU_OR;
      4'hA:    return ALU_XOR;
      4'hB:    return ALU_XNOR;
      4'hC:    return ALU_SHL;
      4'hD:    return ALU_SHR;
      4'hE:    return ALU_SRA;
      default: return ALU_ZERO;
    endcase
  endfunction

  // Control word of a trap (illegal opcode or interrupt): save PC+4 in XP.
  function automatic ctl_t trap(pcsel_t target);
    ctl_t t;
    t        = '0;
    t.alufn  = ALU_ZERO;
    t.pcsel  = target;
    t.wasel  = 1'b1;
    t.wdsel  = WD_PC4;
    t.werf   = 1'b1;
    return t;
  endfunction

  always_comb begin
    c       = '0;
    c.alufn = ALU_ZERO;
    c.pcsel = PC_INC;
    c.wdsel = WD_PC4;
    illop   = 1'b0;

    if (op[5] && op[3:0] != 4'hF) begin
      // OP (register) or OPC (literal) group
      c.alufn = f_of_op(op[3:0]);
      c.bsel  = op[4];
      c.wdsel = WD_ALU;
      c.werf  = 1'b1;
    end else begin
      unique case (op)
        OP_LD: begin
          c.alufn = ALU_ADD; c.bsel = 1'b1; c.moe = 1'b1;
          c.wdsel = WD_MEM;  c.werf = 1'b1;
        end
        OP_LDR: begin
          c.alufn = ALU_A;   c.asel = 1'b1; c.moe = 1'b1;
          c.wdsel = WD_MEM;  c.werf = 1'b1;
        end
        OP_ST: begin
          c.alufn = ALU_ADD; c.bsel = 1'b1; c.mwr = 1'b1; c.ra2sel = 1'b1;
        end
        OP_JMP: begin
          c.pcsel = PC_JT;   c.wdsel = WD_PC4; c.werf = 1'b1;
        end
        OP_BEQ: begin
          c.pcsel = z ? PC_BR : PC_INC; c.wdsel = WD_PC4; c.werf = 1'b1;
        end
        OP_BNE: begin
          c.pcsel = z ? PC_INC : PC_BR; c.wdsel = WD_PC4; c.werf = 1'b1;
        end
        OP_PUSHA: begin
          c.alufn = ALU_ADD; c.bsel = 1'b1; c.mwr = 1'b1; c.ra2sel = 1'b1;
          c.multi = PUSHA_MULTI;
        end
        default: begin
          c     = trap(PC_ILLOP);
          illop = 1'b1;
        end
      endcase
    end

    if (irq) c = trap(PC_XADR);
    if (reset) begin
      c.mwr   = 1'b0;
      c.werf  = 1'b0;
      c.multi = '0;
    end
  end

endmodule
