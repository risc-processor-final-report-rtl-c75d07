// pc_unit: program counter with next-PC selection and the multi-counter.
//
// The 32-bit PC register (its two low bits always 0) is loaded at every
// rising clock edge from the 5-input PCSEL multiplexer:
//   0: PC+4, or the current PC while a multi-cycle instruction is running
//   1: branch target PC+4+4*SXT(lit)
//   2: jump target jt (register Ra) with the two low bits cleared
//   3: 0x80000004, illegal-opcode vector
//   4: 0x80000008, interrupt vector
// pc_inc (PC+4) and pc_br (the branch target) are also outputs; the datapath
// writes pc_inc into the register file and feeds pc_br to the ALU for LDR.
//
// Multi-counter: a second register that counts the cycles of a multi-cycle
// instruction. While it differs from the control word's multi value it
// increments every cycle and holds the PC (input 0 of the multiplexer picks
// the current PC); in the cycle it equals multi it returns to 0 and the PC
// moves on. A single-cycle instruction has multi = 0, so it advances at
// once; PUSHA (multi = 7) occupies 8 cycles, with multi_cnt = 0..7.
//
// This structure follows the design's PC block diagram. Own choice: reset
// (synchronous, active high) clears both PC and counter, so execution starts
// at address 0 where the program selector sits.
module pc_unit
  import isa_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  pcsel_t             pcsel,
  input  logic [31:0]        jt,
  input  logic [15:0]        lit,
  input  logic [MULTI_W-1:0] multi,
  output logic [31:0]        pc,
  output logic [31:0]        pc_inc,
  output logic [31:0]        pc_br,
  output logic [MULTI_W-1:0] multi_cnt,
  output logic               multi_done   // last (or only) cycle of the instruction
);

  logic [31:0] next_pc, seq_pc;

  assign pc_inc     = pc + 32'd4;
  assign pc_br      = pc_inc + {{14{lit[15]}}, lit, 2'b00};
  assign multi_done = (multi_cnt == multi);
  assign seq_pc     = multi_done ? pc_inc : pc;

  always_comb begin
    unique case (pcsel)
      PC_INC:   next_pc = seq_pc;
      PC_BR:    next_pc = pc_br;
      PC_JT:    next_pc = jt;
      PC_ILLOP: next_pc = ILLOP_ADDR;
      PC_XADR:  next_pc = XADR_ADDR;
      default:  next_pc = seq_pc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      pc        <= '0;
      multi_cnt <= '0;
    end else begin
      pc        <= {next_pc[31:2], 2'b00};
      multi_cnt <= multi_done ? '0 : multi_cnt + 1'b1;
    end
  end

endmodule
