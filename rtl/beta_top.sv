// beta_top: single-cycle 32-bit RISC processor derived from the MIT 6.004
// Beta, with MUL/DIV/MOD, the multi-cycle PUSHA instruction and hard-wired
// board I/O.
//
// Every instruction is fetched from the combinational instruction ROM,
// decoded by the control logic and completed in one clock cycle, except
// PUSHA, which the multi-counter stretches over eight cycles. Datapath, as
// in the design's block diagram:
//   Ra = ID[20:16] -> RA1; RA2SEL picks Rb = ID[15:11] (0) or Rc = ID[25:21] (1)
//   ASEL picks RD1 (0) or the branch target PC+4+4*SXT(C) (1)  -> ALU A
//   BSEL picks RD2 (0) or SXT(C) (1)                            -> ALU B
//   ALU output addresses the data memory, RD2 is its write data
//   WDSEL picks PC+4 (0), ALU output (1) or memory read data (2)
//   WASEL picks Rc (0) or XP = r30 (1) as register write address
//   Z = (RD1 == 0) steers BEQ/BNE; RD1 is also the JMP target
//
// PUSHA Ra pushes r0..r7: in cycle k (k = multi-counter, 0..7) register
// Rc+k (Rc = 0) is stored at Ra + SXT(C) + 4*k. How the counter enters the
// datapath is this design's own choice: it is added to the RA2 address and,
// times four, to the literal; both sums are unchanged for all single-cycle
// instructions, where the counter is 0.
//
// Interrupts: irq is taken only between instructions (multi-counter 0) and
// in user mode (PC[31] = 0), like the Beta; the instruction at PC is then
// not executed, PC+4 goes to XP and the PC to 0x80000008. An illegal opcode
// does the same with 0x80000004. Reset is synchronous and active high.
//
// Board I/O: sw_lo reads as r24, sw_hi as r25, prog_sel as r26;
// first_eight carries the low nibbles of r0..r7 for the display.
module beta_top
  import isa_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 128,
  parameter int unsigned IMEM_WORDS = programs_pkg::ROM_WORDS,
  parameter logic [IMEM_WORDS-1:0][31:0] ROM = programs_pkg::rom_image()
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        irq,
  input  logic [7:0]  sw_lo,
  input  logic [6:0]  sw_hi,
  input  logic [2:0]  prog_sel,
  output logic [31:0] first_eight,
  output logic [31:0] pc,
  output logic        illop
);

  logic [31:0]        id, pc_inc, pc_br;
  logic [31:0]        rd1, rd2, alu_a, alu_b, alu_y, mrd, wdata, lit_ext;
  logic [MULTI_W-1:0] multi_cnt;
  logic               multi_done, z, irq_take;
  reg_idx_t           ra, rb, rc, ra2, wa;
  ctl_t               c;

  assign rc = id[25:21];
  assign ra = id[20:16];
  assign rb = id[15:11];

  imem #(.WORDS(IMEM_WORDS), .ROM(ROM)) u_imem (
    .ia(pc), .id(id)
  );

  assign z        = (rd1 == '0);
  assign irq_take = irq && !pc[31] && (multi_cnt == '0);

  ctl u_ctl (
    .op(id[31:26]), .reset(reset), .irq(irq_take), .z(z), .c(c), .illop(illop)
  );

  pc_unit u_pc (
    .clk(clk), .reset(reset), .pcsel(c.pcsel), .jt(rd1), .lit(id[15:0]),
    .multi(c.multi), .pc(pc), .pc_inc(pc_inc), .pc_br(pc_br),
    .multi_cnt(multi_cnt), .multi_done(multi_done)
  );

  assign ra2 = (c.ra2sel ? rc : rb) + reg_idx_t'(multi_cnt);
  assign wa  = c.wasel ? XP : rc;

  regfile u_rf (
    .clk(clk), .ra1(ra), .ra2(ra2), .rd1(rd1), .rd2(rd2),
    .wa(wa), .wd(wdata), .we(c.werf),
    .sw_lo(sw_lo), .sw_hi(sw_hi), .prog_sel(prog_sel), .first_eight(first_eight)
  );

  assign lit_ext = {{16{id[15]}}, id[15:0]} + {25'b0, multi_cnt, 2'b00};
  assign alu_a   = c.asel ? pc_br : rd1;
  assign alu_b   = c.bsel ? lit_ext : rd2;

  alu #(.W(32)) u_alu (
    .alufn(c.alufn), .a(alu_a), .b(alu_b), .y(alu_y)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .addr(alu_y), .oe(c.moe), .rd(mrd), .we(c.mwr), .wd(rd2)
  );

  always_comb begin
    unique case (c.wdsel)
      WD_PC4:  wdata = pc_inc;
      WD_ALU:  wdata = alu_y;
      WD_MEM:  wdata = mrd;
      default: wdata = alu_y;
    endcase
  end

  // A multi-cycle instruction must keep the PC until its last cycle.
  property p_multi_holds_pc;
    @(posedge clk) disable iff (reset) !multi_done |=> (pc == $past(pc));
  endproperty
  a_multi_holds_pc: assert property (p_multi_holds_pc);

endmodule
