// tb_pc_unit: self-checking test of the program counter block.
//
// Drives random PCSEL choices, jump targets and literals and follows the PC
// in a model: PC+4, branch target PC+4+4*SXT(lit), jump target with the two
// low bits cleared, the two trap vectors, and reset to 0. Multi-cycle
// instructions (multi = 7, as PUSHA, and other counts) must hold the PC for
// multi+1 cycles while the multi-counter steps 0..multi.
module tb_pc_unit;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic               clk = 1'b0;
  logic               reset;
  pcsel_t             pcsel;
  logic [31:0]        jt, pc, pc_inc, pc_br;
  logic [15:0]        lit;
  logic [MULTI_W-1:0] multi, multi_cnt;
  logic               multi_done;
  logic [31:0]        m_pc, e_br;
  int                 m_cnt;
  int checks = 0, failures = 0;

  pc_unit dut (.clk(clk), .reset(reset), .pcsel(pcsel), .jt(jt), .lit(lit),
               .multi(multi), .pc(pc), .pc_inc(pc_inc), .pc_br(pc_br),
               .multi_cnt(multi_cnt), .multi_done(multi_done));

  always #5 clk = ~clk;

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
    reset = 1; pcsel = PC_INC; jt = 0; lit = 0; multi = 0;
    @(negedge clk); @(negedge clk);
    reset = 0;
    m_pc = 0; m_cnt = 0;
    chk(pc, 0, "reset value");
    repeat (600) begin
      pcsel = pcsel_t'($urandom_range(0, 4));
      jt = $urandom; lit = 16'($urandom);
      multi = 0;
      #1;
      e_br = m_pc + 4 + {{14{lit[15]}}, lit, 2'b00};
      chk(pc, m_pc, "pc");
      chk(pc_inc, m_pc + 4, "pc_inc");
      chk(pc_br, e_br, "pc_br");
      case (pcsel)
        PC_INC:   m_pc = m_pc + 4;
        PC_BR:    m_pc = e_br;
        PC_JT:    m_pc = jt & ~32'd3;
        PC_ILLOP: m_pc = 32'h8000_0004;
        default:  m_pc = 32'h8000_0008;
      endcase
      @(posedge clk); #1;
      chk(pc, m_pc, "next pc");
      @(negedge clk);
    end
    // multi-cycle instructions
    for (int mv = 1; mv < 10; mv += 3) begin
      pcsel = PC_INC; multi = MULTI_W'(mv);
      #1;
      for (int k = 0; k <= mv; k++) begin
        chk(32'(multi_cnt), 32'(k), "multi counter steps");
        chk(32'(multi_done), 32'(k == mv), "multi_done");
        chk(pc, m_pc, "pc held during multi-cycle instruction");
        @(negedge clk); #1;
      end
      m_pc = m_pc + 4;
      chk(pc, m_pc, "pc advances after last cycle");
      chk(32'(multi_cnt), 0, "counter back to zero");
      multi = 0;
    end
    // reset in the middle
    @(negedge clk); reset = 1; @(negedge clk);
    chk(pc, 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
