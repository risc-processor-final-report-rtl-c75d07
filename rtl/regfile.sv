// regfile: 32 x 32-bit register file with the board inputs wired in.
//
// Two read ports are combinational; the write port writes wd into register
// wa at the rising clock edge when we is high. As in the design, three
// registers are hard-wired to board inputs and read those inputs instead of
// storage: r24 reads the eight switches sw_lo, r25 the seven switches sw_hi
// and r26 the program selector. The low four bits of r0..r7 are brought out
// on first_eight for the display, r0 in bits [3:0] up to r7 in [31:28].
//
// Own choices: r31 always reads zero and ignores writes (the programs use
// it as the zero register, as in the Beta); writes to r24..r26 are ignored;
// the storage has no reset, like block RAM, and programs write a register
// before reading it.
module regfile
  import isa_pkg::*;
#(
  parameter int unsigned PSEL_W = 3
) (
  input  logic              clk,
  input  reg_idx_t          ra1,
  input  reg_idx_t          ra2,
  output logic [31:0]       rd1,
  output logic [31:0]       rd2,
  input  reg_idx_t          wa,
  input  logic [31:0]       wd,
  input  logic              we,
  input  logic [7:0]        sw_lo,
  input  logic [6:0]        sw_hi,
  input  logic [PSEL_W-1:0] prog_sel,
  output logic [31:0]       first_eight
);

  logic [31:0] regs [32];

  function automatic logic [31:0] read(reg_idx_t a, logic [31:0] stored);
    unique case (a)
      5'd24:   return 32'(sw_lo);
      5'd25:   return 32'(sw_hi);
      5'd26:   return 32'(prog_sel);
      5'd31:   return '0;
      default: return stored;
    endcase
  endfunction

  assign rd1 = read(ra1, regs[ra1]);
  assign rd2 = read(ra2, regs[ra2]);

  always_ff @(posedge clk) begin
    if (we && !(wa inside {5'd24, 5'd25, 5'd26, 5'd31}))
      regs[wa] <= wd;
  end

  always_comb begin
    for (int i = 0; i < 8; i++)
      first_eight[4*i +: 4] = regs[i][3:0];
  end

endmodule
