// imem: instruction memory, a combinational read-only memory.
//
// Returns the 32-bit instruction at byte address ia in the same cycle. Word
// i sits at address 4*i; the address is taken modulo the ROM size, so the
// trap vectors 0x80000004 and 0x80000008 read words 1 and 2. The contents
// are the parameter ROM, by default the program selector and demonstration
// programs of programs_pkg.
//
// Read-only and combinational as in the design. The size (128 words) is
// this implementation's choice: it holds the 75 words of shipped programs.
module imem
  import programs_pkg::*;
#(
  parameter int unsigned WORDS = ROM_WORDS,
  parameter logic [WORDS-1:0][31:0] ROM = rom_image()
) (
  input  logic [31:0] ia,
  output logic [31:0] id
);

  localparam int unsigned AW = $clog2(WORDS);

  assign id = ROM[ia[AW+1:2]];

endmodule
