// dmem: data memory, WORDS x 32-bit words addressed by byte.
//
// The address is a byte address; word i sits at address 4*i and the two low
// address bits are ignored, so stored words never overlap. Reads are
// combinational: rd shows the addressed word while oe (MOE) is high and
// zero otherwise. Writes take wd into the addressed word at the rising
// clock edge when we (MWR) is high.
//
// WORDS = 128 is the design's size. Own choices: addresses wrap modulo the
// memory size, and the array has no reset, like block RAM.
module dmem #(
  parameter int unsigned WORDS = 128
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        oe,
  output logic [31:0] rd,
  input  logic        we,
  input  logic [31:0] wd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];
  assign rd  = oe ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wd;
  end

endmodule
