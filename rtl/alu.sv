// alu: combinational arithmetic logic unit of the processor.
//
// Computes y = f(a, b) for the function selected by the 6-bit alufn code.
// The codes and operations (compare equal / less than / less or equal,
// add, subtract, multiply, divide, modulo, AND, OR, XOR, XNOR, pass A,
// shift left, shift right logical and arithmetic) are the design's own
// table; any other code gives zero. Comparisons return 1 or 0 in bit 0.
//
// Own choices where the design says nothing: comparisons, multiply, divide
// and modulo treat the operands as two's complement numbers, as in the Beta;
// shifts use b[4:0] as the distance; division or modulo by zero gives 0,
// and the one overflowing quotient (most negative number / -1) wraps to
// the dividend, with remainder 0.
//
// Purely combinational: no clock, result valid in the same cycle.
module alu
  import isa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alufn_t       alufn,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic signed [W-1:0] sa, sb;
  logic [4:0]          shamt;
  logic                ovf;     // most negative number divided by -1

  assign sa    = signed'(a);
  assign sb    = signed'(b);
  assign shamt = b[4:0];
  assign ovf   = (a == {1'b1, {(W-1){1'b0}}}) && (b == '1);

  always_comb begin
    unique case (alufn)
      ALU_CMPEQ: y = W'(a == b);
      ALU_CMPLT: y = W'(sa < sb);
      ALU_CMPLE: y = W'(sa <= sb);
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_XNOR:  y = ~(a ^ b);
      ALU_A:     y = a;
      ALU_SHL:   y = a << shamt;
      ALU_SHR:   y = a >> shamt;
      ALU_SRA:   y = unsigned'(sa >>> shamt);
      ALU_MUL:   y = unsigned'(sa * sb);
      ALU_DIV:   y = (b == '0) ? '0 : ovf ? a  : unsigned'(sa / sb);
      ALU_MOD:   y = (b == '0) ? '0 : ovf ? '0 : unsigned'(sa % sb);
      default:   y = '0;
    endcase
  end

endmodule
