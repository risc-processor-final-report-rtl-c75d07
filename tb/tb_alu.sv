// tb_alu: self-checking test of the ALU.
//
// Applies every function code of the ALU table to directed corner operands
// and to random operands and compares y with a reference computed here from
// the operation's definition. Codes outside the table must give zero.
module tb_alu;
  timeunit 1ns; timeprecision 1ps;
  import isa_pkg::*;

  logic [5:0]  fn;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.alufn(alufn_t'(fn)), .a(a), .b(b), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_y(logic [5:0] f, logic [31:0] x, logic [31:0] w);
    longint sx, sw;
    sx = longint'(signed'(x));
    sw = longint'(signed'(w));
    case (f)
      6'b000011: return {31'b0, x == w};
      6'b000101: return {31'b0, sx < sw};
      6'b000111: return {31'b0, sx <= sw};
      6'b010000: return 32'(longint'(x) + longint'(w));
      6'b010001: return 32'(longint'(x) - longint'(w));
      6'b101000: return x & w;
      6'b101110: return x | w;
      6'b100110: return x ^ w;
      6'b101001: return x ~^ w;
      6'b101010: return x;
      6'b110000: return 32'(longint'(x) << w[4:0]);
      6'b110001: return 32'(longint'(x) >> w[4:0]);
      6'b110011: return 32'(sx >>> w[4:0]);
      6'b100010: return 32'(sx * sw);
      6'b100011: return (w == 0) ? 0 : 32'(sx / sw);
      6'b100100: return (w == 0) ? 0 : 32'(sx % sw);
      default:   return 0;
    endcase
  endfunction

  task automatic apply(logic [5:0] f, logic [31:0] x, logic [31:0] w);
    logic [31:0] e;
    fn = f; a = x; b = w;
    #1;
    e = ref_y(f, x, w);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL fn=%b a=%h b=%h y=%h expected %h", f, x, w, y, e);
    end
  endtask

  logic [31:0] corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                               32'h7FFF_FFFF, 32'd7, 32'hFFFF_FFF9, 32'd31};

  initial begin
    for (int f = 0; f < 64; f++) begin
      foreach (corners[i])
        foreach (corners[j])
          apply(6'(f), corners[i], corners[j]);
      repeat (40) apply(6'(f), $urandom, $urandom);
    end
    // a few hand-worked values
    fn = 6'b100100; a = 32'd17; b = 32'd5; #1;
    checks++; if (y != 32'd2) begin failures++; $display("FAIL 17 mod 5"); end
    fn = 6'b110011; a = 32'hF000_0000; b = 32'd4; #1;
    checks++; if (y != 32'hFF00_0000) begin failures++; $display("FAIL sra"); end
    fn = 6'b000101; a = 32'hFFFF_FFFF; b = 32'd0; #1;
    checks++; if (y != 32'd1) begin failures++; $display("FAIL -1 < 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
