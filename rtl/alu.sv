// alu: the 64-bit ALU of the execute stage. Computes
// val_e = alu_b OP alu_a for OP in add (0), sub (1), and (2), xor (3), the
// four operations of the Y86-64 OPq instruction, and the condition flags of
// the result: zero, sign and signed overflow (overflow is 0 for and/xor).
// The operand order (B minus A) follows the Y86-64 ISA. Combinational.
module alu
  import y86_pkg::*;
(
  input  word_t      alu_a,
  input  word_t      alu_b,
  input  logic [3:0] alufun,
  output word_t      val_e,
  output logic       zf,
  output logic       sf,
  output logic       of
);
  always_comb begin
    of = 1'b0;
    case (alufun)
      ALU_SUB: begin
        val_e = alu_b - alu_a;
        of    = (alu_b[63] != alu_a[63]) && (val_e[63] != alu_b[63]);
      end
      ALU_AND: val_e = alu_b & alu_a;
      ALU_XOR: val_e = alu_b ^ alu_a;
      default: begin
        val_e = alu_b + alu_a;
        of    = (alu_b[63] == alu_a[63]) && (val_e[63] != alu_b[63]);
      end
    endcase
  end
  assign zf = (val_e == '0);
  assign sf = val_e[63];
endmodule
