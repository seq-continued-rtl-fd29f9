// exec_ctl: ALU input selection for the execute stage.
// alu_a is valA for rrmovq/cmovXX and OPq, valC (the constant or the
// displacement) for irmovq, rmmovq and mrmovq, -8 for pushq and call and +8
// for popq and ret. alu_b is valB (the base register or %rsp) except for
// rrmovq and irmovq, which add 0 so the value passes to valE. alufun is
// ifun for OPq and add otherwise; set_cc is raised by OPq only.
// The valA/valC/8 choices are the document's; the zero operand for the
// moves and set_cc for OPq only follow the Y86-64 textbook. Combinational.
module exec_ctl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic [3:0] ifun,
  input  word_t      vala,
  input  word_t      valb,
  input  word_t      valc,
  output word_t      alu_a,
  output word_t      alu_b,
  output logic [3:0] alufun,
  output logic       set_cc
);
  always_comb begin
    alu_a  = '0;
    alu_b  = valb;
    alufun = ALU_ADD;
    set_cc = 1'b0;
    case (icode)
      I_RRMOVQ: begin alu_a = vala; alu_b = '0; end
      I_IRMOVQ: begin alu_a = valc; alu_b = '0; end
      I_RMMOVQ, I_MRMOVQ: alu_a = valc;
      I_OPQ:    begin alu_a = vala; alufun = ifun; set_cc = 1'b1; end
      I_PUSHQ, I_CALL: alu_a = -64'sd8;
      I_POPQ, I_RET:   alu_a = 64'd8;
      default: ;
    endcase
  end
endmodule
