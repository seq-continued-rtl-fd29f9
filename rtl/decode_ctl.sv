// decode_ctl: register-number selection for decode and write back.
// Chooses which registers to read (src_a, src_b) and which to write with
// the ALU result (dst_e) and the memory result (dst_m), from icode, the
// instruction's rA/rB fields and the condition result cnd. 0xF means "no
// register". The read choices follow the document's table of registers
// each instruction reads (call and ret read no srcA, pushq and popq read rA
// and %rsp). A cmovXX whose condition fails writes nothing (dst_e = 0xF).
// Purely combinational.
module decode_ctl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  reg_t       ra,
  input  reg_t       rb,
  input  logic       cnd,
  output reg_t       src_a,
  output reg_t       src_b,
  output reg_t       dst_e,
  output reg_t       dst_m
);
  always_comb begin
    src_a = R_NONE;
    src_b = R_NONE;
    dst_e = R_NONE;
    dst_m = R_NONE;
    case (icode)
      I_RRMOVQ: begin src_a = ra; dst_e = cnd ? rb : R_NONE; end
      I_IRMOVQ: dst_e = rb;
      I_MRMOVQ: begin src_b = rb; dst_m = ra; end
      I_RMMOVQ: begin src_a = ra; src_b = rb; end
      I_OPQ:    begin src_a = ra; src_b = rb; dst_e = rb; end
      I_CALL, I_RET: begin src_b = R_RSP; dst_e = R_RSP; end
      I_PUSHQ:  begin src_a = ra; src_b = R_RSP; dst_e = R_RSP; end
      I_POPQ:   begin src_a = ra; src_b = R_RSP; dst_e = R_RSP; dst_m = ra; end
      default: ;
    endcase
  end
endmodule
