// fetch_split: the "split" and "instr. length" logic of the fetch stage.
// Takes the 10 instruction bytes read at PC and splits them into
// icode:ifun (byte 0), rA:rB (byte 1, if the instruction has a register
// byte) and valC (the 8 little-endian bytes after the register byte, or
// after byte 0 for jXX and call). The length is 1 + register byte + 8 for
// a constant, and valP = PC + length. instr_valid is low for an unknown
// icode or an ifun outside the defined range. Purely combinational.
// Split and length come from the document's fetch description; the
// encodings not printed there and the ifun check follow the Y86-64 ISA.
module fetch_split
  import y86_pkg::*;
(
  input  word_t       pc,
  input  logic [79:0] instr,
  output logic [3:0]  icode,
  output logic [3:0]  ifun,
  output reg_t        ra,
  output reg_t        rb,
  output word_t       valc,
  output word_t       valp,
  output logic        instr_valid
);
  logic need_regids, need_valc;

  assign icode = instr[7:4];
  assign ifun  = instr[3:0];

  always_comb begin
    need_regids = 1'b0;
    need_valc   = 1'b0;
    instr_valid = 1'b1;
    unique case (icode)
      I_HALT, I_NOP, I_RET:        instr_valid = (ifun == 4'h0);
      I_RRMOVQ:                    begin need_regids = 1'b1; instr_valid = (ifun <= C_G); end
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: begin need_regids = 1'b1; need_valc = 1'b1; instr_valid = (ifun == 4'h0); end
      I_OPQ:                       begin need_regids = 1'b1; instr_valid = (ifun <= ALU_XOR); end
      I_JXX:                       begin need_valc = 1'b1; instr_valid = (ifun <= C_G); end
      I_CALL:                      begin need_valc = 1'b1; instr_valid = (ifun == 4'h0); end
      I_PUSHQ, I_POPQ:             begin need_regids = 1'b1; instr_valid = (ifun == 4'h0); end
      default:                     instr_valid = 1'b0;
    endcase
  end

  assign ra   = need_regids ? instr[15:12] : R_NONE;
  assign rb   = need_regids ? instr[11:8]  : R_NONE;
  assign valc = need_regids ? instr[79:16] : instr[71:8];
  assign valp = pc + 64'd1 + (need_regids ? 64'd1 : 64'd0) + (need_valc ? 64'd8 : 64'd0);
endmodule
