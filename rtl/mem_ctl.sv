// mem_ctl: control of the data memory in the memory stage.
// mem_read is set for mrmovq, popq and ret; mem_write for rmmovq, pushq and
// call. The address is usually the ALU result valE; popq and ret read at
// the old stack pointer, which arrives as valB because these instructions
// read %rsp through the srcB port. The data written is usually valA; call
// writes valP, its return address. Combinational.
module mem_ctl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  word_t      vala,
  input  word_t      valb,
  input  word_t      vale,
  input  word_t      valp,
  output word_t      mem_addr,
  output word_t      mem_data,
  output logic       mem_read,
  output logic       mem_write
);
  assign mem_read  = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
  assign mem_write = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
  assign mem_addr  = (icode == I_POPQ || icode == I_RET) ? valb : vale;
  assign mem_data  = (icode == I_CALL) ? valp : vala;
endmodule
