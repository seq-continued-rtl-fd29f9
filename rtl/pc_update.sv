// pc_update: the next-PC multiplexer. The next PC is valP (the following
// instruction) except for call (valC, the target), a jXX whose condition
// holds (valC) and ret (valM, the return address read from the stack).
// Combinational; the PC register itself is in the processor top.
module pc_update
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic       cnd,
  input  word_t      valc,
  input  word_t      valm,
  input  word_t      valp,
  output word_t      new_pc
);
  always_comb begin
    if (icode == I_CALL || (icode == I_JXX && cnd)) new_pc = valc;
    else if (icode == I_RET)                      new_pc = valm;
    else                                          new_pc = valp;
  end
endmodule
