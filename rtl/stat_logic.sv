// stat_logic: status of the instruction being executed. ADR when the PC
// lies outside instruction memory, INS for an invalid instruction, ADR for
// a data-memory access outside memory, HLT for halt, AOK otherwise, in that
// order of priority. The codes and the priority follow the Y86-64 ISA; the
// document names only the Stat register and its stop/error role.
// Combinational; the Stat register is in the processor top.
module stat_logic
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic       instr_valid,
  input  logic       imem_error,
  input  logic       dmem_error,
  output stat_t      stat
);
  always_comb begin
    if (imem_error)          stat = S_ADR;
    else if (!instr_valid)   stat = S_INS;
    else if (dmem_error)     stat = S_ADR;
    else if (icode == I_HALT) stat = S_HLT;
    else                     stat = S_AOK;
  end
endmodule
