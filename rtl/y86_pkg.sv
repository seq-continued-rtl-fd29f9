// y86_pkg: shared types and constants of the Y86-64 SEQ processor.
// Holds the opcode (icode) and function (ifun) encodings, the register
// numbers with special meaning (%rsp and the "no register" number 0xF) and
// the processor status codes. The icode values 2, 3, 4 and 5 and the use of
// 0xF as "no register" come from the instruction formats this design was
// built from; the remaining codes follow the published Y86-64 ISA.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  reg_t;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX (ifun != 0)
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] ALU_ADD = 4'h0;
  localparam logic [3:0] ALU_SUB = 4'h1;
  localparam logic [3:0] ALU_AND = 4'h2;
  localparam logic [3:0] ALU_XOR = 4'h3;

  // Condition functions (ifun of jXX and cmovXX)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam reg_t R_RSP  = 4'h4;
  localparam reg_t R_NONE = 4'hF;

  typedef enum logic [2:0] {
    S_AOK = 3'd1,
    S_HLT = 3'd2,
    S_ADR = 3'd3,
    S_INS = 3'd4
  } stat_t;

endpackage
