// regfile: the SEQ register file, 15 registers of 64 bits with two read
// ports and two write ports. Reads are combinational: val_a = R[src_a],
// val_b = R[src_b]. Writes happen at the rising clock edge while we is
// high: R[dst_e] <= val_e and R[dst_m] <= val_m. Register number 0xF is the
// "no register" number: it reads as 0 and a write to it is dropped, which
// is how the processor disables a write. When both write ports name the
// same register the M port (memory result) wins, as in the Y86-64 textbook;
// that rule, the reset to zero and the extra debug read port are this
// design's own choices. Reset is synchronous, active low.
module regfile
  import y86_pkg::*;
#(
  parameter int unsigned NREGS = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  reg_t  src_a,
  input  reg_t  src_b,
  output word_t val_a,
  output word_t val_b,
  input  reg_t  dst_e,
  input  word_t val_e,
  input  reg_t  dst_m,
  input  word_t val_m,
  input  logic  we,
  input  reg_t  dbg_idx,
  output word_t dbg_val
);
  word_t r [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we) begin
      if (32'(dst_e) < NREGS) r[dst_e] <= val_e;
      if (32'(dst_m) < NREGS) r[dst_m] <= val_m;
    end
  end

  assign val_a   = (32'(src_a)   < NREGS) ? r[src_a]   : '0;
  assign val_b   = (32'(src_b)   < NREGS) ? r[src_b]   : '0;
  assign dbg_val = (32'(dbg_idx) < NREGS) ? r[dbg_idx] : '0;
endmodule
