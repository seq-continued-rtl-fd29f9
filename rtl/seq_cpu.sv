// seq_cpu: Y86-64 SEQ processor, one whole instruction per clock cycle.
//
// Every instruction passes through the same six steps, all combinational
// between the state elements: fetch (read instruction memory at PC, split
// the bytes, compute the length and valP), decode (read srcA/srcB from the
// register file), execute (ALU on aluA/aluB giving valE, condition Cnd from
// the prior condition codes), memory (read or write the data memory, valM),
// write back (valE to dstE, valM to dstM) and PC update (valP, valC or
// valM). At the next rising clock edge the PC, the register file, the
// condition codes, the data memory and the Stat register all change
// together. Register number 0xF disables a register write.
//
// Stat starts at AOK after reset. An instruction whose status is not AOK
// (halt, invalid instruction, address out of range) changes nothing but
// Stat; from then on the processor stays stopped until reset, with PC
// still pointing at that instruction. Instructions run only while run is
// high.
//
// Separate instruction and data memories follow the document's datapath
// drawing. The byte load port (load_en/load_addr/load_data) writes the
// same byte into both memories and is meant for use while run is low; the
// dbg_* ports read a register or a data-memory word for observation. These
// ports, the run input and the halt behaviour are this design's own.
// Reset is synchronous and active low.
module seq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output stat_t       stat,
  output word_t       pc,
  output logic [2:0]  cc,
  input  reg_t        dbg_reg,
  output word_t       dbg_reg_val,
  input  word_t       dbg_addr,
  output word_t       dbg_mem_val
);
  // fetch
  logic [79:0] instr;
  logic        imem_error, instr_valid;
  logic [3:0]  icode, ifun;
  reg_t        ra, rb;
  word_t       valc, valp;
  // decode / write back
  reg_t        src_a, src_b, dst_e, dst_m;
  word_t       vala, valb;
  // execute
  word_t       alu_a, alu_b, vale;
  logic [3:0]  alufun;
  logic        set_cc, cnd, zf, sf, of;
  // memory
  word_t       mem_addr, mem_data, valm;
  logic        mem_read, mem_write, dmem_error;
  // PC update / status
  word_t       new_pc;
  stat_t       new_stat;
  logic        commit;

  // An instruction updates state only if the processor is running and both
  // the processor and the instruction are in the AOK state.
  assign commit = run && (stat == S_AOK) && (new_stat == S_AOK);

  imem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .we(load_en), .waddr(load_addr), .wdata(load_data),
    .pc, .instr, .error(imem_error)
  );

  fetch_split u_split (
    .pc, .instr, .icode, .ifun, .ra, .rb, .valc, .valp, .instr_valid
  );

  decode_ctl u_dec (
    .icode, .ra, .rb, .cnd, .src_a, .src_b, .dst_e, .dst_m
  );

  regfile u_rf (
    .clk, .rst_n, .src_a, .src_b, .val_a(vala), .val_b(valb),
    .dst_e, .val_e(vale), .dst_m, .val_m(valm), .we(commit),
    .dbg_idx(dbg_reg), .dbg_val(dbg_reg_val)
  );

  exec_ctl u_exc (
    .icode, .ifun, .vala, .valb, .valc, .alu_a, .alu_b, .alufun, .set_cc
  );

  alu u_alu (
    .alu_a, .alu_b, .alufun, .val_e(vale), .zf, .sf, .of
  );

  cc_cond u_cc (
    .clk, .rst_n, .set_cc(set_cc && commit), .zf_in(zf), .sf_in(sf), .of_in(of),
    .ifun, .cnd, .cc
  );

  mem_ctl u_memc (
    .icode, .vala, .valb, .vale, .valp, .mem_addr, .mem_data, .mem_read, .mem_write
  );

  dmem #(.MEM_BYTES(MEM_BYTES)) u_dmem (
    .clk, .addr(mem_addr), .wdata(mem_data), .rdata(valm),
    .re(mem_read), .we(mem_write), .commit, .error(dmem_error),
    .load_en, .load_addr, .load_data, .dbg_addr, .dbg_val(dbg_mem_val)
  );

  pc_update u_pcu (
    .icode, .cnd, .valc, .valm, .valp, .new_pc
  );

  stat_logic u_stat (
    .icode, .instr_valid, .imem_error, .dmem_error, .stat(new_stat)
  );

  // PC and Stat registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc   <= '0;
      stat <= S_AOK;
    end else if (run && stat == S_AOK) begin
      stat <= new_stat;
      if (new_stat == S_AOK) pc <= new_pc;
    end
  end

  // Once stopped, the processor stays stopped at the same PC until reset.
  a_stopped_stays: assert property (@(posedge clk) disable iff (!rst_n)
    (stat != S_AOK) |=> (stat == $past(stat)) && (pc == $past(pc)));
endmodule
