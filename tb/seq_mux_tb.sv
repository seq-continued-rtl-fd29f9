// seq_mux_tb: runs, one instruction at a time, the instructions whose
// multiplexer settings a SEQ designer has to work out: addq, rmmovq,
// irmovq, mrmovq, jle, cmovle, call, pushq, popq and ret. Before each
// clock edge the bench reads the processor's internal selections (next PC,
// dstE, dstM, aluA, aluB, data-memory address and data, read/write) and
// compares them with the values each instruction should select, worked out
// by hand from the instruction's definition.
//
// A second program of nops and jumps ends with halt at address 0x1e after
// exactly 7 instructions with the codes untouched (Z=1 S=0 O=0); the bench
// checks the step count, the final PC, Stat and the condition codes.
module seq_mux_tb;
  import y86_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic load_en = 1'b0;
  logic [63:0] load_addr = '0;
  logic [7:0]  load_data = '0;
  stat_t stat;
  word_t pc;
  logic [2:0] cc;
  reg_t  dbg_reg = '0;
  word_t dbg_reg_val, dbg_addr = '0, dbg_mem_val;

  seq_cpu dut (.*);
  always #50 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [7:0] img [8192];
  int pa;
  task automatic e1(input logic [7:0] b); img[pa] = b; pa++; endtask
  task automatic e8(input logic [63:0] v); for (int i = 0; i < 8; i++) e1(v[8*i +: 8]); endtask

  task automatic load_and_reset();
    run = 0; rst_n = 0;
    @(negedge clk);
    load_en = 1;
    for (int i = 0; i < 8192; i++) begin load_addr = 64'(i); load_data = img[i]; @(negedge clk); end
    load_en = 0; rst_n = 1;
    @(negedge clk);
  endtask

  // expected selections of one instruction ('1 = "don't care" for mem)
  task automatic step(input string name, input word_t e_newpc, input reg_t e_dste, input reg_t e_dstm,
                      input word_t e_alua, input word_t e_alub, input bit e_rd, input bit e_wr,
                      input word_t e_addr, input word_t e_data);
    // combinational values of the instruction at pc, sampled mid-cycle
    chk(dut.new_pc == e_newpc, $sformatf("%s newPC %h exp %h", name, dut.new_pc, e_newpc));
    chk(dut.dst_e == e_dste,   $sformatf("%s dstE %h exp %h", name, dut.dst_e, e_dste));
    chk(dut.dst_m == e_dstm,   $sformatf("%s dstM %h exp %h", name, dut.dst_m, e_dstm));
    chk(dut.alu_a == e_alua,   $sformatf("%s aluA %h exp %h", name, dut.alu_a, e_alua));
    chk(dut.alu_b == e_alub,   $sformatf("%s aluB %h exp %h", name, dut.alu_b, e_alub));
    chk(dut.mem_read == e_rd && dut.mem_write == e_wr, $sformatf("%s mem r/w %b%b", name, dut.mem_read, dut.mem_write));
    if (e_rd || e_wr) chk(dut.mem_addr == e_addr, $sformatf("%s dmemAddr %h exp %h", name, dut.mem_addr, e_addr));
    if (e_wr)         chk(dut.mem_data == e_data, $sformatf("%s dmemIn %h exp %h", name, dut.mem_data, e_data));
    @(negedge clk);
  endtask

  localparam word_t M8 = 64'hFFFF_FFFF_FFFF_FFF8;
  localparam reg_t F = 4'hF;

  initial begin
    int n;
    // ---------------- program 1: the multiplexer exercises ----------------
    foreach (img[i]) img[i] = 8'h00;
    pa = 0;
    e1(8'h30); e1(8'hF4); e8(64'h1000);          // 0x00 irmovq $0x1000, %rsp
    e1(8'h30); e1(8'hF8); e8(64'd5);             // 0x0a irmovq $5, %r8
    e1(8'h30); e1(8'hF9); e8(64'd7);             // 0x14 irmovq $7, %r9
    e1(8'h60); e1(8'h89);                        // 0x1e addq %r8, %r9
    e1(8'h40); e1(8'h98); e8(64'h10);            // 0x20 rmmovq %r9, 0x10(%r8)
    e1(8'h50); e1(8'h08); e8(64'h10);            // 0x2a mrmovq 0x10(%r8), %rax
    e1(8'h63); e1(8'h22);                        // 0x34 xorq %rdx, %rdx (ZF=1)
    e1(8'h71); e8(64'h50);                       // 0x36 jle 0x50
    // 0x50:
    pa = 'h50;
    e1(8'h21); e1(8'h9A);                        // 0x50 cmovle %r9, %r10
    e1(8'h80); e8(64'h80);                       // 0x52 call 0x80
    e1(8'h00);                                   // 0x5b halt
    pa = 'h80;
    e1(8'hA0); e1(8'h9F);                        // 0x80 pushq %r9
    e1(8'hB0); e1(8'hBF);                        // 0x82 popq %r11
    e1(8'h90);                                   // 0x84 ret
    load_and_reset();
    run = 1;
    #10;  // mid-cycle, after the negedge
    step("irmovq %rsp",  64'h0a, 4'h4, F, 64'h1000, 0, 0, 0, 0, 0);
    step("irmovq %r8",   64'h14, 4'h8, F, 64'd5, 0, 0, 0, 0, 0);
    step("irmovq %r9",   64'h1e, 4'h9, F, 64'd7, 0, 0, 0, 0, 0);
    step("addq",         64'h20, 4'h9, F, 64'd5, 64'd7, 0, 0, 0, 0);
    step("rmmovq",       64'h2a, F, F, 64'h10, 64'd5, 0, 1, 64'h15, 64'd12);
    step("mrmovq",       64'h34, F, 4'h0, 64'h10, 64'd5, 1, 0, 64'h15, 0);
    step("xorq",         64'h36, 4'h2, F, 64'd0, 64'd0, 0, 0, 0, 0);
    step("jle",          64'h50, F, F, 0, 0, 0, 0, 0, 0);
    step("cmovle",       64'h52, 4'hA, F, 64'd12, 0, 0, 0, 0, 0);
    step("call",         64'h80, 4'h4, F, M8, 64'h1000, 0, 1, 64'hFF8, 64'h5b);
    step("pushq",        64'h82, 4'h4, F, M8, 64'hFF8, 0, 1, 64'hFF0, 64'd12);
    step("popq",         64'h84, 4'h4, 4'hB, 64'd8, 64'hFF0, 1, 0, 64'hFF0, 0);
    step("ret",          64'h5b, 4'h4, F, 64'd8, 64'hFF8, 1, 0, 64'hFF8, 0);
    step("halt",         64'h5c, F, F, 0, 0, 0, 0, 0, 0);
    chk(stat == S_HLT && pc == 64'h5b, "stopped at halt");
    dbg_reg = 4'hA; #1; chk(dbg_reg_val == 64'd12, "cmovle moved r9 to r10");
    dbg_reg = 4'hB; #1; chk(dbg_reg_val == 64'd12, "popq restored the pushed value");
    dbg_reg = 4'h0; #1; chk(dbg_reg_val == 64'd12, "mrmovq read the stored value");
    dbg_reg = 4'h4; #1; chk(dbg_reg_val == 64'h1000, "stack pointer back");

    // ---------------- program 2: nops and jumps, halt at 0x1e ----------------
    foreach (img[i]) img[i] = 8'h00;
    pa = 0;
    e1(8'h10);                                   // 0x00 nop
    e1(8'h10);                                   // 0x01 nop
    e1(8'h70); e8(64'h0c);                       // 0x02 jmp 0x0c
    pa = 'h0c;
    e1(8'h10);                                   // 0x0c nop
    e1(8'h70); e8(64'h1d);                       // 0x0d jmp 0x1d
    pa = 'h1d;
    e1(8'h10);                                   // 0x1d nop
    e1(8'h00);                                   // 0x1e halt
    load_and_reset();
    run = 1;
    n = 0;
    while (stat == S_AOK && n < 100) begin @(posedge clk); n++; #1; end
    $display("nops and jumps: stopped in %0d cycles at PC = 0x%0h, stat %0d, CC Z=%b S=%b O=%b", n, pc, stat, cc[2], cc[1], cc[0]);
    chk(n == 7, "7 cycles");
    chk(pc == 64'h1e, "PC = 0x1e");
    chk(stat == S_HLT, "status HLT");
    chk(cc == 3'b100, "CC Z=1 S=0 O=0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
