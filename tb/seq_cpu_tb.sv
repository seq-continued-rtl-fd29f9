// seq_cpu_tb: end-to-end test of the SEQ processor at its default size.
//
// The bench assembles Y86-64 programs into a byte image with small
// assembler tasks, loads the image into both memories through the load
// port, and runs the processor. An instruction-level reference model,
// written separately from the RTL, executes the same image; after every
// clock cycle the bench compares PC, Stat, the condition codes and all 15
// registers with the model, and at the end of each program the whole data
// memory. Because SEQ finishes one instruction per cycle, the number of
// cycles until Stat leaves AOK must equal the model's instruction count.
//
// Programs: (1) an array sum through call/ret with push/pop, a counted
// loop and a cmov-based maximum, checked also against hand-computed
// results; (2) a long random instruction stream; (3)-(5) an invalid
// instruction, a data access out of range and a jump out of instruction
// memory. Each mechanism (every opcode, taken and not-taken jumps and
// conditional moves, halt and each error) is counted and must occur.
module seq_cpu_tb;
  import y86_pkg::*;

  localparam logic [63:0] MEMB = 64'd8192;

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
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- assembler ----------------
  logic [7:0] img [MEMB];
  int pa;

  task automatic e1(input logic [7:0] b); img[pa] = b; pa++; endtask
  task automatic e8(input logic [63:0] v);
    for (int i = 0; i < 8; i++) e1(v[8*i +: 8]);
  endtask
  task automatic a_halt();                 e1(8'h00); endtask
  task automatic a_nop();                  e1(8'h10); endtask
  task automatic a_rr(input logic [3:0] fn, input logic [3:0] ra, rb); e1({4'h2, fn}); e1({ra, rb}); endtask
  task automatic a_ir(input logic [63:0] v, input logic [3:0] rb); e1(8'h30); e1({4'hF, rb}); e8(v); endtask
  task automatic a_rm(input logic [3:0] ra, input logic [63:0] d, input logic [3:0] rb); e1(8'h40); e1({ra, rb}); e8(d); endtask
  task automatic a_mr(input logic [63:0] d, input logic [3:0] rb, input logic [3:0] ra); e1(8'h50); e1({ra, rb}); e8(d); endtask
  task automatic a_op(input logic [3:0] fn, input logic [3:0] ra, rb); e1({4'h6, fn}); e1({ra, rb}); endtask
  task automatic a_j(input logic [3:0] fn, input logic [63:0] dest); e1({4'h7, fn}); e8(dest); endtask
  task automatic a_call(input logic [63:0] dest); e1(8'h80); e8(dest); endtask
  task automatic a_ret();                  e1(8'h90); endtask
  task automatic a_push(input logic [3:0] ra); e1(8'hA0); e1({ra, 4'hF}); endtask
  task automatic a_pop(input logic [3:0] ra);  e1(8'hB0); e1({ra, 4'hF}); endtask
  task automatic patch8(input int at, input logic [63:0] v);
    for (int i = 0; i < 8; i++) img[at + i] = v[8*i +: 8];
  endtask
  task automatic clear_img();
    for (int i = 0; i < MEMB; i++) img[i] = 8'h00;
    pa = 0;
  endtask

  // ---------------- reference model ----------------
  logic [7:0]  rimem [MEMB];
  logic [7:0]  rdmem [MEMB];
  logic [63:0] rreg [15];
  logic [63:0] rpc;
  logic        rzf, rsf, rof;
  stat_t       rstat;
  int          rcount;
  // mechanism counters
  int n_icode [16];
  int n_jtaken, n_jnot, n_cmov_taken, n_cmov_not, n_halt, n_ins, n_adr_i, n_adr_d;

  function automatic logic [63:0] rget(input logic [3:0] r);
    return (r == 4'hF) ? 64'd0 : rreg[r];
  endfunction
  task automatic rset(input logic [3:0] r, input logic [63:0] v);
    if (r != 4'hF) rreg[r] = v;
  endtask
  function automatic logic [7:0] ibyte(input logic [63:0] a);
    return (a < MEMB) ? rimem[a[12:0]] : 8'h00;
  endfunction
  function automatic bit cond(input logic [3:0] f);
    case (f)
      0: return 1;
      1: return (rsf != rof) || rzf;
      2: return rsf != rof;
      3: return rzf;
      4: return !rzf;
      5: return rsf == rof;
      6: return (rsf == rof) && !rzf;
      default: return 0;
    endcase
  endfunction
  function automatic bit badaddr(input logic [63:0] a);
    return a > MEMB - 8;
  endfunction
  function automatic logic [63:0] rd8(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = rdmem[13'(a + 64'(i))];
    return v;
  endfunction
  task automatic wr8(input logic [63:0] a, input logic [63:0] v);
    for (int i = 0; i < 8; i++) rdmem[13'(a + 64'(i))] = v[8*i +: 8];
  endtask

  task automatic ref_step();
    logic [3:0] ic, fn, ra, rb;
    logic [63:0] vc, vp, a, r, x, y;
    bit ok;
    if (rpc >= MEMB) begin rstat = S_ADR; n_adr_i++; rcount++; return; end
    ic = ibyte(rpc)[7:4]; fn = ibyte(rpc)[3:0];
    ra = ibyte(rpc + 1)[7:4]; rb = ibyte(rpc + 1)[3:0];
    ok = 1;
    case (ic)
      0, 1, 9: begin ok = (fn == 0); vp = rpc + 1; end
      2:       begin ok = (fn <= 6); vp = rpc + 2; end
      3, 4, 5: begin ok = (fn == 0); vp = rpc + 10; end
      6:       begin ok = (fn <= 3); vp = rpc + 2; end
      7:       begin ok = (fn <= 6); vp = rpc + 9; end
      8:       begin ok = (fn == 0); vp = rpc + 9; end
      10, 11:  begin ok = (fn == 0); vp = rpc + 2; end
      default: ok = 0;
    endcase
    rcount++;
    if (!ok) begin rstat = S_INS; n_ins++; return; end
    for (int i = 0; i < 8; i++)
      vc[8*i +: 8] = ibyte(rpc + ((ic == 7 || ic == 8) ? 1 : 2) + i);
    n_icode[ic]++;
    case (ic)
      0: begin rstat = S_HLT; n_halt++; return; end
      1: ;
      2: begin
           if (cond(fn)) begin rset(rb, rget(ra)); if (fn != 0) n_cmov_taken++; end
           else n_cmov_not++;
         end
      3: rset(rb, vc);
      4: begin
           a = rget(rb) + vc;
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           wr8(a, rget(ra));
         end
      5: begin
           a = rget(rb) + vc;
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           rset(ra, rd8(a));
         end
      6: begin
           x = rget(ra); y = rget(rb);
           case (fn)
             0: begin r = y + x; rof = (x[63] == y[63]) && (r[63] != y[63]); end
             1: begin r = y - x; rof = (x[63] != y[63]) && (r[63] != y[63]); end
             2: begin r = y & x; rof = 0; end
             default: begin r = y ^ x; rof = 0; end
           endcase
           rzf = (r == 0); rsf = r[63];
           rset(rb, r);
         end
      7: begin
           if (cond(fn)) begin if (fn != 0) n_jtaken++; rpc = vc; return; end
           n_jnot++;
         end
      8: begin
           a = rget(4) - 8;
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           wr8(a, vp); rset(4, a); rpc = vc; return;
         end
      9: begin
           a = rget(4);
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           rset(4, a + 8); rpc = rd8(a); return;
         end
      10: begin
           a = rget(4) - 8;
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           wr8(a, rget(ra)); rset(4, a);
         end
      11: begin
           a = rget(4);
           if (badaddr(a)) begin rstat = S_ADR; n_adr_d++; return; end
           rset(4, a + 8); rset(ra, rd8(a));
         end
      default: ;
    endcase
    rpc = vp;
  endtask

  // ---------------- run one program ----------------
  task automatic compare_state(input string tag);
    check(pc == rpc, $sformatf("%s pc %h exp %h", tag, pc, rpc));
    check(stat == rstat, $sformatf("%s stat %0d exp %0d", tag, stat, rstat));
    check(cc == {rzf, rsf, rof}, $sformatf("%s cc %b exp %b", tag, cc, {rzf, rsf, rof}));
    for (int r = 0; r < 15; r++) begin
      dbg_reg = 4'(r);
      #1;
      check(dbg_reg_val == rreg[r], $sformatf("%s r%0d %h exp %h", tag, r, dbg_reg_val, rreg[r]));
    end
  endtask

  task automatic run_program(input string tag, input stat_t expect_stat, output int ncyc);
    int c0;
    // reset and load the image into both memories
    run = 0; rst_n = 0;
    @(negedge clk);
    @(negedge clk);
    load_en = 1;
    for (int i = 0; i < MEMB; i++) begin
      load_addr = 64'(i); load_data = img[i];
      @(negedge clk);
    end
    load_en = 0;
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < MEMB; i++) begin rimem[i] = img[i]; rdmem[i] = img[i]; end
    for (int i = 0; i < 15; i++) rreg[i] = '0;
    rpc = 0; rzf = 1; rsf = 0; rof = 0; rstat = S_AOK; rcount = 0;
    compare_state({tag, " reset"});
    run = 1;
    c0 = cycles;
    while (rstat == S_AOK && cycles - c0 < 100000) begin
      @(posedge clk);
      ref_step();
      #2;
      compare_state($sformatf("%s step%0d", tag, rcount));
    end
    ncyc = cycles - c0;
    // cycle count: one instruction per cycle
    check(ncyc == rcount, $sformatf("%s cycles %0d instrs %0d", tag, ncyc, rcount));
    check(rstat == expect_stat, $sformatf("%s final stat %0d exp %0d", tag, rstat, expect_stat));
    // stopped: further cycles change nothing
    repeat (5) @(posedge clk);
    #2;
    compare_state({tag, " stopped"});
    run = 0;
    for (int a = 0; a < MEMB; a += 8) begin
      dbg_addr = 64'(a);
      #1;
      check(dbg_mem_val == rd8(64'(a)), $sformatf("%s mem[%h] %h exp %h", tag, a, dbg_mem_val, rd8(64'(a))));
    end
  endtask

  // ---------------- programs ----------------
  localparam logic [3:0] RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5, RSI = 6, RDI = 7,
                         R8 = 8, R9 = 9, R10 = 10, R11 = 11, R12 = 12, R13 = 13, R14 = 14;

  // array of 6 signed values at 0x400
  logic signed [63:0] arr [6] = '{64'sd7, -64'sd3, 64'sd12, 64'sd40, -64'sd25, 64'sd10};

  task automatic build_main();
    int p_sum, p_loop, p_test, p_max, p_mloop, p_mtest, j_test, j_mtest, c_sum, c_max;
    clear_img();
    a_ir(64'h1000, RSP);          // stack top
    a_ir(64'h400, RDI);           // array
    a_ir(64'd6, RSI);             // count
    c_sum = pa + 1; a_call(0);    // call sum
    a_ir(64'h400, RDI);
    a_rm(RAX, 64'h40, RDI);       // store sum at 0x440
    a_ir(64'h400, RDI);
    a_ir(64'd6, RSI);
    c_max = pa + 1; a_call(0);    // call max
    a_ir(64'h400, RDI);
    a_rm(RAX, 64'h48, RDI);       // store max at 0x448
    a_nop();
    a_rr(0, RAX, R14);            // rrmovq
    a_halt();
    // sum(rdi, rsi): rax = sum of rsi words at rdi
    p_sum = pa;
    a_push(RBX);
    a_ir(64'd8, R8);
    a_ir(64'd1, R9);
    a_op(3, RAX, RAX);            // xorq: rax = 0
    a_op(2, RSI, RSI);            // andq: set codes
    j_test = pa + 1; a_j(0, 0);   // jmp test
    p_loop = pa;
    a_mr(64'd0, RDI, R10);
    a_op(0, R10, RAX);
    a_op(0, R8, RDI);
    a_op(1, R9, RSI);
    p_test = pa;
    a_j(4, p_loop);               // jne loop
    a_pop(RBX);
    a_ret();
    // max(rdi, rsi): rax = largest of rsi words at rdi
    p_max = pa;
    a_mr(64'd0, RDI, RAX);
    a_ir(64'd8, R8);
    a_ir(64'd1, R9);
    j_mtest = pa + 1; a_j(0, 0);
    p_mloop = pa;
    a_mr(64'd0, RDI, R10);
    a_rr(0, R10, R11);
    a_op(1, RAX, R11);            // r11 = r10 - rax
    a_rr(6, R10, RAX);            // cmovg r10, rax
    p_mtest = pa;
    a_op(0, R8, RDI);
    a_op(1, R9, RSI);
    a_j(6, p_mloop);              // jg loop
    a_j(2, 64'h300);              // jl (not taken here)
    a_j(1, 64'h300);              // jle: taken when rsi reaches 0
    a_ret();
    // 0x300: return point reached through jle
    if (pa > 64'h300) $fatal(1, "program overlaps");
    pa = 'h300;
    a_rr(3, R9, R12);             // cmove r9, r12 (taken: ZF set)
    a_rr(4, R9, R13);             // cmovne (not taken)
    a_ret();
    patch8(c_sum, 64'(p_sum));
    patch8(c_max, 64'(p_max));
    patch8(j_test, 64'(p_test));
    patch8(j_mtest, 64'(p_mtest));
    for (int i = 0; i < 6; i++) patch8('h400 + 8 * i, arr[i]);
  endtask

  // random instruction stream; rbp is a fixed base register, rsp the stack
  function automatic logic [3:0] wreg();
    logic [3:0] r;
    do r = 4'($urandom_range(0, 14)); while (r == RSP || r == RBP);
    return r;
  endfunction

  task automatic build_random(input int n);
    clear_img();
    a_ir(64'h1800, RSP);
    a_ir(64'h1000, RBP);
    for (int i = 0; i < 15; i++) if (i != RSP && i != RBP) a_ir({$urandom, $urandom}, 4'(i));
    for (int k = 0; k < n; k++) begin
      case ($urandom_range(0, 11))
        0: a_nop();
        1: a_rr(4'($urandom_range(0, 6)), wreg(), wreg());
        2: a_ir({$urandom, $urandom} >> $urandom_range(0, 63), wreg());
        3: a_rm(wreg(), 64'($urandom_range(0, 255)), RBP);
        4: a_mr(64'($urandom_range(0, 255)), RBP, wreg());
        5, 6: a_op(4'($urandom_range(0, 3)), wreg(), wreg());
        7: begin
             // jump over the next instruction (a 10-byte irmovq) when taken
             a_j(4'($urandom_range(0, 6)), 64'(pa + 9 + 10));
             a_ir(64'(k), wreg());
           end
        8: a_push(wreg());
        9: a_pop(wreg());
        10: begin
             // call a ret placed right after a jump over it
             a_call(64'(pa + 9 + 9));
             a_j(0, 64'(pa + 9 + 1));
             a_ret();
           end
        default: a_rr(0, wreg(), wreg());
      endcase
    end
    a_halt();
  endtask

  initial begin
    int nc;
    foreach (n_icode[i]) n_icode[i] = 0;
    {n_jtaken, n_jnot, n_cmov_taken, n_cmov_not, n_halt, n_ins, n_adr_i, n_adr_d} = '0;

    // (1) array sum and maximum
    build_main();
    run_program("main", S_HLT, nc);
    $display("main program: %0d cycles", nc);
    dbg_addr = 64'h440; #1;
    check(dbg_mem_val == 64'd41, $sformatf("sum %0d", $signed(dbg_mem_val)));
    dbg_addr = 64'h448; #1;
    check(dbg_mem_val == 64'd40, "max stored");
    dbg_reg = RAX; #1;
    check(dbg_reg_val == 64'd40, $sformatf("max %0d", $signed(dbg_reg_val)));
    dbg_reg = RSP; #1;
    check(dbg_reg_val == 64'h1000, "stack balanced");

    // (2) random streams
    for (int t = 0; t < 3; t++) begin
      build_random(400);
      run_program($sformatf("random%0d", t), S_HLT, nc);
    end

    // (3) invalid instruction
    clear_img();
    a_ir(64'd5, RAX); a_nop(); e1(8'hF0);
    run_program("ins", S_INS, nc);
    check(pc == 64'd11, "pc stays at the invalid instruction");

    // (4) data address out of range
    clear_img();
    a_ir(64'h10000, RBX); a_mr(64'd0, RBX, RAX); a_halt();
    run_program("adr_data", S_ADR, nc);

    // (5) jump outside instruction memory
    clear_img();
    a_j(0, 64'h4000);
    run_program("adr_fetch", S_ADR, nc);

    // every mechanism must have happened
    for (int i = 0; i < 12; i++) begin
      $display("icode %h executed %0d times", i, n_icode[i]);
      check(n_icode[i] > 0, $sformatf("icode %h never executed", i));
    end
    $display("jXX taken %0d not taken %0d; cmovXX taken %0d not taken %0d", n_jtaken, n_jnot, n_cmov_taken, n_cmov_not);
    $display("halt %0d, INS %0d, ADR fetch %0d, ADR data %0d", n_halt, n_ins, n_adr_i, n_adr_d);
    check(n_jtaken > 0, "conditional jump taken");
    check(n_jnot > 0, "conditional jump not taken");
    check(n_cmov_taken > 0, "cmov taken");
    check(n_cmov_not > 0, "cmov not taken (write disabled)");
    check(n_halt > 0 && n_ins > 0 && n_adr_i > 0 && n_adr_d > 0, "every stop reason");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
