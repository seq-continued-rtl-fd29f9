// fetch_split_tb: builds every icode:ifun byte with random register and
// constant fields at random PCs and checks the split fields, valP (PC plus
// the instruction length: 1, 2, 9 or 10 bytes) and the validity flag
// against a table of the Y86-64 instruction formats.
module fetch_split_tb;
  import y86_pkg::*;
  word_t pc, valc, valp;
  logic [79:0] instr;
  logic [3:0] icode, ifun;
  reg_t ra, rb;
  logic instr_valid;
  int checks = 0, failures = 0;

  fetch_split dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) for (int fn = 0; fn < 16; fn++) repeat (8) begin
      int len, maxfn;
      bit regs, valid;
      word_t ec;
      pc = {$urandom, $urandom} >> 8;
      instr = {$urandom, $urandom, $urandom};
      instr[7:0] = {4'(ic), 4'(fn)};
      case (ic)
        0, 1, 9:  begin len = 1;  regs = 0; maxfn = 0; end
        2:        begin len = 2;  regs = 1; maxfn = 6; end
        3, 4, 5:  begin len = 10; regs = 1; maxfn = 0; end
        6:        begin len = 2;  regs = 1; maxfn = 3; end
        7:        begin len = 9;  regs = 0; maxfn = 6; end
        8:        begin len = 9;  regs = 0; maxfn = 0; end
        10, 11:   begin len = 2;  regs = 1; maxfn = 0; end
        default:  begin len = -1; regs = 0; maxfn = -1; end
      endcase
      valid = (len > 0) && (fn <= maxfn);
      ec = regs ? instr[79:16] : instr[71:8];
      #1;
      checks++;
      if (icode != 4'(ic) || ifun != 4'(fn) || instr_valid != valid ||
          (valid && valp != pc + 64'(len)) ||
          (valid && regs && (ra != instr[15:12] || rb != instr[11:8])) ||
          (valid && !regs && (ra != 4'hF || rb != 4'hF)) ||
          (valid && len >= 9 && valc != ec)) begin
        failures++;
        $display("FAIL %h%h: valid %b valp %h ra %h rb %h valc %h", ic[3:0], fn[3:0], instr_valid, valp, ra, rb, valc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
