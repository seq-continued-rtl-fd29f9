// exec_ctl_tb: for every icode and ifun with random valA/valB/valC, checks
// the ALU operands, the ALU function and set_cc against the operand table
// (valA, valC, +8, -8; valB or 0).
module exec_ctl_tb;
  import y86_pkg::*;
  logic [3:0] icode, ifun, alufun;
  word_t vala, valb, valc, alu_a, alu_b;
  logic set_cc;
  int checks = 0, failures = 0;

  exec_ctl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) for (int fn = 0; fn < 4; fn++) repeat (10) begin
      word_t ea, eb;
      logic [3:0] ef;
      bit es;
      icode = 4'(ic); ifun = 4'(fn);
      vala = {$urandom, $urandom}; valb = {$urandom, $urandom}; valc = {$urandom, $urandom};
      ea = 0; eb = valb; ef = 0; es = 0;
      case (ic)
        2: begin ea = vala; eb = 0; end
        3: begin ea = valc; eb = 0; end
        4, 5: ea = valc;
        6: begin ea = vala; ef = 4'(fn); es = 1; end
        8, 10: ea = 64'hFFFF_FFFF_FFFF_FFF8;
        9, 11: ea = 64'd8;
        default: ;
      endcase
      #1;
      checks++;
      if (alu_a != ea || alu_b != eb || alufun != ef || set_cc != es) begin
        failures++;
        $display("FAIL icode %h ifun %h: a %h b %h f %h s %b", ic[3:0], fn[3:0], alu_a, alu_b, alufun, set_cc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
