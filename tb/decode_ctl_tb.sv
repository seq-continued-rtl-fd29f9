// decode_ctl_tb: for every icode, random rA/rB and both values of cnd,
// checks srcA, srcB, dstE and dstM against the table of registers each
// instruction reads and writes (0xF = none, 4 = %rsp).
module decode_ctl_tb;
  import y86_pkg::*;
  logic [3:0] icode;
  reg_t ra, rb, src_a, src_b, dst_e, dst_m;
  logic cnd;
  int checks = 0, failures = 0;

  decode_ctl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) repeat (20) begin
      reg_t ea, eb, ee, em;
      icode = 4'(ic); ra = 4'($urandom_range(0, 14)); rb = 4'($urandom_range(0, 14)); cnd = 1'($urandom);
      ea = 4'hF; eb = 4'hF; ee = 4'hF; em = 4'hF;
      case (ic)
        2:  begin ea = ra; ee = cnd ? rb : 4'hF; end
        3:  ee = rb;
        4:  begin ea = ra; eb = rb; end
        5:  begin eb = rb; em = ra; end
        6:  begin ea = ra; eb = rb; ee = rb; end
        8, 9: begin eb = 4; ee = 4; end
        10: begin ea = ra; eb = 4; ee = 4; end
        11: begin ea = ra; eb = 4; ee = 4; em = ra; end
        default: ;
      endcase
      #1;
      checks++;
      if ({src_a, src_b, dst_e, dst_m} != {ea, eb, ee, em}) begin
        failures++;
        $display("FAIL icode %h cnd %b: %h %h %h %h exp %h %h %h %h", ic[3:0], cnd, src_a, src_b, dst_e, dst_m, ea, eb, ee, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
