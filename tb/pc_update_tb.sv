// pc_update_tb: for every icode and both values of cnd, checks that the
// next PC is valC for call and a taken jXX, valM for ret and valP
// otherwise.
module pc_update_tb;
  import y86_pkg::*;
  logic [3:0] icode;
  logic cnd;
  word_t valc, valm, valp, new_pc;
  int checks = 0, failures = 0;

  pc_update dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) for (int c = 0; c < 2; c++) repeat (5) begin
      word_t e;
      icode = 4'(ic); cnd = 1'(c);
      valc = {$urandom, $urandom}; valm = {$urandom, $urandom}; valp = {$urandom, $urandom};
      e = (ic == 8 || (ic == 7 && c == 1)) ? valc : (ic == 9) ? valm : valp;
      #1;
      checks++;
      if (new_pc != e) begin
        failures++;
        $display("FAIL icode %h cnd %0d: %h exp %h", ic[3:0], c, new_pc, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
