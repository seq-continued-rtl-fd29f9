// stat_logic_tb: all combinations of icode and the three error inputs,
// checked against the status priority ADR(fetch) > INS > ADR(data) > HLT.
module stat_logic_tb;
  import y86_pkg::*;
  logic [3:0] icode;
  logic instr_valid, imem_error, dmem_error;
  stat_t stat;
  int checks = 0, failures = 0;

  stat_logic dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) for (int k = 0; k < 8; k++) begin
      logic [2:0] e;
      icode = 4'(ic); {imem_error, instr_valid, dmem_error} = 3'(k);
      e = imem_error ? 3'd3 : !instr_valid ? 3'd4 : dmem_error ? 3'd3 : (ic == 0) ? 3'd2 : 3'd1;
      #1;
      checks++;
      if (stat != e) begin
        failures++;
        $display("FAIL icode %h k %0d: %0d exp %0d", ic[3:0], k, stat, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
