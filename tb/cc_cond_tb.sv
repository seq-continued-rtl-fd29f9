// cc_cond_tb: loads every combination of {ZF,SF,OF}, checks the register
// only changes when set_cc is high, checks the reset value Z=1 S=0 O=0 and
// evaluates all condition functions against a table worked out in the
// bench from the Y86-64 condition definitions.
module cc_cond_tb;
  logic clk = 0, rst_n = 0, set_cc = 0, zf_in = 0, sf_in = 0, of_in = 0;
  logic [3:0] ifun = 0;
  logic cnd;
  logic [2:0] cc;
  int checks = 0, failures = 0;

  cc_cond dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic bit expect_cnd(input logic [2:0] c, input int f);
    bit z = c[2], s = c[1], o = c[0];
    case (f)
      0: return 1;
      1: return (s ^ o) | z;
      2: return s ^ o;
      3: return z;
      4: return ~z;
      5: return ~(s ^ o);
      6: return ~(s ^ o) & ~z;
      default: return 0;
    endcase
  endfunction

  initial begin
    @(negedge clk); @(negedge clk);
    chk(cc == 3'b100, "reset value Z=1 S=0 O=0");
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      {zf_in, sf_in, of_in} = 3'(k);
      set_cc = 1;
      @(negedge clk);
      set_cc = 0;
      chk(cc == 3'(k), $sformatf("load %b got %b", 3'(k), cc));
      {zf_in, sf_in, of_in} = ~3'(k);
      @(negedge clk);
      chk(cc == 3'(k), "hold when set_cc low");
      for (int f = 0; f < 16; f++) begin
        ifun = 4'(f);
        #1;
        chk(cnd == expect_cnd(3'(k), f), $sformatf("cc=%b ifun=%0d cnd=%b", cc, f, cnd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
