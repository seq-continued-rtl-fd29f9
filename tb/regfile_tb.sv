// regfile_tb: random writes on both ports against a shadow array, reads on
// both read ports and the debug port, register 0xF as "no register", the
// M-over-E rule when both ports name one register, the global write enable
// and reset.
module regfile_tb;
  import y86_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  reg_t src_a = 0, src_b = 0, dst_e = 4'hF, dst_m = 4'hF, dbg_idx = 0;
  word_t val_a, val_b, val_e = 0, val_m = 0, dbg_val;
  word_t shadow [16];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      we    = ($urandom_range(0, 7) != 0);
      dst_e = 4'($urandom); dst_m = ($urandom_range(0, 3) == 0) ? dst_e : 4'($urandom);
      val_e = {$urandom, $urandom}; val_m = {$urandom, $urandom};
      @(negedge clk);
      if (we) begin
        if (dst_e != 4'hF) shadow[dst_e] = val_e;
        if (dst_m != 4'hF) shadow[dst_m] = val_m;
      end
      src_a = 4'($urandom); src_b = 4'($urandom); dbg_idx = 4'($urandom);
      #1;
      chk(val_a == (src_a == 4'hF ? 64'd0 : shadow[src_a]), $sformatf("R[%h]=%h", src_a, val_a));
      chk(val_b == (src_b == 4'hF ? 64'd0 : shadow[src_b]), $sformatf("R[%h]=%h", src_b, val_b));
      chk(dbg_val == (dbg_idx == 4'hF ? 64'd0 : shadow[dbg_idx]), "debug port");
    end
    rst_n = 0; we = 0;
    @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      src_a = 4'(r); #1;
      chk(val_a == '0, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
