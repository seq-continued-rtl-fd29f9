// dmem_tb: random 8-byte writes and reads (aligned and unaligned) against a
// byte shadow array, the load port, the debug port, writes blocked when
// commit is low, and the range check that raises error and drops writes.
module dmem_tb;
  localparam int unsigned MB = 8192;
  logic clk = 0, re = 0, we = 0, commit = 0, load_en = 0;
  logic [63:0] addr = 0, wdata = 0, rdata, load_addr = 0, dbg_addr = 0, dbg_val;
  logic [7:0] load_data = 0;
  logic error;
  logic [7:0] shadow [MB];
  int checks = 0, failures = 0;

  dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic logic [63:0] sh8(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = shadow[13'(a + 64'(i))];
    return v;
  endfunction

  initial begin
    @(negedge clk);
    load_en = 1;
    for (int i = 0; i < MB; i++) begin
      shadow[i] = 8'($urandom);
      load_addr = 64'(i); load_data = shadow[i];
      @(negedge clk);
    end
    load_en = 0;
    for (int n = 0; n < 2000; n++) begin
      addr = ($urandom_range(0, 9) == 0) ? 64'(MB - 8 + $urandom_range(0, 20)) : 64'($urandom_range(0, MB - 8));
      wdata = {$urandom, $urandom};
      re = $urandom_range(0, 1); we = !re && $urandom_range(0, 1); commit = $urandom_range(0, 3) != 0;
      #1;
      chk(error == ((re || we) && addr > 64'(MB - 8)), $sformatf("error at %h", addr));
      if (re && addr <= 64'(MB - 8)) chk(rdata == sh8(addr), $sformatf("read %h", addr));
      @(negedge clk);
      if (we && commit && addr <= 64'(MB - 8))
        for (int i = 0; i < 8; i++) shadow[13'(addr + 64'(i))] = wdata[8*i +: 8];
      dbg_addr = 64'($urandom_range(0, MB - 8));
      #1;
      chk(dbg_val == sh8(dbg_addr), $sformatf("debug read %h", dbg_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
