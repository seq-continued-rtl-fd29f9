// imem_tb: loads random bytes through the write port, then reads 10-byte
// windows at random and edge addresses, including windows running past the
// end (zero fill) and addresses outside memory (error).
module imem_tb;
  localparam int unsigned MB = 8192;
  logic clk = 0, we = 0;
  logic [63:0] waddr = 0, pc = 0;
  logic [7:0] wdata = 0;
  logic [79:0] instr;
  logic error;
  logic [7:0] shadow [MB];
  int checks = 0, failures = 0;

  imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_at(input logic [63:0] a);
    logic [79:0] e;
    pc = a;
    #1;
    for (int i = 0; i < 10; i++) e[8*i +: 8] = (a + 64'(i) < 64'(MB)) ? shadow[13'(a + 64'(i))] : 8'h00;
    checks++;
    if (error !== (a >= 64'(MB)) || (a < 64'(MB) && instr !== e)) begin
      failures++;
      $display("FAIL pc=%h instr=%h exp %h err=%b", a, instr, e, error);
    end
  endtask

  initial begin
    @(negedge clk);
    we = 1;
    for (int i = 0; i < MB; i++) begin
      shadow[i] = 8'($urandom);
      waddr = 64'(i); wdata = shadow[i];
      @(negedge clk);
    end
    waddr = 64'(MB); wdata = 8'hAA;   // out of range: ignored
    @(negedge clk);
    we = 0;
    repeat (1000) read_at(64'($urandom_range(0, MB - 1)));
    for (int i = 0; i < 12; i++) read_at(64'(MB - 12 + i));
    read_at(64'(MB)); read_at(64'h1_0000_0000); read_at(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
