// mem_ctl_tb: for every icode with random values, checks the read and
// write enables, the address (valE, or valB for popq and ret) and the data
// (valA, or valP for call).
module mem_ctl_tb;
  import y86_pkg::*;
  logic [3:0] icode;
  word_t vala, valb, vale, valp, mem_addr, mem_data;
  logic mem_read, mem_write;
  int checks = 0, failures = 0;

  mem_ctl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ic = 0; ic < 16; ic++) repeat (10) begin
      bit er, ew;
      icode = 4'(ic);
      vala = {$urandom, $urandom}; valb = {$urandom, $urandom}; vale = {$urandom, $urandom}; valp = {$urandom, $urandom};
      er = (ic == 5 || ic == 9 || ic == 11);
      ew = (ic == 4 || ic == 8 || ic == 10);
      #1;
      checks++;
      if (mem_read != er || mem_write != ew ||
          ((er || ew) && mem_addr != ((ic == 9 || ic == 11) ? valb : vale)) ||
          (ew && mem_data != ((ic == 8) ? valp : vala))) begin
        failures++;
        $display("FAIL icode %h: r %b w %b addr %h data %h", ic[3:0], mem_read, mem_write, mem_addr, mem_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
