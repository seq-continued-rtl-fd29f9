// alu_tb: random and corner-case operands for all four ALU functions; the
// expected result and flags are computed in the bench with plain
// arithmetic and signed comparisons.
module alu_tb;
  import y86_pkg::*;
  word_t a, b, v;
  logic [3:0] fn;
  logic zf, sf, of;
  int checks = 0, failures = 0;

  alu dut (.alu_a(a), .alu_b(b), .alufun(fn), .val_e(v), .zf, .sf, .of);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input word_t ta, input word_t tb_, input logic [3:0] tf);
    word_t e;
    logic eo;
    longint sa, sb;
    a = ta; b = tb_; fn = tf;
    #1;
    sa = ta; sb = tb_;
    eo = 0;
    case (tf)
      0: begin e = tb_ + ta; eo = (sa < 0 && sb < 0 && $signed(e) >= 0) || (sa >= 0 && sb >= 0 && $signed(e) < 0); end
      1: begin e = tb_ - ta; eo = (sb >= 0 && sa < 0 && $signed(e) < 0) || (sb < 0 && sa >= 0 && $signed(e) >= 0); end
      2: e = tb_ & ta;
      default: e = tb_ ^ ta;
    endcase
    checks++;
    if (v !== e || zf !== (e == 0) || sf !== e[63] || of !== eo) begin
      failures++;
      $display("FAIL fn=%0d a=%h b=%h got %h %b%b%b exp %h %b%b%b", tf, ta, tb_, v, zf, sf, of, e, e == 0, e[63], eo);
    end
  endtask

  initial begin
    word_t corner [6] = '{64'd0, 64'd1, 64'h7fff_ffff_ffff_ffff, 64'h8000_0000_0000_0000, '1, 64'd8};
    for (int f = 0; f < 4; f++) begin
      foreach (corner[i]) foreach (corner[j]) one(corner[i], corner[j], 4'(f));
      repeat (500) one({$urandom, $urandom}, {$urandom, $urandom}, 4'(f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
