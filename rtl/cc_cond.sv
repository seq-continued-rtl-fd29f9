// cc_cond: the condition-code register and the condition logic.
// The register holds {ZF, SF, OF}; it loads the ALU's flags at the rising
// clock edge when set_cc is high (OPq) and resets to Z=1 S=0 O=0, the state
// a program that never sets the codes ends with. cnd evaluates the
// condition named by ifun on the codes currently held (the "prior" codes):
// always, le, l, e, ne, ge, g. le and l use SF^OF, as the Y86-64 ISA
// defines them; with OF clear this is the "SF | ZF" and "SF" the document
// draws. An undefined ifun gives cnd = 0.
module cc_cond
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       set_cc,
  input  logic       zf_in,
  input  logic       sf_in,
  input  logic       of_in,
  input  logic [3:0] ifun,
  output logic       cnd,
  output logic [2:0] cc
);
  logic zf, sf, of;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zf <= 1'b1; sf <= 1'b0; of <= 1'b0;
    end else if (set_cc) begin
      zf <= zf_in; sf <= sf_in; of <= of_in;
    end
  end

  assign cc = {zf, sf, of};

  always_comb begin
    case (ifun)
      C_YES:   cnd = 1'b1;
      C_LE:    cnd = (sf ^ of) | zf;
      C_L:     cnd = sf ^ of;
      C_E:     cnd = zf;
      C_NE:    cnd = !zf;
      C_GE:    cnd = !(sf ^ of);
      C_G:     cnd = !(sf ^ of) && !zf;
      default: cnd = 1'b0;
    endcase
  end
endmodule
