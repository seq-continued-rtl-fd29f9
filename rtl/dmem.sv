// dmem: data memory of the SEQ processor, byte addressed.
// An access moves one 8-byte little-endian word at addr. Reads are
// combinational (rdata is valid in the same cycle); a write happens at the
// rising clock edge when both we and commit are high. error is raised when
// re or we is set and the word does not lie wholly inside the array; an
// erroneous write changes nothing. commit is kept apart from we so that
// the error flag does not depend on the decision whether to write. A byte-wide load port fills the memory before a run and
// a second read port lets a test bench inspect it. Size, byte order and the
// extra ports are this design's own choices.
module dmem #(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  input  logic        re,
  input  logic        we,
  input  logic        commit,
  output logic        error,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_val
);
  localparam int unsigned AW = $clog2(MEM_BYTES);
  logic [7:0] mem [MEM_BYTES];
  logic in_range;

  assign in_range = (addr <= 64'(MEM_BYTES - 8));
  assign error    = (re || we) && !in_range;

  always_ff @(posedge clk) begin
    if (we && commit && in_range) begin
      for (int i = 0; i < 8; i++) mem[AW'(addr[AW-1:0] + AW'(i))] <= wdata[8*i +: 8];
    end else if (load_en && load_addr < 64'(MEM_BYTES)) begin
      mem[load_addr[AW-1:0]] <= load_data;
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rdata[8*i +: 8]   = in_range ? mem[AW'(addr[AW-1:0] + AW'(i))] : 8'h00;
      dbg_val[8*i +: 8] = (dbg_addr <= 64'(MEM_BYTES - 8)) ? mem[AW'(dbg_addr[AW-1:0] + AW'(i))] : 8'h00;
    end
  end
endmodule
