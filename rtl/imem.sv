// imem: instruction memory of the SEQ processor.
// A byte array read combinationally: the 10 bytes starting at pc appear on
// instr in the same cycle (byte pc in bits 7:0, byte pc+9 in bits 79:72),
// which is the longest Y86-64 instruction. Bytes past the end of the array
// read as zero; error is raised when pc itself lies outside the array.
// A byte-wide clocked write port loads the program. The memory size is this
// design's own choice (MEM_BYTES); the document names the block only.
module imem #(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [63:0] pc,
  output logic [79:0] instr,
  output logic        error
);
  logic [7:0] mem [MEM_BYTES];

  always_ff @(posedge clk) begin
    if (we && waddr < 64'(MEM_BYTES)) mem[waddr[$clog2(MEM_BYTES)-1:0]] <= wdata;
  end

  assign error = (pc >= 64'(MEM_BYTES));

  always_comb begin
    for (int i = 0; i < 10; i++) begin
      logic [63:0] a;
      a = pc + 64'(i);
      instr[8*i +: 8] = (a < 64'(MEM_BYTES)) ? mem[a[$clog2(MEM_BYTES)-1:0]] : 8'h00;
    end
  end
endmodule
