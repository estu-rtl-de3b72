// id_mem: instruction/data memory of the system CPU.
//
// WORDS 32-bit words with byte write enables and one cycle of read latency; the CPU
// fetches its program and keeps its data here. Word addressed. Size and port shape
// are this design's choices; the memory itself is only named in the published design.
module id_mem #(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     req,
  input  logic                     we,
  input  logic [3:0]               be,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req && !we) rdata <= mem[addr];
    if (req && we)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
  end

endmodule
