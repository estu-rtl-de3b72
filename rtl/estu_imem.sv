// estu_imem: microcode instruction memory (I-Mem) of the ESTU engine.
//
// DEPTH instructions of INSTR_W (169) bits. The host writes an instruction 32 bits at
// a time: slice s (0..5) of instruction a holds bits [32*s +: 32]; bits above 168 are
// dropped. The controller reads one whole instruction per cycle, one cycle after the
// address. The 169-bit width follows the published design; the depth and the 32-bit
// write slicing are this design's choices.
module estu_imem
  import estu_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [2:0]               wslice,
  input  logic [31:0]              wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [INSTR_W-1:0]       q
);
  logic [191:0] mem [DEPTH];
  logic [191:0] rd;

  always_ff @(posedge clk) begin
    if (we && wslice < 3'd6) mem[waddr][32*wslice +: 32] <= wdata;
    if (re) rd <= mem[raddr];
  end
  assign q = rd[INSTR_W-1:0];

  logic unused_ok;
  assign unused_ok = ^rd[191:INSTR_W];

endmodule
