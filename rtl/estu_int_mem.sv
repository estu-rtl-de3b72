// estu_int_mem: integer memory of the ESTU engine.
//
// Two banks (SPRAM1, SPRAM2) of BANK_DEPTH 16-bit words, 512 Kb at the default
// size, holding int8 weights, int8 activations and attention scores, two per word.
// Each bank is addressed on its own so that an operator can take a weight word from
// one bank and an activation word from the other in the same cycle (Dense(int)), or
// a 32-bit double word spread over both banks (Dense(spike), Mul(spike,int)).
// Per bank: one synchronous read (1 cycle latency) and one write with a byte mask.
// The two banks and 16-bit words follow the published design (two SPRAMs); allowing a
// read and a write to the same bank in one cycle is this design's simplification of
// the single-port SPRAM, and a read of a word written in the same cycle returns the
// old word.
module estu_int_mem
  import estu_pkg::*;
#(
  parameter int BANK_DEPTH = 16384
) (
  input  logic                  clk,
  input  logic [1:0]            re,
  input  logic [1:0][INT_AW-1:0] raddr,
  output logic [1:0][15:0]      q,
  input  logic [1:0]            we,
  input  logic [1:0][INT_AW-1:0] waddr,
  input  logic [1:0][15:0]      wdata,
  input  logic [1:0][1:0]       wbe
);
  localparam int AW = $clog2(BANK_DEPTH);

  for (genvar k = 0; k < 2; k++) begin : g_bank
    logic [15:0] mem [BANK_DEPTH];
    always_ff @(posedge clk) begin
      if (re[k]) q[k] <= mem[raddr[k][AW-1:0]];
      if (we[k]) begin
        if (wbe[k][0]) mem[waddr[k][AW-1:0]][7:0]  <= wdata[k][7:0];
        if (wbe[k][1]) mem[waddr[k][AW-1:0]][15:8] <= wdata[k][15:8];
      end
    end
  end

endmodule
