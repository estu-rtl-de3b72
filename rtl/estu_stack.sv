// estu_stack: the stack memory used for event-sparsity exploitation.
//
// Spikes are handled in groups of four. While an operator writes spike outputs, the
// controller pushes here the address of every group that holds at least one active
// spike (13-bit group address = spike bit address >> 2), followed by STK_END. A later
// Dense(spike) then walks such a list instead of every group, fetching only groups
// that carry spikes. Grouping by four follows the published design; the list format
// (terminator word) and the depth, ten 256x16 block RAMs, are this design's choices.
// One synchronous read (1 cycle latency) and one write per cycle. The push counter
// lives here: push_start resets it to list base wbase, each push writes one entry.
module estu_stack
  import estu_pkg::*;
#(
  parameter int DEPTH = 2560
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              re,
  input  logic [STK_AW-1:0] raddr,
  output logic [STK_W-1:0]  q,
  input  logic              push_start,
  input  logic [STK_AW-1:0] wbase,
  input  logic              push,
  input  logic [STK_W-1:0]  pdata,
  output logic [STK_AW-1:0] count     // entries pushed since push_start
);
  logic [STK_W-1:0]  mem [DEPTH];
  logic [STK_AW-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      count <= '0;
    end else if (push_start) begin
      wptr  <= wbase;
      count <= '0;
    end else if (push) begin
      wptr  <= wptr + 1'b1;
      count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (re) q <= mem[raddr];
    if (push && !push_start && int'(wptr) < DEPTH) mem[wptr] <= pdata;
  end

endmodule
