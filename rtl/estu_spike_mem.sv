// estu_spike_mem: the multi-banked spike memory of the ESTU engine.
//
// Four banks (B1..B4) of BANK_DEPTH 16-bit words, 32 Kb in all at the default size.
// Consecutive word addresses are interleaved over the banks (bank = addr[1:0]), so
// the four rows of a 4-row slice always sit in four different banks and can be read
// in one cycle. Ports, all synchronous with one cycle of read latency:
//   A  : 16-bit word read, or (gather_a=1) a 4-bank gather that returns bit gbit of
//        words ga_addr+0..+3 as gather_q[0..3] (used by Mul(spike,int) to read one
//        column of four consecutive rows of V);
//   B  : 16-bit word read (second operand of Mul(spike,spike) and Sum(spike,spike));
//   W  : word write with a per-bit mask, so a single neuron output bit can be written.
// The bank count, 16-bit word and 32 Kb size follow the published design. Each bank
// is given two read ports here; that, the interleaving and the gather port are this
// design's choices. A read of a word written in the same cycle returns the old word.
module estu_spike_mem
  import estu_pkg::*;
#(
  parameter int BANKS      = 4,
  parameter int BANK_DEPTH = 512
) (
  input  logic              clk,
  // port A
  input  logic              re_a,
  input  logic              gather_a,
  input  logic [SPK_AW-1:0] addr_a,
  input  logic [3:0]        gbit,
  output logic [15:0]       q_a,
  output logic [3:0]        gather_q,
  // port B
  input  logic              re_b,
  input  logic [SPK_AW-1:0] addr_b,
  output logic [15:0]       q_b,
  // write port
  input  logic              we,
  input  logic [SPK_AW-1:0] addr_w,
  input  logic [15:0]       wdata,
  input  logic [15:0]       wmask
);
  localparam int RW = $clog2(BANK_DEPTH);

  logic [15:0] mem [BANKS][BANK_DEPTH];
  logic [15:0] qa_bank [BANKS];
  logic [15:0] qb_bank [BANKS];
  logic [1:0]  sel_a_q, sel_b_q;
  logic [3:0]  gbit_q;

  for (genvar k = 0; k < BANKS; k++) begin : g_bank
    // row read by port A in bank k: word mode uses the row of addr_a, gather mode
    // the row of the word among addr_a..addr_a+3 that falls into bank k.
    logic [SPK_AW-1:0] ga;
    logic [RW-1:0]     row_a;
    always_comb begin
      ga    = addr_a + SPK_AW'((k - int'(addr_a[1:0])) & 3);
      row_a = gather_a ? ga[2 +: RW] : addr_a[2 +: RW];
    end
    always_ff @(posedge clk) begin
      if (re_a) qa_bank[k] <= mem[k][row_a];
      if (re_b) qb_bank[k] <= mem[k][addr_b[2 +: RW]];
      if (we && addr_w[1:0] == 2'(k))
        mem[k][addr_w[2 +: RW]] <= (mem[k][addr_w[2 +: RW]] & ~wmask) | (wdata & wmask);
    end
  end

  always_ff @(posedge clk) begin
    if (re_a) begin
      sel_a_q <= addr_a[1:0];
      gbit_q  <= gbit;
    end
    if (re_b) sel_b_q <= addr_b[1:0];
  end

  always_comb begin
    q_a = qa_bank[sel_a_q];
    q_b = qb_bank[sel_b_q];
    for (int i = 0; i < 4; i++) gather_q[i] = qa_bank[2'(sel_a_q + 2'(i))][gbit_q];
  end

endmodule
