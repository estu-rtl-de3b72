// estu_lif: LIF neuron module with bypass, and the membrane-potential memory.
//
// Holds NEURONS 20-bit signed potentials. A neuron update takes two cycles:
// rd_en/rd_addr in pipeline stage S0 fetch the old potential; in S1, with upd high,
// the module computes
//     v_leak = (leak == 0) ? v : v - (v >>> leak)
//     v_sum  = saturate20(v_leak + cur)
//     spike  = v_sum >= vth
//     v_new  = spike ? (rst_sub ? v_sum - vth : 0) : v_sum
// and writes v_new back at the same address (wr_addr). bypass skips the neuron:
// nothing is written and int_out = saturate8(cur) is the result (Mul(spike,spike),
// Sum). clr writes zero to wr_addr. Up to 768 neurons and 20-bit potentials follow
// the published design; the leak-by-shift, threshold compare and the two reset modes
// are this design's reading of "LIF parameters".
module estu_lif
  import estu_pkg::*;
#(
  parameter int NEURONS = 768
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [POT_AW-1:0]       rd_addr,
  input  logic                    upd,
  input  logic                    bypass,
  input  logic                    clr,
  input  logic [POT_AW-1:0]       wr_addr,
  input  logic signed [ACC_W-1:0] cur,
  input  logic signed [V_W-1:0]   vth,
  input  logic [3:0]              leak,
  input  logic                    rst_sub,
  output logic                    spike,
  output logic signed [V_W-1:0]   v_new,
  output logic signed [7:0]       int_out
);
  localparam logic signed [V_W+1:0] VMAX = (V_W+2)'((1 << (V_W-1)) - 1);
  localparam logic signed [V_W+1:0] VMIN = -(V_W+2)'(1 << (V_W-1));

  logic signed [V_W-1:0] pot [NEURONS];
  logic signed [V_W-1:0] v_old, v_leak, v_sum;
  logic signed [V_W+1:0] s_ext;

  always_ff @(posedge clk) begin
    if (rd_en) v_old <= pot[rd_addr];
    if (clr) pot[wr_addr] <= '0;
    else if (upd && !bypass) pot[wr_addr] <= v_new;
  end

  always_comb begin
    v_leak = (leak == 4'd0) ? v_old : v_old - (v_old >>> leak);
    s_ext  = (V_W+2)'(v_leak) + (V_W+2)'(cur);
    if (s_ext > VMAX)      v_sum = VMAX[V_W-1:0];
    else if (s_ext < VMIN) v_sum = VMIN[V_W-1:0];
    else                   v_sum = s_ext[V_W-1:0];
    spike   = !bypass && (v_sum >= vth);
    v_new   = spike ? (rst_sub ? v_sum - vth : '0) : v_sum;
    int_out = sat8(cur);
  end

endmodule
