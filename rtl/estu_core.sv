// estu_core: the ESTU spiking-transformer engine.
//
// One reusable compute core runs every layer of a spiking transformer, one
// microcode instruction (operator) at a time: spike memory (4 banks), integer memory
// (2 banks), stack memory of active spike groups, microcode memory and controller,
// configurable interconnect, processing elements (multipliers, AND array with pop
// count, adders, 20-bit accumulator) and the LIF module with its potential memory.
//
// Host port (for the system CPU), word addressed, one access per cycle, read data one
// cycle later on host_rdata; memory accesses are honoured only while the engine is
// idle. host_addr[19:16] selects:
//   0 control : write bit 0 = start, bits 13:8 = first instruction; read {done, busy}
//               (done is sticky, cleared by the next start)
//   1 I-Mem   : host_addr[11:3] instruction, host_addr[2:0] 32-bit slice (0..5)
//   2 spike   : host_addr[10:0] spike word (16 bits)
//   3 integer : host_addr[13:0] double word, bank 0 in bits 15:0, bank 1 in 31:16
// The block structure follows the published architecture; the host map is this
// design's own.
module estu_core
  import estu_pkg::*;
#(
  parameter int IMEM_DEPTH     = 64,
  parameter int SPK_BANK_DEPTH = 512,
  parameter int INT_BANK_DEPTH = 16384,
  parameter int STACK_DEPTH    = 2560,
  parameter int NEURONS        = 768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_req,
  input  logic        host_we,
  input  logic [19:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        busy,
  output logic        done
);
  localparam int PCW = $clog2(IMEM_DEPTH);

  // controller <-> memories
  logic               im_re;
  logic [PCW-1:0]     im_addr;
  logic [INSTR_W-1:0] im_q;
  logic               c_sp_re_a, c_sp_gather, c_sp_re_b, c_sp_we;
  logic [SPK_AW-1:0]  c_sp_addr_a, c_sp_addr_b, c_sp_waddr;
  logic [3:0]         c_sp_gbit;
  logic [15:0]        c_sp_wdata, c_sp_wmask;
  logic [1:0]         c_im2_re, c_im2_we;
  logic [1:0][INT_AW-1:0] c_im2_raddr, c_im2_waddr;
  logic [1:0][15:0]   c_im2_wdata;
  logic [1:0][1:0]    c_im2_wbe;
  logic               st_re, st_push_start, st_push;
  logic [STK_AW-1:0]  st_raddr, st_wbase, st_count;
  logic [STK_W-1:0]   st_q, st_pdata;
  instr_t             ins;
  logic               s1_valid, s1_first, s1_ibank, s1_ilane, s1_zero_spk;
  logic [1:0]         s1_nib;
  logic [3:0]         s1_pos_a, s1_pos_b;
  logic               lif_rd_en, lif_upd, lif_bypass, lif_clr, lif_spike;
  logic [POT_AW-1:0]  lif_rd_addr, lif_wr_addr;
  logic signed [7:0]  lif_int;
  logic signed [V_W-1:0] lif_vnew;
  logic signed [1:0][9:0] sum2;

  // memory ports after the host multiplexer
  logic               sp_re_a, sp_re_b, sp_we;
  logic [SPK_AW-1:0]  sp_addr_a, sp_addr_b, sp_waddr;
  logic [15:0]        sp_q_a, sp_q_b, sp_wdata, sp_wmask;
  logic [3:0]         sp_gather_q;
  logic [1:0]         im2_re, im2_we;
  logic [1:0][INT_AW-1:0] im2_raddr, im2_waddr;
  logic [1:0][15:0]   im2_q, im2_wdata;
  logic [1:0][1:0]    im2_wbe;

  // ---------------- host access -----------------
  logic [3:0] region;
  logic       hw, hr, start;
  logic [1:0] rsel_q;
  logic       done_sticky;
  assign region = host_addr[19:16];
  assign hw     = host_req && host_we && !busy;
  assign hr     = host_req && !host_we && !busy;
  assign start  = host_req && host_we && region == 4'd0 && host_wdata[0] && !busy;

  always_comb begin
    sp_re_a = c_sp_re_a; sp_addr_a = c_sp_addr_a;
    sp_re_b = c_sp_re_b; sp_addr_b = c_sp_addr_b;
    sp_we = c_sp_we; sp_waddr = c_sp_waddr; sp_wdata = c_sp_wdata; sp_wmask = c_sp_wmask;
    im2_re = c_im2_re; im2_raddr = c_im2_raddr;
    im2_we = c_im2_we; im2_waddr = c_im2_waddr; im2_wdata = c_im2_wdata; im2_wbe = c_im2_wbe;
    if (!busy) begin
      sp_re_b   = hr && region == 4'd2;
      sp_addr_b = host_addr[SPK_AW-1:0];
      sp_we     = hw && region == 4'd2;
      sp_waddr  = host_addr[SPK_AW-1:0];
      sp_wdata  = host_wdata[15:0];
      sp_wmask  = 16'hFFFF;
      im2_re    = {2{hr && region == 4'd3}};
      im2_raddr = {2{host_addr[INT_AW-1:0]}};
      im2_we    = {2{hw && region == 4'd3}};
      im2_waddr = {2{host_addr[INT_AW-1:0]}};
      im2_wdata = host_wdata;
      im2_wbe   = '1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel_q      <= '0;
      done_sticky <= 1'b0;
    end else begin
      if (host_req && !host_we) rsel_q <= region[1:0];
      if (start) done_sticky <= 1'b0;
      else if (done) done_sticky <= 1'b1;
    end
  end

  always_comb begin
    unique case (rsel_q)
      2'd2:    host_rdata = {16'h0, sp_q_b};
      2'd3:    host_rdata = {im2_q[1], im2_q[0]};
      default: host_rdata = {30'h0, done_sticky, busy};
    endcase
  end

  // ---------------- blocks -----------------
  estu_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .we(hw && region == 4'd1), .waddr(host_addr[3 +: PCW]), .wslice(host_addr[2:0]),
    .wdata(host_wdata), .re(im_re), .raddr(im_addr), .q(im_q));

  estu_ctrl #(.IMEM_DEPTH(IMEM_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .start_pc(host_wdata[8 +: PCW]), .busy, .done,
    .im_re, .im_addr, .im_q,
    .sp_re_a(c_sp_re_a), .sp_gather(c_sp_gather), .sp_addr_a(c_sp_addr_a), .sp_gbit(c_sp_gbit),
    .sp_re_b(c_sp_re_b), .sp_addr_b(c_sp_addr_b),
    .sp_we(c_sp_we), .sp_waddr(c_sp_waddr), .sp_wdata(c_sp_wdata), .sp_wmask(c_sp_wmask),
    .im2_re(c_im2_re), .im2_raddr(c_im2_raddr), .im2_we(c_im2_we), .im2_waddr(c_im2_waddr),
    .im2_wdata(c_im2_wdata), .im2_wbe(c_im2_wbe),
    .st_re, .st_raddr, .st_q, .st_push_start, .st_wbase, .st_push, .st_pdata,
    .ins, .s1_valid, .s1_first, .s1_nib, .s1_pos_a, .s1_pos_b, .s1_ibank, .s1_ilane, .s1_zero_spk,
    .lif_rd_en, .lif_rd_addr, .lif_upd, .lif_bypass, .lif_clr, .lif_wr_addr,
    .lif_spike, .lif_int, .sum2);

  estu_spike_mem #(.BANK_DEPTH(SPK_BANK_DEPTH)) u_spk (
    .clk, .re_a(sp_re_a), .gather_a(c_sp_gather && busy), .addr_a(sp_addr_a), .gbit(c_sp_gbit),
    .q_a(sp_q_a), .gather_q(sp_gather_q), .re_b(sp_re_b), .addr_b(sp_addr_b), .q_b(sp_q_b),
    .we(sp_we), .addr_w(sp_waddr), .wdata(sp_wdata), .wmask(sp_wmask));

  estu_int_mem #(.BANK_DEPTH(INT_BANK_DEPTH)) u_int (
    .clk, .re(im2_re), .raddr(im2_raddr), .q(im2_q),
    .we(im2_we), .waddr(im2_waddr), .wdata(im2_wdata), .wbe(im2_wbe));

  estu_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n, .re(st_re), .raddr(st_raddr), .q(st_q),
    .push_start(st_push_start), .wbase(st_wbase), .push(st_push), .pdata(st_pdata),
    .count(st_count));

  operands_t opnd;
  estu_interconnect u_ic (
    .op(ins.op), .spk_a(sp_q_a), .spk_b(sp_q_b), .gather(sp_gather_q), .iword(im2_q),
    .nib(s1_nib), .pos_a(s1_pos_a), .pos_b(s1_pos_b), .ibank(s1_ibank), .ilane(s1_ilane),
    .zero_spk(s1_zero_spk), .opnd);

  logic signed [ACC_W-1:0] partial, acc_next, acc, cur;
  estu_pe u_pe (
    .clk, .rst_n, .op(ins.op), .opnd, .spk_val(ins.spk_val), .en(s1_valid), .first(s1_first),
    .partial, .acc_next, .acc, .sum2);

  assign cur = acc_next >>> ins.shift;

  estu_lif #(.NEURONS(NEURONS)) u_lif (
    .clk, .rd_en(lif_rd_en), .rd_addr(lif_rd_addr), .upd(lif_upd), .bypass(lif_bypass),
    .clr(lif_clr), .wr_addr(lif_wr_addr), .cur, .vth(ins.vth), .leak(ins.leak),
    .rst_sub(ins.rst_sub), .spike(lif_spike), .v_new(lif_vnew), .int_out(lif_int));

endmodule
