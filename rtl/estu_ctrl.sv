// estu_ctrl: microcode sequencer and address generator of the ESTU engine.
//
// Fetches 169-bit instructions from I-Mem and runs each one as a three-stage
// pipeline that needs no stalls:
//   AGU : walks the operator's loops (rows r, columns c, inner steps g) and issues
//         one step per cycle; for a sparse Dense(spike) it also issues the stack
//         read of list entry g;
//   S0  : turns the step into memory addresses (spike ports A/B, the two integer
//         banks, the potential of the output neuron on its last step);
//   S1  : memory data are back; the datapath (interconnect, PEs, LIF) computes and
//         this module issues the writes: one spike bit, one int8 byte, a pair of
//         int8 bytes, or a potential clear. Active 4-spike groups of the output are
//         pushed to the stack when the instruction asks for it.
// Per instruction the cost is one cycle per step plus 6 (fetch, decode, two-cycle
// drain, leaving the run state, list close). In sparse mode each output neuron takes
// (list length + 2) steps: the list entries, the terminator step, which applies the
// neuron update, and one step discarded because it was fetched before the terminator
// was seen; the drain is then one cycle shorter (steps + 5).
// Interface: start (one cycle, while idle) with start_pc begins a program; busy
// stays high until an END instruction, then done pulses for one cycle.
// The loop nest, the address arithmetic and the sparse-list protocol are this
// design's own; what each operator reads and writes follows the published data flow.
module estu_ctrl
  import estu_pkg::*;
#(
  parameter int IMEM_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(IMEM_DEPTH)-1:0] start_pc,
  output logic                          busy,
  output logic                          done,
  // instruction memory
  output logic                          im_re,
  output logic [$clog2(IMEM_DEPTH)-1:0] im_addr,
  input  logic [INSTR_W-1:0]            im_q,
  // spike memory
  output logic                          sp_re_a,
  output logic                          sp_gather,
  output logic [SPK_AW-1:0]             sp_addr_a,
  output logic [3:0]                    sp_gbit,
  output logic                          sp_re_b,
  output logic [SPK_AW-1:0]             sp_addr_b,
  output logic                          sp_we,
  output logic [SPK_AW-1:0]             sp_waddr,
  output logic [15:0]                   sp_wdata,
  output logic [15:0]                   sp_wmask,
  // integer memory
  output logic [1:0]                    im2_re,
  output logic [1:0][INT_AW-1:0]        im2_raddr,
  output logic [1:0]                    im2_we,
  output logic [1:0][INT_AW-1:0]        im2_waddr,
  output logic [1:0][15:0]              im2_wdata,
  output logic [1:0][1:0]               im2_wbe,
  // stack
  output logic                          st_re,
  output logic [STK_AW-1:0]             st_raddr,
  input  logic [STK_W-1:0]              st_q,
  output logic                          st_push_start,
  output logic [STK_AW-1:0]             st_wbase,
  output logic                          st_push,
  output logic [STK_W-1:0]              st_pdata,
  // datapath control in S1
  output instr_t                        ins,
  output logic                          s1_valid,
  output logic                          s1_first,
  output logic [1:0]                    s1_nib,
  output logic [3:0]                    s1_pos_a,
  output logic [3:0]                    s1_pos_b,
  output logic                          s1_ibank,
  output logic                          s1_ilane,
  output logic                          s1_zero_spk,
  // LIF module
  output logic                          lif_rd_en,
  output logic [POT_AW-1:0]             lif_rd_addr,
  output logic                          lif_upd,
  output logic                          lif_bypass,
  output logic                          lif_clr,
  output logic [POT_AW-1:0]             lif_wr_addr,
  input  logic                          lif_spike,
  input  logic signed [7:0]             lif_int,
  input  logic signed [1:0][9:0]        sum2
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_RUN, S_FLUSH} state_e;

  typedef struct packed {
    logic        v;
    logic [9:0]  r;
    logic [9:0]  c;
    logic [9:0]  g;
    logic [15:0] n;
    logic [15:0] ia;     // r * n_len
    logic [15:0] ib;     // c * n_len
    logic        first;
    logic        last;
    logic        fin;
  } step_t;

  typedef struct packed {
    logic        v;
    logic [15:0] n;
    logic        first;
    logic        last;
    logic        fin;
    logic [1:0]  nib;
    logic [3:0]  pos_a;
    logic [3:0]  pos_b;
    logic        ibank;
    logic        ilane;
    logic        zero_spk;
  } s1_t;

  state_e state;
  instr_t dq;          // instruction arriving from I-Mem
  step_t  agu_item;    // AGU step with its last/fin flags
  assign dq = instr_t'(im_q);
  logic [$clog2(IMEM_DEPTH)-1:0] pc;
  step_t agu, s0;
  s1_t   s1;
  logic  grp_any;

  // instruction-derived loop bounds
  logic       is_sum, is_mul, is_inner, stack_mode, spk_out;
  logic [9:0] lim_r, lim_c, lim_g;
  always_comb begin
    is_sum     = ins.op inside {OP_SUM_SS, OP_SUM_SI};
    is_mul     = ins.op inside {OP_MUL_SS, OP_MUL_SI};
    stack_mode = ins.op == OP_DENSE_S && ins.use_stack;
    is_inner   = (ins.op inside {OP_DENSE_S, OP_DENSE_I} || is_mul) && !stack_mode;
    spk_out    = ins.op inside {OP_DENSE_S, OP_DENSE_I, OP_MUL_SI, OP_LIF};
    lim_r      = ins.n_rows;
    lim_c      = is_mul ? ins.n_cols : 10'd1;
    lim_g      = is_inner ? ins.n_len : 10'd1;
  end

  always_comb begin
    agu_item      = agu;
    agu_item.last = agu.g + 10'd1 >= lim_g;
    agu_item.fin  = agu_item.last && (agu.c + 10'd1 >= lim_c) &&
                    (agu.r + (is_sum ? 10'd2 : 10'd1) >= lim_r);
  end

  // ---------------- S0: address generation -----------------
  logic               s0_end, s0_last, s0_fin;
  logic [12:0]        gp, gidx;
  logic [SPK_BAW-1:0] ba_a, ba_b;
  logic [15:0]        ibyte;
  always_comb begin
    s0_end  = s0.v && stack_mode && (st_q == STK_END);
    s0_last = stack_mode ? s0_end : s0.last;
    s0_fin  = stack_mode ? (s0_end && (s0.r + 10'd1 >= lim_r)) : s0.fin;
    gp      = stack_mode ? st_q[12:0] : 13'(ins.src_a[14:2] + 13'(s0.g));
    gidx    = gp - ins.src_a[14:2];
    ba_a    = ins.src_a + SPK_BAW'(s0.r);
    ba_b    = ins.src_b + SPK_BAW'(s0.r);
    ibyte   = ins.src_i + 16'(s0.r);

    sp_re_a = 1'b0; sp_gather = 1'b0; sp_addr_a = '0; sp_gbit = '0;
    sp_re_b = 1'b0; sp_addr_b = '0;
    im2_re  = '0;   im2_raddr = '0;
    if (s0.v) begin
      unique case (ins.op)
        OP_DENSE_S: if (!s0_end) begin
          sp_re_a = 1'b1; sp_addr_a = gp[12:2];
          im2_re  = 2'b11;
          im2_raddr[0] = INT_AW'(ins.src_i + s0.ia + 16'(gidx));
          im2_raddr[1] = im2_raddr[0];
        end
        OP_DENSE_I: begin
          im2_re = 2'b11;
          im2_raddr[0] = INT_AW'(ins.src_i + s0.ia + 16'(s0.g));
          im2_raddr[1] = INT_AW'(16'(ins.src_b) + 16'(s0.g));
        end
        OP_MUL_SS: begin
          sp_re_a = 1'b1; sp_addr_a = SPK_AW'(16'(ins.src_a[14:4]) + s0.ia + 16'(s0.g));
          sp_re_b = 1'b1; sp_addr_b = SPK_AW'(16'(ins.src_b[14:4]) + s0.ib + 16'(s0.g));
        end
        OP_MUL_SI: begin
          im2_re = 2'b11;
          im2_raddr[0] = INT_AW'(ins.src_i + s0.ia + 16'(s0.g));
          im2_raddr[1] = im2_raddr[0];
          sp_re_a = 1'b1; sp_gather = 1'b1; sp_gbit = s0.c[3:0] + ins.src_a[3:0];  // src_a[3:0]: first V column in the word
          sp_addr_a = SPK_AW'(16'(ins.src_a[14:4]) + 16'({s0.g, 2'b00}));
        end
        OP_SUM_SS: begin
          sp_re_a = 1'b1; sp_addr_a = ba_a[14:4];
          sp_re_b = 1'b1; sp_addr_b = ba_b[14:4];
        end
        OP_SUM_SI: begin
          sp_re_a = 1'b1; sp_addr_a = ba_a[14:4];
          im2_re[ibyte[1]] = 1'b1;
          im2_raddr[ibyte[1]] = ibyte[15:2];
        end
        OP_LIF: begin
          im2_re[ibyte[1]] = 1'b1;
          im2_raddr[ibyte[1]] = ibyte[15:2];
        end
        default: ;
      endcase
    end
    lif_rd_en   = s0.v && s0_last && spk_out;
    lif_rd_addr = POT_AW'(16'(ins.pot_base) + s0.n);
    st_re       = agu.v && stack_mode;
    st_raddr    = ins.stk_rd + STK_AW'(agu.g);
  end

  // ---------------- S1: writes -----------------
  logic [15:0]        dbyte;
  logic [SPK_BAW-1:0] dbit;
  logic [12:0]        dgrp;
  logic               any_now, grp_close;
  always_comb begin
    s1_valid    = s1.v;
    s1_first    = s1.first;
    s1_nib      = s1.nib;
    s1_pos_a    = s1.pos_a;
    s1_pos_b    = s1.pos_b;
    s1_ibank    = s1.ibank;
    s1_ilane    = s1.ilane;
    s1_zero_spk = s1.zero_spk;

    dbit  = SPK_BAW'(ins.dst + s1.n);
    dbyte = ins.dst + s1.n;
    dgrp  = dbit[14:2];

    lif_upd     = s1.v && s1.last && (spk_out || ins.op == OP_MUL_SS);
    lif_bypass  = ins.op == OP_MUL_SS;
    lif_clr     = s1.v && ins.op == OP_CLRPOT;
    lif_wr_addr = POT_AW'(16'(ins.pot_base) + s1.n);

    sp_we    = s1.v && s1.last && spk_out;
    sp_waddr = dbit[14:4];
    sp_wmask = 16'(1) << dbit[3:0];
    sp_wdata = lif_spike ? sp_wmask : 16'h0;

    im2_we = '0; im2_waddr = '0; im2_wdata = '0; im2_wbe = '0;
    if (s1.v && s1.last && ins.op == OP_MUL_SS) begin
      im2_we[dbyte[1]]    = 1'b1;
      im2_waddr[dbyte[1]] = dbyte[15:2];
      im2_wdata[dbyte[1]] = {lif_int, lif_int};
      im2_wbe[dbyte[1]]   = dbyte[0] ? 2'b10 : 2'b01;
    end else if (s1.v && is_sum) begin
      im2_we[dbyte[1]]    = 1'b1;
      im2_waddr[dbyte[1]] = dbyte[15:2];
      im2_wdata[dbyte[1]] = {sat8(ACC_W'(signed'(sum2[1]))), sat8(ACC_W'(signed'(sum2[0])))};
      im2_wbe[dbyte[1]]   = 2'b11;
    end

    // stack push of active output groups
    any_now   = grp_any | lif_spike;
    grp_close = sp_we && ins.push_stack && (dbit[1:0] == 2'd3 || s1.fin);
    st_push_start = (state == S_DECODE);
    st_wbase      = dq.stk_wr;
    st_push  = 1'b0;
    st_pdata = 16'(dgrp);
    if (grp_close && any_now) st_push = 1'b1;
    if (state == S_FLUSH && ins.push_stack) begin
      st_push  = 1'b1;
      st_pdata = STK_END;
    end
  end

  // ---------------- sequencing -----------------
  assign busy    = state != S_IDLE;
  assign im_re   = state == S_FETCH;
  assign im_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pc      <= '0;
      done    <= 1'b0;
      ins     <= '0;
      agu     <= '0;
      s0      <= '0;
      s1      <= '0;
      grp_any <= 1'b0;
    end else begin
      done <= 1'b0;
      // pipeline registers
      s0 <= s0_end ? '0 : agu_item;   // the step fetched behind a list terminator is dropped
      s1.v        <= s0.v;
      s1.n        <= s0.n;
      s1.first    <= s0.first;
      s1.last     <= s0_last;
      s1.fin      <= s0_fin;
      s1.nib      <= gp[1:0];
      s1.pos_a    <= ba_a[3:0];
      s1.pos_b    <= ba_b[3:0];
      s1.ibank    <= ibyte[1];
      s1.ilane    <= ibyte[0];
      s1.zero_spk <= s0_end;
      if (sp_we && ins.push_stack) grp_any <= (grp_close ? 1'b0 : any_now);

      unique case (state)
        S_IDLE: if (start) begin
          pc    <= start_pc;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ins     <= instr_t'(im_q);
          grp_any <= 1'b0;
          if (dq.op == OP_END) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state     <= S_RUN;
            agu       <= '0;
            agu.v     <= dq.n_rows != '0;
            agu.first <= 1'b1;
          end
        end
        S_RUN: begin
          if (agu.v) begin
            // advance the loop nest
            if (stack_mode) begin
              agu.g     <= agu.g + 10'd1;
              agu.first <= 1'b0;
              if (s0_end) begin
                agu.g     <= '0;
                agu.first <= 1'b1;
                agu.r     <= agu.r + 10'd1;
                agu.n     <= agu.n + 16'd1;
                agu.ia    <= agu.ia + 16'(ins.n_len);
                if (agu.r + 10'd1 >= lim_r) agu.v <= 1'b0;
              end
            end else begin
              if (agu_item.fin) agu.v <= 1'b0;
              agu.first <= (agu.g + 10'd1 >= lim_g);
              if (agu.g + 10'd1 < lim_g) begin
                agu.g <= agu.g + 10'd1;
              end else begin
                agu.g <= '0;
                agu.n <= agu.n + (is_sum ? 16'd2 : 16'd1);
                if (agu.c + 10'd1 < lim_c) begin
                  agu.c  <= agu.c + 10'd1;
                  agu.ib <= agu.ib + 16'(ins.n_len);
                end else begin
                  agu.c  <= '0;
                  agu.ib <= '0;
                  agu.r  <= agu.r + (is_sum ? 10'd2 : 10'd1);
                  agu.ia <= agu.ia + 16'(ins.n_len);
                end
              end
            end
          end else if (!s0.v && !s1.v) begin
            state <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
