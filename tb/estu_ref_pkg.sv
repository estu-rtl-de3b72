// estu_ref_pkg: reference model of the ESTU engine for the testbenches.
//
// Holds a copy of the spike memory, both integer banks, the potentials and the stack,
// and executes one microcode instruction at a time from the operator definitions
// (not from the RTL structure). ref_exec returns the number of pipeline steps the
// instruction takes: one per output step at the published per-cycle rates, and
// (list length + 2) per neuron for a sparse Dense(spike).
package estu_ref_pkg;
  import estu_pkg::*;

  logic [15:0] spk [2048];
  logic [15:0] bank [2][16384];
  logic signed [19:0] pot [768];
  logic [15:0] stk [4096];

  function automatic logic sb(int a); return spk[a >> 4][a & 15]; endfunction
  function automatic logic signed [7:0] ib(int b);
    logic [15:0] w; w = bank[(b >> 1) & 1][b >> 2];
    return (b & 1) ? w[15:8] : w[7:0];
  endfunction
  function automatic void set_sb(int a, logic v); spk[a >> 4][a & 15] = v; endfunction
  function automatic void set_ib(int b, logic [7:0] v);
    if (b & 1) bank[(b >> 1) & 1][b >> 2][15:8] = v; else bank[(b >> 1) & 1][b >> 2][7:0] = v;
  endfunction
  function automatic logic signed [7:0] s8(int v);
    if (v > 127) return 127; if (v < -128) return -128; return v[7:0];
  endfunction
  function automatic int wrap20(int v);   // 20-bit two's complement wrap (accumulator)
    logic [19:0] t; t = v[19:0]; return int'(signed'(t));
  endfunction
  function automatic logic lif_ref(int n, int cur_acc, instr_t i);
    int v, vl, vs, cur;
    cur = wrap20(cur_acc) >>> i.shift;
    v = pot[n];
    vl = (i.leak == 0) ? v : v - (v >>> i.leak);
    vs = vl + cur;
    if (vs > 524287) vs = 524287; if (vs < -524288) vs = -524288;
    if (vs >= int'(i.vth)) begin
      pot[n] = i.rst_sub ? 20'(vs - int'(i.vth)) : 20'sd0;
      return 1'b1;
    end
    pot[n] = 20'(vs);
    return 1'b0;
  endfunction

  int n_push;
  function automatic void push_grp(instr_t i, int bitaddr, ref logic any, input logic spike, input logic fin);
    any |= spike;
    if (((bitaddr & 3) == 3) || fin) begin
      if (any) begin stk[i.stk_wr + n_push] = 16'(bitaddr >> 2); n_push++; end
      any = 0;
    end
  endfunction

  // executes one instruction on the reference state, returns its step count
  function automatic int ref_exec(instr_t i);
    int steps, acc, L, n, base;
    logic any, s;
    steps = 0; n_push = 0; any = 0;
    L = i.n_len;
    case (i.op)
      OP_CLRPOT: begin for (int r = 0; r < i.n_rows; r++) pot[i.pot_base + r] = 0; steps = i.n_rows; end
      OP_DENSE_S: begin
        base = i.src_a >> 2;
        for (int r = 0; r < i.n_rows; r++) begin
          acc = 0;
          for (int g = 0; g < L; g++)
            for (int l = 0; l < 4; l++)
              if (sb((base + g) * 4 + l)) acc += ib(((i.src_i + r * L + g) << 2) + l);
          s = lif_ref(i.pot_base + r, acc, i);
          set_sb(i.dst + r, s);
          if (i.push_stack) push_grp(i, i.dst + r, any, s, r == i.n_rows - 1);
        end
        if (i.use_stack) begin
          int cnt; cnt = 0;
          while (stk[i.stk_rd + cnt] != 16'hFFFF) cnt++;
          steps = i.n_rows * (cnt + 2) - 1;   // one less drain cycle, see controller
        end else steps = i.n_rows * L;
      end
      OP_DENSE_I: begin
        for (int r = 0; r < i.n_rows; r++) begin
          acc = 0;
          for (int g = 0; g < L; g++)
            for (int l = 0; l < 2; l++)
              acc += ib(((i.src_i + r * L + g) << 2) + l) * ib((((i.src_b + g) << 2) | 2) + l);
          s = lif_ref(i.pot_base + r, acc, i);
          set_sb(i.dst + r, s);
          if (i.push_stack) push_grp(i, i.dst + r, any, s, r == i.n_rows - 1);
        end
        steps = i.n_rows * L;
      end
      OP_MUL_SS: begin
        for (int r = 0; r < i.n_rows; r++)
          for (int c = 0; c < i.n_cols; c++) begin
            acc = 0;
            for (int g = 0; g < L; g++)
              for (int b = 0; b < 16; b++)
                acc += sb(((i.src_a >> 4) + r * L + g) * 16 + b) & sb(((i.src_b >> 4) + c * L + g) * 16 + b);
            set_ib(i.dst + r * i.n_cols + c, s8(acc >>> i.shift));
          end
        steps = i.n_rows * i.n_cols * L;
      end
      OP_MUL_SI: begin
        n = 0;
        for (int r = 0; r < i.n_rows; r++)
          for (int c = 0; c < i.n_cols; c++) begin
            acc = 0;
            for (int j = 0; j < 4 * L; j++)
              if (sb(((i.src_a >> 4) + j) * 16 + (i.src_a & 15) + c)) acc += ib(((i.src_i + r * L) << 2) + j);
            s = lif_ref(i.pot_base + n, acc, i);
            set_sb(i.dst + n, s);
            if (i.push_stack) push_grp(i, i.dst + n, any, s, n == i.n_rows * i.n_cols - 1);
            n++;
          end
        steps = i.n_rows * i.n_cols * L;
      end
      OP_SUM_SS, OP_SUM_SI: begin
        for (int r = 0; r < i.n_rows; r++) begin
          acc = sb(i.src_a + r) ? int'(i.spk_val) : 0;
          if (i.op == OP_SUM_SS) acc += sb(i.src_b + r) ? int'(i.spk_val) : 0;
          else acc += ib(i.src_i + r);
          set_ib(i.dst + r, s8(acc));
        end
        steps = (i.n_rows + 1) / 2;
      end
      OP_LIF: begin
        for (int r = 0; r < i.n_rows; r++) begin
          s = lif_ref(i.pot_base + r, ib(i.src_i + r), i);
          set_sb(i.dst + r, s);
          if (i.push_stack) push_grp(i, i.dst + r, any, s, r == i.n_rows - 1);
        end
        steps = i.n_rows;
      end
      default: ;
    endcase
    if (i.push_stack) stk[i.stk_wr + n_push] = 16'hFFFF;
    return steps;
  endfunction

endpackage
