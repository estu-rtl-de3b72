// tb_model_step: one time step of each benchmarked spiking-transformer model, at full size.
//
// Three models are run one after the other on the same engine:
//   sEMG gesture model   4 heads, embedding 64, 200 time steps, constraint 5 ms
//   sEMG model (8 heads) 8 heads, embedding 32, 150 time steps, constraint 0.5 ms
//   EEG model            1 head,  embedding 8,  24 time steps,  constraint 3.91 ms
// Each head has D = embedding / heads features. All three take the same 32 input
// spikes per step (the 16-channel delta encoder) and end in a 16-class spike
// classifier; both of those sizes are this test's own.
//
// The K and V rows of all earlier steps are pre-filled with random spikes. The test
// then runs the program of the last step:
//   embedding Dense(spike) 32 -> E, recording its active groups;
//   per head: sparse Dense(spike) for Q, K and V (K and V written as the newest row);
//   per head: Q*K^T over all rows with Mul(spike,spike), then scores*V with Mul(spike,int);
//   residual Sum(spike,spike), LIF (recording its active groups), sparse classifier.
// Heads narrower than 16 features share one K/V word per row: head h uses word h/(16/D)
// of a row at bit offset (h mod 16/D)*D. Its Q row sits alone in a word, so the AND
// of Mul(spike,spike) sees only that head's bits.
//
// Every spike word, score and residual sum is compared with the reference model. The
// cycle count must equal the instructions' steps plus their fixed overhead. One time
// step at 21 MHz must meet the model's real-time constraint. The test also prints the
// saving of the sparse layers against dense ones.
`timescale 1ns/1ps
module tb_model_step;
  import estu_pkg::*;
  import estu_ref_pkg::*;

  localparam int QW = 8, AW = 16, LW = 20, CW = 24, KW = 32;   // spike word bases
  localparam int INW = 16'h2000, SUMB = 16'h9000, WQKV = 512;   // integer bases
  localparam real F_MHZ = 21.0;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [19:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  estu_core dut (.*);

  initial begin
    #500_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic hwrite(logic [19:0] a, logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask
  task automatic hread(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = a;
    @(negedge clk); host_req = 0; d = host_rdata;
  endtask
  function automatic instr_t mk(opcode_e op);
    instr_t i; i = '0; i.op = op; i.leak = 4'd1; i.spk_val = 8'sd1; return i;
  endfunction

  task automatic run_model(string name, int H, int E, int T, real limit_ms);
    instr_t prog [64];
    instr_t i;
    logic [31:0] d;
    logic [191:0] bits;
    int np, D, hpw, G, VW, L, t_now, nspk, t0, t1, exp_cycles, sp_steps, dn_steps, st;
    real ms;
    D = E / H; hpw = 16 / D; G = (H + hpw - 1) / hpw; VW = KW + G * T;
    L = (T + 3) / 4; t_now = T - 1; nspk = VW + G * T;

    // data: sparse input, random K/V history, random int8 weights, cleared scores
    for (int w = 0; w < 2048; w++) spk[w] = 0;
    spk[0] = 16'($urandom) & 16'($urandom); spk[1] = 16'($urandom) & 16'($urandom);
    for (int w = KW; w < nspk; w++)
      if ((w - KW) % T != t_now) spk[w] = 16'($urandom) & 16'($urandom) & 16'($urandom);
    for (int w = 0; w < 16384; w++) begin bank[0][w] = 0; bank[1][w] = 0; end
    for (int w = 0; w < WQKV + 3 * E * E / 4 + 16 * E / 4; w++)
      for (int b = 0; b < 2; b++)
        bank[b][w] = {8'($urandom % 32 - 8), 8'($urandom % 32 - 8)};
    for (int w = 0; w < nspk; w++) hwrite(20'h20000 | 20'(w), {16'h0, spk[w]});
    for (int w = 0; w < WQKV + 3 * E * E / 4 + 16 * E / 4; w++)
      hwrite(20'h30000 | 20'(w), {bank[1][w], bank[0][w]});
    for (int w = INW; w < INW + H * 64; w++) hwrite(20'h30000 | 20'(w), 32'h0);

    // program of the last time step
    np = 0;
    i = mk(OP_CLRPOT); i.n_rows = 400; prog[np++] = i;
    i = mk(OP_DENSE_S); i.src_a = 0; i.n_len = 8; i.src_i = 0; i.n_rows = 10'(E); i.dst = 4 * 16;
    i.pot_base = 0; i.vth = 20'sd95; i.push_stack = 1; i.stk_wr = 0; prog[np++] = i;
    for (int p = 0; p < 3; p++)
      for (int h = 0; h < H; h++) begin
        i = mk(OP_DENSE_S); i.use_stack = 1; i.stk_rd = 0; i.src_a = 4 * 16; i.n_len = 10'(E / 4);
        i.src_i = 16'(WQKV + (p * H + h) * D * E / 4); i.n_rows = 10'(D);
        i.pot_base = 10'(64 + p * 64 + h * D); i.vth = 20'(E + 16);
        i.dst = (p == 0) ? 16'((QW + h) * 16 + (h % hpw) * D)
              : 16'((p == 1 ? KW : VW) * 16 + ((h / hpw) * T + t_now) * 16 + (h % hpw) * D);
        prog[np++] = i;
      end
    for (int h = 0; h < H; h++) begin
      i = mk(OP_MUL_SS); i.src_a = 15'((QW + h) * 16); i.src_b = 15'((KW + (h / hpw) * T) * 16);
      i.n_rows = 1; i.n_cols = 10'(T); i.n_len = 1; i.dst = 16'(16'h8000 + h * 256); prog[np++] = i;
    end
    for (int h = 0; h < H; h++) begin
      i = mk(OP_MUL_SI); i.src_a = 15'((VW + (h / hpw) * T) * 16 + (h % hpw) * D);
      i.src_i = 16'(INW + h * 64); i.n_rows = 1; i.n_cols = 10'(D); i.n_len = 10'(L);
      i.dst = 16'(AW * 16 + h * D); i.pot_base = 10'(256 + h * D); i.vth = 20'sd4;
      prog[np++] = i;
    end
    i = mk(OP_SUM_SS); i.src_a = AW * 16; i.src_b = 4 * 16; i.n_rows = 10'(E); i.dst = 16'(SUMB); prog[np++] = i;
    i = mk(OP_LIF); i.src_i = 16'(SUMB); i.n_rows = 10'(E); i.dst = LW * 16; i.pot_base = 320;
    i.vth = 20'sd2; i.push_stack = 1; i.stk_wr = 200; prog[np++] = i;
    i = mk(OP_DENSE_S); i.use_stack = 1; i.stk_rd = 200; i.src_a = LW * 16; i.n_len = 10'(E / 4);
    i.src_i = 16'(WQKV + 3 * E * E / 4); i.n_rows = 16; i.dst = CW * 16; i.pot_base = 384;
    i.vth = 20'sd40; prog[np++] = i;
    i = mk(OP_END); prog[np++] = i;
    for (int k = 0; k < np; k++) begin
      bits = 192'(prog[k]);
      for (int s = 0; s < 6; s++) hwrite(20'h10000 | 20'(k * 8 + s), bits[32 * s +: 32]);
    end

    // reference results and cycle count
    exp_cycles = 3;   // END: fetch, decode, done
    sp_steps = 0; dn_steps = 0;
    for (int k = 0; k < np - 1; k++) begin
      st = ref_exec(prog[k]);
      exp_cycles += st + 6;
      if (prog[k].use_stack) begin
        sp_steps += st + 1;
        dn_steps += prog[k].n_rows * prog[k].n_len;
      end
    end

    @(negedge clk); host_req = 1; host_we = 1; host_addr = 20'h0; host_wdata = 32'h1; t0 = cyc;
    @(negedge clk); host_req = 0; host_we = 0;
    wait (done); t1 = cyc;
    @(negedge clk);
    checks++;
    if (t1 - t0 != exp_cycles) begin
      failures++; $display("%s: %0d cycles, expected %0d", name, t1 - t0, exp_cycles);
    end

    for (int w = 0; w < nspk; w++) begin
      hread(20'h20000 | 20'(w), d);
      checks++;
      if (d[15:0] !== spk[w]) begin
        failures++;
        if (failures < 20) $display("%s: spike word %0d = %h, expected %h", name, w, d[15:0], spk[w]);
      end
    end
    for (int w = INW; w < INW + H * 64; w++) begin
      hread(20'h30000 | 20'(w), d);
      checks++;
      if (d !== {bank[1][w], bank[0][w]}) begin
        failures++; if (failures < 20) $display("%s: score double word %h mismatch", name, w);
      end
    end
    for (int w = SUMB / 4; w < SUMB / 4 + E / 4; w++) begin
      hread(20'h30000 | 20'(w), d);
      checks++;
      if (d !== {bank[1][w], bank[0][w]}) begin
        failures++; if (failures < 20) $display("%s: residual double word %h mismatch", name, w);
      end
    end

    ms = real'(t1 - t0) / (F_MHZ * 1000.0);
    checks++;
    if (ms > limit_ms) begin
      failures++; $display("%s: %0.3f ms exceeds the %0.2f ms constraint", name, ms, limit_ms);
    end
    $display("%s: %0d cycles = %0.3f ms at 21 MHz (constraint %0.2f ms); active: embedding %0d/%0d, attention %0d/%0d",
             name, t1 - t0, ms, limit_ms,
             $countones({spk[4], spk[5], spk[6], spk[7]}), E,
             $countones({spk[AW], spk[AW + 1], spk[AW + 2], spk[AW + 3]}), E);
    $display("%s: sparse layers %0d steps against %0d dense; whole step %0d against %0d cycles (%0.0f%% fewer)",
             name, sp_steps, dn_steps, t1 - t0, t1 - t0 - sp_steps + dn_steps,
             100.0 * real'(dn_steps - sp_steps) / real'(t1 - t0 - sp_steps + dn_steps));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_model("sEMG 4x64x200", 4, 64, 200, 5.0);
    run_model("sEMG 8x32x150", 8, 32, 150, 0.5);
    run_model("EEG 1x8x24", 1, 8, 24, 3.91);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
