// tb_estu_core: self-checking test of the ESTU engine.
//
// Loads random spikes and int8 data through the host port, runs a ten-instruction
// program that uses every operator (CLRPOT, Dense(spike) dense and sparse with a
// stack list, Dense(int), Mul(spike,spike), Mul(spike,int), Sum(spike,spike),
// Sum(spike,int), LIF, END) and compares the spike and integer memories with a
// reference model written here from the operator definitions. It also checks the
// cycle count of each instruction: one cycle per step (Table-IV rates: 4 spike-int
// pairs, 2 int pairs, 16 spike pairs, 2 sum elements or 1 LIF neuron per cycle)
// plus the fixed per-instruction overhead, and that the sparse Dense(spike) took
// fewer cycles than the dense one.
`timescale 1ns/1ps
module tb_estu_core;
  import estu_pkg::*;
  import estu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [19:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  estu_core dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host access -----------------
  task automatic hwrite(logic [19:0] a, logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask
  task automatic hread(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = a;
    @(negedge clk); host_req = 0; d = host_rdata;
  endtask
  task automatic load_instr(int idx, instr_t i);
    logic [191:0] w; w = 192'(i);
    for (int s = 0; s < 6; s++) hwrite(20'h10000 | 20'(idx * 8 + s), w[32 * s +: 32]);
  endtask

  function automatic instr_t mk(opcode_e op);
    instr_t i; i = '0; i.op = op; i.vth = 20'sd40; i.leak = 4'd1; i.spk_val = 8'sd3; return i;
  endfunction

  instr_t prog [11];
  int exp_steps [11];
  int t_start [11];
  int t_fetch [11];

  // time stamps of every fetch, to measure each instruction
  int nf = 0;
  always @(posedge clk) if (dut.u_ctrl.state == dut.u_ctrl.S_FETCH && nf < 11) begin
    t_fetch[nf] <= cyc; nf <= nf + 1;
  end

  initial begin
    logic [31:0] d;
    instr_t i;
    int t0, t1, exp_total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // zero the reference and the device for the regions used
    for (int w = 0; w < 2048; w++) spk[w] = 0;
    for (int w = 0; w < 16384; w++) begin bank[0][w] = 0; bank[1][w] = 0; end
    // random inputs: spike words 0..1 (input x), 32..39 Q, 40..47 K, 48..55 V, 64..65 residual
    for (int w = 0; w < 2; w++) spk[w] = 16'($urandom) & 16'($urandom) & 16'hF0F3;
    for (int w = 32; w < 56; w++) spk[w] = 16'($urandom);
    for (int w = 64; w < 66; w++) spk[w] = 16'($urandom);
    // int: dense(spike) weights dword 0..127, dense(int) weights dword 256.., inputs bank1 dword 512..
    for (int w = 0; w < 1024; w++) begin bank[0][w] = 16'($urandom); bank[1][w] = 16'($urandom); end
    for (int w = 0; w < 128; w++) hwrite(20'h20000 | 20'(w), {16'h0, spk[w]});
    for (int w = 0; w < 1024; w++) hwrite(20'h30000 | 20'(w), {bank[1][w], bank[0][w]});
    for (int w = 'h2000; w < 'h2500; w++) hwrite(20'h30000 | 20'(w), 32'h0);

    // ---------------- program -----------------
    i = mk(OP_CLRPOT); i.n_rows = 400; i.pot_base = 0; prog[0] = i;
    i = mk(OP_DENSE_S); i.src_a = 0; i.src_i = 0; i.n_rows = 64; i.n_len = 8; i.dst = 16 * 16;
        i.pot_base = 0; i.push_stack = 1; i.stk_wr = 0; i.vth = 20'sd150; prog[1] = i;
    i = mk(OP_DENSE_S); i.src_a = 16 * 16; i.src_i = 512; i.n_rows = 16; i.n_len = 16; i.dst = 20 * 16;
        i.pot_base = 64; i.use_stack = 1; i.stk_rd = 0; i.push_stack = 1; i.stk_wr = 100; i.vth = 20'sd10; prog[2] = i;
    i = mk(OP_DENSE_I); i.src_i = 800; i.src_b = 900; i.n_rows = 8; i.n_len = 6; i.dst = 18 * 16;
        i.pot_base = 100; i.vth = 20'sd300; i.shift = 2; i.rst_sub = 1; prog[3] = i;
    i = mk(OP_MUL_SS); i.src_a = 32 * 16; i.src_b = 40 * 16; i.n_rows = 8; i.n_cols = 8; i.n_len = 1; i.shift = 1;
        i.dst = 16'h8000; prog[4] = i;
    i = mk(OP_MUL_SI); i.src_a = 48 * 16; i.src_i = 16'h2000; i.n_rows = 8; i.n_cols = 16; i.n_len = 2;
        i.dst = 64 * 16 + 32; i.pot_base = 64; i.vth = 20'sd12; i.leak = 0; prog[5] = i;
    i = mk(OP_SUM_SS); i.src_a = 64 * 16; i.src_b = 65 * 16; i.n_rows = 16; i.dst = 16'h9000; prog[6] = i;
    i = mk(OP_SUM_SI); i.src_a = 64 * 16 + 4; i.src_i = 16'h9000; i.n_rows = 16; i.dst = 16'h9102;
        i.spk_val = -8'sd5; prog[7] = i;
    i = mk(OP_LIF); i.src_i = 16'h9102; i.n_rows = 16; i.dst = 80 * 16; i.pot_base = 300; i.vth = 20'sd3;
        i.leak = 2; prog[8] = i;
    i = mk(OP_END); prog[9] = i;
    for (int k = 0; k < 10; k++) load_instr(k, prog[k]);

    for (int w = 0; w < 4096; w++) stk[w] = 16'h0;
    exp_total = 0;
    for (int k = 0; k < 9; k++) begin
      exp_steps[k] = ref_exec(prog[k]);
      exp_total += exp_steps[k] + 6;
    end

    // run
    @(negedge clk); host_req = 1; host_we = 1; host_addr = 20'h00000; host_wdata = 32'h1;
    t0 = cyc;
    @(negedge clk); host_req = 0; host_we = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    // per-instruction cycles: fetch-to-fetch distance = steps + 6
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (t_fetch[k + 1] - t_fetch[k] != exp_steps[k] + 6) begin
        failures++;
        $display("instr %0d (%s): %0d cycles, expected %0d", k, prog[k].op.name(),
                 t_fetch[k + 1] - t_fetch[k], exp_steps[k] + 6);
      end
    end
    checks++;
    if (exp_steps[2] >= 16 * 16) begin
      failures++; $display("sparse Dense(spike) not faster: %0d steps", exp_steps[2]);
    end
    $display("program: %0d cycles (expected about %0d); sparse dense steps %0d vs dense %0d",
             t1 - t0, exp_total, exp_steps[2], 16 * 16);
    hread(20'h00000, d);
    checks++; if (d[1] !== 1'b1 || d[0] !== 1'b0) begin failures++; $display("status %h", d); end

    // compare spike memory words 16..18, 64..90
    for (int w = 0; w < 100; w++) begin
      hread(20'h20000 | 20'(w), d);
      checks++;
      if (d[15:0] !== spk[w]) begin
        failures++; $display("spike word %0d: got %h expected %h", w, d[15:0], spk[w]);
      end
    end
    // compare integer memory results
    for (int w = 16'h2000; w < 16'h2000 + 64; w++) begin
      hread(20'h30000 | 20'(w), d);
      checks++;
      if (d !== {bank[1][w], bank[0][w]}) begin
        failures++; $display("int dword %h: got %h expected %h", w, d, {bank[1][w], bank[0][w]});
      end
    end
    for (int w = 16'h2400; w < 16'h2448; w++) begin
      hread(20'h30000 | 20'(w), d);
      checks++;
      if (d !== {bank[1][w], bank[0][w]}) begin
        failures++; $display("int dword %h: got %h expected %h", w, d, {bank[1][w], bank[0][w]});
      end
    end
    // stack lists written by the device
    for (int k = 0; k < 100; k++) begin
      if (k > 0 && stk[k - 1] == 16'hFFFF) break;
      checks++;
      if (dut.u_stack.mem[k] !== stk[k]) begin
        failures++; $display("stack[%0d] %h expected %h", k, dut.u_stack.mem[k], stk[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
