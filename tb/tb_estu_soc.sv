// tb_estu_soc: end-to-end test of the ESTU system at its default sizes.
//
// The testbench plays the control CPU on the bus and models the SPI sensor link,
// the UART and the two oscillators (the high-frequency clock runs only while
// hf_osc_en is high). It runs three inference windows of four time steps of a small
// spiking transformer: 16 sensor channels are read over SPI, delta-encoded into 32
// spikes per step, copied into the engine, and a 25-instruction program computes
// embedding (Dense(spike)), Q/K/V projections (sparse Dense(spike) over the stack
// lists), Q*K^T (Mul(spike,spike), LIF bypassed), scores*V (Mul(spike,int)), a
// residual Sum(spike,spike), a LIF layer, a sparse classifier, plus a Dense(int) on
// an attention-input block and a Sum(spike,int). Every memory result is compared
// with the reference model; the class spikes go to the decoding slot, whose class
// is checked and sent to the UART. Finally the system enters stand-by and is woken
// by the timer. Each mechanism (every operator, sparse list walks, stack pushes,
// LIF bypass, spikes, encoder UP/DOWN, stand-by and wake-up) is counted and must
// occur at least once.
`timescale 1ns/1ps
module tb_estu_soc;
  import estu_pkg::*;
  import estu_ref_pkg::*;

  logic clk = 0, lf_clk = 0, rst_n = 0;
  logic wb_cyc = 0, wb_we = 0, wb_ack;
  logic [31:0] wb_adr = 0, wb_dat_w = 0, wb_dat_r;
  logic [3:0] wb_sel = 4'hF;
  logic hf_osc_en;
  logic spi_cyc, spi_we, uart_cyc, uart_we;
  logic [7:0] spi_adr, uart_adr;
  logic [31:0] spi_dat_w, uart_dat_w, spi_dat_r, uart_dat_r;
  logic spi_ack = 0, uart_ack = 0;
  logic estu_busy, estu_done;

  int checks = 0, failures = 0;

  always #5 clk = hf_osc_en ? ~clk : 1'b0;
  always #250 lf_clk = ~lf_clk;

  estu_soc dut (.*);

  initial begin
    #100_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- peripheral models -----------------
  int sensor [16];
  int n_spi = 0, n_uart = 0, uart_last = -1;
  always @(posedge clk) begin
    spi_ack  <= spi_cyc && !spi_ack;
    uart_ack <= uart_cyc && !uart_ack;
    if (spi_cyc && !spi_ack) begin
      int ch; ch = spi_adr[5:2];
      sensor[ch] += int'($urandom % 241) - 120;
      spi_dat_r <= 32'(sensor[ch]);
      n_spi++;
    end
    if (uart_cyc && !uart_ack && uart_we) begin uart_last = uart_dat_w; n_uart++; end
  end
  assign uart_dat_r = 32'h0;

  // ---------------- bus master -----------------
  task automatic wbw(logic [31:0] a, logic [31:0] d);
    @(negedge clk); wb_cyc = 1; wb_we = 1; wb_adr = a; wb_dat_w = d;
    do @(negedge clk); while (!wb_ack);
    wb_cyc = 0; wb_we = 0;
  endtask
  task automatic wbr(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); wb_cyc = 1; wb_we = 0; wb_adr = a;
    do @(negedge clk); while (!wb_ack);
    d = wb_dat_r; wb_cyc = 0;
  endtask
  function automatic logic [31:0] estu(int word); return 32'h1000_0000 | 32'(word << 2); endfunction

  // ---------------- mechanism counters -----------------
  int n_op [16];
  int n_sparse_end = 0, n_push = 0, n_bypass = 0, n_spikes = 0, n_standby = 0, n_wake = 0;
  int n_up = 0, n_dn = 0;
  always @(posedge clk) begin
    if (dut.u_estu.u_ctrl.state == dut.u_estu.u_ctrl.S_DECODE) n_op[dut.u_estu.u_ctrl.dq.op]++;
    if (dut.u_estu.u_ctrl.s0_end) n_sparse_end++;
    if (dut.u_estu.st_push) n_push++;
    if (dut.u_estu.lif_upd && dut.u_estu.lif_bypass) n_bypass++;
    if (dut.u_estu.sp_we && dut.u_estu.lif_spike && estu_busy) n_spikes++;
  end
  always @(negedge hf_osc_en) n_standby++;
  always @(posedge hf_osc_en) if (rst_n) n_wake++;

  function automatic instr_t mk(opcode_e op);
    instr_t i; i = '0; i.op = op; i.vth = 20'sd40; i.leak = 4'd1; i.spk_val = 8'sd3; return i;
  endfunction

  instr_t prog [25];
  int enc_ref [16];

  initial begin
    logic [31:0] d, spikes, exp32;
    instr_t i;
    int np, thr, cnt [16], best, bi;
    for (int c = 0; c < 16; c++) begin sensor[c] = 0; enc_ref[c] = 0; cnt[c] = 0; end
    for (int k = 0; k < 16; k++) n_op[k] = 0;
    #23 rst_n = 1;

    // ---------------- program -----------------
    np = 0;
    i = mk(OP_CLRPOT); i.n_rows = 400; prog[np++] = i;
    for (int t = 0; t < 4; t++) begin
      i = mk(OP_DENSE_S); i.src_a = 15'(2 * t * 16); i.n_len = 8; i.src_i = 0; i.n_rows = 16;
      i.dst = 16'((8 + t) * 16); i.pot_base = 0; i.push_stack = 1; i.stk_wr = 12'(64 * t); i.vth = 20'sd60;
      prog[np++] = i;
    end
    for (int p = 0; p < 3; p++)       // Q, K, V projections over the sparse lists
      for (int t = 0; t < 4; t++) begin
        i = mk(OP_DENSE_S); i.use_stack = 1; i.stk_rd = 12'(64 * t); i.src_a = 15'((8 + t) * 16);
        i.n_len = 4; i.src_i = 16'(128 + 64 * p); i.n_rows = 16; i.dst = 16'((16 + 4 * p + t) * 16);
        i.pot_base = 10'(16 + 16 * p); i.vth = 20'sd20; prog[np++] = i;
      end
    i = mk(OP_MUL_SS); i.src_a = 16 * 16; i.src_b = 20 * 16; i.n_rows = 4; i.n_cols = 4; i.n_len = 1;
    i.dst = 16'h8000; prog[np++] = i;
    i = mk(OP_MUL_SI); i.src_a = 24 * 16; i.src_i = 16'h2000; i.n_rows = 4; i.n_cols = 16; i.n_len = 1;
    i.dst = 28 * 16; i.pot_base = 64; i.vth = 20'sd3; prog[np++] = i;
    i = mk(OP_SUM_SS); i.src_a = 28 * 16; i.src_b = 16 * 16; i.n_rows = 64; i.dst = 16'h9000;
    i.spk_val = 8'sd2; prog[np++] = i;
    i = mk(OP_LIF); i.src_i = 16'h9000; i.n_rows = 64; i.dst = 32 * 16; i.pot_base = 128; i.vth = 20'sd2;
    i.push_stack = 1; i.stk_wr = 400; prog[np++] = i;
    i = mk(OP_DENSE_S); i.use_stack = 1; i.stk_rd = 400; i.src_a = 32 * 16; i.n_len = 16; i.src_i = 320;
    i.n_rows = 16; i.dst = 36 * 16; i.pot_base = 192; i.vth = 20'sd30; prog[np++] = i;
    i = mk(OP_DENSE_I); i.src_i = 600; i.src_b = 700; i.n_rows = 8; i.n_len = 4; i.dst = 40 * 16;
    i.pot_base = 220; i.shift = 3; i.vth = 20'sd200; prog[np++] = i;
    i = mk(OP_SUM_SI); i.src_a = 36 * 16; i.src_i = 16'h9000; i.n_rows = 16; i.dst = 16'h9200; prog[np++] = i;
    i = mk(OP_END); prog[np++] = i;

    // ---------------- model load (start-up) -----------------
    for (int w = 0; w < 2048; w++) spk[w] = 0;
    for (int w = 0; w < 1024; w++) begin bank[0][w] = 16'($urandom); bank[1][w] = 16'($urandom); end
    for (int w = 1024; w < 16384; w++) begin bank[0][w] = 0; bank[1][w] = 0; end
    for (int w = 0; w < 64; w++) wbw(estu(32'h20000 + w), 32'h0);
    for (int w = 0; w < 1024; w++) wbw(estu(32'h30000 + w), {bank[1][w], bank[0][w]});
    for (int w = 'h2000; w < 'h2500; w++) wbw(estu(32'h30000 + w), 32'h0);
    for (int k = 0; k < np; k++) begin
      logic [191:0] bits; bits = 192'(prog[k]);
      for (int s = 0; s < 6; s++) wbw(estu(32'h10000 + k * 8 + s), bits[32 * s +: 32]);
    end
    thr = 60;
    wbw(32'h2000_0040, 32'(thr));
    wbw(32'h3000_0004, 32'h0);       // clear decoder

    // ---------------- inference windows -----------------
    for (int win = 0; win < 3; win++) begin
      for (int t = 0; t < 4; t++) begin
        exp32 = 0;
        for (int ch = 0; ch < 16; ch++) begin
          wbr(32'h5000_0000 | 32'(ch << 2), d);
          wbw(32'h2000_0000 | 32'(ch << 2), d);
          if (int'(signed'(d[15:0])) - enc_ref[ch] >= thr) begin enc_ref[ch] += thr; exp32[2*ch] = 1; n_up++; end
          else if (enc_ref[ch] - int'(signed'(d[15:0])) >= thr) begin enc_ref[ch] -= thr; exp32[2*ch+1] = 1; n_dn++; end
        end
        wbr(32'h2000_0044, spikes);
        wbw(32'h2000_0044, 32'h0);
        checks++;
        if (spikes !== exp32) begin failures++; $display("encoder: %h expected %h", spikes, exp32); end
        wbw(estu(32'h20000 + 2 * t), {16'h0, spikes[15:0]});
        wbw(estu(32'h20000 + 2 * t + 1), {16'h0, spikes[31:16]});
        spk[2 * t] = spikes[15:0]; spk[2 * t + 1] = spikes[31:16];
      end
      // run the program and the reference
      for (int k = 0; k < np - 1; k++) void'(ref_exec(prog[k]));
      wbw(32'h1000_0000, 32'h1);
      do wbr(32'h1000_0000, d); while (d[1] == 1'b0);
      for (int w = 0; w < 48; w++) begin
        wbr(estu(32'h20000 + w), d);
        checks++;
        if (d[15:0] !== spk[w]) begin failures++; $display("window %0d spike word %0d: %h expected %h", win, w, d[15:0], spk[w]); end
      end
      for (int w = 'h2000; w < 'h2500; w += 'h40)
        for (int k = 0; k < 8; k++) begin
          wbr(estu(32'h30000 + w + k), d);
          checks++;
          if (d !== {bank[1][w + k], bank[0][w + k]}) begin failures++; $display("window %0d int dword %h mismatch", win, w + k); end
        end
      wbw(32'h3000_0000, {16'h0, spk[36]});
      for (int k = 0; k < 16; k++) cnt[k] += spk[36][k];
    end
    // decoded class, sent to the UART
    best = cnt[0]; bi = 0;
    for (int k = 1; k < 16; k++) if (cnt[k] > best) begin best = cnt[k]; bi = k; end
    wbr(32'h3000_0000, d);
    checks++;
    if (d[3:0] !== 4'(bi) || d[31:16] !== 16'(best)) begin failures++; $display("class %0d/%0d expected %0d/%0d", d[3:0], d[31:16], bi, best); end
    wbw(32'h6000_0000, d);
    checks++;
    if (uart_last != int'(d)) begin failures++; $display("UART did not get the class"); end

    // ---------------- stand-by and wake-up -----------------
    wbw(32'h4000_0004, 32'd6);
    wbw(32'h4000_0000, 32'h1);
    wait (!hf_osc_en);
    wait (hf_osc_en);
    do wbr(32'h4000_0000, d); while (d[1] == 1'b0);
    wbw(32'h4000_0000, 32'h0);
    repeat (10) @(posedge lf_clk);

    // ---------------- mechanism coverage -----------------
    begin
      string names [11] = '{"Dense(spike)", "Dense(int)", "Sum(spike,spike)", "Sum(spike,int)", "Mul(spike,spike)",
                            "Mul(spike,int)", "LIF", "CLRPOT", "END", "sparse list walk", "stack push"};
      int counts [11];
      counts = '{n_op[OP_DENSE_S], n_op[OP_DENSE_I], n_op[OP_SUM_SS], n_op[OP_SUM_SI], n_op[OP_MUL_SS],
                 n_op[OP_MUL_SI], n_op[OP_LIF], n_op[OP_CLRPOT], n_op[OP_END], n_sparse_end, n_push};
      for (int k = 0; k < 11; k++) begin
        checks++;
        $display("%-18s %0d", names[k], counts[k]);
        if (counts[k] == 0) begin failures++; $display("  never happened"); end
      end
    end
    $display("LIF bypass %0d, spikes %0d, encoder up/down %0d/%0d, SPI %0d, UART %0d, stand-by %0d, wake %0d",
             n_bypass, n_spikes, n_up, n_dn, n_spi, n_uart, n_standby, n_wake);
    checks++; if (n_bypass == 0) begin failures++; $display("no LIF bypass"); end
    checks++; if (n_spikes == 0) begin failures++; $display("no spikes"); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("encoder never fired both ways"); end
    checks++; if (n_standby == 0 || n_wake == 0) begin failures++; $display("no stand-by/wake"); end
    checks++; if (n_spi == 0 || n_uart == 0) begin failures++; $display("no SPI/UART traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
