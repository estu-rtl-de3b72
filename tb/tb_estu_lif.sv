// tb_estu_lif: random LIF updates on a small set of neurons with the read in one
// cycle and the update in the next, as the engine uses the module; checks spikes,
// new potentials (leak, saturation, both reset modes), the bypass path and clears.
`timescale 1ns/1ps
module tb_estu_lif;
  import estu_pkg::*;
  logic clk = 0;
  logic rd_en = 0, upd = 0, bypass = 0, clr = 0, rst_sub = 0;
  logic [POT_AW-1:0] rd_addr = 0, wr_addr = 0;
  logic signed [ACC_W-1:0] cur = 0;
  logic signed [V_W-1:0] vth = 0, v_new;
  logic [3:0] leak = 0;
  logic spike;
  logic signed [7:0] int_out;
  int model [768];
  int checks = 0, failures = 0, nspk = 0;

  always #5 clk = ~clk;
  estu_lif dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, v, vl, vs, ev, c; logic es;
    for (int k = 0; k < 768; k++) begin
      @(negedge clk); clr = 1; wr_addr = 10'(k); model[k] = 0;
    end
    @(negedge clk); clr = 0;
    for (int t = 0; t < 5000; t++) begin
      n = $urandom % 32 + (t % 2) * 700;
      @(negedge clk); rd_en = 1; rd_addr = 10'(n); upd = 0;
      @(negedge clk); rd_en = 0;
      upd = 1; wr_addr = 10'(n); bypass = ($urandom % 8) == 0;
      c = ($urandom % 2) ? int'($urandom % 400) - 150 : int'($urandom % 600000) - 300000;
      cur = ACC_W'(c); vth = V_W'($urandom % 900 + 1); leak = 4'($urandom % 4); rst_sub = 1'($urandom);
      v = model[n];
      vl = (leak == 0) ? v : v - (v >>> leak);
      vs = vl + c;
      if (vs > 524287) vs = 524287; if (vs < -524288) vs = -524288;
      es = !bypass && vs >= int'(vth);
      ev = es ? (rst_sub ? vs - int'(vth) : 0) : vs;
      #1;
      checks++;
      if (spike !== es) begin failures++; $display("t%0d spike %0d expected %0d", t, spike, es); end
      if (!bypass) begin
        checks++;
        if (v_new !== V_W'(ev)) begin failures++; $display("t%0d v_new %0d expected %0d", t, v_new, ev); end
        model[n] = ev;
      end else begin
        checks++;
        if (int_out !== 8'(c > 127 ? 127 : (c < -128 ? -128 : c))) begin failures++; $display("bypass %0d for %0d", int_out, c); end
      end
      if (es) nspk++;
    end
    @(negedge clk); upd = 0;
    checks++;
    if (nspk == 0) begin failures++; $display("no spike produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
