// tb_estu_spike_mem: checks the banked spike memory against a flat array model:
// bit-masked writes, word reads on ports A and B in the same cycle, and the 4-bank
// gather read (bit gbit of four consecutive words), all with one cycle of latency.
`timescale 1ns/1ps
module tb_estu_spike_mem;
  import estu_pkg::*;
  logic clk = 0;
  logic re_a = 0, gather_a = 0, re_b = 0, we = 0;
  logic [SPK_AW-1:0] addr_a = 0, addr_b = 0, addr_w = 0;
  logic [3:0] gbit = 0, gather_q;
  logic [15:0] q_a, q_b, wdata = 0, wmask = 0;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  estu_spike_mem dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] ea, eb; logic [3:0] eg;
    // fill every word
    for (int w = 0; w < 2048; w++) begin
      @(negedge clk); we = 1; addr_w = 11'(w); wdata = 16'($urandom); wmask = 16'hFFFF; model[w] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // random masked write
      we = ($urandom % 2) == 0; addr_w = 11'($urandom); wdata = 16'($urandom); wmask = 16'($urandom);
      re_a = 1; re_b = 1; gather_a = ($urandom % 2) == 0;
      addr_a = 11'($urandom); addr_b = 11'($urandom); gbit = 4'($urandom);
      ea = model[addr_a]; eb = model[addr_b];
      for (int i = 0; i < 4; i++) eg[i] = model[11'(addr_a + 11'(i))][gbit];
      if (we) model[addr_w] = (model[addr_w] & ~wmask) | (wdata & wmask);
      @(negedge clk);
      we = 0; re_a = 0; re_b = 0;
      checks++;
      if (gather_a ? (gather_q !== eg) : (q_a !== ea)) begin
        failures++; $display("port A mismatch addr %0d gather %0d: %h/%h vs %h/%h", addr_a, gather_a, q_a, gather_q, ea, eg);
      end
      checks++;
      if (q_b !== eb) begin failures++; $display("port B mismatch addr %0d: %h vs %h", addr_b, q_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
