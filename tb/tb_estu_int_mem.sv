// tb_estu_int_mem: checks the two-bank integer memory: byte-masked writes and
// independent reads of both banks, one cycle of read latency, against an array model.
`timescale 1ns/1ps
module tb_estu_int_mem;
  import estu_pkg::*;
  logic clk = 0;
  logic [1:0] re = 0, we = 0;
  logic [1:0][INT_AW-1:0] raddr = '0, waddr = '0;
  logic [1:0][15:0] q, wdata = '0;
  logic [1:0][1:0] wbe = '0;
  logic [15:0] model [2][1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  estu_int_mem dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0][15:0] e;
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk); we = 2'b11; waddr = {2{14'(w)}}; wbe = '1;
      wdata[0] = 16'($urandom); wdata[1] = 16'($urandom);
      model[0][w] = wdata[0]; model[1][w] = wdata[1];
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int b = 0; b < 2; b++) begin
        we[b] = 1'($urandom); waddr[b] = 14'($urandom % 1024); wdata[b] = 16'($urandom); wbe[b] = 2'($urandom);
        re[b] = 1; raddr[b] = 14'($urandom % 1024);
        e[b] = model[b][raddr[b]];
      end
      for (int b = 0; b < 2; b++) if (we[b]) begin
        if (wbe[b][0]) model[b][waddr[b]][7:0]  = wdata[b][7:0];
        if (wbe[b][1]) model[b][waddr[b]][15:8] = wdata[b][15:8];
      end
      @(negedge clk); we = 0; re = 0;
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (q[b] !== e[b]) begin failures++; $display("bank %0d addr %0d: %h vs %h", b, raddr[b], q[b], e[b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
