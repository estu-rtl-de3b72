// tb_estu_stack: pushes two pointer lists at different bases and reads them back,
// checking the entries, the push count and the one-cycle read latency.
`timescale 1ns/1ps
module tb_estu_stack;
  import estu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic re = 0, push_start = 0, push = 0;
  logic [STK_AW-1:0] raddr = 0, wbase = 0, count;
  logic [STK_W-1:0] q, pdata = 0;
  logic [15:0] exp_list [2][64];
  int len [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  estu_stack dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int base [2];
    base[0] = 0; base[1] = 2000;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int l = 0; l < 2; l++) begin
      len[l] = 10 + $urandom % 40;
      @(negedge clk); push_start = 1; wbase = 12'(base[l]);
      @(negedge clk); push_start = 0;
      for (int k = 0; k < len[l]; k++) begin
        exp_list[l][k] = (k == len[l] - 1) ? STK_END : 16'($urandom % 8192);
        @(negedge clk); push = 1; pdata = exp_list[l][k];
        @(negedge clk); push = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
      checks++;
      if (count != 12'(len[l])) begin failures++; $display("count %0d expected %0d", count, len[l]); end
    end
    for (int l = 0; l < 2; l++)
      for (int k = 0; k < len[l]; k++) begin
        @(negedge clk); re = 1; raddr = 12'(base[l] + k);
        @(negedge clk); re = 0;
        checks++;
        if (q !== exp_list[l][k]) begin failures++; $display("list %0d entry %0d: %h vs %h", l, k, q, exp_list[l][k]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
