// tb_estu_imem: writes random 169-bit instructions in six 32-bit slices and reads
// them back whole.
`timescale 1ns/1ps
module tb_estu_imem;
  import estu_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [2:0] wslice = 0;
  logic [31:0] wdata = 0;
  logic [INSTR_W-1:0] q;
  logic [191:0] model [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  estu_imem dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int s = 0; s < 6; s++) begin
        @(negedge clk); we = 1; waddr = 6'(a); wslice = 3'(s); wdata = $urandom;
        model[a][32 * s +: 32] = wdata;
      end
    @(negedge clk); we = 0;
    for (int a = 63; a >= 0; a--) begin
      @(negedge clk); re = 1; raddr = 6'(a);
      @(negedge clk); re = 0;
      checks++;
      if (q !== model[a][INSTR_W-1:0]) begin failures++; $display("instr %0d mismatch", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
