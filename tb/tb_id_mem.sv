// tb_id_mem: byte-enabled writes and reads of the CPU memory against an array model.
`timescale 1ns/1ps
module tb_id_mem;
  logic clk = 0, req = 0, we = 0;
  logic [3:0] be = 0;
  logic [9:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  id_mem dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); req = 1; we = 1; be = 4'hF; addr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk); req = 1; addr = 10'($urandom); we = 1'($urandom); be = 4'($urandom); wdata = $urandom;
      if (we) begin
        for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        @(negedge clk); req = 0;
        checks++;
        if (rdata !== model[addr]) begin failures++; $display("addr %0d: %h vs %h", addr, rdata, model[addr]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
