// tb_dec_slot: feeds random output spike trains with a biased winner and checks the
// per-class counting, the arg-max (lowest index on ties) and clear.
`timescale 1ns/1ps
module tb_dec_slot;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [15:0] in_spk = 0;
  logic [3:0] cls;
  logic [15:0] cnt_max;
  int cnt [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dec_slot dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int win, best, bi;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int inf = 0; inf < 40; inf++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int k = 0; k < 16; k++) cnt[k] = 0;
      win = $urandom % 16;
      for (int t = 0; t < 50 + inf; t++) begin
        @(negedge clk); in_valid = 1;
        in_spk = 16'($urandom) & 16'($urandom);
        if ($urandom % 2) in_spk[win] = 1;
        for (int k = 0; k < 16; k++) cnt[k] += in_spk[k];
      end
      @(negedge clk); in_valid = 0;
      best = cnt[0]; bi = 0;
      for (int k = 1; k < 16; k++) if (cnt[k] > best) begin best = cnt[k]; bi = k; end
      checks++;
      if (cls != 4'(bi) || cnt_max != 16'(best)) begin
        failures++; $display("inference %0d: class %0d/%0d expected %0d/%0d", inf, cls, cnt_max, bi, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
