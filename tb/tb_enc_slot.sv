// tb_enc_slot: streams random-walk samples on all channels and checks the UP/DOWN
// spike bits and the reference tracking against a delta-modulation model, plus
// take (new time step) and clear.
`timescale 1ns/1ps
module tb_enc_slot;
  logic clk = 0, rst_n = 0, clear = 0, take = 0, in_valid = 0;
  logic [15:0] thr = 16'd50;
  logic [3:0] in_ch = 0;
  logic signed [15:0] in_x = 0;
  logic [31:0] spk, exp_spk;
  int ref_lv [16], x [16];
  int checks = 0, failures = 0, nup = 0, ndn = 0;

  always #5 clk = ~clk;
  enc_slot dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin ref_lv[c] = 0; x[c] = 0; end
    exp_spk = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int step = 0; step < 300; step++) begin
      for (int c = 0; c < 16; c++) begin
        x[c] += int'($urandom % 161) - 80;
        @(negedge clk); in_valid = 1; in_ch = 4'(c); in_x = 16'(x[c]); take = (c == 0);
        if (take) exp_spk = 0;
        if (x[c] - ref_lv[c] >= int'(thr)) begin ref_lv[c] += int'(thr); exp_spk[2*c] = 1; nup++; end
        else if (ref_lv[c] - x[c] >= int'(thr)) begin ref_lv[c] -= int'(thr); exp_spk[2*c+1] = 1; ndn++; end
      end
      @(negedge clk); in_valid = 0; take = 0;
      checks++;
      if (spk !== exp_spk) begin failures++; $display("step %0d spikes %h expected %h", step, spk, exp_spk); end
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (spk !== 0) begin failures++; $display("clear did not empty the spikes"); end
    checks++;
    if (nup == 0 || ndn == 0) begin failures++; $display("no UP or DOWN spikes seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
