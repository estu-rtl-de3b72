// tb_pwr_timer: models the high-frequency oscillator as a clock that runs only while
// hf_osc_en is high, requests stand-by, and checks that the oscillator stops, that
// it restarts after the programmed number of low-frequency periods (within the
// synchroniser delay), and that woke is reported and cleared by the handshake.
`timescale 1ns/1ps
module tb_pwr_timer;
  logic clk = 0, lf_clk = 0, rst_n = 0;
  logic reg_we = 0, reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic hf_osc_en;
  int checks = 0, failures = 0;
  int lf_ticks = 0;

  // gated HF oscillator model (10 ns) and LF oscillator (1 us)
  always #5 clk = hf_osc_en ? ~clk : 1'b0;
  always #500 lf_clk = ~lf_clk;
  always @(posedge lf_clk) lf_ticks++;

  pwr_timer dut (.*);

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(logic a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  initial begin
    int t_off, t_on;
    #20 rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      int delay;
      delay = 5 + round * 7;
      wr(1, 32'(delay));
      wr(0, 32'h1);
      wait (!hf_osc_en); t_off = lf_ticks;
      checks++;  // clock really stopped
      begin
        int c0; c0 = 0;
        fork
          begin @(posedge clk); c0 = 1; end
          begin repeat (3) @(posedge lf_clk); end
        join_any
        disable fork;
        if (c0 && !hf_osc_en) begin failures++; $display("clock ran in stand-by"); end
      end
      wait (hf_osc_en); t_on = lf_ticks;
      checks++;
      if (t_on - t_off < delay - 1 || t_on - t_off > delay + 1) begin
        failures++; $display("round %0d: off for %0d LF ticks, expected %0d", round, t_on - t_off, delay);
      end
      repeat (3) @(posedge lf_clk);
      @(negedge clk); reg_addr = 0; #1;
      checks++;
      if (reg_rdata[1:0] !== 2'b11) begin failures++; $display("status %b after wake", reg_rdata[1:0]); end
      wr(0, 32'h0);
      repeat (4) @(posedge lf_clk);
      @(negedge clk); reg_addr = 0; #1;
      checks++;
      if (reg_rdata[1:0] !== 2'b00 || !hf_osc_en) begin failures++; $display("not back to idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
