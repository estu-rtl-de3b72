// tb_estu_pe: random operands for every operator; checks the one-step partial
// result (gated sums, two products, AND + pop count, int8 pass), the two Sum lanes
// and the 20-bit accumulator over random sequences with first-step restarts.
`timescale 1ns/1ps
module tb_estu_pe;
  import estu_pkg::*;
  logic clk = 0, rst_n = 0;
  opcode_e op;
  operands_t opnd;
  logic signed [7:0] spk_val;
  logic en = 0, first = 0;
  logic signed [ACC_W-1:0] partial, acc_next, acc;
  logic signed [1:0][9:0] sum2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  estu_pe dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sx(logic [7:0] v); return int'(signed'(v)); endfunction

  initial begin
    opcode_e ops [7] = '{OP_DENSE_S, OP_DENSE_I, OP_SUM_SS, OP_SUM_SI, OP_MUL_SS, OP_MUL_SI, OP_LIF};
    int ep, ea, s0, s1, model_acc;
    logic [19:0] w;
    model_acc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      op = ops[(t / 50) % 7];
      opnd = operands_t'({$urandom, $urandom, $urandom, $urandom});
      spk_val = 8'($urandom);
      en = 1; first = (t % 50 == 0) || ($urandom % 9 == 0);
      ep = 0;
      case (op)
        OP_DENSE_S, OP_MUL_SI: for (int l = 0; l < 4; l++) if (opnd.spk4[l]) ep += sx(opnd.int4[l]);
        OP_DENSE_I: ep = sx(opnd.x2[0]) * sx(opnd.w2[0]) + sx(opnd.x2[1]) * sx(opnd.w2[1]);
        OP_MUL_SS:  for (int b = 0; b < 16; b++) ep += opnd.wa[b] & opnd.wb[b];
        OP_LIF:     ep = sx(opnd.x2[0]);
        default:    ep = 0;
      endcase
      #1;
      checks++;
      if (partial !== ACC_W'(ep)) begin failures++; $display("%s partial %0d expected %0d", op.name(), partial, ep); end
      w = 20'((first ? 0 : model_acc) + ep);
      ea = int'(signed'(w));
      checks++;
      if (acc_next !== ACC_W'(ea)) begin failures++; $display("acc_next %0d expected %0d", acc_next, ea); end
      model_acc = ea;
      for (int k = 0; k < 2; k++) begin
        s0 = opnd.sa2[k] ? int'(spk_val) : 0;
        s1 = (op == OP_SUM_SS) ? (opnd.sb2[k] ? int'(spk_val) : 0) : sx(opnd.x2[k]);
        if (op inside {OP_SUM_SS, OP_SUM_SI}) begin
          checks++;
          if (int'(signed'(sum2[k])) != s0 + s1) begin failures++; $display("sum lane %0d %0d expected %0d", k, signed'(sum2[k]), s0 + s1); end
        end
      end
    end
    @(negedge clk); en = 0;
    @(negedge clk);
    checks++;
    if (acc !== ACC_W'(model_acc)) begin failures++; $display("acc register %0d expected %0d", acc, model_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
