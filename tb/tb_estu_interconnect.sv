// tb_estu_interconnect: drives random memory words and selection fields for every
// operator and checks each operand the interconnect forms against bit-level
// expectations written out here.
`timescale 1ns/1ps
module tb_estu_interconnect;
  import estu_pkg::*;
  opcode_e op;
  logic [15:0] spk_a, spk_b;
  logic [3:0] gather, pos_a, pos_b;
  logic [1:0][15:0] iword;
  logic [1:0] nib;
  logic ibank, ilane, zero_spk;
  operands_t opnd;
  int checks = 0, failures = 0;

  estu_interconnect dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s mismatch (op %s)", what, op.name()); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    opcode_e ops [7] = '{OP_DENSE_S, OP_DENSE_I, OP_SUM_SS, OP_SUM_SI, OP_MUL_SS, OP_MUL_SI, OP_LIF};
    logic [3:0] e4;
    logic [7:0] e8;
    for (int t = 0; t < 2000; t++) begin
      op = ops[t % 7];
      spk_a = 16'($urandom); spk_b = 16'($urandom); gather = 4'($urandom);
      iword[0] = 16'($urandom); iword[1] = 16'($urandom);
      nib = 2'($urandom); pos_a = 4'($urandom & 14); pos_b = 4'($urandom & 14);
      ibank = 1'($urandom); ilane = 1'($urandom); zero_spk = ($urandom % 4) == 0;
      #1;
      e4 = (op == OP_MUL_SI) ? gather : 4'((spk_a >> (4 * nib)) & 15);
      if (zero_spk) e4 = 0;
      chk(opnd.spk4 == e4, "spk4");
      chk(opnd.int4[0] == iword[0][7:0] && opnd.int4[1] == iword[0][15:8] &&
          opnd.int4[2] == iword[1][7:0] && opnd.int4[3] == iword[1][15:8], "int4");
      chk(opnd.wa == spk_a && opnd.wb == spk_b, "words");
      chk(opnd.sa2[0] == spk_a[pos_a] && opnd.sa2[1] == spk_a[pos_a + 1], "sa2");
      chk(opnd.sb2[0] == spk_b[pos_b] && opnd.sb2[1] == spk_b[pos_b + 1], "sb2");
      chk(opnd.w2[0] == iword[0][7:0] && opnd.w2[1] == iword[0][15:8], "w2");
      if (op == OP_DENSE_I)
        chk(opnd.x2[0] == iword[1][7:0] && opnd.x2[1] == iword[1][15:8], "x2 dense");
      else if (op == OP_LIF) begin
        e8 = ilane ? iword[ibank][15:8] : iword[ibank][7:0];
        chk(opnd.x2[0] == e8, "x2 lif");
      end else
        chk(opnd.x2[0] == iword[ibank][7:0] && opnd.x2[1] == iword[ibank][15:8], "x2 sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
