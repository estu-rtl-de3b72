// estu_pe: processing elements of the ESTU engine.
//
// One step of every operator, plus the accumulator:
//   - two signed multipliers (16x16, fed with sign-extended int8) for Dense(int),
//     2 pairs per cycle;
//   - a 16-wide logic-AND array and a 16-input population counter for
//     Mul(spike,spike), 16 pairs per cycle;
//   - spike-gated adders summing four int8 values for Dense(spike) and
//     Mul(spike,int), 4 pairs per cycle (a spike selects the value, no multiply);
//   - two lanes of adders for Sum(spike,spike) and Sum(spike,int), 2 elements/cycle;
//   - a 20-bit two-input accumulator: acc_next = (first ? 0 : acc) + partial, stored
//     when en is high.
// The unit mix and the 16/20-bit sizes follow the published block diagram and
// throughput table; everything else is this design's own. partial, acc_next and sum2
// are combinational; acc is registered.
module estu_pe
  import estu_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  opcode_e                 op,
  input  operands_t               opnd,
  input  logic signed [7:0]       spk_val,
  input  logic                    en,
  input  logic                    first,
  output logic signed [ACC_W-1:0] partial,
  output logic signed [ACC_W-1:0] acc_next,
  output logic signed [ACC_W-1:0] acc,
  output logic signed [1:0][9:0]  sum2
);
  logic signed [15:0] ma0, ma1, mb0, mb1;
  logic signed [31:0] p0, p1;
  logic [15:0]        and16;
  logic [4:0]         pop;
  logic signed [ACC_W-1:0] gsum;

  always_comb begin
    // multipliers
    ma0 = 16'(signed'(opnd.x2[0])); mb0 = 16'(signed'(opnd.w2[0]));
    ma1 = 16'(signed'(opnd.x2[1])); mb1 = 16'(signed'(opnd.w2[1]));
    p0  = ma0 * mb0;
    p1  = ma1 * mb1;
    // AND array and pop count
    and16 = opnd.wa & opnd.wb;
    pop   = '0;
    for (int i = 0; i < 16; i++) pop = pop + 5'(and16[i]);
    // spike-gated adders
    gsum = '0;
    for (int l = 0; l < 4; l++)
      if (opnd.spk4[l]) gsum = gsum + ACC_W'(signed'(opnd.int4[l]));
    // two-lane element adders
    for (int k = 0; k < 2; k++) begin
      case (op)
        OP_SUM_SS: sum2[k] = (opnd.sa2[k] ? 10'(spk_val) : 10'sd0) + (opnd.sb2[k] ? 10'(spk_val) : 10'sd0);
        default:   sum2[k] = (opnd.sa2[k] ? 10'(spk_val) : 10'sd0) + 10'(signed'(opnd.x2[k]));
      endcase
    end
    case (op)
      OP_DENSE_S, OP_MUL_SI: partial = gsum;
      OP_DENSE_I:            partial = ACC_W'(p0 + p1);
      OP_MUL_SS:             partial = ACC_W'(pop);
      OP_LIF:                partial = ACC_W'(signed'(opnd.x2[0]));
      default:               partial = '0;
    endcase
    acc_next = (first ? '0 : acc) + partial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
