// estu_interconnect: configurable interconnect between the ESTU memories and the
// processing elements.
//
// Purely combinational. It takes the words the spike and integer memories return
// in pipeline stage S1 and forms the operand bundle of the operator at hand:
//   Dense(spike)    : a 4-spike nibble of spike word A with the 32-bit weight
//                     double word (bank0 lo,hi, bank1 lo,hi);
//   Mul(spike,int)  : the 4-bank gather of port A with the 32-bit score double word;
//   Dense(int)      : two int8 weights from bank 0 and two int8 inputs from bank 1;
//   Mul(spike,spike): whole 16-bit words of ports A and B;
//   Sum(spike,*)    : two adjacent spikes of A (and B) and two int8 values of the
//                     selected bank;
//   LIF             : one int8 value of the selected bank and lane.
// zero_spk clears the spikes (used for the closing step of a sparse list). Which
// paths exist follows the published data-flow figure; the exact selection fields are
// this design's own.
module estu_interconnect
  import estu_pkg::*;
(
  input  opcode_e         op,
  input  logic [15:0]     spk_a,
  input  logic [15:0]     spk_b,
  input  logic [3:0]      gather,
  input  logic [1:0][15:0] iword,
  input  logic [1:0]      nib,      // nibble of spk_a for Dense(spike)
  input  logic [3:0]      pos_a,    // bit position of the spike pair in spk_a
  input  logic [3:0]      pos_b,    // bit position of the spike pair in spk_b
  input  logic            ibank,    // integer bank for Sum(spike,int) and LIF
  input  logic            ilane,    // byte lane for LIF
  input  logic            zero_spk,
  output operands_t       opnd
);
  logic [15:0] isel;
  logic [3:0]  s4;

  always_comb begin
    isel = iword[ibank];
    s4   = (op == OP_MUL_SI) ? gather : spk_a[4*nib +: 4];
    opnd.spk4    = zero_spk ? 4'b0 : s4;
    opnd.int4    = {iword[1][15:8], iword[1][7:0], iword[0][15:8], iword[0][7:0]};
    opnd.wa      = spk_a;
    opnd.wb      = spk_b;
    opnd.w2      = {iword[0][15:8], iword[0][7:0]};
    if (op == OP_DENSE_I)  opnd.x2 = {iword[1][15:8], iword[1][7:0]};
    else if (op == OP_LIF) opnd.x2 = {8'h00, ilane ? isel[15:8] : isel[7:0]};
    else                   opnd.x2 = {isel[15:8], isel[7:0]};
    opnd.sa2     = {spk_a[4'(pos_a + 4'd1)], spk_a[pos_a]};
    opnd.sb2     = {spk_b[4'(pos_b + 4'd1)], spk_b[pos_b]};
  end

endmodule
