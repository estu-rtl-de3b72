// estu_pkg: types and constants shared by the ESTU spiking-transformer engine.
//
// The engine is programmed with 169-bit microcode instructions. The total width and
// the kinds of field (opcode, source and destination addresses, sizes, stack
// addresses, LIF parameters) follow the published architecture; the order and width
// of each field below are this design's own choice. The operator set matches the
// published throughput table: Dense(spike), Dense(int), Sum(spike,spike),
// Sum(spike,int), Mul(spike,spike), Mul(spike,int) and LIF. CLRPOT (clear membrane
// potentials) and END (halt) are added by this design.
//
// Address conventions used by every module:
//   spike memory : 2048 words of 16 bits, word w lives in bank w[1:0], row w[10:2];
//                  a spike bit address is {word, bit[3:0]} (15 bits); a group of four
//                  spikes is addressed by bit_address >> 2 (13 bits).
//   integer mem  : two 16-bit banks of 16K words. A byte address b selects
//                  word b[15:2], bank b[1] and byte lane b[0]; a 32-bit "double word"
//                  at word address a is bank0[a] (bytes 0,1) and bank1[a] (bytes 2,3).
package estu_pkg;

  localparam int INSTR_W    = 169;
  localparam int SPK_WORDS  = 2048;   // 32 Kb spike memory
  localparam int SPK_AW     = 11;     // spike word address width
  localparam int SPK_BAW    = 15;     // spike bit address width
  localparam int INT_AW     = 14;     // integer memory word address width (per bank)
  localparam int INT_BYW    = 16;     // integer memory byte address width
  localparam int POT_N      = 768;    // LIF neurons held in the potential memory
  localparam int POT_AW     = 10;
  localparam int V_W        = 20;     // membrane potential width
  localparam int ACC_W      = 20;     // accumulator width
  localparam int STK_AW     = 12;
  localparam int STK_W      = 16;
  localparam logic [STK_W-1:0] STK_END = '1;  // list terminator in the stack memory

  typedef enum logic [3:0] {
    OP_END     = 4'd0,
    OP_DENSE_S = 4'd1,   // Dense(spike):  spikes x int8 weights, 4 pairs/cycle, LIF out
    OP_DENSE_I = 4'd2,   // Dense(int):    int8 x int8, 2 pairs/cycle, LIF out
    OP_SUM_SS  = 4'd3,   // Sum(spike,spike): 2 elements/cycle, int8 out
    OP_SUM_SI  = 4'd4,   // Sum(spike,int):   2 elements/cycle, int8 out
    OP_MUL_SS  = 4'd5,   // Mul(spike,spike): 16 pairs/cycle, LIF bypassed, int8 out
    OP_MUL_SI  = 4'd6,   // Mul(spike,int):   4 pairs/cycle, LIF out
    OP_LIF     = 4'd7,   // LIF on int8 currents, 1 neuron/cycle
    OP_CLRPOT  = 4'd8    // clear potentials, 1 neuron/cycle
  } opcode_e;

  // 169-bit microcode instruction (first field is the most significant).
  typedef struct packed {
    opcode_e               op;         //  4
    logic [SPK_BAW-1:0]    src_a;      // 15 spike bit address of operand A
    logic [SPK_BAW-1:0]    src_b;      // 15 spike bit address of operand B (Dense(int): bank-1 word address)
    logic [15:0]           src_i;      // 16 integer address (double-word address or byte address)
    logic [15:0]           dst;        // 16 spike bit address or integer byte address
    logic [9:0]            n_rows;     // 10 output rows (elements for Sum/LIF/CLRPOT)
    logic [9:0]            n_cols;     // 10 output columns (Mul operators)
    logic [9:0]            n_len;      // 10 inner length in steps (groups or words)
    logic [POT_AW-1:0]     pot_base;   // 10 first potential used
    logic [STK_AW-1:0]     stk_rd;     // 12 stack list read by Dense(spike)
    logic [STK_AW-1:0]     stk_wr;     // 12 stack list written by spike outputs
    logic                  use_stack;  //  1 iterate Dense(spike) over the stack list
    logic                  push_stack; //  1 record active output groups
    logic signed [V_W-1:0] vth;        // 20 firing threshold
    logic [3:0]            leak;       //  4 leak shift, v -= v >>> leak (0: no leak)
    logic                  rst_sub;    //  1 reset by subtraction (1) or to zero (0)
    logic signed [7:0]     spk_val;    //  8 integer value of one spike in Sum operators
    logic [3:0]            shift;      //  4 arithmetic right shift of the accumulated sum
  } instr_t;

  // Operand bundle from the interconnect to the processing elements.
  typedef struct packed {
    logic [3:0]        spk4;     // four spikes (nibble or 4-bank gather)
    logic [3:0][7:0]   int4;     // four int8 values (bank0 lo,hi, bank1 lo,hi)
    logic [15:0]       wa;       // spike word A
    logic [15:0]       wb;       // spike word B
    logic [1:0][7:0]   x2;       // two int8 activations
    logic [1:0][7:0]   w2;       // two int8 weights
    logic [1:0]        sa2;      // two spikes of operand A
    logic [1:0]        sb2;      // two spikes of operand B
  } operands_t;

  function automatic logic signed [7:0] sat8(input logic signed [ACC_W-1:0] v);
    if (v > 127) return 8'sd127;
    else if (v < -128) return -8'sd128;
    else return v[7:0];
  endfunction

endpackage
