// Shared types and constants of the non-linear/linear unit (NLU).
//
// The NLU is an instruction-set extension for an 8-bit processor that speeds
// up the substitution (S-box) and permutation (bit-matrix) layers of
// lightweight block ciphers. This package holds the data widths, the
// instruction opcodes and the bundle of datapath control signals.
//
// The widths (8-bit operand, 64-bit configuration register, four-stage result
// shift register) and the control signal names (push, sel, mode, acc, mac,
// sro) follow the published block diagram of the unit. The opcode encoding is
// this design's own choice: only the mnemonics are given.
package nlu_pkg;

  // Operand width of the host processor.
  localparam int unsigned DW = 8;
  // Configuration register: 64 ANF coefficients or an 8x8 binary matrix.
  localparam int unsigned CONF_W = 64;
  // Stages of the result shift register (FIFO(1) .. FIFO(4)).
  localparam int unsigned FIFO_DEPTH = 4;

  typedef enum logic [1:0] {
    OP_NLD = 2'd0,  // load configuration: CONF <- CONF << K
    OP_NNL = 2'd1,  // non-linear: Rd <- ANF[Rs] nibble-wise
    OP_NMU = 2'd2,  // multiply: Rd <- M x Rs, pushed into the FIFO
    OP_NMA = 2'd3   // multiply-and-add: Rd <- M x Rs + FIFO(s), pushed
  } nlu_op_e;

  // Control inputs of the NLU datapath.
  typedef struct packed {
    logic       push;  // shift the configuration register
    logic [2:0] sel;   // n field of NLD: 0 = shift in a byte, else one bit
    logic       mode;  // output select: 0 non-linear, 1 linear
    logic       acc;   // add the selected FIFO stage to the linear result
    logic       mac;   // shift the linear result into the FIFO
    logic [1:0] sro;   // FIFO stage select, s-1
  } nlu_ctrl_t;

endpackage
