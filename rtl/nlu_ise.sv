// NLU instruction-set extension: decoder plus datapath.
//
// Each cycle the host processor may issue one NLU instruction (valid, op,
// field) with its operand: the immediate K for NLD, the source register Rs
// otherwise. result is the value for the destination register Rd and
// result_we says whether Rd is written. Loading an S-box takes eight NLD
// instructions (64 coefficients), after which each NNL substitutes two
// nibbles; loading a matrix takes up to eight NLD, after which NMU and NMA
// compute bit permutations and mixing layers byte by byte, accumulating
// partial products through the four-stage result register.
//
// The processor itself is not part of this design; this top takes an
// instruction that the processor has already fetched and decoded.
//
// Interface: clk, rst_n (asynchronous, active low), valid, op, field,
// operand, result, result_we.
// Timing: result is combinational in the cycle the instruction is issued
// (single-cycle instructions); state updates on the rising edge.
module nlu_ise
  import nlu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  nlu_op_e       op,
  input  logic [2:0]    field,
  input  logic [DW-1:0] operand,
  output logic [DW-1:0] result,
  output logic          result_we
);

  nlu_ctrl_t ctrl;

  nlu_decode u_decode (
    .valid (valid),
    .op    (op),
    .field (field),
    .ctrl  (ctrl),
    .wr_rd (result_we)
  );

  nlu_unit u_unit (
    .clk   (clk),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .dinp  (operand),
    .dout  (result)
  );

endmodule
