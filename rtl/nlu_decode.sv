// Instruction decoder of the NLU.
//
// Turns one of the four NLU instructions into the datapath controls:
//   NLD n, K       push = 1, sel = n                     (load CONF)
//   NNL Rd, Rs     mode = 0                              (Rd <- ANF[Rs])
//   NMU Rd, Rs     mode = 1, acc = 0, mac = 1            (Rd <- M x Rs)
//   NMA s, Rd, Rs  mode = 1, acc = 1, mac = 1, sro = s-1 (Rd <- M x Rs + FIFO(s))
// wr_rd tells the host that Rd is written (all but NLD). With valid low
// nothing is pushed or shifted. The instruction semantics are the published
// ones; the opcode encoding (nlu_op_e) and the valid/wr_rd handshake are this
// design's own. s must lie in 1..4; an assertion checks it.
//
// Interface: valid, op, field (n of NLD or s of NMA), ctrl, wr_rd.
// Timing: purely combinational.
module nlu_decode
  import nlu_pkg::*;
(
  input  logic      valid,
  input  nlu_op_e   op,
  input  logic [2:0] field,
  output nlu_ctrl_t ctrl,
  output logic      wr_rd
);

  always_comb begin
    ctrl  = '0;
    wr_rd = 1'b0;
    unique case (op)
      OP_NLD: begin
        ctrl.push = valid;
        ctrl.sel  = field;
      end
      OP_NNL: begin
        ctrl.mode = 1'b0;
        wr_rd     = valid;
      end
      OP_NMU: begin
        ctrl.mode = 1'b1;
        ctrl.mac  = valid;
        wr_rd     = valid;
      end
      OP_NMA: begin
        ctrl.mode = 1'b1;
        ctrl.acc  = 1'b1;
        ctrl.mac  = valid;
        ctrl.sro  = 2'(field - 3'd1);
        wr_rd     = valid;
      end
    endcase
  end

  // FIFO(s) exists for s = 1..4 only.
  always_comb begin
    if (valid && op == OP_NMA) begin
      assert (field >= 3'd1 && field <= 3'(FIFO_DEPTH))
        else $error("NMA with s=%0d outside 1..%0d", field, FIFO_DEPTH);
    end
  end

endmodule
