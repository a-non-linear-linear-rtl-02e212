// NLU datapath: configuration register, non-linear unit, linear unit and
// result shift register.
//
// The 8-bit operand dinp feeds both function units. The non-linear unit
// evaluates the ANF S-box held in CONF on each nibble; the linear unit
// multiplies dinp by the 8x8 binary matrix held in CONF. The linear result is
// XORed with one stage of the result shift register (acc = 1, stage chosen by
// sro) or with zero (acc = 0); that sum is the multiply(-and-add) result and,
// when mac = 1, is shifted into the register. mode selects the output: 0 the
// non-linear result, 1 the linear sum. push and sel load CONF.
//
// The structure and signal names follow the published block diagram. Two
// wirings are derived from the published cipher code rather than printed:
// the non-linear unit's coefficient i is CONF[63-i] (the first byte loaded by
// NLD holds coefficients 0..7), and the linear unit's row for output bit i is
// CONF[8i+7:8i] (the first byte loaded holds the row for bit 7).
//
// Interface: clk, rst_n (asynchronous, active low), ctrl (nlu_ctrl_t),
// dinp, dout.
// Timing: dout is combinational from dinp, ctrl and the registers, so every
// instruction completes in one cycle; CONF and the shift register update on
// the rising edge.
module nlu_unit
  import nlu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  nlu_ctrl_t       ctrl,
  input  logic [DW-1:0]   dinp,
  output logic [DW-1:0]   dout
);

  logic [CONF_W-1:0] conf;
  logic [CONF_W-1:0] anf_coef;
  logic [DW-1:0]     nl_out;
  logic [DW-1:0]     lin_out;
  logic [DW-1:0]     fifo_tap;
  logic [DW-1:0]     lin_sum;

  nlu_conf_reg #(
    .CONF_W (CONF_W),
    .DW     (DW)
  ) u_conf (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (ctrl.push),
    .sel   (ctrl.sel),
    .din   (dinp),
    .conf  (conf)
  );

  // Coefficient m_i of the non-linear unit sits at CONF[63-i].
  always_comb begin
    for (int i = 0; i < int'(CONF_W); i++) anf_coef[i] = conf[CONF_W-1-i];
  end

  nlu_nonlinear #(
    .NIBBLES (DW / 4)
  ) u_nonlinear (
    .m    (anf_coef),
    .din  (dinp),
    .dout (nl_out)
  );

  nlu_linear #(
    .W (DW)
  ) u_linear (
    .m    (conf),
    .din  (dinp),
    .dout (lin_out)
  );

  assign lin_sum = lin_out ^ (ctrl.acc ? fifo_tap : '0);

  nlu_shift_fifo #(
    .DEPTH (FIFO_DEPTH),
    .W     (DW)
  ) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (ctrl.mac),
    .din   (lin_sum),
    .sro   (ctrl.sro),
    .tap   (fifo_tap)
  );

  assign dout = ctrl.mode ? lin_sum : nl_out;

endmodule
