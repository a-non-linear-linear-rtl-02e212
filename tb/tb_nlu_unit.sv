// Self-checking testbench of nlu_unit.
//
// Drives random control words (any mix of push, sel, mode, acc, mac, sro)
// and operands for several thousand cycles. A reference model keeps CONF and
// the result history; the expected output is the nibble-wise ANF function of
// CONF (coefficient i at CONF[63-i]) for mode 0, or the matrix product with
// CONF (row i at CONF[8i+7:8i]) XORed with the selected history entry when
// acc is set, for mode 1. Each cycle the combinational output is checked
// before the clock edge.
module tb_nlu_unit;
  import nlu_pkg::*;

  logic       clk = 0, rst_n = 0;
  nlu_ctrl_t  ctrl;
  logic [7:0] dinp = '0, dout;
  logic [63:0] conf;
  logic [7:0] fifo [4];
  int checks = 0, failures = 0;
  int n_nl = 0, n_lin = 0, n_acc = 0, n_push = 0, n_mac = 0;

  nlu_unit dut (.clk, .rst_n, .ctrl, .dinp, .dout);

  always #5 clk = ~clk;

  function automatic logic [3:0] ref_nl(input logic [63:0] c, input logic [3:0] x);
    logic [3:0] y = '0;
    for (int j = 0; j < 4; j++)
      for (int k = 0; k < 16; k++)
        if ((k & ~int'(x)) == 0) y[3-j] ^= c[63 - (16*j + k)];
    return y;
  endfunction

  function automatic logic [7:0] ref_lin(input logic [63:0] c, input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = ^(c[8*i +: 8] & x);
    return y;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, lsum;
    ctrl = '0;
    conf = '0;
    for (int i = 0; i < 4; i++) fifo[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      ctrl.push = ($urandom % 3) == 0;
      ctrl.sel  = ($urandom % 2) ? 3'd0 : 3'($urandom);
      ctrl.mode = 1'($urandom);
      ctrl.acc  = 1'($urandom);
      ctrl.mac  = 1'($urandom);
      ctrl.sro  = 2'($urandom);
      dinp      = 8'($urandom);
      #1;
      lsum = ref_lin(conf, dinp) ^ (ctrl.acc ? fifo[ctrl.sro] : 8'h00);
      exp  = ctrl.mode ? lsum : {ref_nl(conf, dinp[7:4]), ref_nl(conf, dinp[3:0])};
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL t=%0d ctrl=%p dinp=%h dout=%h exp=%h", t, ctrl, dinp, dout, exp);
      end
      if (ctrl.mode) n_lin++; else n_nl++;
      if (ctrl.mode && ctrl.acc) n_acc++;
      @(posedge clk);
      if (ctrl.push) begin
        n_push++;
        conf = (ctrl.sel == 0) ? {conf[55:0], dinp} : {conf[62:0], dinp[7 - ctrl.sel]};
      end
      if (ctrl.mac) begin
        n_mac++;
        for (int i = 3; i > 0; i--) fifo[i] = fifo[i-1];
        fifo[0] = lsum;
      end
    end
    $display("non-linear %0d, linear %0d, accumulate %0d, loads %0d, shifts %0d",
             n_nl, n_lin, n_acc, n_push, n_mac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
