// Configuration register of the NLU (CONF), loaded by the NLD instruction.
//
// It holds either the 64 ANF coefficients of the non-linear unit or the 8x8
// matrix of the linear unit. NLD shifts it left: with n = 0 (sel = 0) by a
// whole byte, the immediate K entering at the least significant end
// ("CONF <- CONF << K"); with n > 0 by one bit, inserting the single bit
// K[7-n] ("CONF <- CONF << K[MSB-n]"). Reading the n > 0 case as a one-bit
// shift is this design's interpretation of the instruction description. The
// asynchronous active-low reset that clears the register is also this
// design's choice.
//
// Interface: push enables the shift, sel is n, din is K, conf the contents.
// Timing: conf changes on the rising clock edge after push.
module nlu_conf_reg #(
  parameter int unsigned CONF_W = 64,
  parameter int unsigned DW     = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic [$clog2(DW)-1:0] sel,
  input  logic [DW-1:0]         din,
  output logic [CONF_W-1:0]     conf
);

  localparam logic [$clog2(DW)-1:0] MSB = $clog2(DW)'(DW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conf <= '0;
    end else if (push) begin
      if (sel == '0) begin
        conf <= {conf[CONF_W-DW-1:0], din};
      end else begin
        conf <= {conf[CONF_W-2:0], din[MSB - sel]};
      end
    end
  end

endmodule
