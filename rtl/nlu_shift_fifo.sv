// Result shift register of the NLU (the FIFO of NMU and NMA).
//
// DEPTH stages of W bits. When shift (the unit's mac signal) is high, din
// enters stage 0 and every stage moves one place on; otherwise every stage
// holds its value. tap returns stage sro, so sro = s-1 gives FIFO(s), the
// result pushed s operations ago. Stage count, the hold/shift multiplexer in
// front of each stage and the tap multiplexer follow the published diagram;
// the reset that clears the stages is this design's choice.
//
// Interface: shift, din, sro, tap.
// Timing: stages change on the rising clock edge; tap is combinational from
// the stages and sro.
module nlu_shift_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift,
  input  logic [W-1:0]             din,
  input  logic [$clog2(DEPTH)-1:0] sro,
  output logic [W-1:0]             tap
);

  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else if (shift) begin
      stage[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign tap = stage[sro];

endmodule
