// Workload testbench: the eight Serpent S-boxes on the NLU.
//
// Serpent substitutes with eight different 4-bit S-boxes, one per round in
// turn. For each, this testbench derives the 64 ANF coefficients from the
// S-box table (Moebius transform), loads them with eight NLD instructions,
// and substitutes all 256 byte values with NNL. Each result must equal the
// table applied to both nibbles. It also checks that a reload fully
// replaces the previous S-box, by running the boxes in order 0..7 and then
// S-box 0 again.
module tb_nlu_serpent_sbox;
  import nlu_pkg::*;

  logic       clk = 0, rst_n = 0, valid = 0;
  nlu_op_e    op = OP_NLD;
  logic [2:0] field = '0;
  logic [7:0] operand = '0, result;
  logic       result_we;
  int checks = 0, failures = 0, loads = 0, subs = 0;

  nlu_ise dut (.clk, .rst_n, .valid, .op, .field, .operand, .result, .result_we);

  always #5 clk = ~clk;

  // Serpent S-boxes S0..S7, entry x of box b at SB[b][x]
  localparam logic [3:0] SB [8][16] = '{
    '{ 3,  8, 15,  1, 10,  6,  5, 11, 14, 13,  4,  2,  7,  0,  9, 12},
    '{15, 12,  2,  7,  9,  0,  5, 10,  1, 11, 14,  8,  6, 13,  3,  4},
    '{ 8,  6,  7,  9,  3, 12, 10, 15, 13,  1, 14,  4,  0, 11,  5,  2},
    '{ 0, 15, 11,  8, 12,  9,  6,  3, 13,  1,  2,  4, 10,  7,  5, 14},
    '{ 1, 15,  8,  3, 12,  0, 11,  6,  2,  5,  4, 10,  9, 14,  7, 13},
    '{15,  5,  2, 11,  4, 10,  9, 12,  0,  3, 14,  8, 13,  6,  7,  1},
    '{ 7,  2, 12,  5,  8,  4,  6, 11, 14,  9,  1, 15, 13,  3, 10,  0},
    '{ 1, 13, 15,  0, 14,  8,  2, 11,  7,  4, 12, 10,  9,  3,  5,  6}};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input nlu_op_e o, input logic [2:0] f, input logic [7:0] d,
                       output logic [7:0] res);
    @(negedge clk);
    valid = 1; op = o; field = f; operand = d;
    #1 res = result;
    @(posedge clk);
    #1 valid = 0;
  endtask

  // coefficient 16j+k = ANF coefficient of monomial k in output bit 3-j
  function automatic logic [63:0] anf(input int b);
    logic [63:0] c;
    for (int j = 0; j < 4; j++) begin
      logic [15:0] f;
      for (int x = 0; x < 16; x++) f[x] = SB[b][x][3-j];
      for (int v = 0; v < 4; v++)
        for (int x = 0; x < 16; x++)
          if (x[v]) f[x] ^= f[x & ~(1 << v)];
      c[16*j +: 16] = f;
    end
    return c;
  endfunction

  task automatic run_box(input int b);
    logic [63:0] c = anf(b);
    logic [7:0] res;
    for (int q = 0; q < 8; q++) issue(OP_NLD, 3'd0, {<<{c[8*q +: 8]}}, res);
    loads++;
    for (int v = 0; v < 256; v++) begin
      issue(OP_NNL, 3'd0, 8'(v), res);
      subs++;
      checks++;
      if (res !== {SB[b][v[7:4]], SB[b][v[3:0]]}) begin
        failures++;
        if (failures < 20) $display("FAIL S%0d(%h) = %h", b, v[7:0], res);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < 8; b++) run_box(b);
    run_box(0);
    $display("S-box loads %0d, substitutions %0d", loads, subs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
