// Workload testbench: CLEFIA's diffusion matrices M0 and M1 on the NLU.
//
// CLEFIA mixes four bytes with y = M x over GF(2^8), reduction polynomial
// z^8+z^4+z^3+z^2+1 (0x11D), where
//   M0 = had(1, 2, 4, 6) and M1 = had(1, 8, 2, A), i.e. M[r][c] = h[r ^ c].
// Since the constant depends only on r ^ c, step t uses one constant h[t]
// for all four outputs: load its 8x8 binary matrix, then
// out_r += h[t] * x[r ^ t] for r = 0..3, as NMU (t = 0) or NMA 4 (t > 0).
// Results are compared with a software GF(2^8) reference for random inputs.
module tb_nlu_clefia_diffusion;
  import nlu_pkg::*;

  logic       clk = 0, rst_n = 0, valid = 0;
  nlu_op_e    op = OP_NLD;
  logic [2:0] field = '0;
  logic [7:0] operand = '0, result;
  logic       result_we;
  int checks = 0, failures = 0;

  nlu_ise dut (.clk, .rst_n, .valid, .op, .field, .operand, .result, .result_we);

  always #5 clk = ~clk;

  localparam logic [7:0] H0 [4] = '{8'h01, 8'h02, 8'h04, 8'h06};
  localparam logic [7:0] H1 [4] = '{8'h01, 8'h08, 8'h02, 8'h0A};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1D) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [63:0] const_matrix(input logic [7:0] c);
    logic [63:0] mat;
    for (int j = 0; j < 8; j++) begin
      logic [7:0] col = gmul(c, 8'(1 << j));
      for (int i = 0; i < 8; i++) mat[8*i + j] = col[i];
    end
    return mat;
  endfunction

  task automatic issue(input nlu_op_e o, input logic [2:0] f, input logic [7:0] d,
                       output logic [7:0] res);
    @(negedge clk);
    valid = 1; op = o; field = f; operand = d;
    #1 res = result;
    @(posedge clk);
    #1 valid = 0;
  endtask

  task automatic run(input bit m1, input logic [31:0] xin);
    logic [7:0] x [4], o [4], e [4], unused, h;
    for (int r = 0; r < 4; r++) x[r] = xin[31 - 8*r -: 8];
    for (int r = 0; r < 4; r++) begin
      e[r] = '0;
      for (int c = 0; c < 4; c++) e[r] ^= gmul(m1 ? H1[r ^ c] : H0[r ^ c], x[c]);
    end
    for (int t = 0; t < 4; t++) begin
      logic [63:0] mat;
      h = m1 ? H1[t] : H0[t];
      mat = const_matrix(h);
      for (int b = 7; b >= 0; b--) issue(OP_NLD, 3'd0, mat[8*b +: 8], unused);
      for (int r = 0; r < 4; r++)
        if (t == 0) issue(OP_NMU, 3'd0, x[r ^ t], o[r]);
        else        issue(OP_NMA, 3'd4, x[r ^ t], o[r]);
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (o[r] !== e[r]) begin
        failures++;
        if (failures < 20) $display("FAIL M%0d x=%h byte %0d = %h, expected %h", m1, xin, r, o[r], e[r]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // unit vectors give the matrix columns
    for (int c = 0; c < 4; c++) begin
      run(0, 32'h01 << (8 * (3 - c)));
      run(1, 32'h01 << (8 * (3 - c)));
    end
    for (int t = 0; t < 100; t++) begin
      run(0, $urandom);
      run(1, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
