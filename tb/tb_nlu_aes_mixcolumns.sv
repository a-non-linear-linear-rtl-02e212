// Workload testbench: AES MixColumns on the NLU.
//
// Multiplying a byte by a constant in GF(2^8) (reduction polynomial 0x11B)
// is linear over GF(2), so it is an 8x8 binary matrix: row i, bit j is bit i
// of c * x^j. One column is
//   out_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)      (indices mod 4)
// and is computed as four interleaved chains, one per output byte:
//   load [2]: NMU   a0, a1, a2, a3
//   load [3]: NMA 4 a1, a2, a3, a0
//   load [1]: NMA 4 a2, a3, a0, a1 ; NMA 4 a3, a0, a1, a2
// Each NMA adds the partial sum its chain pushed four instructions earlier.
// Checked against the MixColumns columns of the FIPS-197 example
// (Appendix B, round 1), other well-known test columns and a software
// reference for random columns.
module tb_nlu_aes_mixcolumns;
  import nlu_pkg::*;

  logic       clk = 0, rst_n = 0, valid = 0;
  nlu_op_e    op = OP_NLD;
  logic [2:0] field = '0;
  logic [7:0] operand = '0, result;
  logic       result_we;
  int checks = 0, failures = 0, n_nma4 = 0;

  nlu_ise dut (.clk, .rst_n, .valid, .op, .field, .operand, .result, .result_we);

  always #5 clk = ~clk;

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
      a = a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
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

  function automatic logic [31:0] sw_mix(input logic [31:0] col);
    logic [7:0] a [4], o [4];
    for (int r = 0; r < 4; r++) a[r] = col[31 - 8*r -: 8];
    for (int r = 0; r < 4; r++)
      o[r] = gmul(a[r], 2) ^ gmul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return {o[0], o[1], o[2], o[3]};
  endfunction

  task automatic issue(input nlu_op_e o, input logic [2:0] f, input logic [7:0] d,
                       output logic [7:0] res);
    @(negedge clk);
    valid = 1; op = o; field = f; operand = d;
    #1 res = result;
    @(posedge clk);
    #1 valid = 0;
  endtask

  task automatic load(input logic [63:0] mat);
    logic [7:0] unused;
    for (int b = 7; b >= 0; b--) issue(OP_NLD, 3'd0, mat[8*b +: 8], unused);
  endtask

  task automatic nlu_mix(input logic [31:0] col, output logic [31:0] out);
    logic [7:0] a [4], o [4];
    for (int r = 0; r < 4; r++) a[r] = col[31 - 8*r -: 8];
    load(const_matrix(8'h02));
    for (int r = 0; r < 4; r++) issue(OP_NMU, 3'd0, a[r], o[r]);
    load(const_matrix(8'h03));
    for (int r = 0; r < 4; r++) begin issue(OP_NMA, 3'd4, a[(r+1)%4], o[r]); n_nma4++; end
    load(const_matrix(8'h01));
    for (int r = 0; r < 4; r++) begin issue(OP_NMA, 3'd4, a[(r+2)%4], o[r]); n_nma4++; end
    for (int r = 0; r < 4; r++) begin issue(OP_NMA, 3'd4, a[(r+3)%4], o[r]); n_nma4++; end
    out = {o[0], o[1], o[2], o[3]};
  endtask

  task automatic run(input logic [31:0] col, input logic [31:0] exp);
    logic [31:0] out;
    nlu_mix(col, out);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL MixColumns(%h) = %h, expected %h", col, out, exp);
    end
  endtask

  initial begin
    logic [31:0] col;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // FIPS-197 Appendix B, round 1
    run(32'hd4bf5d30, 32'h046681e5);
    run(32'he0b452ae, 32'he0cb199a);
    run(32'hb84111f1, 32'h48f8d37a);
    run(32'h1e2798e5, 32'h2806264c);
    // frequently quoted test columns
    run(32'hdb135345, 32'h8e4da1bc);
    run(32'hf20a225c, 32'h9fdc589d);
    run(32'h01010101, 32'h01010101);
    run(32'hc6c6c6c6, 32'hc6c6c6c6);
    run(32'hd4d4d4d5, 32'hd5d5d7d6);
    run(32'h2d26314c, 32'h4d7ebdf8);
    for (int t = 0; t < 200; t++) begin
      col = $urandom;
      run(col, sw_mix(col));
    end
    $display("NMA with s=4: %0d", n_nma4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
