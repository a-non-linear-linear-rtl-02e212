// Self-checking testbench of nlu_nonlinear.
//
// 1. The ANF coefficients of the PRESENT S-box and of its inverse are derived
//    here from their lookup tables (Moebius transform) and the unit must then
//    reproduce the lookup table on both nibbles for all 256 operands.
// 2. Random coefficient vectors are checked against the truth table obtained
//    by summing, for every output bit, the coefficients of all monomials
//    whose variables are a subset of the input's one bits.
module tb_nlu_nonlinear;

  logic [63:0] m;
  logic [7:0]  din, dout;
  int checks = 0, failures = 0;

  nlu_nonlinear dut (.m(m), .din(din), .dout(dout));

  localparam logic [3:0] PRESENT_SBOX [16] = '{
    4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
    4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  // Coefficient vector of a 4x4 S-box: m[16j+k] is the ANF coefficient of
  // monomial k in output bit 3-j.
  function automatic logic [63:0] anf_of(input logic [3:0] tbl [16]);
    logic [63:0] r = '0;
    for (int j = 0; j < 4; j++) begin
      logic [15:0] f;
      for (int x = 0; x < 16; x++) f[x] = tbl[x][3-j];
      for (int v = 0; v < 4; v++)
        for (int x = 0; x < 16; x++)
          if (x[v]) f[x] ^= f[x & ~(1 << v)];
      r[16*j +: 16] = f;
    end
    return r;
  endfunction

  function automatic logic [3:0] eval_anf(input logic [63:0] c, input logic [3:0] x);
    logic [3:0] y = '0;
    for (int j = 0; j < 4; j++)
      for (int k = 0; k < 16; k++)
        if ((k & ~int'(x)) == 0) y[3-j] ^= c[16*j + k];
    return y;
  endfunction

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: m=%h din=%h dout=%h exp=%h", what, m, din, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] inv [16];
    for (int i = 0; i < 16; i++) inv[PRESENT_SBOX[i]] = 4'(i);

    m = anf_of(PRESENT_SBOX);
    for (int v = 0; v < 256; v++) begin
      din = 8'(v);
      #1 check({PRESENT_SBOX[v[7:4]], PRESENT_SBOX[v[3:0]]}, "present sbox");
    end
    m = anf_of(inv);
    for (int v = 0; v < 256; v++) begin
      din = 8'(v);
      #1 check({inv[v[7:4]], inv[v[3:0]]}, "inverse sbox");
    end
    // all coefficients zero gives zero; only m0/m16/m32/m48 gives constant 1
    m = '0; din = 8'hA5; #1 check(8'h00, "zero");
    m = 64'h0001_0001_0001_0001; #1 check(8'hFF, "constant");
    for (int t = 0; t < 2000; t++) begin
      m   = {$urandom, $urandom};
      din = 8'($urandom);
      #1 check({eval_anf(m, din[7:4]), eval_anf(m, din[3:0])}, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
