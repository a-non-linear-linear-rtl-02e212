// End-to-end testbench of nlu_ise: PRESENT-80 encryption with the NLU.
//
// The testbench plays the host processor: it keeps the cipher state in an
// array of byte registers r18..r25 (r18 = state[63:56]), does the round-key
// XOR and key schedule itself, and leaves both cipher layers to the NLU:
//   S-box layer: the 64 ANF coefficients of the PRESENT S-box (computed here
//     from its table) are loaded with NLD, then NNL substitutes each byte;
//   permutation layer: output byte Y(7-2i) = M(i,0)A7 ^ M(i,1)A6 ^ M(i,2)A5
//     ^ M(i,3)A4 and Y(6-2i) the same on A3..A0, with 8x8 matrices M(i,u)
//     derived here from P(j) = 16j mod 63. Each byte is an NMU followed by
//     three NMA s,... that add the partial sum pushed s operations earlier.
// The rounds rotate through four schedules so that every FIFO(s), s = 1..4,
// is used: s = 2 is the published one (two result chains, matrices reused by
// shifting two zero bytes into CONF), s = 1 runs one chain at a time, s = 3
// runs three chains (one repeated and discarded), s = 4 runs four. Every
// fifth round loads the S-box bit by bit with NLD n > 0.
//
// Checks: every NNL and every permutation output against a software model,
// the four ciphertexts of the PRESENT-80 test vectors, two random encryptions
// against the software model, result_we per instruction, and that each
// mechanism (byte load, bit load, short matrix reload, NNL, NMU, NMA with
// s = 1..4) happened. Every instruction's result is taken in the cycle it is
// issued (single-cycle instructions).
module tb_nlu_ise;
  import nlu_pkg::*;

  logic       clk = 0, rst_n = 0, valid = 0;
  nlu_op_e    op = OP_NLD;
  logic [2:0] field = '0;
  logic [7:0] operand = '0, result;
  logic       result_we;

  int checks = 0, failures = 0;
  int n_nld_byte = 0, n_nld_bit = 0, n_short = 0, n_nnl = 0, n_nmu = 0;
  int n_nma [5] = '{0, 0, 0, 0, 0};
  int cycles = 0;
  logic [63:0] cur_conf = '0;  // what CONF should hold
  logic [7:0] r [32];          // host register file

  nlu_ise dut (.clk, .rst_n, .valid, .op, .field, .operand, .result, .result_we);

  always #5 clk = ~clk;

  localparam logic [3:0] SBOX [16] = '{
    4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
    4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ---------------------------------------------------------------- software
  function automatic int perm(input int j);
    return (j == 63) ? 63 : (16 * j) % 63;
  endfunction

  function automatic logic [63:0] sw_slayer(input logic [63:0] s);
    for (int n = 0; n < 16; n++) s[4*n +: 4] = SBOX[s[4*n +: 4]];
    return s;
  endfunction

  function automatic logic [63:0] sw_player(input logic [63:0] s);
    logic [63:0] y;
    for (int j = 0; j < 64; j++) y[perm(j)] = s[j];
    return y;
  endfunction

  function automatic logic [79:0] key_update(input logic [79:0] k, input int rnd);
    k = {k[18:0], k[79:19]};
    k[79:76] = SBOX[k[79:76]];
    k[19:15] ^= 5'(rnd);
    return k;
  endfunction

  function automatic logic [63:0] sw_present(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s = pt;
    for (int rnd = 1; rnd <= 31; rnd++) begin
      s ^= key[79:16];
      s = sw_player(sw_slayer(s));
      key = key_update(key, rnd);
    end
    return s ^ key[79:16];
  endfunction

  // ANF coefficients of the S-box: coefficient 16j+k of output bit 3-j.
  function automatic logic [63:0] sbox_anf();
    logic [63:0] c;
    for (int j = 0; j < 4; j++) begin
      logic [15:0] f;
      for (int x = 0; x < 16; x++) f[x] = SBOX[x][3-j];
      for (int v = 0; v < 4; v++)
        for (int x = 0; x < 16; x++)
          if (x[v]) f[x] ^= f[x & ~(1 << v)];
      c[16*j +: 16] = f;
    end
    return c;
  endfunction

  // Matrix taking source byte sb to output byte tb of the permutation:
  // row b (CONF[8b+7:8b]) bit q is set when bit q of byte sb moves to bit b
  // of byte tb.
  function automatic logic [63:0] pmatrix(input int tb, input int sb);
    logic [63:0] mat = '0;
    for (int j = 0; j < 64; j++)
      if (j / 8 == sb && perm(j) / 8 == tb) mat[8 * (perm(j) % 8) + (j % 8)] = 1'b1;
    return mat;
  endfunction

  // ---------------------------------------------------------------- NLU use
  task automatic issue(input nlu_op_e o, input logic [2:0] f, input logic [7:0] d,
                       output logic [7:0] res);
    @(negedge clk);
    valid = 1; op = o; field = f; operand = d;
    #1;
    res = result;
    checks++;
    if (result_we !== (o != OP_NLD)) fail($sformatf("result_we=%b for op %s", result_we, o.name()));
    @(posedge clk);
    cycles++;
    #1 valid = 0;
  endtask

  task automatic nld_byte(input logic [7:0] k);
    logic [7:0] unused;
    issue(OP_NLD, 3'd0, k, unused);
    cur_conf = {cur_conf[55:0], k};
    n_nld_byte++;
  endtask

  task automatic nld_bit(input logic b);
    logic [7:0] unused, k;
    int n;
    n = 1 + ($urandom % 7);
    k = 8'($urandom);
    k[7 - n] = b;
    issue(OP_NLD, 3'(n), k, unused);
    cur_conf = {cur_conf[62:0], b};
    n_nld_bit++;
  endtask

  // Load a matrix; when it equals CONF shifted by two bytes except in its
  // last two bytes, only those two bytes are loaded.
  task automatic load_matrix(input logic [63:0] mat);
    if (mat == cur_conf) return;
    if (((cur_conf << 16) | {48'h0, mat[15:0]}) == mat) begin
      nld_byte(mat[15:8]);
      nld_byte(mat[7:0]);
      n_short++;
    end else begin
      for (int b = 7; b >= 0; b--) nld_byte(mat[8*b +: 8]);
    end
  endtask

  task automatic load_sbox(input bit bitwise);
    logic [63:0] c = sbox_anf();
    // coefficient i belongs at CONF[63-i]: the first bit or byte shifted in
    // ends up at the top
    if (bitwise) for (int i = 0; i < 64; i++) nld_bit(c[i]);
    else for (int b = 0; b < 8; b++) nld_byte({<<{c[8*b +: 8]}});
  endtask

  task automatic nlu_slayer(input bit bitwise);
    logic [7:0] res;
    load_sbox(bitwise);
    for (int q = 18; q <= 25; q++) begin
      issue(OP_NNL, 3'd0, r[q], res);
      if (res !== {SBOX[r[q][7:4]], SBOX[r[q][3:0]]})
        fail($sformatf("NNL r%0d=%h gave %h", q, r[q], res));
      r[q] = res;
      n_nnl++;
    end
  endtask

  // Permutation layer on r18..r25 with FIFO distance s.
  task automatic nlu_player(input int s);
    logic [7:0] a [8], y [8], res;
    logic [63:0] exp;
    int nchains;
    for (int t = 0; t < 8; t++) a[t] = r[25 - t];  // a[t] = byte t of state
    exp = sw_player({a[7], a[6], a[5], a[4], a[3], a[2], a[1], a[0]});
    nchains = ((8 + s - 1) / s) * s;
    for (int first = 0; first < nchains; first += s) begin
      for (int u = 3; u >= 0; u--) begin
        for (int c = first; c < first + s; c++) begin
          int cc, i, tb, sb;
          cc = (c > 7) ? 7 : c;  // padding chain repeats chain 7
          i  = cc / 2;
          tb = (cc % 2 == 0) ? 7 - 2 * i : 6 - 2 * i;
          sb = (cc % 2 == 0) ? 7 - u : 3 - u;
          load_matrix(pmatrix(tb, sb));
          if (u == 3) begin
            issue(OP_NMU, 3'd0, a[sb], res);
            n_nmu++;
          end else begin
            issue(OP_NMA, 3'(s), a[sb], res);
            n_nma[s]++;
          end
          if (u == 0 && c <= 7) y[tb] = res;
        end
      end
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (y[t] !== exp[8*t +: 8]) fail($sformatf("pLayer byte %0d = %h, expected %h (s=%0d)", t, y[t], exp[8*t +: 8], s));
      r[25 - t] = y[t];
    end
  endtask

  task automatic nlu_present(input logic [63:0] pt, input logic [79:0] key,
                             output logic [63:0] ct);
    for (int q = 0; q < 8; q++) r[18 + q] = pt[63 - 8*q -: 8];
    for (int rnd = 1; rnd <= 31; rnd++) begin
      for (int q = 0; q < 8; q++) r[18 + q] ^= key[79 - 8*q -: 8];
      nlu_slayer(rnd % 5 == 0);
      nlu_player(1 + (rnd % 4));
      key = key_update(key, rnd);
    end
    for (int q = 0; q < 8; q++) r[18 + q] ^= key[79 - 8*q -: 8];
    for (int q = 0; q < 8; q++) ct[63 - 8*q -: 8] = r[18 + q];
  endtask

  task automatic run_vector(input logic [63:0] pt, input logic [79:0] key,
                            input logic [63:0] exp);
    logic [63:0] ct;
    int c0 = cycles;
    nlu_present(pt, key, ct);
    checks++;
    if (ct !== exp) fail($sformatf("PRESENT pt=%h key=%h ct=%h expected %h", pt, key, ct, exp));
    else $display("PRESENT-80 pt=%h key=%h -> %h, %0d NLU instructions", pt, key, ct, cycles - c0);
  endtask

  initial begin
    logic [63:0] pt;
    logic [79:0] key;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // published PRESENT-80 test vectors
    run_vector(64'h0, 80'h0, 64'h5579C1387B228445);
    run_vector(64'h0, '1, 64'hE72C46C0F5945049);
    run_vector('1, 80'h0, 64'hA112FFC72F68417B);
    run_vector('1, '1, 64'h3333DCD3213210D2);
    for (int t = 0; t < 2; t++) begin
      pt  = {$urandom, $urandom};
      key = {16'($urandom), $urandom, $urandom};
      run_vector(pt, key, sw_present(pt, key));
    end
    $display("NLD byte %0d, NLD bit %0d, short matrix reloads %0d, NNL %0d, NMU %0d, NMA s=1..4: %0d %0d %0d %0d",
             n_nld_byte, n_nld_bit, n_short, n_nnl, n_nmu, n_nma[1], n_nma[2], n_nma[3], n_nma[4]);
    checks++;
    if (n_nld_byte == 0 || n_nld_bit == 0 || n_short == 0 || n_nnl == 0 || n_nmu == 0 ||
        n_nma[1] == 0 || n_nma[2] == 0 || n_nma[3] == 0 || n_nma[4] == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
