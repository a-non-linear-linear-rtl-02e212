// Self-checking testbench of nlu_linear.
//
// Directed matrices (zero, identity, bit reversal, all ones) and random
// matrices. The reference keeps the matrix as rows of bits and forms each
// output bit as the parity of the number of positions where row and operand
// are both one.
module tb_nlu_linear;

  logic [63:0] m;
  logic [7:0]  din, dout;
  int checks = 0, failures = 0;

  nlu_linear dut (.m(m), .din(din), .dout(dout));

  function automatic logic [7:0] ref_mul(input logic [63:0] mat, input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) begin
      int cnt = 0;
      for (int j = 0; j < 8; j++) if (mat[8*i+j] && x[j]) cnt++;
      y[i] = cnt[0];
    end
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
    for (int v = 0; v < 256; v++) begin
      din = 8'(v);
      m = '0;                    #1 check(8'h00, "zero");
      m = 64'h8040201008040201;  #1 check(8'(v), "identity");
      m = 64'h0102040810204080;  #1 check({<<{8'(v)}}, "reverse");
      m = '1;                    #1 check({8{^8'(v)}}, "parity");
    end
    for (int t = 0; t < 2000; t++) begin
      m   = {$urandom, $urandom};
      din = 8'($urandom);
      #1 check(ref_mul(m, din), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
