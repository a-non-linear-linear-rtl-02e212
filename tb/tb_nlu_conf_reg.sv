// Self-checking testbench of nlu_conf_reg.
//
// Random byte and single-bit loads, interleaved with idle cycles and a reset.
// The reference keeps the register as a 64-bit value: a byte load shifts in
// K, a bit load with n > 0 shifts in K[7-n]. Also checks the eight-byte
// loading order: the first byte ends up in the top byte.
module tb_nlu_conf_reg;

  logic        clk = 0, rst_n = 0, push = 0;
  logic [2:0]  sel = '0;
  logic [7:0]  din = '0;
  logic [63:0] conf, model;
  int checks = 0, failures = 0;
  int byte_loads = 0, bit_loads = 0;

  nlu_conf_reg dut (.clk, .rst_n, .push, .sel, .din, .conf);

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (conf !== model) begin
      failures++;
      $display("FAIL %s: conf=%h model=%h", what, conf, model);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst_n = 1;
    // byte loading order
    for (int b = 0; b < 8; b++) begin
      @(negedge clk); push = 1; sel = 0; din = 8'(8'h11 * (b + 1));
    end
    @(negedge clk); push = 0;
    model = 64'h1122334455667788;
    check("byte order");
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push = ($urandom % 4) != 0;
      sel  = ($urandom % 2) ? 3'd0 : 3'($urandom);
      din  = 8'($urandom);
      @(posedge clk);
      if (push) begin
        if (sel == 0) begin model = {model[55:0], din}; byte_loads++; end
        else begin model = {model[62:0], din[7 - sel]}; bit_loads++; end
      end
      #1 check("load");
    end
    // asynchronous reset in mid-cycle
    @(negedge clk); push = 0; #2 rst_n = 0; #1 model = '0; check("async reset");
    $display("byte loads %0d, bit loads %0d", byte_loads, bit_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
