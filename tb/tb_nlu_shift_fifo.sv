// Self-checking testbench of nlu_shift_fifo.
//
// Random shifts and holds; after every edge all four taps are compared with a
// history of the values pushed so far (tap s-1 must return the value pushed
// s pushes ago, zero if fewer pushes happened since reset).
module tb_nlu_shift_fifo;

  logic       clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = '0, tap;
  logic [1:0] sro = '0;
  logic [7:0] hist [$];
  int checks = 0, failures = 0, holds = 0;

  nlu_shift_fifo dut (.clk, .rst_n, .shift, .din, .sro, .tap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_taps();
    for (int s = 0; s < 4; s++) begin
      logic [7:0] exp;
      sro = 2'(s);
      #1;
      exp = (hist.size() > s) ? hist[hist.size() - 1 - s] : 8'h00;
      checks++;
      if (tap !== exp) begin
        failures++;
        $display("FAIL tap %0d = %h, expected %h", s, tap, exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_taps();
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      din   = 8'($urandom);
      @(posedge clk);
      if (shift) hist.push_back(din); else holds++;
      @(negedge clk);
      shift = 0;
      check_taps();
    end
    $display("holds %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
