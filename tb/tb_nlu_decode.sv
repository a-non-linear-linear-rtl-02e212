// Self-checking testbench of nlu_decode: every opcode, field value and valid
// setting is compared with the control table of the four NLU instructions.
module tb_nlu_decode;
  import nlu_pkg::*;

  logic      valid;
  nlu_op_e   op;
  logic [2:0] field;
  nlu_ctrl_t ctrl;
  logic      wr_rd;
  int checks = 0, failures = 0;

  nlu_decode dut (.valid, .op, .field, .ctrl, .wr_rd);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      for (int f = 0; f < 8; f++) begin
        for (int v = 0; v < 2; v++) begin
          logic       e_push, e_mode, e_acc, e_mac, e_wr;
          logic [2:0] e_sel;
          logic [1:0] e_sro;
          // NMA with s outside 1..4 is illegal and not issued
          if (o == 3 && (f < 1 || f > 4)) continue;
          op = nlu_op_e'(o); field = 3'(f); valid = v[0];
          e_push = 0; e_sel = 0; e_mode = 0; e_acc = 0; e_mac = 0; e_sro = 0; e_wr = 0;
          case (o)
            0: begin e_push = v[0]; e_sel = 3'(f); end
            1: begin e_wr = v[0]; end
            2: begin e_mode = 1; e_mac = v[0]; e_wr = v[0]; end
            3: begin e_mode = 1; e_acc = 1; e_mac = v[0]; e_sro = 2'(f - 1); e_wr = v[0]; end
            default: ;
          endcase
          #1;
          // the select fields only matter while their enable is active
          checks++;
          if (ctrl.push !== e_push || (e_push && ctrl.sel !== e_sel) ||
              ctrl.mac !== e_mac || wr_rd !== e_wr ||
              (e_wr && ctrl.mode !== e_mode) ||
              (e_wr && e_mode && ctrl.acc !== e_acc) ||
              (e_acc && ctrl.sro !== e_sro)) begin
            failures++;
            $display("FAIL op=%0d field=%0d valid=%0d ctrl=%p wr=%b", o, f, v, ctrl, wr_rd);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
