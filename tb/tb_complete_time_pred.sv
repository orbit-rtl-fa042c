// tb_complete_time_pred: exhaustive test of the completion-time adder.
//
// For every scheme and operation (with and without a destination) the
// expected timer load is written out by hand from the rules: no
// prediction under DelayALL/DelayACE, none for stores or instructions
// without a destination, all ones for loads under PredictALL schemes and
// none under the non-load schemes, otherwise 1 (dispatch to issue) + 0
// (issue to execute) + the unit latency: ALU/branch 1, integer multiply 3,
// integer divide 20, FP add 2, FP multiply 4, FP divide 12.
module tb_complete_time_pred;
  import orbit_pkg::*;
  scheme_e scheme;
  inst_t   inst;
  logic    set_v;
  timer_t  set_val;
  int checks = 0, failures = 0;

  complete_time_pred dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(op_e op);
    case (op)
      OP_IALU, OP_BR: return 2;
      OP_IMUL:        return 4;
      OP_IDIV:        return 21;
      OP_FPALU:       return 3;
      OP_FPMUL:       return 5;
      OP_FPDIV:       return 13;
      default:        return 255;
    endcase
  endfunction

  initial begin
    inst = '0;
    for (int s = 0; s < 6; s++)
      for (int o = 0; o < 9; o++)
        for (int d = 0; d < 2; d++) begin
          logic pred, ld_pred, exp_v;
          scheme = scheme_e'(s);
          inst.op = op_e'(o);
          inst.has_dst = d[0];
          inst.dst = preg_t'($urandom_range(600));
          #1;
          pred    = (s >= 2);
          ld_pred = (s == 2 || s == 4);
          exp_v = pred && d == 1 && o != 8 && (o != 7 || ld_pred);
          checks++;
          if (set_v !== exp_v) begin
            failures++;
            $display("scheme %0d op %0d dst %0d: set_v %b want %b", s, o, d, set_v, exp_v);
          end
          if (exp_v) begin
            checks++;
            if (int'(set_val) != expect_val(op_e'(o))) begin
              failures++;
              $display("scheme %0d op %0d: value %0d want %0d", s, o, set_val, expect_val(op_e'(o)));
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
