// tb_rpt_state_next: exhaustive check of the RPT entry state transitions.
// All eight (state, correct) pairs are applied and the next state, the
// stride-update flag and the prefetch flag are compared with a table
// written out independently below.
module tb_rpt_state_next;
  import smp_pkg::*;

  rpt_state_e st, nst;
  logic corr, upd, pf;
  int checks = 0, failures = 0;

  rpt_state_next dut (.state_i(st), .correct_i(corr), .state_o(nst),
                      .update_stride_o(upd), .prefetch_o(pf));

  // expected: {next state, update stride, prefetch}
  task automatic check(rpt_state_e s, logic c, rpt_state_e exp_s, logic exp_u, logic exp_p);
    st = s; corr = c;
    #1;
    checks++;
    if (nst !== exp_s || upd !== exp_u || pf !== exp_p) begin
      failures++;
      $display("FAIL state=%0d correct=%0b -> %0d/%0b/%0b, expected %0d/%0b/%0b",
               s, c, nst, upd, pf, exp_s, exp_u, exp_p);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(RPT_INITIAL,   1'b1, RPT_STEADY,    1'b0, 1'b0);
    check(RPT_INITIAL,   1'b0, RPT_TRANSIENT, 1'b1, 1'b0);
    check(RPT_TRANSIENT, 1'b1, RPT_STEADY,    1'b0, 1'b0);
    check(RPT_TRANSIENT, 1'b0, RPT_IRREGULAR, 1'b1, 1'b0);
    check(RPT_STEADY,    1'b1, RPT_STEADY,    1'b0, 1'b1);
    check(RPT_STEADY,    1'b0, RPT_INITIAL,   1'b1, 1'b0);
    check(RPT_IRREGULAR, 1'b1, RPT_TRANSIENT, 1'b0, 1'b0);
    check(RPT_IRREGULAR, 1'b0, RPT_IRREGULAR, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
