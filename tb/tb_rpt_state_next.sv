// tb_rpt_state_next: exhaustive check of the RPT entry state transitions.
// All eight (state, correct) pairs are applied and the next state, the
// stride-update flag and the prefetch-issue flag are compared with an
// expected-value table written out by hand from the transition diagram.
module tb_rpt_state_next;
  import stream_pkg::*;

  rpt_state_e state, next_state;
  logic       correct, update_stride, issue;
  int checks = 0, failures = 0;

  rpt_state_next dut (.*);

  // expected: {next state, update_stride, issue} indexed by {state, correct}
  typedef struct { rpt_state_e ns; bit upd; bit iss; } exp_t;
  exp_t exp_tab [4][2];

  initial begin
    exp_tab[RPT_INITIAL][0]   = '{RPT_TRANSIENT, 1, 0};
    exp_tab[RPT_INITIAL][1]   = '{RPT_STEADY,    0, 0};
    exp_tab[RPT_TRANSIENT][0] = '{RPT_IRREGULAR, 1, 0};
    exp_tab[RPT_TRANSIENT][1] = '{RPT_STEADY,    0, 0};
    exp_tab[RPT_STEADY][0]    = '{RPT_INITIAL,   1, 0};
    exp_tab[RPT_STEADY][1]    = '{RPT_STEADY,    0, 1};
    exp_tab[RPT_IRREGULAR][0] = '{RPT_IRREGULAR, 1, 0};
    exp_tab[RPT_IRREGULAR][1] = '{RPT_TRANSIENT, 0, 0};
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < 2; c++) begin
        state   = rpt_state_e'(s);
        correct = c[0];
        #1;
        checks++;
        if (next_state != exp_tab[s][c].ns || update_stride != exp_tab[s][c].upd ||
            issue != exp_tab[s][c].iss) begin
          failures++;
          $display("FAIL state=%0d correct=%0d: got %0d/%0d/%0d", s, c,
                   next_state, update_stride, issue);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
