// tb_psm_transition_logic: exhaustive check of the PSM next-state function.
//
// Applies all 8 state codes x 4 targets and compares the next state with the
// reference table. Then walks every legal start state to every target and
// checks that the goal is reached in the expected number of steps (1 for a
// level change, 2 for switching off or on), that the supply is never off
// without isolation, and that switching off always passes through a powered,
// isolated state.
module tb_psm_transition_logic;
  import psm_pkg::*;
  import psm_ref_pkg::*;

  target_state_e target;
  psm_ctrl_t     cur, nxt;
  int checks = 0, failures = 0;

  psm_transition_logic dut (.target(target), .cur(cur), .next(nxt));

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] legal[5];
    legal = '{3'b100, 3'b001, 3'b010, 3'b011, 3'b110};
    // Full table.
    for (int c = 0; c < 8; c++) begin
      for (int t = 0; t < 4; t++) begin
        cur = psm_ctrl_t'(c[2:0]);
        target = target_state_e'(t[1:0]);
        #1;
        check(3'(nxt) == ref_next(c[2:0], t[1:0]),
              $sformatf("cur=%03b t=%0d next=%03b exp=%03b", c[2:0], t, 3'(nxt), ref_next(c[2:0], t[1:0])));
      end
    end
    // Walk routes from every legal state.
    foreach (legal[i]) begin
      for (int t = 0; t < 4; t++) begin
        int n;
        logic was_iso_on;
        logic [2:0] s;
        s = legal[i];
        n = 0;
        was_iso_on = 1'b0;
        target = target_state_e'(t[1:0]);
        while (s != ref_goal(t[1:0]) && n < 5) begin
          cur = psm_ctrl_t'(s);
          #1;
          s = 3'(nxt);
          n++;
          check(!(s[1:0] == 2'b00 && !s[2]), $sformatf("unisolated off from %03b", legal[i]));
          if (s[2] && s[1:0] != 2'b00) was_iso_on = 1'b1;
        end
        check(s == ref_goal(t[1:0]), $sformatf("goal not reached from %03b to %0d", legal[i], t));
        check(n == ((legal[i] == ref_goal(t[1:0])) ? 0 :
                    (legal[i] == 3'b110) ? 1 :
                    (t == 0 && legal[i][2] == 1'b0) ? 2 :
                    (t != 0 && legal[i] == 3'b100) ? 2 : 1),
              $sformatf("steps %0d from %03b to %0d", n, legal[i], t));
        if (t == 0 && legal[i][2] == 1'b0)
          check(was_iso_on, $sformatf("power-off from %03b skipped isolation", legal[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
