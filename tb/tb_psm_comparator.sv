// tb_psm_comparator: checks the idle-time determination logic.
//
// Three instances with wake-up delays 1 (default), 0 and 3 see the same random
// target and current-state inputs. For every cycle tl_sleep must equal
// "current state is the target's state", and clk_en must rise only after the
// states have differed for WAKE_CYCLES rising edges. A cycle model of the
// wake-up counter gives the expected values; the wake-up latency is also
// measured directly and compared with each WAKE_CYCLES.
module tb_psm_comparator;
  import psm_pkg::*;
  import psm_ref_pkg::*;

  localparam int unsigned W[3] = '{1, 0, 3};

  logic clk = 1'b0, rst_n = 1'b1;
  target_state_e target;
  psm_ctrl_t cur;
  logic [2:0] sleep, en;
  int unsigned cnt[3];
  int unsigned run[3];
  int checks = 0, failures = 0;
  int wakes[3];

  psm_comparator            u0 (.clk, .rst_n, .target, .cur, .tl_sleep(sleep[0]), .clk_en(en[0]));
  psm_comparator #(.WAKE_CYCLES(0)) u1 (.clk, .rst_n, .target, .cur, .tl_sleep(sleep[1]), .clk_en(en[1]));
  psm_comparator #(.WAKE_CYCLES(3)) u2 (.clk, .rst_n, .target, .cur, .tl_sleep(sleep[2]), .clk_en(en[2]));

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic differ;
    target = PS_OFF;
    cur = psm_ctrl_t'(3'b100);
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    foreach (cnt[k]) begin
      cnt[k] = 0;
      run[k] = 0;
      wakes[k] = 0;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // Hold a difference for a random number of cycles, then match.
      if ($urandom_range(3, 0) == 0) begin
        target = target_state_e'($urandom_range(3, 0));
        cur = ($urandom_range(1, 0) == 1) ? psm_ctrl_t'(ref_goal(target))
                                          : psm_ctrl_t'($urandom_range(7, 0));
      end
      #1;
      differ = (3'(cur) != ref_goal(target));
      for (int k = 0; k < 3; k++) begin
        check(sleep[k] == !differ, $sformatf("sleep[%0d]", k));
        check(en[k] == (differ && cnt[k] >= W[k]),
              $sformatf("clk_en[%0d]=%0b cnt=%0d", k, en[k], cnt[k]));
        // Direct latency measurement: cycles the states differed before clk_en.
        if (en[k] && run[k] == W[k]) wakes[k]++;
        if (en[k]) check(run[k] >= W[k], $sformatf("early enable [%0d] run=%0d", k, run[k]));
      end
      @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        if (!differ)          cnt[k] = 0;
        else if (cnt[k] < W[k]) cnt[k]++;
        run[k] = differ ? run[k] + 1 : 0;
      end
    end
    for (int k = 0; k < 3; k++)
      check(wakes[k] > 10, $sformatf("wake-up after exactly %0d cycles seen %0d times", W[k], wakes[k]));
    // Reset clears the wake-up counter.
    @(negedge clk);
    target = PS_HIGH;
    cur = psm_ctrl_t'(3'b100);
    repeat (4) @(negedge clk);
    rst_n = 1'b0;
    #1 check(en[0] == 1'b0 && en[2] == 1'b0 && en[1] == 1'b1, "reset restarts wake-up");
    $display("wakes=%0d/%0d/%0d", wakes[0], wakes[1], wakes[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
