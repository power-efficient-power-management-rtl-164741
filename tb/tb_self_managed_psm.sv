// tb_self_managed_psm: cycle-accurate check of one self-managed PSM.
//
// The target power state is changed at random with a rate that steps through
// busy and quiet phases. After every rising edge the control outputs, the
// sleep signal of the transition logic and the state-clock enable are
// compared with a cycle model (psm_ref_pkg). While the state clock is
// disabled the transition logic counts as powered down: its output is forced
// to random values, which the state register must ignore. For every request
// made to an idle PSM and held until done, the latency is checked against
// WAKE_CYCLES plus the number of steps of the route. The testbench counts
// each mechanism (sleep, wake-up delay, direct level change, power-down and
// power-up through ISO, target changed mid-sequence, request of the current
// state) and fails if one never occurred.
module tb_self_managed_psm;
  import psm_pkg::*;
  import psm_ref_pkg::*;

  localparam int unsigned WAKE = 1;
  localparam int NCYC = 20000;

  logic clk = 1'b0, rst_n = 1'b1;
  target_state_e target;
  psm_ctrl_t ctrl;
  logic tl_sleep, clk_en;
  int checks = 0, failures = 0;

  self_managed_psm dut (.clk, .rst_n, .target, .ctrl, .tl_sleep, .clk_en);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_sleep_cyc, n_wait_cyc, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_lat, n_forced;

  initial begin
    psm_model_t m;
    logic [2:0] prev;
    logic prev_sleep;
    int lat_start, lat_exp;
    logic lat_armed;
    int rate;
    target = PS_OFF;
    #1 rst_n = 1'b0;
    #10;
    check(3'(ctrl) == 3'b100, "reset state OFF");
    m.st = 3'b100;
    m.cnt = 0;
    prev = 3'b100;
    prev_sleep = 1'b1;
    lat_armed = 1'b0;
    {n_sleep_cyc, n_wait_cyc, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_lat, n_forced} = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      check(3'(ctrl) == m.st, $sformatf("ctrl=%03b model=%03b", 3'(ctrl), m.st));
      check(!(ctrl.vsel == V_OFF && !ctrl.iso), "supply off without isolation");
      // Count the route taken over the last edge.
      if (prev != 3'(ctrl)) begin
        if (prev[2] == 1'b0 && ctrl.iso == 1'b0) n_level++;
        if (prev == 3'b110 && 3'(ctrl) == 3'b100) n_pdown++;
        if (prev == 3'b110 && ctrl.iso == 1'b0) n_pup++;
      end
      prev = 3'(ctrl);
      // Latency of a request to an idle PSM.
      if (lat_armed && 3'(ctrl) == ref_goal(target)) begin
        check(cyc - lat_start == lat_exp,
              $sformatf("latency %0d expected %0d", cyc - lat_start, lat_exp));
        n_lat++;
        lat_armed = 1'b0;
      end
      // New target: rate alternates between busy and quiet phases.
      rate = ((cyc / 2000) % 2 == 0) ? 3 : 60;
      if ($urandom_range(rate - 1, 0) == 0) begin
        target_state_e nt;
        nt = target_state_e'($urandom_range(3, 0));
        if (!model_sleep(m, target)) begin
          if (nt != target) n_retarget++;
          lat_armed = 1'b0;
        end else if (ref_goal(nt) == m.st) begin
          n_same++;
        end else begin
          lat_armed = 1'b1;
          lat_start = cyc;
          // A sleep shorter than one clock edge does not restart the wake-up delay.
          lat_exp = ((m.cnt >= WAKE) ? 0 : int'(WAKE - m.cnt)) + ref_steps(m.st, nt);
        end
        target = nt;
      end
      #1;
      check(tl_sleep == model_sleep(m, target), "tl_sleep");
      check(clk_en == model_en(m, target, WAKE), "clk_en");
      if (tl_sleep) n_sleep_cyc++;
      if (!tl_sleep && !clk_en) n_wait_cyc++;
      if (prev_sleep && !tl_sleep) n_wake++;
      prev_sleep = tl_sleep;
      // Powered-down transition logic: its output is meaningless.
      if (!clk_en) begin
        force dut.next_state = psm_ctrl_t'($urandom_range(7, 0));
        n_forced++;
      end else begin
        release dut.next_state;
      end
      m = model_step(m, target, WAKE);
    end
    check(n_sleep_cyc > 0, "sleep never happened");
    check(n_wait_cyc > 0, "wake-up delay never happened");
    check(n_wake > 0, "wake-up never happened");
    check(n_level > 0, "direct level change never happened");
    check(n_pdown > 0, "power-down through ISO never happened");
    check(n_pup > 0, "power-up through ISO never happened");
    check(n_retarget > 0, "retarget mid-sequence never happened");
    check(n_same > 0, "request of the current state never happened");
    check(n_lat > 0, "no latency measured");
    $display("sleep_cycles=%0d wake_wait=%0d wakes=%0d level=%0d pdown=%0d pup=%0d retarget=%0d same=%0d latency_checks=%0d forced=%0d",
             n_sleep_cyc, n_wait_cyc, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_lat, n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
