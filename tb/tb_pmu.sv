// tb_pmu: end-to-end test of the power-management unit at its default size
// (three power domains, one-cycle wake-up).
//
// Plays the part of power-mode determination: it chooses a system power mode
// now and then and hands every domain its target power state. Each domain has
// its own request rate, and the rates step through busy, moderate and very
// quiet phases, so that every PSM spends long stretches asleep as well as
// busy ones. After every clock edge each domain's control outputs, sleep and
// state-clock enable are compared with a cycle model; while a PSM's state clock
// is off its transition logic output is forced to random values. Counts each
// mechanism of the design per run (transition logic asleep, wake-up delay,
// direct level change, power-down and power-up through the isolation state,
// new target during a sequence, request of the current state, several domains
// busy at once, whole unit idle) and fails if one never occurred.
module tb_pmu;
  import psm_pkg::*;
  import psm_ref_pkg::*;

  localparam int ND = 3;           // default NUM_PD of pmu
  localparam int unsigned WAKE = 1; // default WAKE_CYCLES of pmu
  localparam int NCYC = 60000;

  logic clk = 1'b0, rst_n = 1'b1;
  target_state_e target [ND];
  psm_ctrl_t pd_ctrl [ND];
  logic [ND-1:0] tl_sleep, psm_clk_en;
  int checks = 0, failures = 0;

  pmu dut (.clk, .rst_n, .target, .pd_ctrl, .tl_sleep, .psm_clk_en);

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

  int n_sleep, n_wait, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_multi, n_allidle;

  // Forcing the outputs of powered-down transition logic, one domain each.
  for (genvar g = 0; g < ND; g++) begin : g_force
    always @(negedge clk) begin
      #2;
      if (rst_n && !psm_clk_en[g]) force dut.g_psm[g].u_psm.next_state = psm_ctrl_t'($urandom_range(7, 0));
      else                         release dut.g_psm[g].u_psm.next_state;
    end
  end

  initial begin
    psm_model_t m [ND];
    logic [2:0] prev [ND];
    logic [ND-1:0] prev_sleep;
    int rate, busy;
    foreach (target[i]) target[i] = PS_OFF;
    #1 rst_n = 1'b0;
    #10;
    for (int i = 0; i < ND; i++) begin
      check(3'(pd_ctrl[i]) == 3'b100, "reset state OFF");
      m[i].st = 3'b100;
      m[i].cnt = 0;
      prev[i] = 3'b100;
    end
    prev_sleep = '1;
    {n_sleep, n_wait, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_multi, n_allidle} = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < ND; i++) begin
        check(3'(pd_ctrl[i]) == m[i].st, $sformatf("pd%0d ctrl=%03b model=%03b", i, 3'(pd_ctrl[i]), m[i].st));
        check(!(pd_ctrl[i].vsel == V_OFF && !pd_ctrl[i].iso), "supply off without isolation");
        if (prev[i] != 3'(pd_ctrl[i])) begin
          if (prev[i][2] == 1'b0 && pd_ctrl[i].iso == 1'b0) n_level++;
          if (prev[i] == 3'b110 && 3'(pd_ctrl[i]) == 3'b100) n_pdown++;
          if (prev[i] == 3'b110 && pd_ctrl[i].iso == 1'b0) n_pup++;
        end
        prev[i] = 3'(pd_ctrl[i]);
        // Request rate of domain i in this phase: 1 in 2..1 in 2000 cycles.
        case (((cyc / 5000) + i) % 4)
          0:       rate = 2;
          1:       rate = 20;
          2:       rate = 200;
          default: rate = 2000;
        endcase
        if ($urandom_range(rate - 1, 0) == 0) begin
          target_state_e nt;
          nt = target_state_e'($urandom_range(3, 0));
          if (!model_sleep(m[i], target[i]) && nt != target[i]) n_retarget++;
          if (model_sleep(m[i], target[i]) && ref_goal(nt) == m[i].st) n_same++;
          target[i] = nt;
        end
      end
      #1;
      busy = 0;
      for (int i = 0; i < ND; i++) begin
        check(tl_sleep[i] == model_sleep(m[i], target[i]), $sformatf("pd%0d tl_sleep", i));
        check(psm_clk_en[i] == model_en(m[i], target[i], WAKE), $sformatf("pd%0d clk_en", i));
        if (tl_sleep[i]) n_sleep++;
        else busy++;
        if (!tl_sleep[i] && !psm_clk_en[i]) n_wait++;
        if (prev_sleep[i] && !tl_sleep[i]) n_wake++;
        m[i] = model_step(m[i], target[i], WAKE);
      end
      prev_sleep = tl_sleep;
      if (busy > 1) n_multi++;
      if (busy == 0) n_allidle++;
    end
    check(n_sleep > 0, "transition logic never asleep");
    check(n_wait > 0, "wake-up delay never happened");
    check(n_wake > 0, "wake-up never happened");
    check(n_level > 0, "direct level change never happened");
    check(n_pdown > 0, "power-down through ISO never happened");
    check(n_pup > 0, "power-up through ISO never happened");
    check(n_retarget > 0, "new target during a sequence never happened");
    check(n_same > 0, "request of the current state never happened");
    check(n_multi > 0, "several domains never busy at once");
    check(n_allidle > 0, "whole unit never idle");
    $display("asleep_psm_cycles=%0d wake_wait=%0d wakes=%0d level=%0d pdown=%0d pup=%0d retarget=%0d same=%0d multi_busy=%0d all_idle=%0d of %0d cycles",
             n_sleep, n_wait, n_wake, n_level, n_pdown, n_pup, n_retarget, n_same, n_multi, n_allidle, NCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
