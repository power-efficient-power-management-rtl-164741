// tb_psm_workloads: the six target-state traffic patterns used to evaluate the
// self-managed PSM, run on one PSM at its default parameters.
//
// Each test case is a clock frequency, a run time and a target-state toggle
// rate (target-state changes requested per clock period). The number of
// simulated clock cycles is frequency x run time:
//   case  f(CLK)   time   cycles   requested toggles per clock
//    1    50 MHz   5 us      250    0.4
//    2    50 MHz   5 us      250    0.133
//    3    50 MHz   5 us      250    0.04
//    4    50 kHz   10 s   500000    0.000004 (6 requests, evenly spaced)
//    5   500 MHz   5 us     2500    0.04
//    6     5 MHz   5 us       25    4 (four requests inside every clock period)
// Every request picks one of the four power states at random, so about a
// quarter of them ask for the state already requested and change nothing.
// Clock frequency only sets the cycle count here; power is not simulated.
//
// The PSM's outputs, sleep and enable are compared with a cycle model just
// before every rising edge. For each case the testbench reports the generated
// and actual toggle rates and the share of cycles in which the transition
// logic was powered and the state clock ran - the activity that decides
// whether self-management saves power.
module tb_psm_workloads;
  import psm_pkg::*;
  import psm_ref_pkg::*;

  localparam int unsigned WAKE = 1; // default WAKE_CYCLES of self_managed_psm

  logic clk = 1'b0, rst_n = 1'b1;
  target_state_e target;
  psm_ctrl_t ctrl;
  logic tl_sleep, clk_en;
  int checks = 0, failures = 0;

  self_managed_psm dut (.clk, .rst_n, .target, .ctrl, .tl_sleep, .clk_en);

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One request: new random target; counts generated and actual toggles.
  int gen, act;
  task automatic request();
    target_state_e nt;
    nt = target_state_e'($urandom_range(3, 0));
    gen++;
    if (nt != target) act++;
    target = nt;
  endtask

  // Runs one test case. Clock period 40 time units: rising edge at 0, falling
  // edge at 20. rate_ppm: requests per million cycles (ignored when per_cyc>0
  // or spaced>0).
  task automatic run_case(int tc, int ncyc, int rate_ppm, int per_cyc, int spaced);
    psm_model_t m;
    int active, enabled;
    real act_frac;
    gen = 0;
    act = 0;
    active = 0;
    enabled = 0;
    target = PS_OFF;
    rst_n = 1'b0;
    #5 rst_n = 1'b1;
    m.st = 3'b100;
    m.cnt = 0;
    for (int c = 0; c < ncyc; c++) begin
      clk = 1'b1;
      if (per_cyc > 0) begin
        #4 request();
        #10 request();
        #6 clk = 1'b0;
        #4 request();
        #10 request();
        #4;
      end else begin
        #20 clk = 1'b0;
        #4;
        if (spaced > 0) begin
          if (c % (ncyc / spaced) == ncyc / spaced / 2) request();
        end else if ($urandom_range(999999, 0) < rate_ppm) begin
          request();
        end
        #10;
      end
      // Just before the rising edge.
      check(3'(ctrl) == m.st, $sformatf("tc%0d ctrl=%03b model=%03b", tc, 3'(ctrl), m.st));
      check(tl_sleep == model_sleep(m, target), $sformatf("tc%0d tl_sleep", tc));
      check(clk_en == model_en(m, target, WAKE), $sformatf("tc%0d clk_en", tc));
      if (!tl_sleep) active++;
      if (clk_en) enabled++;
      m = model_step(m, target, WAKE);
      #2;
    end
    act_frac = real'(active) / real'(ncyc);
    $display("case %0d: cycles=%0d generated=%0.6f actual=%0.6f toggles/clk, transition logic powered %0.1f%% of cycles, state clock on %0.1f%%",
             tc, ncyc, real'(gen) / real'(ncyc), real'(act) / real'(ncyc), 100.0 * act_frac,
             100.0 * real'(enabled) / real'(ncyc));
    check(act > 0, $sformatf("tc%0d: no target change", tc));
    check(active > 0 && active < ncyc || tc == 6, $sformatf("tc%0d: PSM never slept or never woke", tc));
    // A toggle every ~3.5 cycles keeps the transition logic powered well over 30% of the time.
    if (tc == 1) check(act_frac > 0.3, "tc1: powered less than 30% of the time");
    // Very rare changes: the PSM is asleep nearly all the time.
    if (tc == 4) check(act_frac < 0.001, "tc4: powered too often");
  endtask

  initial begin
    run_case(1, 250, 400000, 0, 0);
    run_case(2, 250, 133000, 0, 0);
    run_case(3, 250, 40000, 0, 0);
    run_case(4, 500000, 0, 0, 6);
    run_case(5, 2500, 40000, 0, 0);
    run_case(6, 25, 0, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
