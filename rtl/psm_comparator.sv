// psm_comparator: idle-time determination logic of the self-managed PSM.
//
// Compares the current power state at the PSM outputs with the target power
// state at its inputs.
//   * equal:     tl_sleep = 1 (the transition logic is powered down) and
//                clk_en = 0 (the state clock is stopped);
//   * different: tl_sleep = 0 at once, so the transition logic powers up;
//                after WAKE_CYCLES rising clock edges with the states still
//                different, clk_en = 1 and the state register follows the
//                transition logic one step per clock until the target is
//                reached, when tl_sleep rises again.
// The comparison and sleep/enable generation follow the design description;
// the wake-up delay counter and its length are this design's choice (the
// description only allows for "a few clock cycles" of wake-up overhead).
// WAKE_CYCLES = 0 gives clk_en in the same cycle as the comparison.
//
// tl_sleep and clk_en are combinational from target, cur and the counter.
// The counter runs on the free-running clock and restarts whenever the PSM
// is idle. It restarts only on a rising edge at which the PSM is idle: if a
// new target arrives in the same clock cycle in which the old one was reached,
// tl_sleep is high for less than a cycle and the wake-up delay is not applied
// again (the transition logic had no time to lose its supply). Asynchronous
// active-low reset.
module psm_comparator
  import psm_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  target_state_e target,
  input  psm_ctrl_t     cur,
  output logic          tl_sleep,
  output logic          clk_en
);

  localparam int unsigned CW = (WAKE_CYCLES < 1) ? 1 : $clog2(WAKE_CYCLES + 1);

  logic          differ;
  logic [CW-1:0] wake_cnt;
  logic          awake;

  assign differ   = (cur != target_ctrl(target));
  assign tl_sleep = !differ;
  assign awake    = (32'(wake_cnt) >= WAKE_CYCLES);
  assign clk_en   = differ && awake;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              wake_cnt <= '0;
    else if (!differ)        wake_cnt <= '0;
    else if (!awake)         wake_cnt <= wake_cnt + 1'b1;
  end

  // The state clock is never enabled while the transition logic sleeps.
  a_no_clk_while_sleep: assert property (@(posedge clk) disable iff (!rst_n)
    tl_sleep |-> !clk_en);

endmodule
