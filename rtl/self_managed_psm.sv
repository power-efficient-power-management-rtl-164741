// self_managed_psm: power-state machine that manages its own power.
//
// Controls one power domain with four requestable power states (off, low,
// normal, high voltage) and one intermediate isolation state; see psm_pkg for
// the state codes. Built as a Medvedev machine: the state flip-flops drive the
// domain's control signals directly, so the signals change together on one
// clock edge without output-logic glitches.
//
// Three parts, as in the design description:
//   * transition logic (psm_transition_logic): combinational next state. It is
//     meant to sit in its own switchable supply, whose power switch is driven
//     by tl_sleep (the switch itself is placed by the power intent, not RTL).
//   * state logic (psm_state_logic): always-powered flip-flops with a clock
//     gate.
//   * comparator (psm_comparator): compares target and current state. While
//     they match the PSM is idle: tl_sleep = 1 and the state clock is stopped.
//     When they differ the transition logic is woken and, WAKE_CYCLES clocks
//     later, the state clock runs until the target is reached.
//
// Timing: a new target seen at a rising edge wakes the transition logic at
// once; the state then moves one step on each of the following edges, starting
// WAKE_CYCLES edges later. A level change (e.g. LOW->HIGH) takes 1 step,
// switching the domain off or on takes 2 (through ISO). The target may change
// at any time; the machine simply heads for the newest target.
// Asynchronous active-low reset to OFF.
module self_managed_psm
  import psm_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  target_state_e target,
  output psm_ctrl_t     ctrl,
  output logic          tl_sleep,
  output logic          clk_en
);

  psm_ctrl_t next_state;

  psm_transition_logic u_tl (
    .target(target),
    .cur   (ctrl),
    .next  (next_state)
  );

  psm_state_logic #(
    .RESET_STATE(CTRL_OFF)
  ) u_sl (
    .clk   (clk),
    .rst_n (rst_n),
    .clk_en(clk_en),
    .d     (next_state),
    .q     (ctrl)
  );

  psm_comparator #(
    .WAKE_CYCLES(WAKE_CYCLES)
  ) u_cmp (
    .clk     (clk),
    .rst_n   (rst_n),
    .target  (target),
    .cur     (ctrl),
    .tl_sleep(tl_sleep),
    .clk_en  (clk_en)
  );

  // The domain is never powered down without isolation.
  a_off_isolated: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.vsel == V_OFF) |-> ctrl.iso);

endmodule
