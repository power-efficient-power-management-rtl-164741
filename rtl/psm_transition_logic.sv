// psm_transition_logic: next-state function of the power-state machine.
//
// Purely combinational. Given the current state (= the domain control
// signals {iso, vsel}) and the 2-bit target power state, it returns the state
// to load at the next enabled clock edge. Each step moves one state towards
// the target:
//   * current == target state           -> stay
//   * powered, not isolated, target on  -> directly to the target level
//   * powered, not isolated, target OFF -> ISO (isolate first, supply stays)
//   * isolated and powered (ISO)        -> OFF if target is OFF, otherwise
//                                          the target level (isolation released)
//   * supply off (OFF), target on       -> ISO (supply restored, still isolated)
// So a level change takes one step and switching the domain off or on takes
// two. The unused codes {0,00}, {1,01}, {1,11} are steered back into the
// legal states by the same rules.
//
// That the domain is isolated before power-off, that ISO is a pure
// intermediate state and that any state can reach any other follow the
// design description; the exact route (always through ISO, ISO at normal
// voltage) is this design's choice.
//
// In the self-managed PSM this block sits in its own switchable supply and is
// powered down whenever the PSM is idle; its output is only sampled while it
// is powered, so it needs no output isolation.
module psm_transition_logic
  import psm_pkg::*;
(
  input  target_state_e target,
  input  psm_ctrl_t     cur,
  output psm_ctrl_t     next
);

  always_comb begin
    if (cur == target_ctrl(target)) begin
      next = cur;
    end else if (cur.vsel == V_OFF) begin
      // Supply off: for OFF just make sure isolation is on; otherwise power
      // up while isolated.
      next = (target == PS_OFF) ? CTRL_OFF : CTRL_ISO;
    end else if (target == PS_OFF) begin
      // Powered: isolate first, then switch the supply off.
      next = cur.iso ? CTRL_OFF : CTRL_ISO;
    end else begin
      // Powered and an on-level requested: go there, releasing isolation.
      next = target_ctrl(target);
    end
  end

endmodule
