// pmu: power-management unit built from self-managed power-state machines.
//
// A system is divided into NUM_PD power domains (three by default: PD1, PD2
// and PD3, where two system blocks sharing one supply form a single domain and
// need only one PSM). Power-mode determination, outside this module, chooses
// the system power mode and hands each domain its target power state on
// `target`. One self_managed_psm per domain then sequences that domain to its
// target and drives its power-management elements with pd_ctrl[i] =
// {iso, vsel[1:0]}: isolation-cell enable and supply-level select of the
// domain's power switch.
//
// Each PSM powers its own transition logic down through tl_sleep[i] (to the
// power switch of that logic) and stops its own state clock (psm_clk_en[i],
// brought out for observation) whenever its domain is already in its target
// state, so an idle PMU consumes little beyond the state flip-flops and the
// comparators.
//
// All PSMs share clk and the asynchronous active-low reset, which puts every
// domain in OFF. Timing per domain as in self_managed_psm.
module pmu
  import psm_pkg::*;
#(
  parameter int unsigned NUM_PD      = 3,
  parameter int unsigned WAKE_CYCLES = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  target_state_e target     [NUM_PD],
  output psm_ctrl_t     pd_ctrl    [NUM_PD],
  output logic [NUM_PD-1:0] tl_sleep,
  output logic [NUM_PD-1:0] psm_clk_en
);

  for (genvar i = 0; i < NUM_PD; i++) begin : g_psm
    self_managed_psm #(
      .WAKE_CYCLES(WAKE_CYCLES)
    ) u_psm (
      .clk     (clk),
      .rst_n   (rst_n),
      .target  (target[i]),
      .ctrl    (pd_ctrl[i]),
      .tl_sleep(tl_sleep[i]),
      .clk_en  (psm_clk_en[i])
    );
  end

endmodule
