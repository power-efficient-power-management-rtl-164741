// psm_state_logic: state register of the power-state machine.
//
// Three flip-flops hold the power state, which is at the same time the set of
// control signals of the domain's power-management elements (a Medvedev
// machine: no output logic, so the control signals change together on one
// clock edge and cannot glitch). These flip-flops stay powered all the time;
// their clock runs through a clock gate and is stopped while clk_en is 0, so
// the state cannot change while the transition logic feeding d is powered
// down. d is only looked at on a gated clock edge, which is why the
// (possibly floating) output of a powered-down transition logic needs no
// isolation here.
//
// Timing: q takes d on a rising clk edge when clk_en was 1 during the low
// phase before it. Asynchronous active-low reset to RESET_STATE (OFF by
// default: reset behaviour is this design's choice).
module psm_state_logic
  import psm_pkg::*;
#(
  parameter psm_ctrl_t RESET_STATE = CTRL_OFF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clk_en,
  input  psm_ctrl_t d,
  output psm_ctrl_t q
);

  logic gclk;

  clock_gate u_cg (
    .clk (clk),
    .en  (clk_en),
    .gclk(gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RESET_STATE;
    else        q <= d;
  end

endmodule
