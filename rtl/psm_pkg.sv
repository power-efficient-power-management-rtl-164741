// psm_pkg: types and encodings shared by the power-state machine (PSM) blocks.
//
// A PSM controls one power domain that can be switched between four power
// states (off, low voltage, normal voltage, high voltage). Before the domain's
// supply is switched off, and until it is switched on again, its inputs and
// outputs must be isolated, so the machine has a fifth, intermediate state
// (ISO) that can never be requested as a target.
//
// The PSM is a Medvedev machine: its three state flip-flops *are* the control
// signals of the domain, {iso, vsel[1:0]}. Two bits select one of four supply
// levels for the domain's power switch, one bit enables its isolation cells.
// The split into two switch bits and one isolation bit follows the design
// description; the code of every level and of ISO is this design's choice:
//
//   state    iso vsel   meaning
//   OFF       1   00    supply off, domain isolated
//   LOW       0   01    low supply voltage
//   NORMAL    0   10    normal supply voltage
//   HIGH      0   11    high supply voltage
//   ISO       1   10    domain isolated, supply at normal voltage
//
// The target power state is a 2-bit code with the same level numbering.
package psm_pkg;

  // Target power state, as chosen by power-mode determination.
  typedef enum logic [1:0] {
    PS_OFF    = 2'b00,
    PS_LOW    = 2'b01,
    PS_NORMAL = 2'b10,
    PS_HIGH   = 2'b11
  } target_state_e;

  // Supply-level select of the domain's power switch.
  typedef enum logic [1:0] {
    V_OFF    = 2'b00,
    V_LOW    = 2'b01,
    V_NORMAL = 2'b10,
    V_HIGH   = 2'b11
  } vsel_e;

  // Current power state = control signals of the domain's power-management
  // elements.
  typedef struct packed {
    logic  iso;   // 1: isolation cells of the domain clamp its inputs/outputs
    vsel_e vsel;  // supply level
  } psm_ctrl_t;

  localparam psm_ctrl_t CTRL_OFF    = '{iso: 1'b1, vsel: V_OFF};
  localparam psm_ctrl_t CTRL_LOW    = '{iso: 1'b0, vsel: V_LOW};
  localparam psm_ctrl_t CTRL_NORMAL = '{iso: 1'b0, vsel: V_NORMAL};
  localparam psm_ctrl_t CTRL_HIGH   = '{iso: 1'b0, vsel: V_HIGH};
  localparam psm_ctrl_t CTRL_ISO    = '{iso: 1'b1, vsel: V_NORMAL};

  // State the PSM rests in once it has reached target t.
  function automatic psm_ctrl_t target_ctrl(target_state_e t);
    psm_ctrl_t c;
    if (t == PS_OFF) c = CTRL_OFF;
    else             c = '{iso: 1'b0, vsel: vsel_e'(t)};
    return c;
  endfunction

endpackage
