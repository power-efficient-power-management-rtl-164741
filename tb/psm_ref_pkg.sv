// psm_ref_pkg: reference model of the power-state machine for the testbenches.
//
// Written from the state table, with literal 3-bit codes {iso, vsel}, and
// without the RTL package's types or functions, so that a mistake in the RTL
// encoding or route is not copied into the expected values.
//   OFF=100 LOW=001 NORMAL=010 HIGH=011 ISO=110; targets 0=OFF 1=LOW 2=NORMAL 3=HIGH
package psm_ref_pkg;

  // State in which the PSM rests for target t.
  function automatic logic [2:0] ref_goal(logic [1:0] t);
    case (t)
      2'd0:    return 3'b100;
      2'd1:    return 3'b001;
      2'd2:    return 3'b010;
      default: return 3'b011;
    endcase
  endfunction

  // One enabled step of the machine.
  function automatic logic [2:0] ref_next(logic [2:0] cur, logic [1:0] t);
    logic [2:0] g;
    g = ref_goal(t);
    if (cur == g) return cur;
    case (cur)
      3'b100:                return 3'b110;                       // off: power up isolated
      3'b000:                return (t == 2'd0) ? 3'b100 : 3'b110; // illegal: unisolated off
      3'b110, 3'b101, 3'b111: return (t == 2'd0) ? 3'b100 : g;     // isolated, powered
      default:               return (t == 2'd0) ? 3'b110 : g;     // on levels
    endcase
  endfunction

  // Number of enabled steps from cur to the goal of t.
  function automatic int ref_steps(logic [2:0] cur, logic [1:0] t);
    int n;
    logic [2:0] s;
    n = 0;
    s = cur;
    while (s != ref_goal(t) && n < 8) begin
      s = ref_next(s, t);
      n++;
    end
    return n;
  endfunction

  // Cycle model of a self-managed PSM (comparator + transition + state logic).
  typedef struct {
    logic [2:0] st;
    int unsigned cnt;
  } psm_model_t;

  function automatic logic model_sleep(psm_model_t m, logic [1:0] t);
    return m.st == ref_goal(t);
  endfunction

  function automatic logic model_en(psm_model_t m, logic [1:0] t, int unsigned wake);
    return (m.st != ref_goal(t)) && (m.cnt >= wake);
  endfunction

  // Advance the model over one rising clock edge with target t.
  function automatic psm_model_t model_step(psm_model_t m, logic [1:0] t, int unsigned wake);
    psm_model_t r;
    r = m;
    if (model_en(m, t, wake)) r.st = ref_next(m.st, t);
    if (m.st == ref_goal(t)) r.cnt = 0;
    else if (m.cnt < wake)   r.cnt = m.cnt + 1;
    return r;
  endfunction

endpackage
