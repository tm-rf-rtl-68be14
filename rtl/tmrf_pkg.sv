// tmrf_pkg: types and constants shared by the trimodal register file (TM-RF).
//
// A TM-RF register is in one of three power modes, chosen per register from the
// rename state of its physical register:
//   work   - DEAD = 0, DROWSY = 0: the register is read and written normally;
//   drowsy - DEAD = 0, DROWSY = 1: the data is retained on a raised virtual
//            ground, the register cannot be accessed until it wakes up;
//   dead   - a short DEAD pulse discharges every bit to 0, DROWSY stays 1.
// The control logic comes in two schemes: low complexity (LC), which only uses
// the conventional release condition, and high complexity (HC), which adds
// compiler-assisted early release and a drowsy state for idle registers.
// The footer transistor N_R is built from fingers controlled by DR1/DR2; the
// number of fingers on sets the wakeup delay (lp-TM: 1 cycle, aggr-TM: 2).
package tmrf_pkg;

  // Power mode of a register, as reported by the control logic.
  typedef enum logic [1:0] {
    MODE_WORK   = 2'd0,
    MODE_DROWSY = 2'd1,
    MODE_DEAD   = 2'd2
  } tm_mode_e;

  // Control scheme of the TM control logic.
  typedef enum logic {
    SCHEME_LC = 1'b0,   // Scheme I, low complexity
    SCHEME_HC = 1'b1    // Scheme II, high complexity (early release)
  } tm_scheme_e;

  // Wakeup delay, in cycles, for the two finger settings of N_R.
  localparam int unsigned WAKE_LP   = 1;  // lp-TM, all fingers on (R_NR = 18)
  localparam int unsigned WAKE_AGGR = 2;  // aggr-TM, bottom finger only (R_NR = 6)

  // Wakeup delay selected by the finger controls. DR1 = DR2 = 0 turns all
  // fingers on (lp-TM); any finger turned off weakens N_R and gives the
  // slower, aggressive setting.
  function automatic logic [1:0] wake_cycles(input logic dr1, input logic dr2);
    return (dr1 || dr2) ? 2'(WAKE_AGGR) : 2'(WAKE_LP);
  endfunction

endpackage
