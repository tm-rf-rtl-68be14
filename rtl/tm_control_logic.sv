// tm_control_logic: TM control for one physical register. It turns the
// register's rename status into the DEAD and DROWSY signals of its row.
//
// Release condition, both schemes: unmap = 1, complete = 1, counter = 0.
// Scheme LC (low complexity):
//   released            -> DROWSY = 1 (dead mode), DEAD pulse on entry
//   otherwise            -> DROWSY = DEAD = 0 (work mode)
// Scheme HC (high complexity), adding compiler-assisted early release:
//   released, or early release (counter = 0, earlyfree = 1, first_ready = 0)
//                        -> dead mode, DEAD pulse on entry
//   counter = 0 and first_ready = 0 (idle, kept for branch recovery)
//                        -> DROWSY = 1, DEAD = 0 (drowsy mode)
//   otherwise            -> work mode
// DROWSY and the mode are combinational in the status inputs. The DEAD pulse
// is high for the single cycle in which the free condition first holds
// (an edge detector on one flip-flop); the row discharges at the end of that
// cycle. 'free' tells the allocator that the register may be reused.
//
// The decision table follows the TM-RF control schemes. The counter that the
// early-release condition calls RegUse is taken to be the same pending-reader
// counter as in the conventional condition; the one-cycle pulse length is
// this implementation's choice.
module tm_control_logic
  import tmrf_pkg::*;
#(
  parameter tm_scheme_e SCHEME = SCHEME_HC
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     unmap,
  input  logic     complete,
  input  logic     cnt_zero,
  input  logic     earlyfree,
  input  logic     first_ready,
  output logic     dead,
  output logic     drowsy,
  output logic     free,
  output tm_mode_e mode
);

  logic conv_release, early_release, idle;
  logic free_q;

  always_comb begin
    conv_release  = unmap && complete && cnt_zero;
    early_release = (SCHEME == SCHEME_HC) && cnt_zero && earlyfree && !first_ready;
    idle          = (SCHEME == SCHEME_HC) && cnt_zero && !first_ready;
    free          = conv_release || early_release;
    drowsy        = free || idle;
    dead          = free && !free_q;
    if (free)        mode = MODE_DEAD;
    else if (drowsy) mode = MODE_DROWSY;
    else             mode = MODE_WORK;
  end

  // Reset state: free and already discharged (the rows reset to 0), so no
  // pulse is issued for registers that are free out of reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free_q <= 1'b1;
    else        free_q <= free;
  end

endmodule
