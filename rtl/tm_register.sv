// tm_register: one physical register of the trimodal register file.
//
// The register is a row of DATA_W trimodal bit-cells that share one virtual-
// ground footer transistor (N_R); every bit-cell also has a discharge
// transistor (N_D). This module is the row's digital behaviour:
//   * work mode (drowsy = 0, dead = 0): a write with we = 1 stores wdata at the
//     clock edge; q shows the stored word;
//   * drowsy mode (drowsy = 1): the word is retained but the row cannot be
//     accessed, awake = 0;
//   * dead mode (a one-cycle dead pulse while drowsy = 1): every bit is
//     discharged to 0 at the clock edge and 'discharged' is set until the
//     next real write.
// When drowsy falls the virtual ground has to be pulled back to 0 before the
// row may be used: awake rises after the wakeup delay set by the N_R fingers,
// 1 cycle with DR1 = DR2 = 0 (lp-TM, all fingers on) and 2 cycles otherwise
// (aggr-TM, only the bottom finger on). Counted from the cycle in which
// drowsy is first low, awake is 0 for exactly that many cycles. Out of reset
// the row holds 0, counts as discharged, and needs the longer (2-cycle) wakeup
// whatever the finger setting.
//
// The three modes, the discharge to 0, the 1- and 2-cycle wakeup delays and
// the DR1/DR2 encodings of lp-TM and aggr-TM follow the TM-RF design. A write
// issued while the row is not awake is ignored (the array only issues writes
// to awake rows); the DR1 = 1 encodings, which the design does not use, are
// treated as the slow setting; the dead pulse is one clock long here, where the
// circuit uses a pulse much shorter than a clock period. These are this
// implementation's choices.
module tm_register
  import tmrf_pkg::*;
#(
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // mode controls from the TM control logic
  input  logic              dead,        // discharge pulse
  input  logic              drowsy,      // raises the virtual ground
  // N_R finger controls (lp-TM: 0/0, aggr-TM: 0/1)
  input  logic              dr1,
  input  logic              dr2,
  // write (already resolved between the write ports)
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  // state
  output logic [DATA_W-1:0] q,
  output logic              awake,       // row may be read and written
  output logic              discharged   // holds 0 from a discharge, not yet written
);

  logic [DATA_W-1:0] data_q;
  logic [1:0]        wake_cnt_q;
  logic              discharged_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q       <= '0;
      discharged_q <= 1'b1;
      wake_cnt_q   <= 2'(WAKE_AGGR);
    end else begin
      // storage: a discharge wins over a write
      if (dead) begin
        data_q       <= '0;
        discharged_q <= 1'b1;
      end else if (we && awake) begin
        data_q       <= wdata;
        discharged_q <= 1'b0;
      end
      // virtual-ground recovery after leaving drowsy / dead mode
      if (drowsy) begin
        wake_cnt_q <= wake_cycles(dr1, dr2);
      end else if (wake_cnt_q != 2'd0) begin
        wake_cnt_q <= wake_cnt_q - 2'd1;
      end
    end
  end

  assign awake      = !drowsy && (wake_cnt_q == 2'd0);
  assign q          = data_q;
  assign discharged = discharged_q;

  // The discharge pulse is only issued together with a high DROWSY.
  a_dead_with_drowsy: assert property (@(posedge clk) dead |-> drowsy);

endmodule
