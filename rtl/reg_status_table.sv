// reg_status_table: rename status of every physical register, the input of
// the TM control logic.
//
// One entry per physical register holds the three fields of conventional
// rename logic and the two extra bits of the high-complexity scheme:
//   unmap       - 1 when the register is not the current mapping of an
//                 architectural register (set when its Redefiner is renamed);
//   complete    - 1 when the Redefiner has committed, so the old value can no
//                 longer be needed for recovery;
//   counter     - number of renamed consumers that have not yet read it;
//   earlyfree   - compiler mark: the LastUser has been renamed and no branch is
//                 pending between it and the Redefiner (early release allowed);
//   first_ready - the first instruction that writes valid data into the
//                 register is on its way; set either with the allocation or by
//                 a later fr_set event (for example when that instruction
//                 issues), cleared when that instruction commits.
// Events arrive on lanes (REN_W per cycle for rename/commit of destinations,
// SRC_W per cycle for source operands), each a valid bit plus a register
// number; all events of a cycle are applied together at the clock edge, with
// an allocation applied before the other events of the same cycle. Outputs are
// the registered fields.
//
// The fields and their meaning follow the TM-RF control description. The
// event lanes, the lane counts (4-wide rename and commit, two sources per
// instruction), the counter width, the reset state (every register free) and
// the exact event that sets each flag are this implementation's choices.
module reg_status_table #(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned REN_W    = 4,
  parameter int unsigned SRC_W    = 8,
  parameter int unsigned CNT_W    = 8,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // rename of a producer: a free register becomes mapped
  input  logic [REN_W-1:0]               alloc_valid,
  input  logic [REN_W-1:0][AW-1:0]       alloc_preg,
  input  logic [REN_W-1:0]               alloc_first_ready,  // compiler found its first writer
  // the first writer is about to write: set 1stReady (wakes an empty register)
  input  logic [REN_W-1:0]               fr_set_valid,
  input  logic [REN_W-1:0][AW-1:0]       fr_set_preg,
  // rename of a consumer: one more pending reader
  input  logic [SRC_W-1:0]               use_valid,
  input  logic [SRC_W-1:0][AW-1:0]       use_preg,
  input  logic [SRC_W-1:0]               use_earlyfree,      // LastUser, no pending branch
  // a consumer has read its operand (from the RF or a bypass)
  input  logic [SRC_W-1:0]               read_valid,
  input  logic [SRC_W-1:0][AW-1:0]       read_preg,
  // rename of the Redefiner of the register's architectural register
  input  logic [REN_W-1:0]               redef_valid,
  input  logic [REN_W-1:0][AW-1:0]       redef_preg,
  // commit of that Redefiner
  input  logic [REN_W-1:0]               redef_commit_valid,
  input  logic [REN_W-1:0][AW-1:0]       redef_commit_preg,
  // commit of the register's first writer
  input  logic [REN_W-1:0]               prod_commit_valid,
  input  logic [REN_W-1:0][AW-1:0]       prod_commit_preg,
  // status
  output logic [NUM_REGS-1:0]            unmap,
  output logic [NUM_REGS-1:0]            complete,
  output logic [NUM_REGS-1:0][CNT_W-1:0] counter,
  output logic [NUM_REGS-1:0]            cnt_zero,
  output logic [NUM_REGS-1:0]            earlyfree,
  output logic [NUM_REGS-1:0]            first_ready
);

  logic [NUM_REGS-1:0]            unmap_q, complete_q, ef_q, fr_q;
  logic [NUM_REGS-1:0][CNT_W-1:0] cnt_q;

  logic [NUM_REGS-1:0]            unmap_d, complete_d, ef_d, fr_d;
  logic [NUM_REGS-1:0][CNT_W-1:0] cnt_d;
  logic [NUM_REGS-1:0]            underflow;   // more reads than pending readers

  always_comb begin
    unmap_d    = unmap_q;
    complete_d = complete_q;
    ef_d       = ef_q;
    fr_d       = fr_q;
    cnt_d      = cnt_q;
    underflow  = '0;
    for (int r = 0; r < NUM_REGS; r++) begin
      // allocation first
      for (int l = 0; l < REN_W; l++) begin
        if (alloc_valid[l] && alloc_preg[l] == AW'(r)) begin
          unmap_d[r]    = 1'b0;
          complete_d[r] = 1'b0;
          ef_d[r]       = 1'b0;
          fr_d[r]       = alloc_first_ready[l];
          cnt_d[r]      = '0;
        end
      end
      // source operands: renamed readers, then completed reads
      for (int l = 0; l < SRC_W; l++) begin
        if (use_valid[l] && use_preg[l] == AW'(r)) begin
          cnt_d[r] = cnt_d[r] + CNT_W'(1);
          if (use_earlyfree[l]) ef_d[r] = 1'b1;
        end
      end
      for (int l = 0; l < SRC_W; l++) begin
        if (read_valid[l] && read_preg[l] == AW'(r)) begin
          if (cnt_d[r] == '0) underflow[r] = 1'b1;
          cnt_d[r] = cnt_d[r] - CNT_W'(1);
        end
      end
      // destination events
      for (int l = 0; l < REN_W; l++) begin
        if (redef_valid[l] && redef_preg[l] == AW'(r))               unmap_d[r]    = 1'b1;
        if (redef_commit_valid[l] && redef_commit_preg[l] == AW'(r)) complete_d[r] = 1'b1;
        if (fr_set_valid[l] && fr_set_preg[l] == AW'(r))             fr_d[r]       = 1'b1;
        if (prod_commit_valid[l] && prod_commit_preg[l] == AW'(r))   fr_d[r]       = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unmap_q    <= '1;
      complete_q <= '1;
      ef_q       <= '0;
      fr_q       <= '0;
      cnt_q      <= '0;
    end else begin
      unmap_q    <= unmap_d;
      complete_q <= complete_d;
      ef_q       <= ef_d;
      fr_q       <= fr_d;
      cnt_q      <= cnt_d;
    end
  end

  always_comb begin
    unmap       = unmap_q;
    complete    = complete_q;
    earlyfree   = ef_q;
    first_ready = fr_q;
    counter     = cnt_q;
    for (int r = 0; r < NUM_REGS; r++) cnt_zero[r] = (cnt_q[r] == '0);
  end

  // A consumer can only report a read of a register that has pending readers.
  a_no_underflow: assert property (@(posedge clk) underflow == '0);

endmodule
