// tmrf_top: trimodal register file (TM-RF) with its control.
//
// The register file keeps each physical register in the cheapest power mode
// its rename state allows. A register that holds a value still to be read is
// in work mode; a register whose readers have all read it, but which must be
// kept for branch-misprediction recovery, is drowsy (data retained at low
// leakage); a register that has been released is discharged to 0 and left in
// dead mode (minimum leakage). The rename status table tracks, per physical
// register, the fields that decide this; one tm_control_logic per register
// turns them into DEAD/DROWSY; the tm_rf_array applies them to its rows.
//
// Interface:
//   * rename/issue/commit events from the core drive the status table
//     (see reg_status_table for their meaning);
//   * NUM_RD read and NUM_WR write ports access the register file, each with
//     a ready output that is low while the addressed register wakes up
//     (1 cycle with dr1 = dr2 = 0, lp-TM; 2 cycles with dr2 = 1, aggr-TM);
//   * reg_free lists the registers the allocator may reuse; reg_mode,
//     reg_dead and reg_drowsy show each register's mode, reg_awake whether it
//     can be accessed and reg_discharged whether it still holds the 0 left by
//     a discharge.
// Timing: status events are applied at the clock edge; the new DROWSY level
// acts in the next cycle, together with the one-cycle DEAD pulse of a newly
// released register, which clears the row at the end of that cycle. Reads are
// combinational, writes take effect at the clock edge.
//
// Sizes follow the evaluated configuration: 128 physical registers of 64 bits,
// four read and two write ports, a 4-wide machine. The default control scheme
// is the high-complexity one (SCHEME = SCHEME_HC); SCHEME_LC selects the
// low-complexity scheme. The choice of lp-TM or aggr-TM is made at run time
// through dr1/dr2, as in the finger-based layout.
module tmrf_top
  import tmrf_pkg::*;
#(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned NUM_RD   = 4,
  parameter int unsigned NUM_WR   = 2,
  parameter int unsigned REN_W    = 4,
  parameter int unsigned SRC_W    = 8,
  parameter int unsigned CNT_W    = 8,
  parameter tm_scheme_e  SCHEME   = SCHEME_HC,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // N_R finger controls
  input  logic                           dr1,
  input  logic                           dr2,
  // rename / issue / commit events
  input  logic [REN_W-1:0]               alloc_valid,
  input  logic [REN_W-1:0][AW-1:0]       alloc_preg,
  input  logic [REN_W-1:0]               alloc_first_ready,
  input  logic [REN_W-1:0]               fr_set_valid,
  input  logic [REN_W-1:0][AW-1:0]       fr_set_preg,
  input  logic [SRC_W-1:0]               use_valid,
  input  logic [SRC_W-1:0][AW-1:0]       use_preg,
  input  logic [SRC_W-1:0]               use_earlyfree,
  input  logic [SRC_W-1:0]               read_valid,
  input  logic [SRC_W-1:0][AW-1:0]       read_preg,
  input  logic [REN_W-1:0]               redef_valid,
  input  logic [REN_W-1:0][AW-1:0]       redef_preg,
  input  logic [REN_W-1:0]               redef_commit_valid,
  input  logic [REN_W-1:0][AW-1:0]       redef_commit_preg,
  input  logic [REN_W-1:0]               prod_commit_valid,
  input  logic [REN_W-1:0][AW-1:0]       prod_commit_preg,
  // register file ports
  input  logic [NUM_RD-1:0]              rd_en,
  input  logic [NUM_RD-1:0][AW-1:0]      rd_addr,
  output logic [NUM_RD-1:0][DATA_W-1:0]  rd_data,
  output logic [NUM_RD-1:0]              rd_ready,
  input  logic [NUM_WR-1:0]              wr_en,
  input  logic [NUM_WR-1:0][AW-1:0]      wr_addr,
  input  logic [NUM_WR-1:0][DATA_W-1:0]  wr_data,
  output logic [NUM_WR-1:0]              wr_ready,
  output logic [NUM_WR-1:0]              wr_skipped,
  // per-register status
  output logic [NUM_REGS-1:0]            reg_free,
  output logic [NUM_REGS-1:0]            reg_dead,
  output logic [NUM_REGS-1:0]            reg_drowsy,
  output tm_mode_e [NUM_REGS-1:0]        reg_mode,
  output logic [NUM_REGS-1:0]            reg_awake,
  output logic [NUM_REGS-1:0]            reg_discharged
);

  logic [NUM_REGS-1:0]            st_unmap, st_complete, st_cnt_zero, st_ef, st_fr;

  reg_status_table #(
    .NUM_REGS (NUM_REGS),
    .REN_W    (REN_W),
    .SRC_W    (SRC_W),
    .CNT_W    (CNT_W)
  ) u_status (
    .clk                (clk),
    .rst_n              (rst_n),
    .alloc_valid        (alloc_valid),
    .alloc_preg         (alloc_preg),
    .alloc_first_ready  (alloc_first_ready),
    .fr_set_valid       (fr_set_valid),
    .fr_set_preg        (fr_set_preg),
    .use_valid          (use_valid),
    .use_preg           (use_preg),
    .use_earlyfree      (use_earlyfree),
    .read_valid         (read_valid),
    .read_preg          (read_preg),
    .redef_valid        (redef_valid),
    .redef_preg         (redef_preg),
    .redef_commit_valid (redef_commit_valid),
    .redef_commit_preg  (redef_commit_preg),
    .prod_commit_valid  (prod_commit_valid),
    .prod_commit_preg   (prod_commit_preg),
    .unmap              (st_unmap),
    .complete           (st_complete),
    .counter            (),
    .cnt_zero           (st_cnt_zero),
    .earlyfree          (st_ef),
    .first_ready        (st_fr)
  );

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_ctrl
    tm_control_logic #(.SCHEME(SCHEME)) u_ctrl (
      .clk         (clk),
      .rst_n       (rst_n),
      .unmap       (st_unmap[r]),
      .complete    (st_complete[r]),
      .cnt_zero    (st_cnt_zero[r]),
      .earlyfree   (st_ef[r]),
      .first_ready (st_fr[r]),
      .dead        (reg_dead[r]),
      .drowsy      (reg_drowsy[r]),
      .free        (reg_free[r]),
      .mode        (reg_mode[r])
    );
  end

  // The allocator only hands out registers that the control logic reports free.
  for (genvar l = 0; l < REN_W; l++) begin : g_chk
    a_alloc_free: assert property (@(posedge clk) alloc_valid[l] |-> reg_free[alloc_preg[l]]);
  end

  tm_rf_array #(
    .NUM_REGS (NUM_REGS),
    .DATA_W   (DATA_W),
    .NUM_RD   (NUM_RD),
    .NUM_WR   (NUM_WR)
  ) u_array (
    .clk            (clk),
    .rst_n          (rst_n),
    .dead           (reg_dead),
    .drowsy         (reg_drowsy),
    .dr1            (dr1),
    .dr2            (dr2),
    .rd_en          (rd_en),
    .rd_addr        (rd_addr),
    .rd_data        (rd_data),
    .rd_ready       (rd_ready),
    .wr_en          (wr_en),
    .wr_addr        (wr_addr),
    .wr_data        (wr_data),
    .wr_ready       (wr_ready),
    .wr_skipped     (wr_skipped),
    .row_awake      (reg_awake),
    .row_discharged (reg_discharged)
  );

endmodule
