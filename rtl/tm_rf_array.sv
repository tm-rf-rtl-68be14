// tm_rf_array: the trimodal register file, NUM_REGS x DATA_W bits with NUM_RD
// read ports and NUM_WR write ports (128 x 64 b, four read / two write in the
// TM-RF evaluation).
//
// Each row is a tm_register whose DEAD and DROWSY inputs come from the TM
// control logic, one pair per physical register; all rows share the N_R finger
// controls DR1/DR2. Every write port passes through a zero_write_filter: a
// zero word aimed at a row that is still discharged is skipped.
//
// Timing: reads are combinational (address in, data out in the same cycle);
// writes take effect at the next rising clock edge. A port's *_ready output
// says whether the access can complete in this cycle: rd_ready is low while
// the addressed row is drowsy, dead or still waking up, and wr_ready is low
// in the same case unless the write is skipped by zero detection. The
// requester holds the access until it is ready; this is how the wakeup delay
// shows up as a stall. rd_data shows the row's stored word even when the row
// is not ready; it is only valid with rd_ready. If two write ports address the
// same row in one cycle, the higher-numbered port wins. Port handshakes,
// conflict resolution and combinational reads are this implementation's
// choices; the geometry and port counts follow the TM-RF evaluation.
module tm_rf_array
  import tmrf_pkg::*;
#(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned NUM_RD   = 4,
  parameter int unsigned NUM_WR   = 2,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // per-register mode controls
  input  logic [NUM_REGS-1:0]            dead,
  input  logic [NUM_REGS-1:0]            drowsy,
  input  logic                           dr1,
  input  logic                           dr2,
  // read ports
  input  logic [NUM_RD-1:0]              rd_en,
  input  logic [NUM_RD-1:0][AW-1:0]      rd_addr,
  output logic [NUM_RD-1:0][DATA_W-1:0]  rd_data,
  output logic [NUM_RD-1:0]              rd_ready,
  // write ports
  input  logic [NUM_WR-1:0]              wr_en,
  input  logic [NUM_WR-1:0][AW-1:0]      wr_addr,
  input  logic [NUM_WR-1:0][DATA_W-1:0]  wr_data,
  output logic [NUM_WR-1:0]              wr_ready,
  output logic [NUM_WR-1:0]              wr_skipped,
  // row status
  output logic [NUM_REGS-1:0]            row_awake,
  output logic [NUM_REGS-1:0]            row_discharged
);

  logic [NUM_REGS-1:0][DATA_W-1:0] row_q;
  logic [NUM_REGS-1:0]             row_we;
  logic [NUM_REGS-1:0][DATA_W-1:0] row_wdata;
  logic [NUM_WR-1:0]               port_we;

  // zero detection on every write port
  for (genvar p = 0; p < NUM_WR; p++) begin : g_wport
    zero_write_filter #(.DATA_W(DATA_W)) u_zwf (
      .we_in          (wr_en[p]),
      .wdata          (wr_data[p]),
      .row_discharged (row_discharged[wr_addr[p]]),
      .we_out         (port_we[p]),
      .skipped        (wr_skipped[p])
    );
    assign wr_ready[p] = wr_skipped[p] || (wr_en[p] && row_awake[wr_addr[p]]);
  end

  // write decode: one merged write per row, the highest port wins
  always_comb begin
    row_we    = '0;
    row_wdata = '0;
    for (int r = 0; r < NUM_REGS; r++) begin
      for (int p = 0; p < NUM_WR; p++) begin
        if (port_we[p] && (wr_addr[p] == AW'(r))) begin
          row_we[r]    = 1'b1;
          row_wdata[r] = wr_data[p];
        end
      end
    end
  end

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_row
    tm_register #(.DATA_W(DATA_W)) u_reg (
      .clk        (clk),
      .rst_n      (rst_n),
      .dead       (dead[r]),
      .drowsy     (drowsy[r]),
      .dr1        (dr1),
      .dr2        (dr2),
      .we         (row_we[r]),
      .wdata      (row_wdata[r]),
      .q          (row_q[r]),
      .awake      (row_awake[r]),
      .discharged (row_discharged[r])
    );
  end

  // read ports
  for (genvar p = 0; p < NUM_RD; p++) begin : g_rport
    assign rd_data[p]  = row_q[rd_addr[p]];
    assign rd_ready[p] = rd_en[p] && row_awake[rd_addr[p]];
  end

endmodule
