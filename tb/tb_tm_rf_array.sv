// tb_tm_rf_array: self-checking test of the 128 x 64 b, 4-read / 2-write
// trimodal register file array.
//
// Every row gets its own random sequence of work, drowsy and dead periods
// while random reads and writes hit the ports. A reference model in the
// testbench holds the contents, the discharged flags and each row's cycles
// since DROWSY fell; from them it predicts read data, read/write readiness
// (the wakeup stall of 1 or 2 cycles), zero-write skipping and the winner of
// two writes to the same row. Both finger settings are run.
module tb_tm_rf_array;
  import tmrf_pkg::*;

  localparam int unsigned NUM_REGS = 128;
  localparam int unsigned DATA_W   = 64;
  localparam int unsigned NUM_RD   = 4;
  localparam int unsigned NUM_WR   = 2;
  localparam int unsigned AW       = $clog2(NUM_REGS);

  logic                          clk = 1'b0, rst_n;
  logic [NUM_REGS-1:0]           dead, drowsy;
  logic                          dr1, dr2;
  logic [NUM_RD-1:0]             rd_en, rd_ready;
  logic [NUM_RD-1:0][AW-1:0]     rd_addr;
  logic [NUM_RD-1:0][DATA_W-1:0] rd_data;
  logic [NUM_WR-1:0]             wr_en, wr_ready, wr_skipped;
  logic [NUM_WR-1:0][AW-1:0]     wr_addr;
  logic [NUM_WR-1:0][DATA_W-1:0] wr_data;
  logic [NUM_REGS-1:0]           row_awake, row_discharged;

  tm_rf_array #(.NUM_REGS(NUM_REGS), .DATA_W(DATA_W), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rd_ok = 0, n_rd_stall = 0, n_wr_ok = 0, n_wr_stall = 0, n_skip = 0, n_same_row = 0;

  logic [DATA_W-1:0] m_mem [NUM_REGS];
  logic              m_dis [NUM_REGS];
  int                m_since [NUM_REGS];

  function automatic void chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(input int cycles, input logic set_dr2);
    int w;
    logic m_awake, skip;
    // all rows asleep while the finger setting changes
    drowsy = '1; dead = '0; rd_en = '0; wr_en = '0;
    dr2 = set_dr2;
    @(posedge clk); #1;
    for (int r = 0; r < NUM_REGS; r++) m_since[r] = 0;
    w = set_dr2 ? 2 : 1;
    for (int c = 0; c < cycles; c++) begin
      for (int r = 0; r < NUM_REGS; r++) begin
        if (drowsy[r]) drowsy[r] = ($urandom_range(0, 2) != 0);
        else           drowsy[r] = ($urandom_range(0, 9) == 0);
        dead[r] = drowsy[r] && ($urandom_range(0, 5) == 0);
      end
      for (int p = 0; p < NUM_RD; p++) begin
        rd_en[p]   = $urandom_range(0, 1);
        rd_addr[p] = AW'($urandom_range(0, NUM_REGS - 1));
      end
      for (int p = 0; p < NUM_WR; p++) begin
        wr_en[p]   = $urandom_range(0, 1);
        wr_addr[p] = AW'($urandom_range(0, 15));   // small range: collisions happen
        wr_data[p] = ($urandom_range(0, 3) == 0) ? '0 : {$urandom, $urandom};
      end
      #1;
      for (int p = 0; p < NUM_RD; p++) begin
        m_awake = !drowsy[rd_addr[p]] && m_since[rd_addr[p]] >= w;
        chk("rd_ready", rd_ready[p] == (rd_en[p] && m_awake));
        if (rd_en[p] && m_awake) begin
          chk("rd_data", rd_data[p] == m_mem[rd_addr[p]]);
          n_rd_ok++;
        end else if (rd_en[p]) n_rd_stall++;
      end
      for (int p = 0; p < NUM_WR; p++) begin
        m_awake = !drowsy[wr_addr[p]] && m_since[wr_addr[p]] >= w;
        skip    = wr_en[p] && wr_data[p] == '0 && m_dis[wr_addr[p]];
        chk("wr_skipped", wr_skipped[p] == skip);
        chk("wr_ready", wr_ready[p] == (skip || (wr_en[p] && m_awake)));
        if (skip) n_skip++;
        else if (wr_en[p] && m_awake) n_wr_ok++;
        else if (wr_en[p]) n_wr_stall++;
      end
      if (wr_en[0] && wr_en[1] && wr_addr[0] == wr_addr[1]) n_same_row++;
      @(posedge clk);
      // model update
      begin
        logic [NUM_WR-1:0] do_wr;
        for (int p = 0; p < NUM_WR; p++)
          do_wr[p] = wr_en[p] && !(wr_data[p] == '0 && m_dis[wr_addr[p]]) &&
                     !drowsy[wr_addr[p]] && m_since[wr_addr[p]] >= w;
        for (int p = 0; p < NUM_WR; p++)
          if (do_wr[p] && !dead[wr_addr[p]]) begin
            m_mem[wr_addr[p]] = wr_data[p];
            m_dis[wr_addr[p]] = 1'b0;
          end
      end
      for (int r = 0; r < NUM_REGS; r++) begin
        if (dead[r]) begin m_mem[r] = '0; m_dis[r] = 1'b1; end
        if (drowsy[r]) m_since[r] = 0; else if (m_since[r] < 100) m_since[r]++;
      end
      #1;
    end
  endtask

  initial begin
    rst_n = 0; drowsy = '1; dead = '0; dr1 = 0; dr2 = 0;
    rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    for (int r = 0; r < NUM_REGS; r++) begin m_mem[r] = '0; m_dis[r] = 1'b1; m_since[r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_phase(3000, 1'b0);   // lp-TM
    run_phase(3000, 1'b1);   // aggr-TM
    // contents check through the read ports after waking every row
    drowsy = '0; dead = '0; wr_en = '0;
    repeat (3) @(posedge clk);
    #1;
    for (int r = 0; r < NUM_REGS; r++) begin
      rd_en[0] = 1'b1; rd_addr[0] = AW'(r);
      #1;
      chk("final ready", rd_ready[0]);
      chk("final data", rd_data[0] == m_mem[r]);
    end
    chk("reads served",    n_rd_ok > 0);
    chk("reads stalled",   n_rd_stall > 0);
    chk("writes done",     n_wr_ok > 0);
    chk("writes stalled",  n_wr_stall > 0);
    chk("zero writes skipped", n_skip > 0);
    chk("same-row writes", n_same_row > 0);
    $display("reads ok=%0d stalled=%0d writes ok=%0d stalled=%0d skipped=%0d same-row=%0d",
             n_rd_ok, n_rd_stall, n_wr_ok, n_wr_stall, n_skip, n_same_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
