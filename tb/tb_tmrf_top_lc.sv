// tb_tmrf_top_lc: end-to-end test of the trimodal register file with the
// low-complexity control scheme (SCHEME_LC), otherwise at its default size.
//
// Same core model and checks as the high-complexity test: every physical
// register goes through complete lifetimes (allocation, consumer renaming,
// 1stReady set, write, reads, producer commit, Redefiner rename and commit,
// reallocation)
// and a reference model checks mode, free flag, discharge pulse, wakeup and
// contents every cycle, with lp-TM and then aggr-TM. With this scheme a
// register is only released by the conventional condition and goes straight
// from work to dead mode: the test counts a failure if an early release or a
// drowsy period is ever seen or a read has to wait, and if write wakeup stalls, skipped zero writes or
// releases never happen. After each run a directed probe allocates one
// register and checks that its first write waits exactly the wakeup delay.
module tb_tmrf_top_lc;
  import tmrf_pkg::*;

  localparam int unsigned NUM_REGS = 128;
  localparam int unsigned DATA_W   = 64;
  localparam int unsigned NUM_RD   = 4;
  localparam int unsigned NUM_WR   = 2;
  localparam int unsigned REN_W    = 4;
  localparam int unsigned SRC_W    = 8;
  localparam int unsigned AW       = $clog2(NUM_REGS);
  localparam int          CYCLES   = 4000;

  logic clk = 1'b0, rst_n;
  logic dr1, dr2;
  logic [REN_W-1:0]              alloc_valid, alloc_first_ready, redef_valid, redef_commit_valid, prod_commit_valid, fr_set_valid;
  logic [REN_W-1:0][AW-1:0]      alloc_preg, redef_preg, redef_commit_preg, prod_commit_preg, fr_set_preg;
  logic [SRC_W-1:0]              use_valid, use_earlyfree, read_valid;
  logic [SRC_W-1:0][AW-1:0]      use_preg, read_preg;
  logic [NUM_RD-1:0]             rd_en, rd_ready;
  logic [NUM_RD-1:0][AW-1:0]     rd_addr;
  logic [NUM_RD-1:0][DATA_W-1:0] rd_data;
  logic [NUM_WR-1:0]             wr_en, wr_ready, wr_skipped;
  logic [NUM_WR-1:0][AW-1:0]     wr_addr;
  logic [NUM_WR-1:0][DATA_W-1:0] wr_data;
  logic [NUM_REGS-1:0]           reg_free, reg_dead, reg_drowsy, reg_awake, reg_discharged;
  tm_mode_e [NUM_REGS-1:0]       reg_mode;

  tmrf_top #(.SCHEME(SCHEME_LC)) dut (.*);

  always #5 clk = ~clk;

  // lifetime state of every physical register
  typedef struct {
    bit                live;
    int                uses_total, uses_ren, reads;
    bit                plan_ef, ef, frs, written, pcommit, rren, rcommit;
    logic [DATA_W-1:0] val;
  } ent_t;

  ent_t              e [NUM_REGS];
  logic [DATA_W-1:0] m_data [NUM_REGS];
  bit                m_dis [NUM_REGS];
  int                m_since [NUM_REGS];
  bit                m_free_prev [NUM_REGS];

  int checks = 0, failures = 0;
  int n_rd = 0, n_rd_stall = 0, n_wr = 0, n_wr_stall = 0, n_skip = 0;
  int n_probe = 0;
  int n_fr_alloc = 0, n_fr_late = 0;
  int n_drowsy_cyc = 0, n_early = 0, n_conv = 0, n_life = 0, n_zero_read = 0;
  int n_stall_lp = 0, n_stall_aggr = 0, max_stall_lp = 0, max_stall_aggr = 0;
  int stall_run [NUM_REGS];
  int wstall_run [NUM_REGS];
  int max_wstall_lp = 0, max_wstall_aggr = 0;

  function automatic void chk(input string what, input int r, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 25) $display("FAIL %s reg %0d at %0t", what, r, $time);
    end
  endfunction

  // expected status of register r from its lifetime state
  function automatic void expect_status(input int r, output bit free, output bit drowsy,
                                        output tm_mode_e mode, output bit conv);
    bit unmap_x, comp_x, cnt0, fr;
    unmap_x = !e[r].live || e[r].rren;
    comp_x  = !e[r].live || e[r].rcommit;
    cnt0    = (e[r].uses_ren == e[r].reads);
    fr      = e[r].live && e[r].frs && !e[r].pcommit;
    conv    = unmap_x && comp_x && cnt0;
    free    = conv;
    drowsy  = conv;
    mode    = free ? MODE_DEAD : (drowsy ? MODE_DROWSY : MODE_WORK);
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_inputs();
    alloc_valid = '0; alloc_preg = '0; alloc_first_ready = '0;
    use_valid = '0; use_preg = '0; use_earlyfree = '0;
    read_valid = '0; read_preg = '0;
    redef_valid = '0; redef_preg = '0; redef_commit_valid = '0; redef_commit_preg = '0;
    prod_commit_valid = '0; prod_commit_preg = '0; fr_set_valid = '0; fr_set_preg = '0;
    rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
  endtask

  task automatic run(input bit aggr);
    int w;
    w = aggr ? 2 : 1;
    rst_n = 1'b0; dr1 = 1'b0; dr2 = aggr;
    clear_inputs();
    for (int r = 0; r < NUM_REGS; r++) begin
      e[r] = '{live: 0, uses_total: 0, uses_ren: 0, reads: 0, plan_ef: 0, ef: 0, frs: 0,
               written: 0, pcommit: 0, rren: 0, rcommit: 0, val: '0};
      m_data[r] = '0; m_dis[r] = 1; m_since[r] = 0; m_free_prev[r] = 1; stall_run[r] = 0; wstall_run[r] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int c = 0; c < CYCLES; c++) begin
      bit       x_free [NUM_REGS], x_drowsy [NUM_REGS], x_conv [NUM_REGS], x_awake [NUM_REGS];
      tm_mode_e x_mode;
      int  n_ren, n_src, n_rdp, n_wrp, n_com;
      int  act [NUM_REGS];    // chosen action per register, -1 none
      int  port [NUM_REGS];
      int  lane [NUM_REGS];   // source-operand lane reserved for a read
      int  start;

      // ---- state checks at the start of the cycle
      for (int r = 0; r < NUM_REGS; r++) begin
        expect_status(r, x_free[r], x_drowsy[r], x_mode, x_conv[r]);
        x_awake[r] = !x_drowsy[r] && m_since[r] >= w;
        chk("mode",   r, reg_mode[r] == x_mode);
        chk("free",   r, reg_free[r] == x_free[r]);
        chk("drowsy", r, reg_drowsy[r] == x_drowsy[r]);
        chk("pulse",  r, reg_dead[r] == (x_free[r] && !m_free_prev[r]));
        chk("awake",  r, reg_awake[r] == x_awake[r]);
        chk("discharged", r, reg_discharged[r] == m_dis[r]);
        if (x_mode == MODE_DROWSY) n_drowsy_cyc++;
        if (x_free[r] && !m_free_prev[r]) begin
          if (x_conv[r]) n_conv++; else n_early++;
        end
      end

      // ---- choose one action per register
      clear_inputs();
      n_ren = 0; n_src = 0; n_rdp = 0; n_wrp = 0; n_com = 0;
      start = $urandom_range(0, NUM_REGS - 1);
      for (int k = 0; k < NUM_REGS; k++) begin
        int r, a;
        r = (start + k) % NUM_REGS;
        act[r] = -1;
        if (!e[r].live) begin
          // allocate a free register now and then
          if (x_conv[r] && n_ren < REN_W && $urandom_range(0, 9) == 0) begin
            act[r] = 0; port[r] = $urandom_range(0, 1);   // port: first writer known at rename
            alloc_valid[n_ren] = 1'b1; alloc_preg[n_ren] = AW'(r); alloc_first_ready[n_ren] = port[r][0];
            n_ren++;
          end
          continue;
        end
        if ($urandom_range(0, 2) != 0) continue;
        a = $urandom_range(1, 7);
        case (a)
          1: if (e[r].uses_ren < e[r].uses_total && n_src < SRC_W) begin
               act[r] = 1;
               use_valid[n_src] = 1'b1; use_preg[n_src] = AW'(r);
               use_earlyfree[n_src] = e[r].plan_ef && (e[r].uses_ren + 1 == e[r].uses_total);
               n_src++;
             end
          2: if (e[r].frs && !e[r].written && n_wrp < NUM_WR) begin
               act[r] = 2; port[r] = n_wrp;
               wr_en[n_wrp] = 1'b1; wr_addr[n_wrp] = AW'(r); wr_data[n_wrp] = e[r].val;
               n_wrp++;
             end
          3: if (e[r].written && e[r].reads < e[r].uses_ren && n_rdp < NUM_RD && n_src < SRC_W) begin
               act[r] = 3; port[r] = n_rdp; lane[r] = n_src;
               rd_en[n_rdp] = 1'b1; rd_addr[n_rdp] = AW'(r);
               n_rdp++; n_src++;
             end
          4: if (e[r].written && !e[r].pcommit && n_com < REN_W) begin
               act[r] = 4;
               prod_commit_valid[n_com] = 1'b1; prod_commit_preg[n_com] = AW'(r);
               n_com++;
             end
          5: if (e[r].uses_ren == e[r].uses_total && !e[r].rren && n_ren < REN_W) begin
               act[r] = 5;
               redef_valid[n_ren] = 1'b1; redef_preg[n_ren] = AW'(r);
               n_ren++;
             end
          7: if (!e[r].frs && n_com < REN_W) begin
               act[r] = 7;
               fr_set_valid[n_com] = 1'b1; fr_set_preg[n_com] = AW'(r);
               n_com++;
             end
          default:
             if (e[r].rren && e[r].pcommit && e[r].reads == e[r].uses_total && !e[r].rcommit && n_com < REN_W) begin
               act[r] = 6;
               redef_commit_valid[n_com] = 1'b1; redef_commit_preg[n_com] = AW'(r);
               n_com++;
             end
        endcase
      end
      #1;

      // ---- port responses; reads that succeed also report the operand read
      for (int r = 0; r < NUM_REGS; r++) begin
        if (act[r] == 2) begin
          bit skip_x;
          skip_x = (e[r].val == '0) && m_dis[r];
          chk("wr_skipped", r, wr_skipped[port[r]] == skip_x);
          chk("wr_ready", r, wr_ready[port[r]] == (skip_x || x_awake[r]));
          if (!wr_ready[port[r]]) begin act[r] = -1; n_wr_stall++; wstall_run[r]++; end
          else begin
            if (aggr) begin if (wstall_run[r] > max_wstall_aggr) max_wstall_aggr = wstall_run[r]; end
            else      begin if (wstall_run[r] > max_wstall_lp)   max_wstall_lp   = wstall_run[r]; end
            wstall_run[r] = 0;
            if (skip_x) n_skip++; else n_wr++;
          end
        end
        if (act[r] == 3) begin
          chk("rd_ready", r, rd_ready[port[r]] == x_awake[r]);
          if (rd_ready[port[r]]) begin
            chk("rd_data", r, rd_data[port[r]] == e[r].val);
            if (e[r].val == '0) n_zero_read++;
            read_valid[lane[r]] = 1'b1; read_preg[lane[r]] = AW'(r);
            n_rd++;
            if (stall_run[r] > 0) begin
              if (aggr) begin n_stall_aggr++; if (stall_run[r] > max_stall_aggr) max_stall_aggr = stall_run[r]; end
              else      begin n_stall_lp++;   if (stall_run[r] > max_stall_lp)   max_stall_lp   = stall_run[r]; end
            end
            stall_run[r] = 0;
          end else begin
            act[r] = -1; n_rd_stall++; stall_run[r]++;
          end
        end
      end

      @(posedge clk);

      // ---- model update for the edge
      for (int r = 0; r < NUM_REGS; r++) begin
        // row contents: discharge wins over a write
        if (act[r] == 2 && !(e[r].val == '0 && m_dis[r])) begin
          m_data[r] = e[r].val; m_dis[r] = 0;
        end
        if (x_free[r] && !m_free_prev[r]) begin m_data[r] = '0; m_dis[r] = 1; end
        m_free_prev[r] = x_free[r];
        if (x_drowsy[r]) m_since[r] = 0; else if (m_since[r] < 100) m_since[r]++;
        case (act[r])
          0: begin
               e[r].live = 1; e[r].uses_total = $urandom_range(0, 3); e[r].uses_ren = 0; e[r].reads = 0;
               e[r].plan_ef = ($urandom_range(0, 1) == 1); e[r].ef = 0; e[r].written = 0;
               e[r].frs = port[r][0]; if (e[r].frs) n_fr_alloc++; else n_fr_late++;
               e[r].pcommit = 0; e[r].rren = 0; e[r].rcommit = 0;
               e[r].val = ($urandom_range(0, 3) == 0) ? '0 : {$urandom, $urandom};
             end
          1: begin
               e[r].uses_ren++;
               if (e[r].plan_ef && e[r].uses_ren == e[r].uses_total) e[r].ef = 1;
             end
          2: e[r].written = 1;
          3: e[r].reads++;
          4: e[r].pcommit = 1;
          5: e[r].rren = 1;
          6: begin e[r].rcommit = 1; e[r].live = 0; n_life++; end
          7: e[r].frs = 1;
          default: ;
        endcase
      end
      #1;
    end
  endtask


  // Directed wakeup-latency probe: after a reset, allocate one register and
  // try to write it in every cycle; the write must wait exactly the wakeup
  // delay. Then let it go idle (drowsy), rename a reader and try to read it in
  // every cycle; the read must wait exactly the wakeup delay too.
  task automatic probe(input bit aggr, input bit check_read);
    int w, waited;
    logic [DATA_W-1:0] v;
    w = aggr ? 2 : 1;
    v = DATA_W'(64'h0123_4567_89ab_cdef);
    rst_n = 1'b0; dr1 = 1'b0; dr2 = aggr;
    clear_inputs();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    alloc_valid[0] = 1'b1; alloc_preg[0] = AW'(5); alloc_first_ready[0] = 1'b1;
    @(posedge clk); #1;
    clear_inputs();
    waited = 0;
    wr_en[0] = 1'b1; wr_addr[0] = AW'(5); wr_data[0] = v;
    #1;
    while (!wr_ready[0] && waited < 10) begin
      @(posedge clk); #1; waited++;
    end
    chk("write wakeup latency", 5, waited == w);
    if (waited == w) n_probe++;
    @(posedge clk); #1;
    clear_inputs();
    if (check_read) begin
      // first writer commits: no readers, not early-free -> drowsy
      prod_commit_valid[0] = 1'b1; prod_commit_preg[0] = AW'(5);
      @(posedge clk); #1;
      clear_inputs();
      repeat (3) @(posedge clk);
      #1;
      chk("idle register drowsy", 5, reg_mode[5] == MODE_DROWSY);
      use_valid[0] = 1'b1; use_preg[0] = AW'(5);
      @(posedge clk); #1;
      clear_inputs();
      waited = 0;
      rd_en[0] = 1'b1; rd_addr[0] = AW'(5);
      #1;
      while (!rd_ready[0] && waited < 10) begin
        @(posedge clk); #1; waited++;
      end
      chk("read wakeup latency", 5, waited == w);
      chk("data kept through drowsy mode", 5, rd_data[0] == v);
      if (waited == w) n_probe++;
      clear_inputs();
    end
  endtask

  initial begin
    run(1'b0);   // lp-TM: DR1 = DR2 = 0
    probe(1'b0, 1'b0);
    run(1'b1);   // aggr-TM: DR1 = 0, DR2 = 1
    probe(1'b1, 1'b0);
    chk("reads served",          -1, n_rd > 0);
    chk("directed latency probes passed", -1, n_probe == 2);
    // registers stay in work mode from allocation to release: reads never wait
    chk("no read stalls",        -1, n_rd_stall == 0);
    chk("write wakeup stalls",   -1, n_wr_stall > 0);
    chk("lp write stall at most 1 cycle",   -1, max_wstall_lp <= 1);
    chk("aggr write stall at most 2 cycles", -1, max_wstall_aggr <= 2);
    chk("writes done",           -1, n_wr > 0);
    chk("zero writes skipped",   -1, n_skip > 0);
    chk("1stReady set at rename", -1, n_fr_alloc > 0);
    chk("1stReady set later",    -1, n_fr_late > 0);
    chk("zero values read back", -1, n_zero_read > 0);
    chk("no drowsy periods",     -1, n_drowsy_cyc == 0);
    chk("no early releases",     -1, n_early == 0);
    chk("conventional releases", -1, n_conv > 0);
    $display("lifetimes=%0d reads=%0d (stalled %0d) writes=%0d (stalled %0d, zero-skipped %0d)",
             n_life, n_rd, n_rd_stall, n_wr, n_wr_stall, n_skip);
    $display("read stalls: lp %0d (max %0d cycles), aggr %0d (max %0d cycles)",
             n_stall_lp, max_stall_lp, n_stall_aggr, max_stall_aggr);
    $display("longest write stall: lp %0d cycles, aggr %0d cycles", max_wstall_lp, max_wstall_aggr);
    $display("drowsy register-cycles=%0d releases: early %0d conventional %0d",
             n_drowsy_cyc, n_early, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
