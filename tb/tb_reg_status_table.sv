// tb_reg_status_table: self-checking test of the per-register rename status.
//
// Random rename, operand-read and commit events, several per cycle and often
// on the same register, are applied; a reference model in the testbench keeps
// Unmap, Complete, Counter, Earlyfree and 1stReady per register, applying an
// allocation before the other events of its cycle, and a commit of the first
// writer after a 1stReady set of the same cycle. Reads are only issued for
// registers with pending readers, so the counter never underflows. All
// outputs are compared after every clock edge.
module tb_reg_status_table;
  localparam int unsigned NUM_REGS = 128;
  localparam int unsigned REN_W    = 4;
  localparam int unsigned SRC_W    = 8;
  localparam int unsigned CNT_W    = 8;
  localparam int unsigned AW       = $clog2(NUM_REGS);
  localparam int unsigned HOT      = 12;   // events concentrate on few registers

  logic clk = 1'b0, rst_n;
  logic [REN_W-1:0]           alloc_valid, alloc_first_ready, redef_valid, redef_commit_valid, prod_commit_valid, fr_set_valid;
  logic [REN_W-1:0][AW-1:0]   alloc_preg, redef_preg, redef_commit_preg, prod_commit_preg, fr_set_preg;
  logic [SRC_W-1:0]           use_valid, use_earlyfree, read_valid;
  logic [SRC_W-1:0][AW-1:0]   use_preg, read_preg;
  logic [NUM_REGS-1:0]        unmap, complete, cnt_zero, earlyfree, first_ready;
  logic [NUM_REGS-1:0][CNT_W-1:0] counter;

  reg_status_table #(.NUM_REGS(NUM_REGS), .REN_W(REN_W), .SRC_W(SRC_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_frset = 0;
  int n_alloc = 0, n_use = 0, n_read = 0, n_redef = 0, n_rcommit = 0, n_pcommit = 0, n_ef = 0;
  logic m_unmap [NUM_REGS], m_comp [NUM_REGS], m_ef [NUM_REGS], m_fr [NUM_REGS];
  int   m_cnt [NUM_REGS];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int r = 0; r < NUM_REGS; r++) begin
      checks++;
      if (unmap[r] != m_unmap[r] || complete[r] != m_comp[r] || earlyfree[r] != m_ef[r] ||
          first_ready[r] != m_fr[r] || int'(counter[r]) != m_cnt[r] || cnt_zero[r] != (m_cnt[r] == 0)) begin
        failures++;
        if (failures < 20)
          $display("FAIL reg %0d at %0t: u=%0b/%0b c=%0b/%0b ef=%0b/%0b fr=%0b/%0b cnt=%0d/%0d", r, $time,
                   unmap[r], m_unmap[r], complete[r], m_comp[r], earlyfree[r], m_ef[r],
                   first_ready[r], m_fr[r], counter[r], m_cnt[r]);
      end
    end
  endtask

  initial begin
    int pend [NUM_REGS];
    rst_n = 0;
    alloc_valid = '0; alloc_preg = '0; alloc_first_ready = '0;
    use_valid = '0; use_preg = '0; use_earlyfree = '0; read_valid = '0; read_preg = '0;
    redef_valid = '0; redef_preg = '0; redef_commit_valid = '0; redef_commit_preg = '0;
    prod_commit_valid = '0; prod_commit_preg = '0; fr_set_valid = '0; fr_set_preg = '0;
    for (int r = 0; r < NUM_REGS; r++) begin
      m_unmap[r] = 1; m_comp[r] = 1; m_ef[r] = 0; m_fr[r] = 0; m_cnt[r] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 compare_all();
    for (int c = 0; c < 3000; c++) begin
      for (int l = 0; l < REN_W; l++) begin
        alloc_valid[l]        = ($urandom_range(0, 5) == 0);
        alloc_preg[l]         = AW'($urandom_range(0, HOT - 1) + (l == 3 ? 100 : 0));
        alloc_first_ready[l]  = ($urandom_range(0, 3) != 0);
        redef_valid[l]        = ($urandom_range(0, 4) == 0);
        redef_preg[l]         = AW'($urandom_range(0, HOT - 1));
        redef_commit_valid[l] = ($urandom_range(0, 4) == 0);
        redef_commit_preg[l]  = AW'($urandom_range(0, HOT - 1));
        prod_commit_valid[l]  = ($urandom_range(0, 4) == 0);
        prod_commit_preg[l]   = AW'($urandom_range(0, HOT - 1));
        fr_set_valid[l]       = ($urandom_range(0, 5) == 0);
        fr_set_preg[l]        = AW'($urandom_range(0, HOT - 1));
      end
      // avoid allocating one register on two lanes in a cycle
      for (int l = 1; l < REN_W; l++)
        for (int k = 0; k < l; k++)
          if (alloc_valid[k] && alloc_preg[k] == alloc_preg[l]) alloc_valid[l] = 1'b0;
      for (int r = 0; r < NUM_REGS; r++) pend[r] = m_cnt[r];
      for (int l = 0; l < SRC_W; l++) begin
        use_valid[l]     = ($urandom_range(0, 2) == 0);
        use_preg[l]      = AW'($urandom_range(0, HOT - 1));
        use_earlyfree[l] = ($urandom_range(0, 5) == 0);
        read_preg[l]     = AW'($urandom_range(0, HOT - 1));
        read_valid[l]    = ($urandom_range(0, 1) == 0) && pend[read_preg[l]] > 0;
        // a register allocated this cycle starts from zero: no reads of it
        for (int k = 0; k < REN_W; k++)
          if (alloc_valid[k] && alloc_preg[k] == read_preg[l]) read_valid[l] = 1'b0;
        if (read_valid[l]) pend[read_preg[l]]--;
      end
      // model
      for (int l = 0; l < REN_W; l++)
        if (alloc_valid[l]) begin
          m_unmap[alloc_preg[l]] = 0; m_comp[alloc_preg[l]] = 0; m_ef[alloc_preg[l]] = 0;
          m_fr[alloc_preg[l]] = alloc_first_ready[l]; m_cnt[alloc_preg[l]] = 0; n_alloc++;
        end
      for (int l = 0; l < SRC_W; l++) begin
        if (use_valid[l]) begin
          m_cnt[use_preg[l]]++; n_use++;
          if (use_earlyfree[l]) begin m_ef[use_preg[l]] = 1; n_ef++; end
        end
        if (read_valid[l]) begin m_cnt[read_preg[l]]--; n_read++; end
      end
      for (int l = 0; l < REN_W; l++) begin
        if (redef_valid[l])        begin m_unmap[redef_preg[l]] = 1; n_redef++; end
        if (redef_commit_valid[l]) begin m_comp[redef_commit_preg[l]] = 1; n_rcommit++; end
        if (fr_set_valid[l])       begin m_fr[fr_set_preg[l]] = 1; n_frset++; end
        if (prod_commit_valid[l])  begin m_fr[prod_commit_preg[l]] = 0; n_pcommit++; end
      end
      @(posedge clk);
      #1 compare_all();
    end
    checks++;
    if (n_alloc == 0 || n_use == 0 || n_read == 0 || n_redef == 0 || n_rcommit == 0 || n_pcommit == 0 || n_ef == 0 || n_frset == 0) begin
      failures++;
      $display("FAIL some event kind never happened");
    end
    $display("alloc=%0d use=%0d read=%0d redef=%0d redef_commit=%0d prod_commit=%0d earlyfree=%0d",
             n_alloc, n_use, n_read, n_redef, n_rcommit, n_pcommit, n_ef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
