// tb_tm_register: self-checking test of one trimodal register row.
//
// Random sequences of drowsy periods, discharge pulses and writes are applied
// with both finger settings. A reference model kept in the testbench tracks the
// stored word, whether the row has been discharged since the last write, and
// how many cycles have passed since DROWSY fell; the row must be awake exactly
// when DROWSY is low and at least the wakeup delay has passed: 1 cycle for
// lp-TM and 2 for aggr-TM, as set while the row slept, and 2 after reset.
module tb_tm_register;
  import tmrf_pkg::*;

  localparam int unsigned DATA_W = 64;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              dead, drowsy, dr1, dr2, we;
  logic [DATA_W-1:0] wdata, q;
  logic              awake, discharged;

  int checks = 0, failures = 0;
  int n_wake_lp = 0, n_wake_aggr = 0, n_dead = 0, n_drop = 0;

  tm_register #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [DATA_W-1:0] m_data;
  logic              m_dis;
  int                m_since;
  int                m_need;      // wakeup delay latched while asleep
  int                wake_need;

  function automatic void check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q=%h exp=%h awake=%0b dis=%0b", what, $time, q, m_data, awake, discharged);
    end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; dead = 0; drowsy = 1; dr1 = 0; dr2 = 0; we = 0; wdata = '0;
    m_data = '0; m_dis = 1'b1; m_since = 0; m_need = 2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // choose inputs for this cycle (after the previous edge)
      if (drowsy) begin
        drowsy = ($urandom_range(0, 3) != 0);
        dead   = drowsy && ($urandom_range(0, 3) == 0);
        // the finger setting only changes while the row keeps sleeping
        if (drowsy && $urandom_range(0, 3) == 0) dr2 = $urandom_range(0, 1);
      end else begin
        drowsy = ($urandom_range(0, 15) == 0);
        dead   = drowsy && ($urandom_range(0, 1) == 0);
      end
      we    = ($urandom_range(0, 1) == 1);
      wdata = ($urandom_range(0, 7) == 0) ? '0 : {$urandom, $urandom};
      wake_need = (dr1 || dr2) ? 2 : 1;
      #1;
      // combinational outputs against the model
      check("awake", awake == (!drowsy && m_since >= m_need));
      check("q", q == m_data);
      check("discharged", discharged == m_dis);
      if (!drowsy && m_since == m_need && awake) begin
        if (m_need == 1) n_wake_lp++; else n_wake_aggr++;
      end
      if (we && !awake && !dead) n_drop++;
      @(posedge clk);
      // update the model with what the edge must have done
      if (dead) begin
        m_data = '0; m_dis = 1'b1; n_dead++;
      end else if (we && !drowsy && m_since >= m_need) begin
        m_data = wdata; m_dis = 1'b0;
      end
      if (drowsy) begin m_since = 0; m_need = wake_need; end
      else if (m_since < 100) m_since++;
      #1;
    end
    // every mechanism must have been exercised
    check("lp wakeups seen",   n_wake_lp > 0);
    check("aggr wakeups seen", n_wake_aggr > 0);
    check("discharges seen",   n_dead > 0);
    check("blocked writes",    n_drop > 0);
    $display("lp wakeups=%0d aggr wakeups=%0d discharges=%0d blocked writes=%0d",
             n_wake_lp, n_wake_aggr, n_dead, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
