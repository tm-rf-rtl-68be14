// tb_tm_control_logic: checks both control schemes against the mode tables.
//
// One instance per scheme sees the same random status inputs. Expected DROWSY,
// mode and free are computed from the scheme's decision table; the DEAD pulse
// is expected exactly in the first cycle of each free period. Every mode and
// both release kinds (conventional and early) must occur.
module tb_tm_control_logic;
  import tmrf_pkg::*;

  logic clk = 1'b0, rst_n;
  logic unmap, complete, cnt_zero, earlyfree, first_ready;
  logic dead_lc, drowsy_lc, free_lc, dead_hc, drowsy_hc, free_hc;
  tm_mode_e mode_lc, mode_hc;
  int checks = 0, failures = 0;
  int n_work = 0, n_drowsy = 0, n_dead = 0, n_pulse = 0, n_early = 0, n_conv = 0;

  always #5 clk = ~clk;

  tm_control_logic #(.SCHEME(SCHEME_LC)) u_lc (
    .clk, .rst_n, .unmap, .complete, .cnt_zero, .earlyfree, .first_ready,
    .dead(dead_lc), .drowsy(drowsy_lc), .free(free_lc), .mode(mode_lc));
  tm_control_logic #(.SCHEME(SCHEME_HC)) u_hc (
    .clk, .rst_n, .unmap, .complete, .cnt_zero, .earlyfree, .first_ready,
    .dead(dead_hc), .drowsy(drowsy_hc), .free(free_hc), .mode(mode_hc));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (u=%0b c=%0b z=%0b ef=%0b fr=%0b)", what, $time,
               unmap, complete, cnt_zero, earlyfree, first_ready);
    end
  endfunction

  initial begin
    logic conv, early, prev_lc, prev_hc;
    logic e_free_hc, e_drowsy_hc;
    tm_mode_e e_mode_hc;
    rst_n = 0; unmap = 1; complete = 1; cnt_zero = 1; earlyfree = 0; first_ready = 0;
    prev_lc = 1; prev_hc = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // slowly changing inputs so that free periods last several cycles
      if ($urandom_range(0, 2) == 0) begin
        unmap       = $urandom_range(0, 1);
        complete    = $urandom_range(0, 1);
        cnt_zero    = $urandom_range(0, 1);
        earlyfree   = $urandom_range(0, 1);
        first_ready = $urandom_range(0, 1);
      end
      #1;
      conv  = unmap && complete && cnt_zero;
      early = cnt_zero && earlyfree && !first_ready;
      // scheme LC
      chk("lc free",   free_lc   == conv);
      chk("lc drowsy", drowsy_lc == conv);
      chk("lc mode",   mode_lc   == (conv ? MODE_DEAD : MODE_WORK));
      chk("lc pulse",  dead_lc   == (conv && !prev_lc));
      // scheme HC
      e_free_hc   = conv || early;
      e_drowsy_hc = e_free_hc || (cnt_zero && !first_ready);
      e_mode_hc   = e_free_hc ? MODE_DEAD : (e_drowsy_hc ? MODE_DROWSY : MODE_WORK);
      chk("hc free",   free_hc   == e_free_hc);
      chk("hc drowsy", drowsy_hc == e_drowsy_hc);
      chk("hc mode",   mode_hc   == e_mode_hc);
      chk("hc pulse",  dead_hc   == (e_free_hc && !prev_hc));
      case (mode_hc)
        MODE_WORK:   n_work++;
        MODE_DROWSY: n_drowsy++;
        default:     n_dead++;
      endcase
      if (dead_hc) begin
        n_pulse++;
        if (early && !conv) n_early++;
        if (conv) n_conv++;
      end
      prev_lc = conv; prev_hc = e_free_hc;
      @(posedge clk);
      #1;
    end
    chk("work seen",   n_work > 0);
    chk("drowsy seen", n_drowsy > 0);
    chk("dead seen",   n_dead > 0);
    chk("early release pulses", n_early > 0);
    chk("conventional release pulses", n_conv > 0);
    $display("work=%0d drowsy=%0d dead=%0d pulses=%0d (early %0d, conventional %0d)",
             n_work, n_drowsy, n_dead, n_pulse, n_early, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
