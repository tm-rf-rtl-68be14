// tb_tmrf_top_configs: the end-to-end register-lifetime test run on several
// register-file configurations at once, one tmrf_harness per configuration.
//
// Configurations: the default 128 x 64 b array with two read / one write
// port and with twelve read / six write ports; 64 and 256 registers of 64 b
// with four read / two write ports; 128 registers of 32 and of 128 b with four
// read / two write ports. Each harness checks its own instance cycle by
// cycle; this testbench waits for all of them and adds up their results.
module tb_tmrf_top_configs;

  localparam int N = 6;
  logic [N-1:0] done;
  int           checks_v [N];
  int           failures_v [N];

  tmrf_harness #(.NUM_REGS(128), .DATA_W(64),  .NUM_RD(2),  .NUM_WR(1)) h_2r1w   (.done(done[0]), .checks_o(checks_v[0]), .failures_o(failures_v[0]));
  tmrf_harness #(.NUM_REGS(128), .DATA_W(64),  .NUM_RD(12), .NUM_WR(6)) h_12r6w  (.done(done[1]), .checks_o(checks_v[1]), .failures_o(failures_v[1]));
  tmrf_harness #(.NUM_REGS(64),  .DATA_W(64),  .NUM_RD(4),  .NUM_WR(2)) h_64e    (.done(done[2]), .checks_o(checks_v[2]), .failures_o(failures_v[2]));
  tmrf_harness #(.NUM_REGS(256), .DATA_W(64),  .NUM_RD(4),  .NUM_WR(2)) h_256e   (.done(done[3]), .checks_o(checks_v[3]), .failures_o(failures_v[3]));
  tmrf_harness #(.NUM_REGS(128), .DATA_W(32),  .NUM_RD(4),  .NUM_WR(2)) h_32b    (.done(done[4]), .checks_o(checks_v[4]), .failures_o(failures_v[4]));
  tmrf_harness #(.NUM_REGS(128), .DATA_W(128), .NUM_RD(4),  .NUM_WR(2)) h_128b   (.done(done[5]), .checks_o(checks_v[5]), .failures_o(failures_v[5]));

  int checks = 0, failures = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == '1);
    #1;
    for (int i = 0; i < N; i++) begin
      checks   += checks_v[i];
      failures += failures_v[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
