// tb_zero_write_filter: exhaustive check of the zero-write filter over the
// enable and row-state inputs, with zero, single-bit and random write data.
module tb_zero_write_filter;
  localparam int unsigned DATA_W = 64;

  logic              we_in, row_discharged, we_out, skipped;
  logic [DATA_W-1:0] wdata;
  int checks = 0, failures = 0, n_skip = 0;

  zero_write_filter #(.DATA_W(DATA_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [DATA_W-1:0] d);
    logic exp_skip;
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 2; r++) begin
        we_in = e[0]; row_discharged = r[0]; wdata = d;
        #1;
        exp_skip = e[0] && r[0] && (d == '0);
        checks++;
        if (skipped !== exp_skip || we_out !== (e[0] && !exp_skip)) begin
          failures++;
          $display("FAIL we=%0b dis=%0b d=%h: we_out=%0b skipped=%0b", e, r, d, we_out, skipped);
        end
        if (skipped) n_skip++;
      end
    end
  endtask

  initial begin
    try('0);
    for (int b = 0; b < DATA_W; b++) try(DATA_W'(1) << b);
    for (int i = 0; i < 200; i++) try({$urandom, $urandom});
    try('1);
    checks++;
    if (n_skip != 1) begin
      failures++;
      $display("FAIL expected exactly one skipped write, saw %0d", n_skip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
