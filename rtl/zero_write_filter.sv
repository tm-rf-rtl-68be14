// zero_write_filter: zero detection on one register-file write port.
//
// A register that has been discharged in dead mode already holds 0, so
// writing an all-zero word into it changes nothing and can be skipped, which
// saves the word-line, decoder and bit-line energy of that write. The filter
// compares the write data with zero and, when the target row reports that it
// is still discharged, turns the write into a no-op that is nevertheless
// reported as done.
//
// Purely combinational:
//   we_out  - the write that reaches the row;
//   skipped - the write was dropped because it would store 0 into a
//             discharged row (it counts as completed, whatever the row's mode).
// Skipping zero writes to empty registers follows the TM-RF design; the
// detector here is a plain DATA_W-input NOR.
module zero_write_filter #(
  parameter int unsigned DATA_W = 64
) (
  input  logic              we_in,
  input  logic [DATA_W-1:0] wdata,
  input  logic              row_discharged,
  output logic              we_out,
  output logic              skipped
);

  logic is_zero;

  always_comb begin
    is_zero = (wdata == '0);
    skipped = we_in && is_zero && row_discharged;
    we_out  = we_in && !skipped;
  end

endmodule
