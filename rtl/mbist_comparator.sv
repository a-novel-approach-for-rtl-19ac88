// Comparator of the memory interface unit.
//
// Compares the expected data (the Data register) with the word read from the
// memory. A comparison takes place only when `enable` (the Control register's
// read/write bit) is 0, i.e. for a read, and `valid` says an operation is under
// way. Result, combinational:
//   00  no comparison (write, idle or normal mode)
//   11  pass: memory data equals expected data
//   10  fail: they differ
// Comparing on enable = 0 follows the comparator's description; the valid
// input and the two-bit code, read from the reference waveforms, are this
// design's reading of what the document leaves open.
module mbist_comparator
  import mbist_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              enable,
  input  logic              valid,
  input  logic [DATA_W-1:0] expected,
  input  logic [DATA_W-1:0] mem_data,
  output logic [1:0]        pass_fail
);

  always_comb begin
    if (!valid || enable)         pass_fail = PF_NONE;
    else if (expected == mem_data) pass_fail = PF_PASS;
    else                           pass_fail = PF_FAIL;
  end

endmodule
