// Memory interface unit (MIU): the bridge between the access unit and the
// memory under test.
//
// Three registers capture the access unit's outputs every clock: the Address
// Generation Block (AGB) holds the address, the Data register the write or
// expected data, the Control register the read/write bit together with an
// operation-valid bit. Three 2:1 multiplexers, steered by start_test, drive the
// memory: start_test = 1 selects the registered test address, data and control,
// start_test = 0 the system's own signals, so the memory works normally
// outside test. The comparator checks the memory's read data against the Data
// register during test reads and reports pass_fail; diag_addr (the AGB) names
// the word being compared, for diagnosis.
//
// Timing: an operation issued by the access unit in cycle t is applied to the
// memory in cycle t+1; a write lands at the end of t+1, a read's pass_fail is
// valid during t+1 (the memory reads combinationally). The register set, the
// multiplexers and the comparator follow the MIU's block diagram; the
// operation-valid bit and the write enable = control & valid are this design's
// own choices. Reset clears the registers.
module mbist_miu
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              start_test,
  // from the access unit
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  input  logic              rw,
  input  logic              op_valid,
  // system (normal mode) side
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_data,
  input  logic              sys_ctrl,
  // memory side
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              mem_we,
  // results
  output logic [1:0]        pass_fail,
  output logic [ADDR_W-1:0] diag_addr
);

  logic [ADDR_W-1:0] agb_q;
  logic [DATA_W-1:0] data_q;
  logic              ctrl_q, valid_q;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      agb_q   <= '0;
      data_q  <= '0;
      ctrl_q  <= CTRL_READ;
      valid_q <= 1'b0;
    end else begin
      agb_q   <= addr;
      data_q  <= data;
      ctrl_q  <= rw;
      valid_q <= op_valid;
    end
  end

  assign mem_addr  = start_test ? agb_q  : sys_addr;
  assign mem_wdata = start_test ? data_q : sys_data;
  assign mem_we    = start_test ? (ctrl_q & valid_q) : sys_ctrl;

  mbist_comparator #(.DATA_W(DATA_W)) u_cmp (
    .enable   (ctrl_q),
    .valid    (valid_q & start_test),
    .expected (data_q),
    .mem_data (mem_rdata),
    .pass_fail
  );

  assign diag_addr = agb_q;

endmodule
