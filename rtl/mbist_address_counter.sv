// Address counter of the access unit.
//
// Holds the address of the memory word under test. While `load` is 1 (the Moore
// machine is idle between elements) it is preset to the first address of the
// coming element: 0 when updown_order = 1 (ascending), 2^ADDR_W-1 when
// updown_order = 0 (descending). During an element it steps by one in the
// chosen direction on the op_done pulse of the last operation at an address
// (s_count equal to the element's tmax). `done` is 1, combinationally, while the
// counter stands at the element's last address (all ones going up, zero going
// down); the counter then holds until the next preset.
//
// Advancing when the sequence count reaches its maximum and flagging done at
// the maximum address follow the counter's description and flowchart; the
// preset via `load` is this design's own choice. Reset clears it to 0.
module mbist_address_counter
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              updown_order,
  input  march_ele_t        march_ele,
  input  logic [1:0]        s_count,
  input  logic              op_done,
  input  logic              load,
  output logic [ADDR_W-1:0] addr_out,
  output logic              done
);

  localparam logic [ADDR_W-1:0] ADMIN = '0;
  localparam logic [ADDR_W-1:0] ADMAX = '1;

  logic last_op;
  assign last_op = op_done && (s_count == ele_tmax(march_ele));
  assign done    = updown_order ? (addr_out == ADMAX) : (addr_out == ADMIN);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)               addr_out <= ADMIN;
    else if (load)              addr_out <= updown_order ? ADMIN : ADMAX;
    else if (last_op && !done)  addr_out <= updown_order ? addr_out + 1'b1
                                                         : addr_out - 1'b1;
  end

endmodule
