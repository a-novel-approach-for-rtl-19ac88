// Access unit: turns one march element into a stream of memory operations.
//
// It joins the address counter, the sequence counter and the Moore machine.
// When the control unit raises start_march with an element code (march_ele) and
// an addressing order (updown_order), the unit issues one operation per clock
// on addr_out / data_out / ctrl_out (ctrl_out 1 = write, 0 = read), with
// op_valid = 1, visiting every address in the chosen order and applying the
// element's one or three operations at each. After the last operation at the
// last address it pulses end_march for one cycle. An element of k operations on
// 2^ADDR_W words takes k * 2^ADDR_W cycles plus one cycle to start.
//
// The three sub-blocks and their connections follow the access unit's internal
// block diagram; op_valid and the preset of the address counter and the clear
// of the sequence counter from the Moore machine's idle state are this design's
// own choices.
module mbist_access_unit
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              updown_order,
  input  march_ele_t        march_ele,
  input  logic              start_march,
  output logic              end_march,
  output logic [ADDR_W-1:0] addr_out,
  output logic [DATA_W-1:0] data_out,
  output logic              ctrl_out,
  output logic              op_valid
);

  logic [1:0] s_count;
  logic       op_done, done, idle;

  mbist_address_counter #(.ADDR_W(ADDR_W)) u_addr_cnt (
    .clk, .reset_n, .updown_order, .march_ele, .s_count, .op_done,
    .load(idle), .addr_out, .done
  );

  mbist_sequence_counter u_seq_cnt (
    .clk, .reset_n, .march_ele, .op_done, .clear(idle), .s_count
  );

  mbist_moore_machine #(.DATA_W(DATA_W)) u_moore (
    .clk, .reset_n, .start_march, .march_ele, .s_count, .done,
    .op_done, .data_out, .ctrl_out, .end_march, .idle
  );

  assign op_valid = op_done;

  // Handshake rules: the control unit holds the element code and address order
  // steady while an element runs, and end_march is a single-cycle pulse.
  a_element_stable: assert property (@(posedge clk) disable iff (!reset_n)
    (!idle && start_march) |-> ($stable(march_ele) && $stable(updown_order)))
    else $error("march element changed while it was running");
  a_end_march_pulse: assert property (@(posedge clk) disable iff (!reset_n)
    end_march |=> !end_march)
    else $error("end_march longer than one cycle");

endmodule
