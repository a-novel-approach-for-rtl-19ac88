// Memory BIST control unit.
//
// While start_test is 1 the unit walks through the microcode table: it presents
// the current element on march_ele and updown_order, raises start_march, and
// waits for the access unit's end_march pulse. It then drops start_march for
// one cycle, moves to the next word and raises start_march again. After the
// word flagged last has finished it raises end_test and holds it until
// start_test returns to 0. start_test = 0 sends the unit back to idle at any
// time. All outputs are registered or decoded from registers.
//
// Ports follow the pin list of the control unit. The one-cycle low gap on
// start_march between elements and the microcode table are this design's own
// choices.
module mbist_control_unit
  import mbist_pkg::*;
#(
  parameter int unsigned UC_DEPTH = 8,
  localparam int unsigned IW = $clog2(UC_DEPTH)
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       start_test,
  input  logic       end_march,
  output logic       updown_order,
  output march_ele_t march_ele,
  output logic       start_march,
  output logic       end_test
);

  typedef enum logic [1:0] {CU_IDLE, CU_ISSUE, CU_GAP, CU_DONE} cu_state_t;

  cu_state_t     state;
  logic [IW-1:0] idx;
  ucode_t        word;

  mbist_microcode_rom #(.DEPTH(UC_DEPTH)) u_rom (.idx(idx), .word(word));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state <= CU_IDLE;
      idx   <= '0;
    end else if (!start_test) begin
      state <= CU_IDLE;
      idx   <= '0;
    end else begin
      unique case (state)
        CU_IDLE:  state <= CU_ISSUE;
        CU_ISSUE: if (end_march) begin
                    if (word.last) state <= CU_DONE;
                    else begin
                      state <= CU_GAP;
                      idx   <= idx + 1'b1;
                    end
                  end
        CU_GAP:   state <= CU_ISSUE;
        CU_DONE:  state <= CU_DONE;
      endcase
    end
  end

  assign start_march  = (state == CU_ISSUE);
  assign end_test     = (state == CU_DONE);
  // end_test and start_march are never high together.
  a_done_idle: assert property (@(posedge clk) disable iff (!reset_n)
    !(end_test && start_march))
    else $error("start_march raised after the end of the test");

  assign march_ele    = word.ele;
  assign updown_order = word.updown;

endmodule
