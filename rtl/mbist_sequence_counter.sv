// Sequence counter of the access unit.
//
// Counts the operations of the current march element at one address. It
// advances by one on every op_done pulse (one per issued operation) and, after
// the element's last operation, wraps to 0 for the next address. The last index
// (tmax) is 0 for the one-operation elements (w0), (r0) and 2 for the
// three-operation elements (r0,w1,r1), (r1,w0,r0), so s_count runs 0 -> 0 or
// 0 -> 1 -> 2 -> 0. The Moore machine reads s_count to pick its next state and
// the address counter reads it to know when an address is finished.
//
// Counting from 0 follows the operation indices (Ct = 0, 1, 2) of the Moore
// machine's state diagram; the flowchart of the counter itself counts from 1.
// Reset (reset_n = 0) clears it asynchronously; `clear` (the Moore machine is
// idle) clears it synchronously, so an element cut short by the end of a test
// cannot leave a stale count behind. The clear input is this design's own.
module mbist_sequence_counter
  import mbist_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  march_ele_t march_ele,
  input  logic       op_done,
  input  logic       clear,
  output logic [1:0] s_count
);

  logic [1:0] tmax;
  assign tmax = ele_tmax(march_ele);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)     s_count <= 2'd0;
    else if (clear)   s_count <= 2'd0;
    else if (op_done) s_count <= (s_count >= tmax) ? 2'd0 : s_count + 2'd1;
  end

endmodule
