// Microcode storage of the memory BIST: the march algorithm as a table of
// elements.
//
// Each word holds a march element code, its addressing order and a flag marking
// the algorithm's last element. The control unit reads word `idx` and steps to
// the next one each time the access unit finishes an element, so a different
// march test needs only a different table, not a different controller. The table
// holds March C+ (14n operations):
//   0: up   (w0)        1: up   (r0,w1,r1)   2: up   (r1,w0,r0)
//   3: down (r0,w1,r1)  4: down (r1,w0,r0)   5: up   (r0)
// For the two "either order" elements ascending order is used. Words past the
// program read as a final (r0) element so that a runaway index still ends the
// test. Purely combinational; the word layout is this design's own choice.
module mbist_microcode_rom
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned IW = $clog2(DEPTH)
) (
  input  logic [IW-1:0] idx,
  output ucode_t        word
);

  always_comb begin
    unique case (int'(idx))
      0:       word = '{last: 1'b0, updown: 1'b1, ele: ME_W0};
      1:       word = '{last: 1'b0, updown: 1'b1, ele: ME_R0W1R1};
      2:       word = '{last: 1'b0, updown: 1'b1, ele: ME_R1W0R0};
      3:       word = '{last: 1'b0, updown: 1'b0, ele: ME_R0W1R1};
      4:       word = '{last: 1'b0, updown: 1'b0, ele: ME_R1W0R0};
      default: word = '{last: 1'b1, updown: 1'b1, ele: ME_R0};
    endcase
  end

endmodule
