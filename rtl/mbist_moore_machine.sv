// Moore machine of the access unit.
//
// Five states: idle, w0, r0, w1, r1. Each non-idle state issues one memory
// operation per clock: ctrl_out = 1 writes, 0 reads, and data_out is the data
// to write or the data a read must return (all zeros in w0/r0, all ones in
// w1/r1). op_done is 1 in every operation state and advances the sequence
// counter. From idle the machine starts when start_march = 1, entering w0 for
// element 00, r0 for 01 and 11, r1 for 10. Inside an element it moves on the
// operation index s_count (Ct): 01 runs r0 -> w1 -> r1, 10 runs r1 -> w0 -> r0,
// 00 and 11 repeat w0 or r0. At the last operation of an address it either
// starts the next address or, if the address counter's `done` is 1, returns to
// idle and pulses end_march (registered) for one cycle.
//
// The states, the entry states and the transitions follow the machine's state
// diagram. Ignoring start_march in the cycle end_march is high (the control unit
// has not yet seen it), and abandoning an element without end_march when
// start_march falls before it ends, are this design's own choices.
module mbist_moore_machine
  import mbist_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              start_march,
  input  march_ele_t        march_ele,
  input  logic [1:0]        s_count,
  input  logic              done,
  output logic              op_done,
  output logic [DATA_W-1:0] data_out,
  output logic              ctrl_out,
  output logic              end_march,
  output logic              idle
);

  typedef enum logic [2:0] {S_IDLE, S_W0, S_R0, S_W1, S_R1} mm_state_t;

  mm_state_t state, next;

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE: if (start_march && !end_march) begin
                unique case (march_ele)
                  ME_W0:               next = S_W0;
                  ME_R0W1R1, ME_R0:    next = S_R0;
                  ME_R1W0R0:           next = S_R1;
                endcase
              end
      S_W0:   if (march_ele == ME_W0)                          next = done ? S_IDLE : S_W0;
              else if (march_ele == ME_R1W0R0 && s_count == 2'd1) next = S_R0;
              else                                                 next = S_IDLE;
      S_R0:   if (march_ele == ME_R0)                          next = done ? S_IDLE : S_R0;
              else if (march_ele == ME_R0W1R1 && s_count == 2'd0) next = S_W1;
              else if (march_ele == ME_R1W0R0 && s_count == 2'd2) next = done ? S_IDLE : S_R1;
              else                                                 next = S_IDLE;
      S_W1:   if (march_ele == ME_R0W1R1 && s_count == 2'd1)   next = S_R1;
              else                                                 next = S_IDLE;
      S_R1:   if (march_ele == ME_R0W1R1 && s_count == 2'd2)   next = done ? S_IDLE : S_R0;
              else if (march_ele == ME_R1W0R0 && s_count == 2'd0) next = S_W0;
              else                                                 next = S_IDLE;
      default: next = S_IDLE;
    endcase
    // start_march falling mid-element (the test was stopped) abandons it.
    if (state != S_IDLE && !start_march) next = S_IDLE;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      end_march <= 1'b0;
    end else begin
      state     <= next;
      end_march <= (state != S_IDLE) && (next == S_IDLE) && start_march;
    end
  end

  // Moore outputs, decoded from the state alone.
  always_comb begin
    idle     = (state == S_IDLE);
    op_done  = !idle;
    ctrl_out = (state == S_W0 || state == S_W1) ? CTRL_WRITE : CTRL_READ;
    data_out = (state == S_W1 || state == S_R1) ? '1 : '0;
  end

endmodule
