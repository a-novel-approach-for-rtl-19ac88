// Shared types and constants of the March C+ memory BIST.
//
// The march element code (march_ele, two bits) names the operation sequence the
// access unit applies at every address of one march element:
//   00  (w0)          one operation
//   01  (r0, w1, r1)  three operations
//   10  (r1, w0, r0)  three operations
//   11  (r0)          one operation
// This encoding follows the state diagram of the access unit's Moore machine. The
// comparator reports a two-bit result: 00 no comparison this cycle (write or
// idle), 11 read matched, 10 read mismatched; these are the values seen in the
// reference waveforms. The microcode word layout is this design's own choice.
package mbist_pkg;

  typedef enum logic [1:0] {
    ME_W0     = 2'b00,
    ME_R0W1R1 = 2'b01,
    ME_R1W0R0 = 2'b10,
    ME_R0     = 2'b11
  } march_ele_t;

  // Comparator result codes.
  localparam logic [1:0] PF_NONE = 2'b00;
  localparam logic [1:0] PF_FAIL = 2'b10;
  localparam logic [1:0] PF_PASS = 2'b11;

  // Read/write control: 1 writes, 0 reads (the comparator compares when it is 0).
  localparam logic CTRL_WRITE = 1'b1;
  localparam logic CTRL_READ  = 1'b0;

  // One microcode word: a march element and its addressing order.
  typedef struct packed {
    logic       last;    // final element of the algorithm
    logic       updown;  // 1 = ascending addresses, 0 = descending
    march_ele_t ele;
  } ucode_t;

  // Index of the last operation of an element (sequence counter maximum).
  function automatic logic [1:0] ele_tmax(input march_ele_t e);
    return (e == ME_R0W1R1 || e == ME_R1W0R0) ? 2'd2 : 2'd0;
  endfunction

endpackage
