// Embedded memory under test: 2^ADDR_W words of DATA_W bits.
//
// A synchronous write (we = 1 stores wdata at addr on the rising clock edge)
// and a combinational read (rdata always shows the word at addr). The array has
// no reset, as a real memory. A fault hook makes one cell, bit fi_bit of word
// fi_addr (the victim), faulty while fi_en = 1. fi_type chooses the fault:
//   0 stuck-at:   the victim reads as fi_val whatever was written
//   1 transition: the victim cannot change to fi_val (a write that would take it
//                 there leaves it unchanged)
//   2 inversion coupling:  a write that changes bit fi_bit of word fi_agg (the
//                 aggressor) to fi_val inverts the victim
//   3 idempotent coupling: the same aggressor transition forces the victim to
//                 fi_val
// For the coupling faults fi_agg must differ from fi_addr. With fi_en = 0 the
// memory is fault-free.
//
// The memory's size follows the 8-bit addresses and 8-bit data of the reference
// design, and the fault types follow the fault classes a march test targets;
// the read timing and the hook itself are this design's own choices.
module mbist_sram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned BW = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              we,
  output logic [DATA_W-1:0] rdata,
  // fault hook
  input  logic              fi_en,
  input  logic [1:0]        fi_type,
  input  logic [ADDR_W-1:0] fi_addr,
  input  logic [ADDR_W-1:0] fi_agg,
  input  logic [BW-1:0]     fi_bit,
  input  logic              fi_val
);

  localparam logic [1:0] FT_STUCK = 2'd0;
  localparam logic [1:0] FT_TRANS = 2'd1;
  localparam logic [1:0] FT_CFIN  = 2'd2;
  localparam logic [1:0] FT_CFID  = 2'd3;

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [DATA_W-1:0] old_word, new_word;
  logic              agg_hit;

  // Word actually stored by a write, and whether it triggers a coupling fault.
  always_comb begin
    old_word = mem[addr];
    new_word = wdata;
    if (fi_en && fi_type == FT_TRANS && addr == fi_addr &&
        old_word[fi_bit] != fi_val && wdata[fi_bit] == fi_val)
      new_word[fi_bit] = old_word[fi_bit];
    agg_hit = fi_en && (fi_type == FT_CFIN || fi_type == FT_CFID) && addr == fi_agg &&
              old_word[fi_bit] != fi_val && wdata[fi_bit] == fi_val;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= new_word;
      if (agg_hit)
        mem[fi_addr][fi_bit] <= (fi_type == FT_CFIN) ? ~mem[fi_addr][fi_bit] : fi_val;
    end
  end

  always_comb begin
    rdata = mem[addr];
    if (fi_en && fi_type == FT_STUCK && addr == fi_addr) rdata[fi_bit] = fi_val;
  end

endmodule
