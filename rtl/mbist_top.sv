// Memory BIST wrapped around an embedded memory, running March C+.
//
// The control unit reads the March C+ program from its microcode table and
// hands the six elements, one at a time, to the access unit. The access unit
// generates an address, data and read/write control per clock; the memory
// interface unit registers them and, while start_test = 1, drives them into the
// memory, comparing every read with the expected data (pass_fail: 11 pass,
// 10 fail, 00 no comparison; diag_addr is the word compared). When the last
// element ends, end_test rises and stays high until start_test falls. With
// start_test = 0 the memory is reached through sys_addr / sys_data / sys_ctrl
// (1 = write) and read on mem_rdata.
//
// A full test of 2^ADDR_W words takes 14 * 2^ADDR_W operation cycles plus a
// few cycles per element. The fi_* ports reach the memory's fault hook (one
// stuck-at, transition or coupling fault), this design's own addition for
// exercising the pass/fail path; tie fi_en to 0 in use.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned BW = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              start_test,
  output logic              end_test,
  output logic [1:0]        pass_fail,
  output logic [ADDR_W-1:0] diag_addr,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_data,
  input  logic              sys_ctrl,
  output logic [DATA_W-1:0] mem_rdata,
  input  logic              fi_en,
  input  logic [1:0]        fi_type,
  input  logic [ADDR_W-1:0] fi_addr,
  input  logic [ADDR_W-1:0] fi_agg,
  input  logic [BW-1:0]     fi_bit,
  input  logic              fi_val
);

  march_ele_t        march_ele;
  logic              updown_order, start_march, end_march;
  logic [ADDR_W-1:0] au_addr, mem_addr;
  logic [DATA_W-1:0] au_data, mem_wdata;
  logic              au_rw, au_valid, mem_we;

  mbist_control_unit u_cu (
    .clk, .reset_n, .start_test, .end_march,
    .updown_order, .march_ele, .start_march, .end_test
  );

  mbist_access_unit #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_au (
    .clk, .reset_n, .updown_order, .march_ele, .start_march, .end_march,
    .addr_out(au_addr), .data_out(au_data), .ctrl_out(au_rw), .op_valid(au_valid)
  );

  mbist_miu #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_miu (
    .clk, .reset_n, .start_test,
    .addr(au_addr), .data(au_data), .rw(au_rw), .op_valid(au_valid),
    .sys_addr, .sys_data, .sys_ctrl,
    .mem_rdata, .mem_addr, .mem_wdata, .mem_we,
    .pass_fail, .diag_addr
  );

  mbist_sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata),
    .fi_en, .fi_type, .fi_addr, .fi_agg, .fi_bit, .fi_val
  );

endmodule
