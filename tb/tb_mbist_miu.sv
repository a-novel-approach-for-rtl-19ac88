// Checks the memory interface unit: in test mode (start_test = 1) the memory
// sees the access unit's address, data and control one clock later, writes only
// for valid write operations, and every valid read is compared with the memory
// data (11 equal, 10 different, 00 otherwise) with diag_addr naming the word;
// in normal mode the system signals pass straight to the memory and nothing is
// compared. Stimulus and memory read data are random.
module tb_mbist_miu;
  import mbist_pkg::*;
  localparam int AW = 8, DW = 8;
  logic          clk = 1'b0, reset_n = 1'b0, start_test = 1'b0;
  logic [AW-1:0] addr = '0, sys_addr = '0, mem_addr, diag_addr;
  logic [DW-1:0] data = '0, sys_data = '0, mem_rdata = '0, mem_wdata;
  logic          rw = 1'b0, op_valid = 1'b0, sys_ctrl = 1'b0, mem_we;
  logic [1:0]    pass_fail;
  int checks = 0, failures = 0;

  mbist_miu #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [AW-1:0] pa;
    logic [DW-1:0] pd;
    logic          prw, pv;
    int npass = 0, nfail = 0;
    @(posedge clk); #1 check(pass_fail == PF_NONE, "comparison after reset");
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [1:0] e;
      // drive a new operation and system signals
      @(negedge clk);
      if (i % 500 == 0) start_test = ~start_test;
      pa = addr; pd = data; prw = rw; pv = op_valid;   // what the registers now hold
      addr = AW'($urandom); data = DW'($urandom); rw = 1'($urandom); op_valid = ($urandom_range(0, 3) != 0);
      sys_addr = AW'($urandom); sys_data = DW'($urandom); sys_ctrl = 1'($urandom);
      mem_rdata = ($urandom_range(0, 1) == 0) ? pd : DW'($urandom);
      #1;
      if (start_test) begin
        check(mem_addr == pa && mem_wdata == pd && mem_we == (prw && pv),
              $sformatf("test mode memory port, step %0d", i));
        if (!pv || prw)              e = PF_NONE;
        else if (mem_rdata == pd)    e = PF_PASS;
        else                         e = PF_FAIL;
        check(pass_fail == e, $sformatf("pass_fail %b expected %b, step %0d", pass_fail, e, i));
        check(diag_addr == pa, "diag_addr");
        if (e == PF_PASS) npass++;
        if (e == PF_FAIL) nfail++;
      end else begin
        check(mem_addr == sys_addr && mem_wdata == sys_data && mem_we == sys_ctrl,
              $sformatf("normal mode memory port, step %0d", i));
        check(pass_fail == PF_NONE, "comparison in normal mode");
      end
    end
    check(npass > 0 && nfail > 0, "pass and fail both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
