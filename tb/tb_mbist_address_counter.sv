// Checks the address counter with a small address space (ADDR_W = 4): preset
// to 0 (ascending) or 15 (descending) while load is 1, one step per finished
// address (op_done with s_count at the element's last operation), no step on
// other operations, done exactly at the last address, and holding there.
module tb_mbist_address_counter;
  import mbist_pkg::*;
  localparam int AW = 4;
  logic          clk = 1'b0, reset_n = 1'b0, updown_order = 1'b1, op_done = 1'b0, load = 1'b0;
  march_ele_t    march_ele = ME_W0;
  logic [1:0]    s_count = '0;
  logic [AW-1:0] addr_out;
  logic          done;
  int checks = 0, failures = 0;

  mbist_address_counter #(.ADDR_W(AW)) dut (.*);

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

  // run one element: ops per address k, visiting all addresses in order ud
  task automatic element(input march_ele_t e, input bit ud);
    int k = (e == ME_R0W1R1 || e == ME_R1W0R0) ? 3 : 1;
    @(negedge clk) begin march_ele = e; updown_order = ud; load = 1'b1; op_done = 1'b0; end
    @(negedge clk) load = 1'b0;
    for (int a = 0; a < (1 << AW); a++) begin
      int exp_a = ud ? a : (1 << AW) - 1 - a;
      for (int s = 0; s < k; s++) begin
        // random idle cycles between operations
        while ($urandom_range(0, 2) == 0) begin
          op_done = 1'b0;
          @(negedge clk);
          check(int'(addr_out) == exp_a, "address moved without an operation");
        end
        op_done = 1'b1; s_count = 2'(s);
        #1 check(int'(addr_out) == exp_a, $sformatf("addr %0d expected %0d", addr_out, exp_a));
        check(done == (a == (1 << AW) - 1), $sformatf("done=%0b at address %0d", done, addr_out));
        @(negedge clk);
      end
    end
    op_done = 1'b0;
    #1 check(done && int'(addr_out) == (ud ? (1 << AW) - 1 : 0), "did not hold at the last address");
  endtask

  initial begin
    @(posedge clk); #1 check(addr_out == 0, "reset value");
    @(negedge clk) reset_n = 1'b1;
    element(ME_W0, 1'b1);
    element(ME_R0W1R1, 1'b1);
    element(ME_R1W0R0, 1'b1);
    element(ME_R0W1R1, 1'b0);
    element(ME_R1W0R0, 1'b0);
    element(ME_R0, 1'b0);
    element(ME_R0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
