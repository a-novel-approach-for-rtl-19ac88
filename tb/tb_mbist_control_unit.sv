// Checks the control unit against a stand-in access unit that answers each
// start_march with an end_march pulse after a random delay. Expected: the six
// March C+ elements in order with their address orders, start_march low between
// elements, end_test after the last one and held until start_test falls, and a
// test stopped half-way restarting from the first element.
module tb_mbist_control_unit;
  import mbist_pkg::*;
  logic       clk = 1'b0, reset_n = 1'b0, start_test = 1'b0, end_march = 1'b0;
  logic       updown_order, start_march, end_test;
  march_ele_t march_ele;
  int checks = 0, failures = 0;

  mbist_control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] exp_ele [6] = '{2'b00, 2'b01, 2'b10, 2'b01, 2'b10, 2'b11};
  logic       exp_ud  [6] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1};

  // answer `count` elements, checking each; returns after the last end_march
  task automatic serve(input int count);
    for (int e = 0; e < count; e++) begin
      int t = 0;
      while (!start_march && t < 20) begin @(posedge clk); #1; t++; end
      check(start_march, $sformatf("start_march for element %0d", e));
      check(march_ele == exp_ele[e] && updown_order == exp_ud[e],
            $sformatf("element %0d: ele=%b ud=%b", e, march_ele, updown_order));
      check(!end_test, "end_test early");
      repeat ($urandom_range(1, 30)) begin
        @(posedge clk); #1;
        check(start_march && march_ele == exp_ele[e], "element not held");
      end
      @(negedge clk) end_march = 1'b1;
      @(negedge clk) end_march = 1'b0;
      #1 check(!start_march, "start_march still high after end_march");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(!start_march && !end_test, "outputs after reset");
    @(negedge clk) reset_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(!start_march, "started without start_test");
    @(negedge clk) start_test = 1'b1;
    serve(6);
    @(posedge clk); #1 check(end_test, "end_test after last element");
    repeat (5) @(posedge clk);
    #1 check(end_test && !start_march, "end_test held, start_march low");
    @(negedge clk) start_test = 1'b0;
    @(posedge clk); #1 check(!end_test, "end_test cleared");
    // stop during the third element, restart from the first
    @(negedge clk) start_test = 1'b1;
    serve(2);
    repeat (4) @(posedge clk);
    @(negedge clk) start_test = 1'b0;
    @(posedge clk); #1 check(!start_march, "stopped test left start_march high");
    @(negedge clk) start_test = 1'b1;
    serve(6);
    @(posedge clk); #1 check(end_test, "end_test after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
