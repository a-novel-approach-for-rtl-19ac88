// Checks the Moore machine with the testbench standing in for the two counters
// (operation index and "last address" flag over NA addresses). For every
// element code: the operations come one per clock from the cycle after
// start_march, in the element's order (w0 | r0 w1 r1 | r1 w0 r0 | r0) with the
// right read/write control and all-0/all-1 data, k * NA of them without a gap,
// then end_march for exactly one cycle and back to idle. Also: no start while
// start_march is low, and an element abandoned without end_march when
// start_march falls.
module tb_mbist_moore_machine;
  import mbist_pkg::*;
  localparam int NA = 5;
  logic       clk = 1'b0, reset_n = 1'b0, start_march = 1'b0, done;
  march_ele_t march_ele = ME_W0;
  logic [1:0] s_count;
  logic       op_done, ctrl_out, end_march, idle;
  logic [7:0] data_out;
  int checks = 0, failures = 0;
  int sc = 0, ac = 0;

  mbist_moore_machine dut (.*);

  always #5 clk = ~clk;

  assign s_count = 2'(sc);
  assign done    = (ac == NA - 1);

  // stand-in counters
  always @(posedge clk) begin
    if (idle) begin sc <= 0; ac <= 0; end
    else if (op_done) begin
      automatic int k;
      k = (march_ele == ME_R0W1R1 || march_ele == ME_R1W0R0) ? 3 : 1;
      if (sc == k - 1) begin sc <= 0; if (ac < NA - 1) ac <= ac + 1; end
      else sc <= sc + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // op encoding {write, ones}
  function automatic logic [1:0] op_of(march_ele_t e, int s);
    case (e)
      ME_W0:     return 2'b10;
      ME_R0:     return 2'b00;
      ME_R0W1R1: return (s == 0) ? 2'b00 : (s == 1) ? 2'b11 : 2'b01;
      default:   return (s == 0) ? 2'b01 : (s == 1) ? 2'b10 : 2'b00;
    endcase
  endfunction

  task automatic run_element(input march_ele_t e);
    int k = (e == ME_R0W1R1 || e == ME_R1W0R0) ? 3 : 1;
    @(negedge clk) begin march_ele = e; start_march = 1'b1; end
    for (int i = 0; i < k * NA; i++) begin
      logic [1:0] o = op_of(e, i % k);
      @(negedge clk);
      check(op_done && !end_march, $sformatf("ele %0d op %0d: no operation", e, i));
      check(ctrl_out == o[1], $sformatf("ele %0d op %0d: ctrl %0b", e, i, ctrl_out));
      check(data_out == (o[0] ? 8'hff : 8'h00), $sformatf("ele %0d op %0d: data %h", e, i, data_out));
    end
    @(negedge clk);
    check(end_march && idle && !op_done, $sformatf("ele %0d: end_march/idle after last op", e));
    start_march = 1'b0;
    @(negedge clk);
    check(!end_march && idle, "end_march longer than one cycle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    repeat (3) @(negedge clk) check(idle && !op_done, "left idle without start_march");
    run_element(ME_W0);
    run_element(ME_R0W1R1);
    run_element(ME_R1W0R0);
    run_element(ME_R0);
    run_element(ME_R1W0R0);
    // abandon an element
    @(negedge clk) begin march_ele = ME_R0W1R1; start_march = 1'b1; end
    repeat (4) @(negedge clk);
    start_march = 1'b0;
    @(negedge clk) check(idle && !end_march, "did not abandon the element");
    @(negedge clk) check(idle && !end_march, "end_march after abandon");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
