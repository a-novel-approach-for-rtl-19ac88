// Checks the access unit (ADDR_W = 5): for each element of March C+ it must
// emit, one per clock and without gaps, exactly the operations of the element
// at every address in the requested order (w0 | r0 w1 r1 | r1 w0 r0 | r0, data
// all 0 or all 1), then pulse end_march. The expected stream is generated here
// from the element definition; the cycle count per element is checked.
module tb_mbist_access_unit;
  import mbist_pkg::*;
  localparam int AW = 5, N = 1 << AW;
  logic          clk = 1'b0, reset_n = 1'b0, updown_order = 1'b1, start_march = 1'b0;
  march_ele_t    march_ele = ME_W0;
  logic          end_march, ctrl_out, op_valid;
  logic [AW-1:0] addr_out;
  logic [7:0]    data_out;
  int checks = 0, failures = 0;

  mbist_access_unit #(.ADDR_W(AW), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic run_element(input march_ele_t e, input bit ud);
    int k;
    logic [1:0] ops [3];   // {write, ones}
    int cyc = 0;
    case (e)
      ME_W0:     begin k = 1; ops[0] = 2'b10; end
      ME_R0:     begin k = 1; ops[0] = 2'b00; end
      ME_R0W1R1: begin k = 3; ops[0] = 2'b00; ops[1] = 2'b11; ops[2] = 2'b01; end
      default:   begin k = 3; ops[0] = 2'b01; ops[1] = 2'b10; ops[2] = 2'b00; end
    endcase
    @(negedge clk) begin march_ele = e; updown_order = ud; start_march = 1'b1; end
    // first operation appears after one start cycle
    @(negedge clk); cyc++;
    for (int a = 0; a < N; a++) begin
      int ea = ud ? a : N - 1 - a;
      for (int s = 0; s < k; s++) begin
        check(op_valid && int'(addr_out) == ea && ctrl_out == ops[s][1] &&
              data_out == (ops[s][0] ? 8'hff : 8'h00),
              $sformatf("ele %0d ud %0b addr %0d op %0d: got v=%0b a=%0d c=%0b d=%h",
                        e, ud, ea, s, op_valid, addr_out, ctrl_out, data_out));
        @(negedge clk); cyc++;
      end
    end
    check(end_march && !op_valid, "end_march after the last operation");
    check(cyc == k * N + 1, $sformatf("element took %0d cycles, expected %0d", cyc, k * N + 1));
    start_march = 1'b0;
    @(negedge clk) check(!end_march && !op_valid, "stray activity after the element");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    run_element(ME_W0, 1'b1);
    run_element(ME_R0W1R1, 1'b1);
    run_element(ME_R1W0R0, 1'b1);
    run_element(ME_R0W1R1, 1'b0);
    run_element(ME_R1W0R0, 1'b0);
    run_element(ME_R0, 1'b1);
    run_element(ME_W0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
