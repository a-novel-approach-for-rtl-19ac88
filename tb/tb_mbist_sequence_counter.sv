// Checks the sequence counter against a reference count: random op_done pulses
// for each element code, wrapping after operation 0 (one-operation elements) or
// 2 (three-operation elements), holding without op_done, and clearing on clear
// and on reset.
module tb_mbist_sequence_counter;
  import mbist_pkg::*;
  logic       clk = 1'b0, reset_n = 1'b0, op_done = 1'b0, clear = 1'b0;
  march_ele_t march_ele = ME_W0;
  logic [1:0] s_count;
  int checks = 0, failures = 0;
  int model = 0;

  mbist_sequence_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (s_count != 0) failures++;
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int lim;
      @(negedge clk);
      if (i % 300 == 0) march_ele = march_ele_t'(i / 300 % 4);
      op_done = ($urandom_range(0, 3) != 0);
      clear   = ($urandom_range(0, 60) == 0);
      lim = (march_ele == ME_R0W1R1 || march_ele == ME_R1W0R0) ? 3 : 1;
      @(posedge clk);
      if (clear) model = 0;
      else if (op_done) model = (model + 1) % lim;
      #1;
      checks++;
      if (int'(s_count) != model) begin
        failures++;
        $display("FAIL step %0d ele=%0d: s_count=%0d expected %0d", i, march_ele, s_count, model);
      end
    end
    @(negedge clk) begin march_ele = ME_R0W1R1; op_done = 1'b1; clear = 1'b0; end
    @(negedge clk) reset_n = 1'b0;
    #1 checks++; if (s_count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
