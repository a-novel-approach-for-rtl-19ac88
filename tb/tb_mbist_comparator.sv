// Checks the comparator on random data: no comparison (00) for a write
// (enable = 1) or without valid, 11 when the read data equals the expected
// data, 10 otherwise, including single-bit differences.
module tb_mbist_comparator;
  import mbist_pkg::*;
  logic       enable, valid;
  logic [7:0] expected, mem_data;
  logic [1:0] pass_fail;
  int checks = 0, failures = 0;

  mbist_comparator dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] exp_pf;
      enable   = 1'($urandom);
      valid    = 1'($urandom);
      expected = 8'($urandom);
      case ($urandom_range(0, 2))
        0: mem_data = expected;
        1: mem_data = expected ^ (8'd1 << $urandom_range(0, 7));
        default: mem_data = 8'($urandom);
      endcase
      #1;
      if (!valid || enable)          exp_pf = 2'b00;
      else if (mem_data == expected) exp_pf = 2'b11;
      else                           exp_pf = 2'b10;
      checks++;
      if (pass_fail != exp_pf) begin
        failures++;
        $display("FAIL en=%0b v=%0b exp=%h mem=%h: %b, expected %b",
                 enable, valid, expected, mem_data, pass_fail, exp_pf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
