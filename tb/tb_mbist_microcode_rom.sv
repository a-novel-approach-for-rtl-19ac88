// Checks the March C+ program held in the microcode table: six elements with
// their codes and address orders, the last flag on the sixth, and words past
// the program reading as a final element.
module tb_mbist_microcode_rom;
  import mbist_pkg::*;
  logic [2:0] idx;
  ucode_t     word;
  int checks = 0, failures = 0;

  mbist_microcode_rom dut (.idx, .word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {last, updown, ele} per word
  logic [3:0] exp_w [8] = '{4'b0_1_00, 4'b0_1_01, 4'b0_1_10, 4'b0_0_01,
                            4'b0_0_10, 4'b1_1_11, 4'b1_1_11, 4'b1_1_11};

  initial begin
    for (int i = 0; i < 8; i++) begin
      idx = 3'(i);
      #1;
      checks++;
      if (word !== exp_w[i]) begin
        failures++;
        $display("FAIL word %0d = %b, expected %b", i, word, exp_w[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
