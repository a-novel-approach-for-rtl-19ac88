// Fault-coverage run of the complete BIST at its default size (256 x 8).
//
// For each fault class a march test is meant to catch (stuck-at, transition,
// inversion coupling, idempotent coupling) the testbench injects randomly
// placed faults into the memory, one per test, with random victim word and bit,
// random polarity and, for coupling faults, a random aggressor word above or
// below the victim. Each complete March C+ run must report at least one fail,
// and every fail must name the victim word. A fault-free run must report none.
// Coverage per class is printed; March C+ is expected to catch all of these
// unlinked faults, so any escape counts as a failure.
module tb_mbist_fault_coverage;
  import mbist_pkg::*;

  localparam int AW = 8;
  localparam int DW = 8;
  localparam int N  = 1 << AW;
  localparam int FAULTS_PER_CLASS = 24;

  logic          clk = 1'b0;
  logic          reset_n = 1'b0;
  logic          start_test = 1'b0;
  logic          end_test;
  logic [1:0]    pass_fail;
  logic [AW-1:0] diag_addr;
  logic [AW-1:0] sys_addr = '0;
  logic [DW-1:0] sys_data = '0;
  logic          sys_ctrl = 1'b0;
  logic [DW-1:0] mem_rdata;
  logic          fi_en = 1'b0;
  logic [1:0]    fi_type = '0;
  logic [AW-1:0] fi_addr = '0;
  logic [AW-1:0] fi_agg = '0;
  logic [2:0]    fi_bit = '0;
  logic          fi_val = 1'b0;

  int checks = 0, failures = 0;
  int detected[4];
  string cname[4] = '{"stuck-at", "transition", "inversion coupling", "idempotent coupling"};

  mbist_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((4 * FAULTS_PER_CLASS + 2) * (14 * N + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one complete test; returns the number of fails and whether all named addr
  task automatic run_bist(output int fails, output bit all_at_victim);
    int cyc = 0;
    fails = 0;
    all_at_victim = 1'b1;
    @(negedge clk) start_test = 1'b1;
    while (!end_test && cyc < 14 * N + 100) begin
      @(posedge clk); #1;
      cyc++;
      if (pass_fail == PF_FAIL) begin
        fails++;
        if (diag_addr != fi_addr) all_at_victim = 1'b0;
      end
    end
    check(end_test, "test did not finish");
    @(negedge clk) start_test = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int fails;
    bit at_victim;
    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;

    run_bist(fails, at_victim);
    check(fails == 0, $sformatf("fault-free memory reported %0d fails", fails));

    for (int t = 0; t < 4; t++) begin
      for (int f = 0; f < FAULTS_PER_CLASS; f++) begin
        fi_en = 1'b1; fi_type = 2'(t);
        fi_addr = AW'($urandom_range(1, N - 2)); fi_bit = 3'($urandom); fi_val = 1'(f);
        // aggressor alternately above and below the victim
        if ((f / 2) % 2 == 0) fi_agg = AW'($urandom_range(int'(fi_addr) + 1, N - 1));
        else                  fi_agg = AW'($urandom_range(0, int'(fi_addr) - 1));
        run_bist(fails, at_victim);
        check(fails > 0, $sformatf("%s fault escaped: victim %h bit %0d value %0b aggressor %h",
                                   cname[t], fi_addr, fi_bit, fi_val, fi_agg));
        check(at_victim, $sformatf("%s fault reported at a word other than the victim", cname[t]));
        if (fails > 0) detected[t]++;
      end
    end
    fi_en = 1'b0;
    foreach (detected[t])
      $display("%-20s detected %0d of %0d", cname[t], detected[t], FAULTS_PER_CLASS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
