// End-to-end test of the memory BIST at its default size (256 x 8).
//
// A reference model in the testbench expands March C+ into the ordered list of
// reads it must perform (address and expected data, for a fault-free memory)
// and every comparison the BIST reports is checked against the next entry. The
// testbench runs: a fault-free test (all reads pass, 14n operations, cycle
// count bounded), a stuck-at-0 and a stuck-at-1 cell (exactly the reads that
// expect the other value at that word fail, and diag_addr names the word), a
// test cut short by dropping start_test and then rerun, and normal-mode access
// through the system port. It counts how often each mechanism occurred: every
// element code, both address orders, pass, fail, end of element, end of test,
// the return to normal mode, and an aborted test.
module tb_mbist_top;
  import mbist_pkg::*;

  localparam int AW = 8;
  localparam int DW = 8;
  localparam int N  = 1 << AW;

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

  mbist_top dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference: ordered reads of March C+ -------------------------------
  int ref_addr[$];
  logic [DW-1:0] ref_data[$];

  task automatic build_reference();
    ref_addr.delete(); ref_data.delete();
    // M1 up (r0,w1,r1); M2 up (r1,w0,r0); M3 down (r0,w1,r1); M4 down (r1,w0,r0); M5 (r0)
    for (int a = 0; a < N; a++) begin ref_addr.push_back(a); ref_data.push_back('0);
                                      ref_addr.push_back(a); ref_data.push_back('1); end
    for (int a = 0; a < N; a++) begin ref_addr.push_back(a); ref_data.push_back('1);
                                      ref_addr.push_back(a); ref_data.push_back('0); end
    for (int a = N-1; a >= 0; a--) begin ref_addr.push_back(a); ref_data.push_back('0);
                                         ref_addr.push_back(a); ref_data.push_back('1); end
    for (int a = N-1; a >= 0; a--) begin ref_addr.push_back(a); ref_data.push_back('1);
                                         ref_addr.push_back(a); ref_data.push_back('0); end
    for (int a = 0; a < N; a++) begin ref_addr.push_back(a); ref_data.push_back('0); end
  endtask

  // ---- mechanism counters --------------------------------------------------
  int n_ele[4];
  int n_up = 0, n_down = 0, n_pass = 0, n_fail = 0, n_end_march = 0, n_end_test = 0;
  int n_writes = 0, n_reads = 0, n_normal = 0, n_abort = 0;
  logic end_test_d = 1'b0;

  always @(posedge clk) begin
    if (dut.u_au.u_moore.idle && dut.start_march && !dut.end_march) begin
      n_ele[dut.march_ele]++;
      if (dut.updown_order) n_up++; else n_down++;
    end
    if (dut.end_march) n_end_march++;
    if (end_test && !end_test_d) n_end_test++;
    end_test_d <= end_test;
    if (dut.au_valid) begin
      if (dut.au_rw) n_writes++; else n_reads++;
    end
  end

  // ---- one BIST run ---------------------------------------------------------
  // Runs a complete test and checks each reported comparison in order. With a
  // fault injected (fault = 1) a comparison fails exactly when the expected
  // data's bit fi_bit at word fi_addr differs from fi_val.
  task automatic run_bist(input bit fault, output int fails, output int cycles);
    int idx = 0;
    int cyc = 0;
    fails = 0;
    build_reference();
    @(negedge clk) start_test = 1'b1;
    while (!end_test && cyc < 10 * 14 * N) begin
      @(posedge clk); #1;
      cyc++;
      if (pass_fail != PF_NONE) begin
        bit exp_fail;
        check(idx < ref_addr.size(), "more comparisons than reads in the algorithm");
        if (idx < ref_addr.size()) begin
          exp_fail = fault && (ref_addr[idx] == int'(fi_addr)) &&
                     (ref_data[idx][fi_bit] != fi_val);
          check(int'(diag_addr) == ref_addr[idx],
                $sformatf("read %0d at address %0h, expected %0h", idx, diag_addr, ref_addr[idx]));
          check((pass_fail == PF_FAIL) == exp_fail,
                $sformatf("read %0d at %0h: pass_fail=%b, expected fail=%0b",
                          idx, diag_addr, pass_fail, exp_fail));
          check(pass_fail == PF_PASS || pass_fail == PF_FAIL, "illegal pass_fail code");
        end
        if (pass_fail == PF_FAIL) begin fails++; n_fail++; end
        if (pass_fail == PF_PASS) n_pass++;
        idx++;
      end
    end
    cycles = cyc;
    check(end_test, "end_test never rose");
    check(idx == 9 * N, $sformatf("%0d comparisons, expected %0d", idx, 9 * N));
    // end_test holds while start_test stays high
    repeat (3) @(posedge clk);
    #1 check(end_test, "end_test did not hold");
    @(negedge clk) start_test = 1'b0;
    @(posedge clk); #1 check(!end_test, "end_test did not clear with start_test");
  endtask

  int fails, cycles, w0, r0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    @(posedge clk);

    // 1: fault-free memory
    w0 = n_writes; r0 = n_reads;
    run_bist(1'b0, fails, cycles);
    check(fails == 0, $sformatf("fault-free memory: %0d fails", fails));
    check(n_writes - w0 == 5 * N, $sformatf("writes %0d, expected %0d", n_writes - w0, 5 * N));
    check(n_reads - r0 == 9 * N, $sformatf("reads %0d, expected %0d", n_reads - r0, 9 * N));
    // 14n operation cycles plus a few per element for the handshake
    check(cycles >= 14 * N && cycles <= 14 * N + 6 * 6,
          $sformatf("test took %0d cycles for %0d operations", cycles, 14 * N));
    $display("fault-free test: %0d cycles for %0d operations", cycles, 14 * N);

    // 2: stuck-at-0 at word 8'h5a bit 3: fails on the four r1 reads there
    fi_en = 1'b1; fi_addr = 8'h5a; fi_bit = 3'd3; fi_val = 1'b0;
    run_bist(1'b1, fails, cycles);
    check(fails == 4, $sformatf("stuck-at-0: %0d fails, expected 4", fails));

    // 3: stuck-at-1 at the last word, bit 7: fails on the five r0 reads there
    fi_addr = 8'hff; fi_bit = 3'd7; fi_val = 1'b1;
    run_bist(1'b1, fails, cycles);
    check(fails == 5, $sformatf("stuck-at-1: %0d fails, expected 5", fails));
    fi_en = 1'b0;

    // 4: abort a test half-way, then rerun it from the start
    @(negedge clk) start_test = 1'b1;
    repeat (5 * N + 7) @(posedge clk);
    @(negedge clk) start_test = 1'b0;
    n_abort++;
    repeat (4) @(posedge clk);
    run_bist(1'b0, fails, cycles);
    check(fails == 0, "rerun after abort reported fails");

    // 5: normal mode: the system port reaches the memory, no comparisons
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) begin sys_addr = AW'(a * 17); sys_data = DW'(a * 29 + 3); sys_ctrl = 1'b1; end
    end
    @(negedge clk) sys_ctrl = 1'b0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) sys_addr = AW'(a * 17);
      #1 check(mem_rdata == DW'(a * 29 + 3), $sformatf("normal-mode read of %0h", sys_addr));
      check(pass_fail == PF_NONE, "comparison reported in normal mode");
      n_normal++;
    end

    // mechanisms
    foreach (n_ele[e]) check(n_ele[e] > 0, $sformatf("element code %0d never issued", e));
    check(n_up > 0 && n_down > 0, "an address order never occurred");
    check(n_pass > 0, "no pass seen");
    check(n_fail > 0, "no fail seen");
    check(n_end_march >= 6 * 4, "too few end_march pulses");
    check(n_end_test == 4, $sformatf("end_test rose %0d times, expected 4", n_end_test));
    check(n_normal > 0 && n_abort > 0, "normal mode or abort never exercised");
    $display("elements w0=%0d r0w1r1=%0d r1w0r0=%0d r0=%0d up=%0d down=%0d pass=%0d fail=%0d end_march=%0d end_test=%0d",
             n_ele[0], n_ele[1], n_ele[2], n_ele[3], n_up, n_down, n_pass, n_fail, n_end_march, n_end_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
