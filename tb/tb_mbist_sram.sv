// Checks the memory model against a reference copy: random writes and reads
// with no fault, write enable low leaving data unchanged, and then, for each
// fault type (stuck-at, transition, inversion coupling, idempotent coupling) a
// series of randomly placed faults under random traffic aimed at the victim
// and aggressor words, every read compared with the reference's faulty value.
module tb_mbist_sram;
  localparam int AW = 8, DW = 8;
  logic          clk = 1'b0, we = 1'b0, fi_en = 1'b0, fi_val = 1'b0;
  logic [1:0]    fi_type = '0;
  logic [AW-1:0] addr = '0, fi_addr = '0, fi_agg = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [2:0]    fi_bit = '0;
  logic [DW-1:0] model [1 << AW];
  int checks = 0, failures = 0;
  int effects[4];

  mbist_sram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: value a read returns
  function automatic logic [DW-1:0] ref_read(input logic [AW-1:0] a);
    logic [DW-1:0] v = model[a];
    if (fi_en && fi_type == 2'd0 && a == fi_addr) v[fi_bit] = fi_val;
    return v;
  endfunction

  // reference: apply a write
  task automatic ref_write(input logic [AW-1:0] a, input logic [DW-1:0] d);
    logic [DW-1:0] v = d;
    logic          old = model[a][fi_bit];
    if (fi_en && fi_type == 2'd1 && a == fi_addr && old != fi_val && d[fi_bit] == fi_val) begin
      v[fi_bit] = old;
      effects[1]++;
    end
    model[a] = v;
    if (fi_en && fi_type >= 2'd2 && a == fi_agg && old != fi_val && d[fi_bit] == fi_val) begin
      model[fi_addr][fi_bit] = (fi_type == 2'd2) ? ~model[fi_addr][fi_bit] : fi_val;
      effects[fi_type]++;
    end
  endtask

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk) begin addr = AW'(a); wdata = DW'($urandom); we = 1'b1; model[a] = wdata; end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = AW'($urandom); wdata = DW'($urandom); we = 1'($urandom);
      #1 check(rdata == model[addr], $sformatf("read %h = %h, expected %h", addr, rdata, model[addr]));
      if (we) model[addr] = wdata;
    end
    // faults
    for (int t = 0; t < 4; t++) begin
      for (int f = 0; f < 20; f++) begin
        @(negedge clk);
        we = 1'b0;
        fi_en = 1'b1; fi_type = 2'(t); fi_addr = AW'($urandom); fi_bit = 3'($urandom);
        fi_val = 1'($urandom);
        do fi_agg = AW'($urandom); while (fi_agg == fi_addr);
        for (int i = 0; i < 60; i++) begin
          @(negedge clk);
          case ($urandom_range(0, 2))
            0: addr = fi_addr;
            1: addr = fi_agg;
            default: addr = AW'($urandom);
          endcase
          wdata = DW'($urandom); we = 1'($urandom);
          if (t == 0) effects[0] += int'(addr == fi_addr);
          #1 check(rdata == ref_read(addr),
                   $sformatf("type %0d: read %h = %h, expected %h", t, addr, rdata, ref_read(addr)));
          if (we) ref_write(addr, wdata);
        end
      end
    end
    @(negedge clk) begin we = 1'b0; fi_en = 1'b0; end
    foreach (effects[t]) check(effects[t] > 0, $sformatf("fault type %0d never took effect", t));
    #1 check(rdata == model[addr], "fault hook stayed active");
    $display("fault effects: stuck %0d transition %0d cfin %0d cfid %0d",
             effects[0], effects[1], effects[2], effects[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
