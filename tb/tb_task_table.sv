// tb_task_table -- self-checking test of the task table and address classifier.
//
// Loads four task ranges plus kernel and idle ranges (one range overlapping
// another to test the priority rule), reads the entries back, then
// classifies directed and random addresses and compares with a reference
// classification computed here from the same range list.
module tb_task_table;
  import iip_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic       cfg_we = 1'b0, os_we = 1'b0;
  logic [1:0] cfg_idx = '0;
  task_cfg_t  cfg_entry = '0;
  addr_t      kern_base = '0, kern_limit = '0, idle_base = '0, idle_limit = '0;
  task_cfg_t  entries [N];
  addr_t      class_addr = '0;
  region_t    class_region;
  logic [1:0] class_idx;

  task_table #(.NTASKS(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference ranges
  addr_t rb [N] = '{32'h0000_1000, 32'h0000_2000, 32'h0000_3000, 32'h0000_2800};
  addr_t rl [N] = '{32'h0000_1FFF, 32'h0000_2FFF, 32'h0000_3FFF, 32'h0000_2FFF};
  logic  rv [N] = '{1'b1, 1'b1, 1'b1, 1'b0};  // slot 3 left invalid at first
  localparam addr_t KB = 32'h0001_0000, KL = 32'h0001_FFFF;
  localparam addr_t IB = 32'h0000_0800, IL = 32'h0000_08FF;

  function automatic void ref_class(input addr_t a, output region_t r, output int idx);
    r = REG_UNKNOWN;
    idx = 0;
    if (a >= KB && a <= KL) r = REG_KERNEL;
    else if (a >= IB && a <= IL) r = REG_IDLE;
    else
      for (int i = 0; i < N; i++)
        if (rv[i] && a >= rb[i] && a <= rl[i] && r == REG_UNKNOWN) begin
          r = REG_TASK;
          idx = i;
        end
  endfunction

  task automatic probe(input addr_t a);
    region_t r;
    int i;
    class_addr = a;
    #1;
    ref_class(a, r, i);
    check(class_region == r && (r != REG_TASK || int'(class_idx) == i),
          $sformatf("addr %h: region %0d idx %0d, expected %0d idx %0d",
                    a, class_region, class_idx, r, i));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // before loading, every non-kernel address is unknown (ranges empty)
    @(negedge clk);
    class_addr = 32'h0000_1004;
    #1 check(class_region == REG_UNKNOWN, "empty table must classify as unknown");
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      cfg_we    = 1'b1;
      cfg_idx   = 2'(i);
      cfg_entry = '{valid: rv[i], base: rb[i], limit: rl[i],
                    period: tick_t'(20 + i), capacity: tick_t'(5 + i), deadline: tick_t'(18 + i)};
    end
    @(negedge clk);
    cfg_we     = 1'b0;
    os_we      = 1'b1;
    kern_base  = KB; kern_limit = KL; idle_base = IB; idle_limit = IL;
    @(negedge clk);
    os_we = 1'b0;
    // read back
    for (int i = 0; i < N; i++)
      check(entries[i].valid == rv[i] && entries[i].base == rb[i] && entries[i].limit == rl[i] &&
            entries[i].period == tick_t'(20 + i) && entries[i].capacity == tick_t'(5 + i) &&
            entries[i].deadline == tick_t'(18 + i), $sformatf("entry %0d read back", i));
    // directed addresses, including range edges
    probe(32'h0000_1000); probe(32'h0000_1FFF); probe(32'h0000_0FFF);
    probe(32'h0000_2000); probe(32'h0000_2900); probe(32'h0000_3FFF);
    probe(32'h0000_4000); probe(KB); probe(KL); probe(KL + 1);
    probe(IB); probe(IL); probe(32'hFFFF_FFFF); probe(32'h0);
    // enable slot 3 (overlaps slot 1): slot 1 must still win
    @(negedge clk);
    rv[3]     = 1'b1;
    cfg_we    = 1'b1;
    cfg_idx   = 2'd3;
    cfg_entry = '{valid: 1'b1, base: rb[3], limit: rl[3], period: 16'd1, capacity: 16'd1, deadline: 16'd1};
    @(negedge clk);
    cfg_we = 1'b0;
    probe(32'h0000_2900);
    check(class_idx == 2'd1, "overlap resolved to lower slot");
    // random addresses in the interesting window
    for (int k = 0; k < 400; k++) probe(addr_t'($urandom_range(0, 32'h0002_1000)));
    // reset clears the table
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    class_addr = 32'h0000_1004;
    #1 check(class_region == REG_UNKNOWN && !entries[0].valid, "reset clears table");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
