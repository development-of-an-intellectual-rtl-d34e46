// tb_iip_dualcore -- two cores, one monitor each.
//
// Core 0 runs the schedulable set Ci/Ti = 10/20, 25/50; core 1 runs the
// overloaded set 10/20, 35/50. Both task tables are loaded through the
// shared configuration port with cfg_core. Core 0 must stay at 000 for 70
// ticks while core 1 reports 001 at boot and 010 at t = 50 and t = 60;
// any_miss must follow core 1.
module tb_iip_dualcore;
  import iip_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  addr_t      core_addr [2];
  logic [1:0] core_data_access, core_irq;
  logic [0:0] cfg_core = '0;
  logic       cfg_we = 1'b0, os_we = 1'b0, start = 1'b0;
  logic [1:0] cfg_idx = '0;
  task_cfg_t  cfg_entry = '0;
  addr_t      kern_base = 32'h0001_0000, kern_limit = 32'h0001_FFFF;
  addr_t      idle_base = 32'h0000_0800, idle_limit = 32'h0000_08FF;
  miss_t      miss [2];
  logic [1:0] miss_strobe, monitoring, exp_found;
  logic [1:0] exp_idx [2];
  logic       any_miss;

  iip_multicore #(.NCORES(2)) dut (.*);

  addr_t a0, a1;
  logic  d0, d1, i0, i1;
  rtos_cpu_model #(.MAXT(2)) cpu0 (.clk(clk), .addr(a0), .data_access(d0), .irq(i0));
  rtos_cpu_model #(.MAXT(2)) cpu1 (.clk(clk), .addr(a1), .data_access(d1), .irq(i1));
  assign core_addr[0] = a0;
  assign core_addr[1] = a1;
  assign core_data_access = {d1, d0};
  assign core_irq = {i1, i0};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int ev0 = 0;
  int ev1_tick [$];
  miss_t ev1_code [$];
  always @(posedge clk) begin
    #1;
    if (miss_strobe[0]) ev0++;
    if (miss_strobe[1]) begin
      ev1_tick.push_back(cpu1.now);
      ev1_code.push_back(miss[1]);
    end
  end

  task automatic load(input int core, input int c1);
    addr_t b;
    for (int i = 0; i < 4; i++) begin
      b = 32'h0000_1000 + addr_t'(i) * 32'h1000;
      @(negedge clk);
      cfg_core  = 1'(core);
      cfg_we    = 1'b1;
      cfg_idx   = 2'(i);
      cfg_entry = '{valid: (i < 2), base: b, limit: b + 32'hFFF,
                    period: (i == 0) ? 16'd20 : 16'd50, capacity: (i == 0) ? 16'd10 : tick_t'(c1),
                    deadline: (i == 0) ? 16'd20 : 16'd50};
    end
    @(negedge clk);
    cfg_we = 1'b0; os_we = 1'b1;
    @(negedge clk);
    os_we = 1'b0;
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    load(0, 25);
    load(1, 35);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (monitoring != 2'b11) @(negedge clk);
    check(miss[0] == MISS_NONE, "core 0 schedulable");
    check(miss[1] == MISS_NOT_SCHED && any_miss, "core 1 warned at boot");
    ev1_tick.delete(); ev1_code.delete();
    cpu0.set_task(0, 1, 10, 20, 20, 32'h0000_1000);
    cpu0.set_task(1, 1, 25, 50, 50, 32'h0000_2000);
    cpu1.set_task(0, 1, 10, 20, 20, 32'h0000_1000);
    cpu1.set_task(1, 1, 35, 50, 50, 32'h0000_2000);
    cpu0.boot();
    cpu1.boot();
    fork
      for (int t = 0; t < 70; t++) cpu0.run_tick();
      begin
        #3;  // the second core's ticks are offset from the first
        for (int t = 0; t < 70; t++) cpu1.run_tick();
      end
    join
    check(ev0 == 0 && miss[0] == MISS_NONE, $sformatf("core 0: %0d errors", ev0));
    check(ev1_tick.size() == 2, $sformatf("core 1: %0d errors, expected 2", ev1_tick.size()));
    if (ev1_tick.size() == 2) begin
      check(ev1_tick[0] == 50 && ev1_code[0] == MISS_DEADLINE, "core 1: miss at t=50");
      check(ev1_tick[1] == 60 && ev1_code[1] == MISS_DEADLINE, "core 1: miss at t=60");
    end
    check(any_miss, "any_miss follows core 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
