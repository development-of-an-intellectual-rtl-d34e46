// tb_watchdog -- self-checking test of one scheduling monitor (two task slots).
//
// A behavioural processor + EDF RTOS model drives the monitored bus. Runs:
//   1. Ci/Ti = 10/20, 25/50 (U = 1): 200 ticks, no error may be raised, and
//      the monitor's EDF choice must follow the reference timeline
//      T1 in [0,10) [20,30) [45,55) [60,70) [80,90), T2 otherwise (t < 100).
//   2. 10/20, 35/50 (U = 1.2): 'cannot be scheduled' at boot, deadline
//      misses at t = 50 (T2) and t = 60 (T1) only, each 2*2+2 = 6 clocks
//      after the tick's interrupt is first sampled; timeline T1 [0,10)
//      [20,30) [55,65), T2 [10,20) [30,55).
//   3. the RTOS dispatches T2 at t = 25 instead of T1: scheduling issue at 25.
//   4. the code jumps from T1 into T2 in the middle of t = 5: scheduling issue at 5.
//   5. one task 2/10: idle ticks raise nothing; idle forced while T1 is
//      ready at t = 10: scheduling issue at 10.
//   6. the RTOS runs a third task the monitor does not know: unknown task
//      at t = 2, the tick it is first dispatched.
module tb_watchdog;
  import iip_pkg::*;

  localparam int N = 2;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  addr_t     addr_from_cpu;
  logic      data_access_cpu, irq_to_cpu;
  logic      cfg_we = 1'b0, os_we = 1'b0, start = 1'b0;
  logic      cfg_idx = 1'b0;
  task_cfg_t cfg_entry = '0;
  addr_t     kern_base = 32'h0001_0000, kern_limit = 32'h0001_FFFF;
  addr_t     idle_base = 32'h0000_0800, idle_limit = 32'h0000_08FF;
  miss_t     miss;
  logic      miss_strobe, monitoring, exp_found;
  logic      exp_idx;

  watchdog #(.NTASKS(N)) dut (.clk, .reset, .addr_from_cpu, .data_access_cpu, .irq_to_cpu,
    .cfg_we, .cfg_idx, .cfg_entry, .os_we, .kern_base, .kern_limit, .idle_base, .idle_limit,
    .start, .miss, .miss_strobe, .monitoring, .exp_found, .exp_idx);

  rtos_cpu_model #(.MAXT(3)) cpu (.clk(clk), .addr(addr_from_cpu), .data_access(data_access_cpu),
                                  .irq(irq_to_cpu));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // error log: tick, code, clocks since that tick's interrupt was sampled
  int    cyc = 0, rise_cyc = 0;
  logic  irq_prev = 1'b0;
  int    ev_tick [$];
  miss_t ev_code [$];
  int    ev_lat  [$];
  always @(posedge clk) begin
    cyc++;
    #1;
    if (irq_to_cpu && !irq_prev) rise_cyc = cyc;
    irq_prev = irq_to_cpu;
    if (miss_strobe) begin
      ev_tick.push_back(cpu.now);
      ev_code.push_back(miss);
      ev_lat.push_back(cyc - rise_cyc);
    end
  end

  localparam addr_t BASE0 = 32'h0000_1000, BASE1 = 32'h0000_2000, BASE2 = 32'h0000_3000;

  task automatic load(input int c0, t0, c1, t1, input bit v1);
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    ev_tick.delete(); ev_code.delete(); ev_lat.delete();
    @(negedge clk);
    cfg_we = 1'b1; cfg_idx = 1'b0;
    cfg_entry = '{valid: 1'b1, base: BASE0, limit: BASE0 + 32'hFFF,
                  period: tick_t'(t0), capacity: tick_t'(c0), deadline: tick_t'(t0)};
    @(negedge clk);
    cfg_idx = 1'b1;
    cfg_entry = '{valid: v1, base: BASE1, limit: BASE1 + 32'hFFF,
                  period: tick_t'(t1), capacity: tick_t'(c1), deadline: tick_t'(t1)};
    @(negedge clk);
    cfg_we = 1'b0; os_we = 1'b1;
    @(negedge clk);
    os_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (200) @(negedge clk);  // schedulability test
    check(monitoring, "monitoring after boot");
    cpu.set_task(0, 1, c0, t0, t0, BASE0);
    cpu.set_task(1, v1, c1, t1, t1, BASE1);
    cpu.set_task(2, 0, 1, 10, 10, BASE2);
    cpu.force_tick = -1; cpu.force_task = -2; cpu.switch_tick = -1;
    cpu.boot();
  endtask

  // the monitor's choice for the current tick, against a timeline
  task automatic run_and_compare(input int ticks, input int exp_of_t [$]);
    for (int t = 0; t < ticks; t++) begin
      cpu.run_tick();
      if (t < exp_of_t.size())
        check(exp_found && int'(exp_idx) == exp_of_t[t],
              $sformatf("t=%0d: EDF head %0d/%0d, expected %0d", t, exp_found, exp_idx, exp_of_t[t]));
    end
  endtask

  task automatic first_error(input int tick, input miss_t code, input string name);
    check(ev_tick.size() > 0, $sformatf("%s: an error was raised", name));
    if (ev_tick.size() > 0)
      check(ev_tick[0] == tick && ev_code[0] == code,
            $sformatf("%s: first error %0d at t=%0d, expected %0d at t=%0d",
                      name, ev_code[0], ev_tick[0], code, tick));
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tl [$];
    int none [$];
    // ---- 1: U = 1, EDF schedule of Ci/Ti 10/20 and 25/50
    load(10, 20, 25, 50, 1'b1);
    check(miss == MISS_NONE, "U=1 is schedulable");
    tl.delete();
    for (int t = 0; t < 100; t++)
      tl.push_back(((t < 10) || (t >= 20 && t < 30) || (t >= 45 && t < 55) ||
                    (t >= 60 && t < 70) || (t >= 80 && t < 90)) ? 0 : 1);
    run_and_compare(200, tl);
    check(ev_tick.size() == 0, $sformatf("U=1 run: %0d errors raised", ev_tick.size()));
    check(miss == MISS_NONE, "U=1 run: MISS stays 000");
    // ---- 2: U = 1.2
    load(10, 20, 35, 50, 1'b1);
    check(miss == MISS_NOT_SCHED, "U=1.2 flagged 001 at boot");
    check(ev_tick.size() == 1 && ev_code[0] == MISS_NOT_SCHED, "one warning at boot");
    ev_tick.delete(); ev_code.delete(); ev_lat.delete();
    tl.delete();
    for (int t = 0; t < 65; t++)
      tl.push_back(((t < 10) || (t >= 20 && t < 30) || (t >= 55 && t < 65)) ? 0 : 1);
    run_and_compare(70, tl);
    check(ev_tick.size() == 2, $sformatf("U=1.2: %0d errors, expected 2", ev_tick.size()));
    if (ev_tick.size() == 2) begin
      check(ev_tick[0] == 50 && ev_code[0] == MISS_DEADLINE, "T2 deadline miss at t=50");
      check(ev_tick[1] == 60 && ev_code[1] == MISS_DEADLINE, "T1 deadline miss at t=60");
      check(ev_lat[0] == 2 * N + 2 && ev_lat[1] == 2 * N + 2,
            $sformatf("deadline-miss latency %0d/%0d clocks, expected %0d", ev_lat[0], ev_lat[1], 2 * N + 2));
    end
    check(cpu.late_jobs >= 2, "late jobs were exercised");
    // ---- 3: priority inversion
    load(10, 20, 25, 50, 1'b1);
    cpu.force_tick = 25; cpu.force_task = 1;
    run_and_compare(40, none);
    first_error(25, MISS_SCHED_ERR, "priority inversion");
    // ---- 4: task switch without a scheduling event
    load(10, 20, 25, 50, 1'b1);
    cpu.switch_tick = 5; cpu.switch_task = 1;
    run_and_compare(10, none);
    first_error(5, MISS_SCHED_ERR, "switch without tick");
    check(ev_tick.size() == 1, "one report for the stray switch");
    // ---- 5: idle ticks
    load(2, 10, 1, 10, 1'b0);
    tl = '{0, 0};
    run_and_compare(30, tl);
    check(ev_tick.size() == 0, "idle ticks raise nothing");
    check(cpu.idle_ticks == 24, $sformatf("%0d idle ticks, expected 24", cpu.idle_ticks));
    check(!exp_found, "nothing ready in an idle tick");
    cpu.force_tick = 30; cpu.force_task = -1;
    run_and_compare(1, none);
    first_error(30, MISS_SCHED_ERR, "idle while a task is ready");
    // ---- 6: a task the monitor does not know
    load(1, 10, 1, 10, 1'b1);
    cpu.set_task(2, 1, 1, 10, 10, BASE2);
    tl = '{0, 1};
    run_and_compare(3, tl);
    first_error(2, MISS_UNKNOWN, "unknown task");
    check(miss == MISS_UNKNOWN, "MISS shows 100");
    check(cpu.data_accesses > 0, "data accesses were present on the bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
