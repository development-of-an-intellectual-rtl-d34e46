// tb_iip_multicore -- end-to-end test of the monitor top at its default size
// (one core, four task slots), driven by a behavioural processor + EDF RTOS.
//
// Scenarios, each from a fresh reset and boot through the top's ports:
//   A. Ci/Ti = 10/20, 25/50 (U = 1), 120 ticks: no error, EDF choice checked
//      against the reference timeline for t < 100.
//   B. 10/20, 35/50 (U = 1.2): 001 at boot, 010 at t = 50 and t = 60, each
//      2*4+2 = 10 clocks after the tick's interrupt is first sampled.
//   C. five RTOS tasks, four known to the monitor (each 1/10): 100 at t = 4,
//      when the fifth task is first dispatched.
//   D. priority inversion at t = 25 and E. a task switch without a tick at
//      t = 5: 011 at that tick.
//   F. one task 2/10: idle ticks with nothing ready raise nothing.
//   G. three tasks with (Ti, Ci, Di) = (4,1,4), (5,2,5), (7,2,7), U = 0.94,
//      over one hyperperiod of 140 ticks: no error.
// Every mechanism of the monitor is counted (ticks checked, warnings,
// deadline misses, scheduling issues, unknown tasks, late jobs waiting,
// idle ticks, ignored data accesses, configuration writes); a mechanism
// that never happened counts as a failure.
module tb_iip_multicore;
  import iip_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  addr_t      core_addr [1];
  logic [0:0] core_data_access, core_irq;
  logic [0:0] cfg_core = '0;
  logic       cfg_we = 1'b0, os_we = 1'b0, start = 1'b0;
  logic [1:0] cfg_idx = '0;
  task_cfg_t  cfg_entry = '0;
  addr_t      kern_base = 32'h0001_0000, kern_limit = 32'h0001_FFFF;
  addr_t      idle_base = 32'h0000_0800, idle_limit = 32'h0000_08FF;
  miss_t      miss [1];
  logic [0:0] miss_strobe, monitoring, exp_found;
  logic [1:0] exp_idx [1];
  logic       any_miss;

  iip_multicore dut (.*);

  addr_t m_addr;
  logic  m_da, m_irq;
  rtos_cpu_model #(.MAXT(5)) cpu (.clk(clk), .addr(m_addr), .data_access(m_da), .irq(m_irq));
  assign core_addr[0]         = m_addr;
  assign core_data_access[0]  = m_da;
  assign core_irq[0]          = m_irq;

  int checks = 0, failures = 0;
  int n_ticks = 0, n_warn = 0, n_deadline = 0, n_sched = 0, n_unknown = 0;
  int n_late = 0, n_idle = 0, n_data = 0, n_cfg = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int    cyc = 0, rise_cyc = 0;
  logic  irq_prev = 1'b0;
  int    ev_tick [$];
  miss_t ev_code [$];
  int    ev_lat  [$];
  always @(posedge clk) begin
    cyc++;
    #1;
    if (m_irq && !irq_prev) rise_cyc = cyc;
    irq_prev = m_irq;
    if (miss_strobe[0]) begin
      ev_tick.push_back(cpu.now);
      ev_code.push_back(miss[0]);
      ev_lat.push_back(cyc - rise_cyc);
      case (miss[0])
        MISS_NOT_SCHED: n_warn++;
        MISS_DEADLINE:  n_deadline++;
        MISS_SCHED_ERR: n_sched++;
        MISS_UNKNOWN:   n_unknown++;
        default: ;
      endcase
    end
  end

  function automatic addr_t base_of(int i);
    return 32'h0000_1000 + addr_t'(i) * 32'h1000;
  endfunction

  // boot with up to five RTOS tasks; the monitor is told about n_known of them
  task automatic boot(input int c [5], input int t [5], input int n_os, input int n_known);
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    ev_tick.delete(); ev_code.delete(); ev_lat.delete();
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      cfg_we    = 1'b1;
      cfg_idx   = 2'(i);
      cfg_entry = '{valid: (i < n_known), base: base_of(i), limit: base_of(i) + 32'hFFF,
                    period: tick_t'(t[i]), capacity: tick_t'(c[i]), deadline: tick_t'(t[i])};
      n_cfg++;
    end
    @(negedge clk);
    cfg_we = 1'b0; os_we = 1'b1;
    @(negedge clk);
    os_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!monitoring[0]) @(negedge clk);
    for (int i = 0; i < 5; i++) cpu.set_task(i, (i < n_os), c[i], t[i], t[i], base_of(i));
    cpu.force_tick = -1; cpu.force_task = -2; cpu.switch_tick = -1;
    cpu.boot();
  endtask

  task automatic run(input int ticks, input int tl [$]);
    for (int k = 0; k < ticks; k++) begin
      cpu.run_tick();
      n_ticks++;
      if (k < tl.size())
        check(exp_found[0] && int'(exp_idx[0]) == tl[k],
              $sformatf("t=%0d: EDF head %0d/%0d, expected %0d", k, exp_found[0], exp_idx[0], tl[k]));
    end
    n_late += cpu.late_jobs;
    n_idle += cpu.idle_ticks;
    n_data += cpu.data_accesses;
  endtask

  task automatic first_error(input int tick, input miss_t code, input string name);
    check(ev_tick.size() > 0, $sformatf("%s: an error was raised", name));
    if (ev_tick.size() > 0)
      check(ev_tick[0] == tick && ev_code[0] == code,
            $sformatf("%s: first error %0d at t=%0d, expected %0d at t=%0d",
                      name, ev_code[0], ev_tick[0], code, tick));
  endtask

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tl [$];
    int none [$];
    // ---- A
    boot('{10, 25, 1, 1, 1}, '{20, 50, 10, 10, 10}, 2, 2);
    check(miss[0] == MISS_NONE && !any_miss, "A: schedulable");
    for (int k = 0; k < 100; k++)
      tl.push_back(((k < 10) || (k >= 20 && k < 30) || (k >= 45 && k < 55) ||
                    (k >= 60 && k < 70) || (k >= 80 && k < 90)) ? 0 : 1);
    run(120, tl);
    check(ev_tick.size() == 0, $sformatf("A: %0d errors raised", ev_tick.size()));
    // ---- B
    boot('{10, 35, 1, 1, 1}, '{20, 50, 10, 10, 10}, 2, 2);
    check(miss[0] == MISS_NOT_SCHED && any_miss, "B: 001 at boot");
    ev_tick.delete(); ev_code.delete(); ev_lat.delete();
    tl.delete();
    for (int k = 0; k < 65; k++)
      tl.push_back(((k < 10) || (k >= 20 && k < 30) || (k >= 55 && k < 65)) ? 0 : 1);
    run(66, tl);
    check(ev_tick.size() == 2, $sformatf("B: %0d errors, expected 2", ev_tick.size()));
    if (ev_tick.size() == 2) begin
      check(ev_tick[0] == 50 && ev_code[0] == MISS_DEADLINE, "B: deadline miss at t=50");
      check(ev_tick[1] == 60 && ev_code[1] == MISS_DEADLINE, "B: deadline miss at t=60");
      check(ev_lat[0] == 10 && ev_lat[1] == 10,
            $sformatf("B: latency %0d/%0d clocks, expected 10", ev_lat[0], ev_lat[1]));
    end
    // ---- C: test set with an unmapped fifth task
    boot('{1, 1, 1, 1, 1}, '{10, 10, 10, 10, 10}, 5, 4);
    tl = '{0, 1, 2, 3};
    run(5, tl);
    first_error(4, MISS_UNKNOWN, "C");
    // ---- D
    boot('{10, 25, 1, 1, 1}, '{20, 50, 10, 10, 10}, 2, 2);
    cpu.force_tick = 25; cpu.force_task = 1;
    run(30, none);
    first_error(25, MISS_SCHED_ERR, "D");
    // ---- E
    boot('{10, 25, 1, 1, 1}, '{20, 50, 10, 10, 10}, 2, 2);
    cpu.switch_tick = 5; cpu.switch_task = 1;
    run(8, none);
    first_error(5, MISS_SCHED_ERR, "E");
    // ---- F
    boot('{2, 1, 1, 1, 1}, '{10, 10, 10, 10, 10}, 1, 1);
    run(20, none);
    check(ev_tick.size() == 0, "F: idle ticks raise nothing");
    // ---- G
    boot('{1, 2, 2, 1, 1}, '{4, 5, 7, 10, 10}, 3, 3);
    check(miss[0] == MISS_NONE, "G: U=0.94 is schedulable");
    run(140, none);
    check(ev_tick.size() == 0, $sformatf("G: %0d errors raised", ev_tick.size()));
    // ---- every mechanism happened
    check(n_ticks > 0,    "ticks checked");
    check(n_warn > 0,     "cannot-be-scheduled warning happened");
    check(n_deadline > 0, "deadline miss happened");
    check(n_sched > 0,    "scheduling issue happened");
    check(n_unknown > 0,  "unknown task happened");
    check(n_late > 0,     "late job with a waiting release happened");
    check(n_idle > 0,     "idle ticks happened");
    check(n_data > 0,     "data accesses were ignored");
    check(n_cfg > 0,      "configuration writes happened");
    $display("mechanisms: ticks=%0d warn=%0d deadline=%0d sched=%0d unknown=%0d late=%0d idle=%0d data=%0d cfg=%0d",
             n_ticks, n_warn, n_deadline, n_sched, n_unknown, n_late, n_idle, n_data, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
