// rtos_cpu_model -- behavioural model of a processor running an EDF RTOS,
// seen from its address bus. Testbench use only.
//
// Every tick it raises the timer interrupt for two clocks (the interrupted
// task keeps fetching for one more clock), runs the kernel's interrupt
// handler (fetches from the kernel range), lets its own EDF scheduler pick a
// task and then fetches from that task's code range (or the idle task's)
// until the tick ends, with a data access to a heap address every fourth
// clock. Its scheduler uses the usual EDF rule: ready task with the nearest
// deadline, lowest id on a tie; a job that overruns keeps running, the job
// released meanwhile waits for it. Faults can be injected: dispatch a chosen
// task at one tick, or jump into another task's code in the middle of one.
module rtos_cpu_model
  import iip_pkg::*;
#(
  parameter int MAXT      = 5,
  parameter int TICK_CLKS = 40,
  parameter int ISR_CLKS  = 6
) (
  input  logic  clk,
  output addr_t addr,
  output logic  data_access,
  output logic  irq
);

  localparam addr_t KERNEL_BASE = 32'h0001_0000;
  localparam addr_t IDLE_BASE   = 32'h0000_0800;
  localparam addr_t HEAP_ADDR   = 32'h4000_0100;

  // task set as the RTOS knows it
  bit    tv [MAXT];
  int    tC [MAXT], tT [MAXT], tD [MAXT];
  addr_t tbase [MAXT];
  // RTOS job state
  int tc [MAXT], dl [MAXT], pcnt [MAXT], pdl [MAXT];
  bit pend [MAXT];

  // fault injection: -2 = none, -1 = idle, else task id
  int force_tick = -1, force_task = -2;
  int switch_tick = -1, switch_task = 0;

  int now;                 // tick number since boot
  int chosen_hist [4096];  // dispatched task per tick (-1 = idle)
  int dl_miss_ticks [$];   // ticks at which the RTOS saw a deadline pass
  int idle_ticks = 0;
  int data_accesses = 0;
  int late_jobs = 0;       // releases that had to wait behind a late job

  initial begin
    addr        = KERNEL_BASE;
    data_access = 1'b0;
    irq         = 1'b0;
  end

  function automatic void set_task(int i, bit v, int c, int t, int d, addr_t base);
    tv[i] = v; tC[i] = c; tT[i] = t; tD[i] = d; tbase[i] = base;
  endfunction

  function automatic void boot();
    for (int i = 0; i < MAXT; i++) begin
      tc[i] = tC[i]; dl[i] = tD[i]; pcnt[i] = tT[i]; pend[i] = 0; pdl[i] = 0;
    end
    now = 0;
    idle_ticks = 0;
    data_accesses = 0;
    late_jobs = 0;
    dl_miss_ticks.delete();
  endfunction

  function automatic void advance();
    for (int i = 0; i < MAXT; i++) if (tv[i]) begin
      if (dl[i] > 0) begin
        dl[i]--;
        if (dl[i] == 0 && tc[i] > 0) dl_miss_ticks.push_back(now);
      end
      if (pend[i] && pdl[i] > 0) begin
        pdl[i]--;
        if (pdl[i] == 0) dl_miss_ticks.push_back(now);
      end
      pcnt[i]--;
      if (pcnt[i] <= 0) begin
        pcnt[i] = tT[i];
        if (tc[i] == 0) begin
          tc[i] = tC[i]; dl[i] = tD[i];
        end else begin
          pend[i] = 1; pdl[i] = tD[i]; late_jobs++;
        end
      end
    end
  endfunction

  function automatic int pick();
    int best = -1;
    for (int i = 0; i < MAXT; i++)
      if (tv[i] && tc[i] > 0 && (best < 0 || dl[i] < dl[best])) best = i;
    return best;
  endfunction

  function automatic addr_t code_addr(int id, int k);
    if (id < 0) return IDLE_BASE + addr_t'(4 * (k % 32));
    return tbase[id] + addr_t'(4 * (k % 64));
  endfunction

  // one scheduler tick of TICK_CLKS clocks
  task automatic run_tick();
    int cur, k;
    cur = (now == 0) ? -1 : chosen_hist[now - 1];
    // interrupt: the interrupted code fetches once more
    @(negedge clk);
    irq = 1'b1; data_access = 1'b0; addr = code_addr(cur, 63);
    @(negedge clk);
    addr = KERNEL_BASE;
    @(negedge clk);
    irq = 1'b0;
    if (now > 0) advance();
    for (k = 0; k < ISR_CLKS; k++) begin
      addr = KERNEL_BASE + addr_t'(4 * k);
      @(negedge clk);
    end
    cur = pick();
    if (now == force_tick && force_task != -2) cur = force_task;
    chosen_hist[now] = cur;
    if (cur < 0) idle_ticks++;
    for (k = 0; k < TICK_CLKS - ISR_CLKS - 2; k++) begin
      if (now == switch_tick && k == (TICK_CLKS - ISR_CLKS) / 2) cur = switch_task;
      if (k % 4 == 3) begin
        data_access = 1'b1;
        addr = HEAP_ADDR + addr_t'(k);
        data_accesses++;
      end else begin
        data_access = 1'b0;
        addr = code_addr(cur, k);
      end
      @(negedge clk);
    end
    data_access = 1'b0;
    addr = code_addr(cur, 0);
    // the dispatched job used this tick
    if (chosen_hist[now] >= 0 && tc[chosen_hist[now]] > 0) begin
      int j;
      j = chosen_hist[now];
      tc[j]--;
      if (tc[j] == 0 && pend[j]) begin
        tc[j] = tC[j]; dl[j] = pdl[j]; pend[j] = 0;
      end
    end
    now++;
  endtask

endmodule
