// watchdog -- passive EDF scheduling monitor (the I-IP) for one processor core.
//
// The monitor sits beside the processor on its address bus and never drives
// the bus. It is loaded with the known task set (code address range, period
// Ti, capacity Ci and deadline Di of each task, plus the address ranges of
// the RTOS kernel and idle task), then 'start' marks the RTOS boot. From then
// on it runs its own copy of the EDF schedule, one step per timer interrupt,
// and compares it with the task the processor really runs, recognised by the
// instruction addresses it fetches. Errors appear on 'miss':
//   001 cannot be scheduled  - sum(Ci/Ti) > 1 at boot (a warning; monitoring goes on)
//   010 deadline missed      - a job reached its deadline with capacity left
//   011 scheduling issue     - a known task runs that EDF did not pick, the
//                              scheduler picked another task than EDF's head,
//                              or a task took over without a scheduling event
//   100 unknown task         - instructions outside every known range run
// 'miss' holds the latest code (000 after reset); 'miss_strobe' pulses once
// per detected error.
//
// Operation per timer tick (rising edge of irq_to_cpu):
//   S1 check  : one task per clock, deadlines and periods advance by a tick;
//               a job whose deadline arrives with work left is a miss; a
//               period end releases a new job (Ci, Di).
//   S0 sort   : edf_select scans the ready tasks (capacity left), one per
//               clock, for the nearest deadline; the deadline-miss code is
//               written when the scan ends, 2*NTASKS+2 clocks after irq is
//               first sampled high (6 clocks for two tasks).
//   dispatch  : after the kernel's interrupt handler runs, the first
//               instruction fetch outside the kernel range identifies the
//               dispatched task, which is compared with the EDF head.
//   S2 update : the dispatched task is charged one tick of capacity.
//   run       : until the next tick, a fetch from another known task or
//               from unknown code is reported once.
// The first tick after 'start' only sorts (no time has passed yet). A job
// that overruns its deadline keeps running with top priority until done;
// the job released meanwhile waits (one waiting job per task) and starts
// when the late one ends.
//
// Interface: addr_from_cpu / data_access_cpu / irq_to_cpu are the monitored
// core signals (data_access_cpu high marks a data access, ignored here).
// Configuration ports are those of task_table. exp_found/exp_idx show the
// task EDF expects in the current tick.
//
// Following the described I-IP: the address-bus connection, the four error
// codes, the tick-driven check / sort / compare / update flow, the
// schedulability warning and the two-task latency of six clocks. This
// design's own choices: the configuration port, the kernel/idle ranges, the
// dispatch detection, the handling of late jobs, and treating every rising
// edge of irq_to_cpu as a scheduler tick. Ticks must be further apart than
// 2*NTASKS+3 clocks.
module watchdog
  import iip_pkg::*;
#(
  parameter int unsigned NTASKS    = 4,
  parameter int unsigned UTIL_FRAC = 16,
  localparam int unsigned IDX_W    = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic             clk,
  input  logic             reset,
  // monitored processor signals
  input  addr_t            addr_from_cpu,
  input  logic             data_access_cpu,
  input  logic             irq_to_cpu,
  // configuration
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  task_cfg_t        cfg_entry,
  input  logic             os_we,
  input  addr_t            kern_base,
  input  addr_t            kern_limit,
  input  addr_t            idle_base,
  input  addr_t            idle_limit,
  input  logic             start,
  // results
  output miss_t            miss,
  output logic             miss_strobe,
  output logic             monitoring,
  output logic             exp_found,
  output logic [IDX_W-1:0] exp_idx
);

  typedef enum logic [2:0] {
    ST_CONFIG,   // waiting for the table and 'start'
    ST_SCHED,    // schedulability test running
    ST_WAIT_IRQ, // no task dispatched yet in this tick
    ST_CHECK,    // S1: advance time, detect deadline misses, release jobs
    ST_SORT,     // S0: EDF head search
    ST_DISPATCH, // waiting for the scheduler to hand over the processor
    ST_RUN       // S2 done; watching the running task until the next tick
  } state_t;

  state_t state;

  // ---------------------------------------------------------------- table
  task_cfg_t        entries [NTASKS];
  region_t          cls_region;
  logic [IDX_W-1:0] cls_idx;

  task_table #(.NTASKS(NTASKS)) u_table (
    .clk          (clk),
    .rst          (reset),
    .cfg_we       (cfg_we && state == ST_CONFIG),
    .cfg_idx      (cfg_idx),
    .cfg_entry    (cfg_entry),
    .os_we        (os_we && state == ST_CONFIG),
    .kern_base    (kern_base),
    .kern_limit   (kern_limit),
    .idle_base    (idle_base),
    .idle_limit   (idle_limit),
    .entries      (entries),
    .class_addr   (addr_from_cpu),
    .class_region (cls_region),
    .class_idx    (cls_idx)
  );

  // ------------------------------------------------- schedulability test
  logic sc_done, sc_ok;

  sched_check #(.NTASKS(NTASKS), .UTIL_FRAC(UTIL_FRAC)) u_sched (
    .clk         (clk),
    .rst         (reset),
    .start       (state == ST_CONFIG && start),
    .entries     (entries),
    .busy        (),
    .done        (sc_done),
    .schedulable (sc_ok),
    .util        ()
  );

  // ------------------------------------------------- per-task job state
  tick_t             tc   [NTASKS];  // capacity left in the current job
  tick_t             dl   [NTASKS];  // ticks to the current job's deadline (0 = overdue)
  tick_t             pcnt [NTASKS];  // ticks to the next release
  logic [NTASKS-1:0] pend;           // a released job waits behind a late one
  tick_t             pdl  [NTASKS];  // ticks to the waiting job's deadline

  logic [NTASKS-1:0] ready;
  always_comb
    for (int i = 0; i < NTASKS; i++) ready[i] = entries[i].valid && (tc[i] != '0);

  // ------------------------------------------------------------ EDF head
  logic             sort_start, sort_done, sort_found;
  logic [IDX_W-1:0] sort_head;

  edf_select #(.NTASKS(NTASKS)) u_edf (
    .clk   (clk),
    .rst   (reset),
    .start (sort_start),
    .ready (ready),
    .key   (dl),
    .busy  (),
    .done  (sort_done),
    .found (sort_found),
    .head  (sort_head)
  );

  // ----------------------------------------------- tick and fetch events
  logic irq_q;
  logic tick;
  logic fetch;
  assign tick  = irq_to_cpu && !irq_q;
  assign fetch = !data_access_cpu;

  // Dispatch capture: after a tick, wait for the kernel's handler to be
  // entered, then take the first fetch outside the kernel as the task the
  // scheduler chose. Runs in parallel with the check and sort.
  typedef enum logic [1:0] {CAP_OFF, CAP_WAIT_KERNEL, CAP_WAIT_TASK, CAP_DONE} cap_t;
  cap_t             cap;
  region_t          cap_region;
  logic [IDX_W-1:0] cap_idx;

  always_ff @(posedge clk) begin
    if (reset) begin
      irq_q      <= 1'b0;
      cap        <= CAP_OFF;
      cap_region <= REG_KERNEL;
      cap_idx    <= '0;
    end else begin
      irq_q <= irq_to_cpu;
      if (tick && monitoring) begin
        cap <= CAP_WAIT_KERNEL;
      end else begin
        unique case (cap)
          CAP_WAIT_KERNEL:
            if (fetch && cls_region == REG_KERNEL) cap <= CAP_WAIT_TASK;
          CAP_WAIT_TASK:
            if (fetch && cls_region != REG_KERNEL) begin
              cap        <= CAP_DONE;
              cap_region <= cls_region;
              cap_idx    <= cls_idx;
            end
          default: ;
        endcase
      end
    end
  end

  // ----------------------------------------------------------- main FSM
  logic [IDX_W-1:0] idx;          // task under check in ST_CHECK
  logic             first_tick;
  logic             dl_missed;    // a deadline passed during this tick's check
  logic             run_valid;    // a known task was dispatched this tick
  logic [IDX_W-1:0] run_idx;
  logic             run_flagged;  // one report per tick from ST_RUN
  logic             sort_busy_q;  // start pulse already given in this ST_SORT visit

  assign monitoring = !(state inside {ST_CONFIG, ST_SCHED});
  assign sort_start = (state == ST_SORT) && !sort_busy_q;

  // what the running-task watch sees on the bus
  logic run_bad_task, run_unknown;
  assign run_bad_task = fetch && cls_region == REG_TASK &&
                        (!run_valid || cls_idx != run_idx);
  assign run_unknown  = fetch && cls_region == REG_UNKNOWN;

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= ST_CONFIG;
      miss        <= MISS_NONE;
      miss_strobe <= 1'b0;
      exp_found   <= 1'b0;
      exp_idx     <= '0;
      idx         <= '0;
      first_tick  <= 1'b1;
      dl_missed   <= 1'b0;
      run_valid   <= 1'b0;
      run_idx     <= '0;
      run_flagged <= 1'b0;
      sort_busy_q <= 1'b0;
      pend        <= '0;
      for (int i = 0; i < NTASKS; i++) begin
        tc[i]   <= '0;
        dl[i]   <= '0;
        pcnt[i] <= '0;
        pdl[i]  <= '0;
      end
    end else begin
      miss_strobe <= 1'b0;
      unique case (state)

        ST_CONFIG: if (start) state <= ST_SCHED;

        ST_SCHED: if (sc_done) begin
          if (!sc_ok) begin
            miss        <= MISS_NOT_SCHED;
            miss_strobe <= 1'b1;
          end
          // boot: every task releases its first job at time 0
          for (int i = 0; i < NTASKS; i++) begin
            tc[i]   <= entries[i].capacity;
            dl[i]   <= entries[i].deadline;
            pcnt[i] <= entries[i].period;
            pdl[i]  <= '0;
          end
          pend       <= '0;
          first_tick <= 1'b1;
          state      <= ST_WAIT_IRQ;
        end

        ST_WAIT_IRQ, ST_RUN, ST_DISPATCH: begin
          if (state == ST_RUN && !run_flagged && (run_bad_task || run_unknown)) begin
            miss        <= run_unknown ? MISS_UNKNOWN : MISS_SCHED_ERR;
            miss_strobe <= 1'b1;
            run_flagged <= 1'b1;
          end
          if (state == ST_DISPATCH && cap == CAP_DONE) begin
            // compare the dispatched task with the EDF head
            run_valid   <= 1'b0;
            run_flagged <= 1'b0;
            state       <= ST_RUN;
            unique case (cap_region)
              REG_UNKNOWN: begin
                miss        <= MISS_UNKNOWN;
                miss_strobe <= 1'b1;
                run_flagged <= 1'b1;
              end
              REG_IDLE: if (exp_found) begin
                miss        <= MISS_SCHED_ERR;
                miss_strobe <= 1'b1;
              end
              REG_TASK: begin
                if (!exp_found || cap_idx != exp_idx) begin
                  miss        <= MISS_SCHED_ERR;
                  miss_strobe <= 1'b1;
                end
                run_valid <= 1'b1;
                run_idx   <= cap_idx;
                // S2: charge one tick to the task that really runs
                if (tc[cap_idx] != '0) begin
                  if (tc[cap_idx] == tick_t'(1) && pend[cap_idx]) begin
                    tc[cap_idx]   <= entries[cap_idx].capacity;
                    dl[cap_idx]   <= pdl[cap_idx];
                    pend[cap_idx] <= 1'b0;
                  end else begin
                    tc[cap_idx] <= tc[cap_idx] - 1'b1;
                  end
                end
              end
              default: ;
            endcase
          end
          if (tick) begin
            run_valid <= 1'b0;
            dl_missed <= 1'b0;
            idx       <= '0;
            if (first_tick) begin
              first_tick <= 1'b0;
              state      <= ST_SORT;
            end else begin
              state <= ST_CHECK;
            end
          end
        end

        ST_CHECK: begin
          if (entries[idx].valid) begin
            // deadline of the running job
            if (dl[idx] != '0) begin
              dl[idx] <= dl[idx] - 1'b1;
              if (dl[idx] == tick_t'(1) && tc[idx] != '0) dl_missed <= 1'b1;
            end
            // deadline of a job still waiting behind a late one
            if (pend[idx] && pdl[idx] != '0) begin
              pdl[idx] <= pdl[idx] - 1'b1;
              if (pdl[idx] == tick_t'(1)) dl_missed <= 1'b1;
            end
            // period end: release the next job
            if (pcnt[idx] == tick_t'(1) || pcnt[idx] == '0) begin
              pcnt[idx] <= entries[idx].period;
              if (tc[idx] == '0) begin
                tc[idx] <= entries[idx].capacity;
                dl[idx] <= entries[idx].deadline;
              end else begin
                pend[idx] <= 1'b1;
                pdl[idx]  <= entries[idx].deadline;
              end
            end else begin
              pcnt[idx] <= pcnt[idx] - 1'b1;
            end
          end
          if (32'(idx) == NTASKS - 1) state <= ST_SORT;
          else idx <= idx + 1'b1;
        end

        ST_SORT: begin
          sort_busy_q <= 1'b1;
          if (sort_done) begin
            sort_busy_q <= 1'b0;
            exp_found   <= sort_found;
            exp_idx     <= sort_head;
            if (dl_missed) begin
              miss        <= MISS_DEADLINE;
              miss_strobe <= 1'b1;
            end
            state <= ST_DISPATCH;
          end
        end

        default: state <= ST_CONFIG;
      endcase
    end
  end

  // A new tick must not arrive while the previous one is still being checked.
  a_tick_spacing: assert property (@(posedge clk) disable iff (reset)
    tick |-> !(state inside {ST_CHECK, ST_SORT}))
    else $error("watchdog: timer tick arrived during check/sort");

endmodule
