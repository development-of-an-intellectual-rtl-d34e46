// task_table -- the monitor's list of known tasks and its address classifier.
//
// The monitor identifies the running task purely from the instruction
// addresses the processor puts on its bus: every task is linked into an
// address range of its own, and the monitor keeps, per task, that range
// together with the task's EDF parameters (period, capacity, deadline).
// Two more ranges describe the RTOS itself: the kernel (interrupt handler,
// scheduler and the library calls tasks make) and the idle task.
//
// Writing: cfg_we stores cfg_entry into slot cfg_idx on the next clock;
// os_we stores the kernel and idle ranges. All entries reset to invalid.
// The table is meant to be loaded before the RTOS starts.
//
// Classifying (combinational, no latency): class_addr is compared with all
// ranges in parallel. Kernel wins over idle, idle over tasks, and among
// overlapping task ranges the lowest slot wins. A hit on a valid task slot
// gives REG_TASK and its index; an address outside every range gives
// REG_UNKNOWN.
//
// Storing the task set as address ranges plus EDF parameters follows the
// described monitor; the write port, the separate kernel/idle ranges and the
// overlap priority are this design's own choices.
module task_table
  import iip_pkg::*;
#(
  parameter int unsigned NTASKS = 4,
  localparam int unsigned IDX_W = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // configuration
  input  logic                  cfg_we,
  input  logic [IDX_W-1:0]      cfg_idx,
  input  task_cfg_t             cfg_entry,
  input  logic                  os_we,
  input  addr_t                 kern_base,
  input  addr_t                 kern_limit,
  input  addr_t                 idle_base,
  input  addr_t                 idle_limit,
  // table contents
  output task_cfg_t             entries [NTASKS],
  // address classifier
  input  addr_t                 class_addr,
  output region_t               class_region,
  output logic [IDX_W-1:0]      class_idx
);

  addr_t kern_base_q, kern_limit_q, idle_base_q, idle_limit_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTASKS; i++) entries[i] <= '0;
      kern_base_q  <= '1;
      kern_limit_q <= '0;
      idle_base_q  <= '1;
      idle_limit_q <= '0;
    end else begin
      if (cfg_we && (32'(cfg_idx) < NTASKS)) entries[cfg_idx] <= cfg_entry;
      if (os_we) begin
        kern_base_q  <= kern_base;
        kern_limit_q <= kern_limit;
        idle_base_q  <= idle_base;
        idle_limit_q <= idle_limit;
      end
    end
  end

  always_comb begin
    logic hit;
    hit          = 1'b0;
    class_idx    = '0;
    class_region = REG_UNKNOWN;
    if (class_addr >= kern_base_q && class_addr <= kern_limit_q) begin
      class_region = REG_KERNEL;
    end else if (class_addr >= idle_base_q && class_addr <= idle_limit_q) begin
      class_region = REG_IDLE;
    end else begin
      for (int i = NTASKS - 1; i >= 0; i--) begin
        if (entries[i].valid && class_addr >= entries[i].base &&
            class_addr <= entries[i].limit) begin
          hit       = 1'b1;
          class_idx = IDX_W'(i);
        end
      end
      if (hit) class_region = REG_TASK;
    end
  end

endmodule
