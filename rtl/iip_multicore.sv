// iip_multicore -- scheduling monitors for an NCORES-core processor.
//
// Each processor core gets its own monitor (watchdog), connected to that
// core's address bus, instruction/data qualifier and interrupt line, and
// each core's error code comes out separately. The per-core task sets are
// loaded through one shared configuration port: cfg_core selects which
// monitor a task-table or kernel/idle-range write goes to. 'start' (RTOS
// boot) goes to all monitors at once. any_miss is high while some core's
// code is not 000.
//
// One monitor per core is the described arrangement; the single-core case
// (NCORES = 1) is the main one. The shared configuration port and the
// any_miss summary are this design's own choices. Timing per core is that of
// watchdog.
module iip_multicore
  import iip_pkg::*;
#(
  parameter int unsigned NCORES    = 1,
  parameter int unsigned NTASKS    = 4,
  parameter int unsigned UTIL_FRAC = 16,
  localparam int unsigned IDX_W    = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int unsigned CORE_W   = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  logic              clk,
  input  logic              reset,
  // monitored cores
  input  addr_t             core_addr        [NCORES],
  input  logic [NCORES-1:0] core_data_access,
  input  logic [NCORES-1:0] core_irq,
  // configuration
  input  logic [CORE_W-1:0] cfg_core,
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_idx,
  input  task_cfg_t         cfg_entry,
  input  logic              os_we,
  input  addr_t             kern_base,
  input  addr_t             kern_limit,
  input  addr_t             idle_base,
  input  addr_t             idle_limit,
  input  logic              start,
  // results
  output miss_t             miss        [NCORES],
  output logic [NCORES-1:0] miss_strobe,
  output logic [NCORES-1:0] monitoring,
  output logic [NCORES-1:0] exp_found,
  output logic [IDX_W-1:0]  exp_idx     [NCORES],
  output logic              any_miss
);

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic sel;
    assign sel = (32'(cfg_core) == c);

    watchdog #(.NTASKS(NTASKS), .UTIL_FRAC(UTIL_FRAC)) u_iip (
      .clk             (clk),
      .reset           (reset),
      .addr_from_cpu   (core_addr[c]),
      .data_access_cpu (core_data_access[c]),
      .irq_to_cpu      (core_irq[c]),
      .cfg_we          (cfg_we && sel),
      .cfg_idx         (cfg_idx),
      .cfg_entry       (cfg_entry),
      .os_we           (os_we && sel),
      .kern_base       (kern_base),
      .kern_limit      (kern_limit),
      .idle_base       (idle_base),
      .idle_limit      (idle_limit),
      .start           (start),
      .miss            (miss[c]),
      .miss_strobe     (miss_strobe[c]),
      .monitoring      (monitoring[c]),
      .exp_found       (exp_found[c]),
      .exp_idx         (exp_idx[c])
    );
  end

  always_comb begin
    any_miss = 1'b0;
    for (int c = 0; c < NCORES; c++) if (miss[c] != MISS_NONE) any_miss = 1'b1;
  end

endmodule
