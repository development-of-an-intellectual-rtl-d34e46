// iip_pkg -- shared types and constants of the scheduling-monitor I-IP.
//
// The monitor watches a 32-bit processor address bus (the HF-RISC bus is 32
// bits wide) and keeps the real-time parameters of each task in tick units.
// The RTOS API passes period, capacity and deadline as 16-bit unsigned
// numbers, so ticks are 16 bits here too. The four MISS error codes are the
// ones defined for the monitor; code 000 means "no error seen".
package iip_pkg;

  localparam int unsigned ADDR_W = 32;  // processor address bus width
  localparam int unsigned TICK_W = 16;  // period / capacity / deadline width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TICK_W-1:0] tick_t;

  // MISS output encoding.
  typedef enum logic [2:0] {
    MISS_NONE       = 3'b000,
    MISS_NOT_SCHED  = 3'b001,  // utilisation test failed (warning only)
    MISS_DEADLINE   = 3'b010,  // a task's deadline passed with work left
    MISS_SCHED_ERR  = 3'b011,  // a known task runs that EDF did not choose
    MISS_UNKNOWN    = 3'b100   // code outside every known region is running
  } miss_t;

  // One entry of the known task set. The task owns the code addresses
  // base..limit (inclusive).
  typedef struct packed {
    logic  valid;
    addr_t base;
    addr_t limit;
    tick_t period;    // Ti
    tick_t capacity;  // Ci
    tick_t deadline;  // Di, relative to the release
  } task_cfg_t;

  // Classification of one CPU instruction address.
  typedef enum logic [1:0] {
    REG_KERNEL  = 2'd0,  // RTOS kernel / ISR code: ignored
    REG_IDLE    = 2'd1,  // the RTOS idle task
    REG_TASK    = 2'd2,  // inside a known task's range
    REG_UNKNOWN = 2'd3   // none of the above
  } region_t;

endpackage
