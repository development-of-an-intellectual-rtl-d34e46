// sched_check -- EDF schedulability test run before the RTOS starts.
//
// EDF meets every deadline of a set of independent periodic tasks when the
// utilisation U = sum(Ci / Ti) is at most 1. On a start pulse this block
// walks the task table, divides Ci * 2^UTIL_FRAC by Ti for every valid task
// with a shared sequential divider, adds the quotients, and when done pulses
// 'done' with 'schedulable' = (sum <= 2^UTIL_FRAC). The monitor turns a
// failed test into the "cannot be scheduled" warning; it does not stop the
// system. util holds the fixed-point utilisation (UTIL_FRAC fraction bits).
//
// Exactness: each quotient is rounded down, so a set with U <= 1 is never
// flagged, and a rounded sum of exactly 1 with any remainder left over is
// flagged. Only a set whose U exceeds 1 by less than NTASKS * 2^-UTIL_FRAC
// with a rounded sum below 1 can pass unnoticed. A valid task with Ti = 0 fails the test.
//
// Timing: about (TICK_W + UTIL_FRAC + 2) clocks per table slot. The test
// itself follows the described monitor; the fixed-point evaluation with a
// serial divider is this design's own choice.
module sched_check
  import iip_pkg::*;
#(
  parameter int unsigned NTASKS    = 4,
  parameter int unsigned UTIL_FRAC = 16,
  localparam int unsigned UTIL_W   = TICK_W + UTIL_FRAC + $clog2(NTASKS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  task_cfg_t         entries [NTASKS],
  output logic              busy,
  output logic              done,
  output logic              schedulable,
  output logic [UTIL_W-1:0] util
);

  localparam int unsigned DIV_W = TICK_W + UTIL_FRAC;
  localparam int unsigned IDX_W = $clog2(NTASKS + 1);
  localparam int unsigned SEL_W = (NTASKS > 1) ? $clog2(NTASKS) : 1;

  typedef enum logic [1:0] {SC_IDLE, SC_ISSUE, SC_WAIT, SC_FINISH} sc_state_t;
  sc_state_t state;

  logic [IDX_W-1:0]  idx;
  logic [SEL_W-1:0]  sel;
  logic              any_rem;   // some quotient was rounded down
  logic              bad_period;
  logic              div_start, div_done, div_rem_nz;
  logic [DIV_W-1:0]  div_q;

  seq_divider #(.DIVIDEND_W(DIV_W), .DIVISOR_W(TICK_W)) u_div (
    .clk      (clk),
    .rst      (rst),
    .start    (div_start),
    .dividend ({entries[sel].capacity, UTIL_FRAC'(0)}),
    .divisor  (entries[sel].period),
    .busy     (),
    .done     (div_done),
    .quotient (div_q),
    .rem_nz   (div_rem_nz)
  );

  assign div_start = (state == SC_ISSUE) && (32'(idx) < NTASKS) &&
                     entries[sel].valid &&
                     (entries[sel].period != '0);
  assign sel  = SEL_W'(idx);
  assign busy = (state != SC_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= SC_IDLE;
      idx         <= '0;
      util        <= '0;
      bad_period  <= 1'b0;
      any_rem     <= 1'b0;
      done        <= 1'b0;
      schedulable <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        SC_IDLE: if (start) begin
          idx        <= '0;
          util       <= '0;
          bad_period <= 1'b0;
          any_rem    <= 1'b0;
          state      <= SC_ISSUE;
        end
        SC_ISSUE: begin
          if (32'(idx) >= NTASKS) begin
            state <= SC_FINISH;
          end else if (div_start) begin
            state <= SC_WAIT;
          end else begin
            // invalid slot is skipped; a valid slot with Ti = 0 is an error
            if (entries[sel].valid) bad_period <= 1'b1;
            idx <= idx + 1'b1;
          end
        end
        SC_WAIT: if (div_done) begin
          util  <= util + UTIL_W'(div_q);
          if (div_rem_nz) any_rem <= 1'b1;
          idx   <= idx + 1'b1;
          state <= SC_ISSUE;
        end
        SC_FINISH: begin
          // sum of rounded-down terms equal to 1 with a lost remainder
          // means the exact utilisation is above 1
          schedulable <= !bad_period &&
                         ((util < (UTIL_W'(1) << UTIL_FRAC)) ||
                          ((util == (UTIL_W'(1) << UTIL_FRAC)) && !any_rem));
          done        <= 1'b1;
          state       <= SC_IDLE;
        end
        default: state <= SC_IDLE;
      endcase
    end
  end

endmodule
