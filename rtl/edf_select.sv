// edf_select -- picks the head of the EDF ready queue.
//
// Earliest Deadline First gives the processor to the ready task whose
// absolute deadline is nearest. Instead of keeping a physically sorted
// queue, this block scans the task state one slot per clock and keeps the
// best candidate: a slot qualifies when ready[i] is set, and it wins when its
// key (ticks left to its deadline) is strictly smaller than the best so far,
// so on equal deadlines the lower slot index wins.
//
// Timing: a start pulse is taken at a clock edge; NTASKS edges later 'done'
// pulses for one clock with 'found' (some task is ready) and 'head' (its
// slot). The inputs must stay stable while busy. Outputs hold until the next
// scan. The EDF ordering is the described one; the serial scan, one task
// per clock, and the tie rule are this design's own choices.
module edf_select
  import iip_pkg::*;
#(
  parameter int unsigned NTASKS = 4,
  localparam int unsigned IDX_W = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NTASKS-1:0] ready,
  input  tick_t            key [NTASKS],
  output logic             busy,
  output logic             done,
  output logic             found,
  output logic [IDX_W-1:0] head
);

  logic [IDX_W-1:0] idx;
  logic             best_v;
  logic [IDX_W-1:0] best_i;
  tick_t            best_k;
  logic             take;

  // does slot idx beat the current best?
  assign take = ready[idx] && (!best_v || key[idx] < best_k);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      found  <= 1'b0;
      head   <= '0;
      idx    <= '0;
      best_v <= 1'b0;
      best_i <= '0;
      best_k <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        idx    <= '0;
        best_v <= 1'b0;
      end else if (busy) begin
        if (take) begin
          best_v <= 1'b1;
          best_i <= idx;
          best_k <= key[idx];
        end
        if (32'(idx) == NTASKS - 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          found <= take || best_v;
          head  <= take ? idx : best_i;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
