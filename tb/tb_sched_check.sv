// tb_sched_check -- self-checking test of the EDF utilisation test.
//
// Runs the two task sets of the validation (Ci/Ti = 10/20 + 25/50, U = 1,
// schedulable; 10/20 + 35/50, U = 1.2, not schedulable), an invalid-period
// case, and random task sets. The reference decision is exact integer
// arithmetic: U <= 1  <=>  sum(Ci * P / Ti) <= P with P the product of the
// periods. The fixed-point sum is compared with sum(floor(Ci * 2^16 / Ti)),
// and the run time with the expected serial-divider schedule.
module tb_sched_check;
  import iip_pkg::*;

  localparam int N = 4;
  localparam int F = 16;
  localparam int UW = TICK_W + F + $clog2(N + 1);

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  task_cfg_t     entries [N];
  logic          busy, done, schedulable;
  logic [UW-1:0] util;

  sched_check #(.NTASKS(N), .UTIL_FRAC(F)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_task(input int i, input bit v, input int c, input int t);
    entries[i] = '0;
    entries[i].valid    = v;
    entries[i].capacity = tick_t'(c);
    entries[i].period   = tick_t'(t);
    entries[i].deadline = tick_t'(t);
  endtask

  // run the block and compare with the exact reference
  task automatic run_and_check(input string name);
    longint unsigned p, lhs, fsum;
    bit ref_ok;
    int cyc, exp_cyc;
    p = 1;
    for (int i = 0; i < N; i++) if (entries[i].valid && entries[i].period != 0) p *= entries[i].period;
    lhs = 0;
    fsum = 0;
    ref_ok = 1'b1;
    exp_cyc = 3;  // leave idle, leave the last issue, finish
    for (int i = 0; i < N; i++) begin
      if (entries[i].valid && entries[i].period == 0) ref_ok = 1'b0;
      if (entries[i].valid && entries[i].period != 0) begin
        lhs  += longint'(entries[i].capacity) * (p / entries[i].period);
        fsum += (longint'(entries[i].capacity) << F) / entries[i].period;
        exp_cyc += TICK_W + F + 2;
      end else begin
        exp_cyc += 1;
      end
    end
    if (lhs > p) ref_ok = 1'b0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(schedulable == ref_ok, $sformatf("%s: schedulable=%0d expected %0d", name, schedulable, ref_ok));
    check(ref_ok == 1'b0 && lhs <= p || longint'(util) == fsum,
          $sformatf("%s: util=%0d expected %0d", name, util, fsum));
    check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    @(negedge clk);
    check(!done && !busy, $sformatf("%s: done is a single pulse", name));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) set_task(i, 1'b0, 0, 0);
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // utilisation exactly 1: schedulable
    set_task(0, 1'b1, 10, 20);
    set_task(1, 1'b1, 25, 50);
    run_and_check("U=1.0");
    check(util == UW'(1 << F), "U=1.0 gives exactly 2^16");
    // utilisation 1.2: not schedulable
    set_task(1, 1'b1, 35, 50);
    run_and_check("U=1.2");
    check(!schedulable, "U=1.2 flagged");
    // 1/3 + 1/3 + 1/3 rounds below 1 and stays schedulable
    set_task(0, 1'b1, 1, 3); set_task(1, 1'b1, 2, 6); set_task(2, 1'b1, 3, 9);
    run_and_check("thirds");
    // barely over 1: 1/3 + 1/3 + 1/3 + 1/65000
    set_task(3, 1'b1, 1, 60000);
    run_and_check("thirds+eps");
    // a valid task with zero period fails
    set_task(3, 1'b1, 1, 0);
    run_and_check("zero period");
    // random task sets
    for (int k = 0; k < 60; k++) begin
      for (int i = 0; i < N; i++) begin
        int t;
        t = $urandom_range(2, 200);
        set_task(i, ($urandom_range(0, 3) != 0), $urandom_range(1, t / 2 + 1), t);
      end
      run_and_check($sformatf("random %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
