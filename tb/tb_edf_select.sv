// tb_edf_select -- self-checking test of the EDF head search.
//
// Drives random ready masks and deadline keys (with many equal keys to hit
// the tie rule) and compares found/head with a reference minimum search:
// the ready slot with the smallest key, lowest slot on a tie. Also checks
// that 'done' comes exactly NTASKS clocks after the start pulse.
module tb_edf_select;
  import iip_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         start = 1'b0;
  logic [N-1:0] ready = '0;
  tick_t        key [N];
  logic         busy, done, found;
  logic [1:0]   head;

  edf_select #(.NTASKS(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_case(input string name);
    bit ref_found;
    int ref_head, cyc;
    ref_found = 1'b0;
    ref_head  = 0;
    for (int i = 0; i < N; i++)
      if (ready[i] && (!ref_found || key[i] < key[ref_head])) begin
        ref_found = 1'b1;
        ref_head  = i;
      end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // clock edges after the one that took the start pulse
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == N, $sformatf("%s: done after %0d clocks, expected %0d", name, cyc, N));
    check(found == ref_found && (!ref_found || int'(head) == ref_head),
          $sformatf("%s: found=%0d head=%0d expected %0d/%0d", name, found, head, ref_found, ref_head));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) key[i] = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // the Table 1 situation at t = 40: T1 released (20 to go), T2 has 10 to go
    ready = 4'b0011; key[0] = 16'd20; key[1] = 16'd10;
    run_case("t40");
    check(head == 2'd1, "T2 keeps the processor at t=40");
    ready = 4'b0000;
    run_case("none ready");
    ready = 4'b1000; key[3] = 16'd65535;
    run_case("only last");
    ready = 4'b1111; key[0] = 16'd7; key[1] = 16'd7; key[2] = 16'd3; key[3] = 16'd3;
    run_case("ties");
    check(head == 2'd2, "tie goes to the lower slot");
    for (int k = 0; k < 300; k++) begin
      ready = N'($urandom);
      for (int i = 0; i < N; i++) key[i] = tick_t'($urandom_range(0, 5));
      run_case($sformatf("random %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
