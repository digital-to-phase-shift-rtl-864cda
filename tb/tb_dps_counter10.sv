// tb_dps_counter10: self-checking test of the 10-bit phase counter.
//
// For a set of values (0, small, values crossing the 8-bit boundary, 1023) the
// test loads the counter, holds the gate enable low and checks that 2COUT is high
// for exactly one cycle, in the cycle that starts N edges after the load edge, and
// that 1COUT pulsed (N >> 8) + 1 times. It then repeats some values with the gate
// enable raised for a number of cycles in the middle, which must stretch the
// delay by exactly that many cycles, and checks that no further 2COUT pulse comes
// once the count has finished.
module tb_dps_counter10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       load, gn_n;
  logic [9:0] d, q;
  logic       cout1, cout2, running;

  dps_counter10 dut (.clk, .rst_n, .load, .d, .gn_n, .q, .cout1, .cout2, .running);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load value n, optionally hold GN high for `hold` cycles starting `at` cycles
  // after the load, and measure the cycle where 2COUT is seen.
  task automatic run(input int n, input int hold, input int at);
    int cyc, seen, c1, pulses;
    @(negedge clk);
    d = 10'(n); load = 1'b1; gn_n = 1'b0;
    @(negedge clk);                   // load edge has passed
    load = 1'b0;
    cyc = 0; seen = -1; c1 = 0; pulses = 0;
    while (cyc < 1100 + hold) begin
      gn_n = (hold > 0 && cyc >= at && cyc < at + hold);
      #1;
      if (cout1) c1++;
      if (cout2) begin
        pulses++;
        if (seen < 0) seen = cyc;
      end
      @(negedge clk);
      cyc++;
    end
    check(pulses == 1, $sformatf("one 2COUT pulse for n=%0d (got %0d)", n, pulses));
    check(seen == n + hold, $sformatf("2COUT at cycle %0d for n=%0d hold=%0d", seen, n, hold));
    check(c1 == (n >> 8) + 1, $sformatf("1COUT pulses %0d for n=%0d", c1, n));
    check(!running, "counter stopped");
  endtask

  initial begin
    load = 0; gn_n = 1; d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 0);
    run(1, 0, 0);
    run(5, 0, 0);
    run(255, 0, 0);
    run(256, 0, 0);
    run(257, 0, 0);
    run(600, 0, 0);
    run(1023, 0, 0);
    for (int i = 0; i < 6; i++) run($urandom_range(0, 1023), 0, 0);
    run(300, 17, 10);
    run(40, 5, 3);
    run(700, 100, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
