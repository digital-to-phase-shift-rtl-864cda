// tb_dps_deadtime_counter: self-checking test of the circuit-1 dead-time counter.
//
// Feeds a random input with high and low runs of random length, plus occasional
// clear pulses, into an instance with the default DT_COUNT (6) and one with
// DT_COUNT = 3, and checks every cycle against a reference: the gate is high only
// when the input has been high, with clear low, for at least DT_COUNT clock edges.
module tb_dps_deadtime_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, long_runs = 0, short_runs = 0;

  logic in, clr, gate6, gate3;
  int   run_len;   // clock edges seen with in high and clr low

  dps_deadtime_counter                dut6 (.clk, .rst_n, .clr, .in, .gate(gate6));
  dps_deadtime_counter #(.DT_COUNT(3)) dut3 (.clk, .rst_n, .clr, .in, .gate(gate3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0; clr = 0; run_len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 400; seg++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in  = seg[0];
        clr = ($urandom_range(0, 60) == 0);
        if (!in || clr) run_len = 0;
        #1;
        check(gate6 == (in && !clr && run_len >= 6), "gate DT=6");
        check(gate3 == (in && !clr && run_len >= 3), "gate DT=3");
        @(posedge clk);
        if (in && !clr) run_len++;
      end
      if (seg[0]) begin
        if (run_len >= 6) long_runs++; else short_runs++;
      end
    end
    check(long_runs > 20 && short_runs > 20, "both short and long pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
