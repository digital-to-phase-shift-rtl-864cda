// tb_dps_deadtime_shift: self-checking test of the circuit-2 dead-time unit.
//
// Drives complementary leg signals into two units (TAP = 3, the QC output) and a
// third unit with TAP = 5, with random run lengths and occasional clear pulses
// from a flip-flop. A reference keeps the history of the input sampled at each
// clock edge since the last clear; a gate must be high exactly when clear is
// inactive, its input is high now and it was high TAP edges ago. Also checks that
// the two complementary gates are never high together and that
// the gate is on whenever its input has been high for TAP clocks.
module tb_dps_deadtime_shift;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, dead_cycles = 0;

  logic       in, clr_n;
  logic       g_p, g_n, g5;
  logic [7:0] hist, histn;   // in and ~in at the last 8 clock edges, bit 0 newest
  int         hi_run;

  dps_deadtime_shift                 dut_p (.clk, .clr_n, .in,      .gate(g_p));
  dps_deadtime_shift                 dut_n (.clk, .clr_n, .in(~in), .gate(g_n));
  dps_deadtime_shift #(.TAP(5))      dut_5 (.clk, .clr_n, .in,      .gate(g5));

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
    in = 0; clr_n = 0; hist = 0; histn = 0; hi_run = 0;
    repeat (2) @(posedge clk);
    for (int seg = 0; seg < 300; seg++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int k = 0; k < len; k++) begin
        @(posedge clk);
        if (clr_n) begin hist = {hist[6:0], in}; histn = {histn[6:0], ~in}; end
        if (clr_n && in) hi_run++; else hi_run = 0;
        #1;
        clr_n = ($urandom_range(0, 80) != 0);   // from a flip-flop, just after the edge
        if (!clr_n) begin hist = 0; histn = 0; hi_run = 0; end
        @(negedge clk);
        in = seg[0];
        if (!in) hi_run = 0;
        #1;
        check(g_p == (clr_n && in  && hist[2]),  "gate on in, TAP 3");
        check(g_n == (clr_n && !in && histn[2]), "gate on ~in, TAP 3");
        check(g5  == (clr_n && in  && hist[4]),  "gate on in, TAP 5");
        check(!(g_p && g_n), "complementary gates never both on");
        if (hi_run >= 3) check(g_p == clr_n, "on once the input has been high for TAP clocks");
        if (!g_p && !g_n) dead_cycles++;
      end
    end
    check(dead_cycles > 100, "dead time seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
