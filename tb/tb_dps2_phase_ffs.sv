// tb_dps2_phase_ffs: self-checking test of the circuit-2 flip-flop pair.
//
// A behavioural model of the microcontroller's PWM unit drives PWM1 with a fixed
// width and PWM2 with a width that changes every switching period. The test checks
// that DQ1 toggles once per PWM period (512 clocks), that every DQ2 edge follows
// the matching DQ1 edge by exactly the PWM2 high time (2 clocks per count of the
// PWM2 control value) and copies DQ1, and that the prescaled (1024-clock) PWM mode
// gives twice the period.
module tb_dps2_phase_ffs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       prescale;
  logic [7:0] ctrl [3];
  logic [2:0] pwm;
  logic       period_start, dq1, dq2;

  c196_pwm_model u_pwm (.clk, .rst_n, .prescale, .ctrl, .pwm, .period_start);
  dps2_phase_ffs dut (.clk, .rst_n, .pwm1(pwm[1]), .pwm2(pwm[2]), .dq1, .dq2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle counter and edge bookkeeping.
  longint cyc = 0;
  longint last_dq1 = -1;
  int     expect_lag = -1;   // PWM2 high time in clocks for the current period
  int     pending_lag = -1;  // same, for the period that has just started
  int     per = 512;
  logic   dq1_q = 0, dq2_q = 0;
  int     dq1_edges = 0, dq2_edges = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end

  always @(negedge clk) if (rst_n) begin
    if (dq1 != dq1_q) begin
      if (last_dq1 >= 0) check(cyc - last_dq1 == per, $sformatf("DQ1 period %0d", cyc - last_dq1));
      last_dq1 = cyc;
      expect_lag = pending_lag;
      dq1_edges++;
    end
    if (dq2 != dq2_q) begin
      if (expect_lag >= 0) begin
        check(cyc - last_dq1 == expect_lag, $sformatf("DQ2 lag %0d expected %0d", cyc - last_dq1, expect_lag));
        check(dq2 == dq1, "DQ2 copies DQ1");
      end
      dq2_edges++;
    end
    dq1_q = dq1;
    dq2_q = dq2;
  end

  initial begin
    prescale = 0;
    ctrl[0] = 0; ctrl[1] = 8'd128; ctrl[2] = 8'd10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // settle: two periods
    repeat (2) @(posedge period_start);
    for (int i = 0; i < 30; i++) begin
      int v;
      v = (i == 0) ? 1 : (i == 1) ? 255 : $urandom_range(1, 255);
      @(negedge clk);
      ctrl[2] = 8'(v);
      @(posedge period_start);     // value takes effect in the period that starts now
      @(negedge clk);
      pending_lag = (prescale ? 4 : 2) * v;
      if (i == 20) begin
        // switch to the prescaled mode: the next period is the first long one
        prescale = 1'b1;
        pending_lag = -1;
        last_dq1 = -1;
        per = 1024;
        @(posedge period_start);
        @(posedge period_start);
      end
    end
    repeat (1100) @(posedge clk);
    check(dq1_edges > 25 && dq2_edges > 25, "edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
