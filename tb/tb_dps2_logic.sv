// tb_dps2_logic: self-checking test of digital-to-phase-shift circuit 2.
//
// A behavioural model of the microcontroller's PWM unit drives PWM1 (fixed width)
// and PWM2 (width changed every period, swept over 1..255). Checks:
//   - DQ1 toggles once per PWM period, so the bridge switches at half the PWM
//     frequency (one switching period = 1024 clocks);
//   - each DQ2 edge follows its DQ1 edge by the PWM2 high time (2 clocks per count);
//   - every cycle, each output equals its leg signal AND that signal three clock
//     edges earlier (the QC tap), with the enable applied: OUT_A/OUT_B from DQ1 and
//     its complement, OUT_C/OUT_D from DQ2 and its complement;
//   - the two outputs of a leg are never on together and there is a dead time of
//     three clocks at each transition;
//   - dropping GATE_EN, or pulling FAULT low, turns all outputs off within three
//     edges, and they restart with a full dead time.
module tb_dps2_logic;
  import dps_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       prescale, gate_en, fault_n;
  logic [7:0] ctrl [3];
  logic [2:0] pwm;
  logic       period_start, dq1, dq2;
  gates_t     gates;

  c196_pwm_model u_pwm (.clk, .rst_n, .prescale, .ctrl, .pwm, .period_start);
  dps2_logic dut (.clk, .rst_n, .pwm1(pwm[1]), .pwm2(pwm[2]), .gate_en, .fault_n, .gates, .dq1, .dq2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Reference for the dead-time stages: leg signals at the last edges and the
  // enable, which is GATE_EN and FAULT after two synchroniser stages and one
  // register.
  logic [7:0] h1, h2;
  logic [2:0] en_pipe;
  logic       en_ref;
  assign en_ref = en_pipe[2];
  always @(posedge clk) begin
    en_pipe <= {en_pipe[1:0], gate_en & fault_n};
    if (!en_pipe[2]) begin h1 <= '0; h2 <= '0; end
    else begin h1 <= {h1[6:0], dq1}; h2 <= {h2[6:0], dq2}; end
  end

  // Edge bookkeeping.
  longint last_dq1 = -1;
  int     expect_lag = -1, pending_lag = -1;
  logic   dq1_q = 0, dq2_q = 0;
  int     lag_checks = 0, dead_a = 0;
  // shift registers are cleared when disabled: complement stages start from zero
  logic [7:0] h1n, h2n;
  always @(posedge clk) begin
    if (!en_pipe[2]) begin h1n <= '0; h2n <= '0; end
    else begin h1n <= {h1n[6:0], ~dq1}; h2n <= {h2n[6:0], ~dq2}; end
  end

  always @(negedge clk) if (rst_n && cyc > 10) begin
    check(gates.a == (en_ref && dq1  && h1[2]),  "OUT_A");
    check(gates.b == (en_ref && !dq1 && h1n[2]), "OUT_B");
    check(gates.c == (en_ref && dq2  && h2[2]),  "OUT_C");
    check(gates.d == (en_ref && !dq2 && h2n[2]), "OUT_D");
    check(!(gates.a && gates.b) && !(gates.c && gates.d), "shoot-through");
    if (dq1 != dq1_q) begin
      if (last_dq1 >= 0 && cyc > 1500) check(cyc - last_dq1 == 512, $sformatf("DQ1 half period %0d", cyc - last_dq1));
      last_dq1 = cyc;
      expect_lag = pending_lag;
    end
    if (dq2 != dq2_q && expect_lag >= 0) begin
      check(cyc - last_dq1 == expect_lag, $sformatf("DQ2 lag %0d expected %0d", cyc - last_dq1, expect_lag));
      lag_checks++;
    end
    if (en_ref && !gates.a && !gates.b) dead_a++;
    dq1_q = dq1;
    dq2_q = dq2;
  end

  initial begin
    prescale = 0; gate_en = 0; fault_n = 1;
    en_pipe = '0; h1 = '0; h2 = '0; h1n = '0; h2n = '0;
    ctrl[0] = 0; ctrl[1] = 8'd128; ctrl[2] = 8'd10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge period_start);
    @(negedge clk) gate_en = 1'b1;
    for (int i = 0; i < 40; i++) begin
      int v;
      v = (i == 0) ? 1 : (i == 1) ? 255 : $urandom_range(1, 255);
      @(negedge clk);
      ctrl[2] = 8'(v);
      @(posedge period_start);
      @(negedge clk);
      pending_lag = 2 * v;
      if (i == 15) begin
        repeat (100) @(negedge clk);
        gate_en = 1'b0;
        repeat (3) @(negedge clk);
        check(gates == '0, "GATE_EN low turns all outputs off");
        repeat (200) @(negedge clk);
        gate_en = 1'b1;
      end
      if (i == 25) begin
        repeat (50) @(negedge clk);
        fault_n = 1'b0;
        repeat (3) @(negedge clk);
        check(gates == '0, "FAULT turns all outputs off");
        repeat (500) @(negedge clk);
        fault_n = 1'b1;
      end
    end
    repeat (1100) @(posedge clk);
    check(lag_checks > 30, "phase lag measured");
    check(dead_a > 50, "dead time seen on the left leg");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
