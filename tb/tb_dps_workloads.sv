// tb_dps_workloads: both circuits at their intended operating points, in real time.
//
// Circuit 1 runs from a 5.88 MHz clock (170 ns), the rate at which the default
// dead time of 6 clocks is 1.02 us, with the DSP toggling DIR_DATA every 147
// clocks: a 20 kHz switching frequency (period 49.98 us). The phase value is swept
// from 0 to 140 (142 of the 147 clocks of a half period, about 174 degrees).
// Circuit 2 runs with the microcontroller PWM model and the logic on a 20 MHz
// clock: PWM period 512 clocks = 25.6 us, switching period 51.2 us, PWM2 values
// swept from 1 to 255.
// Checked in nanoseconds: switching period of the left leg of both circuits (the
// right leg's period moves with the phase command), dead
// time at every transition (1020 ns and 150 ns), and phase shift between the legs
// ((N + 2) x 170 ns for circuit 1, PWM2 value x 100 ns for circuit 2).
module tb_dps_workloads;
  import dps_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T1   = 170ns;   // circuit-1 clock period
  localparam realtime T2   = 50ns;    // circuit-2 clock period (20 MHz)
  localparam int      HALF = 147;     // circuit-1 half period in clocks

  logic clk1 = 1'b0, clk2 = 1'b0, rst_n = 1'b0;
  always #(T1 / 2) clk1 = ~clk1;
  always #(T2 / 2) clk2 = ~clk2;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b) < 1ns && (b - a) < 1ns;
  endfunction

  // ---------------------------------------------------------------- DUTs
  logic       dir_data, latch_n;
  logic [9:0] bd;
  gates_t     g1, g2;
  logic       cga, cout1, cout2;
  dps1_epld u_c1 (.clk(clk1), .rst_n, .dir_data, .bd, .latch_n, .enb_n(1'b0), .prot(1'b0),
                  .gates(g1), .cga, .cout1, .cout2);

  logic [7:0] ctrl [3];
  logic [2:0] pwm;
  logic       period_start, dq1, dq2;
  c196_pwm_model u_pwm (.clk(clk2), .rst_n, .prescale(1'b0), .ctrl, .pwm, .period_start);
  dps2_logic u_c2 (.clk(clk2), .rst_n, .pwm1(pwm[1]), .pwm2(pwm[2]), .gate_en(1'b1), .fault_n(1'b1),
                   .gates(g2), .dq1, .dq2);

  initial begin
    repeat (40000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- measurements
  // Rising-edge times of each gate, and the time each gate last fell.
  realtime rise1 [4], fall1 [4], rise2 [4], fall2 [4];
  int      n_period1 = 0, n_dead1 = 0, n_phase1 = 0;
  int      n_period2 = 0, n_dead2 = 0, n_phase2 = 0;
  bit      meas1 = 0, meas2 = 0;
  int      cur_n = 0, cur_v = 0;

  function automatic logic gbit(input gates_t g, input int i);
    return (i == 0) ? g.a : (i == 1) ? g.b : (i == 2) ? g.c : g.d;
  endfunction

  // partner of gate i in the same leg
  function automatic int partner(input int i);
    return i ^ 1;
  endfunction

  gates_t g1_q = '0, g2_q = '0;
  always @(g1) begin
    for (int i = 0; i < 4; i++) begin
      if (gbit(g1, i) && !gbit(g1_q, i)) begin
        if (meas1) begin
          if (i < 2) begin
            check(near($realtime - rise1[i], 2 * HALF * T1), $sformatf("circuit 1 gate %0d period %0t", i, $realtime - rise1[i]));
            n_period1++;
          end
          check(near($realtime - fall1[partner(i)], 6 * T1), $sformatf("circuit 1 gate %0d dead time %0t", i, $realtime - fall1[partner(i)]));
          n_dead1++;
        end
        rise1[i] = $realtime;
      end
      if (!gbit(g1, i) && gbit(g1_q, i)) fall1[i] = $realtime;
    end
    g1_q = g1;
  end

  always @(g2) begin
    for (int i = 0; i < 4; i++) begin
      if (gbit(g2, i) && !gbit(g2_q, i)) begin
        if (meas2) begin
          if (i < 2) begin
            check(near($realtime - rise2[i], 2 * 512 * T2), $sformatf("circuit 2 gate %0d period %0t", i, $realtime - rise2[i]));
            n_period2++;
          end
          check(near($realtime - fall2[partner(i)], 3 * T2), $sformatf("circuit 2 gate %0d dead time %0t", i, $realtime - fall2[partner(i)]));
          n_dead2++;
        end
        rise2[i] = $realtime;
      end
      if (!gbit(g2, i) && gbit(g2_q, i)) fall2[i] = $realtime;
    end
    g2_q = g2;
  end

  // Phase shift: time from the left-leg turn-off to the right-leg turn-off of the
  // same polarity (Q1 off -> Q2 off, and Q3 off -> Q4 off).
  always @(negedge g1.c) if (meas1) begin
    check(near($realtime - fall1[0], (cur_n + 2) * T1), $sformatf("circuit 1 phase %0t for N=%0d", $realtime - fall1[0], cur_n));
    n_phase1++;
  end
  always @(negedge g1.d) if (meas1) begin
    check(near($realtime - fall1[1], (cur_n + 2) * T1), $sformatf("circuit 1 phase %0t for N=%0d", $realtime - fall1[1], cur_n));
    n_phase1++;
  end
  always @(negedge g2.c) if (meas2) begin
    check(near($realtime - fall2[0], cur_v * 2 * T2), $sformatf("circuit 2 phase %0t for value %0d", $realtime - fall2[0], cur_v));
    n_phase2++;
  end
  always @(negedge g2.d) if (meas2) begin
    check(near($realtime - fall2[1], cur_v * 2 * T2), $sformatf("circuit 2 phase %0t for value %0d", $realtime - fall2[1], cur_v));
    n_phase2++;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin : dsp
    dir_data = 0; latch_n = 1; bd = 0;
    #(3 * T1);
    rst_n = 1'b1;
    for (int h = 0; h < 2 * 40; h++) begin
      int n;
      n = (h < 6) ? 20 : ((h - 6) / 2) * 4;   // same value for both halves of a period
      if (n > 140) n = 140;
      @(negedge clk1);
      dir_data = ~dir_data;
      bd = 10'(n);
      latch_n = 1'b0;
      // the new phase applies to edges after this half period starts
      cur_n = n;
      if (h == 6) meas1 = 1'b1;
      repeat (4) @(negedge clk1);
      latch_n = 1'b1;
      repeat (HALF - 5) @(negedge clk1);
    end
    meas1 = 1'b0;
  end

  initial begin : mcu
    ctrl[0] = 0; ctrl[1] = 8'd128; ctrl[2] = 8'd10;
    wait (rst_n);
    for (int p = 0; p < 60; p++) begin
      int v;
      v = (p < 6) ? 10 : 1 + ((p - 6) * 254) / 53;
      @(negedge clk2);
      ctrl[2] = 8'(v);
      @(posedge period_start);
      // PWM2 value v is used for the period that starts now; its DQ2 edge follows
      // the DQ1 edge of this period
      #(10 * T2);
      cur_v = v;
      if (p == 6) meas2 = 1'b1;
    end
    @(posedge period_start);
    meas2 = 1'b0;
  end

  initial begin
    wait (rst_n);
    #(2 * 40 * HALF * T1 + 10us);
    check(n_period1 > 60 && n_dead1 > 100 && n_phase1 > 60, "circuit 1 measured");
    check(n_period2 > 40 && n_dead2 > 80 && n_phase2 > 40, "circuit 2 measured");
    $display("circuit 1: %0d periods, %0d dead times, %0d phases; circuit 2: %0d periods, %0d dead times, %0d phases",
             n_period1, n_dead1, n_phase1, n_period2, n_dead2, n_phase2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
