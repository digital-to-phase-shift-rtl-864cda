// tb_dps_top: end-to-end test of both gate-drive circuits at their default
// parameters, run side by side the way two converters would use them.
//
// Circuit 1: the testbench plays the DSP, toggling DIR_DATA every HALF clocks (a
// 20 kHz switching frequency for a 44 MHz clock) and writing a new 10-bit phase
// value with /LATCH at every toggle. Checked: CGA follows DIR_DATA N + 4 clock
// edges after the input change (N + 2 after the left leg), every leg transition
// has exactly 6 clocks with both switches off, no leg ever has both on.
// Circuit 2: a behavioural model of the microcontroller's PWM unit produces PWM1
// and PWM2 with a 512-clock period; checked: DQ2 lags DQ1 by the PWM2 high time,
// 3 clocks of dead time at every transition, no shoot-through.
// Each mechanism is counted and must occur: zero and full-scale phase, a phase
// value that carries from the 8-bit into the 2-bit counter, a GN hold that stretches
// the count, a PROT shutdown, a GATE_EN shutdown, a FAULT shutdown, the minimum and
// maximum PWM2 width.
module tb_dps_top;
  import dps_pkg::*;
  localparam int HALF = 1100;
  localparam int DT1  = 6;
  localparam int DT2  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // circuit 1
  logic       c1_dir_data, c1_latch_n, c1_enb_n, c1_prot;
  logic [9:0] c1_bd;
  gates_t     c1_gates, c2_gates;
  logic       c1_cga, c1_cout1, c1_cout2;
  // circuit 2
  logic       c2_gate_en, c2_fault_n, c2_dq1, c2_dq2;
  logic       prescale, period_start;
  logic [7:0] ctrl [3];
  logic [2:0] pwm;

  c196_pwm_model u_pwm (.clk, .rst_n, .prescale, .ctrl, .pwm, .period_start);

  dps_top dut (
    .clk, .rst_n,
    .c1_dir_data, .c1_bd, .c1_latch_n, .c1_enb_n, .c1_prot,
    .c1_gates, .c1_cga, .c1_cout1, .c1_cout2,
    .c2_pwm1(pwm[1]), .c2_pwm2(pwm[2]), .c2_gate_en, .c2_fault_n,
    .c2_gates, .c2_dq1, .c2_dq2
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- mechanisms
  int n_zero = 0, n_full = 0, n_carry = 0, n_hold = 0, n_prot = 0;
  int n_gate_en = 0, n_fault = 0, n_pwm_min = 0, n_pwm_max = 0;
  int n_dead1 = 0, n_dead2 = 0;

  // ---------------------------------------------------------------- dead time monitor
  // For each leg: count the cycles with both switches off between one switch
  // turning off and the other turning on. Only measured while no shutdown is active.
  int  off1[2], off2[2];
  bit  quiet1 = 1'b0, quiet2 = 1'b0;
  always @(negedge clk) if (rst_n) begin
    check(!(c1_gates.a && c1_gates.b) && !(c1_gates.c && c1_gates.d), "circuit 1 shoot-through");
    check(!(c2_gates.a && c2_gates.b) && !(c2_gates.c && c2_gates.d), "circuit 2 shoot-through");
    for (int l = 0; l < 2; l++) begin
      logic on1, on2;
      on1 = l ? (c1_gates.c | c1_gates.d) : (c1_gates.a | c1_gates.b);
      on2 = l ? (c2_gates.c | c2_gates.d) : (c2_gates.a | c2_gates.b);
      if (!on1) off1[l]++;
      else begin
        if (quiet1 && off1[l] > 0) begin
          check(off1[l] == DT1, $sformatf("circuit 1 leg %0d dead time %0d", l, off1[l]));
          n_dead1++;
        end
        off1[l] = 0;
      end
      if (!on2) off2[l]++;
      else begin
        if (quiet2 && off2[l] > 0) begin
          check(off2[l] == DT2, $sformatf("circuit 2 leg %0d dead time %0d", l, off2[l]));
          n_dead2++;
        end
        off2[l] = 0;
      end
    end
  end

  // ---------------------------------------------------------------- circuit 1 (DSP)
  longint t_cga;
  logic   cga_q = 0;
  always @(negedge clk) begin
    if (c1_cga != cga_q && t_cga < 0) t_cga = cyc;
    cga_q = c1_cga;
  end

  task automatic c1_half(input int n, input int hold);
    longint k;
    @(negedge clk);
    k = cyc;
    t_cga = -1;
    c1_dir_data = ~c1_dir_data;
    c1_bd = 10'(n);
    c1_latch_n = 1'b0;
    for (int c = 1; c < HALF; c++) begin
      @(negedge clk);
      if (c == 4) c1_latch_n = 1'b1;
      c1_enb_n = (hold > 0 && c >= 20 && c < 20 + hold);
    end
    check(t_cga == k + 4 + n + hold, $sformatf("CGA delay %0d for N=%0d hold=%0d", t_cga - k, n, hold));
    check(c1_cga == c1_dir_data, "CGA level");
    if (n == 0) n_zero++;
    if (n == 1023) n_full++;
    if (n >= 256) n_carry++;
    if (hold > 0) n_hold++;
  endtask

  initial begin : dsp
    c1_dir_data = 0; c1_latch_n = 1; c1_enb_n = 0; c1_prot = 0; c1_bd = 0;
    wait (rst_n);
    c1_half(100, 0);
    c1_half(100, 0);
    quiet1 = 1'b1;
    c1_half(0, 0);
    c1_half(1023, 0);
    c1_half(256, 0);
    c1_half(700, 40);
    for (int i = 0; i < 8; i++) c1_half($urandom_range(0, 1023), 0);
    // protection trip in the middle of a half period
    quiet1 = 1'b0;
    @(negedge clk) c1_prot = 1'b1;
    repeat (2) @(negedge clk);
    check(c1_gates == '0, "PROT: all circuit-1 gates off");
    n_prot++;
    repeat (500) @(negedge clk);
    c1_prot = 1'b0;
    c1_half(500, 0);
    quiet1 = 1'b1;
    c1_half(500, 0);
    c1_half(0, 0);
    c1_half(1023, 0);
  end

  // ---------------------------------------------------------------- circuit 2 (PWM)
  longint last_dq1 = -1;
  int     expect_lag = -1, pending_lag = -1;
  logic   dq1_q = 0, dq2_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (c2_dq1 != dq1_q) begin
      last_dq1 = cyc;
      expect_lag = pending_lag;
    end
    if (c2_dq2 != dq2_q && expect_lag >= 0) begin
      check(cyc - last_dq1 == expect_lag, $sformatf("DQ2 lag %0d expected %0d", cyc - last_dq1, expect_lag));
      if (expect_lag == 2)   n_pwm_min++;
      if (expect_lag == 510) n_pwm_max++;
    end
    dq1_q = c2_dq1;
    dq2_q = c2_dq2;
  end

  initial begin : mcu
    prescale = 0; c2_gate_en = 0; c2_fault_n = 1;
    ctrl[0] = 0; ctrl[1] = 8'd128; ctrl[2] = 8'd64;
    wait (rst_n);
    repeat (2) @(posedge period_start);
    @(negedge clk) c2_gate_en = 1'b1;
    repeat (2) @(posedge period_start);
    quiet2 = 1'b1;
    for (int i = 0; i < 40; i++) begin
      int v;
      v = (i == 2) ? 1 : (i == 5) ? 255 : $urandom_range(1, 255);
      @(negedge clk);
      ctrl[2] = 8'(v);
      @(posedge period_start);
      @(negedge clk);
      pending_lag = 2 * v;
      if (i == 12 || i == 25) begin
        quiet2 = 1'b0;
        repeat (100) @(negedge clk);
        if (i == 12) c2_gate_en = 1'b0; else c2_fault_n = 1'b0;
        repeat (3) @(negedge clk);
        check(c2_gates == '0, "circuit-2 shutdown turns all outputs off");
        if (i == 12) n_gate_en++; else n_fault++;
        repeat (300) @(negedge clk);
        c2_gate_en = 1'b1;
        c2_fault_n = 1'b1;
        repeat (1100) @(negedge clk);
        quiet2 = 1'b1;
      end
    end
  end

  initial begin
    off1 = '{0, 0}; off2 = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin : done
    @(posedge rst_n);
    // both stimulus threads end well within this time
    repeat (HALF * 24 + 2000) @(posedge clk);
    check(n_zero > 0,    "zero phase used");
    check(n_full > 0,    "full-scale phase used");
    check(n_carry > 0,   "8-bit to 2-bit carry used");
    check(n_hold > 0,    "GN hold used");
    check(n_prot > 0,    "PROT shutdown used");
    check(n_gate_en > 0, "GATE_EN shutdown used");
    check(n_fault > 0,   "FAULT shutdown used");
    check(n_pwm_min > 0, "minimum PWM2 width used");
    check(n_pwm_max > 0, "maximum PWM2 width used");
    check(n_dead1 > 20,  "circuit-1 dead times measured");
    check(n_dead2 > 40,  "circuit-2 dead times measured");
    $display("mechanisms: zero=%0d full=%0d carry=%0d hold=%0d prot=%0d gate_en=%0d fault=%0d pwm_min=%0d pwm_max=%0d dead1=%0d dead2=%0d",
             n_zero, n_full, n_carry, n_hold, n_prot, n_gate_en, n_fault, n_pwm_min, n_pwm_max, n_dead1, n_dead2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
