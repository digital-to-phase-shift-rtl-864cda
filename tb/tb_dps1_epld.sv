// tb_dps1_epld: self-checking test of digital-to-phase-shift circuit 1.
//
// The testbench plays the DSP: it toggles DIR_DATA every HALF clocks and, on the
// same clock, pulls /LATCH low for four clocks with a new 10-bit phase value N on
// BD. With the inputs changed between edges k and k+1, the expected timing is
// (two synchroniser stages, one edge-detect stage, load, N counts, flip-flop):
//   GATE_A/GATE_B: the gate turning off does so at edge k+2, the other gate turns
//                  on at edge k+2+DT;
//   CGA:           changes at edge k+4+N;
//   GATE_C/GATE_D: turn off at edge k+4+N, turn on at edge k+4+N+DT.
// Some half periods hold /ENB high for H clocks, which must stretch the CGA delay
// by H. A protection pulse (PROT) must turn all gates off two edges after it
// arrives and keep them off. Every cycle, the two gates of a leg must not both be
// on, and CGA must equal the DIR_DATA level of its half period once it has moved.
module tb_dps1_epld;
  import dps_pkg::*;
  localparam int HALF = 1100;
  localparam int DT   = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       dir_data, latch_n, enb_n, prot;
  logic [9:0] bd;
  gates_t     gates;
  logic       cga, cout1, cout2;

  dps1_epld dut (.clk, .rst_n, .dir_data, .bd, .latch_n, .enb_n, .prot, .gates, .cga, .cout1, .cout2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // First change of each output after the start of a half period.
  longint t_a, t_b, t_c, t_d, t_cga;
  gates_t g_q;
  logic   cga_q;
  always @(negedge clk) begin
    if (gates.a != g_q.a && t_a < 0) t_a = cyc;
    if (gates.b != g_q.b && t_b < 0) t_b = cyc;
    if (gates.c != g_q.c && t_c < 0) t_c = cyc;
    if (gates.d != g_q.d && t_d < 0) t_d = cyc;
    if (cga != cga_q && t_cga < 0) t_cga = cyc;
    g_q = gates;
    cga_q = cga;
    if (rst_n) begin
      check(!(gates.a && gates.b), "left leg shoot-through");
      check(!(gates.c && gates.d), "right leg shoot-through");
    end
  end

  bit timing_on = 1'b0;  // the first half period only brings the outputs to a known state

  task automatic half_period(input int n, input int hold, input int hold_at);
    longint k;
    logic   up;
    @(negedge clk);
    k = cyc;
    t_a = -1; t_b = -1; t_c = -1; t_d = -1; t_cga = -1;
    dir_data = ~dir_data;
    up = dir_data;
    bd = 10'(n);
    latch_n = 1'b0;
    for (int c = 1; c < HALF; c++) begin
      @(negedge clk);
      if (c == 4) begin latch_n = 1'b1; bd = 10'($urandom); end
      enb_n = (hold > 0 && c >= hold_at && c < hold_at + hold);
    end
    if (!timing_on) begin timing_on = 1'b1; return; end
    // DIR_DATA rose: GATE_A (from its complement) falls, GATE_B rises.
    if (up) begin
      check(t_a == k + 2,      $sformatf("GATE_A off at %0d, expected %0d", t_a - k, 2));
      check(t_b == k + 2 + DT, $sformatf("GATE_B on at %0d, expected %0d", t_b - k, 2 + DT));
      check(t_c == k + 4 + n + hold,      $sformatf("GATE_C off at %0d, N=%0d", t_c - k, n));
      check(t_d == k + 4 + n + hold + DT, $sformatf("GATE_D on at %0d, N=%0d", t_d - k, n));
    end else begin
      check(t_b == k + 2,      $sformatf("GATE_B off at %0d", t_b - k));
      check(t_a == k + 2 + DT, $sformatf("GATE_A on at %0d", t_a - k));
      check(t_d == k + 4 + n + hold,      $sformatf("GATE_D off at %0d, N=%0d", t_d - k, n));
      check(t_c == k + 4 + n + hold + DT, $sformatf("GATE_C on at %0d, N=%0d", t_c - k, n));
    end
    check(t_cga == k + 4 + n + hold, $sformatf("CGA at %0d, N=%0d hold=%0d", t_cga - k, n, hold));
    check(cga == up, "CGA level");
  endtask

  initial begin
    dir_data = 0; latch_n = 1; enb_n = 0; prot = 0; bd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    half_period(10, 0, 0);
    half_period(10, 0, 0);
    half_period(0, 0, 0);
    half_period(1, 0, 0);
    half_period(255, 0, 0);
    half_period(256, 0, 0);
    half_period(511, 0, 0);
    half_period(1023, 0, 0);
    half_period(1000, 0, 0);
    half_period(300, 50, 100);
    half_period(20, 7, 10);
    for (int i = 0; i < 8; i++) half_period($urandom_range(0, 1023), 0, 0);
    // protection: all gates off two edges after PROT, and stay off
    @(negedge clk);
    prot = 1'b1;
    repeat (2) @(negedge clk);
    check(gates == '0, "PROT turns all gates off");
    repeat (300) begin
      @(negedge clk);
      check(gates == '0, "gates stay off under PROT");
    end
    prot = 1'b0;
    repeat (2 + DT) @(negedge clk);
    check(gates.a ^ gates.b, "left leg back on after PROT");
    check(gates.c ^ gates.d, "right leg back on after PROT");
    half_period(400, 0, 0);
    half_period(400, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
