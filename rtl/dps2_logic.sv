// dps2_logic: digital-to-phase-shift circuit 2, the gate-drive logic for a low-cost
// microcontroller that has PWM outputs but no fast down counter.
//
// PWM1 (fixed width) and PWM2 (width = phase command) both rise at the start of each
// PWM period. dps2_phase_ffs turns them into DQ1, a square wave at half the PWM
// frequency, and DQ2, the same wave delayed by the PWM2 high time. OUT_A follows DQ1
// and OUT_B its complement; OUT_C follows DQ2 and OUT_D its complement, each through
// a 74164 dead-time unit that delays the turn-on by TAP clocks (output QC, three
// clocks, by default). The switching frequency is half the PWM frequency and the
// phase shift, 0 to 180 degrees, is the PWM2 high time.
//
// Gate enabling: GATE_EN (active high) and FAULT (active low, high in normal
// operation) are synchronised and combined into one registered enable that clears
// the shift registers and gates all four outputs, so every output turns off at once
// on a fault and comes back with a full dead time. The polarity assignment of the
// four outputs and this enable logic are this design's choices.
module dps2_logic
  import dps_pkg::*;
#(
  parameter int unsigned TAP         = dps_pkg::DEF_C2_DT_TAP,
  parameter int unsigned SYNC_STAGES = dps_pkg::DEF_SYNC_STAGES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pwm1,
  input  logic   pwm2,
  input  logic   gate_en,
  input  logic   fault_n,
  output gates_t gates,
  output logic   dq1,
  output logic   dq2
);

  logic en_s, fault_s, enable;

  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b0)) u_sync_en    (.clk, .rst_n, .d(gate_en), .q(en_s));
  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b0)) u_sync_fault (.clk, .rst_n, .d(fault_n), .q(fault_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enable <= 1'b0;
    else        enable <= en_s & fault_s;
  end

  dps2_phase_ffs #(.SYNC_STAGES(SYNC_STAGES)) u_ffs (.clk, .rst_n, .pwm1, .pwm2, .dq1, .dq2);

  dps_deadtime_shift #(.LEN(C2_SR_LEN), .TAP(TAP)) u_sr1 (.clk, .clr_n(enable), .in(dq1),  .gate(gates.a));
  dps_deadtime_shift #(.LEN(C2_SR_LEN), .TAP(TAP)) u_sr2 (.clk, .clr_n(enable), .in(~dq1), .gate(gates.b));
  dps_deadtime_shift #(.LEN(C2_SR_LEN), .TAP(TAP)) u_sr3 (.clk, .clr_n(enable), .in(dq2),  .gate(gates.c));
  dps_deadtime_shift #(.LEN(C2_SR_LEN), .TAP(TAP)) u_sr4 (.clk, .clr_n(enable), .in(~dq2), .gate(gates.d));

  a_leg_left:  assert property (@(posedge clk) !(gates.a && gates.b));
  a_leg_right: assert property (@(posedge clk) !(gates.c && gates.d));

endmodule
