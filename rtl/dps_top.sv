// dps_top: both digital-to-phase-shift gate-drive circuits for a phase-shifted
// full-bridge DC/DC converter, side by side.
//
// Circuit 1 (c1_*) is driven by a DSP: a DIR_DATA square wave plus a 10-bit phase
// value per half period, turned into a delay by a down counter. Circuit 2 (c2_*) is
// driven by a microcontroller's PWM1 and PWM2 outputs, whose width difference is
// the phase. Each produces four gate commands (gates_t: a = Q1, b = Q3 on the left
// leg, c = Q2, d = Q4 on the right leg) with dead time inserted at every turn-on.
// The two circuits are alternatives sharing only the clock and reset; a board uses
// one of them. See dps1_epld and dps2_logic for the timing of each.
module dps_top
  import dps_pkg::*;
#(
  parameter int unsigned C1_DT_COUNT = dps_pkg::DEF_C1_DT_COUNT,
  parameter int unsigned C2_DT_TAP   = dps_pkg::DEF_C2_DT_TAP,
  parameter int unsigned SYNC_STAGES = dps_pkg::DEF_SYNC_STAGES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // circuit 1: DSP interface
  input  logic                 c1_dir_data,
  input  logic [C1_DATA_W-1:0] c1_bd,
  input  logic                 c1_latch_n,
  input  logic                 c1_enb_n,
  input  logic                 c1_prot,
  output gates_t               c1_gates,
  output logic                 c1_cga,
  output logic                 c1_cout1,
  output logic                 c1_cout2,
  // circuit 2: microcontroller interface
  input  logic                 c2_pwm1,
  input  logic                 c2_pwm2,
  input  logic                 c2_gate_en,
  input  logic                 c2_fault_n,
  output gates_t               c2_gates,
  output logic                 c2_dq1,
  output logic                 c2_dq2
);

  dps1_epld #(.DT_COUNT(C1_DT_COUNT), .SYNC_STAGES(SYNC_STAGES)) u_circuit1 (
    .clk, .rst_n,
    .dir_data(c1_dir_data), .bd(c1_bd), .latch_n(c1_latch_n), .enb_n(c1_enb_n), .prot(c1_prot),
    .gates(c1_gates), .cga(c1_cga), .cout1(c1_cout1), .cout2(c1_cout2)
  );

  dps2_logic #(.TAP(C2_DT_TAP), .SYNC_STAGES(SYNC_STAGES)) u_circuit2 (
    .clk, .rst_n,
    .pwm1(c2_pwm1), .pwm2(c2_pwm2), .gate_en(c2_gate_en), .fault_n(c2_fault_n),
    .gates(c2_gates), .dq1(c2_dq1), .dq2(c2_dq2)
  );

endmodule
