// dps1_epld: digital-to-phase-shift circuit 1, the gate-drive logic a DSP controls
// through a small programmable-logic device.
//
// The DSP supplies DIR_DATA, a 50% square wave at the switching frequency, and for
// every half period a 10-bit phase value on bd, written with an active-low /LATCH
// strobe. The left leg follows DIR_DATA directly: GATE_A is driven from the
// complement of DIR_DATA and GATE_B from DIR_DATA, each through a dead-time counter.
// The right leg follows CGA, the output of the phase-shift flip-flop, which copies
// DIR_DATA once the 10-bit counter loaded from bd has counted down to zero: GATE_C
// from the complement of CGA and GATE_D from CGA, again through dead-time counters.
// The phase shift between the legs, and so the converter's duty ratio, is therefore
// set by bd.
//
// Interface and timing: all control inputs are asynchronous and pass through
// SYNC_STAGES flip-flops. bd is sampled in the clock cycle where the synchronised
// /LATCH is first seen low, and must be stable from the falling edge of /LATCH
// until then. When /LATCH falls together with a DIR_DATA edge, CGA follows that edge
// bd + 2 clocks after the synchronised DIR_DATA does. /ENB is the counters' gate
// enable GN: counting runs only while it is low. PROT high turns all four gates off
// at once and restarts the dead-time counters. Every gate turn-on is delayed by
// DT_COUNT clocks. The inversion assignment to the four gates, the synchronisers,
// the edge-triggered load and the meaning of PROT are this design's choices.
module dps1_epld
  import dps_pkg::*;
#(
  parameter int unsigned DT_COUNT    = dps_pkg::DEF_C1_DT_COUNT,
  parameter int unsigned SYNC_STAGES = dps_pkg::DEF_SYNC_STAGES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dir_data,
  input  logic [C1_DATA_W-1:0] bd,
  input  logic                 latch_n,
  input  logic                 enb_n,
  input  logic                 prot,
  output gates_t               gates,
  output logic                 cga,
  output logic                 cout1,
  output logic                 cout2
);

  logic dir_s, latch_s, latch_d, enb_s, prot_s, load;

  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b0)) u_sync_dir   (.clk, .rst_n, .d(dir_data), .q(dir_s));
  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b0)) u_sync_latch (.clk, .rst_n, .d(~latch_n), .q(latch_s));
  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b1)) u_sync_enb   (.clk, .rst_n, .d(enb_n),    .q(enb_s));
  sync_ff #(.STAGES(SYNC_STAGES), .INIT(1'b1)) u_sync_prot  (.clk, .rst_n, .d(prot),     .q(prot_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) latch_d <= 1'b0;
    else        latch_d <= latch_s;
  end

  assign load = latch_s & ~latch_d;

  dps1_phase_shifter #(.DATA_W(C1_DATA_W)) u_phase (
    .clk, .rst_n, .dir(dir_s), .load, .d(bd), .gn_n(enb_s), .cga, .cout1, .cout2
  );

  // Dead-time counters 1 to 4.
  dps_deadtime_counter #(.CNT_W(C1_DT_CNT_W), .DT_COUNT(DT_COUNT)) u_dt_a (
    .clk, .rst_n, .clr(prot_s), .in(~dir_s), .gate(gates.a));
  dps_deadtime_counter #(.CNT_W(C1_DT_CNT_W), .DT_COUNT(DT_COUNT)) u_dt_b (
    .clk, .rst_n, .clr(prot_s), .in(dir_s),  .gate(gates.b));
  dps_deadtime_counter #(.CNT_W(C1_DT_CNT_W), .DT_COUNT(DT_COUNT)) u_dt_c (
    .clk, .rst_n, .clr(prot_s), .in(~cga),   .gate(gates.c));
  dps_deadtime_counter #(.CNT_W(C1_DT_CNT_W), .DT_COUNT(DT_COUNT)) u_dt_d (
    .clk, .rst_n, .clr(prot_s), .in(cga),    .gate(gates.d));

  // The two switches of a leg are never on together.
  a_leg_left:  assert property (@(posedge clk) !(gates.a && gates.b));
  a_leg_right: assert property (@(posedge clk) !(gates.c && gates.d));

endmodule
