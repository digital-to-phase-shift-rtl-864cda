// dps2_phase_ffs: the two D flip-flops of circuit 2 that turn the PWM1 and PWM2
// outputs of a microcontroller into two phase-shifted 50% square waves.
//
// Both PWM outputs rise together at the start of every PWM period; PWM1 has a fixed
// width and PWM2 a width set by the control law. DQ1 toggles on every rising edge of
// PWM1, so it is a square wave at half the PWM frequency. DQ2 takes the value of DQ1
// on every falling edge of PWM2 (a rising edge of the inverted PWM2), so it is the
// same square wave delayed by the PWM2 high time. That delay is the phase shift
// between the two bridge legs. A PWM2 width of zero gives no edge and freezes DQ2.
//
// Both inputs pass through SYNC_STAGES flip-flops and the edges are detected in the
// clk domain, so DQ1 follows a PWM1 edge SYNC_STAGES + 1 clocks late and DQ2 a PWM2
// edge equally late; the relative delay is kept. Replacing the PWM-clocked flip-flops
// by edge detection on one clock is this design's choice.
module dps2_phase_ffs #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm1,
  input  logic pwm2,
  output logic dq1,
  output logic dq2
);

  logic p1_s, p2_s, p1_d, p2_d;
  logic rise1, fall2;

  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_p1 (.clk, .rst_n, .d(pwm1), .q(p1_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_p2 (.clk, .rst_n, .d(pwm2), .q(p2_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_d <= 1'b0;
      p2_d <= 1'b0;
    end else begin
      p1_d <= p1_s;
      p2_d <= p2_s;
    end
  end

  assign rise1 = p1_s & ~p1_d;
  assign fall2 = ~p2_s & p2_d;

  // Upper flip-flop: D = not Q, clocked by PWM1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dq1 <= 1'b0;
    else if (rise1) dq1 <= ~dq1;
  end

  // Lower flip-flop: D = DQ1, clocked by inverted PWM2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dq2 <= 1'b0;
    else if (fall2) dq2 <= dq1;
  end

endmodule
