// c196_pwm_model: behavioural model of the PWM outputs of an 80196KC-class
// microcontroller, for testbenches only (not synthesizable intent, not part of the
// design).
//
// All outputs share one 8-bit counter that advances once per state time (two
// clocks) or, with prescale set, once per two state times (four clocks), giving a
// PWM period of 512 or 1024 clocks. Every output with a non-zero control value
// rises at the start of the period and falls when the counter equals its control
// value, so its high time is ctrl * 2 clocks (ctrl * 4 with prescale). A control
// value of zero keeps the output low. New control values take effect at the start
// of the next period.
module c196_pwm_model #(
  parameter int unsigned N_OUT = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prescale,
  input  logic [7:0]       ctrl [N_OUT],
  output logic [N_OUT-1:0] pwm,
  output logic             period_start
);
  logic [1:0] div;
  logic [7:0] cnt;
  logic [7:0] active [N_OUT];
  logic       step;

  assign step = prescale ? (div == 2'd3) : div[0];
  assign period_start = step && cnt == 8'hff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      cnt <= 8'hff;
      pwm <= '0;
      for (int i = 0; i < N_OUT; i++) active[i] <= '0;
    end else begin
      div <= div + 1'b1;
      if (step) begin
        cnt <= cnt + 1'b1;
        for (int i = 0; i < N_OUT; i++) begin
          if (cnt == 8'hff) begin
            active[i] <= ctrl[i];
            pwm[i]    <= (ctrl[i] != 0);
          end else if (cnt + 1'b1 == active[i]) begin
            pwm[i] <= 1'b0;
          end
        end
      end
    end
  end
endmodule
