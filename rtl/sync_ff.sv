// sync_ff: multi-stage synchroniser for one asynchronous control input.
//
// The DSP, the microcontroller and the gate logic need not share a clock, so every
// control input (DIR_DATA, /LATCH, PWM1, PWM2, enables) passes through STAGES
// flip-flops clocked by clk before it is used. The output lags the input by STAGES
// clock edges. All inputs of one circuit use the same number of stages, so the phase
// relations between them are preserved. Reset loads INIT. Adding synchronisers is
// this design's choice; the original circuits clock their flip-flops directly.
module sync_ff #(
  parameter int unsigned STAGES = 2,
  parameter bit          INIT   = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe <= {STAGES{INIT}};
    else        pipe <= {pipe[STAGES-2:0], d};
  end

  assign q = pipe[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_ff: STAGES must be at least 2");

endmodule
