// dps1_phase_shifter: phase-shift section of circuit 1, the 10-bit counter followed
// by the phase-shift D flip-flop.
//
// The flip-flop takes the (already synchronised) DIR_DATA square wave as its D input
// and is enabled by the counter's 2COUT pulse, so its output CGA copies DIR_DATA a
// programmable number of clocks after each load. If the load pulse comes in the
// cycle where DIR_DATA changes, CGA follows that change d + 1 clock edges after the
// load edge, i.e. d + 2 clocks after DIR_DATA, as long as that is shorter than half
// a DIR_DATA period. The flip-flop is a clock-enabled register in the CLK domain
// rather than a flip-flop clocked by the carry output; this keeps the logic on one
// clock.
module dps1_phase_shifter #(
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dir,
  input  logic              load,
  input  logic [DATA_W-1:0] d,
  input  logic              gn_n,
  output logic              cga,
  output logic              cout1,
  output logic              cout2
);

  dps_counter10 #(.LOW_W(DATA_W - 2), .HIGH_W(2)) u_counter (
    .clk, .rst_n, .load, .d, .gn_n, .q(), .cout1, .cout2, .running()
  );

  // Phase-shift flip-flop (50).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cga <= 1'b0;
    else if (cout2) cga <= dir;
  end

  initial assert (DATA_W > 2) else $error("dps1_phase_shifter: DATA_W must exceed 2");

endmodule
