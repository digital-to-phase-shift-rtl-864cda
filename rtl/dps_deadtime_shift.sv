// dps_deadtime_shift: dead-time generator of circuit 2, a 74164 shift register and
// an AND gate.
//
// The leg signal enters the shift register's serial input (the second serial input
// is tied high). The gate output is the leg signal AND shift-register output number
// TAP (QC by default) AND clr_n. A rising leg signal therefore reaches the gate TAP
// clocks late, a falling one turns the gate off at once, and the two switches of a
// leg fed with complementary signals are both off for TAP clocks at each transition.
// clr_n low clears the register and keeps the gate off; it must come from a
// flip-flop in the clk domain because it clears the register asynchronously.
module dps_deadtime_shift #(
  parameter int unsigned LEN = 8,
  parameter int unsigned TAP = 3
) (
  input  logic           clk,
  input  logic           clr_n,
  input  logic           in,
  output logic           gate
);

  logic [LEN-1:0] q;  // QA..QH

  sr74164 #(.LEN(LEN)) u_sr (.clk, .clr_n, .a(in), .b(1'b1), .q);

  assign gate = in & q[TAP-1] & clr_n;

  initial assert (TAP >= 1 && TAP <= LEN) else $error("dps_deadtime_shift: TAP out of range");

endmodule
