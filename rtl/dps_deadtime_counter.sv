// dps_deadtime_counter: dead-time generator of circuit 1 (one per switch, counters
// 1 to 4).
//
// The counter is held at zero while its input is low or clr is high. While the input
// is high it counts clocks up to DT_COUNT and stays there. The gate output is the
// input AND "count reached DT_COUNT", so a rising input edge reaches the gate
// DT_COUNT clocks late, while a falling edge turns the gate off in the same cycle.
// Feeding the two switches of a leg with complementary inputs thus leaves both off
// for DT_COUNT clocks at every transition. clr (protection) forces the gate off at
// once. The default DT_COUNT of 6 corresponds to outputs QB and QC of the counter
// both being set; the counting scheme is this design's reading of the circuit.
module dps_deadtime_counter #(
  parameter int unsigned CNT_W    = 4,
  parameter int unsigned DT_COUNT = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in,
  output logic gate
);

  logic [CNT_W-1:0] cnt;
  logic             done;

  assign done = (cnt == CNT_W'(DT_COUNT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (clr || !in) cnt <= '0;
    else if (!done)      cnt <= cnt + 1'b1;
  end

  assign gate = in & ~clr & done;

  initial assert (DT_COUNT >= 1 && DT_COUNT < (1 << CNT_W))
    else $error("dps_deadtime_counter: DT_COUNT out of range");

endmodule
