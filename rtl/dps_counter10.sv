// dps_counter10: the 10-bit phase counter of circuit 1, built from an 8-bit down
// counter (low byte, counts every clock) and a 2-bit down counter (high bits, counts
// when the low byte's carry 1COUT is high).
//
// A load pulse copies d into both stages and starts a count. While the gate-enable
// gn_n is low the low byte decrements once per clock; each time it passes zero,
// 1COUT is high for one clock and the high stage decrements at the next edge. When
// the whole 10-bit value is zero, 2COUT is high for one clock. After that pulse the
// counter stops (running drops) until the next load, so each load yields exactly
// one 2COUT pulse. With gn_n held low, 2COUT is high in the clock cycle that starts
// d edges after the load edge; a value of 0 pulses 2COUT right after the load.
// Raising gn_n freezes the count. Stopping after the terminal pulse is this design's
// choice: the circuit description only says the counter counts the latched value
// down.
module dps_counter10 #(
  parameter int unsigned LOW_W  = 8,
  parameter int unsigned HIGH_W = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [LOW_W+HIGH_W-1:0] d,
  input  logic                    gn_n,
  output logic [LOW_W+HIGH_W-1:0] q,
  output logic                    cout1,
  output logic                    cout2,
  output logic                    running
);

  logic             en;
  logic [LOW_W-1:0] q_low;
  logic [HIGH_W-1:0] q_high;

  assign en = running & ~gn_n & ~load;

  dps_down_counter #(.WIDTH(LOW_W)) u_cnt8 (
    .clk, .rst_n, .load, .d(d[LOW_W-1:0]), .en, .cin(1'b1), .q(q_low), .cout(cout1)
  );

  dps_down_counter #(.WIDTH(HIGH_W)) u_cnt2 (
    .clk, .rst_n, .load, .d(d[LOW_W+HIGH_W-1:LOW_W]), .en, .cin(cout1), .q(q_high), .cout(cout2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     running <= 1'b0;
    else if (load)  running <= 1'b1;
    else if (cout2) running <= 1'b0;
  end

  assign q = {q_high, q_low};

endmodule
