// dps_down_counter: cascadable synchronous down counter, the building block of the
// 10-bit phase counter of circuit 1 (used once as the 8-bit counter and once as the
// 2-bit counter).
//
// load copies d into the counter at the next clock edge and has priority. Otherwise,
// while en (the gate-enable GN) and the carry input cin are both high, the counter
// decrements by one per clock and wraps from 0 to all ones. The carry output is
// combinational: cout = en & cin & (q == 0). It is therefore high for exactly one
// clock when a free-running counter reaches zero, and falls at the next edge when the
// counter wraps, as the terminal-count output of a counter chip does. Chaining cout of
// a lower stage into cin of an upper stage gives a wider counter whose top-level cout
// marks the moment the whole value is zero. q[0] is the QA output.
module dps_down_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             en,
  input  logic             cin,
  output logic [WIDTH-1:0] q,
  output logic             cout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (load)       q <= d;
    else if (en && cin)  q <= q - 1'b1;
  end

  assign cout = en & cin & (q == '0);

endmodule
