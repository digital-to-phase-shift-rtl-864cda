// sr74164: 8-bit serial-in, parallel-out shift register with the function of the
// 74164 part used in circuit 2.
//
// On every rising clock edge the register shifts by one place towards QH and takes
// (a AND b) into QA; q[0] is QA, q[1] QB, q[2] QC and so on. An active-low clr_n
// clears all stages asynchronously, as on the real part. LEN generalises the length;
// the part has 8 stages.
module sr74164 #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           clr_n,
  input  logic           a,
  input  logic           b,
  output logic [LEN-1:0] q
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= '0;
    else        q <= {q[LEN-2:0], a & b};
  end

  initial assert (LEN >= 2) else $error("sr74164: LEN must be at least 2");

endmodule
