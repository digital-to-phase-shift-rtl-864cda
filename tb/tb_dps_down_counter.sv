// tb_dps_down_counter: self-checking test of the cascadable down counter.
//
// Drives random load, enable and carry-in patterns into an 8-bit and a 2-bit
// instance and compares state and carry output every cycle with a reference
// model kept in the testbench: load wins, otherwise decrement with wrap while
// en and cin are high, and cout = en & cin & (q == 0).
module tb_dps_down_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, zero_hits = 0;

  logic       load, en, cin;
  logic [7:0] d8, q8, m8;
  logic [1:0] d2, q2, m2;
  logic       cout8, cout2;

  dps_down_counter #(.WIDTH(8)) dut8 (.clk, .rst_n, .load, .d(d8), .en, .cin, .q(q8), .cout(cout8));
  dps_down_counter #(.WIDTH(2)) dut2 (.clk, .rst_n, .load, .d(d2), .en, .cin, .q(q2), .cout(cout2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; cin = 0; d8 = 0; d2 = 0; m8 = 0; m2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 19) == 0);
      en   = ($urandom_range(0, 9) != 0);
      cin  = ($urandom_range(0, 7) != 0);
      d8   = 8'($urandom_range(0, 20));
      d2   = 2'($urandom);
      #1;
      check(q8 == m8, "q8");
      check(q2 == m2, "q2");
      check(cout8 == (en & cin & (m8 == 0)), "cout8");
      check(cout2 == (en & cin & (m2 == 0)), "cout2");
      if (cout8) zero_hits++;
      @(posedge clk);
      if (load) begin m8 = d8; m2 = d2; end
      else if (en && cin) begin m8 = m8 - 1; m2 = m2 - 1; end
    end
    check(zero_hits > 10, "terminal count reached often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
