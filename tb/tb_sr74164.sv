// tb_sr74164: self-checking test of the 74164-style shift register.
//
// Random serial inputs A and B and occasional clear pulses; after every clock the
// parallel outputs are compared with a reference register that shifts (A AND B)
// in at QA, and the asynchronous clear is checked to act before the next edge.
module tb_sr74164;
  logic clk = 1'b0, clr_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, clears = 0;

  logic       a, b;
  logic [7:0] q, m;

  sr74164 dut (.clk, .clr_n, .a, .b, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a = 1'($urandom);
      b = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 100) == 0) begin
        clr_n = 1'b0;
        #1;
        check(q == 8'h00, "asynchronous clear");
        clears++;
        m = 0;
        #1 clr_n = 1'b1;
      end
      #1;
      check(q == m, "parallel outputs");
      @(posedge clk);
      m = {m[6:0], a & b};
    end
    check(clears > 10, "clear exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
