// tb_dps1_phase_shifter: self-checking test of the circuit-1 phase shifter (10-bit
// counter and phase-shift flip-flop).
//
// DIR stands for the synchronised DIR_DATA square wave, toggling every HALF clocks.
// In the cycle of each toggle a load pulse carries a new phase value N. The test
// checks that CGA takes the new DIR value exactly N + 1 clock edges after the load
// edge and never changes at any other time, over a sweep that includes 0, values
// across the 8-bit boundary and the largest value that fits in a half period.
module tb_dps1_phase_shifter;
  localparam int HALF = 1100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       dir, load, gn_n, cga, cout1, cout2;
  logic [9:0] d;

  dps1_phase_shifter dut (.clk, .rst_n, .dir, .load, .d, .gn_n, .cga, .cout1, .cout2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int values[$] = '{0, 1, 2, 100, 255, 256, 511, 512, 777, 1023, 3, 640, 50, 900};

  initial begin
    dir = 0; load = 0; gn_n = 0; d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (values[i]) begin
      int n, edge_at;
      logic prev;
      n = values[i];
      @(negedge clk);
      prev = cga;
      dir  = ~dir;
      load = 1'b1;
      d    = 10'(n);
      @(negedge clk);          // load edge passed: edge 0
      load = 1'b0;
      edge_at = -1;
      for (int c = 1; c < HALF; c++) begin
        @(negedge clk);        // c edges after the load edge
        if (cga != prev && edge_at < 0) edge_at = c;
      end
      check(edge_at == n + 1, $sformatf("CGA edge %0d clocks after load for N=%0d", edge_at, n));
      check(cga == dir, "CGA copies DIR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
