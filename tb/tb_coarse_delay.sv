// tb_coarse_delay: latch delay in bus clock periods.
// For each count the test measures the number of clock edges from the edge
// that samples start to the edge that raises trig (expected: count), checks
// that trig lasts one cycle, and that valid follows one cycle later and busy
// covers the interval.
module tb_coarse_delay;
  logic       clk = 1'b0, rst_n, start;
  logic [7:0] count;
  logic       trig, valid, busy;
  int checks = 0, failures = 0;

  coarse_delay dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; count = '0;
    #120 rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      int edges, trig_cycles;
      count = (n < 20) ? 8'(n) : 8'($urandom_range(0, 255));
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);           // edge E0 samples start
      #1 start = 1'b0;
      edges = 0;
      while (!trig) begin
        check(int'(busy), 1, "busy while counting");
        check(int'(valid), 0, "valid low while counting");
        @(posedge clk); #1 edges++;
      end
      check(edges, int'(count), "edges from start to trig");
      trig_cycles = 0;
      while (trig) begin @(posedge clk); #1 trig_cycles++; end
      check(trig_cycles, 1, "trig is one cycle");
      check(int'(valid), 1, "valid one cycle after trig");
      check(int'(busy), 0, "busy drops with valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
