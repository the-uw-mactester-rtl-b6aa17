// tb_burst_pipeline: four-vector bursts at 40 MHz from a 10 MHz host clock.
// The device under test answers every pin pattern with the halves swapped
// and inverted, after a transport delay of 10 ns (fast enough for a 25 ns
// burst period) or 30 ns (too slow). The bench pushes random vectors,
// starts bursts, and checks: the order and spacing of the vectors on the
// pins, each captured response against the vector one period earlier (fast
// device) or the one before that (slow device), that pins keep the last
// vector, that loads and go are ignored while busy, and reset.
module tb_burst_pipeline;
  localparam int unsigned NP = 128, D = 4;
  logic          clk = 1'b0, fclk = 1'b0, rst_n;
  logic          load = 1'b0, go = 1'b0, busy;
  logic [NP-1:0] vec_val = '0, vec_oe = '0, resp, pin_out, pin_oe, pin_in;
  logic [1:0]    rd_idx = '0;
  int checks = 0, failures = 0;

  burst_pipeline #(.NPINS(NP), .DEPTH(D)) dut (.*);

  always #50   clk  = ~clk;
  always #12.5 fclk = ~fclk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [NP-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [NP-1:0] f(input logic [NP-1:0] x);
    return ~{x[63:0], x[127:64]};
  endfunction

  // Device under test with transport delays.
  logic [NP-1:0] r_fast = f('0), r_slow = f('0);
  bit            slow = 1'b0;
  task automatic answer(input logic [NP-1:0] v);
    fork
      #10 r_fast = v;
      #30 r_slow = v;
    join_none
  endtask
  always @(pin_out) answer(f(pin_out));
  assign pin_in = slow ? r_slow : r_fast;

  // Record every change of the pins with its time.
  logic [NP-1:0] seen_val [$];
  logic [NP-1:0] seen_oe  [$];
  realtime       seen_t   [$];
  always @(pin_out or pin_oe) begin
    seen_val.push_back(pin_out);
    seen_oe.push_back(pin_oe);
    seen_t.push_back($realtime);
  end

  logic [NP-1:0] v [D];
  logic [NP-1:0] e [D];

  task automatic push(input logic [NP-1:0] val, oe);
    @(negedge clk); vec_val = val; vec_oe = oe; load = 1'b1;
    @(negedge clk); load = 1'b0;
  endtask

  task automatic burst();
    @(negedge clk); go = 1'b1;
    @(negedge clk); go = 1'b0;
    check(NP'(busy), NP'(1), "busy after go");
    while (busy) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    #130 rst_n = 1'b1;
    check(pin_out, '0, "pins low after reset");
    check(pin_oe, '0, "pins released after reset");
    check(NP'(busy), '0, "idle after reset");
    for (int i = 0; i < D; i++) begin
      rd_idx = 2'(i); #1 check(resp, '0, "captures cleared by reset");
    end

    for (int b = 0; b < 60; b++) begin
      logic [NP-1:0] before_val;
      before_val = pin_out;
      slow = (b % 3 == 2);
      for (int i = 0; i < D; i++) begin
        v[i] = {$urandom, $urandom, $urandom, $urandom};
        e[i] = {$urandom, $urandom, $urandom, $urandom};
        push(v[i], e[i]);
      end
      seen_val.delete(); seen_oe.delete(); seen_t.delete();
      burst();
      // Vectors appear in push order, one burst clock period apart.
      check(NP'(seen_val.size()), NP'(D), "one pin change per vector");
      for (int i = 0; i < D && i < seen_val.size(); i++) begin
        check(seen_val[i], v[i], "vector order on the pins");
        check(seen_oe[i], e[i], "enable order on the pins");
        if (i > 0) check(NP'(int'(seen_t[i] - seen_t[i-1])), NP'(25), "one 25 ns period per vector");
      end
      for (int i = 0; i < D; i++) begin
        rd_idx = 2'(i); #1;
        if (!slow)
          check(resp, f(v[i]), "fast device: response to its own vector");
        else
          check(resp, f(i == 0 ? before_val : v[i-1]), "slow device: response one vector late");
      end
      check(pin_out, v[D-1], "pins hold the last vector");
    end

    // Loads and a second go during a burst are ignored.
    for (int i = 0; i < D; i++) begin
      v[i] = {$urandom, $urandom, $urandom, $urandom};
      push(v[i], '1);
    end
    seen_val.delete(); seen_oe.delete(); seen_t.delete();
    slow = 1'b0;
    @(negedge clk); go = 1'b1;
    @(negedge clk); go = 1'b0; vec_val = '1; vec_oe = '0; load = 1'b1;
    @(negedge clk); go = 1'b1;
    @(negedge clk); go = 1'b0; load = 1'b0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(NP'(seen_val.size()), NP'(D), "go while busy starts no second burst");
    for (int i = 0; i < D; i++) begin
      rd_idx = 2'(i); #1 check(resp, f(v[i]), "load while busy left the stages alone");
    end

    // Reset in the middle of use releases the pins.
    rst_n = 1'b0; #1;
    check(pin_oe, '0, "reset releases the pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
