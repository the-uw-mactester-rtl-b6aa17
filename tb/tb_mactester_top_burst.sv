// tb_mactester_top_burst: the tester with the high-speed burst extension
// (BURST_DEPTH = 4) on a 10 MHz bus clock and a 40 MHz burst clock.
//
// The device answers every pin pattern with the two 64-pin halves swapped
// and inverted, after a transport delay of 10 ns (fast enough for 25 ns
// per vector) or 30 ns (too slow). In burst mode the bench loads four
// vectors, either by four on-line steps or by an off-line run of four
// vectors from the vector memory, starts the burst, and reads the four
// captured responses back through the host port. It checks the responses,
// the order and the 25 ns spacing of the vectors on the pins, that the pins
// stay on the burst stages while vectors are loaded, and that leaving burst
// mode gives the pins back to level 2.
module tb_mactester_top_burst;
  import mactester_pkg::*;

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr = '0;
  logic [31:0]  host_wdata = '0, host_rdata;
  logic         host_wr = 1'b0, host_rd = 1'b0;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top #(.BURST_DEPTH(4)) dut (.*);

  always #50   clk  = ~clk;
  always #12.5 fclk = ~fclk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] f(input logic [127:0] x);
    return ~{x[63:0], x[127:64]};
  endfunction

  // Device with transport delays.
  logic [127:0] r_fast = f('0), r_slow = f('0);
  bit           slow = 1'b0;
  task automatic answer(input logic [127:0] v);
    fork
      #10 r_fast = v;
      #30 r_slow = v;
    join_none
  endtask
  always @(pin_out) answer(f(pin_out));
  assign pin_in = slow ? r_slow : r_fast;

  logic [127:0] seen [$];
  realtime      seen_t [$];
  always @(pin_out) begin
    seen.push_back(pin_out);
    seen_t.push_back($realtime);
  end

  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  logic [127:0] v [4];
  logic [127:0] e [4];

  task automatic new_vectors();
    for (int i = 0; i < 4; i++) begin
      v[i] = {$urandom, $urandom, $urandom, $urandom};
      e[i] = {$urandom, $urandom, $urandom, $urandom};
    end
  endtask

  // One on-line step of vector i: eight level-1 words, then step.
  task automatic step_vec(input int i);
    logic [31:0] st;
    for (int w = 0; w < 2; w++) begin
      hw(8'(2 * w),     v[i][64*w +: 32]);
      hw(8'(2 * w + 1), v[i][64*w + 32 +: 32]);
      hw(8'(2 * w + 4), e[i][64*w +: 32]);
      hw(8'(2 * w + 5), e[i][64*w + 32 +: 32]);
    end
    hw(A_CMD, 32'(CMD_STEP));
    do hr(A_STATUS, st); while (!st[3]);
  endtask

  // Run the burst and check the pins and the four responses.
  task automatic run_burst(input logic [127:0] before_val, input string how);
    logic [31:0] st, w;
    logic [127:0] r;
    seen.delete(); seen_t.delete();
    hw(A_BURST, 32'h3);
    do hr(A_BURST, st); while (st[1]);
    check(128'(st[0]), 128'(1), "still in burst mode");
    check(128'(seen.size()), 128'(4), {how, ": four vectors on the pins"});
    for (int i = 0; i < 4 && i < seen.size(); i++) begin
      check(seen[i], v[i], {how, ": vector order on the pins"});
      if (i > 0) check(128'(int'(seen_t[i] - seen_t[i-1])), 128'(25), {how, ": 25 ns per vector"});
    end
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        hr(A_BURST_RESP + 8'(4 * i + k), w);
        r[32*k +: 32] = w;
      end
      if (!slow) check(r, f(v[i]), {how, ": fast device, response to its own vector"});
      else       check(r, f(i == 0 ? before_val : v[i-1]), {how, ": slow device, one vector late"});
    end
    check(pin_oe, e[3], {how, ": pins hold the last vector"});
  endtask

  initial begin
    logic [31:0] st;
    logic [127:0] hold;
    rst_n = 1'b0;
    #230 rst_n = 1'b1;
    hr(A_BURST, st);
    check(128'(st), '0, "burst mode off after reset");

    // Burst mode: on-line steps fill the stages, the pins do not move.
    hw(A_BURST, 32'h1);
    for (int b = 0; b < 6; b++) begin
      new_vectors();
      slow = (b % 2 == 1);
      hold = pin_out;
      seen.delete();
      for (int i = 0; i < 4; i++) step_vec(i);
      check(128'(seen.size()), '0, "pins stay on the burst stages while loading");
      run_burst(hold, "on-line load");
    end

    // Off-line load: four vectors from the memory, then the burst.
    for (int b = 0; b < 4; b++) begin
      new_vectors();
      slow = (b % 2 == 1);
      hold = pin_out;
      hw(A_MEM_PTR, 32'd0);
      for (int i = 0; i < 4; i++)
        for (int w = 0; w < 6; w++) begin
          logic [63:0] word;
          word = (w == 0) ? v[i][63:0] : (w == 1) ? v[i][127:64] :
                 (w == 2) ? e[i][63:0] : (w == 3) ? e[i][127:64] : 64'd0;
          hw(A_MEM_LO, word[31:0]);
          hw(A_MEM_HI, word[63:32]);
        end
      hw(A_OFF_ADDR, 32'd0);
      hw(A_OFF_LEN, 32'd4);
      hw(A_CMD, 32'(CMD_START));
      do hr(A_STATUS, st); while (!st[2] || st[1]);
      run_burst(hold, "off-line load");
    end

    // Leaving burst mode hands the pins back to level 2 (the last vector
    // loaded: v[3] of the last off-line block).
    hw(A_BURST, 32'h0);
    #1;
    check(pin_out, v[3], "pins back on level 2 values");
    check(pin_oe, e[3], "pins back on level 2 enables");
    new_vectors();
    step_vec(0);
    check(pin_out, v[0], "on-line step reaches the pins outside burst mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
