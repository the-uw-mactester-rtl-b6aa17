// tb_offline_sequencer: the off-line state machine with a memory and a
// latch model around it.
// A reference memory holds vectors of six words; the bench applies the
// sequencer's bus control to it, records the level-1 writes and answers
// BUS_L3 with a value derived from the last transfer. It checks the access
// order (four reads into the four level-1 registers, a transfer, two
// write-backs), the word addresses, the responses written back, 13 clocks
// per vector with zero coarse delay and 13 + d with a delay of d, the done
// bit, loop mode (the counters reload) and stop.
module tb_offline_sequencer;
  import mactester_pkg::*;
  logic              clk = 1'b0, rst_n, start, stop, loop_en;
  logic [MEM_AW-1:0] start_addr, cur_addr;
  logic [LEN_W-1:0]  length, remaining;
  logic              l3_valid, active, done;
  bus_ctrl_t         ctrl;
  int checks = 0, failures = 0;

  offline_sequencer dut (.*);

  always #50 clk = ~clk;

  // Memory, level-1 and latch models.
  logic [63:0] mem [2**MEM_AW];
  logic [63:0] l1 [4];
  logic [63:0] l3;
  int          dly, dly_cnt;
  int          xfers, cyc;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int r = 0; r < 4; r++)
      if (ctrl.l1_we[r]) l1[r] <= mem[ctrl.mem_addr];
    if (ctrl.mem_we) mem[ctrl.mem_addr] <= ctrl.l3_sel ? ~l3 : l3;
    if (ctrl.xfer) begin
      l3 <= l1[0] ^ l1[1] ^ {l1[2][31:0], l1[3][63:32]};
      l3_valid <= 1'b0;
      dly_cnt  <= dly;
      xfers    <= xfers + 1;
    end else if (dly_cnt > 0) dly_cnt <= dly_cnt - 1;
    else l3_valid <= 1'b1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic fill(input int base, input int n);
    for (int v = 0; v < n; v++)
      for (int w = 0; w < 6; w++)
        mem[MEM_AW'(base + 6 * v + w)] = (w < 4) ? {$urandom, $urandom} : 64'hdead_beef_0bad_f00d;
  endtask

  task automatic run(input int base, input int n, input int d, input bit loop_it);
    int t0, x0;
    dly = d; start_addr = MEM_AW'(base); length = LEN_W'(n); loop_en = loop_it;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    t0 = cyc; x0 = xfers;
    check(active, 1, "active after start");
    check(done, 0, "done cleared by start");
    if (!loop_it) begin
      while (active) @(negedge clk);
      check(cyc - t0, n * (13 + d) - 1 + 1, "cycles for the run");
      check(xfers - x0, n, "one transfer per vector");
      check(done, 1, "done at the end");
      check(cur_addr, base + 6 * n, "address counter after the run");
      check(remaining, 0, "length counter at zero");
    end
  endtask

  task automatic verify(input int base, input int n);
    for (int v = 0; v < n; v++) begin
      logic [63:0] a, e;
      int w0;
      w0 = base + 6 * v;
      a = mem[MEM_AW'(w0)] ^ mem[MEM_AW'(w0 + 1)] ^ {mem[MEM_AW'(w0 + 2)][31:0], mem[MEM_AW'(w0 + 3)][63:32]};
      e = mem[MEM_AW'(w0 + 4)];
      checks++;
      if (e !== a) begin failures++; $display("FAIL vector %0d low response %h vs %h", v, e, a); end
      checks++;
      if (mem[MEM_AW'(w0 + 5)] !== ~a) begin failures++; $display("FAIL vector %0d high response", v); end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; stop = 1'b0; loop_en = 1'b0; start_addr = '0; length = '0;
    l3_valid = 1'b0; dly = 0; dly_cnt = 0; xfers = 0; cyc = 0; l3 = '0;
    foreach (l1[i]) l1[i] = '0;
    #120 rst_n = 1'b1;
    // Zero delay: 13 clocks per vector.
    fill(0, 20); run(0, 20, 0, 0); verify(0, 20);
    // Coarse delay of 3: 16 clocks per vector.
    fill(600, 10); run(600, 10, 3, 0); verify(600, 10);
    // Zero length: done at once, nothing runs.
    @(negedge clk); length = '0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    check(active, 0, "zero length does not run");
    check(done, 1, "zero length is done");
    // Loop mode: three vectors repeat; stop ends it at a vector boundary.
    fill(1200, 3);
    begin
      int x0;
      x0 = xfers;
      run(1200, 3, 0, 1);
      repeat (13 * 3 * 4 + 5) @(negedge clk);
      check(active, 1, "loop keeps running");
      check(xfers - x0 > 3 ? 1 : 0, 1, "loop repeats the vectors");
      check(cur_addr >= 1200 && cur_addr < 1218 ? 1 : 0, 1, "loop stays in its vectors");
      stop = 1'b1; @(negedge clk); stop = 1'b0;
      repeat (14) @(negedge clk);
      check(active, 0, "stop ends the loop");
      check(done, 1, "done after stop");
      verify(1200, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
