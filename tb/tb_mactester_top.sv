// tb_mactester_top: the whole tester, at its default size, driven by a host
// model and connected to behavioural devices under test.
//
// The bench plays the host computer. Its tasks mirror the programming model
// of the tester library: a vector is built in host memory (set_sig), and
// next_online() writes the eight level-1 words, steps the tester, waits for
// the latch and reads the four level-3 words back. For off-line blocks,
// gen_vector() stores vectors in the test vector memory through the memory
// pointer, run_offline() runs them and get_response() reads the responses.
//
// Devices on the 128 pins (pins not driven by anyone read as 0):
//   pins  0..7 / 8..15 -> 16..31   combinational 8x8 multiplier
//   pin  33 -> pin 32               output following its input after 250 ns
//   pin  33 -> pin 34               output following its input after 40 ns
//   pin  41 enables the device to drive pin 40 (a bidirectional data pin)
//   pins 64..71 / 72..79, clocks phi1 = pin 80, phi2 = pin 81 -> 96..111
//                                   dynamic single-stage pipelined multiplier
//                                   whose stored inputs decay 10 us after
//                                   they are written
// The devices only work while a power FET is on.
//
// Mechanisms counted (each must happen at least once): on-line step,
// off-line run, level-1 halves written, level-3 words read, memory upload
// and download, coarse latch delay, fine latch delay, stall of the off-line
// sequencer by the coarse delay, direction flip of a bidirectional pin,
// loop mode, stop, DUT power switching, the dynamic device failing on-line
// and passing off-line. The off-line rate (13 bus clocks per vector) and
// the vector memory's capacity (5461 vectors) are checked too.
module tb_mactester_top;
  import mactester_pkg::*;

  localparam realtime TCLK = 100.0;   // 10 MHz host bus clock
  localparam realtime ONLINE_HOST_OVERHEAD = 20000.0;  // ns of host software per on-line vector

  logic               clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]        host_addr;
  logic [31:0]        host_wdata, host_rdata;
  logic               host_wr, host_rd;
  logic [127:0]       pin_out, pin_oe, pin_in;
  logic               fet_direct_on, fet_indirect_on, led_ready, led_dut_power;

  mactester_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int n_step = 0, n_offline = 0, n_l1_half = 0, n_l3_read = 0, n_mem_up = 0, n_mem_down = 0;
  int n_coarse = 0, n_fine = 0, n_stall = 0, n_dir_flip = 0, n_loop = 0, n_stop = 0;
  int n_power = 0, n_dyn_online_fail = 0, n_dyn_offline_pass = 0;

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #(TCLK * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Devices under test.
  logic         powered;
  logic [127:0] dut_drive, dut_oe;
  logic         slow_out, fast_out;
  logic [7:0]   dyn_a, dyn_b;
  logic [15:0]  dyn_out;
  realtime      dyn_written;

  assign powered = fet_direct_on || fet_indirect_on;
  assign #250 slow_out = pin_out[33] && pin_oe[33];
  assign #40  fast_out = pin_out[33] && pin_oe[33];

  always @(posedge pin_out[80]) begin   // phi1: output stage takes the product
    if (pin_oe[80])
      dyn_out <= ($realtime - dyn_written > 10000.0) ? 16'h0000 : 16'(dyn_a) * 16'(dyn_b);
  end
  always @(posedge pin_out[81]) begin   // phi2: input stage stores the inputs
    if (pin_oe[81]) begin
      dyn_a <= pin_out[71:64];
      dyn_b <= pin_out[79:72];
      dyn_written = $realtime;
    end
  end

  always_comb begin
    dut_drive = '0;
    dut_oe    = '0;
    if (powered) begin
      dut_drive[31:16]  = 16'(pin_out[7:0]) * 16'(pin_out[15:8]);
      dut_oe[31:16]     = '1;
      dut_drive[32]     = slow_out;
      dut_drive[34]     = fast_out;
      dut_oe[32]        = 1'b1;
      dut_oe[34]        = 1'b1;
      dut_drive[40]     = 1'b1 ^ pin_out[33];
      dut_oe[40]        = pin_out[41] && pin_oe[41];
      dut_drive[111:96] = dyn_out;
      dut_oe[111:96]    = '1;
    end
  end

  // Each pin reads the tester's driver, else the device's, else 0.
  assign pin_in = (pin_out & pin_oe) | (dut_drive & dut_oe & ~pin_oe);

  int n_conflict = 0;
  always @(posedge clk) if (|(pin_oe & dut_oe)) n_conflict++;

  // ------------------------------------------------------------------
  // Host port.
  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = {8'h00, a}; host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = {8'h00, a}; host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  // Host copy of the vector: value, direction, response.
  logic [127:0] v_val, v_dir, v_resp;

  task automatic set_sig(input int lsb, input int width, input logic [31:0] value);
    for (int i = 0; i < width; i++) begin
      v_val[lsb + i] = value[i];
      v_dir[lsb + i] = 1'b1;
    end
  endtask

  task automatic set_input_dir(input int lsb, input int width);
    for (int i = 0; i < width; i++) v_dir[lsb + i] = 1'b0;
  endtask

  function automatic logic [31:0] get_sig(input int lsb, input int width);
    logic [31:0] r = '0;
    for (int i = 0; i < width; i++) r[i] = v_resp[lsb + i];
    return r;
  endfunction

  task automatic next_online(input bit host_delay);
    logic [31:0] st;
    if (host_delay) #(ONLINE_HOST_OVERHEAD);
    for (int w = 0; w < 8; w++) begin
      logic [127:0] src;
      src = (w < 4) ? v_val : v_dir;
      hw(8'(w), src[32 * ((w / 2) % 2 * 2 + w % 2) +: 32]);
      n_l1_half++;
    end
    hw(A_CMD, 32'(CMD_STEP));
    n_step++;
    do hr(A_STATUS, st); while (!st[3]);
    for (int w = 0; w < 4; w++) begin
      logic [31:0] d;
      hr(8'h08 + 8'(w), d);
      v_resp[32 * w +: 32] = d;
      n_l3_read++;
    end
  endtask

  // Off-line vectors: six memory words each, at word 6*k.
  int gen_k;
  task automatic mem_write64(input logic [63:0] d);
    hw(A_MEM_LO, d[31:0]);
    hw(A_MEM_HI, d[63:32]);
    n_mem_up++;
  endtask

  task automatic gen_vector();
    mem_write64(v_val[63:0]);
    mem_write64(v_val[127:64]);
    mem_write64(v_dir[63:0]);
    mem_write64(v_dir[127:64]);
    mem_write64(64'h0);
    mem_write64(64'h0);
    gen_k++;
  endtask

  task automatic get_response(input int k);
    logic [31:0] d;
    hw(A_MEM_PTR, 32'(6 * k + 4));
    for (int w = 0; w < 4; w++) begin
      hr(w % 2 ? A_MEM_HI : A_MEM_LO, d);
      v_resp[32 * w +: 32] = d;
    end
    n_mem_down++;
  endtask

  // Runs vectors [0, n) and returns the bus clocks from start to done.
  task automatic run_offline(input int n, output int clocks);
    logic [31:0] st;
    realtime t0;
    hw(A_OFF_ADDR, 32'd0);
    hw(A_OFF_LEN, 32'(n));
    hw(A_OFF_CTRL, 32'd0);
    @(negedge clk); host_addr = {8'h00, A_CMD}; host_wdata = 32'(CMD_START); host_wr = 1'b1;
    t0 = $realtime;
    @(negedge clk); host_wr = 1'b0;
    do hr(A_STATUS, st); while (!st[2] || st[1]);
    clocks = int'(($realtime - t0) / TCLK);
    n_offline++;
  endtask

  task automatic begin_offline();
    gen_k = 0;
    hw(A_MEM_PTR, 32'd0);
  endtask

  // ------------------------------------------------------------------
  logic [31:0] st;
  int clocks;

  initial begin
    rst_n = 1'b0; host_addr = '0; host_wdata = '0; host_wr = 1'b0; host_rd = 1'b0;
    v_val = '0; v_dir = '0; v_resp = '0; dyn_a = '0; dyn_b = '0; dyn_out = '0; dyn_written = 0;
    #(TCLK * 3) rst_n = 1'b1;

    // ---- Initialisation: all pins high impedance, FETs off.
    @(negedge clk);
    check(pin_oe, '0, "pins high impedance after reset");
    check({fet_direct_on, fet_indirect_on, led_dut_power}, 0, "power off after reset");

    // Memory self-test: pattern in, pattern out, over a spread of words.
    for (int k = 0; k < 32; k++) begin
      hw(A_MEM_PTR, 32'(k * 1021));
      mem_write64({32'(k) ^ 32'h5a5a_a5a5, ~32'(k)});
    end
    for (int k = 0; k < 32; k++) begin
      logic [31:0] lo, hi;
      hw(A_MEM_PTR, 32'(k * 1021));
      hr(A_MEM_LO, lo); hr(A_MEM_HI, hi);
      check({hi, lo}, {32'(k) ^ 32'h5a5a_a5a5, ~32'(k)}, "memory self-test");
      n_mem_down++;
    end

    // ---- Power: ready LED, indirect then direct power.
    hw(A_POWER, 32'b110);
    @(negedge clk);
    check({fet_indirect_on, fet_direct_on, led_ready, led_dut_power}, 4'b1011, "indirect power");
    hw(A_POWER, 32'b101);
    @(negedge clk);
    check({fet_direct_on, fet_indirect_on, led_ready, led_dut_power}, 4'b1011, "direct power");
    n_power++;

    // ---- On-line: combinational multiplier, sampled sweep.
    for (int i = 0; i < 256; i += 17) begin
      for (int j = 0; j < 256; j += 23) begin
        set_sig(0, 8, 32'(i));
        set_sig(8, 8, 32'(j));
        set_input_dir(16, 16);
        next_online(0);
        check(get_sig(16, 16), i * j, "on-line multiplier result");
        check(get_sig(0, 8), i, "driven pins read back");
      end
    end

    // ---- Coarse latch delay: 250 ns device output.
    v_val = '0; v_dir = '0;
    set_sig(33, 1, 0); set_input_dir(32, 1); set_input_dir(34, 1);
    hw(A_DELAY, 32'd0);
    next_online(0);
    set_sig(33, 1, 1);
    next_online(0);
    check(get_sig(32, 1), 0, "zero coarse delay latches before the slow output moves");
    check(get_sig(34, 1), 0, "12 ns fine delay latches before the 40 ns output moves");
    set_sig(33, 1, 0); next_online(0);
    hw(A_DELAY, 32'd3);
    set_sig(33, 1, 1); next_online(0);
    check(get_sig(32, 1), 1, "coarse delay of 3 clocks sees the slow output");
    n_coarse++;
    // ---- Fine delay: 40 ns device output, taps of 12 ns.
    for (int tap = 0; tap < 8; tap++) begin
      hw(A_DELAY, 32'(tap << 8));
      set_sig(33, 1, 0); next_online(0);
      set_sig(33, 1, 1); next_online(0);
      check(get_sig(34, 1), ((tap + 1) * 12 > 40) ? 1 : 0, "fine delay tap against 40 ns output");
      check(get_sig(32, 1), 0, "fine delay alone is shorter than the slow output");
      if ((tap + 1) * 12 > 40) n_fine++;
    end
    hw(A_DELAY, 32'd0);

    // ---- Bidirectional pin 40: tester drives it, then hands it to the device.
    v_val = '0; v_dir = '0;
    set_sig(41, 1, 0); set_sig(40, 1, 1); set_sig(33, 1, 0);
    next_online(0);
    check(get_sig(40, 1), 1, "tester drives the bidirectional pin");
    set_input_dir(40, 1); set_sig(41, 1, 1);
    next_online(0);
    check(get_sig(40, 1), 1, "device drives the pin after the flip");
    set_sig(33, 1, 1);
    next_online(0);
    check(get_sig(40, 1), 0, "device value follows its own logic");
    n_dir_flip++;
    set_sig(41, 1, 0);
    next_online(0);

    // ---- Dynamic pipelined multiplier, on-line at host speed: decays.
    v_val = '0; v_dir = '0;
    set_input_dir(96, 16);
    begin
      int lasti = 0, lastj = 0, errs = 0;
      for (int n = 0; n < 6; n++) begin
        int i = 3 + n, j = 200 - n;
        set_sig(64, 8, 32'(i)); set_sig(72, 8, 32'(j));
        set_sig(80, 1, 1); next_online(1);
        set_sig(80, 1, 0); next_online(1);
        set_sig(81, 1, 1); next_online(1);
        set_sig(81, 1, 0); next_online(1);
        if (n > 0 && get_sig(96, 16) != lasti * lastj) errs++;
        lasti = i; lastj = j;
      end
      if (errs > 0) n_dyn_online_fail++;
      check(errs, 5, "dynamic device loses its state at on-line speed");
    end

    // ---- Same test off-line: generate, run, verify (two passes).
    begin
      int lasti = 0, lastj = 0, nvec;
      v_val = '0; v_dir = '0;
      set_input_dir(96, 16);
      begin_offline();
      for (int n = 0; n < 40; n++) begin
        set_sig(64, 8, 32'(n * 5)); set_sig(72, 8, 32'(255 - n));
        set_sig(80, 1, 1); gen_vector();
        set_sig(80, 1, 0); gen_vector();
        set_sig(81, 1, 1); gen_vector();
        set_sig(81, 1, 0); gen_vector();
      end
      nvec = gen_k;
      run_offline(nvec, clocks);
      // 13 clocks per vector, plus the start write and the done poll.
      check(clocks >= 13 * nvec && clocks <= 13 * nvec + 4 ? 1 : 0, 1, "13 bus clocks per vector");
      if (clocks > 13 * nvec + 4) $display("off-line run took %0d clocks for %0d vectors", clocks, nvec);
      for (int n = 0; n < 40; n++) begin
        get_response(4 * n + 3);
        if (n > 0) check(get_sig(96, 16), lasti * lastj, "off-line dynamic multiplier");
        get_response(4 * n);
        check(get_sig(64, 8), n * 5, "off-line response shows driven pins");
        lasti = n * 5; lastj = 255 - n;
      end
      n_dyn_offline_pass++;
    end

    // ---- Off-line with a coarse delay: the sequencer stalls for it.
    hw(A_DELAY, 32'd4);
    begin_offline();
    v_val = '0; v_dir = '0; set_input_dir(16, 16);
    for (int n = 0; n < 20; n++) begin
      set_sig(0, 8, 32'(n + 1)); set_sig(8, 8, 32'(n + 100)); gen_vector();
    end
    run_offline(20, clocks);
    check(clocks >= 17 * 20 && clocks <= 17 * 20 + 4 ? 1 : 0, 1, "13 + 4 bus clocks per vector");
    if (clocks >= 17 * 20) n_stall++;
    for (int n = 0; n < 20; n++) begin
      get_response(n);
      check(get_sig(16, 16), (n + 1) * (n + 100), "off-line multiplier with coarse delay");
    end
    hw(A_DELAY, 32'd0);

    // ---- Loop mode and stop.
    begin
      logic [31:0] a0, a1;
      int wraps = 0;
      hw(A_OFF_ADDR, 32'd0);
      hw(A_OFF_LEN, 32'd3);
      hw(A_OFF_CTRL, 32'd1);
      hw(A_CMD, 32'(CMD_START));
      a0 = 0;
      for (int k = 0; k < 60; k++) begin
        hr(A_SEQ_ADDR, a1);
        if (a1 < a0) wraps++;
        a0 = a1;
      end
      hr(A_STATUS, st);
      check(st[1], 1, "loop keeps running");
      check(wraps > 0 ? 1 : 0, 1, "loop restarts at the start address");
      if (wraps > 0) n_loop++;
      hw(A_CMD, 32'(CMD_STOP));
      repeat (20) @(negedge clk);
      hr(A_STATUS, st);
      check(st[2:1], 2'b10, "stop ends the loop with done");
      n_stop++;
      hw(A_OFF_CTRL, 32'd0);
    end

    // ---- Capacity: the last whole vector of the memory runs too.
    begin
      int last = (2 ** MEM_AW) / 6 - 1;
      check(last + 1, 5461, "vector memory holds 5461 vectors");
      v_val = '0; v_dir = '0; set_input_dir(16, 16);
      set_sig(0, 8, 32'd250); set_sig(8, 8, 32'd251);
      hw(A_MEM_PTR, 32'(6 * last));
      gen_vector();
      hw(A_OFF_ADDR, 32'(6 * last));
      hw(A_OFF_LEN, 32'd1);
      hw(A_CMD, 32'(CMD_START));
      do hr(A_STATUS, st); while (!st[2]);
      get_response(last);
      check(get_sig(16, 16), 250 * 251, "last vector of the memory");
    end

    // ---- End of test: pins back to high impedance, power off.
    v_val = '0; v_dir = '0;
    next_online(0);
    check(pin_oe, '0, "pins released at the end");
    hw(A_POWER, 32'b100);
    @(negedge clk);
    check(led_dut_power, 0, "DUT power off at the end");
    check(n_conflict, 0, "tester and device never drive a pin together");

    // ---- Every mechanism happened.
    check(n_step > 0, 1, "on-line steps");
    check(n_offline > 0, 1, "off-line runs");
    check(n_l1_half > 0, 1, "level-1 half writes");
    check(n_l3_read > 0, 1, "level-3 reads");
    check(n_mem_up > 0, 1, "memory uploads");
    check(n_mem_down > 0, 1, "memory downloads");
    check(n_coarse > 0, 1, "coarse delay");
    check(n_fine > 0, 1, "fine delay");
    check(n_stall > 0, 1, "sequencer stall on coarse delay");
    check(n_dir_flip > 0, 1, "direction flip");
    check(n_loop > 0, 1, "loop mode");
    check(n_stop > 0, 1, "stop");
    check(n_power > 0, 1, "power switching");
    check(n_dyn_online_fail > 0, 1, "dynamic device fails on-line");
    check(n_dyn_offline_pass > 0, 1, "dynamic device passes off-line");
    $display("mechanisms: step=%0d offline=%0d l1=%0d l3=%0d up=%0d down=%0d coarse=%0d fine=%0d stall=%0d flip=%0d loop=%0d stop=%0d power=%0d dyn_online_fail=%0d dyn_offline_pass=%0d",
             n_step, n_offline, n_l1_half, n_l3_read, n_mem_up, n_mem_down, n_coarse, n_fine,
             n_stall, n_dir_flip, n_loop, n_stop, n_power, n_dyn_online_fail, n_dyn_offline_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
