// tb_workload_counter: interactive-style test of a 4-bit synchronous
// counter chip (a 74LS163 in a 16-pin DIP) against a software counter.
//
// The chip is powered from the tester's own pin drivers: its VCC pin is
// driven high and its GND pin low, and it only works while that holds. The
// host supplies the clock by setting CLK high and low in two vectors, as
// the tester provides no signals of its own. After power-up the chip and
// the model disagree; holding CLR low over a clock brings them into step.
// Then the value hex A is loaded through LOAD (active low), and a few
// hundred random settings of CLR, LOAD, ENP, ENT and the data inputs
// follow, each clocked once; after every clock the outputs QA..QD and RCO
// are compared with the model.
//
// The second part makes the same chip dynamic (its count leaks away 10 us
// after the last clock edge) and tests it with the hybrid scheme for
// dynamic parts: the tester memory holds every vector since a reset of the
// chip; each interactive step appends the step's two vectors and replays
// the whole sequence off-line from the reset, and only the response to the
// last vector is read back. The host's time between steps no longer
// matters, which the bench first demonstrates by showing that a plain
// on-line step after a pause sees a decayed count.
//
// Chip pins 1..16 sit on tester pins 0..15 (pin n on tester pin n-1):
// 1 CLR, 2 CLK, 3 A, 4 B, 5 C, 6 D, 7 ENP, 8 GND, 9 LOAD, 10 ENT, 11 QD,
// 12 QC, 13 QB, 14 QA, 15 RCO, 16 VCC.
module tb_workload_counter;
  import mactester_pkg::*;

  localparam realtime TCLK = 100.0;

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr;
  logic [31:0]  host_wdata, host_rdata;
  logic         host_wr, host_rd;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---- The counter chip.
  function automatic int tp(input int chip_pin);
    return chip_pin - 1;
  endfunction

  logic       chip_powered;
  logic [3:0] q;
  logic [127:0] dut_drive, dut_oe;

  assign chip_powered = pin_oe[tp(16)] && pin_out[tp(16)] && pin_oe[tp(8)] && !pin_out[tp(8)];

  bit      dynamic = 1'b0;
  realtime t_clk = 0;

  always begin
    #500;
    if (dynamic && $realtime - t_clk > 10000.0) q <= 4'h0;
  end

  always @(posedge pin_out[tp(2)]) begin
    t_clk = $realtime;
    if (chip_powered && pin_oe[tp(2)]) begin
      if (!pin_out[tp(1)])      q <= 4'h0;
      else if (!pin_out[tp(9)]) q <= {pin_out[tp(6)], pin_out[tp(5)], pin_out[tp(4)], pin_out[tp(3)]};
      else if (pin_out[tp(7)] && pin_out[tp(10)]) q <= q + 4'h1;
    end
  end

  always_comb begin
    dut_drive = '0;
    dut_oe    = '0;
    if (chip_powered) begin
      {dut_drive[tp(11)], dut_drive[tp(12)], dut_drive[tp(13)], dut_drive[tp(14)]} = q;
      dut_drive[tp(15)] = pin_out[tp(10)] && (q == 4'hf);
      {dut_oe[tp(11)], dut_oe[tp(12)], dut_oe[tp(13)], dut_oe[tp(14)], dut_oe[tp(15)]} = '1;
    end
  end
  assign pin_in = (pin_out & pin_oe) | (dut_drive & dut_oe & ~pin_oe);

  // ---- Host.
  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  logic [31:0] vals, resp;

  // One vector on the low 32 pins (the only ones this chip uses).
  task automatic next_vec();
    logic [31:0] st;
    hw(8'h00, vals);
    hw(A_CMD, 32'(CMD_STEP));
    do hr(A_STATUS, st); while (!st[3]);
    hr(8'h08, resp);
  endtask

  task automatic set_pin(input int chip_pin, input bit v);
    vals[tp(chip_pin)] = v;
  endtask

  // Software model of the counter: one clock with the controls in vals.
  logic [3:0] m_q;
  task automatic model_clock();
    if (!vals[tp(1)])       m_q = 4'h0;
    else if (!vals[tp(9)])  m_q = {vals[tp(6)], vals[tp(5)], vals[tp(4)], vals[tp(3)]};
    else if (vals[tp(7)] && vals[tp(10)]) m_q = m_q + 4'h1;
  endtask

  task automatic clockchip();
    set_pin(2, 1); next_vec();
    set_pin(2, 0); next_vec();
    model_clock();
  endtask

  localparam logic [31:0] DIRS = 32'h0000_80ff | (32'd1 << 8) | (32'd1 << 9);

  // Append the current vector to the tester memory (six words).
  int n_stored;
  task automatic store_vec();
    hw(A_MEM_PTR, 32'(6 * n_stored));
    hw(A_MEM_LO, vals); hw(A_MEM_HI, '0);
    hw(A_MEM_LO, '0);   hw(A_MEM_HI, '0);
    hw(A_MEM_LO, DIRS); hw(A_MEM_HI, '0);
    hw(A_MEM_LO, '0);   hw(A_MEM_HI, '0);
    n_stored++;
  endtask

  // Replay every stored vector and fetch the last response.
  task automatic replay();
    logic [31:0] st;
    hw(A_OFF_ADDR, 32'd0);
    hw(A_OFF_LEN, 32'(n_stored));
    hw(A_CMD, 32'(CMD_START));
    do hr(A_STATUS, st); while (!st[2] || st[1]);
    hw(A_MEM_PTR, 32'(6 * (n_stored - 1) + 4));
    hr(A_MEM_LO, resp);
  endtask

  function automatic logic [3:0] chip_q();
    return {resp[tp(11)], resp[tp(12)], resp[tp(13)], resp[tp(14)]};
  endfunction

  initial begin
    int mismatches_before_sync = 0, loads = 0, clears = 0, counts = 0, rco_seen = 0;
    rst_n = 1'b0; host_addr = '0; host_wdata = '0; host_wr = 1'b0; host_rd = 1'b0;
    q = 4'($urandom);          // the chip powers up in an unknown state
    m_q = ~q;                  // the software counter starts elsewhere
    #(TCLK * 3) rst_n = 1'b1;
    // Directions: every chip input and both supply pins are driven.
    hw(8'h04, DIRS);
    for (int w = 5; w < 8; w++) hw(8'(w), '0);
    for (int w = 1; w < 4; w++) hw(8'(w), '0);
    hw(A_POWER, 32'b100);       // ready; DUT powered from the pins
    vals = '0;
    set_pin(16, 1); set_pin(8, 0);
    set_pin(1, 1); set_pin(9, 1); set_pin(7, 1); set_pin(10, 1);
    next_vec();
    check(led_dut_power, 0, "no FET used with pin power");
    // Free-running: chip and model may disagree.
    repeat (3) begin
      clockchip();
      if (chip_q() != m_q) mismatches_before_sync++;
    end
    // Hold CLR low over two clocks to bring both into step.
    set_pin(1, 0);
    clockchip(); clockchip();
    set_pin(1, 1);
    check(mismatches_before_sync > 0 ? 1 : 0, 1, "chip and model start out of step");
    check(chip_q(), m_q, "synchronised by clear");
    // Load hex A through LOAD.
    {vals[tp(6)], vals[tp(5)], vals[tp(4)], vals[tp(3)]} = 4'ha;
    set_pin(9, 0);
    clockchip();
    set_pin(9, 1);
    check(chip_q(), 4'ha, "chip loads hex A");
    check(m_q, 4'ha, "model loads hex A");
    // Random use of the toggle switches.
    for (int n = 0; n < 400; n++) begin
      set_pin(1, $urandom_range(0, 19) != 0);
      set_pin(9, $urandom_range(0, 9) != 0);
      set_pin(7, $urandom_range(0, 3) != 0);
      set_pin(10, $urandom_range(0, 3) != 0);
      {vals[tp(6)], vals[tp(5)], vals[tp(4)], vals[tp(3)]} = 4'($urandom);
      if (!vals[tp(1)]) clears++;
      else if (!vals[tp(9)]) loads++;
      else if (vals[tp(7)] && vals[tp(10)]) counts++;
      clockchip();
      check(chip_q(), m_q, "counter outputs against the model");
      check(resp[tp(15)], vals[tp(10)] && m_q == 4'hf, "ripple carry");
      if (resp[tp(15)]) rco_seen++;
    end
    check(clears > 0 && loads > 0 && counts > 0 && rco_seen > 0 ? 1 : 0, 1, "clear, load, count and carry all exercised");
    // ---- Part 2: the chip as a dynamic part, hybrid replay.
    dynamic = 1'b1;
    set_pin(1, 1); set_pin(9, 1); set_pin(7, 1); set_pin(10, 1);
    clockchip();                       // a live count after this clock
    #(30000);                          // the host pauses, as a user would
    next_vec();
    check(m_q != 0 && chip_q() == 0 ? 1 : 0, 1, "dynamic chip decays between on-line steps");
    // Reset sequence at the head of the memory: clear over one clock.
    n_stored = 0;
    set_pin(1, 0);
    set_pin(2, 1); store_vec();
    set_pin(2, 0); store_vec();
    model_clock();
    set_pin(1, 1);
    begin
      int replays = 0;
      for (int k = 0; k < 40; k++) begin
        set_pin(1, $urandom_range(0, 19) != 0);
        set_pin(9, $urandom_range(0, 9) != 0);
        set_pin(7, $urandom_range(0, 3) != 0);
        set_pin(10, $urandom_range(0, 3) != 0);
        {vals[tp(6)], vals[tp(5)], vals[tp(4)], vals[tp(3)]} = 4'($urandom);
        set_pin(2, 1); store_vec();
        set_pin(2, 0); store_vec();
        model_clock();
        #(15000);                      // think time longer than the chip holds state
        replay();
        replays++;
        check(chip_q(), m_q, "dynamic counter by replay from reset");
      end
      check(replays, 40, "interactive steps by replay");
      check(n_stored, 82, "vectors kept since the reset");
    end
    $display("before sync mismatches=%0d clears=%0d loads=%0d counts=%0d carries=%0d",
             mismatches_before_sync, clears, loads, counts, rco_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
