// tb_workload_session: the start and end of a test session, as a test
// program runs it, with a DUT whose power and ground are hand-wired.
//
// The board's supply pin is wired to the tester's power output and also to
// a tester pin (pin 15), and its ground to pin 7, so the tester can check
// the wiring by reading those pins with every pin released. The sequence:
// after reset every pin is released and both power FETs are off; the
// program lights the ready LED; the power and ground self-test checks that
// the supply pin is low with power off and high with direct and with
// indirect power, and that the ground pin stays low; a second run with the
// supply wired to the wrong pin must fail the self-test. Then power comes
// on before any pin is driven, a few on-line vectors run (a 4-bit inverter
// on pins 0..3 -> 8..11), and at the end all pins are released before power
// goes off.
module tb_workload_session;
  import mactester_pkg::*;

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr = '0;
  logic [31:0]  host_wdata = '0, host_rdata;
  logic         host_wr = 1'b0, host_rd = 1'b0;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top dut (.*);

  always #50 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // The board: supply on pin vcc_pin (hand-wired), ground on pin 7, and an
  // inverter from pins 0..3 to pins 8..11 that works only when powered.
  int  vcc_pin = 15;
  wire powered = fet_direct_on || fet_indirect_on;
  always_comb begin
    pin_in = pin_out & pin_oe;               // released pins read low
    pin_in[vcc_pin] = powered;
    pin_in[7] = 1'b0;
    if (powered) pin_in[11:8] = ~(pin_out[3:0] & pin_oe[3:0]);
  end

  // Order of events: power must come on before the first driven pin and go
  // off after the last one is released.
  realtime t_power_on = -1, t_first_drive = -1, t_power_off = -1, t_released = -1;
  always @(posedge powered) if (t_power_on < 0) t_power_on = $realtime;
  always @(negedge powered) t_power_off = $realtime;
  always @(pin_oe) begin
    if (pin_oe != '0 && t_first_drive < 0) t_first_drive = $realtime;
    if (pin_oe == '0) t_released = $realtime;
  end

  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  // One on-line step with the low 32 pins' values and directions.
  task automatic step(input logic [31:0] val, dir, output logic [31:0] r);
    logic [31:0] st;
    hw(8'h00, val);
    hw(8'h04, dir);
    hw(A_CMD, 32'(CMD_STEP));
    do hr(A_STATUS, st); while (!st[3]);
    hr(8'h08, r);
  endtask

  // Power and ground self-test: all pins released, read the supply and
  // ground pins with power off, direct and indirect. Returns 1 on a pass.
  task automatic power_selftest(output bit ok);
    logic [31:0] r;
    int vcc = 15;
    ok = 1'b1;
    hw(A_POWER, 32'b100);
    step('0, '0, r);
    if (r[vcc] !== 1'b0 || r[7] !== 1'b0) ok = 1'b0;
    hw(A_POWER, 32'b101);
    step('0, '0, r);
    if (r[vcc] !== 1'b1 || r[7] !== 1'b0) ok = 1'b0;
    hw(A_POWER, 32'b110);
    step('0, '0, r);
    if (r[vcc] !== 1'b1 || r[7] !== 1'b0) ok = 1'b0;
    hw(A_POWER, 32'b100);
  endtask

  initial begin
    logic [31:0] r;
    bit ok;
    rst_n = 1'b0;
    #230 rst_n = 1'b1;
    @(negedge clk);
    check(pin_oe, '0, "all pins released after reset");
    check({fet_direct_on, fet_indirect_on, led_ready, led_dut_power}, '0, "FETs and LEDs off after reset");

    hw(A_POWER, 32'b100);
    @(negedge clk);
    check(led_ready, 1, "ready LED after initialisation");

    // Miswired first: the supply lands on pin 14 instead of 15.
    vcc_pin = 14;
    power_selftest(ok);
    check(ok, 0, "self-test finds the supply on the wrong pin");
    @(negedge clk);
    check(powered, 0, "power off after the failed self-test");
    vcc_pin = 15;
    power_selftest(ok);
    check(ok, 1, "self-test passes with correct wiring");
    check(pin_oe, '0, "pins still released after the self-test");

    // Session: power first, then drive the inputs.
    t_power_on = -1; t_first_drive = -1;
    hw(A_POWER, 32'b101);
    @(negedge clk);
    check(led_dut_power, 1, "green LED with DUT power");
    for (int k = 0; k < 16; k++) begin
      step(32'(k), 32'h0000_000f, r);
      check(64'(r[11:8]), 64'(15 - k), "inverter output");
    end
    check(t_power_on >= 0 && t_first_drive > t_power_on, 1, "power on before the first driven pin");

    // End: release every pin, then power off.
    step('0, '0, r);
    check(pin_oe, '0, "pins released at the end");
    hw(A_POWER, 32'b100);
    @(negedge clk);
    check({fet_direct_on, fet_indirect_on, led_dut_power}, '0, "power off at the end");
    check(t_power_off > t_released, 1, "pins released before power off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
