// tb_dut_power_ctrl: FET gates and LEDs.
// Checks the reset state (everything off), each power choice, the rule
// that requesting both FETs turns both off, the green LED following the
// FETs, and that a reset in the middle of a test turns the FETs off.
module tb_dut_power_ctrl;
  logic       clk = 1'b0, rst_n, wr;
  logic [2:0] wdata, rdata;
  logic       fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  dut_power_ctrl dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input logic d, i, r, g, input string what);
    checks++;
    if ({fet_direct_on, fet_indirect_on, led_ready, led_dut_power} !== {d, i, r, g}) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what,
               {fet_direct_on, fet_indirect_on, led_ready, led_dut_power}, {d, i, r, g});
    end
  endtask

  task automatic write(input logic [2:0] v);
    @(negedge clk); wr = 1'b1; wdata = v;
    @(negedge clk); wr = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; wr = 1'b0; wdata = '0;
    #20 expect4(0, 0, 0, 0, "in reset");
    #100 rst_n = 1'b1;
    write(3'b100); expect4(0, 0, 1, 0, "ready, DUT unpowered (pin power)");
    write(3'b101); expect4(1, 0, 1, 1, "direct power");
    checks++; if (rdata !== 3'b101) begin failures++; $display("FAIL readback"); end
    write(3'b110); expect4(0, 1, 1, 1, "indirect power");
    write(3'b111); expect4(0, 0, 1, 0, "both requested: both off");
    write(3'b001); expect4(1, 0, 0, 1, "direct, not ready");
    #10 rst_n = 1'b0;
    #1 expect4(0, 0, 0, 0, "reset turns FETs off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
