// dut_power_ctrl: DUT power switching and the status LEDs.
//
// The tester has no switches: the host turns DUT power on and off by
// writing this register, whose bits drive the gates of the two power FETs
// (direct and indirect power) and the yellow "tester ready" LED. The green
// LED lights while either FET conducts. All outputs come from flip-flops
// cleared by reset, so an uninitialised or resetting controller can never
// turn a FET on. The register layout, and the rule that a request for both
// FETs at once turns both off, are this design's choices; with the third
// power option the DUT is fed from the pin drivers and both FETs stay off.
// Timing: a write takes effect at the next rising clock edge.
module dut_power_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [2:0] wdata,     // [0] direct, [1] indirect, [2] ready
  output logic [2:0] rdata,
  output logic       fet_direct_on,
  output logic       fet_indirect_on,
  output logic       led_ready,
  output logic       led_dut_power
);
  logic [2:0] req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req             <= '0;
      fet_direct_on   <= 1'b0;
      fet_indirect_on <= 1'b0;
      led_ready       <= 1'b0;
    end else begin
      if (wr) req <= wdata;
      fet_direct_on   <= req[0] && !req[1];
      fet_indirect_on <= req[1] && !req[0];
      led_ready       <= req[2];
    end
  end

  assign rdata         = req;
  assign led_dut_power = fet_direct_on || fet_indirect_on;
endmodule
