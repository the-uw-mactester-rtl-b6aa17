// tb_mactester_top_isa: the tester in its PC configuration (ISA_HOST = 1).
//
// The host reaches the tester only through 16-bit I/O ports on an 8 MHz
// bus: port 0 takes the register address, ports 1 and 2 the low and high
// data halves. The bench runs the combinational 8x8 multiplier on-line
// (pins 0..7, 8..15 -> 16..31) and a short off-line block through these
// ports, checking that every 32-bit tester access composed from two port
// accesses lands where it should.
module tb_mactester_top_isa;
  import mactester_pkg::*;

  localparam realtime TCLK = 125.0;   // 8 MHz PC bus clock

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr;
  logic [31:0]  host_wdata, host_rdata;
  logic         host_wr, host_rd;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top #(.ISA_HOST(1'b1)) dut (.*);

  always #(TCLK / 2) clk = ~clk;

  // Powered combinational multiplier.
  logic [127:0] dut_drive, dut_oe;
  always_comb begin
    dut_drive = '0;
    dut_oe    = '0;
    if (fet_direct_on) begin
      dut_drive[31:16] = 16'(pin_out[7:0]) * 16'(pin_out[15:8]);
      dut_oe[31:16]    = '1;
    end
  end
  assign pin_in = (pin_out & pin_oe) | (dut_drive & dut_oe & ~pin_oe);

  initial begin
    #(TCLK * 500_000);
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

  task automatic io_wr(input logic [1:0] p, input logic [15:0] d);
    @(negedge clk); host_addr = 16'(p); host_wdata = 32'(d); host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic io_rd(input logic [1:0] p, output logic [15:0] d);
    @(negedge clk); host_addr = 16'(p); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata[15:0];
  endtask

  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    io_wr(2'd0, 16'(a));
    io_wr(2'd1, d[15:0]);
    io_wr(2'd2, d[31:16]);
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    logic [15:0] lo, hi;
    io_wr(2'd0, 16'(a));
    io_rd(2'd1, lo);
    io_rd(2'd2, hi);
    d = {hi, lo};
  endtask

  initial begin
    logic [31:0] d, st;
    rst_n = 1'b0; host_addr = '0; host_wdata = '0; host_wr = 1'b0; host_rd = 1'b0;
    #(TCLK * 3) rst_n = 1'b1;
    // Register round trip through the ports.
    hw(A_OFF_LEN, 32'h0000_1234);
    hr(A_OFF_LEN, d);
    check(d, 32'h1234, "32-bit register through two ports");
    hw(A_MEM_PTR, 32'd77);
    hw(A_MEM_LO, 32'hdead_beef);
    hw(A_MEM_HI, 32'h0123_4567);
    hw(A_MEM_PTR, 32'd77);
    hr(A_MEM_LO, d); check(d, 32'hdead_beef, "memory low half via ISA");
    hr(A_MEM_HI, d); check(d, 32'h0123_4567, "memory high half via ISA");
    hw(A_POWER, 32'b101);
    // On-line multiplier.
    for (int i = 1; i < 256; i += 37) begin
      for (int j = 2; j < 256; j += 41) begin
        hw(8'h00, {16'd0, 8'(j), 8'(i)});   // values, pins 31..0
        hw(8'h04, 32'h0000_ffff);           // enables: pins 15..0 driven
        for (int w = 1; w < 4; w++) hw(8'(w), '0);
        for (int w = 5; w < 8; w++) hw(8'(w), '0);
        hw(A_CMD, 32'(CMD_STEP));
        do hr(A_STATUS, st); while (!st[3]);
        hr(8'h08, d);
        check(d[31:16], i * j, "multiplier through the ISA ports");
        check(d[15:0], {8'(j), 8'(i)}, "driven pins through the ISA ports");
      end
    end
    // A short off-line run: 4 vectors of 6 words at word 0.
    hw(A_MEM_PTR, 32'd0);
    for (int k = 0; k < 4; k++) begin
      hw(A_MEM_LO, {16'd0, 8'(k + 9), 8'(k + 3)}); hw(A_MEM_HI, '0);
      hw(A_MEM_LO, '0); hw(A_MEM_HI, '0);
      hw(A_MEM_LO, 32'h0000_ffff); hw(A_MEM_HI, '0);
      hw(A_MEM_LO, '0); hw(A_MEM_HI, '0);
      hw(A_MEM_LO, '0); hw(A_MEM_HI, '0);
      hw(A_MEM_LO, '0); hw(A_MEM_HI, '0);
    end
    hw(A_OFF_ADDR, 32'd0);
    hw(A_OFF_LEN, 32'd4);
    hw(A_CMD, 32'(CMD_START));
    do hr(A_STATUS, st); while (!st[2]);
    for (int k = 0; k < 4; k++) begin
      hw(A_MEM_PTR, 32'(6 * k + 4));
      hr(A_MEM_LO, d);
      check(d[31:16], (k + 3) * (k + 9), "off-line response via ISA");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
