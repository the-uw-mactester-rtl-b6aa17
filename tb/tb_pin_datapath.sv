// tb_pin_datapath: the full 64-bit / 128-pin data path against a model.
// Each vector is written as eight 32-bit halves (values low/high, enables
// low/high), transferred, checked on all 128 pins, then latched from
// pin_in and read back as two 64-bit level-3 words. Also checks that pin p
// and pin p+64 both hang on bus bit p, across all six slices.
module tb_pin_datapath;
  logic         clk = 1'b0, rst_n, latch_clk = 1'b0;
  logic [63:0]  bus_in, bus_out;
  logic [3:0]   l1_we;
  logic [1:0]   half;
  logic         xfer, l3_sel;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic [63:0]  m_l1 [4];
  logic [127:0] m_l3;
  int checks = 0, failures = 0;

  pin_datapath dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    rst_n = 1'b0; l1_we = '0; half = '0; xfer = 1'b0; l3_sel = 1'b0; bus_in = '0;
    pin_in = '0;
    #120 rst_n = 1'b1;
    @(negedge clk);
    check(pin_oe, '0, "reset: all pins high impedance");
    for (int v = 0; v < 60; v++) begin
      for (int r = 0; r < 4; r++) begin
        m_l1[r] = {$urandom, $urandom};
        for (int h = 0; h < 2; h++) begin
          logic [31:0] w;
          w = h ? m_l1[r][63:32] : m_l1[r][31:0];
          bus_in = {w, w}; half = h ? 2'b10 : 2'b01; l1_we = 4'b1 << r;
          @(negedge clk);
        end
      end
      l1_we = '0; xfer = 1'b1;
      @(negedge clk);
      xfer = 1'b0;
      check(pin_out, {m_l1[1], m_l1[0]}, "pin values");
      check(pin_oe,  {m_l1[3], m_l1[2]}, "pin enables");
      pin_in = (pin_out & pin_oe) | ({$urandom, $urandom, $urandom, $urandom} & ~pin_oe);
      m_l3 = pin_in;
      #20 latch_clk = 1'b1;
      #10 latch_clk = 1'b0;
      pin_in = '0;
      l3_sel = 1'b0; #1 check({64'd0, bus_out}, {64'd0, m_l3[63:0]}, "level 3 pins 0..63");
      l3_sel = 1'b1; #1 check({64'd0, bus_out}, {64'd0, m_l3[127:64]}, "level 3 pins 64..127");
    end
    // One-hot walk: a single bus bit p must reach exactly pins p and p+64.
    for (int p = 0; p < 64; p++) begin
      for (int r = 0; r < 4; r++) begin
        bus_in = (r < 2) ? 64'd1 << p : '1; half = 2'b11; l1_we = 4'b1 << r;
        @(negedge clk);
      end
      l1_we = '0; xfer = 1'b1;
      @(negedge clk);
      xfer = 1'b0;
      check(pin_out, (128'd1 << p) | (128'd1 << (p + 64)), "bus bit to pin mapping");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
