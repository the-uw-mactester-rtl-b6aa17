// tb_pin_slice: one 11-bit / 22-pin slice against a reference model.
// Random level-1 writes with random bit masks, then a transfer; the pins
// must show the model's level-1 values and enables only after the transfer.
// Level 3 is clocked by a separate strobe and must hold the sampled pins.
module tb_pin_slice;
  localparam int W = 11;
  logic           clk = 1'b0, rst_n, latch_clk = 1'b0;
  logic [W-1:0]   bus_in, bit_en, bus_out;
  logic [3:0]     l1_we;
  logic           xfer, l3_sel;
  logic [2*W-1:0] pin_out, pin_oe, pin_in;
  logic [W-1:0]   m_l1 [4];
  logic [2*W-1:0] m_val, m_oe, m_l3;
  int checks = 0, failures = 0;

  pin_slice #(.W(W)) dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2*W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; l1_we = '0; xfer = 1'b0; l3_sel = 1'b0; bus_in = '0; bit_en = '0;
    pin_in = '0;
    foreach (m_l1[i]) m_l1[i] = '0;
    m_val = '0; m_oe = '0;
    #120 rst_n = 1'b1;
    @(negedge clk);
    check(pin_oe, '0, "reset leaves pins undriven");
    for (int v = 0; v < 100; v++) begin
      for (int k = 0; k < 6; k++) begin
        int r;
        r = $urandom_range(0, 3);
        bus_in = W'($urandom); bit_en = W'($urandom);
        l1_we = 4'b1 << r;
        m_l1[r] = (m_l1[r] & ~bit_en) | (bus_in & bit_en);
        @(negedge clk);
      end
      l1_we = '0;
      check(pin_out, m_val, "pins hold until transfer");
      xfer = 1'b1;
      m_val = {m_l1[1], m_l1[0]};
      m_oe  = {m_l1[3], m_l1[2]};
      @(negedge clk);
      xfer = 1'b0;
      check(pin_out, m_val, "pin values after transfer");
      check(pin_oe, m_oe, "pin enables after transfer");
      pin_in = (m_val & m_oe) | (2*W)'($urandom) & ~m_oe;
      m_l3 = pin_in;
      #10 latch_clk = 1'b1;
      #10 latch_clk = 1'b0;
      pin_in = ~pin_in;   // later changes must not reach level 3
      l3_sel = 1'b0; #1 check({{W{1'b0}}, bus_out}, {{W{1'b0}}, m_l3[W-1:0]}, "level 3 low word");
      l3_sel = 1'b1; #1 check({{W{1'b0}}, bus_out}, {{W{1'b0}}, m_l3[2*W-1:W]}, "level 3 high word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
