// tb_sram_32kx8: random writes and reads against a reference array.
// Checks that a byte written at the clock edge reads back at its address,
// that unwritten neighbours keep their data, and that dout is zero while
// the chip or its output is disabled.
module tb_sram_32kx8;
  logic        clk = 1'b0;
  logic [14:0] addr;
  logic [7:0]  din, dout;
  logic        ce_n, oe_n, we_n;
  int checks = 0, failures = 0;
  logic [7:0]  ref_mem [logic [14:0]];

  sram_32kx8 dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    ce_n = 1'b1; oe_n = 1'b1; we_n = 1'b1; addr = '0; din = '0;
    @(negedge clk);
    // Write 300 random bytes, mostly to a small window so some are rewritten.
    for (int i = 0; i < 300; i++) begin
      addr = (i % 3 == 0) ? 15'($urandom) : 15'($urandom_range(0, 63));
      din  = 8'($urandom);
      ce_n = 1'b0; we_n = 1'b0; oe_n = 1'b1;
      ref_mem[addr] = din;
      @(negedge clk);
    end
    we_n = 1'b1;
    foreach (ref_mem[a]) begin
      addr = a; ce_n = 1'b0; oe_n = 1'b0;
      #1 check(dout, ref_mem[a], "read back");
    end
    // A write with ce_n high must not change memory.
    addr = 15'd5; ce_n = 1'b1; we_n = 1'b0; din = ~ref_mem.exists(15'd5) ? 8'h00 : ~ref_mem[15'd5];
    @(negedge clk);
    we_n = 1'b1; ce_n = 1'b0; oe_n = 1'b0;
    if (ref_mem.exists(15'd5)) #1 check(dout, ref_mem[15'd5], "write without chip enable ignored");
    oe_n = 1'b1;
    #1 check(dout, 8'h00, "output disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
