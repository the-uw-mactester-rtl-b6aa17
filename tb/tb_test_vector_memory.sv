// tb_test_vector_memory: half-word and full-word writes against a model.
// The host writes one 32-bit half at a time (four chips); the sequencer
// writes all 64 bits. The test checks that a half write leaves the other
// half alone, and that reads return the model's words.
module tb_test_vector_memory;
  logic        clk = 1'b0;
  logic [14:0] addr;
  logic [63:0] wdata, rdata;
  logic        we, re;
  logic [1:0]  half_en;
  int checks = 0, failures = 0;
  logic [63:0] model [logic [14:0]];

  test_vector_memory dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; re = 1'b0; half_en = '0; addr = '0; wdata = '0;
    @(negedge clk);
    // Full writes to 64 words.
    for (int i = 0; i < 64; i++) begin
      addr = 15'(i * 97); wdata = {$urandom, $urandom}; we = 1'b1; half_en = 2'b11;
      model[addr] = wdata;
      @(negedge clk);
    end
    // Half writes over the same words.
    for (int i = 0; i < 200; i++) begin
      addr = 15'($urandom_range(0, 63) * 97); wdata = {$urandom, $urandom};
      half_en = $urandom_range(0, 1) ? 2'b10 : 2'b01; we = 1'b1;
      if (half_en[0]) model[addr][31:0]  = wdata[31:0];
      if (half_en[1]) model[addr][63:32] = wdata[63:32];
      @(negedge clk);
    end
    we = 1'b0;
    foreach (model[a]) begin
      addr = a; re = 1'b1;
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", a, rdata, model[a]);
      end
    end
    re = 1'b0;
    #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL idle read not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
