// tb_workload_selftest: the memory self-test a test program runs before
// any test, over the whole 32K x 64 vector memory, through the host port.
//
// Pass 1 writes every word with a pattern made from its own address (so an
// address line stuck or shorted shows up as a wrong word), using the
// pointer's auto-increment, then reads the memory back. Pass 2 repeats with
// every bit inverted, so each cell holds both 0 and 1. The bench also checks
// that the 15-bit pointer wraps from the last word to word 0.
module tb_workload_selftest;
  import mactester_pkg::*;

  localparam int unsigned WORDS = 2 ** MEM_AW;

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr = '0;
  logic [31:0]  host_wdata = '0, host_rdata;
  logic         host_wr = 1'b0, host_rd = 1'b0;
  logic [127:0] pin_out, pin_oe;
  logic [127:0] pin_in = '0;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top dut (.*);

  always #50 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  function automatic logic [63:0] pattern(input int w, input bit inv);
    logic [63:0] p;
    p = {32'(w) * 32'h9e37_79b1, 17'(w) ^ 17'h1_a5a5, 15'(w)};
    return inv ? ~p : p;
  endfunction

  initial begin
    logic [31:0] lo, hi, ptr;
    int bad_words;
    rst_n = 1'b0;
    #230 rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      hw(A_MEM_PTR, 32'd0);
      for (int w = 0; w < WORDS; w++) begin
        logic [63:0] p;
        p = pattern(w, pass[0]);
        hw(A_MEM_LO, p[31:0]);
        hw(A_MEM_HI, p[63:32]);
      end
      hr(A_MEM_PTR, ptr);
      check(64'(ptr), 64'd0, "pointer wraps to word 0 after the last word");
      bad_words = 0;
      for (int w = 0; w < WORDS; w++) begin
        hr(A_MEM_LO, lo);
        hr(A_MEM_HI, hi);
        if ({hi, lo} !== pattern(w, pass[0])) bad_words++;
        check({hi, lo}, pattern(w, pass[0]), pass ? "inverted pattern" : "address pattern");
      end
      check(64'(bad_words), 64'd0, "bad words in the pass");
    end
    $display("self-test: %0d words x 2 patterns", WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
