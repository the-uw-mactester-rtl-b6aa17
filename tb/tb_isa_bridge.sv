// tb_isa_bridge: 16-bit port accesses composed into 32-bit tester accesses.
// A small register file stands in for the tester (reads answer one cycle
// after the strobe). The test writes random 32-bit words through the ports
// (address, low half, high half) and checks that exactly one 32-bit write
// with the right address and data arrives per word, then reads them back
// through the ports and checks both halves and the single 32-bit read.
module tb_isa_bridge;
  logic        clk = 1'b0, rst_n;
  logic [1:0]  io_port;
  logic [15:0] io_wdata, io_rdata;
  logic        io_wr, io_rd;
  logic [15:0] t_addr;
  logic [31:0] t_wdata, t_rdata;
  logic        t_wr, t_rd;
  logic [31:0] regs [16];
  logic [31:0] model [16];
  int t_writes = 0, t_reads = 0;
  int checks = 0, failures = 0;

  isa_bridge dut (.*);

  always #62.5 clk = ~clk;   // 8 MHz PC bus clock

  always_ff @(posedge clk) begin
    if (t_wr) begin regs[t_addr[3:0]] <= t_wdata; t_writes++; end
    if (t_rd) begin t_rdata <= regs[t_addr[3:0]]; t_reads++; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic port_wr(input logic [1:0] p, input logic [15:0] d);
    @(negedge clk); io_port = p; io_wdata = d; io_wr = 1'b1;
    @(negedge clk); io_wr = 1'b0;
  endtask

  task automatic port_rd(input logic [1:0] p, output logic [15:0] d);
    @(negedge clk); io_port = p; io_rd = 1'b1;
    @(negedge clk); io_rd = 1'b0; d = io_rdata;
  endtask

  initial begin
    logic [15:0] lo, hi, a;
    rst_n = 1'b0; io_port = '0; io_wdata = '0; io_wr = 1'b0; io_rd = 1'b0; t_rdata = '0;
    foreach (regs[i]) regs[i] = '0;
    foreach (model[i]) model[i] = '0;
    #150 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      int n0;
      model[i] = $urandom;
      port_wr(2'd0, 16'(i));
      n0 = t_writes;
      port_wr(2'd1, model[i][15:0]);
      check(32'(t_writes - n0), 0, "low half alone writes nothing");
      port_wr(2'd2, model[i][31:16]);
      check(32'(t_writes - n0), 1, "high half sends one 32-bit write");
      @(negedge clk);
      check(regs[i], model[i], "composed 32-bit write");
    end
    for (int i = 15; i >= 0; i--) begin
      int n0;
      port_wr(2'd0, 16'(i));
      port_rd(2'd0, a);
      check(32'(a), 32'(i), "address port readback");
      n0 = t_reads;
      port_rd(2'd1, lo);
      port_rd(2'd2, hi);
      check(32'(t_reads - n0), 1, "one 32-bit read per word");
      check({hi, lo}, model[i], "composed 32-bit read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
