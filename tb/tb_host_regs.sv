// tb_host_regs: the host register decoder.
// Every host access is made and the bus control it produces is compared
// with the register map: level-1 writes (register and half), level-3 and
// memory reads (data from the right half of the bus, one cycle later),
// memory writes and the pointer's advance after the upper half, the step,
// start and stop commands, the delay, off-line and power registers, the
// status word, and that data path accesses are dropped during an off-line
// run.
module tb_host_regs;
  import mactester_pkg::*;
  logic                clk = 1'b0, rst_n;
  logic [15:0]         host_addr;
  logic [31:0]         host_wdata, host_rdata;
  logic                host_wr, host_rd;
  logic [63:0]         bus;
  bus_ctrl_t           ctrl;
  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;
  logic [MEM_AW-1:0]   off_addr, seq_addr;
  logic [LEN_W-1:0]    off_len, seq_remaining;
  logic                off_loop, off_start, off_stop, pwr_wr;
  logic [2:0]          pwr_state;
  logic                step_busy, l3_valid, seq_active, seq_done;
  int checks = 0, failures = 0;

  host_regs dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Drive one access and sample the control it produces in that cycle.
  bus_ctrl_t seen;
  task automatic access(input bit wr, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    host_addr = {8'h5a, a}; host_wdata = d; host_wr = wr; host_rd = !wr;
    #1 seen = ctrl;
    @(negedge clk); host_wr = 1'b0; host_rd = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; host_addr = '0; host_wdata = '0; host_wr = 1'b0; host_rd = 1'b0;
    bus = '0; pwr_state = 3'b101; step_busy = 1'b0; l3_valid = 1'b1;
    seq_active = 1'b0; seq_done = 1'b1; seq_addr = 15'h1234; seq_remaining = 16'd77;
    #120 rst_n = 1'b1;
    // Level-1 writes: eight words.
    for (int w = 0; w < 8; w++) begin
      access(1, 8'(w), 32'hcafe_0000 + w);
      check(seen.src, BUS_HOST, "level-1 write drives host data");
      check(seen.l1_we, 4'b1 << (w / 2), "level-1 register select");
      check(seen.half, (w % 2) ? 2'b10 : 2'b01, "level-1 half select");
      check(seen.xfer, 0, "no transfer on a level-1 write");
    end
    // Level-3 reads: four words.
    for (int w = 0; w < 4; w++) begin
      bus = {32'h1111_0000 + w, 32'h2222_0000 + w};
      access(0, 8'h08 + 8'(w), '0);
      check(seen.src, BUS_L3, "level-3 read selects level 3");
      check(seen.l3_sel, w / 2, "level-3 word select");
      check(host_rdata, (w % 2) ? 32'h1111_0000 + w : 32'h2222_0000 + w, "level-3 read data");
    end
    // Step command.
    access(1, A_CMD, 32'(CMD_STEP));
    check(seen.xfer, 1, "step transfers level 1 to level 2");
    // Memory: pointer, low write, high write, pointer advance.
    access(1, A_MEM_PTR, 32'd100);
    access(1, A_MEM_LO, 32'h0123_4567);
    check(seen.mem_we, 1, "memory write low");
    check(seen.half, 2'b01, "memory low half");
    check(seen.mem_addr, 100, "memory address from pointer");
    access(1, A_MEM_HI, 32'h89ab_cdef);
    check(seen.half, 2'b10, "memory high half");
    check(seen.mem_addr, 100, "pointer advances after the access");
    access(0, A_MEM_PTR, '0);
    check(host_rdata, 101, "pointer advanced after upper half");
    bus = 64'hfeed_face_beef_f00d;
    access(0, A_MEM_LO, '0);
    check(seen.src, BUS_MEM, "memory read selects memory");
    check(host_rdata, 32'hbeef_f00d, "memory low read");
    access(0, A_MEM_HI, '0);
    check(host_rdata, 32'hfeed_face, "memory high read");
    access(0, A_MEM_PTR, '0);
    check(host_rdata, 102, "pointer advanced after upper read");
    // Delay, off-line and power registers.
    access(1, A_DELAY, 32'h0000_05a3);
    check(coarse, 8'ha3, "coarse delay");
    check(fine, 3'd5, "fine delay");
    access(0, A_DELAY, '0);
    check(host_rdata, 32'h5a3, "delay readback");
    access(1, A_OFF_ADDR, 32'd600);
    access(1, A_OFF_LEN, 32'd5461);
    access(1, A_OFF_CTRL, 32'd1);
    check(off_addr, 600, "off-line start address");
    check(off_len, 5461, "off-line length");
    check(off_loop, 1, "loop bit");
    @(negedge clk); host_addr = {8'h00, A_CMD}; host_wdata = 32'(CMD_START); host_wr = 1'b1;
    #1 check(off_start, 1, "start command");
    host_wdata = 32'(CMD_STOP);
    #1 check(off_stop, 1, "stop command");
    @(negedge clk); host_wr = 1'b0;
    #1 check(off_start, 0, "start is a single-cycle pulse");
    @(negedge clk); host_addr = {8'h00, A_POWER}; host_wdata = 32'd6; host_wr = 1'b1;
    #1 check(pwr_wr, 1, "power register write");
    @(negedge clk); host_wr = 1'b0;
    access(0, A_POWER, '0);
    check(host_rdata, 5, "power readback");
    access(0, A_STATUS, '0);
    check(host_rdata, {16'd77, 12'd0, 4'b1100}, "status word");
    access(0, A_SEQ_ADDR, '0);
    check(host_rdata, 32'h1234, "sequencer address");
    // During an off-line run the data path ignores the host.
    seq_active = 1'b1;
    access(1, 8'h00, 32'hffff_ffff);
    check(seen.l1_we, 0, "level-1 write dropped while running");
    access(1, A_MEM_LO, 32'h0);
    check(seen.mem_we, 0, "memory write dropped while running");
    access(1, A_CMD, 32'(CMD_STEP));
    check(seen.xfer, 0, "step dropped while running");
    @(negedge clk); host_addr = {8'h00, A_CMD}; host_wdata = 32'(CMD_START); host_wr = 1'b1;
    #1 check(off_start, 0, "no restart while running");
    @(negedge clk); host_wr = 1'b0;
    access(0, A_STATUS, '0);
    check(host_rdata[1], 1, "status shows running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
