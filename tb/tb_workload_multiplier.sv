// tb_workload_multiplier: the multiplier test programs run on the tester.
//
// Part 1 is the combinational 8x8 multiplier program: all 65536 input pairs
// are applied on-line, one vector each, and every product is compared with
// i*j. Part 2 is the off-line program for the dynamic single-stage
// pipelined multiplier: for each multiplier value i, one off-line block
// holds a pipeline fill, 256 two-phase clock sequences (four vectors each:
// phi1 high, phi1 low, phi2 high, phi2 low) and a pipeline drain. The block
// is generated into the vector memory (first pass), run at the off-line
// rate, and the responses are checked (second pass) against the product of
// the previous inputs. The pipelined device stores its inputs dynamically
// and loses them 10 us after they were written, which the off-line rate
// (1.3 us per vector) beats. Part 2 runs all 256 values of i, each in a
// full-length block of 1032 vectors.
//
// Pins: combinational device 0..7, 8..15 -> 16..31; pipelined device
// 64..71, 72..79, phi1 = 80, phi2 = 81 -> 96..111.
module tb_workload_multiplier;
  import mactester_pkg::*;

  localparam realtime TCLK = 100.0;

  logic         clk = 1'b0, fclk = 1'b0, rst_n;
  logic [15:0]  host_addr;
  logic [31:0]  host_wdata, host_rdata;
  logic         host_wr, host_rd;
  logic [127:0] pin_out, pin_oe, pin_in;
  logic         fet_direct_on, fet_indirect_on, led_ready, led_dut_power;
  int checks = 0, failures = 0;

  mactester_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- Devices.
  logic [7:0]  dyn_a, dyn_b;
  logic [15:0] dyn_out;
  realtime     dyn_written;
  logic [127:0] dut_drive, dut_oe;

  always @(posedge pin_out[80])
    if (pin_oe[80]) dyn_out <= ($realtime - dyn_written > 10000.0) ? 16'h0 : 16'(dyn_a) * 16'(dyn_b);
  always @(posedge pin_out[81])
    if (pin_oe[81]) begin
      dyn_a <= pin_out[71:64];
      dyn_b <= pin_out[79:72];
      dyn_written = $realtime;
    end

  always_comb begin
    dut_drive = '0;
    dut_oe    = '0;
    if (fet_direct_on) begin
      dut_drive[31:16]  = 16'(pin_out[7:0]) * 16'(pin_out[15:8]);
      dut_oe[31:16]     = '1;
      dut_drive[111:96] = dyn_out;
      dut_oe[111:96]    = '1;
    end
  end
  assign pin_in = (pin_out & pin_oe) | (dut_drive & dut_oe & ~pin_oe);

  // ---- Host.
  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_wdata = d; host_wr = 1'b1;
    @(negedge clk); host_wr = 1'b0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = 16'(a); host_rd = 1'b1;
    @(negedge clk); host_rd = 1'b0; d = host_rdata;
  endtask

  logic [127:0] v_val, v_dir;

  // Off-line generate pass: six memory words per vector.
  task automatic gen_vector();
    logic [63:0] w [6];
    w[0] = v_val[63:0]; w[1] = v_val[127:64]; w[2] = v_dir[63:0]; w[3] = v_dir[127:64];
    w[4] = '0; w[5] = '0;
    for (int k = 0; k < 6; k++) begin
      hw(A_MEM_LO, w[k][31:0]);
      hw(A_MEM_HI, w[k][63:32]);
    end
  endtask

  int   nvec;
  int   chk_vec [$];
  int   chk_exp [$];

  task automatic clockchip(input int a, input int b);
    v_val[71:64] = 8'(a); v_val[79:72] = 8'(b);
    v_val[80] = 1'b1; gen_vector(); nvec++;
    v_val[80] = 1'b0; gen_vector(); nvec++;
    v_val[81] = 1'b1; gen_vector(); nvec++;
    v_val[81] = 1'b0; gen_vector(); nvec++;
  endtask

  initial begin
    logic [31:0] st, d;
    int online_vectors = 0, offline_vectors = 0, blocks = 0;
    rst_n = 1'b0; host_addr = '0; host_wdata = '0; host_wr = 1'b0; host_rd = 1'b0;
    dyn_a = '0; dyn_b = '0; dyn_out = '0; dyn_written = 0;
    #(TCLK * 3) rst_n = 1'b1;
    hw(A_POWER, 32'b101);

    // ---- Part 1: combinational multiplier, on-line, all pairs.
    // Direction words: pins 0..15 driven; everything else stays an input.
    hw(8'h04, 32'h0000_ffff);
    hw(8'h05, '0); hw(8'h06, '0); hw(8'h07, '0);
    hw(8'h01, '0); hw(8'h02, '0); hw(8'h03, '0);
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        hw(8'h00, {16'd0, 8'(j), 8'(i)});
        hw(A_CMD, 32'(CMD_STEP));
        do hr(A_STATUS, st); while (!st[3]);
        hr(8'h08, d);
        online_vectors++;
        checks++;
        if (d[31:16] != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("FAIL on-line %0d * %0d = %0d", i, j, d[31:16]);
        end
      end
    end
    $display("on-line vectors: %0d", online_vectors);

    // ---- Part 2: pipelined dynamic multiplier, off-line blocks.
    for (int i = 0; i < 256; i++) begin
      int lasti, lastj, clocks;
      realtime t0;
      v_val = '0;
      v_dir = '0;
      v_dir[81:64] = '1;             // inputs and both clocks driven
      nvec = 0;
      chk_vec.delete(); chk_exp.delete();
      hw(A_MEM_PTR, 32'd0);
      // fillpipe: load the pipeline with the first pair of the block.
      lasti = i; lastj = 0;
      clockchip(lasti, lastj);
      for (int j = 0; j < 256; j++) begin
        clockchip(i, j);
        chk_vec.push_back(nvec - 1);
        chk_exp.push_back(lasti * lastj);
        lasti = i; lastj = j;
      end
      // emptypipe: one more clock brings out the last product.
      clockchip(0, 0);
      chk_vec.push_back(nvec - 1);
      chk_exp.push_back(lasti * lastj);
      check(nvec <= 5461 ? 1 : 0, 1, "block fits the vector memory");
      // Run the block.
      hw(A_OFF_ADDR, 32'd0);
      hw(A_OFF_LEN, 32'(nvec));
      @(negedge clk); host_addr = 16'(A_CMD); host_wdata = 32'(CMD_START); host_wr = 1'b1;
      t0 = $realtime;
      @(negedge clk); host_wr = 1'b0;
      do hr(A_STATUS, st); while (!st[2] || st[1]);
      clocks = int'(($realtime - t0) / TCLK);
      check(clocks >= 13 * nvec && clocks <= 13 * nvec + 4 ? 1 : 0, 1, "13 clocks per off-line vector");
      offline_vectors += nvec;
      blocks++;
      // Verify pass.
      foreach (chk_vec[k]) begin
        hw(A_MEM_PTR, 32'(6 * chk_vec[k] + 4));
        hr(A_MEM_HI, d);   // skip pins 63:32; the pointer moves to the high response word
        hr(A_MEM_LO, d);
        hr(A_MEM_HI, d);
        check(d[15:0], chk_exp[k], "off-line pipelined product");
      end
    end
    $display("off-line blocks: %0d, vectors: %0d", blocks, offline_vectors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
