// mactester_top: the tester unit, from the host cable to the DUT pins.
//
// A host drives the tester through a 32-bit data / 16-bit address port
// clocked by the host's buffered bus clock (10 MHz for the Mac, 8 MHz on
// most PCs). The control logic (host_regs, offline_sequencer, coarse_delay,
// fine_delay, dut_power_ctrl) steers a 64-bit internal bus between the host,
// the test vector memory and the pin data path. The data path keeps, for
// each of the 128 pins, a value and a direction bit in two register levels
// (level 1 written piecewise, level 2 loaded all at once to drive the
// pins) and captures the pins in level 3 after the programmed latch delay.
// On-line, the host writes the level-1 words, issues a step and reads level
// 3 back. Off-line, the sequencer takes vectors from the memory and puts
// the responses back in it, 13 bus clocks per vector.
//
// With ISA_HOST = 1 the host port is the PC card's 16-bit I/O port
// interface instead: host_addr[1:0] selects the port, host_wdata[15:0] and
// host_rdata[15:0] carry the data, and isa_bridge composes the 32-bit
// accesses. The default (0) is the Mac NuBus card's plain 32-bit port.
//
// BURST_DEPTH > 0 adds the high-speed burst extension (burst_pipeline,
// up to 4 vectors): in burst mode (A_BURST bit 0) every level-2 transfer,
// on-line or off-line, also pushes the new level-2 vector into the burst
// stages, and the pins show the burst stages instead of level 2. A go
// (A_BURST bit 1) runs the burst on fclk; the host then reads the captures
// at A_BURST_RESP. The default 0 is the tester as built: fclk is unused.
// The pins come out as value (pin_out), driver enable (pin_oe) and the
// level seen on the pin (pin_in); the tri-state pads, the power FETs and
// the LEDs are outside this logic. The structure follows the original's
// block diagram; the partition into these modules is this design's.
module mactester_top
  import mactester_pkg::*;
#(
  parameter bit          ISA_HOST    = 1'b0,
  parameter int unsigned BURST_DEPTH = 0
) (
  input  logic               clk,          // buffered host bus clock
  input  logic               fclk,         // burst clock (BURST_DEPTH > 0 only)
  input  logic               rst_n,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [HOST_W-1:0]  host_wdata,
  input  logic               host_wr,
  input  logic               host_rd,
  output logic [HOST_W-1:0]  host_rdata,
  output logic [NPINS-1:0]   pin_out,
  output logic [NPINS-1:0]   pin_oe,
  input  logic [NPINS-1:0]   pin_in,
  output logic               fet_direct_on,
  output logic               fet_indirect_on,
  output logic               led_ready,
  output logic               led_dut_power
);
  // Tester-side host port, after the optional ISA composition.
  logic [HADDR_W-1:0] t_addr;
  logic [HOST_W-1:0]  t_wdata, t_rdata, regs_rdata;
  logic               t_wr, t_rd;

  if (ISA_HOST) begin : g_isa
    logic [15:0] io_rdata;
    isa_bridge u_isa (
      .clk      (clk),
      .rst_n    (rst_n),
      .io_port  (host_addr[1:0]),
      .io_wdata (host_wdata[15:0]),
      .io_wr    (host_wr),
      .io_rd    (host_rd),
      .io_rdata (io_rdata),
      .t_addr   (t_addr),
      .t_wdata  (t_wdata),
      .t_wr     (t_wr),
      .t_rd     (t_rd),
      .t_rdata  (t_rdata)
    );
    assign host_rdata = {16'd0, io_rdata};
  end else begin : g_direct
    assign t_addr     = host_addr;
    assign t_wdata    = host_wdata;
    assign t_wr       = host_wr;
    assign t_rd       = host_rd;
    assign host_rdata = t_rdata;
  end

  // Control logic.
  bus_ctrl_t           host_ctrl, seq_ctrl, ctrl;
  logic [BUS_W-1:0]    bus, mem_rdata, l3_bus;
  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;
  logic [MEM_AW-1:0]   off_addr, seq_addr;
  logic [LEN_W-1:0]    off_len, seq_remaining;
  logic                off_loop, off_start, off_stop;
  logic                seq_active, seq_done;
  logic                trig, latch_clk, l3_valid, step_busy;
  logic                pwr_wr;
  logic [2:0]          pwr_state;
  logic [NPINS-1:0]    dp_out, dp_oe;

  host_regs u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .host_addr  (t_addr),
    .host_wdata (t_wdata),
    .host_wr    (t_wr),
    .host_rd    (t_rd),
    .host_rdata (regs_rdata),
    .bus        (bus),
    .ctrl       (host_ctrl),
    .coarse     (coarse),
    .fine       (fine),
    .off_addr   (off_addr),
    .off_len    (off_len),
    .off_loop   (off_loop),
    .off_start  (off_start),
    .off_stop   (off_stop),
    .pwr_wr     (pwr_wr),
    .pwr_state  (pwr_state),
    .step_busy  (step_busy),
    .l3_valid   (l3_valid),
    .seq_active (seq_active),
    .seq_done      (seq_done),
    .seq_addr      (seq_addr),
    .seq_remaining (seq_remaining)
  );

  offline_sequencer u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (off_start),
    .stop       (off_stop),
    .loop_en    (off_loop),
    .start_addr (off_addr),
    .length     (off_len),
    .l3_valid   (l3_valid),
    .ctrl       (seq_ctrl),
    .active     (seq_active),
    .done       (seq_done),
    .cur_addr   (seq_addr),
    .remaining  (seq_remaining)
  );

  assign ctrl = seq_active ? seq_ctrl : host_ctrl;

  // Internal 64-bit data bus.
  always_comb begin
    unique case (ctrl.src)
      BUS_HOST: bus = {t_wdata, t_wdata};
      BUS_MEM:  bus = mem_rdata;
      BUS_L3:   bus = l3_bus;
      default:  bus = '0;
    endcase
  end

  // Delayed latch: coarse count in bus clocks, then the buffer chain.
  coarse_delay #(.CW(COARSE_W)) u_coarse (
    .clk   (clk),
    .rst_n (rst_n),
    .start (ctrl.xfer),
    .count (coarse),
    .trig  (trig),
    .valid (l3_valid),
    .busy  (step_busy)
  );

  fine_delay #(.TAPS(2**FINE_W)) u_fine (
    .trig_in  (trig),
    .sel      (fine),
    .trig_out (latch_clk)
  );

  test_vector_memory #(.AW(MEM_AW), .CHIPS(BUS_W / 8)) u_mem (
    .clk     (clk),
    .addr    (ctrl.mem_addr),
    .wdata   (bus),
    .we      (ctrl.mem_we),
    .half_en (ctrl.half),
    .re      (ctrl.src == BUS_MEM),
    .rdata   (mem_rdata)
  );

  pin_datapath #(.BW(BUS_W)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_in    (bus),
    .l1_we     (ctrl.l1_we),
    .half      (ctrl.half),
    .xfer      (ctrl.xfer),
    .latch_clk (latch_clk),
    .l3_sel    (ctrl.l3_sel),
    .bus_out   (l3_bus),
    .pin_out   (dp_out),
    .pin_oe    (dp_oe),
    .pin_in    (pin_in)
  );

  if (BURST_DEPTH > 0) begin : g_burst
    localparam int unsigned BIW = (BURST_DEPTH > 1) ? $clog2(BURST_DEPTH) : 1;
    logic             mode, go, xfer_q, busy, rd_q;
    logic [NPINS-1:0] b_out, b_oe, resp;
    logic [BIW-1:0]   rd_idx;
    logic [HOST_W-1:0] rdata_q;

    assign go     = t_wr && t_addr[7:0] == A_BURST && t_wdata[1];
    assign rd_idx = BIW'(t_addr[3:2]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode    <= 1'b0;
        xfer_q  <= 1'b0;
        rd_q    <= 1'b0;
        rdata_q <= '0;
      end else begin
        xfer_q <= ctrl.xfer;
        if (t_wr && t_addr[7:0] == A_BURST) mode <= t_wdata[0];
        if (t_rd) begin
          rd_q    <= (t_addr[7:0] == A_BURST) || (t_addr[7:4] == A_BURST_RESP[7:4]);
          rdata_q <= (t_addr[7:0] == A_BURST) ? HOST_W'({busy, mode})
                                               : resp[32*t_addr[1:0] +: 32];
        end
      end
    end

    burst_pipeline #(.NPINS(NPINS), .DEPTH(BURST_DEPTH)) u_burst (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (mode && xfer_q),     // level 2 took the vector at the last edge
      .vec_val (dp_out),
      .vec_oe  (dp_oe),
      .go      (go),
      .busy    (busy),
      .rd_idx  (rd_idx),
      .resp    (resp),
      .fclk    (fclk),
      .pin_out (b_out),
      .pin_oe  (b_oe),
      .pin_in  (pin_in)
    );

    assign pin_out = mode ? b_out : dp_out;
    assign pin_oe  = mode ? b_oe  : dp_oe;
    assign t_rdata = rd_q ? rdata_q : regs_rdata;
  end else begin : g_no_burst
    assign pin_out = dp_out;
    assign pin_oe  = dp_oe;
    assign t_rdata = regs_rdata;
  end

  dut_power_ctrl u_pwr (
    .clk             (clk),
    .rst_n           (rst_n),
    .wr              (pwr_wr),
    .wdata           (t_wdata[2:0]),
    .rdata           (pwr_state),
    .fet_direct_on   (fet_direct_on),
    .fet_indirect_on (fet_indirect_on),
    .led_ready       (led_ready),
    .led_dut_power   (led_dut_power)
  );

  // A memory write and a read of the same memory never share a cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ctrl.mem_we && ctrl.src == BUS_MEM));
  // Only one level-1 register is written per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ctrl.l1_we));
endmodule
