// host_regs: the host's view of the tester, decoded in the control logic.
//
// Every host access is one bus clock with a 16-bit word address and 32-bit
// data (see the register map in mactester_pkg). A write to a level-1 word
// or to the test vector memory, or a read of a level-3 word or of the
// memory, turns into one cycle of internal bus control (ctrl): the host's
// 32 bits travel on the upper or the lower half of the 64-bit bus, as in
// the original. A write of CMD_STEP moves level 1 to level 2, which drives
// the new vector onto the pins and starts the latch delay: this is one
// on-line test step. The other registers hold the latch delay, the off-line
// start address, length and loop bit, a pointer into the vector memory
// (advanced after each access to the upper half) and the power register.
// While an off-line run is active the data path and memory belong to the
// sequencer, so host accesses to them are dropped; all registers and the
// status word stay reachable. Reads return their data in the cycle after
// host_rd. The register map, pointer scheme and read timing are this
// design's own.
module host_regs
  import mactester_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [HOST_W-1:0]  host_wdata,
  input  logic               host_wr,
  input  logic               host_rd,
  output logic [HOST_W-1:0]  host_rdata,
  input  logic [BUS_W-1:0]   bus,          // internal data bus, for reads
  output bus_ctrl_t          ctrl,
  output logic [COARSE_W-1:0] coarse,
  output logic [FINE_W-1:0]  fine,
  output logic [MEM_AW-1:0]  off_addr,
  output logic [LEN_W-1:0]   off_len,
  output logic               off_loop,
  output logic               off_start,
  output logic               off_stop,
  output logic               pwr_wr,
  input  logic [2:0]         pwr_state,
  input  logic               step_busy,
  input  logic               l3_valid,
  input  logic               seq_active,
  input  logic               seq_done,
  input  logic [MEM_AW-1:0]  seq_addr,
  input  logic [LEN_W-1:0]   seq_remaining
);
  logic [7:0]        a;
  logic [MEM_AW-1:0] mem_ptr;
  logic              wr_l1, rd_l3, wr_mem, rd_mem, hi_half;

  assign a       = host_addr[7:0];
  assign hi_half = a[0];
  assign wr_l1   = host_wr && a[7:3] == A_L1_FIRST[7:3];
  assign rd_l3   = host_rd && a[7:2] == A_L3_FIRST[7:2];
  assign wr_mem  = host_wr && (a == A_MEM_LO || a == A_MEM_HI);
  assign rd_mem  = host_rd && (a == A_MEM_LO || a == A_MEM_HI);

  // Internal bus control for the current host access.
  always_comb begin
    ctrl          = BUS_CTRL_IDLE;
    ctrl.mem_addr = mem_ptr;
    if (!seq_active) begin
      if (wr_l1) begin
        ctrl.src             = BUS_HOST;
        ctrl.l1_we[a[2:1]]   = 1'b1;
        ctrl.half            = hi_half ? 2'b10 : 2'b01;
      end
      if (rd_l3) begin
        ctrl.src    = BUS_L3;
        ctrl.l3_sel = a[1];
      end
      if (wr_mem) begin
        ctrl.src    = BUS_HOST;
        ctrl.mem_we = 1'b1;
        ctrl.half   = (a == A_MEM_HI) ? 2'b10 : 2'b01;
      end
      if (rd_mem) ctrl.src = BUS_MEM;
      if (host_wr && a == A_CMD && (host_wdata[2:0] & CMD_STEP) != '0) ctrl.xfer = 1'b1;
    end
  end

  assign off_start = host_wr && a == A_CMD && (host_wdata[2:0] & CMD_START) != '0 && !seq_active;
  assign off_stop  = host_wr && a == A_CMD && (host_wdata[2:0] & CMD_STOP) != '0;
  assign pwr_wr    = host_wr && a == A_POWER;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse     <= '0;
      fine       <= '0;
      off_addr   <= '0;
      off_len    <= '0;
      off_loop   <= 1'b0;
      mem_ptr    <= '0;
      host_rdata <= '0;
    end else begin
      if (host_wr) begin
        unique case (a)
          A_DELAY:    {fine, coarse} <= host_wdata[COARSE_W+FINE_W-1:0];
          A_OFF_ADDR: off_addr <= host_wdata[MEM_AW-1:0];
          A_OFF_LEN:  off_len  <= host_wdata[LEN_W-1:0];
          A_OFF_CTRL: off_loop <= host_wdata[0];
          A_MEM_PTR:  mem_ptr  <= host_wdata[MEM_AW-1:0];
          default: ;
        endcase
      end
      if ((wr_mem || rd_mem) && a == A_MEM_HI && !seq_active) mem_ptr <= mem_ptr + 1'b1;
      if (host_rd) begin
        host_rdata <= '0;
        if (rd_l3 && !seq_active)  host_rdata <= hi_half ? bus[63:32] : bus[31:0];
        if (rd_mem && !seq_active) host_rdata <= (a == A_MEM_HI) ? bus[63:32] : bus[31:0];
        unique case (a)
          A_STATUS:   host_rdata <= {seq_remaining, 12'd0, l3_valid, seq_done, seq_active, step_busy};
          A_SEQ_ADDR: host_rdata <= 32'(seq_addr);
          A_DELAY:    host_rdata <= 32'({fine, coarse});
          A_OFF_ADDR: host_rdata <= 32'(off_addr);
          A_OFF_LEN:  host_rdata <= 32'(off_len);
          A_OFF_CTRL: host_rdata <= 32'(off_loop);
          A_MEM_PTR:  host_rdata <= 32'(mem_ptr);
          A_POWER:    host_rdata <= 32'(pwr_state);
          default: ;
        endcase
      end
    end
  end
endmodule
