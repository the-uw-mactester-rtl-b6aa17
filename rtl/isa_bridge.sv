// isa_bridge: the PC/AT card's composition of 16-bit I/O port accesses into
// 32-bit tester accesses.
//
// On the PC the tester is reached through a few 16-bit I/O ports instead of
// the memory map. Port 0 holds the tester register address. A write to port
// 1 stores the low data half; a write to port 2 sends one 32-bit write,
// {port 2 data, stored low half}, to the tester. A read of port 1 performs
// one 32-bit tester read, returns its low half and keeps the high half,
// which a following read of port 2 returns. Reading port 0 returns the
// address. The composition of two 16-bit accesses into one 32-bit access
// follows the original; the port numbers and the order (low half first)
// are this design's choices. Timing: tester strobes leave in the same cycle
// as the port strobe; io_rdata is valid in the cycle after io_rd, one cycle
// after which the tester's read data is also valid.
module isa_bridge
  import mactester_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         io_port,
  input  logic [15:0]        io_wdata,
  input  logic               io_wr,
  input  logic               io_rd,
  output logic [15:0]        io_rdata,
  output logic [HADDR_W-1:0] t_addr,
  output logic [HOST_W-1:0]  t_wdata,
  output logic               t_wr,
  output logic               t_rd,
  input  logic [HOST_W-1:0]  t_rdata
);
  typedef enum logic [1:0] {RD_NONE, RD_ADDR, RD_LO, RD_HI} rd_e;

  logic [15:0] addr_q, lo_q, hi_q;
  rd_e         rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      lo_q   <= '0;
      hi_q   <= '0;
      rd_q   <= RD_NONE;
    end else begin
      if (io_wr && io_port == 2'd0) addr_q <= io_wdata;
      if (io_wr && io_port == 2'd1) lo_q   <= io_wdata;
      if (rd_q == RD_LO)            hi_q   <= t_rdata[31:16];
      rd_q <= RD_NONE;
      if (io_rd) begin
        unique case (io_port)
          2'd0:    rd_q <= RD_ADDR;
          2'd1:    rd_q <= RD_LO;
          2'd2:    rd_q <= RD_HI;
          default: rd_q <= RD_NONE;
        endcase
      end
    end
  end

  assign t_addr  = addr_q;
  assign t_wdata = {io_wdata, lo_q};
  assign t_wr    = io_wr && io_port == 2'd2;
  assign t_rd    = io_rd && io_port == 2'd1;

  always_comb begin
    unique case (rd_q)
      RD_ADDR: io_rdata = addr_q;
      RD_LO:   io_rdata = t_rdata[15:0];
      RD_HI:   io_rdata = hi_q;
      default: io_rdata = '0;
    endcase
  end
endmodule
