// pin_datapath: the tester's 128-pin data path, six pin slices wide.
//
// The 64-bit internal bus is cut into slices of SLICE_BITS bits (11, the
// width one datapath FPGA handles); with the default bus the six slices
// take 11, 11, 11, 11, 11 and 9 bits and serve 22 pins each except the last
// (18). Pin p < 64 hangs on bus bit p, pin p >= 64 on bus bit p-64. The
// level-1 write enables and the bus half mask reach every slice; level 2 is
// loaded from level 1 by xfer; level 3 is clocked by latch_clk and put on the
// bus word by word (l3_sel). Widths and the slice split follow the tester's
// description; the bit-to-pin assignment is this design's choice.
// Interface timing: level-1 writes and xfer act at the rising edge of clk;
// bus_out is combinational from level 3.
module pin_datapath
  import mactester_pkg::*;
#(
  parameter int unsigned BW         = BUS_W,  // internal bus width
  parameter int unsigned SLICE_BITS = 11      // bus bits per datapath FPGA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [BW-1:0] bus_in,
  input  logic [3:0]    l1_we,
  input  logic [1:0]    half,       // [0] bits BW/2-1:0, [1] bits BW-1:BW/2
  input  logic          xfer,
  input  logic          latch_clk,
  input  logic          l3_sel,
  output logic [BW-1:0] bus_out,
  output logic [2*BW-1:0] pin_out,
  output logic [2*BW-1:0] pin_oe,
  input  logic [2*BW-1:0] pin_in
);
  localparam int unsigned NSLICE = (BW + SLICE_BITS - 1) / SLICE_BITS;

  logic [BW-1:0] bit_en;
  assign bit_en = {{(BW/2){half[1]}}, {(BW/2){half[0]}}};

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    localparam int unsigned LO = s * SLICE_BITS;
    localparam int unsigned W  = (LO + SLICE_BITS <= BW) ? SLICE_BITS : BW - LO;
    logic [2*W-1:0] s_out, s_oe, s_in;

    assign s_in = {pin_in[BW + LO +: W], pin_in[LO +: W]};

    pin_slice #(.W(W)) u_slice (
      .clk       (clk),
      .rst_n     (rst_n),
      .bus_in    (bus_in[LO +: W]),
      .l1_we     (l1_we),
      .bit_en    (bit_en[LO +: W]),
      .xfer      (xfer),
      .latch_clk (latch_clk),
      .l3_sel    (l3_sel),
      .bus_out   (bus_out[LO +: W]),
      .pin_out   (s_out),
      .pin_oe    (s_oe),
      .pin_in    (s_in)
    );

    assign pin_out[LO +: W]      = s_out[W-1:0];
    assign pin_out[BW + LO +: W] = s_out[2*W-1:W];
    assign pin_oe[LO +: W]       = s_oe[W-1:0];
    assign pin_oe[BW + LO +: W]  = s_oe[2*W-1:W];
  end
endmodule
