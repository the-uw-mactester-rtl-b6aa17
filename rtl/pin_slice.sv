// pin_slice: one datapath FPGA of the tester's pin electronics.
//
// A slice serves W bits of the 64-bit internal bus and the 2*W DUT pins
// that those bits reach: bus bit j feeds pin j (low word) and pin j+64
// (high word). Each pin has a level-1 value and direction bit written from
// the bus, a level-2 value and enable bit that drive the pin's tri-state
// driver, and a level-3 bit that captures the pin. Level 1 is written per
// register and per bus bit (bit_en marks the bits inside the bus halves
// being written). A pulse on xfer copies all of level 1 into level 2 at the
// next rising clock edge, so a vector set up by several writes reaches the
// pins at once. Level 3 is clocked by latch_clk, the delayed latch strobe,
// and samples pin_in. bus_out shows the level-3 low or high word.
// The register levels and the 11-bit / 22-pin split follow the tester's
// architecture; the reset value (all pins high impedance, all registers
// zero) is this design's choice.
module pin_slice #(
  parameter int unsigned W = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   bus_in,
  input  logic [3:0]     l1_we,     // VAL_LO, VAL_HI, DIR_LO, DIR_HI
  input  logic [W-1:0]   bit_en,
  input  logic           xfer,
  input  logic           latch_clk,
  input  logic           l3_sel,
  output logic [W-1:0]   bus_out,
  output logic [2*W-1:0] pin_out,   // {high word pins, low word pins}
  output logic [2*W-1:0] pin_oe,
  input  logic [2*W-1:0] pin_in
);
  logic [W-1:0]   l1_val_lo, l1_val_hi, l1_dir_lo, l1_dir_hi;
  logic [2*W-1:0] l2_val, l2_oe, l3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_val_lo <= '0;
      l1_val_hi <= '0;
      l1_dir_lo <= '0;
      l1_dir_hi <= '0;
    end else begin
      if (l1_we[0]) l1_val_lo <= (l1_val_lo & ~bit_en) | (bus_in & bit_en);
      if (l1_we[1]) l1_val_hi <= (l1_val_hi & ~bit_en) | (bus_in & bit_en);
      if (l1_we[2]) l1_dir_lo <= (l1_dir_lo & ~bit_en) | (bus_in & bit_en);
      if (l1_we[3]) l1_dir_hi <= (l1_dir_hi & ~bit_en) | (bus_in & bit_en);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l2_val <= '0;
      l2_oe  <= '0;
    end else if (xfer) begin
      l2_val <= {l1_val_hi, l1_val_lo};
      l2_oe  <= {l1_dir_hi, l1_dir_lo};
    end
  end

  always_ff @(posedge latch_clk or negedge rst_n) begin
    if (!rst_n) l3 <= '0;
    else        l3 <= pin_in;
  end

  assign pin_out = l2_val;
  assign pin_oe  = l2_oe;
  assign bus_out = l3_sel ? l3[2*W-1:W] : l3[W-1:0];
endmodule
