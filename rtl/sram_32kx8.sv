// sram_32kx8: one 32K x 8 static RAM chip of the test vector memory.
//
// The tester uses eight such chips (85 ns parts) side by side. This model
// keeps the chip's byte-wide, active-low control interface but is written
// as synchronous logic on the tester's bus clock: a write happens at the
// rising clock edge while ce_n and we_n are both low; a read is
// combinational, dout showing the addressed byte while ce_n and oe_n are low
// and zero otherwise (the separate din/dout replace the chip's shared data
// pins). Because the bus clock period (100 ns) exceeds the access time, the
// controller gives each access a full address cycle before it uses the data.
// The clocked write and the zero on an idle dout are this design's choices.
module sram_32kx8 #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!ce_n && !we_n) mem[addr] <= din;
  end

  assign dout = (!ce_n && !oe_n) ? mem[addr] : '0;
endmodule
