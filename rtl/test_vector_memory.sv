// test_vector_memory: the tester's 64-bit test vector memory.
//
// Eight 32K x 8 SRAMs share one address and together form a 64-bit word,
// matching the internal data bus. Chips 0..3 hold bits 31:0 and chips 4..7
// bits 63:32, so the host, whose port is 32 bits wide, writes one half by
// enabling four chips, while the off-line sequencer moves whole 64-bit
// words. Each test vector occupies six consecutive words (pin values low
// and high, pin directions low and high, responses low and high), giving
// 32768 / 6 = 5461 vectors. The half-select by chip enable is this design's
// reading of how the host uses "the upper or the lower half" of the bus.
// Timing: reads are combinational from addr, writes take effect at the
// rising clock edge when we and the half's bit in half_en are set.
module test_vector_memory #(
  parameter int unsigned AW    = 15,  // address bits of one SRAM chip
  parameter int unsigned CHIPS = 8    // byte-wide chips across the word
) (
  input  logic                  clk,
  input  logic [AW-1:0]         addr,
  input  logic [8*CHIPS-1:0]    wdata,
  input  logic                  we,
  input  logic [1:0]            half_en,  // [0] low chips, [1] high chips
  input  logic                  re,
  output logic [8*CHIPS-1:0]    rdata
);
  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    logic sel;
    assign sel = half_en[(c < CHIPS / 2) ? 0 : 1];
    sram_32kx8 #(.AW(AW), .DW(8)) u_sram (
      .clk  (clk),
      .addr (addr),
      .din  (wdata[8*c +: 8]),
      .dout (rdata[8*c +: 8]),
      .ce_n (!(re || (we && sel))),
      .oe_n (!re),
      .we_n (!(we && sel))
    );
  end
endmodule
