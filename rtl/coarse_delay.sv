// coarse_delay: the coarse part of the delayed latch.
//
// When a test vector reaches the pins (start, the same cycle as the level-2
// transfer), the counter waits count bus clock periods and then raises trig
// for one cycle; trig goes through the fine delay line and clocks the
// level-3 registers. With count = 0 trig rises at the very edge that loads
// level 2, so the latch is timed by the fine delay alone. valid rises one
// bus clock after trig, when level 3 is safely captured, and stays high
// until the next start; busy covers the time in between. Counting in bus
// clock periods follows the original (100 ns on the Mac, 125 ns on the PC);
// the counter width, the count = 0 behaviour and valid/busy are this
// design's choices.
module coarse_delay #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] count,
  output logic          trig,
  output logic          valid,
  output logic          busy
);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      trig  <= 1'b0;
      valid <= 1'b0;
      busy  <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (start) begin
        valid <= 1'b0;
        busy  <= 1'b1;
        cnt   <= count;
        trig  <= (count == '0);
      end else begin
        if (cnt != '0) begin
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) trig <= 1'b1;
        end
        if (trig) begin
          valid <= 1'b1;
          busy  <= 1'b0;
        end
      end
    end
  end
endmodule
