// burst_pipeline: deeper level-2 and level-3 registers for short high-speed
// bursts.
//
// This is the pipelining extension of the tester: the host prepares DEPTH
// test vectors one at a time through level 1, as for an on-line step, and
// each one is pushed into a level-2 pipeline stage (load). A go pulse then
// presents the stages on the pins on DEPTH successive edges of the burst
// clock fclk (up to 40 MHz), and a level-3 pipeline captures the pins one
// fclk period after each vector reached them, so each vector has exactly
// one burst clock period to produce its response. The host reads the DEPTH
// captured responses afterwards at its own pace (rd_idx / resp).
//
// The document gives the idea, the 40 MHz rate and four vectors as the
// likely burst length. The push order (the first pushed vector goes out
// first), the toggle handshake between the bus clock and fclk, and holding
// the last vector on the pins after the burst are this design's choices.
// Loads and go are ignored while busy; the stages and captures are only
// read in the other clock domain while the burst logic leaves them still.
module burst_pipeline #(
  parameter int unsigned NPINS = 128,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,      // host bus clock
  input  logic             rst_n,
  input  logic             load,     // push vec_val/vec_oe into the level-2 pipeline
  input  logic [NPINS-1:0] vec_val,
  input  logic [NPINS-1:0] vec_oe,
  input  logic             go,       // start a burst
  output logic             busy,     // burst requested and not yet finished
  input  logic [IW-1:0]    rd_idx,   // which captured response to read
  output logic [NPINS-1:0] resp,
  input  logic             fclk,     // burst clock
  output logic [NPINS-1:0] pin_out,
  output logic [NPINS-1:0] pin_oe,
  input  logic [NPINS-1:0] pin_in
);
  logic [NPINS-1:0] l2_val [DEPTH];
  logic [NPINS-1:0] l2_oe  [DEPTH];
  logic [NPINS-1:0] l3     [DEPTH];

  // ---- bus clock side: level-2 pipeline loads and the burst request.
  logic       req_t;          // toggles once per burst request
  logic [1:0] ack_s;          // done toggle synchronised from fclk
  logic       ack_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        l2_val[i] <= '0;
        l2_oe[i]  <= '0;
      end
    end else if (load && !busy) begin
      for (int i = 0; i < DEPTH - 1; i++) begin
        l2_val[i] <= l2_val[i+1];
        l2_oe[i]  <= l2_oe[i+1];
      end
      l2_val[DEPTH-1] <= vec_val;
      l2_oe[DEPTH-1]  <= vec_oe;
    end
  end

  logic ack_t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_t    <= 1'b0;
      ack_s    <= '0;
      ack_seen <= 1'b0;
    end else begin
      ack_s <= {ack_s[0], ack_t};
      if (go && !busy) req_t <= ~req_t;
      ack_seen <= ack_s[1];
    end
  end
  assign busy = (req_t != ack_seen);
  assign resp = l3[rd_idx];

  // ---- burst clock side.
  logic [2:0]  req_s;         // request toggle synchronised into fclk
  logic        run;
  logic [IW:0] k;             // next vector to present

  always_ff @(posedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      req_s   <= '0;
      run     <= 1'b0;
      k       <= '0;
      ack_t   <= 1'b0;
      pin_out <= '0;
      pin_oe  <= '0;
      for (int i = 0; i < DEPTH; i++) l3[i] <= '0;
    end else begin
      req_s <= {req_s[1:0], req_t};
      if (!run && (req_s[2] != req_s[1])) begin
        run     <= 1'b1;
        pin_out <= l2_val[0];
        pin_oe  <= l2_oe[0];
        k       <= 1;
      end else if (run) begin
        l3[k-1] <= pin_in;              // response to the vector of the last period
        if (k == (IW+1)'(DEPTH)) begin
          run   <= 1'b0;
          ack_t <= ~ack_t;
        end else begin
          pin_out <= l2_val[k[IW-1:0]];
          pin_oe  <= l2_oe[k[IW-1:0]];
          k       <= k + 1'b1;
        end
      end
    end
  end
endmodule
